// link_station: one complete adapter for the two-station link test: the MAC
// controller, its FLASH/SRAM model, a processor model, a host PC model and a
// model of the radio's baseband processor, which connects the controller's
// serial interface to a shared "air" link.
// Baseband, transmit side: when tx_pe rises it sends a preamble and header of
// pre_bits bit times, then raises tx_rdy and strobes one bit every bitclk
// clocks; the bits are put on the air (air_tx_on while the MPDU is sent, one
// air_tx_bit_en pulse per bit with the bit on air_tx_bit). Receive side: it
// registers the other station's air bits into rxd/rx_bit_en and holds md_rdy
// from one clock after the other station's MPDU starts to a few clocks after
// it ends. bitclk and pre_bits are variables the testbench sets per run
// (bitclk = system clocks per bit, 20 for 1 Mbit/s at a 20 MHz clock).
module link_station
  import vnet_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  output logic air_tx_on,
  output logic air_tx_bit_en,
  output logic air_tx_bit,
  input  logic air_rx_on,
  input  logic air_rx_bit_en,
  input  logic air_rx_bit
);
  int bitclk = 20;
  int pre_bits = 192;

  logic arm_breq, arm_gnt, nfiq, nirq;
  asb_req_t arm_req;
  asb_rsp_t arm_rsp;
  logic [1:0] mem_cs_n;
  logic mem_oe_n, mem_we_n, mem_data_oe;
  logic [3:0] mem_be_n;
  logic [21:0] mem_addr;
  logic [31:0] mem_wdata, mem_rdata;
  logic [15:0] host_addr, host_din, host_dout;
  logic host_ce1_n, host_ce2_n, host_oe_n, host_we_n, host_reg_n, host_dout_en, host_wait_n;
  logic tx_pe, tx_rdy, tx_bit_en, txd, md_rdy, rx_bit_en, rxd;

  vnet_top chip (.*);
  ext_mem_model #(.WORDS(4096)) mem (.clk, .cs_n(mem_cs_n), .oe_n(mem_oe_n), .we_n(mem_we_n),
    .be_n(mem_be_n), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata));
  arm_bfm cpu (.clk, .breq(arm_breq), .gnt(arm_gnt), .req(arm_req), .rsp(arm_rsp));
  host_bfm host (.clk, .addr(host_addr), .ce1_n(host_ce1_n), .ce2_n(host_ce2_n), .oe_n(host_oe_n),
    .we_n(host_we_n), .reg_n(host_reg_n), .din(host_din), .dout(host_dout), .wait_n(host_wait_n));

  // transmit side
  int cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_rdy <= 0; tx_bit_en <= 0; cnt <= 0;
    end else if (!tx_pe) begin
      tx_rdy <= 0; tx_bit_en <= 0; cnt <= 0;
    end else if (!tx_rdy) begin
      if (cnt == pre_bits * bitclk - 1) begin tx_rdy <= 1; cnt <= 0; end
      else cnt <= cnt + 1;
    end else begin
      cnt <= (cnt == bitclk - 1) ? 0 : cnt + 1;
      tx_bit_en <= (cnt == bitclk - 1);
    end
  end
  assign air_tx_on     = tx_pe && tx_rdy;
  assign air_tx_bit_en = tx_bit_en;
  assign air_tx_bit    = txd;

  // receive side
  logic [3:0] on_hist;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      on_hist <= 0; md_rdy <= 0; rx_bit_en <= 0; rxd <= 0;
    end else begin
      on_hist   <= {on_hist[2:0], air_rx_on};
      md_rdy    <= air_rx_on || (on_hist != 0);
      rx_bit_en <= air_rx_bit_en && air_rx_on;
      rxd       <= air_rx_bit;
    end
  end
endmodule
