// pai_regs: the PAI's register file, an ASB slave with no wait states.
// Firmware sets up frames here and reads back what the state machines report.
// Word registers, offset = addr[5:2]*4 (accesses are taken as whole words):
//   0x00 CTRL      w: bit0 TX_GO (pulse), bit1 RX_EN, bit2 TSF_EN, bit3 TS_INSERT,
//                     bit4 TX_IE, bit5 RX_IE;  r: the same, bit0 reads TX busy
//   0x04 STATUS    r: bit0 TX_DONE, bit1 RX_DONE, bit2 RX_CRC_ERR, bit3 RX_OVERFLOW,
//                     bit4 TX_BUSY, bit5 RX_BUSY, bit6 TX_UNDERRUN, bit7 DMA_ERR;
//                  w: 1 clears bits 0-3, 6 and 7
//   0x08 TX_ADDR   0x0C TX_LEN   0x10 RX_ADDR   0x14 RX_MAXLEN
//   0x18 RX_LEN    (read only) bytes of the last received frame, FCS included
//   0x1C TSF_PRESC TSF prescaler: the TSF counts every TSF_PRESC+1 clocks
//   0x20 TSF_LO    r: low half, and latches the high half for 0x24; w: loads low half
//   0x24 TSF_HI    r: high half latched by the last TSF_LO read; w: loads high half
//   0x28 TS_OFFSET byte offset of the 8-byte timestamp that TS_INSERT fills in
// tx_irq = TX_DONE & TX_IE and rx_irq = RX_DONE & RX_IE go to the interrupt
// controller. The document lists the register block and its role; the map,
// the bits and the interrupt outputs are this design's choices. TS_OFFSET
// resets to 24, where an 802.11 beacon carries its timestamp.
module pai_regs
  import vnet_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sel,
  input  asb_req_t    req,
  output asb_rsp_t    rsp,
  // to the PAI blocks
  output logic        tx_go,
  output logic [31:0] tx_addr,
  output logic [15:0] tx_len,
  output logic        rx_en,
  output logic [31:0] rx_addr,
  output logic [15:0] rx_maxlen,
  output logic        tsf_en,
  output logic        ts_insert,
  output logic [15:0] ts_offset,
  output logic [15:0] tsf_presc,
  output logic        tsf_load_lo,
  output logic        tsf_load_hi,
  output logic [31:0] tsf_load_val,
  // from the PAI blocks
  input  logic [63:0] tsf,
  input  logic        tx_done_set,
  input  logic        tx_underrun_set,
  input  logic        tx_busy,
  input  logic        rx_done_set,
  input  logic        rx_crc_err,
  input  logic        rx_overflow,
  input  logic [15:0] rx_len,
  input  logic        rx_busy,
  input  logic        dma_err_set,
  // interrupts
  output logic        tx_irq,
  output logic        rx_irq
);
  logic        wr, rd;
  logic [3:0]  idx;
  logic        tx_ie, rx_ie;
  logic        st_tx_done, st_rx_done, st_crc, st_ovf, st_unr, st_dma;
  logic [31:0] tsf_hi_shadow;
  logic [31:0] rdata;

  assign wr  = sel && req.trans && req.write;
  assign rd  = sel && req.trans && !req.write;
  assign idx = req.addr[5:2];

  assign tx_go        = wr && idx == 4'h0 && req.wdata[0];
  assign tsf_load_lo  = wr && idx == 4'h8;
  assign tsf_load_hi  = wr && idx == 4'h9;
  assign tsf_load_val = req.wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_addr <= '0; tx_len <= '0; rx_en <= 1'b0; rx_addr <= '0; rx_maxlen <= 16'd2346;
      tsf_en <= 1'b0; ts_insert <= 1'b0; ts_offset <= 16'd24; tsf_presc <= 16'd19;
      tx_ie <= 1'b0; rx_ie <= 1'b0; tsf_hi_shadow <= '0;
      st_tx_done <= 1'b0; st_rx_done <= 1'b0; st_crc <= 1'b0; st_ovf <= 1'b0;
      st_unr <= 1'b0; st_dma <= 1'b0;
    end else begin
      if (wr) begin
        unique case (idx)
          4'h0: begin
            rx_en <= req.wdata[1]; tsf_en <= req.wdata[2]; ts_insert <= req.wdata[3];
            tx_ie <= req.wdata[4]; rx_ie <= req.wdata[5];
          end
          4'h1: begin
            if (req.wdata[0]) st_tx_done <= 1'b0;
            if (req.wdata[1]) st_rx_done <= 1'b0;
            if (req.wdata[2]) st_crc     <= 1'b0;
            if (req.wdata[3]) st_ovf     <= 1'b0;
            if (req.wdata[6]) st_unr     <= 1'b0;
            if (req.wdata[7]) st_dma     <= 1'b0;
          end
          4'h2: tx_addr   <= req.wdata;
          4'h3: tx_len    <= req.wdata[15:0];
          4'h4: rx_addr   <= req.wdata;
          4'h5: rx_maxlen <= req.wdata[15:0];
          4'h7: tsf_presc <= req.wdata[15:0];
          4'ha: ts_offset <= req.wdata[15:0];
          default: ;
        endcase
      end
      if (rd && idx == 4'h8) tsf_hi_shadow <= tsf[63:32];
      // events from the state machines win over a clear in the same cycle
      if (tx_done_set)     st_tx_done <= 1'b1;
      if (tx_underrun_set) st_unr     <= 1'b1;
      if (dma_err_set)     st_dma     <= 1'b1;
      if (rx_done_set) begin
        st_rx_done <= 1'b1;
        st_crc     <= rx_crc_err;
        st_ovf     <= rx_overflow;
      end
    end
  end

  always_comb begin
    unique case (idx)
      4'h0:    rdata = {26'd0, rx_ie, tx_ie, ts_insert, tsf_en, rx_en, tx_busy};
      4'h1:    rdata = {24'd0, st_dma, st_unr, rx_busy, tx_busy, st_ovf, st_crc, st_rx_done, st_tx_done};
      4'h2:    rdata = tx_addr;
      4'h3:    rdata = {16'd0, tx_len};
      4'h4:    rdata = rx_addr;
      4'h5:    rdata = {16'd0, rx_maxlen};
      4'h6:    rdata = {16'd0, rx_len};
      4'h7:    rdata = {16'd0, tsf_presc};
      4'h8:    rdata = tsf[31:0];
      4'h9:    rdata = tsf_hi_shadow;
      4'ha:    rdata = {16'd0, ts_offset};
      default: rdata = '0;
    endcase
  end

  assign rsp.bwait  = 1'b0;
  assign rsp.berror = 1'b0;
  assign rsp.rdata  = rdata;

  assign tx_irq = st_tx_done && tx_ie;
  assign rx_irq = st_rx_done && rx_ie;
endmodule
