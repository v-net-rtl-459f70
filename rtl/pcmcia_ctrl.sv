// pcmcia_ctrl: PC Card (PCMCIA 2.1 / JEIDA 4.2) interface to the host, and
// the host's way into V-Net memory. It is an ASB master: a host read or write
// of common memory at host address A becomes one ASB transfer at WIN_BASE + A
// (by default the SRAM bank), during which WAIT# is held low. Host attribute
// memory holds the plug-and-play data, answered at once without the bus:
//   even addresses 0..2*(CIS_LEN-1)  the Card Information Structure, one byte
//                                    per even address (device, version,
//                                    configuration, one configuration entry, end)
//   CFG_BASE + 0  Configuration Option Register: bits 5..0 configuration
//                 index, bit 7 soft reset (clears the register)
//   CFG_BASE + 2  Card Configuration and Status Register (read/write byte)
// Common memory is reachable only once the host has written a non-zero
// configuration index, as card services do after reading the CIS.
// Host signals are taken as already synchronous to the system clock: active
// low CE1#/CE2#, OE#, WE#, REG#; a strobe (OE# or WE# low with a card enable)
// starts an access, and the card waits for the strobe to end before the next.
// CE1# alone is a byte on D7..0 at A, CE2# alone the odd byte on D15..8, both a
// 16-bit access at the even address (a half-word ASB transfer).
// The document gives the role (host access as a bus master, plug and play);
// the window, CIS contents and handshake are this design's choices.
module pcmcia_ctrl
  import vnet_pkg::*;
#(
  parameter int unsigned HA_W     = 16,
  parameter logic [31:0] WIN_BASE = 32'h0100_0000,
  parameter int unsigned CFG_BASE = 'h200
) (
  input  logic            clk,
  input  logic            rst_n,
  // host (PC Card) side
  input  logic [HA_W-1:0] host_addr,
  input  logic            host_ce1_n,
  input  logic            host_ce2_n,
  input  logic            host_oe_n,
  input  logic            host_we_n,
  input  logic            host_reg_n,
  input  logic [15:0]     host_din,
  output logic [15:0]     host_dout,
  output logic            host_dout_en,
  output logic            host_wait_n,
  output logic            configured,
  // ASB master
  output logic            breq,
  input  logic            gnt,
  output asb_req_t        req,
  input  asb_rsp_t        rsp
);
  localparam int unsigned CIS_LEN = 24;

  function automatic logic [7:0] cis_byte(input int unsigned i);
    unique case (i)
      0:  cis_byte = 8'h01;  // CISTPL_DEVICE
      1:  cis_byte = 8'h02;
      2:  cis_byte = 8'h00;  //   no device info
      3:  cis_byte = 8'hFF;
      4:  cis_byte = 8'h15;  // CISTPL_VERS_1
      5:  cis_byte = 8'h09;
      6:  cis_byte = 8'h04;  //   version 4.1
      7:  cis_byte = 8'h01;
      8:  cis_byte = 8'h56;  //   "VNET"
      9:  cis_byte = 8'h4E;
      10: cis_byte = 8'h45;
      11: cis_byte = 8'h54;
      12: cis_byte = 8'h00;
      13: cis_byte = 8'h00;
      14: cis_byte = 8'hFF;
      15: cis_byte = 8'h1A;  // CISTPL_CONFIG
      16: cis_byte = 8'h05;
      17: cis_byte = 8'h01;  //   2-byte register base address
      18: cis_byte = 8'h01;  //   last index 1
      19: cis_byte = 8'(CFG_BASE);
      20: cis_byte = 8'(CFG_BASE >> 8);
      21: cis_byte = 8'h03;  //   COR and CCSR present
      22: cis_byte = 8'hFF;  // CISTPL_END
      default: cis_byte = 8'hFF;
    endcase
  endfunction

  typedef enum logic [1:0] {IDLE, BUS, HOLD} state_e;
  state_e      state;
  logic        strobe, lo, hi, start_attr, start_mem;
  logic [5:0]  cor_idx;
  logic [7:0]  ccsr;
  logic [31:0] baddr;
  logic [15:0] rd_latch, attr_data;
  logic        xfer_done;

  assign strobe     = (!host_oe_n || !host_we_n) && (!host_ce1_n || !host_ce2_n);
  assign lo         = !host_ce1_n;
  assign hi         = !host_ce2_n;
  assign start_attr = (state == IDLE) && strobe && !host_reg_n;
  assign start_mem  = (state == IDLE) && strobe && host_reg_n && configured;
  assign configured = (cor_idx != '0);

  // ASB address and size for a common-memory access
  always_comb begin
    baddr = WIN_BASE + 32'(host_addr);
    if (lo && hi)   baddr[0] = 1'b0;
    else if (hi)    baddr[0] = 1'b1;
  end

  assign breq      = (state == BUS);
  assign xfer_done = breq && gnt && !rsp.bwait;

  always_comb begin
    req       = '0;
    req.trans = breq && gnt;
    req.addr  = baddr;
    req.write = !host_we_n;
    req.size  = (lo && hi) ? SZ_HALF : SZ_BYTE;
    // place the host data on the byte lanes of the ASB
    unique case (baddr[1:0])
      2'd0:    req.wdata = {16'd0, hi ? host_din[15:8] : host_din[7:0], host_din[7:0]};
      2'd1:    req.wdata = {16'd0, hi ? host_din[15:8] : host_din[7:0], 8'd0};
      2'd2:    req.wdata = {hi ? host_din[15:8] : host_din[7:0], host_din[7:0], 16'd0};
      default: req.wdata = {hi ? host_din[15:8] : host_din[7:0], 24'd0};
    endcase
    if (lo && hi) req.wdata = baddr[1] ? {host_din, 16'd0} : {16'd0, host_din};
  end

  // attribute memory read data (even bytes only, on D7..0)
  always_comb begin
    attr_data = 16'h00FF;
    if (32'(host_addr) == CFG_BASE)          attr_data = {8'd0, 2'b00, cor_idx};
    else if (32'(host_addr) == CFG_BASE + 2) attr_data = {8'd0, ccsr};
    else if (!host_addr[0] && (32'(host_addr) >> 1) < CIS_LEN)
      attr_data = {8'd0, cis_byte(32'(host_addr) >> 1)};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; cor_idx <= '0; ccsr <= '0; rd_latch <= '0;
    end else begin
      unique case (state)
        IDLE: begin
          if (start_attr) begin
            rd_latch <= attr_data;
            if (!host_we_n && lo) begin
              if (32'(host_addr) == CFG_BASE) cor_idx <= host_din[7] ? 6'd0 : host_din[5:0];
              if (32'(host_addr) == CFG_BASE + 2) ccsr <= host_din[7:0];
            end
            state <= HOLD;
          end else if (start_mem) begin
            state <= BUS;
          end else if (strobe) begin
            rd_latch <= 16'h0000;      // unconfigured card: common memory reads as zero
            state <= HOLD;
          end
        end
        BUS: if (xfer_done) begin
          if (lo && hi)   rd_latch <= rsp.rdata[16*baddr[1] +: 16];
          else if (hi)    rd_latch <= {rsp.rdata[8*baddr[1:0] +: 8], 8'd0};
          else            rd_latch <= {8'd0, rsp.rdata[8*baddr[1:0] +: 8]};
          state <= HOLD;
        end
        HOLD: if (!strobe) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  assign host_wait_n  = !(start_mem || state == BUS);
  assign host_dout    = rd_latch;
  assign host_dout_en = (state == HOLD) && !host_oe_n;
endmodule
