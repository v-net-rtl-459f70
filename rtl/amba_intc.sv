// amba_intc: interrupt controller on the APB. It gathers the level interrupt
// requests of the other blocks and drives the processor's two lines, nFIQ and
// nIRQ (active low). Each source is enabled by ENABLE and sent to FIQ when its
// FIQSEL bit is set, else to IRQ. Priority is fixed by source number, lower
// number first: the vector registers give the highest-priority pending source
// of each line, so the handler serves sources in that order.
// Registers (offset from the peripheral base):
//   0x00 RAW      r  request lines, ORed with SOFT
//   0x04 ENABLE   rw
//   0x08 FIQSEL   rw  reset: source 0 (PAI receive) on FIQ
//   0x0C IRQSTAT  r   RAW & ENABLE & ~FIQSEL
//   0x10 FIQSTAT  r   RAW & ENABLE &  FIQSEL
//   0x14 IRQVEC   r   bit31 valid, bits 4..0 number of the highest-priority IRQ source
//   0x18 FIQVEC   r   likewise for FIQ
//   0x1C SOFT     rw  software-raised requests
// The two lines and the fixed priority come from the document; the register set
// and the per-source FIQ routing are this design's reading of it.
module amba_intc
  import vnet_pkg::*;
#(
  parameter int unsigned NSRC = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            pclk_en,
  input  logic            psel,
  input  apb_req_t        preq,
  output logic [31:0]     prdata,
  input  logic [NSRC-1:0] src,
  output logic            nfiq,
  output logic            nirq
);
  logic [NSRC-1:0] enable, fiqsel, swreq, raw, irq_st, fiq_st;
  logic            wr;
  logic [4:0]      irq_id, fiq_id;

  assign wr = psel && preq.penable && preq.pwrite && pclk_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enable <= '0; fiqsel <= NSRC'(1); swreq <= '0;
    end else if (wr) begin
      unique case (preq.paddr[4:2])
        3'd1: enable <= preq.pwdata[NSRC-1:0];
        3'd2: fiqsel <= preq.pwdata[NSRC-1:0];
        3'd7: swreq   <= preq.pwdata[NSRC-1:0];
        default: ;
      endcase
    end
  end

  assign raw    = src | swreq;
  assign irq_st = raw & enable & ~fiqsel;
  assign fiq_st = raw & enable & fiqsel;

  always_comb begin
    irq_id = '0;
    fiq_id = '0;
    for (int i = NSRC-1; i >= 0; i--) begin
      if (irq_st[i]) irq_id = 5'(i);
      if (fiq_st[i]) fiq_id = 5'(i);
    end
  end

  assign nirq = !(|irq_st);
  assign nfiq = !(|fiq_st);

  always_comb begin
    unique case (preq.paddr[4:2])
      3'd0: prdata = 32'(raw);
      3'd1: prdata = 32'(enable);
      3'd2: prdata = 32'(fiqsel);
      3'd3: prdata = 32'(irq_st);
      3'd4: prdata = 32'(fiq_st);
      3'd5: prdata = {!nirq, 26'd0, irq_id};
      3'd6: prdata = {!nfiq, 26'd0, fiq_id};
      default: prdata = 32'(swreq);
    endcase
  end
endmodule
