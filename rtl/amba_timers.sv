// amba_timers: the timer block on the APB, NTIMERS down-counters of WIDTH bits,
// each with its own programmable prescaler. The counters run on the system
// clock, not on the slower APB enable, so with a 20 MHz clock and prescale 0
// they resolve 50 ns. Timer i sits at offset 0x10*i:
//   +0x0 LOAD   rw  writing it also loads the counter
//   +0x4 VALUE  r   current count
//   +0x8 CTRL   rw  bit0 enable, bit1 periodic, bit2 interrupt enable,
//                   bits 31..16 prescale P (the counter steps every P+1 clocks)
//   +0xC FLAG   r: bit0 expiry flag; w: any write clears it
// At a step with the counter at zero the flag is set and the counter reloads
// LOAD (periodic) or stops with enable cleared (one-shot); otherwise it counts
// down. A period is therefore (LOAD+1)*(P+1) clocks. irq[i] = flag & interrupt
// enable. Two 32-bit counters with independent prescaling follow the document;
// the counting scheme and registers are this design's choices.
module amba_timers
  import vnet_pkg::*;
#(
  parameter int unsigned NTIMERS = 2,
  parameter int unsigned WIDTH   = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               pclk_en,
  input  logic               psel,
  input  apb_req_t           preq,
  output logic [31:0]        prdata,
  output logic [NTIMERS-1:0] irq
);
  logic [WIDTH-1:0] load  [NTIMERS];
  logic [WIDTH-1:0] value [NTIMERS];
  logic [15:0]      presc [NTIMERS];
  logic [15:0]      pcnt  [NTIMERS];
  logic [NTIMERS-1:0] en, periodic, ie, flag;
  logic             wr;
  logic [3:0]       tsel;

  assign wr   = psel && preq.penable && preq.pwrite && pclk_en;
  assign tsel = preq.paddr[7:4];

  for (genvar i = 0; i < NTIMERS; i++) begin : g_t
    logic wsel, step;
    assign wsel = wr && (tsel == 4'(i));
    assign step = en[i] && (pcnt[i] >= presc[i]);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        load[i] <= '0; value[i] <= '0; presc[i] <= '0; pcnt[i] <= '0;
        en[i] <= 1'b0; periodic[i] <= 1'b0; ie[i] <= 1'b0; flag[i] <= 1'b0;
      end else begin
        if (en[i]) pcnt[i] <= step ? '0 : pcnt[i] + 1'b1;
        if (step) begin
          if (value[i] == '0) begin
            flag[i] <= 1'b1;
            if (periodic[i]) value[i] <= load[i];
            else             en[i]    <= 1'b0;
          end else begin
            value[i] <= value[i] - 1'b1;
          end
        end
        if (wsel) begin
          unique case (preq.paddr[3:2])
            2'd0: begin load[i] <= preq.pwdata[WIDTH-1:0]; value[i] <= preq.pwdata[WIDTH-1:0]; end
            2'd2: begin
              en[i] <= preq.pwdata[0]; periodic[i] <= preq.pwdata[1]; ie[i] <= preq.pwdata[2];
              presc[i] <= preq.pwdata[31:16]; pcnt[i] <= '0;
            end
            2'd3: flag[i] <= 1'b0;
            default: ;
          endcase
        end
      end
    end
    assign irq[i] = flag[i] && ie[i];
  end

  always_comb begin
    prdata = '0;
    for (int i = 0; i < NTIMERS; i++)
      if (tsel == 4'(i)) begin
        unique case (preq.paddr[3:2])
          2'd0: prdata = 32'(load[i]);
          2'd1: prdata = 32'(value[i]);
          2'd2: prdata = {presc[i], 13'd0, ie[i], periodic[i], en[i]};
          default: prdata = {31'd0, flag[i]};
        endcase
      end
  end
endmodule
