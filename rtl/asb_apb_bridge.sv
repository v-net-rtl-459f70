// asb_apb_bridge: bridge from the ASB to the APB, where the slow peripherals
// (timers, interrupt controller) sit. The APB runs at one third of the ASB
// rate: instead of a second clock the bridge raises pclk_en in every DIV-th
// system clock, and every APB signal changes only at those edges.
// An ASB transfer to the bridge is held with bwait while the bridge runs the
// APB setup phase (psel high, penable low) for one APB cycle and the enable
// phase (penable high) for one more; the transfer ends, with prdata, in the
// system clock where the enable phase ends (pclk_en high). A peripheral
// therefore takes a write when psel, penable, pwrite and pclk_en are all high.
// An ASB transfer thus lasts 2*DIV+1 to 3*DIV clocks, depending on where it
// falls in the APB cycle. psel is decoded from paddr[15:12]; peripheral
// number i answers 0x8000_0000 + i*0x1000. The 1/3 ratio is the document's;
// the clock enable and the decode are this design's choices.
module asb_apb_bridge
  import vnet_pkg::*;
#(
  parameter int unsigned DIV    = 3,
  parameter int unsigned NPERIPH = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  // ASB slave
  input  logic               sel,
  input  asb_req_t           req,
  output asb_rsp_t           rsp,
  // APB
  output logic               pclk_en,
  output apb_req_t           preq,
  output logic [NPERIPH-1:0] psel,
  input  logic [31:0]        prdata [NPERIPH]
);
  typedef enum logic [1:0] {IDLE, SETUP, ENABLE} state_e;
  state_e                    state;
  logic [$clog2(DIV+1)-1:0]  div_cnt;
  logic                      start, finish;
  logic [31:0]               rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 div_cnt <= '0;
    else if (pclk_en)           div_cnt <= '0;
    else                        div_cnt <= div_cnt + 1'b1;
  end
  assign pclk_en = (div_cnt == ($clog2(DIV+1))'(DIV - 1));

  assign start  = (state == IDLE) && sel && req.trans && pclk_en;
  assign finish = (state == ENABLE) && pclk_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; preq <= '0; psel <= '0;
    end else begin
      unique case (state)
        IDLE: if (start) begin
          preq.paddr  <= req.addr[15:0];
          preq.pwrite <= req.write;
          preq.pwdata <= req.wdata;
          preq.penable <= 1'b0;
          psel <= '0;
          for (int i = 0; i < NPERIPH; i++)
            if (req.addr[15:12] == 4'(i)) psel[i] <= 1'b1;
          state <= SETUP;
        end
        SETUP: if (pclk_en) begin
          preq.penable <= 1'b1; state <= ENABLE;
        end
        ENABLE: if (pclk_en) begin
          preq.penable <= 1'b0; psel <= '0; state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    rdata = '0;
    for (int i = 0; i < NPERIPH; i++)
      if (psel[i]) rdata = prdata[i];
  end

  assign rsp.bwait  = sel && req.trans && !finish;
  assign rsp.berror = 1'b0;
  assign rsp.rdata  = rdata;
endmodule
