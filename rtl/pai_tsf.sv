// pai_tsf: 64-bit Time Synchronization Function counter of the PAI.
// When enabled it adds one every (presc+1) system clocks, so firmware sets
// presc for a 1 us tick as 802.11 timing needs (presc = 19 at 20 MHz).
// Firmware can load either 32-bit half (load_lo / load_hi with load_val); a load
// also restarts the prescaler. The 64-bit width and the programmable
// prescaler follow the document; the prescaler width and the load scheme are
// this design's own.
module pai_tsf #(
  parameter int unsigned PRESC_W = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               enable,
  input  logic [PRESC_W-1:0] presc,
  input  logic               load_lo,
  input  logic               load_hi,
  input  logic [31:0]        load_val,
  output logic [63:0]        tsf,
  output logic               tick
);
  logic [PRESC_W-1:0] pcnt;

  assign tick = enable && (pcnt >= presc);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tsf <= '0; pcnt <= '0;
    end else if (load_lo || load_hi) begin
      if (load_lo) tsf[31:0]  <= load_val;
      if (load_hi) tsf[63:32] <= load_val;
      pcnt <= '0;
    end else if (enable) begin
      if (tick) begin
        pcnt <= '0;
        tsf  <= tsf + 64'd1;
      end else begin
        pcnt <= pcnt + 1'b1;
      end
    end
  end
endmodule
