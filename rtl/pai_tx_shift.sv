// pai_tx_shift: transmit parallel-to-serial shift register of the PAI.
// load takes a byte; each bit_en then sends one bit on sout, least significant
// bit first (the 802.11 bit order), and shifts. busy stays high while bits of
// the loaded byte remain; last is high while the final bit is on sout, so a new
// byte can be loaded in the cycles before the next bit_en.
// bit_en is the PHY's transmit bit strobe brought into the system clock domain.
module pai_tx_shift (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic [7:0] din,
  input  logic       bit_en,
  output logic       sout,
  output logic       busy,
  output logic       last
);
  logic [7:0] sr;
  logic [3:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr <= '0; cnt <= '0;
    end else if (load) begin
      sr <= din; cnt <= 4'd8;
    end else if (bit_en && cnt != 0) begin
      sr <= sr >> 1; cnt <= cnt - 1'b1;
    end
  end

  assign sout = sr[0];
  assign busy = (cnt != 0);
  assign last = (cnt == 4'd1);
endmodule
