// pai_rx_shift: receive serial-to-parallel shift register of the PAI.
// Each bit_en takes one bit from the PHY, least significant bit first; after
// eight bits byte_valid pulses for one cycle with the assembled byte on dout.
// clear drops a partial byte and restarts the bit count (frame start).
module pai_rx_shift (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       bit_en,
  input  logic       sin,
  output logic [7:0] dout,
  output logic       byte_valid
);
  logic [7:0] sr;
  logic [2:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr <= '0; cnt <= '0; byte_valid <= 1'b0;
    end else begin
      byte_valid <= 1'b0;
      if (clear) begin
        cnt <= '0;
      end else if (bit_en) begin
        sr  <= {sin, sr[7:1]};
        cnt <= cnt + 1'b1;
        byte_valid <= (cnt == 3'd7);
      end
    end
  end

  assign dout = sr;
endmodule
