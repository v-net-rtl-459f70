// Reference CRC-32 for testbenches, written independently of the RTL engine:
// the MSB-first form of the 802.3/802.11 FCS applied to bit-reversed bytes,
// result reflected and complemented.
function automatic logic [31:0] crc32_ref(input logic [7:0] d [$]);
  logic [31:0] r = 32'hFFFF_FFFF;
  logic [31:0] o;
  foreach (d[i]) begin
    for (int j = 0; j < 8; j++) begin
      logic fb = r[31] ^ d[i][j];
      r = {r[30:0], 1'b0} ^ (fb ? 32'h04C1_1DB7 : 32'h0);
    end
  end
  for (int i = 0; i < 32; i++) o[i] = r[31-i];
  return ~o;
endfunction
