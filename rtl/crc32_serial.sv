// crc32_serial: bit-serial CRC-32 engine of the PAI, used once for transmit and
// once for receive. It computes the IEEE 802.11 frame check sequence (the
// CRC-32 of IEEE 802.3: polynomial 0x04C11DB7, register preset to all ones,
// bits taken least significant first, result complemented) one bit per bit_en,
// in step with the serial shift registers, so it needs no byte-wide logic.
// The register is kept in the reflected form: crc = (crc >> 1) ^ (lsb ? 0xEDB88320 : 0),
// with lsb = crc[0] ^ bit_in.
// Transmit: after the last data bit, fcs = ~crc is sent, least significant bit first.
// Receive: when the frame bits and its FCS have all gone through, a correct frame
// leaves the fixed residue 0xDEBB20E3, flagged by residue_ok.
// init presets the register (synchronous); init wins over bit_en in the same cycle.
// The document asks for CRC-32 engines; the serial form is this design's choice.
module crc32_serial (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic        bit_en,
  input  logic        bit_in,
  output logic [31:0] crc,
  output logic [31:0] fcs,
  output logic        residue_ok
);
  localparam logic [31:0] POLY_REFL = 32'hEDB8_8320;
  localparam logic [31:0] RESIDUE   = 32'hDEBB_20E3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      crc <= '1;
    else if (init)   crc <= '1;
    else if (bit_en) crc <= (crc >> 1) ^ ((crc[0] ^ bit_in) ? POLY_REFL : 32'h0);
  end

  assign fcs        = ~crc;
  assign residue_ok = (crc == RESIDUE);
endmodule
