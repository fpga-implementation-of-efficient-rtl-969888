// gf_mul2: multiplication of a byte by 2 in GF(2^8), the "Multiplier2" of
// MixColumns. The byte is shifted left by one into a 9-bit value; if that
// value exceeds 255 it is reduced by XOR with 283 (0x11B, the AES polynomial),
// which clears bit 8 and applies the 0x1B correction. Combinational.
module gf_mul2
  import aes_pkg::*;
(
  input  byte_t x,
  output byte_t y
);

  localparam logic [8:0] POLY = 9'd283;  // x^8 + x^4 + x^3 + x + 1

  logic [8:0] shifted;

  assign shifted = {x, 1'b0};
  assign y = shifted[8] ? 8'(shifted ^ POLY) : shifted[7:0];

endmodule
