// gf_mul3: multiplication of a byte by 3 in GF(2^8), the "Multiplier3" of
// MixColumns: 3x = 2x + x, with the doubling done by gf_mul2 and the
// addition by XOR. Combinational.
module gf_mul3
  import aes_pkg::*;
(
  input  byte_t x,
  output byte_t y
);

  byte_t x2;

  gf_mul2 u_mul2 (.x(x), .y(x2));

  assign y = x2 ^ x;

endmodule
