// mixcol_byte: one output byte of MixColumns, 2*in1 + 3*in2 + in3 + in4 in
// GF(2^8). The multiplication by 1 is a plain wire; addition is XOR.
// Combinational.
module mixcol_byte
  import aes_pkg::*;
(
  input  byte_t in1,   // multiplied by 2
  input  byte_t in2,   // multiplied by 3
  input  byte_t in3,   // multiplied by 1
  input  byte_t in4,   // multiplied by 1
  output byte_t out1
);

  byte_t m2, m3;

  gf_mul2 u_mul2 (.x(in1), .y(m2));
  gf_mul3 u_mul3 (.x(in2), .y(m3));

  assign out1 = m2 ^ m3 ^ in3 ^ in4;

endmodule
