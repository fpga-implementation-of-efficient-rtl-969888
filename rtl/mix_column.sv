// mix_column: MixColumns of one 4-byte column. Four mixcol_byte units, the
// one for output row k fed with rows k, k+1, k+2, k+3 (mod 4) so that it
// computes row k of the circulant matrix [2 3 1 1]. Combinational.
// din/dout: row 0 in bits 31:24.
module mix_column
  import aes_pkg::*;
(
  input  word_t din,
  output word_t dout
);

  byte_t r [4];
  byte_t o [4];

  assign r[0] = din[31:24];
  assign r[1] = din[23:16];
  assign r[2] = din[15:8];
  assign r[3] = din[7:0];

  for (genvar k = 0; k < 4; k++) begin : g_row
    mixcol_byte u_byte (
      .in1  (r[k]),
      .in2  (r[(k + 1) % 4]),
      .in3  (r[(k + 2) % 4]),
      .in4  (r[(k + 3) % 4]),
      .out1 (o[k])
    );
  end

  assign dout = {o[0], o[1], o[2], o[3]};

endmodule
