// add_round_key: AddRoundKey, the bitwise XOR of the state with the round
// key. Both 128-bit inputs are split into four 32-bit columns and four bytes
// per column, each byte pair is XORed, and the results are regrouped as four
// output columns (col_out[0] = column 0 = bits 127:96 of the state).
// Combinational.
module add_round_key
  import aes_pkg::*;
(
  input  state_t     state_in,
  input  state_t     round_key,
  output word_t [3:0] col_out
);

  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_byte
      assign col_out[c][31 - 8 * r -: 8] = state_in[127 - 32 * c - 8 * r -: 8]
                                         ^ round_key[127 - 32 * c - 8 * r -: 8];
    end
  end

endmodule
