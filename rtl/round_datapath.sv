// round_datapath: the data side of one AES round (SubBytes, ShiftRows and,
// except in the final round, MixColumns).
//
// Each of the four state columns goes through its own subbytes_tdm unit
// (four S-box RAMs per round). ShiftRows is pure wiring: output column c,
// row r takes substituted column (c + r) mod 4, row r. Four mix_column units
// then mix the shifted columns; with FINAL = 1 they are left out and the
// shifted state goes straight out, as the last AES round has no MixColumns.
//
// Timing: start is a one-cycle pulse in the first cycle a new state_in is
// present; state_in must be stable for that cycle and the next. state_out is
// combinational from the SubBytes outputs and valid (out_valid high) in the
// second cycle after start. Structure follows the original design; the
// FINAL parameter (instead of a separate final-round subsystem) is this
// design's choice.
module round_datapath
  import aes_pkg::*;
#(
  parameter bit FINAL = 1'b0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  state_t state_in,
  output state_t state_out,
  output logic   out_valid
);

  word_t sub_col [4];
  word_t sr_col  [4];
  word_t out_col [4];
  logic  [3:0] sub_valid;

  for (genvar c = 0; c < 4; c++) begin : g_col
    subbytes_tdm u_sub (
      .clk        (clk),
      .rst_n      (rst_n),
      .start      (start),
      .din        (state_in[127 - 32 * c -: 32]),
      .dout       (sub_col[c]),
      .dout_valid (sub_valid[c])
    );

    // ShiftRows: row r of column c comes from column (c + r) mod 4
    assign sr_col[c] = {sub_col[c][31:24],
                        sub_col[(c + 1) % 4][23:16],
                        sub_col[(c + 2) % 4][15:8],
                        sub_col[(c + 3) % 4][7:0]};

    if (FINAL) begin : g_nomix
      assign out_col[c] = sr_col[c];
    end else begin : g_mix
      mix_column u_mix (.din(sr_col[c]), .dout(out_col[c]));
    end
  end

  assign state_out = {out_col[0], out_col[1], out_col[2], out_col[3]};
  assign out_valid = &sub_valid;

endmodule
