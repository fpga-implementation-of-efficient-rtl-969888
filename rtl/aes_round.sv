// aes_round: one round of the AES-128 encryption pipeline.
//
// The round data path (SubBytes, ShiftRows, MixColumns unless FINAL) and the
// round-key generator run side by side from the round's inputs: the state
// from the previous round and the previous round key. AddRoundKey XORs the
// two results, and both the new state and the new round key are captured in
// the register at the end of the round, which feeds the next round.
//
// Timing: in_stb is a one-cycle pulse in the first cycle new inputs are
// present; the inputs must then be stable for three cycles, so two in_stb
// pulses are at least three cycles apart (checked by an assertion). The
// outputs are loaded at the end of the second cycle after in_stb and out_stb
// pulses in the cycle after that: three cycles from in_stb to out_stb.
// The outputs hold their value until the next load. The round structure is
// the original design's; the three-cycle schedule is this design's.
module aes_round
  import aes_pkg::*;
#(
  parameter int unsigned ROUND = 1,
  parameter bit          FINAL = 1'b0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_stb,
  input  state_t state_in,
  input  state_t key_in,
  output logic   out_stb,
  output state_t state_out,
  output state_t key_out
);

  localparam byte_t RCON = rcon_of(ROUND);

  state_t     dp_state, rk;
  word_t [3:0] ark_col;
  logic       dp_valid, kg_valid;

  round_datapath #(.FINAL(FINAL)) u_dp (
    .clk (clk), .rst_n (rst_n), .start (in_stb),
    .state_in (state_in), .state_out (dp_state), .out_valid (dp_valid)
  );

  key_gen_round #(.RCON(RCON)) u_kg (
    .clk (clk), .rst_n (rst_n), .start (in_stb),
    .key_in (key_in), .key_out (rk), .out_valid (kg_valid)
  );

  add_round_key u_ark (.state_in(dp_state), .round_key(rk), .col_out(ark_col));

  // Register at the end of the round
  always_ff @(posedge clk) begin
    if (dp_valid) begin
      state_out <= {ark_col[0], ark_col[1], ark_col[2], ark_col[3]};
      key_out   <= rk;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_stb <= 1'b0;
    else        out_stb <= dp_valid;
  end

  // Inputs must be stable for three cycles: no new in_stb while busy
  logic [1:0] busy;
  always_ff @(posedge clk) begin
    if (!rst_n) busy <= '0;
    else        busy <= {busy[0], in_stb};
  end

  always_ff @(posedge clk)
    if (rst_n) begin
      assert (!(in_stb && (busy != 2'b00)))
        else $error("aes_round %0d: in_stb less than three cycles after the previous one", ROUND);
      assert (dp_valid == kg_valid)
        else $error("aes_round %0d: data path and key generator out of step", ROUND);
    end

endmodule
