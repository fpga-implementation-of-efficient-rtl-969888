// aes_encrypt_top: pipelined AES-128 encryption.
//
// The plaintext and the cipher key arrive as four 32-bit columns each and
// are captured in input registers (state_input). The initial round is a
// single AddRoundKey of plaintext and key. Ten aes_round stages follow, each
// with its own round-key generator, so the key expansion runs alongside the
// data in the pipeline and every block carries its own key. Round 10 omits
// MixColumns. Every round uses five dual-port S-box RAMs (four for the state,
// one for the key), fifty in all.
//
// Interface: a block is accepted in a cycle where in_valid and in_ready are
// both high. in_ready drops for the two cycles after an accept, so at most
// one block enters every three cycles. out_valid pulses for one cycle with
// the ciphertext 31 cycles after the accept (1 input-register cycle plus 3
// per round); ciphertext then holds until the next result. The outputs
// cannot be stalled. round_key[i] is the key register of round i+1 (it holds
// the round key of the block that round last processed).
// The structure follows the original design; the handshake, the issue
// interval and the cycle counts are this design's choices. rst_n is
// synchronous and active low and clears only the control strobes.
module aes_encrypt_top
  import aes_pkg::*;
#(
  parameter int unsigned NROUNDS = NUM_ROUNDS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  word_t  [3:0]           plaintext_col,   // [0] = column 0 (bytes 0..3)
  input  word_t  [3:0]           key_col,         // [0] = column 0
  output logic                   out_valid,
  output state_t                 ciphertext,      // byte 0 in bits 127:120
  output state_t [NROUNDS-1:0]   round_key
);

  logic       accept;
  logic [1:0] hold;           // cycles left before the next block may enter
  logic       stb0;
  state_t     pt_reg, key_reg;
  word_t [3:0] init_col;

  state_t state_r [NROUNDS + 1];
  state_t key_r   [NROUNDS + 1];
  logic   stb_r   [NROUNDS + 1];

  assign in_ready = (hold == 2'd0);
  assign accept   = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hold <= '0;
      stb0 <= 1'b0;
    end else begin
      hold <= accept ? 2'(ISSUE_INTERVAL - 1) : (hold != 0 ? hold - 2'd1 : 2'd0);
      stb0 <= accept;
    end
  end

  state_input u_plaintext (.clk(clk), .load(accept), .col(plaintext_col), .state(pt_reg));
  state_input u_key       (.clk(clk), .load(accept), .col(key_col),       .state(key_reg));

  // Initial round: AddRoundKey only
  add_round_key u_ark0 (.state_in(pt_reg), .round_key(key_reg), .col_out(init_col));

  assign state_r[0] = {init_col[0], init_col[1], init_col[2], init_col[3]};
  assign key_r[0]   = key_reg;
  assign stb_r[0]   = stb0;

  for (genvar r = 1; r <= NROUNDS; r++) begin : g_round
    aes_round #(.ROUND(r), .FINAL(r == NROUNDS)) u_round (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_stb    (stb_r[r - 1]),
      .state_in  (state_r[r - 1]),
      .key_in    (key_r[r - 1]),
      .out_stb   (stb_r[r]),
      .state_out (state_r[r]),
      .key_out   (key_r[r])
    );
    assign round_key[r - 1] = key_r[r];
  end

  assign ciphertext = state_r[NROUNDS];
  assign out_valid  = stb_r[NROUNDS];

endmodule
