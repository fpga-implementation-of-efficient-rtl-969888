// key_gen_round: one step of the AES-128 key expansion, computed in the
// round that uses it.
//
// The previous round key is split into words w0..w3. The last word w3 goes
// through a subbytes_tdm unit (its own S-box RAM), the result is rotated by
// one byte (bytes 1,2,3,0; wiring only) and XORed with w0 and the round
// constant {RCON, 00, 00, 00} to give the new first word. The other new
// words follow by chained XOR: k1 = w1 ^ k0, k2 = w2 ^ k1, k3 = w3 ^ k2.
//
// Timing: start is a one-cycle pulse in the first cycle key_in is present.
// key_in must then be stable for three cycles (start cycle plus two);
// key_out is combinational and valid, with out_valid high, in the second
// cycle after start. The structure follows the original design; the
// rotation direction and the chained XORs are those of the AES standard.
module key_gen_round
  import aes_pkg::*;
#(
  parameter byte_t RCON = 8'h01
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  state_t key_in,
  output state_t key_out,
  output logic   out_valid
);

  word_t w [4];
  word_t k [4];
  word_t sub_w3, rot_w3;

  assign w[0] = key_in[127:96];
  assign w[1] = key_in[95:64];
  assign w[2] = key_in[63:32];
  assign w[3] = key_in[31:0];

  subbytes_tdm u_sub (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .din        (w[3]),
    .dout       (sub_w3),
    .dout_valid (out_valid)
  );

  assign rot_w3 = {sub_w3[23:0], sub_w3[31:24]};

  assign k[0] = w[0] ^ rot_w3 ^ {RCON, 24'h000000};
  assign k[1] = w[1] ^ k[0];
  assign k[2] = w[2] ^ k[1];
  assign k[3] = w[3] ^ k[2];

  assign key_out = {k[0], k[1], k[2], k[3]};

endmodule
