// state_input: the "Plaintext" and "Key" input subsystems with their input
// register. Four 32-bit columns are concatenated, column 0 in the high bits
// (it feeds the 'hi' side of the concatenation), and captured into a 128-bit
// register when load is high. The register is the same one the original
// design puts between each input subsystem and the cipher; the load enable
// is this design's addition so that a block is captured exactly once per
// accepted handshake.
// Timing: state follows col one clock after load.
module state_input
  import aes_pkg::*;
(
  input  logic          clk,
  input  logic          load,
  input  word_t [3:0]   col,    // col[0] = Column1 ... col[3] = Column4
  output state_t        state
);

  always_ff @(posedge clk)
    if (load) state <= {col[0], col[1], col[2], col[3]};

endmodule
