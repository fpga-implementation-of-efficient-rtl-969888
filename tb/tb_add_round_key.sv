// tb_add_round_key: AddRoundKey against a 128-bit XOR on random data, the
// column order of the outputs, and the initial round of the standard's
// worked example (3243f6a8... XOR 2b7e1516... = 193de3be...).
module tb_add_round_key;
  logic [127:0] s, k;
  logic [3:0][31:0] col;
  int checks = 0, failures = 0;
  add_round_key dut (.state_in(s), .round_key(k), .col_out(col));
  initial begin
    s = 128'h3243f6a8885a308d313198a2e0370734;
    k = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    #1; checks++;
    if ({col[0], col[1], col[2], col[3]} !== 128'h193de3bea0f4e22b9ac68d2ae9f84808) failures++;
    checks++;
    if (col[0] !== 32'h193de3be || col[3] !== 32'he9f84808) failures++;
    for (int i = 0; i < 1000; i++) begin
      s = {$urandom, $urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      #1; checks++;
      if ({col[0], col[1], col[2], col[3]} !== (s ^ k)) begin failures++; $display("FAIL %h %h", s, k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
