// tb_aes_round: one pipeline round (round 1, with MixColumns) and one final
// round (round 10, without). Inputs change every three cycles with an
// in_stb pulse; the registered state and key must match the reference one
// round later, with out_stb exactly three cycles after in_stb, and must hold
// until the next out_stb. Round 1 of the standard's worked example is
// included (state 193de3be..., key 2b7e1516... -> a49c7ff2...).
module tb_aes_round;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, stb = 0, ostb1, ostb10;
  logic [127:0] s, k, so1, ko1, so10, ko10;
  logic [127:0] es1, ek1, es10, ek10;
  int checks = 0, failures = 0, cycles = 0;
  aes_round #(.ROUND(1), .FINAL(1'b0)) dut1 (.clk(clk), .rst_n(rst_n), .in_stb(stb),
    .state_in(s), .key_in(k), .out_stb(ostb1), .state_out(so1), .key_out(ko1));
  aes_round #(.ROUND(10), .FINAL(1'b1)) dut10 (.clk(clk), .rst_n(rst_n), .in_stb(stb),
    .state_in(s), .key_in(k), .out_stb(ostb10), .state_out(so10), .key_out(ko10));
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    s = '0; k = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      if (i == 0) begin
        s = 128'h193de3bea0f4e22b9ac68d2ae9f84808;
        k = 128'h2b7e151628aed2a6abf7158809cf4f3c;
      end else begin
        s = {$urandom, $urandom, $urandom, $urandom};
        k = {$urandom, $urandom, $urandom, $urandom};
      end
      es1 = ref_round(s, k, 1, 1'b0);  ek1 = ref_next_key(k, 1);
      es10 = ref_round(s, k, 10, 1'b1); ek10 = ref_next_key(k, 10);
      stb = 1;
      @(negedge clk); stb = 0;
      for (int c = 1; c < 3; c++) begin
        checks++; if (ostb1 || ostb10) begin failures++; $display("FAIL out_stb early"); end
        @(negedge clk);
      end
      checks += 3;
      if (!ostb1 || !ostb10) begin failures++; $display("FAIL out_stb missing"); end
      if (so1 !== es1 || ko1 !== ek1) begin failures++; $display("FAIL round1 %h %h exp %h %h", so1, ko1, es1, ek1); end
      if (so10 !== es10 || ko10 !== ek10) begin failures++; $display("FAIL round10 %h exp %h", so10, es10); end
      if (i == 0) begin
        checks++;
        if (so1 !== 128'ha49c7ff2689f352b6b5bea43026a5049) begin failures++; $display("FAIL worked example"); end
      end
      // output must hold while idle
      if (i % 40 == 39) begin
        repeat (5) @(negedge clk);
        checks++;
        if (so1 !== es1 || ostb1) begin failures++; $display("FAIL hold"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    wait (cycles > 5000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
