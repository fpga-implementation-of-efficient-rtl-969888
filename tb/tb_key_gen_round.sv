// tb_key_gen_round: key expansion step with round constants 0x01 (round 1)
// and 0x36 (round 10). Checks the standard's expansion of key 2b7e1516...
// (round key 1 = a0fafe17 88542cb1 23a33939 2a6c7605), the zero key
// (round key 1 = 62636363 ...), and random keys against the reference, in
// the second cycle after start with out_valid high.
module tb_key_gen_round;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, v1, v10;
  logic [127:0] k, o1, o10, e1, e10;
  int checks = 0, failures = 0, cycles = 0;
  key_gen_round #(.RCON(8'h01)) dut1 (.clk(clk), .rst_n(rst_n), .start(start),
    .key_in(k), .key_out(o1), .out_valid(v1));
  key_gen_round #(.RCON(8'h36)) dut10 (.clk(clk), .rst_n(rst_n), .start(start),
    .key_in(k), .key_out(o10), .out_valid(v10));
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    k = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      case (i)
        0: k = 128'h2b7e151628aed2a6abf7158809cf4f3c;
        1: k = 128'h0;
        2: k = 128'hac7766f319fadc2128d12941575c006e; // round key 9 of 2b7e1516...
        default: k = {$urandom, $urandom, $urandom, $urandom};
      endcase
      e1 = ref_next_key(k, 1);
      e10 = ref_next_key(k, 10);
      start = 1;
      @(negedge clk); start = 0;
      checks++; if (v1 || v10) begin failures++; $display("FAIL valid early"); end
      @(negedge clk);
      checks += 2;
      if (!v1 || o1 !== e1) begin failures++; $display("FAIL rcon1 %h -> %h exp %h", k, o1, e1); end
      if (!v10 || o10 !== e10) begin failures++; $display("FAIL rcon36 %h -> %h exp %h", k, o10, e10); end
      checks++;
      case (i)
        0: if (o1 !== 128'ha0fafe1788542cb123a339392a6c7605) failures++;
        1: if (o1 !== 128'h62636363626363636263636362636363) failures++;
        2: if (o10 !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) failures++;
        default: ;
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    wait (cycles > 5000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
