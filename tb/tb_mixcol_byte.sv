// tb_mixcol_byte: random and corner checks of one MixColumns output byte,
// 2*in1 + 3*in2 + in3 + in4 in GF(2^8), against the reference multiplier.
module tb_mixcol_byte;
  import aes_ref_pkg::*;
  logic [7:0] a, b, c, d, y, exp_y;
  int checks = 0, failures = 0;
  mixcol_byte dut (.in1(a), .in2(b), .in3(c), .in4(d), .out1(y));
  initial begin
    for (int i = 0; i < 2000; i++) begin
      {a, b, c, d} = (i < 16) ? {4{8'(i * 17)}} : $urandom;
      #1;
      exp_y = ref_mul(a, 8'h02) ^ ref_mul(b, 8'h03) ^ c ^ d;
      checks++;
      if (y !== exp_y) begin failures++; $display("FAIL %h %h %h %h -> %h exp %h", a, b, c, d, y, exp_y); end
    end
    // first row of the standard's MixColumns example column db 13 53 45 -> 8e
    {a, b, c, d} = 32'hdb135345; #1; checks++; if (y !== 8'h8e) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
