// tb_gf_mul2: exhaustive check of the GF(2^8) doubling against the reference
// multiplier, plus the worked example 0x57 * 2 = 0xae of the AES standard.
module tb_gf_mul2;
  import aes_ref_pkg::*;
  logic [7:0] x, y;
  int checks = 0, failures = 0;
  gf_mul2 dut (.x(x), .y(y));
  initial begin
    for (int i = 0; i < 256; i++) begin
      x = 8'(i); #1;
      checks++;
      if (y !== ref_mul(x, 8'h02)) begin failures++; $display("FAIL x=%h y=%h", x, y); end
    end
    x = 8'h57; #1; checks++; if (y !== 8'hae) failures++;
    x = 8'hae; #1; checks++; if (y !== 8'h47) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
