// tb_subbytes_tdm: random words are presented every three cycles with a
// start pulse; dout must equal the reference S-box of each byte in the
// second cycle after start, with dout_valid high only in that cycle. A few
// words are also given with longer gaps.
module tb_subbytes_tdm;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, dout_valid;
  logic [31:0] din, dout, expv;
  int checks = 0, failures = 0, cycles = 0;
  subbytes_tdm dut (.clk(clk), .rst_n(rst_n), .start(start), .din(din),
                    .dout(dout), .dout_valid(dout_valid));
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    din = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      din = (i < 256) ? {4{8'(i)}} ^ 32'h00ff00ff : $urandom;
      expv = {ref_sbox(din[31:24]), ref_sbox(din[23:16]), ref_sbox(din[15:8]), ref_sbox(din[7:0])};
      start = 1;
      @(negedge clk); start = 0;
      checks++; if (dout_valid) begin failures++; $display("FAIL valid too early"); end
      @(negedge clk);
      checks++;
      if (!dout_valid || dout !== expv) begin
        failures++; $display("FAIL din=%h dout=%h exp=%h v=%b", din, dout, expv, dout_valid);
      end
      if (i % 50 == 49) repeat (4) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    wait (cycles > 5000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
