// tb_round_datapath: a normal round (FINAL = 0) and a final round
// (FINAL = 1) side by side, fed the same random states every three cycles.
// Outputs are compared with the reference SubBytes+ShiftRows(+MixColumns)
// in the second cycle after start, where out_valid must be high. Includes
// round 1 of the standard's worked example (193de3be... -> 046681e5...).
module tb_round_datapath;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, v_mix, v_fin;
  logic [127:0] s, o_mix, o_fin, e_mix, e_fin;
  int checks = 0, failures = 0, cycles = 0;
  round_datapath #(.FINAL(1'b0)) dut_mix (.clk(clk), .rst_n(rst_n), .start(start),
    .state_in(s), .state_out(o_mix), .out_valid(v_mix));
  round_datapath #(.FINAL(1'b1)) dut_fin (.clk(clk), .rst_n(rst_n), .start(start),
    .state_in(s), .state_out(o_fin), .out_valid(v_fin));
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    s = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      s = (i == 0) ? 128'h193de3bea0f4e22b9ac68d2ae9f84808 : {$urandom, $urandom, $urandom, $urandom};
      e_fin = ref_sub_shift(s);
      e_mix = ref_mix(e_fin);
      start = 1;
      @(negedge clk); start = 0;
      checks++; if (v_mix || v_fin) begin failures++; $display("FAIL valid early"); end
      @(negedge clk);
      checks += 2;
      if (!v_mix || o_mix !== e_mix) begin failures++; $display("FAIL mix %h -> %h exp %h", s, o_mix, e_mix); end
      if (!v_fin || o_fin !== e_fin) begin failures++; $display("FAIL final %h -> %h exp %h", s, o_fin, e_fin); end
      if (i == 0) begin
        checks++;
        if (o_mix !== 128'h046681e5e0cb199a48f8d37a2806264c) begin failures++; $display("FAIL worked example"); end
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
