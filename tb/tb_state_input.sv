// tb_state_input: the input register captures the four columns, column 0 in
// the high bits, one clock after load, and holds them while load is low.
module tb_state_input;
  logic clk = 0, load;
  logic [3:0][31:0] col;
  logic [127:0] state, expv;
  int checks = 0, failures = 0, cycles = 0;
  state_input dut (.clk(clk), .load(load), .col(col), .state(state));
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    load = 0; col = '0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      col = {$urandom, $urandom, $urandom, $urandom};
      load = (i % 3 != 2);
      if (load) expv = {col[0], col[1], col[2], col[3]};
      @(negedge clk);
      load = 0;
      col = ~col;   // must not be taken
      checks++;
      if (state !== expv) begin failures++; $display("FAIL %h exp %h", state, expv); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    wait (cycles > 5000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
