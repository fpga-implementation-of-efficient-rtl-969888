// tb_sbox_dpram: reads all 256 S-box entries through both ports (port B in
// reverse order) and checks them against the reference S-box with one clock
// of read latency; then writes through each port, checks that a writing
// port keeps its old output ("no read on write") and that the other port
// and later reads see the new data.
module tb_sbox_dpram;
  import aes_ref_pkg::*;
  logic clk = 0;
  logic [7:0] addra, addrb, dina, dinb, a, b;
  logic wea, web;
  int checks = 0, failures = 0, cycles = 0;
  sbox_dpram dut (.clk(clk), .addra(addra), .dina(dina), .wea(wea), .a(a),
                  .addrb(addrb), .dinb(dinb), .web(web), .b(b));
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  task automatic chk(logic [7:0] got, logic [7:0] exp_v, string what);
    checks++;
    if (got !== exp_v) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp_v); end
  endtask
  initial begin
    logic [7:0] hold_a;
    wea = 0; web = 0; dina = 0; dinb = 0; addra = 0; addrb = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); addra = 8'(i); addrb = 8'(255 - i);
      @(posedge clk); #1;
      chk(a, ref_sbox(8'(i)), "port A read");
      chk(b, ref_sbox(8'(255 - i)), "port B read");
    end
    // latency: output changes only at the clock edge
    @(negedge clk); addra = 8'h53; #1;
    chk(a, ref_sbox(8'hff), "port A holds until clock");
    @(posedge clk); #1; chk(a, 8'hed, "S(53) = ed");
    // write through port A: its output keeps the old value
    hold_a = a;
    @(negedge clk); addra = 8'h10; dina = 8'h5a; wea = 1; addrb = 8'h11;
    @(posedge clk); #1; chk(a, hold_a, "no read on write, port A");
    chk(b, ref_sbox(8'h11), "port B read during A write");
    @(negedge clk); wea = 0; addrb = 8'h10;
    @(posedge clk); #1; chk(b, 8'h5a, "port B sees port A write");
    chk(a, 8'h5a, "port A reads its write");
    // write through port B
    @(negedge clk); addrb = 8'h20; dinb = 8'hc3; web = 1; addra = 8'h20;
    @(posedge clk); #1; chk(b, 8'h5a, "no read on write, port B");
    chk(a, ref_sbox(8'h20), "port A reads old data during B write");
    @(negedge clk); web = 0;
    @(posedge clk); #1; chk(a, 8'hc3, "port A sees port B write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    wait (cycles > 2000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
