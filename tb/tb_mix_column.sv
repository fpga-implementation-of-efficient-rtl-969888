// tb_mix_column: MixColumns of one column against known columns of the AES
// literature and against the reference model on random columns.
module tb_mix_column;
  import aes_ref_pkg::*;
  logic [31:0] din, dout;
  int checks = 0, failures = 0;
  mix_column dut (.din(din), .dout(dout));
  task automatic kat(logic [31:0] i, logic [31:0] o);
    din = i; #1; checks++;
    if (dout !== o) begin failures++; $display("FAIL %h -> %h exp %h", i, dout, o); end
  endtask
  initial begin
    kat(32'hdb135345, 32'h8e4da1bc);
    kat(32'hf20a225c, 32'h9fdc589d);
    kat(32'h01010101, 32'h01010101);
    kat(32'hc6c6c6c6, 32'hc6c6c6c6);
    kat(32'hd4d4d4d5, 32'hd5d5d7d6);
    kat(32'h2d26314c, 32'h4d7ebdf8);
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] r = $urandom;
      kat(r, ref_mix_col(r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
