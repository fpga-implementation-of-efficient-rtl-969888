// tb_aes_encrypt_top: end-to-end test of the AES-128 pipeline at its default
// size (ten rounds). It encrypts the standard's known-answer vectors, the
// all-zero plaintext with the all-zero key (whose round keys are also
// checked on the round_key outputs), and random plaintext/key pairs, each
// block with its own key. Blocks are offered both continuously (in_valid
// held high, so the source is throttled by in_ready to one block every
// three cycles and up to eleven blocks are in flight) and with random gaps.
// Every ciphertext is compared with the reference model, in order, and its
// latency must be exactly 31 cycles. The test counts how often each
// mechanism occurred (throttling by in_ready, several blocks in flight,
// issue at the minimum interval) and fails if one never did.
module tb_aes_encrypt_top;
  import aes_ref_pkg::*;

  localparam int LATENCY = 31;
  localparam int NRAND = 400;

  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid;
  logic [3:0][31:0] pt_col, key_col;
  logic [127:0] ciphertext;
  logic [9:0][127:0] round_key;

  int checks = 0, failures = 0, cycle = 0;
  int n_throttled = 0, n_min_interval = 0, max_in_flight = 0;
  int last_accept = -100;
  logic [127:0] exp_q [$];
  int           t_q   [$];

  aes_encrypt_top dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .plaintext_col(pt_col), .key_col(key_col),
    .out_valid(out_valid), .ciphertext(ciphertext), .round_key(round_key));

  always #5 clk = ~clk;

  function automatic logic [3:0][31:0] to_cols(logic [127:0] v);
    return {v[31:0], v[63:32], v[95:64], v[127:96]};  // [0] = bits 127:96
  endfunction

  // Scoreboard: accept and result monitoring
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && in_valid && !in_ready) n_throttled++;
    if (rst_n && in_valid && in_ready) begin
      logic [127:0] p, k;
      p = {pt_col[0], pt_col[1], pt_col[2], pt_col[3]};
      k = {key_col[0], key_col[1], key_col[2], key_col[3]};
      exp_q.push_back(ref_encrypt(p, k));
      t_q.push_back(cycle);
      checks++;
      if (cycle - last_accept < 3) begin failures++; $display("FAIL accepts %0d cycles apart", cycle - last_accept); end
      if (cycle - last_accept == 3) n_min_interval++;
      last_accept = cycle;
      if (exp_q.size() > max_in_flight) max_in_flight = exp_q.size();
    end
    if (rst_n && out_valid) begin
      checks += 2;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected output %h", ciphertext);
      end else begin
        logic [127:0] e;
        int t;
        e = exp_q.pop_front();
        t = t_q.pop_front();
        if (ciphertext !== e) begin failures++; $display("FAIL ct %h exp %h", ciphertext, e); end
        if (cycle - t != LATENCY) begin failures++; $display("FAIL latency %0d", cycle - t); end
      end
    end
  end

  task automatic send(logic [127:0] p, logic [127:0] k);
    @(negedge clk);
    pt_col = to_cols(p); key_col = to_cols(k); in_valid = 1;
    do @(posedge clk); while (!in_ready);
    @(negedge clk);
    in_valid = 0; pt_col = ~pt_col; key_col = ~key_col;
  endtask

  task automatic drain();
    while (exp_q.size() != 0) @(negedge clk);
    repeat (4) @(negedge clk);
  endtask

  task automatic kat(logic [127:0] p, logic [127:0] k, logic [127:0] c);
    checks++;
    if (ref_encrypt(p, k) !== c) begin failures++; $display("FAIL reference model on %h", p); end
    send(p, k);
  endtask

  initial begin
    logic [127:0] k;
    pt_col = '0; key_col = '0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    // Known answers (FIPS-197 appendices C.1 and B)
    kat(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    kat(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c,
        128'h3925841d02dc09fbdc118597196a0b32);
    drain();
    // All-zero plaintext and key; then the round-key registers hold its schedule
    kat(128'h0, 128'h0, 128'h66e94bd4ef8a2c3b884cfa59ca342b2e);
    drain();
    k = 128'h0;
    for (int r = 1; r <= 10; r++) begin
      k = ref_next_key(k, r);
      checks++;
      if (round_key[r - 1] !== k) begin failures++; $display("FAIL round key %0d = %h exp %h", r, round_key[r - 1], k); end
    end
    checks++;
    if (round_key[0] !== 128'h62636363626363636263636362636363) failures++;
    // Continuous offer: in_valid stays high, in_ready throttles
    @(negedge clk);
    for (int i = 0; i < NRAND; i++) begin
      pt_col = {$urandom, $urandom, $urandom, $urandom};
      key_col = {$urandom, $urandom, $urandom, $urandom};
      in_valid = 1;
      do @(posedge clk); while (!in_ready);
      @(negedge clk);
    end
    in_valid = 0;
    drain();
    // Random gaps
    for (int i = 0; i < NRAND / 4; i++) begin
      repeat ($urandom_range(0, 5)) @(negedge clk);
      send({$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom});
    end
    drain();
    checks += 3;
    if (n_throttled == 0) begin failures++; $display("FAIL in_ready never throttled the source"); end
    if (max_in_flight < 10) begin failures++; $display("FAIL at most %0d blocks in flight", max_in_flight); end
    if (n_min_interval == 0) begin failures++; $display("FAIL never issued at the minimum interval"); end
    $display("throttled cycles=%0d  blocks at minimum interval=%0d  max in flight=%0d",
             n_throttled, n_min_interval, max_in_flight);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycle > 20000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
