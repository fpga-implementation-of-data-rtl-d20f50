// tb_led_top: end-to-end test of the iterative LED-128 engine at its default
// size (48 rounds, 64-bit block, 128-bit key).
//
// Encrypts the published vector (plaintext 0123456789ABCDEF, key
// 0123456789ABCDEF0123456789ABCDEF, ciphertext 3131C231205C3664) and
// decrypts it back, then runs random encryptions and decryptions against the
// reference model, with mode changes between operations, back-to-back starts
// from DONE and starts pulsed during a run (which must be ignored). Each
// operation must finish exactly 48 cycles after its start cycle. The test
// counts how often each mechanism occurred (encryption, decryption, K1 and
// K2 key additions, ignored start, mode change, back-to-back start) and
// fails a mechanism that never did.
module tb_led_top;
  import tb_led_ref_pkg::*;

  logic         clk = 0, rst_n = 0, start = 0, mode = 0;
  logic [63:0]  data_in = '0, data_out;
  logic [127:0] key = '0;
  logic         busy, done;
  int checks = 0, failures = 0;

  int n_enc = 0, n_dec = 0, n_k1 = 0, n_k2 = 0, n_ignored = 0, n_switch = 0, n_b2b = 0;
  logic last_mode = 0;
  bit   have_last = 0;

  led_top dut (.clk, .rst_n, .start, .mode, .data_in, .key, .data_out, .busy, .done);

  always #5 clk = ~clk;

  // Key additions seen in the rounds actually evaluated.
  always @(posedge clk) begin
    if (busy && dut.u_ctrl.round[1:0] == 2'b00) begin
      if (dut.u_ctrl.round[2]) n_k2++;
      else                     n_k1++;
    end
  end

  task automatic expect_eq(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%0t %s: %h, expected %h", $time, what, got, exp);
    end
  endtask

  task automatic operation(logic m, logic [63:0] din, logic [127:0] k, bit poke,
                           output logic [63:0] result);
    int cycles = 0;
    @(negedge clk);
    if (done) n_b2b++;
    if (have_last && last_mode != m) n_switch++;
    start = 1; mode = m; data_in = din; key = k;
    @(negedge clk);
    start = 0; mode = ~m; data_in = rand64(); key = {rand64(), rand64()};
    while (!done) begin
      cycles++;
      if (poke && cycles == 17) begin
        start = 1;
        n_ignored++;
      end else start = 0;
      if (cycles > 100) break;
      @(negedge clk);
    end
    start = 0;
    checks++;
    if (cycles != 48) begin
      failures++;
      $display("operation took %0d cycles after the start cycle, expected 48", cycles);
    end
    result = data_out;
    expect_eq(result, m ? decrypt(din, k) : encrypt(din, k), m ? "decryption" : "encryption");
    if (m) n_dec++; else n_enc++;
    last_mode = m;
    have_last = 1;
  endtask

  task automatic expect_seen(int n, string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end
    $display("%-28s %0d", what, n);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0]  c, p, r;
    logic [127:0] k;
    repeat (3) @(negedge clk);
    checks++;
    if (busy || done) begin
      failures++;
      $display("not idle after reset");
    end
    rst_n = 1;
    @(negedge clk);

    operation(0, 64'h0123456789ABCDEF, 128'h0123456789ABCDEF0123456789ABCDEF, 0, c);
    expect_eq(c, 64'h3131C231205C3664, "published ciphertext");
    operation(1, c, 128'h0123456789ABCDEF0123456789ABCDEF, 1, p);
    expect_eq(p, 64'h0123456789ABCDEF, "published plaintext");

    for (int n = 0; n < 10; n++) begin
      k = {rand64(), rand64()};
      p = rand64();
      operation(0, p, k, n % 3 == 0, c);
      if (n % 2 == 0) operation(0, rand64(), k, 0, r);
      operation(1, c, k, n % 3 == 1, r);
      expect_eq(r, p, "round trip");
      // Idle gap: output must hold while nothing is started.
      repeat (n % 4) @(negedge clk);
      expect_eq(data_out, p, "output held in DONE");
    end

    expect_seen(n_enc, "encryptions");
    expect_seen(n_dec, "decryptions");
    expect_seen(n_k1, "K1 key additions");
    expect_seen(n_k2, "K2 key additions");
    expect_seen(n_ignored, "starts ignored while busy");
    expect_seen(n_switch, "mode changes");
    expect_seen(n_b2b, "back-to-back starts");
    checks++;
    if (n_k1 != 6 * (n_enc + n_dec) || n_k2 != 6 * (n_enc + n_dec)) begin
      failures++;
      $display("key additions K1=%0d K2=%0d for %0d operations", n_k1, n_k2, n_enc + n_dec);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
