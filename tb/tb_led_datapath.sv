// tb_led_datapath: the datapath driven by a testbench sequencer that plays
// the controller, LFSR and key schedule from the reference model. Runs whole
// 48-round encryptions and decryptions (the published vector and random ones)
// and checks the intermediate state after every round and the final output.
module tb_led_datapath;
  import led_pkg::*;
  import tb_led_ref_pkg::*;

  logic   clk = 0, rst_n = 0, load = 0, run = 0;
  mode_t  load_mode = MODE_ENC, mode = MODE_ENC;
  block_t data_in = '0, round_key = '0, whiten_key = '0, data_out;
  key_t   key_in = '0, key_q;
  rc_t    rc_in = '0;
  int checks = 0, failures = 0;

  led_datapath dut (
    .clk, .rst_n, .load, .run, .load_mode, .mode, .data_in, .key_in, .rc(rc_in),
    .round_key, .whiten_key, .key_q, .data_out
  );

  always #5 clk = ~clk;

  task automatic expect_eq(block_t got, block_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: %h, expected %h", what, got, exp);
    end
  endtask

  task automatic operation(mode_t m, block_t din, key_t k);
    block_t s;
    @(negedge clk);
    load = 1; load_mode = m; data_in = din; key_in = k;
    @(negedge clk);
    load = 0; data_in = rand64(); key_in = {rand64(), rand64()};
    mode = m; run = 1; whiten_key = k[127:64];
    checks++;
    if (key_q !== k) begin
      failures++;
      $display("key register %h", key_q);
    end
    s = (m == MODE_ENC) ? din : din ^ k[127:64];
    for (int i = 0; i < 48; i++) begin
      int r = (m == MODE_ENC) ? i : 47 - i;
      rc_in = tb_led_ref_pkg::rc(r);
      round_key = rkey(k, r);
      @(negedge clk);
      s = (m == MODE_ENC) ? round_body(add_const(s ^ rkey(k, r), r))
                          : add_const(inv_round_body(s), r) ^ rkey(k, r);
      expect_eq(dut.state_q, s, $sformatf("state after round %0d", r));
    end
    run = 0;
    @(negedge clk);
    expect_eq(data_out, (m == MODE_ENC) ? encrypt(din, k) : decrypt(din, k), "result");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    key_t   k;
    block_t p;
    repeat (2) @(negedge clk);
    rst_n = 1;
    operation(MODE_ENC, 64'h0123456789ABCDEF, 128'h0123456789ABCDEF0123456789ABCDEF);
    expect_eq(data_out, 64'h3131C231205C3664, "published ciphertext");
    operation(MODE_DEC, 64'h3131C231205C3664, 128'h0123456789ABCDEF0123456789ABCDEF);
    expect_eq(data_out, 64'h0123456789ABCDEF, "published plaintext");
    for (int n = 0; n < 6; n++) begin
      k = {rand64(), rand64()};
      p = rand64();
      operation(MODE_ENC, p, k);
      operation(MODE_DEC, encrypt(p, k), k);
      expect_eq(data_out, p, "round trip");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
