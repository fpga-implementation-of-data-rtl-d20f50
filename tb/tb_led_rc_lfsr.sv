// tb_led_rc_lfsr: the round-constant LFSR against the 48 constants of the
// published table, walked forward for encryption and backward for
// decryption, and that load has priority over step.
module tb_led_rc_lfsr;
  import led_pkg::*;

  localparam logic [6*48-1:0] TABLE = {
    6'h01, 6'h03, 6'h07, 6'h0f, 6'h1f, 6'h3e, 6'h3d, 6'h3b, 6'h37, 6'h2f, 6'h1e, 6'h3c,
    6'h39, 6'h33, 6'h27, 6'h0e, 6'h1d, 6'h3a, 6'h35, 6'h2b, 6'h16, 6'h2c, 6'h18, 6'h30,
    6'h21, 6'h02, 6'h05, 6'h0b, 6'h17, 6'h2e, 6'h1c, 6'h38, 6'h31, 6'h23, 6'h06, 6'h0d,
    6'h1b, 6'h36, 6'h2d, 6'h1a, 6'h34, 6'h29, 6'h12, 6'h24, 6'h08, 6'h11, 6'h22, 6'h04};

  function automatic rc_t expected(int r);
    return TABLE[6*48-1-6*r -: 6];
  endfunction

  logic  clk = 0, rst_n = 0, load = 0, step = 0;
  mode_t mode = MODE_ENC;
  rc_t   rc;
  int checks = 0, failures = 0;

  led_rc_lfsr dut (.clk, .rst_n, .load, .step, .mode, .rc);

  always #5 clk = ~clk;

  task automatic expect_rc(rc_t exp, string what);
    checks++;
    if (rc !== exp) begin
      failures++;
      $display("%s: rc = %h, expected %h", what, rc, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    expect_rc('0, "after reset");
    rst_n = 1;
    // Encryption: load gives round 0, each step the next round.
    @(negedge clk); mode = MODE_ENC; load = 1;
    @(negedge clk); load = 0; step = 1;
    for (int r = 0; r < 48; r++) begin
      expect_rc(expected(r), $sformatf("enc round %0d", r));
      @(negedge clk);
    end
    // Decryption: load gives round 47, each step the previous round.
    step = 0; mode = MODE_DEC; load = 1;
    @(negedge clk); load = 0; step = 1;
    for (int r = 47; r >= 0; r--) begin
      expect_rc(expected(r), $sformatf("dec round %0d", r));
      @(negedge clk);
    end
    // One more backward step from round 0 returns the LFSR to its zero start
    // value; then hold, and load over step.
    step = 0;
    @(negedge clk);
    @(negedge clk);
    expect_rc(6'h00, "hold");
    mode = MODE_ENC; load = 1; step = 1;
    @(negedge clk);
    expect_rc(6'h01, "load priority");
    load = 0; step = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
