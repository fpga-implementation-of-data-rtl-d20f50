// tb_led_control: the sequencing FSM. For encryption and decryption checks
// that the load cycle comes with start, that run lasts exactly 48 cycles with
// the round index counting up (encryption) or down (decryption), that done
// rises right after the last round and holds, that a start during a run is
// ignored, and that a start from DONE begins a new operation.
module tb_led_control;
  import led_pkg::*;

  logic       clk = 0, rst_n = 0, start = 0;
  mode_t      mode_in = MODE_ENC;
  logic       load, run, busy, done;
  round_idx_t round;
  mode_t      mode;
  int checks = 0, failures = 0;

  led_control dut (.clk, .rst_n, .start, .mode_in, .load, .run, .round, .mode, .busy, .done);

  always #5 clk = ~clk;

  task automatic expect_true(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("%0t: %s", $time, what);
    end
  endtask

  // One operation; optionally pulse start again in the middle of the run.
  task automatic operation(mode_t m, bit poke);
    int cycles = 0;
    @(negedge clk);
    start = 1; mode_in = m;
    #1 expect_true(load, "load with start");
    @(negedge clk);
    start = 0; mode_in = (m == MODE_ENC) ? MODE_DEC : MODE_ENC;
    while (run) begin
      expect_true(busy && !done, "busy during run");
      expect_true(mode == m, "mode held");
      expect_true(int'(round) == ((m == MODE_ENC) ? cycles : 47 - cycles), $sformatf("round index %0d", round));
      if (poke && cycles == 20) begin
        start = 1;
        #1 expect_true(!load, "start ignored while busy");
      end else start = 0;
      cycles++;
      @(negedge clk);
    end
    start = 0;
    expect_true(cycles == 48, $sformatf("run lasted %0d cycles", cycles));
    expect_true(done && !busy, "done after last round");
    repeat (3) @(negedge clk);
    expect_true(done, "done holds");
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    expect_true(!busy && !done && !run, "idle after reset");
    rst_n = 1;
    repeat (2) @(negedge clk);
    expect_true(!busy && !done, "idle without start");
    operation(MODE_ENC, 0);
    operation(MODE_DEC, 1);
    operation(MODE_ENC, 1);
    operation(MODE_DEC, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
