// tb_led_inv_round: the decryption round against the reference inverse
// round, and that it undoes the reference forward round, on fixed and
// random states.
module tb_led_inv_round;
  import led_pkg::*;
  import tb_led_ref_pkg::*;

  block_t din, dout;
  int checks = 0, failures = 0;

  led_inv_round dut (.din, .dout);

  task automatic check(block_t v);
    din = v;
    #1;
    checks++;
    if (dout !== inv_round_body(v)) begin
      failures++;
      $display("inv_round(%h) = %h, expected %h", v, dout, inv_round_body(v));
    end
    din = round_body(v);
    #1;
    checks++;
    if (dout !== v) begin
      failures++;
      $display("inv_round(round(%h)) = %h", v, dout);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(64'h0);
    check(64'hFFFF_FFFF_FFFF_FFFF);
    check(64'h0123_4567_89AB_CDEF);
    for (int i = 0; i < 16; i++) check(64'h5 << (4*i));
    for (int i = 0; i < 300; i++) check(rand64());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
