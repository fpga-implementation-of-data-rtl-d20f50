// tb_led_add_constants: Add Constants for every round constant of the 48
// rounds and random states, against the reference. Also checks the zero
// state with rc = 3F against the pattern written out: rows 0..3 of column 0
// hold 0,1,2,3 and column 1 holds 7 in every row.
module tb_led_add_constants;
  import led_pkg::*;
  import tb_led_ref_pkg::*;

  block_t din, dout;
  rc_t    rc_in;
  int checks = 0, failures = 0;

  led_add_constants dut (.din, .rc(rc_in), .dout);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0;
    rc_in = 6'h3F;
    #1;
    checks++;
    if (dout !== 64'h0700_1700_2700_3700) begin
      failures++;
      $display("pattern for rc=3F: %h", dout);
    end
    for (int r = 0; r < 48; r++) begin
      for (int n = 0; n < 8; n++) begin
        din = (n == 0) ? '0 : rand64();
        rc_in = tb_led_ref_pkg::rc(r);
        #1;
        checks++;
        if (dout !== add_const(din, r)) begin
          failures++;
          $display("round %0d: AC(%h) = %h, expected %h", r, din, dout, add_const(din, r));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
