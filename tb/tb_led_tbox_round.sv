// tb_led_tbox_round: the T-box round (Sub Cells, Shift Rows, Mix Columns)
// against the reference round on fixed and random states. Also checks the
// first output column against the four column equations written out with
// the field multiply: M0 = 4*S0 ^ 1*S5 ^ 2*S10 ^ 2*S15, and so on, where Sk is
// the S-box of input cell k.
module tb_led_tbox_round;
  import led_pkg::*;
  import tb_led_ref_pkg::*;

  block_t din, dout;
  int checks = 0, failures = 0;

  led_tbox_round dut (.din, .dout);

  task automatic check(block_t v);
    cells_t s, o;
    nib_t m [4];
    din = v;
    #1;
    checks++;
    if (dout !== round_body(v)) begin
      failures++;
      $display("round(%h) = %h, expected %h", v, dout, round_body(v));
    end
    s = to_cells(v);
    for (int i = 0; i < 16; i++) s[i] = SBOX[s[i]];
    o = to_cells(dout);
    m[0] = gmul(4'h4, s[0]) ^ gmul(4'h1, s[5]) ^ gmul(4'h2, s[10]) ^ gmul(4'h2, s[15]);
    m[1] = gmul(4'h8, s[0]) ^ gmul(4'h6, s[5]) ^ gmul(4'h5, s[10]) ^ gmul(4'h6, s[15]);
    m[2] = gmul(4'hB, s[0]) ^ gmul(4'hE, s[5]) ^ gmul(4'hA, s[10]) ^ gmul(4'h9, s[15]);
    m[3] = gmul(4'h2, s[0]) ^ gmul(4'h2, s[5]) ^ gmul(4'hF, s[10]) ^ gmul(4'hB, s[15]);
    for (int r = 0; r < 4; r++) begin
      checks++;
      if (o[4*r] !== m[r]) begin
        failures++;
        $display("column 0 row %0d of round(%h) = %h, expected %h", r, v, o[4*r], m[r]);
      end
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
    for (int i = 0; i < 16; i++) check(64'h1 << (4*i));
    for (int i = 0; i < 300; i++) check(rand64());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
