// tb_led_tbox: exhaustive check of the T-box, all 16 coefficients x 16
// inputs, against an independent field multiply of the reference S-box, plus
// the rows of the published table for coefficients 1, 2 and 4 written out.
module tb_led_tbox;
  import led_pkg::*;
  import tb_led_ref_pkg::*;

  localparam logic [63:0] ROW1 = 64'hC56B_90AD_3EF8_4712;
  localparam logic [63:0] ROW2 = 64'hBAC5_1079_6FD3_8E24;
  localparam logic [63:0] ROW4 = 64'h57BA_20E1_CD96_3F48;

  cell_t coef, x, y;
  int checks = 0, failures = 0;

  led_tbox dut (.coef, .x, .y);

  task automatic expect_eq(nib_t got, nib_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: T[%h][%h] = %h, expected %h", what, coef, x, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++) begin
      for (int v = 0; v < 16; v++) begin
        coef = cell_t'(a);
        x    = cell_t'(v);
        #1;
        expect_eq(y, gmul(nib_t'(a), SBOX[v]), "model");
        if (a == 0) expect_eq(y, 4'h0, "row 0");
        if (a == 1) expect_eq(y, ROW1[63-4*v -: 4], "row 1");
        if (a == 2) expect_eq(y, ROW2[63-4*v -: 4], "row 2");
        if (a == 4) expect_eq(y, ROW4[63-4*v -: 4], "row 4");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
