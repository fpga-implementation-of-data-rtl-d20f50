// tb_led_sbox: exhaustive check of the S-box against the 16-entry table
// C 5 6 B 9 0 A D 3 E F 8 4 7 1 2, and that it is a permutation.
module tb_led_sbox;
  import led_pkg::*;

  localparam logic [63:0] TABLE = 64'hC56B_90AD_3EF8_4712;

  cell_t din, dout;
  int checks = 0, failures = 0;
  logic [15:0] seen = '0;

  led_sbox dut (.din, .dout);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++) begin
      din = cell_t'(x);
      #1;
      checks++;
      if (dout !== TABLE[63-4*x -: 4]) begin
        failures++;
        $display("S[%h] = %h, expected %h", din, dout, TABLE[63-4*x -: 4]);
      end
      seen[dout] = 1'b1;
    end
    checks++;
    if (seen != 16'hFFFF) begin
      failures++;
      $display("S-box is not a permutation");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
