// tb_led_key_schedule: for random keys and all 48 rounds, the key half
// added in each round (K1 at rounds 0, 8, ..., 40; K2 at rounds 4, 12, ...,
// 44; nothing elsewhere) and the whitening key K1.
module tb_led_key_schedule;
  import led_pkg::*;

  key_t       key;
  round_idx_t round;
  block_t     round_key, whiten_key;
  int checks = 0, failures = 0;

  led_key_schedule dut (.key, .round, .round_key, .whiten_key);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    block_t exp;
    for (int n = 0; n < 20; n++) begin
      key = {$urandom(), $urandom(), $urandom(), $urandom()};
      for (int r = 0; r < 48; r++) begin
        round = round_idx_t'(r);
        #1;
        if (r == 0 || r == 8 || r == 16 || r == 24 || r == 32 || r == 40) exp = key[127:64];
        else if (r == 4 || r == 12 || r == 20 || r == 28 || r == 36 || r == 44) exp = key[63:0];
        else exp = '0;
        checks++;
        if (round_key !== exp) begin
          failures++;
          $display("round %0d: key %h, expected %h", r, round_key, exp);
        end
        checks++;
        if (whiten_key !== key[127:64]) begin
          failures++;
          $display("whitening key %h", whiten_key);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
