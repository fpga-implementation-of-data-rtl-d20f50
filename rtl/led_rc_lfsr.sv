// led_rc_lfsr: the 6-bit round-constant LFSR of LED.
//
// The register shifts left and takes rc5 ^ rc4 ^ 1 as its new bit 0. Started
// from all zeros, one step gives the constant of round 0 (01), then 03, 07,
// 0F, 1F, 3E, ... up to 04 for round 47. The register always holds the
// constant of the round being evaluated:
//   load : rc <= constant of round 0 (encryption) or of round ROUNDS-1
//          (decryption), both fixed at elaboration;
//   step : rc <= forward step (encryption) or backward step (decryption),
//          the backward step being the exact inverse shift, so decryption
//          walks the same sequence from the end without a table.
// load has priority over step. Asynchronous active-low reset to zero.
module led_rc_lfsr
  import led_pkg::*;
#(
  parameter int unsigned ROUNDS = led_pkg::NUM_ROUNDS
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,
  input  logic  step,
  input  mode_t mode,
  output rc_t   rc
);

  localparam rc_t RC_END = rc_of_round(ROUNDS - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    rc <= '0;
    else if (load) rc <= (mode == MODE_ENC) ? RC_FIRST : RC_END;
    else if (step) rc <= (mode == MODE_ENC) ? rc_fwd(rc) : rc_bwd(rc);
  end

endmodule
