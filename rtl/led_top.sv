// led_top: iterative LED-128 block cipher, encryption and decryption.
//
// One round of hardware is reused for all 48 rounds. A start with a 64-bit
// block, a 128-bit key and a mode (0 encrypt, 1 decrypt) loads the block
// through the input multiplexer into the state register; each of the next
// 48 cycles evaluates one round and feeds the result back; then done rises
// and data_out holds the ciphertext (or plaintext) until the next start.
// Encryption rounds use T-boxes (S-box merged with the Mix Columns
// multiplier); decryption rounds use an inverse round built from the inverse
// Mix Columns matrix and the inverse S-box.
//
// Blocks: led_control (FSM and round counter), led_rc_lfsr (round
// constants), led_key_schedule (which key half enters which round) and
// led_datapath (multiplexer, registers and round logic).
//
// Timing: start is taken when busy is low; done is high from 48 cycles after
// the start cycle. data_in and key need only be valid in the start cycle.
// Asynchronous active-low reset. Assertions check that a start during a run
// is ignored and that the result holds until the next start.
module led_top
  import led_pkg::*;
#(
  parameter int unsigned ROUNDS = led_pkg::NUM_ROUNDS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 mode,      // 0 = encrypt, 1 = decrypt
  input  logic [BLOCK_W-1:0]   data_in,
  input  logic [KEY_W-1:0]     key,
  output logic [BLOCK_W-1:0]   data_out,
  output logic                 busy,
  output logic                 done
);

  logic       load, run;
  round_idx_t round;
  mode_t      op_mode, in_mode;
  rc_t        rc;
  key_t       key_q;
  block_t     round_key, whiten_key;

  assign in_mode = mode_t'(mode);

  led_control #(.ROUNDS(ROUNDS)) u_ctrl (
    .clk, .rst_n, .start, .mode_in(in_mode),
    .load, .run, .round, .mode(op_mode), .busy, .done
  );

  led_rc_lfsr #(.ROUNDS(ROUNDS)) u_rc (
    .clk, .rst_n, .load, .step(run), .mode(load ? in_mode : op_mode), .rc
  );

  led_key_schedule u_ks (
    .key(key_q), .round, .round_key, .whiten_key
  );

  led_datapath u_dp (
    .clk, .rst_n, .load, .run, .load_mode(in_mode), .mode(op_mode),
    .data_in, .key_in(key), .rc, .round_key, .whiten_key,
    .key_q, .data_out
  );

  // A start during a run changes nothing: the stored key is kept.
  a_start_ignored: assert property (@(posedge clk) disable iff (!rst_n)
    busy && start |=> key_q == $past(key_q));
  // The result holds while nothing is started.
  a_result_held: assert property (@(posedge clk) disable iff (!rst_n)
    done && !start |=> done && $stable(data_out));

endmodule
