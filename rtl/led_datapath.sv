// led_datapath: state register, input multiplexer and one round of LED-128
// logic, reused for every round.
//
// In the load cycle the multiplexer takes the input block into the 64-bit
// state register (for decryption already XORed with the whitening key K1) and
// the 128-bit key into the key register. In each run cycle one round is
// evaluated and written back through the same multiplexer:
//   encryption: state <= TBoxRound( AddConstants(state ^ round_key, rc) )
//   decryption: state <= AddConstants( InvRound(state), rc ) ^ round_key
// round_key is zero except at step boundaries (from led_key_schedule, which
// reads key_q). The output is state ^ K1 for encryption (final whitening) and
// the state itself for decryption; it is valid while the controller's done is
// high. Asynchronous active-low reset clears both registers.
module led_datapath
  import led_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,        // take data_in and key_in
  input  logic   run,         // evaluate one round
  input  mode_t  load_mode,   // mode given with the load
  input  mode_t  mode,        // mode of the operation under way
  input  block_t data_in,
  input  key_t   key_in,
  input  rc_t    rc,          // constant of the current round
  input  block_t round_key,   // key half to add in the current round, or zero
  input  block_t whiten_key,  // K1 of the stored key
  output key_t   key_q,       // stored key, to the key schedule
  output block_t data_out
);

  block_t state_q, state_d;
  block_t ac_in, ac_out, enc_out, inv_out, round_out;

  // Shared Add Constants: before the T-boxes when encrypting, after the
  // inverse round when decrypting.
  assign ac_in = (mode == MODE_ENC) ? (state_q ^ round_key) : inv_out;

  led_add_constants u_ac    (.din(ac_in),   .rc(rc), .dout(ac_out));
  led_tbox_round    u_round (.din(ac_out),  .dout(enc_out));
  led_inv_round     u_inv   (.din(state_q), .dout(inv_out));

  assign round_out = (mode == MODE_ENC) ? enc_out : (ac_out ^ round_key);

  // Input multiplexer.
  always_comb begin
    if (load)     state_d = (load_mode == MODE_DEC) ? (data_in ^ key_in[KEY_W-1 -: BLOCK_W])
                                                    : data_in;
    else if (run) state_d = round_out;
    else          state_d = state_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= '0;
      key_q   <= '0;
    end else begin
      state_q <= state_d;
      if (load) key_q <= key_in;
    end
  end

  assign data_out = (mode == MODE_ENC) ? (state_q ^ whiten_key) : state_q;

endmodule
