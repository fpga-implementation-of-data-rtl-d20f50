// led_key_schedule: round-key selection for LED-128.
//
// LED has no key expansion: the 128-bit key is split into K1 = key[127:64]
// and K2 = key[63:0], and one of them is added at the start of every fourth
// round (every step). Round i takes
//   K1 when i mod 8 = 0      (rounds 0, 8, 16, ..., 40),
//   K2 when i mod 8 = 4      (rounds 4, 12, 20, 28, 36, 44),
//   nothing otherwise.
// K1 is also the whitening key added after the last round of encryption (and
// before the first inverse round of decryption); it is given on whiten_key.
// Combinational; round is the index of the round being evaluated, and only
// its low three bits matter since the pattern repeats every eight rounds.
module led_key_schedule
  import led_pkg::*;
(
  input  key_t       key,
  input  round_idx_t round,
  output block_t     round_key,   // key half to add in this round, or zero
  output block_t     whiten_key   // K1
);

  block_t k1, k2;
  logic   key_add, use_k2;

  assign k1 = key[KEY_W-1 -: BLOCK_W];
  assign k2 = key[BLOCK_W-1:0];

  assign key_add    = (round[1:0] == 2'b00);
  assign use_k2     = round[2];
  assign round_key  = !key_add ? '0 : (use_k2 ? k2 : k1);
  assign whiten_key = k1;

endmodule
