# LED-128 iterative block cipher core

This RTL encrypts and decrypts 64-bit blocks with the LED lightweight block
cipher under a 128-bit key. LED is built for small devices such as RFID tags
and smart meters. The core evaluates one of the 48 rounds per clock cycle with a
single copy of the round logic, and feeds the result back through a
multiplexer into one state register. The encryption round does not use a
separate S-box and Galois-field multiplier. It uses **T-boxes**: each one is
a lookup that gives an S-box output already multiplied by a Mix Columns
coefficient. A whole round is then Add Constants, 64 T-box lookups and an XOR
tree.

With plaintext `0123456789ABCDEF` and key `0123456789ABCDEF0123456789ABCDEF`
the core gives ciphertext `3131C231205C3664`, and it decrypts that back.

## The state and how bits are numbered

The 64-bit block is a 4×4 array of 4-bit cells `m0 … m15`, filled row by row.
`m0` is the most significant nibble, so the block reads in hex in the order
`m0 m1 … m15`. Cell `(row r, column c)` is `m(4r+c)` and sits at bits
`[63-4(4r+c) -: 4]`. Each cell is an element of GF(2^4) with reduction
polynomial x^4 + x + 1.

The key is split into two halves:

- **K1** = `key[127:64]`, the first 16 hex digits.
- **K2** = `key[63:0]`.

## One round

Every round `i` (0…47) does the following, in this order:

1. **Key addition**, only at step boundaries. A step is four rounds. K1 is
   XORed in when `i mod 8 = 0` (rounds 0, 8, …, 40). K2 is XORed in when
   `i mod 8 = 4` (rounds 4, 12, …, 44). Other rounds add no key.
2. **Add Constants.** The row index 0, 1, 2, 3 is XORed into column 0. The
   constant `rc[5:3]` is XORed into column 1 of rows 0 and 2, and `rc[2:0]`
   into column 1 of rows 1 and 3. `rc` comes from a 6-bit LFSR. It starts
   at zero, shifts left and takes in `rc5 ^ rc4 ^ 1`. One step gives round 0
   its constant `01`, and the sequence goes 03, 07, 0F, 1F, 3E, … up to `04`
   for round 47. The row indices are used as they are, with no key-length
   bits mixed in. Without them the core would not reproduce the ciphertext
   above.
3. **Sub Cells + Shift Rows + Mix Columns, by T-boxes.** Mix Columns
   multiplies each column by

       A = | 4 1 2 2 |
           | 8 6 5 6 |      (the serial matrix
           | B E A 9 |       0 1 0 0 / 0 0 1 0 / 0 0 0 1 / 4 1 2 2
           | 2 2 F B |       raised to the 4th power)

   Shift Rows rotates row `r` left by `r` cells. It is only wiring, and it
   commutes with the cell-wise S-box, so it is folded into the choice of
   T-box inputs. Output cell `(r, c)` is

       out(r,c) = XOR over j = 0..3 of  T[A(r,j)][ in(j, (c+j) mod 4) ]
       T[a][x]  = a · S[x]      in GF(2^4)

   `S` is the PRESENT S-box, `C 5 6 B 9 0 A D 3 E F 8 4 7 1 2`. The T-box
   table has 16 × 16 entries. Row 1 is the S-box itself. Row 0 is zero, and
   column 5 is zero because S[5] = 0. `led_tbox` builds each entry from the
   S-box and a field multiply. Every coefficient is a constant, so synthesis
   reduces each T-box to a 4-input lookup per output bit.

After round 47 the encryption output is the state XOR K1 (final whitening).

## Decryption

Decryption uses the same state register, multiplexer, Add Constants unit,
round-constant LFSR and key schedule. It walks the rounds from 47 down to 0:

    load:     state = C ^ K1
    round i:  state = AddConstants( InvRound(state), rc(i) ) ^ roundkey(i)
    result:   state

`InvRound` does three things in order:

- Inverse Mix Columns, with matrix `A^-1 = C C D 4 / 3 8 4 5 / 7 6 2 E / D 9 9 D`.
- Inverse Shift Rows: row `r` rotated right by `r` cells.
- The inverse S-box.

These use plain constant GF(2^4) multipliers. The decryption round has no
T-box trick, because the inverse S-box comes after the multiply. The LFSR
steps backward: `rc_old = {~(rc[0]^rc[5]), rc[5:1]}` is the exact inverse of
the forward step. So the constants are generated in reverse, starting from
the round-47 value, with no table. The round counter counts down, which
makes the key schedule select the same halves in reverse order.

## Interface and timing (`led_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `start` | in | 1 | begin an operation; taken only when `busy` is low |
| `mode` | in | 1 | 0 = encrypt, 1 = decrypt; sampled with `start` |
| `data_in` | in | 64 | plaintext or ciphertext; sampled with `start` |
| `key` | in | 128 | key; sampled with `start` and held inside |
| `data_out` | out | 64 | result, valid while `done` is high |
| `busy` | out | 1 | rounds are being evaluated |
| `done` | out | 1 | result valid; stays high until the next start |

The clock edge that samples `start` is the load cycle: the block passes the
input multiplexer into the state register, and the key goes into the key
register. Each of the next 48 edges evaluates one round. `done` is high
from 48 cycles after the start cycle. A start while `busy` is ignored. A
start while `done` is high begins the next operation straight away, so a
new block can be accepted every 49 cycles. `data_out` is taken from the
state register without an output register, and stays valid until the next
start.

The parameter `ROUNDS` (default 48) sets the length of the run and the
constant decryption starts from (that of round `ROUNDS-1`). The key
schedule and the constants are those of LED-128, so only the default gives
LED-128.

## Modules

| file | role |
|---|---|
| `rtl/led_pkg.sv` | types (`block_t`, `key_t`, `rc_t`, `mode_t`, …), the matrices A and A^-1, GF(2^4) multiply, LFSR step functions |
| `rtl/led_top.sv` | top: wires control, LFSR, key schedule and datapath |
| `rtl/led_control.sv` | IDLE / RUN / DONE state machine and round counter (up for encryption, down for decryption) |
| `rtl/led_rc_lfsr.sv` | round-constant LFSR; holds the current round's constant, steps forward or backward |
| `rtl/led_key_schedule.sv` | selects K1, K2 or nothing for each round; gives K1 for whitening |
| `rtl/led_datapath.sv` | input multiplexer, 64-bit state and 128-bit key registers, round logic for both directions, output whitening |
| `rtl/led_add_constants.sv` | Add Constants layer |
| `rtl/led_tbox_round.sv` | 64 T-boxes with Shift Rows wiring and the XOR tree: one encryption round body |
| `rtl/led_tbox.sv` | one T-box, `coef · S[x]` |
| `rtl/led_sbox.sv`, `rtl/led_inv_sbox.sv` | S-box and its inverse |
| `rtl/led_inv_round.sv` | decryption round body |

After coarse synthesis the core has 208 flip-flop bits: 64 for the state, 128
for the key, and the rest for the round constant, round counter, FSM and mode.
All round logic is combinational between the state register and itself, so
the critical path is one full round: key XOR, constants, T-box and a 4-input
XOR, or in decryption the inverse round, constants and key XOR.

## Where this design makes its own choices

The cipher arithmetic, the constants, the key schedule, the T-box
construction and the one-round-per-cycle loop follow the published
description of this architecture. The following are choices of this design:

- **Handshake.** `start`/`busy`/`done`, ignoring a start while busy, and
  registering the key at start.
- **Reset.** Asynchronous and active low. It clears the state, the key,
  the LFSR and the FSM.
- **Decryption hardware.** The description of decryption only says that it
  uses inverse Mix Columns. The inverse datapath, the count-down of the
  rounds and the backward LFSR step are the simplest way to undo the
  encryption round.
- **T-box storage.** The original implementation kept its T-boxes in FPGA
  block RAMs. Here they are logic formed from the S-box and a constant
  multiply. The function is the same, but the FPGA resource use differs.
- **Key halves.** The original description numbers the key bits from both
  ends in different places. K1 is taken as the first 16 hex digits
  (`key[127:64]`). It is added in round 0, in every round with
  `i mod 8 = 0`, and at the end. The published test vector uses equal
  halves, so it cannot tell the two numberings apart.

The published device-utilisation and clock-rate figures were measured on a
Spartan-3 FPGA with the vendor's tools. They do not carry over to this RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=N failures=M` line and has a cycle watchdog. The
reference model, `tb/tb_led_ref_pkg.sv`, is written separately from the RTL:

- the S-box is a literal table;
- the field multiply is a bit-serial product;
- Mix Columns applies the serial matrix four times, and its inverse undoes
  the serial matrix four times;
- the round constants are stepped bit by bit.

| testbench | what it checks |
|---|---|
| `tb_led_sbox` | all 16 S-box entries, and that the S-box is a permutation |
| `tb_led_tbox` | all 256 T-box entries, plus T-box rows 0, 1, 2 and 4 written out |
| `tb_led_tbox_round` | about 320 states against the reference round, and column 0 against the Mix Columns equations |
| `tb_led_inv_round` | the inverse round directly, and that it undoes the forward round |
| `tb_led_add_constants` | all 48 constants with random states |
| `tb_led_key_schedule` | all 48 rounds with random keys |
| `tb_led_rc_lfsr` | the 48-entry constant table walked forward and backward; load priority over step |
| `tb_led_control` | exactly 48 run cycles, the round order in both directions, an ignored start, `done` holding |
| `tb_led_datapath` | the state after every round of whole encryptions and decryptions |
| `tb_led_top` | end-to-end test at the default size |

`tb_led_top` runs these cases:

- the published vector, in both directions;
- random encryptions and decryptions, as round trips;
- mode changes between operations;
- back-to-back starts;
- starts during a run, which must be ignored;
- the exact 48-cycle latency.

It counts how often each mechanism occurred, and fails if any never did. It
also checks that K1 and K2 are each added six times per operation.

To run a testbench with plain Verilator (5.x):

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/led_pkg.sv tb/tb_led_ref_pkg.sv tb/tb_led_top.sv --top tb_led_top
    ./obj_dir/Vtb_led_top

Replace `tb_led_top` with any other testbench name. Modules are found by file
name through `-Irtl`. Every testbench finishes in well under a second.

## Changing it

- **Sub Cells or the matrix.** Change `led_sbox` / `led_inv_sbox` and
  `MIX_A` / `MIX_A_INV` in `led_pkg`. The T-boxes follow automatically, and
  the reference model has its own copies to check against.
- **LED-64.** One 64-bit key added at every step, 32 rounds. That needs
  `led_key_schedule` to return the same half every step, and `ROUNDS = 32`.
- **Higher throughput.** Unroll the loop: instantiate several
  `led_add_constants` + `led_tbox_round` pairs in series between register
  updates, and step the LFSR that many times per cycle.
