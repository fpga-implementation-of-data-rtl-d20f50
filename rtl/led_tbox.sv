// led_tbox: one transformation box (T-box), the S-box merged with one
// Mix Columns coefficient.
//
// T[coef][x] = coef * S[x] in GF(2^4) modulo x^4 + x + 1, a 16 x 16 table of
// nibbles: row 1 is the S-box itself, row 0 is all zero, column 5 is all zero
// because S[5] = 0. One lookup replaces an S-box followed by a constant
// Galois-field multiplier, so a Mix Columns output cell is the XOR of four
// T-box outputs. Combinational. The table is formed here from the S-box and
// the field multiply rather than stored as literal numbers; when coef is a
// constant, as in led_tbox_round, synthesis reduces it to a 4-input lookup per
// output bit.
module led_tbox
  import led_pkg::*;
(
  input  cell_t coef,  // Mix Columns coefficient, the T-box row
  input  cell_t x,     // cell value before Sub Cells, the T-box column
  output cell_t y      // coef * S[x]
);

  cell_t s;

  led_sbox u_sbox (.din(x), .dout(s));

  assign y = gf_mul(coef, s);

endmodule
