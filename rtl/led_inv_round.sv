// led_inv_round: the inverse of the keyless part of an LED round, used by
// decryption.
//
// Applies, in order, inverse Mix Columns (each column multiplied by A^-1 over
// GF(2^4), rows C C D 4 / 3 8 4 5 / 7 6 2 E / D 9 9 D), inverse Shift Rows
// (row r rotated right by r cells) and inverse Sub Cells (S^-1 on each cell).
// It undoes led_tbox_round exactly; the caller adds the round constant and key
// afterwards. Combinational. Built with plain constant Galois-field
// multipliers, since the inverse S-box follows the multiply here and the
// S-box/multiplier merge of the encryption T-box does not apply.
module led_inv_round
  import led_pkg::*;
(
  input  block_t din,
  output block_t dout
);

  cell_t mc [16];   // after inverse Mix Columns, cell 4r+c

  always_comb begin
    for (int r = 0; r < 4; r++) begin
      for (int c = 0; c < 4; c++) begin
        mc[4*r+c] = '0;
        for (int j = 0; j < 4; j++)
          mc[4*r+c] ^= gf_mul(mat_coef(MIX_A_INV, r, j), get_cell(din, 4*j + c));
      end
    end
  end

  // Inverse Shift Rows: output (r,c) takes (r, (c-r) mod 4), then S^-1.
  for (genvar r = 0; r < 4; r++) begin : g_row
    for (genvar c = 0; c < 4; c++) begin : g_col
      led_inv_sbox u_isbox (
        .din  (mc[4*r + ((c + 4 - r) % 4)]),
        .dout (dout[BLOCK_W-1-CELL_W*(4*r+c) -: CELL_W])
      );
    end
  end

endmodule
