// led_tbox_round: Sub Cells, Shift Rows and Mix Columns of one LED round,
// evaluated with T-boxes.
//
// Input is the state after Add Constants (and any key addition); output is
// the state at the end of the round. Shift Rows (row r rotated left by r
// cells) is pure wiring and commutes with Sub Cells, so it is folded into the
// choice of T-box inputs. Output cell (r,c) is
//   XOR over j of T[A(r,j)][ in(j, (c+j) mod 4) ]
// with A the LED Mix Columns matrix (rows 4 1 2 2 / 8 6 5 6 / B E A 9 /
// 2 2 F B). That is 64 T-boxes and 48 four-bit XORs, all combinational.
module led_tbox_round
  import led_pkg::*;
(
  input  block_t din,
  output block_t dout
);

  for (genvar r = 0; r < 4; r++) begin : g_row
    for (genvar c = 0; c < 4; c++) begin : g_col
      cell_t t [4];
      for (genvar j = 0; j < 4; j++) begin : g_term
        led_tbox u_tbox (
          .coef (mat_coef(MIX_A, r, j)),
          .x    (get_cell(din, 4*j + ((c + j) % 4))),
          .y    (t[j])
        );
      end
      assign dout[BLOCK_W-1-CELL_W*(4*r+c) -: CELL_W] = t[0] ^ t[1] ^ t[2] ^ t[3];
    end
  end

endmodule
