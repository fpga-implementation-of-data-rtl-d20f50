// led_add_constants: the LED Add Constants layer.
//
// XORs the round-constant pattern into the state. Column 0 of row r gets the
// row index r (0,1,2,3); column 1 of rows 0 and 2 gets rc[5:3], column 1 of
// rows 1 and 3 gets rc[2:0]; columns 2 and 3 are unchanged. rc is the 6-bit
// round constant from led_rc_lfsr. The row indices are the plain 0..3 pattern
// (no key-length bits mixed in), which is what reproduces the published
// LED-128 result for this design. Combinational.
module led_add_constants
  import led_pkg::*;
(
  input  block_t din,
  input  rc_t    rc,
  output block_t dout
);

  block_t pattern;

  always_comb begin
    pattern = '0;
    for (int r = 0; r < 4; r++) begin
      pattern[BLOCK_W-1-CELL_W*(4*r)   -: CELL_W] = cell_t'(r);
      pattern[BLOCK_W-1-CELL_W*(4*r+1) -: CELL_W] = (r % 2 == 0) ? {1'b0, rc[5:3]}
                                                                 : {1'b0, rc[2:0]};
    end
  end

  assign dout = din ^ pattern;

endmodule
