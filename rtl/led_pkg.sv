// led_pkg: types, sizes and arithmetic shared by the LED-128 cipher blocks.
//
// The cipher state is a 64-bit block seen as a 4x4 array of 4-bit cells.
// Cell m_i (i = 4*row + column) sits in bits [63-4i -: 4], so m_0 is the
// most significant nibble of the block, as when the block is written in hex.
// Cells are elements of GF(2^4) with reduction polynomial x^4 + x + 1.
//
// Sizes follow the LED-128 instance: 64-bit block, 128-bit key, 48 rounds
// grouped in steps of 4 rounds, the two 64-bit key halves added alternately
// at step boundaries. The key half K1 is key[127:64] (the first 16 hex digits
// of the key), K2 is key[63:0]. Mix Columns matrices are held as 16 nibbles,
// row-major, element (r,c) at [63-4*(4r+c) -: 4].
package led_pkg;

  localparam int unsigned BLOCK_W         = 64;
  localparam int unsigned KEY_W           = 128;
  localparam int unsigned CELL_W          = 4;
  localparam int unsigned NUM_ROUNDS      = 48;
  localparam int unsigned RC_W            = 6;
  localparam int unsigned ROUND_IDX_W     = 6;

  typedef logic [CELL_W-1:0]      cell_t;
  typedef logic [BLOCK_W-1:0]     block_t;
  typedef logic [KEY_W-1:0]       key_t;
  typedef logic [RC_W-1:0]        rc_t;
  typedef logic [ROUND_IDX_W-1:0] round_idx_t;

  // Direction of one operation.
  typedef enum logic {
    MODE_ENC = 1'b0,
    MODE_DEC = 1'b1
  } mode_t;

  // Mix Columns matrix A = (serial matrix)^4, and its inverse over GF(2^4).
  localparam logic [63:0] MIX_A     = 64'h4122_8656_BEA9_22FB;
  localparam logic [63:0] MIX_A_INV = 64'hCCD4_3845_762E_D99D;

  // Cell i of a block (i = 0 is the most significant nibble).
  function automatic cell_t get_cell(block_t b, int unsigned i);
    return b[BLOCK_W-1-CELL_W*i -: CELL_W];
  endfunction

  // Coefficient (r,c) of a 4x4 matrix stored as 16 nibbles.
  function automatic cell_t mat_coef(logic [63:0] m, int unsigned r, int unsigned c);
    return m[63-4*(4*r+c) -: 4];
  endfunction

  // GF(2^4) multiply modulo x^4 + x + 1: shift-and-add with reduction.
  function automatic cell_t gf_mul(cell_t a, cell_t b);
    cell_t acc = '0;
    cell_t x   = a;
    for (int i = 0; i < CELL_W; i++) begin
      if (b[i]) acc ^= x;
      x = {x[2:0], 1'b0} ^ (x[3] ? 4'h3 : 4'h0);
    end
    return acc;
  endfunction

  // One forward step of the round-constant LFSR: shift left, feed rc5^rc4^1.
  function automatic rc_t rc_fwd(rc_t rc);
    return {rc[4:0], ~(rc[5] ^ rc[4])};
  endfunction

  // One backward step: undoes rc_fwd.
  function automatic rc_t rc_bwd(rc_t rc);
    return {~(rc[0] ^ rc[5]), rc[5:1]};
  endfunction

  // Constant of round r: the LFSR, started at zero, stepped r+1 times.
  function automatic rc_t rc_of_round(int unsigned r);
    rc_t rc = '0;
    for (int unsigned i = 0; i <= r; i++) rc = rc_fwd(rc);
    return rc;
  endfunction

  localparam rc_t RC_FIRST = rc_of_round(0);

endpackage
