// tb_led_ref_pkg: reference model of LED-128 for the testbenches.
//
// Written independently of the RTL: the S-box is a literal table, the field
// multiply is a bit-serial product reduced by x^4 + x + 1, Mix Columns is the
// serial matrix (0 1 0 0 / 0 0 1 0 / 0 0 0 1 / 4 1 2 2) applied four times,
// and its inverse undoes the serial matrix four times. Round constants come
// from stepping a 6-bit LFSR bit by bit. Blocks are 16 cells, cell 0 the most
// significant nibble.
package tb_led_ref_pkg;

  typedef logic [3:0] nib_t;
  typedef nib_t cells_t [16];

  localparam nib_t SBOX [16] = '{4'hC, 4'h5, 4'h6, 4'hB, 4'h9, 4'h0, 4'hA, 4'hD,
                                 4'h3, 4'hE, 4'hF, 4'h8, 4'h4, 4'h7, 4'h1, 4'h2};

  function automatic nib_t inv_s(nib_t v);
    for (int i = 0; i < 16; i++) if (SBOX[i] == v) return nib_t'(i);
    return '0;
  endfunction

  function automatic nib_t gmul(nib_t a, nib_t b);
    logic [7:0] p = '0;
    for (int i = 0; i < 4; i++) if (b[i]) p ^= 8'(a) << i;
    for (int i = 7; i >= 4; i--) if (p[i]) p ^= 8'h13 << (i - 4);
    return p[3:0];
  endfunction

  function automatic nib_t ginv(nib_t a);
    for (int i = 1; i < 16; i++) if (gmul(a, nib_t'(i)) == 4'h1) return nib_t'(i);
    return '0;
  endfunction

  function automatic cells_t to_cells(logic [63:0] b);
    cells_t c;
    for (int i = 0; i < 16; i++) c[i] = b[63-4*i -: 4];
    return c;
  endfunction

  function automatic logic [63:0] from_cells(cells_t c);
    logic [63:0] b;
    for (int i = 0; i < 16; i++) b[63-4*i -: 4] = c[i];
    return b;
  endfunction

  // Round constant of round r (LFSR from zero, stepped r+1 times).
  function automatic logic [5:0] rc(int r);
    logic [5:0] v = '0;
    for (int i = 0; i <= r; i++) v = {v[4:0], v[5] ~^ v[4]};
    return v;
  endfunction

  function automatic logic [63:0] add_const(logic [63:0] b, int r);
    cells_t c = to_cells(b);
    logic [5:0] k = rc(r);
    for (int row = 0; row < 4; row++) begin
      c[4*row] ^= nib_t'(row);
      c[4*row+1] ^= (row == 0 || row == 2) ? {1'b0, k[5:3]} : {1'b0, k[2:0]};
    end
    return from_cells(c);
  endfunction

  function automatic cells_t mix_serial(cells_t c);
    cells_t o;
    for (int col = 0; col < 4; col++) begin
      o[col]    = c[4+col];
      o[4+col]  = c[8+col];
      o[8+col]  = c[12+col];
      o[12+col] = gmul(4'h4, c[col]) ^ c[4+col] ^ gmul(4'h2, c[8+col]) ^ gmul(4'h2, c[12+col]);
    end
    return o;
  endfunction

  function automatic cells_t unmix_serial(cells_t c);
    cells_t o;
    for (int col = 0; col < 4; col++) begin
      o[4+col]  = c[col];
      o[8+col]  = c[4+col];
      o[12+col] = c[8+col];
      o[col]    = gmul(ginv(4'h4), c[12+col] ^ o[4+col] ^ gmul(4'h2, o[8+col]) ^ gmul(4'h2, o[12+col]));
    end
    return o;
  endfunction

  // Sub Cells, Shift Rows, Mix Columns.
  function automatic logic [63:0] round_body(logic [63:0] b);
    cells_t c = to_cells(b), t;
    for (int i = 0; i < 16; i++) c[i] = SBOX[c[i]];
    for (int row = 0; row < 4; row++)
      for (int col = 0; col < 4; col++) t[4*row+col] = c[4*row + (col+row)%4];
    for (int n = 0; n < 4; n++) t = mix_serial(t);
    return from_cells(t);
  endfunction

  function automatic logic [63:0] inv_round_body(logic [63:0] b);
    cells_t c = to_cells(b), t;
    for (int n = 0; n < 4; n++) c = unmix_serial(c);
    for (int row = 0; row < 4; row++)
      for (int col = 0; col < 4; col++) t[4*row + (col+row)%4] = c[4*row+col];
    for (int i = 0; i < 16; i++) t[i] = inv_s(t[i]);
    return from_cells(t);
  endfunction

  // Key half added in round r (zero where none).
  function automatic logic [63:0] rkey(logic [127:0] k, int r);
    if (r % 4 != 0) return '0;
    return ((r / 4) % 2 == 0) ? k[127:64] : k[63:0];
  endfunction

  function automatic logic [63:0] encrypt(logic [63:0] p, logic [127:0] k, int rounds = 48);
    logic [63:0] s = p;
    for (int r = 0; r < rounds; r++) s = round_body(add_const(s ^ rkey(k, r), r));
    return s ^ k[127:64];
  endfunction

  function automatic logic [63:0] decrypt(logic [63:0] c, logic [127:0] k, int rounds = 48);
    logic [63:0] s = c ^ k[127:64];
    for (int r = rounds - 1; r >= 0; r--) s = add_const(inv_round_body(s), r) ^ rkey(k, r);
    return s;
  endfunction

  function automatic logic [63:0] rand64();
    return {$urandom(), $urandom()};
  endfunction

endpackage
