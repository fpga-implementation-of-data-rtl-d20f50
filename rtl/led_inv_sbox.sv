// led_inv_sbox: inverse of the LED (PRESENT) S-box, used by decryption.
//
// Combinational 16-entry lookup: dout = S^-1[din]. The table is the inverse
// permutation of S = C 5 6 B 9 0 A D 3 E F 8 4 7 1 2, i.e.
// S^-1 = 5 E F 8 C 1 2 D B 4 6 3 0 7 9 A for x = 0..F.
module led_inv_sbox
  import led_pkg::*;
(
  input  cell_t din,
  output cell_t dout
);

  always_comb begin
    unique case (din)
      4'h0: dout = 4'h5;
      4'h1: dout = 4'hE;
      4'h2: dout = 4'hF;
      4'h3: dout = 4'h8;
      4'h4: dout = 4'hC;
      4'h5: dout = 4'h1;
      4'h6: dout = 4'h2;
      4'h7: dout = 4'hD;
      4'h8: dout = 4'hB;
      4'h9: dout = 4'h4;
      4'hA: dout = 4'h6;
      4'hB: dout = 4'h3;
      4'hC: dout = 4'h0;
      4'hD: dout = 4'h7;
      4'hE: dout = 4'h9;
      4'hF: dout = 4'hA;
    endcase
  end

endmodule
