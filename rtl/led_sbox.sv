// led_sbox: the 4-bit S-box of the LED Sub Cells layer.
//
// LED reuses the PRESENT S-box, the only non-linear part of the cipher.
// Purely combinational: dout = S[din], a 16-entry lookup written as a case
// statement (a 4-input LUT per output bit on an FPGA). The table is the
// standard one: S = C 5 6 B 9 0 A D 3 E F 8 4 7 1 2 for x = 0..F.
module led_sbox
  import led_pkg::*;
(
  input  cell_t din,
  output cell_t dout
);

  always_comb begin
    unique case (din)
      4'h0: dout = 4'hC;
      4'h1: dout = 4'h5;
      4'h2: dout = 4'h6;
      4'h3: dout = 4'hB;
      4'h4: dout = 4'h9;
      4'h5: dout = 4'h0;
      4'h6: dout = 4'hA;
      4'h7: dout = 4'hD;
      4'h8: dout = 4'h3;
      4'h9: dout = 4'hE;
      4'hA: dout = 4'hF;
      4'hB: dout = 4'h8;
      4'hC: dout = 4'h4;
      4'hD: dout = 4'h7;
      4'hE: dout = 4'h1;
      4'hF: dout = 4'h2;
    endcase
  end

endmodule
