// Nine's complement of one BCD-8421 digit, z = 9 - y, in two gate levels.
// The multiples stage applies it digit by digit to A and 2A to form the
// negative decimal multiples; the matching plus-one is the partial product's
// sign bit, added in the column tree.  Equations as given for the design;
// inputs 10..15 are don't-cares.  Purely combinational.
module bcd_nines_comp (
  input  logic [3:0] y,   // BCD-8421 digit
  output logic [3:0] z    // 9 - y in BCD-8421
);
  always_comb begin
    z[0] = ~y[0];
    z[1] = y[1];
    z[2] = y[1] ^ y[2];
    z[3] = ~y[1] & ~y[2] & ~y[3];
  end
endmodule
