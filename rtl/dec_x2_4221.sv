// Decimal multiply-by-two of a BCD-4221 vector of ND digits.
// Each digit is recoded to BCD-5211 (weights 5,2,1,1) and the whole vector
// is shifted left one bit: within a digit the weights become 4,2,2 and the
// bit of weight 5 moves into the next digit as a 1 of ten times the weight.
// The result is 2h in BCD-4221, modulo 10^ND.  Purely combinational, no
// carry propagation.
module dec_x2_4221 #(
  parameter int unsigned ND = 32
) (
  input  logic [4*ND-1:0] h,
  output logic [4*ND-1:0] h2
);
  logic [4*ND-1:0] w;
  for (genvar k = 0; k < ND; k++) begin : g_dig
    bcd4221_to_5211 u_rec (.x(h[4*k +: 4]), .w(w[4*k +: 4]));
  end
  assign h2 = w << 1;
endmodule
