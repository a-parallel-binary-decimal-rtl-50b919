// Decimal conversion of one column-tree output.
// The column's sum and carry are first added by a small Kogge-Stone adder,
// giving the binary count of the column (at most 299 for decimal
// operands).  A shift-and-add-3 converter turns it into three BCD-8421
// digits, and each digit is recoded to BCD-4221 so that the following
// decimal carry-save tree needs no correction.  Purely combinational;
// only the decimal path uses it.
module col_dec_convert #(
  parameter int unsigned W = 9
) (
  input  logic [W-1:0] s,       // column sum
  input  logic [W-1:0] c,       // column carry
  output logic [11:0]  d4221    // three BCD-4221 digits, least significant first
);
  logic [W-1:0] total;
  logic [11:0]  d8421;

  ks_adder #(.W(W)) u_add (.x(s), .y(c), .s(total));
  bin2bcd  #(.W(W)) u_b2d (.bin(total), .bcd(d8421));

  for (genvar k = 0; k < 3; k++) begin : g_dig
    bcd8421_to_4221 u_rec (.x(d8421[4*k +: 4]), .h(d4221[4*k +: 4]));
  end
endmodule
