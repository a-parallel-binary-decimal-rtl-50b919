// BCD-4221 to BCD-8421 digit recoder.  Every one of the 16 BCD-4221 codes
// is a digit 0..9; this block gives its standard BCD-8421 code.  The decimal
// carry-propagate adder uses it on its BCD-4221 operands.  Equations as given
// for the design; purely combinational, one digit.
module bcd4221_to_8421 (
  input  logic [3:0] x,   // BCD-4221 digit (weights 4,2,2,1)
  output logic [3:0] h    // BCD-8421 digit
);
  always_comb begin
    h[0] = x[0];
    h[1] = (~x[1] & x[2]) | (x[1] & ~x[2]);
    h[2] = (~x[1] & x[3]) | (~x[2] & x[3]) | (x[1] & x[2] & ~x[3]);
    h[3] = x[1] & x[2] & x[3];
  end
endmodule
