// BCD-8421 to BCD-5421 digit recoder.  A decimal digit x (weights 8,4,2,1)
// is re-expressed with weights 5,4,2,1.  Shifting a BCD-5421 vector left by
// one bit doubles it and lands directly in BCD-8421, which is how the
// multiples stage forms 2A.  The two-level equations are the ones given for
// the design; inputs 10..15 are not valid digits and give don't-care codes.
// Purely combinational, one digit.
module bcd8421_to_5421 (
  input  logic [3:0] x,   // BCD-8421 digit
  output logic [3:0] h    // BCD-5421 digit (h[3] has weight 5)
);
  always_comb begin
    h[0] = (x[0] & ~x[2] & ~x[3]) | (~x[0] & x[1] & x[2]) | (~x[0] & x[3]);
    h[1] = (x[0] & x[1]) | (x[1] & ~x[2]) | (x[3] & ~x[0]);
    h[2] = (~x[0] & ~x[1] & x[2]) | (x[0] & x[3]);
    h[3] = (x[0] & x[2]) | (x[1] & x[2]) | x[3];
  end
endmodule
