// BCD-5421 to BCD-8421 digit recoder.  Used after the multiplicand has been
// shifted left by three bits: each nibble of the shifted vector is a valid
// BCD-5421 digit worth 5*A digit-wise, and this block brings it back to
// BCD-8421, giving 5A.  Codes 0101..0111 and 1101..1111 never occur after
// that shift and are don't-cares.  Two-level equations as given for the
// design; purely combinational, one digit.
module bcd5421_to_8421 (
  input  logic [3:0] h,   // BCD-5421 digit
  output logic [3:0] x    // BCD-8421 digit
);
  always_comb begin
    x[0] = h[0] ^ h[3];
    x[1] = (h[1] & ~h[3]) | (~h[0] & h[1]) | (h[0] & ~h[1] & h[3]);
    x[2] = (h[2] & ~h[3]) | (~h[1] & ~h[2] & h[3]) | (~h[0] & h[1] & h[3]);
    x[3] = (h[0] & h[1] & h[3]) | (h[2] & h[3]);
  end
endmodule
