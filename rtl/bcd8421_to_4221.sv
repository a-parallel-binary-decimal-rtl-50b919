// BCD-8421 to BCD-4221 digit recoder.  BCD-4221 (weights 4,2,2,1) gives a
// valid decimal digit for all 16 codes, so binary carry-save adders can add
// such digits without decimal correction.  Used on the decimal column totals
// before the tiny decimal tree.  Equations as given for the design;
// purely combinational, one digit.
module bcd8421_to_4221 (
  input  logic [3:0] x,   // BCD-8421 digit
  output logic [3:0] h    // BCD-4221 digit (weights 4,2,2,1)
);
  always_comb begin
    h[0] = x[0];
    h[1] = x[3];
    h[2] = x[1] | x[3];
    h[3] = x[2] | x[3];
  end
endmodule
