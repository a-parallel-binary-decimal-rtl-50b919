// BCD-4221 to BCD-5211 digit recoder, the first half of the decimal
// multiply-by-two.  The value v = 4x3+2x2+2x1+x0 (0..9) is given a BCD-5211
// code (weights 5,2,1,1); shifting a BCD-5211 vector left by one bit then
// yields 2v in BCD-4221.  The particular code chosen for each value (where
// BCD-5211 allows two) is this design's own.  Purely combinational.
module bcd4221_to_5211 (
  input  logic [3:0] x,   // BCD-4221 digit
  output logic [3:0] w    // BCD-5211 digit, same value
);
  logic [3:0] v;
  always_comb begin
    v = 4'(4 * x[3] + 2 * x[2] + 2 * x[1] + x[0]);
    unique case (v)
      4'd0:    w = 4'b0000;
      4'd1:    w = 4'b0001;
      4'd2:    w = 4'b0100;
      4'd3:    w = 4'b0101;
      4'd4:    w = 4'b0111;
      4'd5:    w = 4'b1000;
      4'd6:    w = 4'b1001;
      4'd7:    w = 4'b1100;
      4'd8:    w = 4'b1101;
      default: w = 4'b1111;   // 9
    endcase
  end
endmodule
