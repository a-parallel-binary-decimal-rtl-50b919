// Binary to BCD-8421 converter by the shift-and-add-3 method.
// The binary input is shifted, most significant bit first, into a row of
// BCD digits; before every shift each digit that holds 5 or more gets 3
// added, so that the shift (a doubling) carries correctly into the next
// decimal digit.  After W shifts the digits hold the decimal value.  Each
// "if >= 5 add 3" step is a small add3 cell; the steps are unrolled here
// into a combinational array of such cells.  The output has three digits,
// enough for any column total of the multiplier (at most 299 in decimal).
module bin2bcd #(
  parameter int unsigned W = 9
) (
  input  logic [W-1:0] bin,
  output logic [11:0]  bcd    // three BCD-8421 digits
);
  always_comb begin
    logic [11:0] acc;
    acc = '0;
    for (int i = W - 1; i >= 0; i--) begin
      for (int d = 0; d < 3; d++)
        if (acc[4*d +: 4] >= 4'd5) acc[4*d +: 4] = acc[4*d +: 4] + 4'd3;
      acc = {acc[10:0], bin[i]};
    end
    bcd = acc;
  end
endmodule
