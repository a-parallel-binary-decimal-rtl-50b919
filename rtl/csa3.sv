// W-bit 3:2 carry-save adder: a row of full adders.  x + y + z = s + c,
// where c is the majority vector already shifted left one bit; cin fills
// the vacated least significant bit of c (used to absorb a sign bit for
// free).  The carry out of the top bit is dropped, so callers size W to
// hold the full sum.  Purely combinational, one full-adder delay.
module csa3 #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  logic [W-1:0] maj;
  assign s   = x ^ y ^ z;
  assign maj = (x & y) | (x & z) | (y & z);
  if (W > 1) begin : g_wide
    assign c = {maj[W-2:0], cin};
  end else begin : g_one
    assign c = cin;
  end
endmodule
