// Rearrangement and tiny decimal tree of the decimal path (split scheme).
// Every column total arrives as three BCD-4221 digits of weight 10^j,
// 10^(j+1), 10^(j+2).  Columns are dealt round-robin into three vectors
// (column j into vector j mod 3 at digit j), so no digit position is used
// twice in a vector; digits beyond 31 fall away (product modulo 10^32).
// One BCD-4221 decimal 3:2 adder reduces the three vectors: a bitwise
// full-adder row gives a sum digit and a carry digit per position, both
// valid BCD-4221 with a+b+c = s + 2h, and the carry vector is doubled by
// dec_x2_4221.  Purely combinational.
module tiny_dec_tree
  import bdm_pkg::*;
(
  input  logic [11:0]           col_d [P_DIGITS],  // 3 BCD-4221 digits per column
  output logic [4*P_DIGITS-1:0] vs,                // BCD-4221 sum
  output logic [4*P_DIGITS-1:0] vc                 // BCD-4221 doubled carry
);
  localparam int unsigned PW = 4 * P_DIGITS;

  logic [PW-1:0] v [3];
  always_comb begin
    for (int r = 0; r < 3; r++) v[r] = '0;
    for (int j = 0; j < int'(P_DIGITS); j++)
      v[j%3] = v[j%3] | (PW'(col_d[j]) << (4*j));
  end

  logic [PW-1:0] h;
  // full-adder row: sum digit and (undoubled) carry digit per position
  assign vs = v[0] ^ v[1] ^ v[2];
  assign h  = (v[0] & v[1]) | (v[0] & v[2]) | (v[1] & v[2]);
  dec_x2_4221 #(.ND(P_DIGITS)) u_x2 (.h(h), .h2(vc));
endmodule
