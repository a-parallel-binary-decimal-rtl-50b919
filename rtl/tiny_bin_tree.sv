// Rearrangement and tiny binary tree of the binary path (split scheme).
// Column j's sum and carry have weight 16^j and are up to 9 bits wide, so
// they span three digit positions.  Columns are therefore dealt round-robin
// into three sum vectors and three carry vectors (column j goes to vector
// j mod 3 at bit 4j), in which no two columns overlap; bits above 127 fall
// away (the product is taken modulo 2^128).  Four 128-bit 3:2 adders in
// three levels reduce the six vectors to a sum and a carry for the final
// adder.  Purely combinational.
module tiny_bin_tree
  import bdm_pkg::*;
(
  input  logic [COL_W-1:0] col_s [P_DIGITS],
  input  logic [COL_W-1:0] col_c [P_DIGITS],
  output logic [4*P_DIGITS-1:0] vs,
  output logic [4*P_DIGITS-1:0] vc
);
  localparam int unsigned PW = 4 * P_DIGITS;

  logic [PW-1:0] v [6];
  always_comb begin
    for (int r = 0; r < 6; r++) v[r] = '0;
    for (int j = 0; j < int'(P_DIGITS); j++) begin
      v[2*(j%3)]   = v[2*(j%3)]   | (PW'(col_s[j]) << (4*j));
      v[2*(j%3)+1] = v[2*(j%3)+1] | (PW'(col_c[j]) << (4*j));
    end
  end

  logic [PW-1:0] s1a, c1a, s1b, c1b, s2, c2, s3, c3;
  csa3 #(.W(PW)) u_l1a (.x(v[0]), .y(v[1]), .z(v[2]), .cin(1'b0), .s(s1a), .c(c1a));
  csa3 #(.W(PW)) u_l1b (.x(v[3]), .y(v[4]), .z(v[5]), .cin(1'b0), .s(s1b), .c(c1b));
  csa3 #(.W(PW)) u_l2  (.x(s1a),  .y(c1a),  .z(s1b),  .cin(1'b0), .s(s2),  .c(c2));
  csa3 #(.W(PW)) u_l3  (.x(s2),   .y(c2),   .z(c1b),  .cin(1'b0), .s(s3),  .c(c3));
  assign vs = s3;
  assign vc = c3;
endmodule
