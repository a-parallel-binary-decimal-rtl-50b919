// Rearrangement and tiny tree of the shared scheme: one 128-bit 3:2 adder
// serves both paths.  The binary path deals the column sums and carries
// into six vectors (column j to vector j mod 3 at bit 4j, as in
// tiny_bin_tree); the decimal path deals the BCD-4221 column totals into
// three vectors (as in tiny_dec_tree).  Three 128-bit multiplexers feed
// the shared adder with the decimal vectors or the first three binary
// ones.  Its carry is doubled in binary (one-bit shift) or in decimal
// (dec_x2_4221).  In decimal mode that adder's outputs are the result; in
// binary mode three more 3:2 adders reduce the remaining vectors.  Which
// adder is shared and where it sits in the binary tree is this design's
// own choice.  Purely combinational.
module tiny_shared_tree
  import bdm_pkg::*;
(
  input  logic [COL_W-1:0]      col_s [P_DIGITS],  // column sums (binary path)
  input  logic [COL_W-1:0]      col_c [P_DIGITS],  // column carries (binary path)
  input  logic [11:0]           col_d [P_DIGITS],  // BCD-4221 column totals
  input  logic                  bd,                // 0 binary, 1 decimal
  output logic [4*P_DIGITS-1:0] vs,
  output logic [4*P_DIGITS-1:0] vc
);
  localparam int unsigned PW = 4 * P_DIGITS;

  logic [PW-1:0] vb [6];
  logic [PW-1:0] vd [3];
  always_comb begin
    for (int r = 0; r < 6; r++) vb[r] = '0;
    for (int r = 0; r < 3; r++) vd[r] = '0;
    for (int j = 0; j < int'(P_DIGITS); j++) begin
      vb[2*(j%3)]   = vb[2*(j%3)]   | (PW'(col_s[j]) << (4*j));
      vb[2*(j%3)+1] = vb[2*(j%3)+1] | (PW'(col_c[j]) << (4*j));
      vd[j%3]       = vd[j%3]       | (PW'(col_d[j]) << (4*j));
    end
  end

  // shared 3:2 adder
  logic [PW-1:0] x, y, z, s_sh, maj, c_bin, c_dec, c_sh;
  assign x     = bd ? vd[0] : vb[0];
  assign y     = bd ? vd[1] : vb[1];
  assign z     = bd ? vd[2] : vb[2];
  assign s_sh  = x ^ y ^ z;
  assign maj   = (x & y) | (x & z) | (y & z);
  assign c_bin = maj << 1;
  dec_x2_4221 #(.ND(P_DIGITS)) u_x2 (.h(maj), .h2(c_dec));
  assign c_sh  = bd ? c_dec : c_bin;

  // rest of the binary tree
  logic [PW-1:0] s1b, c1b, s2, c2, s3, c3;
  csa3 #(.W(PW)) u_l1b (.x(vb[3]), .y(vb[4]), .z(vb[5]), .cin(1'b0), .s(s1b), .c(c1b));
  csa3 #(.W(PW)) u_l2  (.x(s_sh),  .y(c_sh),  .z(s1b),   .cin(1'b0), .s(s2),  .c(c2));
  csa3 #(.W(PW)) u_l3  (.x(s2),    .y(c2),    .z(c1b),   .cin(1'b0), .s(s3),  .c(c3));

  assign vs = bd ? s_sh : s3;
  assign vc = bd ? c_sh : c3;
endmodule
