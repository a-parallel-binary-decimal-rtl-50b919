// Combined binary/decimal fixed-point multiplier, split scheme.
// One datapath multiplies either two 64-bit unsigned binary numbers or two
// 16-digit BCD-8421 numbers (bd = 0 / 1), giving a 128-bit binary or a
// 32-digit BCD product.  Stages:
//   1. multiples_gen : binary A,2A,4A,8A; decimal A,2A,5A,10A,-A,-2A.
//   2. pp_select     : two partial products per multiplier digit (binary
//                      radix-16 Booth, decimal signed-digit radix-5), 33
//                      products plus two rows of sign bits.
//   3. column_tree   : one binary carry-save tree per four-bit column,
//                      shared by both radices; no carries cross columns.
//   4a. binary path  : column sums/carries placed at weight 16^j, tiny
//                      binary CSA tree, 128-bit Kogge-Stone adder.
//   4b. decimal path : each column's sum and carry added, converted to BCD
//                      and recoded to BCD-4221, placed at weight 10^j, one
//                      decimal 3:2 adder, decimal Kogge-Stone adder.
//   5. bd selects the path's result.
// SHARED = 0 (default) builds this split back end.  SHARED = 1 builds the
// shared one instead: stage 4 becomes tiny_shared_tree (one 3:2 adder used
// by both paths, behind multiplexers) and bd_ks_adder (one Kogge-Stone
// adder whose prefix tree serves both radices), trading some delay for
// area.  Stages 1-3 and the per-column decimal conversion are common.
// Operand signs are not part of the datapath (magnitudes only).  Fully
// combinational: the product is valid one propagation delay after the
// inputs settle; there is no clock, register or handshake.
module bd_multiplier
  import bdm_pkg::*;
#(
  parameter int unsigned N      = N_DIGITS,  // operand digits; fixed by bdm_pkg
  parameter bit          SHARED = 1'b0       // 0 split back end, 1 shared
) (
  input  logic [4*N-1:0] a,    // multiplicand
  input  logic [4*N-1:0] b,    // multiplier
  input  logic           bd,   // B/D control: 0 binary, 1 decimal
  output logic [8*N-1:0] p     // product
);
  localparam int unsigned PW = 4 * P_DIGITS;

  multiples_t            m;
  logic [FW-1:0]         pp1 [N_DIGITS+1];
  logic [FW-1:0]         pp2 [N_DIGITS];
  logic [N_DIGITS:0]     inv1;
  logic [N_DIGITS-1:0]   inv2;
  logic [COL_W-1:0]      col_s [P_DIGITS];
  logic [COL_W-1:0]      col_c [P_DIGITS];
  logic [11:0]           col_d [P_DIGITS];

  multiples_gen u_mult (.a(a), .m(m));
  pp_select     u_sel  (.b(b), .bd(bd), .m(m), .pp1(pp1), .pp2(pp2),
                        .inv1(inv1), .inv2(inv2));
  column_tree   u_col  (.pp1(pp1), .pp2(pp2), .inv1(inv1), .inv2(inv2),
                        .bd(bd), .col_s(col_s), .col_c(col_c));

  // decimal column conversion (both schemes)
  for (genvar j = 0; j < P_DIGITS; j++) begin : g_cvt
    localparam int unsigned W = col_width(j);
    col_dec_convert #(.W(W)) u_cvt (
      .s(col_s[j][W-1:0]), .c(col_c[j][W-1:0]), .d4221(col_d[j]));
  end

  if (!SHARED) begin : g_split
    logic [PW-1:0] bvs, bvc, bin_p, dvs, dvc, dec_p;
    // binary path
    tiny_bin_tree u_btree (.col_s(col_s), .col_c(col_c), .vs(bvs), .vc(bvc));
    ks_adder #(.W(PW)) u_badd (.x(bvs), .y(bvc), .s(bin_p));
    // decimal path
    tiny_dec_tree u_dtree (.col_d(col_d), .vs(dvs), .vc(dvc));
    dec_ks_adder #(.ND(P_DIGITS)) u_dadd (.x(dvs), .y(dvc), .s(dec_p));
    assign p = bd ? dec_p : bin_p;
  end else begin : g_shared
    logic [PW-1:0] vs, vc;
    tiny_shared_tree u_stree (.col_s(col_s), .col_c(col_c), .col_d(col_d), .bd(bd),
                              .vs(vs), .vc(vc));
    bd_ks_adder #(.ND(P_DIGITS)) u_sadd (.x(vs), .y(vc), .bd(bd), .s(p));
  end

  if (N != N_DIGITS) begin : g_bad_n
    $error("bd_multiplier: N must equal bdm_pkg::N_DIGITS");
  end
endmodule
