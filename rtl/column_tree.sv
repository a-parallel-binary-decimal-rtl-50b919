// Binary column tree, shared by the binary and the decimal path.
// The 33 partial products are cut into four-bit digits and every product
// column j (weight 16^j in binary, 10^j in decimal) is summed as plain
// binary numbers by its own carry-save tree (csa_column).  No carry ever
// crosses into the next column, so the same tree serves both radices.
//
// Negative partial products: each product is a field of 17 digits
// (pp_select complements negative ones over the field).  To keep every
// column sum non-negative without sign-extending to column 31, the field
// of the product at digit i is treated as r^17 + value: a "positive" flag
// (one for a positive product, zero for a negative one, whose complemented
// field already carries the r^17) is added at column i+17, and one constant
// row, minus the sum of all those r^17 offsets modulo r^32, is added in
// columns 17..31.  Its digits depend only on the radix r (16 or 10), so bd
// picks one of two constant digit rows.  The sign (plus-one) bits of the
// products of digit i enter column i.  Products beyond column 31 are
// dropped: the result is exact modulo r^32, which holds the whole product.
//
// Outputs: a sum and a carry for every column, col_width(j) bits wide
// (6 to 9), zero-extended to COL_W.  Purely combinational.
module column_tree
  import bdm_pkg::*;
(
  input  logic [FW-1:0]       pp1 [N_DIGITS+1],
  input  logic [FW-1:0]       pp2 [N_DIGITS],
  input  logic [N_DIGITS:0]   inv1,
  input  logic [N_DIGITS-1:0] inv2,
  input  logic                bd,      // selects the constant row's radix
  output logic [COL_W-1:0]    col_s [P_DIGITS],
  output logic [COL_W-1:0]    col_c [P_DIGITS]
);
  // Digit j of -(sum of positive-flag weights) modulo r^P_DIGITS.
  function automatic logic [3:0] offset_digit(int unsigned j, int unsigned r);
    int borrow = 0, t = 0, n;
    logic [3:0] d = '0;
    for (int unsigned k = 0; k <= j; k++) begin
      n = 0;
      if (k >= F_DIGITS && k - F_DIGITS <= N_DIGITS) n++;
      if (k >= F_DIGITS && k - F_DIGITS <  N_DIGITS) n++;
      t = -n - borrow;
      borrow = 0;
      while (t < 0) begin
        t += int'(r);
        borrow++;
      end
      d = 4'(t);
    end
    return d;
  endfunction

  for (genvar j = 0; j < P_DIGITS; j++) begin : g_col
    localparam int unsigned ND = col_digits(j);
    localparam int unsigned NB = col_bits(j);
    localparam int unsigned W  = col_width(j);
    // first row index of MUX1 / MUX2 products reaching this column
    localparam int unsigned LO  = (j >= F_DIGITS - 1) ? j - (F_DIGITS - 1) : 0;
    localparam int unsigned HI1 = (j < N_DIGITS) ? j : N_DIGITS;
    localparam int unsigned HI2 = (j < N_DIGITS - 1) ? j : N_DIGITS - 1;
    localparam int unsigned N1  = (HI1 >= LO) ? HI1 - LO + 1 : 0;
    localparam int unsigned N2  = (HI2 >= LO) ? HI2 - LO + 1 : 0;

    logic [3:0]    dig [ND];
    logic [NB-1:0] bits;
    logic [W-1:0]  s, c;

    for (genvar k = 0; k < N1; k++) begin : g_d1
      assign dig[k] = pp1[LO+k][4*(j-LO-k) +: 4];
    end
    for (genvar k = 0; k < N2; k++) begin : g_d2
      assign dig[N1+k] = pp2[LO+k][4*(j-LO-k) +: 4];
    end
    if (j >= F_DIGITS) begin : g_const
      assign dig[N1+N2] = bd ? offset_digit(j, 10) : offset_digit(j, 16);
    end

    // single bits: sign bits of the products starting here, then the
    // positive flags of the products whose field ends below this column
    if (j < N_DIGITS) begin : g_b_both
      assign bits = {inv2[j], inv1[j]};
    end else if (j == N_DIGITS) begin : g_b_one
      assign bits = inv1[j];
    end else begin : g_b_flags
      // j >= F_DIGITS here, and j - F_DIGITS < N_DIGITS
      assign bits = {~inv2[j-F_DIGITS], ~inv1[j-F_DIGITS]};
    end

    csa_column #(.ND(ND), .NB(NB), .W(W)) u_col (
      .dig(dig), .bits(bits), .s(s), .c(c));

    assign col_s[j] = COL_W'(s);
    assign col_c[j] = COL_W'(c);
  end
endmodule
