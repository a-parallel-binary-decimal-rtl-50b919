// Shared constants and types of the combined binary/decimal multiplier.
// Operands are 16 four-bit digits (64 bits); the product has 32 digits (128
// bits).  Every partial product is a field of F_DIGITS digits, wide enough
// for the largest selected multiple (8A in binary, 10A in decimal, 67 bits
// or 17 digits).  The fields, the per-column bound and the sign-offset
// constant are this design's own framing of the scheme.
package bdm_pkg;
  localparam int unsigned N_DIGITS = 16;            // operand digits
  localparam int unsigned P_DIGITS = 2 * N_DIGITS;  // product digits (columns)
  localparam int unsigned F_DIGITS = N_DIGITS + 1;  // partial product field
  localparam int unsigned FW       = 4 * F_DIGITS;  // field width in bits
  localparam int unsigned COL_W    = 9;             // widest column total

  // All multiples of the multiplicand, each F_DIGITS digits wide.
  typedef struct packed {
    logic [FW-1:0] b1;    // binary  A
    logic [FW-1:0] b2;    // binary 2A
    logic [FW-1:0] b4;    // binary 4A
    logic [FW-1:0] b8;    // binary 8A
    logic [FW-1:0] d1;    // decimal  A (BCD-8421)
    logic [FW-1:0] d2;    // decimal 2A
    logic [FW-1:0] d5;    // decimal 5A
    logic [FW-1:0] d10;   // decimal 10A
    logic [FW-1:0] dn1;   // decimal -A as 9's complement
    logic [FW-1:0] dn2;   // decimal -2A as 9's complement
  } multiples_t;

  // Multiplexer controls of one multiplier digit.
  typedef struct packed {
    logic cond1;    // MUX1 picks A (binary or decimal)
    logic cond2b;   // MUX1 picks binary 2A
    logic cond2d;   // MUX1 picks decimal 2A
    logic inv1b;    // MUX1 output negated, binary
    logic inv1d;    // MUX1 output negated, decimal
    logic cond4b;   // MUX2 picks binary 4A
    logic cond8b;   // MUX2 picks binary 8A
    logic cond5d;   // MUX2 picks decimal 5A
    logic cond10d;  // MUX2 picks decimal 10A
    logic inv2b;    // MUX2 output negated, binary
  } pp_ctl_t;

  // Number of digit operands (4-bit) falling in product column j: every
  // partial product field of digit position i covers columns i..i+F_DIGITS-1.
  function automatic int unsigned col_digits(int unsigned j);
    int unsigned n = 0;
    for (int unsigned i = 0; i <= N_DIGITS; i++)
      if (j >= i && j < i + F_DIGITS) n++;          // MUX1, 17 rows
    for (int unsigned i = 0; i < N_DIGITS; i++)
      if (j >= i && j < i + F_DIGITS) n++;          // MUX2, 16 rows
    if (j >= F_DIGITS) n++;                         // sign-offset constant
    return n;
  endfunction

  // Number of single-bit operands in column j: the two sign (plus-one) bits
  // of the partial products starting there and the two "positive" flags of
  // the partial products whose field ended just below.
  function automatic int unsigned col_bits(int unsigned j);
    int unsigned n = 0;
    if (j <= N_DIGITS) n++;                         // inv1[j]
    if (j <  N_DIGITS) n++;                         // inv2[j]
    if (j >= F_DIGITS && j - F_DIGITS <= N_DIGITS) n++;  // ~inv1[j-17]
    if (j >= F_DIGITS && j - F_DIGITS <  N_DIGITS) n++;  // ~inv2[j-17]
    return n;
  endfunction

  // Width of a column's sum and carry: enough for the binary worst case
  // (every digit 15, every bit 1), which also covers decimal.
  function automatic int unsigned col_width(int unsigned j);
    return $clog2(15 * col_digits(j) + col_bits(j) + 1);
  endfunction
endpackage
