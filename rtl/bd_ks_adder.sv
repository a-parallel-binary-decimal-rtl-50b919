// Shared binary/decimal Kogge-Stone carry-propagate adder (shared scheme).
// Both operands are ND four-bit digits: binary nibbles (bd = 0) or BCD-4221
// digits (bd = 1, recoded to BCD-8421 first).  Only the first level is
// mode-specific: each digit pair is added (0..30) and gives a digit
// generate and propagate, carry out at 16 / exactly 15 in binary, at 10 /
// exactly 9 in decimal.  The Kogge-Stone prefix tree over the digits is
// shared.  In parallel every digit prepares its sum and sum plus one,
// modulo 16 or modulo 10, and the carry from the tree selects one.  The
// result is binary modulo 2^(4ND) or BCD-8421 modulo 10^ND.  Purely
// combinational.
module bd_ks_adder #(
  parameter int unsigned ND = 32
) (
  input  logic [4*ND-1:0] x,
  input  logic [4*ND-1:0] y,
  input  logic            bd,   // 0 binary, 1 decimal (BCD-4221 operands)
  output logic [4*ND-1:0] s     // binary, or BCD-8421
);
  localparam int unsigned L = (ND > 1) ? $clog2(ND) : 1;

  logic [ND-1:0] g [L+1];
  logic [ND-1:0] p [L+1];
  logic [3:0]    s0 [ND];
  logic [3:0]    s1 [ND];

  for (genvar k = 0; k < ND; k++) begin : g_dig
    logic [3:0] x8, y8, xo, yo;
    logic [4:0] t;
    logic       gk, pk;
    bcd4221_to_8421 u_rx (.x(x[4*k +: 4]), .h(x8));
    bcd4221_to_8421 u_ry (.x(y[4*k +: 4]), .h(y8));
    assign xo = bd ? x8 : x[4*k +: 4];
    assign yo = bd ? y8 : y[4*k +: 4];
    assign t  = 5'(xo) + 5'(yo);
    always_comb begin
      if (bd) begin
        gk    = (t >= 5'd10);
        pk    = (t == 5'd9);
        s0[k]   = (t >= 5'd10) ? 4'(t - 5'd10) : t[3:0];
        s1[k]   = (t >= 5'd9)  ? 4'(t - 5'd9)  : 4'(t + 5'd1);
      end else begin
        gk    = t[4];
        pk    = (t == 5'd15);
        s0[k]   = t[3:0];
        s1[k]   = 4'(t + 5'd1);
      end
    end
    assign g[0][k] = gk;
    assign p[0][k] = pk;
  end

  for (genvar l = 0; l < L; l++) begin : g_lvl
    for (genvar k = 0; k < ND; k++) begin : g_node
      if (k >= (1 << l)) begin : g_merge
        assign g[l+1][k] = g[l][k] | (p[l][k] & g[l][k - (1 << l)]);
        assign p[l+1][k] = p[l][k] & p[l][k - (1 << l)];
      end else begin : g_keep
        assign g[l+1][k] = g[l][k];
        assign p[l+1][k] = p[l][k];
      end
    end
  end

  for (genvar k = 0; k < ND; k++) begin : g_sel
    if (k == 0) begin : g_lsd
      assign s[3:0] = s0[0];
    end else begin : g_up
      assign s[4*k +: 4] = g[L][k-1] ? s1[k] : s0[k];
    end
  end
endmodule
