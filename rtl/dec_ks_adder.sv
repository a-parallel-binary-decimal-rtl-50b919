// Decimal Kogge-Stone carry-propagate adder (split scheme, decimal half).
// Operands are ND BCD-4221 digits; each digit is recoded to BCD-8421 and
// the digit pair is added in binary (0..18).  A digit generates a decimal
// carry when its sum is 10 or more and propagates one when it is exactly 9.
// These digit generate/propagate signals go through a Kogge-Stone prefix
// tree of ceil(log2 ND) levels; meanwhile every digit prepares both its sum
// and its sum plus one, modulo 10, and the carry from the tree selects one.
// The result is BCD-8421, modulo 10^ND.  Purely combinational.
module dec_ks_adder #(
  parameter int unsigned ND = 32
) (
  input  logic [4*ND-1:0] x,   // BCD-4221
  input  logic [4*ND-1:0] y,   // BCD-4221
  output logic [4*ND-1:0] s    // BCD-8421
);
  localparam int unsigned L = (ND > 1) ? $clog2(ND) : 1;

  logic [4*ND-1:0] x8, y8;
  logic [ND-1:0]   g [L+1];
  logic [ND-1:0]   p [L+1];
  logic [3:0]      s0 [ND];   // digit sum, no carry in
  logic [3:0]      s1 [ND];   // digit sum, carry in

  for (genvar k = 0; k < ND; k++) begin : g_dig
    logic [4:0] t;
    bcd4221_to_8421 u_rx (.x(x[4*k +: 4]), .h(x8[4*k +: 4]));
    bcd4221_to_8421 u_ry (.x(y[4*k +: 4]), .h(y8[4*k +: 4]));
    assign t       = 5'(x8[4*k +: 4]) + 5'(y8[4*k +: 4]);
    assign g[0][k] = (t >= 5'd10);
    assign p[0][k] = (t == 5'd9);
    assign s0[k]   = (t >= 5'd10) ? 4'(t - 5'd10) : t[3:0];
    assign s1[k]   = (t >= 5'd9)  ? 4'(t - 5'd9)  : 4'(t + 5'd1);
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
