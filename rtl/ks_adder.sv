// W-bit binary Kogge-Stone carry-propagate adder, s = (x + y) mod 2^W.
// Bit generate/propagate signals are combined by a parallel-prefix tree of
// ceil(log2 W) levels in which every node at level l merges with the node
// 2^l positions below; the carry into bit k is the group generate of bits
// k-1..0.  Used at two sizes: small ones add each column's sum and carry
// on the decimal path, and a 128-bit one is the final binary adder.
// Purely combinational.
module ks_adder #(
  parameter int unsigned W = 128
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] s
);
  localparam int unsigned L = (W > 1) ? $clog2(W) : 1;

  logic [W-1:0] g [L+1];
  logic [W-1:0] p [L+1];

  assign g[0] = x & y;
  assign p[0] = x ^ y;

  for (genvar l = 0; l < L; l++) begin : g_lvl
    for (genvar k = 0; k < W; k++) begin : g_bit
      if (k >= (1 << l)) begin : g_merge
        assign g[l+1][k] = g[l][k] | (p[l][k] & g[l][k - (1 << l)]);
        assign p[l+1][k] = p[l][k] & p[l][k - (1 << l)];
      end else begin : g_keep
        assign g[l+1][k] = g[l][k];
        assign p[l+1][k] = p[l][k];
      end
    end
  end

  if (W > 1) begin : g_sum
    assign s = p[0] ^ {g[L][W-2:0], 1'b0};
  end else begin : g_sum1
    assign s = p[0];
  end
endmodule
