// Carry-save adder tree of one digit column of the binary column tree.
// It adds ND four-bit digits and NB single bits, all of the same weight, as
// unsigned binary numbers, and leaves the result as a sum and a carry of W
// bits (s + c equals the exact total when W holds the worst case).  Digits
// go through levels of 3:2 adders (Wallace style) until two rows remain.
// The single bits are first slipped into the empty least significant bit of
// the first-level carries; bits for which there is no first-level adder
// enter the tree as one-bit rows.  Purely combinational.
module csa_column #(
  parameter int unsigned ND = 33,   // four-bit digit operands
  parameter int unsigned NB = 2,    // single-bit operands
  parameter int unsigned W  = 9     // width of s and c
) (
  input  logic [3:0]   dig [ND],
  input  logic [NB-1:0] bits,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  // bits absorbed by first-level carries, the rest are rows of their own
  localparam int unsigned INJ = (NB < ND / 3) ? NB : ND / 3;
  localparam int unsigned N0  = ND + NB - INJ;

  function automatic int unsigned rows_at(int unsigned lvl);
    int unsigned n = N0;
    for (int unsigned l = 0; l < lvl; l++) n = 2 * (n / 3) + n % 3;
    return n;
  endfunction

  function automatic int unsigned n_levels();
    int unsigned n = N0, l = 0;
    while (n > 2) begin
      n = 2 * (n / 3) + n % 3;
      l++;
    end
    return l;
  endfunction

  localparam int unsigned NLEV = n_levels();

  // level-0 rows: digits first, then the bits that are not absorbed
  logic [W-1:0] row0 [N0];
  for (genvar k = 0; k < N0; k++) begin : g_row0
    if (k < ND) begin : g_d
      assign row0[k] = W'(dig[k]);
    end else begin : g_b
      assign row0[k] = W'(bits[INJ + k - ND]);
    end
  end

  for (genvar l = 0; l < NLEV; l++) begin : g_lvl
    localparam int unsigned NIN  = rows_at(l);
    localparam int unsigned NOUT = rows_at(l + 1);
    logic [W-1:0] rin  [NIN];
    logic [W-1:0] rout [NOUT];
    if (l == 0) begin : g_first
      assign rin = row0;
    end else begin : g_next
      assign rin = g_lvl[l-1].rout;
    end
    for (genvar k = 0; k < NIN / 3; k++) begin : g_csa
      logic cin;
      if (l == 0 && k < INJ) begin : g_inj
        assign cin = bits[k];
      end else begin : g_noinj
        assign cin = 1'b0;
      end
      csa3 #(.W(W)) u_csa (
        .x(rin[3*k]), .y(rin[3*k+1]), .z(rin[3*k+2]), .cin(cin),
        .s(rout[2*k]), .c(rout[2*k+1]));
    end
    for (genvar r = 0; r < NIN % 3; r++) begin : g_pass
      assign rout[2*(NIN/3) + r] = rin[3*(NIN/3) + r];
    end
  end

  if (NLEV == 0) begin : g_flat
    assign s = row0[0];
    if (N0 > 1) begin : g_two
      assign c = row0[1];
    end else begin : g_one
      assign c = '0;
    end
  end else begin : g_tree
    assign s = g_lvl[NLEV-1].rout[0];
    assign c = g_lvl[NLEV-1].rout[1];
  end
endmodule
