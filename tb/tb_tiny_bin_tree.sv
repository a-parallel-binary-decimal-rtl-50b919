// Checks the binary rearrangement and tiny tree: with random column sums
// and carries (each within its column's width), vs + vc must equal
// sum_j (s_j + c_j) * 16^j modulo 2^128, computed here directly.
module tb_tiny_bin_tree;
  import bdm_pkg::*;
  import tb_util_pkg::*;
  logic [COL_W-1:0] col_s [P_DIGITS];
  logic [COL_W-1:0] col_c [P_DIGITS];
  logic [127:0]     vs, vc;
  int checks = 0, failures = 0;

  tiny_bin_tree dut (.col_s(col_s), .col_c(col_c), .vs(vs), .vc(vc));

  task automatic run(bit maxed);
    u128_t want = 0;
    for (int j = 0; j < 32; j++) begin
      int unsigned w;
      w = col_width(j);
      col_s[j] = maxed ? COL_W'((1 << w) - 1) : COL_W'($urandom_range(0, (1 << w) - 1));
      col_c[j] = maxed ? COL_W'((1 << w) - 1) : COL_W'($urandom_range(0, (1 << w) - 1));
      want += (u128_t'(col_s[j]) + u128_t'(col_c[j])) << (4 * j);
    end
    #1;
    checks++;
    if (vs + vc !== want) begin
      failures++;
      $display("FAIL vs+vc=%h want %h", vs + vc, want);
    end
  endtask

  initial begin
    run(1);
    for (int t = 0; t < 1000; t++) run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
