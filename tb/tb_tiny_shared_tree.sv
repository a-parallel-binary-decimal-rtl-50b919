// Checks the shared tiny tree in both modes.  Binary: with random column
// sums and carries within their widths, vs + vc must equal
// sum_j (s_j + c_j) * 16^j mod 2^128.  Decimal: with random BCD-4221 column
// totals, the BCD-4221 values of vs and vc must add up to
// sum_j total_j * 10^j mod 10^32.  In each mode the other mode's inputs are
// random too, so a wrong multiplexer setting shows.
module tb_tiny_shared_tree;
  import bdm_pkg::*;
  import tb_util_pkg::*;
  logic [COL_W-1:0] col_s [P_DIGITS];
  logic [COL_W-1:0] col_c [P_DIGITS];
  logic [11:0]      col_d [P_DIGITS];
  logic             bd;
  logic [127:0]     vs, vc;
  u128_t            p32;
  int checks = 0, failures = 0;

  tiny_shared_tree dut (.col_s(col_s), .col_c(col_c), .col_d(col_d), .bd(bd), .vs(vs), .vc(vc));

  task automatic run(logic mode, bit maxed);
    u128_t wantb = 0, wantd = 0, wj = 1;
    bd = mode;
    for (int j = 0; j < 32; j++) begin
      int unsigned w;
      w = col_width(j);
      col_s[j] = maxed ? COL_W'((1 << w) - 1) : COL_W'($urandom_range(0, (1 << w) - 1));
      col_c[j] = maxed ? COL_W'((1 << w) - 1) : COL_W'($urandom_range(0, (1 << w) - 1));
      col_d[j] = maxed ? 12'hFFF : 12'(rand_4221(3));
      wantb += (u128_t'(col_s[j]) + u128_t'(col_c[j])) << (4 * j);
      wantd = (wantd + val4221(u128_t'(col_d[j]), 3) * wj) % p32;
      wj = wj * 10;
    end
    #1;
    checks++;
    if (mode ? ((val4221(vs, 32) + val4221(vc, 32)) % p32 != wantd) : (vs + vc !== wantb)) begin
      failures++;
      $display("FAIL bd=%b vs=%h vc=%h", mode, vs, vc);
    end
  endtask

  initial begin
    p32 = 1;
    for (int k = 0; k < 32; k++) p32 = p32 * 10;
    run(0, 1);
    run(1, 1);
    for (int t = 0; t < 1000; t++) begin
      run(0, 0);
      run(1, 0);
    end
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
