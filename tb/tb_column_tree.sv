// Checks the binary column tree with random partial products.  Column j's
// sum plus carry must equal the plain count of everything placed in it:
// the digits of the partial products covering column j, the sign bits of
// digit j, the positive flags (one minus sign) of the products of digit
// j-17, and, from column 17 up, the constant digit, which this testbench
// derives itself as the digits of -(2 * sum_{i=0..14} r^(17+i)) mod r^32.
// Sum and carry must each fit the column's width; both radices are used,
// and a test with every input at its maximum hits the worst-case widths.
module tb_column_tree;
  import bdm_pkg::*;
  logic [FW-1:0]       pp1 [N_DIGITS+1];
  logic [FW-1:0]       pp2 [N_DIGITS];
  logic [N_DIGITS:0]   inv1;
  logic [N_DIGITS-1:0] inv2;
  logic                bd;
  logic [COL_W-1:0]    col_s [P_DIGITS];
  logic [COL_W-1:0]    col_c [P_DIGITS];
  int checks = 0, failures = 0;

  column_tree dut (.pp1(pp1), .pp2(pp2), .inv1(inv1), .inv2(inv2), .bd(bd),
                   .col_s(col_s), .col_c(col_c));

  function automatic int const_digit(int j, int r);
    // r^32 - 2*(r^17 + ... + r^31): columns 0..16 are 0, column 17 is r-2,
    // columns 18..31 are r-3
    if (j < 17) return 0;
    return (j == 17) ? r - 2 : r - 3;
  endfunction

  task automatic run(bit maxed);
    int r;
    for (int i = 0; i <= 16; i++)
      for (int k = 0; k < 17; k++)
        pp1[i][4*k +: 4] = maxed ? 4'hF : 4'($urandom_range(0, bd ? 9 : 15));
    for (int i = 0; i < 16; i++)
      for (int k = 0; k < 17; k++)
        pp2[i][4*k +: 4] = maxed ? 4'hF : 4'($urandom_range(0, bd ? 9 : 15));
    inv1 = maxed ? '1 : 17'($urandom());
    inv2 = maxed ? '0 : 16'($urandom());
    #1;
    r = bd ? 10 : 16;
    for (int j = 0; j < 32; j++) begin
      int want, w;
      want = 0;
      for (int i = 0; i <= 16; i++) if (j >= i && j - i < 17) want += pp1[i][4*(j-i) +: 4];
      for (int i = 0; i < 16; i++)  if (j >= i && j - i < 17) want += pp2[i][4*(j-i) +: 4];
      if (j <= 16) want += inv1[j];
      if (j < 16)  want += inv2[j];
      if (j >= 17) want += (1 - inv1[j-17]) + (1 - inv2[j-17]) + const_digit(j, r);
      w = $clog2(15 * col_digits(j) + col_bits(j) + 1);
      checks++;
      if (int'(col_s[j]) + int'(col_c[j]) != want || (col_s[j] >> w) != 0 || (col_c[j] >> w) != 0) begin
        failures++;
        $display("FAIL bd=%b column %0d: s=%0d c=%0d want total %0d", bd, j, col_s[j], col_c[j], want);
      end
    end
  endtask

  initial begin
    bd = 0; run(1);
    bd = 1; run(1);
    for (int t = 0; t < 200; t++) begin
      bd = 0; run(0);
      bd = 1; run(0);
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
