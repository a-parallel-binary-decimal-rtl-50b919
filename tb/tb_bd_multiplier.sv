// End-to-end test of the binary/decimal multiplier at its full size (64-bit
// / 16-digit operands).  Products are compared with integer arithmetic:
// a*b for binary, and the BCD of the integer product for decimal.  Operand
// classes: zero, one, all ones / all nines, walking digits (each digit of
// one operand at its maximum, the rest 0 or 1, following the usual
// per-digit corner sweep), random and digit-heavy random values.  Each
// mechanism of the datapath is counted and must occur at least once:
// negative Booth partial products, the "-0" Booth selection, decimal
// nine's-complement selections, 10A selections, both constant rows, column
// totals needing three BCD digits, and a decimal carry rippling through
// the whole final adder.  The inputs are applied once per clock cycle; the
// product is combinational and sampled half a cycle later.
module tb_bd_multiplier;
  import tb_util_pkg::*;
  logic         clk = 1'b0;
  logic [63:0]  a, b;
  logic         bd;
  logic [127:0] p;
  int checks = 0, failures = 0, cycles = 0;
  int n_neg_booth = 0, n_neg_zero = 0, n_nines = 0, n_ten = 0;
  int n_bin = 0, n_dec = 0, n_col3 = 0, n_ripple = 0;

  bd_multiplier dut (.a(a), .b(b), .bd(bd), .p(p));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // mechanism counters, read from the operands and the datapath
  task automatic count_mechanisms();
    for (int i = 0; i < 16; i++) begin
      logic [4:0] w;
      w = (i == 0) ? {b[3:0], 1'b0} : b[4*i-1 +: 5];
      if (!bd && (dut.inv1[i] || dut.inv2[i])) n_neg_booth++;
      if (!bd && w == 5'b11111) n_neg_zero++;
      if (bd && dut.inv1[i]) n_nines++;
      if (bd && b[4*i +: 4] >= 4'd8) n_ten++;
    end
    for (int j = 0; j < 32; j++)
      if (bd && dut.col_d[j][11:8] != 4'd0) n_col3++;
    // a carry generated below and propagated across 8 or more digits
    for (int k = 8; k < 32; k++)
      if (bd && dut.g_split.u_dadd.p[3][k] && dut.g_split.u_dadd.g[5][k-8]) n_ripple++;
    if (bd) n_dec++; else n_bin++;
  endtask

  task automatic run(logic [63:0] av, logic [63:0] bv, logic mode);
    u128_t want;
    @(negedge clk);
    a = av; b = bv; bd = mode;
    @(posedge clk);
    if (mode) want = int2bcd(bcd2int(u128_t'(av), 16) * bcd2int(u128_t'(bv), 16), 32);
    else      want = u128_t'(av) * u128_t'(bv);
    checks++;
    if (p !== want) begin
      failures++;
      $display("FAIL bd=%b a=%h b=%h p=%h want %h", mode, av, bv, p, want);
    end
    count_mechanisms();
  endtask

  task automatic need(int n, string what);
    checks++;
    $display("mechanism %-28s seen %0d times", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    logic [63:0] nines;
    nines = {16{4'd9}};
    // corner operands
    run('0, '0, 0);       run('0, '0, 1);
    run(64'd1, '1, 0);    run(64'd1, nines, 1);
    run('1, '1, 0);       run(nines, nines, 1);
    // walking digits: one digit at its maximum, others 0 or 1
    for (int i = 0; i < 16; i++) begin
      logic [63:0] ob, od, zb, zd;
      ob = {16{4'h1}}; ob[4*i +: 4] = 4'hF;
      od = {16{4'h1}}; od[4*i +: 4] = 4'h9;
      zb = '0;         zb[4*i +: 4] = 4'hF;
      zd = '0;         zd[4*i +: 4] = 4'h9;
      run(ob, '1, 0);  run('1, ob, 0);  run(zb, ob, 0);
      run(od, nines, 1);  run(nines, od, 1);  run(zd, od, 1);
    end
    // decimal products with many carries in the final adder:
    // (10^16-1)*(10^16-1) = 99..9800..01, and 5*2 patterns
    run(nines, 64'd1, 1);
    run(64'h5555_5555_5555_5555, 64'h2, 1);
    for (int t = 0; t < 2000; t++) begin
      run(rand64(), rand64(), 0);
      run(64'(rand_bcd(16)), 64'(rand_bcd(16)), 1);
      run(64'(rand_bcd(16, 1)), 64'(rand_bcd(16, 1)), 1);
    end
    // 9 * 11..1 = 99..9: the final decimal adder sees long propagate runs
    run(64'h0000_0000_0000_0009, 64'h1111_1111_1111_1111, 1);
    need(n_neg_booth, "negative Booth product");
    need(n_neg_zero,  "Booth -0 selection");
    need(n_nines,     "decimal nine's complement");
    need(n_ten,       "decimal 10A selection");
    need(n_bin,       "binary mode (16^j offsets)");
    need(n_dec,       "decimal mode (10^j offsets)");
    need(n_col3,      "three-digit column total");
    need(n_ripple,    "decimal carry over 8+ digits");
    $display("cycles per product: 1 (combinational), %0d products in %0d cycles",
             n_bin + n_dec, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
