// Checks the partial products selected for every multiplier digit.  The
// multiples are computed here with integer arithmetic.  For digit i, with
// r = 16 (binary) or 10 (decimal) and F = 17 field digits, each partial
// product stands for field + inv - inv*r^F; the two of a digit must add up
// to A times the digit's value (the radix-16 Booth digit in binary, the
// BCD digit in decimal), and the digit values must rebuild B.  Random,
// all-ones/all-nines, Booth-edge and zero operands in both modes.
module tb_pp_select;
  import bdm_pkg::*;
  import tb_util_pkg::*;
  typedef logic signed [159:0] s160_t;

  logic [63:0]         a, b;
  logic                bd;
  multiples_t          m;
  logic [FW-1:0]       pp1 [N_DIGITS+1];
  logic [FW-1:0]       pp2 [N_DIGITS];
  logic [N_DIGITS:0]   inv1;
  logic [N_DIGITS-1:0] inv2;
  int checks = 0, failures = 0;

  pp_select dut (.b(b), .bd(bd), .m(m), .pp1(pp1), .pp2(pp2), .inv1(inv1), .inv2(inv2));

  function automatic s160_t fval(logic [FW-1:0] f, bit dec);
    return dec ? s160_t'(bcd2int(u128_t'(f), F_DIGITS)) : s160_t'(f);
  endfunction

  task automatic run(logic [63:0] av, logic [63:0] bv, logic mode);
    s160_t x, r, rf, bsum, rp, got, want;
    u128_t all9;
    a = av; b = bv; bd = mode;
    all9 = 128'd99999999999999999;
    if (mode) begin
      x = s160_t'(bcd2int(u128_t'(av), 16));
      r = 10;
      m.d1  = FW'(int2bcd(u128_t'(x), F_DIGITS));
      m.d2  = FW'(int2bcd(u128_t'(2 * x), F_DIGITS));
      m.d5  = FW'(int2bcd(u128_t'(5 * x), F_DIGITS));
      m.d10 = FW'(int2bcd(u128_t'(10 * x), F_DIGITS));
      m.dn1 = FW'(int2bcd(all9 - u128_t'(x), F_DIGITS));
      m.dn2 = FW'(int2bcd(all9 - u128_t'(2 * x), F_DIGITS));
      m.b1 = '0; m.b2 = '0; m.b4 = '0; m.b8 = '0;
    end else begin
      x = s160_t'(av);
      r = 16;
      m.b1 = FW'(x); m.b2 = FW'(2 * x); m.b4 = FW'(4 * x); m.b8 = FW'(8 * x);
      m.d1 = '0; m.d2 = '0; m.d5 = '0; m.d10 = '0; m.dn1 = '0; m.dn2 = '0;
    end
    #1;
    rf = 1;
    for (int k = 0; k < int'(F_DIGITS); k++) rf = rf * r;
    bsum = 0;
    rp = 1;
    for (int i = 0; i <= int'(N_DIGITS); i++) begin
      int d;
      got = fval(pp1[i], mode) + s160_t'(inv1[i]) - (inv1[i] ? rf : 0);
      if (i < int'(N_DIGITS))
        got += fval(pp2[i], mode) + s160_t'(inv2[i]) - (inv2[i] ? rf : 0);
      if (mode) begin
        d = (i < 16) ? int'(bv[4*i +: 4]) : 0;
      end else begin
        logic [4:0] w;
        w = (i == 0) ? {bv[3:0], 1'b0} : (i < 16) ? bv[4*i-1 +: 5] : {4'b0, bv[63]};
        d = -8 * w[4] + 4 * w[3] + 2 * w[2] + w[1] + w[0];
      end
      want = x * d;
      checks++;
      if (got != want) begin
        failures++;
        $display("FAIL bd=%b a=%h b=%h digit %0d: got %0d want %0d", mode, av, bv, i, got, want);
      end
      bsum += s160_t'(d) * rp;
      rp = rp * r;
    end
    checks++;
    if (bsum != (mode ? s160_t'(bcd2int(u128_t'(bv), 16)) : s160_t'(bv))) begin
      failures++;
      $display("FAIL digits do not rebuild b=%h", bv);
    end
  endtask

  initial begin
    run('1, '1, 0);
    run(64'h8888_8888_8888_8888, 64'hF0F0_7878_1111_EEEE, 0);
    run('0, '1, 0);
    run({16{4'd9}}, {16{4'd9}}, 1);
    run({16{4'd9}}, 64'h0123_4567_8998_7654, 1);
    for (int t = 0; t < 300; t++) begin
      run(rand64(), rand64(), 0);
      run(64'(rand_bcd(16)), 64'(rand_bcd(16)), 1);
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
