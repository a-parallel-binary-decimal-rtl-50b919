// Checks the multiplexer controls for every input: for binary, all 32
// combinations of (b3 b2 b1 b0 bm1); for decimal, the ten digits.  The
// selected MUX1 and MUX2 multiples, with their signs, must add up to the
// digit's value (-8b3+4b2+2b1+b0+bm1 in binary, the digit in decimal); at
// most one condition per multiplexer may be active; MUX1 must stay in
// {0,+-A,+-2A}, MUX2 in {0,+-4A,+-8A} or {0,5A,10A}; and the decimal
// controls must be silent in binary mode and vice versa.
module tb_pp_recoder;
  import bdm_pkg::*;
  logic [3:0] b;
  logic       bm1, bd;
  pp_ctl_t    ctl;
  int checks = 0, failures = 0;
  pp_recoder dut (.b(b), .bm1(bm1), .bd(bd), .ctl(ctl));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s b=%b bm1=%b bd=%b ctl=%b", what, b, bm1, bd, ctl);
    end
  endtask

  initial begin
    for (int v = 0; v < 32; v++) begin
      int want, m1, m2;
      {b, bm1} = 5'(v);
      bd = 1'b0;
      #1;
      want = -8 * b[3] + 4 * b[2] + 2 * b[1] + b[0] + bm1;
      m1 = ctl.cond1 + 2 * ctl.cond2b;
      if (ctl.inv1b) m1 = -m1;
      m2 = 4 * ctl.cond4b + 8 * ctl.cond8b;
      if (ctl.inv2b) m2 = -m2;
      chk(m1 + m2 == want, "binary value");
      chk(ctl.cond1 + ctl.cond2b <= 1 && ctl.cond4b + ctl.cond8b <= 1, "binary one-hot");
      chk(!ctl.cond2d && !ctl.cond5d && !ctl.cond10d, "decimal controls off");
    end
    for (int v = 0; v < 10; v++) begin
      int m1, m2;
      b = 4'(v);
      bm1 = 1'($urandom_range(0, 1));
      bd = 1'b1;
      #1;
      m1 = ctl.cond1 + 2 * ctl.cond2d;
      if (ctl.inv1d) m1 = -m1;
      m2 = 5 * ctl.cond5d + 10 * ctl.cond10d;
      chk(m1 + m2 == v, "decimal value");
      chk(ctl.cond1 + ctl.cond2d <= 1 && ctl.cond5d + ctl.cond10d <= 1, "decimal one-hot");
      chk(!ctl.cond2b && !ctl.cond4b && !ctl.cond8b, "binary controls off");
      chk(!(ctl.inv1d && !(ctl.cond1 || ctl.cond2d)), "no negated zero in decimal");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
