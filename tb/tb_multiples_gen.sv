// Checks every multiple produced by multiples_gen against integer
// arithmetic: binary A,2A,4A,8A exactly, decimal A,2A,5A,10A as BCD-8421 of
// the integer multiple, and -A,-2A as 10^17 - 1 - kA (nine's complement
// over the 17-digit field).  Random, all-nines and zero operands.
module tb_multiples_gen;
  import bdm_pkg::*;
  import tb_util_pkg::*;
  logic [63:0] a;
  multiples_t  m;
  int checks = 0, failures = 0;
  multiples_gen dut (.a(a), .m(m));

  task automatic chk(string what, u128_t got, u128_t want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s a=%h got %h want %h", what, a, got, want);
    end
  endtask

  task automatic run_bin(logic [63:0] av);
    u128_t x;
    a = av;
    #1;
    x = u128_t'(av);
    chk("b1", u128_t'(m.b1), x);
    chk("b2", u128_t'(m.b2), x * 2);
    chk("b4", u128_t'(m.b4), x * 4);
    chk("b8", u128_t'(m.b8), x * 8);
  endtask

  task automatic run_dec(logic [63:0] av);
    u128_t x, all9;
    a = av;
    #1;
    x    = bcd2int(u128_t'(av), 16);
    all9 = 128'd99999999999999999;   // 10^17 - 1
    chk("d1",  u128_t'(m.d1),  int2bcd(x, 17));
    chk("d2",  u128_t'(m.d2),  int2bcd(2 * x, 17));
    chk("d5",  u128_t'(m.d5),  int2bcd(5 * x, 17));
    chk("d10", u128_t'(m.d10), int2bcd(10 * x, 17));
    chk("dn1", u128_t'(m.dn1), int2bcd(all9 - x, 17));
    chk("dn2", u128_t'(m.dn2), int2bcd(all9 - 2 * x, 17));
  endtask

  initial begin
    run_bin('0);
    run_bin('1);
    run_dec('0);
    run_dec({16{4'd9}});
    for (int t = 0; t < 300; t++) begin
      run_bin(rand64());
      run_dec(64'(rand_bcd(16)));
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
