// Checks the decimal rearrangement and tiny tree: with random column
// totals given as three BCD-4221 digits (any code), the values of vs and
// vc must add up to sum_j total_j * 10^j modulo 10^32.
module tb_tiny_dec_tree;
  import bdm_pkg::*;
  import tb_util_pkg::*;
  logic [11:0]  col_d [P_DIGITS];
  logic [127:0] vs, vc;
  u128_t        p32;
  int checks = 0, failures = 0;

  tiny_dec_tree dut (.col_d(col_d), .vs(vs), .vc(vc));

  task automatic run(bit maxed);
    u128_t want = 0, wj = 1;
    for (int j = 0; j < 32; j++) begin
      col_d[j] = maxed ? 12'hFFF : 12'(rand_4221(3));
      want = (want + val4221(u128_t'(col_d[j]), 3) * wj) % p32;
      wj = wj * 10;
    end
    #1;
    checks++;
    if ((val4221(vs, 32) + val4221(vc, 32)) % p32 != want) begin
      failures++;
      $display("FAIL vs=%h vc=%h", vs, vc);
    end
  endtask

  initial begin
    p32 = 1;
    for (int k = 0; k < 32; k++) p32 = p32 * 10;
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
