// Checks the decimal Kogge-Stone adder: random BCD-4221 operands, operands
// whose digit sums are all 9 with a carry entering at the bottom (the
// longest propagate chain), all-nines plus nines, and zero; the BCD-8421
// result must be the decimal sum of the operands' values modulo 10^32.
module tb_dec_ks_adder;
  import tb_util_pkg::*;
  logic [127:0] x, y, s;
  u128_t        p32;
  int checks = 0, failures = 0;

  dec_ks_adder dut (.x(x), .y(y), .s(s));

  task automatic run(u128_t xv, u128_t yv);
    x = xv; y = yv;
    #1;
    checks++;
    if (s !== int2bcd((val4221(xv, 32) + val4221(yv, 32)) % p32, 32)) begin
      failures++;
      $display("FAIL x=%h y=%h s=%h", xv, yv, s);
    end
  endtask

  initial begin
    p32 = 1;
    for (int k = 0; k < 32; k++) p32 = p32 * 10;
    run('0, '0);
    run('1, '1);                                    // all 9 + all 9
    // 4221 codes: 1001 = 5, 0111 = 5 -> ten in digit 0, 9s above
    run({{31{4'b1001}}, 4'b1001}, {{31{4'b1000}}, 4'b0111});
    run({32{4'b1111}}, 128'h1);                     // 99..9 + 1
    for (int t = 0; t < 2000; t++) run(rand_4221(32), rand_4221(32));
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
