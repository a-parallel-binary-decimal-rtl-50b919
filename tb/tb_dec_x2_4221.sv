// Checks the BCD-4221 multiply-by-two: every single-digit code in every
// position class, and random 32-digit vectors; the value of the output
// must be twice the input's value modulo 10^32, and every output code is
// a BCD-4221 digit by construction.
module tb_dec_x2_4221;
  import tb_util_pkg::*;
  logic [127:0] h, h2;
  u128_t        p32;
  int checks = 0, failures = 0;

  dec_x2_4221 dut (.h(h), .h2(h2));

  task automatic run(u128_t v);
    h = v;
    #1;
    checks++;
    if (val4221(h2, 32) != (2 * val4221(v, 32)) % p32) begin
      failures++;
      $display("FAIL h=%h h2=%h", v, h2);
    end
  endtask

  initial begin
    p32 = 1;
    for (int k = 0; k < 32; k++) p32 = p32 * 10;
    for (int c = 0; c < 16; c++) begin
      run(u128_t'(c));
      run(u128_t'(c) << 124);
      run({32{4'(c)}});
    end
    for (int t = 0; t < 2000; t++) run(rand_4221(32));
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
