// Checks the shared binary/decimal Kogge-Stone adder in both modes: binary
// results against the + operator (random, all ones plus one, alternating
// patterns), decimal results against the decimal sum of the BCD-4221
// operand values modulo 10^32 (random, all nines, a carry through all
// digits).
module tb_bd_ks_adder;
  import tb_util_pkg::*;
  logic [127:0] x, y, s;
  logic         bd;
  u128_t        p32;
  int checks = 0, failures = 0;

  bd_ks_adder dut (.x(x), .y(y), .bd(bd), .s(s));

  task automatic run(u128_t xv, u128_t yv, logic mode);
    u128_t want;
    x = xv; y = yv; bd = mode;
    #1;
    want = mode ? int2bcd((val4221(xv, 32) + val4221(yv, 32)) % p32, 32) : xv + yv;
    checks++;
    if (s !== want) begin
      failures++;
      $display("FAIL bd=%b x=%h y=%h s=%h want %h", mode, xv, yv, s, want);
    end
  endtask

  initial begin
    p32 = 1;
    for (int k = 0; k < 32; k++) p32 = p32 * 10;
    run('1, 128'd1, 0);
    run({64{2'b10}}, {64{2'b01}}, 0);
    run({64{2'b10}}, {64{2'b11}}, 0);
    run('1, '1, 1);
    run({32{4'b1111}}, 128'h1, 1);
    run({{31{4'b1001}}, 4'b1001}, {{31{4'b1000}}, 4'b0111}, 1);
    for (int t = 0; t < 2000; t++) begin
      run({$urandom(), $urandom(), $urandom(), $urandom()},
          {$urandom(), $urandom(), $urandom(), $urandom()}, 0);
      run(rand_4221(32), rand_4221(32), 1);
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
