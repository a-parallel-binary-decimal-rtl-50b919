// Checks the per-column decimal conversion: for every sum/carry pair whose
// total is a possible decimal column total (0..299) the three BCD-4221
// output digits must have the value of the total.  The sum and carry are
// split at random, including all of the total in one of them.
module tb_col_dec_convert;
  import tb_util_pkg::*;
  logic [8:0]  s, c;
  logic [11:0] d;
  int checks = 0, failures = 0;

  col_dec_convert dut (.s(s), .c(c), .d4221(d));

  initial begin
    for (int v = 0; v < 300; v++) begin
      for (int t = 0; t < 4; t++) begin
        int k;
        k = (t == 0) ? 0 : (t == 1) ? v : $urandom_range(0, v);
        s = 9'(k); c = 9'(v - k);
        #1;
        checks++;
        if (val4221(u128_t'(d), 3) != u128_t'(v)) begin
          failures++;
          $display("FAIL s=%0d c=%0d -> %h", s, c, d);
        end
      end
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
