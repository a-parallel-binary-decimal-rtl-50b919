// Exhaustive check of the BCD nine's complement over the ten digits.
module tb_bcd_nines_comp;
  logic [3:0] y, z;
  int checks = 0, failures = 0;
  bcd_nines_comp dut (.y(y), .z(z));
  initial begin
    for (int v = 0; v < 10; v++) begin
      y = 4'(v);
      #1;
      checks++;
      if (int'(z) != 9 - v) begin
        failures++;
        $display("FAIL y=%0d z=%0d", v, z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
