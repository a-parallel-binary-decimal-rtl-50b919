// Exhaustive check of the BCD-4221 to BCD-8421 recoder over all 16 codes:
// the output must be the BCD-8421 code of the 4-2-2-1 weighted value.
module tb_bcd4221_to_8421;
  logic [3:0] x, h;
  int checks = 0, failures = 0;
  bcd4221_to_8421 dut (.x(x), .h(h));
  initial begin
    for (int c = 0; c < 16; c++) begin
      x = 4'(c);
      #1;
      checks++;
      if (int'(h) != 4 * x[3] + 2 * x[2] + 2 * x[1] + x[0]) begin
        failures++;
        $display("FAIL x=%b h=%0d", x, h);
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
