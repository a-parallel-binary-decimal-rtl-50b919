// Exhaustive check of the BCD-8421 to BCD-5421 recoder over the ten valid
// digits: the output's 5-4-2-1 weighted value must equal the input digit
// and the code must be the standard one (5..9 use the weight-5 bit).
module tb_bcd8421_to_5421;
  logic [3:0] x, h;
  int checks = 0, failures = 0;
  bcd8421_to_5421 dut (.x(x), .h(h));
  initial begin
    for (int v = 0; v < 10; v++) begin
      x = 4'(v);
      #1;
      checks++;
      if (5 * h[3] + 4 * h[2] + 2 * h[1] + h[0] != v || h[3] != (v >= 5)) begin
        failures++;
        $display("FAIL x=%0d h=%b", v, h);
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
