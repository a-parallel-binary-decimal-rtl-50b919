// Exhaustive check of the BCD-8421 to BCD-4221 recoder over the ten digits:
// the 4-2-2-1 weighted value of the output must equal the input.
module tb_bcd8421_to_4221;
  logic [3:0] x, h;
  int checks = 0, failures = 0;
  bcd8421_to_4221 dut (.x(x), .h(h));
  initial begin
    for (int v = 0; v < 10; v++) begin
      x = 4'(v);
      #1;
      checks++;
      if (4 * h[3] + 2 * h[2] + 2 * h[1] + h[0] != v) begin
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
