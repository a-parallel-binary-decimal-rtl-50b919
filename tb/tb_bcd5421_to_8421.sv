// Exhaustive check of the BCD-5421 to BCD-8421 recoder over the BCD-5421
// codes that can occur (values 0..9 with h3 set only for 5..9): the
// BCD-8421 output must equal the 5-4-2-1 weighted value.
module tb_bcd5421_to_8421;
  logic [3:0] h, x;
  int checks = 0, failures = 0;
  bcd5421_to_8421 dut (.h(h), .x(x));
  initial begin
    for (int c = 0; c < 16; c++) begin
      int v;
      h = 4'(c);
      v = 5 * h[3] + 4 * h[2] + 2 * h[1] + h[0];
      // codes 0101..0111 and 1101..1111 never occur
      if ((c >= 5 && c <= 7) || c >= 13) continue;
      #1;
      checks++;
      if (int'(x) != v) begin
        failures++;
        $display("FAIL h=%b x=%0d want %0d", h, x, v);
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
