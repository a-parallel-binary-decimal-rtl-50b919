// Exhaustive check of the shift-and-add-3 converter at its default 9-bit
// width (0..511) and at 5 bits: the three output digits must be the
// decimal digits of the input.
module tb_bin2bcd;
  logic [8:0]  bin;
  logic [4:0]  bin5;
  logic [11:0] bcd, bcd5;
  int checks = 0, failures = 0;

  bin2bcd           dut  (.bin(bin),  .bcd(bcd));
  bin2bcd #(.W(5))  dut5 (.bin(bin5), .bcd(bcd5));

  function automatic logic [11:0] ref_bcd(int v);
    return {4'(v / 100), 4'((v / 10) % 10), 4'(v % 10)};
  endfunction

  initial begin
    for (int v = 0; v < 512; v++) begin
      bin = 9'(v); bin5 = 5'(v);
      #1;
      checks++;
      if (bcd !== ref_bcd(v)) begin
        failures++;
        $display("FAIL %0d -> %h", v, bcd);
      end
      if (v < 32) begin
        checks++;
        if (bcd5 !== ref_bcd(v)) begin
          failures++;
          $display("FAIL W=5 %0d -> %h", v, bcd5);
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
