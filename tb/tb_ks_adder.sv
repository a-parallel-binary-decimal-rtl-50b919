// Checks the Kogge-Stone adder at its default 128-bit width and at a 9-bit
// width (the column adders): random operands, all-ones plus one (a carry
// through every bit) and alternating patterns, against the + operator.
module tb_ks_adder;
  logic [127:0] x, y, s;
  logic [8:0]   xs, ys, ss;
  int checks = 0, failures = 0;

  ks_adder            dut  (.x(x),  .y(y),  .s(s));
  ks_adder #(.W(9))   dut9 (.x(xs), .y(ys), .s(ss));

  task automatic run(logic [127:0] xv, logic [127:0] yv);
    x = xv; y = yv; xs = xv[8:0]; ys = yv[8:0];
    #1;
    checks += 2;
    if (s !== xv + yv) begin
      failures++;
      $display("FAIL 128: %h + %h = %h", xv, yv, s);
    end
    if (ss !== 9'(xv[8:0] + yv[8:0])) begin
      failures++;
      $display("FAIL 9: %h + %h = %h", xv[8:0], yv[8:0], ss);
    end
  endtask

  initial begin
    run('1, 128'd1);
    run({64{2'b10}}, {64{2'b01}});
    run({64{2'b10}}, {64{2'b11}});
    run('0, '0);
    for (int t = 0; t < 2000; t++)
      run({$urandom(), $urandom(), $urandom(), $urandom()},
          {$urandom(), $urandom(), $urandom(), $urandom()});
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
