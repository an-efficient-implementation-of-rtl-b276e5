// tb_bias_subtractor: exhaustive check of the bias subtractor: r must equal
// s - 127 modulo 512 and the borrow must be set exactly when s < 127.
module tb_bias_subtractor;
  int checks = 0, failures = 0;
  logic [8:0] s, r;
  logic borrow;

  bias_subtractor dut (.s(s), .r(r), .borrow(borrow));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      int d;
      s = 9'(i);
      d = i - 127;
      #1;
      checks++;
      if (r !== 9'(d) || borrow !== (d < 0)) begin
        failures++;
        if (failures < 10) $display("FAIL s=%0d r=%0d borrow=%0b", i, r, borrow);
      end
    end
    // the figure example: 261 - 127 = 134 = 9'b010000110
    s = 9'b100000101; #1;
    checks++;
    if (r !== 9'b010000110 || borrow) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
