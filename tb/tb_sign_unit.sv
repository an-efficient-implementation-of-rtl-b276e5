// tb_sign_unit: exhaustive check of the product sign: negative exactly when
// one operand is negative.
module tb_sign_unit;
  int checks = 0, failures = 0;
  logic a_s, b_s, s;

  sign_unit dut (.a_sign(a_s), .b_sign(b_s), .sign(s));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      logic exp_neg;
      {a_s, b_s} = 2'(i);
      exp_neg = (i == 1 || i == 2);
      #1;
      checks++;
      if (s !== exp_neg) begin
        failures++;
        $display("FAIL a=%0b b=%0b sign=%0b", a_s, b_s, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
