// tb_exponent_adder: exhaustive check of the 8-bit exponent adder against
// integer addition, including the carry that forms the ninth bit.
module tb_exponent_adder;
  int checks = 0, failures = 0;
  logic [7:0] ea, eb;
  logic [8:0] sum;

  exponent_adder dut (.ea(ea), .eb(eb), .sum(sum));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        ea = 8'(i);
        eb = 8'(j);
        #1;
        checks++;
        if (int'(sum) != i + j) begin
          failures++;
          if (failures < 10) $display("FAIL %0d + %0d gave %0d", i, j, sum);
        end
      end
    end
    // the figure example: 132 + 129 = 261 = 9'b100000101
    ea = 8'b10000100; eb = 8'b10000001; #1;
    checks++;
    if (sum !== 9'b100000101) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
