// tb_ripple_carry_adder: exhaustive check of the 8-bit ripple carry adder
// with both carry-in values, and a random check of a 48-bit instance.
module tb_ripple_carry_adder;
  int checks = 0, failures = 0;
  logic [7:0]  a, b, s;
  logic        ci, co;
  logic [47:0] wa, wb, ws;
  logic        wci, wco;

  ripple_carry_adder dut (.a(a), .b(b), .cin(ci), .sum(s), .cout(co));
  ripple_carry_adder #(.WIDTH(48)) dut_w (.a(wa), .b(wb), .cin(wci), .sum(ws), .cout(wco));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      for (int j = 0; j < 256; j++) begin
        {ci, a} = 9'(i);
        b = 8'(j);
        #1;
        checks++;
        if (int'({co, s}) != int'(a) + j + int'(ci)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d + %0d + %0d = %0d", a, j, ci, {co, s});
        end
      end
    end
    for (int i = 0; i < 2000; i++) begin
      logic [48:0] want;
      wa  = {$urandom, $urandom};
      wb  = {$urandom, $urandom};
      wci = 1'($urandom);
      want = 49'(wa) + 49'(wb) + 49'(wci);
      #1;
      checks++;
      if ({wco, ws} !== want) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
