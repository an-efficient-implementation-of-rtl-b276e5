// tb_pp_bit_gen: exhaustive check of the one-bit partial product generator.
// The expected bit is worked out from the Booth digit d = -2*b(i+1) + b(i)
// + b(i-1): |d| = 1 selects a(j), |d| = 2 selects a(j-1), d = 0 gives 0,
// and a negative digit inverts the selected bit.
module tb_pp_bit_gen;
  int checks = 0, failures = 0;
  logic aj, ajm1, bh, bm, bl, p;

  pp_bit_gen dut (.a_j(aj), .a_jm1(ajm1), .b_hi(bh), .b_mid(bm), .b_lo(bl), .p(p));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      int d;
      logic want;
      {aj, ajm1, bh, bm, bl} = 5'(i);
      d = -2 * int'(bh) + int'(bm) + int'(bl);
      case (d)
        0:       want = 1'b0;
        1:       want = aj;
        -1:      want = ~aj;
        2:       want = ajm1;
        default: want = ~ajm1;   // -2
      endcase
      #1;
      checks++;
      if (p !== want) begin
        failures++;
        $display("FAIL inputs=%05b p=%0b want %0b", 5'(i), p, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
