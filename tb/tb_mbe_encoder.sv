// tb_mbe_encoder: compares the Booth encoder with the eight rows of the
// encoding truth table (b(i+1) b(i) b(i-1) -> X1_a X2_a Z Neg).
module tb_mbe_encoder;
  int checks = 0, failures = 0;
  logic bh, bm, bl, x1, x2, z, neg;

  // rows indexed by {b(i+1), b(i), b(i-1)}, value {X1_a, X2_a, Z, Neg}
  localparam logic [3:0] TABLE [8] = '{
    4'b1010,  // 000 digit  0
    4'b0110,  // 001 digit +1
    4'b0100,  // 010 digit +1
    4'b1000,  // 011 digit +2
    4'b1001,  // 100 digit -2
    4'b0101,  // 101 digit -1
    4'b0111,  // 110 digit -1
    4'b1010   // 111 digit  0
  };

  mbe_encoder dut (.b_hi(bh), .b_mid(bm), .b_lo(bl), .x1_a(x1), .x2_a(x2), .z(z), .neg(neg));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {bh, bm, bl} = 3'(i);
      #1;
      checks++;
      if ({x1, x2, z, neg} !== TABLE[i]) begin
        failures++;
        $display("FAIL triple=%03b got %04b want %04b", 3'(i), {x1, x2, z, neg}, TABLE[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
