// tb_fp_mul_small: the multiplier built for a reduced format with an 8-bit
// exponent and a 4-bit fraction (hidden one kept), as in the hand-worked
// example 40 x -7.5:
//   A = 0 10000100 0100, B = 1 10000001 1110
//   significand product 10.01011000, exponent 134, normalized to
//   1.001011000 at exponent 135, truncated result 1 10000111 0010.
// After the example it runs random operands over the whole exponent range
// against an integer reference model of the same rules as the
// single-precision test, with one cycle of latency.
module tb_fp_mul_small;
  localparam int unsigned EW = 8;
  localparam int unsigned FW = 4;
  localparam int unsigned W  = 1 + EW + FW;

  int checks = 0, failures = 0;
  int n_shift = 0, n_ovf = 0, n_unf = 0;

  logic          clk;
  logic          reset;
  logic [W-1:0]  a, b, p;
  logic [2*FW-1:0] pf;
  logic          ovf, unf;

  fp_mul_top #(.EXP_W(EW), .FRAC_W(FW)) dut (
    .clk(clk), .reset(reset), .a(a), .b(b), .p(p),
    .p_frac_full(pf), .overflow(ovf), .underflow(unf)
  );

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] x, input logic [W-1:0] y);
    logic [W-1:0] want;
    logic [2*FW-1:0] wfull;
    logic wo, wu;
    int prod, e;
    logic s;
    s = x[W-1] ^ y[W-1];
    want = {s, {(W-1){1'b0}}};
    wfull = '0; wo = 0; wu = 0;
    prod = int'({1'b1, x[FW-1:0]}) * int'({1'b1, y[FW-1:0]});
    e = int'(x[W-2:FW]) + int'(y[W-2:FW]) - 127;
    if (x[W-2:FW] == 0 || y[W-2:FW] == 0) begin
      wu = (x[W-2:FW] == 0 && x[FW-1:0] != 0) || (y[W-2:FW] == 0 && y[FW-1:0] != 0);
    end else begin
      if (prod >= (1 << (2 * FW + 1))) begin prod = prod / 2; if (e >= 0) e++; n_shift++; end
      if (e <= 0) begin wu = 1; n_unf++; end
      else if (e >= 255) begin wo = 1; want = {s, 8'hff, 4'h0}; n_ovf++; end
      else begin
        want  = {s, 8'(e), 4'(prod >> FW)};
        wfull = (2 * FW)'(prod);
      end
    end
    @(negedge clk);
    a = x; b = y;
    @(posedge clk); #1;
    checks++;
    if (p !== want || pf !== wfull || ovf !== wo || unf !== wu) begin
      failures++;
      if (failures < 20)
        $display("FAIL %b * %b = %b ovf=%0b unf=%0b, want %b %0b %0b", x, y, p, ovf, unf, want, wo, wu);
    end
  endtask

  initial begin
    a = '0; b = '0;
    reset = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk); reset = 1'b0;

    apply(13'b0_10000100_0100, 13'b1_10000001_1110);
    checks++;
    if (p !== 13'b1_10000111_0010 || pf !== 8'b00101100) begin
      failures++;
      $display("FAIL worked example gave %b", p);
    end

    for (int i = 0; i < 20000; i++) apply(W'($urandom), W'($urandom));

    $display("shift=%0d overflow=%0d underflow=%0d", n_shift, n_ovf, n_unf);
    checks++;
    if (n_shift == 0 || n_ovf == 0 || n_unf == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
