// tb_fp_mul_top: end-to-end test of the single-precision multiplier at its
// default parameters.
//
// Operands are applied on the falling clock edge; the registered result is
// compared one rising edge later, which also checks the one-cycle latency.
// The expected result comes from a reference model in integer arithmetic:
// 24x24 product of the significands, E1 + E2 - 127, a one-place shift when
// the product reaches 2.0, then the range rules (zero/denormal operand ->
// +-0, negative or zero exponent -> +-0 with underflow, exponent >= 255 ->
// +-infinity with overflow). The fraction is truncated. Each result with
// normal operands is also checked in real arithmetic: a normal result must
// be the exact product truncated to 24 significant bits, an overflow must
// lie at or above 2^128 and an underflow below 2^-126.
//
// Stimulus: the worked example 40 x -7.5, reset behaviour, directed edge
// cases and random operands with exponents spread over the whole range.
// Every mechanism is counted and must occur at least once: normalizing
// shift, no shift, overflow, underflow from a negative exponent, underflow
// from a zero exponent, a zero exponent rescued by the shift, zero and
// denormal operands, negative results.
module tb_fp_mul_top;
  import fp_mul_pkg::*;

  int checks = 0, failures = 0;

  typedef enum int { M_SHIFT, M_NOSHIFT, M_OVF, M_UNF_NEG, M_UNF_ZERO,
                     M_RESCUED, M_ZERO_OP, M_DENORM_OP, M_NEG, M_COUNT } mech_e;
  int mech [M_COUNT];

  logic        clk;
  logic        reset;
  fp32_t       a, b, p;
  logic [45:0] p_frac_full;
  logic        overflow, underflow;

  fp_mul_top dut (
    .clk(clk), .reset(reset), .a(a), .b(b), .p(p),
    .p_frac_full(p_frac_full), .overflow(overflow), .underflow(underflow)
  );

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    fp32_t       p;
    logic [45:0] full;
    logic        ovf;
    logic        unf;
  } ref_t;

  function automatic ref_t model(input fp32_t x, input fp32_t y, output int m_seen [M_COUNT]);
    ref_t r;
    longint unsigned prod;
    int e;
    logic s;
    bit shift;
    foreach (m_seen[i]) m_seen[i] = 0;
    s = x.sign ^ y.sign;
    r.p = '{sign: s, exp: '0, frac: '0};
    r.full = '0; r.ovf = 0; r.unf = 0;
    prod  = longint'({1'b1, x.frac}) * longint'({1'b1, y.frac});
    shift = prod[47];
    e     = int'(x.exp) + int'(y.exp) - 127;
    if (s) m_seen[M_NEG] = 1;
    if (x.exp == 0 || y.exp == 0) begin
      if ((x.exp == 0 && x.frac != 0) || (y.exp == 0 && y.frac != 0)) begin
        r.unf = 1; m_seen[M_DENORM_OP] = 1;
      end else begin
        m_seen[M_ZERO_OP] = 1;
      end
      return r;
    end
    if (shift) begin prod = prod >> 1; m_seen[M_SHIFT] = 1; end
    else m_seen[M_NOSHIFT] = 1;
    if (e < 0) begin r.unf = 1; m_seen[M_UNF_NEG] = 1; return r; end
    if (e == 0 && shift) m_seen[M_RESCUED] = 1;
    if (shift) e = e + 1;
    if (e == 0) begin r.unf = 1; m_seen[M_UNF_ZERO] = 1; return r; end
    if (e >= 255) begin r.ovf = 1; r.p.exp = '1; m_seen[M_OVF] = 1; return r; end
    r.p.exp  = 8'(e);
    r.p.frac = prod[45:23];
    r.full   = prod[45:0];
    return r;
  endfunction

  function automatic real pow2(input int n);
    real r = 1.0;
    for (int i = 0; i < n; i++) r = r * 2.0;
    for (int i = 0; i > n; i--) r = r / 2.0;
    return r;
  endfunction

  // value of a normal single-precision word as a real (exact in double)
  function automatic real to_real(input fp32_t v);
    real m;
    m = 1.0 + real'(v.frac) / 8388608.0;
    if (v.sign) m = -m;
    return m * pow2(int'(v.exp) - 127);
  endfunction

  // second, independent check in real arithmetic: a normal result must be
  // the exact product truncated to 24 significant bits; an overflow needs
  // |x*y| >= 2^128 and a range underflow |x*y| < 2^-126
  int real_checks = 0;
  task automatic real_check(input fp32_t x, input fp32_t y);
    real ex, pr, ulp;
    if (x.exp == 0 || y.exp == 0) return;
    ex = to_real(x) * to_real(y);
    if (ex < 0.0) ex = -ex;
    checks++;
    real_checks++;
    if (overflow) begin
      if (ex < pow2(128)) failures++;
    end else if (underflow) begin
      if (ex >= pow2(-126)) failures++;
    end else begin
      pr  = to_real(p);
      if (pr < 0.0) pr = -pr;
      ulp = pow2(int'(p.exp) - 127 - 23);
      if (!(pr <= ex && ex - pr < ulp) || (p.sign != (x.sign ^ y.sign))) begin
        failures++;
        if (failures < 20) $display("FAIL real check %h * %h = %h", x, y, p);
      end
    end
  endtask

  task automatic apply(input fp32_t x, input fp32_t y);
    ref_t want;
    int   seen [M_COUNT];
    @(negedge clk);
    a = x; b = y;
    want = model(x, y, seen);
    @(posedge clk);
    #1;
    checks++;
    foreach (seen[i]) mech[i] += seen[i];
    if (p !== want.p || p_frac_full !== want.full ||
        overflow !== want.ovf || underflow !== want.unf) begin
      failures++;
      if (failures < 20)
        $display("FAIL %h * %h: p=%h ovf=%0b unf=%0b want p=%h ovf=%0b unf=%0b",
                 x, y, p, overflow, underflow, want.p, want.ovf, want.unf);
    end
    real_check(x, y);
  endtask

  function automatic fp32_t rnd(input int mode);
    fp32_t v;
    v = fp32_t'($urandom);
    case (mode)
      0: ;                                              // anything
      1: v.exp = 8'(64 + $urandom % 128);               // mid range
      2: v.exp = ($urandom % 2 == 1) ? 8'(1 + $urandom % 20) : 8'(234 + $urandom % 21);
      default: begin v.exp = 8'(1 + $urandom % 254); end
    endcase
    return v;
  endfunction

  initial begin
    fp32_t x, y;
    a = '0; b = '0;
    reset = 1'b1;
    @(negedge clk);
    a = 32'h4220_0000; b = 32'hC0F0_0000;
    @(posedge clk); #1;
    checks++;
    if (p !== '0 || overflow || underflow) failures++;   // held in reset
    @(negedge clk);
    reset = 1'b0;

    // 40 x -7.5 = -300: 1 10000111 00101100000000000000000
    apply(32'h4220_0000, 32'hC0F0_0000);
    checks++;
    if (p !== 32'hC396_0000) begin
      failures++;
      $display("FAIL worked example gave %h", p);
    end

    // directed edges
    apply(32'h3F80_0000, 32'h3F80_0000);                 // 1 * 1
    apply(32'h3FFF_FFFF, 32'h3FFF_FFFF);                 // largest significands
    apply(32'h0000_0000, 32'h4220_0000);                 // +0 operand
    apply(32'hC220_0000, 32'h8000_0000);                 // -0 operand
    apply(32'h0000_0001, 32'h3F80_0000);                 // denormal operand
    apply(32'h3F80_0000, 32'h807F_FFFF);                 // denormal operand
    apply(32'h7F00_0000, 32'h7F00_0000);                 // overflow
    apply(32'h7F7F_FFFF, 32'h3F80_0000);                 // largest finite, no overflow
    apply(32'h7F7F_FFFF, 32'h4000_0000);                 // overflow after shift
    apply(32'h0080_0000, 32'h0080_0000);                 // underflow, negative exponent
    apply(32'h0080_0000, 32'h3F00_0000);                 // E_int = 0, no shift: underflow
    apply(32'h0080_0000, 32'h3FC0_0000);                 // E = 1, normal
    apply({1'b0, 8'd1, 23'h7FFFFF}, {1'b0, 8'd126, 23'h7FFFFF}); // E_int = 0 rescued by shift
    apply({1'b1, 8'd1, 23'h400000}, {1'b0, 8'd126, 23'h600000}); // rescued, negative
    apply({1'b0, 8'd200, 23'h0}, {1'b0, 8'd182, 23'h0});         // E = 255 exactly: overflow

    for (int i = 0; i < 40000; i++) begin
      x = rnd(i % 4);
      y = rnd((i / 4) % 4);
      apply(x, y);
    end

    $display("real-arithmetic checks: %0d", real_checks);
    $display("mechanisms: shift=%0d noshift=%0d ovf=%0d unf_neg=%0d unf_zero=%0d rescued=%0d zero_op=%0d denorm_op=%0d neg=%0d",
             mech[M_SHIFT], mech[M_NOSHIFT], mech[M_OVF], mech[M_UNF_NEG], mech[M_UNF_ZERO],
             mech[M_RESCUED], mech[M_ZERO_OP], mech[M_DENORM_OP], mech[M_NEG]);
    for (int i = 0; i < M_COUNT; i++) begin
      checks++;
      if (mech[i] == 0) begin
        failures++;
        $display("FAIL mechanism %0d never happened", i);
      end
    end

    // reset clears a registered result
    @(negedge clk); reset = 1'b1;
    @(posedge clk); #1;
    checks++;
    if (p !== '0) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
