// tb_exception_unit: drives the overflow/underflow unit with each case of
// its rules (zero operand, denormalized operand, negative intermediate
// exponent, zero exponent, exponent 255 and above, normal results at the
// range ends) and checks result word and flags. Each rule must fire.
module tb_exception_unit;
  int checks = 0, failures = 0;
  int hits [6];

  logic        sign, borrow, az, bz, anz, bnz;
  logic [9:0]  ne;
  logic [47:0] ns;
  logic [31:0] res;
  logic [45:0] ff;
  logic        ovf, unf;

  exception_unit dut (
    .sign(sign), .borrow(borrow), .norm_exp(ne), .norm_sig(ns),
    .a_exp_zero(az), .b_exp_zero(bz), .a_frac_nz(anz), .b_frac_nz(bnz),
    .result(res), .frac_full(ff), .overflow(ovf), .underflow(unf)
  );

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // rule: 0 zero operand, 1 denormal operand, 2 borrow, 3 exponent 0,
  // 4 overflow, 5 normal
  task automatic run(input int rule);
    logic [31:0] want;
    logic        wo, wu;
    logic [45:0] wff;
    sign = 1'($urandom);
    ns   = {2'b01, 46'({$urandom, $urandom})};
    az = 0; bz = 0; anz = 1'($urandom); bnz = 1'($urandom);
    borrow = 0;
    ne = 10'd1 + 10'($urandom % 254);
    case (rule)
      0: begin if ($urandom % 2) begin az = 1; anz = 0; end else begin bz = 1; bnz = 0; end
               if ($urandom % 2) borrow = 1'($urandom); end
      1: begin if ($urandom % 2) begin az = 1; anz = 1; end else begin bz = 1; bnz = 1; end end
      2: begin borrow = 1; ne = 10'($urandom); end
      3: ne = 10'd0;
      4: ne = 10'd255 + 10'($urandom % 300);
      default: if ($urandom % 4 == 0) ne = ($urandom % 2) ? 10'd1 : 10'd254;
    endcase
    wo = 0; wu = 0; wff = '0;
    case (rule)
      0: want = {sign, 31'd0};
      1, 2, 3: begin want = {sign, 31'd0}; wu = 1; end
      4: begin want = {sign, 8'hff, 23'd0}; wo = 1; end
      default: begin want = {sign, ne[7:0], ns[45:23]}; wff = ns[45:0]; end
    endcase
    #1;
    checks++;
    hits[rule]++;
    if (res !== want || ovf !== wo || unf !== wu || ff !== wff) begin
      failures++;
      if (failures < 10) $display("FAIL rule %0d: res=%h want %h ovf=%0b unf=%0b", rule, res, want, ovf, unf);
    end
  endtask

  initial begin
    for (int i = 0; i < 6000; i++) run(i % 6);
    for (int r = 0; r < 6; r++) begin
      checks++;
      if (hits[r] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
