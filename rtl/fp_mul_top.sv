// fp_mul_top: IEEE 754 floating point multiplier with a modified Booth
// significand multiplier and no rounding.
//
// Three paths work in parallel on operands a and b:
//   - sign:        sign_unit XORs the two sign bits;
//   - exponent:    exponent_adder (ripple carry) adds the biased exponents to
//                  an (EXP_W+1)-bit sum, bias_subtractor (ripple borrow)
//                  removes the bias, its borrow marking a negative result;
//   - significand: the hidden one is put in front of each fraction and
//                  mbe_multiplier, in unsigned mode, forms the 2*(FRAC_W+1)-
//                  bit intermediate product.
// normalizer then shifts the product right by one and increments the
// exponent when the product's top bit is set, and exception_unit turns the
// result into +-0 with underflow or +-infinity with overflow where the
// exponent leaves the range 1..2^EXP_W-2, and into +-0 for zero or
// denormalized operands. The fraction of p is truncated; p_frac_full gives
// all fraction bits of the normalized product for a following adder.
//
// Timing: the datapath is combinational from a and b to one output register
// holding p, p_frac_full, overflow and underflow, so a result appears one
// clock after its operands. reset is synchronous, active high, and clears
// the register. The structure of the paths follows the design; the output
// register, its reset and p_frac_full are this design's choices.
// EXP_W = 8, FRAC_W = 23 is single precision; other widths give smaller
// formats of the same shape.
module fp_mul_top #(
  parameter int unsigned EXP_W  = fp_mul_pkg::EXP_W,
  parameter int unsigned FRAC_W = fp_mul_pkg::FRAC_W
) (
  input  logic                  clk,
  input  logic                  reset,
  input  logic [EXP_W+FRAC_W:0] a,
  input  logic [EXP_W+FRAC_W:0] b,
  output logic [EXP_W+FRAC_W:0] p,
  output logic [2*FRAC_W-1:0]   p_frac_full,
  output logic                  overflow,
  output logic                  underflow
);
  localparam int unsigned SIG_W = FRAC_W + 1;
  localparam int unsigned IP_W  = 2 * SIG_W;

  logic                 a_sign, b_sign, sign;
  logic [EXP_W-1:0]     a_exp, b_exp;
  logic [FRAC_W-1:0]    a_frac, b_frac;

  assign {a_sign, a_exp, a_frac} = a;
  assign {b_sign, b_exp, b_frac} = b;

  // sign path
  sign_unit u_sign (.a_sign(a_sign), .b_sign(b_sign), .sign(sign));

  // exponent path
  logic [EXP_W:0] exp_sum, exp_int;
  logic           exp_borrow;

  exponent_adder #(.EXP_W(EXP_W)) u_eadd (.ea(a_exp), .eb(b_exp), .sum(exp_sum));
  bias_subtractor #(.EXP_W(EXP_W)) u_bsub (.s(exp_sum), .r(exp_int), .borrow(exp_borrow));

  // significand path
  logic [IP_W-1:0] ip;

  mbe_multiplier #(.N(SIG_W)) u_mul (
    .a({1'b1, a_frac}), .b({1'b1, b_frac}), .sign_mode(1'b0), .product(ip)
  );

  // normalization
  logic [IP_W-1:0]  norm_sig;
  logic [EXP_W+1:0] norm_exp;
  logic             norm_shifted_unused;

  normalizer #(.IP_W(IP_W), .EXP_IN_W(EXP_W + 1)) u_norm (
    .ip(ip), .exp_in(exp_int), .sig_out(norm_sig), .exp_out(norm_exp),
    .shifted(norm_shifted_unused)
  );

  // overflow / underflow and result assembly
  logic [EXP_W+FRAC_W:0] result;
  logic [IP_W-3:0]       frac_full;
  logic                  ovf, unf;

  exception_unit #(.EXP_W(EXP_W), .FRAC_W(FRAC_W), .IP_W(IP_W)) u_exc (
    .sign(sign), .borrow(exp_borrow), .norm_exp(norm_exp), .norm_sig(norm_sig),
    .a_exp_zero(a_exp == '0), .b_exp_zero(b_exp == '0),
    .a_frac_nz(a_frac != '0), .b_frac_nz(b_frac != '0),
    .result(result), .frac_full(frac_full), .overflow(ovf), .underflow(unf)
  );

  // output register
  always_ff @(posedge clk) begin
    if (reset) begin
      p           <= '0;
      p_frac_full <= '0;
      overflow    <= 1'b0;
      underflow   <= 1'b0;
    end else begin
      p           <= result;
      p_frac_full <= frac_full;
      overflow    <= ovf;
      underflow   <= unf;
    end
  end

  // flags are exclusive
  assert property (@(posedge clk) disable iff (reset) !(overflow && underflow));
endmodule
