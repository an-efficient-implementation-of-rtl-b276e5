// exception_unit: overflow/underflow detection and final result assembly.
//
// Inputs are the product sign, the borrow out of the bias subtractor (set
// when E1 + E2 - bias < 0), the normalized exponent, the normalized
// intermediate product, and flags saying whether each operand has a zero
// exponent field. The rules, in priority order:
//   1. An operand with exponent field 0 is zero or denormalized; the result
//      is zero with the product's sign. The underflow flag is raised when
//      such an operand is denormalized (non-zero fraction), not for an exact
//      zero.
//   2. Borrow set: the intermediate exponent is negative, which the
//      normalization increment cannot compensate: underflow, result +-0.
//   3. Normalized exponent 0 (an intermediate exponent of 0 that was not
//      incremented): underflow, result +-0.
//   4. Normalized exponent 2^EXP_W - 1 or more (255 or more): overflow,
//      result +-infinity.
//   5. Otherwise the exponent field is the normalized exponent and the
//      fraction is the FRAC_W bits just below the leading one, truncated.
// frac_full carries all IP_W-2 fraction bits of the normalized product,
// unrounded, for use by a following adder; it is 0 whenever rule 1-4 fired.
// Operands with exponent field 2^EXP_W - 1 (infinity, NaN) get no special
// treatment and pass through rules 2-5. The two top bits of norm_sig (a
// zero and the leading one after normalization) carry no information and
// are not read. Combinational.
module exception_unit #(
  parameter int unsigned EXP_W  = fp_mul_pkg::EXP_W,
  parameter int unsigned FRAC_W = fp_mul_pkg::FRAC_W,
  parameter int unsigned IP_W   = 2 * (FRAC_W + 1)
) (
  input  logic              sign,
  input  logic              borrow,
  input  logic [EXP_W+1:0]  norm_exp,
  input  logic [IP_W-1:0]   norm_sig,
  input  logic              a_exp_zero,
  input  logic              b_exp_zero,
  input  logic              a_frac_nz,
  input  logic              b_frac_nz,
  output logic [EXP_W+FRAC_W:0] result,
  output logic [IP_W-3:0]   frac_full,
  output logic              overflow,
  output logic              underflow
);
  localparam logic [EXP_W+1:0] EXP_MAX = (EXP_W + 2)'((1 << EXP_W) - 1);

  logic [EXP_W-1:0]  exp_f;
  logic [FRAC_W-1:0] frac_f;

  always_comb begin
    overflow  = 1'b0;
    underflow = 1'b0;
    exp_f     = '0;
    frac_f    = '0;
    frac_full = '0;
    if (a_exp_zero || b_exp_zero) begin
      underflow = (a_exp_zero & a_frac_nz) | (b_exp_zero & b_frac_nz);
    end else if (borrow || norm_exp == '0) begin
      underflow = 1'b1;
    end else if (norm_exp >= EXP_MAX) begin
      overflow  = 1'b1;
      exp_f     = '1;
    end else begin
      exp_f     = norm_exp[EXP_W-1:0];
      frac_f    = norm_sig[IP_W-3 -: FRAC_W];
      frac_full = norm_sig[IP_W-3:0];
    end
    result = {sign, exp_f, frac_f};
  end
endmodule
