// bias_subtractor: subtracts the exponent bias from the exponent sum.
//
// The bias 2^(EXP_W-1)-1 (127 for EXP_W = 8) has ones in bits 0..EXP_W-2 and
// zeros in bits EXP_W-1 and EXP_W, so a ripple borrow chain of EXP_W-1
// one-subtractors followed by two zero-subtractors does the subtraction:
// 7 + 2 cells for single precision. The (EXP_W+1)-bit difference r is the
// intermediate exponent; the borrow out of the last cell is set when the
// exponent sum was below the bias, i.e. when the intermediate exponent is
// negative (r then holds it in two's complement). Combinational.
module bias_subtractor #(
  parameter int unsigned EXP_W = fp_mul_pkg::EXP_W
) (
  input  logic [EXP_W:0] s,
  output logic [EXP_W:0] r,
  output logic           borrow
);
  logic [EXP_W:0] bo;   // borrow out of each cell

  one_subtractor u_os0 (.s(s[0]), .bi(1'b0), .r(r[0]), .bo(bo[0]));

  for (genvar i = 1; i <= EXP_W; i++) begin : g_cell
    if (i < EXP_W - 1) begin : g_os
      one_subtractor u_os (.s(s[i]), .bi(bo[i-1]), .r(r[i]), .bo(bo[i]));
    end else begin : g_zs
      zero_subtractor u_zs (.s(s[i]), .bi(bo[i-1]), .r(r[i]), .bo(bo[i]));
    end
  end

  assign borrow = bo[EXP_W];
endmodule
