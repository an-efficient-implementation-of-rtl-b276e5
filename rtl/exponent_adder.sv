// exponent_adder: adds the two biased exponents.
//
// A ripple carry adder of EXP_W cells: a half adder in bit 0 and full adders
// above it, each carry feeding the next cell. The EXP_W-bit sum and the
// final carry together form the (EXP_W+1)-bit result S, carry in the top
// bit. With the default EXP_W = 8 this is the 8-bit adder of one half adder
// and seven full adders. Only the width parameter is this design's addition.
// Combinational, no clock.
module exponent_adder #(
  parameter int unsigned EXP_W = fp_mul_pkg::EXP_W
) (
  input  logic [EXP_W-1:0] ea,
  input  logic [EXP_W-1:0] eb,
  output logic [EXP_W:0]   sum
);
  logic [EXP_W-1:0] c;   // carry out of each cell

  half_adder u_ha (.a(ea[0]), .b(eb[0]), .s(sum[0]), .co(c[0]));

  for (genvar i = 1; i < EXP_W; i++) begin : g_fa
    full_adder u_fa (.a(ea[i]), .b(eb[i]), .ci(c[i-1]), .s(sum[i]), .co(c[i]));
  end

  assign sum[EXP_W] = c[EXP_W-1];
endmodule
