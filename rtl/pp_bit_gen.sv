// pp_bit_gen: one bit p(k,j) of a modified Booth partial product.
//
// Encoder and decoder are one cell: from the multiplier triple it forms the
// Booth selects (mbe_encoder) and picks multiplicand bit a(j) for a digit of
// +-1 or a(j-1) for a digit of +-2, inverted when b_hi is set. The inversion
// gives the one's complement of the row; the row's negate bit adds the
// missing +1 later. For the triple 111 (digit 0) both selects are 0 and the
// bit is 0:
//   p = (x2_a & (a_j ^ b_hi)) | (x1_a & ~z & (a_jm1 ^ b_hi))
// The merged encoder/selector cell follows the design; the equation itself
// is written from the encoding table rather than from a gate netlist.
// Combinational.
module pp_bit_gen (
  input  logic a_j,
  input  logic a_jm1,
  input  logic b_hi,
  input  logic b_mid,
  input  logic b_lo,
  output logic p
);
  logic x1_a, x2_a, z, neg_unused;

  mbe_encoder u_enc (
    .b_hi(b_hi), .b_mid(b_mid), .b_lo(b_lo),
    .x1_a(x1_a), .x2_a(x2_a), .z(z), .neg(neg_unused)
  );

  assign p = (x2_a & (a_j ^ b_hi)) | (x1_a & ~z & (a_jm1 ^ b_hi));
endmodule
