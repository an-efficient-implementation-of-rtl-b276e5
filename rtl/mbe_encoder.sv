// mbe_encoder: radix-4 modified Booth encoding of one multiplier bit triple.
//
// The triple (b_hi, b_mid, b_lo) = (b[2k+1], b[2k], b[2k-1]) selects the digit
// 0, +-1 or +-2. The outputs follow the truth table of the scheme:
//   x1_a = ~(b_mid ^ b_lo)   1 when the digit is 0 or +-2
//   x2_a =   b_mid ^ b_lo    1 when the digit is +-1
//   z    = ~(b_mid ^ b_hi)   1 when the digit is 0 or +-1
//   neg  = 1 for the digits -1 and -2 (b_hi set, triple not 111)
// so the digit is +-2 when x1_a & ~z. Combinational.
module mbe_encoder (
  input  logic b_hi,
  input  logic b_mid,
  input  logic b_lo,
  output logic x1_a,
  output logic x2_a,
  output logic z,
  output logic neg
);
  assign x1_a = ~(b_mid ^ b_lo);
  assign x2_a =   b_mid ^ b_lo;
  assign z    = ~(b_mid ^ b_hi);
  assign neg  = b_hi & ~(b_mid & b_lo);
endmodule
