// sign_unit: sign of the product.
//
// A product is negative exactly when one of the two operands is negative,
// so the sign is the XOR of the operand signs. This is the sign path of the
// multiplier; it runs in parallel with the exponent and significand paths.
// Combinational, no clock.
module sign_unit (
  input  logic a_sign,
  input  logic b_sign,
  output logic sign
);
  assign sign = a_sign ^ b_sign;
endmodule
