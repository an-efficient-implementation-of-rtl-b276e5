// half_adder: one-bit half adder, the least significant cell of the
// exponent ripple carry adder. Purely combinational: s = a ^ b, co = a & b.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  assign s  = a ^ b;
  assign co = a & b;
endmodule
