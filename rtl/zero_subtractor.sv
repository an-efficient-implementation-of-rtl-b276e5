// zero_subtractor: one cell of the bias subtractor for a bias bit that is 0.
// It computes s - 0 - bi: r = s ^ bi, and a borrow leaves the cell only when
// s is 0 and a borrow came in. Combinational.
module zero_subtractor (
  input  logic s,
  input  logic bi,
  output logic r,
  output logic bo
);
  assign r  = s ^ bi;
  assign bo = ~s & bi;
endmodule
