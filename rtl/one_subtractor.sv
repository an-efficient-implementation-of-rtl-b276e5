// one_subtractor: one cell of the bias subtractor for a bias bit that is 1.
// It computes s - 1 - bi: the difference bit is r = ~(s ^ bi) and a borrow
// leaves the cell when s is 0 or a borrow came in. Combinational.
module one_subtractor (
  input  logic s,
  input  logic bi,
  output logic r,
  output logic bo
);
  assign r  = ~(s ^ bi);
  assign bo = ~s | bi;
endmodule
