// ripple_carry_adder: WIDTH-bit adder made of a chain of full adders.
//
// Used to add the Booth partial products one row after another. The carry
// input lets a row's negate bit (the +1 that completes a two's complement
// negation) enter at the row's least significant position at no extra cost.
// Ripple carry adders instead of carry-save adders follow the multiplier's
// design; the carry input is this design's choice. Combinational.
module ripple_carry_adder #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] c;

  assign c[0] = cin;
  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(sum[i]), .co(c[i+1]));
  end
  assign cout = c[WIDTH];
endmodule
