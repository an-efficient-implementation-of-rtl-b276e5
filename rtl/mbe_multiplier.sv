// mbe_multiplier: N x N signed/unsigned modified Booth multiplier.
//
// sign_mode selects the operation: 0 multiplies unsigned numbers, 1 multiplies
// two's complement numbers. Both operands are widened by the mode: the
// multiplicand to N+1 bits (top bit a[N-1] when signed, 0 when unsigned),
// the multiplier likewise, so that an unsigned N-bit multiplier needs
// G = ceil((N+1)/2) Booth digits: 13 rows for N = 24, 5 rows for N = 8.
//
// All G rows are formed in parallel by pp_bit_gen cells. Row k is N+2 bits
// wide (enough for +-2 times an (N+1)-bit multiplicand) and is the one's
// complement of the multiple when the digit is negative; its negate bit N_k
// from mbe_encoder supplies the +1. Sign extension is replaced by the usual
// constant: the top bit of each row is inverted and the constant
// -2^(N+1) * sum_k 4^k (mod 2^(2N)) starts the sum, which is the same as
// prefixing the rows with the inverted sign and a run of ones.
//
// The rows are added by a chain of ripple carry adders, one per row. Row k
// enters at bit 2k, so its adder only spans bits 2N-1..2k, and N_k is that
// adder's carry in. The result is the full 2N-bit product, exact in both
// modes. The use of ripple carry adders for the row sum follows the design;
// the sign extension constant and carry-in negate bits are this design's
// way of adding the rows. Combinational, no clock.
module mbe_multiplier #(
  parameter int unsigned N = fp_mul_pkg::SIG_W
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic           sign_mode,
  output logic [2*N-1:0] product
);
  localparam int unsigned G  = (N + 2) / 2;   // ceil((N+1)/2) Booth digits
  localparam int unsigned PW = 2 * N;         // product width
  localparam int unsigned RW = N + 2;         // row width

  // -2^(N+1) * (1 + 4 + ... + 4^(G-1)) modulo 2^PW
  function automatic logic [PW-1:0] sign_ext_const();
    logic [PW-1:0] acc;
    acc = '0;
    for (int k = 0; k < G; k++) begin
      acc = acc - (PW'(1) << (N + 1 + 2 * k));
    end
    return acc;
  endfunction

  localparam logic [PW-1:0] SEXT = sign_ext_const();

  // a_x[j+1] holds multiplicand bit j, a_x[0] is the a(-1) = 0 input
  logic [RW:0]    a_x;
  // b_x[m+1] holds multiplier bit m, b_x[0] is b(-1) = 0
  logic [2*G:0]   b_x;
  logic           a_top, b_top;

  assign a_top = sign_mode & a[N-1];
  assign b_top = sign_mode & b[N-1];
  assign a_x   = {a_top, a_top, a, 1'b0};
  assign b_x   = {{(2 * G + 1 - N - 1){b_top}}, b, 1'b0};

  logic [RW-1:0] row     [G];   // partial product rows
  logic [RW-1:0] row_mod [G];   // rows with inverted sign bit
  logic [G-1:0]  neg;           // negate bits N_k
  logic [PW-1:0] acc     [G+1]; // running sums

  for (genvar k = 0; k < G; k++) begin : g_row
    logic x1_unused, x2_unused, z_unused;

    mbe_encoder u_enc (
      .b_hi(b_x[2*k+2]), .b_mid(b_x[2*k+1]), .b_lo(b_x[2*k]),
      .x1_a(x1_unused), .x2_a(x2_unused), .z(z_unused), .neg(neg[k])
    );

    for (genvar j = 0; j < RW; j++) begin : g_bit
      pp_bit_gen u_pp (
        .a_j  (a_x[j+1]),
        .a_jm1(a_x[j]),
        .b_hi (b_x[2*k+2]),
        .b_mid(b_x[2*k+1]),
        .b_lo (b_x[2*k]),
        .p    (row[k][j])
      );
    end

    assign row_mod[k] = {~row[k][RW-1], row[k][RW-2:0]};
  end

  assign acc[0] = SEXT;

  for (genvar k = 0; k < G; k++) begin : g_sum
    localparam int unsigned LO = 2 * k;
    localparam int unsigned AW = PW - LO;       // adder width
    logic [AW-1:0] row_w;
    logic [AW-1:0] hi_sum;
    logic          cout_unused;

    assign row_w = AW'(row_mod[k]);   // zero-extend or drop bits above the product

    ripple_carry_adder #(.WIDTH(AW)) u_rca (
      .a   (acc[k][PW-1:LO]),
      .b   (row_w),
      .cin (neg[k]),
      .sum (hi_sum),
      .cout(cout_unused)
    );

    if (LO > 0) begin : g_lo
      assign acc[k+1] = {hi_sum, acc[k][LO-1:0]};
    end else begin : g_nolo
      assign acc[k+1] = hi_sum;
    end
  end

  assign product = acc[G];
endmodule
