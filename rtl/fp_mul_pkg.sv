// fp_mul_pkg: constants and types shared by the floating point multiplier.
//
// The default format is IEEE 754 single precision: 1 sign bit, an 8-bit
// biased exponent and a 23-bit fraction, bias 127. The multiplier modules
// take their widths as parameters whose defaults come from here; the packed
// struct fp32_t describes one single-precision word and is used by the
// testbenches to build and take apart operands.
package fp_mul_pkg;

  localparam int unsigned EXP_W  = 8;                      // exponent field
  localparam int unsigned FRAC_W = 23;                     // fraction field
  localparam int unsigned SIG_W  = FRAC_W + 1;             // significand, hidden one included
  localparam int unsigned IP_W   = 2 * SIG_W;              // intermediate product
  // the bias, 2^(EXP_W-1) - 1 = 127, is built into bias_subtractor

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } fp32_t;

endpackage
