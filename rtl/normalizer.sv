// normalizer: puts the leading one of the intermediate product at bit IP_W-2.
//
// The significands are normalized, so their product has its leading one at
// bit IP_W-1 or IP_W-2 (bit 47 or 46 of the 48-bit intermediate product,
// whose binary point lies between bits 46 and 45). When the top bit is set
// the product is shifted right by one place through a row of 2:1
// multiplexers and the intermediate exponent is incremented; otherwise both
// pass unchanged. The exponent output is one bit wider than its input so
// that the increment cannot wrap. The bit shifted out is dropped: there is
// no rounding. Defaults match the single-precision multiplier; IP_W = 8 with
// EXP_IN_W = 6 gives the small 8-bit version. Combinational.
module normalizer #(
  parameter int unsigned IP_W     = fp_mul_pkg::IP_W,
  parameter int unsigned EXP_IN_W = fp_mul_pkg::EXP_W + 1
) (
  input  logic [IP_W-1:0]   ip,
  input  logic [EXP_IN_W-1:0] exp_in,
  output logic [IP_W-1:0]   sig_out,
  output logic [EXP_IN_W:0] exp_out,
  output logic              shifted
);
  always_comb begin
    shifted = ip[IP_W-1];
    sig_out = shifted ? {1'b0, ip[IP_W-1:1]} : ip;
    exp_out = {1'b0, exp_in} + (EXP_IN_W + 1)'(shifted);
  end
endmodule
