// bf16_soft_mult: fused bfloat16 multiplier of the soft-logic dot product.
//
// It multiplies the two 8-bit significands (hidden one plus 7 fraction bits)
// into a 16-bit product in [1, 4) with 14 fraction bits and does not
// normalize it: the product keeps two integer bits. Instead of rounding to
// nearest, which needs an adder and may change the exponent, the fraction is
// truncated to W bits (rounding toward zero of the magnitude). The sign is then
// applied, giving a (W+3)-bit two's-complement mantissa m with W fraction bits.
// The exponent is the plain sum ea + eb - 127 kept in EXP_W signed bits, so
// products beyond the SP range neither overflow nor underflow here; the
// value is m * 2^(e - 127 - W). These steps follow the source design; the
// exponent width and the handling of special inputs are this design's choice:
// an operand whose exponent field is zero (zero or subnormal) gives a zero
// product, encoded as m = 0, e = most negative; infinities and NaNs are
// not recognised and behave like ordinary numbers with exponent 255.
//
// On the FPGA two such 8x8 products share one 18x18 multiplier; here each is
// written as a plain product and that packing is left to synthesis.
//
// Ports: a, b bfloat16; e, m as above. Timing: combinational.
module bf16_soft_mult
  import hd_pkg::*;
#(
  parameter int unsigned W     = 8,
  parameter int unsigned EXP_W = EXP_W_DEF
) (
  input  bf16_t                    a,
  input  bf16_t                    b,
  output logic signed [EXP_W-1:0]  e,
  output logic signed [W+2:0]      m
);

  localparam logic signed [EXP_W-1:0] EXP_ZERO = {1'b1, {(EXP_W-1){1'b0}}};

  logic [15:0]  prod;
  logic [W+1:0] mag;
  logic         zero;

  initial assert (W >= 1 && W <= 14) else $fatal(1, "bf16_soft_mult: W must be 1..14");

  always_comb begin
    zero = (a[14:7] == 8'd0) || (b[14:7] == 8'd0);
    prod = {8'd0, 1'b1, a[6:0]} * {8'd0, 1'b1, b[6:0]};
    mag  = (W+2)'(prod >> (14 - W));
    if (zero) begin
      e = EXP_ZERO;
      m = '0;
    end else begin
      e = EXP_W'($signed({2'b00, a[14:7]}) + $signed({2'b00, b[14:7]}) - 10'sd127);
      m = (a[15] ^ b[15]) ? -$signed({1'b0, mag}) : $signed({1'b0, mag});
    end
  end

endmodule
