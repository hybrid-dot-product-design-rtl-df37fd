// soft_normalize: final normalization of the soft adder tree, producing the
// SP operand P_l.
//
// The root of the tree is an unnormalized IN_W-bit two's-complement mantissa
// with FRAC fraction bits and a signed extended exponent (value
// m * 2^(e - 127 - FRAC)). The stage takes the magnitude, finds its leading
// one at position p, shifts it to the top and keeps the 23 bits below it as
// the SP fraction (the rest is truncated, i.e. rounded toward zero); the SP
// exponent is e + p - FRAC. A normalization stage at the tree output that
// keeps the most accuracy follows the source design; truncation, flushing
// results below the normal range to zero, saturating overflow to infinity
// and returning +0 for a zero mantissa are this design's choices.
//
// Ports: e, m root operand; y SP result. Timing: combinational.
module soft_normalize
  import hd_pkg::*;
#(
  parameter int unsigned IN_W  = 19,
  parameter int unsigned FRAC  = 12,
  parameter int unsigned EXP_W = EXP_W_DEF
) (
  input  logic signed [EXP_W-1:0] e,
  input  logic signed [IN_W-1:0]  m,
  output fp32_t                   y
);

  logic [IN_W-1:0]      mag;
  logic [IN_W-1:0]      norm;
  logic [IN_W+21:0]     wide;
  logic [$clog2(IN_W+1)-1:0] pos;
  logic signed [EXP_W+1:0] exp_c;
  logic                 sgn;

  always_comb begin
    sgn = m[IN_W-1];
    mag = sgn ? IN_W'(-m) : IN_W'(m);
    pos = '0;
    for (int i = 0; i < IN_W; i++) if (mag[i]) pos = ($clog2(IN_W+1))'(i);
    norm  = mag << (IN_W - 1 - int'(pos));
    wide  = {norm[IN_W-2:0], 23'd0};
    exp_c = (EXP_W+2)'(e) + $signed((EXP_W+2)'(pos)) - $signed((EXP_W+2)'(FRAC));
    if (mag == '0)
      y = 32'd0;
    else if (exp_c >= 255)
      y = {sgn, 8'hFF, 23'd0};
    else if (exp_c <= 0)
      y = {sgn, 31'd0};
    else
      y = {sgn, exp_c[7:0], wide[IN_W+21 -: 23]};
  end

endmodule
