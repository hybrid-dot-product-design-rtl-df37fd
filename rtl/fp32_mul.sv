// fp32_mul: IEEE-754 single-precision multiplier, the multiplier of one DSP
// block in FP mode. On the target FPGA this is hardened logic; this module
// is a portable, synthesizable equivalent so that the hard FP part of the
// hybrid dot product can be simulated and built anywhere.
//
// Operation: the two 24-bit significands are multiplied into a 48-bit product,
// which is normalized by at most one position and rounded to nearest, ties to
// even, using a guard bit and a sticky bit. Subnormal inputs are read as zero
// and results below the normal range are flushed to a signed zero, as FPGA
// FP DSP blocks commonly do; overflow gives infinity. NaN operands and
// infinity times zero give the quiet NaN 0x7FC00000. These number-handling
// rules are this design's choice; the text it follows only says the DSP block
// implements SP multiplication.
//
// Interface: a, b, y are SP bit patterns. Timing: purely combinational.
module fp32_mul
  import hd_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  logic        sa, sb, sy;
  logic [7:0]  ea, eb;
  logic [22:0] fa, fb;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [47:0] prod;
  logic [23:0] mant;
  logic        guard, sticky, round_up;
  logic [24:0] mant_r;
  logic signed [10:0] exp_c;

  always_comb begin
    {sa, ea, fa} = a;
    {sb, eb, fb} = b;
    sy     = sa ^ sb;
    a_zero = (ea == 8'd0);
    b_zero = (eb == 8'd0);
    a_inf  = (ea == 8'hFF) && (fa == '0);
    b_inf  = (eb == 8'hFF) && (fb == '0);
    a_nan  = (ea == 8'hFF) && (fa != '0);
    b_nan  = (eb == 8'hFF) && (fb != '0);

    prod  = {1'b1, fa} * {1'b1, fb};
    exp_c = $signed({3'b000, ea}) + $signed({3'b000, eb}) - 11'sd127;
    if (prod[47]) begin
      mant   = prod[47:24];
      guard  = prod[23];
      sticky = |prod[22:0];
      exp_c  = exp_c + 11'sd1;
    end else begin
      mant   = prod[46:23];
      guard  = prod[22];
      sticky = |prod[21:0];
    end
    round_up = guard & (sticky | mant[0]);
    mant_r   = {1'b0, mant} + {24'd0, round_up};
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_c  = exp_c + 11'sd1;
    end

    if (a_nan || b_nan || (a_inf && b_zero) || (a_zero && b_inf))
      y = SP_QNAN;
    else if (a_inf || b_inf)
      y = {sy, 8'hFF, 23'd0};
    else if (a_zero || b_zero)
      y = {sy, 31'd0};
    else if (exp_c >= 11'sd255)
      y = {sy, 8'hFF, 23'd0};
    else if (exp_c <= 11'sd0)
      y = {sy, 31'd0};
    else
      y = {sy, exp_c[7:0], mant_r[22:0]};
  end

endmodule
