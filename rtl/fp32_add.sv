// fp32_add: IEEE-754 single-precision adder, the adder of one DSP block in FP
// mode (hardened on the target FPGA; a portable synthesizable equivalent here).
//
// Operation: the operands are swapped so that the larger magnitude comes
// first; the smaller significand is shifted right by the exponent difference
// into a 27-bit field (24 bits, guard, round, sticky). The significands are
// added or subtracted, the result is normalized (one position right after a
// carry, or left by the leading-zero count after a cancellation) and rounded
// to nearest, ties to even. Subnormal inputs are read as zero, results below
// the normal range flush to a signed zero, overflow gives infinity, exact
// cancellation gives +0, and NaN or inf - inf gives the quiet NaN
// 0x7FC00000. These number-handling rules are this design's choice.
//
// Interface: a, b, y are SP bit patterns. Timing: purely combinational.
module fp32_add
  import hd_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  logic        sa, sb, sx, sz;
  logic [7:0]  ea, eb, ex, ez;
  logic [22:0] fa, fb, fx, fz;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [7:0]  d;
  logic [26:0] big, small_full, small_sh;
  logic [27:0] sum;
  logic [4:0]  lz;
  logic        found;
  logic [23:0] mant;
  logic        guard, rest, round_up;
  logic [24:0] mant_r;
  logic signed [9:0] exp_c;
  logic        sub, sy;

  always_comb begin
    {sa, ea, fa} = a;
    {sb, eb, fb} = b;
    lz     = '0;
    found  = 1'b0;
    a_zero = (ea == 8'd0);
    b_zero = (eb == 8'd0);
    a_inf  = (ea == 8'hFF) && (fa == '0);
    b_inf  = (eb == 8'hFF) && (fb == '0);
    a_nan  = (ea == 8'hFF) && (fa != '0);
    b_nan  = (eb == 8'hFF) && (fb != '0);

    // Larger magnitude is x, smaller is z.
    if ({ea, fa} >= {eb, fb}) begin
      {sx, ex, fx} = a;
      {sz, ez, fz} = b;
    end else begin
      {sx, ex, fx} = b;
      {sz, ez, fz} = a;
    end
    d   = ex - ez;
    sub = sx ^ sz;

    big        = {1'b1, fx, 3'b000};
    small_full = {1'b1, fz, 3'b000};
    if (d >= 8'd27) begin
      small_sh = 27'd1;  // only the sticky bit survives
    end else begin
      small_sh = small_full >> d;
      if ((small_full & ((27'd1 << d) - 27'd1)) != '0) small_sh[0] = 1'b1;
    end

    exp_c = $signed({2'b00, ex});
    if (sub) sum = {1'b0, big} - {1'b0, small_sh};
    else     sum = {1'b0, big} + {1'b0, small_sh};

    if (sum[27]) begin
      sum   = {1'b0, sum[27:2], sum[1] | sum[0]};
      exp_c = exp_c + 10'sd1;
    end else begin
      // Leading-zero count over the 27-bit field.
      for (int i = 26; i >= 0; i--) begin
        if (!found && sum[i]) begin
          lz    = 5'(26 - i);
          found = 1'b1;
        end
      end
      sum   = sum << lz;
      exp_c = exp_c - $signed({5'b00000, lz});
    end

    mant     = sum[26:3];
    guard    = sum[2];
    rest     = sum[1] | sum[0];
    round_up = guard & (rest | mant[0]);
    mant_r   = {1'b0, mant} + {24'd0, round_up};
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_c  = exp_c + 10'sd1;
    end
    sy = sx;

    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb)))
      y = SP_QNAN;
    else if (a_inf)
      y = {sa, 8'hFF, 23'd0};
    else if (b_inf)
      y = {sb, 8'hFF, 23'd0};
    else if (a_zero && b_zero)
      y = {sa & sb, 31'd0};
    else if (a_zero)
      y = b;
    else if (b_zero)
      y = a;
    else if (sum[26:0] == '0)
      y = 32'd0;
    else if (exp_c >= 10'sd255)
      y = {sy, 8'hFF, 23'd0};
    else if (exp_c <= 10'sd0)
      y = {sy, 31'd0};
    else
      y = {sy, exp_c[7:0], mant_r[22:0]};
  end

endmodule
