// pg_merge_conv: converts the hard FP part's SP result P_g into the internal
// format of the soft adder-tree level where it joins the tree.
//
// Level LEVEL carries (W+3+2*LEVEL)-bit two's-complement mantissas with
// W+LEVEL fraction bits. To keep as much of P_g as that width allows, its
// 24-bit significand is placed with the leading one directly below the sign
// bit (shifted left with zero fill, or truncated toward zero when the level
// is narrower than 24 bits), the sign is applied, and the exponent is set so
// that the value is unchanged: e = e_P_g - LEVEL - 1 (in the biased,
// extended exponent). Keeping the most accuracy for P_g follows the source
// design; the placement rule is this design's. A P_g with a zero exponent
// field (zero or subnormal) becomes the internal zero (m = 0, e = most
// negative); infinity and NaN are not recognised.
//
// Ports: pg (SP); e, m in the level's format. Timing: combinational.
module pg_merge_conv
  import hd_pkg::*;
#(
  parameter int unsigned LEVEL = 2,
  parameter int unsigned W     = 8,
  parameter int unsigned EXP_W = EXP_W_DEF
) (
  input  fp32_t                       pg,
  output logic signed [EXP_W-1:0]     e,
  output logic signed [W+2+2*LEVEL:0] m
);

  localparam int unsigned MW = W + 3 + 2 * LEVEL;
  localparam logic signed [EXP_W-1:0] EXP_ZERO = {1'b1, {(EXP_W-1){1'b0}}};

  logic [23:0]   sig;
  logic [MW-2:0] mag;
  logic [MW+22:0] wide;

  always_comb begin
    sig = {1'b1, pg[22:0]};
    // Leading one to bit MW-2: the significand shifted by MW-25 positions
    // (left with zero fill, or right with truncation).
    wide = {sig, {(MW-1){1'b0}}};
    mag  = wide[MW+22:24];
    if (pg[30:23] == 8'd0) begin
      e = EXP_ZERO;
      m = '0;
    end else begin
      e = EXP_W'($signed({2'b00, pg[30:23]}) - $signed(EXP_W'(LEVEL + 1)));
      m = pg[31] ? -$signed({1'b0, mag}) : $signed({1'b0, mag});
    end
  end

endmodule
