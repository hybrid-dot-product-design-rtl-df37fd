// soft_dot: the ALPHA-element soft-logic dot product, fused rather than built
// from IEEE-754 operators, with the hard FP part's result P_g merged in.
//
// Structure:
//   * ALPHA bf16_soft_mult units produce unnormalized, truncated products
//     ((W+3)-bit two's-complement mantissas, extended exponents);
//   * a binary tree of soft_fp_adder nodes sums them. Level k carries
//     (W+3+2k)-bit mantissas with W+k fraction bits. Nodes are paired in
//     index order; when a level has an odd count, its last operand passes to
//     the next level unchanged (shifted left one bit, an exact re-format);
//   * P_g enters, through pg_merge_conv, at the first level whose count is
//     odd, filling the gap there (for ALPHA = 12 the counts are 12, 6, 3+1,
//     2, 1, so P_g joins at level 2 and the tree has 4 levels); if no level
//     is odd, it joins the root and adds one level;
//   * soft_normalize turns the root into the SP value P_l.
// Fusing, truncating products to W fraction bits, unnormalized two's-
// complement adders widened by two bits per level, the P_g merge and the final
// normalization follow the source design; the pairing order and the choice of
// merge level are this design's.
//
// Ports: a, b bfloat16 vectors; pg SP; pl SP. Timing: combinational.
module soft_dot
  import hd_pkg::*;
#(
  parameter int unsigned ALPHA = 12,
  parameter int unsigned W     = 8,
  parameter int unsigned EXP_W = EXP_W_DEF
) (
  input  bf16_t a [ALPHA],
  input  bf16_t b [ALPHA],
  input  fp32_t pg,
  output fp32_t pl
);

  localparam int NL      = tree_levels(ALPHA);
  localparam int ML      = merge_level(ALPHA);
  localparam int MW_ML   = lvl_mw(W, ML);
  // Position of P_g among the operands of level ML: after the ordinary ones.
  localparam int PG_SLOT = tree_count(ALPHA, ML) - 1;

  // P_g in the format of level ML.
  logic signed [EXP_W-1:0] pg_e;
  logic signed [MW_ML-1:0] pg_m;
  pg_merge_conv #(.LEVEL(ML), .W(W), .EXP_W(EXP_W)) u_pg (.pg(pg), .e(pg_e), .m(pg_m));

  // g_lv[k] holds the operands of tree level k: oe exponents, om mantissas.
  for (genvar k = 0; k <= NL; k++) begin : g_lv
    localparam int C  = tree_count(ALPHA, k);
    localparam int MW = lvl_mw(W, k);
    logic signed [EXP_W-1:0] oe [C];
    logic signed [MW-1:0]    om [C];

    if (k == 0) begin : g_leaf
      // Leaf products.
      for (genvar i = 0; i < ALPHA; i++) begin : g_mult
        bf16_soft_mult #(.W(W), .EXP_W(EXP_W)) u_mult (
          .a(a[i]), .b(b[i]), .e(oe[i]), .m(om[i]));
      end
    end else begin : g_add
      localparam int CP  = tree_count(ALPHA, k - 1);
      localparam int MWP = lvl_mw(W, k - 1);
      // Pairs of the previous level.
      for (genvar j = 0; j < CP / 2; j++) begin : g_node
        soft_fp_adder #(.IN_W(MWP), .EXP_W(EXP_W)) u_add (
          .ea(g_lv[k-1].oe[2*j]),   .ma(g_lv[k-1].om[2*j]),
          .eb(g_lv[k-1].oe[2*j+1]), .mb(g_lv[k-1].om[2*j+1]),
          .e(oe[j]), .m(om[j]));
      end
      // Unpaired last operand: same value, one more integer and fraction bit.
      if (CP % 2 == 1) begin : g_pass
        assign oe[CP/2] = g_lv[k-1].oe[CP-1];
        assign om[CP/2] = MW'(g_lv[k-1].om[CP-1]) <<< 1;
      end
    end

    if (k == ML) begin : g_merge
      assign oe[PG_SLOT] = pg_e;
      assign om[PG_SLOT] = pg_m;
    end
  end

  soft_normalize #(.IN_W(lvl_mw(W, NL)), .FRAC(lvl_frac(W, NL)), .EXP_W(EXP_W)) u_norm (
    .e(g_lv[NL].oe[0]), .m(g_lv[NL].om[0]), .y(pl));

endmodule
