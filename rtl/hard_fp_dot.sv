// hard_fp_dot: the hard floating-point part of the hybrid dot product, built
// only from DSP blocks in FP mode (one SP multiplier and one SP adder each).
//
// It is split into two chained sub dot products so that the SP input ACC can
// be added without spending an extra DSP block:
//   * the green chain of BETA_G blocks computes
//       P_g = p0 + (p1 + (... + p[BETA_G-1])),   p_i = a_g[i]*b_g[i];
//     the last green block sends its product (not its sum) down the chain,
//     which frees its adder;
//   * the blue chain of BETA_B blocks computes
//       P_b = q0 + (q1 + (... + (q[BETA_B-1] + ACC))), q_j = a_b[j]*b_b[j];
//   * the freed adder of the last green block is the spare adder and forms
//       P = P_l + P_b,
//     where P_l is the soft-logic part's result (which itself consumes P_g).
// For BETA_G = BETA_B = 2 this is P_g = A0B0 + A1B1, P_b = A2B2 + (A3B3 + ACC):
// four DSP blocks, the chain running from the blue end towards the green end.
// The chain structure and the use of a spare adder follow the source design;
// the summation order within a chain is read from its block diagram.
//
// Ports: SP operands a_g/b_g, a_b/b_b, acc, pl; outputs pg, pb, p.
// Timing: combinational (pl may depend combinationally on pg).
module hard_fp_dot
  import hd_pkg::*;
#(
  parameter int unsigned BETA_G = 2,
  parameter int unsigned BETA_B = 2
) (
  input  fp32_t a_g [BETA_G],
  input  fp32_t b_g [BETA_G],
  input  fp32_t a_b [BETA_B],
  input  fp32_t b_b [BETA_B],
  input  fp32_t acc,
  input  fp32_t pl,
  output fp32_t pg,
  output fp32_t pb,
  output fp32_t p
);

  // Chain outputs of every block; index i feeds block i-1.
  fp32_t g_chain  [BETA_G];
  fp32_t g_result [BETA_G];
  fp32_t g_prod   [BETA_G];
  fp32_t b_chain  [BETA_B];
  fp32_t b_result [BETA_B];
  fp32_t b_prod   [BETA_B];

  // Blue chain: block BETA_B-1 adds ACC, the others add the chain.
  for (genvar j = 0; j < BETA_B; j++) begin : g_blue
    if (j == BETA_B - 1) begin : g_last
      dsp_fp32_block #(.ADD_X(ADD_X_PRODUCT), .ADD_Y(ADD_Y_ZIN), .CHAIN_SEL(CHAIN_SUM)) u_dsp (
        .ax(a_b[j]), .ay(b_b[j]), .az(acc), .chain_in(32'd0),
        .product(b_prod[j]), .result(b_result[j]), .chain_out(b_chain[j]));
    end else begin : g_mid
      dsp_fp32_block #(.ADD_X(ADD_X_PRODUCT), .ADD_Y(ADD_Y_CHAIN), .CHAIN_SEL(CHAIN_SUM)) u_dsp (
        .ax(a_b[j]), .ay(b_b[j]), .az(32'd0), .chain_in(b_chain[j+1]),
        .product(b_prod[j]), .result(b_result[j]), .chain_out(b_chain[j]));
    end
  end

  // Green chain: block BETA_G-1 sends its product down the chain and uses its
  // adder for P = P_l + P_b.
  for (genvar i = 0; i < BETA_G; i++) begin : g_green
    if (i == BETA_G - 1) begin : g_spare
      dsp_fp32_block #(.ADD_X(ADD_X_ZIN), .ADD_Y(ADD_Y_CHAIN), .CHAIN_SEL(CHAIN_PRODUCT)) u_dsp (
        .ax(a_g[i]), .ay(b_g[i]), .az(pl), .chain_in(b_chain[0]),
        .product(g_prod[i]), .result(g_result[i]), .chain_out(g_chain[i]));
    end else begin : g_mid
      dsp_fp32_block #(.ADD_X(ADD_X_PRODUCT), .ADD_Y(ADD_Y_CHAIN), .CHAIN_SEL(CHAIN_SUM)) u_dsp (
        .ax(a_g[i]), .ay(b_g[i]), .az(32'd0), .chain_in(g_chain[i+1]),
        .product(g_prod[i]), .result(g_result[i]), .chain_out(g_chain[i]));
    end
  end

  assign pg = g_chain[0];
  assign pb = b_chain[0];
  assign p  = g_result[BETA_G-1];

endmodule
