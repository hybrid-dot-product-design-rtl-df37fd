// hd_pkg: types and constants shared by the hybrid dot-product modules.
//
// The design mixes three number formats:
//   * bfloat16 (sign, 8-bit exponent, 7-bit fraction): the dot-product inputs;
//   * IEEE-754 single precision (SP): the hard FP part, ACC, P_g, P_l and P;
//   * the soft adder tree's internal format: an unnormalized two's-complement
//     mantissa m with a fixed number of fraction bits F per tree level and a
//     signed, biased, extended exponent e; the value is m * 2^(e - 127 - F).
// Zero in the internal format is m = 0 with e = EXP_ZERO, the most negative
// exponent, so that alignment never favours it over a real operand.
// This package also holds the operand-select options of the FP DSP block model.
package hd_pkg;

  typedef logic [15:0] bf16_t;
  typedef logic [31:0] fp32_t;

  localparam fp32_t SP_QNAN = 32'h7FC0_0000;

  // Default width of the soft part's extended exponent (signed).
  localparam int unsigned EXP_W_DEF = 10;

  // Adder X operand of a DSP block: its own product or its third input (az).
  typedef enum logic { ADD_X_PRODUCT, ADD_X_ZIN } add_x_e;
  // Adder Y operand of a DSP block: the chain input or the third input (az).
  typedef enum logic { ADD_Y_CHAIN, ADD_Y_ZIN } add_y_e;
  // What a DSP block sends down the chain: its sum or its product.
  typedef enum logic { CHAIN_SUM, CHAIN_PRODUCT } chain_sel_e;

  // bfloat16 operand widened to SP: the same number with 16 zero bits appended.
  function automatic fp32_t bf16_to_fp32(bf16_t x);
    return {x, 16'h0000};
  endfunction

  // Node count of soft adder-tree level k for ALPHA leaf products, counted
  // after P_g has joined. P_g joins at the first level whose count is odd (a
  // count of one, the root, is odd too), so that this level pairs up evenly.
  function automatic int tree_count(int alpha, int k);
    int c;
    bit merged;
    c = alpha;
    merged = 1'b0;
    for (int i = 0; i <= k; i++) begin
      if (i > 0) c = (c + 1) / 2;
      if (!merged && (c % 2 == 1)) begin
        c = c + 1;
        merged = 1'b1;
      end
    end
    return c;
  endfunction

  // Level at which P_g joins the tree.
  function automatic int merge_level(int alpha);
    int c;
    c = alpha;
    for (int i = 0; i < 64; i++) begin
      if (c % 2 == 1) return i;
      c = (c + 1) / 2;
    end
    return 0;
  endfunction

  // Number of adder levels (the root is at this level).
  function automatic int tree_levels(int alpha);
    int k;
    k = 0;
    while (tree_count(alpha, k) > 1) k++;
    return k;
  endfunction

  // Mantissa width and fraction bits of level k for a leaf fraction of w bits.
  function automatic int lvl_mw(int w, int k);
    return w + 3 + 2 * k;
  endfunction

  function automatic int lvl_frac(int w, int k);
    return w + k;
  endfunction

endpackage
