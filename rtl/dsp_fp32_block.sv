// dsp_fp32_block: one DSP block configured in floating-point mode, as used by
// the hard FP part of the hybrid dot product. It holds an SP multiplier and an
// SP adder. The adder's X operand is either the block's own product or its
// third input az; its Y operand is either the chain input from the
// neighbouring block or az. The chain output carries either the sum (normal
// chained dot product) or the raw product (when the block's adder is used as
// the spare adder for P = P_l + P_b and its multiplier feeds the next block).
//
// The operand multiplexers and the product/sum chain follow the block
// diagram of the hard FP mapping. The pipeline registers that the real DSP
// block places at its inputs, after the multiplier and at its output are not
// modelled: this design keeps the block combinational and registers the whole
// dot product at its boundary instead.
//
// Parameters: ADD_X, ADD_Y, CHAIN_SEL (static configuration, see hd_pkg).
// Ports: ax, ay multiplier operands; az third input; chain_in; product = ax*ay;
// result = adder output; chain_out = result or product. All SP.
// Timing: combinational.
module dsp_fp32_block
  import hd_pkg::*;
#(
  parameter add_x_e     ADD_X     = ADD_X_PRODUCT,
  parameter add_y_e     ADD_Y     = ADD_Y_CHAIN,
  parameter chain_sel_e CHAIN_SEL = CHAIN_SUM
) (
  input  fp32_t ax,
  input  fp32_t ay,
  input  fp32_t az,
  input  fp32_t chain_in,
  output fp32_t product,
  output fp32_t result,
  output fp32_t chain_out
);

  fp32_t add_x, add_y;

  fp32_mul u_mul (.a(ax), .b(ay), .y(product));

  always_comb begin
    add_x = (ADD_X == ADD_X_PRODUCT) ? product  : az;
    add_y = (ADD_Y == ADD_Y_CHAIN)   ? chain_in : az;
  end

  fp32_add u_add (.a(add_x), .b(add_y), .y(result));

  assign chain_out = (CHAIN_SEL == CHAIN_SUM) ? result : product;

endmodule
