// hybrid_dot_top: hybrid bfloat16 dot product with an SP accumulator input,
//   P = sum_{i<n} A_i * B_i + ACC,   n = ALPHA + BETA_G + BETA_B,
// for FPGAs whose DSP blocks support single-precision floating point.
//
// The n products are split so that the core's logic-to-DSP ratio can be tuned
// to the device:
//   * A[0..ALPHA-1] go to soft_dot, a fused soft-logic dot product with
//     truncated, unnormalized arithmetic whose accuracy is set by W;
//   * A[ALPHA..ALPHA+BETA_G-1] go to the green chain and the last BETA_B
//     elements to the blue chain of hard_fp_dot, made of DSP blocks in SP mode.
// The green chain's sum P_g is merged into the soft adder tree, the soft
// result P_l and the blue chain's P_b (which includes ACC) are added by a
// spare SP adder inside one of the used DSP blocks. The default configuration
// n = 16, ALPHA = 12, BETA_G = BETA_B = 2 and W = 8 is one the source design
// evaluates (W may also be 7 or 9).
//
// Interface: a/b bfloat16 vectors and the SP acc are sampled with in_valid on
// a rising clk edge; p is presented with out_valid two cycles later (one
// input register, combinational datapath, one output register). A new
// operation may start every cycle. rst_n (synchronous, active low) clears the
// valid pipeline only. The registering scheme is this design's choice; the
// source design leaves pipelining to a generator.
module hybrid_dot_top
  import hd_pkg::*;
#(
  parameter int unsigned ALPHA  = 12,
  parameter int unsigned BETA_G = 2,
  parameter int unsigned BETA_B = 2,
  parameter int unsigned W      = 8,
  parameter int unsigned EXP_W  = EXP_W_DEF
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  bf16_t a [ALPHA+BETA_G+BETA_B],
  input  bf16_t b [ALPHA+BETA_G+BETA_B],
  input  fp32_t acc,
  output logic  out_valid,
  output fp32_t p
);

  localparam int unsigned N = ALPHA + BETA_G + BETA_B;

  // Each chain needs at least one DSP block (the spare adder and the ACC
  // adder live in the last block of each), and the soft multiplier keeps at
  // most the 14 fraction bits of its 8x8 product.
  initial begin
    assert (ALPHA >= 1 && BETA_G >= 1 && BETA_B >= 1)
      else $fatal(1, "hybrid_dot_top: ALPHA, BETA_G and BETA_B must be at least 1");
    assert (W >= 1 && W <= 14) else $fatal(1, "hybrid_dot_top: W must be 1..14");
  end

  bf16_t a_q [N];
  bf16_t b_q [N];
  fp32_t acc_q;
  logic  v_q;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      a_q   <= a;
      b_q   <= b;
      acc_q <= acc;
    end
    if (!rst_n) v_q <= 1'b0;
    else        v_q <= in_valid;
  end

  // Soft part operands.
  bf16_t sa [ALPHA];
  bf16_t sb [ALPHA];
  for (genvar i = 0; i < ALPHA; i++) begin : g_soft_in
    assign sa[i] = a_q[i];
    assign sb[i] = b_q[i];
  end

  // Hard part operands, bfloat16 widened to SP.
  fp32_t ga [BETA_G];
  fp32_t gb [BETA_G];
  fp32_t ba [BETA_B];
  fp32_t bb [BETA_B];
  for (genvar i = 0; i < BETA_G; i++) begin : g_green_in
    assign ga[i] = bf16_to_fp32(a_q[ALPHA + i]);
    assign gb[i] = bf16_to_fp32(b_q[ALPHA + i]);
  end
  for (genvar j = 0; j < BETA_B; j++) begin : g_blue_in
    assign ba[j] = bf16_to_fp32(a_q[ALPHA + BETA_G + j]);
    assign bb[j] = bf16_to_fp32(b_q[ALPHA + BETA_G + j]);
  end

  fp32_t pg, pb, pl, p_d;

  hard_fp_dot #(.BETA_G(BETA_G), .BETA_B(BETA_B)) u_hard (
    .a_g(ga), .b_g(gb), .a_b(ba), .b_b(bb), .acc(acc_q), .pl(pl),
    .pg(pg), .pb(pb), .p(p_d));

  soft_dot #(.ALPHA(ALPHA), .W(W), .EXP_W(EXP_W)) u_soft (
    .a(sa), .b(sb), .pg(pg), .pl(pl));

  always_ff @(posedge clk) begin
    if (v_q) p <= p_d;
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v_q;
  end

endmodule
