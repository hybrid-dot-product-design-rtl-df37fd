// soft_fp_adder: one node of the soft-logic adder tree.
//
// Operands are in the tree's internal format: a signed exponent and an
// unnormalized IN_W-bit two's-complement mantissa with a fixed number F of
// fraction bits (value m * 2^(e - 127 - F)). The node takes the larger
// exponent, shifts the other mantissa right by the exponent difference and
// adds. The result is two bits wider: one more integer bit holds a carry, and
// one more fraction bit keeps a bit of the shifted operand that would
// otherwise be truncated, so the output has F+1 fraction bits. The node does
// not normalize. Widening by two bits per level and the absence of
// normalization follow the source design. The bits shifted out are simply
// dropped (an arithmetic shift); for a negative operand that truncates toward
// minus infinity, this design's choice to avoid an incrementer.
//
// Ports: ea/ma, eb/mb operands; e = max(ea, eb); m the (IN_W+2)-bit sum.
// Timing: combinational.
module soft_fp_adder #(
  parameter int unsigned IN_W  = 11,
  parameter int unsigned EXP_W = 10
) (
  input  logic signed [EXP_W-1:0] ea,
  input  logic signed [IN_W-1:0]  ma,
  input  logic signed [EXP_W-1:0] eb,
  input  logic signed [IN_W-1:0]  mb,
  output logic signed [EXP_W-1:0] e,
  output logic signed [IN_W+1:0]  m
);

  localparam int unsigned OW = IN_W + 2;

  logic signed [EXP_W:0]  diff;
  logic        [EXP_W:0]  shamt;
  logic signed [IN_W-1:0] m_big, m_small;
  logic signed [OW-1:0]   big_x, small_x;

  always_comb begin
    diff = $signed({ea[EXP_W-1], ea}) - $signed({eb[EXP_W-1], eb});
    if (diff >= 0) begin
      e       = ea;
      m_big   = ma;
      m_small = mb;
      shamt    = diff;
    end else begin
      e       = eb;
      m_big   = mb;
      m_small = ma;
      shamt    = -diff;
    end
    // Both operands gain one fraction bit; the smaller one is then aligned.
    big_x   = OW'(m_big)   <<< 1;
    small_x = OW'(m_small) <<< 1;
    if (shamt >= (EXP_W+1)'(OW)) small_x = {OW{m_small[IN_W-1]}};
    else                        small_x = small_x >>> shamt;
    m = big_x + small_x;
  end

endmodule
