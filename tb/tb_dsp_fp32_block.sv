// tb_dsp_fp32_block: checks the three operand configurations of the FP DSP
// block used by the hard FP part: product + chain input (chain carries the
// sum), product + third input, and third input + chain input with the
// product sent down the chain (the spare-adder configuration).
module tb_dsp_fp32_block;
  import hd_pkg::*;
  import hd_ref_pkg::*;

  fp32_t ax, ay, az, ci;
  fp32_t p0, r0, c0, p1, r1, c1, p2, r2, c2;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  dsp_fp32_block #(.ADD_X(ADD_X_PRODUCT), .ADD_Y(ADD_Y_CHAIN), .CHAIN_SEL(CHAIN_SUM)) u_chain (
    .ax(ax), .ay(ay), .az(az), .chain_in(ci), .product(p0), .result(r0), .chain_out(c0));
  dsp_fp32_block #(.ADD_X(ADD_X_PRODUCT), .ADD_Y(ADD_Y_ZIN), .CHAIN_SEL(CHAIN_SUM)) u_acc (
    .ax(ax), .ay(ay), .az(az), .chain_in(ci), .product(p1), .result(r1), .chain_out(c1));
  dsp_fp32_block #(.ADD_X(ADD_X_ZIN), .ADD_Y(ADD_Y_CHAIN), .CHAIN_SEL(CHAIN_PRODUCT)) u_spare (
    .ax(ax), .ay(ay), .az(az), .chain_in(ci), .product(p2), .result(r2), .chain_out(c2));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, fp32_t got, fp32_t want);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h expected %h", what, got, want);
    end
  endtask

  initial begin
    fp32_t pr;
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk);
      ax = {rand_bf16(110, 140), 16'h0};
      ay = {rand_bf16(110, 140), 16'h0};
      az = rand_sp(100, 150);
      ci = rand_sp(100, 150);
      #1;
      pr = mul_ref(ax, ay);
      expect_eq("product", p0, pr);
      expect_eq("chain mode result", r0, add_ref(pr, ci));
      expect_eq("chain mode chain_out", c0, add_ref(pr, ci));
      expect_eq("acc mode result", r1, add_ref(pr, az));
      expect_eq("acc mode chain_out", c1, add_ref(pr, az));
      expect_eq("spare mode result", r2, add_ref(az, ci));
      expect_eq("spare mode chain_out", c2, pr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
