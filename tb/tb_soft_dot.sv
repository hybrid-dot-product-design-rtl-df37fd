// tb_soft_dot: checks the soft-logic dot product bit for bit against the
// reference tree (hd_ref_pkg::soft_dot_ref) for three shapes: ALPHA = 12 with
// W = 8 (P_g joins at level 2), ALPHA = 8 with W = 7 (P_g joins at the root)
// and ALPHA = 5 with W = 9 (P_g joins at the leaves). It also checks the
// result against the exact dot product: the error must stay below
// 2^-(W-3) times the sum of the magnitudes of the terms, plus one SP ulp.
module tb_soft_dot;
  import hd_pkg::*;
  import hd_ref_pkg::*;

  bf16_t a12 [12], b12 [12], a8 [8], b8 [8], a5 [5], b5 [5];
  fp32_t pg, pl12, pl8, pl5;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  soft_dot #(.ALPHA(12), .W(8), .EXP_W(10)) dut12 (.a(a12), .b(b12), .pg(pg), .pl(pl12));
  soft_dot #(.ALPHA(8),  .W(7), .EXP_W(10)) dut8  (.a(a8),  .b(b8),  .pg(pg), .pl(pl8));
  soft_dot #(.ALPHA(5),  .W(9), .EXP_W(10)) dut5  (.a(a5),  .b(b5),  .pg(pg), .pl(pl5));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(string what, bf16_t a[], bf16_t b[], fp32_t got, int w);
    fp32_t want;
    real exact, mags, err;
    want = soft_dot_ref(a, b, pg, w);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h expected %h", what, got, want);
    end
    exact = sp_to_real(pg);
    mags  = (exact < 0.0) ? -exact : exact;
    for (int i = 0; i < a.size(); i++) begin
      real t;
      t = bf16_to_real(a[i]) * bf16_to_real(b[i]);
      exact += t;
      mags  += (t < 0.0) ? -t : t;
    end
    err = sp_to_real(got) - exact;
    if (err < 0.0) err = -err;
    checks++;
    // Beyond the SP range the result must be infinity of the right sign.
    if ((exact >= pow2(128) || exact <= -pow2(128)) && !(sp_is_inf(got) && (got[31] == (exact < 0.0))))
      failures++;
    else if (!sp_is_inf(got) && err > mags * pow2(-(w - 3)) + ((exact < 0.0 ? -exact : exact) * pow2(-22))) begin
      failures++;
      if (failures < 10) $display("FAIL %s accuracy: got %g exact %g", what, sp_to_real(got), exact);
    end
  endtask

  initial begin
    for (int i = 0; i < 3000; i++) begin
      @(posedge clk);
      foreach (a12[k]) begin a12[k] = rand_bf16(120, 134); b12[k] = rand_bf16(120, 134); end
      foreach (a8[k])  begin a8[k]  = rand_bf16(120, 134); b8[k]  = rand_bf16(120, 134); end
      foreach (a5[k])  begin a5[k]  = rand_bf16(120, 134); b5[k]  = rand_bf16(120, 134); end
      if (i % 10 == 0) a12[3] = 16'h0000;       // zero operand
      if (i % 7 == 0)  a8[2]  = rand_bf16(1, 254);  // wide exponent range
      pg = (i % 5 == 0) ? 32'd0 : rand_sp(115, 140);
      #1;
      check_one("alpha=12", a12, b12, pl12, 8);
      check_one("alpha=8", a8, b8, pl8, 7);
      check_one("alpha=5", a5, b5, pl5, 9);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
