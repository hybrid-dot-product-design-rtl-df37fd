// tb_hard_fp_dot: checks the hard FP part (two green and two blue DSP blocks)
// against the chained reference P_g = A0B0 + A1B1, P_b = A2B2 + (A3B3 + ACC),
// P = P_l + P_b, each operation rounded to SP. Also runs a 3+1 split to
// exercise the generic chain lengths.
module tb_hard_fp_dot;
  import hd_pkg::*;
  import hd_ref_pkg::*;

  fp32_t ag [2], bg [2], ab [2], bb [2];
  fp32_t acc, pl, pg, pb, p;
  fp32_t ag3 [3], bg3 [3], ab1 [1], bb1 [1];
  fp32_t pg3, pb3, p3;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  hard_fp_dot #(.BETA_G(2), .BETA_B(2)) dut (
    .a_g(ag), .b_g(bg), .a_b(ab), .b_b(bb), .acc(acc), .pl(pl), .pg(pg), .pb(pb), .p(p));
  hard_fp_dot #(.BETA_G(3), .BETA_B(1)) dut31 (
    .a_g(ag3), .b_g(bg3), .a_b(ab1), .b_b(bb1), .acc(acc), .pl(pl), .pg(pg3), .pb(pb3), .p(p3));

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
    fp32_t epg, epb;
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk);
      for (int k = 0; k < 2; k++) begin
        ag[k] = {rand_bf16(115, 140), 16'h0};
        bg[k] = {rand_bf16(115, 140), 16'h0};
        ab[k] = {rand_bf16(115, 140), 16'h0};
        bb[k] = {rand_bf16(115, 140), 16'h0};
      end
      for (int k = 0; k < 3; k++) begin
        ag3[k] = {rand_bf16(115, 140), 16'h0};
        bg3[k] = {rand_bf16(115, 140), 16'h0};
      end
      ab1[0] = {rand_bf16(115, 140), 16'h0};
      bb1[0] = {rand_bf16(115, 140), 16'h0};
      acc = (i % 4 == 0) ? 32'd0 : rand_sp(110, 150);
      pl  = rand_sp(110, 150);
      #1;
      epg = add_ref(mul_ref(ag[0], bg[0]), mul_ref(ag[1], bg[1]));
      epb = add_ref(mul_ref(ab[0], bb[0]), add_ref(mul_ref(ab[1], bb[1]), acc));
      expect_eq("pg", pg, epg);
      expect_eq("pb", pb, epb);
      expect_eq("p", p, add_ref(pl, epb));
      epg = add_ref(mul_ref(ag3[0], bg3[0]), add_ref(mul_ref(ag3[1], bg3[1]), mul_ref(ag3[2], bg3[2])));
      epb = add_ref(mul_ref(ab1[0], bb1[0]), acc);
      expect_eq("pg (3+1)", pg3, epg);
      expect_eq("pb (3+1)", pb3, epb);
      expect_eq("p (3+1)", p3, add_ref(pl, epb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
