// tb_table2_split: the second n = 16 configuration: 10 soft-logic products,
// 4 green and 2 blue hard FP products (8.5 DSP blocks), built at W = 7, 8
// and 9. With ALPHA = 10 the tree counts are 10, 5+P_g = 6, 3, 2, 1, so P_g
// joins at level 1 and level 2 passes one operand up unpaired. Each result
// is checked bit for bit against hd_ref_pkg::hybrid_ref and for its two-cycle
// latency.
module tb_table2_split;
  import hd_pkg::*;
  import hd_ref_pkg::*;

  localparam int N = 16, ALPHA = 10, BG = 4, BB = 2, NOPS = 1500;

  logic  clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic  v7, v8, v9;
  bf16_t a [N], b [N];
  fp32_t acc, p7, p8, p9;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hybrid_dot_top #(.ALPHA(ALPHA), .BETA_G(BG), .BETA_B(BB), .W(7)) dut7 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b), .acc(acc), .out_valid(v7), .p(p7));
  hybrid_dot_top #(.ALPHA(ALPHA), .BETA_G(BG), .BETA_B(BB), .W(8)) dut8 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b), .acc(acc), .out_valid(v8), .p(p8));
  hybrid_dot_top #(.ALPHA(ALPHA), .BETA_G(BG), .BETA_B(BB), .W(9)) dut9 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b), .acc(acc), .out_valid(v9), .p(p9));

  initial begin
    repeat (NOPS * 3 + 50) @(posedge clk);
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
    bf16_t da [], db [];
    da = new[N];
    db = new[N];
    foreach (a[k]) begin a[k] = '0; b[k] = '0; end
    acc = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NOPS; i++) begin
      @(negedge clk);
      foreach (a[k]) begin a[k] = rand_bf16(115, 140); b[k] = rand_bf16(115, 140); end
      acc = (i % 3 == 0) ? 32'd0 : rand_sp(115, 140);
      foreach (a[k]) begin da[k] = a[k]; db[k] = b[k]; end
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (v8) begin failures++; $display("FAIL out_valid after one cycle"); end
      @(negedge clk);
      checks++;
      if (!(v7 && v8 && v9)) begin failures++; $display("FAIL out_valid missing after two cycles"); end
      expect_eq("W=7", p7, hybrid_ref(da, db, acc, ALPHA, BG, BB, 7));
      expect_eq("W=8", p8, hybrid_ref(da, db, acc, ALPHA, BG, BB, 8));
      expect_eq("W=9", p9, hybrid_ref(da, db, acc, ALPHA, BG, BB, 9));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
