// tb_pg_merge_conv: checks the conversion of P_g into the tree format at
// level 2 for W = 8 (15-bit mantissa, truncating the 24-bit significand) and
// at level 8 for W = 9 (28-bit mantissa, exact), against the real-valued
// reference: e = e_P_g - LEVEL - 1, leading one right below the sign bit.
// The converted value must never exceed P_g in magnitude and must be exact
// when the format is wide enough.
module tb_pg_merge_conv;
  import hd_pkg::*;
  import hd_ref_pkg::*;

  fp32_t pg;
  logic signed [9:0]  e2, e8;
  logic signed [14:0] m2;
  logic signed [27:0] m8;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  pg_merge_conv #(.LEVEL(2), .W(8), .EXP_W(10)) dut2 (.pg(pg), .e(e2), .m(m2));
  pg_merge_conv #(.LEVEL(8), .W(9), .EXP_W(10)) dut8 (.pg(pg), .e(e8), .m(m8));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(fp32_t x);
    int ee;
    longint mm;
    real v;
    pg = x;
    #1;
    v = sp_to_real(x);
    pg_conv_ref(x, 2, 8, ee, mm);
    checks++;
    if (int'(e2) != ee || longint'(m2) != mm) begin
      failures++;
      if (failures < 10) $display("FAIL L2 %h: e=%0d m=%0d expected e=%0d m=%0d", x, e2, m2, ee, mm);
    end
    checks++;
    if ((v >= 0.0 && soft_val(int'(e2), longint'(m2), 10) > v) ||
        (v < 0.0 && soft_val(int'(e2), longint'(m2), 10) < v)) begin
      failures++;
      $display("FAIL L2 %h: magnitude grew", x);
    end
    checks++;
    if (soft_val(int'(e8), longint'(m8), 17) != v) begin
      failures++;
      if (failures < 10) $display("FAIL L8 %h: not exact (e=%0d m=%0d)", x, e8, m8);
    end
  endtask

  initial begin
    check(32'h3F80_0000);
    check(32'hBFFF_FFFF);
    check(32'h0000_0000);
    check(32'h0040_0000);   // subnormal reads as zero
    check(32'h7F7F_FFFF);
    for (int i = 0; i < 4000; i++) begin
      @(posedge clk);
      check(rand_sp(1, 254));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
