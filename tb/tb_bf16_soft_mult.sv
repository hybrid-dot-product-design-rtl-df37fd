// tb_bf16_soft_mult: checks the fused bfloat16 multiplier at W = 8 and W = 7
// against the real-valued reference (exact product truncated to W fraction
// bits, sign applied, exponent ea+eb-127), including products far outside
// the SP range (extended exponent) and zero operands.
module tb_bf16_soft_mult;
  import hd_pkg::*;
  import hd_ref_pkg::*;

  bf16_t a, b;
  logic signed [9:0]  e8, e7;
  logic signed [10:0] m8;
  logic signed [9:0]  m7;
  int checks = 0, failures = 0;
  int n_ext = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  bf16_soft_mult #(.W(8), .EXP_W(10)) dut8 (.a(a), .b(b), .e(e8), .m(m8));
  bf16_soft_mult #(.W(7), .EXP_W(10)) dut7 (.a(a), .b(b), .e(e7), .m(m7));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bf16_t x, bf16_t z);
    int ee;
    longint mm;
    a = x;
    b = z;
    #1;
    soft_mult_ref(x, z, 8, ee, mm);
    checks++;
    if (int'(e8) != ee || longint'(m8) != mm) begin
      failures++;
      if (failures < 10) $display("FAIL W=8 %h*%h: e=%0d m=%0d expected e=%0d m=%0d", x, z, e8, m8, ee, mm);
    end
    if (ee > 254 || (ee < 1 && mm != 0)) n_ext++;
    soft_mult_ref(x, z, 7, ee, mm);
    checks++;
    if (int'(e7) != ee || longint'(m7) != mm) begin
      failures++;
      if (failures < 10) $display("FAIL W=7 %h*%h: e=%0d m=%0d expected e=%0d m=%0d", x, z, e7, m7, ee, mm);
    end
  endtask

  initial begin
    check(16'h3F80, 16'h3F80);           // 1*1
    check(16'h3FFF, 16'hBFFF);           // largest mantissas, negative
    check(16'h0000, 16'h4000);           // zero
    check(16'h7F00, 16'h7F00);           // exponent beyond SP range
    check(16'h0080, 16'h0080);           // below SP range
    for (int i = 0; i < 4000; i++) begin
      @(posedge clk);
      check(rand_bf16(1, 254), rand_bf16(1, 254));
      check(rand_bf16(120, 135), rand_bf16(120, 135));
    end
    checks++;
    if (n_ext == 0) begin
      failures++;
      $display("FAIL: no product outside the SP exponent range was exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
