// tb_fp32_mul: checks the SP multiplier against a double-precision reference
// rounded to nearest even (hd_ref_pkg::mul_ref) on random normal operands,
// products that overflow or underflow, and zero/infinity/NaN operands.
module tb_fp32_mul;
  import hd_ref_pkg::*;

  logic [31:0] a, b, y, exp_y;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  fp32_mul dut (.a(a), .b(b), .y(y));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] x, logic [31:0] z);
    a = x;
    b = z;
    #1;
    exp_y = mul_ref(x, z);
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h, expected %h", x, z, y, exp_y);
    end
  endtask

  initial begin
    // Directed: exact, ties, specials, overflow, underflow.
    check(32'h3F80_0000, 32'h3F80_0000);  // 1*1
    check(32'h4040_0000, 32'hC000_0000);  // 3*-2
    check(32'h3F80_0001, 32'h3F80_0001);
    check(32'h3FFF_FFFF, 32'h3FFF_FFFF);  // round-up to next binade
    check(32'h7F00_0000, 32'h4000_0000);  // overflow to inf
    check(32'h0080_0000, 32'h3F00_0000);  // underflow flush
    check(32'h0000_0000, 32'hC2F6_0000);
    check(32'h7F80_0000, 32'h3F80_0000);
    check(32'h7F80_0000, 32'h0000_0000);  // inf*0 = NaN
    check(32'h7FC0_1234, 32'h3F80_0000);
    check(32'h3F80_0000, 32'h0012_3456);  // subnormal read as zero
    for (int i = 0; i < 3000; i++) begin
      @(posedge clk);
      check(rand_sp(60, 190), rand_sp(60, 190));
      check(rand_sp(1, 254), rand_sp(1, 254));
      check({rand_bf16(100, 150), 16'h0}, {rand_bf16(100, 150), 16'h0});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
