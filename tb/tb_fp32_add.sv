// tb_fp32_add: checks the SP adder against a double-precision reference
// rounded to nearest even (hd_ref_pkg::add_ref): random operands with small
// and large exponent differences, near-cancellation, ties, overflow,
// underflow, zeros, infinities and NaN.
module tb_fp32_add;
  import hd_ref_pkg::*;

  logic [31:0] a, b, y, exp_y;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  fp32_add dut (.a(a), .b(b), .y(y));

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
    exp_y = add_ref(x, z);
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h = %h, expected %h", x, z, y, exp_y);
    end
  endtask

  initial begin
    logic [31:0] x;
    check(32'h3F80_0000, 32'h3F80_0000);
    check(32'h3F80_0000, 32'hBF80_0000);  // exact cancellation: +0
    check(32'h3F80_0000, 32'h3380_0000);  // 1 + 2^-24: tie, stays 1
    check(32'h3F80_0001, 32'h3380_0000);  // tie, rounds to even (up)
    check(32'h3F80_0000, 32'hB380_0000);
    check(32'h7F7F_FFFF, 32'h7F7F_FFFF);  // overflow
    check(32'h0080_0001, 32'h8080_0000);  // underflow flush
    check(32'h8000_0000, 32'h8000_0000);  // -0 + -0
    check(32'h7F80_0000, 32'hFF80_0000);  // inf - inf
    check(32'h7F80_0000, 32'h4000_0000);
    check(32'h4000_0000, 32'h0000_0000);
    check(32'h7FC0_0000, 32'h4000_0000);
    for (int i = 0; i < 3000; i++) begin
      @(posedge clk);
      check(rand_sp(100, 150), rand_sp(100, 150));
      check(rand_sp(120, 130), rand_sp(120, 130));
      x = rand_sp(1, 253);
      check(x, {~x[31], x[30:23], 23'($urandom)});  // heavy cancellation
      check(x, {~x[31], x[30:23] + 8'd1, 23'($urandom)});
      check(rand_sp(1, 254), rand_sp(1, 254));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
