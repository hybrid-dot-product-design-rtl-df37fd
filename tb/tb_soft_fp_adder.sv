// tb_soft_fp_adder: checks one adder-tree node (IN_W = 11, the first level at
// W = 8) against the real-valued reference: the result exponent is the larger
// one and the 13-bit mantissa is 2*m_big + floor(2*m_small / 2^d). Covers
// equal exponents, shifts that drop bits, shifts beyond the width, negative
// operands, zero operands and full-scale values.
module tb_soft_fp_adder;
  import hd_ref_pkg::*;

  logic signed [9:0]  ea, eb, e;
  logic signed [10:0] ma, mb;
  logic signed [12:0] m;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  soft_fp_adder #(.IN_W(11), .EXP_W(10)) dut (.ea(ea), .ma(ma), .eb(eb), .mb(mb), .e(e), .m(m));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int xe, int xm, int ze, int zm);
    int ee;
    longint mm;
    ea = 10'(xe);
    ma = 11'(xm);
    eb = 10'(ze);
    mb = 11'(zm);
    #1;
    soft_add_ref(xe, longint'(xm), ze, longint'(zm), ee, mm);
    checks++;
    if (int'(e) != ee || longint'(m) != mm) begin
      failures++;
      if (failures < 10) $display("FAIL (%0d,%0d)+(%0d,%0d): e=%0d m=%0d expected e=%0d m=%0d",
                                  xe, xm, ze, zm, e, m, ee, mm);
    end
  endtask

  initial begin
    check(127, 256, 127, 256);
    check(127, 1023, 127, 1023);       // largest positive sum
    check(127, -1024, 127, -1024);     // most negative sum
    check(130, 300, 127, -301);        // shift by 3, negative truncation
    check(127, 5, 160, -700);          // shifted far out
    check(-512, 0, 100, 513);          // zero operand
    check(-512, 0, -512, 0);
    for (int i = 0; i < 5000; i++) begin
      @(posedge clk);
      check(100 + int'($urandom_range(40)), int'($urandom_range(2047)) - 1024,
            100 + int'($urandom_range(40)), int'($urandom_range(2047)) - 1024);
      check(-300 + int'($urandom_range(700)), int'($urandom_range(2047)) - 1024,
            -300 + int'($urandom_range(700)), int'($urandom_range(2047)) - 1024);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
