// tb_soft_normalize: checks the final normalization (IN_W = 19, FRAC = 12, the
// W = 8 root format) against the reference: the exact root value truncated to
// SP, flushed to zero below the normal range, infinity above it.
module tb_soft_normalize;
  import hd_ref_pkg::*;

  logic signed [9:0]  e;
  logic signed [18:0] m;
  logic [31:0] y, y27;
  logic signed [26:0] mw;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  soft_normalize #(.IN_W(19), .FRAC(12), .EXP_W(10)) dut (.e(e), .m(m), .y(y));
  // A root wider than 24 bits: bits below the SP fraction are truncated.
  soft_normalize #(.IN_W(27), .FRAC(16), .EXP_W(10)) dut27 (.e(e), .m(mw), .y(y27));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int xe, int xm, int xw);
    logic [31:0] want;
    e  = 10'(xe);
    m  = 19'(xm);
    mw = 27'(xw);
    #1;
    want = soft_norm_ref(xe, longint'(xm), 12);
    checks++;
    if (y !== want) begin
      failures++;
      if (failures < 10) $display("FAIL e=%0d m=%0d: %h expected %h", xe, xm, y, want);
    end
    want = soft_norm_ref(xe, longint'(xw), 16);
    checks++;
    if (y27 !== want) begin
      failures++;
      if (failures < 10) $display("FAIL wide e=%0d m=%0d: %h expected %h", xe, xw, y27, want);
    end
  endtask

  initial begin
    check(127, 4096, 1 << 16);         // 1.0
    check(127, -4096, -(1 << 16));
    check(127, 0, 0);
    check(127, -262144, -67108864);    // most negative
    check(127, 262143, 67108863);
    check(380, 200000, 50000000);      // overflow to infinity
    check(-100, 3, 5);                 // underflow flush
    for (int i = 0; i < 5000; i++) begin
      @(posedge clk);
      check(60 + int'($urandom_range(140)), int'($urandom_range(524287)) - 262144,
            int'($urandom_range(134217727)) - 67108864);
      check(int'($urandom_range(400)) - 10, int'($urandom_range(63)) - 32,
            int'($urandom_range(1023)) - 512);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
