// tb_table1_accuracy: accuracy experiment with 8 soft-logic and 4 hard FP
// products (2 green, 2 blue) at W = 7, 8 and 9, compared with a typical
// bfloat16 + SP dot product (SP products accumulated in SP).
//
// Data: each element is drawn as a real number with a random sign, a random
// fraction and an exponent uniform in [-ES, ES] for ES = 5, 10 and 20, then
// rounded to bfloat16; ACC is zero. Errors are measured against the exact dot
// product of the unrounded reals, so bfloat16 input rounding is part of both
// implementations' error. Reported: the mean relative error and the
// aggregate error sum|err| / sum|exact| per configuration.
// Checked: every hybrid result bit for bit against hd_ref_pkg::hybrid_ref,
// the aggregate error falling as W grows, and the bfloat16 + SP chain never
// less accurate than the hybrid at W = 7.
module tb_table1_accuracy;
  import hd_pkg::*;
  import hd_ref_pkg::*;

  localparam int N = 12, ALPHA = 8, NV = 1500;

  logic  clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic  v7, v8, v9;
  bf16_t a [N], b [N];
  fp32_t acc = '0, p7, p8, p9;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hybrid_dot_top #(.ALPHA(ALPHA), .BETA_G(2), .BETA_B(2), .W(7)) dut7 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b), .acc(acc), .out_valid(v7), .p(p7));
  hybrid_dot_top #(.ALPHA(ALPHA), .BETA_G(2), .BETA_B(2), .W(8)) dut8 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b), .acc(acc), .out_valid(v8), .p(p8));
  hybrid_dot_top #(.ALPHA(ALPHA), .BETA_G(2), .BETA_B(2), .W(9)) dut9 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b), .acc(acc), .out_valid(v9), .p(p9));

  initial begin
    repeat (3 * NV * 3 + 50) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rand_val(int es);
    real f;
    f = 1.0 + real'($urandom_range(1 << 20)) / real'(1 << 20);
    f = f * pow2(int'($urandom_range(2 * es)) - es);
    return $urandom_range(1) ? -f : f;
  endfunction

  function automatic real absr(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  initial begin
    int es_list [3] = '{5, 10, 20};
    real xa [N], xb [N];
    bf16_t da [], db [];
    real exact, rel [4], agg_err [4], agg_ref;
    fp32_t got [4];
    da = new[N];
    db = new[N];
    foreach (a[k]) begin a[k] = '0; b[k] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    foreach (es_list[s]) begin
      foreach (rel[c]) begin rel[c] = 0.0; agg_err[c] = 0.0; end
      agg_ref = 0.0;
      for (int i = 0; i < NV; i++) begin
        @(negedge clk);
        exact = 0.0;
        for (int k = 0; k < N; k++) begin
          xa[k] = rand_val(es_list[s]);
          xb[k] = rand_val(es_list[s]);
          exact += xa[k] * xb[k];
          a[k] = real_to_bf16(xa[k]);
          b[k] = real_to_bf16(xb[k]);
          da[k] = a[k];
          db[k] = b[k];
        end
        in_valid = 1'b1;
        @(negedge clk);
        in_valid = 1'b0;
        @(negedge clk);
        got[0] = p7;
        got[1] = p8;
        got[2] = p9;
        got[3] = bf16_sp_chain_ref(da, db, 32'd0);
        for (int c = 0; c < 3; c++) begin
          checks++;
          if (got[c] !== hybrid_ref(da, db, 32'd0, ALPHA, 2, 2, 7 + c)) begin
            failures++;
            if (failures < 10) $display("FAIL W=%0d: %h expected %h", 7 + c, got[c],
                                        hybrid_ref(da, db, 32'd0, ALPHA, 2, 2, 7 + c));
          end
        end
        if (exact != 0.0) begin
          for (int c = 0; c < 4; c++) begin
            rel[c]     += absr(sp_to_real(got[c]) - exact) / absr(exact);
            agg_err[c] += absr(sp_to_real(got[c]) - exact);
          end
          agg_ref += absr(exact);
        end
      end
      $display("ES=%0d  mean rel. error: W=7 %e  W=8 %e  W=9 %e  bf16+SP %e", es_list[s],
               rel[0] / NV, rel[1] / NV, rel[2] / NV, rel[3] / NV);
      $display("ES=%0d  aggregate error: W=7 %e  W=8 %e  W=9 %e  bf16+SP %e", es_list[s],
               agg_err[0] / agg_ref, agg_err[1] / agg_ref, agg_err[2] / agg_ref, agg_err[3] / agg_ref);
      checks++;
      if (!(agg_err[0] > agg_err[1] && agg_err[1] > agg_err[2])) begin
        failures++;
        $display("FAIL ES=%0d: error does not fall as W grows", es_list[s]);
      end
      checks++;
      if (!(agg_err[3] <= agg_err[0])) begin
        failures++;
        $display("FAIL ES=%0d: bf16+SP less accurate than the hybrid at W=7", es_list[s]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
