// tb_hybrid_dot_top: end-to-end test of the hybrid dot product with every
// parameter at its default (n = 16: 12 soft-logic, 2 green and 2 blue hard FP
// products, W = 8).
//
// Operations are streamed with random idle gaps; every result must appear
// with out_valid exactly two cycles after its in_valid and must equal, bit for
// bit, the reference built from hd_ref_pkg: P_g and P_b from SP multiplies and
// adds in chain order, P_l from the soft-tree model with P_g merged, and
// P = P_l + P_b. Each result is also compared with the exact dot product
// (error below 2^-(W-3) of the sum of term magnitudes) and the mean relative
// error is reported. The test counts how often each mechanism of the design
// was exercised and fails if one never was: ACC added, P_g merged, alignment
// dropping bits, a negative (two's-complement) soft sum, a soft product
// outside the SP exponent range, cancellation before normalization, zero
// operands, overflow to infinity, back-to-back operations and idle gaps.
module tb_hybrid_dot_top;
  import hd_pkg::*;
  import hd_ref_pkg::*;

  localparam int N = 16, ALPHA = 12, WF = 8, LAT = 2, NOPS = 4000;

  logic  clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  bf16_t a [N], b [N];
  fp32_t acc, p;
  int checks = 0, failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  hybrid_dot_top dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b), .acc(acc),
                      .out_valid(out_valid), .p(p));

  typedef struct { fp32_t p; int due; real exact; real mags; } exp_t;
  exp_t q[$];

  typedef enum int { M_ACC, M_PG, M_ALIGN, M_NEG, M_EXT, M_CANCEL, M_ZERO, M_OVF,
                     M_B2B, M_GAP, M_NUM } mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"acc_added", "pg_merged", "alignment_drop", "negative_soft_sum",
                               "extended_exponent", "cancellation", "zero_operand", "overflow",
                               "back_to_back", "idle_gap"};
  real rel_sum = 0.0;
  int  rel_n = 0;

  initial begin
    repeat (NOPS * 4 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Build one operation of the given kind and its expected result.
  task automatic make_op(int kind);
    bf16_t sa [], sb [];
    fp32_t pg, pb, pl, pe;
    real exact, mags, t;
    int emin, emax, pemin, pemax;
    emin = 120;
    emax = 134;
    if (kind == 1) begin emin = 100; emax = 150; end
    foreach (a[k]) begin a[k] = rand_bf16(emin, emax); b[k] = rand_bf16(emin, emax); end
    acc = (kind == 2) ? 32'd0 : rand_sp(emin, emax);
    case (kind)
      3: begin  // soft products beyond the SP range that cancel each other
        a[0] = 16'h7100 | 16'($urandom_range(127));
        b[0] = 16'h7100;
        a[1] = {~a[0][15], a[0][14:0]};
        b[1] = b[0];
      end
      4: begin  // zeros and products below the SP range
        for (int k = 0; k < N; k += 3) a[k] = 16'h0000;
        a[1] = 16'h0D00;
        b[1] = 16'h0D00;
      end
      5: begin  // overflow: all terms huge and positive
        foreach (a[k]) begin a[k] = 16'h7F40; b[k] = 16'h7F40; end
        acc = 32'h7F00_0000;
      end
      6: begin  // near cancellation in the soft part: x*y - x*y' with y ~ y'
        for (int k = 0; k < ALPHA; k += 2) begin
          a[k+1] = {~a[k][15], a[k][14:0]};
          b[k+1] = {b[k][15:1], ~b[k][0]};
        end
      end
      default: ;
    endcase
    sa = new[ALPHA];
    sb = new[ALPHA];
    for (int k = 0; k < ALPHA; k++) begin sa[k] = a[k]; sb[k] = b[k]; end
    pg = add_ref(mul_ref(bf16_to_fp32(a[12]), bf16_to_fp32(b[12])),
                 mul_ref(bf16_to_fp32(a[13]), bf16_to_fp32(b[13])));
    pl = soft_dot_ref(sa, sb, pg, WF);
    pb = add_ref(mul_ref(bf16_to_fp32(a[14]), bf16_to_fp32(b[14])),
                 add_ref(mul_ref(bf16_to_fp32(a[15]), bf16_to_fp32(b[15])), acc));
    pe = add_ref(pl, pb);
    // Exact value and mechanism bookkeeping.
    exact = sp_to_real(acc);
    mags  = (exact < 0.0) ? -exact : exact;
    pemin = 1000;
    pemax = -1000;
    for (int k = 0; k < N; k++) begin
      t = bf16_to_real(a[k]) * bf16_to_real(b[k]);
      exact += t;
      mags  += (t < 0.0) ? -t : t;
      if (k < ALPHA && a[k][14:7] != 0 && b[k][14:7] != 0) begin
        int pe_k;
        pe_k = int'(a[k][14:7]) + int'(b[k][14:7]) - 127;
        if (pe_k < pemin) pemin = pe_k;
        if (pe_k > pemax) pemax = pe_k;
        if (pe_k > 254 || pe_k < 1) mech[M_EXT]++;
      end
      if (a[k][14:7] == 0) mech[M_ZERO]++;
    end
    if (!sp_is_zero(acc)) mech[M_ACC]++;
    if (!sp_is_zero(pg)) mech[M_PG]++;
    if (pemax - pemin >= 4) mech[M_ALIGN]++;
    if (pl[31] && !sp_is_zero(pl)) mech[M_NEG]++;
    if (sp_is_inf(pe)) mech[M_OVF]++;
    if (kind == 6 && !sp_is_zero(pl)) mech[M_CANCEL]++;
    q.push_back('{p: pe, due: cycle + LAT, exact: exact, mags: mags});
  endtask

  // Output checker: every result on time and correct.
  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid) begin
        exp_t x;
        checks++;
        if (q.size() == 0) begin
          failures++;
          $display("FAIL unexpected out_valid at cycle %0d", cycle);
        end else begin
          x = q.pop_front();
          if (x.due != cycle) begin
            failures++;
            if (failures < 10) $display("FAIL latency: due %0d seen %0d", x.due, cycle);
          end
          checks++;
          if (p !== x.p) begin
            failures++;
            if (failures < 10) $display("FAIL result %h expected %h at cycle %0d", p, x.p, cycle);
          end
          if (!sp_is_inf(x.p)) begin
            real err;
            err = sp_to_real(p) - x.exact;
            if (err < 0.0) err = -err;
            checks++;
            if (err > x.mags * pow2(-(WF - 3)) + ((x.exact < 0.0) ? -x.exact : x.exact) * pow2(-22)) begin
              failures++;
              if (failures < 10) $display("FAIL accuracy: %g exact %g", sp_to_real(p), x.exact);
            end
            if (x.exact != 0.0) begin
              rel_sum += err / ((x.exact < 0.0) ? -x.exact : x.exact);
              rel_n++;
            end
          end
        end
      end else if (q.size() != 0 && q[0].due <= cycle) begin
        failures++;
        if (failures < 10) $display("FAIL missing result due at cycle %0d", q[0].due);
        void'(q.pop_front());
      end
    end
  end

  initial begin
    bit prev_valid;
    foreach (a[k]) begin a[k] = '0; b[k] = '0; end
    acc = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    prev_valid = 1'b0;
    for (int i = 0; i < NOPS; i++) begin
      @(negedge clk);
      if ($urandom_range(3) == 0) begin
        in_valid = 1'b0;
        mech[M_GAP]++;
        prev_valid = 1'b0;
        @(negedge clk);
      end
      make_op((i % 8 == 7) ? 1 + int'($urandom_range(5)) : ((i % 16 == 3) ? 6 : 0));
      in_valid = 1'b1;
      if (prev_valid) mech[M_B2B]++;
      prev_valid = 1'b1;
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d results never appeared", q.size());
    end
    for (int m = 0; m < M_NUM; m++) begin
      $display("mechanism %-18s exercised %0d times", mech_name[m], mech[m]);
      checks++;
      if (mech[m] == 0) begin
        failures++;
        $display("FAIL mechanism %s never exercised", mech_name[m]);
      end
    end
    if (rel_n > 0) $display("mean relative error vs exact (W=%0d): %e over %0d results", WF, rel_sum / rel_n, rel_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
