// hd_ref_pkg: reference models for the hybrid dot-product testbenches.
//
// The models are written independently of the RTL: floating-point values are
// handled as IEEE double-precision reals (every SP product and every value of
// the soft datapath is exact in a double), and rounding or truncation is
// applied to the double's bit pattern. The soft-datapath models compute each
// quantity from its real value with $floor instead of shifting bit fields.
// Number-handling rules mirrored here: subnormal SP/bfloat16 inputs read as
// zero, SP results below the normal range flush to a signed zero, overflow
// gives infinity, quiet NaN is 0x7FC00000.
package hd_ref_pkg;

  localparam int REF_EXP_ZERO = -512;  // internal zero exponent for EXP_W = 10

  function automatic real pow2(int k);
    real r;
    r = 1.0;
    if (k >= 0) for (int i = 0; i < k; i++) r = r * 2.0;
    else        for (int i = 0; i < -k; i++) r = r / 2.0;
    return r;
  endfunction

  function automatic bit sp_is_nan(logic [31:0] x);
    return (x[30:23] == 8'hFF) && (x[22:0] != 0);
  endfunction
  function automatic bit sp_is_inf(logic [31:0] x);
    return (x[30:23] == 8'hFF) && (x[22:0] == 0);
  endfunction
  function automatic bit sp_is_zero(logic [31:0] x);
    return (x[30:23] == 8'h00);
  endfunction

  // SP bit pattern to real (finite, subnormals read as zero).
  function automatic real sp_to_real(logic [31:0] x);
    real mag;
    if (sp_is_zero(x)) return 0.0;
    mag = (1.0 + real'(x[22:0]) / 8388608.0) * pow2(int'(x[30:23]) - 127);
    return x[31] ? -mag : mag;
  endfunction

  function automatic real bf16_to_real(logic [15:0] x);
    return sp_to_real({x, 16'h0});
  endfunction

  // Nonzero real to SP; rne = 1 rounds to nearest even, 0 truncates.
  function automatic logic [31:0] real_to_sp(real r, bit rne);
    logic [63:0] bits;
    logic        s;
    int          ex;
    logic [52:0] m53;
    logic [24:0] keep;
    logic [28:0] rest;
    bits = $realtobits(r);
    s    = bits[63];
    if (r == 0.0) return {s, 31'd0};
    ex   = int'(bits[62:52]) - 1023 + 127;
    m53  = {1'b1, bits[51:0]};
    keep = {1'b0, m53[52:29]};
    rest = m53[28:0];
    if (rne && ((rest > 29'h1000_0000) || (rest == 29'h1000_0000 && keep[0]))) keep = keep + 1;
    if (keep[24]) begin
      keep = keep >> 1;
      ex   = ex + 1;
    end
    if (ex >= 255) return {s, 8'hFF, 23'd0};
    if (ex <= 0)   return {s, 31'd0};
    return {s, 8'(ex), keep[22:0]};
  endfunction

  function automatic logic [31:0] mul_ref(logic [31:0] a, logic [31:0] b);
    logic s;
    s = a[31] ^ b[31];
    if (sp_is_nan(a) || sp_is_nan(b)) return 32'h7FC0_0000;
    if ((sp_is_inf(a) && sp_is_zero(b)) || (sp_is_zero(a) && sp_is_inf(b))) return 32'h7FC0_0000;
    if (sp_is_inf(a) || sp_is_inf(b)) return {s, 8'hFF, 23'd0};
    if (sp_is_zero(a) || sp_is_zero(b)) return {s, 31'd0};
    return real_to_sp(sp_to_real(a) * sp_to_real(b), 1'b1);
  endfunction

  function automatic logic [31:0] add_ref(logic [31:0] a, logic [31:0] b);
    real s;
    if (sp_is_nan(a) || sp_is_nan(b)) return 32'h7FC0_0000;
    if (sp_is_inf(a) && sp_is_inf(b) && (a[31] != b[31])) return 32'h7FC0_0000;
    if (sp_is_inf(a)) return a;
    if (sp_is_inf(b)) return b;
    if (sp_is_zero(a) && sp_is_zero(b)) return {a[31] & b[31], 31'd0};
    if (sp_is_zero(a)) return b;
    if (sp_is_zero(b)) return a;
    s = sp_to_real(a) + sp_to_real(b);
    if (s == 0.0) return 32'd0;
    return real_to_sp(s, 1'b1);
  endfunction

  // ---- soft datapath: value = m * 2^(e - 127 - F) ----

  // Real value of an internal operand.
  function automatic real soft_val(int e, longint m, int frac);
    if (m == 0) return 0.0;
    return real'(m) * pow2(e - 127 - frac);
  endfunction

  // Truncated, unnormalized bfloat16 product with w fraction bits.
  function automatic void soft_mult_ref(logic [15:0] a, logic [15:0] b, int w,
                                        output int e, output longint m);
    real p;
    if (a[14:7] == 0 || b[14:7] == 0) begin
      e = REF_EXP_ZERO;
      m = 0;
      return;
    end
    e = int'(a[14:7]) + int'(b[14:7]) - 127;
    p = (1.0 + real'(a[6:0]) / 128.0) * (1.0 + real'(b[6:0]) / 128.0);
    m = longint'($floor(p * pow2(w)));
    if (a[15] ^ b[15]) m = -m;
  endfunction

  // One adder-tree node: result has one more fraction bit than the inputs.
  function automatic void soft_add_ref(int e1, longint m1, int e2, longint m2,
                                       output int e, output longint m);
    longint mb, ms;
    int d;
    if (e1 >= e2) begin e = e1; mb = m1; ms = m2; d = e1 - e2; end
    else          begin e = e2; mb = m2; ms = m1; d = e2 - e1; end
    m = 2 * mb + longint'($floor(real'(2 * ms) / pow2(d)));
  endfunction

  // P_g into the format of tree level lvl: leading one right below the sign.
  function automatic void pg_conv_ref(logic [31:0] pg, int lvl, int w,
                                      output int e, output longint m);
    real v;
    if (pg[30:23] == 0) begin
      e = REF_EXP_ZERO;
      m = 0;
      return;
    end
    e = int'(pg[30:23]) - lvl - 1;
    v = sp_to_real(pg);
    if (v < 0.0) v = -v;
    m = longint'($floor(v / pow2(e - 127 - (w + lvl))));
    if (pg[31]) m = -m;
  endfunction

  // Root to SP, truncating.
  function automatic logic [31:0] soft_norm_ref(int e, longint m, int frac);
    if (m == 0) return 32'd0;
    return real_to_sp(soft_val(e, m, frac), 1'b0);
  endfunction

  // Whole soft-logic dot product including the P_g merge.
  // Tree rule: pair in index order, an odd last operand passes up, P_g joins
  // (as the last operand) at the first level whose count is odd.
  function automatic logic [31:0] soft_dot_ref(logic [15:0] a[], logic [15:0] b[],
                                               logic [31:0] pg, int w);
    int     ev[$], en[$];
    longint mv[$], mn[$];
    int     e, lvl;
    longint m;
    bit     merged;
    for (int i = 0; i < a.size(); i++) begin
      soft_mult_ref(a[i], b[i], w, e, m);
      ev.push_back(e);
      mv.push_back(m);
    end
    lvl = 0;
    merged = 0;
    forever begin
      if (!merged && (ev.size() % 2 == 1)) begin
        pg_conv_ref(pg, lvl, w, e, m);
        ev.push_back(e);
        mv.push_back(m);
        merged = 1;
      end
      if (ev.size() == 1) break;
      en.delete();
      mn.delete();
      for (int j = 0; j + 1 < ev.size(); j += 2) begin
        soft_add_ref(ev[j], mv[j], ev[j+1], mv[j+1], e, m);
        en.push_back(e);
        mn.push_back(m);
      end
      if (ev.size() % 2 == 1) begin
        en.push_back(ev[ev.size()-1]);
        mn.push_back(2 * mv[mv.size()-1]);
      end
      ev = en;
      mv = mn;
      lvl++;
    end
    return soft_norm_ref(ev[0], mv[0], w + lvl);
  endfunction

  // Whole hybrid dot product: a[0..alpha-1] soft, then bg green and bb blue
  // elements in the hard FP chains, P = P_l + P_b.
  function automatic logic [31:0] hybrid_ref(logic [15:0] a[], logic [15:0] b[], logic [31:0] acc,
                                             int alpha, int bg, int bb, int w);
    logic [15:0] sa[], sb[];
    logic [31:0] pg, pb, pl;
    sa = new[alpha];
    sb = new[alpha];
    for (int k = 0; k < alpha; k++) begin sa[k] = a[k]; sb[k] = b[k]; end
    pg = mul_ref({a[alpha+bg-1], 16'h0}, {b[alpha+bg-1], 16'h0});
    for (int k = alpha + bg - 2; k >= alpha; k--)
      pg = add_ref(mul_ref({a[k], 16'h0}, {b[k], 16'h0}), pg);
    pb = acc;
    for (int k = alpha + bg + bb - 1; k >= alpha + bg; k--)
      pb = add_ref(mul_ref({a[k], 16'h0}, {b[k], 16'h0}), pb);
    pl = soft_dot_ref(sa, sb, pg, w);
    return add_ref(pl, pb);
  endfunction

  // Typical bfloat16 + SP dot product: SP products accumulated in SP in order.
  function automatic logic [31:0] bf16_sp_chain_ref(logic [15:0] a[], logic [15:0] b[], logic [31:0] acc);
    logic [31:0] s;
    s = acc;
    for (int k = a.size() - 1; k >= 0; k--)
      s = add_ref(mul_ref({a[k], 16'h0}, {b[k], 16'h0}), s);
    return s;
  endfunction

  // Real to bfloat16, rounded to nearest even (finite, normal range).
  function automatic logic [15:0] real_to_bf16(real r);
    logic [31:0] sp;
    logic [16:0] t;
    sp = real_to_sp(r, 1'b1);
    t  = {1'b0, sp[31:16]};
    if (sp[15] && (sp[14:0] != 0 || sp[16])) t = t + 1;
    return t[15:0];
  endfunction

  // ---- random stimulus ----

  function automatic logic [15:0] rand_bf16(int emin, int emax);
    int ex;
    ex = emin + int'($urandom_range(emax - emin));
    return {1'($urandom), 8'(ex), 7'($urandom)};
  endfunction

  function automatic logic [31:0] rand_sp(int emin, int emax);
    int ex;
    ex = emin + int'($urandom_range(emax - emin));
    return {1'($urandom), 8'(ex), 23'($urandom)};
  endfunction

endpackage
