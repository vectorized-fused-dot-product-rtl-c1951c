// tb_vfdp_accuracy: forward-error measurement of the whole unit on random
// floating-point dot products.
//
// Four configurations are run through the top at its default size:
// FP16 and BF16 products (16 terms) with FP32 accumulation, and E5M2 and
// E4M3 products (32 terms) with FP16 accumulation. Each operation starts a
// new accumulation from +0 (acc_load = 1, c_in = 0), so d is the dot product
// in the accumulation format. Input bits are independent and uniformly
// random, so every exponent is equally likely. Operations are left out
// when the unit's output or the correctly rounded exact value is infinite
// or NaN, or when the exact value is zero.
//
// The exact dot product is formed from the decoded inputs with compensated
// (Neumaier) summation in double precision. Two baselines are formed from
// the same exact products in the output format: recursive summation (one
// product after another into one accumulator) and pairwise summation (a
// balanced binary tree), each addition correctly rounded. Operations where
// a baseline overflows are left out as well. For every kept operation the
// testbench records the error in units in the last place of the output
// format at the exact value, for the unit, both baselines and the correctly
// rounded exact value. It checks that:
//   - every kept result lies within the error bound of the datapath. That
//     bound is (n - 1) x 2^(g - p - 1) for alignment, where n is the number
//     of terms, g the largest product exponent and p the fraction bits of an
//     aligned term (29 or 13). To it are added half an FP32 ulp for the
//     normalizer and, for FP16 output, half an FP16 ulp for the
//     accumulator;
//   - for every configuration with at least 1000 kept results, the average
//     error is below 0.5 ulp and not better than correct rounding, it is not
//     above either baseline, and the unit exceeds 0.5 ulp no more often
//     than either baseline.
// The averages are printed next to the values reported for this
// architecture, together with points of the distribution P(error > x) for
// x = 0.5, 1, 2 and 4 ulp. The comparison with the reported values is for
// information only: the random input streams differ. With uniformly random
// bits almost every E5M2 sum overflows FP16, and the few finite E5M2
// results are not a comparable sample.
//
// One operation is issued per clock. Results are matched in order on
// d_valid, which must arrive 5 clocks after in_valid.
//
// The depths and formats of the four configurations, and the input
// distribution, follow the accuracy evaluation of the architecture. The
// two baselines follow the comparison made there. The sample count (N_OPS
// per configuration), the exact summation method, the ulp thresholds and
// the pass limits are this testbench's own choices.
module tb_vfdp_accuracy;
  import fdp_pkg::*;
  import tb_fp_pkg::*;

  localparam int K     = 16;
  localparam int N_OPS = 100000;
  localparam int N_CFG = 4;

  logic              clk = 0, rst_n = 0;
  logic              in_valid = 0;
  in_fmt_e           in_fmt = FMT_FP16;
  logic              a_signed = 0, b_signed = 0;
  out_fmt_e          out_fmt = OUT_FP32;
  logic              acc_load = 1;
  logic [31:0]       c_in = 0;
  logic [16*K-1:0]   a = '0, b = '0;
  logic              dp_valid, d_valid;
  logic [31:0]       dp_result, d;

  vfdp_top dut (.*);

  int checks = 0, failures = 0, cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    wait (cycle == N_CFG * N_OPS + 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  typedef struct {
    in_fmt_e  f;
    out_fmt_e o;
    string    name;
    real      paper_rec;
    real      paper_pw;
    real      paper_ours;
    real      paper_exact;
  } cfg_t;

  cfg_t cfg [N_CFG];

  typedef struct {
    int  issue;
    int  c;
    bit  skip;    // NaN or infinite input, or exact zero
    real exact;
    real align_bound;   // (n - 1) x 2^(g - p - 1)
    real rec;           // recursive summation in the accumulation format
    real pw;            // pairwise summation in the accumulation format
    bit  base_bad;      // a baseline overflowed
  } op_t;

  op_t q [$];

  real sum_err  [N_CFG];
  real sum_cr   [N_CFG];
  real sum_rec  [N_CFG];
  real sum_pw   [N_CFG];
  int  kept     [N_CFG];
  // Points of the complementary distribution P(ulp error > x).
  localparam int N_TH = 4;
  real th [N_TH] = '{0.5, 1.0, 2.0, 4.0};
  int  over_unit [N_CFG][N_TH];
  int  over_rec  [N_CFG][N_TH];
  int  over_pw   [N_CFG][N_TH];
  int  done_ops = 0;

  // Unit in the last place of the output format at x (x != 0).
  function automatic real ulp_of(real x, out_fmt_e o);
    int e;
    e = ilog2(x < 0.0 ? -x : x);
    if (o == OUT_FP32) begin
      if (e < -126) e = -126;
      return pow2(e - 23);
    end
    if (e < -14) e = -14;
    return pow2(e - 10);
  endfunction

  function automatic real out_to_real(logic [31:0] x, out_fmt_e o);
    return (o == OUT_FP32) ? fp32_to_real(x) : fp16_to_real(x[15:0]);
  endfunction

  function automatic bit out_nonfinite(logic [31:0] x, out_fmt_e o);
    return (o == OUT_FP32) ? (x[30:23] == 8'hff) : (x[14:10] == 5'h1f);
  endfunction

  // x rounded to nearest even in the accumulation format o. A sum of two
  // values formed in double and rounded once more is correctly rounded,
  // since double carries more than twice the bits of FP32 plus two.
  function automatic real round_to(real x, out_fmt_e o, inout bit bad);
    logic [31:0] r;
    r = real_to_fp(x, o == OUT_FP32 ? 8 : 5, o == OUT_FP32 ? 23 : 10);
    if (out_nonfinite(r, o)) bad = 1;
    return out_to_real(r, o);
  endfunction

  // Exact dot product of the operands in format f, by compensated summation,
  // and the recursive and pairwise sums in the accumulation format o.
  function automatic op_t exact_dp(in_fmt_e f, out_fmt_e o, logic [16*K-1:0] va, logic [16*K-1:0] vb);
    op_t  r;
    int   n, w;
    real  s, comp, p, t;
    real  terms [2*K];
    dec_t da, db;
    int   g, p_bits;
    bit   any;
    n = (f == FMT_FP16 || f == FMT_BF16) ? K : 2 * K;
    w = (n == K) ? 16 : 8;
    s = 0.0; comp = 0.0;
    r.skip = 0;
    r.base_bad = 0;
    any = 0;
    g = 0;
    p_bits = (n == K) ? 29 : 13;
    for (int i = 0; i < n; i++) begin
      da = decode_fmt(int'(f), 16'(va >> (w * i)));
      db = decode_fmt(int'(f), 16'(vb >> (w * i)));
      if (da.nan || db.nan || da.inf || db.inf) r.skip = 1;
      p = da.v * db.v;   // exact: at most 22 significant bits
      terms[i] = p;
      if (p != 0.0) begin
        if (!any || ilog2(da.v < 0.0 ? -da.v : da.v) + ilog2(db.v < 0.0 ? -db.v : db.v) > g)
          g = ilog2(da.v < 0.0 ? -da.v : da.v) + ilog2(db.v < 0.0 ? -db.v : db.v);
        any = 1;
      end
      t = s + p;
      if ((s < 0.0 ? -s : s) >= (p < 0.0 ? -p : p)) comp += (s - t) + p;
      else                                           comp += (p - t) + s;
      s = t;
    end
    r.exact = s + comp;
    r.rec = terms[0];
    for (int i = 1; i < n; i++) r.rec = round_to(r.rec + terms[i], o, r.base_bad);
    for (int len = n; len > 1; len /= 2)
      for (int i = 0; i < len / 2; i++) terms[i] = round_to(terms[2*i] + terms[2*i+1], o, r.base_bad);
    r.pw = terms[0];
    r.align_bound = real'(n - 1) * pow2(g - p_bits - 1);
    if (r.exact == 0.0) r.skip = 1;
    return r;
  endfunction

  initial begin
    cfg[0] = '{FMT_FP16, OUT_FP32, "FP16 x16, FP32 acc", 1.373, 1.310, 0.259, 0.251};
    cfg[1] = '{FMT_BF16, OUT_FP32, "BF16 x16, FP32 acc", 0.186, 0.182, 0.145, 0.145};
    cfg[2] = '{FMT_E5M2, OUT_FP16, "E5M2 x32, FP16 acc", 1.160, 1.058, 0.406, 0.246};
    cfg[3] = '{FMT_E4M3, OUT_FP16, "E4M3 x32, FP16 acc", 2.690, 1.744, 0.490, 0.250};
    for (int c = 0; c < N_CFG; c++) begin
      sum_err[c] = 0.0; sum_cr[c] = 0.0; sum_rec[c] = 0.0; sum_pw[c] = 0.0; kept[c] = 0;
      for (int k = 0; k < N_TH; k++) begin over_unit[c][k] = 0; over_rec[c][k] = 0; over_pw[c][k] = 0; end
    end
  end

  // Drive: one operation per clock, configurations one after another.
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < N_CFG; c++) begin
      for (int n = 0; n < N_OPS; n++) begin
        op_t o;
        @(negedge clk);
        in_valid = 1;
        in_fmt   = cfg[c].f;
        out_fmt  = cfg[c].o;
        acc_load = 1;
        c_in     = 32'd0;
        for (int j = 0; j < K / 2; j++) begin
          a[32*j +: 32] = $urandom;
          b[32*j +: 32] = $urandom;
        end
        o       = exact_dp(in_fmt, out_fmt, a, b);
        o.c     = c;
        o.issue = cycle;
        q.push_back(o);
      end
    end
    @(negedge clk);
    in_valid = 0;
  end

  // Collect errors.
  always @(posedge clk) begin
    #1;
    if (d_valid) begin
      op_t o;
      real         v, u, cr, err, bound, mag, e_rec, e_pw;
      logic [31:0] cr_bits;
      if (q.size() == 0) check(0, "unexpected d_valid");
      else begin
        o = q.pop_front();
        if (cycle - o.issue != 5) check(0, "accumulation latency");
        cr_bits = real_to_fp(o.exact, cfg[o.c].o == OUT_FP32 ? 8 : 5, cfg[o.c].o == OUT_FP32 ? 23 : 10);
        if (!o.skip && !o.base_bad && !out_nonfinite(d, cfg[o.c].o) && !out_nonfinite(cr_bits, cfg[o.c].o)) begin
          u  = ulp_of(o.exact, cfg[o.c].o);
          v  = out_to_real(d, cfg[o.c].o);
          cr = out_to_real(cr_bits, cfg[o.c].o);
          err = (v > o.exact) ? v - o.exact : o.exact - v;
          mag = (v < 0.0 ? -v : v) + (o.exact < 0.0 ? -o.exact : o.exact);
          bound = o.align_bound + 0.5 * ulp_of(mag, OUT_FP32);
          if (cfg[o.c].o == OUT_FP16) bound += 0.5 * ulp_of(mag, OUT_FP16);
          check(err <= bound, {cfg[o.c].name, ": error above the datapath bound"});
          if (err > bound && failures < 10)
            $display("  exact=%g d=%g err=%g bound=%g", o.exact, v, err, bound);
          sum_err[o.c] += err / u;
          sum_cr[o.c]  += (cr > o.exact ? cr - o.exact : o.exact - cr) / u;
          e_rec = (o.rec > o.exact ? o.rec - o.exact : o.exact - o.rec) / u;
          e_pw  = (o.pw  > o.exact ? o.pw  - o.exact : o.exact - o.pw ) / u;
          sum_rec[o.c] += e_rec;
          sum_pw[o.c]  += e_pw;
          for (int k = 0; k < N_TH; k++) begin
            if (err / u > th[k]) over_unit[o.c][k]++;
            if (e_rec   > th[k]) over_rec[o.c][k]++;
            if (e_pw    > th[k]) over_pw[o.c][k]++;
          end
          kept[o.c]++;
        end
        done_ops++;
        if (done_ops == N_CFG * N_OPS) finish_report();
      end
    end
  end

  task automatic finish_report();
    real m_ours, m_cr, m_rec, m_pw;
    $display("configuration            kept  recursive pairwise   unit    exact   (reported: rec / pw / unit / exact)");
    for (int c = 0; c < N_CFG; c++) begin
      m_ours = (kept[c] > 0) ? sum_err[c] / real'(kept[c]) : 1.0;
      m_cr   = (kept[c] > 0) ? sum_cr[c]  / real'(kept[c]) : 1.0;
      m_rec  = (kept[c] > 0) ? sum_rec[c] / real'(kept[c]) : 1.0;
      m_pw   = (kept[c] > 0) ? sum_pw[c]  / real'(kept[c]) : 1.0;
      $display("%-22s %7d   %6.3f   %6.3f   %6.3f  %6.3f   (%5.3f / %5.3f / %5.3f / %5.3f)", cfg[c].name,
               kept[c], m_rec, m_pw, m_ours, m_cr, cfg[c].paper_rec, cfg[c].paper_pw, cfg[c].paper_ours,
               cfg[c].paper_exact);
      for (int k = 0; k < N_TH; k++)
        $display("    P(error > %3.1f ulp): recursive %8.5f  pairwise %8.5f  unit %8.5f", th[k],
                 real'(over_rec[c][k]) / real'(kept[c] > 0 ? kept[c] : 1),
                 real'(over_pw[c][k])  / real'(kept[c] > 0 ? kept[c] : 1),
                 real'(over_unit[c][k]) / real'(kept[c] > 0 ? kept[c] : 1));
      check(kept[c] > 0, {cfg[c].name, ": no finite results"});
      if (kept[c] >= 1000) begin
        check(m_ours < 0.5, {cfg[c].name, ": average error of the unit not below 0.5 ulp"});
        check(m_cr <= m_ours + 1e-9, {cfg[c].name, ": correctly rounded result worse than the unit"});
        check(m_ours <= m_rec && m_ours <= m_pw, {cfg[c].name, ": unit less accurate than a baseline"});
        check(over_unit[c][0] <= over_rec[c][0] && over_unit[c][0] <= over_pw[c][0],
              {cfg[c].name, ": unit more often above 0.5 ulp than a baseline"});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

endmodule
