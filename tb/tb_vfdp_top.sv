// tb_vfdp_top: end-to-end test of the accumulating dot product unit.
//
// Runs the top at its default size (K = 16: 16 FP16/BF16 terms or 32
// E4M3/E5M2/FP4/INT8 terms per operation) with one operation per clock and
// random gaps. Every operation draws an input format, an accumulator
// format, INT8 signedness and whether to reload the accumulator.
//
// Reference: each element is decoded to a real; each non-zero product gets
// the exponent ilog2|a| + ilog2|b|; g is the largest. Every product is
// scaled by 2^(F - g) (F = 29 fraction bits for 16-bit inputs, 13 for 8-bit
// inputs), rounded to the nearest integer (ties to even) in magnitude and
// signed; the integers are added exactly and the sum x 2^(g - F) is rounded
// once to FP32. INT8 dot products are exact integer sums. NaN inputs, inf x 0
// and infinities of both signs give NaN; other infinities give infinity. The
// accumulator model adds each reference result to the previous value in
// FP32, FP16 or INT32 with one rounding.
//
// Checked: dp_result 4 cycles and d 5 cycles after the operation entered,
// both bit-exact. Counted, and each required at least once: every input
// format, both INT8 signedness cases, every accumulator format, reloads and
// back-to-back accumulation, FP16 subnormal inputs, products rounded or
// shifted out entirely in alignment, cancellation to zero, NaN and infinity
// results, FP32 subnormal results and a maximum won by the second-term
// exponent tree.
//
// The stimulus mix and the reference arithmetic are this testbench's own;
// the formats, widths and rounding points checked follow the design
// description and the choices stated in the module under test.
module tb_vfdp_top;
  import fdp_pkg::*;
  import tb_fp_pkg::*;

  localparam int K     = 16;
  localparam int N_OPS = 6000;

  logic              clk = 0, rst_n = 0;
  logic              in_valid = 0;
  in_fmt_e           in_fmt = FMT_FP16;
  logic              a_signed = 0, b_signed = 0;
  out_fmt_e          out_fmt = OUT_FP32;
  logic              acc_load = 0;
  logic [31:0]       c_in = 0;
  logic [16*K-1:0]   a = '0, b = '0;
  logic              dp_valid, d_valid;
  logic [31:0]       dp_result, d;

  vfdp_top dut (.*);

  int checks = 0, failures = 0, cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    wait (cycle == 20 * N_OPS + 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what, logic [31:0] got, logic [31:0] e);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s at cycle %0d: got %h expected %h", what, cycle, got, e);
    end
  endtask

  // Mechanism counters.
  typedef enum int {
    M_INT8_S, M_INT8_U, M_E4M3, M_E5M2, M_FP16, M_BF16, M_FP4,
    M_OUT_FP32, M_OUT_FP16, M_OUT_INT32, M_LOAD, M_BACK_TO_BACK,
    M_SUBNORMAL_IN, M_ROUNDED_TERM, M_SHIFTED_OUT, M_CANCEL_ZERO,
    M_NAN, M_INF, M_SUBNORMAL_OUT, M_HIGH_TREE_MAX, M_NUM
  } mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"int8 signed", "int8 unsigned", "E4M3", "E5M2", "FP16", "BF16", "FP4",
                               "acc FP32", "acc FP16", "acc INT32", "acc reload", "back-to-back acc",
                               "subnormal input", "term rounded in alignment", "term shifted out",
                               "cancellation to zero", "NaN result", "infinity result",
                               "subnormal FP32 result", "max from second-term tree"};

  // ------------------------------------------------------------ reference
  function automatic logic [31:0] ref_dp(in_fmt_e f, logic [16*K-1:0] va, logic [16*K-1:0] vb,
                                         logic sa, logic sb);
    int   nt, w, fr, g, gi;
    real  s, p, x, q;
    bit   nan, pinf, ninf, any;
    dec_t da, db;
    int   e [2*K];
    real  pv [2*K];
    bit   nz [2*K];
    if (f == FMT_INT8) begin
      longint acc;
      acc = 0;
      for (int t = 0; t < 2 * K; t++) begin
        longint x1, y1;
        x1 = sa ? longint'($signed(va[8*t +: 8])) : longint'(va[8*t +: 8]);
        y1 = sb ? longint'($signed(vb[8*t +: 8])) : longint'(vb[8*t +: 8]);
        acc += x1 * y1;
      end
      return 32'(acc);
    end
    w  = (f == FMT_FP16 || f == FMT_BF16) ? 16 : 8;
    nt = 16 * K / w;
    fr = (w == 16) ? 29 : 13;
    nan = 0; pinf = 0; ninf = 0; any = 0; g = -100000; gi = 0;
    for (int t = 0; t < nt; t++) begin
      if (w == 16) begin
        da = decode_fmt(int'(f), va[16*t +: 16]);
        db = decode_fmt(int'(f), vb[16*t +: 16]);
        if (f == FMT_FP16 && va[16*t+10 +: 5] == 0 && va[16*t +: 10] != 0) mech[M_SUBNORMAL_IN]++;
      end else if (f == FMT_FP4) begin
        da = decode_fmt(int'(f), {12'd0, va[4*t +: 4]});
        db = decode_fmt(int'(f), {12'd0, vb[4*t +: 4]});
      end else begin
        da = decode_fmt(int'(f), {8'd0, va[8*t +: 8]});
        db = decode_fmt(int'(f), {8'd0, vb[8*t +: 8]});
      end
      nz[t] = 0;
      if (da.nan || db.nan || (da.inf && db.zero) || (da.zero && db.inf)) nan = 1;
      else if (da.inf || db.inf) begin
        if (da.sign ^ db.sign) ninf = 1; else pinf = 1;
      end else if (!da.zero && !db.zero) begin
        nz[t] = 1;
        pv[t] = da.v * db.v;
        e[t]  = ilog2(da.v < 0 ? -da.v : da.v) + ilog2(db.v < 0 ? -db.v : db.v);
        if (!any || e[t] > g) begin g = e[t]; gi = t; end
        any = 1;
      end
    end
    if (nan || (pinf && ninf)) begin mech[M_NAN]++; return 32'h7fc0_0000; end
    if (pinf) begin mech[M_INF]++; return 32'h7f80_0000; end
    if (ninf) begin mech[M_INF]++; return 32'hff80_0000; end
    if (!any) return 32'h0000_0000;
    if (w == 8 && gi % 2 == 1) begin
      bit lower_tie;
      lower_tie = 0;
      for (int t = 0; t < nt; t += 2) if (nz[t] && e[t] == g) lower_tie = 1;
      if (!lower_tie) mech[M_HIGH_TREE_MAX]++;
    end
    s = 0.0;
    for (int t = 0; t < nt; t++) begin
      if (!nz[t]) continue;
      p = pv[t] < 0 ? -pv[t] : pv[t];
      x = p * pow2(fr - g);
      q = rne_int(x);
      if (x != q) mech[M_ROUNDED_TERM]++;
      if (g - e[t] >= 2 * w) mech[M_SHIFTED_OUT]++;
      s += (pv[t] < 0) ? -q : q;
    end
    if (s == 0.0) begin mech[M_CANCEL_ZERO]++; return 32'h0000_0000; end
    return real_to_fp(s * pow2(g - fr), 8, 23);
  endfunction

  function automatic bit nonfinite(logic [31:0] x, out_fmt_e f);
    return (f == OUT_FP16) ? (x[14:10] == 5'h1f) : (f == OUT_FP32) ? (x[30:23] == 8'hff) : 1'b0;
  endfunction

  // ------------------------------------------------------------ stimulus
  function automatic logic [15:0] gen_slot(in_fmt_e f, int style);
    logic [15:0] x;
    x = 16'($urandom);
    case (f)
      FMT_FP16: begin
        if (style == 1) x[14:10] = 5'($urandom_range(12, 17));
        if (style == 2 && $urandom_range(0, 3) == 0) x[14:10] = 5'd0;
        if (x[14:10] == 5'h1f) x[14:10] = 5'h1e;
      end
      FMT_BF16: begin
        if (style == 1) x[14:7] = 8'($urandom_range(124, 130));
        if (x[14:7] == 8'hff) x[14:7] = 8'hfe;
      end
      FMT_E5M2: begin
        for (int j = 0; j < 2; j++) begin
          if (style == 1) x[8*j+2 +: 5] = 5'($urandom_range(13, 17));
          if (x[8*j+2 +: 5] == 5'h1f) x[8*j+2 +: 5] = 5'h1e;
        end
      end
      FMT_E4M3: begin
        for (int j = 0; j < 2; j++) begin
          if (style == 1) x[8*j+3 +: 4] = 4'($urandom_range(5, 9));
          if (x[8*j +: 7] == 7'h7f) x[8*j +: 7] = 7'h7e;
        end
      end
      default: ;
    endcase
    return x;
  endfunction

  typedef struct {
    int          issue;
    logic [31:0] dp;
    out_fmt_e    of;
    logic        load;
    logic [31:0] c;
  } op_t;

  op_t q_dp [$];
  op_t q_d  [$];

  // Drive operations.
  initial begin
    out_fmt_e prev_of;
    bit       prev_valid;
    prev_of = OUT_FP32;
    prev_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < N_OPS; n++) begin
      op_t o;
      int  style;
      @(negedge clk);
      in_valid = ($urandom_range(0, 9) != 0);
      if (!in_valid) begin prev_valid = 0; continue; end
      in_fmt   = in_fmt_e'($urandom_range(0, 5));
      a_signed = 1'($urandom);
      b_signed = 1'($urandom);
      if (n % 20 == 0) out_fmt = out_fmt_e'($urandom_range(0, 2));
      // Integer results only accumulate in INT32; floating-point ones in FP32/FP16.
      if (in_fmt == FMT_INT8) out_fmt = OUT_INT32;
      else if (out_fmt == OUT_INT32) out_fmt = OUT_FP32;
      acc_load = (out_fmt != prev_of) || (n < 2) || ($urandom_range(0, 15) == 0);
      prev_of  = out_fmt;
      c_in = $urandom;
      if (out_fmt == OUT_FP32) c_in[30:23] = 8'($urandom_range(110, 140));
      if (out_fmt == OUT_FP16) c_in = {16'd0, 1'($urandom), 5'($urandom_range(5, 25)), 10'($urandom)};
      style = $urandom_range(0, 2);
      for (int i = 0; i < K; i++) begin
        a[16*i +: 16] = gen_slot(in_fmt, style);
        b[16*i +: 16] = gen_slot(in_fmt, style);
      end
      if (n % 40 == 7) begin
        // exact cancellation: b half negated
        for (int i = 0; i < K / 2; i++) begin
          a[16*(i+K/2) +: 16] = a[16*i +: 16];
          b[16*(i+K/2) +: 16] = b[16*i +: 16] ^ ((in_fmt == FMT_FP16 || in_fmt == FMT_BF16) ? 16'h8000 : 16'h8080);
        end
        if (in_fmt == FMT_INT8 || in_fmt == FMT_FP4) in_fmt = FMT_FP16;
        if (out_fmt == OUT_INT32) begin out_fmt = OUT_FP32; acc_load = 1; prev_of = OUT_FP32; end
      end
      if (n % 97 == 5 && in_fmt != FMT_INT8 && in_fmt != FMT_FP4) begin
        // one exceptional element
        case (in_fmt)
          FMT_FP16: a[15:0] = ($urandom_range(0, 1)) ? 16'h7c00 : 16'h7e01;
          FMT_BF16: a[15:0] = ($urandom_range(0, 1)) ? 16'hff80 : 16'h7fc1;
          FMT_E5M2: a[7:0]  = ($urandom_range(0, 1)) ? 8'h7c : 8'h7f;
          default:  a[7:0]  = 8'h7f;
        endcase
      end
      if (n % 89 == 3 && (in_fmt == FMT_FP16 || in_fmt == FMT_BF16)) begin
        // tiny products: subnormal FP32 result
        for (int i = 0; i < K; i++) begin
          if (in_fmt == FMT_FP16) begin a[16*i+10 +: 5] = 5'd1; b[16*i+10 +: 5] = 5'd1; end
          else begin a[16*i+7 +: 8] = 8'd2; b[16*i+7 +: 8] = 8'd122; end
        end
      end
      case (in_fmt)
        FMT_INT8: mech[(a_signed || b_signed) ? M_INT8_S : M_INT8_U]++;
        FMT_E4M3: mech[M_E4M3]++;
        FMT_E5M2: mech[M_E5M2]++;
        FMT_FP16: mech[M_FP16]++;
        FMT_FP4:  mech[M_FP4]++;
        default:  mech[M_BF16]++;
      endcase
      mech[out_fmt == OUT_FP32 ? M_OUT_FP32 : out_fmt == OUT_FP16 ? M_OUT_FP16 : M_OUT_INT32]++;
      if (acc_load) mech[M_LOAD]++;
      else if (prev_valid) mech[M_BACK_TO_BACK]++;
      prev_valid = 1;
      o.issue = cycle;
      o.dp    = ref_dp(in_fmt, a, b, a_signed, b_signed);
      if (o.dp[30:23] == 8'd0 && o.dp[22:0] != 0 && in_fmt != FMT_INT8) mech[M_SUBNORMAL_OUT]++;
      o.of    = out_fmt;
      o.load  = acc_load;
      o.c     = c_in;
      q_dp.push_back(o);
      q_d.push_back(o);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (10) @(posedge clk);
    check(q_dp.size() == 0 && q_d.size() == 0, "all results delivered", 0, 0);
    for (int m = 0; m < M_NUM; m++) begin
      $display("  %-28s %0d", mech_name[m], mech[m]);
      check(mech[m] > 0, "mechanism exercised", 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Check results.
  logic [31:0] model;
  bit          model_bad;

  always @(posedge clk) begin
    #1;
    if (dp_valid) begin
      op_t o;
      if (q_dp.size() == 0) check(0, "unexpected dp_valid", dp_result, 0);
      else begin
        o = q_dp.pop_front();
        check(cycle - o.issue == 4, "dot product latency", 32'(cycle - o.issue), 4);
        if (o.dp == 32'h7fc0_0000) check(dp_result[30:22] == 9'h1ff, "dot product NaN", dp_result, o.dp);
        else check(dp_result == o.dp, "dot product value", dp_result, o.dp);
      end
    end
    if (d_valid) begin
      op_t         o;
      logic [31:0] base, e;
      bit          base_bad;
      if (q_d.size() == 0) check(0, "unexpected d_valid", d, 0);
      else begin
        o = q_d.pop_front();
        check(cycle - o.issue == 5, "accumulation latency", 32'(cycle - o.issue), 5);
        base     = o.load ? o.c : model;
        base_bad = o.load ? nonfinite(o.c, o.of) : model_bad;
        if (base_bad || nonfinite(o.dp, o.of == OUT_FP16 ? OUT_FP32 : o.of)) begin
          model_bad = 1;
          check(nonfinite(d, o.of), "accumulated non-finite", d, 0);
        end else begin
          case (o.of)
            OUT_FP32: e = real_to_fp(fp32_to_real(base) + fp32_to_real(o.dp), 8, 23);
            OUT_FP16: e = real_to_fp(fp16_to_real(base[15:0]) + fp32_to_real(o.dp), 5, 10);
            default:  e = base + o.dp;
          endcase
          model_bad = nonfinite(e, o.of);
          if (model_bad) check(nonfinite(d, o.of), "accumulator overflow", d, e);
          else           check(d == e, "accumulated value", d, e);
        end
        model = d;
      end
    end
  end

endmodule
