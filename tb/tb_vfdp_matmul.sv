// tb_vfdp_matmul: matrix multiplication built from the dot product unit.
//
// A product C = A x B + C0 of 4 x 4 results is computed the way an
// accelerator would use the unit: every element of C is the sum of four
// dot products. The first one is issued with acc_load = 1 and c_in = C0
// entry, and the next three use the short return path of the accumulator.
// The four operations of one element are issued on consecutive clocks, so
// each addition uses the accumulator value written on the clock before.
// Three configurations are run, 20 random matrices each:
//   - INT8 with INT32 accumulation, depth 4 x 32 = 128, signedness of A and
//     B chosen per matrix. Everything is exact: each dot product and each
//     element of C must equal the integer result modulo 2^32;
//   - FP16 with FP32 accumulation, depth 4 x 16 = 64;
//   - E4M3 with FP16 accumulation, depth 4 x 32 = 128.
// For the floating-point configurations every dot product must lie within
// the alignment bound (n - 1) x 2^(g - p - 1) plus half an FP32 ulp of the
// exact value, and every accumulator output must equal the observed
// dp_result added to the previous accumulator value with one rounding to
// nearest even. Each element of C must lie within the sum of these bounds
// of the exact matrix product. Element exponents are limited so that
// nothing overflows.
//
// The testbench has no ports. It ends with a TB_RESULT line and $finish,
// and a watchdog ends a hung run as a failure. dp_valid must come 4 clocks
// and d_valid 5 clocks after in_valid.
//
// Building matrix products from 256-bit dot products and a scalar
// accumulator follows the intended use of the unit. The matrix sizes,
// the value ranges and the reference arithmetic are this testbench's own.
module tb_vfdp_matmul;
  import fdp_pkg::*;
  import tb_fp_pkg::*;

  localparam int K     = 16;
  localparam int M     = 4;    // rows of A and C
  localparam int N     = 4;    // columns of B and C
  localparam int STEPS = 4;    // dot products per element of C
  localparam int MATS  = 20;   // random matrices per configuration
  localparam int N_CFG = 3;

  logic              clk = 0, rst_n = 0;
  logic              in_valid = 0;
  in_fmt_e           in_fmt = FMT_INT8;
  logic              a_signed = 0, b_signed = 0;
  out_fmt_e          out_fmt = OUT_INT32;
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
    wait (cycle == 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  // One issued dot product.
  typedef struct {
    int          issue;
    out_fmt_e    o;
    bit          load;
    logic [31:0] c;
    bit          last;       // last of the element's four operations
    real         exact;      // exact dot product (floating point)
    logic [31:0] iexact;     // exact dot product modulo 2^32 (INT8)
    real         bound;      // alignment bound of this dot product
    real         c_exact;    // exact element of C after this step
    logic [31:0] ic_exact;
  } op_t;

  op_t dpq [$];
  op_t accq [$];

  logic [31:0] model;     // expected accumulator
  real         acc_bound; // error bound accumulated over the element
  real         sum_ulp [N_CFG];
  int          n_elem  [N_CFG];

  function automatic real ulp_of(real x, out_fmt_e o);
    int e;
    if (x == 0.0) return (o == OUT_FP32) ? pow2(-149) : pow2(-24);
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

  function automatic real mag(real x);
    return x < 0.0 ? -x : x;
  endfunction

  // Random element of format f in a range that cannot overflow.
  function automatic logic [15:0] rand_elem(in_fmt_e f);
    logic [15:0] x;
    x = 16'($urandom);
    case (f)
      FMT_FP16: x[14:10] = 5'($urandom_range(8, 22));
      FMT_E4M3: x = {8'd0, x[7], 4'($urandom_range(3, 10)), x[2:0]};
      default:  x = {8'd0, x[7:0]};
    endcase
    return x;
  endfunction

  logic [15:0] ma [M][STEPS*2*K];
  logic [15:0] mb [STEPS*2*K][N];

  localparam in_fmt_e  fmts [N_CFG] = '{FMT_INT8, FMT_FP16, FMT_E4M3};
  localparam out_fmt_e outs [N_CFG] = '{OUT_INT32, OUT_FP32, OUT_FP16};

  initial begin
    for (int c = 0; c < N_CFG; c++) begin sum_ulp[c] = 0.0; n_elem[c] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < N_CFG; c++) begin
      int n_el, w;
      n_el = (fmts[c] == FMT_FP16) ? K : 2 * K;   // elements per dot product
      w    = (fmts[c] == FMT_FP16) ? 16 : 8;
      for (int mat = 0; mat < MATS; mat++) begin
        logic sa, sb;
        sa = 1'($urandom); sb = 1'($urandom);
        for (int i = 0; i < M; i++)
          for (int k = 0; k < STEPS * n_el; k++) ma[i][k] = rand_elem(fmts[c]);
        for (int k = 0; k < STEPS * n_el; k++)
          for (int j = 0; j < N; j++) mb[k][j] = rand_elem(fmts[c]);
        for (int i = 0; i < M; i++)
          for (int j = 0; j < N; j++) begin
            logic [31:0] c0;
            real         run;
            logic [31:0] irun;
            c0 = $urandom;
            if (outs[c] == OUT_FP32) c0[30:23] = 8'($urandom_range(110, 140));
            if (outs[c] == OUT_FP16) c0 = {16'd0, c0[15], 5'($urandom_range(10, 20)), c0[9:0]};
            run  = (outs[c] == OUT_INT32) ? 0.0 : out_to_real(c0, outs[c]);
            irun = c0;
            for (int s = 0; s < STEPS; s++) begin
              op_t  o;
              bit   any;
              int   g;
              @(negedge clk);
              in_valid = 1;
              in_fmt   = fmts[c];
              out_fmt  = outs[c];
              a_signed = sa;
              b_signed = sb;
              acc_load = (s == 0);
              c_in     = c0;
              o.exact  = 0.0;
              o.iexact = 0;
              any = 0; g = 0;
              for (int e = 0; e < n_el; e++) begin
                logic [15:0] xa, xb;
                xa = ma[i][s * n_el + e];
                xb = mb[s * n_el + e][j];
                if (w == 16) begin a[16*e +: 16] = xa; b[16*e +: 16] = xb; end
                else         begin a[8*e +: 8] = xa[7:0]; b[8*e +: 8] = xb[7:0]; end
                if (fmts[c] == FMT_INT8) begin
                  int ia, ib;
                  ia = sa ? int'($signed(xa[7:0])) : int'(xa[7:0]);
                  ib = sb ? int'($signed(xb[7:0])) : int'(xb[7:0]);
                  o.iexact += 32'(ia * ib);
                end else begin
                  dec_t da, db;
                  da = decode_fmt(int'(fmts[c]), xa);
                  db = decode_fmt(int'(fmts[c]), xb);
                  o.exact += da.v * db.v;   // exact: few significant bits, small range
                  if (da.v != 0.0 && db.v != 0.0) begin
                    if (!any || ilog2(mag(da.v)) + ilog2(mag(db.v)) > g)
                      g = ilog2(mag(da.v)) + ilog2(mag(db.v));
                    any = 1;
                  end
                end
              end
              o.bound    = real'(n_el - 1) * pow2(g - ((w == 16) ? 29 : 13) - 1);
              o.issue    = cycle;
              o.o        = outs[c];
              o.load     = (s == 0);
              o.c        = c0;
              o.last     = (s == STEPS - 1);
              run       += o.exact;
              irun      += o.iexact;
              o.c_exact  = run;
              o.ic_exact = irun;
              dpq.push_back(o);
              accq.push_back(o);
            end
          end
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (10) @(posedge clk);
    check(dpq.size() == 0 && accq.size() == 0, "every operation produced its results");
    for (int c = 0; c < N_CFG; c++)
      $display("configuration %0d: %0d elements of C, average error %6.3f ulp", c, n_elem[c],
               n_elem[c] > 0 ? sum_ulp[c] / real'(n_elem[c]) : 0.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Scoreboard. The accumulator output is handled before the dot product
  // result of the same clock, which belongs to the next operation.
  logic [31:0] dp_seen [$];

  always @(posedge clk) begin
    #1;
    if (d_valid) begin
      op_t         o;
      logic [31:0] x;
      real         prev, nv;
      if (accq.size() == 0 || dp_seen.size() == 0) check(0, "unexpected d_valid");
      else begin
        o = accq.pop_front();
        x = dp_seen.pop_front();
        check(cycle - o.issue == 5, "accumulator latency");
        if (o.load) begin
          model = o.c;
          acc_bound = 0.0;
        end
        prev = out_to_real(model, o.o);
        case (o.o)
          OUT_INT32: model = model + x;
          OUT_FP32:  model = real_to_fp(fp32_to_real(model) + fp32_to_real(x), 8, 23);
          default:   model = real_to_fp(fp16_to_real(model[15:0]) + fp32_to_real(x), 5, 10);
        endcase
        check(d == model, "accumulator output");
        if (o.o != OUT_INT32) begin
          nv = out_to_real(model, o.o);
          acc_bound += o.bound + 0.5 * ulp_of(mag(o.exact) + mag(fp32_to_real(x)), OUT_FP32)
                     + 0.5 * ulp_of(mag(prev) + mag(fp32_to_real(x)) + mag(nv), o.o);
        end
        if (o.last) begin
          int c;
          c = (o.o == OUT_INT32) ? 0 : (o.o == OUT_FP32) ? 1 : 2;
          if (o.o == OUT_INT32) check(d == o.ic_exact, "INT32 element of C");
          else begin
            nv = out_to_real(d, o.o);
            check(mag(nv - o.c_exact) <= acc_bound, "element of C within the error bound");
            sum_ulp[c] += mag(nv - o.c_exact) / ulp_of(o.c_exact, o.o);
          end
          n_elem[c]++;
        end
      end
    end
    if (dp_valid) begin
      op_t o;
      if (dpq.size() == 0) check(0, "unexpected dp_valid");
      else begin
        o = dpq.pop_front();
        check(cycle - o.issue == 4, "dot product latency");
        if (o.o == OUT_INT32) check(dp_result == o.iexact, "INT8 dot product");
        else check(mag(fp32_to_real(dp_result) - o.exact)
                   <= o.bound + 0.5 * ulp_of(mag(o.exact) + mag(fp32_to_real(dp_result)), OUT_FP32),
                   "dot product within the alignment bound");
        dp_seen.push_back(dp_result);
      end
    end
  end

endmodule
