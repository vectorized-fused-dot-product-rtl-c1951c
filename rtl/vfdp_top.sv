// vfdp_top: accumulating multiprecision vectorized fused dot product.
//
// Computes d = a . b + c for 256-bit vectors a and b: K = 16 terms of FP16 or
// BF16, or 2K = 32 terms of E4M3, E5M2, FP4 (E2M1) or INT8 (signed or
// unsigned per operand), accumulated in FP32, FP16 or INT32. The dot product is fused:
// products are aligned to the largest product exponent, rounded once to the
// internal precision (32 bits per full-width term, 16 bits per half-width
// term), summed exactly, and normalized and rounded to FP32 once. Integer
// and floating-point formats and both widths share one datapath:
//
//   convert  fp4_converter (FP4 -> E4M3, used only for FP4 inputs), then
//            2K fmt_converter instances (K for a, K for b), combinational
//   stage 1  K mul_pe (multiplication) || exp_max (exponent add + maximum)
//   stage 2  K align_pe (exponent difference, vec_shifter, round, sign)
//   stage 3  summation (two 16-bit-lane CSA trees, 4:2 compressor, CPA)
//   stage 4  normalizer (LZC, shift, exponent adjust, FP32 round / INT32)
//   stage 5  accumulator (late accumulation, one-cycle return path)
//
// Each stage ends in a register, so the unit is fully pipelined: one
// operation per clock, dp_result valid 4 cycles and d valid 5 cycles after
// in_valid. acc_load starts a new accumulation from c_in (FP32, FP16 in bits
// 15:0, or INT32); otherwise d accumulates onto the previous d of the same
// out_fmt. Exceptional products (NaN, infinity, inf x 0) are summarised in
// stage 1 and travel with the data to the normalizer.
//
// Clock clk, asynchronous active-low reset rst_n (clears the valid bits and
// the accumulator; data registers are not reset). A concurrent assertion
// checks, for every valid operation entering alignment, that no product
// exponent exceeds the maximum.
//
// The five compute stages, their widths, the converter count and the
// accumulation formats follow the architecture description; placing one
// register after each stage with the converters in front of stage 1, the
// port list and the reset are this design's choices.
module vfdp_top
  import fdp_pkg::*;
#(
  parameter int K = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  in_fmt_e           in_fmt,
  input  logic              a_signed,
  input  logic              b_signed,
  input  out_fmt_e          out_fmt,
  input  logic              acc_load,
  input  logic [31:0]       c_in,
  input  logic [16*K-1:0]   a,
  input  logic [16*K-1:0]   b,
  output logic              dp_valid,
  output logic [31:0]       dp_result,
  output logic              d_valid,
  output logic [31:0]       d
);

  localparam int RW = 32 + $clog2(K);

  // Control travelling along the pipeline.
  typedef struct packed {
    dp_mode_e    mode;
    logic        is_unsigned;
    out_fmt_e    out_fmt;
    logic        acc_load;
    logic [31:0] c_in;
    exc_t        exc;
  } ctrl_t;

  // ---------------------------------------------------------------- convert
  conv_t [K-1:0] ca, cb;
  dp_mode_e      mode_in;
  assign mode_in = mode_of(in_fmt);

  // FP4 (E2M1) elements, 2K of them in the lower half of a and b, are
  // widened to E4M3 and then take the E4M3 path.
  logic [16*K-1:0] a_fp8, b_fp8, a_cv, b_cv;
  in_fmt_e         cv_fmt;

  fp4_converter #(.N(2 * K)) u_fp4a (.din(a[8*K-1:0]), .dout(a_fp8));
  fp4_converter #(.N(2 * K)) u_fp4b (.din(b[8*K-1:0]), .dout(b_fp8));

  assign cv_fmt = (in_fmt == FMT_FP4) ? FMT_E4M3 : in_fmt;
  assign a_cv   = (in_fmt == FMT_FP4) ? a_fp8 : a;
  assign b_cv   = (in_fmt == FMT_FP4) ? b_fp8 : b;

  for (genvar i = 0; i < K; i++) begin : g_conv
    fmt_converter u_ca (.fmt(cv_fmt), .din(a_cv[16*i +: 16]), .out(ca[i]));
    fmt_converter u_cb (.fmt(cv_fmt), .din(b_cv[16*i +: 16]), .out(cb[i]));
  end

  // ---------------------------------------------------------------- stage 1
  logic [K-1:0][21:0]       mp_high;
  logic [K-1:0][15:0]       mp_low;
  logic [K-1:0]             sg_high, sg_low, z_high, z_low;
  logic [K-1:0][EPF_W-1:0]  ep_full;
  logic [K-1:0][EPH_W-1:0]  ep_hi;
  logic [EPF_W-1:0]         max_exp;
  exc_t                     exc_in;
  ctrl_t                    ctrl_in;

  for (genvar i = 0; i < K; i++) begin : g_mul
    mul_pe u_mul (
      .mode (mode_in), .a_signed (a_signed), .b_signed (b_signed),
      .a (ca[i]), .b (cb[i]),
      .result_high (mp_high[i]), .result_low (mp_low[i]),
      .sign_high (sg_high[i]), .sign_low (sg_low[i]),
      .zero_high (z_high[i]), .zero_low (z_low[i])
    );
  end

  exp_max #(.K(K)) u_exp (
    .mode (mode_in), .a (ca), .b (cb), .zero_high (z_high), .zero_low (z_low),
    .ep_full (ep_full), .ep_hi (ep_hi), .max_exp (max_exp)
  );

  always_comb begin
    exc_in = '0;
    for (int i = 0; i < K; i++) begin
      if (mode_in == MODE_E8N10) begin
        exc_in = exc_in | prod_exc(ca[i].full.isnan, ca[i].full.isinf, ca[i].full.iszero, ca[i].full.sign,
                                   cb[i].full.isnan, cb[i].full.isinf, cb[i].full.iszero, cb[i].full.sign);
      end else if (mode_in == MODE_E5N3) begin
        for (int j = 0; j < 2; j++)
          exc_in = exc_in | prod_exc(ca[i].half[j].isnan, ca[i].half[j].isinf, ca[i].half[j].iszero, ca[i].half[j].sign,
                                     cb[i].half[j].isnan, cb[i].half[j].isinf, cb[i].half[j].iszero, cb[i].half[j].sign);
      end
    end
    ctrl_in.mode        = mode_in;
    ctrl_in.is_unsigned = (mode_in == MODE_INT8) && !a_signed && !b_signed;
    ctrl_in.out_fmt     = out_fmt;
    ctrl_in.acc_load    = acc_load;
    ctrl_in.c_in        = c_in;
    ctrl_in.exc         = exc_in;
  end

  ctrl_t                    c1;
  logic                     v1;
  logic [K-1:0][21:0]       r1_mp_high;
  logic [K-1:0][15:0]       r1_mp_low;
  logic [K-1:0]             r1_sg_high, r1_sg_low;
  logic [K-1:0][EPF_W-1:0]  r1_ep_full;
  logic [K-1:0][EPH_W-1:0]  r1_ep_hi;
  logic [EPF_W-1:0]         r1_max_exp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in_valid;
  end
  always_ff @(posedge clk) begin
    c1.mode        <= ctrl_in.mode;
    c1.is_unsigned <= ctrl_in.is_unsigned;
    c1.out_fmt     <= ctrl_in.out_fmt;
    c1.acc_load    <= ctrl_in.acc_load;
    c1.c_in        <= ctrl_in.c_in;
    c1.exc         <= ctrl_in.exc;
    r1_mp_high     <= mp_high;
    r1_mp_low      <= mp_low;
    r1_sg_high     <= sg_high;
    r1_sg_low      <= sg_low;
    r1_ep_full     <= ep_full;
    r1_ep_hi       <= ep_hi;
    r1_max_exp     <= max_exp;
  end

  // ---------------------------------------------------------------- stage 2
  logic [K-1:0][31:0] term;
  logic [K-1:0]       inc_low, inc_high;

  for (genvar i = 0; i < K; i++) begin : g_align
    align_pe u_align (
      .mode (c1.mode), .max_exp (r1_max_exp),
      .ep_full (r1_ep_full[i]), .ep_hi (r1_ep_hi[i]),
      .mp_high (r1_mp_high[i]), .mp_low (r1_mp_low[i]),
      .sign_high (r1_sg_high[i]), .sign_low (r1_sg_low[i]),
      .term (term[i]), .inc_low (inc_low[i]), .inc_high (inc_high[i])
    );
  end

  // Every product exponent entering alignment is at most the maximum it was
  // reduced to, so the exponent differences never borrow.
  for (genvar i = 0; i < K; i++) begin : g_max_check
    a_max_dominates: assert property (@(posedge clk) disable iff (!rst_n)
      v1 |-> (r1_max_exp >= r1_ep_full[i]) && (r1_max_exp >= EPF_W'(r1_ep_hi[i])));
  end

  ctrl_t              c2;
  logic               v2;
  logic [K-1:0][31:0] r2_term;
  logic [K-1:0]       r2_inc_low, r2_inc_high;
  logic [EPF_W-1:0]   r2_max_exp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v2 <= 1'b0;
    else        v2 <= v1;
  end
  always_ff @(posedge clk) begin
    c2.mode        <= c1.mode;
    c2.is_unsigned <= c1.is_unsigned;
    c2.out_fmt     <= c1.out_fmt;
    c2.acc_load    <= c1.acc_load;
    c2.c_in        <= c1.c_in;
    c2.exc         <= c1.exc;
    r2_term        <= term;
    r2_inc_low     <= inc_low;
    r2_inc_high    <= inc_high;
    r2_max_exp     <= r1_max_exp;
  end

  // ---------------------------------------------------------------- stage 3
  logic [RW-1:0] sum;

  summation #(.K(K)) u_sum (
    .full_mode (c2.mode == MODE_E8N10), .is_unsigned (c2.is_unsigned),
    .terms (r2_term), .inc_low (r2_inc_low), .inc_high (r2_inc_high),
    .result (sum)
  );

  ctrl_t            c3;
  logic             v3;
  logic [RW-1:0]    r3_sum;
  logic [EPF_W-1:0] r3_max_exp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v3 <= 1'b0;
    else        v3 <= v2;
  end
  always_ff @(posedge clk) begin
    c3.mode        <= c2.mode;
    c3.is_unsigned <= c2.is_unsigned;
    c3.out_fmt     <= c2.out_fmt;
    c3.acc_load    <= c2.acc_load;
    c3.c_in        <= c2.c_in;
    c3.exc         <= c2.exc;
    r3_sum         <= sum;
    r3_max_exp     <= r2_max_exp;
  end

  // ---------------------------------------------------------------- stage 4
  logic [31:0] norm_result;

  normalizer #(.RW(RW)) u_norm (
    .mode (c3.mode), .is_unsigned (c3.is_unsigned), .sum (r3_sum),
    .max_exp (r3_max_exp), .exc (c3.exc), .result (norm_result)
  );

  ctrl_t c4;
  logic  v4;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v4 <= 1'b0;
    else        v4 <= v3;
  end
  always_ff @(posedge clk) begin
    c4.mode        <= c3.mode;
    c4.is_unsigned <= c3.is_unsigned;
    c4.out_fmt     <= c3.out_fmt;
    c4.acc_load    <= c3.acc_load;
    c4.c_in        <= c3.c_in;
    c4.exc         <= c3.exc;
    dp_result      <= norm_result;
  end
  assign dp_valid = v4;

  // ---------------------------------------------------------------- stage 5
  accumulator u_acc (
    .clk (clk), .rst_n (rst_n), .valid (v4), .out_fmt (c4.out_fmt),
    .load (c4.acc_load), .c_in (c4.c_in), .dp (dp_result),
    .d_valid (d_valid), .d (d)
  );

endmodule
