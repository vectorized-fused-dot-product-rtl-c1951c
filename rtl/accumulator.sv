// accumulator: late accumulation unit behind the dot product unit.
//
// Adds each dot product result dp to a single accumulator value and keeps the
// sum in a register, so matrix products of any depth are built from a stream
// of dot products. Three accumulator formats:
//   OUT_FP32 : d = round_fp32(acc + dp), acc and dp in FP32;
//   OUT_FP16 : d = round_fp16(acc + dp), acc in FP16 (bits 15:0), dp in
//              FP32; mixed precision with one rounding of the exact sum;
//   OUT_INT32: d = acc + dp, two's complement, wrapping.
// The floating-point adder is exact before its single rounding: both
// operands are placed in a 64-bit window with 38 guard bits and the operand
// with the smaller exponent is shifted right with a sticky bit folded into
// its lowest position; the signed sum is normalized with a leading-zero
// count and rounded to nearest, ties to even, subnormals included.
// NaN operands or infinities of opposite sign give the quiet NaN; an exact
// zero sum is +0 unless both operands are -0.
//
// Timing: one result per cycle. When valid is high the register takes
// acc + dp one clock later (d_valid follows valid by one cycle); the
// register feeds back to the adder directly, so back-to-back results
// accumulate without a stall. With load high the sum starts from c_in
// instead of the register. Reset (rst_n low, asynchronous) clears the
// register and d_valid.
//
// The three formats and the FP16 mixed-precision form follow the
// architecture description; the adder's inner structure, the NaN encoding,
// the load/c_in interface and the reset are this design's choices.
module accumulator
  import fdp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        valid,
  input  out_fmt_e    out_fmt,
  input  logic        load,
  input  logic [31:0] c_in,
  input  logic [31:0] dp,
  output logic        d_valid,
  output logic [31:0] d
);

  typedef struct packed {
    logic               sign;
    logic [23:0]        sig;      // significand, value = sig * 2^lsb
    logic signed [9:0]  lsb;
    logic               nan;
    logic               inf;
  } unpacked_t;

  function automatic unpacked_t unpack32(logic [31:0] x);
    unpacked_t u;
    u.sign = x[31];
    u.nan  = (x[30:23] == 8'hff) && (x[22:0] != 0);
    u.inf  = (x[30:23] == 8'hff) && (x[22:0] == 0);
    if (x[30:23] == 8'd0) begin
      u.sig = {1'b0, x[22:0]};
      u.lsb = -10'sd149;
    end else begin
      u.sig = {1'b1, x[22:0]};
      u.lsb = $signed({2'b00, x[30:23]}) - 10'sd150;
    end
    return u;
  endfunction

  function automatic unpacked_t unpack16(logic [15:0] x);
    unpacked_t u;
    u.sign = x[15];
    u.nan  = (x[14:10] == 5'h1f) && (x[9:0] != 0);
    u.inf  = (x[14:10] == 5'h1f) && (x[9:0] == 0);
    if (x[14:10] == 5'd0) begin
      u.sig = {1'b0, x[9:0], 13'd0};
      u.lsb = -10'sd37;
    end else begin
      u.sig = {1'b1, x[9:0], 13'd0};
      u.lsb = $signed({5'd0, x[14:10]}) - 10'sd38;
    end
    return u;
  endfunction

  function automatic logic [31:0] fp_add(unpacked_t x, unpacked_t y, logic to16);
    unpacked_t          big, sml;
    int                 diff;
    logic [127:0]       sh;
    logic [63:0]        bm, smv;
    logic signed [65:0] sx, sy, s;
    logic [64:0]        mag;
    logic [63:0]        m64;
    int unsigned        lz;
    logic signed [15:0] e;
    logic [31:0]        qnan, r;
    qnan = to16 ? 32'h0000_7e00 : 32'h7fc0_0000;
    if (x.nan || y.nan || (x.inf && y.inf && (x.sign != y.sign))) return qnan;
    if (x.inf) return to16 ? {16'd0, x.sign, 15'h7c00} : {x.sign, 31'h7f80_0000};
    if (y.inf) return to16 ? {16'd0, y.sign, 15'h7c00} : {y.sign, 31'h7f80_0000};
    if (x.lsb >= y.lsb) begin big = x; sml = y; end
    else                begin big = y; sml = x; end
    diff = int'(big.lsb) - int'(sml.lsb);
    if (diff > 100) diff = 100;
    bm  = {2'b00, big.sig, 38'd0};
    sh  = {2'b00, sml.sig, 38'd0, 64'd0} >> diff;
    smv = sh[127:64] | {63'd0, |sh[63:0]};
    sx  = big.sign   ? -$signed({2'b00, bm})  : $signed({2'b00, bm});
    sy  = sml.sign ? -$signed({2'b00, smv}) : $signed({2'b00, smv});
    s   = sx + sy;
    if (s == 0) begin
      r = to16 ? {16'd0, x.sign & y.sign, 15'd0} : {x.sign & y.sign, 31'd0};
      return r;
    end
    mag = s[65] ? 65'(-s) : 65'(s);
    m64 = mag[63:0];
    lz  = lzc64(m64);
    e   = 16'(big.lsb) - 16'sd38 + 16'sd63 - 16'(lz);
    return fp_round_pack(s[65], e, m64 << lz, 1'b0, to16);
  endfunction

  logic [31:0] base, sum;

  always_comb begin
    base = load ? c_in : d;
    unique case (out_fmt)
      OUT_FP32:  sum = fp_add(unpack32(dp), unpack32(base), 1'b0);
      OUT_FP16:  sum = fp_add(unpack32(dp), unpack16(base[15:0]), 1'b1);
      OUT_INT32: sum = base + dp;
      default:   sum = base;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d       <= '0;
      d_valid <= 1'b0;
    end else begin
      d_valid <= valid;
      if (valid) d <= sum;
    end
  end

endmodule
