// fdp_pkg: types, constants and shared arithmetic functions of the
// vectorized fused dot product unit.
//
// The unit takes two 256-bit vectors a and b. Each vector is cut into sixteen
// 16-bit slots; a slot holds one 16-bit value (FP16, BF16) or two 8-bit
// values (E4M3, E5M2, INT8, element 2i in bits 7:0 and element 2i+1 in bits
// 15:8). FP4 (E2M1) inputs hold 32 elements in the lower 128 bits and are
// first widened to E4M3. Every slot is converted into one of two normalized internal formats:
//   E8N10: sign, 8-bit exponent (bias 127), 11-bit mantissa with explicit
//          leading one (1.10), used for FP16 and BF16;
//   E5N3 : sign, 5-bit exponent (bias 16), 4-bit mantissa with explicit
//          leading one (1.3), used for E4M3 and E5M2.
// The widths and the E5N3 bias of 16 follow the published architecture; the
// E8N10 bias of 127 (the BF16 bias) is this design's choice.
//
// fp_round_pack() is the single place where a normalized magnitude is rounded
// (round to nearest, ties to even) to FP32 or FP16, including subnormal
// results and overflow to infinity. lzc64() counts leading zeros.
// The package has no ports, clock or state; its functions describe
// combinational logic inside the modules that call them.
package fdp_pkg;

  // Input formats of a and b (one format for both operands).
  typedef enum logic [2:0] {
    FMT_INT8 = 3'd0,
    FMT_E4M3 = 3'd1,
    FMT_E5M2 = 3'd2,
    FMT_FP16 = 3'd3,
    FMT_BF16 = 3'd4,
    FMT_FP4  = 3'd5    // E2M1, converted to E4M3 in front of the unit
  } in_fmt_e;

  // Accumulator / output formats.
  typedef enum logic [1:0] {
    OUT_FP32  = 2'd0,
    OUT_FP16  = 2'd1,
    OUT_INT32 = 2'd2
  } out_fmt_e;

  // Datapath mode derived from the input format.
  typedef enum logic [1:0] {
    MODE_E8N10 = 2'd0,  // full width: 16 terms of 32-bit aligned products
    MODE_E5N3  = 2'd1,  // half width: 32 terms of 16-bit aligned products
    MODE_INT8  = 2'd2   // half width integer: 32 16-bit products, no alignment
  } dp_mode_e;

  // Internal widths (Table I of the architecture description). The other
  // widths of that table appear where they are used: mant_p 22 / 8 bits,
  // mant_q 32 / 16 bits (29 / 13 fraction bits), mant_r 36 / 21 bits.
  localparam int EXPF_W  = 8;   // exp_a, exp_b  E8N10 (bias 127)
  localparam int EXPH_W  = 5;   // exp_a, exp_b  E5N3  (bias 16)
  localparam int MANTF_W = 11;  // mant_a, mant_b E8N10
  localparam int MANTH_W = 4;   // mant_a, mant_b E5N3
  localparam int EPF_W   = 9;   // exp_p E8N10
  localparam int EPH_W   = 6;   // exp_p E5N3

  typedef struct packed {
    logic                sign;
    logic [EXPF_W-1:0]   exp;
    logic [MANTF_W-1:0]  mant;
    logic                isnan;
    logic                isinf;
    logic                iszero;
  } e8n10_t;

  typedef struct packed {
    logic                sign;
    logic [EXPH_W-1:0]   exp;
    logic [MANTH_W-1:0]  mant;
    logic                isnan;
    logic                isinf;
    logic                iszero;
  } e5n3_t;

  // Converted view of one 16-bit slot.
  typedef struct packed {
    e8n10_t           full;
    e5n3_t [1:0]      half;
    logic [1:0][7:0]  ints;
  } conv_t;

  // Exceptional-output summary of a set of products.
  typedef struct packed {
    logic nan;
    logic pinf;
    logic ninf;
  } exc_t;

  function automatic dp_mode_e mode_of(in_fmt_e f);
    case (f)
      FMT_INT8:            return MODE_INT8;
      FMT_E4M3, FMT_E5M2,
      FMT_FP4:             return MODE_E5N3;
      default:             return MODE_E8N10;
    endcase
  endfunction

  // Exceptions raised by one product x*y of flagged operands.
  function automatic exc_t prod_exc(logic xnan, logic xinf, logic xzero, logic xs,
                                    logic ynan, logic yinf, logic yzero, logic ys);
    exc_t e;
    e.nan  = xnan | ynan | (xinf & yzero) | (xzero & yinf);
    e.pinf = (xinf | yinf) & ~e.nan & ~(xs ^ ys);
    e.ninf = (xinf | yinf) & ~e.nan &  (xs ^ ys);
    return e;
  endfunction

  function automatic int unsigned lzc64(logic [63:0] x);
    int unsigned n;
    n = 64;
    for (int i = 0; i < 64; i++) if (x[i]) n = 63 - i;
    return n;
  endfunction

  // Round a magnitude to FP32 (is_fp16 = 0) or FP16 (is_fp16 = 1, result in
  // bits 15:0). mant is normalized, bit 63 set, and worth
  // mant / 2^63 * 2^exp_msb; sticky ORs in anything below mant. mant = 0
  // gives a signed zero. Round to nearest, ties to even; gradual underflow;
  // overflow gives infinity.
  function automatic logic [31:0] fp_round_pack(logic sign, logic signed [15:0] exp_msb,
                                                logic [63:0] mant, logic sticky,
                                                logic is_fp16);
    int         fb, bias, emaxf;
    int         be, rsh, field;
    logic [127:0] ext;
    logic [63:0]  q;
    logic [22:0]  frac;
    logic         r, st, up;
    logic [31:0]  res;
    fb    = is_fp16 ? 10 : 23;
    bias  = is_fp16 ? 15 : 127;
    emaxf = is_fp16 ? 31 : 255;
    if (mant == 64'd0) begin
      res = is_fp16 ? {16'd0, sign, 15'd0} : {sign, 31'd0};
      return res;
    end
    be  = int'(exp_msb) + bias;
    rsh = 63 - fb + ((be < 1) ? (1 - be) : 0);
    if (rsh > 127) rsh = 127;
    ext = {mant, 64'd0} >> rsh;
    q   = ext[127:64];
    r   = ext[63];
    st  = (|ext[62:0]) | sticky;
    up  = r & (st | q[0]);
    q   = q + {63'd0, up};
    if (be >= 1) begin
      if (q[fb+1]) begin
        q  = q >> 1;
        be = be + 1;
      end
      field = be;
    end else begin
      field = q[fb] ? 1 : 0;
    end
    frac = 23'(q & ((64'd1 << fb) - 64'd1));
    if (field >= emaxf) begin
      field = emaxf;
      frac  = '0;
    end
    if (is_fp16) res = {16'd0, sign, field[4:0], frac[9:0]};
    else         res = {sign, field[7:0], frac[22:0]};
    return res;
  endfunction

endpackage
