// tb_fp_pkg: reference arithmetic for the testbenches.
//
// Works on SystemVerilog reals (IEEE double), independently of the RTL's
// bit-level datapath: decoding of the input formats into reals, exact
// powers of two, floor(log2), round-to-nearest-even encoding of a real into
// FP32 or FP16 (with subnormals and overflow to infinity), and a reference
// model of the fused dot product (align every product to the largest product
// exponent, round each to a fixed number of fraction bits, add exactly,
// round once to FP32). Doubles hold every intermediate value exactly for the
// widths used here.
//
// It is a package of functions only: no ports, no clock and no state.
//
// The stimulus mix and the reference arithmetic are this testbench's own;
// the formats, widths and rounding points checked follow the design
// description and the choices stated in the module under test.
package tb_fp_pkg;

  function automatic real pow2(int e);
    real r;
    r = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) r = r * 2.0;
    else        for (int i = 0; i < -e; i++) r = r / 2.0;
    return r;
  endfunction

  // floor(log2(a)) for a > 0.
  function automatic int ilog2(real a);
    int e;
    e = 0;
    while (a >= 2.0) begin a = a / 2.0; e++; end
    while (a < 1.0)  begin a = a * 2.0; e--; end
    return e;
  endfunction

  typedef struct {
    real  v;
    bit   nan;
    bit   inf;
    bit   zero;
    bit   sign;
  } dec_t;

  // Generic IEEE-style decoding. no_inf: the all-ones exponent holds normal
  // numbers and only the all-ones pattern is NaN (OCP E4M3). ftz: subnormals
  // read as zero (BF16).
  function automatic dec_t decode(logic [15:0] x, int eb, int mb, bit no_inf, bit ftz);
    dec_t d;
    int   bias, e, m, emax;
    bias = (1 << (eb - 1)) - 1;
    emax = (1 << eb) - 1;
    d.sign = x[eb + mb];
    e = int'((x >> mb) & ((1 << eb) - 1));
    m = int'(x & ((1 << mb) - 1));
    d.nan = 0; d.inf = 0; d.zero = 0; d.v = 0.0;
    if (!no_inf && e == emax) begin
      d.nan = (m != 0);
      d.inf = (m == 0);
    end else if (no_inf && e == emax && m == (1 << mb) - 1) begin
      d.nan = 1;
    end else if (e == 0) begin
      if (m == 0 || ftz) d.zero = 1;
      else d.v = real'(m) * pow2(1 - bias - mb);
    end else begin
      d.v = real'(m + (1 << mb)) * pow2(e - bias - mb);
    end
    if (d.sign) d.v = -d.v;
    return d;
  endfunction

  // FP4 (E2M1): exponent bias 1, one fraction bit, no infinity or NaN.
  function automatic dec_t decode_e2m1(logic [3:0] x);
    dec_t d;
    d.sign = x[3];
    d.nan  = 0;
    d.inf  = 0;
    d.zero = (x[2:0] == 3'd0);
    if (x[2:1] == 2'd0) d.v = x[0] ? 0.5 : 0.0;
    else                d.v = (1.0 + 0.5 * real'(x[0])) * pow2(int'(x[2:1]) - 1);
    if (d.sign) d.v = -d.v;
    return d;
  endfunction

  // Format codes equal to fdp_pkg::in_fmt_e.
  function automatic dec_t decode_fmt(int fmt, logic [15:0] x);
    case (fmt)
      1: return decode(x & 16'hff, 4, 3, 1, 0);  // E4M3
      2: return decode(x & 16'hff, 5, 2, 0, 0);  // E5M2
      3: return decode(x, 5, 10, 0, 0);          // FP16
      5: return decode_e2m1(x[3:0]);              // FP4
      default: return decode(x, 8, 7, 0, 1);     // BF16
    endcase
  endfunction

  // Round r to nearest even in a format with eb exponent and mb fraction bits.
  function automatic logic [31:0] real_to_fp(real r, int eb, int mb);
    int   bias, emin, emax, e;
    real  a, sc, q, fr;
    logic s;
    logic [31:0] res;
    bias = (1 << (eb - 1)) - 1;
    emin = 1 - bias;
    emax = bias;
    s = (r < 0.0);
    a = s ? -r : r;
    if (a == 0.0) return 32'(s) << (eb + mb);
    e = ilog2(a);
    if (e < emin) e = emin;
    sc = a * pow2(mb - e);          // in [1, 2^(mb+1)) or subnormal
    q  = $floor(sc);
    fr = sc - q;
    if (fr > 0.5 || (fr == 0.5 && ($floor(q / 2.0) * 2.0 != q))) q = q + 1.0;
    if (q >= pow2(mb + 1)) begin q = q / 2.0; e++; end
    if (e > emax) return (32'(s) << (eb + mb)) | (32'((1 << eb) - 1) << mb);
    if (q < pow2(mb))
      res = (32'(s) << (eb + mb)) | 32'(longint'(q));
    else
      res = (32'(s) << (eb + mb)) | (32'(e + bias) << mb) | 32'(longint'(q - pow2(mb)));
    return res;
  endfunction

  function automatic real fp32_to_real(logic [31:0] x);
    dec_t d;
    real  v;
    int   e;
    e = int'(x[30:23]);
    if (e == 0) v = real'(x[22:0]) * pow2(-149);
    else        v = real'({1'b1, x[22:0]}) * pow2(e - 150);
    return x[31] ? -v : v;
  endfunction

  function automatic real fp16_to_real(logic [15:0] x);
    dec_t d;
    d = decode(x, 5, 10, 0, 0);
    return d.v;
  endfunction

  // Round to nearest even to an integer.
  function automatic real rne_int(real x);
    real q, fr;
    q  = $floor(x);
    fr = x - q;
    if (fr > 0.5 || (fr == 0.5 && ($floor(q / 2.0) * 2.0 != q))) q = q + 1.0;
    return q;
  endfunction

endpackage
