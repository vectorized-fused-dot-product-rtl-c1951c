// align_pe: one processing element of the mantissa alignment stage.
//
// Turns the products of one multiplication PE into signed fixed-point terms
// aligned to the maximum product exponent.
//
// E8N10 (full width): the shift amount is max_exp - exp_p (a 10-bit
// subtraction giving a 9-bit unsigned amount). The 22-bit product (2 integer,
// 20 fraction bits) is zero padded to 32 bits at the bottom and shifted right
// by vec_shifter. The 32-bit result (2.30) is rounded to nearest, ties to
// even, to 31 bits (2.29) with the shifter's sticky bit, and the product sign
// is applied: the term is a 32-bit two's complement value with 3 integer and
// 29 fraction bits.
//
// E5N3 (half width): the same subtractor forms the amount of the first term,
// a dedicated 7-bit subtractor the amount of the second. Each 8-bit product
// (2.6) is padded to 16 bits, shifted in its own 16-bit lane, rounded to 15
// bits (2.13) and signed: two 16-bit terms with 3 integer and 13 fraction
// bits. The first term sits in bits 15:0, the second in bits 31:16.
//
// Two's complement and rounding each want an increment, never both at once:
// -(m + 1) = ~m. So the term leaves as m or ~m and a single increment bit
// (sign XOR round-up) per term goes on to the summation stage, which adds it.
//
// INT8: alignment is bypassed by forcing both lane shift amounts to zero;
// the two 16-bit products leave the shifter unchanged and are passed on as
// the terms with no rounding and no increment.
//
// Purely combinational.
//
// All of the above follows the architecture description except the tie rule
// (ties to even), which is this design's choice.
module align_pe
  import fdp_pkg::*;
(
  input  dp_mode_e          mode,
  input  logic [EPF_W-1:0]  max_exp,
  input  logic [EPF_W-1:0]  ep_full,     // product exponent of the first term
  input  logic [EPH_W-1:0]  ep_hi,       // product exponent of the second term
  input  logic [21:0]       mp_high,     // first product (result_high)
  input  logic [15:0]       mp_low,      // second product (result_low)
  input  logic              sign_high,   // sign of the first product
  input  logic              sign_low,    // sign of the second product
  output logic [31:0]       term,
  output logic              inc_low,     // increment of the 32-bit term or of bits 15:0
  output logic              inc_high     // increment of bits 31:16 (half width)
);

  logic        full;
  logic [9:0]  diff_a;     // shared 10-bit subtractor
  logic [6:0]  diff_b;     // dedicated 7-bit subtractor
  logic [31:0] operand;
  logic [8:0]  shift_high;
  logic [5:0]  shift_low;
  logic [31:0] shifted;
  logic        st_lo, st_hi;

  assign full = (mode == MODE_E8N10);

  always_comb begin
    if (full) diff_a = {1'b0, max_exp} - {1'b0, ep_full};
    else      diff_a = {4'd0, max_exp[5:0]} - {4'd0, ep_full[5:0]};
    diff_b = {1'b0, max_exp[5:0]} - {1'b0, ep_hi};
  end

  always_comb begin
    if (full) begin
      operand    = {mp_high, 10'd0};
      shift_high = diff_a[8:0];
      shift_low  = '0;
    end else if (mode == MODE_E5N3) begin
      operand    = {mp_low[7:0], 8'd0, mp_high[7:0], 8'd0};
      shift_high = {3'd0, diff_b[5:0]};
      shift_low  = diff_a[5:0];
    end else begin
      // INT8: both lanes pass the shifter unshifted
      operand    = {mp_low, mp_high[15:0]};
      shift_high = '0;
      shift_low  = '0;
    end
  end

  vec_shifter u_shift (
    .vec         (full),
    .operand     (operand),
    .shift_high  (shift_high),
    .shift_low   (shift_low),
    .result      (shifted),
    .sticky_low  (st_lo),
    .sticky_high (st_hi)
  );

  always_comb begin
    logic        up_f, up_l, up_h;
    logic [31:0] mag_f;
    logic [15:0] mag_l, mag_h;
    up_f  = shifted[0]  & (st_lo | shifted[1]);
    up_l  = shifted[0]  & (st_lo | shifted[1]);
    up_h  = shifted[16] & (st_hi | shifted[17]);
    mag_f = {1'b0, shifted[31:1]};
    mag_l = {1'b0, shifted[15:1]};
    mag_h = {1'b0, shifted[31:17]};
    unique case (mode)
      MODE_E8N10: begin
        term     = sign_high ? ~mag_f : mag_f;
        inc_low  = sign_high ^ up_f;
        inc_high = 1'b0;
      end
      MODE_E5N3: begin
        term     = {sign_low ? ~mag_h : mag_h, sign_high ? ~mag_l : mag_l};
        inc_low  = sign_high ^ up_l;
        inc_high = sign_low ^ up_h;
      end
      default: begin
        term     = shifted;
        inc_low  = 1'b0;
        inc_high = 1'b0;
      end
    endcase
  end

endmodule
