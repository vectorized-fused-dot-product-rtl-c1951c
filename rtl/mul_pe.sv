// mul_pe: one processing element of the vectorized multiplication stage.
//
// Each of the K processing elements multiplies one slot of a by the matching
// slot of b. It holds two multipliers. The first one (an 11-bit multiplier,
// extended by one bit so that INT8 operands can be signed) produces the first
// term in every mode: the 22-bit E8N10 mantissa product, the 8-bit product of
// the first E5N3 pair, or the 16-bit product of the first INT8 pair. The
// second one (an 8-bit multiplier, likewise extended by one bit) produces the
// second term, present only in the half-width modes. This is the partial
// product array reuse of the architecture: the E5N3 and INT8 products occupy
// the low corner of the 11-bit array.
//
// Products whose operands are zero, infinite or NaN are forced to zero (the
// exceptional cases are summarised separately by fdp_pkg::prod_exc), and a
// zero flag per term goes to the exponent stage. INT8 products are two's
// complement unless both operands are unsigned; then they are unsigned
// 16-bit values.
//
// Purely combinational. Output result_high[21:0] carries the first term,
// result_low[15:0] the second; sign_* are the product signs (floating point
// only), zero_* mark terms forced to zero.
//
// The multiplier split follows the architecture description; the one-bit
// extension used for signed INT8 is this design's choice.
module mul_pe
  import fdp_pkg::*;
(
  input  dp_mode_e    mode,
  input  logic        a_signed,
  input  logic        b_signed,
  input  conv_t       a,
  input  conv_t       b,
  output logic [21:0] result_high,
  output logic [15:0] result_low,
  output logic        sign_high,
  output logic        sign_low,
  output logic        zero_high,
  output logic        zero_low
);

  logic signed [11:0] x1, y1;
  logic signed [8:0]  x2, y2;
  logic signed [23:0] p1;
  logic signed [17:0] p2;
  logic               z1, z2;

  // Zero, infinite and NaN operands contribute nothing to the finite sum;
  // infinities and NaNs reach the result through the exception summary.
  function automatic logic nonfinite_or_zero(logic iszero, logic isinf, logic isnan);
    return iszero | isinf | isnan;
  endfunction

  always_comb begin
    x1 = '0; y1 = '0; x2 = '0; y2 = '0;
    z1 = 1'b0; z2 = 1'b0;
    sign_high = 1'b0; sign_low = 1'b0;
    unique case (mode)
      MODE_E8N10: begin
        z1 = nonfinite_or_zero(a.full.iszero, a.full.isinf, a.full.isnan)
           | nonfinite_or_zero(b.full.iszero, b.full.isinf, b.full.isnan);
        z2 = 1'b1;
        x1 = {1'b0, a.full.mant};
        y1 = {1'b0, b.full.mant};
        sign_high = a.full.sign ^ b.full.sign;
      end
      MODE_E5N3: begin
        z1 = nonfinite_or_zero(a.half[0].iszero, a.half[0].isinf, a.half[0].isnan)
           | nonfinite_or_zero(b.half[0].iszero, b.half[0].isinf, b.half[0].isnan);
        z2 = nonfinite_or_zero(a.half[1].iszero, a.half[1].isinf, a.half[1].isnan)
           | nonfinite_or_zero(b.half[1].iszero, b.half[1].isinf, b.half[1].isnan);
        x1 = {8'd0, a.half[0].mant};
        y1 = {8'd0, b.half[0].mant};
        x2 = {5'd0, a.half[1].mant};
        y2 = {5'd0, b.half[1].mant};
        sign_high = a.half[0].sign ^ b.half[0].sign;
        sign_low  = a.half[1].sign ^ b.half[1].sign;
      end
      MODE_INT8: begin
        x1 = {{4{a_signed & a.ints[0][7]}}, a.ints[0]};
        y1 = {{4{b_signed & b.ints[0][7]}}, b.ints[0]};
        x2 = {a_signed & a.ints[1][7], a.ints[1]};
        y2 = {b_signed & b.ints[1][7], b.ints[1]};
        z1 = (a.ints[0] == 8'd0) | (b.ints[0] == 8'd0);
        z2 = (a.ints[1] == 8'd0) | (b.ints[1] == 8'd0);
      end
      default: begin
        z1 = 1'b1;
        z2 = 1'b1;
      end
    endcase
    if (z1) begin x1 = '0; y1 = '0; end
    if (z2) begin x2 = '0; y2 = '0; end
  end

  assign p1 = x1 * y1;   // first-term multiplier (11-bit array + sign bit)
  assign p2 = x2 * y2;   // second-term multiplier (8-bit array + sign bit)

  assign result_high = p1[21:0];
  assign result_low  = p2[15:0];
  assign zero_high   = z1;
  assign zero_low    = z2;

endmodule
