// normalizer: normalization stage, sum to FP32 (or INT32 bypass).
//
// Floating point: the signed sum from the summation stage is a fixed-point
// value whose least significant bit is worth 2^(max_exp - 254 - 29) for
// E8N10 and 2^(max_exp - 32 - 13) for E5N3 (max_exp carries two exponent
// biases). The stage takes its magnitude, counts leading zeros, shifts the
// leading one to the top, subtracts the leading-zero count from the exponent
// and rounds once to FP32 (nearest, ties to even, with gradual underflow and
// overflow to infinity; see fdp_pkg::fp_round_pack). An exact zero sum gives
// +0. Exceptional products override the result: any NaN, or infinities of
// both signs, give the quiet NaN 0x7FC00000; otherwise an infinity gives
// +/-infinity.
//
// Integer: the stage is bypassed and the sum is sign extended (zero extended
// for unsigned x unsigned) to INT32.
//
// Purely combinational. Input sum is RW = 32 + log2(K) bits.
//
// The leading-zero shift, exponent adjustment and FP32 rounding follow the
// architecture description; the tie rule, the sign of a zero result, the
// NaN encoding and the subnormal handling are this design's choices.
module normalizer
  import fdp_pkg::*;
#(
  parameter int RW = 36
) (
  input  dp_mode_e          mode,
  input  logic              is_unsigned,
  input  logic [RW-1:0]     sum,
  input  logic [EPF_W-1:0]  max_exp,
  input  exc_t              exc,
  output logic [31:0]       result
);

  always_comb begin
    logic              neg;
    logic [RW:0]       mag;
    logic [63:0]       m64, norm;
    int unsigned       lz;
    logic signed [15:0] lsb_exp, exp_msb;

    neg = sum[RW-1];
    mag = neg ? -{1'b1, sum} : {1'b0, sum};
    m64 = 64'(mag) << (63 - RW);
    lz  = lzc64(m64);
    norm = m64 << lz;
    if (mode == MODE_E8N10)
      lsb_exp = $signed({7'd0, max_exp}) - 16'sd254 - 16'sd29;
    else
      lsb_exp = $signed({7'd0, max_exp}) - 16'sd32 - 16'sd13;
    // Position of the leading one above the least significant bit.
    exp_msb = lsb_exp + 16'(RW) - 16'(lz);

    if (mode == MODE_INT8) begin
      result = is_unsigned ? 32'(sum) : 32'($signed(sum));
    end else if (exc.nan || (exc.pinf && exc.ninf)) begin
      result = 32'h7fc0_0000;
    end else if (exc.pinf) begin
      result = 32'h7f80_0000;
    end else if (exc.ninf) begin
      result = 32'hff80_0000;
    end else begin
      result = fp_round_pack(neg && (mag != '0), exp_msb, norm, 1'b0, 1'b0);
    end
  end

endmodule
