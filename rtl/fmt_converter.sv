// fmt_converter: input conversion unit of the vectorized fused dot product.
//
// Converts one 16-bit slot of a or b into the internal formats. It consumes
// one FP16 or BF16 value and produces one E8N10 value, or consumes two FP8
// values (E4M3 or E5M2) and produces two E5N3 values, or passes two INT8
// bytes through. The internal formats are normalized: subnormal FP16, E4M3
// and E5M2 inputs are shifted until their leading one is explicit and their
// exponent is lowered accordingly, so the mantissa always lies in [1, 2).
// BF16 subnormals are flushed to zero, as in the published architecture.
// Exceptional inputs raise isnan / isinf / iszero; their exponent and
// mantissa fields are then zero. E4M3 follows the OCP MX encoding (no
// infinity, S.1111.111 is NaN). Views that do not belong to the selected
// format are zero.
//
// Purely combinational. Interface: fmt (fdp_pkg::in_fmt_e), din (16 bits),
// out (fdp_pkg::conv_t).
//
// What the unit does and the E8N10/E5N3 widths follow the architecture
// description; the E8N10 bias of 127 and the zeroed unused views are this
// design's choices.
module fmt_converter
  import fdp_pkg::*;
(
  input  in_fmt_e    fmt,
  input  logic [15:0] din,
  output conv_t       out
);

  function automatic e5n3_t cvt_e5m2(logic [7:0] v);
    e5n3_t o;
    o = '0;
    o.sign = v[7];
    if (v[6:2] == 5'd31) begin
      o.isinf = (v[1:0] == 2'd0);
      o.isnan = (v[1:0] != 2'd0);
    end else if (v[6:2] == 5'd0) begin
      if (v[1:0] == 2'd0) o.iszero = 1'b1;
      else if (v[1]) begin               // 1.f x 2^-15
        o.exp  = 5'd1;
        o.mant = {1'b1, v[0], 2'b00};
      end else begin                     // 1.0 x 2^-16
        o.exp  = 5'd0;
        o.mant = 4'b1000;
      end
    end else begin
      o.exp  = v[6:2] + 5'd1;            // e - 15 + 16
      o.mant = {1'b1, v[1:0], 1'b0};
    end
    return o;
  endfunction

  function automatic e5n3_t cvt_e4m3(logic [7:0] v);
    e5n3_t o;
    o = '0;
    o.sign = v[7];
    if (v[6:0] == 7'h7f) begin
      o.isnan = 1'b1;
    end else if (v[6:3] == 4'd0) begin
      if (v[2:0] == 3'd0) o.iszero = 1'b1;
      else if (v[2]) begin               // 1.ff x 2^-7
        o.exp  = 5'd9;
        o.mant = {1'b1, v[1:0], 1'b0};
      end else if (v[1]) begin           // 1.f x 2^-8
        o.exp  = 5'd8;
        o.mant = {1'b1, v[0], 2'b00};
      end else begin                     // 1.0 x 2^-9
        o.exp  = 5'd7;
        o.mant = 4'b1000;
      end
    end else begin
      o.exp  = {1'b0, v[6:3]} + 5'd9;    // e - 7 + 16
      o.mant = {1'b1, v[2:0]};
    end
    return o;
  endfunction

  function automatic e8n10_t cvt_fp16(logic [15:0] v);
    e8n10_t o;
    int     p;
    o = '0;
    o.sign = v[15];
    if (v[14:10] == 5'd31) begin
      o.isinf = (v[9:0] == 10'd0);
      o.isnan = (v[9:0] != 10'd0);
    end else if (v[14:10] == 5'd0) begin
      if (v[9:0] == 10'd0) o.iszero = 1'b1;
      else begin
        p = 0;                            // position of the leading one
        for (int i = 0; i < 10; i++) if (v[i]) p = i;
        o.exp  = 8'(p + 103);             // p - 24 + 127
        o.mant = 11'({1'b0, v[9:0]} << (10 - p));
      end
    end else begin
      o.exp  = {3'd0, v[14:10]} + 8'd112; // e - 15 + 127
      o.mant = {1'b1, v[9:0]};
    end
    return o;
  endfunction

  function automatic e8n10_t cvt_bf16(logic [15:0] v);
    e8n10_t o;
    o = '0;
    o.sign = v[15];
    if (v[14:7] == 8'd255) begin
      o.isinf = (v[6:0] == 7'd0);
      o.isnan = (v[6:0] != 7'd0);
    end else if (v[14:7] == 8'd0) begin
      o.iszero = 1'b1;                    // subnormals flushed to zero
    end else begin
      o.exp  = v[14:7];
      o.mant = {1'b1, v[6:0], 3'b000};
    end
    return o;
  endfunction

  always_comb begin
    out = '0;
    unique case (fmt)
      FMT_FP16: out.full = cvt_fp16(din);
      FMT_BF16: out.full = cvt_bf16(din);
      FMT_E4M3: begin
        out.half[0] = cvt_e4m3(din[7:0]);
        out.half[1] = cvt_e4m3(din[15:8]);
      end
      FMT_E5M2: begin
        out.half[0] = cvt_e5m2(din[7:0]);
        out.half[1] = cvt_e5m2(din[15:8]);
      end
      FMT_INT8: out.ints = din;
      default: out = '0;
    endcase
  end

endmodule
