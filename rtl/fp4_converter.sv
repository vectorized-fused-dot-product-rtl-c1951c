// fp4_converter: widens N FP4 (E2M1) values to N E4M3 values.
//
// FP4 here is the OCP MX E2M1 element format: sign, 2-bit exponent with
// bias 1 and one fraction bit, with no infinity or NaN. Its eight
// magnitudes 0, 0.5, 1, 1.5, 2, 3, 4 and 6 are all exact in E4M3 (bias 7):
//   exponent 0 (0 or 0.5): 0 stays 0 (sign kept); 0.5 becomes 2^-1
//     (E4M3 exponent 6, fraction 0);
//   exponent e = 1..3: value (1 + f/2) x 2^(e-1) becomes E4M3 exponent
//     e + 6 with fraction {f, 2'b00}.
// The conversion is exact, so the FP4 dot product is the E4M3 dot product
// of the widened values.
//
// Interface: element i is din[4i+3:4i] and dout[8i+7:8i]. Purely
// combinational, one small lookup per element.
//
// That FP4 inputs are supported by conversion to an FP8 format, and that
// FP4 follows the OCP MX specification, follow the architecture
// description; E2M1 as the FP4 encoding and E4M3 as the target format are
// this design's choices.
module fp4_converter #(
  parameter int N = 32
) (
  input  logic [4*N-1:0] din,
  output logic [8*N-1:0] dout
);

  function automatic logic [7:0] e2m1_to_e4m3(logic [3:0] x);
    logic       s;
    logic [1:0] e;
    logic       f;
    s = x[3];
    e = x[2:1];
    f = x[0];
    if (e == 2'd0) return f ? {s, 4'd6, 3'd0} : {s, 7'd0};
    return {s, {2'b00, e} + 4'd6, f, 2'b00};
  endfunction

  for (genvar i = 0; i < N; i++) begin : g_elem
    assign dout[8*i +: 8] = e2m1_to_e4m3(din[4*i +: 4]);
  end

endmodule
