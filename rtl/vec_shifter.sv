// vec_shifter: vectorized 32-bit alignment barrel shifter with sticky bit.
//
// A logarithmic right shifter whose stage i shifts by 2^i positions. With
// vec = 1 it shifts one 32-bit operand by shift_high (0..511). With vec = 0
// it shifts two independent 16-bit lanes: bits 31:16 by shift_high[5:0] and
// bits 15:0 by shift_low. In that mode the bits that would cross from the
// upper lane into the lower lane are gated to zero at every stage, and the
// lower lane's multiplexers are steered by shift_low instead of shift_high.
// Stages 1, 2, 4 and 8 are shared by both modes; the 16-position stage exists
// for the 32-bit operand only. A shift amount at or beyond the operand width
// clears the operand.
//
// Sticky bits: each stage ORs the bits it shifts out of the bottom of a lane;
// one more term is set when the shift amount is at least the width and the
// operand is non-zero. sticky_low belongs to the 32-bit operand or the lower
// lane (this path is shared by both modes); sticky_high belongs to the upper
// lane and is used only with vec = 0.
//
// Purely combinational.
//
// The layer structure, the cross-lane gating, the extra full-width stage and
// the sticky scheme follow the architecture description; clearing the result
// on an oversized shift is this design's choice.
module vec_shifter (
  input  logic        vec,
  input  logic [31:0] operand,
  input  logic [8:0]  shift_high,
  input  logic [5:0]  shift_low,
  output logic [31:0] result,
  output logic        sticky_low,
  output logic        sticky_high
);

  logic [31:0] d  [6];
  logic [4:0]  sl;   // per-stage sticky, lower lane / full operand
  logic [3:0]  sh;   // per-stage sticky, upper lane

  assign d[0] = operand;

  // Vectorized layers: shift by 1, 2, 4, 8.
  for (genvar i = 0; i < 4; i++) begin : g_vlayer
    localparam int S = 1 << i;
    logic        sel_hi, sel_lo;
    logic [31:0] shifted;
    assign sel_hi  = shift_high[i];
    assign sel_lo  = vec ? shift_high[i] : shift_low[i];
    // Cross-lane bits d[16 +: S] enter the lower lane only in full-width mode.
    assign shifted = {{S{1'b0}}, d[i][31:16], d[i][15:S]} & {16'hffff, {S{vec}}, {(16-S){1'b1}}};
    assign d[i+1][31:16] = sel_hi ? shifted[31:16] : d[i][31:16];
    assign d[i+1][15:0]  = sel_lo ? shifted[15:0]  : d[i][15:0];
    assign sl[i] = sel_lo & (|d[i][S-1:0]);
    assign sh[i] = sel_hi & ~vec & (|d[i][16 +: S]);
  end

  // Full-width-only layer: shift by 16.
  logic sel16;
  assign sel16 = vec & shift_high[4];
  assign d[5]  = sel16 ? {16'd0, d[4][31:16]} : d[4];
  assign sl[4] = sel16 & (|d[4][15:0]);

  // Oversized shifts.
  logic over_full, over_lo, over_hi;
  assign over_full = vec & (|shift_high[8:5]);
  assign over_lo   = ~vec & (|shift_low[5:4]);
  assign over_hi   = ~vec & (|shift_high[5:4]);

  always_comb begin
    result = d[5];
    if (over_full) result = '0;
    if (over_lo)   result[15:0]  = '0;
    if (over_hi)   result[31:16] = '0;
    sticky_low  = (|sl) | (over_full & (|operand)) | (over_lo & (|operand[15:0]));
    sticky_high = (|sh) | (over_hi & (|operand[31:16]));
  end

endmodule
