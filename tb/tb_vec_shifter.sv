// tb_vec_shifter: check of the vectorized barrel shifter.
//
// Full width (vec = 1): every shift amount 0..511 over random operands;
// the reference shifts the operand inside a 544-bit word and ORs the bits
// that fall off into the sticky bit. Half width (vec = 0): random
// operands and independent lane amounts 0..63; each 16-bit lane is
// shifted on its own, so no bit may cross from the upper into the lower
// lane.
//
// The module under test is combinational and has no clock: each stimulus
// is applied, the testbench waits #1 and then compares the outputs. The
// testbench has no ports; it ends with a TB_RESULT line and $finish, and a
// watchdog ends a hung run as a failure.
//
// The stimulus mix and the reference arithmetic are this testbench's own;
// the formats, widths and rounding points checked follow the design
// description and the choices stated in the module under test.
module tb_vec_shifter;

  logic        vec;
  logic [31:0] operand, result;
  logic [8:0]  shift_high;
  logic [5:0]  shift_low;
  logic        st_lo, st_hi;
  int          checks = 0, failures = 0;

  vec_shifter dut (.vec(vec), .operand(operand), .shift_high(shift_high), .shift_low(shift_low),
                   .result(result), .sticky_low(st_lo), .sticky_high(st_hi));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s t=%0t vec=%0d op=%h sh=%0d sl=%0d res=%h st=%b%b", what, $time, vec, operand,
                 shift_high, shift_low, result, st_hi, st_lo);
    end
  endtask

  // Right shift of a w-bit value with the lost bits ORed into sticky.
  function automatic logic [32:0] ref_shift(logic [31:0] x, int w, int s);
    logic [31:0] r;
    logic        st;
    r = 0; st = 0;
    for (int i = 0; i < w; i++) begin
      if (x[i]) begin
        if (i - s >= 0) r[i-s] = 1'b1;
        else st = 1'b1;
      end
    end
    return {st, r};
  endfunction

  initial begin
    logic [32:0] e, el, eh;
    vec = 1'b1;
    shift_low = '0;
    for (int s = 0; s < 512; s++) begin
      for (int n = 0; n < 20; n++) begin
        operand = (n == 0) ? 32'd0 : (n == 1) ? 32'hffff_ffff : $urandom;
        shift_high = 9'(s);
        shift_low = 6'($urandom);      // ignored in full width
        vec = 1'b1;
        #1;
        e = ref_shift(operand, 32, s);
        check(result == e[31:0] && st_lo == e[32], "full width");
      end
    end
    vec = 1'b0;
    for (int n = 0; n < 20000; n++) begin
      vec = 1'b0;
      operand = $urandom;
      if (n % 5 == 0) operand[15:0] = 16'd0;
      shift_high = {3'd0, 6'($urandom_range(0, 63))};
      shift_low  = 6'($urandom_range(0, 63));
      if (n % 2 == 0) begin
        shift_high[5:4] = 2'b00;
        shift_low[5:4]  = 2'b00;
      end
      #1;
      el = ref_shift({16'd0, operand[15:0]}, 16, int'(shift_low));
      eh = ref_shift({16'd0, operand[31:16]}, 16, int'(shift_high));
      check(result[15:0] == el[15:0] && st_lo == el[32], "lower lane");
      check(result[31:16] == eh[15:0] && st_hi == eh[32], "upper lane");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
