// tb_normalizer: random check of the normalization stage.
//
// Random signed sums and maximum exponents in both floating-point modes;
// the expected FP32 result is the real value sum x 2^(lsb exponent)
// rounded by tb_fp_pkg::real_to_fp, which covers normal, subnormal,
// overflowing and zero results. Exception summaries must override the
// value, and integer mode must pass the sum through sign- or zero-extended.
//
// The module under test is combinational and has no clock: each stimulus
// is applied, the testbench waits #1 and then compares the outputs. The
// testbench has no ports; it ends with a TB_RESULT line and $finish, and a
// watchdog ends a hung run as a failure.
//
// The stimulus mix and the reference arithmetic are this testbench's own;
// the formats, widths and rounding points checked follow the design
// description and the choices stated in the module under test.
module tb_normalizer;
  import fdp_pkg::*;
  import tb_fp_pkg::*;

  localparam int RW = 36;

  dp_mode_e      mode;
  logic          is_unsigned;
  logic [RW-1:0] sum;
  logic [8:0]    max_exp;
  exc_t          exc;
  logic [31:0]   result;
  int            checks = 0, failures = 0;
  int            n_sub = 0, n_inf = 0;

  normalizer #(.RW(RW)) dut (.mode(mode), .is_unsigned(is_unsigned), .sum(sum), .max_exp(max_exp),
                             .exc(exc), .result(result));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what, logic [31:0] e);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s mode=%0d sum=%h max=%0d result=%h expected=%h", what, mode,
                                  sum, max_exp, result, e);
    end
  endtask

  initial begin
    for (int n = 0; n < 30000; n++) begin
      logic [31:0] e;
      real         v;
      int          sh;
      mode = dp_mode_e'($urandom_range(0, 2));
      is_unsigned = 1'($urandom);
      sh = $urandom_range(0, RW - 1);
      sum = RW'({$urandom, $urandom}) >> sh;
      if ($urandom_range(0, 1)) sum = -sum;
      if (n % 101 == 0) sum = '0;
      exc = '0;
      if (n % 17 == 0) exc = exc_t'(3'($urandom));
      max_exp = (mode == MODE_E8N10) ? 9'($urandom_range(0, 508)) : 9'($urandom_range(0, 62));
      if (n % 5 == 0 && mode == MODE_E8N10) max_exp = 9'($urandom_range(0, 40));
      if (n % 7 == 0 && mode == MODE_E8N10) max_exp = 9'($urandom_range(450, 508));
      #1;
      if (mode == MODE_INT8) begin
        e = is_unsigned ? 32'(sum) : 32'($signed(sum));
        check(result == e, "integer bypass", e);
      end else if (exc.nan || (exc.pinf && exc.ninf)) begin
        check(result == 32'h7fc0_0000, "NaN", 32'h7fc0_0000);
      end else if (exc.pinf || exc.ninf) begin
        e = exc.pinf ? 32'h7f80_0000 : 32'hff80_0000;
        check(result == e, "infinity", e);
      end else begin
        if (mode == MODE_E8N10) v = real'($signed(sum)) * pow2(int'(max_exp) - 254 - 29);
        else                    v = real'($signed(sum)) * pow2(int'(max_exp) - 32 - 13);
        e = real_to_fp(v, 8, 23);
        if (e[30:23] == 0 && e[22:0] != 0) n_sub++;
        if (e[30:0] == 31'h7f80_0000) n_inf++;
        check(result == e, "FP32 value", e);
      end
    end
    check(n_sub > 0 && n_inf > 0, "subnormal and overflowing results exercised", 0);
    $display("subnormal %0d, overflow %0d", n_sub, n_inf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
