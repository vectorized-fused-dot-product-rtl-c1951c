// tb_fmt_converter: exhaustive check of the input conversion unit.
//
// Every 16-bit pattern is converted as FP16 and as BF16, and every byte pair
// along the diagonal plus random pairs as E4M3, E5M2 and INT8. The
// reference decodes the input into a real with tb_fp_pkg and compares it
// with the value the internal format represents (mantissa x 2^(exp - bias -
// fraction bits)); the mantissa must be normalized (leading one set), the
// flags must match, and the views of other formats must be zero.
//
// The module under test is combinational and has no clock: each stimulus
// is applied, the testbench waits #1 and then compares the outputs. The
// testbench has no ports; it ends with a TB_RESULT line and $finish, and a
// watchdog ends a hung run as a failure.
//
// The stimulus mix and the reference arithmetic are this testbench's own;
// the formats, widths and rounding points checked follow the design
// description and the choices stated in the module under test.
module tb_fmt_converter;
  import fdp_pkg::*;
  import tb_fp_pkg::*;

  in_fmt_e     fmt;
  logic [15:0] din;
  conv_t       out;
  int          checks = 0, failures = 0;

  fmt_converter dut (.fmt(fmt), .din(din), .out(out));

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
      if (failures < 10) $display("FAIL %s fmt=%0d din=%h out=%h", what, fmt, din, out);
    end
  endtask

  task automatic check_full();
    dec_t d;
    real  v;
    d = decode_fmt(int'(fmt), din);
    check(out.full.isnan == d.nan && out.full.isinf == d.inf && out.full.iszero == d.zero, "flags16");
    if (!d.nan && !d.inf && !d.zero) begin
      v = real'(out.full.mant) * pow2(int'(out.full.exp) - 127 - 10);
      if (out.full.sign) v = -v;
      check(out.full.mant[10] == 1'b1 && v == d.v, "value16");
    end
    check(out.half == '0 && out.ints == '0, "other views zero");
  endtask

  task automatic check_half();
    dec_t d;
    real  v;
    for (int j = 0; j < 2; j++) begin
      d = decode_fmt(int'(fmt), 16'(din >> (8 * j)));
      check(out.half[j].isnan == d.nan && out.half[j].isinf == d.inf && out.half[j].iszero == d.zero, "flags8");
      if (!d.nan && !d.inf && !d.zero) begin
        v = real'(out.half[j].mant) * pow2(int'(out.half[j].exp) - 16 - 3);
        if (out.half[j].sign) v = -v;
        check(out.half[j].mant[3] == 1'b1 && v == d.v, "value8");
      end
    end
    check(out.full == '0 && out.ints == '0, "other views zero");
  endtask

  initial begin
    fmt = FMT_FP16;
    for (int x = 0; x < 65536; x++) begin din = 16'(x); #1; check_full(); end
    fmt = FMT_BF16;
    for (int x = 0; x < 65536; x++) begin din = 16'(x); #1; check_full(); end
    fmt = FMT_E4M3;
    for (int x = 0; x < 256; x++) begin din = {8'(x), 8'(255 - x)}; #1; check_half(); end
    for (int x = 0; x < 2000; x++) begin din = 16'($urandom); #1; check_half(); end
    fmt = FMT_E5M2;
    for (int x = 0; x < 256; x++) begin din = {8'(x), 8'(255 - x)}; #1; check_half(); end
    for (int x = 0; x < 2000; x++) begin din = 16'($urandom); #1; check_half(); end
    fmt = FMT_INT8;
    for (int x = 0; x < 500; x++) begin
      din = 16'($urandom); #1;
      check(out.ints == din && out.full == '0 && out.half == '0, "int8");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
