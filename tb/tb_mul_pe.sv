// tb_mul_pe: random check of the multiplication processing element.
//
// Drives random converted operands in the three modes (with zero,
// infinite and NaN flags now and then, and all four INT8 signedness
// combinations) and compares both products, their signs and the zero flags
// with integer products computed here.
//
// The module under test is combinational and has no clock: each stimulus
// is applied, the testbench waits #1 and then compares the outputs. The
// testbench has no ports; it ends with a TB_RESULT line and $finish, and a
// watchdog ends a hung run as a failure.
//
// The stimulus mix and the reference arithmetic are this testbench's own;
// the formats, widths and rounding points checked follow the design
// description and the choices stated in the module under test.
module tb_mul_pe;
  import fdp_pkg::*;

  dp_mode_e    mode;
  logic        a_signed, b_signed;
  conv_t       a, b;
  logic [21:0] rh;
  logic [15:0] rl;
  logic        sh, sl, zh, zl;
  int          checks = 0, failures = 0;

  mul_pe dut (.mode(mode), .a_signed(a_signed), .b_signed(b_signed), .a(a), .b(b),
              .result_high(rh), .result_low(rl), .sign_high(sh), .sign_low(sl),
              .zero_high(zh), .zero_low(zl));

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
      if (failures < 10) $display("FAIL %s mode=%0d a=%h b=%h rh=%h rl=%h", what, mode, a, b, rh, rl);
    end
  endtask

  function automatic logic [2:0] rflags();
    int r;
    r = $urandom_range(0, 19);
    return (r == 0) ? 3'b001 : (r == 1) ? 3'b010 : (r == 2) ? 3'b100 : 3'b000;
  endfunction

  initial begin
    for (int n = 0; n < 20000; n++) begin
      a = conv_t'($bits(conv_t)'({$urandom, $urandom, $urandom}));
      b = conv_t'($bits(conv_t)'({$urandom, $urandom, $urandom}));
      a.full.mant[10] = 1'b1; b.full.mant[10] = 1'b1;
      for (int j = 0; j < 2; j++) begin
        a.half[j].mant[3] = 1'b1; b.half[j].mant[3] = 1'b1;
        {a.half[j].isnan, a.half[j].isinf, a.half[j].iszero} = rflags();
        {b.half[j].isnan, b.half[j].isinf, b.half[j].iszero} = rflags();
      end
      {a.full.isnan, a.full.isinf, a.full.iszero} = rflags();
      {b.full.isnan, b.full.isinf, b.full.iszero} = rflags();
      a_signed = 1'($urandom); b_signed = 1'($urandom);
      mode = dp_mode_e'($urandom_range(0, 2));
      #1;
      case (mode)
        MODE_E8N10: begin
          bit z;
          z = (a.full.isnan | a.full.isinf | a.full.iszero | b.full.isnan | b.full.isinf | b.full.iszero);
          check(zh == z && zl == 1'b1, "e8n10 zero flags");
          check(rh == (z ? 22'd0 : 22'(a.full.mant) * 22'(b.full.mant)), "e8n10 product");
          check(sh == (a.full.sign ^ b.full.sign), "e8n10 sign");
        end
        MODE_E5N3: begin
          for (int j = 0; j < 2; j++) begin
            bit z;
            int p;
            z = (a.half[j].isnan | a.half[j].isinf | a.half[j].iszero |
                 b.half[j].isnan | b.half[j].isinf | b.half[j].iszero);
            p = z ? 0 : int'(a.half[j].mant) * int'(b.half[j].mant);
            if (j == 0) check(zh == z && rh == 22'(p) && sh == (a.half[0].sign ^ b.half[0].sign), "e5n3 term 0");
            else        check(zl == z && rl == 16'(p) && sl == (a.half[1].sign ^ b.half[1].sign), "e5n3 term 1");
          end
        end
        default: begin
          for (int j = 0; j < 2; j++) begin
            int x, y, p;
            logic [15:0] got;
            x = a_signed ? int'($signed(a.ints[j])) : int'(a.ints[j]);
            y = b_signed ? int'($signed(b.ints[j])) : int'(b.ints[j]);
            p = x * y;
            got = (j == 0) ? rh[15:0] : rl;
            if (!a_signed && !b_signed) check(int'(got) == p, "int8 unsigned product");
            else                        check(int'($signed(got)) == p, "int8 signed product");
            check(((j == 0) ? zh : zl) == (p == 0 && (x == 0 || y == 0)), "int8 zero flag");
          end
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
