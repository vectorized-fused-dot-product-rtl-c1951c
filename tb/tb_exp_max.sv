// tb_exp_max: random check of the exponent addition and maximum stage.
//
// Random exponents and zero flags in all three modes; the product exponents
// and the maximum are recomputed here with plain integer arithmetic. Some
// vectors are all-zero or concentrate the maximum in the second-term tree so
// that the final E5N3 reduction step decides.
//
// The module under test is combinational and has no clock: each stimulus
// is applied, the testbench waits #1 and then compares the outputs. The
// testbench has no ports; it ends with a TB_RESULT line and $finish, and a
// watchdog ends a hung run as a failure.
//
// The stimulus mix and the reference arithmetic are this testbench's own;
// the formats, widths and rounding points checked follow the design
// description and the choices stated in the module under test.
module tb_exp_max;
  import fdp_pkg::*;

  localparam int K = 16;

  dp_mode_e                  mode;
  conv_t    [K-1:0]          a, b;
  logic     [K-1:0]          zh, zl;
  logic     [K-1:0][8:0]     ep_full;
  logic     [K-1:0][5:0]     ep_hi;
  logic     [8:0]            max_exp;
  int                        checks = 0, failures = 0;

  exp_max #(.K(K)) dut (.mode(mode), .a(a), .b(b), .zero_high(zh), .zero_low(zl),
                        .ep_full(ep_full), .ep_hi(ep_hi), .max_exp(max_exp));

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
      if (failures < 10) $display("FAIL %s mode=%0d max=%0d", what, mode, max_exp);
    end
  endtask

  initial begin
    int hi_wins = 0;
    for (int n = 0; n < 5000; n++) begin
      int mx, e0, e1, mx0, mx1;
      mode = dp_mode_e'($urandom_range(0, 2));
      for (int i = 0; i < K; i++) begin
        a[i] = conv_t'($bits(conv_t)'({$urandom, $urandom, $urandom}));
        b[i] = conv_t'($bits(conv_t)'({$urandom, $urandom, $urandom}));
        zh[i] = ($urandom_range(0, 3) == 0) || (n % 50 == 0);
        zl[i] = ($urandom_range(0, 3) == 0) || (n % 50 == 0);
        if (n % 7 == 1) begin
          // push the maximum into the second-term tree
          a[i].half[0].exp = 5'($urandom_range(0, 10));
          b[i].half[0].exp = 5'($urandom_range(0, 10));
        end
      end
      #1;
      mx = 0; mx0 = 0; mx1 = 0;
      for (int i = 0; i < K; i++) begin
        if (mode == MODE_E8N10) begin
          e0 = zh[i] ? 0 : int'(a[i].full.exp) + int'(b[i].full.exp);
          e1 = 0;
        end else if (mode == MODE_E5N3) begin
          e0 = zh[i] ? 0 : int'(a[i].half[0].exp) + int'(b[i].half[0].exp);
          e1 = zl[i] ? 0 : int'(a[i].half[1].exp) + int'(b[i].half[1].exp);
        end else begin
          e0 = 0; e1 = 0;
        end
        check(int'(ep_full[i]) == e0 && int'(ep_hi[i]) == e1, "product exponent");
        if (e0 > mx0) mx0 = e0;
        if (e1 > mx1) mx1 = e1;
      end
      mx = (mx0 > mx1) ? mx0 : mx1;
      if (mx1 > mx0) hi_wins++;
      check(int'(max_exp) == mx, "maximum");
    end
    check(hi_wins > 0, "second tree decided at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
