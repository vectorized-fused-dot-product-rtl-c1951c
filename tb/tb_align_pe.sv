// tb_align_pe: random check of the alignment processing element.
//
// For random products, exponents and signs the expected aligned term is
// worked out with reals: the product magnitude is scaled by
// 2^(fraction bits - exponent difference), rounded to the nearest integer
// (ties to even) and signed. The PE's output term plus its increment bit,
// read as a 32-bit (or two 16-bit) two's complement number, must equal it.
// INT8 mode must pass the products through with no increment.
//
// The module under test is combinational and has no clock: each stimulus
// is applied, the testbench waits #1 and then compares the outputs. The
// testbench has no ports; it ends with a TB_RESULT line and $finish, and a
// watchdog ends a hung run as a failure.
//
// The stimulus mix and the reference arithmetic are this testbench's own;
// the formats, widths and rounding points checked follow the design
// description and the choices stated in the module under test.
module tb_align_pe;
  import fdp_pkg::*;
  import tb_fp_pkg::*;

  dp_mode_e    mode;
  logic [8:0]  max_exp, ep_full;
  logic [5:0]  ep_hi;
  logic [21:0] mp_high;
  logic [15:0] mp_low;
  logic        sign_high, sign_low;
  logic [31:0] term;
  logic        inc_low, inc_high;
  int          checks = 0, failures = 0;
  int          n_round = 0, n_neg = 0, n_tie = 0;

  align_pe dut (.mode(mode), .max_exp(max_exp), .ep_full(ep_full), .ep_hi(ep_hi),
                .mp_high(mp_high), .mp_low(mp_low), .sign_high(sign_high), .sign_low(sign_low),
                .term(term), .inc_low(inc_low), .inc_high(inc_high));

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
        $display("FAIL %s mode=%0d max=%0d ep=%0d/%0d mp=%h/%h s=%b%b term=%h inc=%b%b", what, mode,
                 max_exp, ep_full, ep_hi, mp_high, mp_low, sign_high, sign_low, term, inc_high, inc_low);
    end
  endtask

  // Expected term: product (2 integer bits, pf fraction bits) shifted right
  // by d and rounded to qf fraction bits.
  function automatic real expect_term(int mp, int pf, int d, int qf, bit s);
    real v;
    v = rne_int(real'(mp) * pow2(qf - pf - d));
    return s ? -v : v;
  endfunction

  initial begin
    for (int n = 0; n < 30000; n++) begin
      real e0, e1, got0, got1, x;
      mode = dp_mode_e'($urandom_range(0, 2));
      sign_high = 1'($urandom);
      sign_low  = 1'($urandom);
      if (mode == MODE_E8N10) begin
        max_exp = 9'($urandom_range(0, 508));
        ep_full = (n % 3 == 0) ? max_exp - 9'($urandom_range(0, 40)) : 9'($urandom_range(0, max_exp));
        if (ep_full > max_exp) ep_full = max_exp;
        mp_high = (n % 11 == 0) ? 22'd0 : 22'($urandom_range(1 << 20, (1 << 22) - 1));
        mp_low  = 16'($urandom);
        ep_hi   = 6'($urandom);
        #1;
        e0 = expect_term(int'(mp_high), 20, int'(max_exp - ep_full), 29, sign_high);
        got0 = real'($signed(term)) + real'(inc_low);
        x = real'(mp_high) * pow2(29 - 20 - int'(max_exp - ep_full));
        if (x != $floor(x)) n_round++;
        if (x - $floor(x) == 0.5) n_tie++;
        if (sign_high && mp_high != 0) n_neg++;
        check(got0 == e0 && inc_high == 1'b0, "E8N10 term");
      end else if (mode == MODE_E5N3) begin
        max_exp = 9'($urandom_range(0, 62));
        ep_full = 9'($urandom_range(0, max_exp));
        ep_hi   = 6'($urandom_range(0, max_exp));
        if (n % 4 == 0) ep_hi = max_exp[5:0] - 6'($urandom_range(0, 3));
        if (ep_hi > max_exp[5:0]) ep_hi = max_exp[5:0];
        mp_high = {14'($urandom), (n % 13 == 0) ? 8'd0 : 8'($urandom_range(64, 225))};
        mp_high[21:8] = '0;
        mp_low  = {8'd0, 8'($urandom_range(64, 225))};
        #1;
        e0 = expect_term(int'(mp_high[7:0]), 6, int'(max_exp[5:0] - ep_full[5:0]), 13, sign_high);
        e1 = expect_term(int'(mp_low[7:0]),  6, int'(max_exp[5:0] - ep_hi), 13, sign_low);
        got0 = real'($signed(term[15:0])) + real'(inc_low);
        got1 = real'($signed(term[31:16])) + real'(inc_high);
        check(got0 == e0, "E5N3 low term");
        check(got1 == e1, "E5N3 high term");
      end else begin
        mp_high = 22'($urandom);
        mp_low  = 16'($urandom);
        max_exp = 9'($urandom);
        ep_full = 9'($urandom);
        ep_hi   = 6'($urandom);
        #1;
        check(term == {mp_low, mp_high[15:0]} && !inc_low && !inc_high, "INT8 bypass");
      end
    end
    check(n_round > 0 && n_neg > 0 && n_tie > 0, "rounding, negation and ties exercised");
    $display("rounded %0d, ties %0d, negative %0d", n_round, n_tie, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
