// tb_accumulator: check of the late accumulation unit.
//
// Streams of random dot product results are accumulated back to back (one
// per clock, with occasional idle cycles and reloads from c_in) in FP32,
// FP16 and INT32. The expected accumulator is kept here as a bit pattern:
// each step decodes it and the new operand into reals, adds them (exact in
// a double for these formats or rounded innocuously) and rounds the sum
// with tb_fp_pkg::real_to_fp. NaN and infinity operands are checked
// separately. d must follow valid by exactly one clock.
//
// The stimulus mix and the reference arithmetic are this testbench's own;
// the formats, widths and rounding points checked follow the design
// description and the choices stated in the module under test.
module tb_accumulator;
  import fdp_pkg::*;
  import tb_fp_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        valid = 0, load = 0;
  out_fmt_e    out_fmt = OUT_FP32;
  logic [31:0] c_in = 0, dp = 0;
  logic        d_valid;
  logic [31:0] d;
  int          checks = 0, failures = 0, cycles = 0;

  accumulator dut (.clk(clk), .rst_n(rst_n), .valid(valid), .out_fmt(out_fmt), .load(load),
                   .c_in(c_in), .dp(dp), .d_valid(d_valid), .d(d));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what, logic [31:0] e);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s fmt=%0d load=%b c_in=%h dp=%h d=%h expected=%h", what, out_fmt, load, c_in, dp, d, e);
    end
  endtask

  function automatic logic [31:0] rand_fp32(int n);
    logic [31:0] x;
    x = $urandom;
    if (n % 3 == 0) x[30:23] = 8'($urandom_range(100, 150));   // comparable magnitudes
    if (n % 9 == 4) x[30:23] = 8'd0;                            // subnormal
    if (x[30:23] == 8'hff) x[30:23] = 8'hfe;
    return x;
  endfunction

  logic [31:0] model;


  function automatic logic [31:0] ref_add(logic [31:0] acc, logic [31:0] x, out_fmt_e f);
    // A non-finite accumulator stays as it is when a finite value is added.
    if (f == OUT_FP32 && acc[30:23] == 8'hff) return acc;
    if (f == OUT_FP16 && acc[14:10] == 5'h1f) return acc;
    case (f)
      OUT_FP32:  return real_to_fp(fp32_to_real(acc) + fp32_to_real(x), 8, 23);
      OUT_FP16:  return real_to_fp(fp16_to_real(acc[15:0]) + fp32_to_real(x), 5, 10);
      default:   return acc + x;
    endcase
  endfunction

  initial begin
    int n_cancel = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 30000; n++) begin
      @(negedge clk);
      if (n % 1000 == 0) out_fmt = out_fmt_e'($urandom_range(0, 2));
      valid = ($urandom_range(0, 7) != 0);
      load  = (n % 1000 == 0) || ($urandom_range(0, 49) == 0);
      c_in  = (out_fmt == OUT_FP16) ? {16'd0, 16'($urandom)} : rand_fp32(n);
      if (out_fmt == OUT_FP16 && c_in[14:10] == 5'h1f) c_in[14] = 1'b0;
      if (out_fmt == OUT_FP16) begin
        dp = rand_fp32(n);
        dp[30:23] = 8'($urandom_range(100, 135));
        if (n % 11 == 0) dp[30:23] = 8'($urandom_range(50, 100));
      end else begin
        dp = rand_fp32(n);
      end
      if (out_fmt == OUT_FP32 && n % 13 == 0) dp = {~model[31], model[30:0]};   // exact cancellation
      if (out_fmt == OUT_INT32) dp = $urandom;
      @(posedge clk);
      #1;
      if (valid) begin
        model = ref_add(load ? c_in : model, dp, out_fmt);
        if (out_fmt == OUT_FP32 && n % 13 == 0) n_cancel++;
        check(d_valid && d == model, "accumulated value", model);
      end else begin
        check(!d_valid, "no result without valid", model);
      end
    end
    // Exceptional operands.
    @(negedge clk);
    out_fmt = OUT_FP32; valid = 1; load = 1; c_in = 32'h7f80_0000; dp = 32'hff80_0000;
    @(posedge clk); #1;
    check(d[30:22] == 9'h1ff, "inf - inf is NaN", 32'h7fc0_0000);
    @(negedge clk);
    c_in = 32'h3f80_0000; dp = 32'h7f80_0000;
    @(posedge clk); #1;
    check(d == 32'h7f80_0000, "x + inf", 32'h7f80_0000);
    @(negedge clk);
    out_fmt = OUT_FP16; c_in = 32'h0000_7bff; dp = 32'h4780_0000;   // 65504 + 65536 overflows
    @(posedge clk); #1;
    check(d == 32'h0000_7c00, "FP16 overflow", 32'h0000_7c00);
    valid = 0;
    check(n_cancel > 0, "cancellation exercised", 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
