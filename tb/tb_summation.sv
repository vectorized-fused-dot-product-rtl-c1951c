// tb_summation: random check of the summation stage.
//
// Full width: K random 32-bit two's complement terms plus K increment bits;
// the expected result is their exact sum. Half width: 2K 16-bit terms (read
// as signed, or unsigned for the unsigned INT8 case) plus increments. Sums
// are formed with 64-bit integers. Extreme vectors (all terms at the
// most negative or most positive value) exercise the full result width.
//
// The module under test is combinational and has no clock: each stimulus
// is applied, the testbench waits #1 and then compares the outputs. The
// testbench has no ports; it ends with a TB_RESULT line and $finish, and a
// watchdog ends a hung run as a failure.
//
// The stimulus mix and the reference arithmetic are this testbench's own;
// the formats, widths and rounding points checked follow the design
// description and the choices stated in the module under test.
module tb_summation;

  localparam int K  = 16;
  localparam int RW = 36;

  logic                full_mode, is_unsigned;
  logic [K-1:0][31:0]  terms;
  logic [K-1:0]        inc_low, inc_high;
  logic [RW-1:0]       result;
  int                  checks = 0, failures = 0;

  summation #(.K(K)) dut (.full_mode(full_mode), .is_unsigned(is_unsigned), .terms(terms),
                          .inc_low(inc_low), .inc_high(inc_high), .result(result));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what, longint exp_v);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s full=%0d uns=%0d result=%h expected=%0d", what, full_mode,
                                  is_unsigned, result, exp_v);
    end
  endtask

  initial begin
    for (int n = 0; n < 20000; n++) begin
      longint s;
      int     kind;
      kind = n % 4;
      full_mode   = (kind == 0 || kind == 1);
      is_unsigned = (kind == 3);
      for (int i = 0; i < K; i++) terms[i] = $urandom;
      inc_low  = K'($urandom);
      inc_high = K'($urandom);
      if (n % 97 == 0) for (int i = 0; i < K; i++) terms[i] = 32'h8000_8000;
      if (n % 89 == 0) begin
        for (int i = 0; i < K; i++) terms[i] = 32'h7fff_ffff;
        inc_low = '0;
      end
      if (n % 83 == 0) for (int i = 0; i < K; i++) terms[i] = 32'hffff_ffff;
      if (full_mode) inc_high = '0;   // no upper-lane increments in full width
      if (is_unsigned) begin
        // INT8 products carry no increments
        inc_low  = '0;
        inc_high = '0;
      end
      #1;
      s = 0;
      if (full_mode) begin
        for (int i = 0; i < K; i++) s += longint'($signed(terms[i])) + longint'(inc_low[i]);
        check(longint'($signed(result)) == s, "full width sum", s);
      end else if (is_unsigned) begin
        for (int i = 0; i < K; i++) s += longint'(terms[i][15:0]) + longint'(terms[i][31:16]);
        check(longint'(result) == s, "unsigned half width sum", s);
      end else begin
        for (int i = 0; i < K; i++)
          s += longint'($signed(terms[i][15:0])) + longint'($signed(terms[i][31:16]))
             + longint'(inc_low[i]) + longint'(inc_high[i]);
        check(longint'($signed(result)) == s, "signed half width sum", s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
