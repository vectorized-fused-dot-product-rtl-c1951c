// tb_fp4_converter: check of the FP4 (E2M1) to E4M3 widening.
//
// Every one of the 16 FP4 codes is placed in every element position, and
// random vectors follow. Each output byte is decoded as E4M3 and must have
// the same real value and the same sign as the FP4 input decoded
// independently; it must never be the E4M3 NaN code.
//
// Purely combinational: outputs are sampled 1 time unit after the inputs
// change.
//
// The stimulus and the reference decoding are this testbench's own; the
// formats follow the design description and the choices stated in the
// module under test.
module tb_fp4_converter;
  import tb_fp_pkg::*;

  localparam int N = 32;

  logic [4*N-1:0] din;
  logic [8*N-1:0] dout;
  int             checks = 0, failures = 0;

  fp4_converter #(.N(N)) dut (.din(din), .dout(dout));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int i = 0; i < N; i++) begin
      dec_t x, y;
      x = decode_e2m1(din[4*i +: 4]);
      y = decode_fmt(1, {8'd0, dout[8*i +: 8]});
      checks++;
      if (y.nan || y.v != x.v || y.sign != x.sign) begin
        failures++;
        if (failures < 10) $display("FAIL element %0d: in %h out %h", i, din[4*i +: 4], dout[8*i +: 8]);
      end
    end
  endtask

  initial begin
    for (int c = 0; c < 16; c++) begin
      for (int i = 0; i < N; i++) din[4*i +: 4] = 4'((c + i) % 16);
      #1;
      check_all();
    end
    for (int n = 0; n < 2000; n++) begin
      for (int j = 0; j < N / 8; j++) din[32*j +: 32] = $urandom;
      #1;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
