// summation: vectorized summation stage (two CSA trees, 4:2 compressor, CPA).
//
// The K aligned terms of the alignment stage are split into half-lanes:
// bits 15:0 of every term feed the low carry-save tree, bits 31:16 the high
// tree. Each tree also takes the number of increment bits of its lane as one
// more operand, so the increments of the alignment stage are added here.
//
// Full width (E8N10, K 32-bit terms): the low halves are unsigned pieces of
// the terms and are zero extended; the high halves carry the sign and are
// sign extended. The high tree's carry-save pair is then shifted left by 16
// positions and the 4:2 compressor merges the four words into one carry-save
// pair, which the CPA adds: a 32 + log2(K) = 36-bit sum with 29 fraction
// bits.
//
// Half width (E5N3 or INT8, 2K 16-bit terms): each 16-bit term is sign
// extended (zero extended for unsigned x unsigned INT8) in its own tree,
// the two pairs are stacked without a shift, and the result is the
// 16 + log2(2K) = 21-bit sum, sign or zero extended to the output width.
//
// Each tree is TW = 17 + log2(K) bits wide. In full width the zero-extended
// low tree can never overflow TW bits, so its carry-save words can be placed
// at the bottom of the wide 4:2 compressor without losing a carry; the high
// tree only matters modulo 2^(RW-16), which TW covers.
//
// Purely combinational.
//
// The split into two 16-bit-lane trees, the optional 16-position shift in
// the 4:2 step and the shared CPA follow the architecture description;
// adding the increments as a count operand is this design's choice.
module summation #(
  parameter int K = 16
) (
  input  logic                 full_mode,
  input  logic                 is_unsigned,
  input  logic [K-1:0][31:0]   terms,
  input  logic [K-1:0]         inc_low,
  input  logic [K-1:0]         inc_high,
  output logic [32+$clog2(K)-1:0] result
);

  localparam int LG = $clog2(K);
  localparam int TW = 16 + LG + 1;   // tree width (21 for K = 16)
  localparam int RW = 32 + LG;       // result width (36 for K = 16)

  logic [TW-1:0] lo_ops [K+1];
  logic [TW-1:0] hi_ops [K+1];
  logic [TW-1:0] low_sum, low_carry, high_sum, high_carry;

  function automatic logic [TW-1:0] popcount(logic [K-1:0] v);
    logic [TW-1:0] n;
    n = '0;
    for (int i = 0; i < K; i++) n = n + TW'(v[i]);
    return n;
  endfunction

  always_comb begin
    for (int i = 0; i < K; i++) begin
      logic lo_sx, hi_sx;
      lo_sx = ~full_mode & ~is_unsigned & terms[i][15];
      hi_sx = ~is_unsigned & terms[i][31];
      lo_ops[i] = {{(TW-16){lo_sx}}, terms[i][15:0]};
      hi_ops[i] = {{(TW-16){hi_sx}}, terms[i][31:16]};
    end
    lo_ops[K] = popcount(inc_low);
    hi_ops[K] = popcount(inc_high);
  end

  csa_tree #(.N(K + 1), .W(TW)) u_lo (.ops(lo_ops), .sum(low_sum), .carry(low_carry));
  csa_tree #(.N(K + 1), .W(TW)) u_hi (.ops(hi_ops), .sum(high_sum), .carry(high_carry));

  // Configurable 4:2 compressor (two 3:2 rows) and carry-propagate adder.
  logic [RW-1:0] w0, w1, w2, w3;
  logic [RW-1:0] s1, c1, result_sum, result_carry, total;

  always_comb begin
    w0 = RW'(low_sum);
    w1 = RW'(low_carry);
    if (full_mode) begin
      w2 = RW'(high_sum) << 16;
      w3 = RW'(high_carry) << 16;
    end else begin
      w2 = RW'(high_sum);
      w3 = RW'(high_carry);
    end
    s1 = w0 ^ w1 ^ w2;
    c1 = ((w0 & w1) | (w0 & w2) | (w1 & w2)) << 1;
    result_sum = s1 ^ c1 ^ w3;
    result_carry = ((s1 & c1) | (s1 & w3) | (c1 & w3)) << 1;
    total = result_sum + result_carry;   // CPA
    if (full_mode)
      result = total;
    else
      result = {{(RW-TW){~is_unsigned & total[TW-1]}}, total[TW-1:0]};
  end

endmodule
