// csa_tree: carry-save adder tree reducing N operands of W bits to two.
//
// A Wallace-style reduction: at every level the operands are taken three at
// a time through rows of full adders (3:2 counters) giving a sum and a
// left-shifted carry word; one or two leftover operands pass to the next
// level unchanged. Levels repeat until two words remain, whose sum equals the
// sum of the inputs modulo 2^W. For N >= 3 the last word is a shifted carry
// word, so carry[0] is always zero.
//
// Purely combinational. N >= 2. Used by the summation stage.
//
// The two trees of k operands and the 3:2 counters follow the design; the
// level-by-level grouping and the extra operand for increments are this
// implementation's own choice.
module csa_tree #(
  parameter int N = 17,
  parameter int W = 21
) (
  input  logic [W-1:0] ops [N],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  // Number of operands left after l levels.
  function automatic int count_at(int n, int l);
    int c;
    c = n;
    for (int i = 0; i < l; i++) if (c > 2) c = c - c / 3;
    return c;
  endfunction

  function automatic int levels(int n);
    int c, l;
    c = n;
    l = 0;
    while (c > 2) begin
      c = c - c / 3;
      l++;
    end
    return l;
  endfunction

  localparam int L = levels(N);

  // One array of operands per level; level l reads level l-1.
  for (genvar l = 0; l <= L; l++) begin : g_lvl
    logic [W-1:0] v [N];
    if (l == 0) begin : g_first
      for (genvar j = 0; j < N; j++) begin : g_in
        assign v[j] = ops[j];
      end
    end else begin : g_next
      localparam int NP = count_at(N, l - 1);
      localparam int NG = NP / 3;
      localparam int NC = count_at(N, l);
      for (genvar g = 0; g < NG; g++) begin : g_fa
        logic [W-1:0] x, y, z;
        assign x = g_lvl[l-1].v[3*g];
        assign y = g_lvl[l-1].v[3*g+1];
        assign z = g_lvl[l-1].v[3*g+2];
        assign v[2*g]   = x ^ y ^ z;
        assign v[2*g+1] = ((x & y) | (x & z) | (y & z)) << 1;
      end
      for (genvar r = 0; r < NP - 3 * NG; r++) begin : g_pass
        assign v[2*NG+r] = g_lvl[l-1].v[3*NG+r];
      end
      for (genvar u = NC; u < N; u++) begin : g_unused
        assign v[u] = '0;
      end
    end
  end

  assign sum   = g_lvl[L].v[0];
  assign carry = g_lvl[L].v[1];

endmodule
