// exp_max: exponent addition and maximum reduction stage.
//
// For every processing element the exponents of a and b are added into
// product exponents. A 9-bit adder forms the E8N10 product exponent; in E5N3
// mode the same adder forms the exponent of the first (low) term of the slot,
// and a dedicated 6-bit adder forms the exponent of the second (high) term.
// Products flagged zero get exponent 0, so they never win the maximum.
//
// Two independent maximum-reduction trees of depth K follow: a 9-bit tree
// over the E8N10 exponents (or the first-term E5N3 exponents) and a 6-bit
// tree over the second-term E5N3 exponents. In E5N3 mode a final reduction
// step combines the two results. In INT8 mode the stage is disabled and
// every output is zero.
//
// Purely combinational. Exponents are biased: E8N10 products carry twice
// the bias 127 (254), E5N3 products twice the bias 16 (32).
//
// The adder split, the two trees and the final step follow the architecture
// description; the balanced binary tree shape is this design's choice.
module exp_max
  import fdp_pkg::*;
#(
  parameter int K = 16
) (
  input  dp_mode_e                  mode,
  input  conv_t    [K-1:0]          a,
  input  conv_t    [K-1:0]          b,
  input  logic     [K-1:0]          zero_high,   // first term of each PE is zero
  input  logic     [K-1:0]          zero_low,    // second term of each PE is zero
  output logic     [K-1:0][EPF_W-1:0] ep_full,   // E8N10 or first-term E5N3 exponents
  output logic     [K-1:0][EPH_W-1:0] ep_hi,     // second-term E5N3 exponents
  output logic     [EPF_W-1:0]        max_exp
);

  localparam int KP = 1 << $clog2(K);

  logic [EPF_W-1:0] tree1 [KP];
  logic [EPH_W-1:0] tree2 [KP];
  logic [EPF_W-1:0] max1;
  logic [EPH_W-1:0] max2;

  // Exponent adders.
  always_comb begin
    for (int i = 0; i < K; i++) begin
      logic [EXPF_W-1:0] xa, xb;
      xa = '0; xb = '0;
      if (mode == MODE_E8N10) begin
        xa = a[i].full.exp;
        xb = b[i].full.exp;
      end else if (mode == MODE_E5N3) begin
        xa = {3'd0, a[i].half[0].exp};
        xb = {3'd0, b[i].half[0].exp};
      end
      ep_full[i] = (zero_high[i] || mode == MODE_INT8) ? '0 : {1'b0, xa} + {1'b0, xb};
      ep_hi[i]   = (zero_low[i] || mode != MODE_E5N3) ? '0
                 : {1'b0, a[i].half[1].exp} + {1'b0, b[i].half[1].exp};
    end
  end

  // Two maximum-reduction trees, reduced in place level by level.
  always_comb begin
    for (int i = 0; i < KP; i++) begin
      tree1[i] = (i < K) ? ep_full[i] : '0;
      tree2[i] = (i < K) ? ep_hi[i]   : '0;
    end
    for (int w = KP / 2; w >= 1; w = w / 2) begin
      for (int i = 0; i < w; i++) begin
        tree1[i] = (tree1[2*i] > tree1[2*i+1]) ? tree1[2*i] : tree1[2*i+1];
        tree2[i] = (tree2[2*i] > tree2[2*i+1]) ? tree2[2*i] : tree2[2*i+1];
      end
    end
    max1 = tree1[0];
    max2 = tree2[0];
  end

  // Final reduction step for E5N3.
  always_comb begin
    if (mode == MODE_E5N3)
      max_exp = (max1 > {3'd0, max2}) ? max1 : {3'd0, max2};
    else
      max_exp = max1;
  end

endmodule
