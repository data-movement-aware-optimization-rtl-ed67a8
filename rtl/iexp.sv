// iexp: integer-only exponential for non-positive fixed-point inputs.
//
// Computes exp(x*S) in the second-order-polynomial form of I-BERT, which is
// the exp used by Gemmini's softmax paths and by OnlineAttention:
//   z    = floor(-x * qln2_inv / 2^16)      (number of whole ln2 steps)
//   p    = x + z * qln2                     (remainder, in (-ln2/S, 0])
//   poly = (p + qb)^2 + qc                  (polynomial approximation of exp(p))
//   y    = poly >> z                        (times 2^-z)
// and y = 0 whenever z >= 32 (the saturation the accelerator uses).
// The output scale is a*S^2 with the I-BERT constant a; y is never negative.
// A positive input is treated as zero (callers only pass x - max <= 0).
//
// Interface: purely combinational, one lane. cfg carries the four
// coefficients written by OP_CONFIG. sat reports that z >= 32.
// The coefficient names and the z >= 32 rule come from the accelerator
// description; widths (33-bit negation, 64-bit intermediates) are this
// design's choice so no intermediate overflows for any 32-bit input.
module iexp
  import oa_pkg::*;
(
  input  logic signed [31:0] x,
  input  iexp_cfg_t          cfg,
  output logic        [31:0] y,
  output logic               sat
);

  logic        [32:0] neg_x;
  logic        [65:0] zprod;
  logic        [49:0] z_full;
  logic        [5:0]  z;
  logic signed [63:0] p, t, poly;

  always_comb begin
    neg_x  = (x > 0) ? 33'd0 : 33'(-(34'(signed'(x))));
    zprod  = 66'(neg_x) * 66'($unsigned(cfg.qln2_inv));
    z_full = zprod[65:16];
    sat    = (z_full >= 50'd32);
    z      = sat ? 6'd32 : z_full[5:0];
    p      = 64'(signed'(x > 0 ? 32'sd0 : x)) + 64'(signed'({1'b0, z})) * 64'(cfg.qln2);
    t      = p + 64'(cfg.qb);
    poly   = t * t + 64'(cfg.qc);
    if (sat || poly < 0) begin
      y = '0;
    end else begin
      y = 32'(poly >>> z);
    end
  end

endmodule
