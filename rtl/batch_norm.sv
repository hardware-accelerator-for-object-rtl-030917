// batch_norm: the batch-normalisation unit, n = b1*m + b2.
//
// The four training statistics (scale, shift, mean, variance) are folded ahead of
// time into two constants per filter, b1 = gamma/sqrt(var+eps) and
// b2 = beta - gamma*mean/sqrt(var+eps), so the unit is one multiplier and one
// adder, purely combinational. m and n are <16,16>; b1 and b2 are <6,16>.
//
// The product b1*m is taken at full precision, shifted back to 16 fraction bits
// (truncation), b2 is added and the sum is saturated to <16,16>; the rounding and
// saturation rule is this design's own choice.
module batch_norm
  import yolo_pkg::*;
(
  input  feat_t m,
  input  bnc_t  b1,
  input  bnc_t  b2,
  output feat_t n
);

  logic signed [63:0] prod;
  logic signed [63:0] sum;

  always_comb begin
    prod = 64'(b1) * 64'(m);
    sum  = (prod >>> FRAC) + 64'(b2);
    n    = sat_feat(80'(sum));
  end

endmodule
