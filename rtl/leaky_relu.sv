// leaky_relu: the activation unit, f(z) = z for z >= 0 and 0.01*z for z < 0.
//
// A comparator checks the <16,16> input against zero and drives the select of a
// 2:1 multiplexer that passes either the input itself or the input multiplied by the
// constant 0.01. Combinational.
//
// The slope 0.01 is held as a 16-fraction-bit constant, LEAK = round(0.01*2^16) = 655,
// and the product is shifted back to 16 fraction bits by an arithmetic shift
// (truncation toward minus infinity); the constant's precision is this design's choice.
module leaky_relu
  import yolo_pkg::*;
#(
  parameter int LEAK = 655          // 0.01 in 16 fraction bits
) (
  input  feat_t z,
  output feat_t f
);

  logic               neg;          // comparator: z < 0
  logic signed [63:0] scaled;

  always_comb begin
    neg    = (z < 0);
    scaled = (64'(z) * 64'(LEAK)) >>> FRAC;
    f      = neg ? sat_feat(80'(scaled)) : z;
  end

endmodule
