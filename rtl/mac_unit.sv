// mac_unit: one convolution/MAC unit of a layer.
//
// Each cycle with in_valid high it multiplies a <3,16> kernel weight by a <16,16>
// input feature and adds the product to its accumulator, one MAC per clock. A small
// control unit counts the operations; after N_OPS of them (N_in*K*K, one output
// pixel) it presents the sum on out_data with out_valid high for one cycle and
// restarts the accumulator with the next product, so back-to-back pixels need no
// idle cycle.
//
// The multiply, the accumulator and the counting control unit that resets it follow
// the design's MAC architecture. The accumulator keeps every product at full
// precision (32 fraction bits, 64 bits wide); the result is shifted back to 16
// fraction bits (truncation) and saturated to <16,16>. That rounding rule, the
// accumulator width and the synchronous active-low reset are this design's choices.
//
// Timing: out_valid rises the cycle after the N_OPS-th valid input.
module mac_unit
  import yolo_pkg::*;
#(
  parameter int N_OPS = 27          // MACs per output pixel (layer 1: 3*3*3)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  ker_t  kernel,
  input  feat_t feature,
  output logic  out_valid,
  output feat_t out_data
);

  localparam int CNT_W = (N_OPS > 1) ? $clog2(N_OPS) : 1;

  logic signed [63:0] acc;
  logic signed [63:0] prod;
  logic signed [63:0] sum;
  logic [CNT_W-1:0]   cnt;          // control unit: operations done for this pixel
  logic               last;

  always_comb begin
    prod = 64'(kernel) * 64'(feature);
    sum  = ((cnt == '0) ? 64'sd0 : acc) + prod;
    last = (cnt == CNT_W'(N_OPS - 1));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc       <= '0;
      cnt       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        acc <= sum;
        if (last) begin
          cnt       <= '0;
          out_valid <= 1'b1;
          out_data  <= sat_feat(80'(sum >>> FRAC));
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
