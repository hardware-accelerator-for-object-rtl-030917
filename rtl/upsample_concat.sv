// upsample_concat: the upsample and concatenate stages in front of layer 12.
//
// Layer 12 reads a 26x26x384 input that does not exist in memory: its first C_UP
// channels are layer 11's 13x13 output upsampled by two, the remaining ones are
// the convolution results (before max pooling) of layer 5. This unit turns each
// feature read of layer 12, given as channel c and position (y, x), into a read of
// one of the two stored maps:
//   c <  C_UP : layer-11 output, offset c*(H/2)*(W/2) + (y/2)*(W/2) + x/2
//   c >= C_UP : layer-5 convolution results, offset (c-C_UP)*H*W + y*W + x
// and one cycle later, when the memory returns the data, passes the word of the
// chosen source to layer 12. Both stages thus cost no cycles and no storage.
//
// Nearest-neighbour upsampling (each value repeated in a 2x2 block), upsampled
// channels placed first, and doing both by address mapping are this design's
// choices; only the stage names and the map sizes are given for this part.
module upsample_concat
  import yolo_pkg::*;
#(
  parameter int H    = 26,
  parameter int W    = 26,
  parameter int C_UP = 128
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rd_en,
  input  logic [15:0] rd_ch,
  input  logic [15:0] rd_y,
  input  logic [15:0] rd_x,
  output feat_t       rd_data,
  output logic        up_en,
  output addr_t       up_addr,
  input  feat_t       up_data,
  output logic        rt_en,
  output addr_t       rt_addr,
  input  feat_t       rt_data
);

  localparam int HU = H / 2;
  localparam int WU = W / 2;

  logic from_route, from_route_d;

  always_comb begin
    from_route = (rd_ch >= 16'(C_UP));
    up_en   = rd_en && !from_route;
    rt_en   = rd_en && from_route;
    up_addr = addr_t'(rd_ch) * addr_t'(HU * WU) + addr_t'(rd_y >> 1) * addr_t'(WU)
            + addr_t'(rd_x >> 1);
    rt_addr = addr_t'(rd_ch - 16'(C_UP)) * addr_t'(H * W) + addr_t'(rd_y) * addr_t'(W)
            + addr_t'(rd_x);
    rd_data = from_route_d ? rt_data : up_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)     from_route_d <= 1'b0;
    else if (rd_en) from_route_d <= from_route;
  end

endmodule
