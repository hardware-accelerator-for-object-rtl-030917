// yolo_top: Tiny YOLO-v3 accelerator, thirteen pipelined convolution layers.
//
// Each of the thirteen convolution layers of the network has hardware of its own
// (conv_layer): parallel MAC units, reused RF times for the faster layers, one
// shared batch-normalisation and Leaky ReLU path, and parallel maxpool units in
// layers 1 to 6 (stride 2, layer 6 stride 1). The layers run at the same time on
// successive frames, as a pipeline whose steps are paced by pipeline_ctrl: a step
// lasts as long as the slowest layer (layer 2 at full size, 6,230,016 MAC cycles),
// and faster layers are stalled until it ends. Layers 9 and 11 both read layer 8's
// output; layer 12 reads the 2x upsampled output of layer 11 concatenated with the
// convolution results of layer 5, through upsample_concat. Layers 10 (13x13x255)
// and 13 (26x26x255) produce the two detection outputs.
//
// All weights, constants, frames and intermediate results live in an external main
// memory, which is not part of this module: each layer has its own ports to it,
// brought out as arrays indexed by the 0-based layer number i (layer i+1):
//   feature read  feat_rd_* : the layer's input map, in region feat_rd_region[i];
//                 layer 12's port is unused, it reads through route_* instead.
//   route_*, up_*           : layer 12's reads of layer-5 convolution results and of
//                 layer-11 output.
//   kernel read   ker_rd_*  : lane j of word a is the weight of filter
//                 (a / (N_IN*K*K))*N_MAC + j at offset a mod (N_IN*K*K).
//   BN read       bn_rd_*   : the (b1, b2) pair of a filter.
//   conv write    cw_*      : BN/activation results of a layer (region REG_CONV).
//   pool read/write pr_*/pw_* : maxpool units (regions REG_CONV, REG_POOL).
// Reads return data on the clock after the request. layer_frame[i] is the number
// of the frame layer i works on, so the memory can keep frames apart (each layer's
// results must survive until their last reader has used them: one step for most,
// six steps for the layer-5 results that layer 12 reads).
//
// Parameters IMG (input side, 416) and CH_DIV (channel divisor, 1) scale the
// network for simulation; the defaults are the full network.
module yolo_top
  import yolo_pkg::*;
#(
  parameter int IMG    = 416,
  parameter int CH_DIV = 1,
  localparam int MAXMAC  = max_nmac(CH_DIV),
  localparam int MAXPOOL = max_npool(CH_DIV)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        frame_valid,
  output logic        frame_ready,

  output logic        feat_rd_en     [NL],
  output region_t     feat_rd_region [NL],
  output addr_t       feat_rd_addr   [NL],
  input  feat_t       feat_rdata     [NL],

  output logic        route_rd_en,
  output addr_t       route_rd_addr,
  input  feat_t       route_rdata,
  output logic        up_rd_en,
  output addr_t       up_rd_addr,
  input  feat_t       up_rdata,

  output logic        ker_rd_en   [NL],
  output addr_t       ker_rd_addr [NL],
  input  ker_t        ker_rdata   [NL][MAXMAC],

  output logic        bn_rd_en   [NL],
  output addr_t       bn_rd_addr [NL],
  input  bn_const_t   bn_rdata   [NL],

  output logic        cw_en   [NL],
  output addr_t       cw_addr [NL],
  output feat_t       cw_data [NL],

  output logic        pr_en   [NL][MAXPOOL],
  output addr_t       pr_addr [NL][MAXPOOL],
  input  feat_t       pr_data [NL][MAXPOOL],
  output logic        pw_en   [NL][MAXPOOL],
  output addr_t       pw_addr [NL][MAXPOOL],
  output feat_t       pw_data [NL][MAXPOOL],

  output logic [15:0] layer_frame [NL],
  output logic        layer_done  [NL],
  output logic        layer_busy  [NL],
  output logic        stalled     [NL],
  output logic        step_active,
  output logic [31:0] steps
);

  logic layer_start [NL];

  pipeline_ctrl #(.N(NL), .SRC_OF(SRC)) u_ctrl (
    .clk, .rst_n, .frame_valid, .frame_ready,
    .layer_done, .layer_start, .layer_frame, .stalled, .step_active, .steps
  );

  for (genvar i = 0; i < NL; i++) begin : g_layer
    localparam int LN_IN  = l_nin(i, CH_DIV);
    localparam int LN_OUT = l_nout(i, CH_DIV);
    localparam int LSIDE  = l_side(i, IMG);
    localparam int LNMAC  = l_nmac(i, CH_DIV);
    localparam int LNP    = (POOLS[i] != 0) ? LNMAC : 1;

    logic        f_en;
    addr_t       f_addr;
    logic [15:0] f_ch, f_y, f_x;
    feat_t       f_data;
    ker_t        k_data [LNMAC];
    logic        p_en   [LNP];
    addr_t       p_addr [LNP];
    feat_t       p_data [LNP];
    logic        w_en   [LNP];
    addr_t       w_addr [LNP];
    feat_t       w_data [LNP];

    for (genvar j = 0; j < LNMAC; j++) begin : g_k
      assign k_data[j] = ker_rdata[i][j];
    end

    conv_layer #(
      .N_IN(LN_IN), .N_OUT(LN_OUT), .H(LSIDE), .W(LSIDE), .K(KSZ[i]), .RF(RFAC[i]),
      .POOL_S(POOLS[i])
    ) u_layer (
      .clk, .rst_n, .start(layer_start[i]), .busy(layer_busy[i]), .res_done(layer_done[i]),
      .feat_rd_en(f_en), .feat_rd_addr(f_addr), .feat_rd_ch(f_ch), .feat_rd_y(f_y),
      .feat_rd_x(f_x), .feat_rdata(f_data),
      .ker_rd_en(ker_rd_en[i]), .ker_rd_addr(ker_rd_addr[i]), .ker_rdata(k_data),
      .bn_rd_en(bn_rd_en[i]), .bn_rd_addr(bn_rd_addr[i]), .bn_rdata(bn_rdata[i]),
      .cw_en(cw_en[i]), .cw_addr(cw_addr[i]), .cw_data(cw_data[i]),
      .pr_en(p_en), .pr_addr(p_addr), .pr_data(p_data),
      .pw_en(w_en), .pw_addr(w_addr), .pw_data(w_data)
    );

    assign feat_rd_region[i] = l_in_region(i);

    if (i == CONCAT_LAYER) begin : g_concat
      upsample_concat #(.H(LSIDE), .W(LSIDE), .C_UP(l_nout(SRC[i], CH_DIV))) u_uc (
        .clk, .rst_n, .rd_en(f_en), .rd_ch(f_ch), .rd_y(f_y), .rd_x(f_x), .rd_data(f_data),
        .up_en(up_rd_en), .up_addr(up_rd_addr), .up_data(up_rdata),
        .rt_en(route_rd_en), .rt_addr(route_rd_addr), .rt_data(route_rdata)
      );
      assign feat_rd_en[i]   = 1'b0;
      assign feat_rd_addr[i] = '0;
    end else begin : g_direct
      assign feat_rd_en[i]   = f_en;
      assign feat_rd_addr[i] = f_addr;
      assign f_data          = feat_rdata[i];
    end

    for (genvar p = 0; p < MAXPOOL; p++) begin : g_p
      if (POOLS[i] != 0 && p < LNP) begin : g_used
        assign pr_en[i][p]   = p_en[p];
        assign pr_addr[i][p] = p_addr[p];
        assign p_data[p]     = pr_data[i][p];
        assign pw_en[i][p]   = w_en[p];
        assign pw_addr[i][p] = w_addr[p];
        assign pw_data[i][p] = w_data[p];
      end else begin : g_unused
        assign pr_en[i][p]   = 1'b0;
        assign pr_addr[i][p] = '0;
        assign pw_en[i][p]   = 1'b0;
        assign pw_addr[i][p] = '0;
        assign pw_data[i][p] = '0;
      end
    end
    if (POOLS[i] == 0) begin : g_nopool_in
      assign p_data[0] = '0;
    end
  end

endmodule
