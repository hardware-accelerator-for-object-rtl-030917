// tb_main_memory: behavioural model of the accelerator's main memory (simulation
// only, not synthesizable). It holds the input frames, the kernel weights, the
// batch-normalisation constants and every layer's convolution and pooled results,
// and answers all read ports of yolo_top with one cycle of latency.
//
// Every result region is kept in NB banks selected by the frame number the layer
// works on (layer_frame), so that layers working on different frames at the same
// time do not overwrite each other's data. Kernel word a of layer i holds, in lane
// j, the weight of filter (a / (N_IN*K*K))*N_MAC + j at offset a mod (N_IN*K*K);
// weights are stored per filter slot as km[kbase[i] + slot*N_IN*K*K + offset].
// The arrays are public so that a testbench can load and inspect them.
module tb_main_memory
  import yolo_pkg::*;
#(
  parameter int IMG    = 416,
  parameter int CH_DIV = 1,
  parameter int NB     = 8,
  localparam int MAXMAC  = max_nmac(CH_DIV),
  localparam int MAXPOOL = max_npool(CH_DIV)
) (
  input  logic        clk,
  input  logic        feat_rd_en     [NL],
  input  region_t     feat_rd_region [NL],
  input  addr_t       feat_rd_addr   [NL],
  output feat_t       feat_rdata     [NL],
  input  logic        route_rd_en,
  input  addr_t       route_rd_addr,
  output feat_t       route_rdata,
  input  logic        up_rd_en,
  input  addr_t       up_rd_addr,
  output feat_t       up_rdata,
  input  logic        ker_rd_en   [NL],
  input  addr_t       ker_rd_addr [NL],
  output ker_t        ker_rdata   [NL][MAXMAC],
  input  logic        bn_rd_en   [NL],
  input  addr_t       bn_rd_addr [NL],
  output bn_const_t   bn_rdata   [NL],
  input  logic        cw_en   [NL],
  input  addr_t       cw_addr [NL],
  input  feat_t       cw_data [NL],
  input  logic        pr_en   [NL][MAXPOOL],
  input  addr_t       pr_addr [NL][MAXPOOL],
  output feat_t       pr_data [NL][MAXPOOL],
  input  logic        pw_en   [NL][MAXPOOL],
  input  addr_t       pw_addr [NL][MAXPOOL],
  input  feat_t       pw_data [NL][MAXPOOL],
  input  logic [15:0] layer_frame [NL]
);

  // sizes
  longint img_sz, conv_sz [NL], pool_sz [NL], kofs [NL];
  longint img_base [NB], conv_base [NL][NB], pool_base [NL][NB], kbase [NL], bbase [NL];

  feat_t     fm [];
  ker_t      km [];
  bn_const_t bm [];

  initial begin
    longint top_f, top_k, top_b;
    img_sz = 3 * IMG * IMG;
    top_f = 0; top_k = 0; top_b = 0;
    for (int b = 0; b < NB; b++) begin
      img_base[b] = top_f;
      top_f += img_sz;
    end
    for (int i = 0; i < NL; i++) begin
      int s, so;
      s  = l_side(i, IMG);
      so = (POOLS[i] == 2) ? s / 2 : s;
      conv_sz[i] = l_nout(i, CH_DIV) * s * s;
      pool_sz[i] = (POOLS[i] != 0) ? l_nout(i, CH_DIV) * so * so : 0;
      kofs[i]    = l_nin(i, CH_DIV) * KSZ[i] * KSZ[i];
      for (int b = 0; b < NB; b++) begin
        conv_base[i][b] = top_f; top_f += conv_sz[i];
        pool_base[i][b] = top_f; top_f += pool_sz[i];
      end
      kbase[i] = top_k; top_k += kofs[i] * l_nmac(i, CH_DIV) * RFAC[i];
      bbase[i] = top_b; top_b += l_nout(i, CH_DIV);
    end
    fm = new[top_f];
    km = new[top_k];
    bm = new[top_b];
    foreach (fm[n]) fm[n] = '0;
    foreach (km[n]) km[n] = '0;
    foreach (bm[n]) bm[n] = '0;
  end

  function automatic longint region_base(input region_t r, input int frame);
    case (r.kind)
      REG_IMAGE: return img_base[frame % NB];
      REG_CONV:  return conv_base[r.layer][frame % NB];
      default:   return pool_base[r.layer][frame % NB];
    endcase
  endfunction

  always_ff @(posedge clk) begin
    for (int i = 0; i < NL; i++) begin
      int fr, nm;
      longint a, ka, grp, ofs;
      fr = int'(layer_frame[i]);
      nm = l_nmac(i, CH_DIV);
      if (feat_rd_en[i]) begin
        a = region_base(feat_rd_region[i], fr) + longint'(feat_rd_addr[i]);
        feat_rdata[i] <= fm[a];
      end
      if (ker_rd_en[i]) begin
        ka  = longint'(ker_rd_addr[i]);
        grp = ka / kofs[i];
        ofs = ka % kofs[i];
        for (int j = 0; j < nm; j++) begin
          a = kbase[i] + (grp * nm + j) * kofs[i] + ofs;
          ker_rdata[i][j] <= km[a];
        end
      end
      if (bn_rd_en[i]) begin
        a = bbase[i] + longint'(bn_rd_addr[i]);
        bn_rdata[i] <= bm[a];
      end
      for (int p = 0; p < MAXPOOL; p++)
        if (pr_en[i][p]) begin
          a = conv_base[i][fr % NB] + longint'(pr_addr[i][p]);
          pr_data[i][p] <= fm[a];
        end
    end
    if (route_rd_en) begin
      longint a;
      a = conv_base[ROUTE_LAYER][int'(layer_frame[CONCAT_LAYER]) % NB] + longint'(route_rd_addr);
      route_rdata <= fm[a];
    end
    if (up_rd_en) begin
      longint a;
      a = conv_base[SRC[CONCAT_LAYER]][int'(layer_frame[CONCAT_LAYER]) % NB] + longint'(up_rd_addr);
      up_rdata <= fm[a];
    end
  end

  // Writes. No port reads a location in the cycle it is written, so the order of
  // this block and the read block does not matter.
  always @(posedge clk) begin
    for (int i = 0; i < NL; i++) begin
      int fr;
      longint a;
      fr = int'(layer_frame[i]);
      if (cw_en[i]) begin
        a = conv_base[i][fr % NB] + longint'(cw_addr[i]);
        fm[a] = cw_data[i];
      end
      for (int p = 0; p < MAXPOOL; p++)
        if (pw_en[i][p]) begin
          a = pool_base[i][fr % NB] + longint'(pw_addr[i][p]);
          fm[a] = pw_data[i][p];
        end
    end
  end

endmodule
