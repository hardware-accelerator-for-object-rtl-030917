// conv_layer: one convolution layer of the accelerator, with its batch
// normalisation, Leaky ReLU and (optionally) 2x2 max pooling.
//
// Every layer of the network has hardware of its own. Inside a layer, N_MAC
// convolution/MAC units work in parallel, one per filter; a layer whose filters
// outnumber its MAC units reuses each unit for RF filters one after the other
// (the reusability factor), so N_MAC = ceil(N_OUT/RF). All MAC units receive the
// same input feature each clock and each its own kernel weight. Their results go
// through a single shared batch-normalisation and activation path (bn_act_sched)
// and are written to memory as the layer's convolution results. When the
// convolution is complete, N_MAC maxpool units (one per MAC lane, each pooling the
// RF maps of its lane in turn) read those results back and write the pooled maps;
// their writes form one vector port. res_done then pulses.
//
// Phases: IDLE -> CONV (address generator runs, N_IN*K*K*H*W*RF cycles) -> DRAIN
// (the last pixel passes BN/activation) -> POOL (4*H*W/S^2 * RF cycles, only when
// POOL_S != 0) -> DONE (res_done) -> IDLE. Pooling after, rather than overlapped
// with, the convolution is this design's choice; it adds under 1% to the slowest
// layer.
//
// Memory interface (all reads have one cycle of latency, data on the next clock):
//   feature read : feat_rd_addr = c*H*W + iy*W + ix of the layer's input map, with
//                  the coordinates also given (feat_rd_ch/_y/_x) for routing; zero
//                  padding positions are not read.
//   kernel read  : word ker_rd_addr = (r*N_IN + c)*K*K + ky*K + kx; lane j of the
//                  returned word is the weight of filter r*N_MAC + j.
//   BN read      : constants (b1,b2) of filter bn_rd_addr.
//   conv write   : cw_addr = f*H*W + y*W + x.
//   pool read    : per unit, an offset in the conv results; pool write: per unit,
//                  f*Ho*Wo + oy*Wo + ox in the pooled map.
module conv_layer
  import yolo_pkg::*;
#(
  parameter int N_IN   = 3,
  parameter int N_OUT  = 16,
  parameter int H      = 416,
  parameter int W      = 416,
  parameter int K      = 3,
  parameter int RF     = 1,
  parameter int POOL_S = 2,                          // 0: no maxpool
  localparam int N_MAC  = (N_OUT + RF - 1) / RF,
  localparam int N_POOL = (POOL_S != 0) ? N_MAC : 1 // pool ports (unused if no pool)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        busy,
  output logic        res_done,

  output logic        feat_rd_en,
  output addr_t       feat_rd_addr,
  output logic [15:0] feat_rd_ch,
  output logic [15:0] feat_rd_y,
  output logic [15:0] feat_rd_x,
  input  feat_t       feat_rdata,

  output logic        ker_rd_en,
  output addr_t       ker_rd_addr,
  input  ker_t        ker_rdata [N_MAC],

  output logic        bn_rd_en,
  output addr_t       bn_rd_addr,
  input  bn_const_t   bn_rdata,

  output logic        cw_en,
  output addr_t       cw_addr,
  output feat_t       cw_data,

  output logic        pr_en   [N_POOL],
  output addr_t       pr_addr [N_POOL],
  input  feat_t       pr_data [N_POOL],
  output logic        pw_en   [N_POOL],
  output addr_t       pw_addr [N_POOL],
  output feat_t       pw_data [N_POOL]
);

  typedef enum logic [2:0] {L_IDLE, L_CONV, L_DRAIN, L_POOL, L_DONE} layer_state_e;
  layer_state_e st;

  // ---------------- address generator ----------------
  logic        ag_start, ag_busy, ag_valid, ag_pad, ag_first, ag_last, ag_done;
  logic [15:0] ag_ch, ag_grp, ag_oy, ag_ox;
  logic signed [15:0] ag_iy, ag_ix;
  addr_t       ag_faddr, ag_kaddr;

  conv_addr_gen #(.N_IN(N_IN), .H(H), .W(W), .K(K), .RF(RF)) u_ag (
    .clk, .rst_n, .start(ag_start), .busy(ag_busy), .valid(ag_valid), .pad(ag_pad),
    .first(ag_first), .last(ag_last), .ch(ag_ch), .iy(ag_iy), .ix(ag_ix),
    .feat_addr(ag_faddr), .ker_addr(ag_kaddr), .grp(ag_grp), .oy(ag_oy), .ox(ag_ox),
    .done(ag_done)
  );

  assign feat_rd_en   = ag_valid && !ag_pad;
  assign feat_rd_addr = ag_faddr;
  assign feat_rd_ch   = ag_ch;
  assign feat_rd_y    = 16'(ag_iy);
  assign feat_rd_x    = 16'(ag_ix);
  assign ker_rd_en    = ag_valid;
  assign ker_rd_addr  = ag_kaddr;

  // one cycle later the read data is there
  logic        v_d, pad_d;
  logic [15:0] grp_d1, oy_d1, ox_d1, grp_d2, oy_d2, ox_d2;
  feat_t       mac_feat;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_d    <= 1'b0;
      pad_d  <= 1'b0;
      {grp_d1, oy_d1, ox_d1, grp_d2, oy_d2, ox_d2} <= '0;
    end else begin
      v_d    <= ag_valid;
      pad_d  <= ag_pad;
      grp_d1 <= ag_grp;
      oy_d1  <= ag_oy;
      ox_d1  <= ag_ox;
      grp_d2 <= grp_d1;
      oy_d2  <= oy_d1;
      ox_d2  <= ox_d1;
    end
  end

  assign mac_feat = pad_d ? '0 : feat_rdata;

  // ---------------- MAC units ----------------
  logic  mac_ovalid [N_MAC];
  feat_t mac_out    [N_MAC];

  for (genvar j = 0; j < N_MAC; j++) begin : g_mac
    mac_unit #(.N_OPS(N_IN * K * K)) u_mac (
      .clk, .rst_n, .in_valid(v_d), .kernel(ker_rdata[j]), .feature(mac_feat),
      .out_valid(mac_ovalid[j]), .out_data(mac_out[j])
    );
  end

  // ---------------- shared BN + activation ----------------
  logic sched_busy;

  bn_act_sched #(.N_MAC(N_MAC), .N_OUT(N_OUT), .H(H), .W(W)) u_sched (
    .clk, .rst_n, .in_valid(mac_ovalid[0]), .in_data(mac_out),
    .in_grp(grp_d2), .in_oy(oy_d2), .in_ox(ox_d2),
    .bn_rd_en, .bn_rd_addr, .bn_rdata,
    .wr_en(cw_en), .wr_addr(cw_addr), .wr_data(cw_data), .busy(sched_busy)
  );

  // ---------------- maxpool units ----------------
  logic mp_start;
  logic mp_done_seen [N_POOL];
  logic all_pool_done;

  if (POOL_S != 0) begin : g_pool
    logic mp_done [N_POOL];
    logic mp_busy [N_POOL];
    for (genvar p = 0; p < N_POOL; p++) begin : g_unit
      maxpool_unit #(.H(H), .W(W), .S(POOL_S), .MAPS(RF), .MAP_STEP(N_MAC), .UNIT(p),
                     .N_OUT(N_OUT)) u_mp (
        .clk, .rst_n, .start(mp_start), .busy(mp_busy[p]),
        .rd_en(pr_en[p]), .rd_addr(pr_addr[p]), .rd_data(pr_data[p]),
        .wr_en(pw_en[p]), .wr_addr(pw_addr[p]), .wr_data(pw_data[p]),
        .max_done(mp_done[p])
      );
      always_ff @(posedge clk) begin
        if (!rst_n || mp_start) mp_done_seen[p] <= 1'b0;
        else if (mp_done[p])    mp_done_seen[p] <= 1'b1;
      end
    end
  end else begin : g_nopool
    assign pr_en[0]        = 1'b0;
    assign pr_addr[0]      = '0;
    assign pw_en[0]        = 1'b0;
    assign pw_addr[0]      = '0;
    assign pw_data[0]      = '0;
    assign mp_done_seen[0] = 1'b1;
  end

  always_comb begin
    all_pool_done = 1'b1;
    for (int p = 0; p < N_POOL; p++) all_pool_done &= mp_done_seen[p];
  end

  // ---------------- layer controller ----------------
  logic pipe_busy;
  assign pipe_busy = ag_busy || v_d || mac_ovalid[0] || sched_busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st       <= L_IDLE;
      ag_start <= 1'b0;
      mp_start <= 1'b0;
      res_done <= 1'b0;
    end else begin
      ag_start <= 1'b0;
      mp_start <= 1'b0;
      res_done <= 1'b0;
      case (st)
        L_IDLE:  if (start) begin
                   st       <= L_CONV;
                   ag_start <= 1'b1;
                 end
        L_CONV:  if (ag_done) st <= L_DRAIN;
        L_DRAIN: if (!pipe_busy) begin
                   if (POOL_S != 0) begin
                     st       <= L_POOL;
                     mp_start <= 1'b1;
                   end else begin
                     st <= L_DONE;
                   end
                 end
        L_POOL:  if (!mp_start && all_pool_done) st <= L_DONE;
        L_DONE:  begin
                   st       <= L_IDLE;
                   res_done <= 1'b1;
                 end
        default: st <= L_IDLE;
      endcase
    end
  end

  assign busy = (st != L_IDLE);

endmodule
