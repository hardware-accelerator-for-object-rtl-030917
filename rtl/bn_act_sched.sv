// bn_act_sched: shares one batch-normalisation unit and one Leaky ReLU unit among
// all MAC units of a layer.
//
// When the MAC units finish an output pixel (in_valid), their N_MAC results are
// copied into local registers. A counter then selects one register per clock
// through a multiplexer; the selected value goes through batch_norm and leaky_relu
// and is "demultiplexed" to the memory write port of its own output feature map
// (filter f = grp*N_MAC + lane, address f*H*W + oy*W + ox). Since a pixel takes
// N_in*K*K cycles in the MAC units and the sweep takes N_MAC, the sharing costs no
// throughput as long as N_MAC + 2 <= N_in*K*K, which holds for every layer.
//
// Timing: the counter value j is presented in cycle t together with the read
// address of filter f's constants (bn_rd_en/bn_rd_addr); the constants arrive in
// cycle t+1 (one-cycle memory latency), when normalisation and activation are
// computed; the write (wr_en, wr_addr, wr_data) is registered and appears in t+2.
// Lanes whose filter index is N_OUT or more (when N_OUT is not a multiple of N_MAC)
// are not written. The register, counter, mux, shared BN/activation and demux
// structure follows the design; the latencies are this design's own.
module bn_act_sched
  import yolo_pkg::*;
#(
  parameter int N_MAC = 16,
  parameter int N_OUT = 16,
  parameter int H     = 416,
  parameter int W     = 416
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  feat_t       in_data [N_MAC],
  input  logic [15:0] in_grp,
  input  logic [15:0] in_oy,
  input  logic [15:0] in_ox,
  output logic        bn_rd_en,
  output addr_t       bn_rd_addr,
  input  bn_const_t   bn_rdata,
  output logic        wr_en,
  output addr_t       wr_addr,
  output feat_t       wr_data,
  output logic        busy
);

  localparam int JW = (N_MAC > 1) ? $clog2(N_MAC) : 1;

  feat_t       local_regs [N_MAC];
  logic [15:0] grp_r, oy_r, ox_r;
  logic [JW-1:0] j;
  logic        sweep;

  // stage 1: the selected value waits for its constants
  logic        s1_valid;
  feat_t       s1_val;
  addr_t       s1_addr;

  feat_t       mux_out, bn_out, act_out;
  addr_t       filt;

  always_comb begin
    filt       = addr_t'(grp_r) * addr_t'(N_MAC) + addr_t'(j);
    mux_out    = local_regs[j];
    bn_rd_en   = sweep && (filt < addr_t'(N_OUT));
    bn_rd_addr = filt;
    busy       = sweep || s1_valid || wr_en;
  end

  batch_norm u_bn (.m(s1_val), .b1(bn_rdata.b1), .b2(bn_rdata.b2), .n(bn_out));
  leaky_relu u_act (.z(bn_out), .f(act_out));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sweep    <= 1'b0;
      j        <= '0;
      s1_valid <= 1'b0;
      s1_val   <= '0;
      s1_addr  <= '0;
      wr_en    <= 1'b0;
      wr_addr  <= '0;
      wr_data  <= '0;
      grp_r    <= '0;
      oy_r     <= '0;
      ox_r     <= '0;
      for (int i = 0; i < N_MAC; i++) local_regs[i] <= '0;
    end else begin
      if (in_valid) begin
        for (int i = 0; i < N_MAC; i++) local_regs[i] <= in_data[i];
        grp_r <= in_grp;
        oy_r  <= in_oy;
        ox_r  <= in_ox;
        sweep <= 1'b1;
        j     <= '0;
      end else if (sweep) begin
        if (j == JW'(N_MAC - 1)) sweep <= 1'b0;
        else                     j     <= j + 1'b1;
      end

      s1_valid <= bn_rd_en;
      s1_val   <= mux_out;
      s1_addr  <= filt * addr_t'(H * W) + addr_t'(oy_r) * addr_t'(W) + addr_t'(ox_r);

      wr_en   <= s1_valid;
      wr_addr <= s1_addr;
      wr_data <= act_out;
    end
  end

  // A new pixel must not arrive before the previous sweep is over.
  assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> !sweep || (j == JW'(N_MAC - 1)))
    else $error("bn_act_sched: new pixel before the previous sweep ended");

endmodule
