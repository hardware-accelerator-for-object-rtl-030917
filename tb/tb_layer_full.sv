// tb_layer_full: the slowest layer of the network (layer 2: 16 -> 32 channels,
// 208x208, 3x3, reusability factor 1, 2x2/2 pool) at its full size, which sets the
// frame rate of the whole pipeline. One frame of random data goes through it with
// one-cycle memories in the testbench. Every convolution result and every pooled
// value is compared with a reference, and the cycle counts are checked: exactly
// 6,230,016 convolution cycles (N_in*K*K*H*W) and 43,264 pooling cycles
// (4*H*W/4), with under 100 cycles of control overhead in the layer's total.
module tb_layer_full;
  import yolo_pkg::*;
  import tb_ref_pkg::*;

  localparam int L  = 1;                 // 0-based index of layer 2
  localparam int NI = l_nin(L, 1), NO = l_nout(L, 1), HH = l_side(L, 416), KK = KSZ[L];
  localparam int R  = RFAC[L], PS = POOLS[L];
  localparam int NM = l_nmac(L, 1);
  localparam int HO = HH / 2;
  localparam longint CONV_CYC = longint'(NI) * KK * KK * HH * HH * R;
  localparam longint POOL_CYC = longint'(R) * 4 * HO * HO;

  logic clk = 0, rst_n = 0, start = 0;
  int checks = 0, failures = 0;

  feat_t     fmap [NI * HH * HH];
  ker_t      kmem [R * NM * NI * KK * KK];
  bn_const_t bmem [NO];
  feat_t     cmem [NO * HH * HH];

  logic busy, res_done, feat_rd_en, ker_rd_en, bn_rd_en, cw_en;
  addr_t feat_rd_addr, ker_rd_addr, bn_rd_addr, cw_addr;
  logic [15:0] feat_rd_ch, feat_rd_y, feat_rd_x;
  feat_t feat_rdata, cw_data;
  ker_t ker_rdata [NM];
  bn_const_t bn_rdata;
  logic pr_en [NM], pw_en [NM];
  addr_t pr_addr [NM], pw_addr [NM];
  feat_t pr_data [NM], pw_data [NM];

  conv_layer #(.N_IN(NI), .N_OUT(NO), .H(HH), .W(HH), .K(KK), .RF(R), .POOL_S(PS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (7_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_ff @(posedge clk) begin
    if (feat_rd_en) feat_rdata <= fmap[feat_rd_addr];
    if (ker_rd_en)
      for (int j = 0; j < NM; j++)
        ker_rdata[j] <= kmem[((ker_rd_addr / (NI * KK * KK)) * NM + j) * (NI * KK * KK)
                             + ker_rd_addr % (NI * KK * KK)];
    if (bn_rd_en) bn_rdata <= bmem[bn_rd_addr];
    for (int p = 0; p < NM; p++) if (pr_en[p]) pr_data[p] <= cmem[pr_addr[p]];
  end

  longint cyc = 0, t_start = 0, t_done = 0, conv_cyc = 0, pool_cyc = 0, cw_n = 0, pw_n = 0;
  feat_t pooled [NO * HO * HO];
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (start) t_start = cyc;
    if (ker_rd_en) conv_cyc++;
    if (pr_en[0]) pool_cyc++;
    if (res_done) t_done = cyc;
    if (cw_en) begin
      cmem[cw_addr] <= cw_data;
      cw_n++;
    end
    for (int p = 0; p < NM; p++) if (pw_en[p]) begin
      pooled[pw_addr[p]] = pw_data[p];
      pw_n++;
    end
  end

  initial begin
    for (int i = 0; i < NI * HH * HH; i++) fmap[i] = feat_t'($urandom % 65536);
    for (int i = 0; i < R * NM * NI * KK * KK; i++) kmem[i] = ker_t'(rnd_signed(8000));
    for (int f = 0; f < NO; f++) begin
      bmem[f].b1 = bnc_t'(32768 + ($urandom % 65536));
      bmem[f].b2 = bnc_t'(rnd_signed(6554));
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    @(posedge res_done);
    repeat (3) @(posedge clk);
    $display("layer 2 full size: %0d cycles (convolution %0d, pooling %0d)", t_done - t_start,
             conv_cyc, pool_cyc);
    checks += 5;
    if (conv_cyc != CONV_CYC) begin failures++; $display("conv cycles %0d exp %0d", conv_cyc, CONV_CYC); end
    if (pool_cyc != POOL_CYC) begin failures++; $display("pool cycles %0d exp %0d", pool_cyc, POOL_CYC); end
    if (t_done - t_start > CONV_CYC + POOL_CYC + 100) begin failures++; $display("overhead too large"); end
    if (cw_n != NO * HH * HH) begin failures++; $display("conv writes %0d", cw_n); end
    if (pw_n != NO * HO * HO) begin failures++; $display("pool writes %0d", pw_n); end
    // reference: convolution + BN + Leaky ReLU, then pooling
    for (int f = 0; f < NO; f++) begin
      int bad;
      bad = 0;
      for (int y = 0; y < HH; y++)
        for (int x = 0; x < HH; x++) begin
          longint acc, v;
          acc = 0;
          for (int c = 0; c < NI; c++)
            for (int ky = 0; ky < KK; ky++)
              for (int kx = 0; kx < KK; kx++) begin
                int yy, xx;
                yy = y + ky - 1; xx = x + kx - 1;
                if (yy >= 0 && yy < HH && xx >= 0 && xx < HH) begin
                  longint kw, fv;
                  kw = longint'(kmem[f * NI * KK * KK + (c * KK + ky) * KK + kx]);
                  fv = longint'(fmap[c * HH * HH + yy * HH + xx]);
                  acc = acc + kw * fv;
                end
              end
          v = ref_lrelu(ref_bn(sat32(shr16(acc)), longint'(bmem[f].b1), longint'(bmem[f].b2)));
          checks++;
          if (longint'(cmem[f * HH * HH + y * HH + x]) != v) begin
            failures++;
            if (bad++ < 3) $display("conv f=%0d (%0d,%0d) got %0d exp %0d", f, y, x,
                                    cmem[f * HH * HH + y * HH + x], v);
          end
        end
      for (int oy = 0; oy < HO; oy++)
        for (int ox = 0; ox < HO; ox++) begin
          longint m, a;
          m = -64'sd9000000000;
          for (int dy = 0; dy < 2; dy++)
            for (int dx = 0; dx < 2; dx++) begin
              a = longint'(cmem[f * HH * HH + (2 * oy + dy) * HH + 2 * ox + dx]);
              if (a > m) m = a;
            end
          checks++;
          if (longint'(pooled[f * HO * HO + oy * HO + ox]) != m) begin
            failures++;
            if (bad++ < 3) $display("pool f=%0d (%0d,%0d) got %0d exp %0d", f, oy, ox,
                                    pooled[f * HO * HO + oy * HO + ox], m);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
