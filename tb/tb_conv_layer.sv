// tb_conv_layer: two small layers with one-cycle memories in the testbench.
//   config 0: 2 -> 3 channels, 6x6, 3x3 kernel, reusability factor 2, stride-2 pool
//             (2 MAC lanes, filter 3 unused)
//   config 1: 4 -> 2 channels, 5x5, 1x1 kernel, factor 1, stride-1 pool
// A reference convolution (zero padding) + BN + Leaky ReLU + max pool computed in
// the testbench is compared with every convolution write and every pooled write;
// the write counts and the cycle counts (N_IN*K*K*H*W*RF for the convolution,
// 4*H*W/S^2 per map for the pool) are checked as well.
module tb_conv_layer;
  import yolo_pkg::*;
  import tb_ref_pkg::*;

  localparam int NC = 2;
  localparam int C_NIN  [NC] = '{2, 4};
  localparam int C_NOUT [NC] = '{3, 2};
  localparam int C_H    [NC] = '{6, 5};
  localparam int C_K    [NC] = '{3, 1};
  localparam int C_RF   [NC] = '{2, 1};
  localparam int C_PS   [NC] = '{2, 1};

  logic clk = 0, rst_n = 0, start = 0;
  int checks = 0, failures = 0;
  bit all_done [NC];

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar ci = 0; ci < NC; ci++) begin : g_c
    localparam int NI = C_NIN[ci], NO = C_NOUT[ci], HH = C_H[ci], KK = C_K[ci];
    localparam int R = C_RF[ci], PS = C_PS[ci];
    localparam int NM = (NO + R - 1) / R;
    localparam int NP = NM;
    localparam int HO = (PS == 2) ? HH / 2 : HH;
    localparam int PD = (KK - 1) / 2;

    feat_t     fmap [NI * HH * HH];
    ker_t      kmem [R * NM][NI * KK * KK];   // [filter][offset]
    bn_const_t bmem [NO];
    feat_t     cmem [NO * HH * HH];
    longint    cref [NO * HH * HH];

    logic busy, res_done, feat_rd_en, ker_rd_en, bn_rd_en, cw_en;
    addr_t feat_rd_addr, ker_rd_addr, bn_rd_addr, cw_addr;
    logic [15:0] feat_rd_ch, feat_rd_y, feat_rd_x;
    feat_t feat_rdata, cw_data;
    ker_t ker_rdata [NM];
    bn_const_t bn_rdata;
    logic pr_en [NP], pw_en [NP];
    addr_t pr_addr [NP], pw_addr [NP];
    feat_t pr_data [NP], pw_data [NP];

    conv_layer #(.N_IN(NI), .N_OUT(NO), .H(HH), .W(HH), .K(KK), .RF(R), .POOL_S(PS)) dut (.*);

    always_ff @(posedge clk) begin
      if (feat_rd_en) feat_rdata <= fmap[feat_rd_addr];
      if (ker_rd_en)
        for (int j = 0; j < NM; j++)
          ker_rdata[j] <= kmem[(ker_rd_addr / (NI * KK * KK)) * NM + j][ker_rd_addr % (NI * KK * KK)];
      if (bn_rd_en) bn_rdata <= bmem[bn_rd_addr];
      for (int p = 0; p < NP; p++) if (pr_en[p]) pr_data[p] <= cmem[pr_addr[p]];
    end

    int cw_n = 0, pw_n = 0, cyc = 0, t_start = 0, t_done = 0, conv_cyc = 0;
    always @(posedge clk) if (rst_n) begin
      cyc++;
      if (start) t_start = cyc;
      if (ker_rd_en) conv_cyc++;
      if (res_done) t_done = cyc;
      if (cw_en) begin
        cmem[cw_addr] <= cw_data;
        cw_n++;
        checks++;
        if (longint'(cw_data) != cref[cw_addr]) begin
          failures++;
          $display("cfg%0d conv[%0d] got %0d exp %0d", ci, cw_addr, cw_data, cref[cw_addr]);
        end
      end
      for (int p = 0; p < NP; p++) if (pw_en[p]) begin
        int f, oy, ox;
        longint m;
        f = pw_addr[p] / (HO * HO); oy = (pw_addr[p] % (HO * HO)) / HO; ox = pw_addr[p] % HO;
        m = -64'sd9000000000;
        for (int dy = 0; dy < 2; dy++)
          for (int dx = 0; dx < 2; dx++) begin
            int r, c;
            r = oy * PS + dy; c = ox * PS + dx;
            if (r > HH - 1) r = HH - 1;
            if (c > HH - 1) c = HH - 1;
            if (cref[f * HH * HH + r * HH + c] > m) m = cref[f * HH * HH + r * HH + c];
          end
        pw_n++;
        checks++;
        if (f % NM != p || longint'(pw_data[p]) != m) begin
          failures++;
          $display("cfg%0d pool unit %0d f=%0d (%0d,%0d) got %0d exp %0d", ci, p, f, oy, ox, pw_data[p], m);
        end
      end
    end

    initial begin
      for (int i = 0; i < NI * HH * HH; i++) fmap[i] = feat_t'(rnd_signed(64'sd1 << 20));
      for (int f = 0; f < R * NM; f++)
        for (int o = 0; o < NI * KK * KK; o++) kmem[f][o] = ker_t'(rnd_signed(40000));
      for (int f = 0; f < NO; f++) begin
        bmem[f].b1 = bnc_t'(rnd_signed(100000));
        bmem[f].b2 = bnc_t'(rnd_signed(100000));
      end
      for (int f = 0; f < NO; f++)
        for (int y = 0; y < HH; y++)
          for (int x = 0; x < HH; x++) begin
            longint acc;
            acc = 0;
            for (int c = 0; c < NI; c++)
              for (int ky = 0; ky < KK; ky++)
                for (int kx = 0; kx < KK; kx++) begin
                  int yy, xx;
                  yy = y + ky - PD; xx = x + kx - PD;
                  if (yy >= 0 && yy < HH && xx >= 0 && xx < HH)
                    acc += longint'(kmem[f][(c * KK + ky) * KK + kx]) * longint'(fmap[c * HH * HH + yy * HH + xx]);
                end
            cref[f * HH * HH + y * HH + x] =
              ref_lrelu(ref_bn(sat32(shr16(acc)), longint'(bmem[f].b1), longint'(bmem[f].b2)));
          end
    end

    initial begin
      all_done[ci] = 0;
      wait (rst_n);
      @(posedge res_done);
      repeat (3) @(posedge clk);
      checks += 4;
      if (cw_n != NO * HH * HH) begin failures++; $display("cfg%0d conv writes %0d", ci, cw_n); end
      if (pw_n != NO * HO * HO) begin failures++; $display("cfg%0d pool writes %0d", ci, pw_n); end
      if (conv_cyc != NI * KK * KK * HH * HH * R) begin
        failures++; $display("cfg%0d conv cycles %0d", ci, conv_cyc);
      end
      // whole layer: convolution, drain of the last pixel, pool of RF maps per unit
      if (t_done - t_start > NI * KK * KK * HH * HH * R + NM + 16 + R * 4 * HO * HO) begin
        failures++; $display("cfg%0d layer cycles %0d", ci, t_done - t_start);
      end
      $display("cfg%0d: layer took %0d cycles, convolution %0d", ci, t_done - t_start, conv_cyc);
      all_done[ci] = 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    wait (all_done[0] && all_done[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
