// tb_yolo_top: end-to-end test of the whole Tiny YOLO-v3 layer pipeline at reduced
// size (input side IMG, channel counts divided by CH_DIV), with the behavioural
// main memory. NF frames of random pixels are pushed through all thirteen layers
// with random weights; a reference model of the network written in the testbench
// (zero-padded convolution, BN, Leaky ReLU, max pooling, upsampling and
// concatenation, all with the same fixed-point rules) is compared with every
// layer's stored convolution and pooling results for every frame.
// Also checked: the number of pipeline steps (NF + 10), and that every step lasts
// as long as its slowest layer. Each mechanism (stall of faster layers, several
// layers busy at once, MAC reuse, zero padding, upsample and route reads,
// stride-1 and stride-2 pooling, unused filter slots) is counted and must occur.
module tb_yolo_top;
  import yolo_pkg::*;
  import tb_ref_pkg::*;

  parameter int IMG    = 64;
  parameter int CH_DIV = 16;
  parameter int NF     = 3;
  localparam int NB      = 8;
  localparam int MAXMAC  = max_nmac(CH_DIV);
  localparam int MAXPOOL = max_npool(CH_DIV);

  logic clk = 0, rst_n = 0, frame_valid = 0, frame_ready;
  logic feat_rd_en [NL]; region_t feat_rd_region [NL]; addr_t feat_rd_addr [NL]; feat_t feat_rdata [NL];
  logic route_rd_en, up_rd_en; addr_t route_rd_addr, up_rd_addr; feat_t route_rdata, up_rdata;
  logic ker_rd_en [NL]; addr_t ker_rd_addr [NL]; ker_t ker_rdata [NL][MAXMAC];
  logic bn_rd_en [NL]; addr_t bn_rd_addr [NL]; bn_const_t bn_rdata [NL];
  logic cw_en [NL]; addr_t cw_addr [NL]; feat_t cw_data [NL];
  logic pr_en [NL][MAXPOOL]; addr_t pr_addr [NL][MAXPOOL]; feat_t pr_data [NL][MAXPOOL];
  logic pw_en [NL][MAXPOOL]; addr_t pw_addr [NL][MAXPOOL]; feat_t pw_data [NL][MAXPOOL];
  logic [15:0] layer_frame [NL];
  logic layer_done [NL], layer_busy [NL], stalled [NL], step_active;
  logic [31:0] steps;

  int checks = 0, failures = 0;

  yolo_top #(.IMG(IMG), .CH_DIV(CH_DIV)) dut (.*);

  tb_main_memory #(.IMG(IMG), .CH_DIV(CH_DIV), .NB(NB)) mem (
    .clk, .feat_rd_en, .feat_rd_region, .feat_rd_addr, .feat_rdata,
    .route_rd_en, .route_rd_addr, .route_rdata, .up_rd_en, .up_rd_addr, .up_rdata,
    .ker_rd_en, .ker_rd_addr, .ker_rdata, .bn_rd_en, .bn_rd_addr, .bn_rdata,
    .cw_en, .cw_addr, .cw_data, .pr_en, .pr_addr, .pr_data, .pw_en, .pw_addr, .pw_data,
    .layer_frame
  );

  always #5 clk = ~clk;

  // ---------------- watchdog ----------------
  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  longint n_stall = 0, n_overlap = 0, n_reuse = 0, n_pad = 0, n_route = 0, n_up = 0;
  longint n_pool1 = 0, n_pool2 = 0, n_skip = 0;
  always @(posedge clk) if (rst_n) begin
    int busy_n;
    busy_n = 0;
    for (int i = 0; i < NL; i++) begin
      if (stalled[i]) n_stall++;
      if (layer_busy[i]) busy_n++;
      if (ker_rd_en[i] && RFAC[i] > 1 &&
          longint'(ker_rd_addr[i]) >= longint'(l_nin(i, CH_DIV) * KSZ[i] * KSZ[i])) n_reuse++;
      if (ker_rd_en[i] && !feat_rd_en[i] && i != CONCAT_LAYER) n_pad++;
      for (int p = 0; p < MAXPOOL; p++)
        if (pw_en[i][p]) begin
          if (POOLS[i] == 1) n_pool1++;
          else n_pool2++;
        end
    end
    if (busy_n > 1) n_overlap++;
    if (route_rd_en) n_route++;
    if (up_rd_en) n_up++;
  end

  // unused filter slots (lanes of the last group beyond N_OUT), in any layer
  function automatic bit any_unused_slots();
    for (int i = 0; i < NL; i++)
      if (l_nmac(i, CH_DIV) * RFAC[i] > l_nout(i, CH_DIV)) return 1'b1;
    return 1'b0;
  endfunction
  localparam bit HAS_SKIP = any_unused_slots();

  for (genvar i = 0; i < NL; i++) begin : g_mon
    always @(posedge clk)
      if (rst_n && dut.g_layer[i].u_layer.u_sched.sweep && !bn_rd_en[i]) n_skip++;
  end

  // the outputs must carry information: count distinct values of the last layer
  function automatic int distinct_outputs(input int k);
    longint seen [longint];
    for (longint n = 0; n < mem.conv_sz[NL - 1]; n++)
      seen[longint'(mem.fm[mem.conv_base[NL - 1][k % NB] + n])] = 1;
    return seen.num();
  endfunction

  // ---------------- step timing ----------------
  // predicted cycles of layer i: convolution plus pooling
  function automatic longint layer_cycles(input int i);
    longint s, c;
    s = l_side(i, IMG);
    c = longint'(l_nin(i, CH_DIV)) * KSZ[i] * KSZ[i] * s * s * RFAC[i];
    if (POOLS[i] != 0) c += RFAC[i] * 4 * s * s / (POOLS[i] * POOLS[i]);
    return c;
  endfunction

  longint t_step = 0, cyc = 0, step_pred = 0;
  always @(posedge clk) begin
    cyc++;
    if (dut.u_ctrl.step_active == 0 && dut.u_ctrl.any_next) begin
      t_step = cyc;
      step_pred = 0;
      for (int i = 0; i < NL; i++)
        if (dut.u_ctrl.run_next[i] && layer_cycles(i) > step_pred) step_pred = layer_cycles(i);
    end
    if (dut.u_ctrl.step_active && dut.u_ctrl.all_done) begin
      checks++;
      if (cyc - t_step < step_pred || cyc - t_step > step_pred + MAXMAC + 20) begin
        failures++;
        $display("step %0d took %0d cycles, slowest layer %0d", steps, cyc - t_step, step_pred);
      end
    end
  end

  // ---------------- reference model ----------------
  longint rconv [NL][];
  longint rpool [NL][];

  function automatic longint img_px(input int k, input longint n);
    return longint'(mem.fm[mem.img_base[k % NB] + n]);
  endfunction

  task automatic ref_frame(input int k);
    for (int i = 0; i < NL; i++) begin
      int s, nin, nout, kk, pd, nm, so;
      longint inb [];
      longint kb, ko;
      kb = mem.kbase[i];
      ko = mem.kofs[i];
      s = l_side(i, IMG); nin = l_nin(i, CH_DIV); nout = l_nout(i, CH_DIV);
      kk = KSZ[i]; pd = (kk - 1) / 2; nm = l_nmac(i, CH_DIV);
      // input map of this layer, nin x s x s
      inb = new[nin * s * s];
      for (int c = 0; c < nin; c++)
        for (int y = 0; y < s; y++)
          for (int x = 0; x < s; x++) begin
            longint v;
            if (SRC[i] < 0) v = img_px(k, c * s * s + y * s + x);
            else if (i == CONCAT_LAYER) begin
              int cu;
              cu = l_nout(SRC[i], CH_DIV);
              if (c < cu) v = rconv[SRC[i]][c * (s / 2) * (s / 2) + (y / 2) * (s / 2) + x / 2];
              else        v = rconv[ROUTE_LAYER][(c - cu) * s * s + y * s + x];
            end
            else if (POOLS[SRC[i]] != 0) v = rpool[SRC[i]][c * s * s + y * s + x];
            else v = rconv[SRC[i]][c * s * s + y * s + x];
            inb[c * s * s + y * s + x] = v;
          end
      rconv[i] = new[nout * s * s];
      for (int f = 0; f < nout; f++) begin
        longint b1, b2;
        b1 = longint'(mem.bm[mem.bbase[i] + f].b1);
        b2 = longint'(mem.bm[mem.bbase[i] + f].b2);
        for (int y = 0; y < s; y++)
          for (int x = 0; x < s; x++) begin
            longint acc;
            acc = 0;
            for (int c = 0; c < nin; c++)
              for (int ky = 0; ky < kk; ky++)
                for (int kx = 0; kx < kk; kx++) begin
                  int yy, xx;
                  yy = y + ky - pd; xx = x + kx - pd;
                  if (yy >= 0 && yy < s && xx >= 0 && xx < s) begin
                    longint ka, kw;
                    ka = kb + longint'(f) * ko + longint'((c * kk + ky) * kk + kx);
                    kw = longint'(mem.km[ka]);
                    acc = acc + kw * inb[c * s * s + yy * s + xx];
                  end
                end
            rconv[i][f * s * s + y * s + x] = ref_lrelu(ref_bn(sat32(shr16(acc)), b1, b2));
          end
      end
      if (POOLS[i] != 0) begin
        so = (POOLS[i] == 2) ? s / 2 : s;
        rpool[i] = new[nout * so * so];
        for (int f = 0; f < nout; f++)
          for (int oy = 0; oy < so; oy++)
            for (int ox = 0; ox < so; ox++) begin
              longint m;
              m = -64'sd9000000000;
              for (int dy = 0; dy < 2; dy++)
                for (int dx = 0; dx < 2; dx++) begin
                  int r, c;
                  r = oy * POOLS[i] + dy; c = ox * POOLS[i] + dx;
                  if (r > s - 1) r = s - 1;
                  if (c > s - 1) c = s - 1;
                  if (rconv[i][f * s * s + r * s + c] > m) m = rconv[i][f * s * s + r * s + c];
                end
              rpool[i][f * so * so + oy * so + ox] = m;
            end
      end
    end
  endtask

  task automatic compare_frame(input int k);
    for (int i = 0; i < NL; i++) begin
      int bad;
      bad = 0;
      foreach (rconv[i][n]) begin
        checks++;
        if (longint'(mem.fm[mem.conv_base[i][k % NB] + n]) != rconv[i][n]) begin
          failures++;
          if (bad++ < 3) $display("frame %0d layer %0d conv[%0d] got %0d exp %0d", k, i + 1, n,
                                  mem.fm[mem.conv_base[i][k % NB] + n], rconv[i][n]);
        end
      end
      if (POOLS[i] != 0)
        foreach (rpool[i][n]) begin
          checks++;
          if (longint'(mem.fm[mem.pool_base[i][k % NB] + n]) != rpool[i][n]) begin
            failures++;
            if (bad++ < 3) $display("frame %0d layer %0d pool[%0d] got %0d exp %0d", k, i + 1, n,
                                    mem.fm[mem.pool_base[i][k % NB] + n], rpool[i][n]);
          end
        end
    end
  endtask

  task automatic count_mech(input string name, input longint n);
    checks++;
    $display("  %-28s %0d", name, n);
    if (n == 0) begin
      failures++;
      $display("mechanism never happened: %s", name);
    end
  endtask

  // ---------------- stimulus ----------------
  initial begin
    int frames_in;
    longint t0;
    #1;  // memory model allocates its arrays at time 0
    for (int k = 0; k < NF; k++)
      for (longint n = 0; n < mem.img_sz; n++) mem.fm[mem.img_base[k] + n] = feat_t'($urandom % 65536);
    for (int i = 0; i < NL; i++) begin
      longint mag, nslots;
      mag = longint'(100000.0 / $sqrt(real'(mem.kofs[i])));
      nslots = longint'(l_nmac(i, CH_DIV)) * RFAC[i];
      for (longint n = 0; n < nslots * mem.kofs[i]; n++) mem.km[mem.kbase[i] + n] = ker_t'(rnd_signed(mag));
      for (int f = 0; f < l_nout(i, CH_DIV); f++) begin
        mem.bm[mem.bbase[i] + f].b1 = bnc_t'(32768 + ($urandom % 65536));
        mem.bm[mem.bbase[i] + f].b2 = bnc_t'(rnd_signed(6554));
      end
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    t0 = cyc;
    frames_in = 0;
    frame_valid <= 1;
    while (frames_in < NF) begin
      @(posedge clk);
      if (frame_ready) frames_in++;
    end
    frame_valid <= 0;
    while (steps != 32'(NF + 10) || step_active) @(posedge clk);
    repeat (5) @(posedge clk);
    $display("pipeline: %0d steps, %0d cycles", steps, cyc - t0);
    checks++;
    if (steps != 32'(NF + 10)) begin failures++; $display("steps %0d", steps); end
    repeat (20) @(posedge clk);
    checks++;
    if (steps != 32'(NF + 10)) begin failures++; $display("extra steps %0d", steps); end
    for (int k = 0; k < NF; k++) begin
      ref_frame(k);
      compare_frame(k);
    end
    $display("mechanisms:");
    count_mech("stall cycles", n_stall);
    count_mech("layers overlapped cycles", n_overlap);
    count_mech("MAC reuse (group>0) reads", n_reuse);
    count_mech("zero-padding cycles", n_pad);
    count_mech("route reads", n_route);
    count_mech("upsample reads", n_up);
    count_mech("stride-1 pool writes", n_pool1);
    count_mech("stride-2 pool writes", n_pool2);
    if (HAS_SKIP) count_mech("unused filter slots", n_skip);
    count_mech("distinct layer-13 values", distinct_outputs(0) > 16 ? distinct_outputs(0) : 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
