// tb_maxpool_unit: two maxpool units on a 6x6 map memory in the testbench, one
// with stride 2 and one with stride 1. Each pools the maps of lane UNIT=1 out of
// MAP_STEP=2 (maps 1 and 3; map 3 is beyond N_OUT=3 and skipped). Every written
// maximum is checked against a reference, as are the number of writes and the
// cycle count of 4*H*W/(S*S) per map.
module tb_maxpool_unit;
  import yolo_pkg::*;
  import tb_ref_pkg::*;

  localparam int HH = 6, WW = 6, NO = 3;
  logic clk = 0, rst_n = 0, start = 0;
  int checks = 0, failures = 0;
  feat_t mem [NO * HH * WW];

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ref_pool(input int f, input int oy, input int ox, input int s);
    longint m = -64'sd9000000000;
    for (int dy = 0; dy < 2; dy++)
      for (int dx = 0; dx < 2; dx++) begin
        int r, c;
        r = oy * s + dy; c = ox * s + dx;
        if (r > HH - 1) r = HH - 1;
        if (c > WW - 1) c = WW - 1;
        if (longint'(mem[f * HH * WW + r * WW + c]) > m) m = longint'(mem[f * HH * WW + r * WW + c]);
      end
    return m;
  endfunction

  for (genvar si = 1; si <= 2; si++) begin : g_s
    localparam int HO = (si == 2) ? HH / 2 : HH;
    logic busy, rd_en, wr_en, max_done;
    addr_t rd_addr, wr_addr;
    feat_t rd_data, wr_data;
    int writes = 0, cycles = 0, done_cnt = 0;
    bit counting = 0;

    maxpool_unit #(.H(HH), .W(WW), .S(si), .MAPS(2), .MAP_STEP(2), .UNIT(1), .N_OUT(NO)) dut (
      .clk, .rst_n, .start, .busy, .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data,
      .max_done
    );

    always_ff @(posedge clk) if (rd_en) rd_data <= mem[rd_addr];

    always @(posedge clk) if (rst_n) begin
      if (start) counting = 1;
      if (rd_en) cycles++;
      if (max_done) done_cnt++;
      if (wr_en) begin
        int f, oy, ox;
        f  = wr_addr / (HO * HO);
        oy = (wr_addr % (HO * HO)) / HO;
        ox = wr_addr % HO;
        writes++;
        checks++;
        if (f != 1 || longint'(wr_data) != ref_pool(f, oy, ox, si)) begin
          failures++;
          $display("S=%0d f=%0d (%0d,%0d) got %0d exp %0d", si, f, oy, ox, wr_data,
                   ref_pool(f, oy, ox, si));
        end
      end
    end
  end

  initial begin
    for (int i = 0; i < NO * HH * WW; i++) mem[i] = feat_t'(rnd_signed(64'sd1 << 30));
    mem[1 * HH * WW + 7] = feat_t'(-32'sd5);  // a window of negatives
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    @(posedge clk);
    wait (!g_s[1].busy && !g_s[2].busy);
    repeat (3) @(posedge clk);
    checks += 6;
    if (g_s[2].writes != (HH / 2) * (WW / 2)) begin failures++; $display("S2 writes %0d", g_s[2].writes); end
    if (g_s[1].writes != HH * WW)             begin failures++; $display("S1 writes %0d", g_s[1].writes); end
    if (g_s[2].cycles != 4 * HH * WW / 4)     begin failures++; $display("S2 cycles %0d", g_s[2].cycles); end
    if (g_s[1].cycles != 4 * HH * WW)         begin failures++; $display("S1 cycles %0d", g_s[1].cycles); end
    if (g_s[2].done_cnt != 1)                 begin failures++; $display("S2 done %0d", g_s[2].done_cnt); end
    if (g_s[1].done_cnt != 1)                 begin failures++; $display("S1 done %0d", g_s[1].done_cnt); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
