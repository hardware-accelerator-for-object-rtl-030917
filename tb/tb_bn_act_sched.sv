// tb_bn_act_sched: feeds pixels of 4 MAC lanes (3 filters, so the last lane is
// unused) into the shared BN/activation path, with a one-cycle BN-constant memory
// in the testbench, and checks every write (address and value) against the
// reference BN + Leaky ReLU, that the unused lane is not written, and the latency.
module tb_bn_act_sched;
  import yolo_pkg::*;
  import tb_ref_pkg::*;

  localparam int NM = 4, NO = 7, HH = 3, WW = 5;   // 2 groups: filters 0..3, 4..6
  logic clk = 0, rst_n = 0, in_valid = 0;
  feat_t in_data [NM];
  logic [15:0] in_grp = 0, in_oy = 0, in_ox = 0;
  logic bn_rd_en, wr_en, busy;
  addr_t bn_rd_addr, wr_addr;
  bn_const_t bn_rdata;
  feat_t wr_data;
  int checks = 0, failures = 0;

  bn_const_t bn_mem [NO];
  longint exp_val [longint];

  bn_act_sched #(.N_MAC(NM), .N_OUT(NO), .H(HH), .W(WW)) dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) if (bn_rd_en) bn_rdata <= bn_mem[bn_rd_addr];

  int writes = 0;
  always @(posedge clk) if (rst_n && wr_en) begin
    checks++;
    writes++;
    if (!exp_val.exists(longint'(wr_addr))) begin
      failures++;
      $display("unexpected write addr %0d", wr_addr);
    end else if (longint'(wr_data) != exp_val[longint'(wr_addr)]) begin
      failures++;
      $display("addr %0d got %0d exp %0d", wr_addr, wr_data, exp_val[longint'(wr_addr)]);
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int npix = 0;
    for (int f = 0; f < NO; f++) begin
      bn_mem[f].b1 = bnc_t'(rnd_signed(200000));
      bn_mem[f].b2 = bnc_t'(rnd_signed(200000));
    end
    for (int j = 0; j < NM; j++) in_data[j] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int g = 0; g < 2; g++)
      for (int y = 0; y < HH; y++)
        for (int x = 0; x < WW; x++) begin
          for (int j = 0; j < NM; j++) in_data[j] <= feat_t'(rnd_signed(64'sd1 << 24));
          @(negedge clk);
          for (int j = 0; j < NM; j++) begin
            int f;
            f = g * NM + j;
            if (f < NO)
              exp_val[longint'(f * HH * WW + y * WW + x)] =
                ref_lrelu(ref_bn(longint'(in_data[j]), longint'(bn_mem[f].b1), longint'(bn_mem[f].b2)));
          end
          in_grp <= 16'(g); in_oy <= 16'(y); in_ox <= 16'(x);
          in_valid <= 1;
          @(posedge clk);
          in_valid <= 0;
          npix++;
          // lane 0 is written two cycles after its sweep slot
          repeat (NM + 1 + (npix % 3)) @(posedge clk);
        end
    repeat (10) @(posedge clk);
    checks++;
    if (writes != NO * HH * WW) begin
      failures++;
      $display("writes %0d exp %0d", writes, NO * HH * WW);
    end
    checks++;
    if (busy) begin failures++; $display("still busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
