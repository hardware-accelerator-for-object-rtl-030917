// tb_upsample_concat: random layer-12 reads through the upsample/concatenate
// mapping, with two one-cycle memories holding a 3-channel 4x4 upsample source
// and a 2-channel 8x8 route source. Checks the returned value against the
// concatenation of the nearest-neighbour upsampled map and the route map.
module tb_upsample_concat;
  import yolo_pkg::*;
  import tb_ref_pkg::*;

  localparam int HH = 8, CU = 3, CR = 2;
  logic clk = 0, rst_n = 0, rd_en = 0;
  logic [15:0] rd_ch = 0, rd_y = 0, rd_x = 0;
  feat_t rd_data, up_data, rt_data;
  logic up_en, rt_en;
  addr_t up_addr, rt_addr;
  int checks = 0, failures = 0;
  feat_t up_mem [CU * (HH / 2) * (HH / 2)];
  feat_t rt_mem [CR * HH * HH];

  upsample_concat #(.H(HH), .W(HH), .C_UP(CU)) dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    if (up_en) up_data <= up_mem[up_addr];
    if (rt_en) rt_data <= rt_mem[rt_addr];
  end

  function automatic longint ref_val(input int c, input int y, input int x);
    if (c < CU) return longint'(up_mem[c * 16 + (y / 2) * 4 + x / 2]);
    return longint'(rt_mem[(c - CU) * HH * HH + y * HH + x]);
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nup = 0, nrt = 0;
    longint expv;
    for (int i = 0; i < CU * 16; i++) up_mem[i] = feat_t'($urandom);
    for (int i = 0; i < CR * HH * HH; i++) rt_mem[i] = feat_t'($urandom);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 500; n++) begin
      int c, y, x;
      c = $urandom % (CU + CR); y = $urandom % HH; x = $urandom % HH;
      rd_ch <= 16'(c); rd_y <= 16'(y); rd_x <= 16'(x); rd_en <= 1;
      if (c < CU) nup++; else nrt++;
      expv = ref_val(c, y, x);
      @(posedge clk);
      rd_en <= 0;
      #1;
      checks++;
      if (longint'(rd_data) != expv) begin
        failures++;
        $display("c=%0d y=%0d x=%0d got %0d exp %0d", c, y, x, rd_data, expv);
      end
    end
    checks++;
    if (nup == 0 || nrt == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
