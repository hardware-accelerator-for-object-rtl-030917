// tb_conv_addr_gen: runs the address generator of a small layer (2 channels, 3x4
// map, 3x3 kernel, reusability factor 2) and compares every step with nested loops
// written in the testbench: coordinates, padding flag, feature and kernel
// addresses, first/last marks, and the number of cycles until done.
module tb_conv_addr_gen;
  import yolo_pkg::*;

  localparam int NI = 2, HH = 3, WW = 4, KK = 3, R = 2;
  logic clk = 0, rst_n = 0, start = 0;
  logic busy, valid, pad, first, last, done;
  logic [15:0] ch, grp, oy, ox;
  logic signed [15:0] iy, ix;
  addr_t feat_addr, ker_addr;
  int checks = 0, failures = 0;

  conv_addr_gen #(.N_IN(NI), .H(HH), .W(WW), .K(KK), .RF(R)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    int steps = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    for (int r = 0; r < R; r++)
      for (int y = 0; y < HH; y++)
        for (int x = 0; x < WW; x++)
          for (int c = 0; c < NI; c++)
            for (int ky = 0; ky < KK; ky++)
              for (int kx = 0; kx < KK; kx++) begin
                int yy, xx;
                bit p;
                yy = y + ky - 1;
                xx = x + kx - 1;
                p  = (yy < 0 || yy >= HH || xx < 0 || xx >= WW);
                #1;
                expect_eq("valid", valid, 1);
                expect_eq("pad", pad, p);
                if (!p) expect_eq("faddr", feat_addr, c * HH * WW + yy * WW + xx);
                expect_eq("kaddr", ker_addr, ((r * NI + c) * KK + ky) * KK + kx);
                expect_eq("first", first, (c == 0 && ky == 0 && kx == 0));
                expect_eq("last", last, (c == NI - 1 && ky == KK - 1 && kx == KK - 1));
                expect_eq("out", {grp, oy, ox}, {16'(r), 16'(y), 16'(x)});
                expect_eq("ch", ch, c);
                steps++;
                @(posedge clk);
              end
    #1;
    expect_eq("valid_after", valid, 0);
    expect_eq("done", done, 1);
    expect_eq("cycles", steps, NI * KK * KK * HH * WW * R);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
