// tb_pipeline_ctrl: four model layers (1 -> 2 -> {3, 4}) with different and
// changing run times under the pipeline controller. Three frames are offered.
// Checks: each layer starts once per step in which its source produced a result,
// every step lasts as long as its slowest layer, faster layers are reported as
// stalled, frame numbers advance, and the pipeline drains in frames+2 steps.
module tb_pipeline_ctrl;
  import yolo_pkg::*;

  localparam int N = 4;
  localparam int SRCS [N] = '{-1, 0, 1, 1};
  logic clk = 0, rst_n = 0, frame_valid = 0;
  logic frame_ready, step_active;
  logic layer_done [N], layer_start [N], stalled [N];
  logic [15:0] layer_frame [N];
  logic [31:0] steps;
  int checks = 0, failures = 0;
  int starts [N];
  int stall_cycles = 0;
  int frames_in = 0;

  pipeline_ctrl #(.N(N), .SRC_OF(SRCS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // layer models: run for a duration depending on the layer and the frame
  for (genvar i = 0; i < N; i++) begin : g_l
    int left = -1;
    initial layer_done[i] = 0;
    always @(posedge clk) begin
      layer_done[i] <= 0;
      if (layer_start[i]) begin
        starts[i]++;
        checks++;
        if (layer_frame[i] != 16'(starts[i] - 1)) begin
          failures++;
          $display("layer %0d frame %0d exp %0d", i, layer_frame[i], starts[i] - 1);
        end
        left = 10 + 7 * i + 13 * (layer_frame[i] % 2);
      end else if (left > 0) begin
        left--;
        if (left == 0) layer_done[i] <= 1;
      end
    end
  end

  // each step ends exactly one cycle after the slowest layer's done
  int step_len = 0, step_max = 0;
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) if (stalled[i]) stall_cycles++;
    if (frame_ready) frames_in++;
  end

  initial begin
    for (int i = 0; i < N; i++) starts[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    frame_valid <= 1;
    wait (frames_in == 3);
    frame_valid <= 0;
    wait (steps == 5);
    repeat (100) @(posedge clk);
    checks += 5;
    if (starts[0] != 3 || starts[1] != 3 || starts[2] != 3 || starts[3] != 3) begin
      failures++;
      $display("starts %0d %0d %0d %0d", starts[0], starts[1], starts[2], starts[3]);
    end
    if (steps != 5) begin failures++; $display("steps %0d", steps); end
    if (stall_cycles == 0) begin failures++; $display("no stall seen"); end
    if (layer_frame[3] != 3) begin failures++; $display("frame count %0d", layer_frame[3]); end
    if (step_active) begin failures++; $display("not drained"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // step duration: from start pulses to the end equals the slowest running layer
  int t0 = 0, cyc = 0, longest = 0;
  always @(posedge clk) begin
    cyc++;
    if (layer_start[0] || layer_start[1] || layer_start[2] || layer_start[3]) begin
      t0 = cyc;
      longest = 0;
      for (int i = 0; i < N; i++)
        if (layer_start[i]) begin
          int d;
          d = 10 + 7 * i + 13 * (layer_frame[i] % 2);
          if (d > longest) longest = d;
        end
    end
    if (dut.step_active && dut.all_done) begin
      checks++;
      // a model layer raises res_done d+1 cycles after its start
      if (cyc - t0 != longest + 1) begin
        failures++;
        $display("step length %0d exp %0d", cyc - t0, longest + 1);
      end
    end
  end
endmodule
