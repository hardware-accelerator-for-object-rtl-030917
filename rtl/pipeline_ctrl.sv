// pipeline_ctrl: frame-level pipeline and stall control of the layer array.
//
// Every layer has its own hardware, and all layers work at the same time, each on
// a different frame: in pipeline step t, layer i works on the frame that its
// source layer finished in step t-1. Layers take very different times per frame,
// so a step lasts as long as its slowest layer; a layer that finishes early is
// stalled (held idle) until every layer started in the step has raised its
// res_done. The frame rate is therefore set by the slowest layer.
//
// At the start of a step, layer i is started if its source produced a result in
// the previous step (layer 0 if a new frame is offered on frame_valid, which is
// then acknowledged with a frame_ready pulse). layer_frame[i] counts the frames
// layer i has finished, which is also the number of the frame it works on; the
// memory uses it to keep the frames of neighbouring layers apart. stalled[i] is
// high while layer i is done and waits for the rest of the step. The pipeline
// drains by itself once frame_valid stays low.
//
// That a control signal stalls the faster layers follows the design; the step
// handshake (start pulses, res_done collection, frame numbering) is this design's.
module pipeline_ctrl
  import yolo_pkg::*;
#(
  parameter int N   = NL,
  parameter int SRC_OF [N] = SRC     // source layer of each layer, -1: the image
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        frame_valid,
  output logic        frame_ready,
  input  logic        layer_done  [N],
  output logic        layer_start [N],
  output logic [15:0] layer_frame [N],
  output logic        stalled     [N],
  output logic        step_active,
  output logic [31:0] steps
);

  logic run     [N];
  logic done_r  [N];
  logic has_out [N];
  logic run_next[N];
  logic any_next, all_done;

  always_comb begin
    any_next = 1'b0;
    all_done = 1'b1;
    for (int i = 0; i < N; i++) begin
      run_next[i] = (SRC_OF[i] < 0) ? frame_valid : has_out[SRC_OF[i]];
      any_next   |= run_next[i];
      all_done   &= !run[i] || done_r[i] || layer_done[i];
    end
    for (int i = 0; i < N; i++)
      stalled[i] = step_active && run[i] && done_r[i] && !all_done;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      step_active <= 1'b0;
      frame_ready <= 1'b0;
      steps       <= '0;
      for (int i = 0; i < N; i++) begin
        run[i]         <= 1'b0;
        done_r[i]      <= 1'b0;
        has_out[i]     <= 1'b0;
        layer_start[i] <= 1'b0;
        layer_frame[i] <= '0;
      end
    end else begin
      frame_ready <= 1'b0;
      for (int i = 0; i < N; i++) layer_start[i] <= 1'b0;
      if (!step_active) begin
        if (any_next) begin
          step_active <= 1'b1;
          frame_ready <= run_next[0];
          for (int i = 0; i < N; i++) begin
            run[i]         <= run_next[i];
            layer_start[i] <= run_next[i];
            done_r[i]      <= 1'b0;
          end
        end
      end else begin
        for (int i = 0; i < N; i++) done_r[i] <= done_r[i] || layer_done[i];
        if (all_done) begin
          step_active <= 1'b0;
          steps       <= steps + 1'b1;
          for (int i = 0; i < N; i++) begin
            has_out[i] <= run[i];
            if (run[i]) layer_frame[i] <= layer_frame[i] + 1'b1;
          end
        end
      end
    end
  end

endmodule
