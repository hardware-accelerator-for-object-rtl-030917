// maxpool_unit: 2x2 max pooling with a four-state FSM and a single comparator.
//
// The unit pools MAPS feature maps one after the other: map m of this unit is
// output feature map f = m*MAP_STEP + UNIT (maps with f >= N_OUT are skipped). For
// every 2x2 window the FSM steps through State 0, 1, 2, 3 and in each state sends
// one read address to memory: top-left, top-right (addr+1), bottom-left
// (addr+W-1) and bottom-right (addr+1) of the window. The value read in State 0 is
// taken as the running maximum (multiplexer select state==0); the values of the
// later states go through the comparator against the running maximum. When the
// value of State 3 has been compared, the window's maximum is written out and the
// FSM returns to State 0 at the next window. A window costs 4 cycles, so a map costs
// 4*H*W/(S*S) cycles. max_done pulses once all maps are pooled.
//
// With stride S = 2 the output map is H/2 x W/2. With S = 1 the output is H x W and
// the windows of the last row and column would reach past the map: those reads are
// clamped to the last row/column (the same as ignoring them for a maximum); that
// edge rule, the order 0-1-2-3 of the states and the one-cycle read latency are
// this design's choices.
//
// Interface: start (pulse) begins pooling; rd_en/rd_addr read the layer's
// convolution results (offset f*H*W + row*W + col), rd_data arrives one cycle
// later; wr_en/wr_addr/wr_data write the pooled value (offset f*Ho*Wo + oy*Wo + ox).
module maxpool_unit
  import yolo_pkg::*;
#(
  parameter int H        = 416,
  parameter int W        = 416,
  parameter int S        = 2,
  parameter int MAPS     = 1,
  parameter int MAP_STEP = 16,
  parameter int UNIT     = 0,
  parameter int N_OUT    = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  output logic  busy,
  output logic  rd_en,
  output addr_t rd_addr,
  input  feat_t rd_data,
  output logic  wr_en,
  output addr_t wr_addr,
  output feat_t wr_data,
  output logic  max_done
);

  localparam int HO = (S == 2) ? H / 2 : H;
  localparam int WO = (S == 2) ? W / 2 : W;

  typedef enum logic [1:0] {ST0 = 2'd0, ST1 = 2'd1, ST2 = 2'd2, ST3 = 2'd3} mp_state_e;

  mp_state_e   state;
  logic        run;
  logic        pend;
  logic [15:0] m, oy, ox;
  logic [15:0] row, col;
  addr_t       f;

  // data path: tag of the value that arrives this cycle
  logic        d_valid;
  mp_state_e   d_state;
  addr_t       d_waddr;
  feat_t       max_r;
  feat_t       cmp_out, mux_out;

  always_comb begin
    logic [15:0] r0, c0;
    f  = addr_t'(m) * addr_t'(MAP_STEP) + addr_t'(UNIT);
    r0 = oy * 16'(S);
    c0 = ox * 16'(S);
    row = r0 + ((state == ST2 || state == ST3) ? 16'd1 : 16'd0);
    col = c0 + ((state == ST1 || state == ST3) ? 16'd1 : 16'd0);
    if (row > 16'(H - 1)) row = 16'(H - 1);
    if (col > 16'(W - 1)) col = 16'(W - 1);
    rd_en   = run && (f < addr_t'(N_OUT));
    rd_addr = f * addr_t'(H * W) + addr_t'(row) * addr_t'(W) + addr_t'(col);
    busy    = run || d_valid || wr_en || pend;

    cmp_out = (rd_data > max_r) ? rd_data : max_r;       // comparator
    mux_out = (d_state == ST0) ? rd_data : cmp_out;      // select: state==0
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run      <= 1'b0;
      state    <= ST0;
      m        <= '0;
      oy       <= '0;
      ox       <= '0;
      d_valid  <= 1'b0;
      d_state  <= ST0;
      d_waddr  <= '0;
      max_r    <= '0;
      wr_en    <= 1'b0;
      wr_addr  <= '0;
      wr_data  <= '0;
      max_done <= 1'b0;
      pend     <= 1'b0;
    end else begin
      max_done <= 1'b0;
      wr_en    <= 1'b0;

      // address FSM
      if (!run) begin
        if (start) begin
          run   <= 1'b1;
          state <= ST0;
          {m, oy, ox} <= '0;
        end
      end else begin
        case (state)
          ST0: state <= ST1;
          ST1: state <= ST2;
          ST2: state <= ST3;
          ST3: begin
            state <= ST0;
            if (ox == 16'(WO - 1)) begin
              ox <= '0;
              if (oy == 16'(HO - 1)) begin
                oy <= '0;
                if (m == 16'(MAPS - 1)) run <= 1'b0;
                else                    m   <= m + 1'b1;
              end else begin
                oy <= oy + 1'b1;
              end
            end else begin
              ox <= ox + 1'b1;
            end
          end
          default: state <= ST0;
        endcase
      end

      // comparator path, one cycle behind the addresses
      d_valid <= rd_en;
      d_state <= state;
      d_waddr <= f * addr_t'(HO * WO) + addr_t'(oy) * addr_t'(WO) + addr_t'(ox);
      if (d_valid) begin
        max_r <= mux_out;
        if (d_state == ST3) begin
          wr_en   <= 1'b1;
          wr_addr <= d_waddr;
          wr_data <= mux_out;
        end
      end

      // max_done follows the write of the last window
      if (run && state == ST3 && ox == 16'(WO - 1) && oy == 16'(HO - 1) && m == 16'(MAPS - 1))
        pend <= 1'b1;
      else if (pend && !d_valid) begin
        pend     <= 1'b0;
        max_done <= 1'b1;
      end
    end
  end

endmodule
