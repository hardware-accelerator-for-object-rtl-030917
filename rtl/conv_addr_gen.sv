// conv_addr_gen: address generator of a convolution layer.
//
// After a start pulse it walks, one step per clock, through every multiply of the
// layer in the order group r (the reusability loop), output row y, output column x,
// input channel c, kernel row ky, kernel column kx. For each step it gives the
// coordinates and flat address of the input feature (c*H*W + iy*W + ix with
// iy = y+ky-P, ix = x+kx-P) and the offset of the kernel weight inside the group's
// kernels ((r*N_IN + c)*K + ky)*K + kx. Positions that fall outside the feature map
// are flagged with pad, and the layer feeds a zero there instead of reading memory.
// done pulses one cycle after the last step.
//
// The convolution is stride 1 with "same" zero padding P = (K-1)/2, so the output
// map has the size of the input map; the order of the loops and the padding rule are
// this design's choice. The output pixel a step contributes to is given by
// (grp, oy, ox), and first/last mark the first and last step of each output pixel.
module conv_addr_gen
  import yolo_pkg::*;
#(
  parameter int N_IN = 3,
  parameter int H    = 416,
  parameter int W    = 416,
  parameter int K    = 3,
  parameter int RF   = 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       busy,
  output logic       valid,
  output logic       pad,
  output logic       first,
  output logic       last,
  output logic [15:0] ch,
  output logic signed [15:0] iy,
  output logic signed [15:0] ix,
  output addr_t      feat_addr,
  output addr_t      ker_addr,
  output logic [15:0] grp,
  output logic [15:0] oy,
  output logic [15:0] ox,
  output logic       done
);

  localparam logic signed [15:0] P = 16'((K - 1) / 2);

  logic [15:0] r, y, x, c, ky, kx;
  logic        run;

  logic end_kx, end_ky, end_c, end_x, end_y, end_r;

  always_comb begin
    end_kx = (kx == 16'(K - 1));
    end_ky = (ky == 16'(K - 1));
    end_c  = (c  == 16'(N_IN - 1));
    end_x  = (x  == 16'(W - 1));
    end_y  = (y  == 16'(H - 1));
    end_r  = (r  == 16'(RF - 1));

    valid = run;
    busy  = run;
    iy    = $signed(y) + $signed(ky) - 16'(P);
    ix    = $signed(x) + $signed(kx) - 16'(P);
    pad   = (iy < 0) || (iy >= 16'(H)) || (ix < 0) || (ix >= 16'(W));
    ch    = c;
    feat_addr = addr_t'(c) * addr_t'(H * W) + addr_t'(unsigned'(32'(iy))) * addr_t'(W)
              + addr_t'(unsigned'(32'(ix)));
    ker_addr  = ((addr_t'(r) * addr_t'(N_IN) + addr_t'(c)) * addr_t'(K) + addr_t'(ky))
              * addr_t'(K) + addr_t'(kx);
    first = (c == 0) && (ky == 0) && (kx == 0);
    last  = end_c && end_ky && end_kx;
    grp   = r;
    oy    = y;
    ox    = x;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run  <= 1'b0;
      done <= 1'b0;
      {r, y, x, c, ky, kx} <= '0;
    end else begin
      done <= 1'b0;
      if (!run) begin
        if (start) begin
          run <= 1'b1;
          {r, y, x, c, ky, kx} <= '0;
        end
      end else begin
        kx <= end_kx ? '0 : kx + 1'b1;
        if (end_kx) begin
          ky <= end_ky ? '0 : ky + 1'b1;
          if (end_ky) begin
            c <= end_c ? '0 : c + 1'b1;
            if (end_c) begin
              x <= end_x ? '0 : x + 1'b1;
              if (end_x) begin
                y <= end_y ? '0 : y + 1'b1;
                if (end_y) begin
                  r <= end_r ? '0 : r + 1'b1;
                  if (end_r) begin
                    run  <= 1'b0;
                    done <= 1'b1;
                  end
                end
              end
            end
          end
        end
      end
    end
  end

endmodule
