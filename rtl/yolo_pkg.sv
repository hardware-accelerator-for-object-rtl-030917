// yolo_pkg: number formats and the layer table shared by the Tiny YOLO-v3 accelerator.
//
// Number formats follow the fixed-point choices of the design: kernel weights are
// signed <3,16> (3 integer bits including sign, 16 fraction bits, 19 bits in all),
// batch-normalisation constants are signed <6,16> (22 bits) and every feature value
// and intermediate result is signed <16,16> (32 bits). Products are kept at full
// precision and brought back to 16 fraction bits by an arithmetic right shift
// (truncation toward minus infinity) followed by saturation to the 32-bit range;
// the rounding and saturation rule is this design's own choice.
//
// The layer table holds the thirteen convolution layers of Tiny YOLO-v3 with the
// reusability factors of the timing analysis. Two scaling knobs let a testbench
// shrink the network without changing its structure: IMG, the input image side
// (416 in the full network, any multiple of 32), and CH_DIV, a power of two that
// divides every channel count except the three input colour channels.
package yolo_pkg;

  localparam int FRAC   = 16;   // fraction bits of all three formats
  localparam int FEAT_W = 32;   // <16,16>
  localparam int KER_W  = 19;   // <3,16>
  localparam int BNC_W  = 22;   // <6,16>
  localparam int ADDR_W = 32;

  typedef logic signed [FEAT_W-1:0] feat_t;
  typedef logic signed [KER_W-1:0]  ker_t;
  typedef logic signed [BNC_W-1:0]  bnc_t;
  typedef logic        [ADDR_W-1:0] addr_t;

  // Pair of batch-normalisation constants of one filter: n = b1*m + b2.
  typedef struct packed {
    bnc_t b1;
    bnc_t b2;
  } bn_const_t;

  // Memory region a feature read refers to: the input image, the convolution
  // results of a layer, or the pooled results of a layer.
  typedef enum logic [1:0] {REG_IMAGE = 2'd0, REG_CONV = 2'd1, REG_POOL = 2'd2} region_kind_e;
  typedef struct packed {
    region_kind_e kind;
    logic [3:0]   layer;   // 0-based layer index, unused for REG_IMAGE
  } region_t;

  localparam int NL = 13;

  // Paper-size layer table (index 0 is layer 1).
  localparam int NOUT_P [NL] = '{16, 32, 64, 128, 256, 512, 1024, 256, 512, 255, 128, 256, 255};
  localparam int KSZ    [NL] = '{3, 3, 3, 3, 3, 3, 3, 1, 3, 1, 1, 3, 1};
  localparam int RFAC   [NL] = '{1, 1, 2, 4, 8, 16, 8, 4, 1, 1, 16, 2, 4};
  // log2 of the input-image side divided by this layer's side
  localparam int HSHIFT [NL] = '{0, 1, 2, 3, 4, 5, 5, 5, 5, 5, 5, 4, 4};
  // maxpool: 0 none, else its stride
  localparam int POOLS  [NL] = '{2, 2, 2, 2, 2, 1, 0, 0, 0, 0, 0, 0, 0};
  // layer whose output this layer reads (-1: the image). Layer 12 also reads
  // the convolution results of layer 5 (ROUTE_LAYER) through the concatenation.
  localparam int SRC    [NL] = '{-1, 0, 1, 2, 3, 4, 5, 6, 7, 8, 7, 10, 11};
  localparam int ROUTE_LAYER  = 4;   // layer 5
  localparam int CONCAT_LAYER = 11;  // layer 12

  function automatic int cdiv(input int a, input int b);
    return (a + b - 1) / b;
  endfunction

  function automatic int l_nout(input int i, input int ch_div);
    return cdiv(NOUT_P[i], ch_div);
  endfunction

  function automatic int l_nin(input int i, input int ch_div);
    if (i == 0)            return 3;
    if (i == CONCAT_LAYER) return l_nout(SRC[i], ch_div) + l_nout(ROUTE_LAYER, ch_div);
    return l_nout(SRC[i], ch_div);
  endfunction

  function automatic int l_side(input int i, input int img);
    return img >> HSHIFT[i];
  endfunction

  // Number of MAC units of a layer: its filters divided by the reusability factor.
  function automatic int l_nmac(input int i, input int ch_div);
    return cdiv(l_nout(i, ch_div), RFAC[i]);
  endfunction

  // Number of maxpool units: one per MAC unit output lane (0 when the layer has no pool).
  function automatic int l_npool(input int i, input int ch_div);
    return (POOLS[i] != 0) ? l_nmac(i, ch_div) : 0;
  endfunction

  function automatic int max_nmac(input int ch_div);
    int m = 1;
    for (int i = 0; i < NL; i++) if (l_nmac(i, ch_div) > m) m = l_nmac(i, ch_div);
    return m;
  endfunction

  function automatic int max_npool(input int ch_div);
    int m = 1;
    for (int i = 0; i < NL; i++) if (l_npool(i, ch_div) > m) m = l_npool(i, ch_div);
    return m;
  endfunction

  // Region a layer's input is read from: the image, or the source layer's pooled
  // results if that layer pools, else its convolution results.
  function automatic region_t l_in_region(input int i);
    region_t r;
    if (SRC[i] < 0) begin
      r.kind  = REG_IMAGE;
      r.layer = '0;
    end else begin
      r.kind  = (POOLS[SRC[i]] != 0) ? REG_POOL : REG_CONV;
      r.layer = 4'(SRC[i]);
    end
    return r;
  endfunction

  // Saturate a wide signed value to the <16,16> range.
  function automatic feat_t sat_feat(input logic signed [79:0] v);
    if (v > 80'sh7FFF_FFFF)
      return feat_t'(32'sh7FFF_FFFF);
    if (v < -80'sh8000_0000)
      return feat_t'(-32'sh8000_0000);
    return feat_t'(v[31:0]);
  endfunction

endpackage
