// bide_top: binarized deconvolution engine (BiDE) running the 11-layer binarized
// encoder-decoder segmentation network (BEDN).
//
// A heterogeneous streaming pipeline: each layer has its own compute array
// (compute_array), and the arrays are chained by FIFOs, so all layers work at
// the same time on different parts of the image and no feature map is ever
// stored whole.  Layer sequence (3x3 kernels throughout):
//    1  conv  stride 1, 8-bit RGB input x binary weights      IMG_H   x IMG_W
//    2  conv  stride 1                                         IMG_H   x IMG_W
//    3  conv  stride 2 (bottom/right edge padding)             -> /2
//    4  conv  stride 1
//    5  conv  stride 2                                         -> /4
//    6  conv  stride 1
//    7  deconv x2, zero-aware (upsampling zeros skipped)       -> /2
//    8  conv  stride 1
//    9  deconv x2, zero-aware                                  -> full size
//   10  conv  stride 1
//   11  conv  stride 1, batch-normalised 24-bit class scores
// followed by the pixel-wise classification layer, which turns the 11 scores of
// a pixel into a 4-bit class index.  Edge padding is skipped in every layer.
//
// CH[l] is the channel count entering layer l+1 (CH[11] = number of classes);
// LANES[l] and PES[l] are the SIMD lanes S and processing elements P of layer
// l+1.  The defaults are the channel counts of the CamVid11 model and the "quad"
// configuration (29568 SIMD lanes in all), for 480x360 images.
//
// Interfaces:
//  img_*  input image, raster order, one pixel per word: channel c in bits
//         [8c+7:8c], unsigned.  valid/ready.
//  cls_*  class index per pixel, raster order.  valid/ready.
//  cfg_*  parameter loading, used before the first image: cfg_layer (0..10)
//         and cfg_pe select a PE, cfg_sel its weight, threshold or scale
//         memory, cfg_addr the word (see mvtu_pe for the layout).
// Timing: every stage moves at most one word per cycle; the steady-state rate
// is set by the slowest compute array (OCH/P * taps * ICH/S cycles per pixel).
module bide_top
  import bide_pkg::*;
#(
  parameter int unsigned IMG_H = 360,
  parameter int unsigned IMG_W = 480,
  parameter int unsigned CH    [NUM_LAYERS+1] = '{3, 64, 64, 128, 128, 256, 256, 128, 128, 64, 64, 11},
  parameter int unsigned LANES [NUM_LAYERS]   = '{3, 64, 32, 64, 32, 64, 32, 64, 32, 64, 64},
  parameter int unsigned PES   [NUM_LAYERS]   = '{64, 64, 64, 64, 64, 64, 64, 64, 64, 64, 11},
  parameter int unsigned CFGW  = 64,
  parameter int unsigned IDX_W = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       img_valid,
  output logic                       img_ready,
  input  logic [LANES[0]*PIX_W-1:0]  img_data,
  output logic                       cls_valid,
  input  logic                       cls_ready,
  output logic [IDX_W-1:0]           cls_index,
  input  logic                       cfg_we,
  input  logic [3:0]                 cfg_layer,
  input  logic [7:0]                 cfg_pe,
  input  cfg_sel_e                   cfg_sel,
  input  logic [15:0]                cfg_addr,
  input  logic [CFGW-1:0]            cfg_data
);
  localparam int unsigned NCLS = CH[NUM_LAYERS];

  // feature-map height/width entering layer l
  function automatic int unsigned dim_in(int unsigned l, int unsigned n);
    int unsigned d = n;
    for (int unsigned i = 0; i < l; i++) d = out_size(layer_geo(i), d);
    return d;
  endfunction

  function automatic int unsigned link_width();
    int unsigned w = LANES[0] * PIX_W;
    for (int unsigned i = 1; i < NUM_LAYERS; i++) if (LANES[i] > w) w = LANES[i];
    return w;
  endfunction

  localparam int unsigned LW = link_width();

  logic [NUM_LAYERS-1:0] lk_valid, lk_ready;
  logic [LW-1:0]         lk_data [NUM_LAYERS];
  logic                  sc_valid, sc_ready;
  logic [NCLS*SCORE_W-1:0] sc_data;

  assign lk_valid[0] = img_valid;
  assign img_ready   = lk_ready[0];
  assign lk_data[0]  = LW'(img_data);

  for (genvar l = 0; l < NUM_LAYERS; l++) begin : g_layer
    localparam kind_e       KD  = layer_kind(l);
    localparam int unsigned AB  = (KD == KIND_FIRST) ? PIX_W : 1;
    localparam int unsigned IWD = LANES[l] * AB;
    localparam int unsigned OS  = (l < NUM_LAYERS - 1) ? LANES[(l < NUM_LAYERS - 1) ? l + 1 : l] : 1;
    localparam int unsigned OWD = (KD == KIND_LAST) ? CH[l+1] * SCORE_W : OS;

    logic           o_valid, o_ready;
    logic [OWD-1:0] o_data;

    compute_array #(
      .KIND(KD), .GEO(layer_geo(l)),
      .IH(dim_in(l, IMG_H)), .IW(dim_in(l, IMG_W)),
      .ICH(CH[l]), .OCH(CH[l+1]), .S(LANES[l]), .P(PES[l]), .OUT_S(OS), .CFGW(CFGW)
    ) u_ca (
      .clk, .rst_n,
      .in_valid(lk_valid[l]), .in_ready(lk_ready[l]), .in_data(lk_data[l][IWD-1:0]),
      .out_valid(o_valid), .out_ready(o_ready), .out_data(o_data),
      .cfg_we(cfg_we && cfg_layer == 4'(l)), .cfg_pe, .cfg_sel, .cfg_addr, .cfg_data
    );

    if (l < NUM_LAYERS - 1) begin : g_link
      assign lk_valid[l+1] = o_valid;
      assign o_ready       = lk_ready[l+1];
      assign lk_data[l+1]  = LW'(o_data);
    end else begin : g_scores
      assign sc_valid = o_valid;
      assign o_ready  = sc_ready;
      assign sc_data  = o_data;
    end
  end

  pixel_classifier #(.NCLS(NCLS), .IDX_W(IDX_W)) u_cls (
    .clk, .rst_n,
    .in_valid(sc_valid), .in_ready(sc_ready), .in_scores(sc_data),
    .out_valid(cls_valid), .out_ready(cls_ready), .out_index(cls_index)
  );
endmodule
