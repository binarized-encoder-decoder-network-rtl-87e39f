// compute_array: the dedicated hardware of one network layer.
//
// Input FIFO -> sliding window unit (SWU, or zero-aware SWU for deconvolution)
// -> window FIFO -> matrix-vector thresholding unit (MVTU / ZAMVTU).  The input
// FIFO receives the previous layer's output stream: raster-order pixels, each as
// ICH/S channel-interleaved words of S lanes.  The output is this layer's
// feature map in the same form with OUT_S lanes per word (the lane count of the
// next layer), or, for the last layer, one vector of OCH 24-bit scores per pixel.
//
// Shape: S SIMD lanes and P PEs; the layer computes OCH/P neuron folds, each
// over (nonzero taps)*(ICH/S) words per window.  All units stream with
// valid/ready, so the array starts as soon as the first input words arrive and
// can run concurrently with the other layers.  Both FIFO depths are this
// design's own choice (4 words).
module compute_array
  import bide_pkg::*;
#(
  parameter kind_e       KIND  = KIND_BIN,
  parameter geo_e        GEO   = GEO_S1,
  parameter int unsigned IH    = 8,
  parameter int unsigned IW    = 8,
  parameter int unsigned ICH   = 8,
  parameter int unsigned OCH   = 8,
  parameter int unsigned S     = 4,
  parameter int unsigned P     = 4,
  parameter int unsigned OUT_S = 4,
  parameter int unsigned CFGW  = 64,
  parameter int unsigned FIFO_DEPTH = 4,
  // derived
  parameter int unsigned AB    = (KIND == KIND_FIRST) ? PIX_W : 1,
  parameter int unsigned OUT_W = (KIND == KIND_LAST) ? OCH * SCORE_W : OUT_S
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [S*AB-1:0]   in_data,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [OUT_W-1:0]  out_data,
  input  logic              cfg_we,
  input  logic [7:0]        cfg_pe,
  input  cfg_sel_e          cfg_sel,
  input  logic [15:0]       cfg_addr,
  input  logic [CFGW-1:0]   cfg_data
);
  localparam int unsigned W = S * AB;

  logic         f0_valid, f0_ready;
  logic [W-1:0] f0_data;
  logic         sw_valid, sw_ready;
  logic [W-1:0] sw_data;
  logic         f1_valid, f1_ready;
  logic [W-1:0] f1_data;

  stream_fifo #(.WIDTH(W), .DEPTH(FIFO_DEPTH)) u_in_fifo (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data,
    .out_valid(f0_valid), .out_ready(f0_ready), .out_data(f0_data)
  );

  swu #(.GEO(GEO), .IH(IH), .IW(IW), .FOLDS(ICH / S), .WIDTH(W)) u_swu (
    .clk, .rst_n,
    .in_valid(f0_valid), .in_ready(f0_ready), .in_data(f0_data),
    .out_valid(sw_valid), .out_ready(sw_ready), .out_data(sw_data)
  );

  stream_fifo #(.WIDTH(W), .DEPTH(FIFO_DEPTH)) u_win_fifo (
    .clk, .rst_n,
    .in_valid(sw_valid), .in_ready(sw_ready), .in_data(sw_data),
    .out_valid(f1_valid), .out_ready(f1_ready), .out_data(f1_data)
  );

  mvtu #(.KIND(KIND), .GEO(GEO), .IH(IH), .IW(IW), .ICH(ICH), .OCH(OCH),
         .S(S), .P(P), .AB(AB), .OUT_S(OUT_S), .CFGW(CFGW)) u_mvtu (
    .clk, .rst_n,
    .in_valid(f1_valid), .in_ready(f1_ready), .in_data(f1_data),
    .out_valid, .out_ready, .out_data,
    .cfg_we, .cfg_pe, .cfg_sel, .cfg_addr, .cfg_data
  );
endmodule
