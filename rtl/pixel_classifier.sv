// pixel_classifier: pixel-wise classification layer.
//
// Takes the vector of NCLS signed 24-bit class scores of one pixel from the last
// layer and returns the index of the largest score, so only a class-index map
// (IDX_W bits per pixel) leaves the chip instead of the full score map.  As the
// engine this follows describes, the classes of a pixel are compared one after
// the other while pixels are pipelined: stage k of an NCLS-stage pipeline holds
// one pixel's scores with the best score and index among classes 0..k-1 and
// compares class k, so NCLS pixels are in flight and one pixel can enter and
// leave per cycle.  Ties keep the lower class index (this design's choice).
//
// Interface: valid/ready in and out.  The pipeline advances as a whole whenever
// its last stage is empty or its index is taken (in_ready = out_ready or
// last stage empty).  Latency: a vector accepted at clock edge t gives its index
// on out_index after edge t+NCLS-1 when nothing stalls (stage 0 loads class 0,
// stages 1..NCLS-1 compare one class each).
module pixel_classifier
  import bide_pkg::*;
#(
  parameter int unsigned NCLS  = 11,
  parameter int unsigned IDX_W = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [NCLS*SCORE_W-1:0]  in_scores,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [IDX_W-1:0]         out_index
);
  typedef struct packed {
    logic [NCLS*SCORE_W-1:0]   scores;
    logic signed [SCORE_W-1:0] best;
    logic [IDX_W-1:0]          idx;
  } stage_t;

  // st[k] has compared classes 0..k
  stage_t     st   [NCLS];
  logic       vld  [NCLS];
  logic       adv;

  assign adv       = !vld[NCLS-1] || out_ready;
  assign in_ready  = adv;
  assign out_valid = vld[NCLS-1];
  assign out_index = st[NCLS-1].idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NCLS; k++) begin
        vld[k] <= 1'b0;
        st[k]  <= '0;
      end
    end else if (adv) begin
      vld[0]       <= in_valid;
      st[0].scores <= in_scores;
      st[0].best   <= in_scores[SCORE_W-1:0];
      st[0].idx    <= '0;
      for (int k = 1; k < NCLS; k++) begin
        vld[k]       <= vld[k-1];
        st[k].scores <= st[k-1].scores;
        if ($signed(st[k-1].scores[k*SCORE_W +: SCORE_W]) > $signed(st[k-1].best)) begin
          st[k].best <= st[k-1].scores[k*SCORE_W +: SCORE_W];
          st[k].idx  <= IDX_W'(k);
        end else begin
          st[k].best <= st[k-1].best;
          st[k].idx  <= st[k-1].idx;
        end
      end
    end
  end
endmodule
