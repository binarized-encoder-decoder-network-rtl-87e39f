// swu: sliding window unit, for convolution (SWU) and for zero-padding
// deconvolution (zero-aware SWU, ZASWU).
//
// The previous layer delivers its output feature map as a raster-order stream of
// channel-interleaved words (FOLDS words of S channels per pixel).  The words are
// written in order into the input feature map (IFM) memory, a line buffer of ROWS
// pixel rows used circularly.  A window_tap_gen walks the output positions and
// lists the nonzero taps of each window; the unit reads those words and sends
// them, window after window, to the matrix-vector unit.  Overlapping windows are
// read again rather than buffered.  Edge padding is never stored or streamed,
// and in deconvolution mode neither are the zeros of upsampling, so the line
// buffer holds only real input rows: ROWS = K+1 = 4 for convolution, and
// K-stride+2 = 3 for the x2 deconvolution (window rows plus one prefetch row).
//
// Flow control: a word is written only when its row does not overwrite a row the
// current output row still needs; a word is read only when it has been written.
// After the last word of a frame is written, writing pauses until the reader
// has finished the frame (a bubble between frames, this design's choice).
//
// Interface: valid/ready streams of WIDTH-bit words.  The IFM memory has one
// write and one registered read port; the registered read data is the output
// register, so a read issued in cycle t is offered in cycle t+1.  Rate: one
// input and one output word per cycle at best.
module swu
  import bide_pkg::*;
#(
  parameter geo_e        GEO   = GEO_S1,
  parameter int unsigned IH    = 8,
  parameter int unsigned IW    = 8,
  parameter int unsigned FOLDS = 1,
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data
);
  localparam int unsigned CW    = 16;
  localparam int unsigned ROWS  = (GEO == GEO_UP2) ? K - 2 + 2 : K + 1;
  localparam int unsigned ROWW  = IW * FOLDS;           // words per pixel row
  localparam int unsigned DEPTH = ROWS * ROWW;
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] ifm [DEPTH];

  // ---------------- write side ----------------
  logic [CW-1:0] wr_y, wr_pos;
  logic          wr_done;
  logic [CW-1:0] low_row;
  logic          do_wr;

  assign in_ready = !wr_done && (int'(wr_y) < int'(low_row) + int'(ROWS));
  assign do_wr    = in_valid && in_ready;

  wire [AW-1:0] wr_addr = AW'((int'(wr_y) % ROWS) * ROWW + int'(wr_pos));

  always_ff @(posedge clk) begin
    if (do_wr) ifm[wr_addr] <= in_data;
  end

  // ---------------- read side ----------------
  logic [CW-1:0] oy, ox, iy, ix, f;
  logic [3:0]    tap, n_taps;
  logic [2:0]    pattern;
  logic          first, last, frame_last;
  logic          rd_avail, rd_go;

  window_tap_gen #(.GEO(GEO), .IH(IH), .IW(IW), .FOLDS(FOLDS), .CW(CW)) u_addr_gen (
    .clk, .rst_n, .step(rd_go),
    .oy, .ox, .iy, .ix, .f, .tap, .low_row, .n_taps, .pattern,
    .first, .last, .frame_last
  );

  wire [CW-1:0] rd_pos  = CW'(int'(ix) * FOLDS + int'(f));
  wire [AW-1:0] rd_addr = AW'((int'(iy) % ROWS) * ROWW + int'(rd_pos));

  assign rd_avail = wr_done || (iy < wr_y) || (iy == wr_y && rd_pos < wr_pos);
  assign rd_go    = rd_avail && (!out_valid || out_ready);

  always_ff @(posedge clk) begin
    if (rd_go) out_data <= ifm[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      wr_y      <= '0;
      wr_pos    <= '0;
      wr_done   <= 1'b0;
    end else begin
      if (rd_go) out_valid <= 1'b1;
      else if (out_ready) out_valid <= 1'b0;

      if (rd_go && frame_last) begin
        wr_done <= 1'b0;
        wr_y    <= '0;
        wr_pos  <= '0;
      end else if (do_wr) begin
        if (wr_pos == CW'(ROWW - 1)) begin
          wr_pos <= '0;
          if (wr_y == CW'(IH - 1)) wr_done <= 1'b1;
          else wr_y <= wr_y + 1'b1;
        end else begin
          wr_pos <= wr_pos + 1'b1;
        end
      end
    end
  end
endmodule
