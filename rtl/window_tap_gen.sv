// window_tap_gen: zero-aware sliding-window address generator.
//
// Walks the output feature map in raster order and, for each output position
// (oy,ox), lists only the kernel taps that read a real input pixel.  Taps on edge
// padding, and for deconvolution taps on the zeros inserted between pixels, are
// skipped, so every listed tap carries data.  Inside a tap the FOLDS channel
// words (S channels each, channel-interleaved storage) are listed one by one.
// Order: tap row ky, tap column kx, channel fold f (f fastest).
//
// The same unit serves both sides of a compute array: the sliding window unit
// turns (iy,ix,f) into input-feature-memory addresses, and the matrix-vector
// unit turns (tap,f) into weight-memory addresses, so both sides agree on the
// order without any side information in the stream.  For deconvolution the
// output parity selects one of four window patterns (1: odd/odd, 2: odd/even,
// 3: even/odd, 4: even/even) holding 1, 2, 2 and 4 nonzero pixels.
//
// Interface: the outputs always describe the current word; `step` advances to
// the next one (one word per cycle at most).  `first`/`last` mark the first and
// last word of a window, `frame_last` the last word of a frame, after which the
// generator wraps to (0,0).  `n_taps` is the number of nonzero taps of the
// current window (its fan-in is n_taps*FOLDS*S).  Reset starts at (0,0).
module window_tap_gen
  import bide_pkg::*;
#(
  parameter geo_e        GEO   = GEO_S1,
  parameter int unsigned IH    = 8,
  parameter int unsigned IW    = 8,
  parameter int unsigned FOLDS = 1,
  parameter int unsigned CW    = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          step,
  output logic [CW-1:0] oy,
  output logic [CW-1:0] ox,
  output logic [CW-1:0] iy,
  output logic [CW-1:0] ix,
  output logic [CW-1:0] f,
  output logic [3:0]    tap,
  output logic [CW-1:0] low_row,
  output logic [3:0]    n_taps,
  output logic [2:0]    pattern,
  output logic          first,
  output logic          last,
  output logic          frame_last
);
  localparam int unsigned OH = out_size(GEO, IH);
  localparam int unsigned OW = out_size(GEO, IW);
  localparam int unsigned NT = K * K;

  logic [CW-1:0] oy_q, ox_q, f_q;
  logic [3:0]    tap_q;

  // valid-tap mask of an output position
  function automatic logic [NT-1:0] tap_mask(int y, int x);
    logic [NT-1:0] m;
    for (int ky = 0; ky < K; ky++)
      for (int kx = 0; kx < K; kx++)
        m[ky*K+kx] = (tap_coord(GEO, y, ky, IH) >= 0) && (tap_coord(GEO, x, kx, IW) >= 0);
    return m;
  endfunction

  // lowest set bit at or above position `from`, NT when none
  function automatic logic [3:0] first_from(logic [NT-1:0] m, int from);
    logic [3:0] r;
    r = 4'(NT);
    for (int i = NT - 1; i >= 0; i--)
      if (m[i] && i >= from) r = 4'(i);
    return r;
  endfunction

  logic [NT-1:0] mask_cur, mask_nxt;
  logic [CW-1:0] oy_n, ox_n;
  logic [3:0]    tap_after;
  logic          last_fold, last_in_win, last_col, last_row;

  always_comb begin
    last_col  = (ox_q == CW'(OW - 1));
    last_row  = (oy_q == CW'(OH - 1));
    ox_n      = last_col ? '0 : ox_q + 1'b1;
    oy_n      = last_col ? (last_row ? '0 : oy_q + 1'b1) : oy_q;
    mask_cur  = tap_mask(int'(oy_q), int'(ox_q));
    mask_nxt  = tap_mask(int'(oy_n), int'(ox_n));
    tap_after = first_from(mask_cur, int'(tap_q) + 1);
    last_fold = (f_q == CW'(FOLDS - 1));
    last_in_win = last_fold && (tap_after == 4'(NT));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      oy_q  <= '0;
      ox_q  <= '0;
      f_q   <= '0;
      tap_q <= first_from(tap_mask(0, 0), 0);
    end else if (step) begin
      if (!last_fold) begin
        f_q <= f_q + 1'b1;
      end else if (!last_in_win) begin
        f_q   <= '0;
        tap_q <= tap_after;
      end else begin
        f_q   <= '0;
        oy_q  <= oy_n;
        ox_q  <= ox_n;
        tap_q <= first_from(mask_nxt, 0);
      end
    end
  end

  // lowest input row any tap of the current output row can read
  function automatic int low_of(int y);
    for (int ky = 0; ky < K; ky++)
      if (tap_coord(GEO, y, ky, IH) >= 0) return tap_coord(GEO, y, ky, IH);
    return 0;
  endfunction

  always_comb begin
    oy         = oy_q;
    ox         = ox_q;
    f          = f_q;
    tap        = tap_q;
    iy         = CW'(tap_coord(GEO, int'(oy_q), int'(tap_q) / K, IH));
    ix         = CW'(tap_coord(GEO, int'(ox_q), int'(tap_q) % K, IW));
    low_row    = CW'(low_of(int'(oy_q)));
    n_taps     = 4'($countones(mask_cur));
    pattern    = (GEO == GEO_UP2) ? up2_pattern(int'(oy_q), int'(ox_q)) : 3'd0;
    first      = (f_q == '0) && (tap_q == first_from(mask_cur, 0));
    last       = last_in_win;
    frame_last = last_in_win && last_col && last_row;
  end
endmodule
