// mvtu: (zero-aware) matrix-vector thresholding unit, the compute core of one
// layer.
//
// P processing elements (mvtu_pe) work in parallel on the same activation
// stream, each on its own output channels: output channel o belongs to PE
// o % P as its neuron fold o / P.  When the layer has more output channels than
// PEs (NF = OCH/P > 1) the words of a window are kept in the input vector buffer
// while the first fold is computed and replayed from there for the other folds.
//
// The activation stream from the sliding window unit contains only nonzero taps.
// The unit's own address generator (a window_tap_gen identical to the one in the
// sliding window unit) follows the same output positions, so it knows the tap
// and channel fold of every incoming word and hence the weight address, where
// each window ends, and its window pattern.  The results of the P PEs are
// collected in the output vector buffer; when all OCH results of a window are
// there they are sent on as OCH/OUT_S words of OUT_S channels (channel-interleaved,
// word j holds channels j*OUT_S .. j*OUT_S+OUT_S-1, bit i = channel j*OUT_S+i).  In
// KIND_LAST the whole vector of OCH 24-bit scores is one output word.
//
// Rate: one activation word per cycle, so a window costs NF * (nonzero taps) *
// (ICH/S) cycles.  Latency from the last input word of a window to its first
// output word: 3 cycles.  The unit stalls its input only when the previous
// window's result has not yet left the output vector buffer.
//
// Parameters are loaded through cfg_*: cfg_pe selects the PE, cfg_sel and
// cfg_addr the memory word (see mvtu_pe).
module mvtu
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
  parameter int unsigned AB    = (KIND == KIND_FIRST) ? PIX_W : 1,
  parameter int unsigned OUT_S = 4,
  parameter int unsigned CFGW  = 64,
  // derived
  parameter int unsigned RB    = (KIND == KIND_LAST) ? SCORE_W : 1,
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
  localparam int unsigned FOLDS  = ICH / S;
  localparam int unsigned NF     = OCH / P;
  localparam int unsigned WPF    = K * K * FOLDS;
  localparam int unsigned HOLD_W = OCH * RB;
  localparam int unsigned NOUT   = HOLD_W / OUT_W;
  localparam int unsigned CW     = 16;

  // ---------------- address generator (tracks the incoming stream) ----------------
  logic [CW-1:0] oy, ox, iy, ix, f, low_row;
  logic [3:0]    tap, n_taps;
  logic [2:0]    pattern;
  logic          tg_first, tg_last, tg_frame_last;
  logic          tg_step;

  window_tap_gen #(.GEO(GEO), .IH(IH), .IW(IW), .FOLDS(FOLDS), .CW(CW)) u_addr_gen (
    .clk, .rst_n, .step(tg_step),
    .oy, .ox, .iy, .ix, .f, .tap, .low_row, .n_taps, .pattern,
    .first(tg_first), .last(tg_last), .frame_last(tg_frame_last)
  );

  // ---------------- input vector buffer and fold sequencing ----------------
  logic [S*AB-1:0] ibuf_act [WPF];
  logic [CW-1:0]   ibuf_off [WPF];
  logic [7:0]      nf_q;
  logic [CW-1:0]   cnt_q, rp_q, nw_q;

  logic [S*AB-1:0] cur_act;
  logic [CW-1:0]   cur_off;
  logic            cur_first, cur_last, cur_final, src_valid, blocked, issue;
  logic            hold_valid, s1_final, s2_final;

  always_comb begin
    if (nf_q == '0) begin
      cur_act   = in_data;
      cur_off   = CW'(int'(tap) * FOLDS + int'(f));
      cur_first = tg_first;
      cur_last  = tg_last;
      src_valid = in_valid;
    end else begin
      cur_act   = ibuf_act[rp_q];
      cur_off   = ibuf_off[rp_q];
      cur_first = (rp_q == '0);
      cur_last  = (rp_q == nw_q - 1'b1);
      src_valid = 1'b1;
    end
    cur_final = cur_last && (nf_q == 8'(NF - 1));
    blocked   = cur_final && (hold_valid || s1_final || s2_final);
    issue     = src_valid && !blocked;
    in_ready  = (nf_q == '0) && !blocked;
    tg_step   = issue && (nf_q == '0);
  end

  always_ff @(posedge clk) begin
    if (tg_step && NF > 1) begin
      ibuf_act[cnt_q] <= in_data;
      ibuf_off[cnt_q] <= cur_off;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nf_q  <= '0;
      cnt_q <= '0;
      rp_q  <= '0;
      nw_q  <= '0;
    end else if (issue) begin
      if (nf_q == '0) begin
        cnt_q <= cur_last ? '0 : cnt_q + 1'b1;
        if (cur_last) begin
          nw_q <= cnt_q + 1'b1;
          rp_q <= '0;
          nf_q <= (NF > 1) ? 8'd1 : 8'd0;
        end
      end else begin
        rp_q <= cur_last ? '0 : rp_q + 1'b1;
        if (cur_last) nf_q <= (nf_q == 8'(NF - 1)) ? '0 : nf_q + 1'b1;
      end
    end
  end

  // ---------------- processing elements ----------------
  logic [P-1:0]                 pe_valid, pe_bit;
  logic signed [SCORE_W-1:0]    pe_score [P];
  wire  [15:0]                  waddr = 16'(int'(nf_q) * WPF + int'(cur_off));

  for (genvar p = 0; p < P; p++) begin : g_pe
    mvtu_pe #(.KIND(KIND), .S(S), .AB(AB), .NF(NF), .WPF(WPF), .CFGW(CFGW)) u_pe (
      .clk, .rst_n,
      .issue, .act(cur_act), .waddr, .nf_idx(nf_q), .first(cur_first), .last(cur_last),
      .cfg_we(cfg_we && cfg_pe == 8'(p)), .cfg_sel, .cfg_addr, .cfg_data,
      .res_valid(pe_valid[p]), .res_bit(pe_bit[p]), .res_score(pe_score[p])
    );
  end

  // ---------------- output vector buffer ----------------
  logic [7:0]        s1_nf, s2_nf;
  logic              s1_last, s2_last;
  logic [HOLD_W-1:0] obuf, obuf_next, hold;
  logic [CW-1:0]     oidx;

  always_comb begin
    obuf_next = obuf;
    for (int p = 0; p < P; p++) begin
      if (KIND == KIND_LAST)
        obuf_next[(int'(s2_nf) * P + p) * RB +: RB] = RB'(pe_score[p]);
      else
        obuf_next[(int'(s2_nf) * P + p) * RB +: RB] = RB'(pe_bit[p]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_last <= 1'b0; s1_final <= 1'b0; s1_nf <= '0;
      s2_last <= 1'b0; s2_final <= 1'b0; s2_nf <= '0;
      obuf <= '0;
      hold <= '0;
      hold_valid <= 1'b0;
      oidx <= '0;
    end else begin
      s1_last  <= issue && cur_last;
      s1_final <= issue && cur_final;
      s1_nf    <= nf_q;
      s2_last  <= s1_last;
      s2_final <= s1_final;
      s2_nf    <= s1_nf;
      if (s2_last) obuf <= obuf_next;
      if (s2_final) begin
        hold       <= obuf_next;
        hold_valid <= 1'b1;
        oidx       <= '0;
      end else if (out_valid && out_ready) begin
        if (oidx == CW'(NOUT - 1)) hold_valid <= 1'b0;
        else oidx <= oidx + 1'b1;
      end
    end
  end

  assign out_valid = hold_valid;
  assign out_data  = hold[int'(oidx) * OUT_W +: OUT_W];

  // every PE finishes a window in the same cycle
  a_pe_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    s2_last |-> (&pe_valid));
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    s2_final |-> !hold_valid);
endmodule
