// mvtu_pe: processing element of a (zero-aware) matrix-vector thresholding unit.
//
// Each PE owns the weight filters of the output channels assigned to it and,
// per window, multiplies the streamed activation words with the matching weight
// words and accumulates the result.  Three kinds, chosen by KIND:
//
//  KIND_BIN   S binary activations XNOR S binary weights, popcount, accumulate.
//             A fan-in counter adds S per word, so at the end of a window it
//             holds the number of nonzero activations of that window (it differs
//             by window pattern and at the edges).  The stored training threshold
//             th_old is shifted and scaled at run time, th_new = (th_old+fan_in)>>1,
//             and the output activation is 1 when acc >= th_new.  This folds batch
//             normalisation and sign activation into one comparison even though
//             padded zeros took no part in the popcount.
//  KIND_LAST  as KIND_BIN, but the output is the batch-normalised class score
//             (acc - th_new) * lambda, lambda being a 24-bit fixed-point scale
//             (unsigned, LAMBDA_FRAC fractional bits) kept in a scale memory.
//  KIND_FIRST S 8-bit unsigned pixels, binary weights: +pixel for weight 1,
//             -pixel for weight 0, accumulated; activation 1 when acc >= th_old
//             (no shift: the sums already have the threshold's range).
//
// Weight memory: NF*WPF words of S bits, word address = nf*WPF + tap*FOLDS + fold
// (filters stored already flipped for deconvolution).  Threshold memory and
// scale memory: NF entries, indexed by the neuron fold nf.  All are written
// through the cfg_* port before operation.
//
// Timing: `issue` in cycle t presents one activation word; the memories are read
// in that cycle (registered read), the word is accumulated in cycle t+1, and for
// the last word of a window (`last`) res_valid pulses in cycle t+2 with the
// activation bit or score.  A new word may be issued every cycle.
module mvtu_pe
  import bide_pkg::*;
#(
  parameter kind_e       KIND = KIND_BIN,
  parameter int unsigned S    = 4,    // SIMD lanes
  parameter int unsigned AB   = 1,    // activation bits per lane (8 for KIND_FIRST)
  parameter int unsigned NF   = 1,    // neuron folds (filters per PE)
  parameter int unsigned WPF  = 9,    // weight words per filter
  parameter int unsigned CFGW = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  // activation word
  input  logic              issue,
  input  logic [S*AB-1:0]   act,
  input  logic [15:0]       waddr,
  input  logic [7:0]        nf_idx,
  input  logic              first,
  input  logic              last,
  // parameter loading
  input  logic              cfg_we,
  input  cfg_sel_e          cfg_sel,
  input  logic [15:0]       cfg_addr,
  input  logic [CFGW-1:0]   cfg_data,
  // result
  output logic              res_valid,
  output logic              res_bit,
  output logic signed [SCORE_W-1:0] res_score
);
  localparam int unsigned WD  = NF * WPF;
  localparam int unsigned AWW = (WD > 1) ? $clog2(WD) : 1;
  localparam int unsigned AWN = (NF > 1) ? $clog2(NF) : 1;
  localparam int unsigned XW  = TH_W + 2;   // internal signed width

  logic [S-1:0]                wmem [WD];
  logic signed [TH_W-1:0]      tmem [NF];
  logic [SCORE_W-1:0]          smem [NF];

  always_ff @(posedge clk) begin
    if (cfg_we && cfg_sel == SEL_WEIGHT) wmem[AWW'(cfg_addr)] <= cfg_data[S-1:0];
    if (cfg_we && cfg_sel == SEL_THRESH) tmem[AWN'(cfg_addr)] <= cfg_data[TH_W-1:0];
    if (cfg_we && cfg_sel == SEL_SCALE)  smem[AWN'(cfg_addr)] <= cfg_data[SCORE_W-1:0];
  end

  // ---------------- stage 1: memory outputs and the activation word ----------------
  logic              v1, first1, last1;
  logic [S*AB-1:0]   act1;
  logic [S-1:0]      w1;
  logic signed [TH_W-1:0]    th1;
  logic [SCORE_W-1:0]        sc1;

  always_ff @(posedge clk) begin
    if (issue) begin
      act1   <= act;
      first1 <= first;
      last1  <= last;
      w1     <= wmem[AWW'(waddr)];
      th1    <= tmem[AWN'(nf_idx)];
      sc1    <= smem[AWN'(nf_idx)];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= issue;
  end

  // ---------------- XNOR / MAC, popcount, accumulate ----------------
  logic signed [XW-1:0] psum, acc_q, acc_sum, fan_q, fan_sum, th_new, diff;
  logic signed [XW+SCORE_W:0] prod;
  logic                       xnor_bit;

  always_comb begin
    psum = '0;
    for (int i = 0; i < S; i++) begin
      if (KIND == KIND_FIRST) begin
        if (w1[i]) psum = psum + XW'(act1[i*AB +: AB]);
        else       psum = psum - XW'(act1[i*AB +: AB]);
      end else begin
        xnor_bit = act1[i*AB] ~^ w1[i];
        psum = psum + XW'(xnor_bit);
      end
    end
    acc_sum = (first1 ? '0 : acc_q) + psum;
    fan_sum = (first1 ? '0 : fan_q) + XW'(S);
    th_new  = (XW'(th1) + fan_sum) >>> 1;
    diff    = acc_sum - th_new;
    prod    = diff * $signed({1'b0, sc1});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q     <= '0;
      fan_q     <= '0;
      res_valid <= 1'b0;
      res_bit   <= 1'b0;
      res_score <= '0;
    end else begin
      res_valid <= v1 && last1;
      if (v1) begin
        acc_q <= acc_sum;
        fan_q <= fan_sum;
        if (last1) begin
          if (KIND == KIND_FIRST) res_bit <= (acc_sum >= XW'(th1));
          else                    res_bit <= (acc_sum >= th_new);
          res_score <= SCORE_W'(prod >>> LAMBDA_FRAC);
        end
      end
    end
  end
endmodule
