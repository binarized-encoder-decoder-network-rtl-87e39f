// tb_mvtu: zero-aware matrix-vector unit of a x2 deconvolution layer (3x4 input,
// 8 input channels in 2 folds of 4 lanes, 8 output channels on 4 PEs = 2 neuron
// folds, 4-lane output words).  The test plays the part of the sliding window
// unit: it streams the nonzero window words of two random input frames (random
// gaps, then a third without gaps), loads random weights and thresholds, applies random output
// back-pressure, and compares every output word with the behavioural layer
// model.  With no stalls it checks the rate: a frame takes no longer than the
// sum over its windows of NF * (nonzero taps) * FOLDS cycles (one word per
// cycle) or, for the shortest windows, OCH/OUT_S + 3 cycles (result pipeline
// plus draining the output vector buffer).
module tb_mvtu;
  import bide_pkg::*;
  import bide_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int IH = 3, IW = 4, ICH = 8, OCH = 8, S = 4, P = 4, OS = 4, NFR = 3;
  localparam geo_e G = GEO_UP2;
  localparam int FOLDS = ICH / S, NF = OCH / P, WPF = 9 * FOLDS;
  localparam int OH = 2 * IH, OW = 2 * IW;

  logic in_valid, in_ready, out_valid, out_ready, cfg_we;
  logic [S-1:0] in_data;
  logic [OS-1:0] out_data;
  logic [7:0] cfg_pe;
  cfg_sel_e cfg_sel;
  logic [15:0] cfg_addr;
  logic [63:0] cfg_data;
  logic stall_en = 1;

  mvtu #(.KIND(KIND_BIN), .GEO(G), .IH(IH), .IW(IW), .ICH(ICH), .OCH(OCH), .S(S), .P(P), .OUT_S(OS)) dut (.*);

  bit w [];
  int th [], lam [];
  int fin [NFR][], fout [NFR][];
  logic [S-1:0] stream [NFR][$];
  logic [OS-1:0] exp_q [$];
  int win_cycles [NFR];   // sum over windows of max(NF*words, OCH/OS + 3)

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL extra output"); end
    else begin
      if (out_data != exp_q[0]) begin failures++; if (failures < 20) $display("FAIL out %b vs %b", out_data, exp_q[0]); end
      void'(exp_q.pop_front());
    end
  end
  always @(negedge clk) out_ready = stall_en ? ($urandom_range(3) != 0) : 1'b1;

  task automatic cfg(int pe, cfg_sel_e sel, int addr, logic [63:0] d);
    @(negedge clk);
    cfg_we = 1; cfg_pe = 8'(pe); cfg_sel = sel; cfg_addr = 16'(addr); cfg_data = d;
    @(negedge clk);
    cfg_we = 0;
  endtask

  int cyc = 0, n_in = 0;
  always @(posedge clk) begin cyc++; if (in_valid && in_ready) n_in++; end

  initial begin
    win_cycles = '{default: 0};
    in_valid = 0; in_data = '0; cfg_we = 0; cfg_pe = '0; cfg_sel = SEL_WEIGHT; cfg_addr = '0; cfg_data = '0;
    w = new[OCH * 9 * ICH]; th = new[OCH]; lam = new[OCH];
    foreach (w[i]) w[i] = 1'($urandom);
    foreach (th[i]) begin th[i] = int'($urandom_range(2 * ICH)) - ICH; lam[i] = 0; end
    for (int fr = 0; fr < NFR; fr++) begin
      int oh, ow;
      fin[fr] = new[IH * IW * ICH];
      foreach (fin[fr][i]) fin[fr][i] = int'($urandom_range(1));
      ref_layer(KIND_BIN, G, IH, IW, ICH, OCH, fin[fr], w, th, lam, fout[fr], oh, ow);
      for (int y = 0; y < OH; y++)
        for (int x = 0; x < OW; x++) begin
          automatic int nw0 = stream[fr].size();
          for (int t = 0; t < 9; t++) begin
            automatic int sy = ref_coord(G, y, t / 3, IH), sx = ref_coord(G, x, t % 3, IW);
            if (sy >= 0 && sx >= 0)
              for (int f = 0; f < FOLDS; f++) begin
                logic [S-1:0] d;
                for (int i = 0; i < S; i++) d[i] = fin[fr][(sy * IW + sx) * ICH + f * S + i][0];
                stream[fr].push_back(d);
              end
          end
          win_cycles[fr] += (NF * (stream[fr].size() - nw0) > OCH / OS + 3) ?
                            NF * (stream[fr].size() - nw0) : OCH / OS + 3;
          for (int j = 0; j < OCH / OS; j++) begin
            logic [OS-1:0] o;
            for (int i = 0; i < OS; i++) o[i] = fout[fr][(y * OW + x) * OCH + j * OS + i][0];
            exp_q.push_back(o);
          end
        end
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int o = 0; o < OCH; o++) begin
      for (int t = 0; t < 9; t++)
        for (int f = 0; f < FOLDS; f++) begin
          automatic logic [63:0] d = '0;
          for (int i = 0; i < S; i++) d[i] = w[(o * 9 + t) * ICH + f * S + i];
          cfg(o % P, SEL_WEIGHT, (o / P) * WPF + t * FOLDS + f, d);
        end
      cfg(o % P, SEL_THRESH, o / P, 64'(th[o]));
    end
    for (int fr = 0; fr < NFR; fr++) begin
      automatic int t0, i0;
      if (fr == NFR - 1) begin
        stall_en = 0;
        repeat (100) @(negedge clk);   // let the previous frames drain
      end
      t0 = cyc;
      i0 = n_in;
      foreach (stream[fr][i]) begin
        while (stall_en && $urandom_range(3) == 0) @(negedge clk);
        in_valid = 1; in_data = stream[fr][i];
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk);
        in_valid = 0;
      end
      if (fr == NFR - 1) begin
        repeat (10) @(negedge clk);
        checks++;
        if (n_in - i0 != stream[fr].size()) begin
          failures++; $display("FAIL took %0d words, expected %0d", n_in - i0, stream[fr].size());
        end
        checks++;
        if (cyc - t0 > win_cycles[fr] + 12) begin
          failures++; $display("FAIL frame took %0d cycles for %0d issues", cyc - t0, NF * stream[fr].size());
        end
        $display("frame of %0d words in %0d cycles (bound %0d)", stream[fr].size(), cyc - t0, win_cycles[fr] + 12);
      end
    end
    repeat (50) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
