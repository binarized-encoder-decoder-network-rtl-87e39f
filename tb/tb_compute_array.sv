// tb_compute_array: one complete layer, a stride-2 binary convolution
// (8x6 input, 8 channels in 2 folds of 4 lanes, 8 output channels on 2 PEs =
// 4 neuron folds, 4-lane output words), as layers 3 and 5 of the network are.
// Two random frames stream in raster order with random gaps, the output is
// back-pressured at random, and every output word is compared with the
// behavioural layer model (bottom/right edge padding skipped).  The stride-2
// output must hold (8/2)x(6/2) pixels per frame.
module tb_compute_array;
  import bide_pkg::*;
  import bide_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int IH = 8, IW = 6, ICH = 8, OCH = 8, S = 4, P = 2, OS = 4, NFR = 2;
  localparam geo_e G = GEO_S2;
  localparam int FOLDS = ICH / S, WPF = 9 * FOLDS;
  localparam int OH = IH / 2, OW = IW / 2;

  logic in_valid, in_ready, out_valid, out_ready, cfg_we;
  logic [S-1:0] in_data;
  logic [OS-1:0] out_data;
  logic [7:0] cfg_pe;
  cfg_sel_e cfg_sel;
  logic [15:0] cfg_addr;
  logic [63:0] cfg_data;

  compute_array #(.KIND(KIND_BIN), .GEO(G), .IH(IH), .IW(IW), .ICH(ICH), .OCH(OCH),
                  .S(S), .P(P), .OUT_S(OS)) dut (.*);

  bit w [];
  int th [], lam [];
  int fin [NFR][], fout [NFR][];
  logic [OS-1:0] exp_q [$];
  int nout = 0;

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    nout++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL extra output"); end
    else begin
      if (out_data != exp_q[0]) begin failures++; if (failures < 20) $display("FAIL out %b vs %b", out_data, exp_q[0]); end
      void'(exp_q.pop_front());
    end
  end
  always @(negedge clk) out_ready = ($urandom_range(3) != 0);

  task automatic cfg(int pe, cfg_sel_e sel, int addr, logic [63:0] d);
    @(negedge clk);
    cfg_we = 1; cfg_pe = 8'(pe); cfg_sel = sel; cfg_addr = 16'(addr); cfg_data = d;
    @(negedge clk);
    cfg_we = 0;
  endtask

  initial begin
    in_valid = 0; in_data = '0; cfg_we = 0; cfg_pe = '0; cfg_sel = SEL_WEIGHT; cfg_addr = '0; cfg_data = '0;
    w = new[OCH * 9 * ICH]; th = new[OCH]; lam = new[OCH];
    foreach (w[i]) w[i] = 1'($urandom);
    foreach (th[i]) begin th[i] = int'($urandom_range(2 * ICH)) - ICH; lam[i] = 0; end
    for (int fr = 0; fr < NFR; fr++) begin
      automatic int oh, ow;
      fin[fr] = new[IH * IW * ICH];
      foreach (fin[fr][i]) fin[fr][i] = int'($urandom_range(1));
      ref_layer(KIND_BIN, G, IH, IW, ICH, OCH, fin[fr], w, th, lam, fout[fr], oh, ow);
      checks++;
      if (oh != OH || ow != OW) begin failures++; $display("FAIL output size %0dx%0d", oh, ow); end
      for (int p = 0; p < OH * OW; p++)
        for (int j = 0; j < OCH / OS; j++) begin
          automatic logic [OS-1:0] o;
          for (int i = 0; i < OS; i++) o[i] = fout[fr][p * OCH + j * OS + i][0];
          exp_q.push_back(o);
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
    for (int fr = 0; fr < NFR; fr++)
      for (int p = 0; p < IH * IW; p++)
        for (int f = 0; f < FOLDS; f++) begin
          while ($urandom_range(3) == 0) @(negedge clk);
          in_valid = 1;
          for (int i = 0; i < S; i++) in_data[i] = fin[fr][p * ICH + f * S + i][0];
          @(posedge clk);
          while (!in_ready) @(posedge clk);
          @(negedge clk);
          in_valid = 0;
        end
    for (int i = 0; i < 3000 && exp_q.size() != 0; i++) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_q.size()); end
    checks++;
    if (nout != NFR * OH * OW * (OCH / OS)) begin failures++; $display("FAIL %0d output words", nout); end
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
