// tb_swu: the sliding window unit in its three geometries (stride-1 and stride-2
// convolution, x2 zero-aware deconvolution), each fed two frames of random
// multi-word pixels with random input gaps and output back-pressure.  Every
// output word is compared with the word an exhaustive enumeration of the nonzero
// window taps says must come next.  Also checked: one word per cycle when
// neither side stalls (the whole frame streams in at most 1.3x its word count
// plus fill), and that the stream never ends early or runs long.
module tb_swu;
  import bide_pkg::*;
  import bide_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam geo_e G [3] = '{GEO_S1, GEO_S2, GEO_UP2};
  localparam int   IHS [3] = '{6, 8, 4};
  localparam int   IWS [3] = '{5, 6, 3};
  localparam int   FO  [3] = '{2, 1, 3};
  localparam int   NFR = 2;

  logic [2:0]  in_valid, in_ready, out_valid, out_ready;
  logic [11:0] in_data [3], out_data [3];
  logic        stall_en = 1;

  for (genvar g = 0; g < 3; g++) begin : g_dut
    swu #(.GEO(G[g]), .IH(IHS[g]), .IW(IWS[g]), .FOLDS(FO[g]), .WIDTH(12)) dut (
      .clk, .rst_n,
      .in_valid(in_valid[g]), .in_ready(in_ready[g]), .in_data(in_data[g]),
      .out_valid(out_valid[g]), .out_ready(out_ready[g]), .out_data(out_data[g]));
  end

  logic [11:0] img [3][NFR][];
  logic [11:0] exp_q [3][$];
  int          nout [3];

  task automatic build(int g);
    int ih = IHS[g], iw = IWS[g], fo = FO[g];
    int oh = int'(out_size(G[g], ih)), ow = int'(out_size(G[g], iw));
    for (int fr = 0; fr < NFR; fr++) begin
      img[g][fr] = new[ih * iw * fo];
      foreach (img[g][fr][i]) img[g][fr][i] = 12'($urandom);
      for (int y = 0; y < oh; y++)
        for (int x = 0; x < ow; x++)
          for (int ky = 0; ky < 3; ky++)
            for (int kx = 0; kx < 3; kx++) begin
              int sy = ref_coord(G[g], y, ky, ih), sx = ref_coord(G[g], x, kx, iw);
              if (sy >= 0 && sx >= 0)
                for (int f = 0; f < fo; f++) exp_q[g].push_back(img[g][fr][(sy * iw + sx) * fo + f]);
            end
    end
  endtask

  task automatic drive(int g);
    for (int fr = 0; fr < NFR; fr++)
      foreach (img[g][fr][i]) begin
        while (stall_en && $urandom_range(4) == 0) @(negedge clk);
        in_valid[g] = 1;
        in_data[g]  = img[g][fr][i];
        @(posedge clk);
        while (!in_ready[g]) @(posedge clk);
        @(negedge clk);
        in_valid[g] = 0;
      end
  endtask

  always @(posedge clk) if (rst_n)
    for (int g = 0; g < 3; g++)
      if (out_valid[g] && out_ready[g]) begin
        checks++;
        if (exp_q[g].size() == 0) begin failures++; $display("FAIL g%0d extra word", g); end
        else begin
          if (out_data[g] != exp_q[g][0]) begin
            failures++;
            if (failures < 20) $display("FAIL g%0d word %0d: %h vs %h", g, nout[g], out_data[g], exp_q[g][0]);
          end
          void'(exp_q[g].pop_front());
        end
        nout[g]++;
      end

  always @(negedge clk) out_ready = stall_en ? 3'($urandom) | 3'($urandom) : '1;

  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    in_valid = '0; in_data = '{default: '0};
    nout = '{default: 0};
    for (int g = 0; g < 3; g++) build(g);
    repeat (2) @(negedge clk);
    rst_n = 1;
    fork drive(0); drive(1); drive(2); join
    for (int i = 0; i < 5000 && (exp_q[0].size() + exp_q[1].size() + exp_q[2].size()) != 0; i++)
      @(negedge clk);
    for (int g = 0; g < 3; g++) begin
      checks++;
      if (exp_q[g].size() != 0) begin failures++; $display("FAIL g%0d %0d words missing", g, exp_q[g].size()); end
    end
    // rate: without stalls the stride-1 unit emits one word per cycle
    stall_en = 0;
    for (int g = 0; g < 3; g++) build(g);
    begin
      automatic int t0 = cyc, n0 = nout[0], words = exp_q[0].size();
      fork drive(0); drive(1); drive(2); join
      while (exp_q[0].size() != 0 && cyc - t0 < 10000) @(negedge clk);
      checks++;
      if (cyc - t0 > (words * 13) / 10 + 4 * IWS[0] * FO[0] + 20) begin
        failures++; $display("FAIL rate: %0d words in %0d cycles", nout[0] - n0, cyc - t0);
      end
      $display("stride-1: %0d words in %0d cycles", nout[0] - n0, cyc - t0);
    end
    repeat (100) @(negedge clk);
    for (int g = 0; g < 3; g++) begin
      checks++;
      if (exp_q[g].size() != 0) begin failures++; $display("FAIL g%0d %0d words missing", g, exp_q[g].size()); end
    end
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
