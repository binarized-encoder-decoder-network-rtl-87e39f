// tb_window_tap_gen: steps the address generator for stride-1, stride-2 and x2
// deconvolution geometries (with random idle cycles) over two frames and checks
// every listed word against an exhaustive enumeration of the nonzero taps, and
// first/last/frame_last/n_taps/pattern.  For the deconvolution case with a 3x3
// input and two channel folds it also checks the address sequences of the worked
// example: IFM words 0,1 | 0,1,2,3 | 0,1,6,7 for outputs (1,1),(1,2),(2,1) and
// weight words 8,9 | 6,7,10,11 | 2,3,14,15 for window patterns 1, 2, 3.
module tb_window_tap_gen;
  import bide_pkg::*;
  import bide_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam geo_e G [3] = '{GEO_S1, GEO_S2, GEO_UP2};
  localparam int   IHS [3] = '{5, 6, 3};
  localparam int   IWS [3] = '{4, 8, 3};
  localparam int   FO  [3] = '{1, 3, 2};

  logic [2:0] step;
  logic [15:0] oy [3], ox [3], iy [3], ix [3], f [3], low_row [3];
  logic [3:0]  tap [3], n_taps [3];
  logic [2:0]  pattern [3];
  logic [2:0]  first, last, frame_last;

  for (genvar g = 0; g < 3; g++) begin : g_dut
    window_tap_gen #(.GEO(G[g]), .IH(IHS[g]), .IW(IWS[g]), .FOLDS(FO[g])) dut (
      .clk, .rst_n, .step(step[g]),
      .oy(oy[g]), .ox(ox[g]), .iy(iy[g]), .ix(ix[g]), .f(f[g]), .tap(tap[g]),
      .low_row(low_row[g]), .n_taps(n_taps[g]), .pattern(pattern[g]),
      .first(first[g]), .last(last[g]), .frame_last(frame_last[g]));
  end

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", m); end
  endtask

  // worked-example address sequences, recorded from the deconvolution instance
  int ifm_seq [$], w_seq [$];

  task automatic run(int g);
    int oh = int'(out_size(G[g], IHS[g])), ow = int'(out_size(G[g], IWS[g]));
    for (int fr = 0; fr < 2; fr++)
      for (int y = 0; y < oh; y++)
        for (int x = 0; x < ow; x++) begin
          int taps [$];
          taps = {};
          for (int t = 0; t < 9; t++)
            if (ref_coord(G[g], y, t / 3, IHS[g]) >= 0 && ref_coord(G[g], x, t % 3, IWS[g]) >= 0)
              taps.push_back(t);
          foreach (taps[ti])
            for (int ff = 0; ff < FO[g]; ff++) begin
              bit lw = (ti == taps.size() - 1) && (ff == FO[g] - 1);
              while ($urandom_range(3) == 0) @(negedge clk);
              chk(oy[g] == 16'(y) && ox[g] == 16'(x), $sformatf("g%0d pos (%0d,%0d) vs (%0d,%0d)", g, oy[g], ox[g], y, x));
              chk(tap[g] == 4'(taps[ti]) && f[g] == 16'(ff), $sformatf("g%0d tap %0d/%0d f %0d/%0d", g, tap[g], taps[ti], f[g], ff));
              chk(iy[g] == 16'(ref_coord(G[g], y, taps[ti] / 3, IHS[g])) &&
                  ix[g] == 16'(ref_coord(G[g], x, taps[ti] % 3, IWS[g])), $sformatf("g%0d input coord", g));
              chk(first[g] == (ti == 0 && ff == 0), $sformatf("g%0d first", g));
              chk(last[g] == lw, $sformatf("g%0d last", g));
              chk(frame_last[g] == (lw && y == oh - 1 && x == ow - 1), $sformatf("g%0d frame_last", g));
              chk(n_taps[g] == 4'(taps.size()), $sformatf("g%0d n_taps", g));
              if (G[g] == GEO_UP2) begin
                chk(pattern[g] == ((y % 2 == 1) ? ((x % 2 == 1) ? 3'd1 : 3'd2) : ((x % 2 == 1) ? 3'd3 : 3'd4)),
                    $sformatf("pattern at (%0d,%0d)", y, x));
                if (fr == 0 && y >= 1 && y <= 2 && x >= 1 && x <= 2 && !(y == 2 && x == 2)) begin
                  ifm_seq.push_back((int'(iy[g]) * IWS[g] + int'(ix[g])) * FO[g] + int'(f[g]));
                  w_seq.push_back(int'(tap[g]) * FO[g] + int'(f[g]));
                end
              end
              step[g] = 1;
              @(negedge clk);
              step[g] = 0;
            end
        end
  endtask

  initial begin
    step = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    fork
      run(0);
      run(1);
      run(2);
    join
    // order of recording: (1,1), (1,2), (2,1)
    chk(ifm_seq.size() == 10, "example length");
    if (ifm_seq.size() == 10) begin
      int exp_ifm [10] = '{0, 1, 0, 1, 2, 3, 0, 1, 6, 7};
      int exp_w   [10] = '{8, 9, 6, 7, 10, 11, 2, 3, 14, 15};
      for (int i = 0; i < 10; i++) begin
        chk(ifm_seq[i] == exp_ifm[i], $sformatf("IFM example word %0d: %0d", i, ifm_seq[i]));
        chk(w_seq[i] == exp_w[i], $sformatf("weight example word %0d: %0d", i, w_seq[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
