// tb_bide_top: end-to-end test of the whole engine at reduced sizes.
//
// An 8x8 image goes through all 11 layers (channel counts and lane/PE counts
// scaled down so every layer has channel folds, neuron folds or both) and the
// classifier.  Weights, thresholds and scales are random and loaded through the
// configuration port.  The stream between every pair of layers, the score
// vectors and the class indices are compared word by word with the behavioural
// reference (bide_ref_pkg).  Two frames run back to back with random gaps on the
// image input and random back-pressure on the class output.  The test counts how
// often each mechanism of the design happened (deconvolution window patterns
// 1-4, edge-padding skips, stride-2 windows, neuron-fold replays, back-pressure
// stalls, frame wrap) and fails for any that never did.  It also checks that a
// frame's outputs arrive within the cycle bound of the slowest layer.
module tb_bide_top;
  import bide_pkg::*;
  import bide_ref_pkg::*;

  localparam int H = 8, W = 8, NFR = 2;
  localparam int unsigned T_CH [12]   = '{3, 4, 4, 8, 8, 8, 8, 8, 8, 4, 4, 3};
  localparam int unsigned T_S  [11]   = '{3, 2, 4, 4, 4, 4, 8, 4, 8, 2, 4};
  localparam int unsigned T_P  [11]   = '{2, 4, 4, 2, 8, 4, 4, 8, 2, 4, 3};
  localparam int NCLS = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        img_valid, img_ready, cls_valid, cls_ready;
  logic [23:0] img_data;
  logic [3:0]  cls_index;
  logic        cfg_we;
  logic [3:0]  cfg_layer;
  logic [7:0]  cfg_pe;
  cfg_sel_e    cfg_sel;
  logic [15:0] cfg_addr;
  logic [63:0] cfg_data;

  bide_top #(.IMG_H(H), .IMG_W(W), .CH(T_CH), .LANES(T_S), .PES(T_P)) dut (.*);

  int checks = 0, failures = 0;
  int dims_h [12], dims_w [12];
  int fm   [NFR][12][];
  bit wts  [11][];
  int ths  [11][];
  int lams [11][];

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL: %s", msg);
  endtask

  task automatic cfg_write(int l, int pe, cfg_sel_e sel, int addr, logic [63:0] d);
    @(negedge clk);
    cfg_we = 1; cfg_layer = 4'(l); cfg_pe = 8'(pe); cfg_sel = sel; cfg_addr = 16'(addr); cfg_data = d;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic load_layer(int l);
    int ich = T_CH[l], och = T_CH[l+1], s = T_S[l], p = T_P[l];
    int folds = ich / s, nf = och / p, wpf = 9 * folds;
    for (int o = 0; o < och; o++) begin
      int pe = o % p, fo = o / p;
      for (int t = 0; t < 9; t++)
        for (int f = 0; f < folds; f++) begin
          logic [63:0] d = '0;
          for (int i = 0; i < s; i++) d[i] = wts[l][(o * 9 + t) * ich + f * s + i];
          cfg_write(l, pe, SEL_WEIGHT, fo * wpf + t * folds + f, d);
        end
      cfg_write(l, pe, SEL_THRESH, fo, 64'(ths[l][o]));
      cfg_write(l, pe, SEL_SCALE, fo, 64'(lams[l][o]));
    end
  endtask

  // ---------------- expected-stream monitors ----------------
  int link_pix [12], link_word [12], frame_of [12];
  int cls_count = 0, sc_count = 0;

  always @(posedge clk) if (rst_n) begin
    for (int l = 1; l < 11; l++) begin
      if (dut.lk_valid[l] && dut.lk_ready[l]) begin
        automatic int s = T_S[l], c = T_CH[l], fr = frame_of[l];
        automatic int pix = link_pix[l], wd = link_word[l];
        for (int i = 0; i < s; i++) begin
          checks++;
          if (int'(dut.lk_data[l][i]) != fm[fr][l][pix * c + wd * s + i])
            fail($sformatf("frame %0d link %0d pixel %0d ch %0d", fr, l, pix, wd * s + i));
        end
        if (wd == c / s - 1) begin
          link_word[l] = 0;
          if (pix == dims_h[l] * dims_w[l] - 1) begin link_pix[l] = 0; frame_of[l]++; end
          else link_pix[l] = pix + 1;
        end else link_word[l] = wd + 1;
      end
    end
    if (dut.sc_valid && dut.sc_ready) begin
      automatic int fr = sc_count / (H * W), pix = sc_count % (H * W);
      for (int k = 0; k < NCLS; k++) begin
        checks++;
        if (int'($signed(dut.sc_data[k*24 +: 24])) != fm[fr][11][pix * NCLS + k])
          fail($sformatf("frame %0d score pixel %0d class %0d: %0d vs %0d", fr, pix, k,
               $signed(dut.sc_data[k*24 +: 24]), fm[fr][11][pix * NCLS + k]));
      end
      sc_count++;
    end
    if (cls_valid && cls_ready) begin
      automatic int fr = cls_count / (H * W), pix = cls_count % (H * W);
      checks++;
      if (int'(cls_index) != ref_argmax(fm[fr][11], pix * NCLS, NCLS))
        fail($sformatf("frame %0d class pixel %0d", fr, pix));
      cls_count++;
    end
  end

  // ---------------- mechanism counters ----------------
  int n_pat [5];
  int n_edge_skip = 0, n_s2_win = 0, n_replay = 0, n_out_stall = 0, n_inner_stall = 0, n_first_mac = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.g_layer[6].u_ca.u_mvtu.tg_step && dut.g_layer[6].u_ca.u_mvtu.tg_last)
      n_pat[dut.g_layer[6].u_ca.u_mvtu.pattern]++;
    if (dut.g_layer[8].u_ca.u_mvtu.tg_step && dut.g_layer[8].u_ca.u_mvtu.tg_last)
      n_pat[dut.g_layer[8].u_ca.u_mvtu.pattern]++;
    if (dut.g_layer[1].u_ca.u_mvtu.tg_step && dut.g_layer[1].u_ca.u_mvtu.tg_last &&
        dut.g_layer[1].u_ca.u_mvtu.n_taps < 9) n_edge_skip++;
    if (dut.g_layer[2].u_ca.u_mvtu.tg_step && dut.g_layer[2].u_ca.u_mvtu.tg_last) n_s2_win++;
    if (dut.g_layer[3].u_ca.u_mvtu.issue && dut.g_layer[3].u_ca.u_mvtu.nf_q != 0) n_replay++;
    if (dut.g_layer[0].u_ca.u_mvtu.tg_step) n_first_mac++;
    if (cls_valid && !cls_ready) n_out_stall++;
    for (int l = 1; l < 11; l++) if (dut.lk_valid[l] && !dut.lk_ready[l]) n_inner_stall++;
  end

  // ---------------- stimulus ----------------
  int cyc = 0, t_first_out [NFR], t_done [NFR];
  always @(posedge clk) cyc++;
  always @(posedge clk) if (cls_valid && cls_ready && (cls_count % (H * W)) == H * W - 1)
    t_done[cls_count / (H * W)] = cyc;

  initial begin
    img_valid = 0; img_data = '0; cls_ready = 0; cfg_we = 0;
    cfg_layer = '0; cfg_pe = '0; cfg_sel = SEL_WEIGHT; cfg_addr = '0; cfg_data = '0;
    for (int l = 0; l < 12; l++) begin link_pix[l] = 0; link_word[l] = 0; frame_of[l] = 0; end
    for (int i = 0; i < 5; i++) n_pat[i] = 0;
    dims_h[0] = H; dims_w[0] = W;
    for (int l = 0; l < 11; l++) begin
      dims_h[l+1] = int'(out_size(layer_geo(l), dims_h[l]));
      dims_w[l+1] = int'(out_size(layer_geo(l), dims_w[l]));
    end
    // random network
    for (int l = 0; l < 11; l++) begin
      automatic int ich = T_CH[l], och = T_CH[l+1];
      wts[l] = new[och * 9 * ich];
      ths[l] = new[och];
      lams[l] = new[och];
      foreach (wts[l][i]) wts[l][i] = 1'($urandom);
      for (int o = 0; o < och; o++) begin
        if (l == 0) ths[l][o] = int'($urandom_range(600)) - 300;
        else ths[l][o] = int'($urandom_range(2 * ich)) - ich;
        lams[l][o] = int'($urandom_range(32'h3ffff, 32'h100));
      end
    end
    // reference
    for (int fr = 0; fr < NFR; fr++) begin
      automatic int oh, ow;
      fm[fr][0] = new[H * W * 3];
      foreach (fm[fr][0][i]) fm[fr][0][i] = int'($urandom_range(255));
      for (int l = 0; l < 11; l++)
        ref_layer(layer_kind(l), layer_geo(l), dims_h[l], dims_w[l], T_CH[l], T_CH[l+1],
                  fm[fr][l], wts[l], ths[l], lams[l], fm[fr][l+1], oh, ow);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int l = 0; l < 11; l++) load_layer(l);
    fork
      begin
        for (int fr = 0; fr < NFR; fr++)
          for (int pix = 0; pix < H * W; pix++) begin
            while ($urandom_range(3) == 0) @(negedge clk);
            img_valid = 1;
            for (int c = 0; c < 3; c++) img_data[c*8 +: 8] = 8'(fm[fr][0][pix * 3 + c]);
            @(posedge clk);
            while (!img_ready) @(posedge clk);
            @(negedge clk);
            img_valid = 0;
          end
      end
      begin
        while (cls_count < NFR * H * W) begin
          @(negedge clk);
          cls_ready = ($urandom_range(3) != 0);
        end
      end
    join
    repeat (20) @(posedge clk);
    // every mechanism must have happened
    for (int p = 1; p <= 4; p++) begin
      checks++; if (n_pat[p] == 0) fail($sformatf("deconvolution pattern %0d never seen", p));
    end
    checks++; if (n_edge_skip == 0) fail("no edge-padding skip");
    checks++; if (n_s2_win != NFR * (H / 2) * (W / 2)) fail($sformatf("stride-2 windows %0d", n_s2_win));
    checks++; if (n_replay == 0) fail("no neuron-fold replay");
    checks++; if (n_out_stall == 0) fail("no output back-pressure");
    checks++; if (n_inner_stall == 0) fail("no stall between layers");
    checks++; if (n_first_mac == 0) fail("first layer idle");
    checks++; if (cls_count != NFR * H * W) fail("class index count");
    for (int l = 1; l < 11; l++) begin checks++; if (frame_of[l] != NFR) fail($sformatf("link %0d frames %0d", l, frame_of[l])); end
    // rate: the second frame needs at most 2x the work of the slowest layer plus fill
    begin
      automatic int worst = 0;
      for (int l = 0; l < 11; l++) begin
        automatic int work = (dims_h[l+1] * dims_w[l+1]) * 9 * (T_CH[l] / T_S[l]) * (T_CH[l+1] / T_P[l]);
        if (work > worst) worst = work;
      end
      checks++;
      if (t_done[1] - t_done[0] > 2 * worst + 200)
        fail($sformatf("frame period %0d cycles, slowest layer %0d", t_done[1] - t_done[0], worst));
      $display("frame period %0d cycles (slowest layer %0d)", t_done[1] - t_done[0], worst);
    end
    $display("patterns %0d %0d %0d %0d edge-skip %0d s2 %0d replay %0d out-stall %0d inner-stall %0d",
             n_pat[1], n_pat[2], n_pat[3], n_pat[4], n_edge_skip, n_s2_win, n_replay, n_out_stall, n_inner_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
