// tb_bide_full: one complete 480x360 frame through the engine at its default
// sizes (the quad configuration, no parameter overrides).
//
// A random network (binary weights, thresholds, output scales) is loaded
// through the configuration port, then one random RGB image is streamed in and
// all 172,800 class indices are collected.  The stream between every pair of
// layers and the score vectors are recorded in full.  A full software model of
// the frame would take far longer than the hardware simulation, so each layer
// is checked on its own: for the four corner pixels and a set of random pixels
// of every layer output, all channels are recomputed from the layer's recorded
// input and compared.  This checks every layer, including padding at all four
// edges, without trusting any other layer.  Every class index is compared with
// the argmax of its recorded scores, and every link must carry exactly one
// frame.  The frame time, first input to last class index, must stay under the
// slowest layer's work plus a fill allowance of two input rows per layer, and
// under the
// cycles-per-frame the document reports for this configuration
// (187.5 MHz / 25.89 frames/s, about 7.24 million).
module tb_bide_full;
  import bide_pkg::*;
  import bide_ref_pkg::*;

  localparam int H = 360, W = 480;
  localparam int unsigned T_CH [12] = '{3, 64, 64, 128, 128, 256, 256, 128, 128, 64, 64, 11};
  localparam int unsigned T_S  [11] = '{3, 64, 32, 64, 32, 64, 32, 64, 32, 64, 64};
  localparam int unsigned T_P  [11] = '{64, 64, 64, 64, 64, 64, 64, 64, 64, 64, 11};
  localparam int NCLS = 11;
  localparam int NSPOT = 24;                  // random pixels checked per layer

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

  bide_top dut (.*);

  int checks = 0, failures = 0;
  int dims_h [12], dims_w [12];
  bit [255:0] mp [12][];          // recorded maps: [layer][pixel] channel bits
  byte unsigned img [];           // input image, (y*W + x)*3 + c
  int  sc [];                     // recorded scores, pixel*NCLS + class
  bit  wts  [11][];
  int  ths  [11][];
  int  lams [11][];

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
    int folds = ich / s, wpf = 9 * folds;
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

  // reference value of output channel o at (y, x) of layer l, from the
  // recorded input of that layer
  function automatic int ref_pixel(int l, int y, int x, int o);
    int ich = T_CH[l], ih = dims_h[l], iw = dims_w[l];
    geo_e g = layer_geo(l);
    kind_e kd = layer_kind(l);
    int acc = 0, fan = 0, thn;
    longint prod;
    for (int ky = 0; ky < 3; ky++)
      for (int kx = 0; kx < 3; kx++) begin
        int sy = ref_coord(g, y, ky, ih), sx = ref_coord(g, x, kx, iw);
        if (sy >= 0 && sx >= 0)
          for (int c = 0; c < ich; c++) begin
            bit wb = wts[l][(o * 9 + ky * 3 + kx) * ich + c];
            if (kd == KIND_FIRST) begin
              int a = int'(img[(sy * iw + sx) * 3 + c]);
              acc += wb ? a : -a;
            end else acc += (mp[l][sy * iw + sx][c] == wb) ? 1 : 0;
            fan++;
          end
      end
    thn = (ths[l][o] + fan) >>> 1;
    if (kd == KIND_FIRST) return (acc >= ths[l][o]) ? 1 : 0;
    if (kd == KIND_BIN) return (acc >= thn) ? 1 : 0;
    prod = (longint'(acc - thn) * longint'(lams[l][o])) >>> 16;
    return prod[23] ? int'(prod[23:0]) - (1 << 24) : int'(prod[23:0]);
  endfunction

  // ---------------- stream recorders ----------------
  int link_pix [12], link_word [12], frames [12];
  int cls_count = 0, sc_count = 0;

  always @(posedge clk) if (rst_n) begin
    for (int l = 1; l < 11; l++)
      if (dut.lk_valid[l] && dut.lk_ready[l]) begin
        automatic int s = T_S[l], c = T_CH[l];
        automatic int pix = link_pix[l], wd = link_word[l];
        if (frames[l] == 0)
          for (int i = 0; i < s; i++) mp[l][pix][wd * s + i] = dut.lk_data[l][i];
        if (wd == c / s - 1) begin
          link_word[l] = 0;
          if (pix == dims_h[l] * dims_w[l] - 1) begin link_pix[l] = 0; frames[l]++; end
          else link_pix[l] = pix + 1;
        end else link_word[l] = wd + 1;
      end
    if (dut.sc_valid && dut.sc_ready) begin
      if (sc_count < H * W)
        for (int k = 0; k < NCLS; k++) sc[sc_count * NCLS + k] = int'($signed(dut.sc_data[k*24 +: 24]));
      sc_count++;
    end
    if (cls_valid && cls_ready) begin
      checks++;
      if (cls_count >= H * W) fail("extra class index");
      else if (cls_count >= sc_count || int'(cls_index) != ref_argmax(sc, cls_count * NCLS, NCLS))
        fail($sformatf("class index of pixel %0d", cls_count));
      cls_count++;
    end
  end

  // ---------------- stimulus and checks ----------------
  longint cyc = 0, t_start = 0, t_done = 0;
  always @(posedge clk) cyc++;

  task automatic check_pixel(int l, int y, int x);
    int ow = dims_w[l+1], pix = y * ow + x;
    for (int o = 0; o < T_CH[l+1]; o++) begin
      int e = ref_pixel(l, y, x, o);
      int got = (l == 10) ? sc[pix * NCLS + o] : int'(mp[l+1][pix][o]);
      checks++;
      if (got != e) fail($sformatf("layer %0d pixel (%0d,%0d) ch %0d: %0d vs %0d", l + 1, y, x, o, got, e));
    end
  endtask

  initial begin
    img_valid = 0; img_data = '0; cls_ready = 1; cfg_we = 0;
    cfg_layer = '0; cfg_pe = '0; cfg_sel = SEL_WEIGHT; cfg_addr = '0; cfg_data = '0;
    for (int l = 0; l < 12; l++) begin link_pix[l] = 0; link_word[l] = 0; frames[l] = 0; end
    dims_h[0] = H; dims_w[0] = W;
    for (int l = 0; l < 11; l++) begin
      dims_h[l+1] = int'(out_size(layer_geo(l), dims_h[l]));
      dims_w[l+1] = int'(out_size(layer_geo(l), dims_w[l]));
    end
    for (int l = 1; l < 11; l++) mp[l] = new[dims_h[l] * dims_w[l]];
    sc = new[H * W * NCLS];
    img = new[H * W * 3];
    foreach (img[i]) img[i] = 8'($urandom);
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
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int l = 0; l < 11; l++) load_layer(l);
    $display("parameters loaded at cycle %0d", cyc);
    t_start = cyc;
    for (int pix = 0; pix < H * W; pix++) begin
      @(negedge clk);
      img_valid = 1;
      for (int c = 0; c < 3; c++) img_data[c*8 +: 8] = img[pix * 3 + c];
      @(posedge clk);
      while (!img_ready) @(posedge clk);
    end
    @(negedge clk);
    img_valid = 0;
    while (cls_count < H * W) @(posedge clk);
    t_done = cyc;
    repeat (50) @(posedge clk);
    $display("frame done: %0d cycles from first pixel to last class index", t_done - t_start);
    // every link carried exactly one frame, and nothing more came out
    for (int l = 1; l < 11; l++) begin
      checks++; if (frames[l] != 1 || link_pix[l] != 0) fail($sformatf("link %0d frames %0d", l, frames[l]));
    end
    checks++; if (cls_count != H * W || sc_count != H * W) fail("output count");
    // per-layer spot checks: corners plus random pixels
    for (int l = 0; l < 11; l++) begin
      automatic int oh = dims_h[l+1], ow = dims_w[l+1];
      check_pixel(l, 0, 0);
      check_pixel(l, 0, ow - 1);
      check_pixel(l, oh - 1, 0);
      check_pixel(l, oh - 1, ow - 1);
      for (int n = 0; n < NSPOT; n++)
        check_pixel(l, int'($urandom_range(oh - 1)), int'($urandom_range(ow - 1)));
    end
    // throughput: slowest layer's cycles per frame plus fill, and the reported rate
    begin
      automatic longint worst = 0, fill = 0;
      for (int l = 0; l < 11; l++) begin
        // a x2 deconvolution window holds 9/4 nonzero taps on average
        automatic longint work = longint'(dims_h[l+1] * dims_w[l+1]) * 9 * (T_CH[l] / T_S[l]) * (T_CH[l+1] / T_P[l]);
        if (layer_geo(l) == GEO_UP2) work = work / 4;
        if (work > worst) worst = work;
      end
      // pipeline fill: each layer may start up to two of its input rows late,
      // an input row lasting worst / (input rows) cycles in a balanced pipeline
      for (int l = 0; l < 11; l++) fill += 2 * worst / dims_h[l];
      checks++;
      if (t_done - t_start > worst + fill)
        fail($sformatf("frame took %0d cycles, slowest layer needs %0d plus fill %0d", t_done - t_start, worst, fill));
      checks++;
      if (t_done - t_start > 64'd7242178) fail("slower than the reported 25.89 frames/s at 187.5 MHz");
      $display("slowest layer %0d cycles, fill allowance %0d; %0.2f frames/s at 187.5 MHz", worst,
               fill, 187.5e6 / real'(t_done - t_start));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
