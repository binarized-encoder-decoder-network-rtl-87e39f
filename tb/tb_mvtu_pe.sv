// tb_mvtu_pe: the three kinds of processing element (first layer, binary,
// last layer) side by side.  Random weights, thresholds and scales are loaded
// through the configuration port; then 400 windows of 1-6 random activation
// words each (random weight addresses and neuron folds, random idle cycles
// between words) are issued.  Each result is compared with a bit-level model:
//   first: acc = sum(w ? +a : -a), bit = acc >= th
//   binary: pop = #XNOR ones, fan = S*words, bit = pop >= (th + fan) >>> 1
//   last: score = ((pop - ((th + fan) >>> 1)) * lambda) >>> 16
// and must appear exactly 2 cycles after the window's last word was issued.
module tb_mvtu_pe;
  import bide_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int S = 8, NF = 2, WPF = 6;
  localparam kind_e KD [3] = '{KIND_FIRST, KIND_BIN, KIND_LAST};

  logic        issue, first, last, cfg_we;
  logic [63:0] act;            // 8 lanes of 8 bits for the first-layer PE, low 8 bits otherwise
  logic [15:0] waddr, cfg_addr;
  logic [7:0]  nf_idx;
  logic [2:0]  cfg_pe_sel;
  cfg_sel_e    cfg_sel;
  logic [63:0] cfg_data;
  logic [2:0]  res_valid, res_bit;
  logic signed [23:0] res_score [3];

  for (genvar g = 0; g < 3; g++) begin : g_pe
    localparam int AB = (g == 0) ? 8 : 1;
    mvtu_pe #(.KIND(KD[g]), .S(S), .AB(AB), .NF(NF), .WPF(WPF)) dut (
      .clk, .rst_n, .issue, .act(act[S*AB-1:0]), .waddr, .nf_idx, .first, .last,
      .cfg_we(cfg_we && cfg_pe_sel[g]), .cfg_sel, .cfg_addr, .cfg_data,
      .res_valid(res_valid[g]), .res_bit(res_bit[g]), .res_score(res_score[g]));
  end

  logic [S-1:0] wm [3][NF*WPF];
  int th [3][NF], lam [3][NF];

  typedef struct { int cyc; int bit_v [3]; int score; } exp_t;
  exp_t exp_q [$];
  int cyc = 0;
  always @(posedge clk) cyc++;

  // sampled at the falling edge, after the rising-edge updates have settled
  always @(negedge clk) if (rst_n) begin
    if (exp_q.size() != 0 && exp_q[0].cyc == cyc) begin
      for (int g = 0; g < 3; g++) begin
        checks++;
        if (!res_valid[g]) begin failures++; $display("FAIL pe%0d no result at cycle %0d", g, cyc); end
      end
      for (int g = 0; g < 2; g++) begin
        checks++;
        if (int'(res_bit[g]) != exp_q[0].bit_v[g]) begin failures++; $display("FAIL pe%0d bit", g); end
      end
      checks++;
      if (int'(res_score[2]) != exp_q[0].score) begin
        failures++; $display("FAIL score %0d vs %0d", res_score[2], exp_q[0].score);
      end
      void'(exp_q.pop_front());
    end else begin
      checks++;
      if (res_valid != 3'b000) begin failures++; $display("FAIL unexpected result at %0d", cyc); end
    end
  end

  task automatic cfg(int g, cfg_sel_e sel, int addr, logic [63:0] d);
    @(negedge clk);
    cfg_we = 1; cfg_pe_sel = 3'(1 << g); cfg_sel = sel; cfg_addr = 16'(addr); cfg_data = d;
    @(negedge clk);
    cfg_we = 0;
  endtask

  initial begin
    issue = 0; first = 0; last = 0; cfg_we = 0; act = '0; waddr = '0; nf_idx = '0;
    cfg_pe_sel = '0; cfg_sel = SEL_WEIGHT; cfg_addr = '0; cfg_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g < 3; g++) begin
      for (int a = 0; a < NF * WPF; a++) begin
        wm[g][a] = S'($urandom);
        cfg(g, SEL_WEIGHT, a, 64'(wm[g][a]));
      end
      for (int n = 0; n < NF; n++) begin
        th[g][n]  = (g == 0) ? int'($urandom_range(2000)) - 1000 : int'($urandom_range(60)) - 30;
        lam[g][n] = int'($urandom_range(24'hffffff));
        cfg(g, SEL_THRESH, n, 64'(th[g][n]));
        cfg(g, SEL_SCALE, n, 64'(lam[g][n]));
      end
    end
    for (int w = 0; w < 400; w++) begin
      automatic int nw = int'($urandom_range(6, 1)), nf = int'($urandom_range(NF - 1));
      automatic int acc0 = 0, pop = 0, fan = 0, thn, sc;
      automatic longint prod;
      automatic exp_t e;
      for (int i = 0; i < nw; i++) begin
        automatic int off = int'($urandom_range(WPF - 1));
        automatic logic [63:0] a = {$urandom, $urandom};
        automatic logic [S-1:0] wt = wm[0][nf * WPF + off];
        for (int l = 0; l < S; l++) acc0 += wt[l] ? int'(a[l*8 +: 8]) : -int'(a[l*8 +: 8]);
        // the binary PEs see the low S bits; both use their own weight memories
        for (int l = 0; l < S; l++) pop += (a[l] == wm[1][nf * WPF + off][l]) ? 1 : 0;
        fan += S;
        if ($urandom_range(2) == 0) @(negedge clk);
        issue = 1; act = a; waddr = 16'(nf * WPF + off); nf_idx = 8'(nf);
        first = (i == 0); last = (i == nw - 1);
        @(negedge clk);
        issue = 0; first = 0; last = 0;
        // the last-layer PE gets the same activations: recompute its popcount with its weights
        if (i == 0) e.score = 0;
        for (int l = 0; l < S; l++) e.score += (a[l] == wm[2][nf * WPF + off][l]) ? 1 : 0;
      end
      e.cyc = cyc + 1;
      e.bit_v[0] = (acc0 >= th[0][nf]) ? 1 : 0;
      thn = (th[1][nf] + fan) >>> 1;
      e.bit_v[1] = (pop >= thn) ? 1 : 0;
      thn = (th[2][nf] + fan) >>> 1;
      prod = longint'(e.score - thn) * longint'(lam[2][nf]);
      prod = prod >>> 16;
      sc = int'(prod[23:0]);
      if (prod[23]) sc -= (1 << 24);
      e.score = sc;
      exp_q.push_back(e);
    end
    repeat (5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL results missing"); end
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
