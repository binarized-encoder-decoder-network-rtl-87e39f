// tb_pixel_classifier: random 11-class score vectors (some with forced ties,
// all-negative or all-equal scores) in three phases:
//   1. isolated vectors: the index must be offered right after the NCLS-1th
//      clock edge following acceptance, so it is taken at edge NCLS;
//   2. random input gaps and random output back-pressure;
//   3. a back-to-back burst with the output always ready: one vector must be
//      accepted every cycle (pipelined classes, one pixel per cycle).
// Every index is compared with a reference argmax (lowest index on ties) kept
// in a queue in input order.
module tb_pixel_classifier;
  import bide_pkg::*;
  localparam int N = 11;
  localparam int N1 = 20, N2 = 300, N3 = 200;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [N*24-1:0] in_scores;
  logic [3:0] out_index;
  int checks = 0, failures = 0, nin = 0, nout = 0, cyc = 0;
  int exp_q [$], tacc_q [$];
  bit exact_lat = 0;

  pixel_classifier #(.NCLS(N), .IDX_W(4)) dut (.*);

  always @(posedge clk) cyc++;

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      checks++;
      if (int'(out_index) != exp_q[0]) begin failures++; $display("FAIL idx %0d vs %0d", out_index, exp_q[0]); end
      if (exact_lat) begin
        checks++;
        if (cyc - tacc_q[0] != N) begin failures++; $display("FAIL latency %0d", cyc - tacc_q[0]); end
      end
      void'(exp_q.pop_front());
      void'(tacc_q.pop_front());
      nout++;
    end
    if (in_valid && in_ready) begin
      automatic int best = 0;
      for (int k = 1; k < N; k++)
        if ($signed(in_scores[k*24 +: 24]) > $signed(in_scores[best*24 +: 24])) best = k;
      exp_q.push_back(best);
      tacc_q.push_back(cyc);
      nin++;
    end
  end

  task automatic new_vector(int i);
    for (int k = 0; k < N; k++) in_scores[k*24 +: 24] = 24'($urandom);
    if (i % 5 == 1) in_scores[7*24 +: 24] = in_scores[3*24 +: 24];
    if (i % 7 == 2) for (int k = 0; k < N; k++) in_scores[k*24 +: 24] = 24'(-int'($urandom_range(1000)));
    if (i % 9 == 3) for (int k = 0; k < N; k++) in_scores[k*24 +: 24] = 24'd5;
    if (i % 11 == 4) begin
      in_scores[10*24 +: 24] = 24'h7fffff;
      in_scores[2*24 +: 24]  = 24'h7fffff;
    end
  endtask

  initial begin
    int t0;
    in_valid = 0; out_ready = 1; in_scores = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // phase 1: isolated vectors, exact latency
    exact_lat = 1;
    for (int i = 0; i < N1; i++) begin
      @(negedge clk);
      new_vector(i);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      repeat (N + 2) @(negedge clk);
    end
    exact_lat = 0;
    // phase 2: random gaps and back-pressure
    for (int i = 0; i < N2; i++) begin
      new_vector(i);
      in_valid = ($urandom_range(3) != 0);
      out_ready = ($urandom_range(2) != 0);
      @(posedge clk);
      while (!(in_valid && in_ready)) begin
        @(negedge clk);
        in_valid = 1;
        out_ready = ($urandom_range(2) != 0);
        @(posedge clk);
      end
      @(negedge clk);
      in_valid = 0;
    end
    out_ready = 1;
    while (nout < N1 + N2) @(negedge clk);
    // phase 3: back-to-back burst
    t0 = cyc;
    for (int i = 0; i < N3; i++) begin
      new_vector(i);
      in_valid = 1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
    end
    in_valid = 0;
    checks++;
    if (cyc - t0 != N3) begin failures++; $display("FAIL burst took %0d cycles for %0d vectors", cyc - t0, N3); end
    while (nout < N1 + N2 + N3) @(negedge clk);
    checks++;
    if (nin != N1 + N2 + N3) failures++;
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
