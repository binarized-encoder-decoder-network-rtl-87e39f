// tb_stream_fifo: random traffic through a 4-deep FIFO, checked against a queue
// model: order and data preserved, in_ready low exactly when 4 words are held,
// out_valid low exactly when empty, and a word written in cycle t readable in
// cycle t+1.
module tb_stream_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [15:0] in_data, out_data;
  int checks = 0, failures = 0, n_full = 0;
  logic [15:0] q [$];

  stream_fifo #(.WIDTH(16), .DEPTH(4)) dut (.*);

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (in_ready != (q.size() < 4)) begin failures++; $display("FAIL ready, size %0d", q.size()); end
    checks++;
    if (out_valid != (q.size() > 0)) begin failures++; $display("FAIL valid, size %0d", q.size()); end
    if (q.size() == 4) n_full++;
    if (out_valid && out_ready) begin
      checks++;
      if (out_data != q[0]) begin failures++; $display("FAIL data %h vs %h", out_data, q[0]); end
      void'(q.pop_front());
    end
    if (in_valid && in_ready) q.push_back(in_data);
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid  = ($urandom_range(99) < (i < 1500 ? 70 : 30));
      in_data   = 16'($urandom);
      out_ready = ($urandom_range(99) < (i < 1500 ? 30 : 70));
    end
    checks++;
    if (n_full == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
