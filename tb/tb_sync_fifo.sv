// Self-checking test of sync_fifo: random pushes and pops against a queue
// model, with the full and empty flags and the count checked every cycle.
module tb_sync_fifo;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int W = 12, D = 8;
  logic          wr_valid, wr_ready, rd_valid, rd_ready;
  logic [W-1:0]  wr_data, rd_data;
  logic [3:0]    count;
  int checks = 0, failures = 0, fulls = 0, empties = 0;
  logic [W-1:0]  q [$];

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_valid = 0; rd_ready = 0; wr_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      wr_valid = ($urandom_range(0, 99) < (i < 1500 ? 70 : 30));
      rd_ready = ($urandom_range(0, 99) < (i < 1500 ? 30 : 70));
      wr_data  = W'($urandom);
      #1;
      checks++;
      if (count != q.size() || wr_ready != (q.size() < D) || rd_valid != (q.size() > 0)) begin
        failures++; $display("cycle %0d: count %0d model %0d", i, count, q.size());
      end
      if (rd_valid) begin
        checks++;
        if (rd_data !== q[0]) begin failures++; $display("cycle %0d: head %h want %h", i, rd_data, q[0]); end
      end
      if (!wr_ready) fulls++;
      if (!rd_valid) empties++;
      @(posedge clk);
      if (rd_valid && rd_ready) void'(q.pop_front());
      if (wr_valid && wr_ready) q.push_back(wr_data);
    end
    checks++;
    if (fulls == 0 || empties == 0) begin failures++; $display("full %0d empty %0d never seen", fulls, empties); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
