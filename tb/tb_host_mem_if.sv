// Self-checking test of host_mem_if with the host memory model: random
// write bursts, then read bursts of the same areas with a consumer that
// stalls at random; checks addresses, data, order, the credit limit
// (the model's latency exceeds the buffer so credits run out) and that the
// interface goes idle after each burst.
module tb_host_mem_if;
  import xts_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   cmd_valid, cmd_ready, cmd_write;
  haddr_t cmd_addr;
  len_t   cmd_nwords;
  logic   wr_valid, wr_ready, rd_valid, rd_ready;
  word_t  wr_data, rd_data;
  logic   mem_req_valid, mem_req_ready, mem_req_write, mem_rsp_valid;
  haddr_t mem_req_addr;
  word_t  mem_req_wdata, mem_rsp_data;
  int checks = 0, failures = 0, credit_stalls = 0;

  host_mem_if #(.OUTSTANDING(4)) dut (.*);
  host_mem_model #(.LAT(7), .STALL_PCT(25)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_write(mem_req_write),
    .req_addr(mem_req_addr), .req_wdata(mem_req_wdata), .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reads requested but not yet consumed, counted outside the design
  int in_flight = 0, reading = 0;
  always @(posedge clk) begin
    if (rst_n && reading > 0 && in_flight == 4 && !mem_req_valid) credit_stalls++;
    if (rst_n && in_flight > 4) begin failures++; $display("more than 4 reads in flight"); end
    in_flight += int'(mem_req_valid && mem_req_ready && !mem_req_write) - int'(rd_valid && rd_ready);
    reading   -= int'(mem_req_valid && mem_req_ready && !mem_req_write);
  end

  function automatic word_t pattern(input haddr_t a, input int k);
    return {32'(a), 32'(k), 32'hc0ffee00 + 32'(a >> 4), ~32'(a)};
  endfunction

  task automatic burst(input logic wr, input haddr_t a, input int n, input int k);
    int sent = 0, got = 0;
    @(negedge clk);
    cmd_valid = 1; cmd_write = wr; cmd_addr = a; cmd_nwords = len_t'(n);
    checks++;
    if (!cmd_ready) begin failures++; $display("not ready for a new burst"); end
    if (!wr) reading = n;
    @(negedge clk);
    cmd_valid = 0;
    while (wr ? (sent < n) : (got < n)) begin
      wr_valid = wr;
      wr_data  = pattern(a + haddr_t'(16 * sent), k);
      rd_ready = ($urandom_range(0, 99) < 60);
      #1;
      if (!wr && rd_valid && rd_ready) begin
        checks++;
        if (rd_data !== pattern(a + haddr_t'(16 * got), k)) begin
          failures++; $display("read %0d of %h: %h", got, a, rd_data);
        end
        got++;
      end
      if (wr && wr_valid && wr_ready) sent++;
      @(negedge clk);
    end
    wr_valid = 0; rd_ready = 0;
    @(negedge clk);
    checks++;
    if (!cmd_ready) begin failures++; $display("still busy after burst at %h", a); end
  endtask

  initial begin
    haddr_t base [6];
    int     len  [6];
    cmd_valid = 0; cmd_write = 0; cmd_addr = '0; cmd_nwords = '0;
    wr_valid = 0; wr_data = '0; rd_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 6; i++) begin
      base[i] = haddr_t'(36'h8_0000_0000 + 36'(i) * 36'h1000);
      len[i]  = (i == 0) ? 1 : $urandom_range(2, 66);
      burst(1'b1, base[i], len[i], i);
    end
    for (int i = 0; i < 6; i++) begin
      checks++;
      if (u_mem.peek(base[i] + haddr_t'(16 * len[i] - 16)) !== pattern(base[i] + haddr_t'(16 * len[i] - 16), i)) begin
        failures++; $display("host memory word missing at burst %0d", i);
      end
    end
    for (int i = 5; i >= 0; i--) burst(1'b0, base[i], len[i], i);
    checks++;
    if (credit_stalls == 0) begin failures++; $display("read credits never ran out"); end
    $display("credit stalls %0d", credit_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
