// Full-size run of xtenstore_top with every parameter at its default
// (4096 buckets, 16384 table entries, 64 GB host space): waits for the
// table to finish clearing after reset, loads the storage key, then over
// the network port stores a 1024-byte value and a 16-byte value, reads
// both back over the PCIe port, and reads a key that was never stored.
module tb_xtenstore_full;
  import xts_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         req_valid [2], req_ready [2], rsp_valid [2], rsp_ready [2];
  req_beat_t    req_beat [2];
  rsp_beat_t    rsp_beat [2];
  logic         key_load_valid, key_loaded, mem_req_valid, mem_req_ready, mem_req_write, mem_rsp_valid;
  logic [127:0] key_load_data;
  haddr_t       mem_req_addr;
  word_t        mem_req_wdata, mem_rsp_data;
  logic [14:0]  table_used;
  logic [31:0]  stat_puts, stat_gets, stat_inline, stat_mac_fail, stat_reuse, stat_overlap;

  xtenstore_top dut (
    .clk, .rst_n,
    .net_req_valid(req_valid[0]), .net_req_ready(req_ready[0]), .net_req_beat(req_beat[0]),
    .net_rsp_valid(rsp_valid[0]), .net_rsp_ready(rsp_ready[0]), .net_rsp_beat(rsp_beat[0]),
    .pcie_req_valid(req_valid[1]), .pcie_req_ready(req_ready[1]), .pcie_req_beat(req_beat[1]),
    .pcie_rsp_valid(rsp_valid[1]), .pcie_rsp_ready(rsp_ready[1]), .pcie_rsp_beat(rsp_beat[1]),
    .key_load_valid, .key_load_data, .secret_reseed(1'b0), .secret_seed('0),
    .mem_req_valid, .mem_req_ready, .mem_req_write, .mem_req_addr, .mem_req_wdata,
    .mem_rsp_valid, .mem_rsp_data,
    .key_loaded, .table_used,
    .stat_puts, .stat_gets, .stat_inline, .stat_mac_fail, .stat_reuse, .stat_overlap);

  host_mem_model #(.LAT(20), .STALL_PCT(10)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_write(mem_req_write),
    .req_addr(mem_req_addr), .req_wdata(mem_req_wdata), .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data));

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef word_t wq_t [$];

  task automatic send(input int p, input kvs_op_e op, input logic [127:0] k, input wq_t v);
    @(negedge clk);
    req_beat[p] = '0; req_beat[p].op = op; req_beat[p].nwords = len_t'(v.size());
    req_beat[p].data = k; req_beat[p].last = (op == OP_GET);
    req_valid[p] = 1;
    #1; while (!req_ready[p]) begin @(negedge clk); #1; end
    @(posedge clk);
    for (int i = 0; i < v.size(); i++) begin
      @(negedge clk);
      req_beat[p].data = v[i]; req_beat[p].last = (i == v.size() - 1);
      #1; while (!req_ready[p]) begin @(negedge clk); #1; end
      @(posedge clk);
    end
    @(negedge clk);
    req_valid[p] = 0;
  endtask

  task automatic recv(input int p, input logic [127:0] k, input kvs_status_e want, input wq_t v);
    int n;
    rsp_ready[p] = 1;
    @(negedge clk); while (!rsp_valid[p]) @(negedge clk);
    n = int'(rsp_beat[p].nwords);
    checks++;
    if (rsp_beat[p].status != want || rsp_beat[p].data != k || n != v.size()) begin
      failures++; $display("key %h: status %0d n %0d", k, rsp_beat[p].status, n);
    end
    for (int i = 0; i < n; i++) begin
      @(negedge clk); while (!rsp_valid[p]) @(negedge clk);
      checks++;
      if (i < v.size() && rsp_beat[p].data != v[i]) begin failures++; $display("key %h word %0d", k, i); end
    end
    @(posedge clk); #1;
    rsp_ready[p] = 0;
  endtask

  initial begin
    wq_t big, tiny, none;
    logic [127:0] kb, ks, km;
    for (int p = 0; p < 2; p++) begin req_valid[p] = 0; req_beat[p] = '0; rsp_ready[p] = 0; end
    key_load_valid = 0; key_load_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    key_load_valid = 1; key_load_data = 128'h000102030405060708090a0b0c0d0e0f;
    @(negedge clk);
    key_load_valid = 0;
    for (int i = 0; i < 64; i++) big.push_back({32'(i), 32'hfeedface, 32'(i * 7), 32'h01234567});
    tiny.push_back(128'h0123456789abcdeffedcba9876543210);
    kb = 128'h6b65792d6f6e652d6f662d3130323442;   // "key-one-of-1024B"
    ks = 128'h6b65792d74776f2d6f662d2d31364221;
    km = 128'h6b65792d6e657665722d73746f726564;
    send(0, OP_PUT, kb, big);   recv(0, kb, ST_OK, none);
    send(0, OP_PUT, ks, tiny); recv(0, ks, ST_OK, none);
    send(1, OP_GET, kb, none);  recv(1, kb, ST_OK, big);
    send(1, OP_GET, ks, none);  recv(1, ks, ST_OK, tiny);
    send(1, OP_GET, km, none);  recv(1, km, ST_NOT_FOUND, none);
    checks++;
    if (table_used != 2 || stat_puts != 2 || stat_gets != 3 || u_mem.writes != 66) begin
      failures++; $display("table %0d puts %0d gets %0d host writes %0d", table_used, stat_puts, stat_gets, u_mem.writes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
