// Uniform key-value workload on xtenstore_top, scaled down to simulation
// size. For each value size (16 B, 512 B and 1024 B) a fresh set of KEYS
// keys is preloaded. Then NREQ requests are issued, one at a time, to keys
// drawn uniformly at random. The read share is 50, 90, 95 and 100 percent in
// turn, and the rest are PUTs that overwrite a value with a new version.
// Each request goes to the network or the PCIe port at random. Every GET is
// compared with a scoreboard of the latest version of each key. The cycles
// from a request's first beat to its response header are recorded, and
// min/avg/max are printed per size and mix. They are checked against
// bounds that follow from the crypto engine's rate:
//   - a GET of an inline 16 B value answers in a few cycles;
//   - a host-stored value costs about 66 cycles per 64-byte SHA-256 block,
//     plus the host memory latency.
// Table: 64 buckets and 256 entries; host memory answers after 20 cycles.
module tb_xtenstore_workload;
  import xts_pkg::*;
  localparam int KEYS = 24;
  localparam int NREQ = 48;
  localparam int SIZES [3] = '{1, 32, 64};        // value words: 16 B, 512 B, 1024 B
  localparam int MIXES [4] = '{50, 90, 95, 100};  // percent of requests that are GETs

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         req_valid [2], req_ready [2], rsp_valid [2], rsp_ready [2];
  req_beat_t    req_beat [2];
  rsp_beat_t    rsp_beat [2];
  logic         key_load_valid, key_loaded, mem_req_valid, mem_req_ready, mem_req_write, mem_rsp_valid;
  logic [127:0] key_load_data;
  haddr_t       mem_req_addr;
  word_t        mem_req_wdata, mem_rsp_data;
  logic [8:0]   table_used;
  logic [31:0]  stat_puts, stat_gets, stat_inline, stat_mac_fail, stat_reuse, stat_overlap;

  xtenstore_top #(.NUM_BUCKETS(64), .NUM_ENTRIES(256)) dut (
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
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef word_t wq_t [$];

  // Value of key k (within size set s) at version ver: every word differs.
  function automatic wq_t value_of(input int s, input int k, input int ver, input int n);
    wq_t v;
    for (int i = 0; i < n; i++) v.push_back({8'(s), 24'(k), 32'(ver), 32'(i), 32'hc0ffee00 ^ 32'(k * 131 + ver)});
    return v;
  endfunction

  function automatic logic [127:0] key_of(input int s, input int k);
    return {32'h6b657900, 32'(s), 32'(k * 2654435761), 32'(k)};
  endfunction

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

  // Receives one response and returns the cycle its header was seen.
  task automatic recv(input int p, input logic [127:0] k, input kvs_status_e want, input wq_t v,
                      output longint t_hdr);
    int n;
    rsp_ready[p] = 1;
    @(negedge clk); while (!rsp_valid[p]) @(negedge clk);
    t_hdr = cyc;
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

  // One request, answered before the next is sent; returns its latency.
  task automatic request(input int p, input kvs_op_e op, input int s, input int k, input wq_t v,
                         input wq_t expect_v, output longint lat);
    longint t0, t1;
    t0 = cyc;
    send(p, op, key_of(s, k), v);
    recv(p, key_of(s, k), ST_OK, expect_v, t1);
    lat = t1 - t0;
  endtask

  initial begin
    int ver [KEYS];
    wq_t none;
    longint lat;
    for (int p = 0; p < 2; p++) begin req_valid[p] = 0; req_beat[p] = '0; rsp_ready[p] = 0; end
    key_load_valid = 0; key_load_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    key_load_valid = 1; key_load_data = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    @(negedge clk);
    key_load_valid = 0;

    foreach (SIZES[s]) begin
      int n;
      n = SIZES[s];
      for (int k = 0; k < KEYS; k++) begin
        ver[k] = 0;
        request(k % 2, OP_PUT, s, k, value_of(s, k, 0, n), none, lat);
      end
      foreach (MIXES[m]) begin
        longint gmin, gmax, gsum, pmin, pmax, psum;
        int ng, np;
        gmin = 1 << 30; gmax = 0; gsum = 0; pmin = 1 << 30; pmax = 0; psum = 0;
        ng = 0; np = 0;
        for (int r = 0; r < NREQ; r++) begin
          int k, p;
          k = $urandom_range(KEYS - 1);
          p = $urandom_range(1);
          if ($urandom_range(99) < MIXES[m]) begin
            request(p, OP_GET, s, k, none, value_of(s, k, ver[k], n), lat);
            ng++; gsum += lat; if (lat < gmin) gmin = lat; if (lat > gmax) gmax = lat;
          end else begin
            ver[k]++;
            request(p, OP_PUT, s, k, value_of(s, k, ver[k], n), none, lat);
            np++; psum += lat; if (lat < pmin) pmin = lat; if (lat > pmax) pmax = lat;
          end
        end
        $display("%5d B  R%-3d  GET n=%0d min/avg/max %0d/%0d/%0d   PUT n=%0d min/avg/max %0d/%0d/%0d cycles",
                 16 * n, MIXES[m], ng, gmin, ng != 0 ? gsum / longint'(ng) : 0, gmax,
                 np, np != 0 ? pmin : 0, np != 0 ? psum / longint'(np) : 0, pmax);
        // read share roughly as asked, and no PUT at all in the read-only mix
        checks++;
        if ((MIXES[m] == 100 && np != 0) || (MIXES[m] == 50 && (np < NREQ / 5 || ng < NREQ / 5))) begin
          failures++; $display("mix R%0d: %0d GETs %0d PUTs", MIXES[m], ng, np);
        end
        // latency bounds from the engine rate (66 cycles per SHA-256 block)
        checks++;
        if (n == 1 ? (ng > 0 && gmax > 12) : (ng > 0 && (gmax > 20 * n + 60 || gmin < 16 * n))) begin
          failures++; $display("GET latency out of range for %0d words", n);
        end
        checks++;
        if (n > 1 && np > 0 && (pmax > 20 * n + 60 || pmin < 16 * n)) begin
          failures++; $display("PUT latency out of range for %0d words", n);
        end
      end
    end
    checks++;
    if (stat_mac_fail != 0 || table_used != 9'(3 * KEYS)) begin
      failures++; $display("mac failures %0d table %0d", stat_mac_fail, table_used);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
