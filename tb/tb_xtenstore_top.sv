// End-to-end test of xtenstore_top with a small table (4 buckets, 128
// entries) and 64 KB of host space, against the host memory model and a
// reference map of key -> value kept here.
//
// Phases: requests wait until the storage key is loaded; directed PUT/GET
// of 16 B (inline), 512 B and 1024 B values; GET of a missing key; updates
// that reuse or outgrow the host slot; a ciphertext word altered in host
// memory and an old record replayed after an update (both must answer
// MAC_FAIL); random traffic on both ports at once with the response of
// every request checked in order; then host space and finally the table
// are filled until FULL. Each mechanism is counted and one that never
// happens counts as a failure.
module tb_xtenstore_top;
  import xts_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NB = 4, NE = 128;
  localparam logic [HOST_ADDR_W:0] HB = 37'd65536;

  logic         req_valid [2], req_ready [2], rsp_valid [2], rsp_ready [2];
  req_beat_t    req_beat [2];
  rsp_beat_t    rsp_beat [2];
  logic         key_load_valid, secret_reseed, key_loaded;
  logic [127:0] key_load_data, secret_seed;
  logic         mem_req_valid, mem_req_ready, mem_req_write, mem_rsp_valid;
  haddr_t       mem_req_addr;
  word_t        mem_req_wdata, mem_rsp_data;
  logic [7:0]   table_used;
  logic [31:0]  stat_puts, stat_gets, stat_inline, stat_mac_fail, stat_reuse, stat_overlap;

  xtenstore_top #(.NUM_BUCKETS(NB), .NUM_ENTRIES(NE), .REQ_FIFO_DEPTH(16), .RSP_FIFO_DEPTH(16),
                  .HM_OUTSTANDING(8), .HOST_BYTES(HB)) dut (
    .clk, .rst_n,
    .net_req_valid(req_valid[0]), .net_req_ready(req_ready[0]), .net_req_beat(req_beat[0]),
    .net_rsp_valid(rsp_valid[0]), .net_rsp_ready(rsp_ready[0]), .net_rsp_beat(rsp_beat[0]),
    .pcie_req_valid(req_valid[1]), .pcie_req_ready(req_ready[1]), .pcie_req_beat(req_beat[1]),
    .pcie_rsp_valid(rsp_valid[1]), .pcie_rsp_ready(rsp_ready[1]), .pcie_rsp_beat(rsp_beat[1]),
    .key_load_valid, .key_load_data, .secret_reseed, .secret_seed,
    .mem_req_valid, .mem_req_ready, .mem_req_write, .mem_req_addr, .mem_req_wdata,
    .mem_rsp_valid, .mem_rsp_data,
    .key_loaded, .table_used,
    .stat_puts, .stat_gets, .stat_inline, .stat_mac_fail, .stat_reuse, .stat_overlap);

  host_mem_model #(.LAT(20), .STALL_PCT(10)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_write(mem_req_write),
    .req_addr(mem_req_addr), .req_wdata(mem_req_wdata), .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data));

  int checks = 0, failures = 0;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- helpers
  typedef word_t wq_t [$];
  typedef struct { kvs_status_e st; logic [127:0] key; wq_t val; } exp_t;

  wq_t  model [logic [127:0]];
  wq_t  none;                 // empty value, for GETs
  exp_t expq [2][$];
  int   sent_reqs [2] = '{0, 0}, got_rsps [2] = '{0, 0};
  int   mech_inline = 0, mech_host = 0, mech_miss = 0, mech_reuse = 0, mech_grow = 0,
        mech_tamper = 0, mech_replay = 0, mech_chain = 0, mech_hostfull = 0, mech_tablefull = 0,
        mech_both_ports = 0, mech_backpressure = 0, mech_keywait = 0;
  haddr_t last_wr_base;
  logic   new_burst = 0;   // set when a PUT is sent: its first host write is the record base

  // base address of the record written by the latest PUT, seen on the host memory port
  always @(negedge clk) if (rst_n && mem_req_valid && mem_req_ready) begin
    if (mem_req_write && new_burst) begin last_wr_base = mem_req_addr; new_burst = 0; end
  end

  always @(negedge clk) begin
    #1;
    if (rst_n && req_valid[0] && req_valid[1]) mech_both_ports++;
    if (rst_n && ((req_valid[0] && !req_ready[0]) || (req_valid[1] && !req_ready[1]))) mech_backpressure++;
  end

  // the table's bucket choice, written out from its definition
  function automatic int bucket_of(input logic [127:0] k);
    logic [31:0] f;
    f = k[127:96] ^ k[95:64] ^ k[63:32] ^ k[31:0];
    f = f * 32'h9e3779b1;
    return int'(f[31:30]);
  endfunction
  int keys_in_bucket [NB] = '{default: 0};

  function automatic wq_t rand_val(input int n);
    wq_t v;
    for (int i = 0; i < n; i++) v.push_back({$urandom, $urandom, $urandom, $urandom});
    return v;
  endfunction

  // push one request into a port (blocking on ready)
  task automatic send(input int p, input kvs_op_e op, input logic [127:0] k, input wq_t v);
    int n;
    n = v.size();
    @(negedge clk);
    req_beat[p] = '0;
    req_beat[p].op = op; req_beat[p].nwords = len_t'(n); req_beat[p].data = k;
    req_beat[p].last = (op == OP_GET);
    req_valid[p] = 1;
    if (op == OP_PUT) new_burst = 1;
    #1; while (!req_ready[p]) begin @(negedge clk); #1; end
    @(posedge clk);
    if (op == OP_PUT)
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        req_beat[p].data = v[i]; req_beat[p].last = (i == n - 1);
        #1; while (!req_ready[p]) begin @(negedge clk); #1; end
        @(posedge clk);
      end
    @(negedge clk);
    req_valid[p] = 0;
    sent_reqs[p]++;
  endtask

  // expected result of a request, from the reference map
  function automatic exp_t predict(input kvs_op_e op, input logic [127:0] k, input wq_t v);
    exp_t e;
    e.key = k;
    if (op == OP_PUT) begin
      e.st = ST_OK;
      if (!model.exists(k)) keys_in_bucket[bucket_of(k)]++;
      model[k] = v;
    end else if (model.exists(k)) begin
      e.st = ST_OK; e.val = model[k];
    end else begin
      e.st = ST_NOT_FOUND;
    end
    return e;
  endfunction

  // receive one response on a port and compare with the expectation
  task automatic recv(input int p, input exp_t e, output kvs_status_e st);
    int n;
    rsp_ready[p] = 1;
    @(negedge clk); while (!rsp_valid[p]) @(negedge clk);
    st = rsp_beat[p].status;
    n  = int'(rsp_beat[p].nwords);
    checks++;
    if (rsp_beat[p].data !== e.key || st !== e.st || n != e.val.size() || rsp_beat[p].last != (n == 0)) begin
      failures++;
      $display("port %0d key %h: status %0d n %0d, want %0d n %0d", p, rsp_beat[p].data, st, n, e.st, e.val.size());
    end
    for (int i = 0; i < n; i++) begin
      @(negedge clk); while (!rsp_valid[p]) @(negedge clk);
      checks++;
      if (i < e.val.size() && rsp_beat[p].data !== e.val[i]) begin
        failures++; $display("port %0d key %h word %0d wrong", p, e.key, i);
      end
    end
    @(posedge clk); #1;
    rsp_ready[p] = ($urandom_range(0, 3) == 0);
    got_rsps[p]++;
  endtask

  // one request, waiting for its answer
  task automatic xact(input int p, input kvs_op_e op, input logic [127:0] k, input wq_t v,
                      input kvs_status_e want, output int cycles);
    exp_t e;
    kvs_status_e st;
    int t0;
    if (want == ST_OK || want == ST_NOT_FOUND) e = predict(op, k, v);
    else begin e.st = want; e.key = k; e.val.delete(); end
    t0 = int'($time / 10);
    fork send(p, op, k, v); join
    recv(p, e, st);
    cycles = int'($time / 10) - t0;
  endtask

  function automatic logic [127:0] rkey();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  // ------------------------------------------------------------- the test
  initial begin
    logic [127:0] k1, k2, k3, k4, kmiss, kx;
    wq_t v, old_rec;
    haddr_t base;
    int cyc, reads0, writes0, reuse0;
    kvs_status_e st;
    exp_t e;

    for (int p = 0; p < 2; p++) begin req_valid[p] = 0; req_beat[p] = '0; rsp_ready[p] = 0; end
    key_load_valid = 0; key_load_data = '0; secret_reseed = 0; secret_seed = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // requests are held until the enclave has loaded the storage key
    k1 = rkey();
    v = rand_val(1);
    e = predict(OP_PUT, k1, v);
    fork send(0, OP_PUT, k1, v); join_none
    repeat (200) @(posedge clk);
    checks++;
    if (rsp_valid[0] || stat_puts != 0) begin failures++; $display("request served before the key was loaded"); end
    else mech_keywait++;
    @(negedge clk);
    key_load_valid = 1; key_load_data = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    @(negedge clk);
    key_load_valid = 0;
    recv(0, e, st);
    wait (sent_reqs[0] == 1);

    // 16-byte value: kept in the table, no host memory traffic
    reads0 = u_mem.reads; writes0 = u_mem.writes;
    xact(0, OP_GET, k1, none, ST_OK, cyc);
    checks++;
    if (u_mem.reads != reads0 || u_mem.writes != writes0) begin failures++; $display("inline value touched host memory"); end
    else mech_inline++;
    $display("inline GET: %0d cycles", cyc);

    // 512-byte and 1024-byte values through host memory
    k2 = rkey();
    writes0 = u_mem.writes;
    xact(1, OP_PUT, k2, rand_val(32), ST_OK, cyc);
    $display("512-byte PUT: %0d cycles", cyc);
    checks++;
    if (u_mem.writes - writes0 != 34) begin failures++; $display("512-byte PUT wrote %0d words", u_mem.writes - writes0); end
    xact(1, OP_GET, k2, none, ST_OK, cyc);
    $display("512-byte GET: %0d cycles", cyc);
    k3 = rkey();
    xact(0, OP_PUT, k3, rand_val(64), ST_OK, cyc);
    $display("1024-byte PUT: %0d cycles", cyc);
    xact(0, OP_GET, k3, none, ST_OK, cyc);
    $display("1024-byte GET: %0d cycles", cyc);
    mech_host++;
    // the host copy is ciphertext, not the value
    base = last_wr_base;
    checks++;
    if (u_mem.peek(base + 32) === model[k3][0]) begin failures++; $display("value stored in clear"); end

    kmiss = rkey();
    xact(0, OP_GET, kmiss, none, ST_NOT_FOUND, cyc);
    mech_miss++;

    // update that fits the old slot, then one that needs a new slot
    reuse0 = stat_reuse;
    xact(1, OP_PUT, k3, rand_val(20), ST_OK, cyc);
    checks++;
    if (last_wr_base != base || stat_reuse != reuse0 + 1) begin failures++; $display("slot not reused"); end
    else mech_reuse++;
    xact(1, OP_GET, k3, none, ST_OK, cyc);
    k4 = rkey();
    xact(0, OP_PUT, k4, rand_val(4), ST_OK, cyc);
    base = last_wr_base;
    xact(0, OP_PUT, k4, rand_val(9), ST_OK, cyc);
    checks++;
    if (last_wr_base == base) begin failures++; $display("grown value kept its old slot"); end
    else mech_grow++;
    xact(0, OP_GET, k4, none, ST_OK, cyc);

    // tamper with one ciphertext word in host memory
    base = last_wr_base;
    u_mem.poke(base + 16 * 5, u_mem.peek(base + 16 * 5) ^ 128'h1);
    xact(0, OP_GET, k4, none, ST_MAC_FAIL, cyc);
    mech_tamper++;
    // repair it, then replay an old record after an update (freshness)
    u_mem.poke(base + 16 * 5, u_mem.peek(base + 16 * 5) ^ 128'h1);
    xact(0, OP_GET, k4, none, ST_OK, cyc);
    old_rec.delete();
    for (int i = 0; i < 11; i++) old_rec.push_back(u_mem.peek(base + haddr_t'(16 * i)));
    xact(1, OP_PUT, k4, rand_val(9), ST_OK, cyc);
    checks++;
    if (last_wr_base != base) begin failures++; $display("replay test expects the same slot"); end
    for (int i = 0; i < 11; i++) u_mem.poke(base + haddr_t'(16 * i), old_rec[i]);
    xact(1, OP_GET, k4, none, ST_MAC_FAIL, cyc);
    mech_replay++;
    xact(1, OP_PUT, k4, rand_val(9), ST_OK, cyc);   // a fresh PUT heals the key
    xact(1, OP_GET, k4, none, ST_OK, cyc);
    checks++;
    if (stat_mac_fail != 2) begin failures++; $display("stat_mac_fail %0d", stat_mac_fail); end

    // random traffic on both ports at once, disjoint keys per port
    begin
      logic [127:0] pk [2][8];
      for (int p = 0; p < 2; p++) for (int j = 0; j < 8; j++) pk[p][j] = rkey();
      for (int p = 0; p < 2; p++) begin
          automatic int pp = p;
          fork
            begin : sender
              for (int r = 0; r < 60; r++) begin
                kvs_op_e op; logic [127:0] kk; wq_t vv; int nn;
                op = ($urandom_range(0, 1) == 1) ? OP_PUT : OP_GET;
                kk = pk[pp][$urandom_range(0, 7)];
                nn = ($urandom_range(0, 2) == 0) ? 1 : $urandom_range(2, 8);
                vv = (op == OP_PUT) ? rand_val(nn) : none;
                expq[pp].push_back(predict(op, kk, vv));
                send(pp, op, kk, vv);
              end
            end
            begin : receiver
              kvs_status_e rst;
              for (int r = 0; r < 60; r++) begin
                while (expq[pp].size() == 0) @(negedge clk);
                recv(pp, expq[pp].pop_front(), rst);
              end
            end
          join_none
      end
      wait fork;
    end

    foreach (keys_in_bucket[b]) if (keys_in_bucket[b] > 1) mech_chain++;

    // fill host space: new keys with 1024-byte values until FULL
    for (int i = 0; i < 80 && mech_hostfull == 0; i++) begin
      kx = rkey();
      v = rand_val(64);
      fork send(0, OP_PUT, kx, v); join
      rsp_ready[0] = 1;
      @(negedge clk); while (!rsp_valid[0]) @(negedge clk);
      st = rsp_beat[0].status;
      @(posedge clk); #1;
      if (st == ST_FULL) begin
        mech_hostfull++;
        checks++;
        if (int'(table_used) >= NE) begin failures++; $display("host-full case hit a full table"); end
        xact(0, OP_GET, kx, none, ST_NOT_FOUND, cyc);
      end else begin
        checks++;
        if (st != ST_OK) begin failures++; $display("fill PUT status %0d", st); end
        void'(predict(OP_PUT, kx, v));
      end
    end
    xact(1, OP_GET, k3, none, ST_OK, cyc);              // older keys still readable
    // fill the table: new keys with inline values until FULL
    for (int i = 0; i < NE + 4 && mech_tablefull == 0; i++) begin
      kx = rkey();
      v = rand_val(1);
      if (int'(table_used) < NE) xact(1, OP_PUT, kx, v, ST_OK, cyc);
      else begin
        xact(1, OP_PUT, kx, v, ST_FULL, cyc);
        mech_tablefull++;
        xact(1, OP_GET, kx, none, ST_NOT_FOUND, cyc);
      end
    end
    xact(0, OP_GET, k2, none, ST_OK, cyc);
    xact(0, OP_GET, k1, none, ST_OK, cyc);

    checks++;
    if (stat_overlap == 0) begin failures++; $display("lookup and encryption never overlapped"); end
    $display("overlap cycles %0d, puts %0d gets %0d inline %0d reuse %0d mac_fail %0d",
             stat_overlap, stat_puts, stat_gets, stat_inline, stat_reuse, stat_mac_fail);
    $display("mechanisms: keywait %0d inline %0d host %0d miss %0d reuse %0d grow %0d tamper %0d replay %0d chain %0d hostfull %0d tablefull %0d both_ports %0d backpressure %0d",
             mech_keywait, mech_inline, mech_host, mech_miss, mech_reuse, mech_grow, mech_tamper, mech_replay,
             mech_chain, mech_hostfull, mech_tablefull, mech_both_ports, mech_backpressure);
    begin
      int m [13];
      m = '{mech_keywait, mech_inline, mech_host, mech_miss, mech_reuse, mech_grow, mech_tamper, mech_replay,
            mech_chain, mech_hostfull, mech_tablefull, mech_both_ports, mech_backpressure};
      foreach (m[i]) begin
        checks++;
        if (m[i] == 0) begin failures++; $display("mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
