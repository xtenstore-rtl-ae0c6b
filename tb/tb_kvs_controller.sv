// Self-checking test of kvs_controller with the real table, crypto engine,
// secret source and host memory interface around it (small table: 2
// buckets, 32 entries) and the host memory model. Random PUT/GET traffic on
// 12 keys with 16 B to 1024 B values is checked against a reference map.
// Also checked: for every host-stored PUT the table lookup and the engine
// start fall in the same cycle (lookup and crypto overlap); the IV word in
// host memory is {PUT number, 64'b0}; a GET after the stored IV word was
// changed answers MAC_FAIL; an inline value causes no host traffic.
module tb_kvs_controller;
  import xts_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int IW = 5;
  logic req_valid, req_ready, req_src, rsp_valid, rsp_ready, rsp_src;
  req_beat_t req_beat;
  rsp_beat_t rsp_beat;
  logic ht_cmd_valid, ht_cmd_ready, ht_rsp_valid, ht_rsp_hit, ht_rsp_full;
  ht_op_e ht_cmd_op;
  logic [KEY_W-1:0] ht_cmd_key;
  logic [IW-1:0] ht_cmd_idx, ht_rsp_idx;
  ht_entry_t ht_cmd_entry, ht_rsp_entry;
  logic sec_take;
  logic [127:0] sec_value;
  logic eng_start, eng_decrypt, eng_in_valid, eng_in_ready, eng_out_valid, eng_out_ready, eng_busy, eng_done;
  len_t eng_nwords;
  logic [127:0] eng_iv, eng_secret, eng_mac;
  word_t eng_in_data, eng_out_data;
  logic hm_cmd_valid, hm_cmd_ready, hm_cmd_write, hm_wr_valid, hm_wr_ready, hm_rd_valid, hm_rd_ready;
  haddr_t hm_cmd_addr;
  len_t hm_cmd_nwords;
  word_t hm_wr_data, hm_rd_data;
  logic [31:0] stat_puts, stat_gets, stat_inline, stat_mac_fail, stat_reuse, stat_overlap;
  logic mem_req_valid, mem_req_ready, mem_req_write, mem_rsp_valid;
  haddr_t mem_req_addr;
  word_t mem_req_wdata, mem_rsp_data;

  kvs_controller #(.IW(IW)) dut (.*);

  hash_table_core #(.NUM_BUCKETS(2), .NUM_ENTRIES(32)) u_ht (
    .clk, .rst_n, .cmd_valid(ht_cmd_valid), .cmd_ready(ht_cmd_ready), .cmd_op(ht_cmd_op), .cmd_key(ht_cmd_key),
    .cmd_idx(ht_cmd_idx), .cmd_entry(ht_cmd_entry), .rsp_valid(ht_rsp_valid), .rsp_hit(ht_rsp_hit),
    .rsp_full(ht_rsp_full), .rsp_idx(ht_rsp_idx), .rsp_entry(ht_rsp_entry), .probes(), .used());
  secret_gen u_sec (.clk, .rst_n, .take(sec_take), .reseed(1'b0), .seed('0), .secret(sec_value));
  ctr_mac_engine u_eng (
    .clk, .rst_n, .start(eng_start), .decrypt(eng_decrypt), .nwords(eng_nwords), .key(128'h0f0e0d0c0b0a09080706050403020100),
    .iv(eng_iv), .secret(eng_secret), .in_valid(eng_in_valid), .in_ready(eng_in_ready), .in_data(eng_in_data),
    .out_valid(eng_out_valid), .out_ready(eng_out_ready), .out_data(eng_out_data), .busy(eng_busy), .done(eng_done), .mac(eng_mac));
  host_mem_if #(.OUTSTANDING(8)) u_hm (
    .clk, .rst_n, .cmd_valid(hm_cmd_valid), .cmd_ready(hm_cmd_ready), .cmd_write(hm_cmd_write), .cmd_addr(hm_cmd_addr),
    .cmd_nwords(hm_cmd_nwords), .wr_valid(hm_wr_valid), .wr_ready(hm_wr_ready), .wr_data(hm_wr_data),
    .rd_valid(hm_rd_valid), .rd_ready(hm_rd_ready), .rd_data(hm_rd_data),
    .mem_req_valid, .mem_req_ready, .mem_req_write, .mem_req_addr, .mem_req_wdata, .mem_rsp_valid, .mem_rsp_data);
  host_mem_model #(.LAT(12), .STALL_PCT(15)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_write(mem_req_write),
    .req_addr(mem_req_addr), .req_wdata(mem_req_wdata), .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data));

  int checks = 0, failures = 0, overlaps = 0, host_puts = 0, put_no = 0;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef word_t wq_t [$];
  wq_t model [logic [127:0]];
  haddr_t base_of [logic [127:0]];
  haddr_t cur_base;
  logic   want_base = 0;

  // every lookup issued for a host-stored PUT must come with the engine start
  always @(negedge clk) if (rst_n) begin
    if (eng_start && !eng_decrypt) begin
      checks++;
      if (!(ht_cmd_valid && ht_cmd_op == HT_LOOKUP)) begin failures++; $display("engine started without the lookup"); end
      else overlaps++;
    end
    if (mem_req_valid && mem_req_ready && mem_req_write && want_base) begin cur_base = mem_req_addr; want_base = 0; end
  end

  task automatic beat(input req_beat_t b);
    @(negedge clk);
    req_beat = b; req_valid = 1;
    #1; while (!req_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    @(negedge clk);
    req_valid = 0;
  endtask

  task automatic do_req(input kvs_op_e op, input logic [127:0] k, input wq_t v, input kvs_status_e want_st);
    req_beat_t b;
    int n;
    wq_t exp_v;
    b = '0; b.op = op; b.nwords = len_t'(v.size()); b.data = k; b.last = (op == OP_GET);
    if (op == OP_PUT) begin want_base = (v.size() > 1); put_no++; end
    beat(b);
    for (int i = 0; i < v.size(); i++) begin
      b.data = v[i]; b.last = (i == v.size() - 1);
      beat(b);
    end
    if (op == OP_GET && want_st == ST_OK) exp_v = model[k];
    rsp_ready = 1;
    @(negedge clk); while (!rsp_valid) @(negedge clk);
    n = int'(rsp_beat.nwords);
    checks++;
    if (rsp_beat.status != want_st || rsp_beat.data != k || n != exp_v.size()) begin
      failures++; $display("key %h: status %0d n %0d, want %0d n %0d", k, rsp_beat.status, n, want_st, exp_v.size());
    end
    for (int i = 0; i < n; i++) begin
      @(negedge clk); while (!rsp_valid) @(negedge clk);
      checks++;
      if (i < exp_v.size() && rsp_beat.data != exp_v[i]) begin failures++; $display("key %h word %0d", k, i); end
    end
    @(posedge clk); #1;
    rsp_ready = 0;
    if (op == OP_PUT) begin
      model[k] = v;
      if (v.size() > 1) begin
        host_puts++;
        base_of[k] = cur_base;
        checks++;
        if (u_mem.peek(cur_base) !== {64'(put_no - 1), 64'h0}) begin failures++; $display("IV word %h", u_mem.peek(cur_base)); end
      end
    end
  endtask

  initial begin
    logic [127:0] keys [12];
    wq_t v, none;
    int n, w0;
    req_valid = 0; req_beat = '0; req_src = 0; rsp_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 12; i++) keys[i] = {$urandom, $urandom, $urandom, $urandom};
    for (int r = 0; r < 120; r++) begin
      logic [127:0] k;
      k = keys[$urandom_range(0, 11)];
      if ($urandom_range(0, 1) == 0) begin
        n = ($urandom_range(0, 3) == 0) ? 1 : (($urandom_range(0, 3) == 0) ? 64 : $urandom_range(2, 40));
        v.delete();
        for (int i = 0; i < n; i++) v.push_back({$urandom, $urandom, $urandom, $urandom});
        w0 = u_mem.writes;
        do_req(OP_PUT, k, v, ST_OK);
        checks++;
        if (n == 1 && u_mem.writes != w0) begin failures++; $display("inline PUT wrote host memory"); end
      end else begin
        do_req(OP_GET, k, none, model.exists(k) ? ST_OK : ST_NOT_FOUND);
      end
    end
    // change the stored IV of a host-stored key: the MAC must fail
    foreach (base_of[k]) begin
      if (model[k].size() > 1) begin
        u_mem.poke(base_of[k], u_mem.peek(base_of[k]) ^ {64'h1, 64'h0});
        do_req(OP_GET, k, none, ST_MAC_FAIL);
        break;
      end
    end
    checks++;
    if (overlaps == 0 || overlaps != host_puts || stat_mac_fail != 1) begin
      failures++; $display("overlaps %0d host puts %0d mac fails %0d", overlaps, host_puts, stat_mac_fail);
    end
    $display("PUTs stored in host memory %0d, all with lookup and crypto started together", host_puts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
