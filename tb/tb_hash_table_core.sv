// Self-checking test of hash_table_core on a small table (4 buckets, 16
// entries), so chains are long and the pool fills: inserts, lookups of
// present and absent keys, updates, insert into a full table; checks
// against an associative-array model, the reported chain length and the
// lookup latency (2 + entries compared).
module tb_hash_table_core;
  import xts_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NB = 4, NE = 16;
  logic             cmd_valid, cmd_ready, rsp_valid, rsp_hit, rsp_full;
  ht_op_e           cmd_op;
  logic [KEY_W-1:0] cmd_key;
  logic [3:0]       cmd_idx, rsp_idx;
  ht_entry_t        cmd_entry, rsp_entry;
  logic [15:0]      probes;
  logic [4:0]       used;
  int checks = 0, failures = 0, max_probes = 0, fulls = 0;

  hash_table_core #(.NUM_BUCKETS(NB), .NUM_ENTRIES(NE)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  ht_entry_t         model [logic [KEY_W-1:0]];
  int                where [logic [KEY_W-1:0]];
  logic [KEY_W-1:0]  keys [$];

  task automatic issue(input ht_op_e op, input logic [KEY_W-1:0] k, input int idx, input ht_entry_t e, output int lat);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1; cmd_op = op; cmd_key = k; cmd_idx = 4'(idx); cmd_entry = e;
    @(negedge clk);
    cmd_valid = 0;
    lat = 1;
    while (!rsp_valid) begin @(negedge clk); lat++; end
  endtask

  function automatic ht_entry_t rand_entry(input logic [KEY_W-1:0] k);
    ht_entry_t e;
    e = '0;
    e.key = k; e.ptr = haddr_t'({$urandom, $urandom}); e.secret = {$urandom, $urandom, $urandom, $urandom};
    e.nwords = len_t'($urandom_range(1, 64)); e.cap = e.nwords; e.inl = (e.nwords == 1);
    e.inl_val = {$urandom, $urandom, $urandom, $urandom};
    return e;
  endfunction

  task automatic lookup(input logic [KEY_W-1:0] k);
    int lat;
    issue(HT_LOOKUP, k, 0, '0, lat);
    checks++;
    if (rsp_hit !== model.exists(k)) begin failures++; $display("key %h hit %0d", k, rsp_hit); end
    else if (rsp_hit && (rsp_entry !== model[k] || int'(rsp_idx) != where[k])) begin
      failures++; $display("key %h wrong entry", k);
    end
    checks++;
    if (lat != 2 + int'(probes)) begin failures++; $display("lookup latency %0d with %0d probes", lat, probes); end
    if (int'(probes) > max_probes) max_probes = int'(probes);
  endtask

  initial begin
    int lat;
    logic [KEY_W-1:0] k;
    ht_entry_t e;
    cmd_valid = 0; cmd_op = HT_LOOKUP; cmd_key = '0; cmd_idx = '0; cmd_entry = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20; i++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      lookup(k);                              // absent
      e = rand_entry(k);
      issue(HT_INSERT, '0, 0, e, lat);
      checks++;
      if (i < NE) begin
        if (rsp_full || int'(rsp_idx) != i) begin failures++; $display("insert %0d: full %0d idx %0d", i, rsp_full, rsp_idx); end
        model[k] = e; where[k] = i; keys.push_back(k);
      end else begin
        fulls++;
        if (!rsp_full) begin failures++; $display("insert %0d into a full table accepted", i); end
      end
      foreach (keys[j]) lookup(keys[j]);
    end
    for (int i = 0; i < 30; i++) begin
      k = keys[$urandom_range(0, keys.size() - 1)];
      e = rand_entry(k);
      issue(HT_UPDATE, '0, where[k], e, lat);
      model[k] = e;
      lookup(k);
    end
    foreach (keys[j]) lookup(keys[j]);
    checks++;
    if (used != 5'(NE) || max_probes < 5 || fulls == 0) begin
      failures++; $display("used %0d, longest chain %0d", used, max_probes);
    end
    $display("longest chain walked %0d", max_probes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
