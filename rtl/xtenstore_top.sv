// FPGA side of a shielded in-memory key-value store on a hybrid x86-FPGA
// system.
//
// Clients send PUT/GET requests either straight to the FPGA's network port
// or through the host enclave over PCIe; both request streams are buffered
// in FIFOs and merged by port_arbiter, and every response returns to the
// port its request came from. kvs_controller executes the requests with
// hash_table_core (the 1st-tier table: key, host pointer, per-key secret,
// inline 16-byte values), ctr_mac_engine (AES-CTR and SHA-256 MAC),
// secret_gen (a fresh secret per PUT) and host_mem_if (the 2nd tier: the
// encrypted, MAC-protected records in host memory, reached by DMA).
// Nothing that leaves the chip is trusted: the table, the secrets and the
// storage key stay inside; host memory only ever sees IV, MAC and
// ciphertext.
//
// The storage key is loaded by the enclave (key_load_valid/key_load_data)
// after it has set up the session; until then no request is taken. The
// network, DMA and PCIe IP cores and the session protection between client
// and FPGA are outside this module: their streams are its ports. The
// stat_* outputs count operations for monitoring. Timing: all blocks share
// one clock and an active-low asynchronous reset; the table clears its
// bucket heads for NUM_BUCKETS cycles after reset before the first request
// is taken. Sizes are this design's choices (the table is sized to fit the
// block RAM the store's hash table cores use, 327.5 RAMB36).
module xtenstore_top
  import xts_pkg::*;
#(
  parameter int unsigned  NUM_BUCKETS    = 4096,
  parameter int unsigned  NUM_ENTRIES    = 16384,
  parameter int unsigned  REQ_FIFO_DEPTH = 128,
  parameter int unsigned  RSP_FIFO_DEPTH = 128,
  parameter int unsigned  HM_OUTSTANDING = 16,
  parameter logic [127:0] SECRET_SEED    = 128'h243f6a88_85a308d3_13198a2e_03707344,
  parameter logic [HOST_ADDR_W:0] HOST_BYTES = (HOST_ADDR_W+1)'(1) << HOST_ADDR_W
) (
  input  logic         clk,
  input  logic         rst_n,
  // network port
  input  logic         net_req_valid,
  output logic         net_req_ready,
  input  req_beat_t    net_req_beat,
  output logic         net_rsp_valid,
  input  logic         net_rsp_ready,
  output rsp_beat_t    net_rsp_beat,
  // PCIe port (requests placed by the enclave)
  input  logic         pcie_req_valid,
  output logic         pcie_req_ready,
  input  req_beat_t    pcie_req_beat,
  output logic         pcie_rsp_valid,
  input  logic         pcie_rsp_ready,
  output rsp_beat_t    pcie_rsp_beat,
  // key provisioning and entropy from the enclave side
  input  logic         key_load_valid,
  input  logic [127:0] key_load_data,
  input  logic         secret_reseed,
  input  logic [127:0] secret_seed,
  // host memory (DMA over PCIe)
  output logic         mem_req_valid,
  input  logic         mem_req_ready,
  output logic         mem_req_write,
  output haddr_t       mem_req_addr,
  output word_t        mem_req_wdata,
  input  logic         mem_rsp_valid,
  input  word_t        mem_rsp_data,
  // monitoring
  output logic         key_loaded,
  output logic [$clog2(NUM_ENTRIES):0] table_used,
  output logic [31:0]  stat_puts,
  output logic [31:0]  stat_gets,
  output logic [31:0]  stat_inline,
  output logic [31:0]  stat_mac_fail,
  output logic [31:0]  stat_reuse,
  output logic [31:0]  stat_overlap
);

  localparam int unsigned IW  = $clog2(NUM_ENTRIES);
  localparam int unsigned RQW = $bits(req_beat_t);
  localparam int unsigned RSW = $bits(rsp_beat_t);

  // ---- storage key
  logic [127:0] data_key;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_key   <= '0;
      key_loaded <= 1'b0;
    end else if (key_load_valid) begin
      data_key   <= key_load_data;
      key_loaded <= 1'b1;
    end
  end

  // ---- request FIFOs and arbiter
  logic [1:0] q_valid, q_ready;
  req_beat_t  q_beat [2];
  logic [RQW-1:0] q_raw [2];

  sync_fifo #(.WIDTH(RQW), .DEPTH(REQ_FIFO_DEPTH)) u_net_req_fifo (
    .clk, .rst_n, .wr_valid(net_req_valid), .wr_ready(net_req_ready), .wr_data(net_req_beat),
    .rd_valid(q_valid[0]), .rd_ready(q_ready[0]), .rd_data(q_raw[0]), .count());
  sync_fifo #(.WIDTH(RQW), .DEPTH(REQ_FIFO_DEPTH)) u_pcie_req_fifo (
    .clk, .rst_n, .wr_valid(pcie_req_valid), .wr_ready(pcie_req_ready), .wr_data(pcie_req_beat),
    .rd_valid(q_valid[1]), .rd_ready(q_ready[1]), .rd_data(q_raw[1]), .count());
  assign q_beat[0] = req_beat_t'(q_raw[0]);
  assign q_beat[1] = req_beat_t'(q_raw[1]);

  logic      a_valid, a_ready, a_src, c_req_ready;
  req_beat_t a_beat;
  logic      c_rsp_valid, c_rsp_ready, c_rsp_src;
  rsp_beat_t c_rsp_beat;
  logic [1:0] r_valid, r_ready;
  rsp_beat_t  r_beat [2];

  port_arbiter u_arb (
    .clk, .rst_n,
    .in_valid(q_valid), .in_ready(q_ready), .in_beat(q_beat),
    .out_valid(a_valid), .out_ready(a_ready), .out_beat(a_beat), .out_src(a_src),
    .rsp_in_valid(c_rsp_valid), .rsp_in_ready(c_rsp_ready), .rsp_in_beat(c_rsp_beat), .rsp_in_src(c_rsp_src),
    .rsp_out_valid(r_valid), .rsp_out_ready(r_ready), .rsp_out_beat(r_beat));

  assign a_ready = c_req_ready && key_loaded;

  // ---- response FIFOs
  logic [RSW-1:0] net_rsp_raw, pcie_rsp_raw;
  sync_fifo #(.WIDTH(RSW), .DEPTH(RSP_FIFO_DEPTH)) u_net_rsp_fifo (
    .clk, .rst_n, .wr_valid(r_valid[0]), .wr_ready(r_ready[0]), .wr_data(r_beat[0]),
    .rd_valid(net_rsp_valid), .rd_ready(net_rsp_ready), .rd_data(net_rsp_raw), .count());
  sync_fifo #(.WIDTH(RSW), .DEPTH(RSP_FIFO_DEPTH)) u_pcie_rsp_fifo (
    .clk, .rst_n, .wr_valid(r_valid[1]), .wr_ready(r_ready[1]), .wr_data(r_beat[1]),
    .rd_valid(pcie_rsp_valid), .rd_ready(pcie_rsp_ready), .rd_data(pcie_rsp_raw), .count());
  assign net_rsp_beat  = rsp_beat_t'(net_rsp_raw);
  assign pcie_rsp_beat = rsp_beat_t'(pcie_rsp_raw);

  // ---- table
  logic             ht_cmd_valid, ht_cmd_ready, ht_rsp_valid, ht_rsp_hit, ht_rsp_full;
  ht_op_e           ht_cmd_op;
  logic [KEY_W-1:0] ht_cmd_key;
  logic [IW-1:0]    ht_cmd_idx, ht_rsp_idx;
  ht_entry_t        ht_cmd_entry, ht_rsp_entry;

  hash_table_core #(.NUM_BUCKETS(NUM_BUCKETS), .NUM_ENTRIES(NUM_ENTRIES)) u_table (
    .clk, .rst_n,
    .cmd_valid(ht_cmd_valid), .cmd_ready(ht_cmd_ready), .cmd_op(ht_cmd_op), .cmd_key(ht_cmd_key),
    .cmd_idx(ht_cmd_idx), .cmd_entry(ht_cmd_entry),
    .rsp_valid(ht_rsp_valid), .rsp_hit(ht_rsp_hit), .rsp_full(ht_rsp_full), .rsp_idx(ht_rsp_idx),
    .rsp_entry(ht_rsp_entry), .probes(), .used(table_used));

  // ---- secrets
  logic         sec_take;
  logic [127:0] sec_value;
  secret_gen #(.SEED(SECRET_SEED)) u_secret (
    .clk, .rst_n, .take(sec_take), .reseed(secret_reseed), .seed(secret_seed), .secret(sec_value));

  // ---- crypto
  logic         eng_start, eng_decrypt, eng_in_valid, eng_in_ready, eng_out_valid, eng_out_ready;
  logic         eng_busy, eng_done;
  len_t         eng_nwords;
  logic [127:0] eng_iv, eng_secret, eng_mac;
  word_t        eng_in_data, eng_out_data;

  ctr_mac_engine u_crypto (
    .clk, .rst_n, .start(eng_start), .decrypt(eng_decrypt), .nwords(eng_nwords),
    .key(data_key), .iv(eng_iv), .secret(eng_secret),
    .in_valid(eng_in_valid), .in_ready(eng_in_ready), .in_data(eng_in_data),
    .out_valid(eng_out_valid), .out_ready(eng_out_ready), .out_data(eng_out_data),
    .busy(eng_busy), .done(eng_done), .mac(eng_mac));

  // ---- host memory
  logic   hm_cmd_valid, hm_cmd_ready, hm_cmd_write, hm_wr_valid, hm_wr_ready, hm_rd_valid, hm_rd_ready;
  haddr_t hm_cmd_addr;
  len_t   hm_cmd_nwords;
  word_t  hm_wr_data, hm_rd_data;

  host_mem_if #(.OUTSTANDING(HM_OUTSTANDING)) u_hostmem (
    .clk, .rst_n,
    .cmd_valid(hm_cmd_valid), .cmd_ready(hm_cmd_ready), .cmd_write(hm_cmd_write),
    .cmd_addr(hm_cmd_addr), .cmd_nwords(hm_cmd_nwords),
    .wr_valid(hm_wr_valid), .wr_ready(hm_wr_ready), .wr_data(hm_wr_data),
    .rd_valid(hm_rd_valid), .rd_ready(hm_rd_ready), .rd_data(hm_rd_data),
    .mem_req_valid, .mem_req_ready, .mem_req_write, .mem_req_addr, .mem_req_wdata,
    .mem_rsp_valid, .mem_rsp_data);

  // ---- controller
  kvs_controller #(.IW(IW), .HOST_BYTES(HOST_BYTES)) u_ctrl (
    .clk, .rst_n,
    .req_valid(a_valid && key_loaded), .req_ready(c_req_ready), .req_beat(a_beat), .req_src(a_src),
    .rsp_valid(c_rsp_valid), .rsp_ready(c_rsp_ready), .rsp_beat(c_rsp_beat), .rsp_src(c_rsp_src),
    .ht_cmd_valid, .ht_cmd_ready, .ht_cmd_op, .ht_cmd_key, .ht_cmd_idx, .ht_cmd_entry,
    .ht_rsp_valid, .ht_rsp_hit, .ht_rsp_full, .ht_rsp_idx, .ht_rsp_entry,
    .sec_take, .sec_value,
    .eng_start, .eng_decrypt, .eng_nwords, .eng_iv, .eng_secret,
    .eng_in_valid, .eng_in_ready, .eng_in_data, .eng_out_valid, .eng_out_ready, .eng_out_data,
    .eng_busy, .eng_done, .eng_mac,
    .hm_cmd_valid, .hm_cmd_ready, .hm_cmd_write, .hm_cmd_addr, .hm_cmd_nwords,
    .hm_wr_valid, .hm_wr_ready, .hm_wr_data, .hm_rd_valid, .hm_rd_ready, .hm_rd_data,
    .stat_puts, .stat_gets, .stat_inline, .stat_mac_fail, .stat_reuse, .stat_overlap);

endmodule
