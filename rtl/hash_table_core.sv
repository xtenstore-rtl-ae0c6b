// 1st-tier hash table of the store, held on chip.
//
// Each entry keeps what must stay inside the trusted boundary for a key:
// the key itself, the host-memory pointer and slot size of its record, the
// per-key secret of the last PUT, the value length and, for 16-byte values,
// the value itself. Entries sit in a pool of NUM_ENTRIES; each of the
// NUM_BUCKETS buckets holds the index of the first entry of its chain and
// every entry the index of the next one, so a bucket can hold any number of
// keys (chaining). New keys are linked at the head of their chain and the
// pool is filled in order; there is no delete.
//
// Commands (one at a time, cmd_ready high when idle):
//   HT_LOOKUP key   walks the chain, one entry compared per cycle; answers
//                   hit, index and entry. Latency 2 + (entries compared).
//   HT_INSERT entry links a new entry for entry.key (the caller has looked
//                   the key up and missed); answers its index, or full.
//   HT_UPDATE idx   overwrites entry idx.
// The answer is a one-cycle rsp_valid pulse; probes tells how many entries
// the lookup compared. After reset the bucket heads are cleared one per
// cycle, so the core is first ready NUM_BUCKETS cycles after reset.
// Bucket = top bits of (XOR of the key's four 32-bit words) * 0x9E3779B1.
// Chaining follows the store's description; the hash, the sizes and the
// memory organisation (asynchronous reads) are this design's choices.
module hash_table_core
  import xts_pkg::*;
#(
  parameter int unsigned NUM_BUCKETS = 4096,
  parameter int unsigned NUM_ENTRIES = 16384,
  localparam int unsigned BW = $clog2(NUM_BUCKETS),
  localparam int unsigned IW = $clog2(NUM_ENTRIES)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cmd_valid,
  output logic             cmd_ready,
  input  ht_op_e           cmd_op,
  input  logic [KEY_W-1:0] cmd_key,
  input  logic [IW-1:0]    cmd_idx,
  input  ht_entry_t        cmd_entry,
  output logic             rsp_valid,
  output logic             rsp_hit,
  output logic             rsp_full,
  output logic [IW-1:0]    rsp_idx,
  output ht_entry_t        rsp_entry,
  output logic [15:0]      probes,
  output logic [IW:0]      used
);

  typedef enum logic [1:0] {S_INIT, S_IDLE, S_HEAD, S_WALK} state_e;

  logic [IW:0]    head [NUM_BUCKETS];   // {valid, index}
  logic [IW:0]    nxt  [NUM_ENTRIES];   // {valid, index}
  ht_entry_t      pool [NUM_ENTRIES];

  state_e           state;
  logic [BW-1:0]    bkt, init_cnt;
  logic [KEY_W-1:0] key_q;
  logic [IW-1:0]    cur;

  function automatic logic [BW-1:0] hash(input logic [KEY_W-1:0] k);
    logic [31:0] f, p;
    f = k[127:96] ^ k[95:64] ^ k[63:32] ^ k[31:0];
    p = f * 32'h9e3779b1;
    return p[31 -: BW];
  endfunction

  logic [BW-1:0] cmd_bkt;
  logic [IW:0]   head_rd, nxt_rd;
  ht_entry_t     pool_rd;
  logic          do_insert, do_update, do_init;

  assign cmd_bkt   = hash(cmd_op == HT_INSERT ? cmd_entry.key : cmd_key);
  assign head_rd   = head[(state == S_IDLE) ? cmd_bkt : bkt];
  assign pool_rd   = pool[cur];
  assign nxt_rd    = nxt[cur];
  assign cmd_ready = (state == S_IDLE);
  assign do_insert = (state == S_IDLE) && cmd_valid && cmd_op == HT_INSERT && used != (IW+1)'(NUM_ENTRIES);
  assign do_update = (state == S_IDLE) && cmd_valid && cmd_op == HT_UPDATE;
  assign do_init   = (state == S_INIT);

  // table storage
  always_ff @(posedge clk) begin
    if (do_init) head[init_cnt] <= '0;
    if (do_insert) begin
      head[cmd_bkt]       <= {1'b1, used[IW-1:0]};
      nxt[used[IW-1:0]]   <= head_rd;
      pool[used[IW-1:0]]  <= cmd_entry;
    end
    if (do_update) pool[cmd_idx] <= cmd_entry;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_INIT;
      init_cnt  <= '0;
      bkt       <= '0;
      key_q     <= '0;
      cur       <= '0;
      used      <= '0;
      rsp_valid <= 1'b0;
      rsp_hit   <= 1'b0;
      rsp_full  <= 1'b0;
      rsp_idx   <= '0;
      rsp_entry <= '0;
      probes    <= '0;
    end else begin
      rsp_valid <= 1'b0;
      unique case (state)
        S_INIT: begin
          init_cnt <= init_cnt + 1'b1;
          if (init_cnt == BW'(NUM_BUCKETS - 1)) state <= S_IDLE;
        end
        S_IDLE: if (cmd_valid) begin
          rsp_hit  <= 1'b0;
          rsp_full <= 1'b0;
          unique case (cmd_op)
            HT_LOOKUP: begin
              bkt    <= cmd_bkt;
              key_q  <= cmd_key;
              probes <= '0;
              state  <= S_HEAD;
            end
            HT_INSERT: begin
              rsp_valid <= 1'b1;
              rsp_entry <= cmd_entry;
              if (used == (IW+1)'(NUM_ENTRIES)) begin
                rsp_full <= 1'b1;
              end else begin
                rsp_idx <= used[IW-1:0];
                used    <= used + 1'b1;
              end
            end
            default: begin   // HT_UPDATE
              rsp_valid <= 1'b1;
              rsp_hit   <= 1'b1;
              rsp_idx   <= cmd_idx;
              rsp_entry <= cmd_entry;
            end
          endcase
        end
        S_HEAD: begin
          if (head_rd[IW]) begin
            cur   <= head_rd[IW-1:0];
            state <= S_WALK;
          end else begin
            rsp_valid <= 1'b1;
            state     <= S_IDLE;
          end
        end
        S_WALK: begin
          probes <= probes + 1'b1;
          if (pool_rd.key == key_q) begin
            rsp_valid <= 1'b1;
            rsp_hit   <= 1'b1;
            rsp_idx   <= cur;
            rsp_entry <= pool_rd;
            state     <= S_IDLE;
          end else if (nxt_rd[IW]) begin
            cur <= nxt_rd[IW-1:0];
          end else begin
            rsp_valid <= 1'b1;
            state     <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  initial assert (NUM_BUCKETS >= 2 && NUM_BUCKETS <= (1 << 30) && (NUM_BUCKETS & (NUM_BUCKETS - 1)) == 0)
    else $error("hash_table_core: NUM_BUCKETS must be a power of two");

endmodule
