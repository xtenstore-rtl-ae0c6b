// Transaction controller of the store: runs one PUT or GET at a time
// against the 1st-tier table (hash_table_core), the crypto engine
// (ctr_mac_engine), the per-PUT secret source and the host memory
// interface.
//
// PUT key, value (n words):
//   The header beat is taken only when table, engine and host interface
//   are idle. In that same cycle the table lookup of the key is issued, a
//   fresh secret is drawn and, for n > 1, the engine is started to encrypt
//   the value with IV = {nonce, 64'b0} (nonce counts PUTs) and MAC it with
//   the new secret. Lookup and crypto then run side by side: neither needs
//   the other's result. Value beats stream from the request straight into
//   the engine; ciphertext collects in a 64-word buffer. When both are
//   finished the entry is committed (UPDATE on a hit, INSERT on a miss) and
//   the record [IV][MAC][ciphertext] is written to host memory at the
//   entry's pointer. A one-word value (16 B) is instead kept in the entry
//   itself and host memory is not touched. Host space comes from a bump
//   allocator; an update reuses the key's old slot when it is large enough.
// GET key:
//   Lookup; a miss answers NOT_FOUND, an inline entry answers at once.
//   Otherwise the record is read from host memory, the IV and MAC words
//   first, then the ciphertext streams through the engine for decryption
//   with the entry's secret; the value is returned only if the recomputed
//   MAC equals the stored one, else MAC_FAIL.
// Responses: a header beat {status, nwords, key}, then for a successful
// GET the n value words; the request's port tag is returned with them.
// Statuses: OK, NOT_FOUND, MAC_FAIL, FULL (table pool or host space
// exhausted). stat_* count operations; stat_overlap counts cycles in which
// a PUT's lookup and its encryption were both in progress.
// What is this design's own: the beat formats, the record layout, the
// nonce-based IV, the allocator, and that a GET does not overlap lookup and
// decryption (the store describes the overlap for PUT).
module kvs_controller
  import xts_pkg::*;
#(
  parameter int unsigned        IW         = 14,
  parameter haddr_t             HOST_BASE  = '0,
  parameter logic [HOST_ADDR_W:0] HOST_BYTES = (HOST_ADDR_W+1)'(1) << HOST_ADDR_W
) (
  input  logic             clk,
  input  logic             rst_n,
  // requests and responses
  input  logic             req_valid,
  output logic             req_ready,
  input  req_beat_t        req_beat,
  input  logic             req_src,
  output logic             rsp_valid,
  input  logic             rsp_ready,
  output rsp_beat_t        rsp_beat,
  output logic             rsp_src,
  // 1st-tier table
  output logic             ht_cmd_valid,
  input  logic             ht_cmd_ready,
  output ht_op_e           ht_cmd_op,
  output logic [KEY_W-1:0] ht_cmd_key,
  output logic [IW-1:0]    ht_cmd_idx,
  output ht_entry_t        ht_cmd_entry,
  input  logic             ht_rsp_valid,
  input  logic             ht_rsp_hit,
  input  logic             ht_rsp_full,
  input  logic [IW-1:0]    ht_rsp_idx,
  input  ht_entry_t        ht_rsp_entry,
  // secret source
  output logic             sec_take,
  input  logic [127:0]     sec_value,
  // crypto engine
  output logic             eng_start,
  output logic             eng_decrypt,
  output len_t             eng_nwords,
  output logic [127:0]     eng_iv,
  output logic [127:0]     eng_secret,
  output logic             eng_in_valid,
  input  logic             eng_in_ready,
  output word_t            eng_in_data,
  input  logic             eng_out_valid,
  output logic             eng_out_ready,
  input  word_t            eng_out_data,
  input  logic             eng_busy,
  input  logic             eng_done,
  input  logic [127:0]     eng_mac,
  // host memory interface
  output logic             hm_cmd_valid,
  input  logic             hm_cmd_ready,
  output logic             hm_cmd_write,
  output haddr_t           hm_cmd_addr,
  output len_t             hm_cmd_nwords,
  output logic             hm_wr_valid,
  input  logic             hm_wr_ready,
  output word_t            hm_wr_data,
  input  logic             hm_rd_valid,
  output logic             hm_rd_ready,
  input  word_t            hm_rd_data,
  // statistics
  output logic [31:0]      stat_puts,
  output logic [31:0]      stat_gets,
  output logic [31:0]      stat_inline,
  output logic [31:0]      stat_mac_fail,
  output logic [31:0]      stat_reuse,
  output logic [31:0]      stat_overlap
);

  typedef enum logic [3:0] {
    S_IDLE, S_PUT_RUN, S_PUT_COMMIT, S_PUT_TBL, S_PUT_WR,
    S_GET_LK, S_GET_RD, S_GET_DEC, S_RSP_HDR, S_RSP_DATA
  } state_e;

  state_e           state;
  logic [KEY_W-1:0] key_q;
  len_t             n_q;
  logic             src_q, inl_q;
  logic [127:0]     sec_q, iv_q, mac_q;
  logic [63:0]      nonce;
  haddr_t           alloc_ptr;
  kvs_status_e      status_q;
  len_t             rsp_n;

  // lookup result
  logic             lk_done, lk_hit;
  logic [IW-1:0]    lk_idx;
  ht_entry_t        lk_entry, ent_q;

  // data movement
  logic             eng_fin, inl_got, hm_issued;
  word_t            inl_word;
  word_t            vbuf [MAX_WORDS];
  len_t             wcnt, xcnt;       // words into vbuf, words moved out

  logic hdr_take, is_put, is_inl;
  assign is_put   = (req_beat.op == OP_PUT);
  assign is_inl   = (req_beat.nwords == len_t'(1));
  assign hdr_take = (state == S_IDLE) && req_valid && req_ready;

  // ---- requests
  always_comb begin
    req_ready = 1'b0;
    unique case (state)
      S_IDLE:    req_ready = ht_cmd_ready && !eng_busy && hm_cmd_ready;
      S_PUT_RUN: req_ready = inl_q ? !inl_got : eng_in_ready;
      default:   req_ready = 1'b0;
    endcase
  end

  // ---- secret and engine
  assign sec_take    = hdr_take && is_put;
  assign eng_start   = (hdr_take && is_put && !is_inl) || (state == S_GET_RD && xcnt == len_t'(2) && !eng_busy && !eng_fin);
  assign eng_decrypt = (state != S_IDLE);
  assign eng_nwords  = (state == S_IDLE) ? req_beat.nwords : n_q;
  assign eng_iv      = (state == S_IDLE) ? {nonce, 64'h0} : iv_q;
  assign eng_secret  = (state == S_IDLE) ? sec_value : lk_entry.secret;

  always_comb begin
    eng_in_valid = 1'b0;
    eng_in_data  = req_beat.data;
    hm_rd_ready  = 1'b0;
    if (state == S_PUT_RUN && !inl_q) begin
      eng_in_valid = req_valid;
    end else if (state == S_GET_RD) begin
      hm_rd_ready  = (xcnt < len_t'(2));
    end else if (state == S_GET_DEC) begin
      eng_in_valid = hm_rd_valid;
      eng_in_data  = hm_rd_data;
      hm_rd_ready  = eng_in_ready;
    end
  end
  assign eng_out_ready = 1'b1;

  // ---- table commands
  ht_entry_t new_ent;
  logic      need_alloc, host_full;
  logic [HOST_ADDR_W:0] alloc_end;

  always_comb begin
    new_ent        = '0;
    new_ent.key    = key_q;
    new_ent.inl    = inl_q;
    new_ent.nwords = n_q;
    new_ent.secret = sec_q;
    new_ent.inl_val = inl_q ? inl_word : '0;
    need_alloc     = 1'b0;
    if (lk_hit) begin
      new_ent.ptr = lk_entry.ptr;
      new_ent.cap = lk_entry.cap;
      need_alloc  = !inl_q && (lk_entry.cap < n_q);
    end else begin
      need_alloc  = !inl_q;
    end
    alloc_end = (HOST_ADDR_W+1)'(alloc_ptr) + ((HOST_ADDR_W+1)'(n_q) + (HOST_ADDR_W+1)'(HDR_WORDS)) * 16;
    host_full = need_alloc && (alloc_end > HOST_BYTES);
    if (need_alloc) begin
      new_ent.ptr = alloc_ptr;
      new_ent.cap = n_q;
    end
  end

  always_comb begin
    ht_cmd_valid = 1'b0;
    ht_cmd_op    = HT_LOOKUP;
    ht_cmd_key   = req_beat.data;
    ht_cmd_idx   = lk_idx;
    ht_cmd_entry = new_ent;
    if (state == S_IDLE) begin
      ht_cmd_valid = hdr_take;
    end else if (state == S_PUT_COMMIT) begin
      ht_cmd_valid = !host_full;
      ht_cmd_op    = lk_hit ? HT_UPDATE : HT_INSERT;
      ht_cmd_key   = key_q;
    end
  end

  // ---- host memory
  always_comb begin
    hm_cmd_valid  = 1'b0;
    hm_cmd_write  = (state == S_PUT_WR);
    hm_cmd_addr   = ent_q.ptr;
    hm_cmd_nwords = n_q + len_t'(HDR_WORDS);
    hm_wr_valid   = 1'b0;
    hm_wr_data    = vbuf[6'(xcnt - len_t'(HDR_WORDS))];
    if (xcnt == '0)      hm_wr_data = iv_q;
    else if (xcnt == 1)  hm_wr_data = mac_q;
    if (state == S_PUT_WR) begin
      hm_cmd_valid = !hm_issued;
      hm_wr_valid  = hm_issued && (xcnt < n_q + len_t'(HDR_WORDS));
    end else if (state == S_GET_RD) begin
      hm_cmd_valid = !hm_issued;
    end
  end

  // ---- responses
  always_comb begin
    rsp_valid       = (state == S_RSP_HDR) || (state == S_RSP_DATA);
    rsp_src         = src_q;
    rsp_beat        = '0;
    rsp_beat.status = status_q;
    rsp_beat.nwords = rsp_n;
    if (state == S_RSP_HDR) begin
      rsp_beat.data = key_q;
      rsp_beat.last = (rsp_n == '0);
    end else begin
      rsp_beat.data = inl_q ? inl_word : vbuf[6'(xcnt)];
      rsp_beat.last = (xcnt == rsp_n - 1'b1);
    end
  end

  // ---- value buffer
  always_ff @(posedge clk) begin
    if (eng_out_valid && eng_out_ready) vbuf[wcnt[5:0]] <= eng_out_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      key_q     <= '0;
      n_q       <= '0;
      src_q     <= 1'b0;
      inl_q     <= 1'b0;
      sec_q     <= '0;
      iv_q      <= '0;
      mac_q     <= '0;
      nonce     <= '0;
      alloc_ptr <= HOST_BASE;
      status_q  <= ST_OK;
      rsp_n     <= '0;
      lk_done   <= 1'b0;
      lk_hit    <= 1'b0;
      lk_idx    <= '0;
      lk_entry  <= '0;
      ent_q     <= '0;
      eng_fin   <= 1'b0;
      inl_got   <= 1'b0;
      hm_issued <= 1'b0;
      inl_word  <= '0;
      wcnt      <= '0;
      xcnt      <= '0;
      stat_puts <= '0;
      stat_gets <= '0;
      stat_inline   <= '0;
      stat_mac_fail <= '0;
      stat_reuse    <= '0;
      stat_overlap  <= '0;
    end else begin
      if (eng_out_valid && eng_out_ready) wcnt <= wcnt + 1'b1;
      if (ht_rsp_valid && (state == S_PUT_RUN || state == S_GET_LK)) begin
        lk_done  <= 1'b1;
        lk_hit   <= ht_rsp_hit;
        lk_idx   <= ht_rsp_idx;
        lk_entry <= ht_rsp_entry;
      end
      if (eng_done) begin
        eng_fin <= 1'b1;
        mac_q   <= (state == S_PUT_RUN) ? eng_mac : mac_q;
      end
      if (state == S_PUT_RUN && !lk_done && eng_busy) stat_overlap <= stat_overlap + 1'b1;

      unique case (state)
        S_IDLE: if (hdr_take) begin
          key_q     <= req_beat.data;
          n_q       <= req_beat.nwords;
          src_q     <= req_src;
          inl_q     <= is_inl;
          lk_done   <= 1'b0;
          eng_fin   <= 1'b0;
          inl_got   <= 1'b0;
          hm_issued <= 1'b0;
          wcnt      <= '0;
          xcnt      <= '0;
          if (is_put) begin
            sec_q     <= sec_value;
            iv_q      <= {nonce, 64'h0};
            nonce     <= nonce + 1'b1;
            stat_puts <= stat_puts + 1'b1;
            if (is_inl) stat_inline <= stat_inline + 1'b1;
            state     <= S_PUT_RUN;
          end else begin
            stat_gets <= stat_gets + 1'b1;
            state     <= S_GET_LK;
          end
        end

        S_PUT_RUN: begin
          if (inl_q && req_valid && !inl_got) begin
            inl_word <= req_beat.data;
            inl_got  <= 1'b1;
          end
          if (lk_done && (inl_q ? inl_got : eng_fin)) state <= S_PUT_COMMIT;
        end

        S_PUT_COMMIT: begin
          if (host_full) begin
            status_q <= ST_FULL;
            rsp_n    <= '0;
            state    <= S_RSP_HDR;
          end else if (ht_cmd_ready) begin
            ent_q <= new_ent;
            if (need_alloc) alloc_ptr <= haddr_t'(alloc_end);
            else if (!inl_q) stat_reuse <= stat_reuse + 1'b1;
            state <= S_PUT_TBL;
          end
        end

        S_PUT_TBL: if (ht_rsp_valid) begin
          rsp_n <= '0;
          if (ht_rsp_full) begin
            status_q <= ST_FULL;
            state    <= S_RSP_HDR;
          end else begin
            status_q <= ST_OK;
            state    <= inl_q ? S_RSP_HDR : S_PUT_WR;
          end
        end

        S_PUT_WR: begin
          if (hm_cmd_valid && hm_cmd_ready) hm_issued <= 1'b1;
          if (hm_wr_valid && hm_wr_ready) xcnt <= xcnt + 1'b1;
          if (hm_issued && xcnt == n_q + len_t'(HDR_WORDS) && hm_cmd_ready) begin
            xcnt  <= '0;
            state <= S_RSP_HDR;
          end
        end

        S_GET_LK: if (ht_rsp_valid) begin
          if (!ht_rsp_hit) begin
            status_q <= ST_NOT_FOUND;
            rsp_n    <= '0;
            state    <= S_RSP_HDR;
          end else if (ht_rsp_entry.inl) begin
            status_q <= ST_OK;
            rsp_n    <= len_t'(1);
            inl_q    <= 1'b1;
            inl_word <= ht_rsp_entry.inl_val;
            state    <= S_RSP_HDR;
          end else begin
            n_q   <= ht_rsp_entry.nwords;
            ent_q <= ht_rsp_entry;
            state <= S_GET_RD;
          end
        end

        S_GET_RD: begin
          if (hm_cmd_valid && hm_cmd_ready) hm_issued <= 1'b1;
          if (hm_rd_valid && hm_rd_ready) begin
            xcnt <= xcnt + 1'b1;
            if (xcnt == '0) iv_q  <= hm_rd_data;
            else            mac_q <= hm_rd_data;
          end
          if (eng_start) state <= S_GET_DEC;
        end

        S_GET_DEC: if (eng_done) begin
          xcnt <= '0;
          if (eng_mac == mac_q) begin
            status_q <= ST_OK;
            rsp_n    <= n_q;
          end else begin
            status_q      <= ST_MAC_FAIL;
            rsp_n         <= '0;
            stat_mac_fail <= stat_mac_fail + 1'b1;
          end
          state <= S_RSP_HDR;
        end

        S_RSP_HDR: if (rsp_ready) begin
          xcnt  <= '0;
          state <= (rsp_n == '0) ? S_IDLE : S_RSP_DATA;
        end

        S_RSP_DATA: if (rsp_ready) begin
          xcnt <= xcnt + 1'b1;
          if (xcnt == rsp_n - 1'b1) state <= S_IDLE;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // A request header names a value of 1..MAX_WORDS words.
  assert property (@(posedge clk) disable iff (!rst_n)
                   hdr_take && is_put |-> req_beat.nwords != '0 && req_beat.nwords <= len_t'(MAX_WORDS));

endmodule
