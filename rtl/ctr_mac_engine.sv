// Crypto engine for one value: AES-CTR encryption or decryption plus the
// MAC that binds the ciphertext to the key's current secret.
//
// The value is a stream of nwords 16-byte words. Word i is XORed with the
// keystream block AES_key(iv + i); the same keystream serves both
// directions, only the MAC input differs (for encryption the result, for
// decryption the input, so the MAC is always taken over ciphertext). The
// MAC is the upper 128 bits of SHA-256(secret || iv || ciphertext), with
// the standard SHA-256 padding and bit length appended here. Because the
// secret is renewed by every PUT and never leaves the chip, a record
// replayed or forged in host memory cannot carry a valid MAC.
//
// Structure: one aes128_core makes keystream blocks one ahead of need; the
// message words (secret, iv, ciphertext, padding) are gathered four at a
// time into a 512-bit block handed to one sha256_core, which copies it at
// start, so gathering the next block overlaps the compression. Streams are
// valid/ready; out_valid does not depend on out_ready. A start pulse is
// taken while busy is low; done pulses once with mac valid (held until the
// next start). Time per value is about 66 cycles per 64-byte block of
// message, i.e. roughly 16.5 cycles per word plus ~80 cycles of fill and
// final block. AES-128, SHA-256 and the truncation to 128 bits are this
// design's choices; the store only specifies AES-CTR and a hash MAC over
// secret, IV/counter and encrypted value.
module ctr_mac_engine
  import xts_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         decrypt,
  input  len_t         nwords,
  input  logic [127:0] key,
  input  logic [127:0] iv,
  input  logic [127:0] secret,
  input  logic         in_valid,
  output logic         in_ready,
  input  word_t        in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output word_t        out_data,
  output logic         busy,
  output logic         done,
  output logic [127:0] mac
);

  typedef enum logic [2:0] {P_IDLE, P_SEC, P_IV, P_DATA, P_PAD, P_FLUSH, P_WAIT} phase_e;

  phase_e       phase;
  logic [127:0] key_q, iv_q, sec_q;
  len_t         n_q, blk_req, data_cnt;
  logic         dec_q;

  // keystream
  logic         aes_start, aes_busy, aes_done, aes_inflight, ks_valid;
  logic [127:0] aes_ct, ks_q;

  // message gathering and hashing
  logic [511:0] blk;
  logic [2:0]   blk_cnt;
  logic         sha_first, sha_start, sha_busy, sha_done, first_pad;
  logic [255:0] digest;
  logic [63:0]  bit_len;

  logic         push_ok, push, xfer;
  word_t        push_word, ct_word;

  aes128_core u_aes (
    .clk, .rst_n, .start(aes_start), .key(key_q), .pt(iv_q + 128'(blk_req)),
    .busy(aes_busy), .done(aes_done), .ct(aes_ct)
  );

  sha256_core u_sha (
    .clk, .rst_n, .start(sha_start), .first(sha_first), .block(blk),
    .busy(sha_busy), .done(sha_done), .digest(digest)
  );

  assign busy      = (phase != P_IDLE);
  assign aes_start = busy && !ks_valid && !aes_inflight && !aes_busy && (blk_req < n_q);
  assign sha_start = (blk_cnt == 3'd4) && !sha_busy;
  assign push_ok   = (blk_cnt != 3'd4);
  assign bit_len   = 64'(n_q + len_t'(2)) << 7;

  assign out_data  = in_data ^ ks_q;
  assign out_valid = (phase == P_DATA) && ks_valid && in_valid && push_ok;
  assign in_ready  = (phase == P_DATA) && ks_valid && out_ready && push_ok;
  assign xfer      = out_valid && out_ready;
  assign ct_word   = dec_q ? in_data : out_data;

  always_comb begin
    push      = 1'b0;
    push_word = '0;
    unique case (phase)
      P_SEC:  begin push = push_ok; push_word = sec_q; end
      P_IV:   begin push = push_ok; push_word = iv_q;  end
      P_DATA: begin push = xfer;    push_word = ct_word; end
      P_PAD:  begin
        push = push_ok;
        if (blk_cnt == 3'd3) push_word = {first_pad, 63'h0, bit_len};
        else                 push_word = {first_pad, 127'h0};
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase        <= P_IDLE;
      key_q        <= '0;
      iv_q         <= '0;
      sec_q        <= '0;
      n_q          <= '0;
      dec_q        <= 1'b0;
      blk_req      <= '0;
      data_cnt     <= '0;
      aes_inflight <= 1'b0;
      ks_valid     <= 1'b0;
      ks_q         <= '0;
      blk          <= '0;
      blk_cnt      <= '0;
      sha_first    <= 1'b1;
      first_pad    <= 1'b1;
      done         <= 1'b0;
      mac          <= '0;
    end else begin
      done <= 1'b0;

      // keystream: one block ahead
      if (aes_start) begin
        aes_inflight <= 1'b1;
        blk_req      <= blk_req + 1'b1;
      end
      if (aes_done) begin
        aes_inflight <= 1'b0;
        ks_valid     <= 1'b1;
        ks_q         <= aes_ct;
      end
      if (xfer) begin
        ks_valid <= 1'b0;
        data_cnt <= data_cnt + 1'b1;
      end

      // block gathering
      if (sha_start) begin
        blk_cnt   <= '0;
        sha_first <= 1'b0;
      end else if (push) begin
        blk[511 - 128*blk_cnt[1:0] -: 128] <= push_word;
        blk_cnt <= blk_cnt + 3'd1;
      end

      unique case (phase)
        P_IDLE: if (start) begin
          key_q     <= key;
          iv_q      <= iv;
          sec_q     <= secret;
          n_q       <= nwords;
          dec_q     <= decrypt;
          blk_req   <= '0;
          data_cnt  <= '0;
          ks_valid  <= 1'b0;
          blk_cnt   <= '0;
          sha_first <= 1'b1;
          first_pad <= 1'b1;
          phase     <= P_SEC;
        end
        P_SEC:  if (push) phase <= P_IV;
        P_IV:   if (push) phase <= (n_q == '0) ? P_PAD : P_DATA;
        P_DATA: if (xfer && data_cnt == n_q - 1'b1) phase <= P_PAD;
        P_PAD:  if (push) begin
          first_pad <= 1'b0;
          if (blk_cnt == 3'd3) phase <= P_FLUSH;
        end
        P_FLUSH: if (sha_start) phase <= P_WAIT;
        P_WAIT: if (sha_done) begin
          mac   <= digest[255:128];
          done  <= 1'b1;
          phase <= P_IDLE;
        end
        default: phase <= P_IDLE;
      endcase
    end
  end

  // The message block is never overwritten before the hash core took it.
  assert property (@(posedge clk) disable iff (!rst_n) push |-> !sha_start);

endmodule
