// Self-checking test of ctr_mac_engine. Expected ciphertext words and MACs
// were computed independently with a reference AES and SHA-256 for
// key_v = 0x000102..0f * (v+1), iv_v = (0x123456789abcdef0 + v) << 64,
// secret_v = 0xfedcba98765432100123456789abcdef ^ (v * 0x1111) and
// plaintext word i = {v, i, 0x9e3779b9*(i+1) mod 2^32, 0xdeadbeef ^ i},
// for value lengths 1..5 (all four padding cases) and 64 words. Each value
// is encrypted, then the ciphertext is fed back to be decrypted: the
// plaintext must come back with the same MAC. Input and output stall at
// random; the cycle count of an unstalled 64-word value is checked against
// the hash-bound estimate.
module tb_ctr_mac_engine;
  import xts_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         start, decrypt, in_valid, in_ready, out_valid, out_ready, busy, done;
  len_t         nwords;
  logic [127:0] key, iv, secret, mac;
  word_t        in_data, out_data;
  int checks = 0, failures = 0;

  ctr_mac_engine dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct packed { logic [6:0] n; logic [127:0] mac, ct0, ctl; } vec_t;
  localparam int NV = 6;
  localparam vec_t V [NV] = '{
    '{7'd1, 128'hde3839264e0d3f05a4eb5729ba79c0ba, 128'hb631ce6b2420286d2283699128d9acc9, 128'hb631ce6b2420286d2283699128d9acc9},
    '{7'd2, 128'hba60525dda853e022d6f954dbfc8c19a, 128'h1bee08996394d2b2efc469227a08b4cf, 128'h5a0b1b680e262f5386f7307fbface693},
    '{7'd3, 128'hb0edcda2231c1b8bfc8a96892a787d16, 128'h6c17b5da77e2fc7fed5142b039b502b5, 128'h7c493c3725025b4acf43d0b2a875a8a2},
    '{7'd4, 128'h33a32298e1ba7de9e1e82bc29a939df4, 128'h35bf7e6a286dd263ca3c03e4b2501fd2, 128'he8e9d506964a05e29deaf3bc393cde17},
    '{7'd5, 128'h286ebb3b5cddd1564dbf3bf405e4325a, 128'h9e7aac52b7bffaef07864fe10b6c6079, 128'h5a8551e54de96f1a27d50f7a6b033e58},
    '{7'd64, 128'haa9293f5d9bacf10b134a4659f052c08, 128'h6219f2c833fb48a837db0ad05f3756d0, 128'h6d26b3d54b5c2eee6702be91660afc89}};

  function automatic word_t pt_word(input int v, input int i);
    return {32'(v), 32'(i), 32'h9e3779b9 * 32'(i + 1), 32'hdeadbeef ^ 32'(i)};
  endfunction

  word_t src [$], res [$];

  task automatic run(input int v, input logic dec, input int stall_pct, output int cycles);
    int n, sent, got;
    n = V[v].n;
    res.delete();
    @(negedge clk);
    start = 1; decrypt = dec; nwords = len_t'(n);
    key = 128'(128'h000102030405060708090a0b0c0d0e0f * 128'(v + 1));
    iv = {64'h123456789abcdef0 + 64'(v), 64'h0};
    secret = 128'hfedcba98765432100123456789abcdef ^ 128'(v * 32'h1111);
    @(negedge clk);
    start = 0;
    cycles = 1; sent = 0; got = 0;
    while (!done) begin
      in_valid  = (sent < n) && ($urandom_range(0, 99) >= stall_pct);
      in_data   = (sent < n) ? src[sent] : '0;
      out_ready = ($urandom_range(0, 99) >= stall_pct);
      #1;
      if (in_valid && in_ready) sent++;
      if (out_valid && out_ready) begin res.push_back(out_data); got++; end
      @(negedge clk);
      cycles++;
      in_valid = 0;
    end
    checks++;
    if (mac !== V[v].mac || got != n) begin failures++; $display("v%0d dec %0d: mac %h want %h, %0d words", v, dec, mac, V[v].mac, got); end
  endtask

  initial begin
    int cyc;
    start = 0; decrypt = 0; nwords = '0; key = '0; iv = '0; secret = '0;
    in_valid = 0; in_data = '0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int v = 0; v < NV; v++) begin
      src.delete();
      for (int i = 0; i < V[v].n; i++) src.push_back(pt_word(v, i));
      run(v, 1'b0, (v == NV - 1) ? 0 : 30, cyc);
      checks++;
      if (res[0] !== V[v].ct0 || res[res.size() - 1] !== V[v].ctl) begin failures++; $display("v%0d: ciphertext wrong", v); end
      if (v == NV - 1) begin
        // 66 words of message plus 2 padding words = 17 blocks of 66 cycles
        checks++;
        if (cyc < 17 * 66 || cyc > 17 * 66 + 60) begin failures++; $display("64-word value took %0d cycles", cyc); end
        $display("64-word value: %0d cycles", cyc);
      end
      src = res;
      run(v, 1'b1, 30, cyc);
      for (int i = 0; i < V[v].n; i++) begin
        checks++;
        if (res[i] !== pt_word(v, i)) begin failures++; $display("v%0d: decrypted word %0d wrong", v, i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
