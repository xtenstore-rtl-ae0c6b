// SHA-256 compression core, the hash behind the value MAC.
//
// Iterative: one of the 64 rounds per clock. The message schedule is a
// 16-word shift register loaded from the block at start, so the caller's
// block buffer is free again right after the start pulse. With first=1 the
// chaining value starts from the standard initial hash, otherwise from the
// digest of the previous block, so a multi-block message is hashed by
// starting its blocks in order. done pulses 65 cycles after start (64
// rounds plus the final addition) and digest then holds the chaining value.
// Padding is the caller's job.
module sha256_core (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         first,
  input  logic [511:0] block,    // word 0 in the top 32 bits
  output logic         busy,
  output logic         done,
  output logic [255:0] digest
);

  localparam logic [31:0] K [64] = '{
    32'h428a2f98, 32'h71374491, 32'hb5c0fbcf, 32'he9b5dba5, 32'h3956c25b, 32'h59f111f1, 32'h923f82a4, 32'hab1c5ed5,
    32'hd807aa98, 32'h12835b01, 32'h243185be, 32'h550c7dc3, 32'h72be5d74, 32'h80deb1fe, 32'h9bdc06a7, 32'hc19bf174,
    32'he49b69c1, 32'hefbe4786, 32'h0fc19dc6, 32'h240ca1cc, 32'h2de92c6f, 32'h4a7484aa, 32'h5cb0a9dc, 32'h76f988da,
    32'h983e5152, 32'ha831c66d, 32'hb00327c8, 32'hbf597fc7, 32'hc6e00bf3, 32'hd5a79147, 32'h06ca6351, 32'h14292967,
    32'h27b70a85, 32'h2e1b2138, 32'h4d2c6dfc, 32'h53380d13, 32'h650a7354, 32'h766a0abb, 32'h81c2c92e, 32'h92722c85,
    32'ha2bfe8a1, 32'ha81a664b, 32'hc24b8b70, 32'hc76c51a3, 32'hd192e819, 32'hd6990624, 32'hf40e3585, 32'h106aa070,
    32'h19a4c116, 32'h1e376c08, 32'h2748774c, 32'h34b0bcb5, 32'h391c0cb3, 32'h4ed8aa4a, 32'h5b9cca4f, 32'h682e6ff3,
    32'h748f82ee, 32'h78a5636f, 32'h84c87814, 32'h8cc70208, 32'h90befffa, 32'ha4506ceb, 32'hbef9a3f7, 32'hc67178f2
  };

  localparam logic [255:0] H_INIT = {
    32'h6a09e667, 32'hbb67ae85, 32'h3c6ef372, 32'ha54ff53a,
    32'h510e527f, 32'h9b05688c, 32'h1f83d9ab, 32'h5be0cd19
  };

  function automatic logic [31:0] rotr(input logic [31:0] x, input int n);
    return (x >> n) | (x << (32 - n));
  endfunction

  logic [31:0]  w [16];
  logic [31:0]  a, b, c, d, e, f, g, h;
  logic [255:0] hv;          // chaining value
  logic [6:0]   t;           // round index, 64 = final addition
  logic         run;

  logic [31:0] s0, s1, ch, maj, t1, t2, ws0, ws1, w_new;

  always_comb begin
    s1    = rotr(e, 6) ^ rotr(e, 11) ^ rotr(e, 25);
    ch    = (e & f) ^ (~e & g);
    t1    = h + s1 + ch + K[t[5:0]] + w[0];
    s0    = rotr(a, 2) ^ rotr(a, 13) ^ rotr(a, 22);
    maj   = (a & b) ^ (a & c) ^ (b & c);
    t2    = s0 + maj;
    ws0   = rotr(w[1], 7) ^ rotr(w[1], 18) ^ (w[1] >> 3);
    ws1   = rotr(w[14], 17) ^ rotr(w[14], 19) ^ (w[14] >> 10);
    w_new = ws1 + w[9] + ws0 + w[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run  <= 1'b0;
      done <= 1'b0;
      t    <= '0;
      hv   <= H_INIT;
      {a, b, c, d, e, f, g, h} <= '0;
      for (int i = 0; i < 16; i++) w[i] <= '0;
    end else begin
      done <= 1'b0;
      if (!run) begin
        if (start) begin
          for (int i = 0; i < 16; i++) w[i] <= block[511 - 32*i -: 32];
          if (first) begin
            hv <= H_INIT;
            {a, b, c, d, e, f, g, h} <= H_INIT;
          end else begin
            {a, b, c, d, e, f, g, h} <= hv;
          end
          t   <= '0;
          run <= 1'b1;
        end
      end else if (t == 7'd64) begin
        hv   <= {hv[255:224] + a, hv[223:192] + b, hv[191:160] + c, hv[159:128] + d,
                 hv[127:96]  + e, hv[95:64]    + f, hv[63:32]    + g, hv[31:0]     + h};
        run  <= 1'b0;
        done <= 1'b1;
      end else begin
        h <= g;
        g <= f;
        f <= e;
        e <= d + t1;
        d <= c;
        c <= b;
        b <= a;
        a <= t1 + t2;
        for (int i = 0; i < 15; i++) w[i] <= w[i+1];
        w[15] <= w_new;
        t <= t + 7'd1;
      end
    end
  end

  assign busy   = run;
  assign digest = hv;

endmodule
