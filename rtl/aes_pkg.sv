// AES-128 helper functions: S-box, ShiftRows/SubBytes, MixColumns and one
// key-expansion step, on a 128-bit state whose most significant byte is
// byte 0 of the standard's column-major state.
//
// The S-box is not stored as numbers: SBOX_TBL is built at elaboration by a
// constant function from its definition, the multiplicative inverse in
// GF(2^8) mod x^8+x^4+x^3+x+1 followed by the affine map
// b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63.
package aes_pkg;

  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, x;
    p = 8'h00;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  function automatic logic [7:0] rotl8(input logic [7:0] a, input int n);
    return (a << n) | (a >> (8 - n));
  endfunction

  function automatic logic [2047:0] gen_sbox();
    logic [2047:0] t;
    logic [7:0]    inv, sq, b;
    for (int v = 0; v < 256; v++) begin
      // inverse = v^254 by square-and-multiply (0 maps to 0)
      inv = 8'h01;
      sq  = 8'(v);
      for (int e = 0; e < 8; e++) begin
        if (e != 0) inv = gmul(inv, sq);   // 254 = 0b11111110
        sq = gmul(sq, sq);
      end
      b = inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
      t[v*8 +: 8] = b;
    end
    return t;
  endfunction

  localparam logic [2047:0] SBOX_TBL = gen_sbox();

  function automatic logic [7:0] sbox(input logic [7:0] a);
    return SBOX_TBL[a*8 +: 8];
  endfunction

  // byte i of the state, i = row + 4*column
  function automatic logic [7:0] sbyte(input logic [127:0] s, input int i);
    return s[127 - 8*i -: 8];
  endfunction

  function automatic logic [127:0] sub_shift(input logic [127:0] s);
    logic [127:0] o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(r + 4*c) -: 8] = sbox(sbyte(s, r + 4*((c + r) % 4)));
    return o;
  endfunction

  function automatic logic [127:0] mix_columns(input logic [127:0] s);
    logic [127:0] o;
    logic [7:0]   a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = sbyte(s, 4*c);
      a1 = sbyte(s, 4*c + 1);
      a2 = sbyte(s, 4*c + 2);
      a3 = sbyte(s, 4*c + 3);
      o[127 - 8*(4*c)     -: 8] = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
      o[127 - 8*(4*c + 1) -: 8] = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
      o[127 - 8*(4*c + 2) -: 8] = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
      o[127 - 8*(4*c + 3) -: 8] = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
    end
    return o;
  endfunction

  // next round key from the current one and the round constant
  function automatic logic [127:0] key_step(input logic [127:0] k, input logic [7:0] rcon);
    logic [31:0] w0, w1, w2, w3, t;
    {w0, w1, w2, w3} = k;
    t  = {sbox(w3[23:16]), sbox(w3[15:8]), sbox(w3[7:0]), sbox(w3[31:24])} ^ {rcon, 24'h0};
    w0 = w0 ^ t;
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    return {w0, w1, w2, w3};
  endfunction

endpackage
