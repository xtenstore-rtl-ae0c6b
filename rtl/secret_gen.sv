// Per-PUT secret source.
//
// Every PUT stores a fresh 128-bit secret next to its key; the secret is
// mixed into the MAC of the value, so a stale or forged record in host
// memory fails verification. The store only requires that secrets are
// unpredictable to software and never leave the chip. This block stands in
// for a true random source with an xorshift128 generator (period 2^128-1):
// 'secret' shows the current value, and a 'take' pulse moves to the next
// one at the following clock edge. A reseed pulse loads a new nonzero
// state (for example from an on-chip entropy source). The generator and
// its seeding are this design's choice.
module secret_gen #(
  parameter logic [127:0] SEED = 128'h243f6a88_85a308d3_13198a2e_03707344
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         take,
  input  logic         reseed,
  input  logic [127:0] seed,
  output logic [127:0] secret
);

  logic [31:0] x, y, z, w;

  function automatic logic [127:0] step(input logic [127:0] s);
    logic [31:0] a, b, c, d, t;
    {a, b, c, d} = s;
    t = a ^ (a << 11);
    return {b, c, d, d ^ (d >> 19) ^ t ^ (t >> 8)};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {x, y, z, w} <= (SEED == '0) ? 128'h1 : SEED;
    end else if (reseed) begin
      {x, y, z, w} <= (seed == '0) ? 128'h1 : seed;
    end else if (take) begin
      {x, y, z, w} <= step({x, y, z, w});
    end
  end

  assign secret = {x, y, z, w};

endmodule
