// AES-128 block encryption core, used as the keystream source of the
// AES-CTR value encryption.
//
// Iterative: one round per clock, the round key is expanded on the fly
// next to the state, so no key schedule is stored. On a start pulse (taken
// only while not busy) the core latches pt XOR key; rounds 1..10 follow in
// the next ten cycles and done pulses in the cycle ct becomes valid, ten
// cycles after start. ct holds its value until the next start. The cipher
// itself is the standard one; the iterative structure is this design's
// choice.
module aes128_core
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] key,
  input  logic [127:0] pt,
  output logic         busy,
  output logic         done,
  output logic [127:0] ct
);

  logic [127:0] state, rkey;
  logic [7:0]   rcon;
  logic [3:0]   round;        // round about to be applied, 1..10

  logic [127:0] rk_next, st_next;

  always_comb begin
    rk_next = key_step(rkey, rcon);
    st_next = sub_shift(state);
    if (round != 4'd10) st_next = mix_columns(st_next);
    st_next = st_next ^ rk_next;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= '0;
      rkey  <= '0;
      rcon  <= 8'h01;
      round <= 4'd0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          state <= pt ^ key;
          rkey  <= key;
          rcon  <= 8'h01;
          round <= 4'd1;
          busy  <= 1'b1;
        end
      end else begin
        state <= st_next;
        rkey  <= rk_next;
        rcon  <= xtime(rcon);
        round <= round + 4'd1;
        if (round == 4'd10) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign ct = state;

endmodule
