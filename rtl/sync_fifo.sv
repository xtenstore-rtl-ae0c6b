// Synchronous FIFO with valid/ready on both sides, used for the request,
// response and host read-data streams.
//
// A circular buffer of DEPTH entries (DEPTH a power of two) with read and
// write pointers one bit wider than the index, so full and empty are told
// apart by the extra bit. rd_data shows the head entry whenever rd_valid is
// high; a push happens on wr_valid && wr_ready, a pop on rd_valid &&
// rd_ready, both in the same cycle if wanted. count gives the fill level.
// Depths are this design's choice.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_valid,
  output logic                     wr_ready,
  input  logic [WIDTH-1:0]         wr_data,
  output logic                     rd_valid,
  input  logic                     rd_ready,
  output logic [WIDTH-1:0]         rd_data,
  output logic [$clog2(DEPTH):0]   count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wp, rp;

  assign count    = wp - rp;
  assign wr_ready = (count != (AW+1)'(DEPTH));
  assign rd_valid = (count != '0);
  assign rd_data  = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (wr_valid && wr_ready) mem[wp[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (wr_valid && wr_ready) wp <= wp + 1'b1;
      if (rd_valid && rd_ready) rp <= rp + 1'b1;
    end
  end

  initial assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("sync_fifo: DEPTH must be a power of two");

endmodule
