// Host memory interface: the DMA front end through which the engine reads
// and writes the 2nd-tier records held in host memory.
//
// A burst command (read or write, 16-byte aligned byte address, word count)
// is split into one request per 16-byte word at consecutive addresses. For
// a write, each request carries the next word of the wr_* stream. For a
// read, the data come back in request order on mem_rsp_*, which cannot be
// stalled; they land in an OUTSTANDING-deep FIFO and leave on rd_*. A read
// request is only issued while the words already requested but not yet
// taken by the consumer fit in that FIFO, so nothing is ever dropped.
// cmd_ready is high when no burst is in progress; the interface is idle
// again once every request is issued and, for a read, every word has been
// handed to the consumer. The request/response protocol toward the PCIe DMA
// is this design's choice.
module host_mem_if
  import xts_pkg::*;
#(
  parameter int unsigned OUTSTANDING = 8
) (
  input  logic   clk,
  input  logic   rst_n,
  // burst commands
  input  logic   cmd_valid,
  output logic   cmd_ready,
  input  logic   cmd_write,
  input  haddr_t cmd_addr,
  input  len_t   cmd_nwords,
  // write data
  input  logic   wr_valid,
  output logic   wr_ready,
  input  word_t  wr_data,
  // read data
  output logic   rd_valid,
  input  logic   rd_ready,
  output word_t  rd_data,
  // toward host memory
  output logic   mem_req_valid,
  input  logic   mem_req_ready,
  output logic   mem_req_write,
  output haddr_t mem_req_addr,
  output word_t  mem_req_wdata,
  input  logic   mem_rsp_valid,
  input  word_t  mem_rsp_data
);

  localparam int unsigned CW = $clog2(OUTSTANDING) + 1;

  logic   active, write_q;
  haddr_t addr_q;
  len_t   left_req;     // requests still to issue
  len_t   left_rd;      // read words still to hand out
  logic [CW-1:0] credits_used;  // reads issued and not yet popped

  logic fifo_wr_ready;
  logic [CW-1:0] fifo_count;
  logic issue, pop;

  assign cmd_ready     = !active;
  assign mem_req_write = write_q;
  assign mem_req_addr  = addr_q;
  assign mem_req_wdata = wr_data;
  assign mem_req_valid = active && (left_req != '0) &&
                         (write_q ? wr_valid : (credits_used < CW'(OUTSTANDING)));
  assign wr_ready      = active && write_q && (left_req != '0) && mem_req_ready;
  assign issue         = mem_req_valid && mem_req_ready;
  assign pop           = rd_valid && rd_ready;

  sync_fifo #(.WIDTH(WORD_W), .DEPTH(OUTSTANDING)) u_rdbuf (
    .clk, .rst_n,
    .wr_valid (mem_rsp_valid),
    .wr_ready (fifo_wr_ready),
    .wr_data  (mem_rsp_data),
    .rd_valid (rd_valid),
    .rd_ready (rd_ready),
    .rd_data  (rd_data),
    .count    (fifo_count)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active       <= 1'b0;
      write_q      <= 1'b0;
      addr_q       <= '0;
      left_req     <= '0;
      left_rd      <= '0;
      credits_used <= '0;
    end else begin
      if (!active) begin
        if (cmd_valid && cmd_nwords != '0) begin
          active   <= 1'b1;
          write_q  <= cmd_write;
          addr_q   <= cmd_addr;
          left_req <= cmd_nwords;
          left_rd  <= cmd_write ? '0 : cmd_nwords;
        end
      end else begin
        if (issue) begin
          addr_q   <= addr_q + haddr_t'(16);   // one 16-byte word
          left_req <= left_req - 1'b1;
        end
        if (pop) left_rd <= left_rd - 1'b1;
        if ((left_req == '0 || (issue && left_req == len_t'(1))) &&
            (left_rd == '0 || (pop && left_rd == len_t'(1))))
          active <= 1'b0;
      end
      credits_used <= credits_used + CW'(issue && !write_q) - CW'(pop);
    end
  end

  // Host reads never overrun the read buffer.
  assert property (@(posedge clk) disable iff (!rst_n) mem_rsp_valid |-> fifo_wr_ready);
  assert property (@(posedge clk) disable iff (!rst_n) fifo_count <= credits_used);

endmodule
