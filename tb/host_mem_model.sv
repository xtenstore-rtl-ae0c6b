// Behavioural model of host memory behind the PCIe DMA path, for
// testbenches only: a sparse word store addressed in 16-byte words.
// Requests are accepted with a random stall; read data return in order
// after LAT cycles. Words never written read as a pattern derived from the
// address. A testbench may read or overwrite words through the peek/poke
// functions, which is how tampering by untrusted software is modelled.
module host_mem_model #(
  parameter int unsigned LAT       = 6,
  parameter int unsigned STALL_PCT = 20
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                req_valid,
  output logic                req_ready,
  input  logic                req_write,
  input  xts_pkg::haddr_t     req_addr,
  input  xts_pkg::word_t      req_wdata,
  output logic                rsp_valid,
  output xts_pkg::word_t      rsp_data
);
  import xts_pkg::*;

  word_t mem [haddr_t];
  word_t pipe_d [LAT];
  logic  pipe_v [LAT];
  int    writes = 0, reads = 0;

  function automatic word_t peek(input haddr_t a);
    return mem.exists(a) ? mem[a] : {4{32'(a) ^ 32'h5a5a0000}};
  endfunction

  function automatic void poke(input haddr_t a, input word_t d);
    mem[a] = d;
  endfunction

  always @(posedge clk) req_ready <= ($urandom_range(0, 99) >= STALL_PCT);

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) begin pipe_v[i] <= 1'b0; pipe_d[i] <= '0; end
    end else begin
      for (int i = LAT - 1; i > 0; i--) begin pipe_v[i] <= pipe_v[i-1]; pipe_d[i] <= pipe_d[i-1]; end
      pipe_v[0] <= 1'b0;
      if (req_valid && req_ready) begin
        if (req_write) begin
          mem[req_addr] = req_wdata;
          writes++;
        end else begin
          pipe_v[0] <= 1'b1;
          pipe_d[0] <= peek(req_addr);
          reads++;
        end
      end
    end
  end

  assign rsp_valid = pipe_v[LAT-1];
  assign rsp_data  = pipe_d[LAT-1];
endmodule
