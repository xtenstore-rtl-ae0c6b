// Arbiter between the two request sources of the store: port 0 is the
// FPGA's own network interface (clients talking to the store directly),
// port 1 is the PCIe path on which the host enclave places requests.
//
// Requests are multi-beat (header, then value words for a PUT). The arbiter
// grants whole requests: once the first beat of a request passes, the same
// port stays granted until its beat with last=1 has passed. Between
// requests the grant alternates (round-robin) when both ports wait. Each
// beat leaves with out_src naming its port; responses come back tagged the
// same way and are steered to that port's response stream, with
// backpressure from that port only. The grant choice is combinational on
// in_valid, so a waiting request passes in the cycle it is offered.
// Round-robin per request is this design's choice.
module port_arbiter
  import xts_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // request side
  input  logic [1:0] in_valid,
  output logic [1:0] in_ready,
  input  req_beat_t  in_beat [2],
  output logic       out_valid,
  input  logic       out_ready,
  output req_beat_t  out_beat,
  output logic       out_src,
  // response side
  input  logic       rsp_in_valid,
  output logic       rsp_in_ready,
  input  rsp_beat_t  rsp_in_beat,
  input  logic       rsp_in_src,
  output logic [1:0] rsp_out_valid,
  input  logic [1:0] rsp_out_ready,
  output rsp_beat_t  rsp_out_beat [2]
);

  logic locked, cur, last_grant;
  logic sel;

  always_comb begin
    if (locked)                  sel = cur;
    else if (in_valid[!last_grant]) sel = !last_grant;
    else                         sel = last_grant;
  end

  assign out_valid = in_valid[sel];
  assign out_beat  = in_beat[sel];
  assign out_src   = sel;
  always_comb begin
    in_ready      = '0;
    in_ready[sel] = out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked     <= 1'b0;
      cur        <= 1'b0;
      last_grant <= 1'b1;
    end else if (out_valid && out_ready) begin
      locked <= !out_beat.last;
      cur    <= sel;
      if (!locked) last_grant <= sel;
    end
  end

  always_comb begin
    rsp_out_valid             = '0;
    rsp_out_valid[rsp_in_src] = rsp_in_valid;
  end
  assign rsp_in_ready    = rsp_out_ready[rsp_in_src];
  assign rsp_out_beat[0] = rsp_in_beat;
  assign rsp_out_beat[1] = rsp_in_beat;

endmodule
