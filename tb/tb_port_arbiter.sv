// Self-checking test of port_arbiter: two random sources send multi-beat
// requests; checks that the beats of a request stay together, that every
// beat arrives in order with the right source tag, that both ports are
// served alternately under contention, and that responses are steered to
// the tagged port with its own backpressure.
module tb_port_arbiter;
  import xts_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] in_valid, in_ready, rsp_out_valid, rsp_out_ready;
  req_beat_t  in_beat [2];
  logic       out_valid, out_ready, out_src, rsp_in_valid, rsp_in_ready, rsp_in_src;
  req_beat_t  out_beat;
  rsp_beat_t  rsp_in_beat, rsp_out_beat [2];
  int checks = 0, failures = 0, switches = 0;

  port_arbiter dut (.*);

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // each source numbers its beats; data = {port, request, beat}
  int req_no [2] = '{0, 0}, beat_no [2] = '{0, 0}, req_len [2] = '{1, 1};
  int exp_req [2] = '{0, 0}, exp_beat [2] = '{0, 0};
  logic in_req;  int cur_src;  int prev_src;  logic [1:0] acc;

  always_comb
    for (int p = 0; p < 2; p++) begin
      in_beat[p]        = '0;
      in_beat[p].op     = OP_PUT;
      in_beat[p].last   = (beat_no[p] == req_len[p] - 1);
      in_beat[p].data   = {32'(p), 32'(req_no[p]), 32'(beat_no[p]), 32'(req_len[p])};
    end

  initial begin
    in_valid = 0; out_ready = 0; in_req = 0; prev_src = 0;
    rsp_in_valid = 0; rsp_in_beat = '0; rsp_in_src = 0; rsp_out_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      for (int p = 0; p < 2; p++) if (!in_valid[p] || in_ready[p]) in_valid[p] = ($urandom_range(0, 99) < 80);
      out_ready = ($urandom_range(0, 99) < 70);
      rsp_in_valid = ($urandom_range(0, 1) == 1);
      rsp_in_src = 1'($urandom);
      rsp_in_beat = '0;
      rsp_in_beat.data = 128'($urandom);
      rsp_out_ready = 2'($urandom);
      #1;
      checks++;
      if (rsp_out_valid != (rsp_in_valid ? (2'b01 << rsp_in_src) : 2'b00) ||
          rsp_in_ready != rsp_out_ready[rsp_in_src] || rsp_out_beat[rsp_in_src] != rsp_in_beat) begin
        failures++; $display("response steering wrong at %0d", cyc);
      end
      if (out_valid && out_ready) begin
        int p;
        p = out_src;
        checks++;
        if (in_req && p != cur_src) begin failures++; $display("request of port %0d broken by port %0d", cur_src, p); end
        if (out_beat.data !== {32'(p), 32'(exp_req[p]), 32'(exp_beat[p]), 32'(req_len[p])}) begin
          failures++; $display("port %0d beat %h", p, out_beat.data);
        end
        if (!in_req && p != prev_src) switches++;
        if (!in_req) prev_src = p;
        in_req = !out_beat.last; cur_src = p;
        if (out_beat.last) begin exp_req[p]++; exp_beat[p] = 0; end else exp_beat[p]++;
      end
      acc = in_valid & in_ready;
      @(posedge clk);
      #1;
      for (int p = 0; p < 2; p++) if (acc[p]) begin
        if (beat_no[p] == req_len[p] - 1) begin beat_no[p] = 0; req_no[p]++; req_len[p] = $urandom_range(1, 5); end
        else beat_no[p]++;
      end
    end
    checks++;
    if (exp_req[0] < 50 || exp_req[1] < 50 || switches < 50) begin
      failures++; $display("served %0d/%0d requests, %0d switches", exp_req[0], exp_req[1], switches);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
