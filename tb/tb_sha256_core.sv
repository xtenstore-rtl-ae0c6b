// Self-checking test of sha256_core with the standard one-block ("abc")
// and two-block messages, the empty message, a 55-byte message (the
// longest that pads into one block) and a 100-byte two-block message;
// the last three were computed with an independent SHA-256. Checks the
// chained digest and the 65-cycle latency of each block.
module tb_sha256_core;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         start, first, busy, done;
  logic [511:0] block;
  logic [255:0] digest;
  int checks = 0, failures = 0;

  sha256_core dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_block(input logic [511:0] b, input logic f);
    int lat;
    @(negedge clk);
    block = b; first = f; start = 1'b1;
    @(negedge clk);
    start = 1'b0; block = '0;     // block is latched at start
    lat = 0;   // clock edges since the one that took start
    while (!done) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 65) begin failures++; $display("latency %0d, want 65", lat); end
  endtask

  initial begin
    start = 1'b0; first = 1'b0; block = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_block(512'h61626380000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000018, 1'b1);
    checks++;
    if (digest !== 256'hba7816bf8f01cfea414140de5dae2223b00361a396177a9cb410ff61f20015ad) begin
      failures++; $display("abc digest %h", digest);
    end
    run_block(512'h6162636462636465636465666465666765666768666768696768696a68696a6b696a6b6c6a6b6c6d6b6c6d6e6c6d6e6f6d6e6f706e6f70718000000000000000, 1'b1);
    run_block(512'h000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000001c0, 1'b0);
    checks++;
    if (digest !== 256'h248d6a61d20638b8e5c026930c3e6039a33ce45964ff2167f6ecedd419db06c1) begin
      failures++; $display("two-block digest %h", digest);
    end
    run_block(512'h80000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000, 1'b1);
    checks++;
    if (digest !== 256'he3b0c44298fc1c149afbf4c8996fb92427ae41e4649b934ca495991b7852b855) begin
      failures++; $display("empty digest %h", digest);
    end
    run_block(512'h0b30557a9fc4e90e33587da2c7ec11365b80a5caef14395e83a8cdf2173c6186abd0f51a3f6489aed3f81d42678cb1d6fb20456a8fb4d98000000000000001b8, 1'b1);
    checks++;
    if (digest !== 256'h2900465fcb533e05a158fd2b3be0e5e3b03740d83060aa3580e0d98a96bf2384) begin
      failures++; $display("55-byte digest %h", digest);
    end
    run_block(512'h0304070c131c27344354677c93acc7e40324476c93bce7144374a7dc134c87c4034487cc135ca7f44394e73c93ec47a40364c72c93fc67d443b4279c138c0784, 1'b1);
    run_block(512'h0384078c139c27b443d467fc932cc76403a447ec933ce79443f4a75c13cc874403c4874c80000000000000000000000000000000000000000000000000000320, 1'b0);
    checks++;
    if (digest !== 256'h7667ce8739ecd20cedd9c6b262070cf0ac57c56c0bcde14f59811acdc3eccd90) begin
      failures++; $display("100-byte digest %h", digest);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
