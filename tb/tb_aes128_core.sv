// Self-checking test of aes128_core against published and independently
// computed AES-128 vectors; also checks the 10-cycle latency and that a
// start while busy is ignored.
module tb_aes128_core;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         start;
  logic [127:0] key, pt, ct;
  logic         busy, done;
  int checks = 0, failures = 0;

  aes128_core dut (.*);

  localparam int NV = 6;
  localparam logic [127:0] VK [NV] = '{
    128'h000102030405060708090a0b0c0d0e0f, 128'h2b7e151628aed2a6abf7158809cf4f3c,
    128'h38b4e652e44da7f2370d9e260e271365, 128'h2b902f8911e81818f8c99d5d5d983195,
    128'hd85099095aa300165a67036f9b540d6b, 128'h264aad6cb6dd210faf94acd3cf92c190};
  localparam logic [127:0] VP [NV] = '{
    128'h00112233445566778899aabbccddeeff, 128'h3243f6a8885a308d313198a2e0370734,
    128'h50a4a3a6d07f5c0c332f8b1224083fd2, 128'h7504d90e945de2e8f54ee781cc75f636,
    128'h8f0be21124179c3dd9f73817ce6e118d, 128'h237cb11f5d108cf25930263938b370a1};
  localparam logic [127:0] VC [NV] = '{
    128'h69c4e0d86a7b0430d8cdb78070b4c55a, 128'h3925841d02dc09fbdc118597196a0b32,
    128'h2a1526a93654497163eacbd8f2f0f4ba, 128'hf79a52bf2330c781f902a02e8f4f690d,
    128'he32fd7515c1aa8d69cb4a020307914f0, 128'h8781a68284bb0f6f698db55868121471};

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    start = 1'b0; key = '0; pt = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int v = 0; v < NV; v++) begin
      @(negedge clk);
      key = VK[v]; pt = VP[v]; start = 1'b1;
      @(negedge clk);
      start = 1'b1; key = ~VK[v];          // ignored while busy
      @(negedge clk);
      start = 1'b0;
      lat = 1;   // clock edges since the one that took start
      while (!done) begin @(negedge clk); lat++; end
      checks++;
      if (ct !== VC[v]) begin failures++; $display("vector %0d: got %h want %h", v, ct, VC[v]); end
      checks++;
      if (lat != 10) begin failures++; $display("vector %0d: latency %0d, want 10", v, lat); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
