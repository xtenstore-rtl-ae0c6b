// Self-checking test of secret_gen: the sequence follows xorshift128 as
// computed here with plain 32-bit arithmetic, it holds without take, it
// never repeats within the run, and reseed loads the given state.
module tb_secret_gen;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         take, reseed;
  logic [127:0] seed, secret;
  int checks = 0, failures = 0;

  secret_gen #(.SEED(128'h00000001_00000002_00000003_00000004)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0]  rx, ry, rz, rw, rt;
  logic [127:0] seen [$];

  task automatic ref_next();
    rt = rx ^ (rx << 11);
    rx = ry; ry = rz; rz = rw;
    rw = rw ^ (rw >> 19) ^ (rt ^ (rt >> 8));
  endtask

  initial begin
    take = 0; reseed = 0; seed = '0;
    rx = 1; ry = 2; rz = 3; rw = 4;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (secret !== {rx, ry, rz, rw}) begin failures++; $display("after reset %h", secret); end
    for (int i = 0; i < 200; i++) begin
      take = ($urandom_range(0, 3) != 0);
      @(negedge clk);
      if (take) ref_next();
      checks++;
      if (secret !== {rx, ry, rz, rw}) begin failures++; $display("step %0d: %h want %h", i, secret, {rx, ry, rz, rw}); end
      if (take) begin
        foreach (seen[j]) if (seen[j] == secret) begin failures++; $display("repeat at %0d", i); end
        seen.push_back(secret);
      end
    end
    take = 0; reseed = 1; seed = 128'hdeadbeef_01234567_89abcdef_cafef00d;
    @(negedge clk);
    reseed = 0;
    checks++;
    if (secret !== seed) begin failures++; $display("reseed %h", secret); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
