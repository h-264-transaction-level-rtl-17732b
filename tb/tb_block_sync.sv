// tb_block_sync: four behavioural stages finish each block cycle after a
// random delay; the testbench checks that go comes exactly in the clock in
// which the last enabled stage reports, never earlier, that a disabled
// stage is not waited for, and that the block and wait counters agree with
// its own counts.
module tb_block_sync;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic kick, go;
  logic [N-1:0] enable, done, finished;
  logic [31:0] block_cnt, wait_cycles;
  logic [15:0] last_len;
  block_sync #(.NMOD(N)) dut (.*);

  int checks = 0, failures = 0;
  int delay [N];
  int gos = 0, waits = 0, disabled_cycles = 0;

  initial begin
    int t, maxd, len;
    bit any_fin;
    kick = 0; done = 0; enable = '1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    kick = 1;
    @(negedge clk);
    kick = 0;
    gos = 1;
    for (int b = 0; b < 60; b++) begin
      enable = (b % 5 == 4) ? 4'b0111 : 4'b1111;   // stage 3 off every fifth block
      if (enable[3] == 0) disabled_cycles++;
      maxd = 0;
      for (int i = 0; i < N; i++) begin
        delay[i] = $urandom_range(1, 20);
        if (enable[i] && delay[i] > maxd) maxd = delay[i];
      end
      len = 0;
      for (t = 1; t <= 25; t++) begin
        done = '0;
        any_fin = 0;
        for (int i = 0; i < N; i++) begin
          if (delay[i] == t) done[i] = 1'b1;
          if (enable[i] && delay[i] < t) any_fin = 1;
        end
        #1;
        checks++;
        if (go != (t == maxd)) begin failures++; $display("block %0d t %0d go=%0d maxd=%0d", b, t, go, maxd); end
        if (any_fin && t < maxd) waits++;
        len++;
        @(negedge clk);
        if (t == maxd) break;
      end
      done = '0;
      gos++;
      checks++;
      if (last_len != 16'(len)) begin failures++; $display("block %0d length %0d exp %0d", b, last_len, len); end
    end
    checks += 2;
    if (block_cnt != 32'(gos)) begin failures++; $display("block_cnt %0d exp %0d", block_cnt, gos); end
    if (wait_cycles != 32'(waits)) begin failures++; $display("wait_cycles %0d exp %0d", wait_cycles, waits); end
    checks++;
    if (waits == 0 || disabled_cycles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
