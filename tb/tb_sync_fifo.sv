// tb_sync_fifo: self-checking test of the bus master FIFO.
//
// Random push/pop traffic with three phases (mostly push to reach full,
// mostly pop to reach empty, balanced) is compared word by word with a
// queue model. Checked every clock: the fall-through output word, full,
// empty, the level and the high-water mark; pushes into a full FIFO and
// pops from an empty one must be ignored. Both corner cases must actually
// occur. Inputs change on the falling edge, outputs are sampled just before
// the rising edge. A watchdog ends the run if it hangs.
module tb_sync_fifo;
  localparam int W = 16, D = 8;

  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  logic [W-1:0] wdata = '0, rdata;
  logic full, empty;
  logic [$clog2(D):0] level, max_level;

  int checks = 0, failures = 0;
  int push_full = 0, pop_empty = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%0t: %s", $time, what);
    end
  endtask

  initial begin
    logic [W-1:0] q[$];
    int mx = 0, ppush;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      case ((n / 250) % 3)
        0: ppush = 85;
        1: ppush = 15;
        default: ppush = 50;
      endcase
      push  = ($urandom_range(0, 99) < ppush);
      pop   = ($urandom_range(0, 99) >= ppush);
      if ($urandom_range(0, 9) == 0) begin push = 1; pop = 1; end
      wdata = W'($urandom);
      #4;
      check(full == (q.size() == D), "full flag");
      check(empty == (q.size() == 0), "empty flag");
      check(int'(level) == q.size(), "level");
      check(int'(max_level) == mx, "max_level");
      if (q.size() > 0) check(rdata == q[0], "fall-through data");
      if (push && q.size() == D) push_full++;
      if (pop && q.size() == 0) pop_empty++;
      if (q.size() > mx) mx = q.size();
      begin
        bit do_pop, do_push;
        do_pop  = pop && q.size() > 0;
        do_push = push && q.size() < D;
        if (do_pop) void'(q.pop_front());
        if (do_push) q.push_back(wdata);
      end
      @(negedge clk);
    end
    check(push_full > 0, "push into full FIFO never exercised");
    check(pop_empty > 0, "pop from empty FIFO never exercised");
    check(mx == D, "FIFO never filled");
    $display("push_when_full=%0d pop_when_empty=%0d", push_full, pop_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
