// tb_bus_arbiter: three behavioural masters each move a random number of
// words per block cycle (the de-interlacer sits out every fourth cycle, and
// in every other cycle master 0 asks for a second burst after it has lost
// the bus). The testbench checks that the grant is one-hot, that a master is
// never preempted before its last word, that the owner changes only after a
// last word, that a new owner is the next requester in round-robin order
// after the old one (a fixed-priority arbiter would serve master 0's second
// burst before master 2), that every word requested is transferred and
// that the switch counter matches. Stimulus changes on the falling edge;
// the grant is sampled 1 time unit after it. A watchdog ends a hung run.
module tb_bus_arbiter;
  localparam int NM = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NM-1:0] req, last, gnt;
  logic xfer;
  logic [31:0] switches;
  bus_arbiter #(.NM(NM)) dut (.*);

  int checks = 0, failures = 0;
  logic [NM-1:0] gnt_at_xfer;
  bit re0_pending = 0, again = 0;
  int remaining [NM];
  int moved [NM], wanted [NM];
  int owner = -1, prev_owner = -1, my_switches = 0, order_errors = 0, blocks = 0;

  always_comb begin
    for (int i = 0; i < NM; i++) begin
      req[i]  = remaining[i] > 0;
      last[i] = remaining[i] == 1;
    end
  end

  initial begin
    for (int i = 0; i < NM; i++) begin remaining[i] = 0; moved[i] = 0; wanted[i] = 0; end
    xfer = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 40; b++) begin
      // a new block cycle: every master (sometimes not the de-interlacer) wants data
      for (int i = 0; i < NM; i++) begin
        remaining[i] = (i == 2 && b % 4 == 3) ? 0 : $urandom_range(1, 12);
        wanted[i] += remaining[i];
      end
      again = 0;
      while (remaining[0] + remaining[1] + remaining[2] > 0 || re0_pending) begin
        // in every other block cycle master 0 asks for a second burst once it
        // has lost the bus: round robin must serve the others first
        if (re0_pending && owner != 0) begin
          re0_pending = 0;
          remaining[0] = $urandom_range(1, 6);
          wanted[0] += remaining[0];
        end
        #1;
        checks++;
        if (!$onehot0(gnt)) begin failures++; $display("grant not one-hot"); end
        xfer = 0;
        gnt_at_xfer = gnt;
        for (int i = 0; i < NM; i++)
          if (gnt[i] && remaining[i] > 0 && $urandom_range(0, 3) != 0) xfer = 1;
        @(negedge clk);
        for (int i = 0; i < NM; i++)
          if (gnt_at_xfer[i] && xfer) begin
            remaining[i]--; moved[i]++;
            if (i == 0 && remaining[0] == 0 && b % 2 == 0 && !again) begin re0_pending = 1; again = 1; end
          end
        #1;
        if (gnt == '0) owner = -1;
        // owner bookkeeping
        for (int i = 0; i < NM; i++) if (gnt[i] && owner != i) begin
          checks++;
          if (owner >= 0 && remaining[owner] > 0) begin failures++; $display("master %0d preempted", owner); end
          if (owner >= 0) begin
            // the new owner must be the next requester after the old one
            automatic int exp = -1;
            for (int k = 1; k <= NM && exp < 0; k++)
              if (req[(owner + k) % NM] || (owner + k) % NM == i) exp = (owner + k) % NM;
            checks++;
            if (exp != i) begin failures++; order_errors++; $display("order: %0d after %0d", i, owner); end
          end
          prev_owner = owner;
          owner = i;
          my_switches++;
        end
        xfer = 0;
        #1;
      end
      blocks++;
      @(negedge clk);
    end
    for (int i = 0; i < NM; i++) begin
      checks++;
      if (moved[i] != wanted[i]) begin failures++; $display("master %0d moved %0d of %0d", i, moved[i], wanted[i]); end
    end
    checks++;
    if (switches != 32'(my_switches)) begin failures++; $display("switches %0d exp %0d", switches, my_switches); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
