// tb_systolic_array: drives the array with random taps and samples and
// compares every output with a direct evaluation of the filter it should
// compute:
//   full chain     out(t+1) = sum_m taps[m] * line(t-5+m), where the line is
//                  the one PE1 chose when the window started (two-input
//                  broadcasting with a random line choice each clock);
//   split          out_lo(t+1) over in0 with taps 0..2, out(t+1) over in1
//                  with taps 3..5;
//   loops A and B  running sums of taps[0]*in0 and taps[1]*in1.
// Also checks that the tag comes out exactly one clock after it went in.
module tb_systolic_array;
  import pred_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  sa_ctrl_t ctrl;
  sa_res_t  res;
  systolic_array dut (.clk, .rst_n, .ctrl, .res);

  int checks = 0, failures = 0;
  int h_in0 [$], h_in1 [$], h_sel [$];
  coef_t taps [6];

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic new_taps(int kind);
    for (int m = 0; m < 6; m++) taps[m] = coef_t'($urandom_range(0, 63));
    if (kind == 1) taps = '{6'sd1, -6'sd5, 6'sd20, 6'sd20, -6'sd5, 6'sd1};
  endtask

  initial begin
    longint accA, accB, e;
    int n;
    ctrl = SA_IDLE;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---------------- full chain with two-input broadcasting
    for (int run = 0; run < 20; run++) begin
      new_taps(run % 2);
      h_in0.delete(); h_in1.delete(); h_sel.delete();
      for (int c = 0; c < 60; c++) begin
        ctrl = SA_IDLE;
        for (int m = 0; m < 6; m++) ctrl.taps[m] = taps[m];
        ctrl.in0 = sa_data_t'($urandom_range(0, 20000)) - 16'sd5000;
        ctrl.in1 = sa_data_t'($urandom_range(0, 20000)) - 16'sd5000;
        ctrl.sel0 = (run < 4) ? 1'b0 : 1'($urandom);
        ctrl.tag_vld = 1'b1;
        ctrl.tag = 8'(c);
        h_in0.push_back(int'(ctrl.in0)); h_in1.push_back(int'(ctrl.in1)); h_sel.push_back(int'(ctrl.sel0));
        @(negedge clk);
        check("tag", res.tag, 8'(c));
        n = h_in0.size();
        if (c >= 5) begin
          e = 0;
          for (int m = 0; m < 6; m++) begin
            automatic int t = n - 6 + m;
            e += longint'(taps[m]) * ((h_sel[n-6] != 0) ? h_in1[t] : h_in0[t]);
          end
          check("chain", res.out, e);
        end
      end
    end
    // ---------------- split mode
    for (int run = 0; run < 10; run++) begin
      new_taps(0);
      h_in0.delete(); h_in1.delete();
      for (int c = 0; c < 40; c++) begin
        ctrl = SA_IDLE;
        ctrl.split = 1'b1;
        for (int m = 0; m < 6; m++) ctrl.taps[m] = taps[m];
        ctrl.in0 = sa_data_t'($urandom_range(0, 4095));
        ctrl.in1 = sa_data_t'($urandom_range(0, 4095));
        h_in0.push_back(int'(ctrl.in0)); h_in1.push_back(int'(ctrl.in1));
        @(negedge clk);
        n = h_in0.size();
        if (c >= 2) begin
          e = 0;
          for (int m = 0; m < 3; m++) e += longint'(taps[m]) * h_in0[n-3+m];
          check("split lo", res.out_lo, e);
          e = 0;
          for (int m = 0; m < 3; m++) e += longint'(taps[3+m]) * h_in1[n-3+m];
          check("split hi", res.out, e);
        end
      end
    end
    // ---------------- feedback loops A and B
    for (int run = 0; run < 10; run++) begin
      accA = 0; accB = 0;
      for (int c = 0; c < 16; c++) begin
        ctrl = SA_IDLE;
        ctrl.acc_a = 1'b1; ctrl.acc_b = 1'b1; ctrl.acc_clr = (c == 0);
        ctrl.taps[0] = coef_t'($urandom_range(0, 63));
        ctrl.taps[1] = coef_t'($urandom_range(0, 63));
        ctrl.in0 = sa_data_t'($urandom_range(0, 255));
        ctrl.in1 = sa_data_t'($urandom_range(0, 255));
        ctrl.sel0 = 1'($urandom);   // must not matter for the loops
        accA += longint'(ctrl.taps[0]) * int'(ctrl.in0);
        accB += longint'(ctrl.taps[1]) * int'(ctrl.in1);
        @(negedge clk);
        check("loop A", res.acc_a, accA);
        check("loop B", res.acc_b, accB);
      end
    end
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
