// tb_blk_buf3: runs eight block cycles of the three-stage rotation. Each
// cycle port A writes a fresh block, port B checks that it reads the block
// port A wrote one cycle earlier and overwrites it with a transformed copy,
// and port C checks that it reads that transformed copy one cycle later.
module tb_blk_buf3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rotate, a_we, b_we;
  logic [6:0] a_addr, b_addr, c_addr;
  logic signed [15:0] a_wdata, b_rdata, b_wdata, c_rdata;
  logic [1:0] a_sel, b_sel, c_sel;
  blk_buf3 dut (.*);

  int checks = 0, failures = 0;
  int blk [0:15][96];   // block n written by port A in cycle n

  initial begin
    rotate = 0; a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; c_addr = 0; a_wdata = 0; b_wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 10; n++) begin
      for (int a = 0; a < 96; a++) blk[n][a] = int'($urandom_range(0, 1000)) - 500;
      for (int a = 0; a < 96; a++) begin
        // port A writes block n
        a_we = 1; a_addr = 7'(a); a_wdata = 16'(blk[n][a]);
        // port B reads block n-1 and writes it back plus 7
        b_addr = 7'(95 - a);
        b_we = 0;
        #1;
        if (n >= 1) begin
          checks++;
          if (int'(b_rdata) != blk[n-1][95-a]) begin failures++; if (failures < 10) $display("B n=%0d a=%0d got %0d", n, 95-a, b_rdata); end
          b_we = 1; b_wdata = 16'(blk[n-1][95-a] + 7);
        end
        // port C reads block n-2 after its update
        c_addr = 7'((a * 5) % 96);
        #1;
        if (n >= 2) begin
          checks++;
          if (int'(c_rdata) != blk[n-2][(a*5)%96] + 7) begin failures++; if (failures < 10) $display("C n=%0d got %0d", n, c_rdata); end
        end
        @(negedge clk);
      end
      a_we = 0; b_we = 0;
      rotate = 1;
      @(negedge clk);
      rotate = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
