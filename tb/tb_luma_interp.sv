// tb_luma_interp: checks luma quarter-pel interpolation of 4x4 partitions
// against a direct 2-D evaluation of the H.264 interpolation rules, for all
// 16 fractional positions on random and extreme reference windows, and
// checks the clock count from start to done (40 filtering + 16 output).
module tb_luma_interp;
  import pred_pkg::*;
  localparam int NSA = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done;
  pix_t ref_win [9][9];
  logic [1:0] fx, fy;
  sa_ctrl_t sa_ctrl [NSA];
  sa_res_t  sa_res  [NSA];
  pred_px_t px;

  luma_interp #(.NSA(NSA)) dut (.*);
  for (genvar a = 0; a < NSA; a++) begin : g_sa
    systolic_array u_sa (.clk, .rst_n, .ctrl(sa_ctrl[a]), .res(sa_res[a]));
  end

  int checks = 0, failures = 0;

  function automatic int G(int x, int y); return int'(ref_win[y+2][x+2]); endfunction
  function automatic int clip(int v); return v < 0 ? 0 : (v > 255 ? 255 : v); endfunction
  function automatic int tap6(int a, int b, int c, int d, int e, int f);
    return a - 5*b + 20*c + 20*d - 5*e + f;
  endfunction
  function automatic int b1f(int x, int y); return tap6(G(x-2,y),G(x-1,y),G(x,y),G(x+1,y),G(x+2,y),G(x+3,y)); endfunction
  function automatic int h1f(int x, int y); return tap6(G(x,y-2),G(x,y-1),G(x,y),G(x,y+1),G(x,y+2),G(x,y+3)); endfunction
  function automatic int bf(int x, int y); return clip((b1f(x,y)+16) >>> 5); endfunction
  function automatic int hf(int x, int y); return clip((h1f(x,y)+16) >>> 5); endfunction
  function automatic int jf(int x, int y);
    return clip((tap6(b1f(x,y-2),b1f(x,y-1),b1f(x,y),b1f(x,y+1),b1f(x,y+2),b1f(x,y+3)) + 512) >>> 10);
  endfunction
  function automatic int av(int u, int v); return (u + v + 1) >> 1; endfunction
  function automatic int model(int qx, int qy, int x, int y);
    int r;
    case (qy*4 + qx)
      0:  r = G(x,y);
      1:  r = av(G(x,y), bf(x,y));
      2:  r = bf(x,y);
      3:  r = av(bf(x,y), G(x+1,y));
      4:  r = av(G(x,y), hf(x,y));
      5:  r = av(bf(x,y), hf(x,y));
      6:  r = av(bf(x,y), jf(x,y));
      7:  r = av(bf(x,y), hf(x+1,y));
      8:  r = hf(x,y);
      9:  r = av(hf(x,y), jf(x,y));
      10: r = jf(x,y);
      11: r = av(jf(x,y), hf(x+1,y));
      12: r = av(hf(x,y), G(x,y+1));
      13: r = av(hf(x,y), bf(x,y+1));
      14: r = av(jf(x,y), bf(x,y+1));
      default: r = av(hf(x+1,y), bf(x,y+1));
    endcase
    return r;
  endfunction

  task automatic run_one(int qx, int qy);
    int n = 0, cyc = 0;
    fx = 2'(qx); fy = 2'(qy);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) begin
      if (px.vld) begin
        checks++;
        if (int'(px.val) != model(qx, qy, int'(px.x), int'(px.y))) begin
          failures++;
          if (failures < 10) $display("mismatch q=(%0d,%0d) px=(%0d,%0d) got %0d exp %0d", qx, qy, px.x, px.y, px.val, model(qx,qy,int'(px.x),int'(px.y)));
        end
        n++;
      end
      @(negedge clk); cyc++;
    end
    // last pixel comes with done
    checks++;
    if (int'(px.val) != model(qx, qy, int'(px.x), int'(px.y))) failures++;
    n++;
    checks++;
    if (n != 16) begin failures++; $display("pixel count %0d", n); end
    checks++;
    if (cyc + 1 != 56) begin failures++; $display("latency %0d", cyc + 1); end
  endtask

  initial begin
    start = 0; fx = 0; fy = 0;
    for (int r = 0; r < 9; r++) for (int c = 0; c < 9; c++) ref_win[r][c] = 8'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      for (int r = 0; r < 9; r++) for (int c = 0; c < 9; c++)
        case (t)
          0: ref_win[r][c] = ((r + c) % 2) ? 8'd255 : 8'd0;   // extremes exercise clipping
          1: ref_win[r][c] = (c % 3 == 0) ? 8'd255 : 8'd0;
          default: ref_win[r][c] = 8'($urandom);
        endcase
      for (int q = 0; q < 16; q++) run_one(q % 4, q / 4);
    end
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
