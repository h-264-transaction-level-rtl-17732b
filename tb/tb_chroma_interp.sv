// tb_chroma_interp: checks Cb/Cr eighth-pel interpolation of 4x4 blocks
// against the one-step bilinear formula of H.264 for all 64 fractions on
// random windows, and the clock count from start to done.
module tb_chroma_interp;
  import pred_pkg::*;
  localparam int CN = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done;
  pix_t cb_win [CN+1][CN+1];
  pix_t cr_win [CN+1][CN+1];
  logic [2:0] fx, fy;
  sa_ctrl_t sa_ctrl;
  sa_res_t  sa_res;
  pred_px_t px;

  chroma_interp #(.CN(CN)) dut (.*);
  systolic_array u_sa (.clk, .rst_n, .ctrl(sa_ctrl), .res(sa_res));

  int checks = 0, failures = 0;

  function automatic int model(int cr, int dx, int dy, int x, int y);
    int A, B, C, D;
    if (cr != 0) begin
      A = cr_win[y][x]; B = cr_win[y][x+1]; C = cr_win[y+1][x]; D = cr_win[y+1][x+1];
    end else begin
      A = cb_win[y][x]; B = cb_win[y][x+1]; C = cb_win[y+1][x]; D = cb_win[y+1][x+1];
    end
    return ((8-dx)*(8-dy)*A + dx*(8-dy)*B + (8-dx)*dy*C + dx*dy*D + 32) >> 6;
  endfunction

  task automatic check_px(int dx, int dy);
    int e;
    e = model(px.comp == COMP_CR, dx, dy, int'(px.x), int'(px.y));
    checks++;
    if (int'(px.val) != e) begin
      failures++;
      if (failures < 10) $display("mismatch d=(%0d,%0d) comp=%0d (%0d,%0d) got %0d exp %0d", dx, dy, px.comp, px.x, px.y, px.val, e);
    end
  endtask

  task automatic run_one(int dx, int dy);
    int n = 0, cyc = 0;
    fx = 3'(dx); fy = 3'(dy);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) begin
      if (px.vld) begin check_px(dx, dy); n++; end
      @(negedge clk); cyc++;
    end
    check_px(dx, dy); n++;
    checks++;
    if (n != 2*CN*CN) begin failures++; $display("count %0d", n); end
    checks++;
    if (cyc + 1 != 47 + 2*CN*CN) begin failures++; $display("latency %0d", cyc + 1); end
  endtask

  initial begin
    start = 0; fx = 0; fy = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3; t++) begin
      for (int r = 0; r <= CN; r++) for (int c = 0; c <= CN; c++) begin
        cb_win[r][c] = (t == 0) ? 8'd255 : 8'($urandom);
        cr_win[r][c] = (t == 0) ? 8'(((r + c) % 2) * 255) : 8'($urandom);
      end
      for (int q = 0; q < 64; q++) run_one(q % 8, q / 8);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
