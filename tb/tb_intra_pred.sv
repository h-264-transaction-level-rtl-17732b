// tb_intra_pred: checks intra 4x4 (9 modes, with and without top-right and
// DC availability cases) and intra 16x16 (V, H, DC, plane, all quadrants)
// against the H.264 prediction formulas written directly in terms of the
// neighbour samples p[x,y], and checks the clock counts.
module tb_intra_pred;
  import pred_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, is16, busy, done;
  logic [3:0] mode;
  logic [1:0] quad;
  logic is16_i; logic [3:0] mode_i; logic [1:0] quad_i;
  assign is16_i = is16; assign mode_i = mode; assign quad_i = quad;
  pix_t top [16], left [16], corner;
  logic top_avail, left_avail, topright_avail;
  sa_ctrl_t sa_ctrl;
  sa_res_t  sa_res;
  pred_px_t px;

  intra_pred dut (.*);
  systolic_array u_sa (.clk, .rst_n, .ctrl(sa_ctrl), .res(sa_res));

  int checks = 0, failures = 0;

  function automatic int p(int x, int y);   // neighbour sample
    if (x == -1 && y == -1) return int'(corner);
    if (y == -1) begin
      if (!is16 && x > 3 && !topright_avail) return int'(top[3]);
      return int'(top[x]);
    end
    return int'(left[y]);
  endfunction
  function automatic int clip(int v); return v < 0 ? 0 : (v > 255 ? 255 : v); endfunction

  function automatic int model4(int m, int x, int y);
    int z, s;
    case (m)
      0: return p(x, -1);
      1: return p(-1, y);
      2: begin
        s = 0;
        if (top_avail && left_avail) begin
          for (int i = 0; i < 4; i++) s += p(i, -1) + p(-1, i);
          return (s + 4) >> 3;
        end else if (left_avail) begin
          for (int i = 0; i < 4; i++) s += p(-1, i);
          return (s + 2) >> 2;
        end else if (top_avail) begin
          for (int i = 0; i < 4; i++) s += p(i, -1);
          return (s + 2) >> 2;
        end
        return 128;
      end
      3: if (x == 3 && y == 3) return (p(6,-1) + 3*p(7,-1) + 2) >> 2;
         else return (p(x+y,-1) + 2*p(x+y+1,-1) + p(x+y+2,-1) + 2) >> 2;
      4: if (x > y) return (p(x-y-2,-1) + 2*p(x-y-1,-1) + p(x-y,-1) + 2) >> 2;
         else if (x < y) return (p(-1,y-x-2) + 2*p(-1,y-x-1) + p(-1,y-x) + 2) >> 2;
         else return (p(0,-1) + 2*p(-1,-1) + p(-1,0) + 2) >> 2;
      5: begin
        z = 2*x - y;
        if (z >= 0 && (z & 1) == 0) return (p(x-(y>>1)-1,-1) + p(x-(y>>1),-1) + 1) >> 1;
        if (z > 0) return (p(x-(y>>1)-2,-1) + 2*p(x-(y>>1)-1,-1) + p(x-(y>>1),-1) + 2) >> 2;
        if (z == -1) return (p(-1,0) + 2*p(-1,-1) + p(0,-1) + 2) >> 2;
        return (p(-1,y-1) + 2*p(-1,y-2) + p(-1,y-3) + 2) >> 2;
      end
      6: begin
        z = 2*y - x;
        if (z >= 0 && (z & 1) == 0) return (p(-1,y-(x>>1)-1) + p(-1,y-(x>>1)) + 1) >> 1;
        if (z > 0) return (p(-1,y-(x>>1)-2) + 2*p(-1,y-(x>>1)-1) + p(-1,y-(x>>1)) + 2) >> 2;
        if (z == -1) return (p(-1,0) + 2*p(-1,-1) + p(0,-1) + 2) >> 2;
        return (p(x-1,-1) + 2*p(x-2,-1) + p(x-3,-1) + 2) >> 2;
      end
      7: if ((y & 1) == 0) return (p(x+(y>>1),-1) + p(x+(y>>1)+1,-1) + 1) >> 1;
         else return (p(x+(y>>1),-1) + 2*p(x+(y>>1)+1,-1) + p(x+(y>>1)+2,-1) + 2) >> 2;
      default: begin
        z = x + 2*y;
        if (z > 5) return p(-1,3);
        if (z == 5) return (p(-1,2) + 3*p(-1,3) + 2) >> 2;
        if ((z & 1) == 0) return (p(-1,y+(x>>1)) + p(-1,y+(x>>1)+1) + 1) >> 1;
        return (p(-1,y+(x>>1)) + 2*p(-1,y+(x>>1)+1) + p(-1,y+(x>>1)+2) + 2) >> 2;
      end
    endcase
  endfunction

  function automatic int model16(int m, int x, int y);
    int s, H, V, a, b, c;
    case (m)
      0: return p(x, -1);
      1: return p(-1, y);
      2: begin
        s = 0;
        if (top_avail && left_avail) begin
          for (int i = 0; i < 16; i++) s += p(i, -1) + p(-1, i);
          return (s + 16) >> 5;
        end else if (left_avail) begin
          for (int i = 0; i < 16; i++) s += p(-1, i);
          return (s + 8) >> 4;
        end else if (top_avail) begin
          for (int i = 0; i < 16; i++) s += p(i, -1);
          return (s + 8) >> 4;
        end
        return 128;
      end
      default: begin
        H = 0; V = 0;
        for (int i = 0; i < 8; i++) begin
          H += (i + 1) * (p(8+i, -1) - p(6-i, -1));
          V += (i + 1) * (p(-1, 8+i) - p(-1, 6-i));
        end
        a = 16 * (p(-1, 15) + p(15, -1));
        b = (5 * H + 32) >>> 6;
        c = (5 * V + 32) >>> 6;
        return clip((a + b * (x - 7) + c * (y - 7) + 16) >>> 5);
      end
    endcase
  endfunction

  task automatic run_one(logic s16, int m, int q, int exp_cycles);
    int n = 0, cyc = 0, e, gx, gy;
    is16 = s16; mode = 4'(m); quad = 2'(q);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    forever begin
      if (px.vld) begin
        gx = int'(px.x) + (s16 && q[0] ? 8 : 0);
        gy = int'(px.y) + (s16 && q[1] ? 8 : 0);
        e = s16 ? model16(m, gx, gy) : model4(m, gx, gy);
        checks++;
        if (int'(px.val) != e) begin
          failures++;
          if (failures < 12) $display("mismatch is16=%0d mode=%0d q=%0d (%0d,%0d) got %0d exp %0d", s16, m, q, gx, gy, px.val, e);
        end
        n++;
      end
      if (done) break;
      @(negedge clk); cyc++;
    end
    @(negedge clk);
    checks++;
    if (n != (s16 ? 64 : 16)) begin failures++; $display("count %0d", n); end
    checks++;
    if (cyc + 1 != exp_cycles) begin failures++; $display("latency is16=%0d mode=%0d: %0d", s16, m, cyc + 1); end
  endtask

  initial begin
    start = 0; is16 = 0; mode = 0; quad = 0;
    top_avail = 1; left_avail = 1; topright_avail = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      for (int i = 0; i < 16; i++) begin
        top[i]  = (t == 0) ? 8'd255 : (t == 1) ? 8'(i * 17) : 8'($urandom);
        left[i] = (t == 0) ? 8'd0   : (t == 1) ? 8'(255 - i * 17) : 8'($urandom);
      end
      corner = (t == 0) ? 8'd128 : 8'($urandom);
      top_avail      = (t % 4 != 3);
      left_avail     = (t % 4 != 2);
      topright_avail = (t % 3 != 1);
      if (t == 5) begin top_avail = 0; left_avail = 0; end
      for (int m = 0; m < 9; m++) run_one(1'b0, m, 0, 37);
      for (int m = 0; m < 4; m++)
        for (int q = 0; q < 4; q++)
          run_one(1'b1, m, q, m == 3 ? 90 : (m == 2 ? 81 : 64));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
