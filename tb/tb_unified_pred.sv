// tb_unified_pred: runs a random mix of luma, chroma, intra 4x4 and intra
// 16x16 operations back to back on the shared arrays and checks every
// predicted sample against the reference models, plus the number of
// samples and the clock count of each operation.
module tb_unified_pred;
  import pred_pkg::*;
  import pred_ref_pkg::*;
  localparam int CN = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done;
  pred_op_t op;
  pix_t luma_win [9][9];
  logic [1:0] luma_fx, luma_fy;
  pix_t cb_win [CN+1][CN+1], cr_win [CN+1][CN+1];
  logic [2:0] chroma_fx, chroma_fy;
  logic [3:0] intra_mode;
  logic [1:0] intra_quad;
  pix_t top [16], left [16], corner;
  logic top_avail, left_avail, topright_avail;
  pred_px_t px;

  unified_pred #(.NSA(3), .CN(CN)) dut (.*);

  int checks = 0, failures = 0;
  int n_op [4];

  function automatic int expect_px(pred_px_t p);
    case (op)
      OP_LUMA:   return luma_ref(luma_win, int'(luma_fx), int'(luma_fy), int'(p.x), int'(p.y));
      OP_CHROMA: return (p.comp == COMP_CB) ? chroma_ref(cb_win, int'(chroma_fx), int'(chroma_fy), int'(p.x), int'(p.y))
                                            : chroma_ref(cr_win, int'(chroma_fx), int'(chroma_fy), int'(p.x), int'(p.y));
      OP_INTRA4: return intra4_ref(int'(intra_mode), top, left, corner, top_avail, left_avail, topright_avail, int'(p.x), int'(p.y));
      default:   return intra16_ref(int'(intra_mode), top, left, corner, top_avail, left_avail,
                                    int'(p.x) + (intra_quad[0] ? 8 : 0), int'(p.y) + (intra_quad[1] ? 8 : 0));
    endcase
  endfunction

  task automatic run_op(pred_op_t o);
    int n = 0, cyc = 0, exp_n, exp_c, e;
    op = o;
    for (int r = 0; r < 9; r++) for (int c = 0; c < 9; c++) luma_win[r][c] = 8'($urandom);
    for (int r = 0; r <= CN; r++) for (int c = 0; c <= CN; c++) begin
      cb_win[r][c] = 8'($urandom); cr_win[r][c] = 8'($urandom);
    end
    for (int i = 0; i < 16; i++) begin top[i] = 8'($urandom); left[i] = 8'($urandom); end
    corner = 8'($urandom);
    luma_fx = 2'($urandom); luma_fy = 2'($urandom);
    chroma_fx = 3'($urandom); chroma_fy = 3'($urandom);
    intra_mode = (o == OP_INTRA4) ? 4'($urandom_range(0, 8)) : 4'($urandom_range(0, 3));
    intra_quad = 2'($urandom);
    top_avail = 1'($urandom_range(0, 3) != 0);
    left_avail = 1'($urandom_range(0, 3) != 0);
    topright_avail = 1'($urandom);
    case (o)
      OP_LUMA:   begin exp_n = 16; exp_c = 56; end
      OP_CHROMA: begin exp_n = 32; exp_c = 79; end
      OP_INTRA4: begin exp_n = 16; exp_c = 37; end
      default:   begin exp_n = 64; exp_c = (intra_mode == 3) ? 90 : (intra_mode == 2 ? 81 : 64); end
    endcase
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    forever begin
      if (px.vld) begin
        e = expect_px(px);
        checks++;
        if (int'(px.val) != e) begin
          failures++;
          if (failures < 10) $display("op %0d mode %0d (%0d,%0d) comp %0d: got %0d exp %0d", o, intra_mode, px.x, px.y, px.comp, px.val, e);
        end
        n++;
      end
      if (done) break;
      @(negedge clk); cyc++;
    end
    @(negedge clk);
    checks += 2;
    if (n != exp_n) begin failures++; $display("op %0d count %0d", o, n); end
    if (cyc + 1 != exp_c) begin failures++; $display("op %0d cycles %0d", o, cyc + 1); end
    n_op[int'(o)]++;
  endtask

  initial begin
    start = 0; op = OP_LUMA;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 200; k++) run_op(pred_op_t'($urandom_range(0, 3)));
    for (int o = 0; o < 4; o++) begin
      checks++;
      if (n_op[o] == 0) begin failures++; $display("operation %0d never ran", o); end
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
