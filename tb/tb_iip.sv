// tb_iip: reconstructs logical 8x8 blocks (inter: four luma partitions and a
// chroma job; intra 4x4: four sub-blocks; intra 16x16: one quadrant) into a
// behavioural block memory preloaded with random residuals, then checks
// every written sample against clip(residual + reference prediction), that
// untouched addresses keep their residual, and that blk_done comes only
// after the job marked last.
module tb_iip;
  import pred_pkg::*;
  import pred_ref_pkg::*;
  localparam int CN = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic job_valid, job_ready, job_last, blk_done, busy;
  pred_op_t job_op;
  logic [1:0] job_sub;
  pix_t luma_win [9][9];
  logic [1:0] luma_fx, luma_fy;
  pix_t cb_win [CN+1][CN+1], cr_win [CN+1][CN+1];
  logic [2:0] chroma_fx, chroma_fy;
  logic [3:0] intra_mode;
  logic [1:0] intra_quad;
  pix_t top [16], left [16], corner;
  logic top_avail, left_avail, topright_avail;
  logic [6:0] b_addr;
  logic signed [15:0] b_rdata, b_wdata;
  logic b_we;

  iip #(.NSA(3), .CN(CN)) dut (.*);

  logic signed [15:0] mem [96];
  int resid [96];
  int expv [96];
  bit written [96];
  assign b_rdata = mem[b_addr];
  always_ff @(posedge clk) if (b_we) begin mem[b_addr] <= b_wdata; written[b_addr] <= 1'b1; end

  int checks = 0, failures = 0, n_done = 0, n_clip = 0;

  task automatic job(pred_op_t o, int sub, bit last);
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
    top_avail = 1; left_avail = 1; topright_avail = 1'($urandom);
    // expected reconstruction
    if (o == OP_LUMA || o == OP_INTRA4)
      for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) begin
        automatic int a = ((sub >> 1) * 4 + y) * 8 + (sub & 1) * 4 + x;
        automatic int p = (o == OP_LUMA) ? luma_ref(luma_win, int'(luma_fx), int'(luma_fy), x, y)
                                         : intra4_ref(int'(intra_mode), top, left, corner, 1, 1, topright_avail, x, y);
        expv[a] = clip(resid[a] + p);
      end
    else if (o == OP_INTRA16)
      for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++)
        expv[y*8+x] = clip(resid[y*8+x] + intra16_ref(int'(intra_mode), top, left, corner, 1, 1,
                                                     x + (intra_quad[0] ? 8 : 0), y + (intra_quad[1] ? 8 : 0)));
    else
      for (int y = 0; y < CN; y++) for (int x = 0; x < CN; x++) begin
        expv[64 + y*CN + x]      = clip(resid[64 + y*CN + x] + chroma_ref(cb_win, int'(chroma_fx), int'(chroma_fy), x, y));
        expv[80 + y*CN + x]      = clip(resid[80 + y*CN + x] + chroma_ref(cr_win, int'(chroma_fx), int'(chroma_fy), x, y));
      end
    job_op = o; job_sub = 2'(sub); job_last = last;
    @(negedge clk);
    while (!job_ready) @(negedge clk);
    job_valid = 1;
    @(negedge clk);
    job_valid = 0;
    while (busy) begin
      if (blk_done) n_done++;
      checks++;
      if (blk_done && !last) begin failures++; $display("blk_done on a job not marked last"); end
      @(negedge clk);
    end
  endtask

  task automatic new_block();
    for (int a = 0; a < 96; a++) begin
      resid[a] = $urandom_range(0, 3) == 0 ? ($urandom_range(0, 1) ? 300 : -300) : int'($urandom_range(0, 80)) - 40;
      mem[a] = 16'(resid[a]);
      expv[a] = resid[a];
      written[a] = 0;
    end
  endtask

  task automatic check_block();
    for (int a = 0; a < 96; a++) begin
      checks++;
      if (int'(mem[a]) != expv[a]) begin
        failures++;
        if (failures < 10) $display("addr %0d: got %0d exp %0d", a, mem[a], expv[a]);
      end
      if (written[a] && (expv[a] == 0 || expv[a] == 255)) n_clip++;
    end
  endtask

  initial begin
    job_valid = 0; job_op = OP_LUMA; job_sub = 0; job_last = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 24; b++) begin
      int done_before;
      new_block();
      done_before = n_done;
      case (b % 3)
        0: begin
          for (int s = 0; s < 4; s++) job(OP_LUMA, s, 0);
          job(OP_CHROMA, 0, 1);
        end
        1: for (int s = 0; s < 4; s++) job(OP_INTRA4, s, s == 3);
        default: job(OP_INTRA16, 0, 1);
      endcase
      check_block();
      checks++;
      if (n_done != done_before + 1) begin failures++; $display("block %0d: %0d done pulses", b, n_done - done_before); end
    end
    checks++;
    if (n_clip == 0) begin failures++; $display("clipping never exercised"); end
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
