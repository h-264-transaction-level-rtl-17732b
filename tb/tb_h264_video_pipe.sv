// tb_h264_video_pipe: end-to-end test of the block-synchronised video pipe
// at its default parameters (three systolic arrays, 4x4 chroma per logical
// 8x8 block, 32-word master buffers, 1920x1088 frame map).
//
// The testbench plays the stages that sit outside the top:
//   IQ/IDCT + data fetch  writes the 96 residuals of block k into buffer A
//                         and reads a burst of reference words over the bus
//                         into its local buffer, which it drains;
//   IIP driver            issues the prediction jobs of block k-1 (inter:
//                         four luma partitions and a chroma job; intra 4x4:
//                         four sub-blocks; intra 16x16: one quadrant);
//   de-blocking           reads block k-2 back through port C and checks
//                         every sample against clip(residual + reference
//                         prediction), then writes a burst over the bus
//                         through its local buffer;
//   de-interlacer         reads a burst over the bus, except in block cycles
//                         where the stage is disabled;
//   DRAM                  answers every bus transfer; the words carry the
//                         master number and a sequence number so the order
//                         through each buffer can be checked.
// Each stage reports done once per block cycle; the next cycle begins at go.
// Checked: reconstructed samples, buffer rotation (data written in cycle k
// is read back in cycle k+2), FIFO order and flags, the memory/lane fields
// of the mapped address of the granted master, block counter and the block
// cycle length reported by the synchroniser against the clocks counted here.
// Mechanisms counted, each of which must happen at least once: block
// rotation, stall of a finished stage waiting for the slowest one, all four
// prediction operations, clipping, bus grants to each master, arbitration
// switches, contention (a master waiting for the bus), a disabled stage,
// local-buffer decoupling (a master drains its buffer while another owns the
// bus) and buffer occupancy above one word. A watchdog ends a hung run.
module tb_h264_video_pipe;
  import pred_pkg::*;
  import pred_ref_pkg::*;

  localparam int CN   = 4;
  localparam int NBLK = 24;
  localparam int FD   = 32;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        kick = 0;
  logic [3:0]  stage_enable = 4'b1111;
  logic        iqdf_done = 0, dbk_done = 0, dei_done = 0;
  logic        go;
  logic [31:0] block_cnt, wait_cycles;
  logic [15:0] block_len;
  logic        res_we = 0;
  logic [6:0]  res_addr = '0;
  logic signed [15:0] res_wdata = '0;
  logic        job_valid = 0, job_ready, job_last = 0;
  pred_op_t    job_op = OP_LUMA;
  logic [1:0]  job_sub = '0;
  pix_t        luma_win [9][9];
  logic [1:0]  luma_fx, luma_fy;
  pix_t        cb_win [CN+1][CN+1], cr_win [CN+1][CN+1];
  logic [2:0]  chroma_fx, chroma_fy;
  logic [3:0]  intra_mode;
  logic [1:0]  intra_quad;
  pix_t        top [16], left [16], corner;
  logic        top_avail = 1, left_avail = 1, topright_avail = 1;
  logic        iip_busy;
  logic [6:0]  dbk_addr = '0;
  logic signed [15:0] dbk_rdata;
  logic [2:0]  bus_req = '0, bus_last = '0, bus_gnt;
  logic        bus_xfer = 0;
  logic [31:0] bus_switches, bus_rdata = '0, bus_wdata;
  logic [11:0] m_x [3], m_y [3];
  logic [4:0]  m_frame [3];
  comp_t       m_comp [3];
  logic [1:0]  dram_mem, dram_bank, dram_lane;
  logic [13:0] dram_row;
  logic [8:0]  dram_col;
  logic        df_pop = 0, df_empty, dbk_push = 0, dbk_full, dei_pop = 0, dei_empty;
  logic [31:0] df_rdata, dbk_wdata = '0, dei_rdata;
  logic [$clog2(FD):0] fifo_max_level [3];

  h264_video_pipe dut (.*);

  int checks = 0, failures = 0;
  int n_go = 0, n_op [4], n_clip = 0, n_burst [3], n_contend = 0, n_disabled = 0, n_decouple = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------ expected block contents
  int resid [NBLK][96];
  int expv  [NBLK][96];

  // --------------------------------------------------------- bus and DRAM
  int pend [3];          // words still to move in the current burst
  int seq_bus [3];       // words moved per master
  int fifo_cnt [3];      // words held in each local buffer (model)
  logic [31:0] fq0 [$], fq1 [$], fq2 [$];
  logic [2:0] gnt_at;

  always @(negedge clk) begin
    logic [2:0] g;
    int m;
    g = bus_gnt;
    m = g[1] ? 1 : (g[2] ? 2 : 0);
    for (int i = 0; i < 3; i++) bus_req[i] = (pend[i] > 0);
    for (int i = 0; i < 3; i++) if (pend[i] > 0 && g != 0 && !g[i]) n_contend++;
    bus_xfer = 0;
    bus_last = '0;
    if (g != 0 && pend[m] > 0 && $urandom_range(0, 3) != 0 &&
        (m == 1 || fifo_cnt[m] < FD)) begin
      bus_xfer = 1;
      bus_last[m] = (pend[m] == 1);
    end
    bus_rdata = {8'(m), 24'(seq_bus[m])};
    gnt_at = g;
    #1;
    if (bus_xfer) begin
      check(dram_mem == {m_comp[m] != COMP_Y, m_x[m][1]} && dram_lane == {m_y[m][0], m_x[m][0]},
            "mapped address does not belong to the granted master");
    end
    @(posedge clk);
    if (bus_xfer) begin
      if (m == 1) begin
        check(fq1.size() > 0 && bus_wdata == fq1[0], "de-blocking write word out of order");
        if (fq1.size() > 0) void'(fq1.pop_front());
        fifo_cnt[1]--;
      end else begin
        if (m == 0) fq0.push_back(bus_rdata); else fq2.push_back(bus_rdata);
        fifo_cnt[m]++;
      end
      seq_bus[m]++;
      pend[m]--;
      if (pend[m] == 0) n_burst[m]++;
      // next sample of this master
      m_x[m] = m_x[m] + 12'd1;
      if (m_x[m][3:0] == 4'd0) m_y[m] = m_y[m] + 12'd1;
    end
  end

  // drain a read master's local buffer
  task automatic drain(input int m);
    while (pend[m] > 0 || fifo_cnt[m] > 0) begin
      @(negedge clk);
      #2;
      if (fifo_cnt[m] > 0 && $urandom_range(0, 2) != 0) begin
        if (m == 0) begin
          check(!df_empty && df_rdata == fq0[0], "data-fetch buffer word wrong");
          df_pop = 1;
        end else begin
          check(!dei_empty && dei_rdata == fq2[0], $sformatf("de-interlacer buffer word wrong: empty=%0d got %h exp %h cnt=%0d", dei_empty, dei_rdata, fq2[0], fifo_cnt[2]));
          dei_pop = 1;
        end
        if (bus_gnt != 0 && !bus_gnt[m]) n_decouple++;
        @(posedge clk);
        #1;
        if (m == 0) begin void'(fq0.pop_front()); df_pop = 0; end
        else begin void'(fq2.pop_front()); dei_pop = 0; end
        fifo_cnt[m]--;
      end
    end
  endtask

  task automatic start_burst(input int m, input int len);
    m_x[m]     = 12'($urandom_range(0, 1800));
    m_y[m]     = 12'($urandom_range(0, 1000));
    m_frame[m] = 5'($urandom_range(0, 15));
    m_comp[m]  = comp_t'($urandom_range(0, 2));
    pend[m]    = len;
  endtask

  task automatic pulse(ref logic d);
    @(negedge clk);
    d = 1;
    @(negedge clk);
    d = 0;
  endtask

  // --------------------------------------------------------------- stages
  task automatic stage_iqdf(input int k);
    // residuals of block k into buffer A
    for (int a = 0; a < 96; a++) begin
      resid[k][a] = $urandom_range(0, 3) == 0 ? ($urandom_range(0, 1) ? 300 : -300)
                                               : int'($urandom_range(0, 80)) - 40;
      expv[k][a] = resid[k][a];
    end
    for (int a = 0; a < 96; a++) begin
      @(negedge clk);
      res_we = 1; res_addr = 7'(a); res_wdata = 16'(resid[k][a]);
    end
    @(negedge clk);
    res_we = 0;
    // reference words for the next prediction
    start_burst(0, $urandom_range(8, 24));
    drain(0);
    pulse(iqdf_done);
  endtask

  task automatic job(input int j, input pred_op_t o, input int sub, input bit last);
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
    topright_avail = 1'($urandom);
    if (j >= 0) begin
      if (o == OP_LUMA || o == OP_INTRA4)
        for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) begin
          automatic int a = ((sub >> 1) * 4 + y) * 8 + (sub & 1) * 4 + x;
          automatic int p = (o == OP_LUMA) ? luma_ref(luma_win, int'(luma_fx), int'(luma_fy), x, y)
                                           : intra4_ref(int'(intra_mode), top, left, corner, 1, 1,
                                                        topright_avail, x, y);
          expv[j][a] = clip(resid[j][a] + p);
        end
      else if (o == OP_INTRA16)
        for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++)
          expv[j][y*8+x] = clip(resid[j][y*8+x] + intra16_ref(int'(intra_mode), top, left, corner, 1, 1,
                                x + (intra_quad[0] ? 8 : 0), y + (intra_quad[1] ? 8 : 0)));
      else
        for (int y = 0; y < CN; y++) for (int x = 0; x < CN; x++) begin
          expv[j][64 + y*CN + x] = clip(resid[j][64 + y*CN + x]
                                        + chroma_ref(cb_win, int'(chroma_fx), int'(chroma_fy), x, y));
          expv[j][64 + CN*CN + y*CN + x] = clip(resid[j][64 + CN*CN + y*CN + x]
                                        + chroma_ref(cr_win, int'(chroma_fx), int'(chroma_fy), x, y));
        end
    end
    n_op[o]++;
    job_op = o; job_sub = 2'(sub); job_last = last;
    @(negedge clk);
    while (!job_ready) @(negedge clk);
    job_valid = 1;
    @(negedge clk);
    job_valid = 0;
    while (iip_busy) @(negedge clk);
  endtask

  // IIP jobs of block j (j = -1: warm-up block, not checked)
  task automatic stage_iip(input int j);
    case ((j + 3) % 3)
      0: begin
        for (int s = 0; s < 4; s++) job(j, OP_LUMA, s, 0);
        job(j, OP_CHROMA, 0, 1);
      end
      1: for (int s = 0; s < 4; s++) job(j, OP_INTRA4, s, s == 3);
      default: job(j, OP_INTRA16, 0, 1);
    endcase
  endtask

  task automatic stage_dbk(input int j);
    for (int a = 0; a < 96; a++) begin
      @(negedge clk);
      dbk_addr = 7'(a);
      #1;
      if (j >= 0) begin
        check(int'(dbk_rdata) == expv[j][a], $sformatf("block %0d addr %0d: got %0d exp %0d",
                                                       j, a, dbk_rdata, expv[j][a]));
        if (j % 3 != 1 || a < 64)
          if (expv[j][a] != resid[j][a] && (expv[j][a] == 0 || expv[j][a] == 255)) n_clip++;
      end
    end
    // filtered words back to memory through the local buffer
    begin
      int len = $urandom_range(4, 16);
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        check(!dbk_full, "de-blocking buffer full too early");
        dbk_push = 1;
        dbk_wdata = $urandom;
        fq1.push_back(dbk_wdata);
        @(posedge clk);
        fifo_cnt[1]++;
        #1 dbk_push = 0;
      end
      start_burst(1, len);
      while (pend[1] > 0) @(negedge clk);
    end
    pulse(dbk_done);
  endtask

  task automatic stage_dei(input bit en);
    if (en) begin
      start_burst(2, $urandom_range(8, 32));
      drain(2);
      pulse(dei_done);
    end
  endtask

  // ------------------------------------------------------------ sequencing
  int clk_cnt = 0, last_go = 0, len_meas = 0;
  always @(posedge clk) begin
    clk_cnt++;
    if (rst_n && go) begin
      n_go++;
      len_meas = clk_cnt - last_go;
      last_go  = clk_cnt;
    end
  end

  initial begin
    for (int i = 0; i < 3; i++) begin
      pend[i] = 0; seq_bus[i] = 0; fifo_cnt[i] = 0; n_burst[i] = 0;
      m_x[i] = '0; m_y[i] = '0; m_frame[i] = '0; m_comp[i] = COMP_Y;
    end
    for (int i = 0; i < 4; i++) n_op[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    kick = 1;
    @(negedge clk);
    kick = 0;
    for (int k = 0; k < NBLK + 2; k++) begin
      bit dei_en;
      dei_en = (k % 5 != 3);
      stage_enable = {dei_en, 3'b111};
      if (!dei_en) n_disabled++;
      fork
        if (k < NBLK) stage_iqdf(k); else pulse(iqdf_done);
        stage_iip(k - 1 < NBLK ? k - 1 : -1);
        stage_dbk(k - 2);
        stage_dei(dei_en);
      join
      // the synchroniser has seen every enabled stage report
      while (n_go < k + 2) @(posedge clk);
      #1;
      check(block_cnt == 32'(k + 2), "block counter");
      check(int'(block_len) == len_meas, $sformatf("block length %0d, counted %0d", block_len, len_meas));
    end
    // mechanisms
    check(n_go == NBLK + 3, "block rotations");
    check(wait_cycles > 0, "no stage ever waited for a slower one");
    for (int i = 0; i < 4; i++) check(n_op[i] > 0, $sformatf("prediction operation %0d never used", i));
    check(n_clip > 0, "clipping never exercised");
    for (int i = 0; i < 3; i++) check(n_burst[i] > 0, $sformatf("bus master %0d never served", i));
    check(bus_switches > 0, "bus never changed owner");
    check(n_contend > 0, "no master ever waited for the bus");
    check(n_disabled > 0, "stage disable never exercised");
    check(n_decouple > 0, "local buffer never drained while the bus was elsewhere");
    for (int i = 0; i < 3; i++) check(int'(fifo_max_level[i]) > 1, $sformatf("buffer %0d never held two words", i));
    $display("blocks=%0d wait_cycles=%0d ops=%0d/%0d/%0d/%0d clip=%0d bursts=%0d/%0d/%0d switches=%0d contend=%0d disabled=%0d decouple=%0d maxlvl=%0d/%0d/%0d",
             n_go, wait_cycles, n_op[0], n_op[1], n_op[2], n_op[3], n_clip, n_burst[0], n_burst[1], n_burst[2],
             bus_switches, n_contend, n_disabled, n_decouple, fifo_max_level[0], fifo_max_level[1], fifo_max_level[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
