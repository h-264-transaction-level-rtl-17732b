// h264_video_pipe: the block-synchronised core of an H.264 high-profile
// decoder video pipe, built around the unified inter/intra predictor.
//
// What is inside:
//   block_sync   the synchronisation channel. Four pipe stages report the
//                end of each 8x8 block cycle: 0 = IQ/IDCT with data fetch,
//                1 = IIP (internal), 2 = de-blocking, 3 = de-interlacer.
//                go starts the next block cycle for all of them.
//   blk_buf3     the three logical-8x8 block buffers; they rotate on go, so
//                IQ/IDCT writes block n+2 while the IIP reconstructs block
//                n+1 and de-blocking reads block n.
//   iip          prediction (unified_pred: three systolic arrays shared by
//                luma, chroma and intra) plus reconstruction into the block
//                buffer.
//   bus_arbiter  block-level arbitration of the data bus between data
//                fetch (0), de-blocking (1) and de-interlacer (2).
//   dram_addr_map  address of the granted master's sample in the four DRAMs.
//   sync_fifo x3 local buffers of the bus masters: data-fetch read FIFO,
//                de-blocking write FIFO, de-interlacer read FIFO.
// What is outside (ports): CABAC, IQ/IDCT, the data-fetch control (motion
// vectors, reference windows), de-blocking, de-interlacer, the DRAM
// controller and the host CPU. Their connections are brought out as ports.
//
// Timing: one block cycle lasts from one go pulse to the next; its length
// is set by the slowest enabled stage. The IIP must finish all prediction
// jobs of its block inside that cycle; the last job carries job_last.
// The partition into these modules follows the document; the port-level
// protocol between them is this design's.
module h264_video_pipe
  import pred_pkg::*;
#(
  parameter int NSA        = 3,    // systolic arrays in the predictor
  parameter int CN         = 4,    // chroma block size per logical 8x8 block
  parameter int FIFO_DEPTH = 32,   // words in each bus master's local buffer
  parameter int FRAME_W    = 1920,
  parameter int FRAME_H    = 1088
) (
  input  logic        clk,
  input  logic        rst_n,
  // host control and synchronisation
  input  logic        kick,
  input  logic [3:0]  stage_enable,
  input  logic        iqdf_done,
  input  logic        dbk_done,
  input  logic        dei_done,
  output logic        go,
  output logic [31:0] block_cnt,
  output logic [31:0] wait_cycles,
  output logic [15:0] block_len,
  // IQ/IDCT residual output -> block buffer
  input  logic        res_we,
  input  logic [6:0]  res_addr,
  input  logic signed [15:0] res_wdata,
  // data fetch -> IIP prediction jobs
  input  logic        job_valid,
  output logic        job_ready,
  input  pred_op_t    job_op,
  input  logic [1:0]  job_sub,
  input  logic        job_last,
  input  pix_t        luma_win [9][9],
  input  logic [1:0]  luma_fx,
  input  logic [1:0]  luma_fy,
  input  pix_t        cb_win [CN+1][CN+1],
  input  pix_t        cr_win [CN+1][CN+1],
  input  logic [2:0]  chroma_fx,
  input  logic [2:0]  chroma_fy,
  input  logic [3:0]  intra_mode,
  input  logic [1:0]  intra_quad,
  input  pix_t        top  [16],
  input  pix_t        left [16],
  input  pix_t        corner,
  input  logic        top_avail,
  input  logic        left_avail,
  input  logic        topright_avail,
  output logic        iip_busy,
  // de-blocking reads reconstructed samples
  input  logic [6:0]  dbk_addr,
  output logic signed [15:0] dbk_rdata,
  // data bus
  input  logic [2:0]  bus_req,
  input  logic [2:0]  bus_last,
  input  logic        bus_xfer,
  output logic [2:0]  bus_gnt,
  output logic [31:0] bus_switches,
  input  logic [31:0] bus_rdata,       // read data returned for the granted master
  output logic [31:0] bus_wdata,       // write data of the de-blocking master
  // sample address of each master, mapped for the granted one
  input  logic [11:0] m_x     [3],
  input  logic [11:0] m_y     [3],
  input  logic [4:0]  m_frame [3],
  input  comp_t       m_comp  [3],
  output logic [1:0]  dram_mem,
  output logic [1:0]  dram_bank,
  output logic [13:0] dram_row,
  output logic [8:0]  dram_col,
  output logic [1:0]  dram_lane,
  // local buffers of the bus masters
  input  logic        df_pop,
  output logic [31:0] df_rdata,
  output logic        df_empty,
  input  logic        dbk_push,
  input  logic [31:0] dbk_wdata,
  output logic        dbk_full,
  input  logic        dei_pop,
  output logic [31:0] dei_rdata,
  output logic        dei_empty,
  output logic [$clog2(FIFO_DEPTH):0] fifo_max_level [3]
);
  // ---------------------------------------------------------------- sync
  logic       iip_blk_done;
  logic [3:0] finished;

  block_sync #(.NMOD(4)) u_sync (
    .clk, .rst_n, .kick, .enable(stage_enable),
    .done({dei_done, dbk_done, iip_blk_done, iqdf_done}),
    .go, .finished, .block_cnt, .wait_cycles, .last_len(block_len));

  // ---------------------------------------------------- block buffers + IIP
  logic [6:0]         b_addr;
  logic signed [15:0] b_rdata, b_wdata;
  logic               b_we;
  logic [1:0]         a_sel, b_sel, c_sel;

  blk_buf3 #(.DEPTH(64 + 2 * CN * CN), .WIDTH(16)) u_buf (
    .clk, .rst_n, .rotate(go),
    .a_we(res_we), .a_addr(res_addr), .a_wdata(res_wdata),
    .b_addr, .b_rdata, .b_we, .b_wdata,
    .c_addr(dbk_addr), .c_rdata(dbk_rdata),
    .a_sel, .b_sel, .c_sel);

  iip #(.NSA(NSA), .CN(CN)) u_iip (
    .clk, .rst_n, .job_valid, .job_ready, .job_op, .job_sub, .job_last,
    .luma_win, .luma_fx, .luma_fy, .cb_win, .cr_win, .chroma_fx, .chroma_fy,
    .intra_mode, .intra_quad, .top, .left, .corner, .top_avail, .left_avail, .topright_avail,
    .b_addr, .b_rdata, .b_we, .b_wdata, .blk_done(iip_blk_done), .busy(iip_busy));

  // ------------------------------------------------------------- data bus
  bus_arbiter #(.NM(3)) u_arb (
    .clk, .rst_n, .req(bus_req), .xfer(bus_xfer), .last(bus_last),
    .gnt(bus_gnt), .switches(bus_switches));

  logic [11:0] sx, sy;
  logic [4:0]  sframe;
  comp_t       scomp;
  always_comb begin
    sx = m_x[0]; sy = m_y[0]; sframe = m_frame[0]; scomp = m_comp[0];
    for (int i = 1; i < 3; i++)
      if (bus_gnt[i]) begin
        sx = m_x[i]; sy = m_y[i]; sframe = m_frame[i]; scomp = m_comp[i];
      end
  end

  dram_addr_map #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H)) u_map (
    .x(sx), .y(sy), .frame(sframe), .comp(scomp),
    .mem(dram_mem), .bank(dram_bank), .row(dram_row), .col(dram_col), .lane(dram_lane));

  // ------------------------------------------------- master local buffers
  logic df_full, dbk_empty, dei_full;
  logic [$clog2(FIFO_DEPTH):0] fifo_level [3];

  sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_df_fifo (
    .clk, .rst_n, .push(bus_xfer && bus_gnt[0]), .wdata(bus_rdata),
    .pop(df_pop), .rdata(df_rdata), .full(df_full), .empty(df_empty),
    .level(fifo_level[0]), .max_level(fifo_max_level[0]));

  sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_dbk_fifo (
    .clk, .rst_n, .push(dbk_push), .wdata(dbk_wdata),
    .pop(bus_xfer && bus_gnt[1]), .rdata(bus_wdata), .full(dbk_full), .empty(dbk_empty),
    .level(fifo_level[1]), .max_level(fifo_max_level[1]));

  sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_dei_fifo (
    .clk, .rst_n, .push(bus_xfer && bus_gnt[2]), .wdata(bus_rdata),
    .pop(dei_pop), .rdata(dei_rdata), .full(dei_full), .empty(dei_empty),
    .level(fifo_level[2]), .max_level(fifo_max_level[2]));

  // a read master's buffer must have room for each word the bus delivers,
  // and the write master's buffer must hold the word being sent
  assert property (@(posedge clk) disable iff (!rst_n) bus_xfer && bus_gnt[0] |-> !df_full);
  assert property (@(posedge clk) disable iff (!rst_n) bus_xfer && bus_gnt[1] |-> !dbk_empty);
  assert property (@(posedge clk) disable iff (!rst_n) bus_xfer && bus_gnt[2] |-> !dei_full);

endmodule
