// iip: the intra/inter prediction stage of the video pipe. It runs
// prediction operations on the unified predictor and reconstructs the
// logical 8x8 block in place in the block buffer (blk_buf3 port B).
//
// For every predicted sample the residual that IQ/IDCT left at the same
// address is read, the prediction is added, the sum is clipped to 0..255
// and written back over the residual. A logical 8x8 block needs several
// operations: four luma 4x4 partitions (inter) or sub-blocks (intra 4x4),
// or one intra 16x16 quadrant, plus one chroma operation for inter blocks.
// The operation marked last reports blk_done when its final sample has been
// written; that is the IIP's message to the synchronisation channel.
//
// Interface: a job is taken when job_valid && job_ready (ready = idle). sub
// places a 4x4 luma result inside the 8x8 block (bit0 right, bit1 bottom).
// The prediction inputs (reference windows, boundary pixels) come from the
// data-fetch stage and must stay stable until the job is done. Buffer
// addresses: luma 0-63 raster, Cb 64-79, Cr 80-95. The reconstruction in
// the IIP and its place after IQ/IDCT follow the document; the job
// interface and the in-place write are this design's choices.
module iip
  import pred_pkg::*;
#(
  parameter int NSA = 3,
  parameter int CN  = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // job from the data-fetch stage
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
  // block buffer port B
  output logic [6:0]         b_addr,
  input  logic signed [15:0] b_rdata,
  output logic               b_we,
  output logic signed [15:0] b_wdata,
  // status
  output logic        blk_done,
  output logic        busy
);
  pred_px_t px;
  logic     pred_busy, pred_done;
  logic [1:0] sub_q;
  pred_op_t   op_q;
  logic       last_q;

  assign job_ready = !pred_busy;

  unified_pred #(.NSA(NSA), .CN(CN)) u_pred (
    .clk, .rst_n, .start(job_valid && job_ready), .op(job_op),
    .luma_win, .luma_fx, .luma_fy, .cb_win, .cr_win, .chroma_fx, .chroma_fy,
    .intra_mode, .intra_quad, .top, .left, .corner, .top_avail, .left_avail, .topright_avail,
    .busy(pred_busy), .px, .done(pred_done));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sub_q  <= '0;
      op_q   <= OP_LUMA;
      last_q <= 1'b0;
    end else if (job_valid && job_ready) begin
      sub_q  <= job_sub;
      op_q   <= job_op;
      last_q <= job_last;
    end
  end

  always_comb begin
    case (px.comp)
      COMP_CB: b_addr = 7'(64 + int'(px.y) * CN + int'(px.x));
      COMP_CR: b_addr = 7'(64 + CN * CN + int'(px.y) * CN + int'(px.x));
      default:
        if (op_q == OP_INTRA16) b_addr = 7'(int'(px.y) * 8 + int'(px.x));
        else b_addr = 7'((int'(sub_q[1]) * 4 + int'(px.y)) * 8 + int'(sub_q[0]) * 4 + int'(px.x));
    endcase
    b_we    = px.vld;
    b_wdata = 16'(clip1(32'(b_rdata) + 32'(px.val)));
  end

  assign blk_done = pred_done && last_q;
  assign busy     = pred_busy;

endmodule
