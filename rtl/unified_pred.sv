// unified_pred: the combined inter/intra predictor. Three systolic arrays
// are shared by three controllers:
//   luma_interp    uses all three arrays (6-tap, two-pass, quarter-pel);
//   chroma_interp  uses array 0 in split mode (Cb and Cr 2-tap at once);
//   intra_pred     uses array 0 (reshuffled boundary, loops A and B).
// A macroblock is either inter or intra coded, so only one controller runs
// at a time; the operation latched at start selects which controller drives
// the arrays and receives their results, and whose sample stream appears
// on px. Luma and chroma of a block are done as two operations, one after
// the other, as the document processes luminance and chrominance in order.
//
// Interface: start (one clock, while !busy) with op and the inputs of that
// operation; they must stay stable until done. px is the predicted-sample
// stream of the running operation, done pulses with its last sample.
// Sharing one set of arrays between all prediction modes follows the
// document; the command interface is this design's.
module unified_pred
  import pred_pkg::*;
#(
  parameter int NSA = 3,
  parameter int CN  = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  pred_op_t   op,
  // inter luma
  input  pix_t       luma_win [9][9],
  input  logic [1:0] luma_fx,
  input  logic [1:0] luma_fy,
  // inter chroma
  input  pix_t       cb_win [CN+1][CN+1],
  input  pix_t       cr_win [CN+1][CN+1],
  input  logic [2:0] chroma_fx,
  input  logic [2:0] chroma_fy,
  // intra
  input  logic [3:0] intra_mode,
  input  logic [1:0] intra_quad,
  input  pix_t       top  [16],
  input  pix_t       left [16],
  input  pix_t       corner,
  input  logic       top_avail,
  input  logic       left_avail,
  input  logic       topright_avail,
  // result
  output logic       busy,
  output pred_px_t   px,
  output logic       done
);
  pred_op_t op_q;
  logic     run_q;

  sa_ctrl_t ctrl  [NSA];
  sa_res_t  res   [NSA];

  sa_ctrl_t luma_ctrl [NSA];
  sa_res_t  luma_res  [NSA];
  sa_ctrl_t chroma_ctrl, intra_ctrl;
  sa_res_t  chroma_res, intra_res;
  pred_px_t luma_px, chroma_px, intra_px;
  logic     luma_busy, chroma_busy, intra_busy;
  logic     luma_done, chroma_done, intra_done;

  logic start_luma, start_chroma, start_intra;
  assign start_luma   = start && !busy && (op == OP_LUMA);
  assign start_chroma = start && !busy && (op == OP_CHROMA);
  assign start_intra  = start && !busy && (op == OP_INTRA4 || op == OP_INTRA16);

  luma_interp #(.NSA(NSA)) u_luma (
    .clk, .rst_n, .start(start_luma), .ref_win(luma_win), .fx(luma_fx), .fy(luma_fy),
    .busy(luma_busy), .sa_ctrl(luma_ctrl), .sa_res(luma_res), .px(luma_px), .done(luma_done));

  chroma_interp #(.CN(CN)) u_chroma (
    .clk, .rst_n, .start(start_chroma), .cb_win, .cr_win, .fx(chroma_fx), .fy(chroma_fy),
    .busy(chroma_busy), .sa_ctrl(chroma_ctrl), .sa_res(chroma_res), .px(chroma_px), .done(chroma_done));

  intra_pred u_intra (
    .clk, .rst_n, .start(start_intra), .is16_i(op == OP_INTRA16), .mode_i(intra_mode),
    .quad_i(intra_quad), .top, .left, .corner, .top_avail, .left_avail, .topright_avail,
    .busy(intra_busy), .sa_ctrl(intra_ctrl), .sa_res(intra_res), .px(intra_px), .done(intra_done));

  for (genvar a = 0; a < NSA; a++) begin : g_sa
    systolic_array u_sa (.clk, .rst_n, .ctrl(ctrl[a]), .res(res[a]));
  end

  // operation owning the arrays
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_q  <= OP_LUMA;
      run_q <= 1'b0;
    end else if (start && !busy) begin
      op_q  <= op;
      run_q <= 1'b1;
    end else if (done) begin
      run_q <= 1'b0;
    end
  end

  always_comb begin
    for (int a = 0; a < NSA; a++) begin
      ctrl[a]     = SA_IDLE;
      luma_res[a] = '0;
    end
    chroma_res = '0;
    intra_res  = '0;
    case (op_q)
      OP_LUMA: for (int a = 0; a < NSA; a++) begin
        ctrl[a]     = luma_ctrl[a];
        luma_res[a] = res[a];
      end
      OP_CHROMA: begin
        ctrl[0]    = chroma_ctrl;
        chroma_res = res[0];
      end
      default: begin
        ctrl[0]   = intra_ctrl;
        intra_res = res[0];
      end
    endcase
  end

  always_comb begin
    case (op_q)
      OP_LUMA:   begin px = luma_px;   done = luma_done;   end
      OP_CHROMA: begin px = chroma_px; done = chroma_done; end
      default:   begin px = intra_px;  done = intra_done;  end
    endcase
    if (!run_q) begin
      px.vld = 1'b0;
      done   = 1'b0;
    end
  end

  assign busy = run_q || luma_busy || chroma_busy || intra_busy;

  // only the controller of the latched operation may be active
  assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({luma_busy, chroma_busy, intra_busy}));

endmodule
