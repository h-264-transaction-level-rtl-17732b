// pred_pkg: types and constants shared by the unified inter/intra predictor
// and the video-pipe blocks around it.
//
// The systolic array is driven by one control word per clock (sa_ctrl_t) and
// answers with one result word (sa_res_t). The word widths follow the data
// ranges of H.264 interpolation: the second 6-tap pass over unrounded
// intermediate samples needs 20 bits plus sign, so the array accumulates in
// SA_AW = 22 bits. The document quotes 18/16/13-bit registers for its luma
// array; the wider registers here are this design's choice so that the
// two-pass result is exact without intermediate truncation.
package pred_pkg;

  localparam int SA_DW   = 16;   // width of a broadcast input line (signed)
  localparam int SA_AW   = 22;   // width of partial sums and outputs (signed)
  localparam int SA_NPE  = 6;    // processing elements per array
  localparam int SA_TAGW = 8;    // user tag carried along with each output

  typedef logic [7:0]               pix_t;
  typedef logic signed [5:0]        coef_t;   // filter tap, -32..31
  typedef logic signed [SA_DW-1:0]  sa_data_t;
  typedef logic signed [SA_AW-1:0]  sa_acc_t;

  // Control word of one systolic array, valid for one clock.
  typedef struct packed {
    sa_data_t                 in0;      // broadcast input line 0
    sa_data_t                 in1;      // broadcast input line 1
    logic                     sel0;     // line taken by PE1 this cycle (delayed PE to PE)
    logic                     split;    // PE1-3 on in0 and PE4-6 on in1, two outputs
    logic                     acc_a;    // feedback loop A: PE1 accumulates
    logic                     acc_b;    // feedback loop B: PE2 accumulates
    logic                     acc_clr;  // start a new accumulation
    coef_t [SA_NPE-1:0]       taps;     // taps[0] belongs to PE1
    logic                     tag_vld;  // an output window ends in this cycle
    logic [SA_TAGW-1:0]       tag;
  } sa_ctrl_t;

  typedef struct packed {
    sa_acc_t                  out;      // end of the full chain (PE6)
    sa_acc_t                  out_lo;   // end of the lower half (PE3), split mode
    sa_acc_t                  acc_a;    // PE1 accumulator
    sa_acc_t                  acc_b;    // PE2 accumulator
    logic                     tag_vld;
    logic [SA_TAGW-1:0]       tag;
  } sa_res_t;

  localparam sa_ctrl_t SA_IDLE = '0;

  // Colour component of a predicted sample.
  typedef enum logic [1:0] {COMP_Y = 2'd0, COMP_CB = 2'd1, COMP_CR = 2'd2} comp_t;

  // One predicted sample leaving a prediction controller.
  typedef struct packed {
    logic       vld;
    comp_t      comp;
    logic [3:0] x;
    logic [3:0] y;
    pix_t       val;
  } pred_px_t;

  // Kind of work the unified predictor is asked to do.
  typedef enum logic [1:0] {
    OP_LUMA    = 2'd0,  // luma 4x4 partition, quarter-pel
    OP_CHROMA  = 2'd1,  // Cb and Cr 4x4, eighth-pel
    OP_INTRA4  = 2'd2,  // intra 4x4 luma, 9 modes
    OP_INTRA16 = 2'd3   // intra 16x16 luma, 4 modes
  } pred_op_t;

  // Intra 4x4 modes (H.264 numbering); intra 16x16 uses 0..3 = V, H, DC, plane.
  typedef enum logic [3:0] {
    I4_V = 4'd0, I4_H = 4'd1, I4_DC = 4'd2, I4_DDL = 4'd3, I4_DDR = 4'd4,
    I4_VR = 4'd5, I4_HD = 4'd6, I4_VL = 4'd7, I4_HU = 4'd8
  } i4_mode_t;

  localparam logic [3:0] I16_V = 4'd0, I16_H = 4'd1, I16_DC = 4'd2, I16_PLANE = 4'd3;

  function automatic pix_t clip1(input logic signed [31:0] v);
    if (v < 0)        return 8'd0;
    else if (v > 255) return 8'd255;
    else              return v[7:0];
  endfunction

endpackage
