// chroma_interp: eighth-pel chroma interpolation of a Cb block and a Cr block
// (CN x CN each, 4x4 for one logical 8x8 block) at the same time on one
// systolic array in split mode.
//
// H.264 chroma prediction is the bilinear blend
//   ((8-dx)(8-dy)A + dx(8-dy)B + (8-dx)dy C + dx dy D + 32) >> 6,
// computed here exactly as two 2-tap passes:
//   pass 1  each of the CN+1 rows is filtered with taps (8-dx, dx), giving
//           T (CN+1 rows x CN), at most 2040, kept unrounded;
//   pass 2  each of the CN columns of T is filtered with (8-dy, dy), then
//           rounded (+32) and shifted right by 6.
// The array is split: PE2/PE3 filter Cb on input line 0 and PE5/PE6 filter
// Cr on input line 1 (PE1 and PE4 get tap 0), so both components advance in
// the same clocks. Lines are fed back to back; the first sample of a line
// only primes the 2-tap window.
//
// Interface: pulse start with cb_win/cr_win ((CN+1) x (CN+1) full-pel
// samples, [row][column]) and fx/fy (eighth-pel fraction 0..7) held until
// done. px streams the Cb block then the Cr block in raster order; done
// pulses with the last sample. Timing: (CN+1)^2+1 + CN(CN+1)+1 clocks of
// filtering (47 for CN=4), then 2*CN*CN output clocks. Splitting the array
// for Cb/Cr and separable 2-tap filtering follow the document; the schedule
// and the serial output are this design's choices.
module chroma_interp
  import pred_pkg::*;
#(
  parameter int CN = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  pix_t     cb_win [CN+1][CN+1],
  input  pix_t     cr_win [CN+1][CN+1],
  input  logic [2:0] fx,
  input  logic [2:0] fy,
  output logic     busy,
  output sa_ctrl_t sa_ctrl,
  input  sa_res_t  sa_res,
  output pred_px_t px,
  output logic     done
);
  localparam int N1 = (CN + 1) * (CN + 1);  // pass 1 feeding clocks
  localparam int N2 = CN * (CN + 1);        // pass 2 feeding clocks
  localparam int NO = 2 * CN * CN;          // output clocks

  typedef enum logic [2:0] {S_IDLE, S_P1, S_P2, S_EMIT} state_t;
  state_t     state;
  logic [7:0] cnt;

  logic [11:0] t_cb [CN+1][CN];
  logic [11:0] t_cr [CN+1][CN];
  pix_t        o_cb [CN][CN];
  pix_t        o_cr [CN][CN];

  int line, smp;
  always_comb begin
    line = int'(cnt) / (CN + 1);
    smp  = int'(cnt) % (CN + 1);
  end

  always_comb begin
    sa_ctrl       = SA_IDLE;
    sa_ctrl.split = 1'b1;
    if (state == S_P1 && int'(cnt) < N1) begin
      sa_ctrl.taps = {coef_t'(fx), coef_t'(8 - int'(fx)), 6'sd0,
                      coef_t'(fx), coef_t'(8 - int'(fx)), 6'sd0};
      sa_ctrl.in0  = sa_data_t'({8'd0, cb_win[line][smp]});
      sa_ctrl.in1  = sa_data_t'({8'd0, cr_win[line][smp]});
      sa_ctrl.tag_vld = (smp != 0);
      sa_ctrl.tag  = {1'b0, 4'(line), 3'(smp - 1)};
    end else if (state == S_P2 && int'(cnt) < N2) begin
      sa_ctrl.taps = {coef_t'(fy), coef_t'(8 - int'(fy)), 6'sd0,
                      coef_t'(fy), coef_t'(8 - int'(fy)), 6'sd0};
      sa_ctrl.in0  = sa_data_t'({4'd0, t_cb[smp][line]});
      sa_ctrl.in1  = sa_data_t'({4'd0, t_cr[smp][line]});
      sa_ctrl.tag_vld = (smp != 0);
      sa_ctrl.tag  = {1'b1, 4'(line), 3'(smp - 1)};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin state <= S_P1; cnt <= '0; end
        S_P1:   if (int'(cnt) == N1) begin state <= S_P2; cnt <= '0; end
                else cnt <= cnt + 1'b1;
        S_P2:   if (int'(cnt) == N2) begin state <= S_EMIT; cnt <= '0; end
                else cnt <= cnt + 1'b1;
        S_EMIT: if (int'(cnt) == NO - 1) begin state <= S_IDLE; cnt <= '0; end
                else cnt <= cnt + 1'b1;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (sa_res.tag_vld) begin
      automatic int l = int'(sa_res.tag[6:3]);
      automatic int k = int'(sa_res.tag[2:0]);
      if (!sa_res.tag[7]) begin
        t_cb[l][k] <= 12'(sa_res.out_lo);
        t_cr[l][k] <= 12'(sa_res.out);
      end else begin
        // column l, output row k
        o_cb[k][l] <= pix_t'((sa_res.out_lo + 22'sd32) >>> 6);
        o_cr[k][l] <= pix_t'((sa_res.out + 22'sd32) >>> 6);
      end
    end
  end

  always_comb begin
    int e;
    e = int'(cnt) % (CN * CN);
    px      = '0;
    px.vld  = (state == S_EMIT);
    px.comp = (int'(cnt) < CN * CN) ? COMP_CB : COMP_CR;
    px.x    = 4'(e % CN);
    px.y    = 4'(e / CN);
    px.val  = (int'(cnt) < CN * CN) ? o_cb[e / CN][e % CN] : o_cr[e / CN][e % CN];
  end

  assign done = (state == S_EMIT) && (int'(cnt) == NO - 1);
  assign busy = (state != S_IDLE);

endmodule
