// intra_pred: luma intra prediction on the shared systolic array.
//
// Intra 4x4 (all nine modes). The 13 boundary pixels of the block are
// reshuffled into one line, bottom-left to top-right,
//   S = L3 L3 L2 L1 L0 Q A B C D E F G H H      (Q = corner, A..H = top row)
// with the first and last pixel repeated so that the end cases of the
// standard become ordinary filter outputs. The line is streamed once through
// the array in split mode with both input lines carrying it: PE1-3 apply
// (1,2,1) and PE4-6 apply (0,1,1), so each clock yields one 3-tap value
// F3[j] = (S[j-1]+2S[j]+S[j+1]+2)>>2 and one 2-tap value
// F2[j] = (S[j]+S[j+1]+1)>>1. Every directional predictor of H.264 is one of
// F3, F2 or S at an index that depends on the mode and on (x,y); a small
// index table picks it. Missing top-right pixels are replaced by D.
//
// DC (4x4 and 16x16). Feedback loop A sums the top row on in0 and loop B the
// left column on in1 in the same clocks. A side that is missing gets tap 0
// and the other side tap 2, which turns the one-sided average of the
// standard into the same (sum + N) >> log2(2N) rounding; with no neighbours
// the predictor is 128.
//
// Plane (16x16). Loops A and B accumulate H and V over 16 clocks with taps
// +-(x'+1). PE1 then forms a = 16(P[-1,15]+P[15,-1]), 5H and 5V, and finally
// the start value M = a + b(x0-7) + c(y0-7) + 16 of the quadrant. Samples
// follow one per clock by adding b along a row and c from row to row,
// clipped after >> 5. Vertical and horizontal 16x16 copy the boundary.
//
// Interface: pulse start with is16_i, mode_i and quad_i (registered at
// start) and with the boundary and availability flags, which must stay
// stable until done. top[0..7] (4x4, incl. top-right) or top[0..15], left[],
// corner = P[-1,-1]. For 16x16 one 8x8 quadrant (quad: bit0 = right,
// bit1 = bottom) is produced per start, to match the logical 8x8 block of
// the pipe. px streams the samples in raster order; done pulses with the
// last one. Timing: 4x4 takes 16+5 clocks then 16 output clocks; 16x16
// plane takes 17+8 clocks then 64 output clocks; 16x16 DC 17 then 64.
// The use of one array with reshuffled boundary pixels and loops A/B follows
// the document; the index table, the per-quadrant operation and the schedule
// are this design's choices. Intra 8x8 and chroma intra are not included.
module intra_pred
  import pred_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       is16_i,
  input  logic [3:0] mode_i,
  input  logic [1:0] quad_i,
  input  pix_t       top  [16],
  input  pix_t       left [16],
  input  pix_t       corner,
  input  logic       top_avail,
  input  logic       left_avail,
  input  logic       topright_avail,
  output logic       busy,
  output sa_ctrl_t   sa_ctrl,
  input  sa_res_t    sa_res,
  output pred_px_t   px,
  output logic       done
);
  typedef enum logic [2:0] {S_IDLE, S_FILT, S_DC, S_GRAD, S_ABC, S_EMIT} state_t;
  state_t     state;
  logic [6:0] cnt;
  logic       is16;       // command, registered at start
  logic [3:0] mode;
  logic [1:0] quad;

  pix_t  S  [15];
  pix_t  F3 [15];
  pix_t  F2 [15];
  pix_t  dc;
  logic signed [15:0] grad_h, grad_v;   // H and V of plane mode
  logic signed [15:0] pa, pb, pc;       // a, b, c of plane mode
  logic signed [21:0] pval, rowv;       // running plane value (before >> 5)

  // boundary line
  always_comb begin
    S[0] = left[3]; S[1] = left[3]; S[2] = left[2]; S[3] = left[1]; S[4] = left[0];
    S[5] = corner;
    for (int i = 0; i < 8; i++) S[6+i] = (i >= 4 && !topright_avail) ? top[3] : top[i];
    S[14] = S[13];
  end

  logic [4:0] ndc;      // boundary samples per side for DC
  coef_t      wt_top, wt_left;
  logic [3:0] x0, y0;
  always_comb begin
    ndc     = is16 ? 5'd16 : 5'd4;
    wt_top  = top_avail  ? (left_avail ? 6'sd1 : 6'sd2) : 6'sd0;
    wt_left = left_avail ? (top_avail  ? 6'sd1 : 6'sd2) : 6'sd0;
    x0      = quad[0] ? 4'd8 : 4'd0;
    y0      = quad[1] ? 4'd8 : 4'd0;
  end

  // array control
  always_comb begin
    sa_ctrl = SA_IDLE;
    case (state)
      S_FILT: if (cnt < 7'd15) begin
        sa_ctrl.split   = 1'b1;
        sa_ctrl.taps    = {6'sd1, 6'sd1, 6'sd0, 6'sd1, 6'sd2, 6'sd1};
        sa_ctrl.in0     = sa_data_t'({8'd0, S[cnt[3:0]]});
        sa_ctrl.in1     = sa_data_t'({8'd0, S[cnt[3:0]]});
        sa_ctrl.tag_vld = 1'b1;
        sa_ctrl.tag     = {4'd0, cnt[3:0]};
      end
      S_DC: if (cnt < 7'(ndc)) begin
        sa_ctrl.acc_a   = 1'b1;
        sa_ctrl.acc_b   = 1'b1;
        sa_ctrl.acc_clr = (cnt == 7'd0);
        sa_ctrl.taps[0] = wt_top;
        sa_ctrl.taps[1] = wt_left;
        sa_ctrl.in0     = sa_data_t'({8'd0, top[cnt[3:0]]});
        sa_ctrl.in1     = sa_data_t'({8'd0, left[cnt[3:0]]});
      end
      S_GRAD: if (cnt < 7'd16) begin
        automatic int i = int'(cnt[2:0]);
        sa_ctrl.acc_a   = 1'b1;
        sa_ctrl.acc_b   = 1'b1;
        sa_ctrl.acc_clr = (cnt == 7'd0);
        if (!cnt[3]) begin
          sa_ctrl.taps[0] = coef_t'(i + 1);
          sa_ctrl.taps[1] = coef_t'(i + 1);
          sa_ctrl.in0     = sa_data_t'({8'd0, top[8+i]});
          sa_ctrl.in1     = sa_data_t'({8'd0, left[8+i]});
        end else begin
          sa_ctrl.taps[0] = coef_t'(-(i + 1));
          sa_ctrl.taps[1] = coef_t'(-(i + 1));
          sa_ctrl.in0     = sa_data_t'({8'd0, (i == 7) ? corner : top[6-i]});
          sa_ctrl.in1     = sa_data_t'({8'd0, (i == 7) ? corner : left[6-i]});
        end
      end
      S_ABC: begin
        case (cnt)
          7'd0: begin sa_ctrl.acc_a = 1'b1; sa_ctrl.acc_clr = 1'b1;
                      sa_ctrl.taps[0] = 6'sd16; sa_ctrl.in0 = sa_data_t'({8'd0, top[15]}); end
          7'd1: begin sa_ctrl.acc_a = 1'b1;
                      sa_ctrl.taps[0] = 6'sd16; sa_ctrl.in0 = sa_data_t'({8'd0, left[15]}); end
          7'd2: begin sa_ctrl.taps[0] = 6'sd5; sa_ctrl.in0 = grad_h; end
          7'd3: begin sa_ctrl.taps[0] = 6'sd5; sa_ctrl.in0 = grad_v; end
          7'd5: begin sa_ctrl.acc_a = 1'b1; sa_ctrl.acc_clr = 1'b1;
                      sa_ctrl.taps[0] = coef_t'(int'(x0) - 7); sa_ctrl.in0 = pb; end
          7'd6: begin sa_ctrl.acc_a = 1'b1;
                      sa_ctrl.taps[0] = coef_t'(int'(y0) - 7); sa_ctrl.in0 = pc; end
          7'd7: begin sa_ctrl.acc_a = 1'b1;
                      sa_ctrl.taps[0] = 6'sd1; sa_ctrl.in0 = pa + 16'sd16; end
          default: ;
        endcase
      end
      default: ;
    endcase
  end

  // sequencing and result capture
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      is16  <= 1'b0;
      mode  <= '0;
      quad  <= '0;
      dc    <= 8'd128;
      grad_h <= '0; grad_v <= '0;
      pa <= '0; pb <= '0; pc <= '0;
      pval <= '0; rowv <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          cnt  <= '0;
          is16 <= is16_i;
          mode <= mode_i;
          quad <= quad_i;
          if (!is16_i)                  state <= S_FILT;
          else if (mode_i == I16_PLANE) state <= S_GRAD;
          else if (mode_i == I16_DC)    state <= S_DC;
          else                          state <= S_EMIT;
        end
        S_FILT: if (cnt == 7'd15) begin state <= S_DC; cnt <= '0; end
                else cnt <= cnt + 1'b1;
        S_DC: if (cnt == 7'(ndc)) begin
          automatic logic [13:0] sum = 14'(sa_res.acc_a + sa_res.acc_b);
          if (!top_avail && !left_avail) dc <= 8'd128;
          else if (is16)                  dc <= 8'((sum + 14'd16) >> 5);
          else                            dc <= 8'((sum + 14'd4) >> 3);
          state <= S_EMIT; cnt <= '0;
        end else cnt <= cnt + 1'b1;
        S_GRAD: if (cnt == 7'd16) begin
          grad_h <= 16'(sa_res.acc_a);
          grad_v <= 16'(sa_res.acc_b);
          state <= S_ABC; cnt <= '0;
        end else cnt <= cnt + 1'b1;
        S_ABC: begin
          case (cnt)
            7'd2: pa <= 16'(sa_res.acc_a);
            7'd3: pb <= 16'((sa_res.acc_a + 22'sd32) >>> 6);
            7'd4: pc <= 16'((sa_res.acc_a + 22'sd32) >>> 6);
            7'd8: begin pval <= sa_res.acc_a; rowv <= sa_res.acc_a; end
            default: ;
          endcase
          if (cnt == 7'd8) begin state <= S_EMIT; cnt <= '0; end
          else cnt <= cnt + 1'b1;
        end
        S_EMIT: begin
          if (is16 && mode == I16_PLANE) begin
            if (cnt[2:0] == 3'd7) begin
              rowv <= rowv + 22'(pc);
              pval <= rowv + 22'(pc);
            end else pval <= pval + 22'(pb);
          end
          if (cnt == (is16 ? 7'd63 : 7'd15)) begin state <= S_IDLE; cnt <= '0; end
          else cnt <= cnt + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_FILT && sa_res.tag_vld) begin
      automatic int n = int'(sa_res.tag[3:0]);
      if (n >= 2) F3[n-1] <= 8'((sa_res.out_lo + 22'sd2) >>> 2);
      if (n >= 1) F2[n-1] <= 8'((sa_res.out + 22'sd1) >>> 1);
    end
  end

  // predictor selection for intra 4x4
  function automatic pix_t pred4(input logic [3:0] m, input int x, input int y);
    int z;
    case (m)
      I4_V:   return S[6+x];
      I4_H:   return S[4-y];
      I4_DC:  return dc;
      I4_DDL: return F3[7+x+y];
      I4_DDR: return F3[5+x-y];
      I4_VR: begin
        z = 2*x - y;
        if (z >= 0 && z % 2 == 0) return F2[5+x-(y>>1)];
        else if (z > 0)           return F3[5+x-(y>>1)];
        else if (z == -1)         return F3[5];
        else                      return F3[6-y];
      end
      I4_HD: begin
        z = 2*y - x;
        if (z >= 0 && z % 2 == 0) return F2[4-y+(x>>1)];
        else if (z > 0)           return F3[5-y+(x>>1)];
        else if (z == -1)         return F3[5];
        else                      return F3[4+x];
      end
      I4_VL:  return (y % 2 == 0) ? F2[6+x+(y>>1)] : F3[7+x+(y>>1)];
      default: begin   // I4_HU
        z = x + 2*y;
        if (z > 5)          return S[1];
        else if (z % 2 == 0) return F2[3-y-(x>>1)];
        else                 return F3[3-y-(x>>1)];
      end
    endcase
  endfunction

  always_comb begin
    int x, y;
    px      = '0;
    px.vld  = (state == S_EMIT);
    px.comp = COMP_Y;
    if (is16) begin
      x = int'(cnt[2:0]); y = int'(cnt[5:3]);
      case (mode)
        I16_V:   px.val = top[int'(x0) + x];
        I16_H:   px.val = left[int'(y0) + y];
        I16_DC:  px.val = dc;
        default: px.val = clip1(32'(pval >>> 5));
      endcase
    end else begin
      x = int'(cnt[1:0]); y = int'(cnt[3:2]);
      px.val = pred4(mode, x, y);
    end
    px.x = 4'(x);
    px.y = 4'(y);
  end

  assign done = (state == S_EMIT) && (cnt == (is16 ? 7'd63 : 7'd15));
  assign busy = (state != S_IDLE);

endmodule
