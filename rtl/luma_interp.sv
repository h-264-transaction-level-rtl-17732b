// luma_interp: quarter-pel luma interpolation of one 4x4 partition on NSA
// systolic arrays (three in the document's configuration).
//
// The 2-D half-pel filter is applied as two 1-D passes of the 6-tap filter
// (1,-5,20,20,-5,1), as in the document:
//   pass 1  the 9 rows of the 9x9 reference window are filtered horizontally,
//           giving the unrounded horizontal half-pel values b1 (9 rows x 4);
//   pass 2  5 full-pel columns are filtered vertically (h1, 4 x 5) and the 4
//           columns of b1 are filtered vertically (j1, 4 x 4).
// Each pass has 9 filter lines; line g goes to array g mod NSA, and each
// array overlaps its lines with two-input broadcasting: line i starts P
// clocks after line i-1 and is fed on input line i mod 2, so a 9-sample line
// yields its 4 outputs without waiting for the previous line to drain.
// After pass 2 the sample at the requested quarter position is formed for
// each of the 16 positions from full-pel G, half-pels b, h, j (rounded and
// clipped) and their averages, following the H.264 luma sample
// interpolation rules, and streamed out one per clock (raster order).
//
// Interface: pulse start with ref_win and fx/fy (quarter-pel fraction, 0..3)
// stable until done. ref_win[r][c] is the full-pel sample at (c-2, r-2)
// relative to the partition's top-left sample. px carries the 16 results;
// done pulses with the last one. With NSA=3, P=5 a partition takes
// 2*(2*P+9)+2 = 40 clocks of filtering plus 16 clocks of output.
// Two-pass separable filtering on three arrays follows the document; the
// line-to-array assignment, the schedule and the serial output are this
// design's choices.
module luma_interp
  import pred_pkg::*;
#(
  parameter int NSA = 3,   // systolic arrays working in parallel
  parameter int P   = 5    // line start interval per array (>= 5)
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  pix_t     ref_win [9][9],
  input  logic [1:0] fx,
  input  logic [1:0] fy,
  output logic     busy,
  output sa_ctrl_t sa_ctrl [NSA],
  input  sa_res_t  sa_res  [NSA],
  output pred_px_t px,
  output logic     done
);
  localparam int L   = 9;                    // samples per filter line
  localparam int W   = 4;                    // outputs per filter line
  localparam int LPA = (9 + NSA - 1) / NSA;  // lines per array and pass
  localparam int NC  = (LPA - 1) * P + L;    // feeding clocks per pass

  typedef enum logic [2:0] {S_IDLE, S_P1, S_P2, S_WAIT, S_EMIT} state_t;
  state_t     state;
  logic [5:0] cnt;
  logic       pass2;

  logic signed [15:0] b1 [9][4];
  logic signed [15:0] h1 [4][5];
  logic signed [21:0] j1 [4][4];

  // value of sample s of filter line g in the current pass
  function automatic sa_data_t line_sample(input logic p2, input int g, input int s);
    if (!p2)       return sa_data_t'({8'd0, ref_win[g][s]});
    else if (g < 5) return sa_data_t'({8'd0, ref_win[s][g+2]});
    else            return sa_data_t'(b1[s][g-5]);
  endfunction

  // array control words
  always_comb begin
    int g, s;
    g = 0;
    s = 0;
    for (int a = 0; a < NSA; a++) begin
      sa_ctrl[a] = SA_IDLE;
      if (state == S_P1 || state == S_P2) begin
        sa_ctrl[a].taps = {6'sd1, -6'sd5, 6'sd20, 6'sd20, -6'sd5, 6'sd1};
        for (int i = 0; i < LPA; i++) begin
          g = a + NSA * i;
          s = int'(cnt) - i * P;
          if (g < 9) begin
            if (s >= 0 && s < L) begin
              if (i % 2 == 0) sa_ctrl[a].in0 = line_sample(pass2, g, s);
              else            sa_ctrl[a].in1 = line_sample(pass2, g, s);
            end
            if (s >= 0 && s < W) sa_ctrl[a].sel0 = 1'((i % 2));
            if (s >= L - W && s < L) begin
              sa_ctrl[a].tag_vld = 1'b1;
              sa_ctrl[a].tag     = {1'b0, pass2, 4'(g), 2'(s - (L - W))};
            end
          end
        end
      end
    end
  end

  // sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      pass2 <= 1'b0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          state <= S_P1; cnt <= '0; pass2 <= 1'b0;
        end
        S_P1: if (cnt == 6'(NC)) begin   // one extra clock lets the last result land
          state <= S_P2; cnt <= '0; pass2 <= 1'b1;
        end else cnt <= cnt + 1'b1;
        S_P2: if (cnt == 6'(NC - 1)) begin
          state <= S_WAIT; cnt <= '0;
        end else cnt <= cnt + 1'b1;
        S_WAIT: begin state <= S_EMIT; cnt <= '0; end
        S_EMIT: if (cnt == 6'd15) begin
          state <= S_IDLE; cnt <= '0; pass2 <= 1'b0;
        end else cnt <= cnt + 1'b1;
        default: state <= S_IDLE;
      endcase
    end
  end

  // capture filtered values
  always_ff @(posedge clk) begin
    for (int a = 0; a < NSA; a++) begin
      if (sa_res[a].tag_vld) begin
        automatic int g = int'(sa_res[a].tag[5:2]);
        automatic int k = int'(sa_res[a].tag[1:0]);
        if (!sa_res[a].tag[6])  b1[g][k] <= 16'(sa_res[a].out);
        else if (g < 5)         h1[k][g] <= 16'(sa_res[a].out);
        else                    j1[k][g-5] <= sa_res[a].out;
      end
    end
  end

  // quarter-pel selection
  function automatic pix_t g_at(input int x, input int y);
    return ref_win[y+2][x+2];
  endfunction
  function automatic pix_t b_at(input int x, input int y);  // horizontal half, y = 0..4
    return clip1((32'(b1[y+2][x]) + 16) >>> 5);
  endfunction
  function automatic pix_t h_at(input int x, input int y);  // vertical half, x = 0..4
    return clip1((32'(h1[y][x]) + 16) >>> 5);
  endfunction
  function automatic pix_t j_at(input int x, input int y);  // centre half
    return clip1((32'(j1[y][x]) + 512) >>> 10);
  endfunction
  function automatic pix_t avg(input pix_t u, input pix_t v);
    return 8'((9'(u) + 9'(v) + 9'd1) >> 1);
  endfunction

  pix_t q_val;
  always_comb begin
    int x, y;
    x = int'(cnt[1:0]);
    y = int'(cnt[3:2]);
    case ({fx, fy})
      4'b00_00: q_val = g_at(x, y);
      4'b01_00: q_val = avg(g_at(x, y), b_at(x, y));          // a
      4'b10_00: q_val = b_at(x, y);                           // b
      4'b11_00: q_val = avg(b_at(x, y), g_at(x+1, y));        // c
      4'b00_01: q_val = avg(g_at(x, y), h_at(x, y));          // d
      4'b01_01: q_val = avg(b_at(x, y), h_at(x, y));          // e
      4'b10_01: q_val = avg(b_at(x, y), j_at(x, y));          // f
      4'b11_01: q_val = avg(b_at(x, y), h_at(x+1, y));        // g
      4'b00_10: q_val = h_at(x, y);                           // h
      4'b01_10: q_val = avg(h_at(x, y), j_at(x, y));          // i
      4'b10_10: q_val = j_at(x, y);                           // j
      4'b11_10: q_val = avg(j_at(x, y), h_at(x+1, y));        // k
      4'b00_11: q_val = avg(h_at(x, y), g_at(x, y+1));        // n
      4'b01_11: q_val = avg(h_at(x, y), b_at(x, y+1));        // p
      4'b10_11: q_val = avg(j_at(x, y), b_at(x, y+1));        // q
      default:  q_val = avg(h_at(x+1, y), b_at(x, y+1));      // r
    endcase
  end

  always_comb begin
    px      = '0;
    px.vld  = (state == S_EMIT);
    px.comp = COMP_Y;
    px.x    = {2'b00, cnt[1:0]};
    px.y    = {2'b00, cnt[3:2]};
    px.val  = q_val;
  end

  assign done = (state == S_EMIT) && (cnt == 6'd15);
  assign busy = (state != S_IDLE);

endmodule
