// systolic_array: the reprogrammable 6-PE FIR array shared by inter and intra
// prediction.
//
// Structure. Input-broadcast (transposed) form: every PE multiplies the
// sample it sees by its own tap (sm_unit) and adds the partial sum handed on
// by its left neighbour; five registers between PE1..PE6 carry the partial
// sums, and a sixth register holds the output of PE6. PE1 applies taps[0] to
// the oldest sample of a window, PE6 applies taps[5] to the newest one, so an
// output leaves the array one clock after the newest sample of its window.
//
// Two-input broadcasting. Two input lines, in0 and in1, are broadcast to all
// PEs and each PE picks one with a multiplexer. The choice made for PE1
// (sel0) travels one PE per clock, so PE n uses the line PE1 used n-1 clocks
// earlier. A controller feeds consecutive filter lines alternately on in0 and
// in1 and overlaps them; the array then produces one output per clock with
// no bubbles between rows.
//
// Split mode. The chain is cut between PE3 and PE4: PE1-3 filter in0 and
// their sum is out_lo, PE4-6 filter in1 and their sum is out. Two 2-tap
// chroma filters (Cb and Cr) or two different intra filters run at once.
//
// Feedback loops. With acc_a, PE1 adds its product to its own register
// instead of starting a new sum (loop A); with acc_b, PE2 does the same on
// its own input (loop B); loop A always takes in0 and loop B in1.
// acc_clr restarts both. These give the DC sums and
// the H and V gradients of plane prediction.
//
// Interface: ctrl is one sa_ctrl_t per clock; res is registered. tag/tag_vld
// are delayed by one clock and mark which output is valid. Reset clears the
// registers. The PE count, broadcast scheme, split and feedback loops follow
// the document; the register widths (SA_AW) and the tag are this design's.
module systolic_array
  import pred_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  sa_ctrl_t ctrl,
  output sa_res_t  res
);
  logic [SA_NPE-2:0] sel_q;               // sel_q[n] = line of PE(n+2)
  logic [SA_NPE-1:0] sel;
  sa_data_t          x   [SA_NPE];
  sa_acc_t           p   [SA_NPE];
  sa_acc_t           r   [SA_NPE-1];      // partial sums after PE1..PE5
  sa_acc_t           out_q;
  logic              tag_vld_q;
  logic [SA_TAGW-1:0] tag_q;

  always_comb begin
    sel = {sel_q, ctrl.sel0};
    for (int n = 0; n < SA_NPE; n++) begin
      if (ctrl.split) x[n] = (n < SA_NPE/2) ? ctrl.in0 : ctrl.in1;
      else            x[n] = sel[n] ? ctrl.in1 : ctrl.in0;
    end
    // the feedback loops have their own inputs: loop A on in0, loop B on in1
    if (ctrl.acc_a) x[0] = ctrl.in0;
    if (ctrl.acc_b) x[1] = ctrl.in1;
  end

  for (genvar n = 0; n < SA_NPE; n++) begin : g_sm
    sm_unit u_sm (.x(x[n]), .tap(ctrl.taps[n]), .p(p[n]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_q     <= '0;
      for (int n = 0; n < SA_NPE-1; n++) r[n] <= '0;
      out_q     <= '0;
      tag_vld_q <= 1'b0;
      tag_q     <= '0;
    end else begin
      sel_q <= sel[SA_NPE-2:0];
      // PE1, loop A
      r[0] <= ctrl.acc_a ? ((ctrl.acc_clr ? '0 : r[0]) + p[0]) : p[0];
      // PE2, loop B
      r[1] <= ctrl.acc_b ? ((ctrl.acc_clr ? '0 : r[1]) + p[1]) : (r[0] + p[1]);
      r[2] <= r[1] + p[2];
      // PE4 starts a fresh sum in split mode
      r[3] <= ctrl.split ? p[3] : (r[2] + p[3]);
      r[4] <= r[3] + p[4];
      out_q <= r[4] + p[5];
      tag_vld_q <= ctrl.tag_vld;
      tag_q     <= ctrl.tag;
    end
  end

  assign res.out     = out_q;
  assign res.out_lo  = r[2];
  assign res.acc_a   = r[0];
  assign res.acc_b   = r[1];
  assign res.tag_vld = tag_vld_q;
  assign res.tag     = tag_q;
endmodule
