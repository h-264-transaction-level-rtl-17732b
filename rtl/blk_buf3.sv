// blk_buf3: the three logical-8x8 block buffers between IQ/IDCT, the
// intra/inter predictor (IIP) and the de-blocking filter.
//
// A logical 8x8 block is one 8x8 luma block and the two 4x4 chroma blocks
// that go with it: 96 samples, addressed 0-63 luma (raster), 64-79 Cb,
// 80-95 Cr. In each block cycle IQ/IDCT writes residuals into one buffer
// (port A), the IIP reads the residuals that IQ/IDCT wrote one block cycle
// earlier from a second buffer and writes the reconstructed samples back in
// place (port B), and the de-blocking filter reads the block reconstructed
// one cycle before that from the third buffer (port C). A pulse on rotate
// (the start of the next block cycle) moves every buffer one stage along,
// so no data is copied. Reads are combinational, writes take effect at the
// clock edge. After reset port A owns buffer 0, port B buffer 2 and port C
// buffer 1.
// The three-buffer arrangement and its rotation follow the document; the
// word width (16-bit signed, wide enough for any residual) and the address
// map are this design's choices.
module blk_buf3 #(
  parameter int DEPTH = 96,   // samples per logical 8x8 block
  parameter int WIDTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     rotate,
  // port A: IQ/IDCT writes residuals
  input  logic                     a_we,
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  input  logic signed [WIDTH-1:0]  a_wdata,
  // port B: IIP reads residuals and writes reconstructed samples
  input  logic [$clog2(DEPTH)-1:0] b_addr,
  output logic signed [WIDTH-1:0]  b_rdata,
  input  logic                     b_we,
  input  logic signed [WIDTH-1:0]  b_wdata,
  // port C: de-blocking reads reconstructed samples
  input  logic [$clog2(DEPTH)-1:0] c_addr,
  output logic signed [WIDTH-1:0]  c_rdata,
  // which buffer each port uses (for observation)
  output logic [1:0]               a_sel,
  output logic [1:0]               b_sel,
  output logic [1:0]               c_sel
);
  logic signed [WIDTH-1:0] mem0 [DEPTH];
  logic signed [WIDTH-1:0] mem1 [DEPTH];
  logic signed [WIDTH-1:0] mem2 [DEPTH];

  function automatic logic [1:0] nxt(input logic [1:0] s);
    return (s == 2'd2) ? 2'd0 : s + 2'd1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_sel <= 2'd0;
      b_sel <= 2'd2;
      c_sel <= 2'd1;
    end else if (rotate) begin
      a_sel <= nxt(a_sel);
      b_sel <= nxt(b_sel);
      c_sel <= nxt(c_sel);
    end
  end

  always_ff @(posedge clk) begin
    if (a_we) begin
      case (a_sel)
        2'd0:    mem0[a_addr] <= a_wdata;
        2'd1:    mem1[a_addr] <= a_wdata;
        default: mem2[a_addr] <= a_wdata;
      endcase
    end
    if (b_we) begin
      case (b_sel)
        2'd0:    mem0[b_addr] <= b_wdata;
        2'd1:    mem1[b_addr] <= b_wdata;
        default: mem2[b_addr] <= b_wdata;
      endcase
    end
  end

  always_comb begin
    case (b_sel)
      2'd0:    b_rdata = mem0[b_addr];
      2'd1:    b_rdata = mem1[b_addr];
      default: b_rdata = mem2[b_addr];
    endcase
    case (c_sel)
      2'd0:    c_rdata = mem0[c_addr];
      2'd1:    c_rdata = mem1[c_addr];
      default: c_rdata = mem2[c_addr];
    endcase
  end

  // the three ports always use three different buffers
  assert property (@(posedge clk) disable iff (!rst_n)
    a_sel != b_sel && b_sel != c_sel && a_sel != c_sel);

endmodule
