// dram_addr_map: placement of frame samples in the four external DRAMs.
//
// Luma goes to memories 0 and 1, chroma to memories 2 and 3, so a luma and
// a chroma reference block can be fetched at the same time. Within a pair
// the memory changes every two pixels horizontally (memory = x[1]), so a
// block fetch is spread evenly over both memories and takes about half the
// time. A 32-bit word holds a 2x2 group of samples: two columns of two
// lines (lane = {y[0], x[0]}).
//
// The frame is cut into tiles of TILE_W x TILE_H samples; each tile fills
// one DRAM row of a bank. The four banks are interleaved in a 2x2 pattern
// (bank = {tile_y[0], tile_x[0]}), so horizontally or vertically
// neighbouring tiles always lie in different banks: a reference block that
// straddles tile borders causes bank changes, never a row miss in the same
// bank. Row = frame base + (tile_y/2) * ceil(tiles_x/2) + tile_x/2; each
// stored frame (current and references) has its own rows, the Cr plane
// follows the Cb plane. Column = word position inside the tile.
//
// Purely combinational. x, y are sample coordinates inside the plane given
// by comp (chroma planes are half size in both directions, 4:2:0).
// Separate luma/chroma memories, the two-pixel memory interleave and the
// bank interleave of neighbouring tiles follow the document; tile size,
// word packing and row numbering are this design's choices.
module dram_addr_map
  import pred_pkg::*;
#(
  parameter int FRAME_W = 1920,
  parameter int FRAME_H = 1088,
  parameter int TILE_W  = 64,
  parameter int TILE_H  = 64,
  parameter int ROW_W   = 14,   // row address bits
  parameter int COL_W   = 9     // column address bits (TILE_W/4 * TILE_H/2 words)
) (
  input  logic [11:0]      x,
  input  logic [11:0]      y,
  input  logic [4:0]       frame,
  input  comp_t            comp,
  output logic [1:0]       mem,
  output logic [1:0]       bank,
  output logic [ROW_W-1:0] row,
  output logic [COL_W-1:0] col,
  output logic [1:0]       lane
);
  localparam int LTX   = (FRAME_W + TILE_W - 1) / TILE_W;        // luma tiles per row
  localparam int LTY   = (FRAME_H + TILE_H - 1) / TILE_H;
  localparam int CTX   = (FRAME_W / 2 + TILE_W - 1) / TILE_W;    // chroma tiles per row
  localparam int CTY   = (FRAME_H / 2 + TILE_H - 1) / TILE_H;
  localparam int LROWS = ((LTX + 1) / 2) * ((LTY + 1) / 2);      // rows per bank, luma frame
  localparam int CROWS = ((CTX + 1) / 2) * ((CTY + 1) / 2);      // rows per bank, one chroma plane
  localparam int TXB   = $clog2(TILE_W);
  localparam int TYB   = $clog2(TILE_H);

  // each tile must fill at most one DRAM row
  if ((TILE_W / 4) * (TILE_H / 2) > (1 << COL_W)) begin : g_bad_tile
    $error("tile does not fit in a DRAM row");
  end

  logic [11:0] tx, ty;
  int          half_tx, base;

  always_comb begin
    tx      = x >> TXB;
    ty      = y >> TYB;
    half_tx = (comp == COMP_Y) ? (LTX + 1) / 2 : (CTX + 1) / 2;
    case (comp)
      COMP_Y:  base = int'(frame) * LROWS;
      COMP_CB: base = int'(frame) * 2 * CROWS;
      default: base = int'(frame) * 2 * CROWS + CROWS;
    endcase
    mem  = {comp != COMP_Y, x[1]};
    bank = {ty[0], tx[0]};
    row  = ROW_W'(base + (int'(ty) >> 1) * half_tx + (int'(tx) >> 1));
    col  = COL_W'(((int'(y) % TILE_H) >> 1) * (TILE_W / 4)
                + ((int'(x) % TILE_W) >> 2));
    lane = {y[0], x[0]};
  end

endmodule
