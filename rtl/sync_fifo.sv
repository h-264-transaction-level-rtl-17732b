// sync_fifo: single-clock first-in first-out buffer, the local buffer a bus
// master keeps so that it does not stall while another master owns the data
// bus (read masters fill it from the bus and drain it into their datapath,
// write masters the other way round).
//
// Circular buffer of DEPTH words with read and write pointers and an
// occupancy counter. push is ignored when full and pop when empty; both may
// happen in the same clock. rdata shows the oldest word (first-word
// fall-through). level and max_level (high-water mark) help size the buffer,
// which is what the document's buffer-size analysis is about.
// The FIFO role follows the document; depth, width and the fall-through
// read are this design's choices.
module sync_fifo #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   push,
  input  logic [WIDTH-1:0]       wdata,
  input  logic                   pop,
  output logic [WIDTH-1:0]       rdata,
  output logic                   full,
  output logic                   empty,
  output logic [$clog2(DEPTH):0] level,
  output logic [$clog2(DEPTH):0] max_level
);
  localparam int AW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             do_push, do_pop;

  assign full    = (level == (AW+1)'(DEPTH));
  assign empty   = (level == '0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rdata   = mem[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp        <= '0;
      rp        <= '0;
      level     <= '0;
      max_level <= '0;
    end else begin
      if (do_push) wp <= (int'(wp) == DEPTH - 1) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (int'(rp) == DEPTH - 1) ? '0 : rp + 1'b1;
      case ({do_push, do_pop})
        2'b10:   level <= level + 1'b1;
        2'b01:   level <= level - 1'b1;
        default: ;
      endcase
      if (level > max_level) max_level <= level;
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= wdata;
  end

endmodule
