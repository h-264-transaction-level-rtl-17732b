// bus_arbiter: arbitration of the shared data bus between the three masters
// of the video pipe (0 = data fetch, 1 = de-blocking, 2 = de-interlacer).
//
// Every change of bus master tends to cause DRAM row misses, so the policy
// is deterministic and switches as rarely as possible: a master that is
// granted the bus keeps it until it has moved all the data it needs for the
// current 8x8 block cycle, which it signals by raising last[i] with its
// final transfer (xfer). Only then is the bus released, and the next
// requesting master in the fixed order 0, 1, 2, 0, ... is granted. Within a
// block cycle this gives the sequence data fetch, de-blocking,
// de-interlacer. An idle bus is granted in the cycle after a request
// appears.
//
// Interface: req[i] level request; gnt one-hot (or zero) registered grant;
// xfer high for each bus transfer of the granted master; last[i] marks the
// master's final transfer of its block. switches counts changes of owner.
// Holding the bus for a whole block cycle follows the document; the
// round-robin order among requesters is this design's.
module bus_arbiter #(
  parameter int NM = 3
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NM-1:0] req,
  input  logic          xfer,
  input  logic [NM-1:0] last,
  output logic [NM-1:0] gnt,
  output logic [31:0]   switches
);
  logic [$clog2(NM)-1:0] ptr;     // master after the last owner
  logic [$clog2(NM)-1:0] pick;
  logic                  found;
  logic                  release_now;

  logic [NM-1:0]         req_eff;

  assign release_now = |(gnt & last) && xfer;
  // a master that has just sent its last word is done for this block cycle
  assign req_eff     = release_now ? (req & ~gnt) : req;

  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int k = 0; k < NM; k++) begin
      automatic int idx = (int'(ptr) + k) % NM;
      if (!found && req_eff[idx]) begin
        found = 1'b1;
        pick  = ($clog2(NM))'(idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gnt      <= '0;
      ptr      <= '0;
      switches <= '0;
    end else begin
      if (gnt == '0 || release_now) begin
        if (found) begin
          gnt <= NM'(1) << pick;
          ptr <= (int'(pick) == NM - 1) ? '0 : pick + 1'b1;
          if (gnt != (NM'(1) << pick)) switches <= switches + 1'b1;
        end else begin
          gnt <= '0;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  // a transfer only happens on a granted bus
  assert property (@(posedge clk) disable iff (!rst_n) xfer |-> (gnt != '0));

endmodule
