// block_sync: the synchronisation channel of the video pipe.
//
// Every pipe module works on one logical 8x8 block per block cycle and
// reports the end of its work with a one-clock done pulse. The channel
// remembers which modules have reported; when every enabled module has,
// it pulses go, which starts the next block cycle in all modules at once.
// A module that finishes early therefore waits, and the block cycle lasts as
// long as the slowest module. Modules whose enable bit is low (for example
// the de-interlacer when the source is progressive) are not waited for. The
// very first block cycle after the host has programmed the pipe is started
// with kick.
//
// Outputs for observation: block_cnt counts go pulses, wait_cycles counts
// clocks in which at least one module had finished and was waiting for the
// others (a stall in the document's sense), last_len is the length in clocks
// of the last completed block cycle.
// Collecting finish messages and releasing all modules together follows
// the document; the kick input and the counters are this design's.
module block_sync #(
  parameter int NMOD = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            kick,
  input  logic [NMOD-1:0] enable,
  input  logic [NMOD-1:0] done,
  output logic            go,
  output logic [NMOD-1:0] finished,
  output logic [31:0]     block_cnt,
  output logic [31:0]     wait_cycles,
  output logic [15:0]     last_len
);
  logic [NMOD-1:0] fin_q;
  logic [NMOD-1:0] fin_now;
  logic            running;
  logic [15:0]     len;

  assign fin_now  = fin_q | done | ~enable;
  assign go       = kick || (running && (&fin_now));
  assign finished = fin_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fin_q       <= '0;
      running     <= 1'b0;
      block_cnt   <= '0;
      wait_cycles <= '0;
      last_len    <= '0;
      len         <= '0;
    end else begin
      if (go) begin
        fin_q     <= '0;
        running   <= 1'b1;
        block_cnt <= block_cnt + 1'b1;
        if (running) last_len <= len + 1'b1;
        len       <= '0;
      end else begin
        fin_q <= fin_q | (done & enable);
        if (running) len <= len + 1'b1;
        if (running && |(fin_q & enable)) wait_cycles <= wait_cycles + 1'b1;
      end
    end
  end

  // a module reports at most once per block cycle
  assert property (@(posedge clk) disable iff (!rst_n) (done & fin_q & enable) == '0);

endmodule
