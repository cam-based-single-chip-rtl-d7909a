// cell_aging: discards cells that have waited in the shared buffer longer than a latency limit.
//
// When the buffer is built from dynamic memory it is never refreshed: a cell that is still
// waiting when its charge could start to leak has already missed any useful delivery time, so
// it only has to be removed. This block keeps an age for every buffer word. The age of a word
// is cleared when a cell is written into it (tw_en on tw_line, the tag CAM's write) and grows
// by one at every tick while the word holds a cell. A word whose age has reached AGE_LIMIT is
// flagged on expire_line in the same clock and is freed through the tag CAM's invalidate port;
// its own copy of the word's state follows any invalidation seen on inv_en/inv_line (reads
// and its own expiries alike). The cell is then gone from its queue: when the read pipeline
// later asks for its tag, the search misses and the slot carries no cell, while the read
// sequence number has already moved past it, so the queue goes on with the next cell.
// Interface: tick is a one-clock pulse giving the time base (the switch ticks once per
// round-robin cycle); expired pulses for each discarded cell. Timing: expire_line is
// combinational from the registered ages; the age update and the freeing happen at the same
// clock edge. The document asks only for "a means of invalidating cells"; the per-word
// counter, the time base and the limit are this design's choices. AGE_LIMIT = 0 disables it.
module cell_aging #(
  parameter int unsigned N_CELLS   = atm_pkg::N_CELLS_DEF,
  parameter int unsigned AGE_LIMIT = atm_pkg::AGE_LIMIT_DEF
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               tick,
  input  logic               tw_en,
  input  logic [N_CELLS-1:0] tw_line,
  input  logic               inv_en,
  input  logic [N_CELLS-1:0] inv_line,
  output logic [N_CELLS-1:0] expire_line,
  output logic               expired
);

  localparam int unsigned AGE_W = (AGE_LIMIT > 0) ? $clog2(AGE_LIMIT + 1) : 1;

  logic [N_CELLS-1:0] held_q;
  logic [AGE_W-1:0]   age_q [N_CELLS];

  always_comb begin
    for (int i = 0; i < N_CELLS; i++)
      expire_line[i] = (AGE_LIMIT > 0) && held_q[i] && age_q[i] == AGE_W'(AGE_LIMIT);
  end
  assign expired = |expire_line;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held_q <= '0;
      for (int i = 0; i < N_CELLS; i++) age_q[i] <= '0;
    end else begin
      for (int i = 0; i < N_CELLS; i++) begin
        if (tw_en && tw_line[i]) begin
          held_q[i] <= 1'b1;
          age_q[i]  <= '0;
        end else if ((inv_en && inv_line[i]) || expire_line[i]) begin
          held_q[i] <= 1'b0;
        end else if (tick && held_q[i] && age_q[i] != AGE_W'(AGE_LIMIT)) begin
          age_q[i] <= age_q[i] + 1'b1;
        end
      end
    end
  end

  // a word is written only while it is free
  a_write_free: assert property (@(posedge clk) disable iff (!rst_n)
                                 tw_en |-> (tw_line & held_q) == '0);

endmodule
