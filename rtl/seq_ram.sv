// seq_ram: a register file of sequence numbers, one per queue.
//
// Used four times: write and read sequence numbers of the unicast queues (one per output port
// and delay priority level) and write and read sequence numbers of the multicast connections
// (one per MCI). Together with the port or MCI a sequence number forms the tag of a cell, so
// these registers replace the read/write address registers of a linked-list buffer. All
// entries are visible at once on q so that the controllers can compare write and read numbers
// (queue empty and queue length are differences of the two). One write per clock, taking effect
// at the clock edge. Reset clears every entry to 0, the known power-up value the scheme needs.
module seq_ram #(
  parameter int unsigned DEPTH = atm_pkg::N_PORTS_DEF * atm_pkg::N_PRIO_DEF,
  parameter int unsigned WIDTH = atm_pkg::SEQ_W_DEF
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         q [DEPTH]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
    end else if (we) begin
      q[waddr] <= wdata;
    end
  end

endmodule
