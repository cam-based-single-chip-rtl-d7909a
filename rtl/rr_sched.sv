// rr_sched: output round-robin schedule with one rotating multicast slot.
//
// A round-robin cycle has N_PORTS unicast slots and one multicast slot, one slot per clock.
// From cycle to cycle the multicast slot moves from the first slot down to, but not including,
// the last, so that multicasts neither starve unicasts nor get starved; the unicast order
// rotates too so that no port is always served last. With c the cycle number:
//   multicast slot = c mod N_PORTS
//   first unicast port = (c + floor(c / N_PORTS)) mod N_PORTS
// and unicast ports follow in increasing order (mod N_PORTS) in the remaining slots. For
// N_PORTS=8 this reproduces the published sample schedule of an 8x8 switch.
// RR_LEN may make the cycle longer than N_PORTS+1 clocks; the extra slots are idle. This
// design uses that to let the output pins, which carry PIN_W bits per clock, finish a cell
// within one cycle.
// Outputs are registered state, valid every clock after reset: kind/port of the current slot,
// first (slot 0) and last (slot RR_LEN-1) flags.
module rr_sched
  import atm_pkg::*;
#(
  parameter int unsigned N_PORTS = N_PORTS_DEF,
  parameter int unsigned RR_LEN  = N_PORTS_DEF + 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  output slot_kind_e                 kind,
  output logic [$clog2(N_PORTS)-1:0] port,
  output logic                       first,
  output logic                       last,
  output logic [$clog2(RR_LEN)-1:0]  slot
);

  localparam int unsigned PW = $clog2(N_PORTS);
  localparam int unsigned SW = $clog2(RR_LEN);

  logic [SW-1:0] slot_q;
  logic [PW-1:0] mcslot_q;   // c mod N_PORTS
  logic [PW-1:0] start_q;    // first unicast port of this cycle

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_q   <= '0;
      mcslot_q <= '0;
      start_q  <= '0;
    end else if (slot_q == SW'(RR_LEN - 1)) begin
      slot_q <= '0;
      if (mcslot_q == PW'(N_PORTS - 1)) begin
        mcslot_q <= '0;
        start_q  <= PW'(start_q + 2'd2);   // extra step each N_PORTS cycles
      end else begin
        mcslot_q <= PW'(mcslot_q + 1'b1);
        start_q  <= PW'(start_q + 1'b1);
      end
    end else begin
      slot_q <= SW'(slot_q + 1'b1);
    end
  end

  always_comb begin
    slot  = slot_q;
    first = (slot_q == '0);
    last  = (slot_q == SW'(RR_LEN - 1));
    port  = '0;
    if (int'(slot_q) > N_PORTS) begin
      kind = SLOT_IDLE;
    end else if (slot_q == SW'(mcslot_q)) begin
      kind = SLOT_MC;
    end else begin
      kind = SLOT_UNI;
      port = PW'(int'(start_q) + int'(slot_q) - ((slot_q > SW'(mcslot_q)) ? 1 : 0));
    end
  end

  initial assert (RR_LEN >= N_PORTS + 1) else $error("RR_LEN must hold N_PORTS+1 slots");

endmodule
