// mc_cam: bit-mapped multicast CAM (McCAM) that picks a multicast connection to release.
//
// One word per multicast connection identifier (MCI); bit p of a word is 1 when output port p
// belongs to that connection. A word is written through cfg_* at call set-up. In the multicast
// slot of the output round-robin the CAM is searched with a word that is "don't care" for
// ports still free in this round-robin cycle (s_free[p]=1) and 0 for ports already given a
// cell: a stored 1 facing a 0 is a miss, because the cell could not reach all its ports in the
// same memory cycle. Among the hits the encoder picks one MCI; its priority rotates, the
// search starting just after the MCI granted last, for fairness.
// The search only considers connections that have a cell waiting (s_pending), which the read
// controller derives from the multicast sequence numbers; that qualifier, the rotation rule
// and reset clearing all words are this design's choices.
// Timing: search and result are combinational; the rotation pointer and the words change at
// the clock edge (pointer only when s_en and a hit).
module mc_cam #(
  parameter int unsigned N_MCI   = 2 ** atm_pkg::MCI_W_DEF,
  parameter int unsigned N_PORTS = atm_pkg::N_PORTS_DEF
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // call set-up
  input  logic                       cfg_we,
  input  logic [$clog2(N_MCI)-1:0]   cfg_mci,
  input  logic [N_PORTS-1:0]         cfg_ports,
  // search
  input  logic                       s_en,
  input  logic [N_PORTS-1:0]         s_free,
  input  logic [N_MCI-1:0]           s_pending,
  output logic [N_MCI-1:0]           s_hitline,
  output logic                       s_hit,
  output logic [$clog2(N_MCI)-1:0]   s_mci,
  output logic [N_PORTS-1:0]         s_ports
);

  localparam int unsigned MW = $clog2(N_MCI);

  logic [N_PORTS-1:0] word_q [N_MCI];
  logic [MW-1:0]      rot_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_MCI; i++) word_q[i] <= '0;
      rot_q <= '0;
    end else begin
      if (cfg_we) word_q[cfg_mci] <= cfg_ports;
      if (s_en && s_hit) rot_q <= MW'(s_mci + 1'b1);
    end
  end

  // Match lines: miss when a stored 1 meets an occupied (0) port.
  always_comb begin
    for (int i = 0; i < N_MCI; i++)
      s_hitline[i] = s_pending[i] && ((word_q[i] & ~s_free) == '0);
  end

  // Rotating priority encoder starting at rot_q.
  always_comb begin
    logic          found;
    logic [MW-1:0] idx;
    found = 1'b0;
    s_mci = '0;
    for (int k = 0; k < N_MCI; k++) begin
      idx = MW'(rot_q + k);
      if (!found && s_hitline[idx]) begin
        found = 1'b1;
        s_mci = idx;
      end
    end
    s_hit   = found;
    s_ports = word_q[s_mci];
  end

endmodule
