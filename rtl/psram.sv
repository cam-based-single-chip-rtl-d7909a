// psram: parallel-to-serial output memory between the shared buffer and the output pins.
//
// Each output port owns two cell-wide words. The first word sits on the bit lines of the
// buffer: when the read controller selects the port (sel[p], several ports at once for a
// multicast cell) it latches the cell being read (bl). At the round-robin cycle boundary
// (xfer) every first word is copied into its second word at once, so no commutation is
// needed; during the following cycle the second words of all ports drive their pins together,
// PIN_W bits per clock, bits 0..PIN_W-1 first, then the next group, up to the top of the cell.
// out_valid marks the clocks in which a port drives a cell and out_sop the first group.
// Double buffering lets the next cell of a port be latched while the previous one is still
// leaving. A port that was not selected in a cycle drives nothing valid in the next.
// The shared group counter and the valid/start flags are this design's choices. sel and xfer
// may occur in the same clock: the copy takes the old first word.
module psram #(
  parameter int unsigned N_PORTS   = atm_pkg::N_PORTS_DEF,
  parameter int unsigned CELL_BITS = atm_pkg::CELL_BITS_DEF,
  parameter int unsigned PIN_W     = atm_pkg::PIN_W_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [CELL_BITS-1:0] bl,
  input  logic [N_PORTS-1:0]   sel,
  input  logic                 xfer,
  output logic [PIN_W-1:0]     out_data  [N_PORTS],
  output logic [N_PORTS-1:0]   out_valid,
  output logic [N_PORTS-1:0]   out_sop
);

  localparam int unsigned N_GRP = (CELL_BITS + PIN_W - 1) / PIN_W;
  localparam int unsigned GW    = $clog2(N_GRP + 1);
  localparam int unsigned PAD   = N_GRP * PIN_W;

  logic [CELL_BITS-1:0] first_q  [N_PORTS];
  logic [CELL_BITS-1:0] second_q [N_PORTS];
  logic [N_PORTS-1:0]   fvalid_q, svalid_q;
  logic [GW-1:0]        grp_q;        // group on the pins; N_GRP when done

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fvalid_q <= '0;
      svalid_q <= '0;
      grp_q    <= GW'(N_GRP);
    end else begin
      if (xfer) begin
        svalid_q <= fvalid_q;
        fvalid_q <= sel;
        grp_q    <= '0;
      end else begin
        fvalid_q <= fvalid_q | sel;
        if (grp_q != GW'(N_GRP)) grp_q <= GW'(grp_q + 1'b1);
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < N_PORTS; p++) begin
      if (sel[p]) first_q[p]  <= bl;
      if (xfer)   second_q[p] <= first_q[p];
    end
  end

  always_comb begin
    for (int p = 0; p < N_PORTS; p++) begin
      logic [PAD-1:0] padded;
      logic [GW-1:0]  g;
      padded       = PAD'(second_q[p]);
      g            = (grp_q == GW'(N_GRP)) ? '0 : grp_q;
      out_data[p]  = padded[g * PIN_W +: PIN_W];
      out_valid[p] = svalid_q[p] && (grp_q != GW'(N_GRP));
      out_sop[p]   = svalid_q[p] && (grp_q == '0);
    end
  end

endmodule
