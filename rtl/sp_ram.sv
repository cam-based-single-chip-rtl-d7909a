// sp_ram: serial-to-parallel input memory between the input pins and the shared buffer.
//
// The mirror image of the output PSRAM. Each input port owns two cell-wide words. The serial
// word collects the cell from the port's PIN_W input pins, one group of bits per clock with
// in_valid, bits 0..PIN_W-1 first; in_sop marks the first group, and the routing side-band
// (multicast flag, destination, delay level, CLP) is captured with it. When the last group
// has arrived the cell and its routing move to the parallel word, which the write pipeline
// reads (cell_valid, cell_data, route) and releases with ack. A port thus needs
// ceil(CELL_BITS/PIN_W) clocks per cell while the write round-robin visits it every N_PORTS
// clocks, so the parallel word is always free again before the next cell is complete; if a
// cell is nevertheless complete while the parallel word is still full, the new cell is lost
// and overrun pulses. The group counter per port, the side-band capture at in_sop and the
// overrun rule are this design's choices.
module sp_ram #(
  parameter int unsigned N_PORTS   = atm_pkg::N_PORTS_DEF,
  parameter int unsigned CELL_BITS = atm_pkg::CELL_BITS_DEF,
  parameter int unsigned PIN_W     = atm_pkg::PIN_W_DEF,
  parameter int unsigned ROUTE_W   = 1 + atm_pkg::MCI_W_DEF + 1 + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // pins
  input  logic [PIN_W-1:0]     in_data  [N_PORTS],
  input  logic [N_PORTS-1:0]   in_valid,
  input  logic [N_PORTS-1:0]   in_sop,
  input  logic [ROUTE_W-1:0]   in_route [N_PORTS],
  // parallel side
  output logic [N_PORTS-1:0]   cell_valid,
  output logic [CELL_BITS-1:0] cell_data     [N_PORTS],
  output logic [ROUTE_W-1:0]   route    [N_PORTS],
  input  logic [N_PORTS-1:0]   ack,
  output logic [N_PORTS-1:0]   overrun
);

  localparam int unsigned N_GRP = (CELL_BITS + PIN_W - 1) / PIN_W;
  localparam int unsigned GW    = $clog2(N_GRP + 1);
  localparam int unsigned PAD   = N_GRP * PIN_W;

  logic [PAD-1:0]     ser_q   [N_PORTS];
  logic [ROUTE_W-1:0] sroute_q [N_PORTS];
  logic [GW-1:0]      grp_q   [N_PORTS];
  logic [N_PORTS-1:0] done;

  always_comb begin
    for (int p = 0; p < N_PORTS; p++)
      done[p] = in_valid[p] && (grp_q[p] == GW'(N_GRP - 1) || (in_sop[p] && N_GRP == 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < N_PORTS; p++) grp_q[p] <= '0;
      cell_valid <= '0;
    end else begin
      for (int p = 0; p < N_PORTS; p++) begin
        if (in_valid[p]) begin
          if (in_sop[p]) grp_q[p] <= (N_GRP == 1) ? '0 : GW'(1);
          else if (done[p]) grp_q[p] <= '0;
          else grp_q[p] <= GW'(grp_q[p] + 1'b1);
        end
        if (done[p] && (!cell_valid[p] || ack[p])) cell_valid[p] <= 1'b1;
        else if (ack[p]) cell_valid[p] <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < N_PORTS; p++) begin
      if (in_valid[p]) begin
        if (in_sop[p]) begin
          ser_q[p][PIN_W-1:0] <= in_data[p];
          sroute_q[p]         <= in_route[p];
        end else begin
          ser_q[p][grp_q[p] * PIN_W +: PIN_W] <= in_data[p];
        end
      end
      if (done[p] && (!cell_valid[p] || ack[p])) begin
        cell_data[p] <= CELL_BITS'({in_data[p], ser_q[p][PAD-PIN_W-1:0]});
        route[p] <= (N_GRP == 1) ? in_route[p] : sroute_q[p];
      end
    end
  end

  assign overrun = done & cell_valid & ~ack;

endmodule
