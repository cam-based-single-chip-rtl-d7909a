// read_ctrl: read pipeline of the CAM-based shared buffer (output side).
//
// Driven by the output round-robin (rr_sched), one slot per clock, in three stages:
//   R1  Unicast slot of port o: unless o already took a multicast cell in this round-robin
//       cycle, pick the highest delay priority (level 0 first) whose queue is not empty - a
//       queue is empty when its read sequence number RS has caught up with the write number
//       WS - form the tag {0, level, o, RS} and write RS+1 back.
//       Multicast slot: search the multicast CAM with the ports not yet given a cell this
//       cycle, among the MCIs with a waiting cell; on a hit form {1, 0, MCI, RMS} and write
//       RMS+1 back. The chosen ports count as occupied for the rest of the cycle.
//   R2  search the tag CAM for the tag; the matching word is freed at the clock edge.
//   R3  the word line reads the cell out of the buffer into the first words of the
//       destination ports in the parallel-to-serial memory (all of them for a multicast: the
//       cell is read once).
// One clock after the R3 stage of the last slot of a round-robin cycle, xfer moves all first
// words to the output side of the PSRAM. Reading and incrementing the sequence number in R1
// (one stage earlier than the published pipeline chart) is this design's choice; it keeps
// back-to-back slots free of hazards. Event outputs pulse for testing and statistics;
// tag_miss flags a tag that was not found: the cell was discarded by aging after it was
// queued. The slot then loads no output port and frees no word; the queue has already moved
// on to its next sequence number.
module read_ctrl
  import atm_pkg::*;
#(
  parameter int unsigned N_PORTS   = N_PORTS_DEF,
  parameter int unsigned N_CELLS   = N_CELLS_DEF,
  parameter int unsigned SEQ_W     = SEQ_W_DEF,
  parameter int unsigned MCI_W     = MCI_W_DEF,
  parameter int unsigned MSEQ_W    = MSEQ_W_DEF,
  parameter int unsigned N_PRIO    = N_PRIO_DEF,
  localparam int unsigned PW       = $clog2(N_PORTS),
  localparam int unsigned PRIO_W   = (N_PRIO > 1) ? $clog2(N_PRIO) : 1,
  localparam int unsigned TAG_W    = 1 + PRIO_W + PW + SEQ_W,
  localparam int unsigned NQ       = N_PORTS * N_PRIO,
  localparam int unsigned N_MCI    = 2 ** MCI_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // round-robin slot
  input  slot_kind_e               rr_kind,
  input  logic [PW-1:0]            rr_port,
  input  logic                     rr_first,
  input  logic                     rr_last,
  // sequence numbers
  input  logic [SEQ_W-1:0]         ws_q  [NQ],
  input  logic [SEQ_W-1:0]         rs_q  [NQ],
  input  logic [MSEQ_W-1:0]        wms_q [N_MCI],
  input  logic [MSEQ_W-1:0]        rms_q [N_MCI],
  output logic                     rs_we,
  output logic [$clog2(NQ)-1:0]    rs_waddr,
  output logic [SEQ_W-1:0]         rs_wdata,
  output logic                     rms_we,
  output logic [MCI_W-1:0]         rms_waddr,
  output logic [MSEQ_W-1:0]        rms_wdata,
  // multicast CAM
  output logic                     mc_en,
  output logic [N_PORTS-1:0]       mc_free,
  output logic [N_MCI-1:0]         mc_pending,
  input  logic                     mc_hit,
  input  logic [MCI_W-1:0]         mc_mci,
  input  logic [N_PORTS-1:0]       mc_ports,
  // tag CAM
  output logic [TAG_W-1:0]         s_tag,
  input  logic                     s_hit,
  input  logic [N_CELLS-1:0]       s_line,
  output logic                     inv_en,
  output logic [N_CELLS-1:0]       inv_line,
  // buffer RAM read and PSRAM
  output logic [N_CELLS-1:0]       ram_rline,
  output logic [N_PORTS-1:0]       ps_sel,
  output logic                     ps_xfer,
  // events
  output logic                     ev_uni,       // unicast cell issued
  output logic                     ev_mc,        // multicast cell issued
  output logic                     ev_low_prio,  // unicast served from a level other than 0
  output logic                     ev_occ_skip,  // unicast slot skipped: port took a multicast
  output logic                     ev_mc_block,  // multicast waiting but every MCI missed
  output logic                     tag_miss
);

  localparam int unsigned QW = $clog2(NQ);

  logic [N_PORTS-1:0] occ_q;

  // R2 / R3 / xfer pipeline registers
  logic               r2_valid_q, r2_last_q;
  logic [TAG_W-1:0]   r2_tag_q;
  logic [N_PORTS-1:0] r2_dest_q;
  logic               r3_valid_q, r3_last_q;
  logic [N_CELLS-1:0] r3_line_q;
  logic [N_PORTS-1:0] r3_dest_q;
  logic               xfer_q;

  // ---- R1 ----
  logic [N_PORTS-1:0] occ_eff;
  logic               issue;
  logic [TAG_W-1:0]   tag;
  logic [N_PORTS-1:0] dest;

  always_comb begin
    occ_eff = rr_first ? '0 : occ_q;
    for (int i = 0; i < N_MCI; i++) mc_pending[i] = (rms_q[i] != wms_q[i]);
    mc_free = ~occ_eff;
    mc_en   = (rr_kind == SLOT_MC);
  end

  always_comb begin
    logic           found;
    logic [QW-1:0]  q;
    q           = '0;

    issue       = 1'b0;
    tag         = '0;
    dest        = '0;
    rs_we       = 1'b0;
    rs_waddr    = '0;
    rs_wdata    = '0;
    rms_we      = 1'b0;
    rms_waddr   = mc_mci;
    rms_wdata   = MSEQ_W'(rms_q[mc_mci] + 1'b1);
    ev_low_prio = 1'b0;
    ev_occ_skip = 1'b0;
    ev_mc_block = 1'b0;
    found       = 1'b0;

    if (rr_kind == SLOT_UNI) begin
      if (occ_eff[rr_port]) begin
        ev_occ_skip = 1'b1;
      end else begin
        for (int p = 0; p < N_PRIO; p++) begin
          q = QW'(int'(rr_port) * N_PRIO + p);
          if (!found && (rs_q[q] != ws_q[q])) begin
            found       = 1'b1;
            issue       = 1'b1;
            tag         = {1'b0, PRIO_W'(p), rr_port, rs_q[q]};
            dest        = '0;
            dest[rr_port] = 1'b1;
            rs_we       = 1'b1;
            rs_waddr    = q;
            rs_wdata    = SEQ_W'(rs_q[q] + 1'b1);
            ev_low_prio = (p != 0);
          end
        end
      end
    end else if (rr_kind == SLOT_MC) begin
      if (mc_hit) begin
        issue  = 1'b1;
        tag    = {1'b1, PRIO_W'(0), (PW + SEQ_W)'({mc_mci, rms_q[mc_mci]})};
        dest   = mc_ports;
        rms_we = 1'b1;
      end else begin
        ev_mc_block = |mc_pending;
      end
    end
    ev_uni = issue && (rr_kind == SLOT_UNI);
    ev_mc  = issue && (rr_kind == SLOT_MC);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      occ_q      <= '0;
      r2_valid_q <= 1'b0;
      r2_last_q  <= 1'b0;
      r2_tag_q   <= '0;
      r2_dest_q  <= '0;
      r3_valid_q <= 1'b0;
      r3_last_q  <= 1'b0;
      r3_line_q  <= '0;
      r3_dest_q  <= '0;
      xfer_q     <= 1'b0;
    end else begin
      occ_q      <= occ_eff | (issue ? dest : '0);
      r2_valid_q <= issue;
      r2_last_q  <= rr_last;
      r2_tag_q   <= tag;
      r2_dest_q  <= dest;
      r3_valid_q <= r2_valid_q && s_hit;
      r3_last_q  <= r2_last_q;
      r3_line_q  <= s_line;
      r3_dest_q  <= r2_dest_q;
      xfer_q     <= r3_last_q;
    end
  end

  // ---- R2 ----
  assign s_tag    = r2_tag_q;
  assign inv_en   = r2_valid_q && s_hit;
  assign inv_line = s_line;
  assign tag_miss = r2_valid_q && !s_hit;

  // ---- R3 ----
  assign ram_rline = r3_valid_q ? r3_line_q : '0;
  assign ps_sel    = r3_valid_q ? r3_dest_q : '0;
  assign ps_xfer   = xfer_q;

  a_miss_loads_nothing: assert property (@(posedge clk) disable iff (!rst_n)
                                         tag_miss |=> ps_sel == '0);

endmodule
