// atm_switch: single-chip shared buffer ATM switch whose buffer is controlled by a CAM.
//
// Cells from all input ports share one buffer of N_CELLS cell-wide words. Instead of linked
// lists of addresses, every buffer word carries a tag in a content-addressable memory: the
// output port (or multicast connection) of the cell, its delay priority and a sequence number.
// A write stores the cell in the first empty word and tags it with the queue's write sequence
// number; a read searches the CAM for the queue's read sequence number. The blocks:
//   write_ctrl  input round-robin and write pipeline (sequence number, empty search, store)
//   read_ctrl   output round-robin slots, priority choice, multicast release, read pipeline
//   rr_sched    output round-robin with a rotating multicast slot
//   tag_cam     tag, valid and CLP-class bits of every buffer word
//   buffer_ram  the cells
//   seq_ram x4  write/read sequence numbers of the unicast queues and of the MCIs
//   mc_cam      destination port map of every multicast connection
//   psram       parallel-to-serial output memory driving PIN_W pins per port
//   sp_ram      serial-to-parallel input memory fed by PIN_W pins per port
//   cell_aging  discards cells older than AGE_LIMIT round-robin cycles (for a DRAM buffer
//               without refresh); freed words go through the tag CAM's invalidate port
// Interface: each input port receives a cell over its PIN_W pins, bits 0..PIN_W-1 first, one
// group per clock with in_valid and in_sop on the first group; its destination (output port,
// or MCI when in_mc), delay priority and CLP bit are given with the first group. in_taken
// shows when the write pipeline takes the assembled cell (stored or dropped). Each output
// port drives PIN_W bits per clock with valid and start-of-cell flags. cfg_mc_* writes a
// McCAM word at call set-up; cfg_cls_* moves buffer words between the CLP=0 and CLP=1 regions.
// Timing: one write and one read per clock (dual-port memories). The round-robin cycle is
// RR_LEN = max(N_PORTS+1, CELL_BITS/PIN_W rounded up) clocks, because in this single-clock
// design the pins run at the core clock and need 53 clocks to send a 424-bit cell over 8 pins;
// with faster pads the cycle could shrink to N_PORTS+1 clocks. A cell leaves its output pins
// in the round-robin cycle after the one in which it was read. The extra multicast-tag bit,
// the routing side-band given with the first input group and RR_LEN are this design's
// choices.
module atm_switch
  import atm_pkg::*;
#(
  parameter int unsigned N_PORTS    = N_PORTS_DEF,
  parameter int unsigned N_CELLS    = N_CELLS_DEF,
  parameter int unsigned CELL_BITS  = CELL_BITS_DEF,
  parameter int unsigned SEQ_W      = SEQ_W_DEF,
  parameter int unsigned MCI_W      = MCI_W_DEF,
  parameter int unsigned MSEQ_W     = MSEQ_W_DEF,
  parameter int unsigned N_PRIO     = N_PRIO_DEF,
  parameter int unsigned PIN_W      = PIN_W_DEF,
  parameter int unsigned CLP1_WORDS = CLP1_WORDS_DEF,
  parameter int unsigned AGE_LIMIT  = AGE_LIMIT_DEF,
  localparam int unsigned PW        = $clog2(N_PORTS),
  localparam int unsigned PRIO_W    = (N_PRIO > 1) ? $clog2(N_PRIO) : 1,
  localparam int unsigned TAG_W     = 1 + PRIO_W + PW + SEQ_W,
  localparam int unsigned NQ        = N_PORTS * N_PRIO,
  localparam int unsigned N_MCI     = 2 ** MCI_W,
  localparam int unsigned N_GRP     = (CELL_BITS + PIN_W - 1) / PIN_W,
  localparam int unsigned RR_LEN    = (N_GRP > N_PORTS + 1) ? N_GRP : N_PORTS + 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // input ports
  input  logic [PIN_W-1:0]           in_data [N_PORTS],
  input  logic [N_PORTS-1:0]         in_valid,
  input  logic [N_PORTS-1:0]         in_sop,
  input  logic [N_PORTS-1:0]         in_mc,
  input  logic [MCI_W-1:0]           in_dest [N_PORTS],
  input  logic [PRIO_W-1:0]          in_prio [N_PORTS],
  input  logic [N_PORTS-1:0]         in_clp,
  output logic [N_PORTS-1:0]         in_taken,
  output logic [N_PORTS-1:0]         in_overrun,
  // output ports
  output logic [PIN_W-1:0]           out_data [N_PORTS],
  output logic [N_PORTS-1:0]         out_valid,
  output logic [N_PORTS-1:0]         out_sop,
  // network control
  input  logic                       cfg_mc_we,
  input  logic [MCI_W-1:0]           cfg_mc_mci,
  input  logic [N_PORTS-1:0]         cfg_mc_ports,
  input  logic                       cfg_cls_we,
  input  logic [$clog2(N_CELLS)-1:0] cfg_cls_addr,
  input  logic                       cfg_cls_val,
  // status and events
  output logic [$clog2(N_CELLS+1)-1:0] buf_used,
  output logic                       ev_stored,
  output logic                       ev_drop_full,
  output logic                       ev_drop_nobuf,
  output logic                       ev_uni,
  output logic                       ev_mc,
  output logic                       ev_low_prio,
  output logic                       ev_occ_skip,
  output logic                       ev_mc_block,
  output logic                       ev_tag_miss,
  output logic [$clog2(N_CELLS+1)-1:0] ev_aged
);

  // serial-to-parallel input
  localparam int unsigned ROUTE_W = 1 + MCI_W + PRIO_W + 1;
  logic [ROUTE_W-1:0]   in_route [N_PORTS], p_route [N_PORTS];
  logic [N_PORTS-1:0]   p_valid, p_mc, p_clp;
  logic [CELL_BITS-1:0] p_cell  [N_PORTS];
  logic [MCI_W-1:0]     p_dest  [N_PORTS];
  logic [PRIO_W-1:0]    p_prio  [N_PORTS];

  always_comb begin
    for (int p = 0; p < N_PORTS; p++) begin
      in_route[p] = {in_mc[p], in_dest[p], in_prio[p], in_clp[p]};
      {p_mc[p], p_dest[p], p_prio[p], p_clp[p]} = p_route[p];
    end
  end

  sp_ram #(.N_PORTS(N_PORTS), .CELL_BITS(CELL_BITS), .PIN_W(PIN_W), .ROUTE_W(ROUTE_W)) u_sp (
    .clk, .rst_n, .in_data, .in_valid, .in_sop, .in_route,
    .cell_valid(p_valid), .cell_data(p_cell), .route(p_route), .ack(in_taken),
    .overrun(in_overrun));

  // sequence numbers
  logic [SEQ_W-1:0]  ws_q [NQ], rs_q [NQ];
  logic [MSEQ_W-1:0] wms_q [N_MCI], rms_q [N_MCI];
  logic                 ws_we, rs_we, wms_we, rms_we;
  logic [$clog2(NQ)-1:0] ws_waddr, rs_waddr;
  logic [SEQ_W-1:0]     ws_wdata, rs_wdata;
  logic [MCI_W-1:0]     wms_waddr, rms_waddr;
  logic [MSEQ_W-1:0]    wms_wdata, rms_wdata;

  // tag CAM / buffer
  logic               es_class, es_hit, tw_en, s_hit, inv_en, ram_we;
  logic [N_CELLS-1:0] es_line, tw_line, s_line, inv_line, ram_wline, ram_rline;
  logic               rd_inv_en;
  logic [N_CELLS-1:0] rd_inv_line, age_line;
  logic               age_any;
  logic [TAG_W-1:0]   tw_tag, s_tag;
  logic [CELL_BITS-1:0] ram_wdata, ram_rdata;

  // round-robin, McCAM, PSRAM
  slot_kind_e         rr_kind;
  logic [PW-1:0]      rr_port;
  logic               rr_first, rr_last;
  logic               mc_en, mc_hit;
  logic [N_PORTS-1:0] mc_free, mc_ports, ps_sel;
  logic [N_MCI-1:0]   mc_pending;
  logic [MCI_W-1:0]   mc_mci;
  logic               ps_xfer;

  seq_ram #(.DEPTH(NQ), .WIDTH(SEQ_W)) u_ws (
    .clk, .rst_n, .we(ws_we), .waddr(ws_waddr), .wdata(ws_wdata), .q(ws_q));
  seq_ram #(.DEPTH(NQ), .WIDTH(SEQ_W)) u_rs (
    .clk, .rst_n, .we(rs_we), .waddr(rs_waddr), .wdata(rs_wdata), .q(rs_q));
  seq_ram #(.DEPTH(N_MCI), .WIDTH(MSEQ_W)) u_wms (
    .clk, .rst_n, .we(wms_we), .waddr(wms_waddr), .wdata(wms_wdata), .q(wms_q));
  seq_ram #(.DEPTH(N_MCI), .WIDTH(MSEQ_W)) u_rms (
    .clk, .rst_n, .we(rms_we), .waddr(rms_waddr), .wdata(rms_wdata), .q(rms_q));

  write_ctrl #(
    .N_PORTS(N_PORTS), .N_CELLS(N_CELLS), .CELL_BITS(CELL_BITS), .SEQ_W(SEQ_W),
    .MCI_W(MCI_W), .MSEQ_W(MSEQ_W), .N_PRIO(N_PRIO)
  ) u_wr (
    .clk, .rst_n,
    .in_valid(p_valid), .in_cell(p_cell), .in_mc(p_mc), .in_dest(p_dest), .in_prio(p_prio),
    .in_clp(p_clp), .in_ack(in_taken),
    .ws_q, .rs_q, .wms_q, .rms_q,
    .ws_we, .ws_waddr, .ws_wdata, .wms_we, .wms_waddr, .wms_wdata,
    .es_class, .es_hit, .es_line, .tw_en, .tw_line, .tw_tag,
    .ram_we, .ram_wline, .ram_wdata,
    .stored(ev_stored), .drop_full(ev_drop_full), .drop_nobuf(ev_drop_nobuf)
  );

  rr_sched #(.N_PORTS(N_PORTS), .RR_LEN(RR_LEN)) u_rr (
    .clk, .rst_n, .kind(rr_kind), .port(rr_port), .first(rr_first), .last(rr_last),
    .slot());

  read_ctrl #(
    .N_PORTS(N_PORTS), .N_CELLS(N_CELLS), .SEQ_W(SEQ_W), .MCI_W(MCI_W),
    .MSEQ_W(MSEQ_W), .N_PRIO(N_PRIO)
  ) u_rd (
    .clk, .rst_n,
    .rr_kind, .rr_port, .rr_first, .rr_last,
    .ws_q, .rs_q, .wms_q, .rms_q,
    .rs_we, .rs_waddr, .rs_wdata, .rms_we, .rms_waddr, .rms_wdata,
    .mc_en, .mc_free, .mc_pending, .mc_hit, .mc_mci, .mc_ports,
    .s_tag, .s_hit, .s_line, .inv_en(rd_inv_en), .inv_line(rd_inv_line),
    .ram_rline, .ps_sel, .ps_xfer,
    .ev_uni, .ev_mc, .ev_low_prio, .ev_occ_skip, .ev_mc_block, .tag_miss(ev_tag_miss)
  );

  tag_cam #(.N_CELLS(N_CELLS), .TAG_W(TAG_W), .CLP1_WORDS(CLP1_WORDS)) u_cam (
    .clk, .rst_n,
    .cls_we(cfg_cls_we), .cls_addr(cfg_cls_addr), .cls_val(cfg_cls_val),
    .es_class, .es_hit, .es_line,
    .tw_en, .tw_line, .tw_tag,
    .s_tag, .s_hit, .s_line,
    .inv_en, .inv_line,
    .used(buf_used)
  );

  // words freed by a read (its match lines count only with its strobe) or by aging
  cell_aging #(.N_CELLS(N_CELLS), .AGE_LIMIT(AGE_LIMIT)) u_age (
    .clk, .rst_n, .tick(rr_first), .tw_en, .tw_line, .inv_en, .inv_line,
    .expire_line(age_line), .expired(age_any));

  assign ev_aged  = ($bits(ev_aged))'($countones(age_line));
  assign inv_en   = rd_inv_en | age_any;
  assign inv_line = (rd_inv_en ? rd_inv_line : '0) | age_line;

  buffer_ram #(.N_CELLS(N_CELLS), .CELL_BITS(CELL_BITS)) u_buf (
    .clk, .we(ram_we), .wline(ram_wline), .wdata(ram_wdata),
    .rline(ram_rline), .rdata(ram_rdata));

  mc_cam #(.N_MCI(N_MCI), .N_PORTS(N_PORTS)) u_mccam (
    .clk, .rst_n,
    .cfg_we(cfg_mc_we), .cfg_mci(cfg_mc_mci), .cfg_ports(cfg_mc_ports),
    .s_en(mc_en), .s_free(mc_free), .s_pending(mc_pending),
    .s_hitline(), .s_hit(mc_hit), .s_mci(mc_mci), .s_ports(mc_ports));

  psram #(.N_PORTS(N_PORTS), .CELL_BITS(CELL_BITS), .PIN_W(PIN_W)) u_ps (
    .clk, .rst_n, .bl(ram_rdata), .sel(ps_sel), .xfer(ps_xfer),
    .out_data, .out_valid, .out_sop);

endmodule
