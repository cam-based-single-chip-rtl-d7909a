// write_ctrl: write pipeline of the CAM-based shared buffer (input side).
//
// Input ports are served round-robin, one port per clock. A cell offered by the served port
// goes through two stages:
//   W1  read the write sequence number WS of its queue, search the tag CAM for the first empty
//       word of the cell's CLP class, write the tag {mc, priority, port/MCI, WS} into that word,
//       and write WS+1 back;
//   W2  write the cell into the buffer word on the same word line.
// A unicast queue is one (output port, delay priority) pair; a multicast queue is one MCI with
// its own, shorter sequence number. A cell is dropped when its class has no empty word or when
// its queue already holds 2^SEQ_W-1 (2^MSEQ_W-1 for multicast) cells, so that sequence numbers
// never alias; the queue length is WS-RS. in_ack pulses in the clock a cell is taken, stored or
// dropped; stored/drop_* report which. The CLP bit, delay priority and destination come with
// the cell from the header translation in front of the switch; that side-band interface, the
// drop rule and the tag layout are this design's choices.
module write_ctrl #(
  parameter int unsigned N_PORTS   = atm_pkg::N_PORTS_DEF,
  parameter int unsigned N_CELLS   = atm_pkg::N_CELLS_DEF,
  parameter int unsigned CELL_BITS = atm_pkg::CELL_BITS_DEF,
  parameter int unsigned SEQ_W     = atm_pkg::SEQ_W_DEF,
  parameter int unsigned MCI_W     = atm_pkg::MCI_W_DEF,
  parameter int unsigned MSEQ_W    = atm_pkg::MSEQ_W_DEF,
  parameter int unsigned N_PRIO    = atm_pkg::N_PRIO_DEF,
  localparam int unsigned PW       = $clog2(N_PORTS),
  localparam int unsigned PRIO_W   = (N_PRIO > 1) ? $clog2(N_PRIO) : 1,
  localparam int unsigned TAG_W    = 1 + PRIO_W + PW + SEQ_W,
  localparam int unsigned NQ       = N_PORTS * N_PRIO,
  localparam int unsigned N_MCI    = 2 ** MCI_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // input ports
  input  logic [N_PORTS-1:0]       in_valid,
  input  logic [CELL_BITS-1:0]     in_cell [N_PORTS],
  input  logic [N_PORTS-1:0]       in_mc,
  input  logic [MCI_W-1:0]         in_dest [N_PORTS],   // output port (unicast) or MCI
  input  logic [PRIO_W-1:0]        in_prio [N_PORTS],
  input  logic [N_PORTS-1:0]       in_clp,
  output logic [N_PORTS-1:0]       in_ack,
  // sequence numbers
  input  logic [SEQ_W-1:0]         ws_q  [NQ],
  input  logic [SEQ_W-1:0]         rs_q  [NQ],
  input  logic [MSEQ_W-1:0]        wms_q [N_MCI],
  input  logic [MSEQ_W-1:0]        rms_q [N_MCI],
  output logic                     ws_we,
  output logic [$clog2(NQ)-1:0]    ws_waddr,
  output logic [SEQ_W-1:0]         ws_wdata,
  output logic                     wms_we,
  output logic [MCI_W-1:0]         wms_waddr,
  output logic [MSEQ_W-1:0]        wms_wdata,
  // tag CAM
  output logic                     es_class,
  input  logic                     es_hit,
  input  logic [N_CELLS-1:0]       es_line,
  output logic                     tw_en,
  output logic [N_CELLS-1:0]       tw_line,
  output logic [TAG_W-1:0]         tw_tag,
  // buffer RAM
  output logic                     ram_we,
  output logic [N_CELLS-1:0]       ram_wline,
  output logic [CELL_BITS-1:0]     ram_wdata,
  // events
  output logic                     stored,
  output logic                     drop_full,
  output logic                     drop_nobuf
);

  localparam int unsigned QW = $clog2(NQ);

  logic [PW-1:0]        ip_q;           // input port served this clock
  logic                 w2_valid_q;
  logic [N_CELLS-1:0]   w2_line_q;
  logic [CELL_BITS-1:0] w2_cell_q;

  // ---- W1 ----
  logic          v, mc, full;
  logic [QW-1:0] q;
  logic [MCI_W-1:0] m;
  logic [SEQ_W-1:0] ws, rs;
  logic [MSEQ_W-1:0] wms, rms;

  always_comb begin
    v    = in_valid[ip_q];
    mc   = in_mc[ip_q];
    m    = in_dest[ip_q];
    q    = QW'(int'(in_dest[ip_q][PW-1:0]) * N_PRIO + int'(in_prio[ip_q]));
    ws   = ws_q[q];
    rs   = rs_q[q];
    wms  = wms_q[m];
    rms  = rms_q[m];
    full = mc ? (MSEQ_W'(wms - rms) == '1) : (SEQ_W'(ws - rs) == '1);

    es_class = in_clp[ip_q];
    stored     = v && !full && es_hit;
    drop_full  = v && full;
    drop_nobuf = v && !full && !es_hit;

    in_ack       = '0;
    in_ack[ip_q] = v;

    tw_en   = stored;
    tw_line = es_line;
    if (mc) tw_tag = {1'b1, PRIO_W'(0), (PW + SEQ_W)'({m, wms})};
    else    tw_tag = {1'b0, in_prio[ip_q], in_dest[ip_q][PW-1:0], ws};

    ws_we     = stored && !mc;
    ws_waddr  = q;
    ws_wdata  = SEQ_W'(ws + 1'b1);
    wms_we    = stored && mc;
    wms_waddr = m;
    wms_wdata = MSEQ_W'(wms + 1'b1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ip_q       <= '0;
      w2_valid_q <= 1'b0;
      w2_line_q  <= '0;
    end else begin
      ip_q       <= (int'(ip_q) == N_PORTS - 1) ? '0 : PW'(ip_q + 1'b1);
      w2_valid_q <= stored;
      w2_line_q  <= es_line;
    end
  end

  always_ff @(posedge clk) if (stored) w2_cell_q <= in_cell[ip_q];

  // ---- W2 ----
  assign ram_we    = w2_valid_q;
  assign ram_wline = w2_line_q;
  assign ram_wdata = w2_cell_q;

  initial assert (MCI_W + MSEQ_W == PW + SEQ_W)
    else $error("a multicast tag (MCI + sequence) must be as wide as a unicast tag");

endmodule
