// read_ctrl_tb: read pipeline, small instance (4 ports, 8 buffer words, 2 priority levels,
// 4 MCIs) with a real tag CAM, multicast CAM and read sequence RAMs. The testbench loads six
// tags, sets the write sequence numbers and then drives round-robin slots by hand, checking
// for every slot: the events (unicast issued, multicast issued, served from the lower
// priority level, slot skipped because the port already took a multicast cell, multicast
// blocked by an occupied port), the freed word one clock later, the buffer word line and
// PSRAM port selection two clocks later (R3), and xfer three clocks after the last slot.
module read_ctrl_tb;
  import atm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NP = 4, NC = 8, SW = 3, MW = 2, MSW = 3, NPR = 2;
  localparam int NQ = NP * NPR, NM = 4, TW = 1 + 1 + 2 + SW;

  slot_kind_e    rr_kind;
  logic [1:0]    rr_port;
  logic          rr_first, rr_last;
  logic [SW-1:0] ws_q [NQ], rs_q [NQ];
  logic [MSW-1:0] wms_q [NM], rms_q [NM];
  logic rs_we, rms_we, mc_en, mc_hit, s_hit, inv_en, ps_xfer;
  logic [2:0] rs_waddr;
  logic [SW-1:0] rs_wdata;
  logic [MW-1:0] rms_waddr, mc_mci;
  logic [MSW-1:0] rms_wdata;
  logic [NP-1:0] mc_free, mc_ports, ps_sel;
  logic [NM-1:0] mc_pending;
  logic [TW-1:0] s_tag;
  logic [NC-1:0] s_line, inv_line, ram_rline;
  logic ev_uni, ev_mc, ev_low_prio, ev_occ_skip, ev_mc_block, tag_miss;

  read_ctrl #(.N_PORTS(NP), .N_CELLS(NC), .SEQ_W(SW), .MCI_W(MW), .MSEQ_W(MSW),
              .N_PRIO(NPR)) dut (.*);

  logic cfg_we, tw_en, es_hit;
  logic [MW-1:0] cfg_mci;
  logic [NP-1:0] cfg_ports;
  logic [NC-1:0] tw_line, es_line;
  logic [TW-1:0] tw_tag;
  logic [3:0] used;
  mc_cam #(.N_MCI(NM), .N_PORTS(NP)) u_mc (
    .clk, .rst_n, .cfg_we, .cfg_mci, .cfg_ports, .s_en(mc_en), .s_free(mc_free),
    .s_pending(mc_pending), .s_hitline(), .s_hit(mc_hit), .s_mci(mc_mci), .s_ports(mc_ports));
  tag_cam #(.N_CELLS(NC), .TAG_W(TW), .CLP1_WORDS(0)) u_cam (
    .clk, .rst_n, .cls_we(1'b0), .cls_addr(3'd0), .cls_val(1'b0),
    .es_class(1'b0), .es_hit, .es_line, .tw_en, .tw_line, .tw_tag,
    .s_tag, .s_hit, .s_line, .inv_en, .inv_line, .used);
  seq_ram #(.DEPTH(NQ), .WIDTH(SW)) u_rs (
    .clk, .rst_n, .we(rs_we), .waddr(rs_waddr), .wdata(rs_wdata), .q(rs_q));
  seq_ram #(.DEPTH(NM), .WIDTH(MSW)) u_rms (
    .clk, .rst_n, .we(rms_we), .waddr(rms_waddr), .wdata(rms_wdata), .q(rms_q));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // slot script: kind (0 idle, 1 uni, 2 mc), port, first, last,
  // expected line read (-1 none), destination ports, events {uni, mc, low, skip, block}
  typedef struct {
    int kind; int port; bit first; bit last; int line; int dest; bit [4:0] ev;
  } slot_t;
  localparam int NS = 20;
  slot_t S [NS];

  initial begin
    // cycle A
    S[0]  = '{2, 0, 1, 0, 4, 'b0110, 5'b01000};  // MCI1 to ports 1,2
    S[1]  = '{1, 1, 0, 0, -1, 0, 5'b00010};       // port 1 occupied
    S[2]  = '{1, 2, 0, 0, -1, 0, 5'b00010};       // port 2 occupied
    S[3]  = '{1, 3, 0, 0, -1, 0, 5'b00000};       // port 3 empty
    S[4]  = '{1, 0, 0, 1, -1, 0, 5'b00000};       // port 0 empty, last
    // cycle B
    S[5]  = '{1, 1, 1, 0, 0, 'b0010, 5'b10000};   // port 1 level 0 seq 0
    S[6]  = '{2, 0, 0, 0, 5, 'b1000, 5'b01000};   // MCI2 to port 3
    S[7]  = '{2, 0, 0, 0, -1, 0, 5'b00000};       // nothing pending
    S[8]  = '{1, 3, 0, 0, -1, 0, 5'b00010};       // port 3 took the multicast
    S[9]  = '{1, 2, 0, 1, 3, 'b0100, 5'b10100};   // port 2 level 1
    // cycle C (MCI3 becomes pending, for port 1)
    S[10] = '{1, 1, 1, 0, 1, 'b0010, 5'b10000};   // port 1 level 0 seq 1
    S[11] = '{1, 1, 0, 0, -1, 0, 5'b00010};       // port 1 already served
    S[12] = '{2, 0, 0, 0, -1, 0, 5'b00001};       // MCI3 blocked by port 1
    S[13] = '{0, 0, 0, 0, -1, 0, 5'b00000};
    S[14] = '{0, 0, 0, 1, -1, 0, 5'b00000};
    // cycle D
    S[15] = '{2, 0, 1, 0, 6, 'b0010, 5'b01000};   // all free: MCI3 released
    S[16] = '{1, 1, 0, 0, -1, 0, 5'b00010};       // port 1 occupied by it
    S[17] = '{1, 0, 0, 0, -1, 0, 5'b00000};
    S[18] = '{0, 0, 0, 0, -1, 0, 5'b00000};
    S[19] = '{0, 0, 0, 1, -1, 0, 5'b00000};
  end

  localparam logic [TW-1:0] TAGS [7] = '{
    {1'b0, 1'b0, 2'd1, 3'd0},   // line 0: port 1 level 0 seq 0
    {1'b0, 1'b0, 2'd1, 3'd1},   // line 1: port 1 level 0 seq 1
    {1'b0, 1'b1, 2'd1, 3'd0},   // line 2: port 1 level 1 seq 0
    {1'b0, 1'b1, 2'd2, 3'd0},   // line 3: port 2 level 1 seq 0
    {1'b1, 1'b0, 2'd1, 3'd0},   // line 4: MCI 1 seq 0
    {1'b1, 1'b0, 2'd2, 3'd0},   // line 5: MCI 2 seq 0
    {1'b1, 1'b0, 2'd3, 3'd0}    // line 6: MCI 3 seq 0
  };

  initial begin
    int line_hist [NS + 4];
    int dest_hist [NS + 4];
    bit last_hist [NS + 4];
    rr_kind = SLOT_IDLE; rr_port = 0; rr_first = 0; rr_last = 0;
    cfg_we = 0; cfg_mci = 0; cfg_ports = 0; tw_en = 0; tw_line = 0; tw_tag = 0;
    for (int i = 0; i < NQ; i++) ws_q[i] = 0;
    for (int i = 0; i < NM; i++) wms_q[i] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 7; i++) begin
      @(negedge clk); tw_en = 1; tw_line = NC'(1 << i); tw_tag = TAGS[i];
    end
    @(negedge clk); tw_en = 0;
    cfg_we = 1; cfg_mci = 1; cfg_ports = 4'b0110;
    @(negedge clk); cfg_mci = 2; cfg_ports = 4'b1000;
    @(negedge clk); cfg_mci = 3; cfg_ports = 4'b0010;
    @(negedge clk); cfg_we = 0;
    ws_q[2] = 2; ws_q[3] = 1; ws_q[5] = 1; wms_q[1] = 1; wms_q[2] = 1;
    for (int t = 0; t < NS + 4; t++) begin
      if (t == 10) wms_q[3] = 1;
      if (t < NS) begin
        rr_kind  = slot_kind_e'(S[t].kind);
        rr_port  = 2'(S[t].port);
        rr_first = S[t].first;
        rr_last  = S[t].last;
      end else begin
        rr_kind = SLOT_IDLE; rr_first = 0; rr_last = 0;
      end
      #1;
      if (t < NS) begin
        check({ev_uni, ev_mc, ev_low_prio, ev_occ_skip, ev_mc_block} == S[t].ev,
              $sformatf("slot %0d events %b expect %b", t,
                        {ev_uni, ev_mc, ev_low_prio, ev_occ_skip, ev_mc_block}, S[t].ev));
        line_hist[t] = S[t].line; dest_hist[t] = S[t].dest; last_hist[t] = S[t].last;
      end
      if (t >= 1 && t - 1 < NS)
        check(inv_en == (line_hist[t-1] >= 0) &&
              (line_hist[t-1] < 0 || inv_line == NC'(1 << line_hist[t-1])),
              $sformatf("slot %0d R2 free", t - 1));
      if (t >= 2 && t - 2 < NS)
        check(ram_rline == (line_hist[t-2] >= 0 ? NC'(1 << line_hist[t-2]) : '0) &&
              ps_sel == NP'(dest_hist[t-2]), $sformatf("slot %0d R3 read %b sel %b", t - 2,
                                                        ram_rline, ps_sel));
      check(ps_xfer == (t >= 3 && t - 3 < NS && last_hist[t-3]), $sformatf("clock %0d xfer", t));
      check(!tag_miss, "tag found");
      @(negedge clk);
    end
    check(used == 1, "all but the unserved level-1 cell of port 1 read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
