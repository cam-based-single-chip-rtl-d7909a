// write_ctrl_tb: write pipeline, small instance (4 ports, 8 buffer words of which the last 2
// hold CLP=1 cells, 32-bit cells, 3-bit sequence numbers, 2 priority levels, 4 MCIs) wired to
// a real tag CAM, buffer RAM and write sequence RAMs. The read sequence numbers are driven by
// the testbench to make queues look empty or full, and words are freed at random through the
// CAM's invalidate port. Every clock is compared with a model: the input port served
// (round-robin, one per clock), acknowledge, stored/dropped (queue full, or class full), the
// tag and word line written, the sequence number written back, and one clock later the cell
// written into the buffer.
module write_ctrl_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NP = 4, NC = 8, CB = 32, SW = 3, MW = 2, MSW = 3, NPR = 2;
  localparam int NQ = NP * NPR, NM = 4, TW = 1 + 1 + 2 + SW;

  logic [NP-1:0] in_valid, in_mc, in_clp, in_ack;
  logic [CB-1:0] in_cell [NP];
  logic [MW-1:0] in_dest [NP];
  logic [0:0]    in_prio [NP];
  logic [SW-1:0] ws_q [NQ], rs_q [NQ];
  logic [MSW-1:0] wms_q [NM], rms_q [NM];
  logic ws_we, wms_we, es_class, es_hit, tw_en, ram_we, stored, drop_full, drop_nobuf;
  logic [2:0] ws_waddr;
  logic [SW-1:0] ws_wdata;
  logic [MW-1:0] wms_waddr;
  logic [MSW-1:0] wms_wdata;
  logic [NC-1:0] es_line, tw_line, ram_wline, s_line, inv_line;
  logic [TW-1:0] tw_tag;
  logic [CB-1:0] ram_wdata, rdata;
  logic s_hit, inv_en;
  logic [3:0] used;

  write_ctrl #(.N_PORTS(NP), .N_CELLS(NC), .CELL_BITS(CB), .SEQ_W(SW), .MCI_W(MW),
               .MSEQ_W(MSW), .N_PRIO(NPR)) dut (.*);
  tag_cam #(.N_CELLS(NC), .TAG_W(TW), .CLP1_WORDS(2)) u_cam (
    .clk, .rst_n, .cls_we(1'b0), .cls_addr(3'd0), .cls_val(1'b0),
    .es_class, .es_hit, .es_line, .tw_en, .tw_line, .tw_tag,
    .s_tag('0), .s_hit, .s_line, .inv_en, .inv_line, .used);
  buffer_ram #(.N_CELLS(NC), .CELL_BITS(CB)) u_ram (
    .clk, .we(ram_we), .wline(ram_wline), .wdata(ram_wdata), .rline(8'd0), .rdata);
  seq_ram #(.DEPTH(NQ), .WIDTH(SW)) u_ws (
    .clk, .rst_n, .we(ws_we), .waddr(ws_waddr), .wdata(ws_wdata), .q(ws_q));
  seq_ram #(.DEPTH(NM), .WIDTH(MSW)) u_wms (
    .clk, .rst_n, .we(wms_we), .waddr(wms_waddr), .wdata(wms_wdata), .q(wms_q));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_stored = 0, n_full = 0, n_nobuf = 0;

  initial begin
    int            ws_m [NQ], wms_m [NM];
    bit            val_m [NC];
    int            ip, first, q, seq;
    bit            full, mc, cls, exp_store;
    logic [TW-1:0] etag;
    logic [CB-1:0] pend_cell;
    int            pend_line;
    bit            pend;
    in_valid = 0; in_mc = 0; in_clp = 0; inv_en = 0; inv_line = 0;
    for (int p = 0; p < NP; p++) begin in_cell[p] = 0; in_dest[p] = 0; in_prio[p] = 0; end
    for (int i = 0; i < NQ; i++) begin rs_q[i] = 0; ws_m[i] = 0; end
    for (int i = 0; i < NM; i++) begin rms_q[i] = 0; wms_m[i] = 0; end
    for (int i = 0; i < NC; i++) val_m[i] = 0;
    pend = 0; pend_line = 0; pend_cell = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      ip = t % NP;
      // stimulus
      for (int p = 0; p < NP; p++) begin
        in_valid[p] = 1'($urandom);
        in_mc[p]    = ($urandom % 4 == 0);
        in_clp[p]   = ($urandom % 4 == 0);
        in_dest[p]  = MW'($urandom);
        in_prio[p]  = 1'($urandom);
        in_cell[p]  = $urandom;
      end
      for (int i = 0; i < NQ; i++) rs_q[i] = SW'(($urandom % 3 == 0) ? ws_m[i] + 1 : ws_m[i]);
      for (int i = 0; i < NM; i++) rms_q[i] = MSW'(($urandom % 3 == 0) ? wms_m[i] + 1 : wms_m[i]);
      inv_en = ($urandom % 3 == 0);
      inv_line = NC'(1 << ($urandom % NC));
      #1;
      // W2 of the previous clock
      check(ram_we == pend && (!pend || (ram_wline == NC'(1 << pend_line) && ram_wdata == pend_cell)),
            $sformatf("t%0d buffer write", t));
      // W1 model
      mc  = in_mc[ip];
      cls = in_clp[ip];
      q   = int'(in_dest[ip][1:0]) * NPR + int'(in_prio[ip]);
      if (mc) full = ((wms_m[in_dest[ip]] - int'(rms_q[in_dest[ip]])) % 8 + 8) % 8 == 7;
      else    full = ((ws_m[q] - int'(rs_q[q])) % 8 + 8) % 8 == 7;
      first = -1;
      for (int i = 0; i < NC; i++)
        if (first < 0 && !val_m[i] && ((i >= NC - 2) == cls)) first = i;
      exp_store = in_valid[ip] && !full && first >= 0;
      check(in_ack == (in_valid[ip] ? NP'(1 << ip) : '0), $sformatf("t%0d ack", t));
      check(stored == exp_store, $sformatf("t%0d stored", t));
      check(drop_full == (in_valid[ip] && full), $sformatf("t%0d drop_full", t));
      check(drop_nobuf == (in_valid[ip] && !full && first < 0), $sformatf("t%0d drop_nobuf", t));
      if (exp_store) begin
        seq  = mc ? wms_m[in_dest[ip]] : ws_m[q];
        etag = mc ? {1'b1, 1'b0, in_dest[ip], SW'(seq)}
                  : {1'b0, in_prio[ip], in_dest[ip][1:0], SW'(seq)};
        check(tw_en && tw_line == NC'(1 << first) && tw_tag == etag, $sformatf("t%0d tag write", t));
        check(mc ? (wms_we && !ws_we && wms_waddr == in_dest[ip] && wms_wdata == MSW'(seq + 1))
                 : (ws_we && !wms_we && int'(ws_waddr) == q && ws_wdata == SW'(seq + 1)),
              $sformatf("t%0d seq write", t));
      end else begin
        check(!tw_en && !ws_we && !wms_we, $sformatf("t%0d nothing written", t));
      end
      if (in_valid[ip] && full) n_full++;
      if (in_valid[ip] && !full && first < 0) n_nobuf++;
      // model update at the edge
      pend = exp_store;
      if (exp_store) begin
        pend_line = first;
        pend_cell = in_cell[ip];
        n_stored++;
        val_m[first] = 1;
        if (mc) wms_m[in_dest[ip]] = (wms_m[in_dest[ip]] + 1) % 8;
        else    ws_m[q] = (ws_m[q] + 1) % 8;
      end
      if (inv_en) for (int i = 0; i < NC; i++) if (inv_line[i] && !(exp_store && i == first)) val_m[i] = 0;
    end
    check(n_stored > 100 && n_full > 10 && n_nobuf > 10, "all outcomes seen");
    $display("stored %0d, dropped (queue full) %0d, dropped (no buffer) %0d", n_stored, n_full, n_nobuf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
