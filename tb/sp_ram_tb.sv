// sp_ram_tb: serial-to-parallel input memory, 4 ports, 424-bit cells, 8 pins per port,
// 10-bit routing side-band. Every port sends random cells, 8 bits per clock starting at bit
// 0, with random idle clocks between cells and inside them, and random routing captured
// with the first group. A reference model holds each port's parallel word. In the first
// phase the parallel words are released (ack) like the write round-robin does, at most
// every 4th clock per port; the testbench checks that each cell and its routing appear
// intact, in order, and that overrun never fires. In the second phase ack is withheld on
// ports 0 and 1, so completed cells must raise overrun and leave the held cell unchanged.
// The last check counts that overruns happened and that 53 clocks per cell are enough.
module sp_ram_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NP = 4, CB = 424, PW = 8, NG = 53, RW = 10;

  logic [PW-1:0] in_data [NP];
  logic [NP-1:0] in_valid, in_sop, cell_valid, ack, overrun;
  logic [RW-1:0] in_route [NP], route [NP];
  logic [CB-1:0] cell_data [NP];

  sp_ram #(.N_PORTS(NP), .CELL_BITS(CB), .PIN_W(PW), .ROUTE_W(RW)) dut (.*);

  function automatic logic [CB-1:0] rnd_cell();
    logic [CB-1:0] c;
    for (int i = 0; i < 14; i++) c[i*32 +: 32] = $urandom;
    c[423:416] = 8'($urandom);
    return c;
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // source state per port
    logic [CB-1:0] s_cell [NP];
    logic [RW-1:0] s_route [NP];
    int            s_grp [NP];
    bit            s_on [NP];
    // model of the parallel word
    logic [CB-1:0] m_cell [NP];
    logic [RW-1:0] m_route [NP];
    bit            m_valid [NP];
    int            last_ack [NP];
    int            n_cells, n_overrun, n_fast;
    bit            m_done [NP];
    bit            hold;

    n_cells = 0; n_overrun = 0; n_fast = 0;
    in_valid = 0; in_sop = 0; ack = 0;
    for (int p = 0; p < NP; p++) begin
      in_data[p] = 0; in_route[p] = 0; s_on[p] = 0; m_valid[p] = 0; last_ack[p] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;

    for (int t = 0; t < 30000; t++) begin
      @(negedge clk);
      hold = (t >= 25000);
      // pins
      for (int p = 0; p < NP; p++) begin
        if (!s_on[p] && $urandom % 3 != 0) begin
          s_on[p] = 1; s_grp[p] = 0; s_cell[p] = rnd_cell(); s_route[p] = RW'($urandom);
        end
        in_valid[p] = s_on[p] && ($urandom % 8 != 0);
        in_sop[p]   = in_valid[p] && s_grp[p] == 0;
        in_data[p]  = in_valid[p] ? s_cell[p][s_grp[p] * PW +: PW] : PW'($urandom);
        in_route[p] = in_sop[p] ? s_route[p] : RW'($urandom);
        m_done[p]   = in_valid[p] && s_grp[p] == NG - 1;
      end
      // parallel side: release a full word at most every 4th clock, never on held ports
      for (int p = 0; p < NP; p++) begin
        ack[p] = m_valid[p] && t - last_ack[p] >= 4 && $urandom % 2 == 0 && !(hold && p < 2);
        if (ack[p]) last_ack[p] = t;
      end
      #1;
      for (int p = 0; p < NP; p++) begin
        check(cell_valid[p] == m_valid[p], $sformatf("t %0d port %0d valid", t, p));
        if (m_valid[p]) begin
          check(cell_data[p] == m_cell[p], $sformatf("t %0d port %0d cell", t, p));
          check(route[p] == m_route[p], $sformatf("t %0d port %0d route", t, p));
        end
        check(overrun[p] == (m_done[p] && m_valid[p] && !ack[p]),
              $sformatf("t %0d port %0d overrun", t, p));
        if (overrun[p]) n_overrun++;
        if (!hold) check(!overrun[p], $sformatf("t %0d port %0d overrun while acked", t, p));
      end
      // model update for the coming edge
      for (int p = 0; p < NP; p++) begin
        if (m_done[p] && (!m_valid[p] || ack[p])) begin
          m_valid[p] = 1; m_cell[p] = s_cell[p]; m_route[p] = s_route[p];
          n_cells++;
        end else if (ack[p]) begin
          m_valid[p] = 0;
        end
        if (in_valid[p]) begin
          s_grp[p]++;
          if (s_grp[p] == NG) s_on[p] = 0;
        end
      end
    end
    // a port sending back to back at full rate must never be overrun: one cell per 53 clocks
    @(negedge clk);
    for (int p = 0; p < NP; p++) begin ack[p] = 0; in_valid[p] = 0; end
    @(negedge clk);
    ack = cell_valid;
    @(negedge clk);
    ack = 0;
    for (int c = 0; c < 6; c++) begin
      logic [CB-1:0] cc;
      cc = rnd_cell();
      for (int g = 0; g < NG; g++) begin
        @(negedge clk);
        in_valid = 4'b0001; in_sop = {3'b0, g == 0};
        in_data[0] = cc[g * PW +: PW]; in_route[0] = RW'(c);
        ack = 0;
        if (g == NP - 1) ack[0] = cell_valid[0];   // the round-robin's visit
        #1;
        check(overrun == 0, "full rate overrun");
      end
      @(posedge clk); #1;
      check(cell_valid[0] && cell_data[0] == cc && route[0] == RW'(c), "full rate cell");
      if (cell_valid[0] && cell_data[0] == cc) n_fast++;
      in_valid = 0;
    end
    check(n_cells > 1500, $sformatf("%0d cells assembled", n_cells));
    check(n_overrun > 0, "overrun seen when ack is withheld");
    check(n_fast == 6, "back-to-back cells");
    $display("cells %0d overruns %0d", n_cells, n_overrun);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
