// Body shared by the end-to-end testbenches of atm_switch. The including module defines
// NP, NC, CB, SW, MW, MSW, NPR, PIN, CLP1, AGE (the switch's AGE_LIMIT), N_CYC (round-robin
// cycles of random traffic) and the macro DUT_PARAMS (empty for the default configuration).
//
// Traffic: every input port sends cells over its PIN_W input pins, a new one starting with
// probability 3/4 in each clock the port is idle. A cell is unicast (random output port and
// delay priority) or, one time in five, multicast to one of the configured connections; one
// cell in four has CLP=1. Each cell carries a unique number in its low 24 bits and random
// bits elsewhere. The offered load is far above what
// the outputs drain once multicast fan-out is counted, and two hot-spot phases of HOT clocks
// each come first: every unicast cell goes to port 0 at level 0 (that queue runs out of
// sequence numbers), then to ports 1..3 (the buffer fills up). After N_CYC round-robin cycles
// the inputs stop and the switch drains. No input may ever be overrun.
// Scoreboard: when the switch stores a cell, the cell is appended to the expected queue of
// each destination port - one queue per (port, priority level) and per (port, MCI). A cell
// leaving an output port must be the head of one of that port's queues, which checks routing,
// multicast fan-out, content and order within every queue. A cell the switch discarded for
// age is missing from all its queues: the cells ahead of a delivered one are counted as lost,
// must have been stored at least AGE-1 round-robin cycles earlier and must never show up
// later; there may be no more of them, nor tag misses, than aged cells. At the end every
// queue must be empty (up to lost cells) and the buffer empty. Cells discarded for age are
// counted as a mechanism when the limit is small.
// Mechanism counters (each must be seen at least once): unicast and multicast reads,
// multicast to several ports, service from a lower priority level, unicast slot given up to
// a multicast, multicast held back by an occupied port, drop because a queue's sequence
// numbers were exhausted, drop because the buffer class was full, CLP=1 cell stored, and a
// run-time move of the CLP boundary (the last two only when the configuration has several
// priority levels and a CLP split). The first cell through an empty switch must leave
// within two round-robin cycles plus the pipeline, and every cell takes N_GRP clocks on the
// pins.

  localparam int PRW   = (NPR > 1) ? $clog2(NPR) : 1;
  localparam int N_MCI = 2 ** MW;
  localparam int N_GRP = (CB + PIN - 1) / PIN;
  localparam int RRL   = (N_GRP > NP + 1) ? N_GRP : NP + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int HOT = 20 * RRL;

  logic [NP-1:0]  in_valid, in_sop, in_mc, in_clp, in_taken, in_overrun;
  logic [PIN-1:0] in_data [NP];
  logic [MW-1:0]  in_dest [NP];
  logic [PRW-1:0] in_prio [NP];
  logic [PIN-1:0] out_data [NP];
  logic [NP-1:0]  out_valid, out_sop;
  logic           cfg_mc_we, cfg_cls_we, cfg_cls_val;
  logic [MW-1:0]  cfg_mc_mci;
  logic [NP-1:0]  cfg_mc_ports;
  logic [$clog2(NC)-1:0] cfg_cls_addr;
  logic [$clog2(NC+1)-1:0] buf_used;
  logic ev_stored, ev_drop_full, ev_drop_nobuf, ev_uni, ev_mc, ev_low_prio, ev_occ_skip;
  logic ev_mc_block, ev_tag_miss;
  logic [$clog2(NC+1)-1:0] ev_aged;

  atm_switch `DUT_PARAMS dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // expected queues: index port * (NPR + N_MCI) + queue
  localparam int NQP = NPR + N_MCI;
  int unsigned    expq [NP * NQP][$];
  logic [CB-1:0]  cells [int unsigned];
  logic [NP-1:0]  mc_map [N_MCI];

  int n_uni = 0, n_mc = 0, n_mc_multi = 0, n_low = 0, n_skip = 0, n_block = 0;
  int n_full = 0, n_nobuf = 0, n_clp1 = 0, n_cls_move = 0, n_stored = 0, n_out = 0;
  int first_store_clk = -1, first_out_clk = -1;
  int n_aged = 0, n_miss = 0, n_win = 0;
  bit lost [int unsigned];
  int store_clk [int unsigned];

  // a cell may only be missing if it was stored long enough ago to have been aged out
  task automatic lose(input int unsigned id, input int now);
    check(store_clk.exists(id) && now - store_clk[id] >= (AGE - 1) * RRL,
          $sformatf("cell %0d missing after %0d clocks", id, now - store_clk[id]));
    lost[id] = 1;
  endtask

  initial begin
    repeat (N_CYC * RRL + (2 * NC + 40) * RRL + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [CB-1:0] make_cell(input int unsigned id);
    logic [CB-1:0] c;
    for (int i = 0; i < CB; i += 32) c[i +: 32] = $urandom;
    c[23:0] = id[23:0];
    return c;
  endfunction

  initial begin
    int unsigned   next_id;
    int            quiet;
    // cell being sent on each input port
    bit            src_on [NP];
    int            src_grp [NP];
    int unsigned   src_id [NP];
    logic [CB-1:0] src_cell [NP];
    bit            src_mc [NP], src_clp [NP];
    int            src_dest [NP], src_prio [NP];
    // cell assembled in each port's parallel word
    int unsigned   par_id [NP];
    bit            par_mc [NP], par_clp [NP];
    int            par_dest [NP], par_prio [NP];
    bit            done [NP];
    logic [CB-1:0] rx [NP];
    int            rx_n [NP];
    bit            offering;
    int            clk_n;
    in_valid = 0; in_sop = 0; in_mc = 0; in_clp = 0;
    cfg_mc_we = 0; cfg_mc_mci = 0; cfg_mc_ports = 0;
    cfg_cls_we = 0; cfg_cls_addr = 0; cfg_cls_val = 0;
    for (int p = 0; p < NP; p++) begin
      in_data[p] = 0; in_dest[p] = 0; in_prio[p] = 0; rx_n[p] = 0; rx[p] = 0;
      src_on[p] = 0; done[p] = 0; par_id[p] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    // call set-up: MCI 0 goes to every port, the others to random pairs or more
    for (int m = 0; m < N_MCI; m++) begin
      @(negedge clk);
      mc_map[m] = (m == 0) ? '1 : (NP'($urandom) | NP'(1 << (m % NP)) | NP'(1 << ((m + 1) % NP)));
      cfg_mc_we = 1; cfg_mc_mci = MW'(m); cfg_mc_ports = mc_map[m];
    end
    @(negedge clk);
    cfg_mc_we = 0;

    // the first cell (port 0 to the last port) measures the latency through the empty switch
    @(negedge clk);
    src_on[0] = 1; src_grp[0] = 0; src_id[0] = 1; src_cell[0] = make_cell(1);
    src_mc[0] = 0; src_clp[0] = 0; src_dest[0] = NP - 1; src_prio[0] = 0;
    cells[1] = src_cell[0];
    next_id = 2;

    offering = 1;
    clk_n = 0;
    quiet = 0;
    while (1) begin
      #1;
      // sample the clock's write side
      for (int p = 0; p < NP; p++) begin
        check(!in_overrun[p], $sformatf("input %0d overrun", p));
        if (in_taken[p]) begin
          if (ev_stored) begin
            n_stored++;
            if (first_store_clk < 0) first_store_clk = clk_n;
            store_clk[par_id[p]] = clk_n;
            if (par_clp[p]) n_clp1++;
            if (par_mc[p]) begin
              for (int o = 0; o < NP; o++)
                if (mc_map[par_dest[p]][o]) expq[o * NQP + NPR + par_dest[p]].push_back(par_id[p]);
            end else begin
              expq[par_dest[p] * NQP + par_prio[p]].push_back(par_id[p]);
            end
          end else begin
            cells.delete(par_id[p]);
          end
        end
        // a cell whose last group is on the pins now is assembled at this edge
        if (done[p]) begin
          par_id[p] = src_id[p]; par_mc[p] = src_mc[p]; par_clp[p] = src_clp[p];
          par_dest[p] = src_dest[p]; par_prio[p] = src_prio[p];
          done[p] = 0;
        end
      end
      if (ev_drop_full) n_full++;
      if (ev_drop_nobuf) n_nobuf++;
      if (ev_uni) n_uni++;
      if (ev_mc) n_mc++;
      if (ev_low_prio) n_low++;
      if (ev_occ_skip) n_skip++;
      if (ev_mc_block) n_block++;
      if (ev_tag_miss) n_miss++;
      n_aged += int'(ev_aged);
      @(posedge clk);
      @(negedge clk);
      clk_n++;
      // outputs of the new clock
      for (int p = 0; p < NP; p++) begin
        if (out_valid[p]) begin
          if (out_sop[p]) begin
            check(rx_n[p] == 0, $sformatf("port %0d start inside a cell", p));
            rx_n[p] = 0;
            if (first_out_clk < 0) first_out_clk = clk_n;
            if (clk_n >= 3 * RRL + 2 * HOT && clk_n < N_CYC * RRL) n_win++;
          end
          rx[p][rx_n[p] * PIN +: PIN] = out_data[p];
          rx_n[p]++;
          if (rx_n[p] == N_GRP) begin
            int unsigned id;
            bit found;
            id = int'(rx[p][23:0]);
            found = 0;
            for (int q = 0; q < NQP; q++) begin
              int pos;
              pos = -1;
              for (int k = 0; k < expq[p * NQP + q].size() && pos < 0; k++)
                if (expq[p * NQP + q][k] == id) pos = k;
              if (!found && pos >= 0 && (pos == 0 || AGE > 0)) begin
                found = 1;
                for (int k = 0; k < pos; k++) lose(expq[p * NQP + q].pop_front(), clk_n);
                void'(expq[p * NQP + q].pop_front());
                if (q >= NPR && !$onehot0(mc_map[q - NPR]) && p == 0)
                  n_mc_multi++;
              end
            end
            check(found, $sformatf("port %0d cell %0d is the head of one of its queues", p, id));
            check(!lost.exists(id), $sformatf("port %0d cell %0d was lost earlier", p, id));
            check(cells.exists(id) && rx[p] == cells[id], $sformatf("port %0d cell %0d content", p, id));
            n_out++;
            rx_n[p] = 0;
          end
        end else begin
          check(rx_n[p] == 0, $sformatf("port %0d cell cut short", p));
        end
      end
      // stimulus
      if (clk_n == N_CYC * RRL / 2) begin
        cfg_cls_we = 1; cfg_cls_addr = '0; cfg_cls_val = 1; n_cls_move++;
      end else begin
        cfg_cls_we = 0;
      end
      if (clk_n > N_CYC * RRL) offering = 0;
      for (int p = 0; p < NP; p++) begin
        if (!src_on[p] && offering && clk_n > 3 * RRL && $urandom % 4 != 0) begin
          src_on[p]   = 1;
          src_grp[p]  = 0;
          src_mc[p]   = ($urandom % 5 == 0);
          src_clp[p]  = ($urandom % 4 == 0);
          src_prio[p] = $urandom % NPR;
          src_dest[p] = src_mc[p] ? $urandom % N_MCI : $urandom % NP;
          if (!src_mc[p] && clk_n < 3 * RRL + HOT) begin
            src_prio[p] = 0; src_dest[p] = 0; src_clp[p] = 0;
          end else if (!src_mc[p] && clk_n < 3 * RRL + 2 * HOT) begin
            src_prio[p] = 0; src_dest[p] = 1 + $urandom % 3; src_clp[p] = 0;
          end
          src_id[p]   = next_id;
          src_cell[p] = make_cell(next_id);
          cells[next_id] = src_cell[p];
          next_id++;
        end
        in_valid[p] = src_on[p];
        in_sop[p]   = src_on[p] && src_grp[p] == 0;
        in_data[p]  = src_cell[p][src_grp[p] * PIN +: PIN];
        in_mc[p]    = src_mc[p];
        in_clp[p]   = src_clp[p];
        in_dest[p]  = MW'(src_dest[p]);
        in_prio[p]  = PRW'(src_prio[p]);
        if (src_on[p]) begin
          if (src_grp[p] == N_GRP - 1) begin
            done[p] = 1;
            src_on[p] = 0;
          end
          src_grp[p]++;
        end
      end
      if (!offering) begin
        bit idle;
        idle = (buf_used == 0) && (out_valid == 0);
        for (int p = 0; p < NP; p++) if (src_on[p] || done[p]) idle = 0;
        quiet = idle ? quiet + 1 : 0;
        for (int q = 0; q < NP * NQP; q++) if (expq[q].size() != 0) idle = 0;
        // with aging, lost cells may stay in the expected queues once the switch is empty
        if (idle || quiet > 3 * RRL || clk_n > N_CYC * RRL + (2 * NC + 30) * RRL) break;
      end
    end

    for (int q = 0; q < NP * NQP; q++) begin
      if (AGE > 0) while (expq[q].size() > 0) lose(expq[q].pop_front(), clk_n);
      check(expq[q].size() == 0, $sformatf("queue %0d drained", q));
    end
    check(lost.num() <= n_aged, $sformatf("%0d cells lost, %0d aged", lost.num(), n_aged));
    check(n_miss <= n_aged, $sformatf("%0d tag misses, %0d aged", n_miss, n_aged));
    if (AGE == 0) check(n_miss == 0, "tag found for every read");
    check(buf_used == 0, "buffer empty at the end");
    check(first_out_clk - first_store_clk <= 2 * RRL + 4,
          $sformatf("first cell latency %0d clocks", first_out_clk - first_store_clk));
    $display("stored %0d delivered %0d unicast reads %0d multicast reads %0d", n_stored, n_out, n_uni, n_mc);
    $display("multicast to several ports %0d, lower level served %0d, slot given to multicast %0d",
             n_mc_multi, n_low, n_skip);
    $display("multicast held back %0d, drop queue full %0d, drop buffer full %0d, CLP1 stored %0d, CLP moves %0d",
             n_block, n_full, n_nobuf, n_clp1, n_cls_move);
    check(n_uni > 0, "unicast read happened");
    check(n_mc > 0, "multicast read happened");
    check(n_mc_multi > 0, "multicast to several ports happened");
    if (NPR > 1) check(n_low > 0, "lower priority level served");
    check(n_skip > 0, "unicast slot given up to a multicast");
    check(n_block > 0, "multicast held back by an occupied port");
    check(n_full > 0, "drop on exhausted sequence numbers");
    check(n_nobuf > 0, "drop on full buffer class");
    check(n_clp1 > 0, "CLP=1 cell stored");
    if (CLP1 > 0) check(n_cls_move > 0, "CLP boundary moved");
    if (AGE > 0 && AGE < 50) check(n_aged > 0 && n_miss > 0, "cells discarded for age");
    $display("aged %0d lost %0d tag misses %0d", n_aged, lost.num(), n_miss);
    $display("overload window: %0d cells out of %0d port-cycles", n_win,
             NP * (N_CYC * RRL - 3 * RRL - 2 * HOT) / RRL);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
