// atm_switch_rate_tb: full-rate unicast workload on the switch at its default size (16x16,
// 256 cells of 424 bits, 8 pins per port). Every input port sends cells back to back, one
// every 53 clocks, all ports in step; the k-th cell of input p goes to output (p + k) mod 16,
// so in every cell time each output is the target of exactly one cell (a rotating
// permutation). Arrivals then equal what the pins can carry, and the switch must keep every
// output busy: after a warm-up of WARM round-robin cycles each output pin group must carry a
// cell in every clock for WIN cycles. The testbench also checks that no cell is dropped or
// overrun, that every delivered cell is one sent to that output with the right content and
// in order per input, and that all cells come out after the inputs stop. It is the
// 16 x 424 bits per 53 clocks (128 bits per clock each way) throughput point of the design.
module atm_switch_rate_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NP = 16, NC = 256, CB = 424, MW = 6, PIN = 8, NG = 53;
  localparam int WARM = 12, WIN = 60, N_CELL = WARM + WIN + 4;

  logic [NP-1:0]  in_valid, in_sop, in_mc, in_clp, in_taken, in_overrun;
  logic [PIN-1:0] in_data [NP];
  logic [MW-1:0]  in_dest [NP];
  logic [0:0]     in_prio [NP];
  logic [PIN-1:0] out_data [NP];
  logic [NP-1:0]  out_valid, out_sop;
  logic           cfg_mc_we, cfg_cls_we, cfg_cls_val;
  logic [MW-1:0]  cfg_mc_mci;
  logic [NP-1:0]  cfg_mc_ports;
  logic [7:0]     cfg_cls_addr;
  logic [8:0]     buf_used, ev_aged;
  logic ev_stored, ev_drop_full, ev_drop_nobuf, ev_uni, ev_mc, ev_low_prio, ev_occ_skip;
  logic ev_mc_block, ev_tag_miss;

  atm_switch dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // cell k of input p: the pair (p, k) in the low bits, random bits above
  function automatic logic [CB-1:0] make_cell(input int p, input int k);
    logic [CB-1:0] c;
    for (int i = 0; i < 14; i++) c[i*32 +: 32] = $urandom;
    c[423:416] = 8'($urandom);
    c[15:0] = 16'(k);
    c[23:16] = 8'(p);
    return c;
  endfunction

  initial begin
    repeat ((N_CELL + 20) * NG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [CB-1:0] sent [NP][N_CELL];
    logic [CB-1:0] rx [NP];
    int            rx_n [NP];
    int            last_k [NP][NP];   // last cell number seen at output o from input p
    int            n_out, n_busy, clk_n, win_lo, win_hi;
    bit            stop;

    in_valid = 0; in_sop = 0; in_mc = 0; in_clp = 0;
    cfg_mc_we = 0; cfg_mc_mci = 0; cfg_mc_ports = 0; cfg_cls_we = 0; cfg_cls_addr = 0;
    cfg_cls_val = 0;
    for (int p = 0; p < NP; p++) begin
      in_data[p] = 0; in_dest[p] = 0; in_prio[p] = 0; rx_n[p] = 0;
      for (int k = 0; k < N_CELL; k++) sent[p][k] = make_cell(p, k);
      for (int o = 0; o < NP; o++) last_k[o][p] = -1;
    end
    n_out = 0; n_busy = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);

    // the window of full output: WARM cycles after the first cell, WIN cycles long
    win_lo = WARM * NG;
    win_hi = win_lo + WIN * NG;
    stop = 0;
    for (clk_n = 0; clk_n < (N_CELL + 12) * NG && !stop; clk_n++) begin
      // inputs: cell k = clk_n / NG, group g = clk_n % NG
      for (int p = 0; p < NP; p++) begin
        int k, g;
        k = clk_n / NG;
        g = clk_n % NG;
        in_valid[p] = k < N_CELL;
        in_sop[p]   = in_valid[p] && g == 0;
        in_data[p]  = (k < N_CELL) ? sent[p][k][g * PIN +: PIN] : '0;
        in_dest[p]  = MW'((p + k) % NP);
      end
      #1;
      check(in_overrun == 0, $sformatf("clock %0d input overrun", clk_n));
      check(!ev_drop_full && !ev_drop_nobuf, $sformatf("clock %0d cell dropped", clk_n));
      @(posedge clk);
      @(negedge clk);
      // outputs of the new clock
      if (clk_n >= win_lo && clk_n < win_hi) begin
        check(out_valid == '1, $sformatf("clock %0d outputs idle %b", clk_n, ~out_valid));
        if (out_valid == '1) n_busy++;
      end
      for (int o = 0; o < NP; o++) begin
        if (out_valid[o]) begin
          if (out_sop[o]) rx_n[o] = 0;
          rx[o][rx_n[o] * PIN +: PIN] = out_data[o];
          rx_n[o]++;
          if (rx_n[o] == NG) begin
            int p, k;
            p = int'(rx[o][23:16]);
            k = int'(rx[o][15:0]);
            check(p < NP && k < N_CELL && (p + k) % NP == o,
                  $sformatf("output %0d got cell %0d of input %0d", o, k, p));
            if (p < NP && k < N_CELL) begin
              check(rx[o] == sent[p][k], $sformatf("output %0d cell content", o));
              check(k > last_k[o][p], $sformatf("output %0d order from input %0d", o, p));
              last_k[o][p] = k;
            end
            n_out++;
            rx_n[o] = 0;
          end
        end
      end
      if (clk_n > N_CELL * NG && buf_used == 0 && out_valid == 0) stop = 1;
    end
    check(n_out == NP * N_CELL, $sformatf("%0d of %0d cells delivered", n_out, NP * N_CELL));
    check(n_busy == WIN * NG, $sformatf("%0d of %0d clocks with every output busy", n_busy, WIN * NG));
    $display("delivered %0d cells; every output busy in %0d of %0d window clocks", n_out, n_busy,
             WIN * NG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
