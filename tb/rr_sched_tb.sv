// rr_sched_tb: checks the output round-robin against the published 8x8 sample schedule
// (ten round-robin cycles of nine slots, typed in below as port numbers, 8 = multicast), and
// a 16-port instance with a stretched cycle for the properties every cycle must have: one
// multicast slot at (cycle mod 16), every port exactly once, idle padding slots at the end,
// first/last flags on slot 0 and slot RR_LEN-1.
module rr_sched_tb;
  import atm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // Sample schedule, cycle by cycle, slot 0..8.
  localparam int TABLE [10][9] = '{
    '{8, 0, 1, 2, 3, 4, 5, 6, 7},
    '{1, 8, 2, 3, 4, 5, 6, 7, 0},
    '{2, 3, 8, 4, 5, 6, 7, 0, 1},
    '{3, 4, 5, 8, 6, 7, 0, 1, 2},
    '{4, 5, 6, 7, 8, 0, 1, 2, 3},
    '{5, 6, 7, 0, 1, 8, 2, 3, 4},
    '{6, 7, 0, 1, 2, 3, 8, 4, 5},
    '{7, 0, 1, 2, 3, 4, 5, 8, 6},
    '{8, 1, 2, 3, 4, 5, 6, 7, 0},
    '{2, 8, 3, 4, 5, 6, 7, 0, 1}
  };

  slot_kind_e k8, k16;
  logic [2:0] p8;
  logic [3:0] p16;
  logic f8, l8, f16, l16;
  logic [3:0] s8;
  logic [4:0] s16;

  rr_sched #(.N_PORTS(8), .RR_LEN(9)) dut8 (
    .clk, .rst_n, .kind(k8), .port(p8), .first(f8), .last(l8), .slot(s8));
  rr_sched #(.N_PORTS(16), .RR_LEN(20)) dut16 (
    .clk, .rst_n, .kind(k16), .port(p16), .first(f16), .last(l16), .slot(s16));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 8-port checks against the table
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    for (int c = 0; c < 10; c++) begin
      for (int s = 0; s < 9; s++) begin
        if (TABLE[c][s] == 8) check(k8 == SLOT_MC, $sformatf("8x8 c%0d s%0d expect mc", c, s));
        else check(k8 == SLOT_UNI && int'(p8) == TABLE[c][s],
                   $sformatf("8x8 c%0d s%0d expect uni%0d got kind %0d port %0d",
                             c, s, TABLE[c][s], k8, p8));
        check(f8 == (s == 0) && l8 == (s == 8), "8x8 first/last");
        @(negedge clk);
      end
    end
  end

  // 16-port properties over 40 cycles
  initial begin
    bit [15:0] seen;
    int n_mc, n_idle;
    @(posedge rst_n);
    @(negedge clk);
    for (int c = 0; c < 40; c++) begin
      seen = '0; n_mc = 0; n_idle = 0;
      for (int s = 0; s < 20; s++) begin
        if (k16 == SLOT_MC) begin
          n_mc++;
          check(s == c % 16, $sformatf("16 c%0d mc at slot %0d", c, s));
        end else if (k16 == SLOT_UNI) begin
          check(!seen[p16], "16 port twice");
          seen[p16] = 1'b1;
          if (s == 0 || (s == 1 && c % 16 == 0))
            check(int'(p16) == (c + c / 16) % 16, $sformatf("16 c%0d first port %0d", c, p16));
        end else begin
          n_idle++;
          check(s >= 17, "16 idle slot early");
        end
        check(f16 == (s == 0) && l16 == (s == 19), "16 first/last");
        @(negedge clk);
      end
      check(seen == 16'hffff && n_mc == 1 && n_idle == 3, $sformatf("16 cycle %0d content", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
