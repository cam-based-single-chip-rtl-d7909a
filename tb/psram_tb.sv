// psram_tb: parallel-to-serial output memory, 4 ports, 424-bit cells, 8 pins per port.
// Per round-robin cycle the testbench loads first words (one port at a time, and one cell
// into several ports at once as a multicast would), then pulses xfer. It checks that every
// loaded port then sends its cell over exactly 53 clocks, 8 bits per clock starting at bit
// 0, with start-of-cell on the first group, that all ports send in the same clocks, that
// unloaded ports stay silent, and that a load in the xfer clock belongs to the next cycle.
module psram_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NP = 4, CB = 424, PW = 8, NG = 53, RR = 60;

  logic [CB-1:0] bl;
  logic [NP-1:0] sel;
  logic          xfer;
  logic [PW-1:0] od [NP];
  logic [NP-1:0] ov, osop;
  psram #(.N_PORTS(NP), .CELL_BITS(CB), .PIN_W(PW)) dut (
    .clk, .rst_n, .bl, .sel, .xfer, .out_data(od), .out_valid(ov), .out_sop(osop));

  function automatic logic [CB-1:0] rnd_cell();
    logic [CB-1:0] c;
    for (int i = 0; i < 14; i++) c[i*32 +: 32] = $urandom;
    c[423:416] = 8'($urandom);
    return c;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [CB-1:0] cur [NP], nxt [NP];
    logic [NP-1:0] curv, nxtv;
    logic [CB-1:0] got [NP];
    int            nvalid [NP];
    bl = 0; sel = 0; xfer = 0;
    curv = 0; nxtv = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int c = 0; c < 12; c++) begin
      // cycle c: clock 0 is the xfer clock (loads there are for this cycle), then load
      for (int p = 0; p < NP; p++) begin got[p] = '0; nvalid[p] = 0; end
      nxtv = 0;
      for (int t = 0; t < RR; t++) begin
        @(negedge clk);
        xfer = (t == 0);
        sel = 0;
        if (t < NP + 1 && $urandom % 4 != 0) begin
          bl = rnd_cell();
          if (t == NP) sel = NP'($urandom) & ~nxtv;  // multicast-like load
          else if (!nxtv[t]) sel[t] = 1'b1;
          for (int p = 0; p < NP; p++) if (sel[p]) begin nxt[p] = bl; nxtv[p] = 1; end
        end
        #1;
        // outputs in this clock belong to the cell transferred at the previous xfer
        if (t > 0) begin
          for (int p = 0; p < NP; p++) begin
            if (ov[p]) begin
              checks++;
              if (osop[p] != (nvalid[p] == 0)) begin failures++; $display("FAIL sop"); end
              got[p][nvalid[p]*PW +: PW] = od[p];
              nvalid[p]++;
            end
          end
          checks++;
          if (ov != ((t <= NG) ? curv : '0)) begin
            failures++;
            $display("FAIL cycle %0d clock %0d valid %b expect %b", c, t, ov, curv);
          end
        end
      end
      for (int p = 0; p < NP; p++) begin
        checks++;
        if (curv[p] && (nvalid[p] != NG || got[p] != cur[p])) begin
          failures++;
          $display("FAIL cycle %0d port %0d cell (%0d groups)", c, p, nvalid[p]);
        end
      end
      cur = nxt; curv = nxtv;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
