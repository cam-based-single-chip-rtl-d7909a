// cell_aging_tb: per-word aging of the shared buffer, 16 words with a limit of 5 ticks.
// Random traffic writes free words (one-hot, as the tag CAM's write does), frees held words
// as reads would, and ticks at random clocks. A reference model keeps the held flag and age of
// every word, worked out from the stimulus alone; every clock the testbench compares
// expire_line and expired with it, and checks that a word expires exactly AGE_LIMIT ticks
// after it was written unless it was read first. It counts expiries, reads and rewrites of
// expired words and requires each to happen.
module cell_aging_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NC = 16, LIM = 5;

  logic          tick, tw_en, inv_en, expired;
  logic [NC-1:0] tw_line, inv_line, expire_line;

  cell_aging #(.N_CELLS(NC), .AGE_LIMIT(LIM)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit            held [NC], was_expired [NC];
    int            age [NC];
    logic [NC-1:0] exp_line;
    int            n_exp, n_read, n_reuse;
    n_exp = 0; n_read = 0; n_reuse = 0;
    tick = 0; tw_en = 0; inv_en = 0; tw_line = 0; inv_line = 0;
    for (int i = 0; i < NC; i++) begin held[i] = 0; age[i] = 0; was_expired[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 10000; t++) begin
      @(negedge clk);
      tick = ($urandom % 3 == 0);
      // write one free word
      tw_en = 0; tw_line = 0;
      if ($urandom % 2 == 0) begin
        int i;
        i = $urandom % NC;
        if (!held[i]) begin tw_en = 1; tw_line[i] = 1; end
      end
      // read (free) one held word
      inv_en = 0; inv_line = 0;
      if ($urandom % 4 == 0) begin
        int i;
        i = $urandom % NC;
        if (held[i] && !tw_line[i]) begin inv_en = 1; inv_line[i] = 1; end
      end
      #1;
      for (int i = 0; i < NC; i++) exp_line[i] = held[i] && age[i] == LIM;
      check(expire_line == exp_line, $sformatf("t %0d expire %b expect %b", t, expire_line, exp_line));
      check(expired == (exp_line != 0), "expired flag");
      // model update at the coming edge
      for (int i = 0; i < NC; i++) begin
        if (tw_line[i]) begin
          if (was_expired[i]) n_reuse++;
          held[i] = 1; age[i] = 0; was_expired[i] = 0;
        end else if (inv_line[i]) begin
          held[i] = 0; n_read++;
        end else if (exp_line[i]) begin
          held[i] = 0; n_exp++; was_expired[i] = 1;
        end else if (tick && held[i] && age[i] < LIM) begin
          age[i]++;
        end
      end
    end
    check(n_exp > 100, $sformatf("%0d expiries", n_exp));
    check(n_read > 100, $sformatf("%0d reads", n_read));
    check(n_reuse > 50, $sformatf("%0d expired words reused", n_reuse));
    $display("expiries %0d reads %0d reuses %0d", n_exp, n_read, n_reuse);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
