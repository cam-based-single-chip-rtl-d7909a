// mc_cam_tb: multicast CAM checks.
//  1. The published four-connection, eight-port example: stored words 00111100, 01000001,
//     00001111, 01010101 (port 7 on the left), search word 0X00XX0X (X = port free). Only MCI 1
//     may hit, and it is the one released.
//  2. Rotating priority: with every connection eligible, grants step 0,1,2,3,0,...
//  3. Connections without a waiting cell never hit.
//  4. A 64-connection, 16-port instance against a software model with random words, masks
//     and pending sets, over many searches (including the rotation pointer).
module mc_cam_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // small instance
  logic       cw, se, hit;
  logic [1:0] cm, mci;
  logic [7:0] cp, free, ports;
  logic [3:0] pend, hl;
  mc_cam #(.N_MCI(4), .N_PORTS(8)) dut (
    .clk, .rst_n, .cfg_we(cw), .cfg_mci(cm), .cfg_ports(cp),
    .s_en(se), .s_free(free), .s_pending(pend), .s_hitline(hl), .s_hit(hit),
    .s_mci(mci), .s_ports(ports));

  // full-size instance
  logic        bw, bse, bhit;
  logic [5:0]  bm, bmci;
  logic [15:0] bp, bfree, bports;
  logic [63:0] bpend, bhl;
  mc_cam bdut (
    .clk, .rst_n, .cfg_we(bw), .cfg_mci(bm), .cfg_ports(bp),
    .s_en(bse), .s_free(bfree), .s_pending(bpend), .s_hitline(bhl), .s_hit(bhit),
    .s_mci(bmci), .s_ports(bports));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [7:0] WORDS [4] = '{8'b00111100, 8'b01000001, 8'b00001111, 8'b01010101};

  initial begin
    logic [15:0] model [64];
    int          rot;
    int          exp_mci;
    bit          exp_hit;
    cw = 0; se = 0; cm = 0; cp = 0; free = 0; pend = 0;
    bw = 0; bse = 0; bm = 0; bp = 0; bfree = 0; bpend = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    // 1. published example
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); cw = 1; cm = 2'(i); cp = WORDS[i];
    end
    @(negedge clk); cw = 0;
    free = 8'b0100_1101;  // OP7=0 OP6=X OP5=0 OP4=0 OP3=X OP2=X OP1=0 OP0=X
    pend = 4'b1111;
    #1;
    check(hl == 4'b0010, $sformatf("example hit lines %b", hl));
    check(hit && mci == 2'd1 && ports == 8'b01000001, "example release MCI 1");
    // 2. rotation
    free = 8'hff; se = 1;
    for (int k = 0; k < 8; k++) begin
      #1;
      check(hit && int'(mci) == k % 4, $sformatf("rotation step %0d got %0d", k, mci));
      @(negedge clk);
    end
    // 3. pending qualifier
    pend = 4'b0100; #1;
    check(hit && mci == 2'd2, "only pending MCI hits");
    pend = 4'b0000; #1;
    check(!hit && hl == 0, "nothing pending, no hit");
    se = 0;

    // 4. random, full size
    for (int i = 0; i < 64; i++) begin
      model[i] = 16'($urandom) & 16'($urandom);
      @(negedge clk); bw = 1; bm = 6'(i); bp = model[i];
    end
    @(negedge clk); bw = 0;
    rot = 0;
    for (int t = 0; t < 400; t++) begin
      bfree = 16'($urandom) | 16'($urandom);
      bpend = {$urandom, $urandom};
      bse   = 1'($urandom);
      #1;
      exp_hit = 0; exp_mci = 0;
      for (int k = 0; k < 64; k++) begin
        int idx;
        idx = (rot + k) % 64;
        if (!exp_hit && bpend[idx] && ((model[idx] & ~bfree) == 0)) begin
          exp_hit = 1; exp_mci = idx;
        end
      end
      check(bhit == exp_hit, $sformatf("random %0d hit", t));
      if (exp_hit) check(int'(bmci) == exp_mci && bports == model[exp_mci],
                         $sformatf("random %0d mci %0d exp %0d", t, bmci, exp_mci));
      if (bse && exp_hit) rot = (exp_mci + 1) % 64;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
