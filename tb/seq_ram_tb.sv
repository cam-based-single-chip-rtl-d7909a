// seq_ram_tb: sequence number register file. After reset every entry reads 0; random writes
// are checked against a model on the all-entries output one clock later, at the default size
// (16 entries of 7 bits) and at the multicast size (64 entries of 5 bits).
module seq_ram_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       we;
  logic [3:0] wa;
  logic [6:0] wd;
  logic [6:0] q [16];
  seq_ram dut (.clk, .rst_n, .we, .waddr(wa), .wdata(wd), .q);

  logic       mwe;
  logic [5:0] mwa;
  logic [4:0] mwd;
  logic [4:0] mq [64];
  seq_ram #(.DEPTH(64), .WIDTH(5)) mdut (.clk, .rst_n, .we(mwe), .waddr(mwa), .wdata(mwd), .q(mq));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] model [16];
    logic [4:0] mmodel [64];
    bit ok;
    we = 0; wa = 0; wd = 0; mwe = 0; mwa = 0; mwd = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    for (int i = 0; i < 16; i++) model[i] = 0;
    for (int i = 0; i < 64; i++) mmodel[i] = 0;
    for (int t = 0; t < 600; t++) begin
      ok = 1;
      for (int i = 0; i < 16; i++) if (q[i] != model[i]) ok = 0;
      for (int i = 0; i < 64; i++) if (mq[i] != mmodel[i]) ok = 0;
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL step %0d", t);
      end
      we = 1'($urandom); wa = 4'($urandom); wd = 7'($urandom);
      mwe = 1'($urandom); mwa = 6'($urandom); mwd = 5'($urandom);
      @(negedge clk);
      if (we) model[wa] = wd;
      if (mwe) mmodel[mwa] = mwd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
