// buffer_ram_tb: shared buffer RAM at full size (256 words of 424 bits). Random cells are
// written on one-hot word lines while another word is read in the same clock; every read is
// compared with a model, and an empty word line reads as all zeros.
module buffer_ram_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic           we;
  logic [255:0]   wline, rline;
  logic [423:0]   wdata, rdata;
  buffer_ram dut (.clk, .we, .wline, .wdata, .rline, .rdata);

  function automatic logic [423:0] rnd_cell();
    logic [423:0] c;
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
    logic [423:0] model [256];
    int           wa, ra;
    we = 0; wline = 0; rline = 0; wdata = 0;
    // fill every word
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      model[i] = rnd_cell();
      we = 1; wline = 256'(1) << i; wdata = model[i];
    end
    @(negedge clk); we = 0;
    rline = 0; #1;
    checks++;
    if (rdata != 0) begin failures++; $display("FAIL idle read"); end
    for (int t = 0; t < 2000; t++) begin
      wa = $urandom % 256;
      ra = $urandom % 256;
      we = 1'($urandom); wline = 256'(1) << wa; wdata = rnd_cell();
      rline = 256'(1) << ra;
      #1;
      checks++;
      if (rdata !== model[ra]) begin
        failures++;
        $display("FAIL read word %0d", ra);
      end
      @(negedge clk);
      if (we) model[wa] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
