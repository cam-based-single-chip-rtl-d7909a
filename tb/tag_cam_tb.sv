// tag_cam_tb: tag CAM checks.
//  Small instance (8 words, last 2 in class 1): words fill lowest first within their class,
//  a full class reports no empty word while the other class still has one, a tag search
//  returns the right word line and misses absent or freed tags, a freed word is reused, the
//  class port moves a word between classes, and the used count follows.
//  Full-size instance (256 words, no CLP split): random writes, searches and frees against a
//  model.
module tag_cam_tb;
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

  logic       cls_we, cls_val, es_class, es_hit, tw_en, s_hit, inv_en;
  logic [2:0] cls_addr;
  logic [7:0] es_line, tw_line, s_line, inv_line;
  logic [5:0] tw_tag, s_tag;
  logic [3:0] used;
  tag_cam #(.N_CELLS(8), .TAG_W(6), .CLP1_WORDS(2)) dut (.*);

  logic         bes_class, bes_hit, btw_en, bs_hit, binv_en;
  logic [255:0] bes_line, btw_line, bs_line, binv_line;
  logic [13:0]  btw_tag, bs_tag;
  logic [8:0]   bused;
  tag_cam bdut (
    .clk, .rst_n, .cls_we(1'b0), .cls_addr(8'd0), .cls_val(1'b0),
    .es_class(bes_class), .es_hit(bes_hit), .es_line(bes_line),
    .tw_en(btw_en), .tw_line(btw_line), .tw_tag(btw_tag),
    .s_tag(bs_tag), .s_hit(bs_hit), .s_line(bs_line),
    .inv_en(binv_en), .inv_line(binv_line), .used(bused));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // write tag t into the first empty word of class c; returns the line used
  task automatic put(input logic c, input logic [5:0] t, output logic [7:0] line);
    es_class = c; #1;
    line = es_line;
    tw_en = es_hit; tw_line = es_line; tw_tag = t;
    @(negedge clk);
    tw_en = 0;
  endtask

  initial begin
    logic [7:0]   l;
    logic [13:0]  mtag [256];
    bit           mval [256];
    int           n_used, first;
    {cls_we, cls_val, es_class, tw_en, inv_en} = '0;
    cls_addr = 0; tw_line = 0; inv_line = 0; tw_tag = 0; s_tag = 0;
    {bes_class, btw_en, binv_en} = '0; btw_line = 0; binv_line = 0; btw_tag = 0; bs_tag = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    check(used == 0, "empty after reset");
    for (int i = 0; i < 6; i++) begin
      put(1'b0, 6'(10 + i), l);
      check(l == 8'(1 << i), $sformatf("class0 word %0d line %b", i, l));
    end
    es_class = 0; #1;
    check(!es_hit && es_line == 0, "class 0 full");
    es_class = 1; #1;
    check(es_hit && es_line == 8'b0100_0000, "class 1 still free");
    put(1'b1, 6'd50, l);
    check(used == 7, "used count 7");
    s_tag = 6'd13; #1;
    check(s_hit && s_line == 8'b0000_1000, "search tag 13");
    s_tag = 6'd50; #1;
    check(s_hit && s_line == 8'b0100_0000, "search tag 50");
    s_tag = 6'd33; #1;
    check(!s_hit && s_line == 0, "absent tag misses");
    // free word 2 (tag 12), search misses, then reuse it
    inv_en = 1; inv_line = 8'b0000_0100;
    @(negedge clk); inv_en = 0;
    s_tag = 6'd12; #1;
    check(!s_hit, "freed tag misses");
    put(1'b0, 6'd20, l);
    check(l == 8'b0000_0100, "freed word reused");
    s_tag = 6'd20; #1;
    check(s_hit && s_line == 8'b0000_0100, "reused word found");
    // move word 7 into class 0
    cls_we = 1; cls_addr = 3'd7; cls_val = 0;
    @(negedge clk); cls_we = 0;
    es_class = 0; #1;
    check(es_hit && es_line == 8'b1000_0000, "word 7 moved to class 0");
    es_class = 1; #1;
    check(!es_hit, "class 1 now full");

    // full-size random test, one shared class
    for (int i = 0; i < 256; i++) mval[i] = 0;
    for (int t = 0; t < 1500; t++) begin
      n_used = 0; first = -1;
      for (int i = 0; i < 256; i++) begin
        if (mval[i]) n_used++;
        if (!mval[i] && first < 0) first = i;
      end
      bes_class = 1'($urandom);
      bs_tag = ($urandom % 2) ? mtag[$urandom % 256] : 14'($urandom);
      #1;
      check(bused == 9'(n_used), "random used");
      check(bes_hit == (first >= 0) && (first < 0 || bes_line == 256'(1) << first), "random empty");
      begin
        logic [255:0] exp_line;
        exp_line = '0;
        for (int i = 0; i < 256; i++) if (mval[i] && mtag[i] == bs_tag) exp_line[i] = 1;
        check(bs_line == exp_line && bs_hit == (exp_line != 0), "random search");
        // write a fresh tag or free the match
        btw_en = 0; binv_en = 0;
        if ($urandom % 3 != 0 && bes_hit) begin
          logic [13:0] nt;
          bit dup;
          nt = 14'($urandom);
          dup = 0;
          for (int i = 0; i < 256; i++) if (mval[i] && mtag[i] == nt) dup = 1;
          if (!dup) begin
            btw_en = 1; btw_line = bes_line; btw_tag = nt;
            mval[first] = 1; mtag[first] = nt;
          end
        end
        if (bs_hit && $urandom % 2 == 0) begin
          binv_en = 1; binv_line = bs_line;
          for (int i = 0; i < 256; i++) if (exp_line[i]) mval[i] = 0;
        end
      end
      @(negedge clk);
      btw_en = 0; binv_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
