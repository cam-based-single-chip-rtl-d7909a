// tag_cam: content-addressable tag memory that controls access to the shared buffer.
//
// Each buffer word has one CAM word: a tag that names the cell stored there, a valid bit that
// marks the word as holding a cell, and a class bit that reserves the word for cells with
// CLP=0 or CLP=1. Instead of addresses the CAM drives one-hot word lines straight into the
// buffer RAM, so neither an address decoder nor an address encoder is needed.
//   * Empty search: es_line marks the first (lowest) invalid word whose class bit equals
//     es_class; es_hit says one exists. Purely combinational.
//   * Tag write:    on tw_en the word on the one-hot tw_line takes tw_tag and becomes valid at
//                   the clock edge.
//   * Tag search:   s_line marks the valid word whose tag equals s_tag (combinational).
//   * Invalidate:   on inv_en the words on inv_line become free at the clock edge.
//   * Class write:  cls_we sets the class bit of word cls_addr; this is the supervisory port
//                   that moves the CLP=0/CLP=1 boundary at run time.
// One empty search, one tag write, one tag search and one invalidate can happen in every
// clock, as the dual-port full-speed configuration requires. Reset clears every valid bit and
// puts the last CLP1_WORDS words in class 1. With CLP1_WORDS=0 (the default) there is no CLP
// split: the class bits are ignored and every cell may take any word. The size of the split,
// the lowest-index choice of the first empty word and the used-word count are this design's
// choices.
module tag_cam #(
  parameter int unsigned N_CELLS    = atm_pkg::N_CELLS_DEF,
  parameter int unsigned TAG_W      = 14,
  parameter int unsigned CLP1_WORDS = atm_pkg::CLP1_WORDS_DEF
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // class (CLP region) configuration
  input  logic                       cls_we,
  input  logic [$clog2(N_CELLS)-1:0] cls_addr,
  input  logic                       cls_val,
  // search for the first empty word of a class
  input  logic                       es_class,
  output logic                       es_hit,
  output logic [N_CELLS-1:0]         es_line,
  // tag write
  input  logic                       tw_en,
  input  logic [N_CELLS-1:0]         tw_line,
  input  logic [TAG_W-1:0]           tw_tag,
  // tag search
  input  logic [TAG_W-1:0]           s_tag,
  output logic                       s_hit,
  output logic [N_CELLS-1:0]         s_line,
  // invalidate after a read
  input  logic                       inv_en,
  input  logic [N_CELLS-1:0]         inv_line,
  // number of valid words
  output logic [$clog2(N_CELLS+1)-1:0] used
);

  logic [TAG_W-1:0]   tag_q [N_CELLS];
  logic [N_CELLS-1:0] valid_q;
  logic [N_CELLS-1:0] class_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      for (int i = 0; i < N_CELLS; i++) class_q[i] <= (i >= N_CELLS - CLP1_WORDS);
    end else begin
      for (int i = 0; i < N_CELLS; i++) begin
        if (tw_en && tw_line[i])        valid_q[i] <= 1'b1;
        else if (inv_en && inv_line[i]) valid_q[i] <= 1'b0;
      end
      if (cls_we) class_q[cls_addr] <= cls_val;
    end
  end

  // Tag storage needs no reset: a word is only searched while valid.
  always_ff @(posedge clk) begin
    for (int i = 0; i < N_CELLS; i++)
      if (tw_en && tw_line[i]) tag_q[i] <= tw_tag;
  end

  // First empty word of the requested class: a priority chain from word 0 upward.
  always_comb begin
    logic found;
    found   = 1'b0;
    es_line = '0;
    for (int i = 0; i < N_CELLS; i++) begin
      if (!found && !valid_q[i] && (CLP1_WORDS == 0 || class_q[i] == es_class)) begin
        es_line[i] = 1'b1;
        found      = 1'b1;
      end
    end
    es_hit = found;
  end

  // Tag match lines.
  always_comb begin
    for (int i = 0; i < N_CELLS; i++) s_line[i] = valid_q[i] && (tag_q[i] == s_tag);
    s_hit = |s_line;
  end

  always_comb begin
    used = '0;
    for (int i = 0; i < N_CELLS; i++) used = used + ($bits(used))'(valid_q[i]);
  end

  // A tag names at most one cell, and a tag is only written into an empty word.
  a_unique_match: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(s_line));
  a_write_empty:  assert property (@(posedge clk) disable iff (!rst_n)
                                   tw_en |-> $onehot(tw_line) && ((tw_line & valid_q) == '0));

endmodule
