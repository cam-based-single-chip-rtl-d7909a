// buffer_ram: the shared cell buffer, one whole ATM cell per word.
//
// The buffer is addressed only by one-hot word lines from the tag CAM, so it has no address
// decoder. A write stores wdata in the word on wline at the clock edge. A read is the
// combinational OR of the words on rline, which models the sense-amplifier bit lines that run
// straight into the parallel-to-serial output memory; the reader latches it. One write and one
// read per clock (dual-port memory, the full-speed configuration). Words are not reset: a word
// is read only after a cell was written into it.
module buffer_ram #(
  parameter int unsigned N_CELLS   = atm_pkg::N_CELLS_DEF,
  parameter int unsigned CELL_BITS = atm_pkg::CELL_BITS_DEF
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [N_CELLS-1:0]   wline,
  input  logic [CELL_BITS-1:0] wdata,
  input  logic [N_CELLS-1:0]   rline,
  output logic [CELL_BITS-1:0] rdata
);

  logic [CELL_BITS-1:0] mem [N_CELLS];

  always_ff @(posedge clk) begin
    for (int i = 0; i < N_CELLS; i++)
      if (we && wline[i]) mem[i] <= wdata;
  end

  always_comb begin
    rdata = '0;
    for (int i = 0; i < N_CELLS; i++)
      if (rline[i]) rdata = rdata | mem[i];
  end

endmodule
