// atm_switch_tb: end-to-end test of the whole switch at reduced size - 4 ports, 16 buffer
// words, 64-bit cells on 8 pins, 3-bit sequence numbers, 2 priority levels, 4 multicast
// connections, cells discarded after 10 round-robin cycles - so that queues and the buffer
// fill, and cells grow old, within a short run. See
// atm_switch_tb_body.svh for the traffic, the scoreboard and the mechanisms counted.
module atm_switch_tb;
  localparam int NP = 4, NC = 16, CB = 64, SW = 3, MW = 2, MSW = 3, NPR = 2, PIN = 8;
  localparam int CLP1 = 4, N_CYC = 400, AGE = 10;
`define DUT_PARAMS #(.N_PORTS(NP), .N_CELLS(NC), .CELL_BITS(CB), .SEQ_W(SW), .MCI_W(MW), \
                     .MSEQ_W(MSW), .N_PRIO(NPR), .PIN_W(PIN), .CLP1_WORDS(CLP1), \
                     .AGE_LIMIT(AGE))
`include "atm_switch_tb_body.svh"
`undef DUT_PARAMS
endmodule
