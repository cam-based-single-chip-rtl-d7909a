// atm_switch_full_tb: end-to-end test of the switch with every parameter at its default:
// 16x16 ports, 256 cells of 424 bits, 7-bit sequence numbers, one delay priority level, no
// CLP split of the buffer, 64 multicast connections with 5-bit sequence numbers, 8 pins per
// input and output port (53 clocks per cell and per round-robin cycle). Same traffic,
// scoreboard and mechanism counts as atm_switch_tb, see atm_switch_tb_body.svh.
module atm_switch_full_tb;
  localparam int NP = 16, NC = 256, CB = 424, SW = 7, MW = 6, MSW = 5, NPR = 1, PIN = 8;
  localparam int CLP1 = 0, N_CYC = 200, AGE = 255;
`define DUT_PARAMS
`include "atm_switch_tb_body.svh"
`undef DUT_PARAMS
endmodule
