// atm_pkg: sizes shared by the blocks of the CAM-based shared buffer ATM switch.
//
// The defaults are the single-chip 16x16 configuration: 256 buffered cells of 424 bits
// (one whole 53-byte cell per memory word), 7-bit unicast sequence numbers, 6-bit multicast
// connection identifiers (MCI) with 5-bit multicast sequence numbers, and 8 output pins per
// port. These sizes add up to 127,072 memory bits (tag CAM with valid bits, buffer, sequence
// numbers, multicast CAM, PSRAM). Delay priority levels and a CLP=0/CLP=1 split of the buffer
// are optional features of the architecture that this main configuration leaves out; set
// N_PRIO (for example to 4) and CLP1_WORDS to turn them on. Cells that wait longer than
// AGE_LIMIT round-robin cycles are discarded (the latency limit, this design's choice).
package atm_pkg;

  localparam int unsigned N_PORTS_DEF   = 16;   // switch size 16x16
  localparam int unsigned N_CELLS_DEF   = 256;  // shared buffer capacity 2^8 cells
  localparam int unsigned CELL_BITS_DEF = 424;  // 53-byte ATM cell as one memory word
  localparam int unsigned SEQ_W_DEF     = 7;    // unicast sequence number width
  localparam int unsigned MCI_W_DEF     = 6;    // multicast connection identifier width
  localparam int unsigned MSEQ_W_DEF    = 5;    // multicast sequence number width
  localparam int unsigned N_PRIO_DEF    = 1;    // delay priority levels (1: none)
  localparam int unsigned PIN_W_DEF     = 8;    // output pins per port
  localparam int unsigned CLP1_WORDS_DEF = 0;   // buffer words reserved for CLP=1 (0: no split)
  localparam int unsigned AGE_LIMIT_DEF = 255;  // latency limit in round-robin cycles (0: off)

  // Kind of an output round-robin slot.
  typedef enum logic [1:0] {
    SLOT_IDLE = 2'd0,   // no read issued (padding slot of a stretched round-robin cycle)
    SLOT_UNI  = 2'd1,   // unicast slot of one output port
    SLOT_MC   = 2'd2    // the multicast slot
  } slot_kind_e;

endpackage
