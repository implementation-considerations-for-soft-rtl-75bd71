// tam_pkg: packet format and control-bus encoding of the TAM-to-IP-core bridge.
//
// A packet is a header word followed by LEN data words. Header word (DW = 16 bits):
//   [15]    header flag (1 = this word is a header)
//   [14:8]  destination core ID
//   [7:0]   LEN, the number of data words that follow (0 allowed)
// The bridge passes the data words of packets whose ID equals its own core ID to the IP
// core test structures and discards the others.
//
// The assembly controller is a state machine whose next-state logic is programmable;
// its 10 inputs are the 4 present-state bits and 6 status bits, its 13 outputs the 4
// next-state bits and 9 control bits. The positions below fix how those bits are wired.
package tam_pkg;
  localparam int DW    = 16;
  localparam int IDW   = 7;
  localparam int LENW  = 8;
  localparam int HDR_B = 15;

  localparam int NSTATE = 4;  // present/next-state bits
  localparam int NSTAT  = 6;  // status bits into the controller
  localparam int NCTRL  = 9;  // control bits out of the controller

  // status bit positions
  typedef enum int {
    ST_VLD    = 0,  // a word is available at the assembly input
    ST_IS_HDR = 1,  // that word has the header flag set
    ST_MATCH  = 2,  // latched: the last header addressed this core
    ST_LAST   = 3,  // remaining data count == 1
    ST_RDY    = 4,  // IP core test structures accept a word
    ST_ZERO   = 5   // remaining data count == 0
  } stat_e;

  // control bit positions
  typedef enum int {
    CT_POP  = 0,    // consume the word at the assembly input
    CT_LOAD = 1,    // latch the header (count and match flag)
    CT_DEC  = 2,    // decrement the remaining data count
    CT_WE   = 3,    // write the word to the IP core test structures
    CT_DONE = 4     // pulse: the last data word of a packet was consumed
    // bits 5..8 are spare controller outputs
  } ctrl_e;
endpackage
