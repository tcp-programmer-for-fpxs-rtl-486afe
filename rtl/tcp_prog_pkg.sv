// tcp_prog_pkg: types and constants shared by the arbitrator of the TCP
// programmer. Traffic on the RAD switch interface is carried as 32-bit words;
// an ATM cell is 14 such words (header word, HEC word and 12 payload words,
// i.e. 48 payload bytes). The cell length and word width follow the cell
// formats of the design; the state encodings are this implementation's own.
package tcp_prog_pkg;

  localparam int unsigned WORD_W     = 32;  // RAD interface data width
  localparam int unsigned CELL_WORDS = 14;  // words per ATM cell on the interface

  typedef logic [WORD_W-1:0] word_t;

  // Both write controllers and the read selector are two-state machines.
  typedef enum logic {
    ST_START  = 1'b0,
    ST_ACTIVE = 1'b1
  } fsm_state_t;

  // Flow chosen by the read selector for the cell it is sending.
  typedef enum logic {
    SEL_TCP = 1'b0,   // outgoing TCP flow, VCI 50
    SEL_CC  = 1'b1    // client (control cell) flow, VCI 34
  } flow_sel_t;

endpackage
