// Shared constants and types of the string-matching accelerator.
//
// The accelerator is a memory-mapped peripheral of a 32-bit host. Each channel has
// two address regions: the packet SRAM (a circular buffer whose first two words are
// the read and write pointers) and the tree SRAM (a control word, a match-ID word and
// then the state table). The region split, the bit positions in the control word and
// the sizes below are this design's choices; the three control bits, the two
// pointers and their meaning follow the architecture description.
package sm_pkg;

  // Host bus word width (32-bit OpenRISC host).
  localparam int unsigned WORD_W = 32;
  localparam int unsigned BYTE_W = 8;
  localparam int unsigned BYTES_PER_WORD = WORD_W / BYTE_W;

  // Word offsets inside the packet SRAM region.
  localparam int unsigned PKT_RAP_ADDR   = 0;  // read address pointer, written by the accelerator
  localparam int unsigned PKT_WAP_ADDR   = 1;  // write address pointer, written by the host
  localparam int unsigned PKT_DATA_FIRST = 2;  // first word of the circular data area

  // Word offsets inside the tree SRAM region.
  localparam int unsigned TREE_CTRL_ADDR  = 0; // control word: used, write, start
  localparam int unsigned TREE_MATCH_ADDR = 1; // match ID of the last scan
  localparam int unsigned TREE_TBL_FIRST  = 2; // first state-table entry

  // Bit positions of the control word (used | write | reserved | start, MSB to LSB).
  localparam int unsigned CTRL_USED_BIT  = 31;
  localparam int unsigned CTRL_WRITE_BIT = 30;
  localparam int unsigned CTRL_START_BIT = 0;

  // State of the scan sequencer in the packet interface.
  typedef enum logic [1:0] {
    SCAN_IDLE  = 2'd0,  // waiting for start
    SCAN_RUN   = 2'd1,  // handing packet words to the parser
    SCAN_DRAIN = 2'd2,  // last word handed over, waiting for its last byte
    SCAN_DONE  = 2'd3   // one-cycle completion step
  } scan_state_e;

endpackage
