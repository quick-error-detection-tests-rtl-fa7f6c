// fastqed_pkg: types and constants shared by the PLC-H checker blocks.
//
// A PLC-H (Proactive Load and Check, hardware) checker sits beside one cache
// memory array. It reads a line at an "original" address A and the line at
// the matching "EDDI-V" duplicate address A+CHUNK and flags any difference.
// This package holds the array-input mode encoding, the checker
// configuration register map and the default sizes of the OpenSPARC T2-like
// cache subsystem the design targets (8 L1 data caches, 8 L2 banks of 16
// arrays, 512 entries per array, 0x1000-byte chunks). The encodings and the
// register map are this design's own choices.
package fastqed_pkg;

  // Source selected by the multiplexers in front of a cache array.
  typedef enum logic [1:0] {
    MODE_NORMAL = 2'd0,   // loads/stores from the cores / crossbar
    MODE_PLCH   = 2'd1,   // reads issued by the PLC-H checker
    MODE_MBIST  = 2'd2    // memory BIST engine owns the array
  } array_mode_e;

  // Checker configuration registers, written by the debugger.
  typedef enum logic [1:0] {
    CFG_ORIG_LO = 2'd0,   // first byte address of the original variables
    CFG_ORIG_HI = 2'd1,   // last byte address of the original variables
    CFG_OP_MIN  = 2'd2,   // OP_cnt_min
    CFG_CTRL    = 2'd3    // bit 0: PLC-H enable, bit 1: clear sticky error
  } cfg_reg_e;

  localparam int unsigned ADDR_W_DEF     = 40;
  localparam int unsigned CHUNK_DEF      = 32'h1000;
  localparam int unsigned ENTRIES_DEF    = 512;
  localparam int unsigned BUF_DEPTH_DEF  = 8;
  localparam int unsigned L1_LINE_BYTES  = 16;
  localparam int unsigned L2_LINE_BYTES  = 64;
  localparam int unsigned L1_READ_LAT    = 1;
  localparam int unsigned L2_READ_LAT    = 2;
  localparam int unsigned OPCNT_W_DEF    = 16;
  localparam int unsigned STCNT_W_DEF    = 16;

endpackage
