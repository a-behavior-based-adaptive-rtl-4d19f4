// baam_pkg: constants and types shared by the behaviour-based adaptive
// access-mode (BAAM) cache.
//
// The geometry is the main configuration of the design: a 32 KB, 4-way
// set-associative L1 cache with 32-byte lines, which gives 256 sets, a 5-bit
// byte offset, an 8-bit set index and a 19-bit tag on a 32-bit address. The
// partial tag is the 3 least significant tag bits. Each cache has three
// one-bit configuration registers, Reg0 (way prediction), Reg1 (partial tag
// comparison) and Reg2 (single block buffer); the instruction cache and the
// data cache together form one 6-bit configuration word, which is also the
// width of a configuration stack entry (16 entries).
//
// The 32-bit word width of the processor port and the placement of the IC
// bits in the low half of the 6-bit word are choices of this design.
package baam_pkg;

  localparam int unsigned ADDR_W      = 32;   // address width
  localparam int unsigned WORD_W      = 32;   // processor data word
  localparam int unsigned CACHE_BYTES = 32768;
  localparam int unsigned LINE_BYTES  = 32;
  localparam int unsigned NUM_WAYS    = 4;
  localparam int unsigned PTAG_W      = 3;    // partial tag bits
  localparam int unsigned STACK_DEPTH = 16;   // configuration stack entries

  localparam int unsigned NUM_SETS = CACHE_BYTES / (LINE_BYTES * NUM_WAYS);  // 256
  localparam int unsigned OFF_W    = $clog2(LINE_BYTES);                     // 5
  localparam int unsigned IDX_W    = $clog2(NUM_SETS);                       // 8
  localparam int unsigned TAG_W    = ADDR_W - IDX_W - OFF_W;                 // 19
  localparam int unsigned LINE_W   = LINE_BYTES * 8;                         // 256
  localparam int unsigned WAY_W    = $clog2(NUM_WAYS);                       // 2

  // Configuration registers of one cache.
  //   reg0: way prediction on; it also forces every partial-tag match high
  //         (the OR gates in front of the sense amplifiers)
  //   reg1: partial tag comparison on
  //   reg2: single block buffer on
  // reg0 = reg1 = 0 is the conventional parallel access of all ways.
  typedef struct packed {
    logic reg2;
    logic reg1;
    logic reg0;
  } cfg_t;

  // Configuration of both caches, as written by ConReg_we and kept on the stack.
  typedef struct packed {
    cfg_t dc;
    cfg_t ic;
  } cfg_pair_t;

  localparam int unsigned CFG_PAIR_W = $bits(cfg_pair_t);  // 6

  // Where the data of a response comes from.
  typedef enum logic [1:0] {
    SRC_CACHE = 2'd0,  // a way of the data array
    SRC_SBB   = 2'd1,  // the single block buffer
    SRC_FILL  = 2'd2,  // the line just refilled from the next level
    SRC_WACK  = 2'd3   // acknowledgement of a store, no data
  } resp_src_e;

endpackage
