// vc_pkg: types and constants shared by the trace-buffer victim cache.
//
// The trace buffer is 128 bits (16 bytes, four 32-bit words) wide, and a
// victim-cache line is one trace-buffer row. A tag row packs four 32-bit
// tag entries side by side; a 4-way set has one tag row, an 8-way set two.
// The layout of one tag entry is this design's own choice: the valid bit,
// the thread that inserted the line, the LRU age (3 bits, enough for 8 ways)
// and the address tag, packed into a 32-bit word.
package vc_pkg;

  localparam int unsigned LINE_W   = 128;  // trace buffer / cache line width
  localparam int unsigned LINE_B   = 16;   // bytes per line
  localparam int unsigned OFF_W    = 4;    // log2(LINE_B)
  localparam int unsigned ADDR_W   = 32;   // SPARC V8 address
  localparam int unsigned ROW_TAGS = 4;    // tag entries per tag row
  localparam int unsigned ENTRY_W  = 32;   // bits per tag entry
  localparam int unsigned MAX_THR_W = 2;   // owner field width (up to 4 threads)

  typedef logic [LINE_W-1:0] line_t;
  typedef logic [ADDR_W-1:0] addr_t;

  // One tag entry: {valid, owner, lru, tag}, 1 + 2 + 3 + 26 = 32 bits.
  // 26 tag bits cover a 32-bit address with 16-byte lines and >= 4 sets.
  typedef struct packed {
    logic                 valid;
    logic [MAX_THR_W-1:0] owner;
    logic [2:0]           lru;   // 0 = most recently inserted
    logic [25:0]          tag;   // maddr >> (OFF_W + set bits), zero-extended
  } tag_entry_t;

  // Insertion policy seen by the victim cache controller.
  typedef enum logic [1:0] {
    POL_SHARED    = 2'd0,  // LRU over all ways, any thread inserts
    POL_MULTIMODE = 2'd1,  // shared or exclusive, from the mode controller
    POL_PARTITION = 2'd2   // per-way ownership, from the LR partitioning unit
  } policy_e;

  // Modes of the multi-mode victim cache.
  typedef enum logic [1:0] {
    MODE_SHARED = 2'd0,
    MODE_EXCL0  = 2'd1,
    MODE_EXCL1  = 2'd2
  } vc_mode_e;

endpackage
