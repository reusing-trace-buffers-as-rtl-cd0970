// vc_index: index computation and tag comparison of the victim cache.
//
// The trace buffer is split into a tag region of NSETS*TROWS rows and a data
// region of VC_WAYS*NSETS rows starting at row SI. A set has TROWS tag rows
// of four 32-bit tag entries each: one row for 4 ways, two for 8 ways. For
// an address a:
//   TagIndex  = (a >> 4) & (NSETS - 1)
//   tag row   = TagIndex*TROWS + row_sel
//   DataIndex = SI + TagIndex*VC_WAYS + way
// The four tag entries of the tag row read from the trace buffer are
// compared with the address tag at the same time, giving hit and the slot
// (0..3) of the matching entry in that row. The address is either the
// request address (maddr) or the address of the line evicted from the data
// cache (vaddr); the row driven to the trace buffer is either the tag row or
// DataIndex. The selects, the tag row number and the way come from the
// controller's state machine, which also merges the hits of several tag
// rows into the way number (HitIndex).
//
// The formulas, the comparators and the muxes follow the design (for 4 ways
// TROWS = 1 and the formulas are exactly TagIndex and
// DataIndex = si + TagIndex*4 + HitIndex). Placing the tag region first
// (SI = NSETS*TROWS) follows the formula for TagIndex, which carries no base
// offset; interleaving the two tag rows of an 8-way set is this design's
// choice. Purely combinational.
module vc_index
  import vc_pkg::*;
#(
  parameter int unsigned NSETS   = 32,
  parameter int unsigned VC_WAYS = 4,
  localparam int unsigned TROWS = VC_WAYS / ROW_TAGS,
  parameter int unsigned SI     = NSETS * (VC_WAYS / ROW_TAGS),
  localparam int unsigned SET_W = $clog2(NSETS),
  localparam int unsigned LW    = $clog2(VC_WAYS),
  localparam int unsigned RSW   = (TROWS > 1) ? $clog2(TROWS) : 1,
  localparam int unsigned ROW_W = $clog2((ROW_TAGS + 1) * NSETS * TROWS)
) (
  input  addr_t            maddr,      // request address
  input  addr_t            vaddr,      // address of the evicted line
  input  logic             sel_vaddr,  // 1: index with vaddr
  input  line_t            tag_row,    // tag row read from the trace buffer
  input  logic [RSW-1:0]   row_sel,    // which tag row of the set
  input  logic [LW-1:0]    way,        // way for DataIndex
  input  logic             sel_data,   // 1: drive DataIndex, 0: the tag row
  output logic [SET_W-1:0] tag_index,
  output logic [ROW_W-1:0] data_index,
  output logic [ROW_W-1:0] index,
  output logic             hit,        // a valid entry of tag_row matches
  output logic [1:0]       hit_slot,   // its position in the row
  output logic [25:0]      addr_tag    // tag of the selected address
);

  addr_t      a;
  tag_entry_t e [ROW_TAGS];

  always_comb begin
    a         = sel_vaddr ? vaddr : maddr;
    tag_index = SET_W'((a >> OFF_W) & (NSETS - 1));
    addr_tag  = 26'(a >> (OFF_W + SET_W));
  end

  // comparators
  always_comb begin
    hit      = 1'b0;
    hit_slot = '0;
    for (int s = 0; s < ROW_TAGS; s++) begin
      e[s] = tag_entry_t'(tag_row[s*ENTRY_W +: ENTRY_W]);
      if (e[s].valid && e[s].tag == addr_tag && !hit) begin
        hit      = 1'b1;
        hit_slot = 2'(s);
      end
    end
  end

  // row muxes
  always_comb begin
    data_index = ROW_W'(SI + tag_index * VC_WAYS + way);
    index      = sel_data ? data_index
                          : ROW_W'(tag_index * TROWS) + ((TROWS > 1) ? ROW_W'(row_sel) : '0);
  end

  initial
    assert (SET_W >= 2 && (VC_WAYS == 4 || VC_WAYS == 8))
      else $error("vc_index: needs at least 4 sets and 4 or 8 ways");

endmodule
