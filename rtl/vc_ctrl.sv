// vc_ctrl: victim cache controller that runs the trace buffer as a
// 4-way (default) or 8-way set-associative victim cache next to the L1 data
// cache.
//
// State machine (Idle, Read Tag, Read Data, Update TB):
//  * Idle: a read/write request from the core (req, maddr, thread) starts a
//    read of the tag row of maddr's set.
//  * Read Tag: the four tags of the row are compared. An 8-way set has two
//    tag rows, read one after the other; the controller stays in Read Tag
//    for both and merges the hits. In the last Read Tag cycle vc_resp pulses
//    with vc_hit while the data cache reports dc_hit in the same cycle.
//      - dc_hit:             back to Idle, nothing else is done.
//      - !dc_hit &  vc_hit:  Read Data reads the hit line, returns it on
//                            vc_data (vc_data_valid) and takes the line the
//                            data cache evicts (ev_valid, eaddr, edata).
//      - !dc_hit & !vc_hit:  the evicted line is taken at once.
//  * Update TB: the hit line is invalidated and the evicted line is inserted.
//    The single-port trace buffer needs a cycle for the data row and one
//    per tag row.
// With 4 ways a victim-cache hit keeps the controller busy for 5 cycles
// (request cycle, Read Tag, Read Data, two Update TB cycles) and a miss for
// 4. With 8 ways the extra tag row adds a cycle to Read Tag and one to
// Update TB: 7 cycles for a hit, 6 for a miss.
//
// Replacement: the LRU ages (0 = newest) are changed only on insertion.
// A thread inserts only where allowed: nowhere when ins_allow[thread] is low
// (the other thread holds the cache in exclusive mode), in the ways it owns
// under the partitioning policy, anywhere otherwise. Inside the allowed
// ways it takes (1) an invalid way, (2) under partitioning a valid way that
// the other thread filled, (3) the oldest way. Lookups search all ways.
//
// This design's own choices: the evicted line must map to the same victim
// cache set as the request, which holds when the data cache has at least
// NSETS sets (an assertion checks it); after vc_en rises the controller
// clears the tag region, one row per cycle, before it accepts requests;
// the tag entry layout is the one in vc_pkg; an 8-way set keeps its two
// tag rows next to each other (vc_index).
// NSETS = T / 5 / 16 / (VC_WAYS / 4): the tag region is T/5 bytes, so with
// 8 ways a 5 KB trace buffer gives 32 sets of 8 ways.
module vc_ctrl
  import vc_pkg::*;
#(
  parameter int unsigned TB_BYTES = 2560,             // trace buffer size T
  parameter int unsigned NTHR     = 2,                // hardware threads
  parameter int unsigned VC_WAYS  = 4,                // 4 or 8
  localparam int unsigned TROWS = VC_WAYS / ROW_TAGS, // tag rows per set
  localparam int unsigned LW    = $clog2(VC_WAYS),
  localparam int unsigned RSW   = (TROWS > 1) ? $clog2(TROWS) : 1,
  localparam int unsigned DEPTH = TB_BYTES / LINE_B,
  localparam int unsigned NSETS = DEPTH / 5 / TROWS,  // T/5 bytes of tags / 16
  localparam int unsigned SET_W = $clog2(NSETS),
  localparam int unsigned ROW_W = $clog2(DEPTH),
  localparam int unsigned THR_W = (NTHR > 1) ? $clog2(NTHR) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             vc_en,          // from the DSU: 1 = victim cache
  // request from the core, side by side with the data cache lookup
  input  logic             req,
  input  addr_t            maddr,
  input  logic [THR_W-1:0] thread,
  output logic             ready,          // Idle and initialised
  // data cache controller
  input  logic             dc_hit,         // valid in Read Tag
  input  logic             ev_valid,       // the data cache evicts a line
  input  addr_t            eaddr,          // vaddr in the figures
  input  line_t            edata,          // vdata
  output logic             vc_resp,        // Read Tag: hit/miss is valid
  output logic             vc_hit,
  output line_t            vc_data,
  output logic             vc_data_valid,
  // insertion policy
  input  logic             part_en,        // 1: way ownership applies
  input  logic [NTHR-1:0]  ins_allow,
  input  logic [THR_W-1:0] way_owner [VC_WAYS],
  // trace buffer port, through the trace buffer controller
  output logic             tb_en,
  output logic             tb_we,
  output logic [ROW_W-1:0] tb_addr,
  output line_t            tb_wdata,
  input  line_t            tb_rdata,
  // statistics events
  output logic             hit_evt,
  output logic             ins_evt,
  output logic [THR_W-1:0] evt_thread
);

  typedef enum logic [2:0] {
    S_INIT, S_IDLE, S_RD_TAG, S_RD_DATA, S_UPD_DATA, S_UPD_TAG
  } state_e;

  state_e           state;
  addr_t            maddr_q, eaddr_q;
  line_t            edata_q;
  line_t            tag_q [TROWS];
  logic [THR_W-1:0] thr_q;
  logic             hit_q, ins_q, ev_valid_q;
  logic [LW-1:0]    hway_q, vway_q;
  logic [SET_W+RSW-1:0] init_row;
  logic [RSW-1:0]   row_q;        // tag row being read or written
  logic             racc_hit;     // hit found in an earlier tag row
  logic [LW-1:0]    racc_way;

  // index logic
  logic             sel_vaddr, sel_data;
  logic [RSW-1:0]   row_sel;
  logic [LW-1:0]    way;
  logic [SET_W-1:0] tag_index;
  logic [ROW_W-1:0] data_index, index;
  logic             cmp_hit;      // hit in the tag row now on tb_rdata
  logic [1:0]       cmp_slot;
  logic [25:0]      addr_tag;
  logic             last_row;
  logic             set_hit;      // merged over all tag rows (last row only)
  logic [LW-1:0]    set_way;

  tag_entry_t ent   [VC_WAYS];   // tag rows as they stand before insertion
  logic [VC_WAYS-1:0] allowed;
  logic            can_ins;
  logic [LW-1:0]   victim;
  logic            found;

  vc_index #(.NSETS(NSETS), .VC_WAYS(VC_WAYS)) u_index (
    .maddr     (state == S_IDLE ? maddr : maddr_q),
    .vaddr     (eaddr_q),
    .sel_vaddr (sel_vaddr),
    .tag_row   (tb_rdata),
    .row_sel   (row_sel),
    .way       (way),
    .sel_data  (sel_data),
    .tag_index (tag_index),
    .data_index(data_index),
    .index     (index),
    .hit       (cmp_hit),
    .hit_slot  (cmp_slot),
    .addr_tag  (addr_tag)
  );

  // HitIndex: merge the hit of this tag row with those of earlier rows
  always_comb begin
    last_row = (TROWS == 1) || row_q == RSW'(TROWS - 1);
    set_hit  = racc_hit || cmp_hit;
    set_way  = racc_hit ? racc_way : LW'({row_q, cmp_slot});
    if (TROWS == 1) set_way = LW'(cmp_slot);
  end

  // ---------------------------------------------------------------- victim way

  always_comb begin
    for (int w = 0; w < VC_WAYS; w++) begin
      ent[w] = tag_entry_t'(tag_q[w / ROW_TAGS][(w % ROW_TAGS)*ENTRY_W +: ENTRY_W]);
      if (hit_q && hway_q == LW'(w)) ent[w].valid = 1'b0;  // swapped out
      allowed[w] = ins_allow[thr_q] &&
                   (!part_en || way_owner[w] == thr_q);
    end
    can_ins = ev_valid_q && (allowed != '0);
    victim  = '0;
    found   = 1'b0;
    // (1) an invalid way of this thread
    for (int w = 0; w < VC_WAYS; w++)
      if (!found && allowed[w] && !ent[w].valid) begin
        victim = LW'(w); found = 1'b1;
      end
    // (2) a valid way another thread filled, now owned by this thread
    if (part_en)
      for (int w = 0; w < VC_WAYS; w++)
        if (!found && allowed[w] && MAX_THR_W'(thr_q) != ent[w].owner) begin
          victim = LW'(w); found = 1'b1;
        end
    // (3) the oldest allowed way
    if (!found)
      for (int w = 0; w < VC_WAYS; w++)
        if (allowed[w] && (!found || ent[w].lru > ent[victim].lru)) begin
          victim = LW'(w); found = 1'b1;
        end
  end

  // new tag rows: invalidate the hit way, insert the evicted line, age the
  // rest; tag row row_q of the set is written in each Update-tag cycle
  line_t new_tag_row;
  always_comb begin
    tag_entry_t n;
    new_tag_row = '0;
    for (int w = 0; w < VC_WAYS; w++) begin
      n = ent[w];
      if (ins_q) begin
        if (LW'(w) == vway_q) begin
          n.valid = 1'b1;
          n.owner = MAX_THR_W'(thr_q);
          n.lru   = 3'd0;
          n.tag   = 26'(eaddr_q >> (OFF_W + SET_W));
        end else if (ent[w].lru < ent[vway_q].lru) begin
          n.lru = ent[w].lru + 3'd1;
        end
      end
      if (TROWS == 1 || RSW'(w / ROW_TAGS) == row_q)
        new_tag_row[(w % ROW_TAGS)*ENTRY_W +: ENTRY_W] = n;
    end
  end

  // ---------------------------------------------------------------- FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_INIT;
      init_row   <= '0;
      maddr_q    <= '0;
      eaddr_q    <= '0;
      edata_q    <= '0;
      for (int r = 0; r < TROWS; r++) tag_q[r] <= '0;
      thr_q      <= '0;
      hit_q      <= 1'b0;
      hway_q     <= '0;
      vway_q     <= '0;
      ins_q      <= 1'b0;
      ev_valid_q <= 1'b0;
      row_q      <= '0;
      racc_hit   <= 1'b0;
      racc_way   <= '0;
    end else begin
      if (!vc_en) begin
        state    <= S_INIT;
        init_row <= '0;
      end else begin
        unique case (state)
          S_INIT: begin
            init_row <= init_row + 1'b1;
            if (init_row == (SET_W+RSW)'(NSETS * TROWS - 1)) state <= S_IDLE;
          end
          S_IDLE: if (req) begin
            maddr_q  <= maddr;
            thr_q    <= thread;
            row_q    <= '0;
            racc_hit <= 1'b0;
            state    <= S_RD_TAG;
          end
          S_RD_TAG: begin
            tag_q[(TROWS > 1) ? row_q : '0] <= tb_rdata;
            if (!last_row) begin                 // go on with the next row
              racc_hit <= set_hit;
              racc_way <= set_way;
              row_q    <= row_q + 1'b1;
            end else begin
              hit_q  <= set_hit && !dc_hit;
              hway_q <= set_way;
              row_q  <= '0;
              if (dc_hit) state <= S_IDLE;
              else begin
                eaddr_q    <= eaddr;
                edata_q    <= edata;
                ev_valid_q <= ev_valid;
                state      <= set_hit ? S_RD_DATA : S_UPD_DATA;
              end
            end
          end
          S_RD_DATA: begin
            eaddr_q    <= eaddr;
            edata_q    <= edata;
            ev_valid_q <= ev_valid;
            state      <= S_UPD_DATA;
          end
          S_UPD_DATA: begin
            ins_q  <= can_ins;
            vway_q <= victim;
            state  <= S_UPD_TAG;
          end
          S_UPD_TAG: begin
            if (last_row) begin
              ins_q <= 1'b0;
              hit_q <= 1'b0;
              row_q <= '0;
              state <= S_IDLE;
            end else begin
              row_q <= row_q + 1'b1;
            end
          end
          default: state <= S_INIT;
        endcase
      end
    end
  end

  // ---------------------------------------------------------------- outputs
  always_comb begin
    sel_vaddr     = 1'b0;
    sel_data      = 1'b0;
    row_sel       = row_q;
    way           = set_way;
    tb_en         = 1'b0;
    tb_we         = 1'b0;
    tb_wdata      = edata_q;
    ready         = vc_en && state == S_IDLE;
    vc_resp       = state == S_RD_TAG && last_row;
    vc_hit        = vc_resp && set_hit;
    vc_data       = tb_rdata;
    vc_data_valid = state == S_RD_DATA;
    hit_evt       = vc_resp && set_hit && !dc_hit;
    ins_evt       = state == S_UPD_TAG && last_row && ins_q;
    evt_thread    = thr_q;
    unique case (state)
      S_IDLE:   row_sel = '0;                      // first tag row of maddr
      S_RD_TAG: begin
        if (!last_row) row_sel = row_q + 1'b1;     // next tag row
        else           sel_data = 1'b1;            // hit line, if any
      end
      S_UPD_DATA: begin                            // evicted line -> data row
        sel_vaddr = 1'b1;
        sel_data  = 1'b1;
        way       = victim;
      end
      default: ;
    endcase
    tb_addr = index;
    unique case (state)
      S_INIT: begin
        tb_en   = 1'b1;
        tb_we   = 1'b1;
        tb_addr = ROW_W'(init_row);
        // initial LRU ages 0..VC_WAYS-1 across the tag rows of a set
        for (int s = 0; s < ROW_TAGS; s++)
          tb_wdata[s*ENTRY_W +: ENTRY_W] = tag_entry_t'{
            valid: 1'b0, owner: '0, tag: '0,
            lru: 3'((TROWS > 1 ? (32'(init_row) % TROWS) * ROW_TAGS : 0) + s)};
      end
      S_IDLE:     tb_en = req;
      S_RD_TAG:   tb_en = !last_row || (set_hit && !dc_hit);
      S_UPD_DATA: begin
        tb_en = can_ins;
        tb_we = 1'b1;
      end
      S_UPD_TAG: begin                             // updated tag rows
        tb_en    = ins_q || hit_q;
        tb_we    = 1'b1;
        tb_wdata = new_tag_row;
      end
      default: ;
    endcase
  end

  // The evicted line must share the request's set (see the header).
  a_same_set: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_UPD_DATA && can_ins) |->
      ((eaddr_q >> OFF_W) & (NSETS - 1)) == ((maddr_q >> OFF_W) & (NSETS - 1)));

  initial begin
    assert (NSETS * TROWS * 5 == DEPTH && (1 << SET_W) == NSETS && NSETS >= 4)
      else $error("vc_ctrl: trace buffer must hold 5 * TROWS * 2^k rows");
    assert (VC_WAYS == 4 || VC_WAYS == 8)
      else $error("vc_ctrl: 4 or 8 ways");
  end

endmodule
