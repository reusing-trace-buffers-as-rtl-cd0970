// vc_ctrl_check: drives one victim cache controller with its trace buffer
// and checks it against a reference model of the victim cache (sets of
// VW ways with valid bit, inserting thread, LRU age, tag and data).
//
// Random requests from NT threads over a small pool of lines give many
// victim cache hits; the data cache's answer (hit, evicted line) is chosen
// at random but kept consistent with the model (no line in both caches).
// Checked per request: vc_resp and vc_hit in the last Read Tag cycle, the
// line returned on a hit, and the busy time, which with TROWS = VW/4 tag
// rows per set is 1+TROWS cycles for a data cache hit, 2+2*TROWS for a miss
// in both and 3+2*TROWS for a victim cache hit (2/4/5 for 4 ways). The
// policy phases cover the shared cache, exclusive insertion for one thread,
// random way partitions with lines of other threads left in them, and a
// vc_en toggle that must empty the cache. done rises with the final counts.
module vc_ctrl_check
  import vc_pkg::*;
#(
  parameter int VW  = 4,        // ways
  parameter int TBB = 2560,     // trace buffer bytes
  parameter int NT  = 2         // threads
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int TROWS = VW / 4;
  localparam int NSETS = 32;    // TBB / 5 / 16 / TROWS for the two sizes used
  localparam int DEPTH = TBB / 16;
  localparam int AW    = $clog2(DEPTH);
  localparam int THR_W = (NT > 1) ? $clog2(NT) : 1;
  localparam int NTAG  = 4 * VW;

  logic rst_n = 0, vc_en = 0;
  logic req = 0; addr_t maddr = 0; logic [THR_W-1:0] thread = 0;
  logic ready, dc_hit = 0, ev_valid = 0; addr_t eaddr = 0; line_t edata = 0;
  logic vc_resp, vc_hit, vc_data_valid; line_t vc_data;
  logic part_en = 0; logic [NT-1:0] ins_allow = '1; logic [THR_W-1:0] way_owner [VW];
  logic tb_en, tb_we; logic [AW-1:0] tb_addr; line_t tb_wdata, tb_rdata;
  logic hit_evt, ins_evt; logic [THR_W-1:0] evt_thread;

  vc_ctrl #(.TB_BYTES(TBB), .NTHR(NT), .VC_WAYS(VW)) dut (.*);
  trace_buffer #(.DEPTH(DEPTH), .WIDTH(128)) mem (
    .clk, .en(tb_en), .we(tb_we), .addr(tb_addr), .wdata(tb_wdata), .rdata(tb_rdata));

  typedef struct { logic v; int owner; int lru; int tag; line_t data; } ent_t;
  ent_t m [NSETS][VW];
  int n_vchit = 0, n_dchit = 0, n_miss = 0, n_rule [3] = '{0, 0, 0}, n_noins = 0;
  int n_hit_evt = 0, n_ins_evt = 0, exp_ins = 0;

  always @(posedge clk) begin
    if (rst_n && hit_evt) n_hit_evt++;
    if (rst_n && ins_evt) n_ins_evt++;
  end

  task automatic chk(input string what, input longint got, input longint want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("%0t %0d-way %s: got %0d want %0d", $time, VW, what, got, want);
    end
  endtask

  task automatic model_reset();
    for (int s = 0; s < NSETS; s++)
      for (int w = 0; w < VW; w++) m[s][w] = '{v: 0, owner: 0, lru: w, tag: 0, data: '0};
  endtask

  function automatic int find(int s, int tag);
    for (int w = 0; w < VW; w++) if (m[s][w].v && m[s][w].tag == tag) return w;
    return -1;
  endfunction

  // reference insertion (design's three-step choice, LRU aged on insertion)
  task automatic model_insert(int s, int thr, int tag, line_t d);
    bit allowed [VW];
    int vw = -1, rule = -1;
    for (int w = 0; w < VW; w++)
      allowed[w] = ins_allow[thr] && (!part_en || int'(way_owner[w]) == thr);
    for (int w = 0; w < VW && vw < 0; w++)
      if (allowed[w] && !m[s][w].v) begin vw = w; rule = 0; end
    if (part_en)
      for (int w = 0; w < VW && vw < 0; w++)
        if (allowed[w] && m[s][w].owner != thr) begin vw = w; rule = 1; end
    for (int w = 0; w < VW; w++)
      if (allowed[w] && rule != 0 && rule != 1 && (vw < 0 || m[s][w].lru > m[s][vw].lru)) begin
        vw = w; rule = -2;
      end
    if (vw < 0) begin n_noins++; return; end
    n_rule[rule == -2 ? 2 : rule]++;
    exp_ins++;
    for (int w = 0; w < VW; w++)
      if (w != vw && m[s][w].lru < m[s][vw].lru) m[s][w].lru++;
    m[s][vw] = '{v: 1, owner: thr, lru: 0, tag: tag, data: d};
  endtask

  task automatic access(int thr, int set, int tag);
    int hw, etag, cyc, want_cyc;
    bit dch, evv;
    line_t ed;
    hw  = find(set, tag);
    dch = (hw < 0) && ($urandom_range(3) == 0);
    etag = int'($urandom_range(NTAG - 1));
    evv = !dch && (etag != tag) && (find(set, etag) < 0) && ($urandom_range(7) != 0);
    ed  = {$urandom, $urandom, $urandom, $urandom};
    @(negedge clk);
    while (!ready) @(negedge clk);
    req = 1; maddr = addr_t'({tag, 5'(set), 4'h0}); thread = THR_W'(thr);
    dc_hit = dch; ev_valid = evv; eaddr = addr_t'({etag, 5'(set), 4'h0}); edata = ed;
    @(negedge clk);
    req = 0; cyc = 1;
    repeat (TROWS - 1) begin                 // earlier tag rows: no answer yet
      chk("vc_resp early", vc_resp, 0);
      @(negedge clk); cyc++;
    end
    chk("vc_resp", vc_resp, 1);
    chk("vc_hit", vc_hit, hw >= 0);
    while (!ready) begin
      if (vc_data_valid) begin
        chk("vc_data_valid on hit", hw >= 0 && !dch, 1);
        if (hw >= 0) chk("vc_data", vc_data == m[set][hw].data, 1);
      end
      @(negedge clk); cyc++;
    end
    want_cyc = dch ? 1 + TROWS : (hw >= 0 ? 3 + 2 * TROWS : 2 + 2 * TROWS);
    chk("busy cycles", cyc, want_cyc);
    // update the model
    if (dch) n_dchit++;
    else begin
      if (hw >= 0) begin n_vchit++; m[set][hw].v = 0; end
      else n_miss++;
      if (evv) model_insert(set, thr, etag, ed);
    end
  endtask

  task automatic phase(int n);
    for (int k = 0; k < n; k++)
      access(int'($urandom_range(NT - 1)), int'($urandom_range(3)), int'($urandom_range(NTAG - 1)));
  endtask

  task automatic random_owners();
    for (int w = 0; w < VW; w++) way_owner[w] = THR_W'($urandom_range(NT - 1));
  endtask

  initial begin
    done = 0; checks = 0; failures = 0;
    for (int w = 0; w < VW; w++) way_owner[w] = 0;
    model_reset();
    repeat (3) @(negedge clk);
    rst_n = 1; vc_en = 1;
    // shared
    phase(1500);
    // exclusive to one thread: the others only read
    ins_allow = '0; ins_allow[NT - 1] = 1'b1; phase(600);
    ins_allow = '1;
    // even split, then random partitions: lines of other threads remain
    part_en = 1;
    for (int w = 0; w < VW; w++) way_owner[w] = THR_W'(w * NT / VW);
    phase(800);
    repeat (4) begin random_owners(); phase(400); end
    part_en = 0;
    // leaving and re-entering victim cache mode empties the cache
    @(negedge clk); vc_en = 0;
    repeat (3) @(negedge clk); vc_en = 1;
    model_reset();
    phase(600);
    @(negedge clk);
    chk("hit events", n_hit_evt, n_vchit);
    chk("insert events", n_ins_evt, exp_ins);
    $display("%0d-way: vc hits %0d, dc hits %0d, misses %0d, inserts invalid/other/lru %0d/%0d/%0d, refused %0d",
             VW, n_vchit, n_dchit, n_miss, n_rule[0], n_rule[1], n_rule[2], n_noins);
    chk("mechanisms seen", (n_vchit > 0) && (n_dchit > 0) && (n_rule[0] > 0) &&
        (n_rule[1] > 0) && (n_rule[2] > 0) && (n_noins > 0), 1);
    done = 1;
  end
endmodule
