// vc_top: a processor's debug trace buffer reused as a victim cache, with
// the debug support unit (DSU) logic that shares it between threads.
//
// Blocks and connections:
//  * trace_buffer (u_tb): the 128-bit single-port trace buffer memory.
//  * tb_ctlr (u_tbc): records pipeline trace data with timestamps while
//    vc_en = 0 and hands the memory port to the victim cache while vc_en = 1.
//  * vc_ctrl (u_vc): the victim cache controller, beside the L1 data cache.
//    Its request, hit and line-swap ports are brought out to the data cache
//    controller, which is not part of this RTL.
//  * perf_counters: per-thread statistics of each block: victim cache hits
//    and insertions (u_vcstat) and the data cache's load misses, store
//    misses, misses and hits (u_dcstat, fed by dc_evt pulses).
//  * block_timer: cuts execution into blocks of BLOCK_INSNS instructions.
//  * DSU partitioning: mode_ctrl (multi-mode shared/exclusive, two threads
//    only) and lr_partition_ctrl (logistic-regression way partitioning with
//    its weights in the DSU trace buffer). policy picks which of them, if
//    any, steers the victim cache's insertions.
// A block's statistics are sampled at block_end and both DSU controllers
// start on them one cycle later.
//
// Defaults: 2.5 KB trace buffer (32 sets of 4 ways), two threads, blocks of
// one million instructions, window of 10 blocks, F = 0.7 — the main
// evaluated configuration.
// VC_WAYS = 8 with TB_BYTES = 5120 and NTHR = 4 gives the 8-way, four-thread
// configuration (32 sets of 8 ways; multi-mode is then not built).
module vc_top
  import vc_pkg::*;
#(
  parameter int unsigned TB_BYTES    = 2560,
  parameter int unsigned NTHR        = 2,
  parameter int unsigned VC_WAYS     = 4,
  parameter int unsigned BLOCK_INSNS = 1000000,
  parameter int unsigned WSIZE       = 10,
  parameter int unsigned F_PCT       = 70,
  parameter int unsigned DSU_ROWS    = 64,
  localparam int unsigned DEPTH = TB_BYTES / LINE_B,
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned THR_W = (NTHR > 1) ? $clog2(NTHR) : 1,
  localparam int unsigned CW    = $clog2(VC_WAYS + 1),
  localparam int unsigned RW    = $clog2(DSU_ROWS)
) (
  input  logic             clk,
  input  logic             rst_n,
  // DSU configuration
  input  logic             vc_en,
  input  policy_e          policy,
  input  logic             wt_we,          // logistic-regression weights
  input  logic [RW-1:0]    wt_addr,
  input  line_t            wt_data,
  // validation-phase tracing
  input  logic             trace_en,
  input  logic             trace_valid,
  input  logic [LINE_W-33:0] trace_data,
  input  logic [31:0]      timestamp,
  input  logic             dsu_rd,
  input  logic [AW-1:0]    dsu_addr,
  output logic             dsu_gnt,
  output line_t            dsu_rdata,
  output logic [AW-1:0]    taddr,
  output logic             trace_wrapped,
  // core memory request (looked up in the data cache at the same time)
  input  logic             req,
  input  addr_t            maddr,
  input  logic [THR_W-1:0] thread,
  output logic             vc_ready,
  // data cache controller
  input  logic             dc_hit,
  input  logic             ev_valid,
  input  addr_t            eaddr,
  input  line_t            edata,
  output logic             vc_resp,
  output logic             vc_hit,
  output line_t            vc_data,
  output logic             vc_data_valid,
  input  logic [3:0]       dc_evt,         // load miss, store miss, miss, hit
  input  logic [THR_W-1:0] dc_evt_thr,
  // instruction retirement, per thread
  input  logic [NTHR-1:0]  insn_ret,
  // partitioning state, for monitoring
  output logic             block_end,
  output vc_mode_e         mode,
  output logic [CW-1:0]    curr_w    [NTHR],
  output logic [THR_W-1:0] way_owner [VC_WAYS],
  output logic             part_done
);

  // ------------------------------------------------------------ trace buffer
  logic          m_en, m_we;
  logic [AW-1:0] m_addr;
  line_t         m_wdata, m_rdata;
  logic          v_en, v_we;
  logic [AW-1:0] v_addr;
  line_t         v_wdata;

  trace_buffer #(.DEPTH(DEPTH), .WIDTH(LINE_W)) u_tb (
    .clk, .en(m_en), .we(m_we), .addr(m_addr), .wdata(m_wdata), .rdata(m_rdata)
  );

  tb_ctlr #(.DEPTH(DEPTH), .TS_W(32)) u_tbc (
    .clk, .rst_n, .vc_en,
    .trace_en, .trace_valid, .trace_data, .timestamp,
    .dsu_rd, .dsu_addr, .dsu_gnt, .taddr, .wrapped(trace_wrapped),
    .vc_mem_en(v_en), .vc_mem_we(v_we), .vc_mem_addr(v_addr),
    .vc_mem_wdata(v_wdata),
    .mem_en(m_en), .mem_we(m_we), .mem_addr(m_addr), .mem_wdata(m_wdata)
  );
  assign dsu_rdata = m_rdata;

  // ------------------------------------------------------------ victim cache
  logic             part_en;
  logic [NTHR-1:0]  ins_allow;
  logic             hit_evt, ins_evt;
  logic [THR_W-1:0] evt_thr;

  vc_ctrl #(.TB_BYTES(TB_BYTES), .NTHR(NTHR), .VC_WAYS(VC_WAYS)) u_vc (
    .clk, .rst_n, .vc_en,
    .req, .maddr, .thread, .ready(vc_ready),
    .dc_hit, .ev_valid, .eaddr, .edata,
    .vc_resp, .vc_hit, .vc_data, .vc_data_valid,
    .part_en, .ins_allow, .way_owner,
    .tb_en(v_en), .tb_we(v_we), .tb_addr(v_addr), .tb_wdata(v_wdata),
    .tb_rdata(m_rdata),
    .hit_evt, .ins_evt, .evt_thread(evt_thr)
  );

  // ------------------------------------------------------------ statistics
  logic [31:0] vc_snap [NTHR][2];
  logic [31:0] dc_snap [NTHR][4];
  logic        dsu_start;

  block_timer #(.NTHR(NTHR), .BLOCK_INSNS(BLOCK_INSNS)) u_blk (
    .clk, .rst_n, .insn_ret, .block_end
  );

  perf_counters #(.NTHR(NTHR), .NEV(2)) u_vcstat (
    .clk, .rst_n, .ev({ins_evt, hit_evt}), .ev_thr(evt_thr),
    .block_end, .snap(vc_snap)
  );

  perf_counters #(.NTHR(NTHR), .NEV(4)) u_dcstat (
    .clk, .rst_n, .ev(dc_evt), .ev_thr(dc_evt_thr),
    .block_end, .snap(dc_snap)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) dsu_start <= 1'b0;
    else        dsu_start <= block_end && vc_en;

  // ------------------------------------------------------------ DSU: logistic regression
  logic [31:0]      feats [NTHR][6];
  logic [THR_W-1:0] lr_owner [VC_WAYS];
  logic [CW-1:0]    lr_req   [NTHR];
  logic             lr_busy;

  always_comb
    for (int t = 0; t < NTHR; t++) begin
      feats[t][0] = vc_snap[t][0];   // vh: victim cache hits
      feats[t][1] = dc_snap[t][0];   // lm: load misses
      feats[t][2] = dc_snap[t][1];   // sm: store misses
      feats[t][3] = dc_snap[t][2];   // cm: cache misses
      feats[t][4] = dc_snap[t][3];   // ch: cache hits
      feats[t][5] = vc_snap[t][1];   // insert: victim cache insertions
    end

  lr_partition_ctrl #(.NTHR(NTHR), .NWAYS(VC_WAYS), .DSU_ROWS(DSU_ROWS)) u_lr (
    .clk, .rst_n, .start(dsu_start), .stats(feats),
    .wt_we, .wt_addr, .wt_data,
    .busy(lr_busy), .done(part_done), .curr_w, .way_owner(lr_owner),
    .last_req(lr_req)
  );

  // ------------------------------------------------------------ DSU: multi-mode
  logic [NTHR-1:0] mm_allow;

  if (NTHR == 2) begin : g_mm
    logic [1:0]  allow2;
    logic        mm_done;
    logic [15:0] th, util [2];
    logic [31:0] vh2 [2], vi2 [2];
    always_comb
      for (int t = 0; t < 2; t++) begin
        vh2[t] = vc_snap[t][0];
        vi2[t] = vc_snap[t][1];
      end
    mode_ctrl #(.WSIZE(WSIZE), .F_PCT(F_PCT)) u_mm (
      .clk, .rst_n, .start(dsu_start), .vhits(vh2), .vins(vi2),
      .mode, .ins_allow(allow2), .done(mm_done), .th, .util
    );
    assign mm_allow = allow2;
  end else begin : g_no_mm
    assign mode     = MODE_SHARED;
    assign mm_allow = '1;
  end

  // ------------------------------------------------------------ policy select
  always_comb begin
    part_en   = 1'b0;
    ins_allow = '1;
    way_owner = lr_owner;
    unique case (policy)
      POL_MULTIMODE: ins_allow = mm_allow;
      POL_PARTITION: part_en   = 1'b1;
      default: ;
    endcase
  end

endmodule
