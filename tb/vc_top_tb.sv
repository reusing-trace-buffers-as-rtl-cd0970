// vc_top_tb: end-to-end test of the trace buffer reused as a victim cache.
//
// A behavioural two-thread core with an L1 data cache (vc_core_model) runs
// against the whole design. Blocks are shortened to 2000 instructions (both
// threads retire one instruction per cycle) so that many windows pass;
// every other parameter is the default. The run goes through:
//  1. validation mode: trace records with timestamps fill the trace buffer
//     circularly and are read back through the DSU port;
//  2. victim cache mode, shared policy: thread 0 reuses a set of
//     conflicting lines, thread 1 streams and pollutes;
//  3. multi-mode policy: exclusive mode for the reusing thread, and after
//     the threads swap behaviour, back to shared and over to the other;
//  4. logistic-regression partitioning with weights loaded into the DSU
//     trace buffer: the ways move one at a time towards the reusing thread;
//  5. leaving and re-entering victim cache mode;
//  6. a second instance with four threads and an 8-way victim cache in a
//     5 KB trace buffer (blocks of 40000 instructions, as one partitioning
//     pass over six thread pairs and nine classes takes about 7500 cycles):
//     thread 0 reuses, the other three stream, and partitioning moves ways
//     to thread 0, where its lines then hit.
// Every line the core receives is checked against memory. Each mechanism
// (trace wrap, DSU readout, data cache hit, victim cache hit, miss, block
// end, exclusive mode for either thread, return to shared mode, partition
// move in both directions, cache clear on re-entry) is counted and must occur.
module vc_top_tb;
  import vc_pkg::*;
  localparam int BLK = 2000;
  // a four-thread partitioning pass takes about 7500 cycles: longer blocks
  localparam int BLK8 = 40000;

  logic clk = 0, rst_n = 0, vc_en = 0;
  policy_e policy = POL_SHARED;
  logic wt_we = 0; logic [5:0] wt_addr = 0; line_t wt_data = 0;
  logic trace_en = 0, trace_valid = 0; logic [95:0] trace_data = 0; logic [31:0] timestamp = 0;
  logic dsu_rd = 0; logic [7:0] dsu_addr = 0; logic dsu_gnt; line_t dsu_rdata;
  logic [7:0] taddr; logic trace_wrapped;
  logic req; addr_t maddr; logic [0:0] thread; logic vc_ready;
  logic dc_hit, ev_valid; addr_t eaddr; line_t edata;
  logic vc_resp, vc_hit, vc_data_valid; line_t vc_data;
  logic [3:0] dc_evt; logic [0:0] dc_evt_thr;
  logic [1:0] insn_ret = 0;
  logic block_end, part_done; vc_mode_e mode;
  logic [2:0] curr_w [2]; logic [0:0] way_owner [4];

  vc_top #(.BLOCK_INSNS(BLK)) dut (.*);
  vc_core_model core (.*);

  // four threads, 8-way victim cache in a 5 KB trace buffer
  logic vc_en8 = 0; policy_e policy8 = POL_SHARED;
  logic wt_we8 = 0; logic [5:0] wt_addr8 = 0; line_t wt_data8 = 0;
  logic req8; addr_t maddr8; logic [1:0] thread8; logic vc_ready8;
  logic dc_hit8, ev_valid8; addr_t eaddr8; line_t edata8;
  logic vc_resp8, vc_hit8, vc_data_valid8; line_t vc_data8;
  logic [3:0] dc_evt8; logic [1:0] dc_evt_thr8;
  logic [3:0] insn_ret8 = 0;
  logic block_end8, part_done8; vc_mode_e mode8;
  logic [3:0] curr_w8 [4]; logic [1:0] way_owner8 [8];
  logic dsu_gnt8, trace_wrapped8; line_t dsu_rdata8; logic [8:0] taddr8;

  vc_top #(.TB_BYTES(5120), .NTHR(4), .VC_WAYS(8), .BLOCK_INSNS(BLK8)) dut8 (
    .clk, .rst_n, .vc_en(vc_en8), .policy(policy8),
    .wt_we(wt_we8), .wt_addr(wt_addr8), .wt_data(wt_data8),
    .trace_en(1'b0), .trace_valid(1'b0), .trace_data('0), .timestamp('0),
    .dsu_rd(1'b0), .dsu_addr('0), .dsu_gnt(dsu_gnt8), .dsu_rdata(dsu_rdata8),
    .taddr(taddr8), .trace_wrapped(trace_wrapped8),
    .req(req8), .maddr(maddr8), .thread(thread8), .vc_ready(vc_ready8),
    .dc_hit(dc_hit8), .ev_valid(ev_valid8), .eaddr(eaddr8), .edata(edata8),
    .vc_resp(vc_resp8), .vc_hit(vc_hit8), .vc_data(vc_data8),
    .vc_data_valid(vc_data_valid8), .dc_evt(dc_evt8), .dc_evt_thr(dc_evt_thr8),
    .insn_ret(insn_ret8), .block_end(block_end8), .mode(mode8),
    .curr_w(curr_w8), .way_owner(way_owner8), .part_done(part_done8)
  );
  vc_core_model #(.NT(4)) core8 (
    .clk, .req(req8), .maddr(maddr8), .thread(thread8), .vc_ready(vc_ready8),
    .dc_hit(dc_hit8), .ev_valid(ev_valid8), .eaddr(eaddr8), .edata(edata8),
    .vc_resp(vc_resp8), .vc_hit(vc_hit8), .vc_data(vc_data8),
    .vc_data_valid(vc_data_valid8), .dc_evt(dc_evt8), .dc_evt_thr(dc_evt_thr8)
  );
  int n_blocks8 = 0;
  always @(posedge clk) if (rst_n && block_end8) n_blocks8++;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_blocks = 0, n_ex0 = 0, n_ex1 = 0, n_shared = 0, n_inc = 0, n_dec = 0;
  int n_dsu = 0, n_clear_miss = 0;
  vc_mode_e mode_q = MODE_SHARED;
  logic [2:0] cw0_q = 3'd2;

  // insertions while the multi-mode policy holds an exclusive mode
  int n_bad_ins = 0, n_excl_ins = 0;
  always @(posedge clk)
    if (policy == POL_MULTIMODE && mode != MODE_SHARED && dut.ins_evt) begin
      if (int'(dut.evt_thr) == (mode == MODE_EXCL0 ? 0 : 1)) n_excl_ins++;
      else n_bad_ins++;
    end

  always @(posedge clk) begin
    if (rst_n && block_end) n_blocks++;
    mode_q <= rst_n ? mode : MODE_SHARED;
    if (rst_n && mode != mode_q) begin
      if (mode == MODE_EXCL0) n_ex0++;
      else if (mode == MODE_EXCL1) n_ex1++;
      else n_shared++;
    end
    cw0_q <= rst_n ? curr_w[0] : 3'd2;
    if (rst_n && curr_w[0] > cw0_q) n_inc++;
    if (rst_n && curr_w[0] < cw0_q) n_dec++;
  end

  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("%0t FAIL %s", $time, what); end
  endtask

  // access patterns: a reusing thread cycles 32 lines over victim cache sets
  // 0..7 (4 conflicting lines per set); a streaming thread never returns
  int rix [2] = '{0, 0}, six [2] = '{0, 0};
  function automatic addr_t reuse_addr(int thr);
    int i;
    i = rix[thr]++;
    return addr_t'(32'h1000_0000 + thr * 32'h0100_0000 + ((i / 8) % 4) * 512 + (i % 8) * 16);
  endfunction
  function automatic addr_t stream_addr(int thr);
    int j;
    j = six[thr]++;
    return addr_t'(32'h4000_0000 + thr * 32'h0100_0000 + (j / 8) * 512 + (j % 8) * 16);
  endfunction

  // run until n more blocks have ended; reuser = thread that reuses (-1: none)
  task automatic run_blocks(int n, int reuser);
    int target;
    target = n_blocks + n;
    while (n_blocks < target) begin
      for (int t = 0; t < 2; t++)
        if (t == reuser)
          // the reusing thread issues bursts, and touches a line twice now
          // and then (a data cache hit)
          for (int k = 0; k < 4; k++) begin
            addr_t a;
            a = reuse_addr(t);
            core.access(t, a, $urandom_range(9) == 0);
            if ($urandom_range(3) == 0) core.access(t, a + 4, 0);
          end
        else core.access(t, stream_addr(t), $urandom_range(9) == 0);
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + core.checks + core8.checks,
             failures + core.failures + core8.failures);
    $finish;
  end

  // four-thread run: thread 0 reuses, threads 1..3 stream
  int rix8 = 0, six8 [4] = '{0, 0, 0, 0};
  task automatic run_blocks8(int n);
    int target;
    target = n_blocks8 + n;
    while (n_blocks8 < target) begin
      for (int k = 0; k < 4; k++) begin
        int i;
        i = rix8++;
        core8.access(0, addr_t'(32'h1000_0000 + ((i / 8) % 4) * 512 + (i % 8) * 16), 0);
      end
      for (int t = 1; t < 4; t++) begin
        int j;
        j = six8[t]++;
        core8.access(t, addr_t'(32'h4000_0000 + t * 32'h0100_0000 + (j / 8) * 512 + (j % 8) * 16),
                     $urandom_range(9) == 0);
      end
    end
  endtask

  initial begin
    line_t tmodel [160];
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---------------------------------------------------------------- 1. tracing
    trace_en = 1;
    for (int k = 0; k < 200; k++) begin
      trace_valid = 1; trace_data = {$urandom, $urandom, $urandom}; timestamp = 32'(1000 + k);
      tmodel[k % 160] = {timestamp, trace_data};
      @(negedge clk);
    end
    trace_valid = 0;
    chk("trace wrapped", trace_wrapped && taddr == 8'd40);
    for (int r = 0; r < 160; r += 7) begin
      dsu_rd = 1; dsu_addr = 8'(r);
      @(negedge clk);
      chk("dsu grant", dsu_gnt);
      dsu_rd = 0;
      @(negedge clk);
      chk("trace readout", dsu_rdata == tmodel[r]);
      n_dsu++;
    end
    // ---------------------------------------------------------------- weights
    // class t (ways of thread 0): logit = 0.25 * (t - 2) * (vh - 1)
    for (int t = 0; t <= 4; t++) begin
      line_t row;
      row = '0;
      row[15:0]  = 16'(-64 * (t - 2));
      row[31:16] = 16'(64 * (t - 2));
      wt_we = 1; wt_addr = 6'(t); wt_data = row;
      @(negedge clk);
    end
    wt_we = 0;
    // ---------------------------------------------------------------- 2. shared
    vc_en = 1; trace_en = 0;
    insn_ret = 2'b11;
    policy = POL_SHARED;
    run_blocks(12, 0);
    chk("victim cache hits in shared mode", core.n_vchit_thr[0] > 0);
    // ---------------------------------------------------------------- 3. multi-mode
    policy = POL_MULTIMODE;
    for (int k = 0; k < 20 && n_ex0 == 0; k++) run_blocks(1, 0);
    chk("exclusive for thread 0", mode == MODE_EXCL0);
    run_blocks(5, 0);
    run_blocks(5, 1);    // thread 1 starts reusing, but may not insert yet
    chk("excluded thread never inserted", n_bad_ins == 0 && n_excl_ins > 0);
    for (int k = 0; k < 40 && n_ex1 == 0; k++) run_blocks(1, 1);
    chk("exclusive for thread 1", mode == MODE_EXCL1);
    // ---------------------------------------------------------------- 4. partitioning
    policy = POL_PARTITION;
    for (int k = 0; k < 30 && curr_w[0] != 0; k++) run_blocks(1, 1);
    chk("all ways to thread 1", curr_w[0] == 0 && curr_w[1] == 4);
    for (int k = 0; k < 30 && curr_w[0] != 4; k++) run_blocks(1, 0);
    chk("all ways to thread 0", curr_w[0] == 4 && curr_w[1] == 0);
    chk("way owners", way_owner[0] == 0 && way_owner[3] == 0);
    // ---------------------------------------------------------------- 5. re-entry
    policy = POL_SHARED;
    run_blocks(2, 0);
    @(negedge clk);
    vc_en = 0;
    repeat (4) @(negedge clk);
    vc_en = 1;
    begin
      int h;
      h = core.n_vchit;
      // first pass over thread 0's lines after re-entry cannot hit
      for (int k = 0; k < 24; k++) core.access(0, reuse_addr(0), 0);
      chk("cache cleared on re-entry", core.n_vchit == h);
      if (core.n_vchit == h) n_clear_miss++;
    end
    run_blocks(2, 0);
    // ---------------------------------------------------------------- 6. 4 threads, 8 ways
    // class t (ways of the first thread of a pair): logit = 0.25*(t-4)*(vh-1)
    for (int t = 0; t <= 8; t++) begin
      line_t row;
      row = '0;
      row[15:0]  = 16'(-64 * (t - 4));
      row[31:16] = 16'(64 * (t - 4));
      wt_we8 = 1; wt_addr8 = 6'(t); wt_data8 = row;
      @(negedge clk);
    end
    wt_we8 = 0;
    vc_en8 = 1; insn_ret8 = 4'hf;
    policy8 = POL_SHARED;
    run_blocks8(2);
    chk("8-way: victim cache hits in shared mode", core8.n_vchit_thr[0] > 0);
    chk("8-way: equal split at start", curr_w8[0] == 2 && curr_w8[3] == 2);
    policy8 = POL_PARTITION;
    for (int k = 0; k < 12 && curr_w8[0] < 4; k++) run_blocks8(1);
    chk("8-way: ways moved to the reusing thread", curr_w8[0] >= 4 &&
        way_owner8[0] == 0 && way_owner8[3] == 0);
    begin
      int h;
      h = core8.n_vchit_thr[0];
      run_blocks8(2);
      chk("8-way: reusing thread hits in its partition", core8.n_vchit_thr[0] > h);
      $display("8-way, 4 threads: blocks %0d, vc hits %0d (t0 %0d), ways %0d/%0d/%0d/%0d",
               n_blocks8, core8.n_vchit, core8.n_vchit_thr[0],
               curr_w8[0], curr_w8[1], curr_w8[2], curr_w8[3]);
    end
    // ---------------------------------------------------------------- report
    $display("blocks %0d, dc hits %0d, vc hits %0d (t0 %0d, t1 %0d), misses %0d, evictions %0d",
             n_blocks, core.n_dchit, core.n_vchit, core.n_vchit_thr[0], core.n_vchit_thr[1],
             core.n_miss, core.n_evict);
    $display("exclusive0 %0d, exclusive1 %0d, back to shared %0d, ways +%0d -%0d, dsu reads %0d",
             n_ex0, n_ex1, n_shared, n_inc, n_dec, n_dsu);
    chk("mechanisms", n_blocks > 0 && core.n_dchit > 0 && core.n_vchit > 0 && core.n_miss > 0 &&
        core.n_evict > 0 && n_ex0 > 0 && n_ex1 > 0 && n_shared > 0 && n_inc > 0 &&
        n_dec > 0 && n_dsu > 0 && n_clear_miss > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks + core.checks + core8.checks,
             failures + core.failures + core8.failures);
    $finish;
  end
endmodule
