// vc_top_full_tb: the whole design at its default size (2.5 KB trace buffer,
// two threads, blocks of one million instructions, windows of 10 blocks,
// F = 0.7) through one complete operation: a full circular pass of trace
// recording with readout, then victim cache operation for 11 blocks
// (11 million instructions, both threads retiring one per cycle) with the
// multi-mode policy. Thread 0 reuses conflicting lines, thread 1 streams.
// Checked: every line the core receives, the trace readout, the block
// boundaries (one every 500,000 cycles), the partitioning unit finishing
// after each block, and the switch to exclusive mode for thread 0 at the
// end of the first window.
module vc_top_full_tb;
  import vc_pkg::*;

  logic clk = 0, rst_n = 0, vc_en = 0;
  policy_e policy = POL_MULTIMODE;
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

  vc_top dut (.*);
  vc_core_model core (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_blocks = 0, n_part = 0;
  longint cyc = 0, last_end = -1;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && part_done) n_part++;
    if (rst_n && block_end) begin
      n_blocks++;
      if (last_end >= 0) begin
        checks++;
        if (cyc - last_end != 500000) begin
          failures++;
          $display("block length %0d cycles", cyc - last_end);
        end
      end
      last_end = cyc;
    end
  end

  int rix = 0, six = 0;

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + core.checks, failures + core.failures);
    $finish;
  end

  initial begin
    line_t tmodel [160];
    repeat (3) @(negedge clk);
    rst_n = 1;
    trace_en = 1;
    for (int k = 0; k < 160; k++) begin
      trace_valid = 1; trace_data = {$urandom, $urandom, $urandom}; timestamp = 32'(k);
      tmodel[k] = {timestamp, trace_data};
      @(negedge clk);
    end
    trace_valid = 0;
    checks++;
    if (!trace_wrapped || taddr != 0) failures++;
    for (int r = 0; r < 160; r++) begin
      dsu_rd = 1; dsu_addr = 8'(r);
      @(negedge clk);
      dsu_rd = 0;
      @(negedge clk);
      checks++;
      if (dsu_rdata != tmodel[r]) failures++;
    end
    vc_en = 1; trace_en = 0;
    insn_ret = 2'b11;
    while (n_blocks < 11) begin
      for (int k = 0; k < 4; k++) begin
        int i;
        i = rix++;
        core.access(0, addr_t'(32'h1000_0000 + ((i / 8) % 4) * 512 + (i % 8) * 16), 0);
      end
      core.access(1, addr_t'(32'h4000_0000 + (six / 8) * 512 + (six % 8) * 16), 0);
      six++;
    end
    repeat (2000) @(negedge clk);
    checks++;
    if (n_part != 11) begin failures++; $display("partitioning ran %0d times", n_part); end
    checks++;
    if (mode != MODE_EXCL0) begin failures++; $display("mode %0d", mode); end
    checks++;
    if (core.n_vchit == 0) failures++;
    $display("blocks %0d, vc hits %0d, misses %0d, mode %0d", n_blocks, core.n_vchit, core.n_miss, mode);
    $display("TB_RESULT checks=%0d failures=%0d", checks + core.checks, failures + core.failures);
    $finish;
  end
endmodule
