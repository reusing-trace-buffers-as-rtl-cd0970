// lr_partition_ctrl_tb: the logistic-regression partitioning unit in its two
// evaluated shapes, 2 threads with 4 ways and 4 threads with 8 ways, against
// a reference of the computation: Q8.8 feature ratios, logits with the class
// weights, the best class per thread pair, the per-thread demand
// P[m] * ways / sum(P), and the two-block hysteresis on the current
// allocation. Weights are random per run and loaded through the weight
// port; per-block statistics are random with some zero counts. Checked per
// block: the demand of every thread, the current allocation and the way
// ownership map, and that the result arrives within a cycle budget.
module lr_partition_ctrl_tb;
  import vc_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic chk(input string what, input longint got, input longint want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("%0t %s: got %0d want %0d", $time, what, got, want);
    end
  endtask

  // ---------------------------------------------------------------- 2 threads, 4 ways
  logic s2_start = 0, s2_we = 0; logic [5:0] s2_waddr = 0; line_t s2_wdata = 0;
  logic [31:0] s2_stats [2][6];
  logic s2_busy, s2_done;
  logic [2:0] s2_curr [2]; logic [0:0] s2_owner [4]; logic [2:0] s2_req [2];
  lr_partition_ctrl #(.NTHR(2), .NWAYS(4), .DSU_ROWS(64)) dut2 (
    .clk, .rst_n, .start(s2_start), .stats(s2_stats), .wt_we(s2_we), .wt_addr(s2_waddr),
    .wt_data(s2_wdata), .busy(s2_busy), .done(s2_done), .curr_w(s2_curr),
    .way_owner(s2_owner), .last_req(s2_req));

  // ---------------------------------------------------------------- 4 threads, 8 ways
  logic s4_start = 0, s4_we = 0; logic [5:0] s4_waddr = 0; line_t s4_wdata = 0;
  logic [31:0] s4_stats [4][6];
  logic s4_busy, s4_done;
  logic [3:0] s4_curr [4]; logic [1:0] s4_owner [8]; logic [3:0] s4_req [4];
  lr_partition_ctrl #(.NTHR(4), .NWAYS(8), .DSU_ROWS(64)) dut4 (
    .clk, .rst_n, .start(s4_start), .stats(s4_stats), .wt_we(s4_we), .wt_addr(s4_waddr),
    .wt_data(s4_wdata), .busy(s4_busy), .done(s4_done), .curr_w(s4_curr),
    .way_owner(s4_owner), .last_req(s4_req));

  // ---------------------------------------------------------------- reference
  int wt [9][7];          // weights of each class, shared by both shapes' tests
  int st [4][6];
  int curr [4];
  int pend_inc, pend_dec, pend_v;
  int n_move = 0, n_hold = 0;

  function automatic int ratio(int a, int b);
    longint q;
    if (a == 0 && b == 0) return 256;
    if (b == 0) return 65535;
    q = (longint'(a) * 256) / b;
    return q > 65535 ? 65535 : int'(q);
  endfunction

  // returns the demand per thread for nthr threads and w ways
  task automatic ref_demand(int nthr, int w, output int req [4]);
    int p [4], psum;
    for (int m = 0; m < 4; m++) p[m] = 0;
    for (int i = 0; i < nthr - 1; i++)
      for (int j = i + 1; j < nthr; j++) begin
        longint best, lg;
        int bt;
        int f [6];
        for (int k = 0; k < 6; k++) f[k] = ratio(st[i][k], st[j][k]);
        bt = 0; best = 0;
        for (int t = 0; t <= w; t++) begin
          lg = longint'(wt[t][0]) * 256;
          for (int k = 0; k < 6; k++) lg += longint'(wt[t][k + 1]) * f[k];
          if (t == 0 || lg > best) begin best = lg; bt = t; end
        end
        p[i] += bt; p[j] += w - bt;
      end
    psum = nthr * (nthr - 1) / 2 * w;
    for (int m = 0; m < nthr; m++) req[m] = p[m] * w / psum;
  endtask

  task automatic load_weights(int w);
    for (int t = 0; t <= w; t++) begin
      line_t row;
      row = '0;
      for (int k = 0; k < 7; k++) begin
        wt[t][k] = int'($urandom_range(1024)) - 512;
        row[16*k +: 16] = 16'(wt[t][k]);
      end
      @(negedge clk);
      if (w == 4) begin s2_we = 1; s2_waddr = 6'(t); s2_wdata = row; end
      else        begin s4_we = 1; s4_waddr = 6'(t); s4_wdata = row; end
      @(negedge clk);
      s2_we = 0; s4_we = 0;
    end
  endtask

  function automatic int rnd_stat();
    return ($urandom_range(9) == 0) ? 0 : int'($urandom_range(5000));
  endfunction

  task automatic run_block(int nthr, int w, int budget);
    int req [4], cyc, inc_t, dec_t;
    for (int m = 0; m < nthr; m++)
      for (int k = 0; k < 6; k++) begin
        st[m][k] = rnd_stat();
        if (w == 4) s2_stats[m][k] = 32'(st[m][k]); else s4_stats[m][k] = 32'(st[m][k]);
      end
    // bias the first feature now and then so that demands move
    if ($urandom_range(1) == 0) begin
      if (w == 4) s2_stats[0][0] = 0; else s4_stats[0][0] = 0;
      st[0][0] = 0;
    end
    @(negedge clk);
    if (w == 4) s2_start = 1; else s4_start = 1;
    @(negedge clk);
    s2_start = 0; s4_start = 0; cyc = 1;
    while (!(w == 4 ? s2_done : s4_done)) begin @(negedge clk); cyc++; end
    chk("cycle budget", cyc <= budget, 1);
    ref_demand(nthr, w, req);
    for (int m = 0; m < nthr; m++)
      chk("demand", w == 4 ? s2_req[m] : s4_req[m], req[m]);
    // hysteresis on the first increase/decrease pair
    inc_t = -1; dec_t = -1;
    for (int m = 0; m < nthr; m++) begin
      if (inc_t < 0 && req[m] > curr[m]) inc_t = m;
      if (dec_t < 0 && req[m] < curr[m]) dec_t = m;
    end
    if (inc_t >= 0 && dec_t >= 0) begin
      if (pend_v && pend_inc == inc_t && pend_dec == dec_t) begin
        curr[inc_t]++; curr[dec_t]--; pend_v = 0; n_move++;
      end else begin
        pend_v = 1; pend_inc = inc_t; pend_dec = dec_t; n_hold++;
      end
    end else pend_v = 0;
    @(negedge clk);
    begin
      int base, own;
      base = 0;
      for (int m = 0; m < nthr; m++) begin
        chk("curr_w", w == 4 ? s2_curr[m] : s4_curr[m], curr[m]);
        for (int k = 0; k < curr[m]; k++)
          chk("way_owner", w == 4 ? s2_owner[base + k] : s4_owner[base + k], m);
        base += curr[m];
      end
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // two threads, four ways: starts at 2/2
    load_weights(4);
    curr = '{2, 2, 0, 0}; pend_v = 0;
    for (int b = 0; b < 150; b++) begin
      if (b % 50 == 49) load_weights(4);
      run_block(2, 4, 6 * 44 + 5 * 100 + 2 * 44 + 10);
    end
    // four threads, eight ways: starts at 2/2/2/2
    load_weights(8);
    curr = '{2, 2, 2, 2}; pend_v = 0;
    for (int b = 0; b < 80; b++) begin
      if (b % 40 == 39) load_weights(8);
      run_block(4, 8, 6 * (6 * 44 + 9 * 100) + 4 * 44 + 10);
    end
    $display("moves %0d, first-stage holds %0d", n_move, n_hold);
    chk("moves and holds seen", n_move > 0 && n_hold > n_move, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
