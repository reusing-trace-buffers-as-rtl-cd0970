// mode_ctrl_tb: the multi-mode controller (window of 10 blocks, F = 0.7)
// against a reference of the mode selection flow. Phases of blocks with
// chosen hit/insertion counts drive it into exclusive mode for thread 0,
// back to shared when thread 0's average utilisation stays below the
// threshold for two windows, into exclusive mode for thread 1, and then
// through random blocks. Each block's evaluation must finish within
// 4 divisions (42 cycles each) plus 6 cycles.
module mode_ctrl_tb;
  import vc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [31:0] vhits [2], vins [2];
  vc_mode_e mode; logic [1:0] ins_allow; logic done;
  logic [15:0] th, util [2];
  int checks = 0, failures = 0;
  // reference state
  int r_mode = 0, r_count = 0, r_ctr [2] = '{0, 0}, r_sum [2] = '{0, 0};
  int r_th = 0, r_prev = 0;
  int n_ex0 = 0, n_ex1 = 0, n_back = 0;

  mode_ctrl #(.WSIZE(10), .F_PCT(70)) dut (.*);
  always #5 clk = ~clk;

  function automatic int uq(int h, int i);
    longint q;
    if (h == 0) return 0;
    if (i == 0) return 65535;
    q = (longint'(h) * 256) / i;
    return q > 65535 ? 65535 : int'(q);
  endfunction

  task automatic ref_block(int h0, int i0, int h1, int i1);
    int u [2], a [2];
    u[0] = uq(h0, i0); u[1] = uq(h1, i1);
    r_sum[0] += u[0]; r_sum[1] += u[1];
    if (r_mode == 0) begin
      if (u[0] >= u[1]) r_ctr[0]++; else r_ctr[1]++;
    end
    r_count++;
    if (r_count == 10) begin
      r_count = 0;
      a[0] = r_sum[0] / 10; a[1] = r_sum[1] / 10;
      r_sum = '{0, 0};
      if (r_mode == 0) begin
        if (r_ctr[0] * 10 > 7 * 10) begin r_mode = 1; r_th = a[0]; r_prev = a[0]; n_ex0++; end
        else if (r_ctr[1] * 10 > 7 * 10) begin r_mode = 2; r_th = a[1]; r_prev = a[1]; n_ex1++; end
        r_ctr = '{0, 0};
      end else begin
        int s;
        s = a[r_mode - 1];
        if (s < r_th && r_prev < r_th) begin r_mode = 0; n_back++; end
        r_prev = s;
      end
    end
  endtask

  task automatic block(int h0, int i0, int h1, int i1);
    int cyc;
    vhits[0] = 32'(h0); vins[0] = 32'(i0); vhits[1] = 32'(h1); vins[1] = 32'(i1);
    start = 1;
    @(negedge clk);
    start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    ref_block(h0, i0, h1, i1);
    checks++;
    if (int'(mode) != r_mode) begin
      failures++;
      $display("%0t mode %0d want %0d", $time, mode, r_mode);
    end
    checks++;
    if (ins_allow != (r_mode == 0 ? 2'b11 : r_mode == 1 ? 2'b01 : 2'b10)) failures++;
    checks++;
    if (cyc > 4 * 44) begin failures++; $display("slow: %0d cycles", cyc); end
    if (r_mode != 0) begin
      checks++;
      if (int'(th) != r_th) begin failures++; $display("th %0d want %0d", th, r_th); end
    end
    // spacing between blocks
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vhits = '{0, 0}; vins = '{0, 0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // thread 0 reuses its lines, thread 1 pollutes: exclusive to thread 0
    for (int b = 0; b < 10; b++) block(60 + b, 100, 3, 200);
    // thread 0 keeps doing well: stay exclusive
    for (int b = 0; b < 10; b++) block(70, 100, 0, 0);
    // thread 0 utilisation drops for two windows: back to shared
    for (int b = 0; b < 20; b++) block(10, 100, 0, 0);
    // thread 1 now wins almost every block
    for (int b = 0; b < 10; b++) block(2, 100, 50 + b, 60);
    for (int b = 0; b < 20; b++) block(5, 100, 1, 100);
    for (int b = 0; b < 300; b++)
      block(int'($urandom_range(100)), int'($urandom_range(120)),
            int'($urandom_range(100)), int'($urandom_range(120)));
    $display("exclusive0 %0d, exclusive1 %0d, back to shared %0d", n_ex0, n_ex1, n_back);
    checks++;
    if (n_ex0 == 0 || n_ex1 == 0 || n_back == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
