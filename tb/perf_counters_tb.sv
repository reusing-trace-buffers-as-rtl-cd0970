// perf_counters_tb: random event pulses from three threads on four events
// over several blocks; every snapshot must equal the events the test
// counted for that block, including events in the block_end cycle, which
// belong to the next block.
module perf_counters_tb;
  localparam int NT = 3, NE = 4;
  logic clk = 0, rst_n = 0;
  logic [NE-1:0] ev = 0; logic [1:0] ev_thr = 0; logic block_end = 0;
  logic [31:0] snap [NT][NE];
  int cnt [NT][NE];
  int checks = 0, failures = 0;

  perf_counters #(.NTHR(NT), .NEV(NE)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < NT; t++) for (int e = 0; e < NE; e++) cnt[t][e] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 12; b++) begin
      int len;
      len = 50 + int'($urandom_range(400));
      for (int c = 0; c < len; c++) begin
        ev = NE'($urandom); ev_thr = 2'($urandom_range(NT - 1));
        block_end = (c == len - 1);
        @(negedge clk);
        if (block_end) begin
          for (int t = 0; t < NT; t++) for (int e = 0; e < NE; e++) begin
            checks++;
            if (snap[t][e] != 32'(cnt[t][e])) begin
              failures++;
              $display("block %0d t%0d e%0d: %0d want %0d", b, t, e, snap[t][e], cnt[t][e]);
            end
            cnt[t][e] = 0;
          end
        end
        for (int e = 0; e < NE; e++) if (ev[e]) cnt[ev_thr][e]++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
