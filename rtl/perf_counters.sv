// perf_counters: per-thread event counters sampled once per block.
//
// Serves as the victim-cache hits/insertions counter and as the data
// cache's statistics registers: NTHR threads times NEV events, each a
// 32-bit counter. An event pulse ev[k] with thread ev_thr adds one to
// counter (ev_thr, k). At block_end the counts of the block that just ended
// are copied to snap and the live counters restart from the events of that
// same cycle, so the DSU always reads complete per-block numbers from snap.
// The 32-bit width follows the 32 x n registers in the design; sampling
// per block is this design's choice.
module perf_counters #(
  parameter int unsigned NTHR = 2,
  parameter int unsigned NEV  = 2,
  localparam int unsigned THR_W = (NTHR > 1) ? $clog2(NTHR) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NEV-1:0]   ev,
  input  logic [THR_W-1:0] ev_thr,
  input  logic             block_end,
  output logic [31:0]      snap [NTHR][NEV]
);

  logic [31:0] cnt [NTHR][NEV];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < NTHR; t++)
        for (int k = 0; k < NEV; k++) begin
          cnt[t][k]  <= '0;
          snap[t][k] <= '0;
        end
    end else begin
      for (int t = 0; t < NTHR; t++)
        for (int k = 0; k < NEV; k++) begin
          logic inc;
          inc = ev[k] && ev_thr == THR_W'(t);
          if (block_end) begin
            snap[t][k] <= cnt[t][k];
            cnt[t][k]  <= {31'd0, inc};
          end else if (inc) begin
            cnt[t][k] <= cnt[t][k] + 32'd1;
          end
        end
    end
  end

endmodule
