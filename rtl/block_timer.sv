// block_timer: marks the end of each block of dynamic instructions.
//
// The DSU's partitioning decisions are taken once per block, a fixed
// number of retired instructions of the core (all threads together); the
// evaluated block is one million instructions. insn_ret has one bit per
// thread, set in a cycle where that thread retires an instruction.
// block_end pulses for one cycle when the running count reaches
// BLOCK_INSNS; the count then restarts, carrying over any excess.
module block_timer #(
  parameter int unsigned NTHR        = 2,
  parameter int unsigned BLOCK_INSNS = 1000000
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NTHR-1:0] insn_ret,
  output logic            block_end
);

  logic [31:0] cnt, nxt;

  always_comb begin
    nxt = cnt;
    for (int t = 0; t < NTHR; t++) nxt = nxt + 32'(insn_ret[t]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      block_end <= 1'b0;
    end else if (nxt >= BLOCK_INSNS) begin
      cnt       <= nxt - BLOCK_INSNS;
      block_end <= 1'b1;
    end else begin
      cnt       <= nxt;
      block_end <= 1'b0;
    end
  end

endmodule
