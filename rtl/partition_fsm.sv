// partition_fsm: two-stage way-allocation state machine for two threads.
//
// class is the number of victim cache ways that the classifier wants for
// thread 0 after the block that just ended; curr_class is the number thread
// 0 holds now (thread 1 holds the rest). The current partition moves by one
// way only when two blocks in a row ask for a move in the same direction:
//   S0: class > curr -> S2; class < curr -> S1; equal -> S0
//   S2: class > curr -> S0 and curr_class + 1; class < curr -> S1;
//       equal -> S0
//   S1: class < curr -> S0 and curr_class - 1; class > curr -> S2;
//       equal -> S0
// This hysteresis keeps a single misprediction from reshaping the cache.
// The states and transitions follow the design; curr_class starts at
// WAYS/2 (half the cache per thread). step pulses once per block; curr_class
// changes on the clock edge of that step.
module partition_fsm #(
  parameter int unsigned WAYS = 4,
  localparam int unsigned CW = $clog2(WAYS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          step,
  input  logic [CW-1:0] cls,
  output logic [CW-1:0] curr_class,
  output logic [1:0]    state         // 0 = S0, 1 = S1, 2 = S2
);

  typedef enum logic [1:0] { S0 = 2'd0, S1 = 2'd1, S2 = 2'd2 } pstate_e;
  pstate_e st;

  assign state = st;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= S0;
      curr_class <= CW'(WAYS / 2);
    end else if (step) begin
      if (cls == curr_class) st <= S0;
      else if (cls > curr_class) begin
        if (st == S2) begin
          st         <= S0;
          curr_class <= curr_class + 1'b1;
        end else st <= S2;
      end else begin
        if (st == S1) begin
          st         <= S0;
          curr_class <= curr_class - 1'b1;
        end else st <= S1;
      end
    end
  end

endmodule
