// partition_fsm_tb: drives the two-stage partition state machine with a
// scripted sequence (the walk-through of the design: S0 -> S2 -> S0 with an
// increase; S2 -> S1 reversals; equal resets) and then random classes,
// against a reference written from the transition table.
module partition_fsm_tb;
  logic clk = 0, rst_n = 0, step = 0;
  logic [2:0] cls = 0, curr_class;
  logic [1:0] state;
  int checks = 0, failures = 0;
  int ref_st = 0, ref_cc = 2, n_inc = 0, n_dec = 0;

  partition_fsm #(.WAYS(4)) dut (.*);
  always #5 clk = ~clk;

  task automatic apply(int c);
    cls = 3'(c); step = 1;
    @(negedge clk);
    step = 0;
    // reference
    if (c == ref_cc) ref_st = 0;
    else if (c > ref_cc) begin
      if (ref_st == 2) begin ref_st = 0; ref_cc++; n_inc++; end else ref_st = 2;
    end else begin
      if (ref_st == 1) begin ref_st = 0; ref_cc--; n_dec++; end else ref_st = 1;
    end
    checks++;
    if (int'(state) != ref_st || int'(curr_class) != ref_cc) begin
      failures++;
      $display("cls %0d: state %0d curr %0d, want %0d %0d", c, state, curr_class, ref_st, ref_cc);
    end
    // idle cycles change nothing
    @(negedge clk);
    checks++;
    if (int'(state) != ref_st || int'(curr_class) != ref_cc) failures++;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (curr_class != 2) failures++;      // W22 at start
    apply(3); apply(4);                    // two blocks asking for more: 2 -> 3
    checks++; if (curr_class != 3) failures++;
    apply(4); apply(1); apply(0); apply(3); // S2, S1, dec to 2, S0
    apply(4); apply(2);                    // S2 then equal: back to S0, no change
    for (int k = 0; k < 1000; k++) apply(int'($urandom_range(4)));
    checks++;
    if (n_inc == 0 || n_dec == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
