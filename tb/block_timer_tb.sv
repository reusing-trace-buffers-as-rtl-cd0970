// block_timer_tb: random retirement patterns of two threads with blocks of
// 1000 instructions; block_end must pulse exactly when the running total
// crosses each multiple of 1000, one cycle after that retirement.
module block_timer_tb;
  logic clk = 0, rst_n = 0;
  logic [1:0] insn_ret = 0;
  logic block_end;
  int checks = 0, failures = 0, total = 0, blocks = 0;

  block_timer #(.NTHR(2), .BLOCK_INSNS(1000)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit expect_end;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 20000; c++) begin
      int prev;
      insn_ret = 2'($urandom);
      prev = total;
      total += int'(insn_ret[0]) + int'(insn_ret[1]);
      expect_end = (total / 1000) != (prev / 1000);
      @(negedge clk);
      checks++;
      if (block_end != expect_end) begin
        failures++;
        $display("cycle %0d total %0d: block_end %0d", c, total, block_end);
      end
      if (block_end) blocks++;
    end
    insn_ret = 0;
    checks++;
    if (blocks != total / 1000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
