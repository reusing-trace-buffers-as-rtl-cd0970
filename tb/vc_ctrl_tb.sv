// vc_ctrl_tb: the victim cache controller in two configurations, run side
// by side on one clock by vc_ctrl_check: the default 4-way cache in a 2.5 KB
// trace buffer shared by two threads, and an 8-way cache in a 5 KB trace
// buffer shared by four threads (two tag rows per set). Each checker
// compares the controller with a reference model and counts the
// replacement rules it exercised; this bench sums their results.
module vc_ctrl_tb;
  logic clk = 0;
  logic d4, d8;
  int   c4, c8, f4, f8;

  always #5 clk = ~clk;

  vc_ctrl_check #(.VW(4), .TBB(2560), .NT(2)) u_4way (
    .clk, .done(d4), .checks(c4), .failures(f4));
  vc_ctrl_check #(.VW(8), .TBB(5120), .NT(4)) u_8way (
    .clk, .done(d8), .checks(c8), .failures(f8));

  initial begin
    fork
      begin
        repeat (400000) @(posedge clk);
        $display("watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", c4 + c8, f4 + f8 + 1);
        $finish;
      end
      begin
        wait (d4 && d8);
        $display("TB_RESULT checks=%0d failures=%0d", c4 + c8, f4 + f8);
        $finish;
      end
    join
  end
endmodule
