// trace_buffer_tb: writes every row of a 2.5 KB trace buffer with generated
// patterns, reads them back in a shuffled order and checks each row and the
// one-cycle read latency (rdata valid the cycle after the read).
module trace_buffer_tb;
  localparam int DEPTH = 160;
  logic clk = 0;
  logic en, we;
  logic [7:0] addr;
  logic [127:0] wdata, rdata;
  logic [127:0] model [DEPTH];
  int checks = 0, failures = 0;

  trace_buffer #(.DEPTH(DEPTH), .WIDTH(128)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [127:0] pat(int r);
    return {32'(r * 32'h9E3779B9), 32'(~r), 32'(r << 3), 32'(r ^ 32'h5A5A1234)};
  endfunction

  initial begin
    en = 0; we = 0; addr = 0; wdata = 0;
    @(negedge clk);
    for (int r = 0; r < DEPTH; r++) begin
      en = 1; we = 1; addr = 8'(r); wdata = pat(r); model[r] = pat(r);
      @(negedge clk);
    end
    // overwrite a few rows
    for (int k = 0; k < 20; k++) begin
      int r;
      r = int'($urandom_range(DEPTH - 1));
      en = 1; we = 1; addr = 8'(r);
      wdata = {$urandom, $urandom, $urandom, $urandom}; model[r] = wdata;
      @(negedge clk);
    end
    for (int k = 0; k < DEPTH; k++) begin
      int r;
      r = (k * 37) % DEPTH;
      en = 1; we = 0; addr = 8'(r);
      @(negedge clk);
      checks++;
      if (rdata !== model[r]) begin
        failures++;
        $display("row %0d: got %h want %h", r, rdata, model[r]);
      end
    end
    // disabled port keeps the last read value
    en = 0; addr = 0;
    @(negedge clk);
    checks++;
    if (rdata !== model[(159 * 37) % DEPTH]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
