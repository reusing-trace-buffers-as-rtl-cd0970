// tb_ctlr_tb: the trace buffer controller with a 2.5 KB trace buffer.
// Validation mode: 500 random trace records (the queue wraps twice) with
// DSU reads interleaved; the test keeps its own copy of where each record
// must land and reads every row back through the DSU port. Victim cache
// mode: the memory port must follow the victim cache controller exactly and
// tracing must stop.
module tb_ctlr_tb;
  import vc_pkg::*;
  localparam int DEPTH = 160;
  logic clk = 0, rst_n = 0, vc_en = 0;
  logic trace_en = 0, trace_valid = 0; logic [95:0] trace_data = 0; logic [31:0] timestamp = 0;
  logic dsu_rd = 0; logic [7:0] dsu_addr = 0; logic dsu_gnt; logic [7:0] taddr; logic wrapped;
  logic vc_mem_en = 0, vc_mem_we = 0; logic [7:0] vc_mem_addr = 0; line_t vc_mem_wdata = 0;
  logic mem_en, mem_we; logic [7:0] mem_addr; line_t mem_wdata, rdata;
  line_t model [DEPTH];
  int checks = 0, failures = 0, ptr = 0, n_wrap = 0;

  tb_ctlr #(.DEPTH(DEPTH), .TS_W(32)) dut (.*);
  trace_buffer #(.DEPTH(DEPTH), .WIDTH(128)) mem (
    .clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(rdata));

  always #5 clk = ~clk;

  task automatic chk(input string what, input longint got, input longint want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("%0t %s: got %0d want %0d", $time, what, got, want);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1; trace_en = 1;
    for (int k = 0; k < 500; k++) begin
      trace_valid = ($urandom_range(3) != 0);
      trace_data  = {$urandom, $urandom, $urandom};
      timestamp   = 32'(k);
      dsu_rd      = 1'($urandom);
      dsu_addr    = 8'($urandom_range(DEPTH - 1));
      #1;
      chk("taddr", taddr, ptr);
      chk("dsu_gnt", dsu_gnt, dsu_rd && !trace_valid);
      if (trace_valid) begin
        chk("mem write", mem_en && mem_we && mem_addr == 8'(ptr) &&
            mem_wdata == {timestamp, trace_data}, 1);
        model[ptr] = {timestamp, trace_data};
        ptr = (ptr + 1) % DEPTH;
        if (ptr == 0) n_wrap++;
      end
      @(negedge clk);
    end
    trace_valid = 0;
    chk("wrapped", wrapped, 1);
    chk("queue wrapped at least twice", n_wrap >= 2, 1);
    for (int r = 0; r < DEPTH; r++) begin
      dsu_rd = 1; dsu_addr = 8'(r);
      @(negedge clk);
      chk("readout", rdata == model[r], 1);
    end
    dsu_rd = 0;
    // victim cache mode
    vc_en = 1;
    for (int k = 0; k < 200; k++) begin
      trace_valid = 1'($urandom);
      vc_mem_en = 1'($urandom); vc_mem_we = 1'($urandom);
      vc_mem_addr = 8'($urandom_range(DEPTH - 1));
      vc_mem_wdata = {$urandom, $urandom, $urandom, $urandom};
      #1;
      chk("vc pass", mem_en == vc_mem_en && mem_we == vc_mem_we &&
          mem_addr == vc_mem_addr && mem_wdata == vc_mem_wdata, 1);
      chk("dsu_gnt off", dsu_gnt, 0);
      @(negedge clk);
      chk("taddr frozen", taddr, ptr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
