// vc_core_model: behavioural model of what surrounds the victim cache in a
// processor core, for end-to-end tests: an NT-thread core (two by default)
// issuing loads and stores, a 512-byte direct-mapped write-through, write-allocate L1 data
// cache with 16-byte lines (32 sets, so an evicted line always shares the
// request's victim cache set), and main memory whose every word is a
// function of its address unless a store changed it. Not synthesizable and
// not part of the design.
//
// access(thr, addr, store) runs one memory operation through the victim
// cache controller's request, hit and swap handshake, fills the data cache
// from the victim cache or memory, and checks that the line the core gets
// equals memory. It pulses the data cache statistics events (load miss,
// store miss, miss, hit) and keeps counts of where lines came from.
module vc_core_model
  import vc_pkg::*;
#(
  parameter int NT = 2,
  localparam int THR_W = (NT > 1) ? $clog2(NT) : 1
) (
  input  logic        clk,
  output logic        req,
  output addr_t       maddr,
  output logic [THR_W-1:0] thread,
  input  logic        vc_ready,
  output logic        dc_hit,
  output logic        ev_valid,
  output addr_t       eaddr,
  output line_t       edata,
  input  logic        vc_resp,
  input  logic        vc_hit,
  input  line_t       vc_data,
  input  logic        vc_data_valid,
  output logic [3:0]  dc_evt,
  output logic [THR_W-1:0] dc_evt_thr
);

  logic        dv   [32];
  logic [22:0] dtag [32];
  line_t       dline[32];
  line_t       mem  [addr_t];

  int checks = 0, failures = 0;
  int n_dchit = 0, n_vchit = 0, n_miss = 0, n_evict = 0;
  int n_vchit_thr [NT] = '{default: 0};

  initial begin
    req = 0; maddr = 0; thread = 0; dc_hit = 0; ev_valid = 0; eaddr = 0;
    edata = 0; dc_evt = 0; dc_evt_thr = 0;
    for (int s = 0; s < 32; s++) begin dv[s] = 0; dtag[s] = 0; dline[s] = 0; end
  end

  function automatic line_t mem_line(addr_t la);
    if (mem.exists(la)) return mem[la];
    return {la ^ 32'hA5A5_0003, la + 32'd2, ~la, la * 32'd7 + 32'd1};
  endfunction

  task automatic access(int thr, addr_t a, bit store);
    addr_t la;
    int set, cyc;
    logic [22:0] tag;
    bit hit, evv, got_vc;
    line_t line;
    la  = {a[31:4], 4'h0};
    set = int'(a[8:4]);
    tag = a[31:9];
    hit = dv[set] && dtag[set] == tag;
    evv = !hit && dv[set];
    @(negedge clk);
    while (!vc_ready) @(negedge clk);
    req = 1; maddr = a; thread = THR_W'(thr); dc_hit = hit; ev_valid = evv;
    eaddr = {dtag[set], 5'(set), 4'h0}; edata = dline[set];
    @(negedge clk);
    req = 0;
    // the answer comes after the last tag row is read (one row per 4 ways)
    for (int k = 0; k < 3 && !vc_resp; k++) @(negedge clk);
    checks++;
    if (!vc_resp) begin failures++; $display("%0t no vc_resp", $time); end
    got_vc = vc_hit && !hit;
    line = '0;
    cyc = 0;
    while (!vc_ready) begin
      if (vc_data_valid) line = vc_data;
      @(negedge clk);
      cyc++;
      if (cyc > 20) begin failures++; $display("%0t controller hung", $time); break; end
    end
    if (hit) begin line = dline[set]; n_dchit++; end
    else if (got_vc) begin n_vchit++; n_vchit_thr[thr]++; end
    else begin line = mem_line(la); n_miss++; end
    if (evv) n_evict++;
    checks++;
    if (line != mem_line(la)) begin
      failures++;
      if (failures < 10) $display("%0t line %h wrong (%s): %h want %h", $time, la,
                                  got_vc ? "victim cache" : "data cache", line, mem_line(la));
    end
    if (store) begin
      line[32*a[3:2] +: 32] = $urandom;
      mem[la] = line;                      // write-through
    end
    dv[set] = 1; dtag[set] = tag; dline[set] = line;   // write-allocate
    dc_evt = {hit, !hit, !hit && store, !hit && !store};
    dc_evt_thr = THR_W'(thr);
    @(negedge clk);
    dc_evt = 0;
  endtask

endmodule
