// tb_ctlr: trace buffer controller with the victim-cache bypass.
//
// Validation mode (vc_en = 0): the trace buffer is a circular queue. Each
// cycle with trace_valid (and tracing enabled by the debug support unit,
// DSU) writes one 128-bit record {timestamp, trace data} at the write
// pointer taddr, which then advances and wraps at DEPTH. The DSU reads rows
// out through dsu_rd/dsu_addr in cycles without a trace write
// (dsu_gnt tells it the read was taken); the row arrives on tdata_out in
// the next cycle, like every trace-buffer read.
//
// Field mode (vc_en = 1): tracing stops and the victim cache controller owns
// the memory port; its index, control and write data (vdata) pass straight
// through. The mode bit vc_en comes from the DSU.
//
// The 32-bit timestamp beside 96 bits of pipeline trace data, the DSU read
// port and its lower priority are this design's choices; the queue
// organisation, the timestamp input and the vc_en select follow the design.
module tb_ctlr
  import vc_pkg::*;
#(
  parameter int unsigned DEPTH = 160,
  parameter int unsigned TS_W  = 32,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 vc_en,
  // trace source (pipeline) and DSU
  input  logic                 trace_en,
  input  logic                 trace_valid,
  input  logic [LINE_W-TS_W-1:0] trace_data,
  input  logic [TS_W-1:0]      timestamp,
  input  logic                 dsu_rd,
  input  logic [AW-1:0]        dsu_addr,
  output logic                 dsu_gnt,
  output logic [AW-1:0]        taddr,       // trace write pointer
  output logic                 wrapped,     // queue has filled once
  // victim cache controller
  input  logic                 vc_mem_en,
  input  logic                 vc_mem_we,
  input  logic [AW-1:0]        vc_mem_addr,
  input  line_t                vc_mem_wdata,
  // trace buffer memory port
  output logic                 mem_en,
  output logic                 mem_we,
  output logic [AW-1:0]        mem_addr,
  output line_t                mem_wdata
);

  logic trace_wr;
  assign trace_wr = !vc_en && trace_en && trace_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      taddr   <= '0;
      wrapped <= 1'b0;
    end else if (trace_wr) begin
      if (taddr == AW'(DEPTH - 1)) begin
        taddr   <= '0;
        wrapped <= 1'b1;
      end else begin
        taddr <= taddr + 1'b1;
      end
    end
  end

  always_comb begin
    dsu_gnt = 1'b0;
    if (vc_en) begin
      mem_en    = vc_mem_en;
      mem_we    = vc_mem_we;
      mem_addr  = vc_mem_addr;
      mem_wdata = vc_mem_wdata;
    end else begin
      mem_en    = trace_wr || dsu_rd;
      mem_we    = trace_wr;
      mem_addr  = trace_wr ? taddr : dsu_addr;
      mem_wdata = {timestamp, trace_data};
      dsu_gnt   = dsu_rd && !trace_wr;
    end
  end

endmodule
