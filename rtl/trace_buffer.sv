// trace_buffer: the monolithic single-port trace buffer memory.
//
// One row is 128 bits wide, as in the processor's instruction trace buffer.
// The default depth of 160 rows is the 2.5 KB trace buffer used for most of
// the evaluation. During validation the trace buffer controller writes trace
// records into it; in the field the same rows hold the victim cache's tag
// region and data region.
//
// Interface and timing: one port, one access per cycle. A write (en & we)
// stores wdata at addr on the clock edge. A read (en & !we) returns the row
// on rdata in the next cycle; rdata holds its value until the next read.
// The memory itself has no reset, as an SRAM macro has none; the synchronous
// read port is this design's choice.
module trace_buffer #(
  parameter int unsigned DEPTH = 160,  // rows: 2.5 KB / 16 B
  parameter int unsigned WIDTH = 128,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
