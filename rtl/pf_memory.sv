// pf_memory: the 32K x 16 packet formatter memory.
//
// A single-port synchronous RAM: on each clock with we high, wdata is written
// at addr; rdata is the word at addr registered on every clock (one clock of
// read latency, read-before-write on a write to the same address). It is
// written as an array so that synthesis can map it to a RAM block; its
// contents are not reset. The size is the one given for the packet formatter
// memory; the synchronous single-port organisation is this design's choice.
module pf_memory #(
  parameter int unsigned DEPTH = 32768,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end

endmodule
