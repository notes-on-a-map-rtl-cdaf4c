// map_ram: word-wide random-access memory used for each PE memory (PEM,
// 4K x 32 in the document) and for each main-memory module (256K x 32).
//
// One port: the read is combinational (the word at addr_i is on rdata_o in
// the same cycle) and a write with we_i takes effect at the rising clock
// edge.  The document only says its memories are faster than a bit-slice
// microcycle; a same-cycle read is this design's way of expressing that.
// Contents are not reset.
module map_ram #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we_i,
  input  logic [AW-1:0]    addr_i,
  input  logic [WIDTH-1:0] wdata_i,
  output logic [WIDTH-1:0] rdata_o
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we_i) mem[addr_i] <= wdata_i;

  assign rdata_o = mem[addr_i];
endmodule
