// main_memory: the machine's main store, WORDS words of WIDTH bits.
//
// One port, addressed by MAR in normal operation.  Reads are combinational
// (the word at `addr` is always on `rdata`; MBR captures it at the end of
// the memory phase); writes happen on the rising clock edge when `we` is
// high.  1024 x 18 follows the published machine; the single combinational
// read port is this design's choice.  The contents are not reset.
module main_memory #(
  parameter int unsigned WORDS = 1024,
  parameter int unsigned WIDTH = 18,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk)
    if (we) mem[addr] <= wdata;

  assign rdata = mem[addr];
endmodule
