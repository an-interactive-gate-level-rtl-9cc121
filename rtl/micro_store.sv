// micro_store: the control store holding the micro-program, 512 words of
// 41 bits in the published machine.
//
// A load port (`we`, `waddr`, `wdata`) fills it before the machine is
// started; the micro-sequencer reads it through `raddr`/`rdata`, a
// combinational read whose result is captured in CSBR.  The load port is
// this design's choice; the size follows the published machine.
module micro_store #(
  parameter int unsigned WORDS = 512,
  parameter int unsigned WIDTH = 41,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];
endmodule
