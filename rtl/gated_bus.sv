// gated_bus: a bus driven through gates.
//
// The bus carries the bitwise OR of every source whose gate is open and is
// all zeros when no gate is open.  The machine has four buses built this
// way: the 18-bit data bus, the 10-bit address bus and the left and right
// 18-bit adder buses.  Several open gates on one bus are a micro-program
// fault; the OR keeps the result defined and `contention` flags it.
//
// Timing: purely combinational.
module gated_bus #(
  parameter int unsigned WIDTH = 18,
  parameter int unsigned NSRC  = 2
) (
  input  logic [NSRC-1:0]              en,
  input  logic [NSRC-1:0][WIDTH-1:0]   src,
  output logic [WIDTH-1:0]             bus,
  output logic                         contention
);

  always_comb begin
    bus = '0;
    for (int i = 0; i < NSRC; i++)
      if (en[i]) bus |= src[i];
  end

  assign contention = (en & (en - NSRC'(1))) != '0;

endmodule
