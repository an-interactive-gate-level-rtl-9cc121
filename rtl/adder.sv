// adder: the machine's single WIDTH-bit binary adder.
//
// It adds its two operands modulo 2^WIDTH; the carry out of the top bit is
// brought out as `cout` but the machine does not store it (the published
// machine has no carry flag).  The adder has no carry input: increments and
// two's complement negation use the +1 constant on an operand bus.
// Combinational.
module adder #(
  parameter int unsigned WIDTH = 18
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  assign {cout, sum} = {1'b0, a} + {1'b0, b};
endmodule
