// inverter: the gated logical inverter between an adder bus and the adder.
//
// When `en` is high every bit of the operand is complemented, otherwise it
// passes unchanged.  With an inverter in front of each adder input the adder
// can form a+b, ~a+b, a+~b and ~a+~b; a later +1 gives two's complement
// subtraction.  Combinational.
module inverter #(
  parameter int unsigned WIDTH = 18
) (
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  assign q = d ^ {WIDTH{en}};
endmodule
