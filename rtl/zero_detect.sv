// zero_detect: the zero-detect flag behind the adder.
//
// When `update` is high at a clock edge the flag is set to 1 if `sum` is
// zero and cleared to 0 otherwise; it then holds until the next addition.
// The micro-program tests it with a TEST micro-instruction.  The machine
// raises `update` in every micro-cycle that routes an operand to the adder
// (this design's reading of "after each addition").  Reset value 0.
module zero_detect #(
  parameter int unsigned WIDTH = 18
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             update,
  input  logic [WIDTH-1:0] sum,
  output logic             zd
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      zd <= 1'b0;
    else if (update) zd <= (sum == '0);
endmodule
