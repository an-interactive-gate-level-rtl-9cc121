// start_toggle: the START flip-flop.
//
// The external start button (`button`) sets it and gate 36 (`off`, the
// start=off micro-operation) clears it; while it is low the clock phases do
// not advance and the machine is suspended.  Reset leaves it low.  When both
// act in the same clock, `off` wins (this design's choice), so a halt
// instruction stops the machine even while the button is held.
module start_toggle (
  input  logic clk,
  input  logic rst_n,
  input  logic button,
  input  logic off,
  output logic start
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      start <= 1'b0;
    else if (off)    start <= 1'b0;
    else if (button) start <= 1'b1;
endmodule
