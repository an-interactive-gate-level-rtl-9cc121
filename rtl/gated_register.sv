// gated_register: a machine register loaded through gates.
//
// Each of the NSRC inputs has its own gate.  On a rising clock edge the
// register takes the bitwise OR of every source whose gate is open, and keeps
// its value when no gate is open.  The machine's registers (IC, IX, SP, X,
// ACC, MAR, MBR, OC, II) are all instances of this module with their own
// widths and source lists.  The OR of simultaneous sources is this design's
// choice for gate combinations the micro-program should not use; reset to
// zero is also this design's choice.
//
// Timing: one clock edge from an open gate to the new value at q.
module gated_register #(
  parameter int unsigned WIDTH = 18,
  parameter int unsigned NSRC  = 2
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [NSRC-1:0]              load,
  input  logic [NSRC-1:0][WIDTH-1:0]   src,
  output logic [WIDTH-1:0]             q
);

  logic [WIDTH-1:0] next;

  always_comb begin
    next = '0;
    for (int i = 0; i < NSRC; i++)
      if (load[i]) next |= src[i];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     q <= '0;
    else if (|load) q <= next;

endmodule
