// shifter: one-bit left/right shifter between the adder and the buses.
//
// `left` shifts the adder result one place towards bit WIDTH-1, `right` one
// place towards bit 0; the vacated bit is filled with zero (a logical shift,
// this design's choice).  With neither control the value passes through.
// Both at once is a micro-program fault: the value then passes unshifted.
// Combinational.
module shifter #(
  parameter int unsigned WIDTH = 18
) (
  input  logic             left,
  input  logic             right,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_comb begin
    unique case ({left, right})
      2'b10:   q = {d[WIDTH-2:0], 1'b0};
      2'b01:   q = {1'b0, d[WIDTH-1:1]};
      default: q = d;
    endcase
  end
endmodule
