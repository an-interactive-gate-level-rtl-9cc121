// phase_clock: the three-phase clock of the control subsystem.
//
// Each micro-cycle is three phases, P0, P1 and P2, each one period of `clk`.
// The phase advances P0 -> P1 -> P2 -> P0 on every clock edge while `run`
// is high and holds while it is low, which suspends the whole machine.
// `cycle_end` is high during the last phase of a micro-cycle that is
// running.  Deriving the phases from a single clock with a counter is this
// design's choice.
module phase_clock
  import vn_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   run,
  output phase_e phase,
  output logic   cycle_end
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)   phase <= P0;
    else if (run) phase <= (phase == P2) ? P0 : phase_e'(phase + 2'd1);

  assign cycle_end = run && (phase == P2);
endmodule
