// vn_computer: a micro-programmed 18-bit von Neumann machine.
//
// The control subsystem (control store, CSAR/CSBR sequencer, three-phase
// clock and START toggle) opens the datapath gates G1..G40 named by each
// GATE micro-instruction, one micro-instruction per three-phase micro-cycle,
// or branches on one register bit with a TEST micro-instruction.  The
// datapath holds IC, IX, SP, X, ACC, MAR, MBR, OC and II, four buses, an
// adder with operand inverters, a shifter and a zero-detect flag.  Main
// memory is 1024 words of 18 bits.  What the machine runs is set entirely by
// the micro-program loaded into the control store: it fetches, decodes and
// executes machine instructions from main memory.
//
// Interface.  While START is low the machine is suspended: the control store
// can be loaded through `us_we/us_addr/us_wdata` and main memory read and
// written through `ext_*`.  A one-clock pulse on `start_button` starts
// execution (at micro-address 0 after reset); the start=off micro-operation
// (G36) stops it, and `running` falls.  The observation outputs show the
// registers, buses, phase, CSAR, CSBR and the open gates, which is what the
// machine's display shows.
//
// Timing: one micro-cycle takes three clocks (P0, P1, P2), plus one clock to
// fill CSBR after reset or a control-store write.  Everything runs on `clk`
// with an asynchronous active-low reset.  The external ports and the
// single-clock phase generation are this design's choices.
module vn_computer
  import vn_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start_button,
  // control store load port
  input  logic     us_we,
  input  uaddr_t   us_addr,
  input  uword_t   us_wdata,
  // main memory access while halted
  input  logic     ext_we,
  input  addr_t    ext_addr,
  input  word_t    ext_wdata,
  output word_t    ext_rdata,
  // observation
  output logic     running,
  output phase_e   phase,
  output uaddr_t   csar,
  output uword_t   csbr,
  output gates_t   gates,
  output regview_t regs,
  output word_t    data_bus,
  output addr_t    addr_bus,
  output word_t    left_bus,
  output word_t    right_bus,
  output word_t    alu_out,       // shifter output
  output logic     test_taken,
  output logic     bus_contention
);

  logic   start, ready, run, cycle_end;
  uaddr_t us_raddr;
  uword_t us_rdata;
  addr_t  dp_mem_addr, mem_addr;
  word_t  dp_mem_wdata, mem_wdata, mem_rdata;
  logic   dp_mem_we, mem_we;

  start_toggle u_start (.clk, .rst_n, .button(start_button),
                        .off(gates[G_START_OFF]), .start(start));

  assign run = start && ready;

  phase_clock u_clock (.clk, .rst_n, .run(run), .phase(phase), .cycle_end(cycle_end));

  micro_store #(.WORDS(USTORE_WORDS), .WIDTH(UWORD_W)) u_ustore (
    .clk, .we(us_we && !start), .waddr(us_addr), .wdata(us_wdata),
    .raddr(us_raddr), .rdata(us_rdata));

  micro_sequencer u_seq (
    .clk, .rst_n, .start(start), .reload(us_we && !start), .phase(phase),
    .cycle_end(cycle_end), .regs(regs), .ustore_raddr(us_raddr),
    .ustore_rdata(us_rdata), .ready(ready), .gates(gates), .csar(csar),
    .csbr(csbr), .test_taken(test_taken));

  vn_datapath u_dp (
    .clk, .rst_n, .g(gates),
    .p0_end(run && phase == P0), .p1_end(run && phase == P1),
    .mem_rdata(mem_rdata), .mem_addr(dp_mem_addr), .mem_wdata(dp_mem_wdata),
    .mem_we(dp_mem_we), .regs(regs), .data_bus(data_bus), .addr_bus(addr_bus),
    .left_bus(left_bus), .right_bus(right_bus), .alu_out(alu_out),
    .bus_contention(bus_contention));

  // The external port owns main memory while the machine is stopped.
  assign mem_addr  = start ? dp_mem_addr  : ext_addr;
  assign mem_wdata = start ? dp_mem_wdata : ext_wdata;
  assign mem_we    = start ? dp_mem_we    : ext_we;
  assign ext_rdata = mem_rdata;

  main_memory #(.WORDS(MEM_WORDS), .WIDTH(WORD_W)) u_mem (
    .clk, .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata));

  assign running = start;

  // Gates of one phase that the published machine calls mutually exclusive.
  always_comb
    if (rst_n) assert (!(gates[G_LEFT_SHIFT] && gates[G_RIGHT_SHIFT]))
      else $error("left-shift and right-shift opened together");

endmodule
