// vn_datapath: registers, buses, constant registers, inverters, adder,
// shifter and zero-detect flag of the machine, wired by gates G1..G40.
//
// Operand selection (P0): the left adder bus carries IC (G2), IX (G4),
// SP (G6), X (G8), ACC (G10), the constant 0 (G12) or MBR (G19); the right
// adder bus IC (G1), IX (G3), SP (G5), X (G7), ACC (G9), the constants -1
// (G11), 0 (G13), +1 (G14) or "sign" (G15).  Each bus passes an inverter
// (G37 left, G38 right) on its way to the adder.  In P0 MBR can also be
// copied to MAR (G16, low 10 bits), OC (G17, bits 17..12) and II (G18,
// bits 11..10).
// Transfer (P1): the adder result passes the shifter (G20 left, G21 right)
// and may drive the data bus (G22) and the address bus (G23, low 10 bits).
// The data bus may instead carry MBR (G24) or MAR (G40).  From the data bus
// load SP (G25), X (G26), ACC (G28), IC (G30), MBR (G32) and IX (G33); X
// may load the constants 18 (G27) or 10 (G39); MAR loads IC (G29) or the
// address bus (G31).
// Memory (P2): MBR loads the memory word at MAR (G34); G35 writes MBR to
// memory at MAR (the write strobe is an output).
// A 10-bit register feeding an 18-bit bus fills the upper bits with zeros;
// an 18-bit value feeding a 10-bit register gives its low 10 bits.
//
// The gates, their sources and destinations, widths and the field positions
// of OC and II follow the published machine.  This design adds one thing
// the published description leaves open: the adder operands, taken from the
// buses in P0, are held in an operand latch at the end of P0 so that the
// adder result stays valid in P1 while registers it came from are reloaded.
// The zero-detect flag takes the adder result at the end of P1 of every
// micro-cycle that opens an adder operand or inverter gate.  Registers reset to zero; memory does not.
module vn_datapath
  import vn_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  gates_t   g,           // phase-qualified gates, g[n] = Gn
  input  logic     p0_end,      // last clock of a running P0
  input  logic     p1_end,      // last clock of a running P1
  input  word_t    mem_rdata,
  output addr_t    mem_addr,
  output word_t    mem_wdata,
  output logic     mem_we,
  output regview_t regs,
  output word_t    data_bus,
  output addr_t    addr_bus,
  output word_t    left_bus,
  output word_t    right_bus,
  output word_t    alu_out,
  output logic     bus_contention
);

  addr_t ic, ix, sp, mar;
  word_t x, acc, mbr;
  logic [OC_W-1:0] oc;
  logic [II_W-1:0] ii;
  logic zd;

  // ---------------- adder buses ----------------
  logic c_left, c_right, c_data;
  gated_bus #(.WIDTH(WORD_W), .NSRC(7)) u_left_bus (
    .en  ({g[G_ALU_LEFT_IC], g[G_ALU_LEFT_IX], g[G_ALU_LEFT_SP], g[G_ALU_LEFT_X],
           g[G_ALU_LEFT_ACC], g[G_ALU_LEFT_ZERO], g[G_ALU_LEFT_MBR]}),
    .src ({word_t'(ic), word_t'(ix), word_t'(sp), x, acc, K_ZERO, mbr}),
    .bus (left_bus), .contention(c_left));

  gated_bus #(.WIDTH(WORD_W), .NSRC(9)) u_right_bus (
    .en  ({g[G_ALU_RIGHT_IC], g[G_ALU_RIGHT_IX], g[G_ALU_RIGHT_SP], g[G_ALU_RIGHT_X],
           g[G_ALU_RIGHT_ACC], g[G_ALU_RIGHT_M1], g[G_ALU_RIGHT_ZERO],
           g[G_ALU_RIGHT_ONE], g[G_ALU_RIGHT_SIGN]}),
    .src ({word_t'(ic), word_t'(ix), word_t'(sp), x, acc, K_M1, K_ZERO, K_ONE, K_SIGN}),
    .bus (right_bus), .contention(c_right));

  // ---------------- inverters, operand latch, adder ----------------
  word_t left_inv, right_inv, op_a, op_b, sum;
  logic  cout, alu_used, alu_used_q;

  inverter #(.WIDTH(WORD_W)) u_inv_left  (.en(g[G_INV_LEFT]),  .d(left_bus),  .q(left_inv));
  inverter #(.WIDTH(WORD_W)) u_inv_right (.en(g[G_INV_RIGHT]), .d(right_bus), .q(right_inv));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      op_a <= '0;
      op_b <= '0;
    end else if (p0_end) begin
      op_a <= left_inv;
      op_b <= right_inv;
    end

  adder #(.WIDTH(WORD_W)) u_adder (.a(op_a), .b(op_b), .sum(sum), .cout(cout));

  // An addition is any micro-cycle that opens an operand or inverter gate;
  // the flag takes its result at the end of P1.
  assign alu_used = |{g[G_ALU_RIGHT_IC], g[G_ALU_LEFT_IC], g[G_ALU_RIGHT_IX], g[G_ALU_LEFT_IX],
                      g[G_ALU_RIGHT_SP], g[G_ALU_LEFT_SP], g[G_ALU_RIGHT_X], g[G_ALU_LEFT_X],
                      g[G_ALU_RIGHT_ACC], g[G_ALU_LEFT_ACC], g[G_ALU_RIGHT_M1], g[G_ALU_LEFT_ZERO],
                      g[G_ALU_RIGHT_ZERO], g[G_ALU_RIGHT_ONE], g[G_ALU_RIGHT_SIGN],
                      g[G_ALU_LEFT_MBR], g[G_INV_LEFT], g[G_INV_RIGHT]};

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      alu_used_q <= 1'b0;
    else if (p0_end) alu_used_q <= alu_used;

  zero_detect #(.WIDTH(WORD_W)) u_zd (
    .clk, .rst_n, .update(p1_end && alu_used_q), .sum(sum), .zd(zd));

  shifter #(.WIDTH(WORD_W)) u_shift (
    .left(g[G_LEFT_SHIFT]), .right(g[G_RIGHT_SHIFT]), .d(sum), .q(alu_out));

  // ---------------- data and address buses ----------------
  logic c_addr;
  gated_bus #(.WIDTH(WORD_W), .NSRC(3)) u_data_bus (
    .en  ({g[G_DBUS_ALU], g[G_DBUS_MBR], g[G_DBUS_MAR]}),
    .src ({alu_out, mbr, word_t'(mar)}),
    .bus (data_bus), .contention(c_data));

  gated_bus #(.WIDTH(ADDR_W), .NSRC(1)) u_addr_bus (
    .en  (g[G_ABUS_ALU]),
    .src (alu_out[ADDR_W-1:0]),
    .bus (addr_bus), .contention(c_addr));

  assign bus_contention = c_left | c_right | c_data | c_addr;

  // ---------------- registers ----------------
  gated_register #(.WIDTH(ADDR_W), .NSRC(1)) u_ic (.clk, .rst_n,
    .load(g[G_IC_DBUS]), .src(data_bus[ADDR_W-1:0]), .q(ic));
  gated_register #(.WIDTH(ADDR_W), .NSRC(1)) u_ix (.clk, .rst_n,
    .load(g[G_IX_DBUS]), .src(data_bus[ADDR_W-1:0]), .q(ix));
  gated_register #(.WIDTH(ADDR_W), .NSRC(1)) u_sp (.clk, .rst_n,
    .load(g[G_SP_DBUS]), .src(data_bus[ADDR_W-1:0]), .q(sp));
  gated_register #(.WIDTH(WORD_W), .NSRC(3)) u_x (.clk, .rst_n,
    .load({g[G_X_DBUS], g[G_X_18], g[G_X_10]}),
    .src ({data_bus, K_EIGHTEEN, K_TEN}), .q(x));
  gated_register #(.WIDTH(WORD_W), .NSRC(1)) u_acc (.clk, .rst_n,
    .load(g[G_ACC_DBUS]), .src(data_bus), .q(acc));
  gated_register #(.WIDTH(ADDR_W), .NSRC(3)) u_mar (.clk, .rst_n,
    .load({g[G_MAR_MBR], g[G_MAR_IC], g[G_MAR_ABUS]}),
    .src ({mbr[ADDR_W-1:0], ic, addr_bus}), .q(mar));
  gated_register #(.WIDTH(WORD_W), .NSRC(2)) u_mbr (.clk, .rst_n,
    .load({g[G_MBR_DBUS], g[G_MBR_MEM]}),
    .src ({data_bus, mem_rdata}), .q(mbr));
  gated_register #(.WIDTH(OC_W), .NSRC(1)) u_oc (.clk, .rst_n,
    .load(g[G_OC_MBR]), .src(mbr[WORD_W-1 -: OC_W]), .q(oc));
  gated_register #(.WIDTH(II_W), .NSRC(1)) u_ii (.clk, .rst_n,
    .load(g[G_II_MBR]), .src(mbr[ADDR_W +: II_W]), .q(ii));

  assign mem_addr  = mar;
  assign mem_wdata = mbr;
  assign mem_we    = g[G_MEM_MBR];

  assign regs = '{ic: ic, ix: ix, sp: sp, x: x, acc: acc, mbr: mbr,
                  mar: mar, oc: oc, ii: ii, zd: zd};

endmodule
