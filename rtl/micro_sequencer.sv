// micro_sequencer: CSAR, CSBR and the hard-wired micro-control logic.
//
// CSAR (9 bits) addresses the control store and CSBR (41 bits) holds the
// micro-instruction being executed.  Bit 0 of CSBR selects its format:
//   GATE (bit 0 = 1): bits 1..40 are gates G1..G40.  The gate outputs are
//     those bits masked by the current clock phase, so a gate opens only in
//     the phase it belongs to (G1-19, G37, G38 in P0; G20-33, G39, G40 in P1;
//     G34-36 in P2).
//   TEST (bit 0 = 0): bits 1..9 select IC, IX, SP, X, ACC, MBR, MAR, OC, II
//     and bit 26 the zero-detect flag; bits 10..14 give a bit number, bit 15
//     the value to compare with, bits 16..25 the branch address.  When the
//     selected bit equals the compare bit, control goes to the address,
//     otherwise to the next word in sequence.  No gate opens.
// The formats and field positions follow the published machine.  This
// design's own choices: a TEST word that selects no register tests a 0, so
// "compare with 0, no register" is the unconditional goto; several selected
// registers are ORed; a bit number beyond a register's width reads 0; CSAR
// takes the low 9 bits of the 10-bit address field.
//
// CSAR is incremented as each word is fetched, so while a micro-instruction
// executes CSAR already holds the address of the one after it (the machine's
// display shows CSAR = 3 while CSBR holds the word from address 2); a taken
// TEST replaces that address with its branch address.
//
// Timing: the test and the next-address choice are made in P2 and take
// effect at the edge that ends P2, when CSBR takes the word at the chosen
// address and CSAR that address plus one, so the next micro-cycle starts at
// once.  After reset, or after the control store has been written
// (`reload`), CSBR is first filled from CSAR in one extra clock (`ready` low
// meanwhile; the phase clock must be held).  Execution starts at
// micro-address 0 after reset.
module micro_sequencer
  import vn_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,       // START toggle
  input  logic     reload,      // control store was written
  input  phase_e   phase,
  input  logic     cycle_end,   // last phase of a running micro-cycle
  input  regview_t regs,
  output uaddr_t   ustore_raddr,
  input  uword_t   ustore_rdata,
  output logic     ready,       // CSBR holds the word at CSAR
  output gates_t   gates,       // G1..G40 in gates[1..40]
  output uaddr_t   csar,
  output uword_t   csbr,
  output logic     test_taken   // TEST condition holds (valid in P2)
);

  logic   need_fetch;
  logic   is_gate;
  logic   tested_bit;
  uaddr_t next_addr;
  logic [4:0] bitnum;

  assign is_gate = csbr[UF_FORMAT];
  assign bitnum  = csbr[UF_BITNUM_LO +: 5];
  assign ready   = !need_fetch;

  // Bit `n` of a register, zero past its width.
  function automatic logic pick(input word_t v, input logic [4:0] n);
    return (int'(n) < WORD_W) ? v[n] : 1'b0;
  endfunction

  always_comb begin
    tested_bit = 1'b0;
    if (csbr[UF_SEL_IC])  tested_bit |= pick(word_t'(regs.ic),  bitnum);
    if (csbr[UF_SEL_IX])  tested_bit |= pick(word_t'(regs.ix),  bitnum);
    if (csbr[UF_SEL_SP])  tested_bit |= pick(word_t'(regs.sp),  bitnum);
    if (csbr[UF_SEL_X])   tested_bit |= pick(regs.x,            bitnum);
    if (csbr[UF_SEL_ACC]) tested_bit |= pick(regs.acc,          bitnum);
    if (csbr[UF_SEL_MBR]) tested_bit |= pick(regs.mbr,          bitnum);
    if (csbr[UF_SEL_MAR]) tested_bit |= pick(word_t'(regs.mar), bitnum);
    if (csbr[UF_SEL_OC])  tested_bit |= pick(word_t'(regs.oc),  bitnum);
    if (csbr[UF_SEL_II])  tested_bit |= pick(word_t'(regs.ii),  bitnum);
    if (csbr[UF_SEL_ZD])  tested_bit |= pick(word_t'(regs.zd),  bitnum);
  end

  assign test_taken = !is_gate && (tested_bit == csbr[UF_CMP]);
  // address of the next micro-instruction to execute
  assign next_addr  = test_taken ? csbr[UF_ADDR_LO +: CSAR_W] : csar;
  assign ustore_raddr = need_fetch ? csar : next_addr;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      need_fetch <= 1'b1;
      csar       <= '0;
      csbr       <= '0;
    end else if (reload) begin
      // CSBR is stale: fetch again the word it was loaded from
      if (!need_fetch) csar <= csar - 1'b1;
      need_fetch <= 1'b1;
    end else if (need_fetch) begin
      if (start) begin
        csbr       <= ustore_rdata;
        csar       <= csar + 1'b1;
        need_fetch <= 1'b0;
      end
    end else if (cycle_end) begin
      csbr <= ustore_rdata;
      csar <= next_addr + 1'b1;
    end

  // Gate outputs: GATE-format bits, only in their own phase.
  always_comb begin
    gates = '0;
    if (is_gate && ready && start) begin
      unique case (phase)
        P0: gates = csbr & PHASE0_GATES;
        P1: gates = csbr & PHASE1_GATES;
        P2: gates = csbr & PHASE2_GATES;
        default: gates = '0;
      endcase
    end
  end

endmodule
