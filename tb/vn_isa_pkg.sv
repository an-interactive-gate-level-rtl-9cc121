// vn_isa_pkg: the default machine instruction set of vn_computer, an
// instruction encoder and an instruction-level reference model.
//
// Instruction word (18 bits): op-code in bits 17..12, indirection flag in
// bit 11, indexing flag in bit 10, address field in bits 9..0.  The op-code
// numbers and mnemonics are those of the published default instruction set.
// The reference model executes the same instructions with the conventions
// of the default micro-program (see vn_microcode_pkg): effective address =
// address field, + IX when indexed, then indirect through memory; register
// numbers 0 = ACC, 1 = IC, 2 = IX, 3 = SP; IC already points at the next
// instruction while one executes; a downward stack; all arithmetic modulo
// the register width.  It is written without reference to the gate-level
// machine so that testbenches can compare the two.
package vn_isa_pkg;
  import vn_pkg::*;

  typedef enum int unsigned {
    NOP = 0, ADD = 1, SUB = 2, LDA = 3, STA = 4, INCR = 5, DECR = 6,
    ADDAI = 7, SUBAI = 8, ADDIXI = 9, SUBIXI = 10, ADDSPI = 11, SUBSPI = 12,
    ADDAR = 13, SUBAR = 14, ADDIXR = 15, SUBIXR = 16, LDAR = 17, LDIXR = 18,
    LDICR = 19, INVA = 20, INVIX = 21, ANDA = 22, ORA = 23, XORA = 24,
    RSFTA = 25, LSFTA = 26, JMP = 27, JAZ = 28, JANZ = 29, JIXZ = 30,
    JIXNZ = 31, CALL = 32, RET = 33, PUSHA = 34, POPA = 35, ZEROA = 36,
    LDAI = 37, HLT = 63
  } op_e;

  localparam int REG_ACC = 0, REG_IC = 1, REG_IX = 2, REG_SP = 3;

  function automatic word_t enc(op_e op, int addr, bit ind = 1'b0, bit idx = 1'b0);
    return {6'(op), ind, idx, 10'(addr)};
  endfunction

  class RefMachine;
    word_t mem [MEM_WORDS];
    word_t acc;
    addr_t ic, ix, sp;
    bit    halted;
    int    steps;

    function new();
      foreach (mem[i]) mem[i] = '0;
      acc = '0; ic = '0; ix = '0; sp = '0; halted = 0; steps = 0;
    endfunction

    function word_t rd(int r);
      case (r)
        REG_ACC: return acc;
        REG_IC:  return word_t'(ic);
        REG_IX:  return word_t'(ix);
        default: return word_t'(sp);
      endcase
    endfunction

    function void wr(int r, word_t v);
      case (r)
        REG_ACC: acc = v;
        REG_IC:  ic  = addr_t'(v);
        REG_IX:  ix  = addr_t'(v);
        default: sp  = addr_t'(v);
      endcase
    endfunction

    function void step();
      word_t w = mem[ic];
      int    op = int'(w[17:12]);
      addr_t ea = w[9:0];
      word_t m;
      int    r;
      ic = ic + 1'b1;
      if (w[10]) ea = ea + ix;
      if (w[11]) ea = mem[ea][9:0];
      r = int'(ea[1:0]);
      m = mem[ea];
      steps++;
      case (op)
        ADD:    acc = acc + m;
        SUB:    acc = acc - m;
        LDA:    acc = m;
        STA:    mem[ea] = acc;
        INCR:   wr(r, rd(r) + 1'b1);
        DECR:   wr(r, rd(r) - 1'b1);
        ADDAI:  acc = acc + word_t'(ea);
        SUBAI:  acc = acc - word_t'(ea);
        ADDIXI: ix = ix + ea;
        SUBIXI: ix = ix - ea;
        ADDSPI: sp = sp + ea;
        SUBSPI: sp = sp - ea;
        ADDAR:  acc = acc + rd(r);
        SUBAR:  acc = acc - rd(r);
        ADDIXR: ix = ix + addr_t'(rd(r));
        SUBIXR: ix = ix - addr_t'(rd(r));
        LDAR:   acc = rd(r);
        LDIXR:  ix = addr_t'(rd(r));
        LDICR:  ic = addr_t'(rd(r));
        INVA:   acc = ~acc;
        INVIX:  ix = ~ix;
        ANDA:   acc = acc & m;
        ORA:    acc = acc | m;
        XORA:   acc = acc ^ m;
        RSFTA:  acc = acc >> 1;
        LSFTA:  acc = acc << 1;
        JMP:    ic = ea;
        JAZ:    if (acc == '0) ic = ea;
        JANZ:   if (acc != '0) ic = ea;
        JIXZ:   if (ix == '0) ic = ea;
        JIXNZ:  if (ix != '0) ic = ea;
        CALL:   begin sp = sp - 1'b1; mem[sp] = word_t'(ic); ic = ea; end
        RET:    begin ic = mem[sp][9:0]; sp = sp + 1'b1; end
        PUSHA:  begin sp = sp - 1'b1; mem[sp] = acc; end
        POPA:   begin acc = mem[sp]; sp = sp + 1'b1; end
        ZEROA:  acc = '0;
        LDAI:   acc = word_t'(ea);
        HLT:    halted = 1;
        default: ;
      endcase
    endfunction

    function void run(int max_steps);
      while (!halted && steps < max_steps) step();
    endfunction
  endclass

endpackage
