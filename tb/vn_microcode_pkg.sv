// vn_microcode_pkg: a small symbolic micro-assembler and the default
// micro-program for vn_computer, used by the testbenches.
//
// The micro-assembler builds control-store words from gate masks (GATE
// format) and register-bit tests (TEST format) and resolves labels in two
// passes.  An unconditional "goto" is a TEST word that selects no register
// and compares with 0.
//
// The default micro-program implements the default instruction set
// (op-codes 0-37 and 63).  Its first steps (initialisation, instruction
// fetch, indexing before indirection, the op-code decode tree on OC bits
// 5..0, the add/sub/lda routines and halt) follow the published sample; the
// rest of the routines are this design's own.  Conventions of the routines:
//   * The effective address is formed once, after fetch, and left in MAR:
//     the address field, plus IX when instruction bit 10 is set, then
//     replaced by the memory word there (low 10 bits) when bit 11 is set.
//   * Immediate instructions use MAR as the operand (zero-extended).
//   * Register instructions take a register number from MAR bits 1..0:
//     0 = ACC, 1 = IC, 2 = IX, 3 = SP (ACC = 0 and IX = 2 as in the published
//     sample program; 1 and 3 are this design's choice).
//   * The stack grows downwards from the top of memory: push/call decrement
//     SP and then write, pop/ret read and then increment SP.
//   * anda/ora/xora run a bit-serial loop of 18 steps counted in X
//     (loaded from the constant 18), shifting ACC and MBR left and building
//     the result in the low end of ACC.
package vn_microcode_pkg;
  import vn_pkg::*;

  // One-hot gate masks, named after the symbolic micro-operations.
  localparam uword_t R_IC    = uword_t'(1) << G_ALU_RIGHT_IC;
  localparam uword_t L_IC    = uword_t'(1) << G_ALU_LEFT_IC;
  localparam uword_t R_IX    = uword_t'(1) << G_ALU_RIGHT_IX;
  localparam uword_t L_IX    = uword_t'(1) << G_ALU_LEFT_IX;
  localparam uword_t R_SP    = uword_t'(1) << G_ALU_RIGHT_SP;
  localparam uword_t L_SP    = uword_t'(1) << G_ALU_LEFT_SP;
  localparam uword_t R_X     = uword_t'(1) << G_ALU_RIGHT_X;
  localparam uword_t L_X     = uword_t'(1) << G_ALU_LEFT_X;
  localparam uword_t R_ACC   = uword_t'(1) << G_ALU_RIGHT_ACC;
  localparam uword_t L_ACC   = uword_t'(1) << G_ALU_LEFT_ACC;
  localparam uword_t R_M1    = uword_t'(1) << G_ALU_RIGHT_M1;
  localparam uword_t L_0     = uword_t'(1) << G_ALU_LEFT_ZERO;
  localparam uword_t R_0     = uword_t'(1) << G_ALU_RIGHT_ZERO;
  localparam uword_t R_1     = uword_t'(1) << G_ALU_RIGHT_ONE;
  localparam uword_t R_SIGN  = uword_t'(1) << G_ALU_RIGHT_SIGN;
  localparam uword_t MAR_MBR = uword_t'(1) << G_MAR_MBR;
  localparam uword_t OC_MBR  = uword_t'(1) << G_OC_MBR;
  localparam uword_t II_MBR  = uword_t'(1) << G_II_MBR;
  localparam uword_t L_MBR   = uword_t'(1) << G_ALU_LEFT_MBR;
  localparam uword_t LSH     = uword_t'(1) << G_LEFT_SHIFT;
  localparam uword_t RSH     = uword_t'(1) << G_RIGHT_SHIFT;
  localparam uword_t DB_ALU  = uword_t'(1) << G_DBUS_ALU;
  localparam uword_t AB_ALU  = uword_t'(1) << G_ABUS_ALU;
  localparam uword_t DB_MBR  = uword_t'(1) << G_DBUS_MBR;
  localparam uword_t SP_DB   = uword_t'(1) << G_SP_DBUS;
  localparam uword_t X_DB    = uword_t'(1) << G_X_DBUS;
  localparam uword_t X_18    = uword_t'(1) << G_X_18;
  localparam uword_t ACC_DB  = uword_t'(1) << G_ACC_DBUS;
  localparam uword_t MAR_IC  = uword_t'(1) << G_MAR_IC;
  localparam uword_t IC_DB   = uword_t'(1) << G_IC_DBUS;
  localparam uword_t MAR_AB  = uword_t'(1) << G_MAR_ABUS;
  localparam uword_t MBR_DB  = uword_t'(1) << G_MBR_DBUS;
  localparam uword_t IX_DB   = uword_t'(1) << G_IX_DBUS;
  localparam uword_t MBR_MEM = uword_t'(1) << G_MBR_MEM;
  localparam uword_t MEM_MBR = uword_t'(1) << G_MEM_MBR;
  localparam uword_t STOP    = uword_t'(1) << G_START_OFF;
  localparam uword_t INV_L   = uword_t'(1) << G_INV_LEFT;
  localparam uword_t INV_R   = uword_t'(1) << G_INV_RIGHT;
  localparam uword_t X_10    = uword_t'(1) << G_X_10;
  localparam uword_t DB_MAR  = uword_t'(1) << G_DBUS_MAR;

  // TEST selectors
  typedef enum int unsigned {
    S_IC = UF_SEL_IC, S_IX = UF_SEL_IX, S_SP = UF_SEL_SP, S_X = UF_SEL_X,
    S_ACC = UF_SEL_ACC, S_MBR = UF_SEL_MBR, S_MAR = UF_SEL_MAR,
    S_OC = UF_SEL_OC, S_II = UF_SEL_II, S_ZD = UF_SEL_ZD
  } tsel_e;

  class MicroAsm;
    uword_t code [USTORE_WORDS];
    int     labels [string];
    int     pc;
    bit     final_pass;
    int     errors;

    function new();
      foreach (code[i]) code[i] = '0;
      pc = 0; final_pass = 0; errors = 0;
    endfunction

    function void start_pass(bit fin);
      final_pass = fin;
      pc = 0;
    endfunction

    function void L(string name);
      if (!final_pass) labels[name] = pc;
    endfunction

    function int addr_of(string name);
      if (!final_pass) return 0;
      if (!labels.exists(name)) begin
        $display("micro-assembler: undefined label %s", name);
        errors++;
        return 0;
      end
      return labels[name];
    endfunction

    function void emit(uword_t w);
      if (pc >= USTORE_WORDS) begin
        if (final_pass) begin
          $display("micro-assembler: control store overflow");
          errors++;
        end
      end else code[pc] = w;
      pc++;
    endfunction

    // GATE micro-instruction
    function void G(uword_t gates);
      emit(gates | uword_t'(1));
    endfunction

    // TEST micro-instruction: if (reg.bit) = cmp then goto target
    function void T(tsel_e sel, int bitn, bit cmp, string target);
      uword_t w = '0;
      w[sel] = 1'b1;
      w[UF_BITNUM_LO +: 5] = 5'(bitn);
      w[UF_CMP] = cmp;
      w[UF_ADDR_LO +: 10] = 10'(addr_of(target));
      emit(w);
    endfunction

    // goto target
    function void GO(string target);
      uword_t w = '0;
      w[UF_ADDR_LO +: 10] = 10'(addr_of(target));
      emit(w);
    endfunction
  endclass

  // Register numbers of the register instructions and their gates.
  function automatic uword_t reg_left(int r);
    case (r) 0: return L_ACC; 1: return L_IC; 2: return L_IX; default: return L_SP; endcase
  endfunction
  function automatic uword_t reg_right(int r);
    case (r) 0: return R_ACC; 1: return R_IC; 2: return R_IX; default: return R_SP; endcase
  endfunction
  function automatic uword_t reg_load(int r);
    case (r) 0: return ACC_DB; 1: return IC_DB; 2: return IX_DB; default: return SP_DB; endcase
  endfunction

  // Op-codes that have a routine in the default micro-program.
  function automatic bit implemented(int op);
    return (op >= 1 && op <= 37) || op == 63;
  endfunction

  function automatic string op_label(int op);
    return implemented(op) ? $sformatf("op%0d", op) : "fetch";
  endfunction

  // Decode tree over OC bits: one TEST per node, a goto per leaf.
  function automatic void decode_tree(MicroAsm m, int lo, int hi);
    int mid, bitn;
    if (lo == hi) begin
      m.GO(op_label(lo));
      return;
    end
    mid  = (lo + hi + 1) / 2;
    bitn = $clog2(hi - lo + 1) - 1;
    m.T(S_OC, bitn, 1'b1, $sformatf("dec_%0d_%0d", mid, hi));
    decode_tree(m, lo, mid - 1);
    m.L($sformatf("dec_%0d_%0d", mid, hi));
    decode_tree(m, mid, hi);
  endfunction

  // Branch on the register number in MAR bits 1..0 to <p>_0 .. <p>_3.
  function automatic void reg_switch(MicroAsm m, string p);
    m.T(S_MAR, 1, 1'b1, {p, "_hi"});
    m.T(S_MAR, 0, 1'b1, {p, "_1"});
    m.GO({p, "_0"});
    m.L({p, "_hi"});
    m.T(S_MAR, 0, 1'b1, {p, "_3"});
    m.GO({p, "_2"});
  endfunction

  // Bit-serial logic operation on ACC and memory: kind 0 = and, 1 = or, 2 = xor.
  function automatic void logic_op(MicroAsm m, string p, int kind);
    m.G(MBR_MEM | X_18);
    m.L({p, "_loop"});
    m.T(S_ACC, 17, 1'b1, {p, "_a1"});
    // ACC bit is 0
    case (kind)
      0: m.GO({p, "_r0"});
      default: begin m.T(S_MBR, 17, 1'b1, {p, "_r1"}); m.GO({p, "_r0"}); end
    endcase
    m.L({p, "_a1"});
    case (kind)
      1: m.GO({p, "_r1"});
      0: begin m.T(S_MBR, 17, 1'b1, {p, "_r1"}); m.GO({p, "_r0"}); end
      default: begin m.T(S_MBR, 17, 1'b0, {p, "_r1"}); m.GO({p, "_r0"}); end
    endcase
    m.L({p, "_r1"});
    m.G(L_ACC | R_0 | LSH | DB_ALU | ACC_DB);
    m.G(L_ACC | R_1 | DB_ALU | ACC_DB);
    m.GO({p, "_next"});
    m.L({p, "_r0"});
    m.G(L_ACC | R_0 | LSH | DB_ALU | ACC_DB);
    m.L({p, "_next"});
    m.G(L_MBR | R_0 | LSH | DB_ALU | MBR_DB);
    m.G(L_X | R_M1 | DB_ALU | X_DB);
    m.T(S_ZD, 0, 1'b0, {p, "_loop"});
    m.GO("fetch");
  endfunction

  function automatic void default_program(MicroAsm m);
    // initialise IC and SP
    m.G(L_0 | R_0 | DB_ALU | IC_DB | SP_DB);
    // fetch, op-code and flags to OC/II, address field to MAR, IC + 1
    m.L("fetch");
    m.G(MAR_IC | MBR_MEM);
    m.G(OC_MBR | II_MBR | MAR_MBR | L_IC | R_1 | DB_ALU | IC_DB);
    // indexing
    m.T(S_II, 0, 1'b0, "no_index");
    m.G(DB_MAR | X_DB);
    m.G(L_X | R_IX | AB_ALU | MAR_AB);
    // indirection
    m.L("no_index");
    m.T(S_II, 1, 1'b0, "decode");
    m.G(MBR_MEM);
    m.G(MAR_MBR);
    m.L("decode");
    decode_tree(m, 0, 63);

    // 1 add
    m.L("op1");  m.G(MBR_MEM); m.G(L_MBR | R_ACC | DB_ALU | ACC_DB); m.GO("fetch");
    // 2 sub: X = ~M + 1, ACC = ACC + X
    m.L("op2");  m.G(MBR_MEM); m.G(L_MBR | INV_L | R_1 | DB_ALU | X_DB);
                 m.G(L_X | R_ACC | DB_ALU | ACC_DB); m.GO("fetch");
    // 3 lda
    m.L("op3");  m.G(MBR_MEM); m.G(DB_MBR | ACC_DB); m.GO("fetch");
    // 4 sta
    m.L("op4");  m.G(L_ACC | R_0 | DB_ALU | MBR_DB | MEM_MBR); m.GO("fetch");
    // 5 incr, 6 decr
    m.L("op5");  reg_switch(m, "incr");
    for (int r = 0; r < 4; r++) begin
      m.L($sformatf("incr_%0d", r)); m.G(reg_left(r) | R_1 | DB_ALU | reg_load(r)); m.GO("fetch");
    end
    m.L("op6");  reg_switch(m, "decr");
    for (int r = 0; r < 4; r++) begin
      m.L($sformatf("decr_%0d", r)); m.G(reg_left(r) | R_M1 | DB_ALU | reg_load(r)); m.GO("fetch");
    end
    // 7 addai, 8 subai
    m.L("op7");  m.G(DB_MAR | X_DB); m.G(L_X | R_ACC | DB_ALU | ACC_DB); m.GO("fetch");
    m.L("op8");  m.G(DB_MAR | X_DB); m.G(L_ACC | R_X | INV_R | DB_ALU | ACC_DB);
                 m.G(L_ACC | R_1 | DB_ALU | ACC_DB); m.GO("fetch");
    // 9 addixi, 10 subixi
    m.L("op9");  m.G(DB_MAR | X_DB); m.G(L_X | R_IX | DB_ALU | IX_DB); m.GO("fetch");
    m.L("op10"); m.G(DB_MAR | X_DB); m.G(L_IX | R_X | INV_R | DB_ALU | IX_DB);
                 m.G(L_IX | R_1 | DB_ALU | IX_DB); m.GO("fetch");
    // 11 addspi, 12 subspi
    m.L("op11"); m.G(DB_MAR | X_DB); m.G(L_X | R_SP | DB_ALU | SP_DB); m.GO("fetch");
    m.L("op12"); m.G(DB_MAR | X_DB); m.G(L_SP | R_X | INV_R | DB_ALU | SP_DB);
                 m.G(L_SP | R_1 | DB_ALU | SP_DB); m.GO("fetch");
    // 13 addar
    m.L("op13"); reg_switch(m, "addar");
    for (int r = 0; r < 4; r++) begin
      m.L($sformatf("addar_%0d", r)); m.G(reg_left(r) | R_ACC | DB_ALU | ACC_DB); m.GO("fetch");
    end
    // 14 subar: X = ACC + ~R, ACC = X + 1
    m.L("op14"); reg_switch(m, "subar");
    for (int r = 0; r < 4; r++) begin
      m.L($sformatf("subar_%0d", r)); m.G(L_ACC | reg_right(r) | INV_R | DB_ALU | X_DB);
      m.G(L_X | R_1 | DB_ALU | ACC_DB); m.GO("fetch");
    end
    // 15 addixr
    m.L("op15"); reg_switch(m, "addixr");
    for (int r = 0; r < 4; r++) begin
      m.L($sformatf("addixr_%0d", r)); m.G(reg_left(r) | R_IX | DB_ALU | IX_DB); m.GO("fetch");
    end
    // 16 subixr
    m.L("op16"); reg_switch(m, "subixr");
    for (int r = 0; r < 4; r++) begin
      m.L($sformatf("subixr_%0d", r)); m.G(L_IX | reg_right(r) | INV_R | DB_ALU | X_DB);
      m.G(L_X | R_1 | DB_ALU | IX_DB); m.GO("fetch");
    end
    // 17 ldar, 18 ldixr, 19 ldicr
    m.L("op17"); reg_switch(m, "ldar");
    for (int r = 0; r < 4; r++) begin
      m.L($sformatf("ldar_%0d", r)); m.G(reg_left(r) | R_0 | DB_ALU | ACC_DB); m.GO("fetch");
    end
    m.L("op18"); reg_switch(m, "ldixr");
    for (int r = 0; r < 4; r++) begin
      m.L($sformatf("ldixr_%0d", r)); m.G(reg_left(r) | R_0 | DB_ALU | IX_DB); m.GO("fetch");
    end
    m.L("op19"); reg_switch(m, "ldicr");
    for (int r = 0; r < 4; r++) begin
      m.L($sformatf("ldicr_%0d", r)); m.G(reg_left(r) | R_0 | DB_ALU | IC_DB); m.GO("fetch");
    end
    // 20 inva, 21 invix
    m.L("op20"); m.G(L_ACC | INV_L | R_0 | DB_ALU | ACC_DB); m.GO("fetch");
    m.L("op21"); m.G(L_IX | INV_L | R_0 | DB_ALU | IX_DB); m.GO("fetch");
    // 22 anda, 23 ora, 24 xora
    m.L("op22"); logic_op(m, "and", 0);
    m.L("op23"); logic_op(m, "or", 1);
    m.L("op24"); logic_op(m, "xor", 2);
    // 25 rsfta, 26 lsfta
    m.L("op25"); m.G(L_ACC | R_0 | RSH | DB_ALU | ACC_DB); m.GO("fetch");
    m.L("op26"); m.G(L_ACC | R_0 | LSH | DB_ALU | ACC_DB); m.GO("fetch");
    // 27 jmp
    m.L("op27"); m.G(DB_MAR | IC_DB); m.GO("fetch");
    // 28 jaz, 29 janz, 30 jixz, 31 jixnz
    m.L("op28"); m.G(L_ACC | R_0); m.T(S_ZD, 0, 1'b1, "op27"); m.GO("fetch");
    m.L("op29"); m.G(L_ACC | R_0); m.T(S_ZD, 0, 1'b0, "op27"); m.GO("fetch");
    m.L("op30"); m.G(L_IX | R_0);  m.T(S_ZD, 0, 1'b1, "op27"); m.GO("fetch");
    m.L("op31"); m.G(L_IX | R_0);  m.T(S_ZD, 0, 1'b0, "op27"); m.GO("fetch");
    // 32 call: X = target, SP = MAR = SP - 1, M[SP] = IC, IC = X
    m.L("op32"); m.G(DB_MAR | X_DB);
                 m.G(L_SP | R_M1 | DB_ALU | SP_DB | AB_ALU | MAR_AB);
                 m.G(L_IC | R_0 | DB_ALU | MBR_DB | MEM_MBR);
                 m.G(L_X | R_0 | DB_ALU | IC_DB); m.GO("fetch");
    // 33 ret: IC = M[SP], SP = SP + 1
    m.L("op33"); m.G(L_SP | R_0 | AB_ALU | MAR_AB | MBR_MEM);
                 m.G(DB_MBR | IC_DB);
                 m.G(L_SP | R_1 | DB_ALU | SP_DB); m.GO("fetch");
    // 34 pusha, 35 popa
    m.L("op34"); m.G(L_SP | R_M1 | DB_ALU | SP_DB | AB_ALU | MAR_AB);
                 m.G(L_ACC | R_0 | DB_ALU | MBR_DB | MEM_MBR); m.GO("fetch");
    m.L("op35"); m.G(L_SP | R_0 | AB_ALU | MAR_AB | MBR_MEM);
                 m.G(DB_MBR | ACC_DB);
                 m.G(L_SP | R_1 | DB_ALU | SP_DB); m.GO("fetch");
    // 36 zeroa, 37 ldai
    m.L("op36"); m.G(L_0 | R_0 | DB_ALU | ACC_DB); m.GO("fetch");
    m.L("op37"); m.G(DB_MAR | ACC_DB); m.GO("fetch");
    // 63 hlt
    m.L("op63"); m.G(STOP); m.GO("fetch");
  endfunction

  // Assemble the default micro-program; returns the number of errors.
  function automatic int build_default(output uword_t image [USTORE_WORDS], output int used);
    MicroAsm m = new();
    m.start_pass(0); default_program(m);
    m.start_pass(1); default_program(m);
    image = m.code;
    used  = m.pc;
    return m.errors;
  endfunction

endpackage
