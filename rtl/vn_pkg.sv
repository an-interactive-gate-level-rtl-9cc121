// vn_pkg: widths, gate numbers, clock phases and micro-instruction fields
// shared by the whole machine.
//
// The machine is an 18-bit accumulator computer with a 10-bit address space
// and a 512-word, 41-bit control store.  Every data movement is caused by one
// of 40 numbered gates.  The gate numbers, register widths, memory sizes,
// phase partition and micro-instruction bit positions below follow the
// machine's published description; the names of the enum members are this
// design's own spellings of the symbolic micro-operations.
package vn_pkg;

  localparam int unsigned WORD_W   = 18;   // data word, ACC, X, MBR, buses
  localparam int unsigned ADDR_W   = 10;   // IC, IX, SP, MAR, address bus
  localparam int unsigned OC_W     = 6;    // op-code register
  localparam int unsigned II_W     = 2;    // indexing / indirection register
  localparam int unsigned MEM_WORDS  = 1024;
  localparam int unsigned USTORE_WORDS = 512;
  localparam int unsigned UWORD_W  = 41;   // micro-instruction, bits 0..40
  localparam int unsigned CSAR_W   = 9;
  localparam int unsigned NGATES   = 40;

  typedef logic [WORD_W-1:0]  word_t;
  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [UWORD_W-1:0] uword_t;
  typedef logic [CSAR_W-1:0]  uaddr_t;
  // gates[n] is gate Gn; bit 0 is unused so that indices match gate numbers
  typedef logic [NGATES:0]    gates_t;

  // Gate numbers, in the order of the symbolic micro-operation list.
  typedef enum int unsigned {
    G_ALU_RIGHT_IC   = 1,  G_ALU_LEFT_IC    = 2,
    G_ALU_RIGHT_IX   = 3,  G_ALU_LEFT_IX    = 4,
    G_ALU_RIGHT_SP   = 5,  G_ALU_LEFT_SP    = 6,
    G_ALU_RIGHT_X    = 7,  G_ALU_LEFT_X     = 8,
    G_ALU_RIGHT_ACC  = 9,  G_ALU_LEFT_ACC   = 10,
    G_ALU_RIGHT_M1   = 11, G_ALU_LEFT_ZERO  = 12,
    G_ALU_RIGHT_ZERO = 13, G_ALU_RIGHT_ONE  = 14,
    G_ALU_RIGHT_SIGN = 15, G_MAR_MBR        = 16,
    G_OC_MBR         = 17, G_II_MBR         = 18,
    G_ALU_LEFT_MBR   = 19, G_LEFT_SHIFT     = 20,
    G_RIGHT_SHIFT    = 21, G_DBUS_ALU       = 22,
    G_ABUS_ALU       = 23, G_DBUS_MBR       = 24,
    G_SP_DBUS        = 25, G_X_DBUS         = 26,
    G_X_18           = 27, G_ACC_DBUS       = 28,
    G_MAR_IC         = 29, G_IC_DBUS        = 30,
    G_MAR_ABUS       = 31, G_MBR_DBUS       = 32,
    G_IX_DBUS        = 33, G_MBR_MEM        = 34,
    G_MEM_MBR        = 35, G_START_OFF      = 36,
    G_INV_LEFT       = 37, G_INV_RIGHT      = 38,
    G_X_10           = 39, G_DBUS_MAR       = 40
  } gate_e;

  // Clock phases.  P0 selects adder operands and moves MBR fields, P1 moves
  // data over the data and address buses, P2 accesses memory and START.
  typedef enum logic [1:0] { P0 = 2'd0, P1 = 2'd1, P2 = 2'd2 } phase_e;

  // Gate-to-phase partition: gates 1-19, 37, 38 in P0; 20-33, 39, 40 in P1;
  // 34-36 in P2.
  localparam gates_t PHASE0_GATES = 41'h060_000F_FFFE;
  localparam gates_t PHASE1_GATES = 41'h183_FFF0_0000;
  localparam gates_t PHASE2_GATES = 41'h01C_0000_0000;

  // Constant registers
  localparam word_t K_ZERO  = '0;
  localparam word_t K_ONE   = word_t'(1);
  localparam word_t K_M1    = '1;
  localparam word_t K_SIGN  = word_t'(1) << (WORD_W - 1);
  localparam word_t K_TEN   = word_t'(10);
  localparam word_t K_EIGHTEEN = word_t'(18);

  // Micro-instruction fields.  Bit 0 selects the format: 1 = GATE, 0 = TEST.
  localparam int unsigned UF_FORMAT   = 0;
  // TEST format register selectors, one bit each (linear encoding)
  localparam int unsigned UF_SEL_IC   = 1;
  localparam int unsigned UF_SEL_IX   = 2;
  localparam int unsigned UF_SEL_SP   = 3;
  localparam int unsigned UF_SEL_X    = 4;
  localparam int unsigned UF_SEL_ACC  = 5;
  localparam int unsigned UF_SEL_MBR  = 6;
  localparam int unsigned UF_SEL_MAR  = 7;
  localparam int unsigned UF_SEL_OC   = 8;
  localparam int unsigned UF_SEL_II   = 9;
  localparam int unsigned UF_BITNUM_LO = 10;  // bits 10..14, binary
  localparam int unsigned UF_CMP      = 15;
  localparam int unsigned UF_ADDR_LO  = 16;  // bits 16..25, binary
  localparam int unsigned UF_SEL_ZD   = 26;

  // Register values presented to the TEST logic
  typedef struct packed {
    addr_t ic;
    addr_t ix;
    addr_t sp;
    word_t x;
    word_t acc;
    word_t mbr;
    addr_t mar;
    logic [OC_W-1:0] oc;
    logic [II_W-1:0] ii;
    logic zd;
  } regview_t;

endpackage
