// tb_vn_computer: end-to-end test of the whole machine at its default sizes.
//
// The control store is loaded with the default micro-program and main memory
// with a program through the halted machine's ports; the start button is
// pulsed and the test waits for the machine to stop itself (start=off).
// Results are compared with an independent instruction-level reference
// model (vn_isa_pkg::RefMachine) over all of memory and the user registers.
//   1. The published sample program: the first 25 Fibonacci numbers into
//      locations 50..74, using call/ret, indexed loads and stores and a
//      janz loop.  Its machine code is also compared with the published
//      memory dump.
//   2. A directed program that uses every default instruction, indirection
//      combined with indexing, the stack and every branch both ways.
//   3. Random straight-line programs with forward branches.
//   4. A short special micro-program for the gates the default micro-program
//      never opens (x=10, alu-right=sign), and a TEST on a bit above a
//      register's width.
// The test counts how often each mechanism happens (every gate, TEST taken
// and not taken, zero-detect set and cleared, halt, indexing, indirection)
// and counts a failure for any that never happens.  Every time the second
// fetch micro-instruction runs, its P0 gates and CSAR are compared with the
// published display example (open gates 2 14 16 17 18, CSAR = 3).  That display
// is a snapshot of the Fibonacci run, taken while the instruction at address 3
// (sta 0(), indexed) is being fetched with IX = 71.  The test finds that moment
// and compares every register and bus the display shows: the buses in P0, and
// MAR, OC and II once the P0 gates have loaded them.  It also checks that a
// micro-cycle is three clocks.
module tb_vn_computer;
  import vn_pkg::*;
  import vn_microcode_pkg::*;
  import vn_isa_pkg::*;

  localparam int NRANDOM   = 12;
  localparam int WATCHDOG  = 3_000_000;

  logic     clk = 1'b0, rst_n = 1'b0, start_button = 1'b0;
  logic     us_we = 1'b0, ext_we = 1'b0;
  uaddr_t   us_addr = '0;
  uword_t   us_wdata = '0;
  addr_t    ext_addr = '0;
  word_t    ext_wdata = '0, ext_rdata;
  logic     running, test_taken, bus_contention;
  phase_e   phase;
  uaddr_t   csar;
  uword_t   csbr;
  gates_t   gates;
  regview_t regs;
  word_t    data_bus, left_bus, right_bus, alu_out;
  addr_t    addr_bus;

  vn_computer dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- mechanism counters ----------------
  int gate_seen [1:NGATES];
  int n_test_taken = 0, n_test_not = 0, n_zd_set = 0, n_zd_clr = 0;
  int n_halts = 0, n_contention = 0, n_index = 0, n_indirect = 0;
  int n_ucycles = 0, n_run_clocks = 0, n_display = 0;
  // The second fetch word of the default micro-program, as in the published
  // display example: in P0 it opens gates 2 14 16 17 18 while CSAR = 3.
  localparam uword_t FETCH2 = OC_MBR | II_MBR | MAR_MBR | L_IC | R_1 | DB_ALU | IC_DB | uword_t'(1);
  localparam uword_t FETCH2_P0 = L_IC | R_1 | MAR_MBR | OC_MBR | II_MBR;
  logic running_q = 1'b0, zd_q = 1'b0;
  bit   in_fibonacci = 1'b0, snap_pending = 1'b0;
  int   n_snapshot = 0;

  initial foreach (gate_seen[i]) gate_seen[i] = 0;

  always @(posedge clk) begin
    for (int i = 1; i <= NGATES; i++) if (gates[i]) gate_seen[i]++;
    if (running) begin
      n_run_clocks++;
      if (phase == P2) begin
        n_ucycles++;
        if (!csbr[UF_FORMAT]) begin
          if (test_taken) n_test_taken++; else n_test_not++;
        end
      end
    end
    if (bus_contention) n_contention++;
    if (running && phase == P0 && csbr == FETCH2) begin
      n_display++;
      check(gates == FETCH2_P0 && csar == 9'd3, "display example: gates 2 14 16 17 18 with CSAR = 3");
    end
    if (snap_pending) begin
      snap_pending <= 1'b0;
      check(regs.mar == addr_t'(0) && regs.oc == 6'd4 && regs.ii == 2'd1 && regs.ic == addr_t'(3),
            "display snapshot after P0: MAR=0 OC=4 II=1 IC=3");
    end
    if (in_fibonacci && running && phase == P0 && csbr == FETCH2 &&
        regs.ix == addr_t'(71) && regs.ic == addr_t'(3)) begin
      n_snapshot++;
      snap_pending <= 1'b1;
      check(regs.acc == word_t'(17711) && regs.mbr == word_t'(17408) && regs.x == word_t'(1023) &&
            regs.sp == addr_t'(0) && left_bus == word_t'(3) && right_bus == word_t'(1) &&
            data_bus == word_t'(0) && addr_bus == addr_t'(0) && csar == uaddr_t'(3),
            "display snapshot: ACC=17711 MBR=17408 X=1023 SP=0 buses 3/1/0/0");
    end
    if (regs.zd && !zd_q) n_zd_set++;
    if (!regs.zd && zd_q) n_zd_clr++;
    zd_q <= regs.zd;
    if (running_q && !running) n_halts++;
    running_q <= running;
    if (gates[G_II_MBR]) begin
      if (regs.mbr[10]) n_index++;
      if (regs.mbr[11]) n_indirect++;
    end
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------- machine access ----------------
  task automatic do_reset();
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
  endtask

  task automatic load_ustore(uword_t image [USTORE_WORDS]);
    for (int a = 0; a < USTORE_WORDS; a++) begin
      @(negedge clk);
      us_we = 1'b1; us_addr = uaddr_t'(a); us_wdata = image[a];
    end
    @(negedge clk) us_we = 1'b0;
  endtask

  task automatic load_memory(word_t image [MEM_WORDS]);
    for (int a = 0; a < MEM_WORDS; a++) begin
      @(negedge clk);
      ext_we = 1'b1; ext_addr = addr_t'(a); ext_wdata = image[a];
    end
    @(negedge clk) ext_we = 1'b0;
  endtask

  task automatic read_memory(output word_t image [MEM_WORDS]);
    for (int a = 0; a < MEM_WORDS; a++) begin
      @(negedge clk);
      ext_addr = addr_t'(a);
      #1 image[a] = ext_rdata;
    end
  endtask

  task automatic read_word(int a, output word_t w);
    @(negedge clk);
    ext_addr = addr_t'(a);
    #1 w = ext_rdata;
  endtask

  // Pulse the start button and wait until the machine stops itself.
  task automatic run_to_halt(int max_clocks, output int clocks, output int ucycles);
    int rc0, uc0;
    rc0 = n_run_clocks; uc0 = n_ucycles;
    @(negedge clk) start_button = 1'b1;
    @(negedge clk) start_button = 1'b0;
    clocks = 0;
    while (running && clocks < max_clocks) begin
      @(posedge clk);
      clocks++;
    end
    check(!running, "machine did not halt");
    @(negedge clk);
    clocks  = n_run_clocks - rc0;
    ucycles = n_ucycles - uc0;
  endtask

  // Run a program on the machine and on the reference model and compare.
  task automatic run_and_compare(string name, word_t image [MEM_WORDS], int max_steps,
                                 output RefMachine ref_m);
    word_t after [MEM_WORDS];
    int clocks, ucycles, bad;
    ref_m = new();
    ref_m.mem = image;
    ref_m.run(max_steps);
    check(ref_m.halted == 1, {name, ": reference model did not halt"});
    do_reset();
    load_memory(image);
    run_to_halt(200 * max_steps * 3, clocks, ucycles);
    // three clocks per micro-cycle, plus one to fill CSBR after reset
    check(clocks == 3 * ucycles + 1, $sformatf("%s: %0d clocks for %0d micro-cycles", name, clocks, ucycles));
    read_memory(after);
    bad = 0;
    for (int a = 0; a < MEM_WORDS; a++) begin
      checks++;
      if (after[a] !== ref_m.mem[a]) begin
        bad++; failures++;
        if (bad < 5) $display("FAIL: %s: mem[%0d] = %0d, expected %0d", name, a, after[a], ref_m.mem[a]);
      end
    end
    check(regs.acc == ref_m.acc, $sformatf("%s: ACC %0d expected %0d", name, regs.acc, ref_m.acc));
    check(regs.ix  == ref_m.ix,  $sformatf("%s: IX %0d expected %0d", name, regs.ix, ref_m.ix));
    check(regs.sp  == ref_m.sp,  $sformatf("%s: SP %0d expected %0d", name, regs.sp, ref_m.sp));
    check(regs.ic  == ref_m.ic,  $sformatf("%s: IC %0d expected %0d", name, regs.ic, ref_m.ic));
    $display("%s: %0d instructions, %0d micro-cycles, %0d clocks", name, ref_m.steps, ucycles, clocks);
  endtask

  // ---------------- programs ----------------
  function automatic void fibonacci(output word_t m [MEM_WORDS]);
    foreach (m[i]) m[i] = '0;
    m[0]   = enc(CALL, 100);
    m[1]   = enc(LDA, -2, 0, 1);
    m[2]   = enc(ADD, -1, 0, 1);
    m[3]   = enc(STA, 0, 0, 1);
    m[4]   = enc(INCR, REG_IX);
    m[5]   = enc(LDAI, 50);
    m[6]   = enc(ADDAI, 25);
    m[7]   = enc(SUBAR, REG_IX);
    m[8]   = enc(JANZ, 1);
    m[9]   = enc(HLT, 0);
    m[100] = enc(LDAI, 50);
    m[101] = enc(LDIXR, REG_ACC);
    m[102] = enc(LDAI, 1);
    m[103] = enc(STA, 0, 0, 1);
    m[104] = enc(INCR, REG_IX);
    m[105] = enc(STA, 0, 0, 1);
    m[106] = enc(INCR, REG_IX);
    m[107] = enc(RET, 0);
  endfunction

  function automatic void directed(output word_t m [MEM_WORDS]);
    int p = 0;
    foreach (m[i]) m[i] = '0;
    m[p++] = enc(LDAI, 7);        m[p++] = enc(STA, 300);
    m[p++] = enc(LDAI, 300);      m[p++] = enc(STA, 301);
    m[p++] = enc(ZEROA, 0);       m[p++] = enc(LDA, 301, 1);       // indirect
    m[p++] = enc(ADDAI, 10);      m[p++] = enc(SUBAI, 3);
    m[p++] = enc(SUB, 300);       m[p++] = enc(ADD, 300);
    m[p++] = enc(LSFTA, 0);       m[p++] = enc(RSFTA, 0);
    m[p++] = enc(INVA, 0);        m[p++] = enc(STA, 302);
    m[p++] = enc(LDAI, 341);      m[p++] = enc(STA, 303);
    m[p++] = enc(LDA, 302);       m[p++] = enc(ANDA, 303);  m[p++] = enc(STA, 304);
    m[p++] = enc(LDA, 302);       m[p++] = enc(ORA, 303);   m[p++] = enc(STA, 305);
    m[p++] = enc(LDA, 302);       m[p++] = enc(XORA, 303);  m[p++] = enc(STA, 306);
    m[p++] = enc(ADDIXI, 5);      m[p++] = enc(SUBIXI, 2);
    m[p++] = enc(INVIX, 0);       m[p++] = enc(INVIX, 0);
    m[p++] = enc(ADDSPI, 4);      m[p++] = enc(SUBSPI, 1);
    m[p++] = enc(LDAR, REG_IX);   m[p++] = enc(ADDAR, REG_SP);
    m[p++] = enc(SUBAR, REG_IC);  m[p++] = enc(ADDIXR, REG_ACC);
    m[p++] = enc(SUBIXR, REG_SP); m[p++] = enc(DECR, REG_ACC);
    m[p++] = enc(INCR, REG_SP);   m[p++] = enc(DECR, REG_IX);
    m[p++] = enc(STA, 307);       m[p++] = enc(ADDAR, REG_ACC);
    m[p++] = enc(SUBAR, REG_ACC); m[p++] = enc(ADDIXR, REG_IX);
    m[p++] = enc(SUBIXR, REG_IC); m[p++] = enc(ADDAR, REG_IC);
    m[p++] = enc(ADDIXR, REG_IC); m[p++] = enc(SUBIXR, REG_IX);
    m[p++] = enc(SUBAR, REG_SP);  m[p++] = enc(LDAR, REG_SP);
    m[p++] = enc(LDAR, REG_IC);   m[p++] = enc(LDAR, REG_ACC);
    m[p++] = enc(LDIXR, REG_IX);  m[p++] = enc(LDIXR, REG_IC);
    m[p++] = enc(INCR, REG_ACC);  m[p++] = enc(DECR, REG_SP);
    m[p++] = enc(SUBAR, REG_IX);  m[p++] = enc(ADDAR, REG_IX);
    m[p++] = enc(ADDIXR, REG_SP); m[p++] = enc(SUBIXR, REG_ACC);
    m[p++] = enc(SUBSPI, 3);      m[p++] = enc(PUSHA, 0);
    m[p++] = enc(ZEROA, 0);       m[p++] = enc(POPA, 0);
    m[p++] = enc(STA, 308);       m[p++] = enc(LDIXR, REG_SP);
    m[p++] = enc(STA, 309);
    m[p] = enc(JAZ, p + 2); p++;  m[p++] = enc(ZEROA, 0);     // not taken
    m[p] = enc(JAZ, p + 2); p++;  m[p++] = enc(HLT, 0);       // taken
    m[p] = enc(JANZ, p + 2); p++; m[p++] = enc(LDIXR, REG_ACC); // not taken
    m[p] = enc(JIXZ, p + 2); p++; m[p++] = enc(HLT, 0);       // taken
    m[p] = enc(JIXNZ, p + 2); p++; m[p++] = enc(INCR, REG_IX); // not taken
    m[p] = enc(JIXNZ, p + 2); p++; m[p++] = enc(HLT, 0);      // taken
    m[p] = enc(JIXZ, p + 2); p++; m[p++] = enc(ADDAI, 1);     // not taken
    m[p] = enc(JANZ, p + 2); p++; m[p++] = enc(HLT, 0);       // taken
    m[p++] = enc(CALL, 400);      m[p++] = enc(STA, 310);
    m[p++] = enc(LDA, 300, 1, 1); m[p++] = enc(STA, 311);     // indexed, then indirect
    m[p++] = enc(LDAI, 2);        m[p++] = enc(STA, 0, 1, 1); // indirect store via index
    m[p] = enc(JMP, p + 2); p++;  m[p++] = enc(HLT, 0);
    m[p] = enc(LDAI, p + 3); p++; m[p++] = enc(LDICR, REG_ACC); m[p++] = enc(HLT, 0);
    m[p++] = enc(INCR, REG_IC);   m[p++] = enc(HLT, 0);       // skipped
    m[p++] = {6'd40, 12'd0};      // op-code without a routine: no operation
    m[p++] = enc(NOP, 0);
    m[p++] = enc(HLT, 0);
    m[400] = enc(LDAI, 123);      m[401] = enc(PUSHA, 0);
    m[402] = enc(ZEROA, 0);       m[403] = enc(POPA, 0);
    m[404] = enc(RET, 0);
    m[300] = 18'd7;               m[301] = 18'd300;
    m[302] = 18'h2A5A5;           m[303] = 18'h15555;
  endfunction

  // Random straight-line program with forward branches, data at 200..299.
  function automatic void random_program(output word_t m [MEM_WORDS]);
    op_e safe [] = '{NOP, ADD, SUB, LDA, STA, INCR, DECR, ADDAI, SUBAI, ADDIXI,
                     SUBIXI, ADDSPI, SUBSPI, ADDAR, SUBAR, ADDIXR, SUBIXR, LDAR,
                     LDIXR, INVA, INVIX, ANDA, ORA, XORA, RSFTA, LSFTA, JMP, JAZ,
                     JANZ, JIXZ, JIXNZ, ZEROA, LDAI};
    foreach (m[i]) m[i] = '0;
    for (int a = 200; a < 300; a++) m[a] = word_t'($urandom);
    for (int p = 0; p < 60; p++) begin
      op_e op = safe[$urandom_range(safe.size() - 1)];
      int  rr = $urandom_range(3);
      case (op)
        STA:                    m[p] = enc(op, $urandom_range(200, 299));
        ADD, SUB, LDA, ANDA, ORA, XORA:
                                m[p] = enc(op, $urandom_range(1023), 1'($urandom), 1'($urandom));
        INCR, DECR:             m[p] = enc(op, (rr == REG_IC) ? REG_ACC : rr);
        ADDAR, SUBAR, ADDIXR, SUBIXR, LDAR, LDIXR:
                                m[p] = enc(op, rr);
        JMP, JAZ, JANZ, JIXZ, JIXNZ:
                                m[p] = enc(op, p + $urandom_range(2, 4));
        default:                m[p] = enc(op, $urandom_range(1023));
      endcase
    end
    for (int p = 60; p < 64; p++) m[p] = enc(HLT, 0);
  endfunction

  // ---------------- main sequence ----------------
  initial begin
    uword_t    uimage [USTORE_WORDS];
    word_t     prog [MEM_WORDS];
    RefMachine ref_m;
    int        used, errs, clocks, ucycles;
    int        fib [25];
    word_t     w;
    static int unsigned dump_addr [18] = '{0, 1, 2, 3, 4, 5, 6, 7, 8, 9,
                                    100, 101, 102, 103, 104, 105, 106, 107};
    static int unsigned dump_val  [18] = '{131172, 14334, 6143, 17408, 20482, 151602,
                                    28697, 57346, 118785, 258048, 151602, 73728,
                                    151553, 17408, 20482, 17408, 20482, 135168};

    do_reset();
    errs = build_default(uimage, used);
    check(errs == 0, "default micro-program does not assemble");
    check(used <= USTORE_WORDS, "default micro-program too long");
    $display("default micro-program: %0d of %0d words", used, USTORE_WORDS);
    load_ustore(uimage);

    // 1. Fibonacci
    fibonacci(prog);
    foreach (dump_addr[i])
      check(prog[dump_addr[i]] == word_t'(dump_val[i]),
            $sformatf("machine code at %0d differs from the published dump", dump_addr[i]));
    in_fibonacci = 1'b1;
    run_and_compare("fibonacci", prog, 2000, ref_m);
    in_fibonacci = 1'b0;
    fib[0] = 1; fib[1] = 1;
    for (int i = 2; i < 25; i++) fib[i] = fib[i-1] + fib[i-2];
    for (int i = 0; i < 25; i++)
      check(ref_m.mem[50 + i] == word_t'(fib[i]), $sformatf("reference F%0d", i + 1));
    read_word(74, w);
    check(w == word_t'(75025), "25th Fibonacci number at 74");
    read_word(1023, w);
    check(w == word_t'(1), "return address on the stack at 1023");
    check(regs.ix == 10'd75 && regs.acc == '0, "final IX and ACC");

    // 2. every instruction
    directed(prog);
    run_and_compare("directed", prog, 2000, ref_m);

    // 3. random programs
    for (int k = 0; k < NRANDOM; k++) begin
      random_program(prog);
      run_and_compare($sformatf("random%0d", k), prog, 200, ref_m);
    end

    // 4. gates the default micro-program leaves closed
    begin
      static MicroAsm m = new();
      for (int pass = 0; pass < 2; pass++) begin
        m.start_pass(pass == 1);
        m.G(X_10);
        m.G(L_X | R_SIGN | DB_ALU | ACC_DB);
        m.G(X_18);
        m.T(S_X, 20, 1'b0, "ok");          // bit 20 of an 18-bit register reads 0
        m.G(STOP);
        m.L("ok");
        m.G(L_X | R_X | RSH | DB_ALU | IX_DB);
        m.G(STOP);
      end
      check(m.errors == 0, "special micro-program does not assemble");
      do_reset();
      load_ustore(m.code);
      run_to_halt(100, clocks, ucycles);
      check(regs.acc == (K_SIGN | 18'd10), $sformatf("x=10 plus sign: ACC=%0h", regs.acc));
      check(regs.ix == 10'd18, $sformatf("(18+18)>>1: IX=%0d", regs.ix));
      check(ucycles == 6, $sformatf("special micro-program took %0d micro-cycles", ucycles));
    end

    // ---------------- mechanism coverage ----------------
    for (int i = 1; i <= NGATES; i++)
      check(gate_seen[i] > 0, $sformatf("gate G%0d never opened", i));
    check(n_test_taken > 0, "no TEST branch taken");
    check(n_test_not > 0, "no TEST branch falling through");
    check(n_zd_set > 0 && n_zd_clr > 0, "zero-detect flag never toggled");
    check(n_index > 0, "no indexed instruction");
    check(n_indirect > 0, "no indirect instruction");
    check(n_halts == NRANDOM + 3, $sformatf("%0d halts", n_halts));
    check(n_contention == 0, "bus contention");
    check(n_display > 0, "second fetch word never executed");
    check(n_snapshot == 1, "display snapshot state not reached exactly once");
    $display("display snapshot matched %0d time(s)", n_snapshot);
    $display("mechanisms: TEST taken %0d / not %0d, zd set %0d / cleared %0d, indexed %0d, indirect %0d, halts %0d, left-shift %0d, right-shift %0d",
             n_test_taken, n_test_not, n_zd_set, n_zd_clr, n_index, n_indirect, n_halts,
             gate_seen[G_LEFT_SHIFT], gate_seen[G_RIGHT_SHIFT]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
