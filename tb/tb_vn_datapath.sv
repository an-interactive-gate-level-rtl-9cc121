// tb_vn_datapath: drives the datapath gates directly, micro-cycle by
// micro-cycle, with random but legal gate sets (one source per bus, one
// source per register) in their own phases, and compares every register,
// the buses, the zero-detect flag and memory with a register-transfer model
// written from the gate table.  Counts each gate and fails if one never
// opened; this also covers the constant registers (0, +1, -1, sign, 10, 18).
module tb_vn_datapath;
  import vn_pkg::*;

  logic     clk = 0, rst_n = 0, p0_end = 0, p1_end = 0;
  gates_t   g = '0;
  word_t    mem_rdata, mem_wdata, data_bus, left_bus, right_bus, alu_out;
  addr_t    mem_addr, addr_bus;
  logic     mem_we, bus_contention;
  regview_t regs;
  word_t    mem [MEM_WORDS];

  vn_datapath dut (.*);
  assign mem_rdata = mem[mem_addr];
  always @(posedge clk) if (mem_we) mem[mem_addr] <= mem_wdata;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int seen [1:NGATES];

  // model state
  word_t m_x, m_acc, m_mbr, m_opa, m_opb, m_mem [MEM_WORDS];
  addr_t m_ic, m_ix, m_sp, m_mar;
  logic [5:0] m_oc;
  logic [1:0] m_ii;
  logic m_zd, m_used;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL: %s", what); end
  endtask

  task automatic compare(string when);
    check(regs.ic == m_ic && regs.ix == m_ix && regs.sp == m_sp, {when, ": IC/IX/SP"});
    check(regs.x == m_x && regs.acc == m_acc, {when, ": X/ACC"});
    check(regs.mbr == m_mbr && regs.mar == m_mar, {when, ": MBR/MAR"});
    check(regs.oc == m_oc && regs.ii == m_ii, {when, ": OC/II"});
    check(regs.zd == m_zd, {when, ": zero-detect"});
  endtask

  function automatic word_t pick_one(int n, word_t v []);
    return (n < 0) ? '0 : v[n];
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gate_e lg [7] = '{G_ALU_LEFT_IC, G_ALU_LEFT_IX, G_ALU_LEFT_SP, G_ALU_LEFT_X,
                      G_ALU_LEFT_ACC, G_ALU_LEFT_ZERO, G_ALU_LEFT_MBR};
    gate_e rg [9] = '{G_ALU_RIGHT_IC, G_ALU_RIGHT_IX, G_ALU_RIGHT_SP, G_ALU_RIGHT_X,
                      G_ALU_RIGHT_ACC, G_ALU_RIGHT_M1, G_ALU_RIGHT_ZERO,
                      G_ALU_RIGHT_ONE, G_ALU_RIGHT_SIGN};
    gate_e dg [3] = '{G_DBUS_ALU, G_DBUS_MBR, G_DBUS_MAR};
    foreach (seen[i]) seen[i] = 0;
    foreach (mem[i]) begin mem[i] = word_t'($urandom); m_mem[i] = mem[i]; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    m_x = 0; m_acc = 0; m_mbr = 0; m_opa = 0; m_opb = 0; m_ic = 0; m_ix = 0;
    m_sp = 0; m_mar = 0; m_oc = 0; m_ii = 0; m_zd = 0; m_used = 0;
    compare("after reset");

    for (int c = 0; c < 4000; c++) begin
      int ls, rs, ds, sh, xs, ms, mop;
      bit il, ir, ab, l_sp, l_acc, l_ic, l_mbr, l_ix, b_mar, b_oc, b_ii;
      word_t lv, rv, sum, sout, db;
      addr_t abv;
      ls = $urandom_range(7) - 1;  rs = $urandom_range(9) - 1;
      il = 1'($urandom); ir = 1'($urandom);
      b_mar = 1'($urandom); b_oc = 1'($urandom); b_ii = 1'($urandom);
      sh = $urandom_range(2); ds = $urandom_range(3) - 1; ab = 1'($urandom);
      l_sp = 1'($urandom); l_acc = 1'($urandom); l_ic = 1'($urandom);
      l_ix = 1'($urandom); l_mbr = 1'($urandom);
      xs = $urandom_range(3);                 // 0 none, 1 data bus, 2 18, 3 10
      ms = $urandom_range(2);                 // MAR in P1: 0 none, 1 IC, 2 address bus
      if (b_mar) ms = 0;                      // one MAR source per micro-cycle
      mop = $urandom_range(2);                // 0 none, 1 read, 2 write

      // ---- P0 ----
      @(negedge clk);
      g = '0;
      if (ls >= 0) g[lg[ls]] = 1;
      if (rs >= 0) g[rg[rs]] = 1;
      g[G_INV_LEFT] = il; g[G_INV_RIGHT] = ir;
      g[G_MAR_MBR] = b_mar; g[G_OC_MBR] = b_oc; g[G_II_MBR] = b_ii;
      p0_end = 1; p1_end = 0;
      lv = pick_one(ls, '{word_t'(m_ic), word_t'(m_ix), word_t'(m_sp), m_x, m_acc, 18'd0, m_mbr});
      rv = pick_one(rs, '{word_t'(m_ic), word_t'(m_ix), word_t'(m_sp), m_x, m_acc,
                         18'h3FFFF, 18'd0, 18'd1, 18'h20000});
      #1;
      check(left_bus == lv && right_bus == rv, "adder buses");
      check(!bus_contention, "no contention with one source per bus");
      for (int i = 1; i <= NGATES; i++) if (g[i]) seen[i]++;
      @(posedge clk); #1;
      m_opa = il ? ~lv : lv;
      m_opb = ir ? ~rv : rv;
      m_used = (ls >= 0) || (rs >= 0) || il || ir;
      if (b_mar) m_mar = m_mbr[9:0];
      if (b_oc)  m_oc  = m_mbr[17:12];
      if (b_ii)  m_ii  = m_mbr[11:10];
      compare("P0");

      // ---- P1 ----
      @(negedge clk);
      g = '0;
      g[G_LEFT_SHIFT] = (sh == 1); g[G_RIGHT_SHIFT] = (sh == 2);
      if (ds >= 0) g[dg[ds]] = 1;
      g[G_ABUS_ALU] = ab;
      g[G_SP_DBUS] = l_sp; g[G_ACC_DBUS] = l_acc; g[G_IC_DBUS] = l_ic;
      g[G_IX_DBUS] = l_ix; g[G_MBR_DBUS] = l_mbr;
      g[G_X_DBUS] = (xs == 1); g[G_X_18] = (xs == 2); g[G_X_10] = (xs == 3);
      g[G_MAR_IC] = (ms == 1); g[G_MAR_ABUS] = (ms == 2);
      p0_end = 0; p1_end = 1;
      sum  = m_opa + m_opb;
      sout = (sh == 1) ? {sum[16:0], 1'b0} : (sh == 2) ? {1'b0, sum[17:1]} : sum;
      db   = (ds == 0) ? sout : (ds == 1) ? m_mbr : (ds == 2) ? word_t'(m_mar) : '0;
      abv  = ab ? sout[9:0] : '0;
      #1;
      check(alu_out == sout, "adder and shifter output");
      check(data_bus == db && addr_bus == abv, "data and address buses");
      for (int i = 1; i <= NGATES; i++) if (g[i]) seen[i]++;
      @(posedge clk); #1;
      if (ms == 1) m_mar = m_ic; else if (ms == 2) m_mar = abv;
      if (m_used) m_zd = (sum == '0);
      if (l_sp)  m_sp  = db[9:0];
      if (l_acc) m_acc = db;
      if (l_ic)  m_ic  = db[9:0];
      if (l_ix)  m_ix  = db[9:0];
      if (l_mbr) m_mbr = db;
      if (xs == 1) m_x = db; else if (xs == 2) m_x = 18'd18; else if (xs == 3) m_x = 18'd10;
      compare("P1");
      // ---- P2 ----
      @(negedge clk);
      g = '0;
      g[G_MBR_MEM] = (mop == 1); g[G_MEM_MBR] = (mop == 2);
      g[G_START_OFF] = ($urandom_range(15) == 0);   // passes through the datapath unused
      p0_end = 0; p1_end = 0;
      #1;
      check(mem_we == (mop == 2) && mem_addr == m_mar && mem_wdata == m_mbr, "memory port");
      for (int i = 1; i <= NGATES; i++) if (g[i]) seen[i]++;
      @(posedge clk); #1;
      if (mop == 1) m_mbr = m_mem[m_mar];
      if (mop == 2) m_mem[m_mar] = m_mbr;
      compare("P2");
    end
    for (int i = 1; i <= NGATES; i++)
      check(seen[i] > 0, $sformatf("gate G%0d never opened", i));
    for (int a = 0; a < MEM_WORDS; a++) check(mem[a] == m_mem[a], "memory contents");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
