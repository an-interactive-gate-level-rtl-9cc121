// tb_micro_sequencer: runs the sequencer over a random control store
// (GATE and TEST words mixed) with random register values, a phase counter
// in the testbench and random pauses of START.  A model independent of the
// block predicts CSAR, CSBR, the phase-masked gates and every branch; the
// test also checks the extra CSBR fill clock after reset and after a
// control-store reload (which must refetch the word not yet executed), that
// CSAR holds the address after the executing word, and counts taken and
// untaken TESTs.
module tb_micro_sequencer;
  import vn_pkg::*;
  logic     clk = 0, rst_n = 0, start = 0, reload = 0, cycle_end;
  phase_e   phase = P0;
  regview_t regs;
  uaddr_t   ustore_raddr, csar;
  uword_t   ustore_rdata, csbr;
  logic     ready, test_taken;
  gates_t   gates;
  uword_t   store [USTORE_WORDS];
  int checks = 0, failures = 0, n_taken = 0, n_not = 0;
  int csar_m;

  micro_sequencer dut (.*);
  assign ustore_rdata = store[ustore_raddr];
  assign cycle_end = start && ready && phase == P2;
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic uword_t phase_mask(int p);
    uword_t m = '0;
    for (int g = 1; g <= 40; g++) begin
      int gp = (g <= 19 || g == 37 || g == 38) ? 0 : (g >= 34 && g <= 36) ? 2 : 1;
      if (gp == p) m[g] = 1'b1;
    end
    return m;
  endfunction

  function automatic bit reg_bit(regview_t r, int sel, int n);
    longint unsigned v; int w;
    case (sel)
      1: begin v = r.ic;  w = 10; end
      2: begin v = r.ix;  w = 10; end
      3: begin v = r.sp;  w = 10; end
      4: begin v = r.x;   w = 18; end
      5: begin v = r.acc; w = 18; end
      6: begin v = r.mbr; w = 18; end
      7: begin v = r.mar; w = 10; end
      8: begin v = r.oc;  w = 6;  end
      9: begin v = r.ii;  w = 2;  end
      default: begin v = r.zd; w = 1; end
    endcase
    return (n < w) ? v[n] : 1'b0;
  endfunction

  function automatic bit expected_taken(uword_t w, regview_t r);
    bit t = 0;
    int sels [10] = '{1, 2, 3, 4, 5, 6, 7, 8, 9, 26};
    if (w[0]) return 1'b0;
    foreach (sels[i]) if (w[sels[i]]) t |= reg_bit(r, sels[i], int'(w[14:10]));
    return t == w[15];
  endfunction

  function automatic uword_t random_word();
    uword_t w = {9'($urandom), 32'($urandom)};
    if ($urandom_range(1)) begin
      int sels [10] = '{1, 2, 3, 4, 5, 6, 7, 8, 9, 26};
      w = '0;
      if ($urandom_range(7) != 0) w[sels[$urandom_range(9)]] = 1'b1;
      w[14:10] = 5'($urandom_range(19));
      w[15] = 1'($urandom);
      w[25:16] = 10'($urandom);
    end else w[0] = 1'b1;
    return w;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (store[i]) store[i] = random_word();
    regs = regview_t'($bits(regview_t)'({$urandom, $urandom, $urandom, $urandom}));
    repeat (2) @(posedge clk);
    rst_n = 1;
    csar_m = 0;
    for (int round = 0; round < 2; round++) begin
      // CSBR fill after reset or reload
      @(negedge clk);
      start = 1;
      check(!ready && gates == '0, "fill clock: ready low, gates closed");
      @(posedge clk); #1;
      check(ready && csbr == store[csar_m], "CSBR filled from CSAR");
      check(csar == uaddr_t'(csar_m + 1), "CSAR incremented by the fill");
      for (int c = 0; c < 3000; c++) begin
        uword_t w;
        w = store[csar_m];
        for (int p = 0; p < 3; p++) begin
          @(negedge clk);
          // occasional pause of START
          while ($urandom_range(9) == 0) begin
            start = 0; #1;
            check(gates == '0, "no gate opens while stopped");
            @(posedge clk); @(negedge clk);
          end
          start = 1;
          phase = phase_e'(p);
          #1;
          // CSAR already points past the executing word
          check(csar == uaddr_t'(csar_m + 1), $sformatf("CSAR %0d expected %0d", csar, csar_m + 1));
          check(csbr == w, "CSBR holds the word at CSAR");
          check(gates == (w[0] ? (w & phase_mask(p)) : '0), $sformatf("gates in phase %0d", p));
          if (p == 2) begin
            bit tk;
            int nxt;
            tk  = expected_taken(w, regs);
            nxt = tk ? int'(w[24:16]) : (csar_m + 1) % USTORE_WORDS;
            check(test_taken == tk, "test_taken");
            if (!w[0]) begin
              if (tk) n_taken++; else n_not++;
            end
            @(posedge clk); #1;
            csar_m = nxt;
            regs = regview_t'($bits(regview_t)'({$urandom, $urandom, $urandom, $urandom}));
          end else begin
            @(posedge clk);
          end
        end
      end
      // reload: rewrite the store, the sequencer must refetch CSBR
      @(negedge clk);
      start = 0; phase = P0;
      foreach (store[i]) store[i] = random_word();
      reload = 1;
      @(negedge clk) reload = 0;
    end
    check(n_taken > 100 && n_not > 100, $sformatf("TESTs taken %0d, not taken %0d", n_taken, n_not));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
