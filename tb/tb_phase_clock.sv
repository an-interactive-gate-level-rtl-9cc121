// tb_phase_clock: with `run` toggled at random the phase must step
// P0 -> P1 -> P2 -> P0 only on running clocks, and cycle_end must mark a
// running P2.  Also checks that three running clocks make one micro-cycle.
module tb_phase_clock;
  import vn_pkg::*;
  logic clk = 0, rst_n = 0, run = 0, cycle_end;
  phase_e phase;
  int model = 0, checks = 0, failures = 0, ends = 0, runs = 0;

  phase_clock dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      run = ($urandom_range(3) != 0);
      #1;
      checks += 2;
      if (int'(phase) !== model) failures++;
      if (cycle_end !== (run && model == 2)) failures++;
      @(posedge clk);
      if (run) begin
        runs++;
        if (model == 2) ends++;
        model = (model + 1) % 3;
      end
    end
    checks++;
    if (ends != runs / 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
