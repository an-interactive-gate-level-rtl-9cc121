// tb_start_toggle: random button presses and start=off strobes; START must
// rise after a press, fall after an off strobe (which wins when both come
// together) and hold otherwise; low after reset.
module tb_start_toggle;
  logic clk = 0, rst_n = 0, button = 0, off = 0, start, model = 0;
  int checks = 0, failures = 0;

  start_toggle dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    checks++; if (start !== 1'b0) failures++;
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      button = ($urandom_range(4) == 0);
      off    = ($urandom_range(4) == 0);
      if (off) model = 0; else if (button) model = 1;
      @(posedge clk); #1;
      checks++;
      if (start !== model) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
