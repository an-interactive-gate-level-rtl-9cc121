// tb_inverter: random operands with the inverter on and off; the output
// must be the complement when enabled and the operand otherwise.
module tb_inverter;
  localparam int W = 18;
  logic en;
  logic [W-1:0] d, q;
  int checks = 0, failures = 0;

  inverter #(.WIDTH(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      en = 1'($urandom);
      d  = W'($urandom);
      #1;
      checks++;
      if (q !== (en ? (18'h3FFFF - d) : d)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
