// tb_gated_register: random loads through three gated sources; the register
// is compared every clock with a model that ORs the sources whose gates are
// open and holds otherwise.  Also checks the reset value.
module tb_gated_register;
  localparam int W = 18, N = 3;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] load = '0;
  logic [N-1:0][W-1:0] src = '0;
  logic [W-1:0] q, model;
  int checks = 0, failures = 0;

  gated_register #(.WIDTH(W), .NSRC(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    checks++; if (q !== '0) failures++;
    rst_n = 1; model = '0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      load = N'($urandom);
      if ($urandom_range(3) == 0) load = '0;
      for (int s = 0; s < N; s++) src[s] = W'($urandom);
      if (|load) begin
        model = '0;
        for (int s = 0; s < N; s++) if (load[s]) model |= src[s];
      end
      @(posedge clk); #1;
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 10) $display("FAIL: q=%h expected %h", q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
