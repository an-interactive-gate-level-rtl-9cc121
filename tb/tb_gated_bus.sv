// tb_gated_bus: random gate patterns on a four-source bus; the bus must be
// the OR of the enabled sources (zero with no gate open) and `contention`
// must be high exactly when two or more gates are open.
module tb_gated_bus;
  localparam int W = 18, N = 4;
  logic [N-1:0] en;
  logic [N-1:0][W-1:0] src;
  logic [W-1:0] bus, model;
  logic contention;
  int checks = 0, failures = 0;

  gated_bus #(.WIDTH(W), .NSRC(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      en = N'($urandom);
      if (i % 3 == 0) en = N'(1) << $urandom_range(N - 1);
      for (int s = 0; s < N; s++) src[s] = W'($urandom);
      #1;
      model = '0;
      for (int s = 0; s < N; s++) if (en[s]) model |= src[s];
      checks += 2;
      if (bus !== model) failures++;
      if (contention !== ($countones(en) > 1)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
