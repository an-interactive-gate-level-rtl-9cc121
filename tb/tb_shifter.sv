// tb_shifter: random values through the four control combinations; left
// and right are one-place logical shifts, neither or both pass the value.
module tb_shifter;
  localparam int W = 18;
  logic left, right;
  logic [W-1:0] d, q, model;
  int checks = 0, failures = 0;

  shifter #(.WIDTH(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      {left, right} = 2'($urandom);
      d = W'($urandom);
      #1;
      if (left && !right)      model = W'(int'(d) * 2);
      else if (right && !left) model = W'(int'(d) / 2);
      else                     model = d;
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 10) $display("FAIL: l=%b r=%b d=%h q=%h", left, right, d, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
