// tb_zero_detect: random sums (a quarter zero, a quarter with a single bit
// set, including the top bit) with random update
// strobes; the flag must follow "sum == 0" on update and hold otherwise.
module tb_zero_detect;
  localparam int W = 18;
  logic clk = 0, rst_n = 0, update = 0, zd, model = 0;
  logic [W-1:0] sum = '0;
  int checks = 0, failures = 0;

  zero_detect #(.WIDTH(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    checks++; if (zd !== 1'b0) failures++;
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      update = 1'($urandom);
      case ($urandom_range(3))
        0:       sum = '0;
        1:       sum = W'(1) << $urandom_range(W - 1);   // one bit set
        default: sum = W'($urandom);
      endcase
      if (update) model = (sum == 0);
      @(posedge clk); #1;
      checks++;
      if (zd !== model) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
