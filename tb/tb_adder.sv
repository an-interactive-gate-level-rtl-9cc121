// tb_adder: corner cases and random operands; the sum must equal the
// integer sum modulo 2^18 and cout its bit 18.
module tb_adder;
  localparam int W = 18;
  logic [W-1:0] a, b, sum;
  logic cout;
  int checks = 0, failures = 0;

  adder #(.WIDTH(W)) dut (.*);

  task automatic try(int unsigned x, int unsigned y);
    int unsigned s;
    a = W'(x); b = W'(y);
    #1;
    s = int'(a) + int'(b);
    checks++;
    if (sum !== W'(s) || cout !== s[W]) begin
      failures++;
      $display("FAIL: %0d + %0d = %0d carry %b", a, b, sum, cout);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try(0, 0); try(1, 'h3FFFF); try('h3FFFF, 'h3FFFF); try('h20000, 'h20000);
    try(12345, 54321);
    for (int i = 0; i < 3000; i++) try($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
