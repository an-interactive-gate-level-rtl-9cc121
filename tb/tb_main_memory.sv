// tb_main_memory: fills all 1024 words, then mixes random writes and reads
// against a model array; checks the read of every word at the end.
module tb_main_memory;
  localparam int WORDS = 1024, W = 18;
  logic clk = 0, we = 0;
  logic [9:0] addr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] model [WORDS];
  int checks = 0, failures = 0;

  main_memory #(.WORDS(WORDS), .WIDTH(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk); we = 1; addr = 10'(a); wdata = W'($urandom); model[a] = wdata;
    end
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      we = 1'($urandom); addr = 10'($urandom); wdata = W'($urandom);
      #1;
      checks++;
      if (rdata !== model[addr]) failures++;
      if (we) model[addr] = wdata;
    end
    @(negedge clk) we = 0;
    for (int a = 0; a < WORDS; a++) begin
      addr = 10'(a); #1;
      checks++;
      if (rdata !== model[a]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
