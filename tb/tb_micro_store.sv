// tb_micro_store: loads all 512 words through the load port while reading
// random other addresses, then reads every word back.
module tb_micro_store;
  localparam int WORDS = 512, W = 41;
  logic clk = 0, we = 0;
  logic [8:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] model [WORDS];
  bit written [WORDS];
  int checks = 0, failures = 0;

  micro_store #(.WORDS(WORDS), .WIDTH(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk);
      we = 1; waddr = 9'(a); wdata = {9'($urandom), 32'($urandom)};
      raddr = 9'($urandom_range(a));
      #1;
      if (raddr != waddr && written[raddr]) begin
        checks++;
        if (rdata !== model[raddr]) failures++;
      end
      model[a] = wdata; written[a] = 1;
    end
    @(negedge clk) we = 0;
    for (int a = 0; a < WORDS; a++) begin
      raddr = 9'(a); #1;
      checks++;
      if (rdata !== model[a]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
