// icache_tb: pushes and pops random words in random interleavings and
// checks FIFO order, the full flag at 256 words and the empty flag.
module icache_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push, pop, full, empty;
  logic [31:0] wdata, head;
  logic [8:0] count;
  icache dut (.*);
  logic [31:0] q [$];
  int checks = 0, failures = 0;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    push = 0; pop = 0; wdata = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); push = 1; wdata = $urandom; q.push_back(wdata);
    end
    @(negedge clk); push = 0;
    checks++; if (!full || count != 256) begin failures++; $display("FAIL full"); end
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      pop  = !empty && ($urandom_range(0, 1) == 1);
      push = !full && !pop && ($urandom_range(0, 1) == 1);
      if (pop) begin
        checks++;
        if (head !== q[0]) begin failures++; $display("FAIL order"); end
        void'(q.pop_front());
      end
      if (push) begin wdata = $urandom; q.push_back(wdata); end
    end
    @(negedge clk); push = 0; pop = 0;
    while (!empty) begin
      checks++; if (head !== q[0]) failures++;
      void'(q.pop_front()); pop = 1; @(negedge clk); pop = 0;
    end
    checks++; if (q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
