// rram_macro_tb: writes random words into the RRAM macro model and reads
// them back, checking data and the RD_LAT-cycle read latency.
module rram_macro_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ren, rvalid, busy, wen;
  logic [7:0] rd_row, wr_row;
  logic [3:0] rd_col, wr_col;
  logic [15:0] rdata, wdata;
  rram_macro #(.RD_LAT(3)) dut (.*);
  int checks = 0, failures = 0;
  logic [15:0] ref_mem [64];
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    ren = 0; wen = 0; rd_row = 0; rd_col = 0; wr_row = 0; wr_col = 0; wdata = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 64; i++) begin
      ref_mem[i] = 16'($urandom);
      @(negedge clk); wen = 1; wr_row = 8'(i * 3); wr_col = 4'(i); wdata = ref_mem[i];
    end
    @(negedge clk); wen = 0;
    for (int i = 0; i < 64; i++) begin
      int lat;
      @(negedge clk); ren = 1; rd_row = 8'(i * 3); rd_col = 4'(i);
      @(negedge clk); ren = 0; lat = 0;
      while (!rvalid) begin @(negedge clk); lat++; end
      checks++; if (rdata !== ref_mem[i] || lat != 3) begin failures++; $display("FAIL %0d lat %0d", i, lat); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
