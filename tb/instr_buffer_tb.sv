// instr_buffer_tb: writes words through bus beats (including the last word
// of the 12-KB buffer) and reads them back through the read port.
module instr_buffer_tb;
  import proteus_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  bus_lane_t lanes [N_UNITS];
  logic rd_en; logic [11:0] rd_addr; logic [31:0] rd_data;
  instr_buffer dut (.*);
  int checks = 0, failures = 0;
  logic [31:0] refm [int];
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < N_UNITS; i++) lanes[i] = '0;
    rd_en = 0; rd_addr = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int a; logic [31:0] w;
      a = (t == 0) ? 3071 : $urandom_range(0, 3071); w = $urandom;
      refm[a] = w;
      @(negedge clk);
      lanes[11] = '0; lanes[11].valid = 1; lanes[11].unit = UNIT_IBUF;
      lanes[11].mem = 4'(a >> 8); lanes[11].row = 8'(a); lanes[11].data = 128'(w);
    end
    @(negedge clk); lanes[11] = '0;
    foreach (refm[a]) begin
      @(negedge clk); rd_en = 1; rd_addr = 12'(a);
      @(negedge clk); rd_en = 0;
      checks++; if (rd_data !== refm[a]) begin failures++; $display("FAIL %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
