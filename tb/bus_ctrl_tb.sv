// bus_ctrl_tb: checks that a beat handed to tx appears on the own lane one
// cycle later, and that the receiver picks out exactly the beats addressed
// to its unit among several lanes driven in the same cycle.
module bus_ctrl_tb;
  import proteus_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  bus_lane_t tx, lane_out, rx;
  bus_lane_t lanes [N_UNITS];
  bus_ctrl #(.UNIT(4'd3)) dut (.*);
  int checks = 0, failures = 0;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    tx = '0;
    for (int i = 0; i < N_UNITS; i++) lanes[i] = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int tgt; bus_lane_t b;
      @(negedge clk);
      for (int i = 0; i < N_UNITS; i++) begin
        lanes[i] = '0;
        lanes[i].valid = $urandom_range(0, 1);
        lanes[i].unit  = 4'($urandom_range(4, 15));  // never unit 3
        lanes[i].data  = 128'($urandom);
      end
      tgt = $urandom_range(0, N_UNITS - 1);
      if (t % 3 != 0) begin lanes[tgt].unit = 4'd3; lanes[tgt].valid = 1'b1; end
      b = '0; b.valid = t[0]; b.unit = 4'(t); b.row = 8'(t); b.data = 128'($urandom);
      tx = b;
      #1;
      checks++;
      if (t % 3 != 0) begin
        if (!(rx.valid && rx.data == lanes[tgt].data)) begin failures++; $display("FAIL rx %0d", t); end
      end else if (rx.valid) begin failures++; $display("FAIL spurious rx %0d", t); end
      @(posedge clk); #1;
      checks++;
      if (b.valid ? (lane_out !== b) : lane_out.valid) begin failures++; $display("FAIL tx %0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
