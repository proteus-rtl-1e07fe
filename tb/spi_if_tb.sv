// spi_if_tb: drives the SPI interface as a mode-0 host (SCLK 8x slower than
// the core clock) while the bench plays the bus side. Checked: WR_IB turns
// each 4 bytes into an instruction-buffer write at consecutive addresses,
// RUN sends the word count to the top controller, WR_ROW sends a row as two
// beats to the addressed unit and memory, RD_ROW sends a read request and
// returns the two response beats on MISO, STATUS returns the busy flag.
module spi_if_tb;
  import proteus_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic sclk, cs_n, mosi, miso, chip_busy;
  bus_lane_t lanes [N_UNITS];
  bus_lane_t spi_lane, tb_lane;
  spi_if dut (.clk, .rst_n, .sclk, .cs_n, .mosi, .miso, .chip_busy, .lanes, .lane_out(spi_lane));
  always_comb begin
    for (int i = 0; i < N_UNITS; i++) lanes[i] = '0;
    lanes[UNIT_SPI] = spi_lane;
    lanes[3] = tb_lane;
  end
  int checks = 0, failures = 0;
  initial begin #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bus_lane_t seen [$];
  always @(posedge clk) if (spi_lane.valid) seen.push_back(spi_lane);

  logic [255:0] rd_image;
  // bus partner: answers read requests addressed to unit 3 with two beats
  initial begin
    tb_lane = '0;
    forever begin
      @(posedge clk);
      if (spi_lane.valid && spi_lane.rd && spi_lane.unit == 4'd3) begin
        logic [7:0] r;
        r = spi_lane.row;
        repeat (5) @(posedge clk);
        @(negedge clk); tb_lane = '{valid:1'b1, rd:1'b0, beat:1'b0, unit:UNIT_SPI, mem:MEM_RESP, row:r, be:'1, data:rd_image[127:0]};
        @(negedge clk); tb_lane.beat = 1'b1; tb_lane.data = rd_image[255:128];
        @(negedge clk); tb_lane = '0;
      end
    end
  end

  task automatic xfer(input logic [7:0] tx, output logic [7:0] rx);
    for (int b = 7; b >= 0; b--) begin
      mosi = tx[b];
      #40 sclk = 1; rx[b] = miso;
      #40 sclk = 0;
    end
  endtask
  logic [7:0] frame [$];
  logic [7:0] reply [$];
  task automatic send();
    logic [7:0] r;
    reply.delete();
    cs_n = 0; #100;
    foreach (frame[i]) begin xfer(frame[i], r); reply.push_back(r); end
    #100 cs_n = 1; #200;
    frame.delete();
  endtask

  initial begin
    logic [31:0] words [20];
    logic [255:0] wr;
    sclk = 0; cs_n = 1; mosi = 0; chip_busy = 0;
    repeat (3) @(posedge clk); rst_n = 1; #100;
    // WR_IB twenty words at 0x3F0 (longer than the 6-bit frame byte index)
    frame = '{8'h01, 8'h03, 8'hF0};
    for (int i = 0; i < 20; i++) begin
      words[i] = $urandom;
      for (int k = 3; k >= 0; k--) frame.push_back(words[i][8*k +: 8]);
    end
    seen.delete(); send();
    check(seen.size() == 20, $sformatf("WR_IB beats %0d", seen.size()));
    foreach (seen[i]) check(seen[i].unit == UNIT_IBUF && {seen[i].mem, seen[i].row} == 12'h3F0 + 12'(i) &&
                            seen[i].data[31:0] == words[i] && !seen[i].rd, $sformatf("WR_IB word %0d", i));
    // RUN 0x123
    frame = '{8'h02, 8'h01, 8'h23};
    seen.delete(); send();
    check(seen.size() == 1 && seen[0].unit == UNIT_TOPC && seen[0].data[11:0] == 12'h123, "RUN");
    // WR_ROW to unit 3 RRAM macro 2 (mem 10), row 0x45
    for (int k = 0; k < 8; k++) wr[32*k +: 32] = $urandom;
    frame = '{8'h03, 8'h3A, 8'h45};
    for (int k = 0; k < 32; k++) frame.push_back(wr[8*k +: 8]);
    seen.delete(); send();
    check(seen.size() == 2, "WR_ROW beats");
    if (seen.size() == 2) begin
      check(seen[0].unit == 4'd3 && seen[0].mem == 4'd10 && seen[0].row == 8'h45 && !seen[0].beat &&
            seen[0].data == wr[127:0] && seen[0].be == 16'hFFFF, "WR_ROW beat 0");
      check(seen[1].beat && seen[1].data == wr[255:128], "WR_ROW beat 1");
    end
    // RD_ROW from unit 3 memory 1 row 7
    for (int k = 0; k < 8; k++) rd_image[32*k +: 32] = $urandom;
    frame = '{8'h04, 8'h31, 8'h07, 8'h00};
    for (int k = 0; k < 32; k++) frame.push_back(8'h00);
    seen.delete(); send();
    check(seen.size() >= 1 && seen[0].rd && seen[0].unit == 4'd3 && seen[0].mem == 4'd1 &&
          seen[0].row == 8'h07 && seen[0].data[3:0] == UNIT_SPI, "RD_ROW request");
    for (int k = 0; k < 32; k++) check(reply[4 + k] == rd_image[8*k +: 8], $sformatf("RD_ROW byte %0d", k));
    // STATUS
    for (int b = 0; b < 2; b++) begin
      chip_busy = b[0];
      frame = '{8'h05, 8'h00};
      send();
      check(reply[1] == {7'd0, chip_busy}, "STATUS");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
