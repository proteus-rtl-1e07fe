// conv_layer_tb: a ResNet-style 3x3 convolution layer tile run on the whole
// chip through the SPI pins, as the convolution workloads are mapped: the
// kernel sits in RRAM (static mode), the feature map in tensor SRAM, and
// each output pixel is three TensorMACs (one per kernel row, 3 elements at
// an arbitrary byte offset of the feature-map row) whose results are summed
// in the pSum accumulator with AccFlag and written back by WBK. The 6x6
// INT8 feature map gives 4x4 outputs; PE 0 computes output rows 0-1 and
// PE 1 rows 2-3 at the same time. A second pass repeats the layer with
// INT16 data. Every output is checked against a direct convolution.
module conv_layer_tb;
  import proteus_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic sclk, cs_n, mosi, miso, busy;
  proteus_top dut (.clk, .rst_n, .spi_sclk(sclk), .spi_cs_n(cs_n), .spi_mosi(mosi),
                   .spi_miso(miso), .busy);

  int checks = 0, failures = 0;
  initial begin #200_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------ SPI host (mode 0)
  task automatic xfer(input logic [7:0] tx, output logic [7:0] rx);
    for (int b = 7; b >= 0; b--) begin
      mosi = tx[b];
      #40 sclk = 1; rx[b] = miso;
      #40 sclk = 0;
    end
  endtask
  logic [7:0] frame [$], reply [$];
  task automatic send();
    logic [7:0] r;
    reply.delete();
    cs_n = 0; #100;
    foreach (frame[i]) begin xfer(frame[i], r); reply.push_back(r); end
    #100 cs_n = 1; #300;
    frame.delete();
  endtask
  task automatic wr_row(input logic [3:0] unit, input logic [3:0] mem, input logic [7:0] row,
                        input logic [255:0] d);
    frame = '{8'h03, {unit, mem}, row};
    for (int k = 0; k < 32; k++) frame.push_back(d[8*k +: 8]);
    send();
  endtask
  task automatic rd_row(input logic [3:0] unit, input logic [3:0] mem, input logic [7:0] row,
                        output logic [255:0] d);
    frame = '{8'h04, {unit, mem}, row, 8'h00};
    for (int k = 0; k < 32; k++) frame.push_back(8'h00);
    send();
    for (int k = 0; k < 32; k++) d[8*k +: 8] = reply[4 + k];
  endtask
  task automatic run_program(input logic [31:0] words [$]);
    int polls;
    frame = '{8'h01, 8'h00, 8'h00};
    foreach (words[i]) for (int k = 3; k >= 0; k--) frame.push_back(words[i][8*k +: 8]);
    send();
    frame = '{8'h02, 8'(words.size() >> 8), 8'(words.size())};
    send();
    polls = 0;
    do begin
      frame = '{8'h05, 8'h00}; send(); polls++;
    end while (reply[1][0] && polls < 2000);
    check(polls < 2000, "program finished");
  endtask

  // ------------------------------------------------ encoders
  function automatic logic [31:0] tmac0(input int pe, input logic [1:0] fmt, input logic [7:0] vlen,
                                        input logic [3:0] srcmem, input logic [7:0] row);
    return {OP_TMAC, 4'(pe), fmt, vlen, 1'b0, srcmem, row};
  endfunction
  function automatic logic [31:0] tmac1(input int pe, input logic [4:0] colm, input logic [4:0] coln,
                                        input logic [1:0] sram, input logic [7:0] row);
    return {6'd1, 4'(pe), colm, coln, 2'b0, sram, row};
  endfunction
  function automatic logic [31:0] wbk(input int pe, input int dst, input logic [1:0] sram,
                                      input logic [7:0] row, input logic [4:0] col, input logic [3:0] acc);
    return {OP_WBK, 4'(pe), 4'(dst), sram, row, col, acc};
  endfunction

  int both_busy;
  always @(posedge clk)
    if (!dut.unit_idle[0] && !dut.unit_idle[1]) both_busy++;

  initial begin
    logic [31:0] prog [$];
    logic [255:0] kimg, fimg [6], r;
    int kern [9], fmap [6][6];
    sclk = 0; cs_n = 1; mosi = 0; both_busy = 0;
    repeat (5) @(posedge clk); rst_n = 1; #200;
    for (int pass = 0; pass < 2; pass++) begin
      logic [1:0] f;
      int esz;
      f = (pass == 0) ? FMT_INT8 : FMT_INT16;
      esz = pass + 1;
      kimg = '0;
      for (int i = 0; i < 9; i++) begin
        kern[i] = (pass == 0) ? $signed(8'($urandom)) : $signed(16'($urandom));
        if (pass == 0) kimg[8*i +: 8] = 8'(kern[i]); else kimg[16*i +: 16] = 16'(kern[i]);
      end
      for (int y = 0; y < 6; y++) begin
        fimg[y] = '0;
        for (int x = 0; x < 6; x++) begin
          fmap[y][x] = (pass == 0) ? $signed(8'($urandom)) : $signed(16'($urandom));
          if (pass == 0) fimg[y][8*x +: 8] = 8'(fmap[y][x]); else fimg[y][16*x +: 16] = 16'(fmap[y][x]);
        end
      end
      for (int pe = 0; pe < 2; pe++) begin
        wr_row(4'(pe), MEM_RRAM0, 8'd0, kimg);
        for (int y = 0; y < 6; y++) wr_row(4'(pe), 4'd1, 8'(y), fimg[y]);
      end
      prog.delete();
      for (int idx = 0; idx < 8; idx++)
        for (int pe = 0; pe < 2; pe++)
          for (int ky = 0; ky < 3; ky++) begin
            int oy, ox;
            oy = pe * 2 + idx / 4; ox = idx % 4;
            prog.push_back(tmac0(pe, f, 8'd3, 4'b0000, 8'd0));
            prog.push_back(tmac1(pe, 5'(3 * ky * esz), 5'(ox * esz), 2'd1, 8'(oy + ky)));
            prog.push_back(wbk(pe, pe, 2'd2, 8'd0, 5'(4 * idx), (ky == 0) ? 4'd0 : 4'hF));
          end
      run_program(prog);
      for (int pe = 0; pe < 2; pe++) begin
        rd_row(4'(pe), 4'd2, 8'd0, r);
        for (int idx = 0; idx < 8; idx++) begin
          longint ref_v;
          int oy, ox;
          oy = pe * 2 + idx / 4; ox = idx % 4;
          ref_v = 0;
          for (int ky = 0; ky < 3; ky++)
            for (int kx = 0; kx < 3; kx++)
              ref_v += longint'(kern[3 * ky + kx]) * longint'(fmap[oy + ky][ox + kx]);
          check($signed(r[32*idx +: 32]) == int'(ref_v),
                $sformatf("pass %0d output (%0d,%0d) got %0d exp %0d", pass, oy, ox, $signed(r[32*idx +: 32]), ref_v));
        end
      end
    end
    check(both_busy > 0, "the two PEs never worked at the same time");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
