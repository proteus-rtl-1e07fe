// attention_tb: the attention-score kernel of a Transformer layer
// (BERT-Tiny style) run on the whole chip through the SPI pins in dynamic
// mode (SRAM-to-SRAM). Key vectors of 8 tokens, 16 elements each, lie one
// after another in tensor SRAM 0; each query vector lies in SRAM 1. One
// TensorMAC with kernel size 8 gives the 8 scores q.k_j of a query (the
// source vector steps through the keys), and WBK writes them as FP32. Four
// queries run on PE 2 and four on PE 3, first in FP8, then in FP16; every
// score is checked against a double-precision reference.
module attention_tb;
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

  // ------------------------------------------------ reference helpers
  function automatic real pow2(input int e);
    real r = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) r = r * 2.0;
    else        for (int i = 0; i < -e; i++) r = r / 2.0;
    return r;
  endfunction
  function automatic real fpval(input logic [15:0] v, input bit fp16);
    int s, e, m; real r;
    if (fp16) begin s = v[15]; e = v[14:10]; m = v[9:0];
      r = (e == 0) ? (m / 1024.0) * pow2(-14) : (1.0 + m / 1024.0) * pow2(e - 15);
    end else begin s = v[7]; e = v[6:3]; m = v[2:0];
      r = (e == 0) ? (m / 8.0) * pow2(-6) : (1.0 + m / 8.0) * pow2(e - 7);
    end
    return s ? -r : r;
  endfunction
  function automatic real f32(input logic [31:0] w);
    real r;
    if (w[30:0] == 0) return 0.0;
    r = (1.0 + w[22:0] / 8388608.0) * pow2(int'(w[30:23]) - 127);
    return w[31] ? -r : r;
  endfunction

  function automatic logic [15:0] rnd(input bit fp16);
    logic [15:0] v;
    v = 16'($urandom);
    if (fp16) v[14:10] = 5'($urandom_range(11, 17));
    else begin v[15:8] = 0; v[6:3] = 4'($urandom_range(4, 9)); end
    return v;
  endfunction

  initial begin
    logic [31:0] prog [$];
    logic [255:0] keys [8], q [2][4], r;
    sclk = 0; cs_n = 1; mosi = 0;
    repeat (5) @(posedge clk); rst_n = 1; #200;
    for (int pass = 0; pass < 2; pass++) begin
      bit fp16;
      int esz, vrows;
      logic [1:0] f;
      fp16 = (pass == 1); esz = fp16 ? 2 : 1; f = fp16 ? FMT_FP16 : FMT_FP8;
      // 8 keys x 16 elements, packed one after another
      vrows = (8 * 16 * esz + 31) / 32;
      for (int i = 0; i < 8; i++) keys[i] = '0;
      for (int j = 0; j < 8; j++)
        for (int e = 0; e < 16; e++) begin
          logic [15:0] v; int a;
          v = rnd(fp16); a = (j * 16 + e) * esz;
          keys[a / 32][8*(a%32) +: 8] = v[7:0];
          if (fp16) keys[(a+1) / 32][8*((a+1)%32) +: 8] = v[15:8];
        end
      for (int pe = 0; pe < 2; pe++) begin
        for (int i = 0; i < vrows; i++) wr_row(4'(2 + pe), 4'd0, 8'(i), keys[i]);
        for (int qi = 0; qi < 4; qi++) begin
          q[pe][qi] = '0;
          for (int e = 0; e < 16; e++) begin
            logic [15:0] v;
            v = rnd(fp16);
            if (fp16) q[pe][qi][16*e +: 16] = v; else q[pe][qi][8*e +: 8] = v[7:0];
          end
          wr_row(4'(2 + pe), 4'd1, 8'(qi), q[pe][qi]);
        end
      end
      prog.delete();
      for (int qi = 0; qi < 4; qi++)
        for (int pe = 0; pe < 2; pe++) begin
          prog.push_back(tmac0(2 + pe, f, 8'd16, 4'b1000, 8'd0));
          prog.push_back({6'd8, 4'(2 + pe), 5'd0, 5'd0, 2'b0, 2'd1, 8'(qi)});
          prog.push_back(wbk(2 + pe, 2 + pe, 2'd2, 8'(qi), 5'd0, 4'd0));
        end
      run_program(prog);
      for (int pe = 0; pe < 2; pe++)
        for (int qi = 0; qi < 4; qi++) begin
          rd_row(4'(2 + pe), 4'd2, 8'(qi), r);
          for (int j = 0; j < 8; j++) begin
            real sref, sabs, d;
            sref = 0; sabs = 0;
            for (int e = 0; e < 16; e++) begin
              logic [15:0] kv, qv; int a; real pr;
              a = (j * 16 + e) * esz;
              kv = {fp16 ? keys[(a+1) / 32][8*((a+1)%32) +: 8] : 8'd0, keys[a / 32][8*(a%32) +: 8]};
              qv = fp16 ? q[pe][qi][16*e +: 16] : {8'd0, q[pe][qi][8*e +: 8]};
              pr = fpval(kv, fp16) * fpval(qv, fp16);
              sref += pr; sabs += (pr < 0) ? -pr : pr;
            end
            d = f32(r[32*j +: 32]) - sref; if (d < 0) d = -d;
            check(d <= 1e-5 * sabs + 1e-30, $sformatf("pass %0d PE %0d q%0d k%0d got %g exp %g",
                  pass, 2 + pe, qi, j, f32(r[32*j +: 32]), sref));
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
