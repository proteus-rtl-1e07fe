// proteus_top_tb: end-to-end test of the whole chip at its default size
// (ten PEs), driven only through the SPI pins as a host would.
//
// The host writes operand rows into every PE's RRAM macro 0 and tensor SRAM
// 1 (each PE gets a format: PE p uses INT8, INT16, FP8, FP16 for p mod 4),
// FU buffer rows, and a micro-program row, then writes two instruction
// programs into the instruction buffer, starts them with RUN and polls
// STATUS until the chip is idle, then reads results back with RD_ROW.
// Program 1: a TensorMAC + local WBK on every PE (all ten run at once).
// Program 2: AccFlag accumulation, a remote WBK into the FU, EBLKMOV to the
// FU, ReLU / softmax / max-pooling on the FU, an MPLD micro-program,
// IBLKMOV, RRAM LD and an SRAM LD from one PE to another.
// Every result is checked against a reference computed here; in addition
// each mechanism is counted from the chip's signals and a mechanism that
// never happened is a failure: SPI frames, instruction fetches, TensorMAC
// in each format, overlap of bit-serial phases of two or more PEs, RRAM
// reads, remote WBK beats, EBLKMOV beats, barriers, MPLD fetches, softmax,
// pooling and ReLU, IBLKMOV and RRAM LD row copies, bus read responses.
module proteus_top_tb;
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

  // ------------------------------------------------ mechanism counters
  int c_fmt [4], c_overlap, c_rram_rd, c_remote_wbk, c_eblkmov, c_mpld, c_softmax,
      c_pool, c_relu, c_ifetch, c_spi_beats, c_resp, c_rowcopy;
  logic [9:0] in_bits, rram_rd, mpw, copying;
  for (genvar p = 0; p < 10; p++) begin : g_probe
    assign in_bits[p] = (dut.g_pe[p].g_on.u_pe.st == dut.g_pe[p].g_on.u_pe.S_T_BITS);
    assign rram_rd[p] = |{dut.g_pe[p].g_on.u_pe.r_rvalid[0], dut.g_pe[p].g_on.u_pe.r_rvalid[1]};
    assign mpw[p]     = (dut.g_pe[p].g_on.u_pe.st == dut.g_pe[p].g_on.u_pe.S_MPW_LO);
    assign copying[p] = (dut.g_pe[p].g_on.u_pe.st == dut.g_pe[p].g_on.u_pe.S_MV_WR);
  end
  always @(posedge clk) begin
    if ($countones(in_bits) >= 2) c_overlap++;
    for (int p = 0; p < 10; p++) if (in_bits[p]) c_fmt[p % 4]++;
    c_rram_rd += $countones(rram_rd);
    c_mpld    += $countones(mpw);
    c_rowcopy += $countones(copying);
    if (dut.lanes[4].valid && dut.lanes[4].unit == UNIT_FU && !dut.lanes[4].rd) c_remote_wbk++;
    if (dut.lanes[8].valid && dut.lanes[8].unit == UNIT_FU && !dut.lanes[8].rd) c_eblkmov++;
    if (dut.u_fu.u_sm.done) c_softmax++;
    if (dut.u_fu.st == dut.u_fu.S_PL_WR) c_pool++;
    if (dut.u_fu.st == dut.u_fu.S_RL_W) c_relu++;
    if (dut.ib_rd_en) c_ifetch++;
    if (dut.lanes[UNIT_SPI].valid) c_spi_beats++;
    for (int u = 0; u < N_UNITS; u++) if (dut.lanes[u].valid && dut.lanes[u].mem == MEM_RESP) c_resp++;
  end

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
  localparam int FRAC [16] = '{32768, 31379, 30048, 28774, 27554, 26386, 25268, 24196,
                               23170, 22188, 21247, 20347, 19484, 18658, 17867, 17109};
  function automatic longint e_int(input int d);
    int t;
    t = (d * 1477 + 512) >> 10;
    if ((t >> 4) > 15) return 0;
    return FRAC[t & 15] >> (t >> 4);
  endfunction

  logic [255:0] rimg [10], simg [10], fu2 [2], fu3 [2], mp;
  logic [1:0]   fmt [10];

  // dot product of elements 0..n-1 of a (at byte offset oa) and b (offset ob)
  task automatic dot(input logic [255:0] a, input int oa, input logic [255:0] b, input int ob,
                     input logic [1:0] f, input int n, output longint iref, output real fref, output real fabs);
    int esz;
    esz = (f == FMT_INT16 || f == FMT_FP16) ? 2 : 1;
    iref = 0; fref = 0; fabs = 0;
    for (int e = 0; e < n; e++) begin
      logic [15:0] av, bv; real pr;
      av = 16'(a >> (8 * (oa + e * esz))); bv = 16'(b >> (8 * (ob + e * esz)));
      case (f)
        FMT_INT8:  iref += longint'($signed(av[7:0])) * longint'($signed(bv[7:0]));
        FMT_INT16: iref += longint'($signed(av)) * longint'($signed(bv));
        default: begin
          pr = fpval(av, f == FMT_FP16) * fpval(bv, f == FMT_FP16);
          fref += pr; fabs += (pr < 0) ? -pr : pr;
        end
      endcase
    end
  endtask
  task automatic check_word(input logic [31:0] w, input logic [1:0] f, input longint iref,
                            input real fref, input real fabs, input string what);
    if (f == FMT_INT8 || f == FMT_INT16)
      check($signed(w) == int'(iref), $sformatf("%s got %0d exp %0d", what, $signed(w), iref));
    else begin
      real d;
      d = f32(w) - fref; if (d < 0) d = -d;
      check(d <= 1e-5 * fabs + 1e-30, $sformatf("%s got %g exp %g", what, f32(w), fref));
    end
  endtask

  initial begin
    logic [31:0] prog [$];
    logic [255:0] r;
    longint iref; real fref, fabs;
    sclk = 0; cs_n = 1; mosi = 0;
    for (int i = 0; i < 4; i++) c_fmt[i] = 0;
    {c_overlap, c_rram_rd, c_remote_wbk, c_eblkmov, c_mpld, c_softmax, c_pool, c_relu,
     c_ifetch, c_spi_beats, c_resp, c_rowcopy} = '0;
    repeat (5) @(posedge clk); rst_n = 1; #200;

    // ---------------- operands
    for (int p = 0; p < 10; p++) begin
      fmt[p] = 2'(p % 4);
      for (int b = 0; b < 32; b += 2) begin
        logic [15:0] x, y;
        x = 16'($urandom); y = 16'($urandom);
        if (fmt[p] == FMT_FP8) begin
          x[6:3] = 4'($urandom_range(4, 9)); x[14:11] = 4'($urandom_range(4, 9));
          y[6:3] = 4'($urandom_range(4, 9)); y[14:11] = 4'($urandom_range(4, 9));
        end else if (fmt[p] == FMT_FP16) begin
          x[14:10] = 5'($urandom_range(10, 18)); y[14:10] = 5'($urandom_range(10, 18));
        end
        rimg[p][8*b +: 16] = x; simg[p][8*b +: 16] = y;
      end
      wr_row(4'(p), MEM_RRAM0, 8'd0, rimg[p]);
      wr_row(4'(p), 4'd1, 8'd0, simg[p]);
    end
    for (int i = 0; i < 2; i++) begin
      for (int k = 0; k < 8; k++) begin fu2[i][32*k +: 32] = $urandom; fu3[i][32*k +: 32] = $urandom; end
      wr_row(UNIT_FU, 4'd2, 8'(i), fu2[i]);
      wr_row(UNIT_FU, 4'd3, 8'(i), fu3[i]);
    end
    mp = '0;
    mp[31:0]  = tmac0(0, FMT_INT8, 8'd16, 4'b1001, 8'd0);
    mp[63:32] = tmac1(0, 5'd16, 5'd0, 2'd1, 8'd0);
    mp[95:64] = wbk(0, 0, 2'd3, 8'd0, 5'd0, 4'd0);
    wr_row(4'd0, MEM_RRAM0 + 4'd1, 8'd0, mp);

    // ---------------- program 1: every PE at once
    prog.delete();
    for (int p = 0; p < 10; p++) begin
      prog.push_back(tmac0(p, fmt[p], 8'd16, 4'b0000, 8'd0));
      prog.push_back(tmac1(p, 5'd0, 5'd0, 2'd1, 8'd0));
      prog.push_back(wbk(p, p, 2'd2, 8'd0, 5'd0, 4'd0));
    end
    run_program(prog);
    for (int p = 0; p < 10; p++) begin
      rd_row(4'(p), 4'd2, 8'd0, r);
      dot(rimg[p], 0, simg[p], 0, fmt[p], 16, iref, fref, fabs);
      check_word(r[31:0], fmt[p], iref, fref, fabs, $sformatf("PE %0d TensorMAC fmt %0d", p, fmt[p]));
    end

    // ---------------- program 2: cross-unit work
    prog.delete();
    prog.push_back(tmac0(0, FMT_INT8, 8'd16, 4'b0000, 8'd0));           // AccFlag on PE 0
    prog.push_back(tmac1(0, 5'd0, 5'd0, 2'd1, 8'd0));
    prog.push_back(wbk(0, 0, 2'd2, 8'd0, 5'd4, 4'hF));
    prog.push_back(tmac0(4, FMT_INT8, 8'd16, 4'b0000, 8'd0));           // remote WBK PE 4 -> FU
    prog.push_back(tmac1(4, 5'd0, 5'd0, 2'd1, 8'd0));
    prog.push_back(wbk(4, UNIT_FU, 2'd0, 8'd0, 5'd0, 4'd0));
    prog.push_back({1'b1, 4'd8, UNIT_FU, 2'd1, 8'd0, 3'd0, 2'd1, 8'd0}); // EBLKMOV PE 8 -> FU buf 1
    prog.push_back({OP_FUNCOP, FN_RELU, 8'd32, 8'd0, 3'd0, 4'd1});
    prog.push_back({OP_FUNCOP, FN_SOFTMAX, 8'd64, 8'd0, 3'd0, 4'd2});
    prog.push_back({OP_FUNCOP, FN_MAXPOOL, 8'd64, 8'd0, 3'd4, 4'd3});
    prog.push_back({OP_MPLD, 4'd0, 3'd1, 8'd0, 10'd3, 2'd0});          // micro-program on PE 0
    prog.push_back({OP_IBLKMOV, 4'd6, 2'd1, 8'd0, 3'd0, 2'd3, 8'd5});   // PE 6 SRAM1 -> SRAM3 row 5
    prog.push_back({OP_RRAM_LD, 4'd5, 3'd0, 2'd0, 4'd5, 2'd0, 12'd0});  // PE 5 RRAM0 -> SRAM0
    prog.push_back({OP_SRAM_LD, 4'd7, 3'd0, 2'd1, 4'd9, 2'd3, 12'd0});  // PE 7 SRAM1 -> PE 9 SRAM3
    run_program(prog);

    rd_row(4'd0, 4'd2, 8'd0, r);
    dot(rimg[0], 0, simg[0], 0, FMT_INT8, 16, iref, fref, fabs);
    check($signed(r[63:32]) == int'(2 * iref), "AccFlag accumulation");
    rd_row(UNIT_FU, 4'd0, 8'd0, r);
    dot(rimg[4], 0, simg[4], 0, FMT_INT8, 16, iref, fref, fabs);
    check($signed(r[31:0]) == int'(iref), "remote WBK into FU buffer");
    rd_row(UNIT_FU, 4'd1, 8'd0, r);
    for (int i = 0; i < 32; i++) begin
      logic [7:0] x;
      x = simg[8][8*i +: 8];
      check(r[8*i +: 8] == (x[7] ? 8'd0 : x), $sformatf("EBLKMOV + ReLU byte %0d", i));
    end
    begin
      logic [255:0] o [2];
      longint s, m, recip;
      int x [64];
      rd_row(UNIT_FU, 4'd2, 8'd0, o[0]); rd_row(UNIT_FU, 4'd2, 8'd1, o[1]);
      for (int i = 0; i < 64; i++) x[i] = $signed(fu2[i / 32][8*(i%32) +: 8]);
      s = 0; m = 0;
      for (int bt = 0; bt < 2; bt++) begin
        longint bm, mn, es;
        bm = -128;
        for (int i = bt * 32; i < bt * 32 + 32; i++) if (x[i] > bm) bm = x[i];
        mn = (bt == 0 || bm > m) ? bm : m;
        es = 0;
        for (int i = bt * 32; i < bt * 32 + 32; i++) es += e_int(int'(mn - x[i]));
        s = ((bt == 0) ? 0 : ((s * e_int(int'(mn - m))) >> 15)) + es;
        m = mn;
      end
      recip = (64'h4000_0000 / s) & 16'hffff;
      for (int i = 0; i < 64; i++) begin
        longint p;
        p = (e_int(int'(m - x[i])) * recip) >> 23;
        if (p > 127) p = 127;
        check(o[i / 32][8*(i%32) +: 8] == 8'(p), $sformatf("softmax element %0d", i));
      end
    end
    rd_row(UNIT_FU, 4'd3, 8'd0, r);
    for (int j = 0; j < 16; j++) begin
      int mx;
      mx = -128;
      for (int k = 0; k < 4; k++) begin
        int v;
        v = $signed(fu3[(4*j+k) / 32][8*((4*j+k)%32) +: 8]);
        if (v > mx) mx = v;
      end
      check($signed(r[8*j +: 8]) == mx, $sformatf("max-pooling output %0d", j));
    end
    rd_row(4'd0, 4'd3, 8'd0, r);
    dot(simg[0], 16, simg[0], 0, FMT_INT8, 16, iref, fref, fabs);
    check($signed(r[31:0]) == int'(iref), "MPLD micro-program result");
    rd_row(4'd6, 4'd3, 8'd5, r);
    check(r == simg[6], "IBLKMOV row");
    rd_row(4'd5, 4'd0, 8'd0, r);
    check(r == rimg[5], "RRAM LD row");
    rd_row(4'd9, 4'd3, 8'd0, r);
    check(r == simg[7], "SRAM LD row to another PE");

    // ---------------- every mechanism must have happened
    for (int f = 0; f < 4; f++) check(c_fmt[f] > 0, $sformatf("TensorMAC format %0d never ran", f));
    check(c_overlap > 0,    "no two PEs ever computed at the same time");
    check(c_rram_rd > 0,    "no RRAM read");
    check(c_remote_wbk > 0, "no remote WBK beat");
    check(c_eblkmov > 0,    "no EBLKMOV beat");
    check(int'(dut.u_tc.n_barriers) >= 7, $sformatf("barriers %0d", dut.u_tc.n_barriers));
    check(c_mpld > 0,       "no MPLD fetch");
    check(c_softmax > 0,    "no softmax");
    check(c_pool > 0,       "no pooling");
    check(c_relu > 0,       "no ReLU");
    check(c_ifetch > 0,     "no instruction fetch");
    check(c_spi_beats > 0,  "no SPI bus beat");
    check(c_resp > 0,       "no read response");
    check(c_rowcopy > 0,    "no row copy");
    $display("mechanisms: fmt %0d/%0d/%0d/%0d overlap %0d rram %0d rwbk %0d eblk %0d barriers %0d mpld %0d sm %0d pool %0d relu %0d fetch %0d spi %0d resp %0d copy %0d",
             c_fmt[0], c_fmt[1], c_fmt[2], c_fmt[3], c_overlap, c_rram_rd, c_remote_wbk, c_eblkmov,
             dut.u_tc.n_barriers, c_mpld, c_softmax, c_pool, c_relu, c_ifetch, c_spi_beats, c_resp, c_rowcopy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
