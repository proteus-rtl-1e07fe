// gp_dcim_pe_tb: self-checking test of one GP-DCIM PE.
//
// The bench plays the rest of the chip: it programs RRAM rows and writes
// tensor-SRAM rows over the bus (as the SPI unit would), pushes instruction
// words on the instruction bus, and reads rows back with bus read requests.
// Checked: TensorMAC in all four formats against dot products computed here
// (INT exactly; FP against a double-precision sum), arbitrary source and
// destination byte offsets across row boundaries, RRAM and SRAM sources,
// kernel size (several outputs), WBK AccFlag accumulation, IBLKMOV,
// EBLKMOV to another unit, RRAM LD of a whole macro, a micro-program run by
// MPLD from RRAM, and the bit-serial cycle count (8 cycles per row, INT8).
module gp_dcim_pe_tb;
  import proteus_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ibus_t     ibus;
  logic      ic_full, idle;
  bus_lane_t lanes [N_UNITS];
  bus_lane_t pe_lane, tb_lane;

  gp_dcim_pe #(.PE_ID(4'd0)) dut (.clk, .rst_n, .ibus, .ic_full, .idle, .lanes, .lane_out(pe_lane));

  always_comb begin
    for (int i = 0; i < N_UNITS; i++) lanes[i] = '0;
    lanes[0]  = pe_lane;
    lanes[11] = tb_lane;
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // received beats addressed to unit 11
  logic [255:0] resp_row;
  logic [255:0] ext_rows [4];
  int           ext_beats = 0;
  always @(posedge clk) begin
    if (pe_lane.valid && pe_lane.unit == 4'd11) begin
      if (pe_lane.mem == MEM_RESP) begin
        if (pe_lane.beat) resp_row[255:128] <= pe_lane.data; else resp_row[127:0] <= pe_lane.data;
      end else begin
        if (pe_lane.beat) ext_rows[pe_lane.row[1:0]][255:128] <= pe_lane.data;
        else              ext_rows[pe_lane.row[1:0]][127:0]   <= pe_lane.data;
        ext_beats++;
      end
    end
  end

  task automatic beat(input logic [3:0] mem, input logic [7:0] row, input logic b,
                      input logic [127:0] d, input logic rd = 0);
    tb_lane <= '{valid:1'b1, rd:rd, beat:b, unit:4'd0, mem:mem, row:row, be:16'hFFFF, data:d};
    @(posedge clk);
    tb_lane <= '0;
  endtask

  task automatic write_row(input logic [3:0] mem, input logic [7:0] row, input logic [255:0] d);
    beat(mem, row, 1'b0, d[127:0]);
    repeat (10) @(posedge clk);
    beat(mem, row, 1'b1, d[255:128]);
    repeat (10) @(posedge clk);
  endtask

  task automatic read_row(input logic [1:0] sram, input logic [7:0] row, output logic [255:0] d);
    beat({2'b0, sram}, row, 1'b0, 128'd11, 1'b1);
    wait_idle();
    repeat (3) @(posedge clk);
    d = resp_row;
  endtask

  task automatic issue(input logic [31:0] w);
    ibus <= '{valid:1'b1, unit:4'd0, word:w};
    @(posedge clk);
    ibus <= '0;
  endtask

  task automatic wait_idle();
    int n = 0;
    repeat (4) @(posedge clk);
    while (!idle && n < 200000) begin @(posedge clk); n++; end
  endtask

  // --------------------------------------------------- encoders
  function automatic logic [31:0] tmac0(input logic [1:0] fmt, input logic [7:0] vlen,
                                        input logic [3:0] srcmem, input logic [7:0] row);
    return {OP_TMAC, 4'd0, fmt, vlen, 1'b0, srcmem, row};
  endfunction
  function automatic logic [31:0] tmac1(input logic [5:0] ks, input logic [4:0] colm,
                                        input logic [4:0] coln, input logic [1:0] sram,
                                        input logic [7:0] row);
    return {ks, 4'd0, colm, coln, 2'b0, sram, row};
  endfunction
  function automatic logic [31:0] wbk(input logic [3:0] dst, input logic [1:0] sram,
                                      input logic [7:0] row, input logic [4:0] col,
                                      input logic [3:0] acc);
    return {OP_WBK, 4'd0, dst, sram, row, col, acc};
  endfunction

  // --------------------------------------------------- images
  logic [255:0] rimg [16];   // RRAM macro 0 rows 0..15
  logic [255:0] simg [16];   // SRAM macro 1 rows 0..15

  function automatic logic [7:0] rbyte(input int a); return rimg[a/32][8*(a%32) +: 8]; endfunction
  function automatic logic [7:0] sbyte(input int a); return simg[a/32][8*(a%32) +: 8]; endfunction

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

  function automatic logic [31:0] word_at(input logic [255:0] rows [4], input int a);
    logic [31:0] w;
    for (int i = 0; i < 4; i++) w[8*i +: 8] = rows[(a+i)/32][8*((a+i)%32) +: 8];
    return w;
  endfunction

  // fill images with format-specific random data
  task automatic fill(input logic [1:0] fmt);
    for (int r = 0; r < 16; r++)
      for (int b = 0; b < 32; b += 2) begin
        logic [15:0] x, y;
        x = 16'($urandom); y = 16'($urandom);
        if (fmt == FMT_FP8) begin
          x[6:3] = 4'(4 + $urandom_range(0, 5)); x[14:11] = 4'(4 + $urandom_range(0, 5));
          y[6:3] = 4'(4 + $urandom_range(0, 5)); y[14:11] = 4'(4 + $urandom_range(0, 5));
        end else if (fmt == FMT_FP16) begin
          x[14:10] = 5'(10 + $urandom_range(0, 8)); y[14:10] = 5'(10 + $urandom_range(0, 8));
        end
        rimg[r][8*b +: 16] = x; simg[r][8*b +: 16] = y;
      end
  endtask

  task automatic load_images();
    for (int r = 0; r < 16; r++) begin
      write_row(MEM_RRAM0, 8'(r), rimg[r]);
      write_row(4'd1, 8'(r), simg[r]);
    end
  endtask

  // one TensorMAC + WBK, checked
  task automatic run_mac(input logic [1:0] fmt, input int vlen, input bit src_sram,
                         input int srow, input int scol, input int drow, input int dcol,
                         input int ks, input string name);
    int esz, nk;
    logic [255:0] res [4];
    esz = (fmt == FMT_INT16 || fmt == FMT_FP16) ? 2 : 1;
    nk  = (ks == 0) ? 1 : ks;
    issue(tmac0(fmt, 8'(vlen), src_sram ? 4'b1001 : 4'b0000, 8'(srow)));
    issue(tmac1(6'(ks), 5'(scol), 5'(dcol), 2'd1, 8'(drow)));
    issue(wbk(4'd0, 2'd2, 8'd0, 5'd3, 4'd0));
    wait_idle();
    for (int r = 0; r < 4; r++) read_row(2'd2, 8'(r), res[r]);
    for (int k = 0; k < nk; k++) begin
      longint iref; real fref, fabs, got; logic [31:0] w;
      iref = 0; fref = 0.0; fabs = 0.0;
      for (int e = 0; e < vlen; e++) begin
        int sa, da; logic [15:0] av, bv;
        sa = srow*32 + scol + (k*vlen + e)*esz;
        da = drow*32 + dcol + e*esz;
        if (src_sram) begin av[15:8] = sbyte(sa+1); av[7:0] = sbyte(sa); end
        else          begin av[15:8] = rbyte(sa+1); av[7:0] = rbyte(sa); end
        bv[15:8] = sbyte(da+1); bv[7:0] = sbyte(da);
        case (fmt)
          FMT_INT8:  iref += longint'($signed(av[7:0])) * longint'($signed(bv[7:0]));
          FMT_INT16: iref += longint'($signed(av)) * longint'($signed(bv));
          FMT_FP8: begin fref += fpval(av, 0) * fpval(bv, 0); fabs += (fpval(av,0)*fpval(bv,0) < 0) ? -fpval(av,0)*fpval(bv,0) : fpval(av,0)*fpval(bv,0); end
          default: begin fref += fpval(av, 1) * fpval(bv, 1); fabs += (fpval(av,1)*fpval(bv,1) < 0) ? -fpval(av,1)*fpval(bv,1) : fpval(av,1)*fpval(bv,1); end
        endcase
      end
      w = word_at(res, 3 + 4*k);
      if (fmt == FMT_INT8 || fmt == FMT_INT16) begin
        check($signed(w) == int'(iref), $sformatf("%s k=%0d got %0d exp %0d", name, k, $signed(w), iref));
      end else begin
        real d;
        got = f32(w);
        d = got - fref; if (d < 0) d = -d;
        check(d <= 1e-5 * fabs + 1e-30, $sformatf("%s k=%0d got %g exp %g", name, k, got, fref));
      end
    end
  endtask

  int bits_cycles;
  always @(posedge clk) if (dut.st == dut.S_T_BITS) bits_cycles++;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [255:0] r, res [4];
    ibus = '0; tb_lane = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // ---------------- INT8, RRAM source, offsets, 2 kernels, cycle count
    fill(FMT_INT8); load_images();
    bits_cycles = 0;
    run_mac(FMT_INT8, 32, 0, 0, 0, 2, 0, 1, "int8 aligned");
    check(bits_cycles == 8, $sformatf("int8 one row: %0d bit cycles (exp 8)", bits_cycles));
    run_mac(FMT_INT8, 45, 0, 1, 7, 3, 20, 2, "int8 rram offs");
    run_mac(FMT_INT8, 70, 1, 5, 30, 9, 1, 3, "int8 sram src");
    // ---------------- INT16
    fill(FMT_INT16); load_images();
    run_mac(FMT_INT16, 20, 0, 0, 6, 4, 10, 2, "int16");
    run_mac(FMT_INT16, 33, 1, 8, 2, 1, 0, 1, "int16 sram");
    // ---------------- FP8 / FP16
    fill(FMT_FP8); load_images();
    run_mac(FMT_FP8, 40, 0, 0, 3, 2, 9, 2, "fp8");
    run_mac(FMT_FP8, 64, 1, 6, 0, 1, 0, 1, "fp8 sram");
    fill(FMT_FP16); load_images();
    run_mac(FMT_FP16, 24, 0, 0, 4, 3, 2, 2, "fp16");

    // ---------------- AccFlag: result = previous pSum + new MAC
    fill(FMT_INT8); load_images();
    issue(tmac0(FMT_INT8, 8'd16, 4'b0000, 8'd0)); issue(tmac1(6'd1, 5'd0, 5'd0, 2'd1, 8'd0));
    issue(wbk(4'd0, 2'd2, 8'd5, 5'd0, 4'd0));
    issue(tmac0(FMT_INT8, 8'd16, 4'b0000, 8'd1)); issue(tmac1(6'd1, 5'd0, 5'd0, 2'd1, 8'd1));
    issue(wbk(4'd0, 2'd2, 8'd5, 5'd4, 4'hF));
    wait_idle();
    read_row(2'd2, 8'd5, r);
    begin
      int a0, a1;
      a0 = 0; a1 = 0;
      for (int e = 0; e < 16; e++) begin
        a0 += $signed(rbyte(e)) * $signed(sbyte(e));
        a1 += $signed(rbyte(32+e)) * $signed(sbyte(32+e));
      end
      check($signed(r[31:0]) == a0, "accflag first");
      check($signed(r[63:32]) == a0 + a1, $sformatf("accflag acc got %0d exp %0d", $signed(r[63:32]), a0+a1));
    end

    // ---------------- IBLKMOV: SRAM1 rows 2..4 -> SRAM3 rows 7..9
    issue({OP_IBLKMOV, 4'd0, 2'd1, 8'd2, 3'd2, 2'd3, 8'd7});
    wait_idle();
    for (int i = 0; i < 3; i++) begin
      read_row(2'd3, 8'(7+i), r);
      check(r == simg[2+i], $sformatf("iblkmov row %0d", i));
    end
    // ---------------- EBLKMOV: SRAM1 rows 0..1 -> unit 11
    ext_beats = 0;
    issue({1'b1, 4'd0, 4'd11, 2'd1, 8'd0, 3'd1, 2'd0, 8'd0});
    wait_idle(); repeat (3) @(posedge clk);
    check(ext_beats == 4 && ext_rows[0] == simg[0] && ext_rows[1] == simg[1], "eblkmov");
    // ---------------- RRAM LD: whole RRAM0 -> SRAM0
    issue({OP_RRAM_LD, 4'd0, 3'd0, 2'd0, 4'd0, 2'd0, 12'd0});
    wait_idle();
    for (int i = 0; i < 16; i += 5) begin
      read_row(2'd0, 8'(i), r);
      check(r == rimg[i], $sformatf("rram ld row %0d", i));
    end
    // ---------------- MPLD: micro-program in RRAM macro 1 row 40
    begin
      logic [255:0] mp;
      mp = '0;
      mp[31:0]   = tmac0(FMT_INT8, 8'd8, 4'b1001, 8'd3);
      mp[63:32]  = tmac1(6'd1, 5'd4, 5'd8, 2'd1, 8'd6);
      mp[95:64]  = wbk(4'd0, 2'd2, 8'd9, 5'd12, 4'd0);
      write_row(MEM_RRAM0 + 4'd1, 8'd40, mp);
      issue({OP_MPLD, 4'd0, 3'd1, 8'd40, 10'd3, 2'd0});
      wait_idle();
      read_row(2'd2, 8'd9, r);
      begin
        int a;
        a = 0;
        for (int e = 0; e < 8; e++) a += $signed(sbyte(3*32+4+e)) * $signed(sbyte(6*32+8+e));
        check($signed(r[127:96]) == a, $sformatf("mpld micro-program got %0d exp %0d", $signed(r[127:96]), a));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
