// function_unit_tb: self-checking test of the function unit. The bench
// writes buffer rows over the bus (as unit 11), pushes FuncOp and EBLKMOV
// words on the instruction bus and reads results back with bus read
// requests. Checked: softmax over a whole vector and over groups (each
// group on new rows) against a bit-exact model, max- and average-pooling
// with several window sizes, ReLU with a partial last row, and EBLKMOV of
// several rows to another unit.
module function_unit_tb;
  import proteus_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  ibus_t ibus;
  logic ic_full, idle;
  bus_lane_t lanes [N_UNITS];
  bus_lane_t fu_lane, tb_lane;
  function_unit dut (.clk, .rst_n, .ibus, .ic_full, .idle, .lanes, .lane_out(fu_lane));
  always_comb begin
    for (int i = 0; i < N_UNITS; i++) lanes[i] = '0;
    lanes[UNIT_FU]   = fu_lane;
    lanes[UNIT_SPI]  = tb_lane;
  end
  int checks = 0, failures = 0;
  initial begin #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [255:0] resp_row, ext_rows [8];
  always @(posedge clk) if (fu_lane.valid && fu_lane.unit == UNIT_SPI) begin
    if (fu_lane.mem == MEM_RESP) begin
      if (fu_lane.beat) resp_row[255:128] <= fu_lane.data; else resp_row[127:0] <= fu_lane.data;
    end else if (fu_lane.beat) ext_rows[fu_lane.row[2:0]][255:128] <= fu_lane.data;
    else ext_rows[fu_lane.row[2:0]][127:0] <= fu_lane.data;
  end

  task automatic beat(input logic [3:0] mem, input logic [7:0] row, input logic b,
                      input logic [127:0] d, input logic rd = 0);
    @(negedge clk); tb_lane = '{valid:1'b1, rd:rd, beat:b, unit:UNIT_FU, mem:mem, row:row, be:16'hFFFF, data:d};
    @(posedge clk); #1 tb_lane = '0;
  endtask
  task automatic wait_idle();
    int n = 0;
    repeat (4) @(posedge clk);
    while (!idle && n < 200000) begin @(posedge clk); n++; end
  endtask
  task automatic write_row(input logic [1:0] bank, input logic [7:0] row, input logic [255:0] d);
    beat({2'b0, bank}, row, 1'b0, d[127:0]); beat({2'b0, bank}, row, 1'b1, d[255:128]);
  endtask
  task automatic read_row(input logic [1:0] bank, input logic [7:0] row, output logic [255:0] d);
    beat({2'b0, bank}, row, 1'b0, 128'(UNIT_SPI), 1'b1);
    wait_idle(); repeat (3) @(posedge clk);
    d = resp_row;
  endtask
  task automatic issue(input logic [31:0] w);
    @(negedge clk); ibus = '{valid:1'b1, unit:UNIT_FU, word:w};
    @(posedge clk); #1 ibus = '0;
  endtask
  function automatic logic [31:0] funcop(input logic [3:0] fn, input logic [7:0] vlen,
                                         input logic [7:0] ss, input logic [2:0] ps, input logic [1:0] bank);
    return {OP_FUNCOP, fn, vlen, ss, ps, 2'b0, bank};
  endfunction

  localparam int FRAC [16] = '{32768, 31379, 30048, 28774, 27554, 26386, 25268, 24196,
                               23170, 22188, 21247, 20347, 19484, 18658, 17867, 17109};
  function automatic longint e_int(input int d);
    int t;
    t = (d * 1477 + 512) >> 10;
    if ((t >> 4) > 15) return 0;
    return FRAC[t & 15] >> (t >> 4);
  endfunction

  logic [255:0] img [8], got [8];
  int x [256];
  task automatic load(input logic [1:0] bank);
    for (int r = 0; r < 8; r++) begin
      for (int w = 0; w < 8; w++) img[r][32*w +: 32] = $urandom;
      write_row(bank, 8'(r), img[r]);
    end
    for (int i = 0; i < 256; i++) x[i] = $signed(img[i / 32][8*(i%32) +: 8]);
  endtask
  task automatic readback(input logic [1:0] bank);
    for (int r = 0; r < 8; r++) read_row(bank, 8'(r), got[r]);
  endtask
  function automatic int gb(input int i);
    return $signed(got[i / 32][8*(i%32) +: 8]);
  endfunction
  // softmax of x[s .. s+n-1], checked at output position o
  task automatic sm_check(input int s, input int n, input int o);
    longint sum, m, recip;
    sum = 0; m = 0;
    for (int bt = 0; bt * 32 < n; bt++) begin
      longint bm, mn, es;
      bm = -128;
      for (int i = bt * 32; i < n && i < bt * 32 + 32; i++) if (x[s + i] > bm) bm = x[s + i];
      mn = (bt == 0 || bm > m) ? bm : m;
      es = 0;
      for (int i = bt * 32; i < n && i < bt * 32 + 32; i++) es += e_int(int'(mn - x[s + i]));
      sum = ((bt == 0) ? 0 : ((sum * e_int(int'(mn - m))) >> 15)) + es;
      m = mn;
    end
    recip = (64'h4000_0000 / sum) & 16'hffff;
    for (int i = 0; i < n; i++) begin
      longint p;
      p = (e_int(int'(m - x[s + i])) * recip) >> 23;
      if (p > 127) p = 127;
      check(gb(o + i) == p, $sformatf("softmax s%0d i%0d got %0d exp %0d", s, i, gb(o + i), p));
    end
  endtask

  initial begin
    ibus = '0; tb_lane = '0;
    repeat (3) @(posedge clk); rst_n = 1; repeat (2) @(posedge clk);
    load(2'd1); readback(2'd1); for (int r = 0; r < 8; r++) check(got[r] == img[r], $sformatf("load/readback row %0d %h %h", r, got[r], img[r]));
    // softmax, whole vector of 200 elements
    load(2'd1);
    issue(funcop(FN_SOFTMAX, 8'd200, 8'd0, 3'd0, 2'd1)); wait_idle(); readback(2'd1);
    sm_check(0, 200, 0);
    for (int i = 200; i < 256; i++) check(gb(i) == x[i], "softmax clobber");
    // softmax in groups of 40: group g read from rows 2g..2g+1
    load(2'd2);
    begin
      int xs [256];
      xs = x;
      issue(funcop(FN_SOFTMAX, 8'd100, 8'd40, 3'd0, 2'd2)); wait_idle(); readback(2'd2);
      // groups: 40 @ row0, 40 @ row2, 20 @ row4
      sm_check(0, 40, 0); sm_check(64, 40, 64); sm_check(128, 20, 128);
    end
    // max pooling window 4, average pooling window 8 (code 0) and 3
    for (int t = 0; t < 3; t++) begin
      int ps, vl, fn;
      ps = (t == 0) ? 4 : (t == 1) ? 8 : 3;
      fn = (t == 0) ? FN_MAXPOOL : FN_AVGPOOL;
      vl = (t == 2) ? 100 : 255;
      load(2'd3);
      issue(funcop(4'(fn), 8'(vl), 8'd0, (ps == 8) ? 3'd0 : 3'(ps), 2'd3)); wait_idle(); readback(2'd3);
      for (int j = 0; (j + 1) * ps <= vl; j++) begin
        int r;
        r = x[j * ps];
        for (int k = 1; k < ps; k++) if (fn == FN_MAXPOOL) begin if (x[j * ps + k] > r) r = x[j * ps + k]; end else r += x[j * ps + k];
        if (fn == FN_AVGPOOL) r = r / ps;
        check(gb(j) == r, $sformatf("pool t%0d j%0d got %0d exp %0d", t, j, gb(j), r));
      end
    end
    // ReLU over 70 elements
    load(2'd0);
    issue(funcop(FN_RELU, 8'd70, 8'd0, 3'd0, 2'd0)); wait_idle(); readback(2'd0);
    for (int i = 0; i < 256; i++) check(gb(i) == ((i < 70 && x[i] < 0) ? 0 : x[i]), $sformatf("relu %0d", i));
    // EBLKMOV bank 0 rows 2..6 to unit 11 rows 1..5 of its memory 2
    issue({1'b1, UNIT_FU, UNIT_SPI, 2'd0, 8'd2, 3'd4, 2'd2, 8'd1}); wait_idle(); repeat (4) @(posedge clk);
    for (int r = 0; r < 5; r++) check(ext_rows[r + 1] == got[r + 2], $sformatf("eblkmov row %0d", r));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
