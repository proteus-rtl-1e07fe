// softmax_unit_tb: fills a behavioural 256-bit row memory with random INT8
// (Q3.4) groups of random length, runs the softmax unit and checks every
// output byte against a bit-exact model of the unit's integer algorithm,
// that the result stays within 3/128 of the real softmax, and that bytes
// outside the group are not touched.
module softmax_unit_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, done, rd_en, wr_en;
  logic [7:0] base_row, rd_row, wr_row;
  logic [8:0] n;
  logic [255:0] rd_data, wr_data;
  logic [31:0] wr_be;
  softmax_unit dut (.*);
  logic [255:0] mem [256];
  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_row];
    if (wr_en) for (int j = 0; j < 32; j++) if (wr_be[j]) mem[wr_row][8*j +: 8] <= wr_data[8*j +: 8];
  end
  int checks = 0, failures = 0;
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  localparam int FRAC [16] = '{32768, 31379, 30048, 28774, 27554, 26386, 25268, 24196,
                               23170, 22188, 21247, 20347, 19484, 18658, 17867, 17109};
  function automatic longint e_int(input int d);
    int t;
    t = (d * 1477 + 512) >> 10;
    if ((t >> 4) > 15) return 0;
    return FRAC[t & 15] >> (t >> 4);
  endfunction

  initial begin
    start = 0; base_row = 0; n = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int it = 0; it < 12; it++) begin
      int len, base;
      int x [256];
      int expect_y [256];
      logic [255:0] orig [9];
      longint s, m, recip;
      real rs, rm;
      len = (it == 0) ? 256 : (it == 1) ? 1 : $urandom_range(2, 256);
      base = $urandom_range(0, 240);
      for (int r = 0; r < 9; r++) begin
        for (int w = 0; w < 8; w++) mem[(base + r) & 255][32*w +: 32] = $urandom;
        orig[r] = mem[(base + r) & 255];
      end
      for (int i = 0; i < len; i++) x[i] = $signed(mem[base + i / 32][8*(i%32) +: 8]);
      // bit-exact model, batch by batch
      s = 0; m = 0;
      for (int bt = 0; bt * 32 < len; bt++) begin
        longint bm, mn, es;
        bm = -128;
        for (int i = bt * 32; i < len && i < bt * 32 + 32; i++) if (x[i] > bm) bm = x[i];
        mn = (bt == 0 || bm > m) ? bm : m;
        es = 0;
        for (int i = bt * 32; i < len && i < bt * 32 + 32; i++) es += e_int(int'(mn - x[i]));
        s = ((bt == 0) ? 0 : ((s * e_int(int'(mn - m))) >> 15)) + es;
        m = mn;
      end
      recip = (64'h4000_0000 / s) & 16'hffff;
      rm = -1000; rs = 0;
      for (int i = 0; i < len; i++) if (x[i] > rm) rm = x[i];
      for (int i = 0; i < len; i++) rs += $exp((x[i] - rm) / 16.0);
      for (int i = 0; i < len; i++) begin
        longint p;
        p = (e_int(int'(m - x[i])) * recip) >> 23;
        expect_y[i] = (p > 127) ? 127 : int'(p);
      end
      @(negedge clk); start = 1; base_row = 8'(base); n = 9'(len);
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      @(negedge clk);
      for (int i = 0; i < 9 * 32; i++) begin
        int got;
        got = mem[(base + i / 32) & 255][8*(i%32) +: 8];
        checks++;
        if (i < len) begin
          real ry;
          ry = $exp((x[i] - rm) / 16.0) / rs * 128.0;
          if (ry > 127) ry = 127;
          if (got != expect_y[i] || got > ry + 3.0 || got < ry - 3.0) begin
            failures++; $display("FAIL it%0d i%0d got %0d exp %0d real %f", it, i, got, expect_y[i], ry);
          end
        end else if (got != orig[i / 32][8*(i%32) +: 8]) begin
          failures++; $display("FAIL it%0d i%0d clobbered", it, i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
