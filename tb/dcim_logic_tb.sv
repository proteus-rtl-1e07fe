// dcim_logic_tb: drives the DCIM logic with a behavioural SRAM row (output
// = row AND input vector, one cycle later). Runs INT8 dot products over two
// rows and an FP8 dot product (exponent pass, exponent cycle, mantissa
// cycles) and checks the written-back value against a reference.
module dcim_logic_tb;
  import proteus_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  fmt_e fmt;
  logic mac_issue, exp_issue, exp_max, epu_clr, mac_done, busy, ps_go, ps_valid;
  dcim_tag_t tag;
  logic [31:0] lane_mask, a_sign;
  logic [31:0][4:0] a_exp;
  logic [255:0] dout, row_q, in_q;
  logic [6:0] emax;
  logic [5:0] ps_idx; logic [3:0] acc_flag;
  logic signed [63:0] ps_m; logic signed [9:0] ps_scale;
  dcim_logic dut (.*);
  assign dout = row_q & in_q;
  int checks = 0, failures = 0;
  logic [255:0] arow [2], brow [2];
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic cyc(input logic [255:0] row, input logic [255:0] iv);
    @(negedge clk); row_q <= row; in_q <= iv;
  endtask
  function automatic real fp8(input logic [7:0] v);
    real r; int e;
    e = v[6:3];
    r = (e == 0) ? v[2:0] / 8.0 / 64.0 : (1.0 + v[2:0] / 8.0);
    for (int i = 7; i < e; i++) r = r * 2.0;
    for (int i = e; i < 7 && e != 0; i++) r = r / 2.0;
    return v[7] ? -r : r;
  endfunction

  initial begin
    longint iref;
    fmt = FMT_INT8; mac_issue = 0; exp_issue = 0; exp_max = 0; epu_clr = 0; tag = '0;
    lane_mask = '1; a_sign = 0; a_exp = '0; ps_go = 0; ps_idx = 0; acc_flag = 0;
    row_q = 0; in_q = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // INT8, two rows
    iref = 0;
    for (int r = 0; r < 2; r++) for (int i = 0; i < 8; i++) begin
      arow[r][32*i +: 32] = $urandom; brow[r][32*i +: 32] = $urandom;
    end
    for (int r = 0; r < 2; r++) for (int e = 0; e < 32; e++)
      iref += longint'($signed(arow[r][8*e +: 8])) * longint'($signed(brow[r][8*e +: 8]));
    for (int r = 0; r < 2; r++)
      for (int b = 7; b >= 0; b--) begin
        logic [255:0] iv;
        for (int e = 0; e < 32; e++) iv[8*e +: 8] = {8{arow[r][8*e + b]}};
        @(negedge clk);
        mac_issue = 1; tag = '0; tag.first_bit = (b == 7); tag.neg = (b == 7); tag.last_bit = (b == 0);
        tag.first_row = (r == 0); tag.last_row = (r == 1);
        @(posedge clk); #1; row_q = brow[r]; in_q = iv;
      end
    @(negedge clk); mac_issue = 0;
    while (!mac_done) @(posedge clk);
    @(negedge clk); ps_go = 1; @(negedge clk); ps_go = 0;
    checks++; if (ps_m != iref) begin failures++; $display("FAIL int8 %0d %0d", ps_m, iref); end
    // FP8, one row: exponent pass, exponent latch, 4 mantissa cycles
    begin
      real fref, fabs, got, d;
      fmt = FMT_FP8; fref = 0; fabs = 0;
      for (int e = 0; e < 32; e++) begin
        arow[0][8*e +: 8] = {1'($urandom), 4'($urandom_range(5, 9)), 3'($urandom)};
        brow[0][8*e +: 8] = {1'($urandom), 4'($urandom_range(5, 9)), 3'($urandom)};
        a_exp[e] = {1'b0, arow[0][8*e+3 +: 4]}; a_sign[e] = arow[0][8*e+7];
        fref += fp8(arow[0][8*e +: 8]) * fp8(brow[0][8*e +: 8]);
        fabs += (fp8(arow[0][8*e +: 8]) * fp8(brow[0][8*e +: 8]) < 0 ? -1 : 1) * fp8(arow[0][8*e +: 8]) * fp8(brow[0][8*e +: 8]);
      end
      @(negedge clk); epu_clr = 1; @(negedge clk); epu_clr = 0;
      for (int p = 0; p < 2; p++) begin
        @(negedge clk); exp_issue = 1; exp_max = (p == 0);
        @(posedge clk); #1; exp_issue = 0; row_q = brow[0]; in_q = '1;
      end
      for (int b = 3; b >= 0; b--) begin
        logic [255:0] iv;
        for (int e = 0; e < 32; e++) iv[8*e +: 8] = {8{(b == 3) ? (arow[0][8*e+3 +: 4] != 0) : arow[0][8*e + b]}};
        @(negedge clk);
        mac_issue = 1; tag = '0; tag.first_bit = (b == 3); tag.last_bit = (b == 0);
        tag.first_row = 1; tag.last_row = 1; tag.k = 6'd1; tag.scale = fp_scale(FMT_FP8, emax);
        @(posedge clk); #1; row_q = brow[0]; in_q = iv;
      end
      @(negedge clk); mac_issue = 0;
      while (!mac_done) @(posedge clk);
      @(negedge clk); ps_go = 1; ps_idx = 1; @(negedge clk); ps_go = 0;
      got = 0;
      begin
        logic [31:0] w;
        w = to_fp32(ps_m, ps_scale);
        got = (1.0 + w[22:0] / 8388608.0);
        for (int i = 127; i < int'(w[30:23]); i++) got = got * 2.0;
        for (int i = int'(w[30:23]); i < 127; i++) got = got / 2.0;
        if (w[31]) got = -got;
      end
      d = got - fref; if (d < 0) d = -d;
      checks++; if (d > 1e-5 * fabs) begin failures++; $display("FAIL fp8 %g %g", got, fref); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
