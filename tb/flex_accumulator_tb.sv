// flex_accumulator_tb: feeds the bit-serial partial sums of random INT8 and
// INT16 dot products (several rows each, MSB cycle first) and checks the
// MAC result through the pSum port, then checks AccFlag accumulation and
// the alignment of two FP-scaled values.
module flex_accumulator_tb;
  import proteus_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, mac_done, ps_go, ps_valid;
  dcim_tag_t in_tag;
  logic signed [47:0] in_sum;
  logic [5:0] ps_idx;
  logic [3:0] acc_flag;
  logic signed [63:0] ps_m;
  logic signed [9:0] ps_scale;
  flex_accumulator dut (.*);
  int checks = 0, failures = 0;
  longint refv [4];
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic run_vec(input int k, input int w, input int rows, input int scale);
    longint r;
    r = 0;
    for (int row = 0; row < rows; row++) begin
      int a [32], b [32];
      for (int e = 0; e < 32; e++) begin
        a[e] = (w == 8) ? $signed(8'($urandom)) : $signed(16'($urandom));
        b[e] = (w == 8) ? $signed(8'($urandom)) : $signed(16'($urandom));
        r += longint'(a[e]) * longint'(b[e]);
      end
      for (int bi = w - 1; bi >= 0; bi--) begin
        longint s;
        s = 0;
        for (int e = 0; e < 32; e++) if ((a[e] >> bi) & 1) s += b[e];
        @(negedge clk);
        in_valid = 1; in_sum = 48'(s);
        in_tag = '0; in_tag.first_bit = (bi == w - 1); in_tag.neg = (bi == w - 1);
        in_tag.last_bit = (bi == 0); in_tag.first_row = (row == 0);
        in_tag.last_row = (row == rows - 1); in_tag.k = 6'(k); in_tag.scale = 10'(scale);
      end
    end
    @(negedge clk); in_valid = 0;
    refv[k] = r;
  endtask

  task automatic wbk(input int k, input int acc);
    @(negedge clk); ps_go = 1; ps_idx = 6'(k); acc_flag = 4'(acc);
    @(negedge clk); ps_go = 0;
  endtask

  initial begin
    in_valid = 0; in_tag = '0; in_sum = 0; ps_go = 0; ps_idx = 0; acc_flag = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    run_vec(0, 8, 3, 0);
    run_vec(1, 16, 2, 0);
    wbk(0, 0); checks++; if (ps_m != refv[0]) begin failures++; $display("FAIL int8 %0d %0d", ps_m, refv[0]); end
    wbk(1, 0); checks++; if (ps_m != refv[1]) begin failures++; $display("FAIL int16"); end
    run_vec(0, 8, 1, 0);
    wbk(0, 0); wbk(0, 1);
    checks++; if (ps_m != 2 * refv[0]) begin failures++; $display("FAIL accflag"); end
    // scaled values: 5*2^-3 (slot 2) accumulated onto 12*2^-1 -> (24+5)*2^-3? no: aligned to -1
    @(negedge clk); in_valid = 1; in_tag = '0; in_tag.first_bit = 1; in_tag.last_bit = 1;
    in_tag.first_row = 1; in_tag.last_row = 1; in_tag.k = 6'd2; in_tag.scale = -10'sd1; in_sum = 48'sd12;
    @(negedge clk); in_valid = 0;
    wbk(2, 0);
    @(negedge clk); in_valid = 1; in_tag.scale = -10'sd3; in_sum = 48'sd40;
    @(negedge clk); in_valid = 0;
    wbk(2, 1);
    checks++; if (ps_m != 64'sd22 || ps_scale != -10'sd1) begin failures++; $display("FAIL fp align %0d %0d", ps_m, ps_scale); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
