// mfat_tb: streams random SRAM outputs, one per cycle, in INT8, INT16, FP8
// and FP16 modes with random lane masks, signs and alignment shifts, and
// checks every sum and its tag five cycles later against a reference sum.
module mfat_tb;
  import proteus_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  dcim_tag_t in_tag, out_tag;
  fmt_e fmt;
  logic [255:0] dout;
  logic [31:0] lane_mask, a_sign, uf;
  logic [31:0][4:0] shift;
  logic signed [47:0] out_sum;
  mfat dut (.*);
  int checks = 0, failures = 0;
  longint exp_q [$];
  int lat_ok = 0;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_q.size() == 0 || out_sum != 48'(exp_q[0]) || out_tag.k != 6'(checks - 1)) begin
      failures++; $display("FAIL sum %0d exp %0d", out_sum, exp_q.size() ? exp_q[0] : 0);
    end
    if (exp_q.size()) void'(exp_q.pop_front());
  end
  initial begin
    in_valid = 0; in_tag = '0; fmt = FMT_INT8; dout = '0; lane_mask = '0; a_sign = '0; uf = '0; shift = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      longint s;
      @(negedge clk);
      fmt = fmt_e'(t % 4);
      for (int i = 0; i < 8; i++) dout[32*i +: 32] = $urandom;
      lane_mask = $urandom; a_sign = $urandom; uf = $urandom & $urandom;
      for (int j = 0; j < 32; j++) shift[j] = 5'($urandom_range(0, ALIGN_G));
      s = 0;
      for (int j = 0; j < 32; j++) begin
        longint v; longint m;
        v = 0;
        case (fmt)
          FMT_INT8: v = longint'($signed(dout[8*j +: 8]));
          FMT_INT16: if (j % 2 == 0) v = longint'($signed(dout[8*j +: 16]));
          FMT_FP8: begin
            m = dout[8*j +: 3] + ((dout[8*j+3 +: 4] != 0) ? 8 : 0);
            v = uf[j] ? 0 : (m << shift[j]);
            if (dout[8*j+7] ^ a_sign[j]) v = -v;
          end
          default: if (j % 2 == 0) begin
            m = dout[8*j +: 10] + ((dout[8*j+10 +: 5] != 0) ? 1024 : 0);
            v = uf[j] ? 0 : (m << shift[j]);
            if (dout[8*j+15] ^ a_sign[j]) v = -v;
          end
        endcase
        if (lane_mask[j]) s += v;
      end
      exp_q.push_back(s);
      in_valid = 1; in_tag = '0; in_tag.k = 6'(t);
    end
    @(negedge clk); in_valid = 0;
    repeat (8) @(posedge clk);
    checks++; if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
