// stream_organizer_tb: random source rows, offsets and lengths; checks the
// byte alignment, the lane mask, and the bit-serial input vector for INT8,
// INT16 and FP8 (hidden lead bit) plus the exponent cycle.
module stream_organizer_tb;
  import proteus_pkg::*;
  logic [255:0] line0, line1, aligned, in_vec;
  logic [4:0] src_off, dst_off;
  logic [5:0] cnt;
  fmt_e fmt;
  logic [3:0] bit_idx;
  logic exp_pass;
  logic [31:0] lane_mask, a_sign;
  logic [31:0][4:0] a_exp;
  stream_organizer dut (.*);
  int checks = 0, failures = 0;
  initial begin
    for (int t = 0; t < 400; t++) begin
      logic [511:0] both;
      for (int i = 0; i < 8; i++) begin line0[32*i +: 32] = $urandom; line1[32*i +: 32] = $urandom; end
      both = {line1, line0};
      src_off = 5'($urandom); dst_off = 5'($urandom);
      cnt = 6'($urandom_range(1, 32 - dst_off));
      fmt = fmt_e'(t % 3 == 2 ? FMT_FP8 : (t % 3 == 1 ? FMT_INT16 : FMT_INT8));
      if (fmt == FMT_INT16) begin dst_off[0] = 0; cnt[0] = 0; if (cnt == 0) cnt = 2; end
      bit_idx = 4'($urandom_range(0, fmt == FMT_INT8 ? 7 : (fmt == FMT_INT16 ? 15 : 3)));
      exp_pass = (t % 7 == 0);
      #1;
      for (int j = 0; j < 32; j++) begin
        bit act, ib; logic [7:0] sb; logic [15:0] s16;
        act = (j >= dst_off) && (j < dst_off + cnt);
        checks++;
        if (lane_mask[j] !== act) begin failures++; $display("FAIL mask %0d", j); end
        if (act) begin
          sb = both[8*(src_off + j - dst_off) +: 8];
          checks++;
          if (aligned[8*j +: 8] !== sb) begin failures++; $display("FAIL align t%0d j%0d", t, j); end
          if (fmt == FMT_INT8) ib = sb[bit_idx[2:0]];
          else if (fmt == FMT_FP8) ib = (bit_idx == 3) ? (sb[6:3] != 0) : sb[bit_idx[1:0]];
          else begin
            s16 = both[8*(src_off + (j/2*2) - dst_off) +: 16];
            ib = s16[bit_idx];
          end
          checks++;
          if (in_vec[8*j +: 8] !== {8{exp_pass | ib}}) begin failures++; $display("FAIL in_vec t%0d j%0d", t, j); end
        end else begin
          checks++;
          if (in_vec[8*j +: 8] !== 8'd0) begin failures++; $display("FAIL inactive in_vec"); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
