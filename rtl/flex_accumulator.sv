// flex_accumulator: multi-mode flex-size accumulator of the DCIM logic.
//
// Three levels, as in the programmable DCIM logic:
//   * cycle accumulator: combines the bit-serial adder-tree sums of one row,
//     MSB cycle first: acc = 2*acc + sum (the INT sign-bit cycle subtracts);
//   * row accumulator:  adds the row results of one vector; newRowFlag (the
//     tag's first_row) restarts it. At the vector's last row the MAC result
//     is stored in MAC-result slot `k` with its binary scale and `mac_done`
//     pulses;
//   * pSum accumulator: on `ps_go` (write-back), slot `ps_idx` becomes
//     MAC result (AccFlag == 0) or pSum + MAC result (AccFlag != 0). FP
//     values carry a scale (value = m * 2^scale); the operand with the
//     smaller scale is shifted right before the add. `ps_m`/`ps_scale`
//     show the new pSum one cycle after `ps_go` (`ps_valid`).
// Slot count KMAX covers the 6-bit kernel-size field. The three levels and
// the flags follow the document; the scale handling is this design's choice.
module flex_accumulator
  import proteus_pkg::*;
#(
  parameter int unsigned SW   = 48,
  parameter int unsigned KMAX = 64
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  dcim_tag_t            in_tag,
  input  logic signed [SW-1:0] in_sum,
  output logic                 mac_done,
  input  logic                 ps_go,
  input  logic [5:0]           ps_idx,
  input  logic [3:0]           acc_flag,
  output logic                 ps_valid,
  output logic signed [63:0]   ps_m,
  output logic signed [9:0]    ps_scale
);
  logic signed [63:0] cyc_acc, row_acc;
  logic signed [63:0] cyc_next, row_next;
  logic signed [63:0] mac_m  [KMAX];
  logic signed [9:0]  mac_s  [KMAX];
  logic signed [63:0] psum_m [KMAX];
  logic signed [9:0]  psum_s [KMAX];

  always_comb begin
    logic signed [63:0] s;
    s        = 64'(in_sum);
    cyc_next = (in_tag.first_bit ? 64'sd0 : (cyc_acc <<< 1)) + (in_tag.neg ? -s : s);
    row_next = (in_tag.first_row ? 64'sd0 : row_acc) + cyc_next;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc_acc  <= '0;
      row_acc  <= '0;
      mac_done <= 1'b0;
    end else begin
      mac_done <= 1'b0;
      if (in_valid) begin
        cyc_acc <= cyc_next;
        if (in_tag.last_bit) begin
          row_acc <= row_next;
          if (in_tag.last_row) begin
            mac_done <= 1'b1;
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_tag.last_bit && in_tag.last_row) begin
      mac_m[in_tag.k[$clog2(KMAX)-1:0]] <= row_next;
      mac_s[in_tag.k[$clog2(KMAX)-1:0]] <= in_tag.scale;
    end
  end

  // pSum accumulation with alignment
  logic signed [63:0] nm;
  logic signed [9:0]  ns;
  always_comb begin
    logic signed [63:0] a, b;
    logic signed [9:0]  sa, sb, smax;
    int                 da, db;
    a  = psum_m[ps_idx[$clog2(KMAX)-1:0]];
    sa = psum_s[ps_idx[$clog2(KMAX)-1:0]];
    b  = mac_m[ps_idx[$clog2(KMAX)-1:0]];
    sb = mac_s[ps_idx[$clog2(KMAX)-1:0]];
    smax = (sa > sb) ? sa : sb;
    da   = int'(smax) - int'(sa);
    db   = int'(smax) - int'(sb);
    if (acc_flag == 4'd0) begin
      nm = b;
      ns = sb;
    end else begin
      nm   = ((da > 63) ? 64'sd0 : (a >>> da)) + ((db > 63) ? 64'sd0 : (b >>> db));
      ns   = smax;
    end
  end

  always_ff @(posedge clk) begin
    if (ps_go) begin
      psum_m[ps_idx[$clog2(KMAX)-1:0]] <= nm;
      psum_s[ps_idx[$clog2(KMAX)-1:0]] <= ns;
      ps_m     <= nm;
      ps_scale <= ns;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ps_valid <= 1'b0;
    else        ps_valid <= ps_go;
  end
endmodule
