// mfat: bit mask unit and 5-stage multi-mode flex-format adder tree.
//
// Input is one DCIM read of a tensor-SRAM row (stored operand AND the
// bit-serial input bit of each lane). The bit mask keeps only the active
// lanes and splits each lane into its fields: INT8/INT16 lanes are
// sign-extended; FP lanes keep the mantissa, get the hidden lead bit attached
// (LBA, set when the masked exponent field is non-zero), take the product
// sign (stored sign XOR source sign) and are shifted left by the alignment
// amount from the exponent processing unit (zero when it flags underflow).
// 16-bit formats use the even lanes. The 32 lane values are then reduced by a
// five-level binary adder tree with a register after every level
// (L1Sum..L5Sum), so the sum of a cycle appears five cycles later, in order,
// with its tag. One new cycle is accepted every clock.
// The lane count, five registered levels and field masks follow the
// document; reducing 16-bit lanes on even positions (instead of the
// concatenating second level) is this design's choice with the same result.
module mfat
  import proteus_pkg::*;
#(
  parameter int unsigned SW = 48
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  dcim_tag_t        in_tag,
  input  fmt_e             fmt,
  input  logic [255:0]     dout,
  input  logic [31:0]      lane_mask,
  input  logic [31:0]      a_sign,
  input  logic [31:0][4:0] shift,
  input  logic [31:0]      uf,
  output logic             out_valid,
  output dcim_tag_t        out_tag,
  output logic signed [SW-1:0] out_sum
);
  logic signed [SW-1:0] lane [32];
  logic signed [SW-1:0] l1 [16];
  logic signed [SW-1:0] l2 [8];
  logic signed [SW-1:0] l3 [4];
  logic signed [SW-1:0] l4 [2];
  logic [4:0]      vld;
  dcim_tag_t       tg [5];

  always_comb begin
    for (int j = 0; j < 32; j++) begin
      logic [10:0]          m;
      logic                 s;
      logic signed [SW-1:0] mag;
      lane[j] = '0;
      m = '0;
      s = 1'b0;
      case (fmt)
        FMT_INT8:  lane[j] = SW'($signed(dout[8*j +: 8]));
        FMT_INT16: if (j % 2 == 0) lane[j] = SW'($signed(dout[8*j +: 16]));
        FMT_FP8: begin
          m = {7'd0, dout[8*j+3 +: 4] != 4'd0, dout[8*j +: 3]};
          s = dout[8*j+7] ^ a_sign[j];
        end
        default: if (j % 2 == 0) begin
          m = {dout[8*j+10 +: 5] != 5'd0, dout[8*j +: 10]};
          s = dout[8*j+15] ^ a_sign[j];
        end
      endcase
      if (fmt == FMT_FP8 || fmt == FMT_FP16) begin
        mag     = SW'(m) <<< shift[j];
        lane[j] = uf[j] ? '0 : (s ? -mag : mag);
      end
      if (!lane_mask[j]) lane[j] = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld <= '0;
      for (int i = 0; i < 5; i++) tg[i] <= '0;
      for (int i = 0; i < 16; i++) l1[i] <= '0;
      for (int i = 0; i < 8; i++)  l2[i] <= '0;
      for (int i = 0; i < 4; i++)  l3[i] <= '0;
      for (int i = 0; i < 2; i++)  l4[i] <= '0;
      out_sum <= '0;
    end else begin
      vld   <= {vld[3:0], in_valid};
      tg[0] <= in_tag;
      for (int i = 1; i < 5; i++) tg[i] <= tg[i-1];
      for (int i = 0; i < 16; i++) l1[i] <= lane[2*i] + lane[2*i+1];
      for (int i = 0; i < 8; i++)  l2[i] <= l1[2*i] + l1[2*i+1];
      for (int i = 0; i < 4; i++)  l3[i] <= l2[2*i] + l2[2*i+1];
      for (int i = 0; i < 2; i++)  l4[i] <= l3[2*i] + l3[2*i+1];
      out_sum <= l4[0] + l4[1];
    end
  end

  assign out_valid = vld[4];
  assign out_tag   = tg[4];
endmodule
