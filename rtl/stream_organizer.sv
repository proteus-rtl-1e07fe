// stream_organizer: reconfigurable DCIM data-stream organizer (datapath part).
//
// Two consecutive source rows (line0, line1; from RRAM or tensor SRAM) hold a
// contiguous vector segment starting at byte `src_off` of line0. The
// organizer shifts the segment so that it lines up with the destination
// lanes that start at byte `dst_off` of the SRAM row being computed, `cnt`
// bytes long, without any reshaping of the stored tensor. It then produces
// the bit-serial DCIM input vector for serial cycle `bit_idx`: every column
// of an active element receives that element's bit (INT: two's-complement
// bit; FP: mantissa bit, index M being the hidden lead bit). In the exponent
// cycle (`exp_pass`) all columns of active lanes are driven with 1 so that
// the SRAM returns the stored operand unmasked. It also hands the source
// sign and exponent of each lane to the exponent processing unit.
// Element layout is little-endian within a row; 16-bit elements sit on even
// byte lanes. Purely combinational. The alignment function is the document's;
// the shifter structure is this design's choice.
module stream_organizer
  import proteus_pkg::*;
(
  input  logic [255:0] line0,
  input  logic [255:0] line1,
  input  logic [4:0]   src_off,
  input  logic [4:0]   dst_off,
  input  logic [5:0]   cnt,
  input  fmt_e         fmt,
  input  logic [3:0]   bit_idx,
  input  logic         exp_pass,
  output logic [255:0] aligned,
  output logic [31:0]  lane_mask,
  output logic [255:0] in_vec,
  output logic [31:0]  a_sign,
  output logic [31:0][4:0] a_exp
);
  logic [511:0] both;
  logic [255:0] shifted;
  logic [31:0]  inbit;

  always_comb begin
    both    = {line1, line0} >> (8 * src_off);
    shifted = both[255:0];
    aligned = shifted << (8 * dst_off);
    for (int j = 0; j < 32; j++)
      lane_mask[j] = (j >= int'(dst_off)) && (j < int'(dst_off) + int'(cnt));
  end

  always_comb begin
    for (int j = 0; j < 32; j++) begin
      logic [7:0]  e8;
      logic [15:0] e16;
      int          base;
      base = (j / 2) * 2;
      e8   = aligned[8*j +: 8];
      e16  = aligned[8*base +: 16];
      inbit[j]  = 1'b0;
      a_sign[j] = 1'b0;
      a_exp[j]  = '0;
      case (fmt)
        FMT_INT8:  inbit[j] = e8[bit_idx[2:0]];
        FMT_INT16: inbit[j] = e16[bit_idx];
        FMT_FP8: begin
          inbit[j]  = (bit_idx == 4'd3) ? (e8[6:3] != 4'd0) : e8[{1'b0, bit_idx[1:0]}];
          a_sign[j] = e8[7];
          a_exp[j]  = {1'b0, e8[6:3]};
        end
        default: begin
          inbit[j]  = (bit_idx == 4'd10) ? (e16[14:10] != 5'd0) : e16[bit_idx];
          a_sign[j] = e16[15];
          a_exp[j]  = e16[14:10];
        end
      endcase
      in_vec[8*j +: 8] = {8{lane_mask[j] & (exp_pass | inbit[j])}};
    end
  end
endmodule
