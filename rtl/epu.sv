// epu: exponent processing unit of the output-alignment FP DCIM logic.
//
// Per lane, an exponent adder forms the product exponent
//   Esum = max(Ea,1) + max(Eb,1)        (subnormals count as exponent 1)
// from the source exponent (from the stream organizer) and the stored
// exponent (from the raw SRAM row, unmasked in the exponent cycle). Two
// passes over a vector implement alignment only once, at the output:
//   * `upd_max`: a maximum finder folds the row's largest Esum of the active
//     lanes into the running Emax register (cleared by `clr`);
//   * `latch`:   the row's Esum values are held in the inter-row exponent
//     register for the mantissa cycles of that row.
// From the held values it produces each lane's left-shift amount
// G - (Emax - Esum) and an underflow flag when the distance exceeds the
// guard width G (the product is then below the accumulator LSB). Overflow of
// the final exponent is checked at write-back. 16-bit formats use the even
// lanes. The structure (exponent adders, inter-row register, maximum finder,
// shift values, underflow check) follows the document; the Ebase handling by
// subtracting biases at write-back is this design's choice.
module epu
  import proteus_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  fmt_e             fmt,
  input  logic [255:0]     b_raw,
  input  logic [31:0][4:0] a_exp,
  input  logic [31:0]      lane_mask,
  input  logic             clr,
  input  logic             upd_max,
  input  logic             latch,
  output logic [6:0]       emax,
  output logic [31:0][4:0] shift,
  output logic [31:0]      uf
);
  logic [31:0][6:0] esum, esum_q;
  logic [31:0]      act, act_q;
  logic [6:0]       row_max;

  always_comb begin
    row_max = '0;
    for (int j = 0; j < 32; j++) begin
      logic [4:0] eb, ea;
      ea = (a_exp[j] == 0) ? 5'd1 : a_exp[j];
      if (fmt == FMT_FP8) begin
        eb     = {1'b0, b_raw[8*j+3 +: 4]};
        act[j] = lane_mask[j];
      end else begin
        eb     = b_raw[8*(j/2*2)+10 +: 5];
        act[j] = lane_mask[j] && (j % 2 == 0);
      end
      if (eb == 0) eb = 5'd1;
      esum[j] = 7'(ea) + 7'(eb);
      if (act[j] && esum[j] > row_max) row_max = esum[j];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      emax   <= '0;
      esum_q <= '0;
      act_q  <= '0;
    end else begin
      if (clr)
        emax <= '0;
      else if (upd_max && row_max > emax)
        emax <= row_max;
      if (latch) begin
        esum_q <= esum;
        act_q  <= act;
      end
    end
  end

  always_comb begin
    for (int j = 0; j < 32; j++) begin
      logic [6:0] d;
      d = emax - esum_q[j];
      uf[j]    = !act_q[j] || (d > 7'(ALIGN_G)) || (esum_q[j] > emax);
      shift[j] = uf[j] ? 5'd0 : 5'(7'(ALIGN_G) - d);
    end
  end
endmodule
