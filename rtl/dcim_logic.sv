// dcim_logic: programmable DCIM logic of one PE.
//
// Sits behind the four tensor-SRAM macros. Each cycle the PE controller
// issues one DCIM read of a tensor-SRAM row; its data arrives one cycle later
// on `dout`. The controller describes the issue with:
//   * mac_issue: a bit-serial MAC cycle (tag, active lanes, source signs),
//   * exp_issue: an exponent cycle (the SRAM returns the stored operand
//     unmasked) that updates the running Emax (exp_max=1) or latches the
//     row's product exponents (exp_max=0) in the exponent processing unit.
// The issue-side description is registered here so that it meets the SRAM
// data. The bit mask / MFAT adder tree (5 cycles), the cycle, row and pSum
// accumulators and the EPU follow. `mac_done` pulses when a vector's MAC
// result is stored; `ps_*` is the write-back (pSum) port.
module dcim_logic
  import proteus_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  fmt_e             fmt,
  input  logic             mac_issue,
  input  dcim_tag_t        tag,
  input  logic [31:0]      lane_mask,
  input  logic [31:0]      a_sign,
  input  logic [31:0][4:0] a_exp,
  input  logic             exp_issue,
  input  logic             exp_max,
  input  logic             epu_clr,
  input  logic [255:0]     dout,
  output logic [6:0]       emax,
  output logic             mac_done,
  output logic             busy,
  input  logic             ps_go,
  input  logic [5:0]       ps_idx,
  input  logic [3:0]       acc_flag,
  output logic             ps_valid,
  output logic signed [63:0] ps_m,
  output logic signed [9:0]  ps_scale
);
  logic             mac_q, exp_q, expmax_q;
  dcim_tag_t        tag_q;
  logic [31:0]      mask_q, sign_q;
  logic [31:0][4:0] aexp_q;
  logic [31:0][4:0] shift;
  logic [31:0]      uf;
  logic             t_valid;
  dcim_tag_t        t_tag;
  logic signed [47:0] t_sum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mac_q <= 1'b0; exp_q <= 1'b0; expmax_q <= 1'b0;
      tag_q <= '0; mask_q <= '0; sign_q <= '0; aexp_q <= '0;
    end else begin
      mac_q    <= mac_issue;
      exp_q    <= exp_issue;
      expmax_q <= exp_max;
      tag_q    <= tag;
      mask_q   <= lane_mask;
      sign_q   <= a_sign;
      aexp_q   <= a_exp;
    end
  end

  epu u_epu (
    .clk, .rst_n, .fmt, .b_raw(dout), .a_exp(aexp_q), .lane_mask(mask_q),
    .clr(epu_clr), .upd_max(exp_q && expmax_q), .latch(exp_q && !expmax_q),
    .emax, .shift, .uf
  );

  mfat u_mfat (
    .clk, .rst_n, .in_valid(mac_q), .in_tag(tag_q), .fmt, .dout,
    .lane_mask(mask_q), .a_sign(sign_q), .shift, .uf,
    .out_valid(t_valid), .out_tag(t_tag), .out_sum(t_sum)
  );

  flex_accumulator u_acc (
    .clk, .rst_n, .in_valid(t_valid), .in_tag(t_tag), .in_sum(t_sum),
    .mac_done, .ps_go, .ps_idx, .acc_flag, .ps_valid, .ps_m, .ps_scale
  );

  // work in flight in the register stage or the adder tree
  logic [5:0] inflight;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) inflight <= '0;
    else        inflight <= {inflight[4:0], mac_issue};
  end
  assign busy = mac_q || (|inflight);
endmodule
