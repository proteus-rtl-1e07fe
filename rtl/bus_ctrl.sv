// bus_ctrl: snoop-mode bus controller of one unit on the multi-lane bus.
//
// The 128-bit bus is built from parallel broadcast lanes, one per unit, so
// that no arbiter is needed and several transfers can run in the same cycle.
// Transmit: a beat handed over on `tx` is registered and driven on this
// unit's own lane (`lane_out`) for one cycle. Receive: the controller snoops
// every lane, decodes the unit field of the address and passes the beat
// addressed to this unit to `rx` in the same cycle. Software (the top
// controller's ordering of cross-unit instructions) guarantees that at most
// one lane addresses a unit at a time; an assertion checks it. Lane-per-
// source and address decoding follow the document's bus figure; beat format
// and the single-receiver rule are this design's choice.
module bus_ctrl
  import proteus_pkg::*;
#(
  parameter logic [3:0]  UNIT  = 4'd0,
  parameter int unsigned NLANE = N_UNITS
) (
  input  logic      clk,
  input  logic      rst_n,
  input  bus_lane_t tx,
  output bus_lane_t lane_out,
  input  bus_lane_t lanes [NLANE],
  output bus_lane_t rx
);
  logic [NLANE-1:0] hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lane_out <= '0;
    else        lane_out <= tx.valid ? tx : '0;
  end

  always_comb begin
    rx = '0;
    for (int i = NLANE - 1; i >= 0; i--) begin
      hit[i] = lanes[i].valid && (lanes[i].unit == UNIT);
      if (hit[i]) rx = lanes[i];
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(hit))
    else $error("bus_ctrl %0d: two lanes address this unit", UNIT);
endmodule
