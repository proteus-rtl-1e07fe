// instr_buffer: 12-KB instruction buffer (3072 x 32-bit words).
//
// Instruction sequences are loaded here before a run: write beats addressed
// to this unit on the snoop bus carry one word in data[31:0], its word index
// being the 12-bit {mem, row} address field. The top controller reads it
// through a private port (`rd_en`/`rd_addr`, word on `rd_data` one cycle
// later) for pre-decoding and dispatch. Capacity follows the document; the
// write format and the private read port are this design's choices.
module instr_buffer
  import proteus_pkg::*;
#(
  parameter int unsigned WORDS = 3072
) (
  input  logic        clk,
  input  bus_lane_t   lanes [N_UNITS],
  input  logic        rd_en,
  input  logic [11:0] rd_addr,
  output logic [31:0] rd_data
);
  logic [31:0] mem [WORDS];
  bus_lane_t   rx;

  // receive-only bus port: this unit never transmits, so it has no lane of
  // its own; it picks the beat addressed to it out of all lanes
  always_comb begin
    rx = '0;
    for (int i = N_UNITS - 1; i >= 0; i--)
      if (lanes[i].valid && lanes[i].unit == UNIT_IBUF) rx = lanes[i];
  end

  always_ff @(posedge clk) begin
    if (rx.valid && !rx.rd && 32'({rx.mem, rx.row}) < WORDS)
      mem[{rx.mem, rx.row}] <= rx.data[31:0];
    if (rd_en)
      rd_data <= (32'(rd_addr) < WORDS) ? mem[rd_addr] : 32'd0;
  end
endmodule
