// tensor_sram_macro: one 64-Kb 8T tensor-SRAM macro with in-cell multiply.
//
// 256 rows of 256 bits (8-bit row address). Three kinds of access, one per
// cycle, results registered (one cycle latency):
//   * row write: 256-bit data with 32 byte enables (the 32-bit narrow write
//     of the macro and the 8/16/32:256 write mux are a special case of this);
//   * row read:  full 256-bit row on `rdata`;
//   * DCIM read: the selected row is read through the decoupled read port of
//     the 8T cell, each read bit line giving SN AND IN (the published truth
//     table), so `dout` = row & in_vec. The DCIM input driver is `in_vec`.
// The access kinds and the AND function follow the document; merging the
// narrow and wide ports into one byte-enabled port is this design's choice.
module tensor_sram_macro (
  input  logic         clk,
  input  logic         en,
  input  logic         we,
  input  logic         dcim,
  input  logic [7:0]   row,
  input  logic [255:0] wdata,
  input  logic [31:0]  wbe,
  input  logic [255:0] in_vec,
  output logic [255:0] rdata
);
  logic [255:0] mem [256];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) begin
        for (int b = 0; b < 32; b++)
          if (wbe[b]) mem[row][8*b +: 8] <= wdata[8*b +: 8];
      end else if (dcim) begin
        rdata <= mem[row] & in_vec;
      end else begin
        rdata <= mem[row];
      end
    end
  end
endmodule
