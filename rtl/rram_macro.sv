// rram_macro: behavioural model of one 64-Kb 1T1R RRAM macro.
//
// The real macro is a foundry RRAM array with custom analog periphery
// (BL/SL drivers, current sense amplifiers, reference and timing generator);
// this model reproduces only its digital behaviour. Storage is 256 rows of
// 16 columns of 16 bits (8-bit row address and 4-bit column address, 16-bit
// read and write data, as in the macro's published interface). A read is
// started by a one-cycle `ren` pulse and its data appears RD_LAT cycles
// later together with `rvalid`; the latency is this design's choice, from the
// 10 ns access time at the 275 MHz top clock (3 cycles). A write (`wen`) takes
// effect in one cycle; write-verify programming is not modelled. Reads and
// writes are not accepted while a read is in flight (`busy`).
module rram_macro #(
  parameter int unsigned RD_LAT = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ren,
  input  logic [7:0]  rd_row,
  input  logic [3:0]  rd_col,
  output logic [15:0] rdata,
  output logic        rvalid,
  output logic        busy,
  input  logic        wen,
  input  logic [7:0]  wr_row,
  input  logic [3:0]  wr_col,
  input  logic [15:0] wdata
);
  logic [15:0] mem [256*16];
  logic [$clog2(RD_LAT+1)-1:0] cnt;
  logic [11:0] addr_q;

  always_ff @(posedge clk) begin
    if (wen) mem[{wr_row, wr_col}] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      rvalid <= 1'b0;
      addr_q <= '0;
      rdata  <= '0;
    end else begin
      rvalid <= 1'b0;
      if (ren && cnt == 0) begin
        addr_q <= {rd_row, rd_col};
        cnt    <= ($clog2(RD_LAT+1))'(RD_LAT);
      end else if (cnt != 0) begin
        cnt <= cnt - 1'b1;
        if (cnt == 1) begin
          rdata  <= mem[addr_q];
          rvalid <= 1'b1;
        end
      end
    end
  end

  assign busy = (cnt != 0);

endmodule
