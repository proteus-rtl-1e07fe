// proteus_top: PROTEUS programmable general-purpose DCIM accelerator.
//
// Ten GP-DCIM processing engines (PE 0..9), a SIMD function unit (unit 10),
// the SPI I/O interface (unit 11), the 12-KB instruction buffer and the top
// controller share a multi-lane snoop bus: each unit drives its own 128-bit
// lane and every unit snoops all lanes, so transfers from different sources
// run in parallel without arbitration. The top controller dispatches the
// pre-decoded program from the instruction buffer over the instruction bus
// into the PE / FU instruction caches.
// Host usage: load weights and micro-programs into RRAM and activations into
// tensor SRAM with SPI WR_ROW frames, load the program with WR_IB, start it
// with RUN, poll STATUS (or `busy`) and read results with RD_ROW.
module proteus_top
  import proteus_pkg::*;
#(
  parameter int unsigned N_PE = 10
) (
  input  logic clk,
  input  logic rst_n,
  input  logic spi_sclk,
  input  logic spi_cs_n,
  input  logic spi_mosi,
  output logic spi_miso,
  output logic busy
);
  bus_lane_t   lanes [N_UNITS];
  ibus_t       ibus;
  logic [15:0] unit_full, unit_idle;
  logic        ib_rd_en;
  logic [11:0] ib_rd_addr;
  logic [31:0] ib_rd_data;
  logic [15:0] n_barriers;

  for (genvar p = 0; p < 10; p++) begin : g_pe
    if (p < N_PE) begin : g_on
      gp_dcim_pe #(.PE_ID(4'(p))) u_pe (
        .clk, .rst_n, .ibus, .ic_full(unit_full[p]), .idle(unit_idle[p]),
        .lanes, .lane_out(lanes[p])
      );
    end else begin : g_off
      assign unit_full[p] = 1'b1;
      assign unit_idle[p] = 1'b1;
      assign lanes[p]     = '0;
    end
  end

  function_unit u_fu (
    .clk, .rst_n, .ibus, .ic_full(unit_full[10]), .idle(unit_idle[10]),
    .lanes, .lane_out(lanes[10])
  );

  spi_if u_spi (
    .clk, .rst_n, .sclk(spi_sclk), .cs_n(spi_cs_n), .mosi(spi_mosi), .miso(spi_miso),
    .chip_busy(busy), .lanes, .lane_out(lanes[11])
  );

  instr_buffer u_ib (
    .clk, .lanes, .rd_en(ib_rd_en),
    .rd_addr(ib_rd_addr), .rd_data(ib_rd_data)
  );

  top_controller u_tc (
    .clk, .rst_n, .lanes, .ib_rd_en, .ib_rd_addr,
    .ib_rd_data, .ibus, .unit_full, .unit_idle, .busy, .n_barriers
  );

  // the instruction buffer and the top controller only receive: their lanes
  // stay empty
  for (genvar u = 12; u < N_UNITS; u++) begin : g_nolane
    assign lanes[u] = '0;
  end

  assign unit_full[15:11] = '1;
  assign unit_idle[15:11] = '1;
endmodule
