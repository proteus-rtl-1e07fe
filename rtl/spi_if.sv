// spi_if: SPI I/O interface between the host and the on-chip bus.
//
// SPI mode 0 slave (data sampled on SCLK rising edge, changed on falling
// edge, MSB first, frames delimited by CS_n). SCLK, CS_n and MOSI are
// synchronised into the core clock, which must be at least 4x faster. A
// frame is a command byte followed by its payload:
//   0x01 WR_IB   addr[11:8], addr[7:0], then 4 bytes per word (big-endian),
//                written to consecutive instruction-buffer words;
//   0x02 RUN     count[11:8], count[7:0]: start the top controller;
//   0x03 WR_ROW  {unit, mem}, row, 32 data bytes (byte 0 first): one row of
//                a tensor SRAM (mem 0..3), RRAM macro (mem 8..13, model
//                deployment) or FU buffer, sent as two bus beats;
//   0x04 RD_ROW  {unit, mem}, row, one turnaround byte, then 32 dummy bytes
//                during which MISO
//                returns the row (the read request and the two response
//                beats travel over the bus);
//   0x05 STATUS  one dummy byte; MISO returns {7'b0, busy}.
// The document names SPI as the chip's I/O; the frame format is this
// design's own.
module spi_if
  import proteus_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      sclk,
  input  logic      cs_n,
  input  logic      mosi,
  output logic      miso,
  input  logic      chip_busy,
  input  bus_lane_t lanes [N_UNITS],
  output bus_lane_t lane_out
);
  bus_lane_t tx, rx;
  bus_ctrl #(.UNIT(UNIT_SPI)) u_bus (.clk, .rst_n, .tx, .lane_out, .lanes, .rx);

  logic [2:0] sclk_s, cs_s, mosi_s;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s <= '0; cs_s <= '1; mosi_s <= '0;
    end else begin
      sclk_s <= {sclk_s[1:0], sclk};
      cs_s   <= {cs_s[1:0], cs_n};
      mosi_s <= {mosi_s[1:0], mosi};
    end
  end
  logic rise, fall, sel;
  assign rise = sel && sclk_s[1] && !sclk_s[2];
  assign fall = sel && !sclk_s[1] && sclk_s[2];
  assign sel  = !cs_s[1];

  logic [2:0]   bitc;
  logic [7:0]   sh, txsh;
  logic [5:0]   idx;       // byte index in frame (saturating)
  logic [1:0]   wb;        // byte index within an instruction word
  logic [7:0]   cmd, b1;
  logic [11:0]  waddr;
  logic [31:0]  wword;
  logic [7:0]   row;
  logic [255:0] rowbuf, rdbuf;
  logic         byte_done;
  logic [7:0]   byte_in;
  logic         send0, send1, send_rd;

  assign byte_in   = {sh[6:0], mosi_s[1]};
  assign byte_done = rise && (bitc == 3'd7);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bitc <= '0; wb <= '0; sh <= '0; txsh <= '0; idx <= '0; cmd <= '0; b1 <= '0; waddr <= '0;
      wword <= '0; row <= '0; rowbuf <= '0; rdbuf <= '0; send0 <= 1'b0; send1 <= 1'b0;
      send_rd <= 1'b0; tx <= '0;
    end else begin
      tx <= '0;
      if (!sel) begin
        bitc <= '0; idx <= '0; txsh <= '0; wb <= '0;
      end else begin
        if (rise) begin
          sh   <= byte_in;
          bitc <= bitc + 1'b1;
        end
        if (fall && bitc != 3'd0) txsh <= {txsh[6:0], 1'b0};
      end
      if (byte_done) begin
        if (idx != 6'd63) idx <= idx + 1'b1;
        if (idx == 0) begin
          cmd <= byte_in;
          if (byte_in == 8'h05) txsh <= {7'd0, chip_busy};
        end else begin
          case (cmd)
            8'h01: begin
              if (idx == 1) waddr[11:8] <= byte_in[3:0];
              else if (idx == 2) waddr[7:0] <= byte_in;
              else begin
                wword <= {wword[23:0], byte_in};
                wb    <= wb + 1'b1;
                if (wb == 2'd3) begin                // 4th byte of a word
                  tx.valid <= 1'b1; tx.unit <= UNIT_IBUF;
                  tx.mem <= waddr[11:8]; tx.row <= waddr[7:0];
                  tx.data <= 128'({wword[23:0], byte_in}); tx.be <= 16'h000F;
                  waddr <= waddr + 1'b1;
                end
              end
            end
            8'h02: begin
              if (idx == 1) b1 <= byte_in;
              else if (idx == 2) begin
                tx.valid <= 1'b1; tx.unit <= UNIT_TOPC; tx.mem <= MEM_CTRL;
                tx.data <= 128'({b1[3:0], byte_in}); tx.be <= 16'h0003;
              end
            end
            8'h03: begin
              if (idx == 1) b1 <= byte_in;
              else if (idx == 2) row <= byte_in;
              else if (idx <= 34) begin
                rowbuf[8*(idx-3) +: 8] <= byte_in;
                if (idx == 18) send0 <= 1'b1;
                if (idx == 34) send1 <= 1'b1;
              end
            end
            8'h04: begin
              if (idx == 1) b1 <= byte_in;
              else if (idx == 2) begin
                row <= byte_in;
                tx.valid <= 1'b1; tx.rd <= 1'b1; tx.unit <= b1[7:4]; tx.mem <= b1[3:0];
                tx.row <= byte_in; tx.data <= 128'(UNIT_SPI);
              end
              if (idx >= 3 && idx <= 34) txsh <= rdbuf[8*(idx-3) +: 8];
            end
            default: ;
          endcase
        end
      end
      if (send0 || send1) begin
        tx.valid <= 1'b1; tx.unit <= b1[7:4]; tx.mem <= b1[3:0]; tx.row <= row;
        tx.beat <= send1; tx.be <= '1;
        tx.data <= send1 ? rowbuf[255:128] : rowbuf[127:0];
        send0 <= 1'b0; send1 <= 1'b0;
      end
      if (rx.valid && !rx.rd && rx.mem == MEM_RESP) begin
        if (rx.beat) rdbuf[255:128] <= rx.data;
        else         rdbuf[127:0]   <= rx.data;
      end
    end
  end

  assign miso = txsh[7];
endmodule
