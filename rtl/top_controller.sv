// top_controller: instruction pre-decoder and global scheduler.
//
// A run command on the bus (a write beat to this unit, data[11:0] = number
// of instruction words) starts it. It reads the instruction buffer word by
// word, pre-decodes the executing unit of each word (PE, function unit) and
// dispatches the word on the instruction bus to that unit's instruction
// cache; the second word of a TensorMAC follows its first word. Words for a
// single unit are streamed back to back, limited only by that cache being
// full, so the units run concurrently. An instruction that involves a
// second unit (memory load/store across units, EBLKMOV, remote WBK, FuncOp)
// or runs a micro-program (MPLD) is a barrier: it is dispatched only when
// every unit is idle and the bus is quiet, and the next word waits for the
// same. `busy` is high from the run command until the last instruction has
// completed. Pre-decode and dispatch follow the document; the barrier rule
// is this design's choice for ordering cross-unit data.
module top_controller
  import proteus_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  bus_lane_t   lanes [N_UNITS],
  output logic        ib_rd_en,
  output logic [11:0] ib_rd_addr,
  input  logic [31:0] ib_rd_data,
  output ibus_t       ibus,
  input  logic [15:0] unit_full,
  input  logic [15:0] unit_idle,
  output logic        busy,
  output logic [15:0] n_barriers
);
  bus_lane_t rx;
  // receive-only bus port: this unit never transmits, so it has no lane of
  // its own; it picks the beat addressed to it out of all lanes
  always_comb begin
    rx = '0;
    for (int i = N_UNITS - 1; i >= 0; i--)
      if (lanes[i].valid && lanes[i].unit == UNIT_TOPC) rx = lanes[i];
  end

  typedef enum logic [2:0] {S_IDLE, S_RD, S_DEC, S_WAIT, S_DRAIN} st_e;
  st_e st;
  logic [11:0] pc, count;
  logic [31:0] w;
  logic        second, barrier;
  logic [3:0]  last_unit;
  logic [1:0]  settle;
  logic        quiet;
  logic [3:0]  tgt;
  logic        glob;

  always_comb begin
    quiet = 1'b1;
    for (int i = 0; i < N_UNITS; i++) if (lanes[i].valid) quiet = 1'b0;
    quiet = quiet && (&unit_idle) && (settle == 2'd0);
  end

  assign tgt  = second ? last_unit : exec_unit(w);
  assign glob = !second && is_global(w);

  assign ib_rd_en   = (st == S_RD);
  assign ib_rd_addr = pc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; pc <= '0; count <= '0; w <= '0; second <= 1'b0; barrier <= 1'b0;
      last_unit <= '0; settle <= '0; ibus <= '0; n_barriers <= '0;
    end else begin
      ibus <= '0;
      if (settle != 0) settle <= settle - 1'b1;
      case (st)
        S_IDLE: if (rx.valid && !rx.rd && rx.data[11:0] != 12'd0) begin
          pc <= '0; count <= rx.data[11:0]; second <= 1'b0; barrier <= 1'b0;
          st <= S_RD;
        end
        S_RD: st <= S_DEC;
        S_DEC: begin
          w  <= ib_rd_data;
          st <= S_WAIT;
        end
        S_WAIT: begin
          if (!unit_full[tgt] && (!(glob || barrier) || quiet)) begin
            ibus.valid <= 1'b1;
            ibus.unit  <= tgt;
            ibus.word  <= w;
            settle     <= 2'd3;
            last_unit  <= tgt;
            if (glob) n_barriers <= n_barriers + 1'b1;
            if (!second) barrier <= glob;
            second <= !second && !w[31] && (w[31:27] == OP_TMAC);
            pc <= pc + 1'b1;
            st <= (pc + 1'b1 == count) ? S_DRAIN : S_RD;
          end
        end
        S_DRAIN: if (quiet) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE);
endmodule
