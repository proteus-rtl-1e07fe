// function_unit: SIMD function unit (FU) for nonlinear and reduction work.
//
// Holds an SRAM data buffer (four banks of 256 x 256 bits, addressed on the
// bus like a PE's tensor SRAM), a 1-KB instruction cache, a snoop-mode bus
// controller and SIMD lanes. Instructions dispatched to it:
//   FuncOp  (FU ID selects the function; operands are INT8, 32 per row,
//           starting at row 0 of the bank named by Data SRAM ID)
//     0 softmax: groups of Softmax Size elements (0: the whole vector),
//                each group starting on a new row, by the 32-lane
//                two-iteration softmax unit; results in place;
//     1 max-pooling / 2 average-pooling: windows of Pooling Size
//                (0 means 8) consecutive elements, results packed in place
//                from element 0;
//     3 ReLU activation, 32 lanes per cycle, in place;
//   EBLKMOV  stream 1..8 buffer rows to a PE over the bus.
// Rows written by PEs (WBK, EBLKMOV) arrive through the bus; read requests
// are answered with two beats. The functions and their parameters follow
// the document; the FU-ID function codes, element layout and in-place
// results are this design's choices, and only the INT8 format is built.
module function_unit
  import proteus_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  ibus_t     ibus,
  output logic      ic_full,
  output logic      idle,
  input  bus_lane_t lanes [N_UNITS],
  output bus_lane_t lane_out
);
  // ---------------------------------------------------------- buffers
  logic         b_en [4], b_we [4];
  logic [7:0]   b_row [4];
  logic [255:0] b_wdata [4];
  logic [31:0]  b_wbe [4];
  logic [255:0] b_rdata [4];
  for (genvar i = 0; i < 4; i++) begin : g_buf
    tensor_sram_macro u_buf (
      .clk, .en(b_en[i]), .we(b_we[i]), .dcim(1'b0), .row(b_row[i]),
      .wdata(b_wdata[i]), .wbe(b_wbe[i]), .in_vec('0), .rdata(b_rdata[i])
    );
  end

  bus_lane_t tx, rx;
  bus_ctrl #(.UNIT(UNIT_FU)) u_bus (.clk, .rst_n, .tx, .lane_out, .lanes, .rx);

  logic        ic_pop, ic_empty;
  logic [31:0] ic_head;
  logic [8:0]  ic_count;
  icache u_ic (
    .clk, .rst_n, .push(ibus.valid && ibus.unit == UNIT_FU), .wdata(ibus.word),
    .full(ic_full), .pop(ic_pop), .head(ic_head), .empty(ic_empty), .count(ic_count)
  );

  // ---------------------------------------------------------- softmax
  logic         sm_start, sm_busy, sm_done, sm_rd, sm_wr;
  logic [7:0]   sm_base, sm_rrow, sm_wrow;
  logic [8:0]   sm_n;
  logic [255:0] sm_wdata;
  logic [31:0]  sm_wbe;
  logic [1:0]   bank;

  softmax_unit u_sm (
    .clk, .rst_n, .start(sm_start), .base_row(sm_base), .n(sm_n), .busy(sm_busy),
    .done(sm_done), .rd_en(sm_rd), .rd_row(sm_rrow), .rd_data(b_rdata[bank]),
    .wr_en(sm_wr), .wr_row(sm_wrow), .wr_data(sm_wdata), .wr_be(sm_wbe)
  );

  // ---------------------------------------------------------- control
  typedef enum logic [4:0] {
    S_IDLE, S_DEC, S_SM_GRP, S_SM_RUN, S_PL_ELEM, S_PL_RD, S_PL_ACC, S_PL_WR,
    S_RL_RD, S_RL_W, S_MV_RD, S_MV_W, S_MV_B0, S_MV_B1, S_RESP, S_RESP_W, S_RESP_B1
  } st_e;
  st_e st;

  logic [31:0]  ir;
  logic [7:0]   vlen, ssize, grp_done;
  logic [3:0]   psize;
  logic [7:0]   j, i_in, elem;   // output index, index in window, element
  logic [7:0]   cur_row;
  logic         row_ok;
  logic [255:0] rowbuf;
  logic signed [15:0] pacc;
  logic [3:0]   mv_left;
  logic [7:0]   mv_srow, mv_drow;
  logic [3:0]   mv_unit;
  logic [1:0]   mv_dmem;
  logic         rd_pend;
  logic [3:0]   rd_unit;
  logic [1:0]   rd_bank;
  logic [7:0]   rd_row;
  logic [7:0]   rl_row;

  logic [7:0] grp_rows;
  assign grp_rows = (ssize == 0) ? 8'd8 : 8'((9'(ssize) + 9'd31) >> 5);

  // element read for pooling
  logic signed [7:0] x_e;
  assign x_e = $signed(rowbuf[8*elem[4:0] +: 8]);

  logic signed [15:0] pool_res;
  always_comb begin
    if (ir[26:23] == FN_MAXPOOL) pool_res = pacc;
    else                         pool_res = pacc / $signed({12'd0, psize});
  end

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      b_en[i] = 1'b0; b_we[i] = 1'b0; b_row[i] = '0; b_wdata[i] = '0; b_wbe[i] = '0;
    end
    tx = '0;
    case (st)
      S_SM_RUN: begin
        b_en[bank]    = sm_rd | sm_wr;
        b_we[bank]    = sm_wr;
        b_row[bank]   = sm_wr ? sm_wrow : sm_rrow;
        b_wdata[bank] = sm_wdata;
        b_wbe[bank]   = sm_wbe;
      end
      S_PL_RD: begin
        b_en[bank] = 1'b1; b_row[bank] = 8'(elem >> 5);
      end
      S_PL_WR: begin
        b_en[bank] = 1'b1; b_we[bank] = 1'b1; b_row[bank] = 8'(j >> 5);
        b_wdata[bank] = 256'(pool_res[7:0]) << (8 * j[4:0]);
        b_wbe[bank]   = 32'd1 << j[4:0];
      end
      S_RL_RD: begin
        b_en[bank] = 1'b1; b_row[bank] = rl_row;
      end
      S_RL_W: begin
        b_en[bank] = 1'b1; b_we[bank] = 1'b1; b_row[bank] = rl_row;
        for (int l = 0; l < 32; l++) begin
          b_wdata[bank][8*l +: 8] = b_rdata[bank][8*l+7] ? 8'd0 : b_rdata[bank][8*l +: 8];
          b_wbe[bank][l] = ({rl_row, 5'(l)} < 13'(vlen));
        end
      end
      S_MV_RD: begin
        b_en[ir[22:21]] = 1'b1; b_row[ir[22:21]] = mv_srow;
      end
      S_RESP: begin
        b_en[rd_bank] = 1'b1; b_row[rd_bank] = rd_row;
      end
      S_MV_B0, S_MV_B1: begin
        tx.valid = 1'b1; tx.beat = (st == S_MV_B1); tx.unit = mv_unit;
        tx.mem = {2'b0, mv_dmem}; tx.row = mv_drow; tx.be = '1;
        tx.data = (st == S_MV_B1) ? rowbuf[255:128] : rowbuf[127:0];
      end
      S_RESP_W, S_RESP_B1: begin
        tx.valid = 1'b1; tx.beat = (st == S_RESP_B1); tx.unit = rd_unit;
        tx.mem = MEM_RESP; tx.row = rd_row; tx.be = '1;
        tx.data = (st == S_RESP_B1) ? rowbuf[255:128] : b_rdata[rd_bank][127:0];
      end
      default: ;
    endcase
    if (rx.valid && !rx.rd && rx.mem < 4'd4) begin
      b_en[rx.mem[1:0]]    = 1'b1;
      b_we[rx.mem[1:0]]    = 1'b1;
      b_row[rx.mem[1:0]]   = rx.row;
      b_wdata[rx.mem[1:0]] = rx.beat ? {rx.data, 128'd0} : {128'd0, rx.data};
      b_wbe[rx.mem[1:0]]   = rx.beat ? {rx.be, 16'd0} : {16'd0, rx.be};
    end
  end

  assign ic_pop   = (st == S_IDLE) && !rd_pend && !ic_empty;
  assign sm_start = (st == S_SM_GRP) && (grp_done < vlen);
  assign sm_base  = 8'(grp_done / ((ssize == 0) ? 8'd255 : ssize)) * grp_rows;
  assign sm_n     = (ssize == 0 || 9'(vlen - grp_done) < 9'(ssize)) ? 9'(vlen - grp_done) : 9'(ssize);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; ir <= '0; vlen <= '0; ssize <= '0; psize <= '0; grp_done <= '0;
      j <= '0; i_in <= '0; elem <= '0; cur_row <= '0; row_ok <= 1'b0; rowbuf <= '0;
      pacc <= '0; mv_left <= '0; mv_srow <= '0; mv_drow <= '0; mv_unit <= '0;
      mv_dmem <= '0; rd_pend <= 1'b0; rd_unit <= '0; rd_bank <= '0; rd_row <= '0;
      rl_row <= '0; bank <= '0;
    end else begin
      if (rx.valid && rx.rd) begin
        rd_pend <= 1'b1; rd_unit <= rx.data[3:0]; rd_bank <= rx.mem[1:0]; rd_row <= rx.row;
      end
      case (st)
        S_IDLE: begin
          if (rd_pend) st <= S_RESP;
          else if (!ic_empty) begin
            ir <= ic_head;
            st <= S_DEC;
          end
        end
        S_DEC: begin
          st <= S_IDLE;
          if (ir[31]) begin
            mv_left <= 4'(ir[12:10]) + 4'd1; mv_srow <= ir[20:13]; mv_drow <= ir[7:0];
            mv_unit <= ir[26:23]; mv_dmem <= ir[9:8];
            st <= S_MV_RD;
          end else if (ir[31:27] == OP_FUNCOP) begin
            vlen  <= ir[22:15];
            ssize <= ir[14:7];
            psize <= (ir[6:4] == 3'd0) ? 4'd8 : {1'b0, ir[6:4]};
            bank  <= ir[1:0];
            grp_done <= '0;
            j <= '0; i_in <= '0; elem <= '0; row_ok <= 1'b0; rl_row <= '0;
            case (ir[26:23])
              FN_SOFTMAX:            st <= S_SM_GRP;
              FN_MAXPOOL, FN_AVGPOOL: st <= S_PL_ELEM;
              FN_RELU:               st <= S_RL_RD;
              default:               st <= S_IDLE;
            endcase
          end
        end
        // ------------------------------------------------- softmax
        S_SM_GRP: begin
          if (grp_done >= vlen) st <= S_IDLE;
          else st <= S_SM_RUN;
        end
        S_SM_RUN: if (sm_done) begin
          grp_done <= (ssize == 0) ? vlen : ((9'(grp_done) + 9'(ssize) > 9'(vlen)) ? vlen : grp_done + ssize);
          st <= S_SM_GRP;
        end
        // ------------------------------------------------- pooling
        S_PL_ELEM: begin
          if (9'(j) * 9'(psize) + 9'(psize) > 9'(vlen)) st <= S_IDLE;
          else if (row_ok && cur_row == 8'(elem >> 5)) st <= S_PL_ACC;
          else st <= S_PL_RD;
        end
        S_PL_RD: st <= S_PL_ACC;
        S_PL_ACC: begin
          logic signed [7:0] xv;
          if (!(row_ok && cur_row == 8'(elem >> 5))) begin
            rowbuf  <= b_rdata[bank];
            cur_row <= 8'(elem >> 5);
            row_ok  <= 1'b1;
            xv = $signed(b_rdata[bank][8*elem[4:0] +: 8]);
          end else xv = x_e;
          if (i_in == 0)                                pacc <= 16'(xv);
          else if (ir[26:23] == FN_MAXPOOL)             pacc <= (16'(xv) > pacc) ? 16'(xv) : pacc;
          else                                          pacc <= pacc + 16'(xv);
          elem <= elem + 1'b1;
          if (4'(i_in) + 4'd1 == psize) begin
            i_in <= '0;
            st <= S_PL_WR;
          end else begin
            i_in <= i_in + 1'b1;
            st <= S_PL_ELEM;
          end
        end
        S_PL_WR: begin
          j  <= j + 1'b1;
          if (cur_row == 8'(j >> 5)) row_ok <= 1'b0;
          st <= S_PL_ELEM;
        end
        // ------------------------------------------------- ReLU
        S_RL_RD: st <= S_RL_W;
        S_RL_W: begin
          if ({rl_row + 8'd1, 5'd0} >= 13'(vlen)) st <= S_IDLE;
          else begin
            rl_row <= rl_row + 1'b1;
            st <= S_RL_RD;
          end
        end
        // ------------------------------------------------- EBLKMOV
        S_MV_RD: st <= S_MV_W;
        S_MV_W: begin
          rowbuf <= b_rdata[ir[22:21]];
          st <= S_MV_B0;
        end
        S_MV_B0: st <= S_MV_B1;
        S_MV_B1: begin
          mv_srow <= mv_srow + 1'b1; mv_drow <= mv_drow + 1'b1;
          mv_left <= mv_left - 1'b1;
          row_ok  <= 1'b0;
          st <= (mv_left == 4'd1) ? S_IDLE : S_MV_RD;
        end
        // ------------------------------------------------- read response
        S_RESP: st <= S_RESP_W;
        S_RESP_W: begin
          rowbuf  <= b_rdata[rd_bank];
          rd_pend <= 1'b0;
          row_ok  <= 1'b0;
          st <= S_RESP_B1;
        end
        S_RESP_B1: st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  assign idle = (st == S_IDLE) && ic_empty && !rd_pend && !sm_busy;
endmodule
