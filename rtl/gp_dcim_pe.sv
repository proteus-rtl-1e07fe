// gp_dcim_pe: programmable general-purpose DCIM processing engine (PE).
//
// A PE is a self-contained compute-in-memory node:
//   * RRAM bank of six 64-Kb RRAM macros (384 Kb) holding weights and
//     micro-programs (non-volatile, written only at deployment through the
//     bus, read-only during inference);
//   * 256-Kb tensor-SRAM bank: four 64-Kb macros that store activations and
//     compute (in-cell AND of stored bits and the bit-serial input);
//   * the stream organizer, which aligns any contiguous source row segment
//     (RRAM: static mode, SRAM: dynamic mode) to the destination lanes;
//   * the programmable DCIM logic (bit mask, 5-stage MFAT, EPU, accumulators);
//   * a 1-KB instruction cache fed by the top controller, the PE controller
//     and the snoop-mode bus controller.
//
// The PE controller executes, in order, the words of its instruction cache,
// or, after MPLD, the words of a micro-program read straight from RRAM
// (two 16-bit reads per word, eight words per 256-bit RRAM row):
//   RRAM LD / SRAM LD / SRAM ST  copy a whole 64-Kb macro (256 rows) to a
//                                SRAM macro of this or another unit;
//   IBLKMOV / EBLKMOV            copy 1..8 rows inside the PE / to a unit;
//   TensorMAC                    (two words) K dot products of Vector Len
//                                elements, source at any byte (RRAM or SRAM),
//                                destination vector at any byte of SRAM_k;
//   WBK                          write the K results (32-bit words: INT32,
//                                or IEEE single for FP formats) to any byte
//                                of a local or remote SRAM, with AccFlag
//                                selecting pSum accumulation;
//   MPLD                         run a micro-program stored in RRAM.
// TensorMAC is bit-serial over the source operand: per destination row it
// runs 8/16 cycles (INT8/INT16) or 4/11 mantissa cycles (FP8/FP16); FP
// formats first make an exponent pass over the whole vector to find Emax
// (output alignment), then one exponent cycle per row before its mantissa
// cycles. RRAM rows are read as sixteen 16-bit words.
// Instruction semantics follow the document; op-code values, the data layout
// (little-endian, byte columns), result formats, copy-length and kernel-size
// encodings, and the rule that the destination vector of a TensorMAC lies in
// this PE (PE_M = PE_N) are this design's choices. Remote bus traffic and
// local work on the same macro are kept apart by the top controller's
// ordering of cross-unit instructions.
module gp_dcim_pe
  import proteus_pkg::*;
#(
  parameter logic [3:0]  PE_ID   = 4'd0,
  parameter int unsigned N_RRAM  = 6,
  parameter int unsigned N_SRAM  = 4,
  parameter int unsigned RRAM_RD_LAT = 3
) (
  input  logic      clk,
  input  logic      rst_n,
  input  ibus_t     ibus,
  output logic      ic_full,
  output logic      idle,
  input  bus_lane_t lanes [N_UNITS],
  output bus_lane_t lane_out
);
  // ------------------------------------------------------------ memories
  logic        r_ren  [N_RRAM];
  logic        r_wen  [N_RRAM];
  logic [7:0]  r_rrow, r_wrow;
  logic [3:0]  r_rcol, r_wcol;
  logic [15:0] r_wdata;
  logic [15:0] r_rdata [N_RRAM];
  logic        r_rvalid[N_RRAM];
  logic        r_busy  [N_RRAM];

  for (genvar i = 0; i < N_RRAM; i++) begin : g_rram
    rram_macro #(.RD_LAT(RRAM_RD_LAT)) u_rram (
      .clk, .rst_n, .ren(r_ren[i]), .rd_row(r_rrow), .rd_col(r_rcol),
      .rdata(r_rdata[i]), .rvalid(r_rvalid[i]), .busy(r_busy[i]),
      .wen(r_wen[i]), .wr_row(r_wrow), .wr_col(r_wcol), .wdata(r_wdata)
    );
  end

  logic         s_en   [N_SRAM];
  logic         s_we   [N_SRAM];
  logic         s_dcim [N_SRAM];
  logic [7:0]   s_row  [N_SRAM];
  logic [255:0] s_wdata[N_SRAM];
  logic [31:0]  s_wbe  [N_SRAM];
  logic [255:0] s_in   [N_SRAM];
  logic [255:0] s_rdata[N_SRAM];

  for (genvar i = 0; i < N_SRAM; i++) begin : g_sram
    tensor_sram_macro u_sram (
      .clk, .en(s_en[i]), .we(s_we[i]), .dcim(s_dcim[i]), .row(s_row[i]),
      .wdata(s_wdata[i]), .wbe(s_wbe[i]), .in_vec(s_in[i]), .rdata(s_rdata[i])
    );
  end

  // ----------------------------------------------------------- bus ctrl
  bus_lane_t tx, rx;
  bus_ctrl #(.UNIT(PE_ID)) u_bus (.clk, .rst_n, .tx, .lane_out, .lanes, .rx);

  // -------------------------------------------------------- instr cache
  logic        ic_pop, ic_empty;
  logic [31:0] ic_head;
  logic [8:0]  ic_count;
  icache u_ic (
    .clk, .rst_n, .push(ibus.valid && ibus.unit == PE_ID), .wdata(ibus.word),
    .full(ic_full), .pop(ic_pop), .head(ic_head), .empty(ic_empty), .count(ic_count)
  );

  // ------------------------------------------------------------- state
  typedef enum logic [5:0] {
    S_IDLE, S_MPW_LO, S_MPW_LO_W, S_MPW_HI, S_MPW_HI_W, S_GOT, S_EXEC,
    S_F_SRAM, S_F_SRAM_W, S_F_RRAM, S_F_RRAM_W,
    S_RW0, S_RW1,
    S_MV_NEXT, S_MV_WR,
    S_T_K, S_T_CHUNK, S_T_L0, S_T_L1, S_T_EXP, S_T_EXPW, S_T_BITS, S_T_WAIT,
    S_W_PS, S_W_CV, S_W_P2, S_W_NEXT,
    S_RESP, S_RESP_W
  } state_e;
  state_e st, f_ret, rw_ret;

  logic [31:0] ir0, ir1, word;
  logic        need2;

  // micro-program
  logic        mp_active;
  logic [2:0]  mp_macro;
  logic [10:0] mp_addr;    // word address: row*8 + word
  logic [9:0]  mp_left;

  // line buffer
  logic [255:0] line [2];
  logic [7:0]   ltag [2];
  logic         lval [2];
  // fetch engine
  logic         f_rram, f_slot;
  logic [2:0]   f_id;
  logic [7:0]   f_row;
  logic [3:0]   f_col;
  // row-write engine
  logic [3:0]   rw_unit;
  logic [3:0]   rw_mem;
  logic [7:0]   rw_row;
  logic [255:0] rw_data;
  logic [31:0]  rw_be;
  // move engine
  logic [8:0]   mv_left;
  logic [7:0]   mv_srow, mv_drow;
  // TensorMAC
  fmt_e         fmt, last_fmt;
  logic [9:0]   nbytes, done;
  logic [6:0]   nk, last_nk;
  logic [5:0]   k;
  logic [15:0]  src_base;
  logic [12:0]  dst_base;
  logic [1:0]   sram_k;
  logic [7:0]   row_d;
  logic [4:0]   off_d, off_s;
  logic [5:0]   cnt;
  logic [7:0]   sr0;
  logic         need1, pass_exp;
  logic [4:0]   bit_i;
  // WBK
  logic [31:0]  wword;
  logic [12:0]  wb_addr;
  logic [3:0]   accflag;

  // read request pending
  logic         rd_pend;
  logic [3:0]   rd_unit;
  logic [1:0]   rd_sram;
  logic [7:0]   rd_row;

  // ---------------------------------------------------- stream organizer
  logic [255:0]     aligned, in_vec;
  logic [31:0]      lane_mask, a_sign;
  logic [31:0][4:0] a_exp;
  logic             exp_cycle;
  assign exp_cycle = (st == S_T_EXP);

  stream_organizer u_org (
    .line0(line[0]), .line1(line[1]), .src_off(off_s), .dst_off(off_d), .cnt,
    .fmt, .bit_idx(bit_i[3:0]), .exp_pass(exp_cycle), .aligned, .lane_mask,
    .in_vec, .a_sign, .a_exp
  );

  // ---------------------------------------------------------- DCIM logic
  logic             mac_issue, exp_issue, epu_clr, mac_done, dl_busy;
  logic             ps_go, ps_valid;
  logic signed [63:0] ps_m;
  logic signed [9:0]  ps_scale;
  logic [6:0]       emax;
  dcim_tag_t        tag;
  logic [1:0]       dl_src_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dl_src_q <= '0;
    else        dl_src_q <= sram_k;
  end

  dcim_logic u_dl (
    .clk, .rst_n, .fmt, .mac_issue, .tag, .lane_mask, .a_sign, .a_exp,
    .exp_issue, .exp_max(pass_exp), .epu_clr, .dout(s_rdata[dl_src_q]),
    .emax, .mac_done, .busy(dl_busy), .ps_go, .ps_idx(k), .acc_flag(accflag),
    .ps_valid, .ps_m, .ps_scale
  );

  always_comb begin
    tag           = '0;
    tag.first_bit = (bit_i == serial_bits(fmt) - 5'd1);
    tag.neg       = (fmt == FMT_INT8 || fmt == FMT_INT16) && tag.first_bit;
    tag.last_bit  = (bit_i == 5'd0);
    tag.first_row = (done == 10'd0);
    tag.last_row  = (10'(done + 10'(cnt)) >= nbytes);
    tag.k         = k;
    tag.scale     = (fmt == FMT_FP8 || fmt == FMT_FP16) ? fp_scale(fmt, emax) : 10'sd0;
  end

  // --------------------------------------------------- chunk arithmetic
  logic [12:0] c_dst;
  logic [15:0] c_src;
  logic [9:0]  c_rem;
  logic [5:0]  c_cnt;
  always_comb begin
    c_dst = dst_base + 13'(done);
    c_src = src_base + 16'(k) * 16'(nbytes) + 16'(done);
    c_rem = nbytes - done;
    c_cnt = 6'd32 - 6'(c_dst[4:0]);
    if (10'(c_cnt) > c_rem) c_cnt = c_rem[5:0];
  end

  // ------------------------------------------------------- RRAM writes
  // deployment-time programming: one 128-bit beat = eight 16-bit words
  logic         rw_busy;
  logic [127:0] rwb_data;
  logic [2:0]   rwb_cnt, rwb_macro;
  logic [7:0]   rwb_row;
  logic         rwb_beat;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rw_busy <= 1'b0; rwb_cnt <= '0; rwb_data <= '0; rwb_macro <= '0;
      rwb_row <= '0; rwb_beat <= 1'b0;
    end else if (rx.valid && !rx.rd && rx.mem >= MEM_RRAM0 && rx.mem < MEM_RESP) begin
      rw_busy   <= 1'b1;
      rwb_cnt   <= '0;
      rwb_data  <= rx.data;
      rwb_macro <= 3'(rx.mem - MEM_RRAM0);
      rwb_row   <= rx.row;
      rwb_beat  <= rx.beat;
    end else if (rw_busy) begin
      rwb_cnt  <= rwb_cnt + 1'b1;
      rwb_data <= rwb_data >> 16;
      if (rwb_cnt == 3'd7) rw_busy <= 1'b0;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
    (rx.valid && !rx.rd && rx.mem >= MEM_RRAM0 && rx.mem < MEM_RESP) |-> !rw_busy)
    else $error("PE %0d: RRAM program beat while previous one drains", PE_ID);

  always_comb begin
    for (int i = 0; i < N_RRAM; i++) begin
      r_wen[i] = rw_busy && (rwb_macro == 3'(i));
      r_ren[i] = 1'b0;
    end
    r_wrow  = rwb_row;
    r_wcol  = {rwb_beat, rwb_cnt};
    r_wdata = rwb_data[15:0];
    r_rrow  = '0;
    r_rcol  = '0;
    if (st == S_F_RRAM) begin
      r_ren[f_id] = 1'b1;
      r_rrow      = f_row;
      r_rcol      = f_col;
    end else if (st == S_MPW_LO || st == S_MPW_HI) begin
      r_ren[mp_macro] = 1'b1;
      r_rrow          = mp_addr[10:3];
      r_rcol          = {mp_addr[2:0], (st == S_MPW_HI)};
    end
  end

  // ------------------------------------------------------- SRAM ports
  always_comb begin
    for (int i = 0; i < N_SRAM; i++) begin
      s_en[i] = 1'b0; s_we[i] = 1'b0; s_dcim[i] = 1'b0; s_row[i] = '0;
      s_wdata[i] = '0; s_wbe[i] = '0; s_in[i] = '0;
    end
    mac_issue = 1'b0;
    exp_issue = 1'b0;
    case (st)
      S_F_SRAM: begin
        s_en[f_id[1:0]]  = 1'b1;
        s_row[f_id[1:0]] = f_row;
      end
      S_RESP: begin
        s_en[rd_sram]  = 1'b1;
        s_row[rd_sram] = rd_row;
      end
      S_RW0: if (rw_unit == PE_ID) begin
        s_en[rw_mem[1:0]]    = 1'b1;
        s_we[rw_mem[1:0]]    = 1'b1;
        s_row[rw_mem[1:0]]   = rw_row;
        s_wdata[rw_mem[1:0]] = rw_data;
        s_wbe[rw_mem[1:0]]   = rw_be;
      end
      S_T_EXP, S_T_BITS: begin
        s_en[sram_k]   = 1'b1;
        s_dcim[sram_k] = 1'b1;
        s_row[sram_k]  = row_d;
        s_in[sram_k]   = in_vec;
        exp_issue      = (st == S_T_EXP);
        mac_issue      = (st == S_T_BITS);
      end
      default: ;
    endcase
    // remote writes from the bus take the port
    if (rx.valid && !rx.rd && rx.mem < 4'd4) begin
      s_en[rx.mem[1:0]]    = 1'b1;
      s_we[rx.mem[1:0]]    = 1'b1;
      s_dcim[rx.mem[1:0]]  = 1'b0;
      s_row[rx.mem[1:0]]   = rx.row;
      s_wdata[rx.mem[1:0]] = rx.beat ? {rx.data, 128'd0} : {128'd0, rx.data};
      s_wbe[rx.mem[1:0]]   = rx.beat ? {rx.be, 16'd0} : {16'd0, rx.be};
    end
  end

  // ------------------------------------------------------ bus transmit
  always_comb begin
    tx = '0;
    if ((st == S_RW0 || st == S_RW1) && rw_unit != PE_ID) begin
      tx.valid = 1'b1;
      tx.beat  = (st == S_RW1);
      tx.unit  = rw_unit;
      tx.mem   = rw_mem;
      tx.row   = rw_row;
      tx.be    = (st == S_RW1) ? rw_be[31:16] : rw_be[15:0];
      tx.data  = (st == S_RW1) ? rw_data[255:128] : rw_data[127:0];
    end
  end

  assign ic_pop = (st == S_IDLE) && !rd_pend && !mp_active && !ic_empty;
  assign epu_clr = (st == S_T_K);
  assign ps_go   = (st == S_W_PS);

  // WBK: 32-bit result word and its byte placement
  logic [31:0]  res_word;
  always_comb begin
    if (last_fmt == FMT_FP8 || last_fmt == FMT_FP16)
      res_word = to_fp32(ps_m, ps_scale);
    else if (ps_m > 64'sh7FFFFFFF)
      res_word = 32'h7FFFFFFF;
    else if (ps_m < -64'sh80000000)
      res_word = 32'h80000000;
    else
      res_word = ps_m[31:0];
  end

  // ------------------------------------------------------------- FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; f_ret <= S_IDLE; rw_ret <= S_IDLE;
      ir0 <= '0; ir1 <= '0; word <= '0; need2 <= 1'b0;
      mp_active <= 1'b0; mp_macro <= '0; mp_addr <= '0; mp_left <= '0;
      for (int i = 0; i < 2; i++) begin line[i] <= '0; ltag[i] <= '0; lval[i] <= 1'b0; end
      f_rram <= 1'b0; f_slot <= 1'b0; f_id <= '0; f_row <= '0; f_col <= '0;
      rw_unit <= '0; rw_mem <= '0; rw_row <= '0; rw_data <= '0; rw_be <= '0;
      mv_left <= '0; mv_srow <= '0; mv_drow <= '0;
      fmt <= FMT_INT8; last_fmt <= FMT_INT8; nbytes <= '0; done <= '0;
      nk <= 7'd1; last_nk <= 7'd1; k <= '0; src_base <= '0; dst_base <= '0;
      sram_k <= '0; row_d <= '0; off_d <= '0; off_s <= '0; cnt <= '0; sr0 <= '0;
      need1 <= 1'b0; pass_exp <= 1'b0; bit_i <= '0;
      wword <= '0; wb_addr <= '0; accflag <= '0;
      rd_pend <= 1'b0; rd_unit <= '0; rd_sram <= '0; rd_row <= '0;
    end else begin
      if (rx.valid && rx.rd) begin
        rd_pend <= 1'b1;
        rd_unit <= rx.data[3:0];
        rd_sram <= rx.mem[1:0];
        rd_row  <= rx.row;
      end
      case (st)
        // ---------------------------------------------- fetch / decode
        S_IDLE: begin
          if (rd_pend) st <= S_RESP;
          else if (mp_active) st <= S_MPW_LO;
          else if (!ic_empty) begin
            word <= ic_head;
            st   <= S_GOT;
          end
        end
        S_MPW_LO: st <= S_MPW_LO_W;
        S_MPW_LO_W: if (r_rvalid[mp_macro]) begin
          word[15:0] <= r_rdata[mp_macro];
          st <= S_MPW_HI;
        end
        S_MPW_HI: st <= S_MPW_HI_W;
        S_MPW_HI_W: if (r_rvalid[mp_macro]) begin
          word[31:16] <= r_rdata[mp_macro];
          mp_addr <= mp_addr + 1'b1;
          mp_left <= mp_left - 1'b1;
          if (mp_left == 10'd1) mp_active <= 1'b0;
          st <= S_GOT;
        end
        S_GOT: begin
          if (need2) begin
            ir1 <= word; need2 <= 1'b0; st <= S_EXEC;
          end else begin
            ir0 <= word;
            if (!word[31] && word[31:27] == OP_TMAC) begin
              need2 <= 1'b1;
              st <= S_IDLE;   // second word, same source as the first
            end else st <= S_EXEC;
          end
        end
        S_EXEC: begin
          st <= S_IDLE;
          if (ir0[31]) begin                          // EBLKMOV
            mv_left <= 9'(ir0[12:10]) + 9'd1; mv_srow <= ir0[20:13]; mv_drow <= ir0[7:0];
            f_rram <= 1'b0; f_id <= {1'b0, ir0[22:21]};
            rw_unit <= ir0[26:23]; rw_mem <= {2'b0, ir0[9:8]};
            st <= S_MV_NEXT;
          end else case (op_of(ir0))
            OP_IBLKMOV: begin
              mv_left <= 9'(ir0[12:10]) + 9'd1; mv_srow <= ir0[20:13]; mv_drow <= ir0[7:0];
              f_rram <= 1'b0; f_id <= {1'b0, ir0[22:21]};
              rw_unit <= PE_ID; rw_mem <= {2'b0, ir0[9:8]};
              st <= S_MV_NEXT;
            end
            OP_RRAM_LD, OP_SRAM_LD, OP_SRAM_ST: begin
              mv_left <= 9'd256; mv_srow <= '0; mv_drow <= '0;
              f_rram <= (op_of(ir0) == OP_RRAM_LD);
              f_id   <= (op_of(ir0) == OP_RRAM_LD) ? ir0[22:20] : {1'b0, ir0[19:18]};
              rw_unit <= ir0[17:14]; rw_mem <= {2'b0, ir0[13:12]};
              st <= S_MV_NEXT;
            end
            OP_MPLD: begin
              mp_macro  <= ir0[22:20];
              mp_addr   <= {ir0[19:12], 3'd0};
              mp_left   <= ir0[11:2];
              mp_active <= (ir0[11:2] != 10'd0);
            end
            OP_TMAC: begin
              fmt      <= fmt_e'(ir0[22:21]);
              last_fmt <= fmt_e'(ir0[22:21]);
              nbytes   <= 10'(ir0[20:13]) << ((ir0[22:21] == FMT_INT16 || ir0[22:21] == FMT_FP16) ? 1 : 0);
              nk       <= (ir1[31:26] == 6'd0) ? 7'd1 : 7'(ir1[31:26]);
              last_nk  <= (ir1[31:26] == 6'd0) ? 7'd1 : 7'(ir1[31:26]);
              k        <= '0;
              f_rram   <= !ir0[11];
              f_id     <= ir0[11] ? {1'b0, ir0[9:8]} : ir0[10:8];
              src_base <= {3'd0, ir0[7:0], ir1[21:17]};
              dst_base <= {ir1[7:0], ir1[16:12]};
              sram_k   <= ir1[9:8];
              lval[0]  <= 1'b0; lval[1] <= 1'b0;
              if (ir0[20:13] != 8'd0) st <= S_T_K;
            end
            OP_WBK: begin
              rw_unit <= ir0[22:19]; rw_mem <= {2'b0, ir0[18:17]};
              wb_addr <= {ir0[16:9], ir0[8:4]};
              accflag <= ir0[3:0];
              k       <= '0;
              st      <= S_W_PS;
            end
            default: ;
          endcase
        end
        // ----------------------------------------------- line fetch
        S_F_SRAM: st <= S_F_SRAM_W;
        S_F_SRAM_W: begin
          line[f_slot] <= s_rdata[f_id[1:0]];
          ltag[f_slot] <= f_row; lval[f_slot] <= 1'b1;
          st <= f_ret;
        end
        S_F_RRAM: st <= S_F_RRAM_W;
        S_F_RRAM_W: if (r_rvalid[f_id]) begin
          line[f_slot][16*f_col +: 16] <= r_rdata[f_id];
          f_col <= f_col + 1'b1;
          if (f_col == 4'd15) begin
            ltag[f_slot] <= f_row; lval[f_slot] <= 1'b1;
            st <= f_ret;
          end else st <= S_F_RRAM;
        end
        // ----------------------------------------------- row write
        S_RW0: st <= (rw_unit == PE_ID) ? rw_ret : S_RW1;
        S_RW1: st <= rw_ret;
        // ----------------------------------------------- row moves
        S_MV_NEXT: begin
          if (mv_left == 9'd0) st <= S_IDLE;
          else begin
            f_row <= mv_srow; f_col <= '0; f_slot <= 1'b0;
            f_ret <= S_MV_WR;
            st    <= f_rram ? S_F_RRAM : S_F_SRAM;
          end
        end
        S_MV_WR: begin
          rw_row  <= mv_drow; rw_data <= line[0]; rw_be <= '1;
          mv_srow <= mv_srow + 1'b1; mv_drow <= mv_drow + 1'b1;
          mv_left <= mv_left - 1'b1;
          lval[0] <= 1'b0;
          rw_ret  <= S_MV_NEXT;
          st      <= S_RW0;
        end
        // ----------------------------------------------- TensorMAC
        S_T_K: begin
          done     <= '0;
          pass_exp <= (fmt == FMT_FP8 || fmt == FMT_FP16);
          st       <= S_T_CHUNK;
        end
        S_T_CHUNK: begin
          row_d <= c_dst[12:5];
          off_d <= c_dst[4:0];
          cnt   <= c_cnt;
          sr0   <= c_src[12:5];
          off_s <= c_src[4:0];
          need1 <= (6'(c_src[4:0]) + c_cnt) > 6'd32;
          st    <= S_T_L0;
        end
        S_T_L0: begin
          if (lval[0] && ltag[0] == sr0) st <= S_T_L1;
          else if (lval[1] && ltag[1] == sr0) begin
            line[0] <= line[1]; ltag[0] <= ltag[1]; lval[0] <= 1'b1; lval[1] <= 1'b0;
            st <= S_T_L1;
          end else begin
            f_row <= sr0; f_col <= '0; f_slot <= 1'b0; f_ret <= S_T_L1;
            st <= f_rram ? S_F_RRAM : S_F_SRAM;
          end
        end
        S_T_L1: begin
          if (!need1 || (lval[1] && ltag[1] == sr0 + 8'd1))
            st <= (fmt == FMT_FP8 || fmt == FMT_FP16) ? S_T_EXP : S_T_BITS;
          else begin
            f_row <= sr0 + 8'd1; f_col <= '0; f_slot <= 1'b1; f_ret <= S_T_L1;
            st <= f_rram ? S_F_RRAM : S_F_SRAM;
          end
          bit_i <= serial_bits(fmt) - 5'd1;
        end
        S_T_EXP: st <= S_T_EXPW;
        S_T_EXPW: begin
          if (pass_exp) begin
            if (done + 10'(cnt) >= nbytes) begin
              done <= '0; pass_exp <= 1'b0;
            end else done <= done + 10'(cnt);
            st <= S_T_CHUNK;
          end else st <= S_T_BITS;
        end
        S_T_BITS: begin
          if (bit_i == 5'd0) begin
            if (done + 10'(cnt) >= nbytes) st <= S_T_WAIT;
            else begin
              done <= done + 10'(cnt);
              st <= S_T_CHUNK;
            end
          end else bit_i <= bit_i - 1'b1;
        end
        S_T_WAIT: if (mac_done) begin
          if (7'(k) + 7'd1 >= nk) st <= S_IDLE;
          else begin
            k  <= k + 1'b1;
            st <= S_T_K;
          end
        end
        // ----------------------------------------------- write back
        S_W_PS: st <= S_W_CV;
        S_W_CV: begin
          logic [12:0] a;
          a = wb_addr + 13'({k, 2'b00});
          wword   <= res_word;
          rw_row  <= a[12:5];
          rw_data <= 256'(res_word) << (8 * a[4:0]);
          rw_be   <= 32'hF << a[4:0];
          rw_ret  <= (a[4:0] > 5'd28) ? S_W_P2 : S_W_NEXT;
          st      <= S_RW0;
        end
        S_W_P2: begin
          logic [12:0] a;
          a = wb_addr + 13'({k, 2'b00});
          rw_row  <= a[12:5] + 8'd1;
          rw_data <= 256'(wword) >> (8 * (6'd32 - 6'(a[4:0])));
          rw_be   <= 32'hF >> (6'd32 - 6'(a[4:0]));
          rw_ret  <= S_W_NEXT;
          st      <= S_RW0;
        end
        S_W_NEXT: begin
          if (7'(k) + 7'd1 >= last_nk) st <= S_IDLE;
          else begin
            k  <= k + 1'b1;
            st <= S_W_PS;
          end
        end
        // ----------------------------------------------- read response
        S_RESP: st <= S_RESP_W;
        S_RESP_W: begin
          rd_pend <= 1'b0;
          rw_unit <= rd_unit; rw_mem <= MEM_RESP; rw_row <= rd_row;
          rw_data <= s_rdata[rd_sram]; rw_be <= '1;
          rw_ret  <= S_IDLE;
          st      <= S_RW0;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign idle = (st == S_IDLE) && ic_empty && !mp_active && !rd_pend && !rw_busy && !dl_busy;
endmodule
