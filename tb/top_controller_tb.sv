// top_controller_tb: runs random instruction programs through the top
// controller. The bench holds the instruction buffer and models every
// unit as an instruction cache of 4 words that drains one word per random
// number of cycles. Checked: every word reaches the unit named by its
// pre-decoded fields, in program order, the second TensorMAC word follows
// its first to the same unit, nothing is sent to a full unit, barrier
// instructions (and the word after them) only leave when the whole chip is
// idle, the barrier counter, the busy flag, and that local words for
// different PEs overlap in time.
module top_controller_tb;
  import proteus_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  bus_lane_t lanes [N_UNITS];
  bus_lane_t tb_lane;
  logic ib_rd_en, busy;
  logic [11:0] ib_rd_addr;
  logic [31:0] ib_rd_data;
  ibus_t ibus;
  logic [15:0] unit_full, unit_idle, n_barriers;
  top_controller dut (.clk, .rst_n, .lanes, .ib_rd_en, .ib_rd_addr,
                      .ib_rd_data, .ibus, .unit_full, .unit_idle, .busy, .n_barriers);
  always_comb begin
    for (int i = 0; i < N_UNITS; i++) lanes[i] = '0;
    lanes[UNIT_SPI] = tb_lane;
  end
  logic [31:0] prog [512];
  always_ff @(posedge clk) if (ib_rd_en) ib_rd_data <= prog[ib_rd_addr];

  int checks = 0, failures = 0;
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // unit models
  int occ [16], tmr [16];
  always_comb for (int u = 0; u < 16; u++) begin
    unit_full[u] = (occ[u] >= 4);
    unit_idle[u] = (occ[u] == 0);
  end
  int got_n, overlap, prev_glob, exp_second;
  logic [3:0] exp_unit [512];
  bit glob [512];
  logic [3:0] second_unit;
  always @(posedge clk) begin
    for (int u = 0; u < 16; u++)
      if (occ[u] > 0) begin
        if (tmr[u] == 0) begin occ[u]--; tmr[u] = $urandom_range(1, 12); end
        else tmr[u]--;
      end
    if (ibus.valid) begin
      int busy_units;
      busy_units = 0;
      for (int u = 0; u < 16; u++) if (occ[u] > 0) busy_units++;
      check(ibus.word == prog[got_n], $sformatf("order at %0d", got_n));
      check(ibus.unit == exp_unit[got_n], $sformatf("unit at %0d: %0d vs %0d", got_n, ibus.unit, exp_unit[got_n]));
      check(occ[ibus.unit] < 4, "sent to a full unit");
      if (glob[got_n] || prev_glob) check(busy_units == 0, $sformatf("barrier at %0d with %0d busy units", got_n, busy_units));
      if (!glob[got_n] && !prev_glob && busy_units > 0 && occ[ibus.unit] == 0) overlap++;
      prev_glob = glob[got_n];
      if (occ[ibus.unit] == 0) tmr[ibus.unit] = $urandom_range(1, 12);
      occ[ibus.unit]++;
      got_n++;
    end
  end

  task automatic run(input int n);
    @(negedge clk); tb_lane = '{valid:1'b1, rd:1'b0, beat:1'b0, unit:UNIT_TOPC, mem:4'd0, row:8'd0,
                                be:16'hFFFF, data:128'(n)};
    @(posedge clk); #1 tb_lane = '0;
  endtask

  initial begin
    int nb;
    tb_lane = '0; got_n = 0; overlap = 0; prev_glob = 0;
    for (int u = 0; u < 16; u++) begin occ[u] = 0; tmr[u] = 0; end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int rep = 0; rep < 4; rep++) begin
      int n, nb0;
      n = 0; nb0 = n_barriers;
      nb = 0;
      while (n < 120) begin
        int kind, pe, pe2;
        kind = $urandom_range(0, 9); pe = $urandom_range(0, 9); pe2 = $urandom_range(0, 9);
        case (kind)
          0, 1, 2: begin   // TensorMAC, two words
            prog[n] = {OP_TMAC, 4'(pe), 23'($urandom)}; exp_unit[n] = 4'(pe); glob[n] = 0;
            prog[n+1] = $urandom; exp_unit[n+1] = 4'(pe); glob[n+1] = 0; n += 2;
          end
          3: begin prog[n] = {OP_WBK, 4'(pe), 4'(pe), 19'($urandom)}; exp_unit[n] = 4'(pe); glob[n] = 0; n++; end
          4: begin prog[n] = {OP_WBK, 4'(pe), 4'(10), 19'($urandom)}; exp_unit[n] = 4'(pe); glob[n] = 1; n++; nb++; end
          5: begin prog[n] = {OP_IBLKMOV, 4'(pe), 23'($urandom)}; exp_unit[n] = 4'(pe); glob[n] = 0; n++; end
          6: begin prog[n] = {1'b1, 4'(pe), 4'(pe2), 23'($urandom)}; exp_unit[n] = 4'(pe); glob[n] = 1; n++; nb++; end
          7: begin prog[n] = {OP_FUNCOP, 27'($urandom)}; exp_unit[n] = UNIT_FU; glob[n] = 1; n++; nb++; end
          8: begin prog[n] = {OP_MPLD, 4'(pe), 23'($urandom)}; exp_unit[n] = 4'(pe); glob[n] = 1; n++; nb++; end
          default: begin prog[n] = {OP_RRAM_LD, 4'(pe), 3'd1, 2'd0, 4'(pe), 14'($urandom)}; exp_unit[n] = 4'(pe); glob[n] = 0; n++; end
        endcase
      end
      got_n = 0; prev_glob = 0;
      run(n);
      repeat (2) @(posedge clk);
      check(busy, "busy after run");
      while (busy) @(posedge clk);
      check(got_n == n, $sformatf("dispatched %0d of %0d", got_n, n));
      for (int u = 0; u < 16; u++) check(occ[u] == 0, "busy flag dropped with work left");
      check(int'(n_barriers) - nb0 == nb, "barrier count");
    end
    check(overlap > 20, $sformatf("concurrent dispatch seen %0d times", overlap));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
