// softmax_unit: 32-lane SIMD softmax of the function unit, two-iteration
// streaming scheme.
//
// A softmax group of `n` INT8 elements (n = 1..256, 32 per 256-bit row,
// starting at row `base_row` of the data buffer) is processed in batches of
// 32 lanes:
//   iteration 1, per batch: an integer max-finder tree gives the batch max,
//     the global max buffer keeps the running max m; the running sum of
//     exponentials is rescaled when m grows, sum = sum*E(m_new-m_old) >> 15,
//     then the 32 values E(m - x_i) from the exponent LUT are added by an
//     adder tree;
//   reciprocal: r = floor(2^30 / sum);
//   iteration 2, per batch: y_i = min(127, E(m - x_i) * r >> 23) is written
//     back in place (INT8, probability scaled by 128).
// Inputs are INT8 with 4 fractional bits. E(d) = exp(-d/16) in Q1.15 is
// computed as 2^-(t/16) with t = round(d*log2(e)*16): a 16-entry table of
// 2^-(i/16) and a right shift by t/16. The two iterations, 32-lane width,
// max finder, exponent LUT, adder tree, global max buffer and reciprocal
// follow the document; number formats, the table construction and an exact
// divider for the reciprocal are this design's choices. Only INT8 input and
// output are built. Memory port: `rd_en`/`rd_row`, data on `rd_data` next
// cycle; `wr_en` writes `wr_data` with byte enables `wr_be`. `done` pulses.
module softmax_unit (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [7:0]   base_row,
  input  logic [8:0]   n,
  output logic         busy,
  output logic         done,
  output logic         rd_en,
  output logic [7:0]   rd_row,
  input  logic [255:0] rd_data,
  output logic         wr_en,
  output logic [7:0]   wr_row,
  output logic [255:0] wr_data,
  output logic [31:0]  wr_be
);
  localparam logic [15:0] FRAC [16] = '{
    16'd32768, 16'd31379, 16'd30048, 16'd28774, 16'd27554, 16'd26386,
    16'd25268, 16'd24196, 16'd23170, 16'd22188, 16'd21247, 16'd20347,
    16'd19484, 16'd18658, 16'd17867, 16'd17109};

  function automatic logic [15:0] iexp(input logic [8:0] d);
    logic [19:0] t;
    t = (20'(d) * 20'd1477 + 20'd512) >> 10;
    if (t[19:4] > 16'd15) return 16'd0;
    return FRAC[t[3:0]] >> t[7:4];
  endfunction

  typedef enum logic [2:0] {S_IDLE, S_R1, S_P1, S_RECIP, S_R2, S_P2, S_DONE} st_e;
  st_e st;

  logic [3:0]  b, nb;
  logic signed [7:0] m;
  logic [23:0] sum;
  logic [15:0] recip;
  logic [31:0] valid;

  always_comb begin
    for (int j = 0; j < 32; j++) valid[j] = (9'({b, 5'(j)}) < n);
  end

  // iteration 1 datapath: max finder, LUT, adder tree
  logic signed [7:0] bmax, mnew;
  logic [23:0]       esum;
  logic [39:0]       rescaled;
  always_comb begin
    bmax = -8'sd128;
    for (int j = 0; j < 32; j++)
      if (valid[j] && $signed(rd_data[8*j +: 8]) > bmax) bmax = $signed(rd_data[8*j +: 8]);
    mnew = (b == 0 || bmax > m) ? bmax : m;
    esum = '0;
    for (int j = 0; j < 32; j++)
      if (valid[j]) esum = esum + 24'(iexp(9'(mnew - $signed(rd_data[8*j +: 8]))));
    rescaled = (b == 0) ? 40'd0 : ((40'(sum) * 40'(iexp(9'(mnew - m)))) >> 15);
  end

  // iteration 2 datapath: normalise
  logic [255:0] y;
  always_comb begin
    for (int j = 0; j < 32; j++) begin
      logic [31:0] p;
      p = (32'(iexp(9'(m - $signed(rd_data[8*j +: 8])))) * 32'(recip)) >> 23;
      y[8*j +: 8] = (p > 32'd127) ? 8'd127 : p[7:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; b <= '0; nb <= '0; m <= '0; sum <= '0; recip <= '0;
    end else begin
      case (st)
        S_IDLE: if (start) begin
          b  <= '0;
          nb <= 4'((n + 9'd31) >> 5);
          st <= S_R1;
        end
        S_R1: st <= S_P1;
        S_P1: begin
          m   <= mnew;
          sum <= 24'(rescaled) + esum;
          if (b + 1'b1 == nb) begin
            st <= S_RECIP;
          end else begin
            b  <= b + 1'b1;
            st <= S_R1;
          end
        end
        S_RECIP: begin
          recip <= 16'(32'h4000_0000 / 32'(sum));
          b     <= '0;
          st    <= S_R2;
        end
        S_R2: st <= S_P2;
        S_P2: begin
          if (b + 1'b1 == nb) st <= S_DONE;
          else begin
            b  <= b + 1'b1;
            st <= S_R2;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy    = (st != S_IDLE);
  assign done    = (st == S_DONE);
  assign rd_en   = (st == S_R1) || (st == S_R2);
  assign rd_row  = base_row + 8'(b);
  assign wr_en   = (st == S_P2);
  assign wr_row  = base_row + 8'(b);
  assign wr_data = y;
  assign wr_be   = valid;
endmodule
