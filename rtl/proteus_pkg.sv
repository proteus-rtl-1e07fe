// proteus_pkg: types, constants and instruction-field helpers shared by the
// PROTEUS digital compute-in-memory accelerator.
//
// The 32-bit DCIM instruction set has seven instruction kinds. Field widths
// follow the published encoding table; the bit positions of TensorMAC and WBK
// follow the printed bit numbers of the encoding figure, the others are packed
// from bit 31 downward in table order. The numeric op-code values are not
// published and are chosen here (EBLKMOV is the only op code with bit 31 set,
// because its op-code field carries the 4-bit source unit).
//
// Bus: every unit owns one lane of the multi-lane snoop bus. A lane beat
// carries a 16-bit address {unit, mem, row}, 128 data bits (half a 256-bit
// row, selected by `beat`) and 16 byte enables.
package proteus_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned ROW_BITS   = 256;  // tensor-SRAM / RRAM row width
  localparam int unsigned ROW_BYTES  = 32;
  localparam int unsigned N_ROWS     = 256;  // rows per 64-Kb macro
  localparam int unsigned N_LANES8   = 32;   // 8-bit lanes per row
  localparam int unsigned BUS_W      = 128;
  localparam int unsigned N_UNITS    = 14;   // 10 PE, FU, SPI, IBUF, TOPC

  // ------------------------------------------------------------- unit IDs
  localparam logic [3:0] UNIT_FU   = 4'd10;
  localparam logic [3:0] UNIT_SPI  = 4'd11;
  localparam logic [3:0] UNIT_IBUF = 4'd12;
  localparam logic [3:0] UNIT_TOPC = 4'd13;

  // bus `mem` field
  localparam logic [3:0] MEM_RRAM0 = 4'd8;   // 8..13 : RRAM macro 0..5
  localparam logic [3:0] MEM_RESP  = 4'd14;  // read response to requester
  localparam logic [3:0] MEM_CTRL  = 4'd15;  // control word (run command)

  // ------------------------------------------------------------- op codes
  typedef enum logic [4:0] {
    OP_NOP     = 5'h00,
    OP_RRAM_LD = 5'h01,
    OP_SRAM_LD = 5'h02,
    OP_SRAM_ST = 5'h03,
    OP_IBLKMOV = 5'h04,
    OP_TMAC    = 5'h05,
    OP_FUNCOP  = 5'h06,
    OP_WBK     = 5'h07,
    OP_MPLD    = 5'h08
  } opcode_e;
  // EBLKMOV: instr[31] = 1, instr[30:27] = source unit

  typedef enum logic [1:0] {
    FMT_INT8  = 2'd0,
    FMT_INT16 = 2'd1,
    FMT_FP8   = 2'd2,
    FMT_FP16  = 2'd3
  } fmt_e;

  typedef enum logic [3:0] {
    FN_SOFTMAX = 4'd0,
    FN_MAXPOOL = 4'd1,
    FN_AVGPOOL = 4'd2,
    FN_RELU    = 4'd3
  } fu_fn_e;

  // ---------------------------------------------------------------- bus
  typedef struct packed {
    logic              valid;
    logic              rd;     // read request (data[3:0] = requesting unit)
    logic              beat;   // 0: bytes 0..15 of the row, 1: bytes 16..31
    logic [3:0]        unit;
    logic [3:0]        mem;
    logic [7:0]        row;
    logic [15:0]       be;
    logic [BUS_W-1:0]  data;
  } bus_lane_t;

  typedef struct packed {
    logic        valid;
    logic [3:0]  unit;
    logic [31:0] word;
  } ibus_t;

  // ------------------------------------------------------ decoded fields
  typedef struct packed {
    logic [5:0] ksize;
    logic [3:0] pe_m;
    logic [4:0] col_m;   // source column (byte)
    logic [4:0] col_n;   // destination column (byte)
    logic [3:0] sram_k;
    logic [7:0] row_l;
  } tmac_w1_t;

  // Tag that travels with each bit-serial DCIM cycle through the MFAT pipe.
  typedef struct packed {
    logic               first_bit;  // first serial cycle of a row
    logic               neg;        // INT sign-bit cycle: subtract
    logic               last_bit;   // last serial cycle of a row
    logic               first_row;  // newRowFlag: first row of a vector
    logic               last_row;   // last row of the vector
    logic [5:0]         k;          // kernel (output) index
    logic signed [9:0]  scale;      // log2 weight of the result LSB
  } dcim_tag_t;

  function automatic logic is_eblkmov(input logic [31:0] w);
    return w[31];
  endfunction

  function automatic opcode_e op_of(input logic [31:0] w);
    return opcode_e'(w[31:27]);
  endfunction

  // Unit that executes an instruction word (first word of TensorMAC).
  function automatic logic [3:0] exec_unit(input logic [31:0] w);
    if (w[31])                  return w[30:27];
    else if (w[31:27] == OP_FUNCOP) return UNIT_FU;
    else                        return w[26:23];
  endfunction

  // Instructions that touch a second unit or run a micro-program: the top
  // controller issues them only to an idle chip.
  function automatic logic is_global(input logic [31:0] w);
    if (w[31]) return 1'b1;
    case (w[31:27])
      OP_RRAM_LD, OP_SRAM_LD, OP_SRAM_ST: return w[26:23] != w[17:14];
      OP_WBK:                             return w[26:23] != w[22:19];
      OP_MPLD, OP_FUNCOP:                 return 1'b1;
      default:                            return 1'b0;
    endcase
  endfunction

  function automatic int unsigned elem_bytes(input fmt_e f);
    return (f == FMT_INT16 || f == FMT_FP16) ? 2 : 1;
  endfunction

  // bit-serial cycles per row: INT width, or FP mantissa incl. lead bit
  function automatic logic [4:0] serial_bits(input fmt_e f);
    case (f)
      FMT_INT8:  return 5'd8;
      FMT_INT16: return 5'd16;
      FMT_FP8:   return 5'd4;
      default:   return 5'd11;
    endcase
  endfunction

  localparam int unsigned ALIGN_G = 24;  // output-alignment guard bits

  // log2 of the value of one LSB of an FP accumulator relative to 2^(Emax)
  function automatic logic signed [9:0] fp_scale(input fmt_e f, input logic [6:0] emax);
    if (f == FMT_FP8)
      return $signed({3'b0, emax}) - 10'sd44;   // G + 2*7 + 2*3
    else
      return $signed({3'b0, emax}) - 10'sd74;   // G + 2*15 + 2*10
  endfunction

  // Convert signed fixed-point value m * 2^scale to IEEE single precision,
  // truncating, flushing underflow to zero and saturating overflow to inf.
  function automatic logic [31:0] to_fp32(input logic signed [63:0] m, input logic signed [9:0] scale);
    logic        s;
    logic [63:0] mag;
    int          lead;
    int          e;
    logic [63:0] norm;
    s = m[63];
    mag = s ? 64'(-m) : 64'(m);
    if (mag == 64'd0) return 32'd0;
    lead = 0;
    for (int i = 0; i < 64; i++) if (mag[i]) lead = i;
    e = lead + int'(scale) + 127;
    if (e >= 255) return {s, 8'hFF, 23'd0};
    if (e <= 0)   return {s, 31'd0};
    norm = mag << (63 - lead);
    return {s, 8'(e), norm[62:40]};
  endfunction

endpackage
