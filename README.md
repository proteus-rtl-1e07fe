# PROTEUS — a general-purpose digital compute-in-memory accelerator in SystemVerilog

PROTEUS keeps neural-network weights in dense on-chip RRAM and computes dot
products *inside* SRAM: a tensor-SRAM macro, read in "DCIM mode", returns the
bitwise AND of a stored row and an input bit vector, and an adder tree next to
the macro turns that into a partial dot product. Feeding the input one bit per
cycle (bit-serial) and shift-accumulating the partial sums gives a full
INT8/INT16 dot product of 32 (or 16) elements per row; an exponent unit and an
output-alignment step extend the same datapath to FP8 and FP16. What makes the
design *general-purpose* is a small instruction set: a host loads a program,
and the chip moves tensors between RRAM, SRAM and units, runs vector MACs of
any length and offset, writes results back, and calls softmax / pooling /
activation units, with no fixed dataflow.

This RTL builds the chip at its published size: ten processing engines (PEs),
each with six 64-Kb RRAM macros and four 64-Kb tensor-SRAM macros, one
function unit, a 12-KB instruction buffer, a top controller and an SPI host
port, joined by a multi-lane snoop bus. The RRAM macro is a behavioural model
(it is an analog macro); everything else is synthesizable logic.

## Chip organisation

```
            SPI pins
               |
   +--------+  |  +------------+   +----------------+
   | instr. |  +--| SPI (u 11) |   | top controller |-- instruction bus --+
   | buffer |     +------------+   |    (u 13)      |                     |
   | (u 12) |<-------- reads ------|  pre-decode,   |                     |
   +--------+                      |  dispatch      |                     |
       |                           +----------------+                     |
  =====+====== snoop bus: one lane per unit, every unit listens to all ===+====
       |          |           |                                 |
   +-------+  +-------+   +-------+                        +-----------+
   | PE 0  |  | PE 1  |...| PE 9  |                        | FU (u 10) |
   +-------+  +-------+   +-------+                        +-----------+
```

* **Unit IDs** (4 bits): PEs 0–9, function unit 10, SPI 11, instruction buffer
  12, top controller 13. Every unit that sends (PEs, FU, SPI) owns one lane of
  the bus and drives only that lane, so transfers with different sources run
  in the same cycle without arbitration; the instruction buffer and the top
  controller only listen. A receiver (`bus_ctrl`) picks out the beat whose
  unit field names it; two lanes naming the same unit in one cycle is an
  assertion failure, which the schedule (below) avoids.
* **A bus beat** (`bus_lane_t` in `proteus_pkg`) carries an address
  `{unit, mem, row}`, a 128-bit data half-row with byte enables, a `beat` bit
  (bytes 0–15 or 16–31 of a 256-bit row) and a `rd` bit. `mem` selects a
  memory inside the unit: 0–3 tensor SRAM / FU buffer, 8–13 RRAM macro 0–5,
  14 a read response, 15 a control word. A read request carries the
  requester's unit ID in `data[3:0]`; the owner answers with two response
  beats.
* **The instruction bus** is separate: the top controller sends one 32-bit
  word per cycle to one unit's instruction cache (256 words, a FIFO).

## The instruction set

All instructions are 32 bits; a TensorMAC is two words. Field positions of
TensorMAC and WBK are the published ones; the rest are packed from bit 31 in
the published field order. Opcode values are this design's (`opcode_e`).

| instruction | op | fields (msb → lsb) |
|---|---|---|
| TensorMAC w0 | 5 | op[31:27] PE_N[26:23] fmt[22:21] veclen[20:13] – srcmem[11:8] row_i[7:0] |
| TensorMAC w1 | – | ksize[31:26] PE_M[25:22] col_m[21:17] col_n[16:12] sram_k[11:8] row_l[7:0] |
| WBK | 7 | op PE_N[26:23] PE_M[22:19] sram[18:17] row[16:9] col[8:4] AccFlag[3:0] |
| RRAM LD / SRAM LD / SRAM ST | 1/2/3 | op src_unit[26:23] rram[22:20] sram[19:18] dst_unit[17:14] dst_sram[13:12] |
| IBLKMOV | 4 | op unit[26:23] src_sram[22:21] src_row[20:13] rows-1[12:10] dst_sram[9:8] dst_row[7:0] |
| EBLKMOV | bit31=1 | 1 src_unit[30:27] dst_unit[26:23] then as IBLKMOV |
| FuncOp | 6 | op fn[26:23] veclen[22:15] softmax_size[14:7] pool_size[6:4] buffer[3:0] |
| MPLD | 8 | op PE[26:23] rram[22:20] row[19:12] words[11:2] |

Formats: 0 INT8, 1 INT16, 2 FP8 (E4M3, bias 7), 3 FP16 (IEEE half).
`srcmem` with bit 3 set names tensor SRAM `srcmem[1:0]`, otherwise RRAM macro
`srcmem[2:0]`. FuncOp functions: 0 softmax, 1 max-pool, 2 average-pool,
3 ReLU; pool size 0 means 8.

## How a TensorMAC runs (`gp_dcim_pe`, `stream_organizer`, `dcim_logic`)

A TensorMAC computes `ksize` dot products. Output `k` multiplies the
`veclen`-element vector that starts at byte `row_i*32 + col_m + k*veclen*esize`
of the source memory with the vector at `row_l*32 + col_n` of tensor SRAM
`sram_k`, and leaves the result in pSum slot `k` of the accumulator. Vectors
may start at any byte and cross row boundaries.

1. **Chunking.** The PE controller walks the stationary operand in chunks that
   end at a row boundary of either operand. For each chunk it fetches the two
   source rows that cover it (RRAM rows are read as 16 × 16-bit words, three
   cycles each; SRAM rows in one cycle) into a two-line buffer.
2. **Stream organizer.** A byte shifter moves the chunk so that element *e* of
   the source lines up with element *e* of the stationary row, and builds the
   lane mask. For each serial cycle it produces the input bit vector: bit *b*
   of each element, copied across the element's 8 or 16 columns.
3. **Bit-serial DCIM.** The SRAM row is read in DCIM mode with that vector, so
   each column returns `stored AND input`. The DCIM logic turns each lane back
   into a value (INT: the stored element; FP: the stored mantissa with hidden
   bit and the product sign) and the five-stage adder tree (MFAT) sums the 32
   lanes. Cycles per row: INT8 8, INT16 16, FP8 4, FP16 11, most significant
   bit first. For integers the sign-bit cycle is subtracted (two's
   complement).
4. **Accumulation.** The cycle accumulator shift-adds the serial sums
   (`acc = 2*acc ± sum`); the row accumulator adds rows of one vector
   (restarting on the first row, the "newRowFlag"); the pSum store keeps one
   result per kernel index.
5. **Write-back.** WBK writes the `ksize` results of the last TensorMAC as
   consecutive 32-bit words starting at byte `row*32 + col` of SRAM `sram` of
   unit `PE_M`: locally, or over the bus to another PE or the FU. With
   `AccFlag = 0` each pSum slot takes the new dot product; any other value
   adds the new dot product to what the slot held from earlier TensorMACs, so
   long reductions can be split across instructions. INT results saturate to
   INT32; FP results are written as FP32.

### Floating point by output alignment (`epu`, `mfat`)

FP inputs are not aligned before the multiply. Instead, before the mantissa
cycles, the PE runs an *exponent pass*: for every row of the vector the
exponent processing unit adds the input and stored exponents per lane and
keeps the maximum `Emax` over the whole vector. Then, row by row, one cycle
latches the per-lane exponent sums and the mantissa cycles run: each lane's
product mantissa is shifted left by `G − (Emax − Esum)` (G = 24) before the
adder tree, and a lane further than G binades below `Emax` is flushed
(underflow). All rows thus accumulate at one scale, `2^(Emax − 44)` for FP8 and
`2^(Emax − 74)` for FP16 (exponent biases, mantissa fraction bits and G folded
together), and the pSum keeps an integer mantissa with that binary exponent.
When pSums with different exponents are accumulated the smaller is shifted
right. The result is exact except for products dropped by underflow and the
FP32 truncation at write-back.

## The function unit (`function_unit`, `softmax_unit`)

The FU holds a four-bank buffer (like a PE's tensor SRAM, written by WBK,
EBLKMOV and the host) and runs one FuncOp at a time on INT8 data, 32 elements
per row starting at row 0 of the named bank, with results in place:

* **Softmax** in groups of `softmax_size` elements (0: the whole vector), each
  group starting on a new row. The 32-lane unit makes two passes: the first
  keeps a running maximum `m` and a running sum of `exp(x−m)`, rescaling the
  sum whenever `m` grows; then it computes `r = 2^30 / sum`; the second pass
  writes `min(127, E(m−x)·r >> 23)`. Inputs are Q3.4; `E(d) = exp(−d/16)` in
  Q1.15 is `T[t mod 16] >> (t div 16)` with `t = round(d·log2(e))` in
  1/16 units and `T[i] = round(32768·2^(−i/16))`. Outputs are probabilities
  × 128, within 3/128 of the exact softmax.
* **Max / average pooling** over consecutive windows, results packed from
  element 0 (average truncates toward zero).
* **ReLU**, one row per two cycles.
* **EBLKMOV** streams buffer rows to another unit.

## Scheduling (`top_controller`)

A run starts with a control word from the host (word count). The controller
reads the instruction buffer word by word, pre-decodes which unit executes it
(and sends the second TensorMAC word after the first) and pushes it into that
unit's instruction cache, stalling only while that cache is full. Units
therefore run concurrently: ten PEs can be in their bit-serial phase at once.
Instructions that involve a second unit — LD/ST between units, EBLKMOV, a WBK
to another unit, FuncOp — and MPLD are *barriers*: they leave only when all
units are idle, no lane is busy and three cycles have passed since the last
dispatch, and the word after a barrier waits for the same. This keeps cross-unit data ordered without any handshake
between units.

**MPLD** makes a PE fetch a micro-program from one of its RRAM macros (`words`
32-bit words starting at `row`, two 16-bit RRAM reads per word) and execute it
before its cache, which is how a layer's kernel code can live next to its
weights.

## Host interface (`spi_if`)

SPI mode 0, MSB first, one frame per chip-select; the core clock must be at
least four times SCLK (inputs pass a two-flop synchroniser).

| command | bytes after the command byte |
|---|---|
| `0x01` write instructions | addr[11:8], addr[7:0], then 4 bytes per word, big-endian |
| `0x02` run | count[11:8], count[7:0] |
| `0x03` write row | `{unit, mem}`, row, 32 data bytes (byte 0 first) |
| `0x04` read row | `{unit, mem}`, row, one turnaround byte, 32 bytes returned on MISO |
| `0x05` status | one byte returned: `{7'b0, busy}` |

Writing a row to `mem` 8–13 of a PE programs that RRAM macro (model
deployment); the PE drains the row into the macro 16 bits at a time.

## Where this RTL departs from the published design

* A PE has six 64-Kb RRAM macros (384 Kb); the chip-level total quoted for the
  silicon is 400 Kb per PE / 4.0 Mb. The six-macro organisation was followed.
* A TensorMAC reads its stationary operand from its own tensor SRAM
  (`PE_M` must equal `PE_N`); operands from another PE are moved first with
  EBLKMOV.
* Instructions in a PE run one after another; the published pipeline overlaps a
  TensorMAC with the previous write-back.
* The function unit and softmax work on INT8 only; normalisation and
  element-wise FuncOps are not built. One FU is instantiated.
* The RRAM macro is a functional model with a 3-cycle read (10 ns at
  275 MHz) and single-cycle writes; write-verify, forming and analog
  behaviour are absent. AXI, clocking, pads and the FPGA host are not part of
  the RTL.
* Opcode values, the fields of instructions other than TensorMAC/WBK, the bus
  beat format, the SPI protocol and the scheduling rule are this design's
  own choices.

## Capacity against the evaluated models

With 8-bit parameters and 3.84 Mb of RRAM per chip, ResNet-20 (2.16 Mb) and
GraphSAGE (3.20 Mb) fit on one chip; MobileViT-XXS (7.86 Mb), BERT-Tiny
(35.09 Mb) and Vision-Mamba (50.47 Mb) need several chips coordinated by a
host, as in the published system.

## Simulating

Each block has a self-checking testbench in `tb/<block>_tb.sv` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/proteus_pkg.sv tb/gp_dcim_pe_tb.sv \
          --top-module gp_dcim_pe_tb -o sim && ./obj_dir/sim
```

(other modules are found through `-Irtl`). `tb/proteus_top_tb.sv` runs the
whole chip at its default size through the SPI pins only: it loads operands
into all ten PEs, runs a program where every PE computes a dot product in its
own format at the same time, then a program with AccFlag accumulation, a
remote WBK, EBLKMOV, ReLU, softmax, max-pooling, an MPLD micro-program,
IBLKMOV, RRAM LD and an SRAM LD between PEs, checks every result, and fails if any of these
mechanisms never occurred. It builds in about 1.5 minutes and runs in a few
seconds.

Two more chip-level benches run kernels of the evaluated model classes:
`tb/conv_layer_tb.sv` maps a 3×3 convolution (ResNet style, INT8 and INT16)
onto two PEs as kernel-row TensorMACs summed with AccFlag, and
`tb/attention_tb.sv` computes attention scores `q·k_j` (BERT style, FP8 and
FP16) in SRAM-to-SRAM mode with one TensorMAC of kernel size 8 per query.

| file | contents |
|---|---|
| `rtl/proteus_pkg.sv` | constants, unit IDs, bus and instruction types, field helpers, FP32 conversion |
| `rtl/proteus_top.sv` | chip top |
| `rtl/gp_dcim_pe.sv` | PE controller and datapath |
| `rtl/stream_organizer.sv`, `rtl/dcim_logic.sv`, `rtl/epu.sv`, `rtl/mfat.sv`, `rtl/flex_accumulator.sv` | DCIM datapath |
| `rtl/rram_macro.sv`, `rtl/tensor_sram_macro.sv` | memory macros |
| `rtl/icache.sv`, `rtl/bus_ctrl.sv` | per-unit instruction cache and bus port |
| `rtl/function_unit.sv`, `rtl/softmax_unit.sv` | function unit |
| `rtl/instr_buffer.sv`, `rtl/top_controller.sv`, `rtl/spi_if.sv` | chip-level control and I/O |
