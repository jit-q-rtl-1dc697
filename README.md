# Just-in-time MX quantization inside HBM-PIM

Mixed-precision training keeps two copies of every weight tensor. One is
the high-precision master copy, here BF16. The other is a low-precision
copy used by the matrix multiplies. With directional block formats such as
MX9, MX6 and MX4 there are even two low-precision copies: one quantized
along rows and one along columns. This design drops the stored
low-precision copies. Only the BF16 weights stay in DRAM. When a layer is
about to need its MX weights, the processing-in-memory (PIM) units next to
the DRAM banks make them, just in time, and write them back into the same
banks. No weight crosses the memory bus. Once the layer has used the copy,
the space can be reused.

The RTL models one HBM-PIM pseudo-channel at cycle level:

- 8 PIM units, each between an even and an odd DRAM bank;
- the memory controller that issues PIM commands in order and keeps the
  DRAM timing;
- the placement that puts the weights where every PIM unit can quantize
  them without talking to any other unit.

The command sequence that performs the quantization (the "PIM kernel") is
host software. It is built in the testbench package, and every testbench
result is checked against a plain software model of MX quantization.

## 1. The MX arithmetic

An MX block holds 16 elements, taken along one row or one column of a
weight tile. Each element keeps only a sign and an m-bit mantissa: m = 7 for
MX9, 4 for MX6 and 2 for MX4. Exponents are shared at two levels:

- **Level 1.** One 8-bit exponent `E` for the whole block: the largest
  BF16 exponent in the block.
- **Level 2.** One bit `d` for each pair of elements. It is 1 when both
  exponents of the pair are below `E`, so the pair can use `E-1` and keep
  one more bit of precision.

Element `i` has exponent `e_i` and 8-bit significand `sig_i`. The
significand is `1.mantissa`, but the hidden 1 is left out when `e_i = 0`.
The quantized magnitude is

```
s_i = (E - d_pair - e_i) + (8 - m)       right-shift amount
q_i = sig_i >> s_i                       (0 when s_i >= 8), truncated
out_i = { sign_i, 15'(q_i) }             one 16-bit lane per element
shared word = { d_7 .. d_0, E }          one 16-bit lane per block
```

The shift amount depends on each element's own exponent. That is why
the ALU needs a per-lane variable shift.

## 2. Strided placement (pim-jitq-strided)

A PIM unit can reach only its own two banks, and its ALU works lane by
lane with no path between lanes. Every element of an MX block must
therefore sit in one unit, and in the same lane of different words. The
placement does this for both row and column blocks at once:

- A weight tensor is cut into 16 x 16 tiles.
- A tile is laid out row-major, **one element per 256-bit DRAM word**.
  Elements 0..127 go to the even bank and 128..255 to the odd bank.
- The 16 lanes of a word carry the same element of 16 different tiles. A
  command therefore quantizes 16 tiles per unit and 128 tiles per
  pseudo-channel at once.
- Tile `t` goes to lane `t mod 16` of unit `(t / 16) mod 8`, in tile group
  `t / 128`.

A row is 1 KB, which is 32 words, so half a tile fills 4 rows. Each tile
group takes 16 rows in both banks of every unit:

```
row in group   even bank (elements 0..127)     odd bank (128..255)
  0 ..  3      BF16 input, 32 elements/row      BF16 input
  4 ..  7      row-quantized MX output          row-quantized MX output
  8 .. 11      column-quantized MX output       column-quantized MX output
 12            shared words, column = {col_mode, block}
 13 .. 15      unused
element e of a region: bank e[7], row base + e[6:5], column e[4:0]
```

A row block (16 consecutive elements) lies in one DRAM row. A column block
(elements b, b+16, b+32, ...) is spread over four rows of each bank. So the
column pass needs more row activations. `jitq_strided_map` turns a logical
(tile, region, element) address into (unit, lane, group, bank, row,
column). The pseudo-channel uses it for host reads and writes, and the
testbench kernel uses the same function (`strided_addr` in `jitq_pkg`).

## 3. The PIM unit and the counter-based shift

This is the core of the design and the part that needs the most care.

### Datapath

`pim_unit` holds a `pim_simd_alu` (16 lanes of 16 bits) and a `pim_regfile`
(16 registers of 256 bits, two read ports and one write port). It connects
to its even and odd `dram_bank`. A command has these operands:

- **A:** register `ra`, or the 256-bit word at `col` of the open row in bank
  `odd` (`a_bank`).
- **B:** register `rb`, or a 16-bit immediate copied to every lane
  (`b_imm`).
- **Result:** register `rd`. `OP_WR` instead writes register `ra` to a bank
  word.

| op | effect per lane | use in the kernel |
|---|---|---|
| `OP_MOV` | rd = A | copy |
| `OP_WR` | bank word = R[ra] | store output |
| `OP_ADD` / `OP_SUB` / `OP_MUL` | rd = A ± B, low half of A·B | exponent arithmetic |
| `OP_AND` / `OP_OR` | bitwise | field extraction, packing |
| `OP_CMP` | rd = A > B ? all ones : 0 (unsigned) | pim-CMP: sub-block bit, hidden bit |
| `OP_MAX` | rd = max(A, B) (unsigned) | shared exponent |
| `OP_BSHIFT` | rd = A >> 1 | pim-bitSHIFT |
| `OP_LDCNT` | S = min(A, 31) | load shift counters |
| `OP_CBSHIFT` | if S > 0: rd = A >> 1, S = S-1; else rd = A | counter-based shift |
| `OP_HWR` / `OP_HRD` | host write or read of one word, addressed unit only | data bus |

Unsigned compare and max order BF16 exponent fields correctly once the
sign is masked off. That is all the quantization needs, so the ALU has no
floating-point unit.

### The counter-based conditional shift

Each element needs its own shift amount `s_i`, but a broadcast command
gives every lane the same operation. With only a plain one-bit shift, each
step of a conditional shift has to be built from several commands. The
ALU therefore has a 5-bit counter per lane:

1. `OP_LDCNT` copies each lane of a register (here the shift amounts) into
   the counters. Values above 31 saturate.
2. Each `OP_CBSHIFT` shifts a lane right by one bit if its counter is
   above zero, then decrements that counter. Lanes whose counter has
   reached zero are left unchanged.
3. After 8 `OP_CBSHIFT` commands, every lane has been shifted by
   `min(s_i, 8)`. That is enough, because a larger shift empties the 8-bit
   significand anyway.

### Pipeline and timing

- **Cycle t:** the controller issues a command (`exec_valid`), and the
  unit starts the bank read.
- **Cycle t+1:** the read word comes back, and the ALU result is
  combinational from A and B. At the end of t+1 the result is written to
  the destination register, to the bank for `OP_WR` and `OP_HWR`, and to
  the counters.
- **Host reads:** data appears on `host_rvalid` / `host_rdata` in cycle
  t+1.
- **Back-to-back register commands:** they can issue every cycle. The
  register file read in cycle t+1 sees the write of the command before it,
  because the write lands at the clock edge that starts the later cycle.
- **Bank commands:** the controller spaces them by tCCDL, which is longer
  than the unit's two-cycle need. An assertion checks that the two never
  collide on one bank.

## 4. The quantization kernel

`mx_kernel` in `tb/jitq_tb_pkg.sv` builds the command list for one block
position. The list is broadcast, so it quantizes that block of all 128
tiles. Register use: R0 = E, R8 = d bits, R9 shared word, R1..R7 scratch;
R10..R15 serve the plain-shift variant and the packing below.

1. **Shared exponent, 32 commands.** AND each of the 16 input words with
   the exponent mask 0x7F80, and fold them together with `OP_MAX`.
2. **Per pair, 9 commands.** Take the larger exponent of the pair with
   `OP_MAX`. `OP_CMP` against E gives d. Shift d to its place in the
   shared word with AND, then OR. Finally form `E - d + (8-m)`.
3. **Per element, 24 commands.**
   - Shift amount: one SUB, then 7 `OP_BSHIFT`s that move the result from
     exponent position to an integer.
   - `OP_LDCNT`.
   - Mantissa: mask it, then add the hidden bit (CMP against 0, AND, OR).
   - 8 `OP_CBSHIFT`s.
   - Restore the sign (AND, OR), then `OP_WR` the result.
4. **Shared word, 10 commands.** E moved to bits 7..0, ORed with the d
   bits, then written.

That is 498 commands per block position, and 7,968 for all 16 row (or
column) blocks of 128 tiles.

### Packed storage

Stored one element per 16-bit lane, the result takes as much room as the
BF16 input. With `pack = 1`, the kernel instead writes the dense MXn
layout: 16·n bits per block in each lane.

- **Word 0** is the shared word `{d_7..d_0, E}`.
- **Words 1..n-1** hold the 16 element records `{sign, q[m-1:0]}`, each
  m+1 bits wide and packed back to back. Record j starts at bit j·(m+1) of
  that stream. For MX6 and MX4 some records cross a word boundary.

So a block needs 9, 6 or 4 words per lane for MX9, MX6 or MX4, against 16
for BF16. The ALU has only a one-bit right shift, so the kernel builds the
layout in three steps:

1. `OP_MUL` by 2^offset moves a record to its offset. Only the low 16 bits
   of the product are kept, which drops the part that does not fit.
2. The spilled part is shifted down with `OP_BSHIFT`s.
3. Both parts are ORed into two alternating accumulator registers, and
   each word is written as soon as it is full.

Packing costs 8,688 to 8,896 commands for all 16 blocks, against 7,968
unpacked. `tb_jitq_mx_packed` checks every packed word of MX9, MX6 and
MX4, for rows and columns, against a bit-stream model.

### Scalar conversion, FP32 to BF16

Element-wise conversions need no blocks and no shared exponent.
`fp32_bf16_kernel` converts FP32 master weights to BF16 with
round-to-nearest-even, in 9 commands per word position.

- **Storage.** Each FP32 value is held as two 16-bit halves in the same
  lane of two words. The high half is the truncated BF16; the low half
  holds the remaining 16 mantissa bits.
- **Tie test.** `OP_CMP` against 0x7FFF and against 0x8000, subtracted
  from each other, gives all ones exactly when the low half is 0x8000.
- **Rounding.** A 1 is added to the high half when the low half is above
  0x8000, or is 0x8000 with the high half odd. A carry out of the mantissa
  moves into the exponent, as it should.

`tb_jitq_fp32_to_bf16` converts 32,768 weights. Ties, round-ups and
exponent carries all occur.

## 5. Memory controller

`pim_mem_ctrl` is an in-order queue (default depth 8, valid/ready).

- A command that touches a bank column first needs its row open in that
  bank of every unit. The controller precharges and activates the row in
  all even (or all odd) banks together; this is the all-bank mode that
  gives PIM its bandwidth.
- Register-only commands issue at one per cycle.
- It counts activations, precharges, column commands, issued commands and
  cycles lost to timing waits.

Timing is in controller clocks, assuming a 1.2 GHz command clock:

| parameter | value | cycles |
|---|---|---|
| tRP | 15 ns | `T_RP` = 18 |
| tRAS | 33 ns | `T_RAS` = 40 |
| tCCDL | 3.33 ns | `T_CCDL` = 4 |
| tRCD | 15 ns (assumed) | `T_RCD` = 18 |
| column command to precharge | | `T_COL2PRE` = 2 |

## 6. The pseudo-channel top, `jitq_pch`

Ports:

- `cmd_valid/cmd_ready/cmd` (`pim_cmd_t`): PIM commands from the host
  kernel, with physical row and column fields.
- `host_valid/host_ready/host_write/host_tile/host_region/host_elem/host_wdata`:
  an ordinary read or write of one 256-bit word over the shared data bus,
  addressed logically and placed by the strided map. The word covers the
  16 tiles whose numbers differ only in bits 3..0.
- `host_rvalid/host_rdata`: read data, one cycle after the read issues.
- `idle`, plus the counters `n_act`, `n_pre`, `n_col`, `n_exec` and
  `n_wait`.

Host word accesses and PIM commands share the controller queue. A host
request wins when both are valid. An assertion checks that only one unit
drives the data bus.

Parameters: `UNITS` = 8, `ROWS` = 1024 per bank, `DEPTH`, the timing values
above, and `TILE_W` = 16 (tile-number width). The defaults give 2 MB per
pseudo-channel, which is 2,097,152 BF16 weights in 64 tile groups.

## 7. Measured behaviour

From the testbenches, at the default parameters:

- **Row vs column.** MX6 row quantization of 128 tiles takes 33,034 cycles
  and 524 activations. Column quantization takes 38,672 cycles and 656
  activations, about 17% longer, because a column block spans four rows per
  bank.
- **A whole weight matrix.** A 1024 x 1024 projection matrix, the size
  found in a 345M-parameter BERT, fills 32 of the 64 tile groups. Its MX6
  row pass takes 1,050,272 cycles (about 0.88 ms at 1.2 GHz) and its
  column pass 1,238,000 cycles, 18% more (`tb_jitq_weight_matrix`). Each
  pseudo-channel of a device works on its own share of a layer in parallel.
- **Counter-based shift.** The counter kernel issues 7,968 commands in
  32,821 cycles. A kernel for an ALU without the counters issues 17,952
  commands in 41,909 cycles. That is 0.78 times the time: the saving is
  limited because row activations and the rest of the kernel are shared by
  both.
- **Formats.** MX9, MX6 and MX4 results match the reference bit for bit,
  unpacked and packed, including all-zero blocks, far outliers (mantissas shifted out to zero),
  and both values of the level-2 bit.

## 8. Where this design departs from the source description, and its own choices

- **Output layout.** The packed layout keeps the field sizes of the MX
  format, 16·n bits per block. Its bit order is this design's choice: all
  sub-block bits sit in the shared word, and the element records follow
  in order. The unpacked form, `{sign, 15'(q)}` per lane, is kept as
  well, because it is easier to check and to consume. Each block keeps its
  16-word slot in the placement, so the words a packed block leaves free
  are not yet reused by a denser region layout.
- **Rounding and subnormals.** MX quantization truncates, it does not
  round (the FP32-to-BF16 conversion does round). The
  hidden bit is set unless the exponent field is 0; NaN and Inf are not
  treated specially.
- **Level-2 rule.** `d` = 1 when both exponents of a pair are below E.
- **Plain-shift comparison kernel.** The source description counts three
  commands for a conditional bit shift done without the counters. The
  comparison kernel here uses six: compare, shift, subtract, AND,
  subtract, add. This lane ALU has no per-lane select, so a bit-exact
  conditional shift needs the extra steps. The measured gain (0.78 times
  the time) is therefore not the same figure as the source's strided and
  optimised comparison, which is about 0.58.
- **Clock and timing.** The 1.2 GHz command clock and tRCD are assumed.
  So are the 8 units per pseudo-channel: 256 PIM units for 512 banks,
  spread over 32 pseudo-channels of 16 banks. The rows per bank (1024),
  queue depth and host priority are this design's choices, as are the
  command encoding and the host-access commands.
- **Extra ALU operations.** `OP_MUL` and the bitwise operations stand for
  the existing PIM ALU functions. The packing kernel uses the multiply as
  a left shift.

## 9. Not built

- **FP32 master weights for MX.** There is no separate FP32-to-MX kernel
  or test. With the split storage described in the scalar conversion
  section, truncating MX quantization depends only on the high halves, and
  the BF16 kernel already handles those. A rounding MX kernel would also
  need the low halves.
- **The tiled baseline.** The non-strided placement and its cross-lane
  shift (pim-laneSHIFT) are not built; they are only a point of
  comparison.
- **More than one pseudo-channel.** Further pseudo-channels, channels and
  stacks would be independent copies of `jitq_pch`.
- **The GPU side.** The GPU, its PIM kernel launch, and the overlap with
  the GPU's matrix work are not modelled. The kernel exists only as a
  command list in the testbench.
- **The HBM PHY, TSVs and DRAM analog circuits.** These have no logic
  function here. `dram_bank` is a functional bank with a row-buffer model.

## 10. Files and simulation

```
rtl/jitq_pkg.sv          types, command set, placement function
rtl/dram_bank.sv         bank with ACT/PRE, row-buffer model, 1-cycle reads
rtl/pim_regfile.sv       16 x 256-bit registers, 2R1W
rtl/pim_simd_alu.sv      16-lane ALU with per-lane shift counters
rtl/pim_unit.sv          ALU + registers + two banks' ports, 2-stage
rtl/pim_mem_ctrl.sv      in-order queue, row management, DRAM timing
rtl/jitq_strided_map.sv  logical -> physical placement
rtl/jitq_pch.sv          the pseudo-channel (top)
tb/jitq_tb_pkg.sv        MX reference model, kernel builder, BF16 generator
tb/tb_<block>.sv         one self-checking testbench per block
tb/tb_jitq_pch.sv        end-to-end run at default parameters
tb/tb_jitq_kernel_variants.sv   counter-based vs plain-shift kernel
tb/tb_jitq_mx_packed.sv  quantization into the packed MX9/MX6/MX4 layout
tb/tb_jitq_weight_matrix.sv     a full 1024 x 1024 matrix, rows and columns
tb/tb_jitq_fp32_to_bf16.sv      scalar FP32 -> BF16 conversion, round to nearest even
```

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself
with a watchdog. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/jitq_pkg.sv tb/jitq_tb_pkg.sv tb/tb_jitq_pch.sv --top-module tb_jitq_pch
./obj_dir/Vtb_jitq_pch
```

Substitute any other `tb_*` name. The end-to-end runs take under a minute
each.

To change the design:

- **Size.** Change `UNITS` or `ROWS` on `jitq_pch`, and change `UNITS` in
  the two top-level testbenches to match.
- **Timing.** Change the timing parameters.
- **Target format.** Change the kernel argument `m` (7, 4 or 2).
