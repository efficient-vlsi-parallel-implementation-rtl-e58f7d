# Dual-port parallel PLR decoder for a 1024-bit rate-1/2 LDPC code

This is synthesizable SystemVerilog for an iterative soft-decision decoder. It
implements the architecture described in "Efficient VLSI Parallel Implementation
for LDPC Decoder". The idea is simple. An earlier sequential decoder works
through each step of the algorithm one memory access at a time. This design
keeps that decoder's memories but makes them dual-ported. Two identical engines
then split every decoding step between them, one engine on each port. Each
engine does half the rows of a horizontal step, or one of the two vertical
recursions. The total memory stays the same and the decoding time roughly
halves.

All soft values are 5-bit sign-magnitude log-domain indices. The arithmetic
uses table look-ups: a 4K x 5 ROM holds addition, clipped addition and
subtraction tables, and the parity-check combination ("f-function") is done in
logic. Four interleaved component codes ("dimensions") are decoded in turn. A
ROM of precomputed addresses does the interleaving, so no data is shuffled.

## The code

A block carries 1024 information bits. Each of the 4 dimensions arranges them
as 256 rows x 4 columns, in its own order, and adds one parity bit per row:

    p_d(i) = p_d(i-1) XOR x_d(i,0) XOR x_d(i,1) XOR x_d(i,2) XOR x_d(i,3),   p_d(-1) = 0

Here `x_d(i,j)` is the information bit that dimension `d` places at row `i`,
column `j`. So each row is a parity check over its 4 bits and two neighbouring
parities: a zigzag chain through the rows. That gives 1024 + 4 x 256 = 2048
coded bits, a rate of 1/2.

Dimension 0 uses the natural order (`n = 4*row + col`). Dimension `d` holds bit

    n = (M_d * (4*row + col) + A_d) mod 1024,   (M_d, A_d) = (1,0), (77,13), (181,101), (333,211)

The published architecture fixes the block shape (4 dimensions, 256 rows, 4
columns, 16 iterations). It does not give the permutations or the parity
equation. The two formulas above are this design's reading: they fit the
stored variables, which are a forward and a backward value per row plus
partial results across each row. To use another code of the same shape,
change `ilv_mul`/`ilv_add` in `ldpc_pkg.sv`.

## Soft values and the four look-up operations

A value is `{sign, magnitude[3:0]}`, read as a quantised LLR in the range
-15..+15. Sign 1 means "more likely a 1", so bit 4 is the hard decision. The
look-up ROM address is `{opcode[1:0], a[4:0], b[4:0]}`:

| opcode | ROM range | operation          | result                                   |
|--------|-----------|--------------------|------------------------------------------|
| 00     | 000-3FF   | f-function         | sign(a) xor sign(b), min(\|a\|, \|b\|)   |
| 01     | 400-7FF   | addition           | a + b, saturated to +-15                 |
| 10     | 800-BFF   | clipped addition   | a + b, clipped to +-CLIP (default 7)     |
| 11     | C00-FFF   | subtraction        | a - b, saturated to +-15                 |

For opcode 00 the result comes from a combinational unit (`f_function`), and
the opcode drives the multiplexer that picks between it and the ROM word
(`log_alu`). The f-function is the min-sum parity-check combination, and +15
is its neutral element. The min-sum form, the saturation and the clip level
are this design's choices; the table layout is the original one. The ROM
contents are computed at elaboration from these formulas.

## Memory map

The RAM is 16K x 5, dual-port, with address `{dim[1:0], var[1:0], col[1:0], row[7:0]}`.
No iteration field is needed, because every iteration reuses the same words.
Each dimension has a 4K-word page:

| var | col | page range | contents                                                        |
|-----|-----|------------|-----------------------------------------------------------------|
| 00  | j   | 000-3FF    | q: a-priori value of the bit at (row, j) for this dimension      |
| 01  | j   | 400-7FF    | q~: forward partial check value across columns 0..j             |
| 10  | 00  | 800-8FF    | q^: check value of the whole row                                |
| 10  | 01  | 900-9FF    | p: received value of the row's parity bit                        |
| 10  | 10  | A00-AFF    | a: forward (downward) recursion over rows                       |
| 10  | 11  | B00-BFF    | b: backward (upward) recursion over rows                        |
| 11  | j   | C00-FFF    | u: extrinsic information produced by this dimension             |

The interleaver ROM (4K x 12, dual-port, one-cycle read) maps a position
`{dim, col, row}` to the position `{dim-1, col', row'}` where the previous
dimension holds the same bit. Dimension 0 points back to dimension 3. The
same table works as the deinterleaver at the output.

The three memories total 81920 + 20480 + 49152 = 151552 bits. This equals the
published memory figure for the parallel decoder.

## One dimension on two ports

With `F` the f-function, `ADD`/`SUB`/`CADD` the look-ups, and primes marking
values of the previous dimension at the position the interleaver ROM returns,
one dimension runs three phases:

| phase | port A (engine A)                 | port B (engine B)                  |
|-------|-----------------------------------|------------------------------------|
| HF    | updating + horizontal forward, rows 0..127 | the same, rows 128..255     |
| V     | vertical backward, rows 255..0    | vertical forward, rows 0..255      |
| HB    | horizontal backward + extrinsic, rows 0..127 | the same, rows 128..255  |

- **Updating + horizontal forward**:
  - `q(j,i) = SUB(ADD(q'(j,i), u'(j,i)), u(j,i))`: this is the a-priori value
    with this dimension's old extrinsic value removed.
  - `q~(j,i) = F(q(0,i) .. q(j,i))` and `q^(i) = q~(3,i)`.
  - In dimension 0 of the first decoding iteration the updating step is
    skipped: the received values are the a-priori values.
- **Vertical forward**: `a(i) = ADD(p(i), F(a(i-1), q^(i)))`, with `a(-1) = +15`
  (the first parity starts from a known 0).
- **Vertical backward**: `b(255) = 0`, `b(i-1) = F(q^(i), ADD(p(i), b(i)))`.
- **Horizontal backward, merged with the extrinsic calculation**:
  - `e(i) = F(a(i-1), ADD(p(i), b(i)))`.
  - Going from column 3 down to 0: `u(j,i) = CADD(F(e, F(q~(j-1,i), F(q(j+1..3,i)))), 0)`.
    The running backward product is kept in a register and never stored, and
    every extrinsic value is clipped to +-CLIP.

The two engines never write the same word. In HF and HB they own disjoint
rows. In V one writes `a` and the other writes `b`. Reads of the previous
dimension can go anywhere, and the second RAM port makes them free.

Each engine (`port_engine`) has one RAM port, one port of each ROM, a
`log_alu` and three f-function units. Values used only inside one row live
in its registers. Its cycle costs are:

| command | cycles |
|---------|--------|
| HF with updating step | 1 + 21 per row (5 per column + 1) |
| HF without updating step | 9 per row |
| vertical forward | 3 per row |
| vertical backward | 1 + 3 per row after the first |
| HB | 14 per row |
| output | 1 + 3 per bit |
| input | 1 per accepted value |
| initialisation | 16 per row |

The control unit adds 2 cycles to every phase (start, done) and 1 cycle per
dimension and per iteration step.

## Iterations and blocks

`control_unit` is a single state machine that does the work of the timing,
iteration and dimension controllers:

    set iteration = 1 -> output (previous block) -> input -> initialisation
      -> [iterations 2..16: dimensions 0..3: HF -> V -> HB] -> set iteration = 1

Iteration 1 is the input/output iteration, and 16 includes it, so a block gets
15 decoding iterations. The block's values stay in RAM until the next block's
output state. That state reads `ADD(q, u)` of dimension 3 for each bit in
natural order, going through the deinterleaver, and sends the 5-bit result.
Bit 4 of the result is the decision. Initialisation clears `u` in all four
dimensions. After reset there is no decoded block yet, so the first output
state is skipped. The iteration count is fixed: there is no early stop.

## Interface and timing (`ldpc_decoder`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, reset | in | 1 | clock; synchronous reset, active high |
| en, di | in | 1, 5 | one received value per clock with en high, taken while in_ready is high |
| in_ready | out | 1 | the decoder is taking input |
| dout, valid | out | 5, 1 | decoded values of the previous block, natural order, one per valid |
| iteration | out | 5 | 1 during input/output, 2..16 while decoding |
| block_done | out | 1 | one-cycle pulse when a block's last iteration ends |

Input order is the 1024 information values (bit `n = 4*row + col`), then the
256 parities of dimension 0, then those of dimensions 1, 2 and 3. Parameters:
`N_ITER` (16, including the input/output iteration) and `CLIP` (7).

With input offered every cycle, one block takes **321,014 cycles**:

| part | cycles |
|------|--------|
| decoding (15 iterations) | 313,838 |
| output | 3,075 |
| input | 2,050 |
| initialisation | 2,050 |
| set iteration | 1 |

That is 32 ms at 10 MHz and 3.2 ms at 100 MHz. The published parallel decoder
takes 650,752 cycles. Its cycle-level schedule is not published, so this
design's schedule is its own, and the two counts are not expected to match.

## How far to trust it, and where it departs

Taken from the published architecture:

- the block set: dual-port RAM, look-up ROM, interleaver ROM, one control unit
  and output multiplexers;
- the pin names clk, reset, en, di, valid, do (here `dout`, because `do` is a
  keyword);
- the code shape and the 16 iterations;
- the four step categories, their order and their split across the two ports;
- the RAM and ROM memory maps and address formats;
- the opcode-driven f-function multiplexer;
- the output taken as the most significant bit.

This design's own choices:

- the meaning of the f-function (min-sum) and of the look-up arithmetic;
- the clip level;
- the zigzag parity equation and the recursions above;
- the interleaver permutations;
- the one-cycle RAM/ROM read timing;
- the per-row micro-schedule and the start/done handshake;
- skipping the updating step in the first dimension, and skipping the first
  output after reset;
- the status pins in_ready, iteration and block_done.

Also this design's choice: the look-up ROM is dual-ported, one port per
engine. The published block diagram shows a single ROM.

Not built:

- the ADC that supplies the received values (it connects to `en`/`di`);
- the FPGA pad buffers.

The end-to-end test decodes two random blocks at the default size. About 15%
of the received values have the wrong sign, and all 1024 bits of both blocks
come out correct. No error-rate curve has been measured.

## Files

- `rtl/ldpc_pkg.sv`: types (`sm_t`, `ram_addr_t`, `rom_addr_t`, `pos_t`,
  commands), arithmetic and interleaver formulas.
- `rtl/f_function.sv`, `rtl/log_alu.sv`, `rtl/lut_rom.sv`: log-domain
  arithmetic.
- `rtl/dp_ram.sv`, `rtl/ilv_rom.sv`: the memories.
- `rtl/port_engine.sv`: per-port datapath and step sequencer.
- `rtl/control_unit.sv`: the iteration/dimension state machine.
- `rtl/ldpc_decoder.sv`: the top level.
- `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.

## Simulating

Every testbench builds the same way. The package must come first:

    verilator --binary --timing --assert -Irtl rtl/ldpc_pkg.sv \
        $(ls rtl/*.sv | grep -v ldpc_pkg) tb/tb_ldpc_decoder.sv --top-module tb_ldpc_decoder
    ./obj_dir/Vtb_ldpc_decoder

The end-to-end test `tb_ldpc_decoder` runs at the default parameters and takes
about half a second. It checks:

- the decoded bits, and the number of output values;
- the decoding-phase and block-period cycle counts;
- that each mechanism happens at least once: an input stall (`en` low while
  `in_ready` is high), the skipped first output, the skipped and the used
  updating step, both ports busy together, clipping, and
  the iteration counter wrapping.

`tb_port_engine` runs every engine command against a reference model of the
RAM, with the real ROMs attached. `tb_control_unit` checks the full command
sequence of two blocks against stand-in engines.
