# A primitive operator FPGA for multiplierless FIR filters

An FIR filter's expensive part is its multiplication block: every input
sample x[n] is multiplied by each coefficient h[i], giving the products
w_i[n] = h[i]·x[n]. In the transposed direct form these products then enter
a chain of delays and adders:

    y[n] = w_0[n] + r_1,   r_1 <= w_1[n] + r_2,   ...,   r_N <= w_N[n]

A *primitive operator filter* builds the multiplication block without
multipliers. It uses a graph of shifts, additions and subtractions that
shares intermediate results between coefficients. For h = {1, 9, 17}:

    8x  = x << 3
    9x  = 8x + x
    17x = 8x + 9x

That is one shift and two additions, where separate shift-and-add
multipliers need at least nine operations.

This RTL is a small FPGA-like fabric built to run such graphs. Its logic
cells are *Configurable Arithmetic Logic Blocks* (CALBs), not LUTs. Each
CALB holds input registers, multiplexers, shifters and adder/subtractors.
A configuration word sets up the CALB's graph, and a microprogrammed control
unit moves words between the CALBs over one shared bus. The design follows
the architecture published as "The Development of FPGA Architectures for
Primitive Operator Digital Filter Implementations". Where that description
leaves things open, the choices are this design's own. They are listed under
[Interpretations and departures](#interpretations-and-departures).

Two CALB types are provided, and they trade speed against area:

* **CALB1** is large. It has 4 registers, 12 multiplexers, 4 shifters and 4
  adders. One block can hold a whole small graph, such as all of {1, 9, 17}.
* **CALB2** is small. It has 2 registers, 2 multiplexers, 2 shifters and 1
  adder. It does one shift-and-add step, so bigger graphs chain several
  blocks through the bus.

The top level, `pof_fpga_top`, holds one fabric of each type side by side.
Each is sized for an 81-tap filter with 28 distinct coefficients: 8 CALB1
blocks in one fabric and 23 CALB2 blocks in the other. Behind each fabric an
81-tap transposed delay/add chain (`tfir_chain`) turns the products into
filter outputs y[n]; see [From products to y[n]](#from-products-to-yn).

## Fabric organisation (`pof_fabric`)

```
            control unit (microprogram) ── control bus ──┬────────┬─────── ... ──┐
                                                         │        │              │
 in_data ─► I/O buffer ◄──┐              config mem ─► CALB 0   CALB 1  ...   W-memory
 out_data ◄─              │                              │        │              │
                          └────────────── 8-bit data bus ┴────────┴───── ... ────┘
```

* **Data bus** (`data_bus`). This is a single 8-bit bus. In each clock cycle
  exactly one source drives it:
  * the input register of the I/O buffer;
  * the output multiplexer of one CALB;
  * a W-memory word;
  * nothing, in which case the bus reads 0.

  Any number of destinations can sample the bus at the next clock edge: CALB
  input registers, a W-memory write and the output register. The CALBs'
  tri-state bus drivers are built as decoded one-hot enables (`calb_oe`) and
  an AND-OR bus.
* **CALBs** (`calb1`, `calb2`). Their datapaths are combinational from their
  input registers to their output. A word loaded at one clock edge can
  therefore be read out, already transformed, in the next bus cycle.
* **Configuration memories** (`config_mem`). Each CALB has one register that
  holds its multiplexer selects, add/subtract bits and shift amounts. You
  write it through `cfg_we`/`cfg_idx`/`cfg_wdata` before filtering starts.
* **W-memory** (`w_memory`). It holds `W_DEPTH` 8-bit products. Writes come
  from the bus. Reads are asynchronous and drive the bus in the same cycle.
* **I/O buffer** (`io_buffer`). It holds an input register for the current
  sample and an output register with a one-cycle `out_valid` pulse.
* **Control unit** (`control_unit`). Its program memory holds one control
  word per bus cycle.

## The control word

The control unit's program is the fabric's "routing". Every cycle of a
sample's computation is one control word. Fields are listed MSB first:

| field      | width          | meaning |
|------------|----------------|---------|
| `load`     | N_CALB × NL    | register load strobes; bit `k*NL + j` loads register j of CALB k (NL = 4 for CALB1, 2 for CALB2) |
| `idx`      | clog2(N_CALB)  | the CALB that drives the bus when `src = SRC_CALB` |
| `src`      | 2              | bus source: 0 none, 1 input register, 2 CALB `idx`, 3 W-memory[`waddr`] |
| `os`       | 3              | output-mux select (OS) of the driving CALB |
| `waddr`    | clog2(W_DEPTH) | W-memory address, used for both writes and reads |
| `w_we`     | 1              | write the bus word into W-memory[`waddr`] |
| `out_load` | 1              | copy the bus word to `out_data` and pulse `out_valid` |
| `last`     | 1              | this is the program's final word |

The word widths at the default sizes are:

* CALB1 fabric: 48 bits (32 + 3 + 2 + 3 + 5 + 3).
* CALB2 fabric: 64 bits (46 + 5 + 2 + 3 + 5 + 3).

The control bus can broadcast a single OS code because only the CALB that
drives the bus needs one. The configuration word is static, but OS changes
every cycle. This lets one CALB1 hand out several products in turn, as in
the example below.

### Sequence and timing

1. Hold `rst` high for at least one clock edge. Reset is synchronous and
   active high. It clears the registers and configuration words, but not
   the W-memory or the program memory.
2. Write each CALB's configuration word, then write the program. Both ports
   take one word per clock.
3. For each sample, drive `in_data` and pulse `start` while `busy` is low.
   * At that edge the sample is stored, `busy` rises and word 0 is issued in
     the next cycle. After that, one word is issued per clock.
   * After the word with `last` set (or after the word at the final program
     address), `done` pulses for one cycle and `busy` falls.
   * A program of L words runs from `start` to `done` in L + 1 cycles.
   * A `start` while the fabric is busy is ignored.
4. Each word with `out_load` set produces `out_valid` with `out_data` in the
   following cycle.

### Example: h = {1, 9, 17} on one CALB1

Use the configuration from `cfg_c1_1_9_17()` in `tb/pof_tb_pkg.sv`. Then
issue these control words:

| word | bus source        | destinations                         | value on bus |
|------|-------------------|--------------------------------------|--------------|
| 0    | input             | CALB0 registers 0 and 2              | x            |
| 1    | CALB0, OS 7 (SH2) | W[0]                                 | x            |
| 2    | CALB0, OS 4 (X2)  | W[1]                                 | 9x           |
| 3    | CALB0, OS 1 (X1)  | W[2]                                 | 17x          |
| 4-6  | W[0..2]           | output register (`last` on word 6)   | x, 9x, 17x   |

On CALB2 the same products need two blocks:

* Block A holds x in both registers. It forms SH1 = 8x and the sum 9x.
* Both values go over the bus into block B, which adds them to make 17x.

## CALB1 datapath

The CALB1 datapath is the densest part of the design. Q0 to Q3 are the input
registers. `sel ? a : b` means select input 1 (a) or input 0 (b). Shifts are
to the left by the 3-bit amount, so 0 to 7 places. Each adder computes
`upper + lower`, or `upper − lower` when its X bit is 1.

```
SH1 = (C1 ? Q0 : Q1) << S1              SH2 = (C7 ? Q2 : Q3) << S2
A2  = (C3 ? Q1 : SH1)  ± (C9 ? Q2 : SH2)                        X2
A1  = (C2 ? Q0 : SH1)  ± (C4 ? A2 : SH1)                        X1
A3  = (C10 ? A2 : SH2) ± (C8 ? Q3 : SH2)                        X3
SH3 = (C6 ? A1 : A2) << S3              SH4 = (C12 ? A2 : A3) << S4
A4  = (C5 ? A1 : A2)   ± (C11 ? A2 : A3)                        X4
OS:   0 SH1   1 A1   2 SH3   3 A4   4 A2   5 SH4   6 A3   7 SH2
```

The network is feed-forward, with at most three adders in series
(A2 → A1 → A4). The left half (registers, SH1 and SH2, A2) builds terms from
the loaded words. The right half (A1, A3, then A4 and the shifters SH3 and
SH4) combines those terms.

The configuration word, `calb1_cfg_t`, is 28 bits. It is packed MSB first as
`c[12:1]`, `x[4:1]` and `s[4:1][2:0]`.

## CALB2 datapath

```
SH1 = Q0 << S1      SH2 = Q1 << S2
SUM = (C1 ? Q0 : SH1) ± (C2 ? Q1 : SH2)          X1
OS:  0 SH1   1 SUM   2 SH2   (3..7 SUM)
```

The configuration word, `calb2_cfg_t`, is 9 bits, packed as `c[2:1]`, `x`
and `s[2:1][2:0]`.

## From products to y[n]

The fabric delivers one sample's products as a stream of `out_valid` words,
in the order its program reads them out, and ends the sample with `done`.
`tfir_chain` stores those words in a product buffer by arrival index (0, 1,
2, ...). A tap map, one entry per tap and loaded through
`map_we`/`map_addr`/`map_wdata`, says which product feeds each tap. Several
taps can share one product, which is how symmetric or repeated coefficients
are computed only once. One cycle after `done` the chain steps:

    y    = w[map[0]] + r_1
    r_i <= w[map[i]] + r_(i+1)      for i = 1 .. NTAPS-2
    r_(NTAPS-1) <= w[map[NTAPS-1]]

`y_valid` pulses two cycles after `done`. Products are sign-extended from
8 bits to `ACC_W` = 16 bits and the chain wraps modulo 2^16. A tap whose
coefficient is zero must map to a product that is zero. A program can make
one by reading out an idle bus word (source "none"). Products beyond
`NPROD` in one sample are dropped, and buffer words that a sample does not
rewrite keep their old values.

## Arithmetic

All words are 8-bit two's complement. Additions, subtractions and shifts
wrap modulo 256, so a product is exact only while it fits in 8 bits. There
is no rounding, saturation or growth of word width inside the fabric.

## Sizes

| parameter                | default | origin |
|--------------------------|---------|--------|
| data width               | 8       | the width marked on every bus of the CALB schematics |
| shift amount             | 3 bits  | specified: shifts of up to 7 places |
| CALB1 blocks (`N_CALB1`) | 8       | what the 81-tap example needs |
| CALB2 blocks (`N_CALB2`) | 23      | what the 81-tap example needs |
| `W_DEPTH`                | 32      | own choice: room for 28 distinct coefficients |
| `PROG_DEPTH`             | 128     | own choice |
| `NTAPS`                  | 81      | the largest example filter |
| `ACC_W`                  | 16      | own choice |

For the published example filters, the number of blocks each one needs is:

| filter | distinct coefficients | CALB1 | CALB2 |
|--------|-----------------------|-------|-------|
| 5 taps | 5                     | 2     | 4     |
| 21     | 11                    | 4     | 9     |
| 32     | 15                    | 3     | 10    |
| 41     | 19                    | 5     | 12    |
| 81     | 28                    | 8     | 23    |

All five examples fit the default fabrics.

A program needs at most one cycle for each register load, plus one write
and one read for each product. For the 81-tap example that is
8·4 + 2·28 = 88 words on CALB1 and 23·2 + 2·28 = 102 words on CALB2, within
the 128-word program memory. The coefficient values of these filters are not
published, so their mappings are not included here.

Timing and area figures for a 1 µm standard-cell implementation were
published for both CALB types. This RTL cannot reproduce them.

## Interpretations and departures

The published description gives the block structure and the CALB schematics,
but little else. The following points are this design's own:

* **Unlabelled wiring in the CALB1 schematic.** Some inputs in the schematic
  are not clearly drawn:
  * which node feeds C11 and C12 (A2 or A3) is not clear;
  * a long wire feeding C2, C3, C8 and C9 could be read as a single net.

  This design takes the symmetric reading given above. That wire is taken as
  SH1 in its upper half and SH2 in its lower half.
* **Mux input numbering.** For C1, C2, C3, C8 and C9 the printed numbering
  was followed. For the other muxes, input 1 is the upper input of the
  drawing. Two muxes carry the same label in the drawing, and the one in
  front of shifter S3 is taken as C6.
* **Output mux codes.** The OS code order is not given. The codes follow the
  drawn order of the inputs, from top to bottom.
* **Design checks.** The example values printed in the schematics confirm
  the CALB1 and CALB2 readings for {1, 9, 17}:
  * CALB1: 1 → 8 → 9 → 17;
  * CALB2: 1 → 8 → 9, then 9 + 8 = 17.
* **Latches.** The schematics draw level-sensitive latches with load
  enables. Here they are edge-triggered registers with enables, so that each
  bus transfer is one clock cycle.
* **Subtraction order** is upper input minus lower input.
* **Shift direction** is left, which the examples imply.
* **Outside the published description.** None of the following is described
  there:
  * how the configuration memories are loaded;
  * the control unit's microprogram, its word layout and the start/busy/done
    handshake;
  * the I/O buffer's registers;
  * the W-memory's depth and its read timing.
* **Tri-state bus.** The tri-state bus is built as logic: one-hot enables
  and an OR of the gated sources.
* **The delay/add chain** of the transposed filter is described only as
  the filter's structure, not as part of the FPGA. Here it is a separate
  block behind each fabric. Its tap map, product buffer and accumulator
  width are this design's own.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

* `calb1_tb` and `calb2_tb` run the {1, 9, 17} example. They then check
  hundreds of random configurations on every OS code against an integer
  reference model (`tb/pof_tb_pkg.sv`).
* `config_mem_tb`, `w_memory_tb`, `io_buffer_tb` and `data_bus_tb` check
  their modules against simple models.
* `control_unit_tb` checks the following: the word issued in each cycle,
  busy and done timing, a start while busy, and a program that has no
  `last` bit.
* `tfir_chain_tb` feeds a 5-tap chain with random tap maps and a random
  number of products per sample, including more than its buffer holds. It
  checks y against a direct sum over the product history, and checks that
  y_valid follows `done` by two cycles.
* `pof_fabric_tb` uses two small fabrics, one of 2 CALB1 blocks and one of
  3 CALB2 blocks. It computes {1, 9, 17, 15}·x, where 15x = 16x − x is made
  by subtraction, and it passes products from CALB to CALB. It also checks
  the start-to-done cycle count.
* `pof_fpga_top_tb` runs the full-size top at its default parameters in two
  parts:
  * It filters 24 small signed samples (−7 to 7) with h = {1, 9, 17} on
    both fabrics through the 81-tap chains, with taps 3 to 80 mapped to a
    zero word. It checks that y[n] is exactly x[n] + 9x[n−1] + 17x[n−2].
  * It runs random configurations of all 31 CALBs, random tap maps and
    random programs of up to 128 words against a cycle-level model of the
    fabric and the chain. It counts the following events and fails if any
    never occurs: each bus source, CALB to CALB transfer, multi-destination
    load, subtraction and shift, W-memory write and read, ignored start, a
    program ending at the last address, filter outputs, and a product
    buffer overflow.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/pof_pkg.sv tb/pof_tb_pkg.sv tb/pof_fpga_top_tb.sv --top-module pof_fpga_top_tb
./obj_dir/Vpof_fpga_top_tb
```

Change the testbench name to run any of the others. `rtl/pof_pkg.sv` holds
the shared types: the configuration structs, the bus-source enum and the
add/subtract and shift helpers. Every file in `rtl/` is synthesizable
SystemVerilog.
