# Discrete torus knot codec (4D5) in SystemVerilog

This is an error-correcting encoder and decoder for the **high-dimensional
discrete torus knot code**, written for the 4D5 configuration of a 50 MHz
ASIC. Each 625-bit code block carries 256 data bits (rate 0.41). The code is
built from nothing but even-parity checks. The encoder needs only XOR trees
and a register whose wiring sets the transmission order. The decoder
corrects errors by majority vote over parity lines. It repeats this a few
times with a changing threshold and needs 35 clocks per block. The code's
strength is that random errors, bursts and mixes of the two look the same to
the decoder: the transmission order spreads a burst across the whole block.

The RTL is parameterised in the code dimension and size, so it covers any
nDm code, not only 4D5.

## The code

An **nDm** block is an n-dimensional cube with m cells along each axis. It
holds m^n binary digits. A cell has coordinates (x0, ..., x(n-1)), each from 0
to m-1. Its linear address is `a = x0 + x1*m + x2*m^2 + ...`. All index
arithmetic in the RTL uses this address.

* A **line** along axis k is the set of m cells that differ only in xk. Every
  line has even parity. There are n * m^(n-1) lines; 4D5 has 4 x 125 = 500.
* The cell with xk = m-1 is the parity digit of its line along axis k. A cell
  whose coordinates are all below m-1 holds data, which gives (m-1)^n data
  digits. Cells with several coordinates equal to m-1 are parity on parity;
  they come out consistent because parity is computed one axis after another.
* Data bit j goes to the cell whose coordinates are the base-(m-1) digits of
  j (`tkc_pkg::data_addr`). The decoder emits data in the same order.

| code | block (bits) | data (bits) | rate |
|------|-------------:|------------:|-----:|
| 3D4  |   64 |   27 | 0.422 |
| 4D5  |  625 |  256 | 0.410 |
| 4D6  | 1296 |  625 | 0.482 |
| 5D5  | 3125 | 1024 | 0.328 |

Every digit lies on exactly n lines, one per axis. A wrong digit makes all n
of its lines fail. A correct digit sees a failed line only when another error
shares that line. The decoder counts the failed lines through each digit and
inverts the digit when the count is high.

## The torus knot winding

Bits are not sent in address order. They follow a path that winds obliquely
around the cube, which is a discrete torus because coordinates wrap modulo m.
Consecutive bits on the channel then lie on different lines, so a burst
becomes scattered single errors in the cube.

The winding used here is `tkc_pkg::torus_addr`. Write the time index
`t = d0 + d1*m + d2*m^2 + ...`. The cell sent at time t is

    x0 = d0,   xk = (d0 + dk) mod m   for k = 1 .. n-1

* While d0 counts up, each step moves one cell diagonally along all axes at
  once.
* Each carry out of d0 starts the next turn of the winding one cell further
  on.
* Every cell is visited exactly once.
* Any m consecutive bits have different x0, so no two of them share a line
  of axes 1..n-1.
* Two of them can share an axis-0 line only where t crosses a multiple of
  m^(n-1). That happens at four places in a 4D5 block.

The order exists only as wiring. `torus_shift_reg` holds one flip-flop per
cube cell. The shift input of cell `torus_addr(t)` is wired to cell
`torus_addr(t+1)`. The last cell of the winding takes the serial input and
the first drives the serial output. So the encoder loads its cube in parallel
and shifts it out in winding order. The decoder shifts the stream in, and
each digit lands in its own cube cell without any address logic.

This formula is this design's own. The published description of the code
illustrates the winding only with a two-dimensional example. The formula has the properties the code relies on:
a diagonal path, every cell visited once, and bursts spread over the lines.

## Encoder (`tkc_encoder`)

    serial data -> input_shift_reg (256) -> enc_parity_calc -> torus_shift_reg (625) -> serial code

1. `input_shift_reg` collects 256 data bits.
2. When the block is complete and the output register is free, the block goes
   through `enc_parity_calc` in one clock. This is n levels of 4-input XOR.
   The full 625-bit cube is loaded into the torus register.
3. The torus register shifts out 625 bits in winding order.

The next block is collected during read-out. When it is complete and read-out
is still running, `in_ready` drops. At full rate a block leaves every 625
clocks. The first code bit is taken two clock edges after the last data bit:
one edge for the transfer, then the bit is valid.

## Decoder (`tkc_decoder`)

    serial code -> torus_shift_reg (625) <-> dec_parity_check + majority_logic
                                    |
                                    +-> 256 data cells -> output_shift_reg -> serial data

**Receive.** The 625 received bits are shifted into the torus register
(`in_ready` high). Each digit ends up at its cube cell.

**Correct.** The decoder makes 7 passes with thresholds **4-3-4-3-2-4-3**.
In each pass:

* `dec_parity_check` computes all 500 line parities from the register at once
  (500 five-input XOR gates).
* `majority_logic` counts, for each cell, how many of its 4 lines failed.
  When the count reaches the pass threshold (count >= threshold), it inverts
  the digit.
* The corrected digits are written back into the same register.

A threshold of 4 corrects only digits whose four lines all fail, which are
almost certainly wrong. Thresholds of 3 and 2 reach further but risk wrong
corrections. Alternating them lets each strict pass clean up before a looser
one. The schedule is the parameter `THRESH`, 4 bits per pass with pass 0 in
the low bits, and `NUM_ITER` sets the number of passes.

**Five processes per pass.** The reference chip could not fit the whole
correction into its gate budget, so each pass took five clocks. Here
`SLICES = 5`, and each pass is five one-clock processes. Process s corrects
the cells whose last coordinate `x3 mod SLICES == s`, which is 125 cells. It
uses the parities of the register as it stands, so later processes of a pass
already see the corrections of earlier ones. Seven passes take
**35 clocks**. `SLICES = 1` gives the one-clock pass, five times faster.
How the chip split a pass is not known; this split is an assumption.
Different splits can give different results on heavily damaged blocks.

**Emit.** The 256 data cells are copied into `output_shift_reg` in one clock,
once it is empty, and then shifted out. `in_ready` is low from the last
received bit until this transfer: 36 clocks for the defaults.

**Latency.** The last received bit is accepted on edge E0. The decoding
loads happen on E1..E35 and the transfer on E36. The first decoded bit is
taken on E37, which is `NUM_ITER*SLICES + 2` edges after E0.

The decoder reports no "uncorrectable" flag. A block with too many errors
comes out with whatever the seven passes leave.

## Test-system error source (`mseq_error_gen`)

The chip was evaluated by adding random errors from a 17-stage m-sequence
generator (period 131071). This model uses a Fibonacci LFSR with
x^17 + x^14 + 1, advanced 17 steps per channel bit. Because 131071 is prime,
the stepped sequence still visits every state once per period. A bit is
inverted when the state is below `ber_thr`. That gives exactly `ber_thr - 1`
errors per period, so the BER is (ber_thr-1)/131071. A value of 2753 gives
2.1 % and 1639 gives 1.25 %. The polynomial and the threshold rule are this
design's choices.

## Top level (`tkc_top`)

The encoder, the decoder and the error adder sit side by side. Each has its
own ports, and all three share `clk` and the active-low synchronous `rst_n`.
A test bench chains them as encoder -> error adder -> decoder. Every serial
port uses a valid/ready handshake: a bit moves on an edge where both are
high. Assertions check that `out_valid` and `out_data` stay stable until the
bit is taken.

Parameters (defaults = the 4D5 chip):

| parameter | default | meaning |
|-----------|---------|---------|
| `N_DIM`   | 4 | code dimension n |
| `M_SIZE`  | 5 | cells per axis m |
| `NUM_ITER`| 7 | correction passes |
| `THRESH`  | 4-3-4-3-2-4-3 | threshold per pass, packed 4 bits each, pass 0 lowest |
| `SLICES`  | 5 | one-clock processes per pass |

Example for the 4D6 code:
`N_DIM=4, M_SIZE=6, NUM_ITER=14`, thresholds 4-3-4-3-2-4-3-4-3-4-3-2-4-3.

Synthesis gives about 1,830 flip-flops:

* 625 in each torus register
* 256 in each of the input and output shift registers
* the rest in counters and the LFSR

The decoder's combinational logic is 500 XOR5 gates plus 625 small
population counts and comparators. For gate economy, `majority_logic` could
be built for one slice of cells and shared through a multiplexer. The RTL
keeps one circuit per cell and masks the write-back instead. Both give the
same behaviour.

## Files

| file | content |
|------|---------|
| `rtl/tkc_pkg.sv` | code geometry functions: powers, digits, winding, data placement, line indexing |
| `rtl/input_shift_reg.sv` | encoder input register |
| `rtl/enc_parity_calc.sv` | parity cube generation |
| `rtl/torus_shift_reg.sv` | torus-connected shift register |
| `rtl/dec_parity_check.sv` | line parity checks |
| `rtl/majority_logic.sv` | threshold majority correction |
| `rtl/output_shift_reg.sv` | decoder output register |
| `rtl/tkc_encoder.sv`, `rtl/tkc_decoder.sv` | the two codec halves with their control |
| `rtl/mseq_error_gen.sv` | m-sequence random error adder |
| `rtl/tkc_top.sv` | top level |
| `tb/tb_tkc_model.sv` | reference model of encoding, winding and iterated decoding |
| `tb/tb_<module>.sv` | self-checking bench for each module |
| `tb/tb_codec_run.sv`, `tb/tb_tkc_workloads.sv` | end-to-end runs at other code sizes and burst lengths |

## Simulating

Every bench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_tkc_top \
        -y rtl -y tb +libext+.sv rtl/tkc_pkg.sv tb/tb_tkc_model.sv tb/tb_tkc_top.sv
    ./obj_dir/Vtb_tkc_top

Replace `tb_tkc_top` with any other bench name. The package files must come
first. `tb_tkc_top` runs the top at its default parameters and takes about
half a minute to build. `tb_tkc_workloads` builds a 4D6 codec as well and
takes about two minutes.

## Verification

Each bench compares the RTL with `tb_tkc_model`. The model is written
separately from the RTL's index functions: it walks coordinate arrays and
decodes with plain loops. The model uses the same winding formula, data
placement and slicing as the RTL, since these are design choices. The benches
also check properties that need no model:

* every line of an encoded cube has even parity;
* data bits survive encoding unchanged;
* the winding has the burst-spreading property;
* the LFSR makes exactly `ber_thr - 1` errors per period.

Measured with the default 4D5 configuration:

* Random errors at 2.1 % (11 to 23 errors per block): every block tested was
  restored completely.
* A single 32-bit burst in a block was always restored.
* 1.25 % random errors plus a 6-bit burst every 800 bits: every block was
  restored.
* Bursts every 800 channel bits, no random errors (`tb_tkc_workloads`, four
  blocks per length). Counted are the blocks hit by a burst that were fully
  restored:

  | burst length | 4 | 8 | 16 | 32 | 48 | 64 | 80 | 96 | 112 | 128 | 160 | 240 |
  |--------------|---|---|----|----|----|----|----|----|-----|-----|-----|-----|
  | restored     | 3/3 | 4/4 | 3/3 | 4/4 | 3/3 | 4/4 | 2/3 | 2/4 | 0/3 | 2/4 | 1/4 | 1/4 |

  These are small samples with one seed, not error-rate curves.
* The one-clock-pass variant (`SLICES = 1`) at 2.1 % random errors restored
  all 6 blocks.
* 4D6 (14 passes) at about 1 % random errors restored all 3 blocks.

The end-to-end bench counts encoder input stalls, decoder stalls, output
back-pressure, random and burst channel errors, corrections, and restored
blocks. It fails if any of them never happens.

What is not verified: error-rate curves over many blocks, and any
configuration other than 4D5 (five- and one-clock passes) and 4D6 in simulation (3D4 is checked only for
the parity circuit).

## Departures and open points

* **Parallel 8-bit I/O** (the chip also had a byte-wide port at
  50 x 8 Mbit/s) is not implemented. Its framing of 625-bit blocks on a byte
  bus is unknown.
* **Threshold schedule.** 4-3-4-3-2-4-3 is used, which matches the 35-clock
  decoding time. An eight-pass variant 4-3-4-3-2-4-3-4 was also reported as
  good for 4D5. Set `NUM_ITER = 8` and extend `THRESH` to use it.
* **"Exceeds the threshold"** is read as count >= threshold. With four
  lines per digit, a threshold of 4 could otherwise never fire.
* **Own choices:** the winding formula, the data placement, the slicing of a
  pass, the one-clock parity transfer, the handshakes, the reset values and
  the LFSR details.
