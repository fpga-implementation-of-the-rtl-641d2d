# Streaming multiple-precision integer multiplier

Multiple-precision libraries represent a big integer as an array of machine
words ("limbs") plus a signed size. Multiplying two such numbers of `na` and
`nb` limbs by the schoolbook method takes `na*nb` limb products. Up to a few
thousand bits this is still the fastest method. This RTL computes those products
with one pipelined multiply-add (a DSP slice on an FPGA) per *multiplying unit*,
16 x 16 bits per product. It is built so that the multiply-add starts a new
product in every clock cycle, even though each product depends on the result of
the one before it.

The trick is time multiplexing. A product's result comes back 6 cycles after
its operands leave the channel, so one multiplication on its own could use the
multiplier only one cycle in six. Each multiplying unit therefore serves **6
independent channels**. Each channel works on its own pair of numbers and owns
one slot in every round of 6 cycles. Number pairs arrive as streams through
per-channel FIFOs, and results leave as streams, so there is no separate
load or unload phase.

```
             A FIFO ─┐                          ┌──────────── (cout, r) broadcast ───────────┐
  channel 0  B FIFO ─┴─ data_unit 0 ─┐          │                                            │
  channel 1  ...        data_unit 1 ─┤   ┌─────┐│ ┌─────┐   ┌──────────────────────────┐       │
    ...                     ...      ├──►│ mux ├┼►│ REG ├──►│ dsp_mac: a*b + c + cin   ├───────┘
  channel 5  ...        data_unit 5 ─┘   └──▲──┘│ └─────┘   │ 4-stage pipeline         │
                 │                         │    │           └──────────────────────────┘
                 └─► result streams    clk_counter (0..5)
```

`mpa_multiplier` (the top) puts `MULT_UNITS` such units side by side. They do
not exchange data, so throughput scales linearly with the number of units.

## Number streams

Every channel has an A FIFO and a B FIFO, each 16 bits wide. Each number pair
is written as follows:

| stream | contents |
|---|---|
| B FIFO | size word of B, then `b_0 … b_(nb-1)` (least significant first) |
| A FIFO | size word of A, then `a_0 … a_(na-1)` **repeated `nb` times**, once for every word of B |
| result | size word (`out_hdr` = 1), then `na+nb` words, least significant first |

A size word is a 16-bit two's-complement number. Its magnitude is the number of
words, from 1 to 2048 (16 bits to 32 kbits), and its sign is the sign of the
number. Magnitudes are unsigned words, as in GMP. The result size word has
magnitude `na+nb`, and its sign is the product of the two signs. The result is
not normalised: if the top word is zero, it is still sent.

A channel keeps only the current word of A, so A is sent once per row. A host
that holds A in memory simply reads it `nb` times. The result stream has no
back-pressure: the consumer must take a word in every cycle where `out_valid`
is high. A channel produces at most one word per cycle, and at most 3 words
per 6-cycle round. The FIFO write ports have a `full` flag.

## How a channel multiplies: row by row, with an accumulator of `na` words

A channel works through the rows `i = 0 … nb-1`. Row `i` multiplies every word
of A by `b_i`:

```
t_j      = a_j * b_i + acc[j] + hi(t_(j-1))      (hi(t_-1) = 0, acc = 0 in row 0)
acc[j-1] = lo(t_j)   for j >= 1
acc[na-1]= hi(t_(na-1))
```

`t_j` never exceeds `2^32 - 1`, so it always fits the 32-bit result.

The low word `lo(t_0)` of each row is final, because later rows only add at
higher weights. It leaves the channel at once as result word `i`. In the last
row every `lo(t_j)` is final, and so is the last high word. They are sent out
directly and are not written back. So the accumulator never holds more than
`na` words instead of `na+nb`, and one 32 kbit RAM (2048 words) is enough for
an operand of 32 kbits. Of the `na` words, `na-1` live in the channel's block
RAM (`acc_ram`) and the top word `acc[na-1]` lives in a register.

Example with four-word operands (hex, most significant word first):

```
      A = 4732 9856 2397 5829          B = 6796 5765 3454 3732
row 0: acc = 0F59 C69C 4278 7780   output 0702
row 1: acc = 0E8D B2E5 421A AE09   output B8F4
row 2: acc = 184E 5749 12F9 BBC6   output 6536
row 3:            (last row)       output E2CC D21F 4213 2B3E 1CCF
product = 1CCF 2B3E 4213 D21F E2CC 6536 B8F4 0702
```

### Splitting one step between the data unit and the DSP

The multiply-add computes `(cout, r) = a*b + c + cin`. Here `a` and `b` are 16
bits, `c` is 32 bits, `cin` is 1 bit and `r` is 32 bits. Before a product
leaves, the data unit adds `acc[j] + hi(t_(j-1))`. The result is a 17-bit sum
whose top bit is called CARRY_1, and it goes to `c`. The registered carry-out
of the previous product (CARRY_2) goes to `cin`. With 16-bit limbs CARRY_2 is
always 0. It is kept so the datapath stays exact if the limb width changes.

## The 6-cycle loop

`phase` is a channel's position in its round. Phase 0 is the cycle in which
the multiplexer selects that channel.

| phase | where the channel's product is |
|---|---|
| 0 | the operand register of the data unit is on the multiplexer; REG captures it at the end of the cycle |
| 1 | REG → DSP stage 1 (product) |
| 2 | stage 2 (adds `c + cin`) |
| 3 | stage 3; the data unit presents the RAM read address `j` of its next product |
| 4 | stage 4; RAM output register |
| 5 | `(cout, r)` is valid at the DSP output. The data unit routes `lo`/`hi` (RAM write, top register, output). In the same cycle it forms and registers the operands of the next product |

The loop is 1 (mux register) + 4 (DSP) + 1 (data unit), which is 6 cycles.
This is why `N_CH = DSP_LAT + 2` is derived, not chosen. The hard part of the
data unit is phase 5, where the new result is used before anything has stored
it:

* **High half.** `hi(t_(j-1))` comes straight from the DSP output. If the
  channel stalled in the rounds between, it comes from a held copy (`hi_q`).
* **Same-cycle RAM bypass.** The RAM read for `acc[j]` is issued in phase 3.
  With `na = 2`, the word it needs is written in phase 5 of the same round. The
  data unit detects the matching address and uses the word being written.
* **Top-word bypass.** With `na = 1`, `acc[0]` is the top register, written in
  the same cycle. The high half returning from the DSP is used instead.
* **Stall.** If a FIFO has no word for the next product, the channel leaves its
  slot empty (`stall` pulses, the operand valid bit stays low). It retries one
  round later, and the held state keeps the computation exact.
* **Back-to-back pairs.** A channel takes the next pair's size words in phase 1
  while its last product is still in the pipeline. It issues the first product
  of the new pair in the very next round. The DSP therefore stays busy across
  pair boundaries. The new size word is held back until the old pair's last
  word has left, so output order is preserved.

## Performance

With all channels loaded, each unit finishes one 16 x 16 product per cycle. So
the time per multiplication is

```
t = (bits / 16)^2 / (MULT_UNITS * f_clk)
```

The DSP pipeline adds a fill and drain of a few cycles. Measured in
simulation at 500 MHz:

| operands | cycles per pair and unit | 5 units | 20 units | 40 units |
|---|---|---|---|---|
| 1024 bit | 4098 | 1.64 µs | 0.410 µs | 0.205 µs |
| 2048 bit | 16386 | 6.55 µs | 1.64 µs | 0.819 µs |

Work is quantised per round: a unit always runs 6 pairs at once. An array of
7 pairs therefore takes nearly as long as 12, and long arrays amortise this.

## Modules

| file | role |
|---|---|
| `rtl/mpa_pkg.sv` | widths (`X` = 16), `DSP_LAT` = 4, `N_CH` = 6, `ACC_WORDS` = 2048, the operand struct `dsp_op_t` |
| `rtl/mpa_multiplier.sv` | top: `MULT_UNITS` multiplying units side by side (default 1) |
| `rtl/mult_unit.sv` | one DSP with its 6 channels: FIFOs, data units, counter, multiplexer, DSP |
| `rtl/data_unit.sv` | one channel: control FSM, A and B word registers, carries, accumulator, result stream |
| `rtl/acc_ram.sv` | accumulator RAM, one write and one read port, 2-cycle read latency |
| `rtl/operand_fifo.sv` | first-word-fall-through FIFO, 512 words by default |
| `rtl/clk_counter.sv` | modulo-6 slot counter |
| `rtl/channel_mux.sv` | channel multiplexer plus the register in front of the DSP |
| `rtl/dsp_mac.sv` | `a*b + c + cin`, 4-stage pipeline, written as plain arithmetic |

Parameters: `mpa_multiplier.MULT_UNITS`, plus `mult_unit.ACC_DEPTH` and
`mult_unit.FIFO_DEPTH` (smaller values give fast simulations). The limb width
and DSP latency are package constants. Changing `DSP_LAT` changes `N_CH`
with it.

All logic is on one clock with a synchronous active-low reset `rst_n`. Reset
clears control state but not the RAM contents; row 0 does not read the RAM.

## Where this RTL departs from or adds to the reference design

* **One clock.** The reference design clocks the DSP at 500 MHz and the channels
  with their block RAM at 250 MHz. There, the RAM's 2-cycle latency plus one
  processing cycle (3 slow cycles) matches the 6 fast cycles of the DSP loop.
  Here the channels run on the fast clock too, with a 2-cycle RAM read pipeline
  inside the same 6-cycle round. Slot timing and throughput are the same. A
  250 MHz implementation would need the channel logic retimed to 3 slow cycles.
* **DSP as arithmetic.** `dsp_mac` is generic RTL with the slice's latency, not
  the vendor primitive. It uses the same `A*B+C+CIN` operation.
* **Choices of this design:**
  * the exact stream format (size words, A repeated per row);
  * the meaning of the two carry bits;
  * stall-and-retry on empty FIFOs;
  * the valid bits on operands and results;
  * the FIFO depth of 512;
  * no output back-pressure;
  * no zero-size operands (a size word of 0 is flagged by an assertion).
* **Not included:** the host link (PCI-E and DDR4 on the evaluation board).
  The FIFO write ports and result streams are brought out as top-level ports
  instead. Floating-point multiplication, which would add exponent handling
  and rounding around this integer core, is not included either.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
Products are checked against a column-sum reference in `tb/mpa_ref_pkg.sv`.

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mpa_pkg.sv tb/mpa_ref_pkg.sv tb/tb_mpa_multiplier.sv \
    --top-module tb_mpa_multiplier -o sim && ./obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_mpa_multiplier` | top at default size. It checks three things: exact pair latency of `6*na*nb-1` cycles from size word to last word; an unbroken DSP-busy run across pair boundaries; and random stalls. It also runs the 2048-word maximum operand, and fails if any mechanism above never happened |
| `tb_workload_table2` | two units; 1024- and 2048-bit batches on all channels; cycle counts against the formula above |
| `tb_mult_unit` | one unit with small FIFOs (writers hit `full`) and a 16-word accumulator |
| `tb_data_unit` | one channel against a behavioural DSP and FIFO model |
| `tb_acc_ram`, `tb_operand_fifo`, `tb_clk_counter`, `tb_channel_mux`, `tb_dsp_mac` | the leaf blocks |

All of them run in a few seconds.
