# A 4096-point number-theoretic transform engine modulo 2^64 − 2^32 + 1

Squaring an integer with millions of digits is done by convolution: cut the number into a
sequence of small digits, transform the sequence, square it element by element, transform
back and release the carries. This RTL is the transform part of such a squarer. It uses no
floating point. Every value is a residue modulo the prime

    p = 2^64 − 2^32 + 1 = 0xFFFF_FFFF_0000_0001

so every result is exact and no round-off check is needed. The prime has roots of unity of
every power-of-two order up to 2^32. Its special form turns every modular reduction into a
few additions and subtractions. One 64-bit word holds one element.

The hardware follows a published FPGA design (a Xilinx Virtex-II Pro 100 accelerator for the
Lucas–Lehmer test of Mersenne numbers). It computes a **4096-point transform** with **two
8-point engines of twelve pipelined butterflies each**. Each of the 16 engine inputs has its
own **512-word Reorder RAM**. Results go back to these RAMs through **sixteen 16-to-1
multiplexers**. Each engine has a **twiddle-factor ROM**. The whole RAM set exists **twice**,
so one set can be loaded and unloaded while the engines work on the other. That structure, the
butterfly and its latencies come from the original design. The data placement, the write
schedule, the control handshake and the memory-side port are this design's own; the original
does not describe them.

## Modular arithmetic

Two identities do all the work: 2^64 ≡ 2^32 − 1 and 2^96 ≡ −1 (mod p).

* **Full reduction, 128 → 64 bits, 2 clocks** (`mod_reduce_full`). Write
  x = x3·2^96 + x2·2^64 + lo, where x3 and x2 are 32 bits and lo is 64 bits. Then
  x ≡ lo − x3 + x2·(2^32 − 1).
  * Clock 1 registers d = lo − x3, adding p back on a borrow, and m = x2·2^32 − x2, which is below p.
  * Clock 2 adds d and m. A carry out of bit 63 is folded in as +(2^32 − 1). One conditional
    subtraction of p then gives r < p.
* **Partial reduction, 65 → 64 bits, 1 clock** (`mod_reduce_partial`). If bit 64 is set, it
  adds 2^32 − 1 to the low 64 bits. The result is congruent to the input and fits in 64 bits,
  but it may be ≥ p.
  * This cannot overflow when one addend is at most p. That always holds in the butterfly,
    because the addend that comes from the multiplier is fully reduced.
* **Multiplier, 64 × 64 → 128 bits, 6 clocks** (`mul64_pipe`). It adds sixteen 16 × 16 partial
  products in a short tree, one per hard multiplier on the original FPGA.

Engine outputs are therefore only *partially* reduced: they are below 2^64, and about one value
in 2^32 is ≥ p. Reduce them mod p at the point of use. Inputs may be any 64-bit values.

## The butterfly (`butterfly`)

A radix-2 decimation-in-time butterfly computes x0 = a + w·b and x1 = a − w·b (mod p). It
accepts one operand set per clock, and its latency is 10 clocks:

```
 a ──[ 9-clock delay ]───────────────────────┬──(+)──[partial red.]── x0
                                              │   ▲
 b ─┐                                         │   │
    ├─[ ×, 6 clk ]─[ full red., 2 clk ]─ r ───┼───┴──[1 clk]   (r to the top adder)
 w ─┘                                   │     ▼
                                        └─[p − r, 1 clk]──(+)──[partial red.]── x1
```

The bottom path forms p − r instead of subtracting. That way both output adders only add, and
a single kind of partial reduction serves both. A valid bit travels alongside the data. It is
the only part of the butterfly that is reset.

## The 8-point engine (`fft8_engine`)

Twelve butterflies sit in three ranks of four. Rank *l* pairs the ports whose numbers differ
only in bit *l*: the lower port is the top input and keeps the top output. With inputs in
bit-reversed order this is exactly three radix-2 DIT stages. Every butterfly has its own
twiddle input, `tw[4·l + i]`, for butterfly *i* of rank *l*, where *i* is the lower port with
bit *l* removed. So the engine can do any three consecutive stages of a longer transform, not
only an 8-point DFT. All twelve twiddles are presented together with the data; the engine
delays those of ranks 1 and 2 by 10 and 20 clocks. The latency is 30 clocks, at one 8-word
group per clock.

## Scheduling 4096 points on two engines

This is the least obvious part of the design.

### Passes

The 4096-point transform has 12 radix-2 stages. Its input is in bit-reversed order, so after
stage *s* the pairs differ in index bit *s*. The stages are run in **4 passes of 3**: pass *q*
handles index bits 3q … 3q+2.

In a pass, each engine takes one radix-8 group per clock: the 8 elements that agree on all
other index bits. 4096 / 8 / 2 = 256 clocks per pass, so each engine input streams 256 words.
The butterfly of stage *s* whose top element has index *n* uses the twiddle

    w^((n mod 2^s) · 2^(11−s)),   where w = 7^((p−1)/4096)

7 generates the multiplicative group mod p, so w is a primitive 4096-th root of unity. The
inverse transform uses w^(4096 − k). It does **not** multiply by 1/4096.

### Where each element lives

Each Reorder RAM has two 256-word halves. Pass *q* reads half *q* mod 2 and writes the other
half. Element *n* is kept at bank 8·E + J, address {half, T}, where (E, T, J) depends on the
pass (`ntt_pkg::loc_of`, with the inverse `idx_of`):

| before pass | J (engine input) | E (engine) | T (slot, MSB…LSB)      |
|-------------|------------------|------------|------------------------|
| 0           | n[2:0]           | n[11]      | n[10:6], n[5:3]        |
| 1           | n[5:3]           | n[11]      | n[10:9], n[2:0], n[8:6]|
| 2           | n[8:6]           | n[0]⊕n[11] | n[5:1], n[11:9]        |
| 3           | n[11:9]          | n[0]       | n[8:4], n[3:1]         |
| result      | n[3:1]           | n[0]       | n[11:4]                |

Every engine input reads only its own RAM, at the same address for all 16 RAMs.

### Why the results need a write skew

All eight results of one group share every index bit outside the current pass. Those shared
bits include the three bits that choose the engine input in the next pass. So the eight
results are all bound for the **same** RAM, and each RAM has one write port.

The fix uses two facts:

* The slot's three low bits T[2:0] are the next pass's J.
* The top delays engine output port *m* by *m* clocks (`write_skew`).

In any clock the eight lanes of one engine then carry results of eight consecutive groups,
which go to eight different RAMs. The two engines never collide either. In each clock the
groups they work on differ in exactly one index bit, and that bit (or, from pass 2 to pass 3,
n[0]⊕n[11]) becomes the next pass's E. The table above is chosen so that this holds at every
pass boundary.

The multiplexer select of each RAM comes from a destination tag (bank, address) that follows
the data (`write_crossbar`). An assertion checks that no RAM gets two writers in a clock.

### Timing

* The controller issues the RAM and ROM addresses. Data and twiddles arrive one clock later.
* The results and their tags come out 31 clocks after issue, then up to 7 more clocks of skew.
* Between passes the controller waits a fixed **40-clock drain**. This way no pass reads a
  word before the previous pass has written it.
* A 4096-point transform takes 4 × (256 + 40) = **1184 clocks** from `start` to `done`.
  Without the drain it would be 1024.

## Cache sets and the memory-side port (`ntt4096_top`)

Each set holds 16 Reorder RAMs. `eng_set` tells which set the engines own. The other set is on
the memory side. This port stands in for the link to external DRAM, which is not part of this
RTL.

| signal | dir | meaning |
|---|---|---|
| `swap` | in | exchange the sets (ignored, and flagged by an assertion, while `busy`) |
| `start`, `inverse`, `len512` | in | run a transform on the engine-side set; `inverse` and `len512` are sampled at `start` |
| `busy`, `done` | out | `done` pulses for one clock at the end |
| `ld_we`, `ld_idx`, `ld_data` | in | write input element x[ld_idx] (natural order) into the memory-side set |
| `rd_idx` → `rd_data` | in/out | result X[rd_idx] (natural order), one clock later |

The port converts the natural-order index to a bank and address itself: it bit-reverses the
index for loading and uses the "result" row of the table for reading.

In 4096-point mode the results end up in the same half as the inputs (four passes, an even
number). Read a set's results before loading new input into it. The testbench reads all 4096
words first, then loads.

A typical sequence:

1. Load x.
2. `swap`, then `start`. While the transform runs, load the next input into the other set.
3. After `done`, `swap` again, `start` the next transform, and read the results of x.

### 512-point mode

When the 2-million-point transform of the original design is split as 512 × 4096 (the
"four-step" method), the other dimension needs 512-point transforms. With bit-reversed input,
the first three passes of the schedule above are exactly **eight independent 512-point
transforms**, one for each value of index bits 11:9. `len512` stops after pass 2:

* It takes 3 × 296 = 888 clocks.
* Sequence *b* occupies indices 512·b … 512·b + 511, both for input and for output.
* Results stay in half 1, so in this mode they do not share storage with the inputs.

## Files

| file | content |
|---|---|
| `rtl/ntt_pkg.sv` | p, sizes, `loc_t`, reference `mulmod`/`powmod` for constant tables, placement maps, twiddle exponent |
| `rtl/mul64_pipe.sv`, `rtl/mod_reduce_full.sv`, `rtl/mod_reduce_partial.sv` | modular arithmetic |
| `rtl/butterfly.sv`, `rtl/fft8_engine.sv`, `rtl/delay_line.sv` | datapath |
| `rtl/twiddle_rom.sv` | w^k, k = 0…4095, computed at elaboration as w^k = w^(k−1)·w; 12 registered read ports |
| `rtl/reorder_ram.sv` | 512 × 64 simple dual-port RAM, registered read, read-old on collision |
| `rtl/write_skew.sv`, `rtl/write_crossbar.sv` | result write path |
| `rtl/fft_controller.sv` | pass sequencer, address and twiddle generation, destination tags |
| `rtl/ntt4096_top.sv` | the accelerator |
| `tb/tb_*.sv` | one self-checking testbench per module (not for `delay_line`, `write_skew` and `ntt_pkg`); each prints `TB_RESULT checks=… failures=…` |

## Simulating

Verilator 5 finds the modules in `rtl/` by name. For example, the end-to-end test at full
size:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/ntt_pkg.sv tb/tb_ntt4096_top.sv \
          --top-module tb_ntt4096_top -Mdir obj -o sim && obj/sim
```

It builds in about 20 s and runs in under a second. Swap in another testbench name to run a
unit test.

## How far it is verified

All tests simulate the default size; no parameter is reduced.

* **Arithmetic units and butterfly.** Checked against the simulator's own 128-bit `*` and `%`,
  with one input per clock and the exact latency checked. The tests include corner values
  (all-ones, multiples of p, p − 1, borrows) and count the partial-reduction folds.
* **Engine.** Checked against a direct 8-point DFT, and, with random twiddles, against a
  behavioural butterfly network.
* **Controller.** Tested with a model of the RAMs that stores element indices. For every group
  the test checks:
  * the group is correct;
  * every element is read once per pass;
  * every twiddle exponent is right;
  * no RAM gets two writes in a clock;
  * every element ends at its result place, in 4096-point forward, inverse and 512-point runs.
* **Top, end to end:**
  * two forward 4096-point transforms, spot-checked against a direct DFT at 24 indices each;
  * an inverse transform of the first result, checked at all 4096 points to equal 4096·x;
  * a 512-point-mode run, spot-checked against direct 512-point DFTs;
  * the run time of every transform;
  * counters showing that loads overlapped a transform, that results crossed engine sides
    through the multiplexers, and that partial reductions happened.
* **Faults.** Each testbench was also run against a copy of its module with one deliberate
  fault, and each fault was detected.

## Departures from the original design and what is not here

* **Write skew and drain.** The original schedules each pass in 256 clocks. It does not say how
  it avoids the same-RAM write conflict described above. Here the conflict is solved by the
  skew, and the 40-clock drain per pass costs about 16 % in run time.
* **Explicit swap.** The original swaps the cache sets when a transform completes. Here the host
  issues `swap`.
* **No 1/N scale.** The inverse does not divide by 4096. In the squaring algorithm that factor
  can be folded into the weights.
* **Memory-side port.** It moves one word per clock. The original streams to four DDR SDRAMs at
  up to 12.8 GB/s; the DRAM devices, their controllers and the 2-million-point four-step
  organisation around the engine are not part of this RTL.
* **Other squaring steps.** The algorithm around the transforms is not built: the IBDWT
  weighting and its removal, the element-wise squaring, the four-step inter-transform twiddle
  multiply, the carry release and the Mersenne reduction. The original estimates their time but
  describes no hardware for them.
* **Clock frequency.** The original reports 80 MHz on an XC2VP100-6 for its engine. This RTL is
  not tuned for any device: the row sums of the multiplier and the controller's address
  functions are single-cycle combinational blocks.
