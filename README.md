# Address generators for DSP kernels

A DSP kernel that is to finish one loop iteration per clock needs up to three
memory addresses per clock: two operands and one result. Computing those on
the datapath's own adders steals the resources the kernel needs. This design
instead gives each access stream a small dedicated address generation unit
(AGU). Every AGU has the same core:

```
offset register  <=  offset register  ±  correction
```

A little control logic around the core picks the correction each clock. The
adder can run its carry in the usual direction (LSB to MSB) or backwards (MSB
to LSB). With the backward carry, repeatedly adding N/2 counts in
bit-reversed order, which is the basis of the FFT generators. All AGUs
produce one address per clock while their enable (`en`, "address generate
enable") is high, and hold the address while it is low. That enable is how a
datapath controller keeps them in step with the computation.

The RTL contains:

| AGU | sequence | used by |
|---|---|---|
| `br_agu` | FFT butterfly operands, all log2 N stages, in-place | FFT read and write-back |
| `twiddle_agu` | twiddle index of each butterfly | FFT |
| `conv_data_agu` | sliding window `k .. k+M-1` | convolution |
| `conv_coeff_agu` | modulo M: `0 .. M-1` repeated | convolution |
| `conv_result_agu` | divide by M: `k` held for M clocks | convolution |
| `zigzag_agu` | zig-zag scan of an N x N block (N even) | entropy coding after DCT |
| `linear_agu` | `start + k·d` or `start − k·d` | general |

Two kernels show the AGUs at work: an in-place radix-2 DIF FFT (`fft_kernel`)
and a direct-form convolution (`conv_kernel`). The top level `agu_top` puts
both kernels, the zig-zag AGU and the linear AGU side by side. They share
only the clock and reset. Each part's ports come out under a prefix (`fft_`,
`conv_`, `zz_`, `lin_`).

## Bit-reversed butterfly addressing (`br_agu`)

This is the least obvious part of the design. For an in-place N-point FFT,
each stage reads the array as pairs of words, and the pairs must come out on
consecutive clocks. For N = 8:

```
stage 1: 0 4 | 2 6 | 1 5 | 3 7      pairs N/2 apart
stage 2: 0 2 | 1 3 | 4 6 | 5 7      pairs N/4 apart
stage 3: 0 1 | 4 5 | 2 3 | 6 7      pairs 1 apart
```

In stage s the array splits into blocks of `B = N / 2^(s-1)` words. The
blocks are visited in bit-reversed order, and the words inside each block
also come in bit-reversed order.

Two shift registers drive the generator:

* **SRL** starts at N/2 and shifts right (logically) once per stage. It holds
  the pair distance of the current stage. Adding it with the reverse carry
  steps through one block in bit-reversed order. When it reaches zero, all
  stages are done (`done`).
* **SRA** starts at the mask and shifts right arithmetically once per stage,
  so it gains one leading one per stage. When `SRA | addr` is all ones, the
  reverse carry has run out of the current block. The correction then gets
  the N/2 bit added (`correction = N/2 | SRL`), which carries into the next
  block in bit-reversed block order.

The end of a stage is the clock where `mask | addr` is all ones. There, both
registers shift and the address returns to 0. `mask` has ones in the address
bits at and above log2 N, which lets an N-point FFT run on a wider address
bus. SRA has one guard bit above the address width, loaded with 1, so the
arithmetic shift brings in ones even when the mask is zero (N = 2^ADDR_W).

Worked example, N = 8, stage 2 (SRL = 010, SRA = 100):
`0 → 2` (add 010), `2 → 1` (the carry runs from bit 1 into bit 0),
`1 → 3`, then at `3` the test `SRA | 011 = 111` fires. The correction is
`100 | 010 = 110`, and `011 +rev 110 = 100 = 4`: the next block starts.

Each stage changes only one or two bits in each shift register. Beyond that,
the hardware is one adder, two comparators and the offset register, so it
grows linearly with the address width. The generator was checked for every
N from 4 to 256 on an 8-bit address.

## Twiddle addressing (`twiddle_agu`)

The twiddle generator steps once per butterfly. Within a stage the twiddle
index counts in bit-reversed order, by adding N/4 with the reverse carry. It
returns to 0 after NN butterflies. NN is held in an SRL register: it starts
at N/2 and halves every stage. Two 1-based counters track the position:
inside the group of NN butterflies, and inside the stage of N/2 butterflies.
The return to 0 is done by subtracting the current address from itself.
For N = 8 the sequence is `0 2 1 3 | 0 2 0 2 | 0 0 0 0`. Twiddle index k
means W_N^k = exp(−2πik/N).

## FFT kernel (`fft_kernel`)

The FFT kernel has one data memory of N complex words and one twiddle memory
of N/2 words (N up to the memory size, see below), loaded from outside. It
has one butterfly datapath (`fft_butterfly`: x = a + b, y = (a − b)·w). Three AGUs drive it. The read
`br_agu` issues one address per clock, so a butterfly finishes every two
clocks. A second `br_agu` starts three clocks later and produces the same
sequence for the write-back. Per butterfly (c0 = clock of the first read):

| clock | action |
|---|---|
| c0 | read address of a |
| c1 | read address of b and twiddle address; a arrives and is held |
| c2 | b and w arrive; butterfly computed and registered |
| c3 | write a + b |
| c4 | write (a − b)·w |

A transform takes **N·log2 N + 4 clocks**, from the start clock to the last
write inclusive: 28 for N = 8. The memories return a word written in the
same clock as it is read (write-first). This matters only for N = 4, where a
stage reads a word in the clock it is written.

**Size.** `LOG2N` sets the memory size (2^LOG2N data words). Each transform
has its own size N = 2^`log2n`, where `log2n` is an input from 2 up to
`LOG2N` that must be held from `start` to `done`. It is turned into N/2, N/4
and the mask of unused address bits, which the generators load when they
start. So one kernel runs any power-of-two size that fits its memory. Words
at and above N are neither read nor written. The caller loads the twiddle
table for the N in use.

The results are left in bit-reversed order, as usual for DIF. A separate
**reordering pass** (`rev_start`) moves them to natural order. A linear
counter i runs against the read `br_agu` held in its first stage, which
yields bitrev(i). If the two are equal (a self-reversed address), nothing is
done. The pair is also skipped when i > bitrev(i), because it was exchanged
already. Otherwise both words are read and written back exchanged. The pass
takes 1 + N + 3P clocks, where P is the number of exchanged pairs (15 clocks
for N = 8).

Number format: samples are `{re, im}` with DATA_W = 8 bits per part, two's
complement. Twiddles use the same layout, with 4 fraction bits (1.0 = 16;
W_8^1 = `{11, −11}`). The product is shifted right arithmetically by 4. Every
result wraps to 8 bits: there is no saturation and no per-stage scaling, so
the caller must keep the input small enough (|x| ≤ 127/N is safe).

## Convolution kernel (`conv_kernel`)

The kernel convolves N samples with an M-tap filter, giving N+M−1 outputs at
one multiply-accumulate per clock. The data memory holds x padded with M−1
zeros at both ends, with x(0) at address M−1. The coefficient memory holds h
reversed, with h(M−1) at address 0. Output y(k) is then the dot product of
data words `k .. k+M−1` with coefficient words `0 .. M−1`:

* `conv_data_agu`: +1 each clock, and −(M−2) at the end of a window
  (`0 1 2 3 1 2 3 4 2 ...` for M = 4);
* `conv_coeff_agu`: +1 each clock, and −(M−1) at the end of a window;
* `conv_result_agu`: +1 at the end of each window. It is enabled two clocks
  after the others, so that it points at output k while k is written.

The accumulator (`conv_mac`, 20 bits) clears itself with the first product
of each output, so no clock is spent between outputs. A run takes
**(N+M−1)·M + 3 clocks**: 35 for N = 5, M = 4. The outputs go to a separate
result memory, so the input stays intact.

## Zig-zag addressing (`zigzag_agu`)

A row counter and a column counter (both up/down) follow the scan, while the
address itself is kept by the adder and offset register. The scan moves
up-right on anti-diagonals with even row + column and down-left on odd ones.
It turns at the edges:

| move | when | correction | adder | counters |
|---|---|---|---|---|
| right (cond1) | up-right on the top row, or down-left on the bottom row | 1 | add | column up |
| down (cond2) | up-right in the last column, or down-left in the first column | N | add | row up |
| up-right (cond3) | otherwise, on an even diagonal | N−1 | subtract | row down, column up |
| down-left | otherwise, on an odd diagonal | N−1 | add | row up, column down |

For N = 4 the scan is `0 1 4 8 5 2 3 6 9 12 13 10 7 11 14 15`. N is a
run-time input: any even value from 2 to 2^(ADDR_W/2).

## Interfaces and timing common to all blocks

* One clock and a synchronous, active-high reset `rst`. Addresses are
  registered outputs.
* `init` / `clr`: a one-clock restart that loads the generator's registers.
  `en`: advance one step. FFT and zig-zag generators raise `done` and ignore
  `en` after the last address.
* The kernels take a one-clock `start`, hold `busy` until the end, and pulse
  `done` in their final clock. Their memories are loaded and read through
  ports that work only while `busy` is low (read latency one clock).
* Address width is `ADDR_W` = 8 by default. The FFT memory size is the
  parameter `FFT_LOG2N` (default 3, 8 words), and the transform size is the
  run-time input `fft_log2n`. Convolution N and M, and the zig-zag N, are
  also run-time inputs.

## What is not here, and where this RTL departs from the original design

* The original design places the AGUs next to a reconfigurable datapath
  unit: two adder/subtractors, two multipliers, sixteen registers and a
  barrel shifter, configured by microprogrammed control words. The
  control-word format, the routing and the sequencer are not specified, so
  none of that is built. The two configurations the design uses are
  hard-wired instead: the four-unit DIF butterfly (`fft_butterfly`) and the
  MAC (`conv_mac`). The kernels have small fixed state machines in place of
  the microprogram.
* Choices made here where the original leaves things open:
  * the SRA guard bit;
  * the exact conditions behind the zig-zag cond1..cond7;
  * the number formats, rounding and overflow behaviour;
  * the memory ports and the write-first bypass;
  * the separate convolution result memory (the original writes results
    back into the data memory);
  * skipping i > bitrev(i) in the reordering pass;
  * the reset style;
  * all handshakes.
* The coefficient and result generators are described with "N" as the
  modulus in one place and with the tap count M in another. M is used here.
* The twiddle generator's select logic includes two terms that the first
  term already covers. They are kept as specified.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=<n> failures=<n>`. `tb/tb_agu_top.sv` runs the whole design
at its default parameters. It runs an 8-point FFT (address streams, 28
clocks, results against a fixed-point model) and the reordering pass. Then
it runs a 4-point FFT on the same kernel (12 clocks), which also checks that
the upper four words stay untouched. It runs a 5 × 4 convolution (35 clocks) and 4 × 4 and 8 × 8 zig-zag scans. It
counts every mechanism listed above. `tb/tb_fft_kernel.sv` runs N = 4, 8, 16
and 32, plus N = 4 and 8 on a 32-word kernel. It also compares the results
against a floating-point DFT.

With Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/agu_pkg.sv \
    tb/tb_agu_top.sv --top-module tb_agu_top -Mdir obj -o sim
./obj/sim
```

Replace `tb_agu_top` with any other testbench name. `rtl/agu_pkg.sv` holds
the shared enums: carry direction and add/subtract.
