# Parallel bit-reversal circuit (N > P²)

A pipelined FFT usually delivers its results in bit-reversed order: result
`k` comes out at position `bitrev(k)`. Putting them back in natural order is a
permutation of the whole frame, and when the FFT delivers `P` samples per
clock, the reordering circuit has to take and give `P` samples per clock too.
This RTL does that for frames of `N` samples with `N > P²`. It uses one
frame's worth of memory (`N` samples), split into `P` small single-port banks,
plus a few multiplexers. The output frame starts exactly `N/P` cycles after
its input frame. Frames follow each other with no gap.

The structure follows the circuit proposed in the article *Coherent Circuits
for Parallel Bit-Reversal* (S. A. Mastani, G. Deepa, IJRTE 2022): `P` memory
blocks, one input multiplexer per block switched by the MSB of a control
counter, and an address generator that alternates between natural and
bit-reversed addresses. Its main configuration is `N = 32`, `P = 4`, 8-bit
samples, and these are the RTL defaults. The article does not give a complete
data flow. The bank and lane assignment below is this design's own, worked out
so that the circuit is correct for any power-of-two `N > P²`.

## Sample order at the ports

Let `n = log2 N` and `p = log2 P`. A frame of `N` samples is spread over
`N/P` cycles. The parallel dimension holds the *upper* index bits:

* **Input:** sample `k` arrives on lane `k / (N/P)` in cycle `k mod (N/P)` of
  its frame. For `N = 32`, `P = 4`, lane 0 carries samples 0..7, lane 1
  carries 8..15, and so on.
* **Output:** lane `l` in output cycle `t` carries sample
  `bitrev_n(l·N/P + t)`. Bit-reversing an index `l·N/P + t` gives these index
  bits:
  * the low `p` bits of the input cycle number become the output lane, reversed;
  * the input lane number becomes the low `p` bits of the output cycle, reversed;
  * the middle `n − 2p` bits (the "group") are reversed in place.

For the default size, the output is:

| output cycle | lane 0 | lane 1 | lane 2 | lane 3 |
|---|---|---|---|---|
| 0 | 0 | 2 | 1 | 3 |
| 1 | 16 | 18 | 17 | 19 |
| 2 | 8 | 10 | 9 | 11 |
| 3 | 24 | 26 | 25 | 27 |
| 4 | 4 | 6 | 5 | 7 |
| 5 | 20 | 22 | 21 | 23 |
| 6 | 12 | 14 | 13 | 15 |
| 7 | 28 | 30 | 29 | 31 |

Each output cycle takes all its samples from one input lane. Those samples
come from `P` consecutive input cycles (one group). So every group of `P`
input cycles is a `P × P` block that has to be transposed.

## The storage: one frame, two layouts

There are `P` banks. Each bank has `N/P²` words, and each word holds `P`
samples. Every cycle, every bank is read at one address, and the same address
is written at the clock edge (read before write). A sample of the new frame
therefore always goes into a place that the old frame has just given up. In
the cycle a place is freed, the new sample for it has to be on the input.

No single arrangement of samples works for every frame. In a transpose, the
samples that go *out* together in one cycle came *in* in different cycles,
and the other way round. So the layout alternates from frame to frame. The
MSB of the control counter (`msb`) marks the two kinds of frame:

| | frame with `msb = 0` | frame with `msb = 1` |
|---|---|---|
| address | `bitrev(group)` in every bank | `group` in every bank |
| read | one sample from each bank, lane `bitrev(c_lo)` | the whole word of bank `P−1−c_lo` |
| output lane `l` | bank `P−1−bitrev(l)`, lane `bitrev(c_lo)` | bank `P−1−c_lo`, lane `l` |
| write | each bank rewrites its word, with the lane just read replaced by input lane `P−1−bitrev(bank)` | bank `P−1−c_lo` takes the whole input vector; the others keep their word |

Here `c_lo` is the low `p` bits of the cycle number, and `group` is the next
`n − 2p` bits.

A frame written during an `msb = 0` frame is read during the following
`msb = 1` frame, and the other way round. For `N = 32`, `P = 4` (so two words
per bank), the two layouts hold the frame's sample numbers as follows. Each
row is one bank: word 0, then word 1, each listed lane 0..3.

Written in an `msb = 1` frame (one input cycle per word):

```
bank 0:   3 11 19 27 |  7 15 23 31
bank 1:   2 10 18 26 |  6 14 22 30
bank 2:   1  9 17 25 |  5 13 21 29
bank 3:   0  8 16 24 |  4 12 20 28
```

Written in an `msb = 0` frame (one output cycle per word):

```
bank 0:  24 26 25 27 | 28 30 29 31
bank 1:   8 10  9 11 | 12 14 13 15
bank 2:  16 18 17 19 | 20 22 21 23
bank 3:   0  2  1  3 |  4  6  5  7
```

Reading the first layout one lane at a time across the four banks gives the
output rows of the table above. Reading the second one word at a time gives
the same rows. In `msb = 0` frames, outputs 0, 1, 2 and 3 come from banks 3,
1, 2 and 0. This is the output-to-memory pairing of the published schematic.

Group reversal (the middle index bits) needs no extra logic. Addresses are
bit-reversed in one kind of frame and natural in the other, which reverses
the group order across the two frames. For `N = 32` the group is a single bit,
so both addresses are the same. For `N ≥ 4·P²` they differ.

## Control and timing

`br_addr_gen` holds a counter of `log2(N/P) + 1` bits. Its low bits are the
cycle inside the frame, and its MSB is `msb`.

* `reset_in` is synchronous and active high. It clears the counter and stops
  the stream.
* `start_in` is raised together with the first input vector. That cycle is
  cycle 0 of frame 0, and `msb = 0` in it. From then on the circuit takes
  `x_in` in every cycle until the next reset. There is no stall input.
* Frame 0 is written without an output. From cycle `N/P` on, `valid_out` is
  high and `y_out` carries the previous frame. `first_out` marks the first
  cycle of each output frame.
* The banks read asynchronously, so `y_out` is combinational from the
  counter state and the bank contents. With the memory bits in flip-flops or
  LUT RAM, the longest path is counter → bank read → output multiplexer.
  Registering `y_out` adds one cycle of latency.

## Modules

| file | what it is |
|---|---|
| `rtl/par_bitrev.sv` | top: address generator, `P` banks with their input multiplexers, output selection. Parameters `N` (32), `P` (4), `W` (8, sample width). |
| `rtl/br_addr_gen.sv` | control counter, `msb`, shared bank address, valid/first flags |
| `rtl/block_ram_sp.sv` | single-port bank of `N/P²` words × `P` samples; asynchronous read, write on `en_in && wen_in` |
| `rtl/br_bank_in_mux.sv` | per-bank write data: whole input vector (`msb = 1`) or its own read word with one sample replaced (`msb = 0`) |
| `rtl/br_out_sel.sv` | picks the `P` output samples from the banks' read words |
| `rtl/br_pkg.sv` | `bitrev()` helper |

The top's ports are `clk_in`, `reset_in`, `start_in`, `x_in[P]`, `y_out[P]`,
`valid_out` and `first_out`. Elements `x_in[0..3]` and `y_out[0..3]` are the
schematic's `X1_in..X4_in` and `Y1_out..Y4_out`. `N` must be a power of two
above `P²`, and `P` a power of two of at least 2. An initial assertion checks
both. A concurrent assertion in the top checks that, in `msb = 1` cycles,
exactly one bank is written.

## Where this departs from the published circuit

* **Multiplexers.** The article counts `(P/2)·log2 P` multiplexers. Its
  schematic shows one 3-sample-wide 2:1 multiplexer per memory, with the
  fourth input lane wired straight into every memory. The connections given
  there are not enough to reconstruct a working data flow. This design uses a
  full-word multiplexer per bank and a one-sample insertion in `msb = 0`
  frames. It also needs an output selection, a `2P−1`-way choice per output
  lane. So it has more multiplexing than the article's count. Memory (`N`
  samples) and latency (`N/P`) are as stated there.
* **Addresses.** The article describes per-memory addresses and says the
  address "of the first memory" is bit-reversed under the MSB. Here all banks
  share one address, and it is bit-reversed for every bank in `msb = 0`
  frames.
* **Handshake.** The article names `start_in` and `reset_in` but not their
  behaviour. `valid_out` and `first_out` are added.
* **N ≤ P².** The article mentions a second circuit for `N ≤ P²` but does not
  describe it. It is not provided.
* The article's FPGA results (LUTs, flip-flops, power, 298 MHz) belong to
  its own implementation and are not reproduced here.

## Simulation

Each testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<m>`. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/br_pkg.sv \
    tb/tb_par_bitrev.sv --top-module tb_par_bitrev
./obj_dir/Vtb_par_bitrev
```

* `tb/tb_par_bitrev.sv` streams random frames through four sizes: 32/4 (the
  default), 256/4 (4 address bits, so reversed and natural addresses differ),
  128/8 and 16/2. It checks every output sample, `valid_out` and `first_out`
  against a reference computed from the input. It then resets in the middle of
  a frame and restarts. It counts how often each mechanism occurred: frames
  read in each layout, whole-word and feedback writes, reversed addresses, and
  restarts. A mechanism that never occurred counts as a failure. The stimulus
  and checker are in `tb/br_stream_check.sv`.
* `tb/tb_par_bitrev_full.sv` runs the default-size top through three frames
  and checks the 8-cycle latency.
* `tb/tb_br_addr_gen.sv`, `tb/tb_block_ram_sp.sv`, `tb/tb_br_bank_in_mux.sv`
  and `tb/tb_br_out_sel.sv` test the parts on their own.

All testbenches pass with Verilator 5. Verilator's `-Wall` lint and the slang
front end of Yosys accept every file in `rtl/` without warnings.

## Changing the size

Set `N`, `P` and `W` on `par_bitrev`. The bank depth (`N/P²`), the counter
width and the address width follow from them. The bank contents are not
reset: while `valid_out` is low, `y_out` shows whatever the banks held, and
every word is fully rewritten during the first frame.
