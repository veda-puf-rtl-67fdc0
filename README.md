# Veda-PUF: a controlled arbiter PUF with Ghanapatham key expansion

A physical unclonable function (PUF) derives a device key from manufacturing
variation instead of storing it. For an arbiter PUF the key length is tied to
the hardware: one arbiter chain per key bit, so 128 chains for a 128-bit key.
Veda-PUF is a *controlled* PUF. A controller puts a bit-expansion step in front
of the PUF and feeds the PUF's own answers back as new, longer challenges. The
expansion copies the way Vedic texts are recited in *Ghana* form: each group of
three words is repeated in a fixed 13-word pattern. Starting from one 128-bit
response, two rounds of expansion give a 21352-bit key (2669 bytes). The
hardware is still only 128 arbiter PUFs.

This repository holds synthesizable SystemVerilog for the controller, the
expander and the key buffers. It also holds a behavioural model of the arbiter
PUF array, with self-checking testbenches for each.

## Key generation in three PUF passes

```
 C1 (128 b) --PUF--> R1 (128 b)
 R1 --Ghana--> PC1 (1644 b)  --PUF, 128 b at a time--> R2 (1644 b)     pre-processing
 R2 --Ghana--> PC2 (21352 b) --PUF, 128 b at a time--> R3 (21352 b)    post-processing
 R3 = final key
```

The host supplies only C1. No expanded challenge is ever exposed at the host
port. Only the final key R3 can be read, once `done` is high.

## The Ghana expansion (`ghana_expander`)

For an input stream b1 … bn, a 3-bit window slides over the stream one bit at
a time. For each window (bi, bi+1, bi+2), i = 1 … n-2, the expander emits 13
bits:

```
[bi, bi+1] [bi+1, bi] [bi, bi+1, bi+2] [bi+2, bi+1, bi] [bi, bi+1, bi+2]
```

No full window is left at the end of the stream. The last two bits are then
recited in the shorter *Jata* form, as 6 bits:

```
[bn-1, bn] [bn, bn-1] [bn-1, bn]
```

The output length is therefore 13·(n-2)+6. For n = 128 that is 1644, and for
n = 1644 it is 21352. `veda_puf_pkg::ghana_len()` and `expanded_len()` compute
these lengths, and all buffer sizes follow from them.

In hardware the expander is a small state machine:

- a 3-bit window register;
- a step counter that walks the 13-entry or the 6-entry pattern. Each pattern
  entry names the window position to send out.

After a Ghana group the window shifts by one and takes in the next input bit.
If that group's window already held the last input bit, the Jata group of the
final pair follows instead. The expander has valid/ready streams on both sides
and a `last` flag. It sends one bit per cycle and takes one input bit per 14
cycles. The testbench checks the 14-cycle window time. A 1-bit stream is passed
through unchanged. The algorithm never produces one.

## The controller (`veda_puf_controller`)

The controller holds the expander and two `key_buffer` memories (167 × 128
bits each), which it uses in ping-pong:

1. On `start` it applies C1 to the PUF and writes R1 to buffer 0.
2. In each round it reads the current response from one buffer, bit 0 of
   word 0 first, and feeds it to the expander one bit at a time. A one-word
   prefetch register handles the one-cycle read latency.
3. It packs the expanded bits into 128-bit challenge words, bit 0 first. It
   launches the PUF on each full word, and on the final partial word padded
   with zeros.
4. It writes each 128-bit answer to the next word of the other buffer. In the
   answer to the padded word, it clears the bits beyond the chunk's length. A
   response therefore has exactly as many bits as its challenge.
5. The expander is stalled while the PUF evaluates a word. The input side keeps
   prefetching.

After `ROUNDS` = 2 rounds the key sits in buffer 0. `key_len` gives its length,
and key bit b is bit b mod 128 of word b / 128.

With the array model's one-cycle evaluation, a full key takes 25 124 cycles:
one cycle per expanded bit (1644 + 21352), one cycle per input bit per window,
and about three cycles for each of the 181 PUF evaluations.

## The arbiter PUF model (`arbiter_puf_cell`, `arbiter_puf_array`)

A real arbiter PUF cannot be written in RTL, because its answer comes from
uncontrolled silicon delays. `arbiter_puf_cell` is a behavioural model that
keeps the structure of the real part:

- Two paths run through `STAGES` = 128 switch stages. Each stage is a
  multiplexer pair: select 0 sends both paths straight on, select 1 swaps them.
- A D flip-flop arbiter takes the top path as data and the bottom path as
  clock. It outputs 1 if the top edge arrives first. A tie counts as 0.
- Each multiplexer input has a fixed delay of 100 ± 8 units. The offsets come
  from a hash of the cell's `SEED`.

When `launch` is high, the cell adds up the arrival times of both paths along
the chain. The result is registered, so the response comes one cycle after
`launch`.

`arbiter_puf_array` holds 128 cells that share one challenge. Each cell's seed
is a hash of `DEVICE_SEED` and the cell index, so one `DEVICE_SEED` stands for
one chip.

The model has no noise and no ageing, so it is 100 % reliable by construction.
If it is synthesised, it becomes a fixed logic function of the challenge, not
a PUF. On silicon or an FPGA, replace the array with a real arbiter PUF that
has the same `launch` / `challenge` / `response` / `resp_valid` ports. The
controller accepts a `resp_valid` that comes any number of cycles after the
launch.

## Key quality in simulation

`tb_veda_puf_metrics` generates 1000 full keys on one model chip from random
challenges. It asks 50 of the challenges again, and runs a second chip
(`DEVICE_SEED` = 2) on 100 of the challenges. Results from the model:

| measure | 128-bit first response R1 | 21352-bit final key |
|---|---|---|
| uniqueness (mean pairwise Hamming distance, 1000 keys) | 49.86 % (σ 5.24 %) | 48.70 % (σ 0.82 %) |
| randomness (share of zeros) | 50.12 % | 50.28 % (σ 0.30 %) |
| reliability (repeated challenges) | — | 100 % |
| distance between two chips, same challenge | — | 49.98 % |

For comparison, the figures reported for the FPGA prototype are:

- uniqueness 50.002 % before and after processing;
- randomness 50.29 % before and 50.27 % after processing;
- reliability 99.9 %.

In this model the final keys are slightly less unique (48.7 %) than the first
responses. The expansion repeats each input bit many times, and neighbouring
128-bit challenge words overlap in content. So two final keys share more than
two random strings would. Whether silicon shows the same effect depends on the
real PUF, which the model cannot answer.

## Interface of `veda_puf_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | begin a key generation (ignored while `busy`) |
| `challenge` | in | 128 | C1, sampled with `start` |
| `busy` | out | 1 | generation in progress |
| `done` | out | 1 | key ready; stays high until the next `start` |
| `key_len` | out | 32 | key length in bits (21352) |
| `key_rd_addr` | in | 8 | key word to read (0 … 166) |
| `key_rd_data` | out | 128 | that word, one cycle later; bits past the key are 0 |

The parameter `DEVICE_SEED` selects the modelled chip. The widths come from
`veda_puf_pkg` (`KEY_W` = 128, `ROUNDS` = 2). The controller and buffers also
take smaller `KEY_W_P` / `ROUNDS_P` values. `KEY_W_P` must be a power of two.

## Design choices not fixed by the algorithm

- **Controller location.** The controller is hardware. A processor could run
  the same sequence in software.
- **Chunking and bit order.** Chunks are 128 bits, bit 0 first, with zero
  padding. A challenge of L bits gives L response bits. This is the reading
  under which 128 bits grow to about 2.5 KB in two rounds.
- **Handshakes and latencies.**
  - Host port: start / busy / done.
  - Expander: valid/ready on both sides.
  - Arbiter array: one-cycle `launch` → `resp_valid`.
- **Arbiter details.** Chain length of 128 stages and the shared challenge
  across the 128 cells.
- **Variation model.** The hash-based delay model and its 100 ± 8 delay
  numbers.
- **Not modelled.** The processor and the channel between it and the PUF are
  not part of this RTL. The top's ports stand in for that channel.

## Files

- `rtl/veda_puf_pkg.sv`: constants (`KEY_W`, `ROUNDS`), length functions and
  the `mix32` hash.
- `rtl/ghana_expander.sv`: the Ghana/Jata expansion described above.
- `rtl/key_buffer.sv`: 1-write 1-read word RAM with synchronous read.
- `rtl/veda_puf_controller.sv`: the key-generation sequencer, which contains
  the expander and two buffers.
- `rtl/arbiter_puf_cell.sv`, `rtl/arbiter_puf_array.sv`: behavioural arbiter
  PUF.
- `rtl/veda_puf_top.sv`: controller plus PUF array.
- `tb/veda_ref_pkg.sv`: reference models of the expansion, the arbiter race
  (as a running delay difference) and the whole key algorithm.
- `tb/tb_*.sv`: one self-checking testbench per module. `tb_veda_puf_top` is
  the end-to-end test at full size. `tb_veda_puf_metrics` is the key-quality
  evaluation. `tb_veda_puf_controller_small` runs the controller with 16-bit
  words and three rounds (16 → 188 → 2424 → 31492 bits).

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For example,
the end-to-end test (four full keys, under a second):

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/veda_puf_pkg.sv tb/veda_ref_pkg.sv rtl/key_buffer.sv rtl/ghana_expander.sv \
  rtl/veda_puf_controller.sv rtl/arbiter_puf_cell.sv rtl/arbiter_puf_array.sv \
  rtl/veda_puf_top.sv tb/tb_veda_puf_top.sv --top-module tb_veda_puf_top
./obj_dir/Vtb_veda_puf_top
```

`tb_veda_puf_top` also counts each mechanism and fails if one never occurs:

- first response;
- pre-processing and post-processing rounds;
- Jata tails;
- padded final chunks;
- expander stalls;
- response-word fetches.

`tb_veda_puf_metrics` takes about 90 seconds. Synthesis of the full 128-cell
array is slow, because each cell unrolls to a 128-stage adder chain.
