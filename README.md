# Bit-plane and pass parallel JPEG 2000 block coder

JPEG 2000 spends most of its encoding effort in the embedded block coder
(EBCOT tier 1). It codes each 32×32 code-block one magnitude bit-plane at a
time, from the most significant plane down. Each plane is scanned three times,
once for each coding pass:

- significance propagation (SP);
- magnitude refinement (MR);
- cleanup (CU).

Every modelled bit becomes a context/decision pair (CX-D) for an MQ arithmetic
coder. Done in that order, one block of ten planes takes roughly thirty scans
of 1024 bits.

This design removes that serial order in two ways:

- **Every bit-plane has its own coder.** Ten bit-plane coders (BPCs) work on
  the same code-block at once. A plane only needs the final coefficient states
  of the plane above, and only in the neighbourhood of the bits it is coding.
  So each coder runs about one stripe and one column behind the coder above it.
  The states flow down the chain through small FIFOs.
- **The three passes of a plane overlap.** In one step a coder runs the SP
  pass on one stripe column and the MR and CU passes on the column one stripe
  and one column behind it. By then the SP results that MR and CU depend on are
  known. Pass decisions are rewritten so that they only use states known at
  that moment.

Both JPEG 2000 context modes are supported: the regular mode and the
vertically causal mode.

Around the block coder sits the encoding datapath of a codec:

1. RGB→YCbCr conversion;
2. level shift;
3. a 5/3 wavelet transform;
4. a dead-zone quantiser;
5. a writer that stores quantised coefficients into a multi-bank code-block buffer.

The code words of every pass of every plane land in a bit-stream buffer, and
can be read back from there.

## The coder chain

```
 code-block buffer (4 banks × 11 planes)          bit-stream buffer
   sign plane ─► bps_feeder ─► FIFO ─► BPC9 ─────────► area 9 (SP, MR, CU)
   plane 9 ──────────────────────────┘   │ FIFO
   plane 8 ─────────────────────────► BPC8 ─────────► area 8
   ...                                   ...
   plane 0 ─────────────────────────► BPC0 ─────────► area 0
```

- The sign-plane feeder starts each block. It pushes one item per stripe column
  into the top coder's FIFO: four sign bits and four "insignificant" states.
- Each coder pops the item for a column from its upper FIFO. When it has
  finished that column, it pushes the column's final states into its lower
  FIFO.
- A coder stops when its upper FIFO is empty or its lower FIFO is full
  (`stall_up`, `stall_low`). These two conditions are the only
  synchronisation between planes. There is no global schedule.
- Coders do not wait for each other at block boundaries. When one coder
  finishes a block, it goes straight on to the next bank.

### Coefficient states

Two bits per coefficient replace the usual three flags (significant, visited,
refined):

| state | meaning |
|---|---|
| 0 | not significant |
| 1 | became significant in this plane's SP pass (so MR must skip it here) |
| 2 | significant, not yet refined |
| 3 | significant, refined at least once |

After the CU pass a coefficient in state 1 becomes state 2, and one refined in
this plane becomes state 3. So only 0, 2 and 3 travel down the chain. The MR
context "first refinement" is just state 2.

## Inside a bit-plane coder (`bpc`, `pp`, `ssb`, `cxd`, `mqc`)

A code-block is 8 stripes of 4 rows × 32 columns. Columns are numbered
linearly, j = stripe·32 + column. A coder walks steps s from −33 to 288. In
step s it does three things:

- It takes the upper plane's column s+33 from the U-FIFO into its stripe
  buffer. That is stripe n+1, column l+1 relative to the SP column.
- It runs **SP** on column s (stripe n, column l).
- It runs **MR and CU** on column s−33 (stripe n−1, column l−1). It then
  sends that column to the lower plane.

The stripe buffer (`ssb`) is a ring of four stripe slots. Each slot holds four
fields:

- the upper plane's states and signs;
- the SP results, with PD1, the "was insignificant before SP" flag;
- the magnitude bits;
- the CU results.

The pre-processor (`pp`) builds a 6×3 neighbourhood window for each of the two
columns:

- **SP window.**
  - Above the stripe: the SP results of the stripe above.
  - Left: this plane's SP results.
  - Right, and below the stripe: the upper plane's final states. They are
    still valid for this plane's SP pass, because nothing there has been
    coded yet.
- **MR/CU window.**
  - Already-coded positions: CU states.
  - Later positions: SP states.
  - The row below at column l: the SP result computed in this same step.

A coefficient is coded in CU when PD3 = "still insignificant after SP and not
coded by SP" holds. The run-length mode of CU (four insignificant,
neighbour-free bits) is detected on the same window. It produces the RL
decision and, if the run has a 1, the two uniform-context decisions for its
position.

Each step yields up to 19 CX-D pairs, in the order a sequential coder would
produce them within each pass:

| entries | what they hold |
|---|---|
| 0–7 | ZC and SC of the four SP rows |
| 8 | run-length |
| 9–10 | uniform |
| 11–18 | MR, or ZC and SC, of the four MR/CU rows |

`cxd` holds the context rules for zero coding, sign coding and refinement. The
pairs of a step go to the MQ coder two per clock: a zero-coding or refinement
decision together with its sign decision, or the two uniform decisions. A step
therefore costs max(1, modelled bits) clocks. The next step may fire as soon
as the last pair of the current step leaves.

`mqc` holds three complete MQ encoder states, one per pass. Each state has its
own 19 contexts, A and C registers, bit counter and pending byte. Pairs of
different passes never share a clock. At the end of a block each pass is
flushed and re-initialised, so every plane produces three separately
terminated code words. Bytes leave one clock after the pair that produced them.
Up to four bytes per clock go into the coder's area of the bit-stream buffer.

## Buffers and bank synchronisation (`cbb`, `bsb`)

The code-block buffer holds 4 banks. Each bank has 10 magnitude planes and 1
sign plane, stored as 256 four-bit stripe-column words. That is 45,056 bits.
Every plane has its own read port, so all ten coders and the feeder read in
parallel.

Each bank carries two valid bits:

- `val_top` is cleared when the feeder and the top coder have finished the
  block.
- `val_bot` is cleared when coder 0 has finished it.

The external writer may fill a bank only when both bits are clear. Filling the
last coefficient sets both. The writer fills banks round-robin. If it finds no
free bank, the codec raises the sticky `overrun` flag and the coefficient is
lost.

The bit-stream buffer has one section per bank. Each section has an area per
plane, and each area holds one stream per pass. The lengths and an overflow
flag are readable per stream. When coder 0 finishes a block, `cb_done` pulses
and `cb_sec` names the section to read. That section stays intact until a new
block has gone through the same bank.

## Front end (`ccnv`, `dwt53`, `quant`, `jp2k_codec`)

- **`ccnv`** is the reversible colour transform:
  - Y = ⌊(R+2G+B)/4⌋, Cb = B−G, Cr = R−G;
  - the inverse recovers RGB exactly.
- **`dwt53`** is one level of the reversible 5/3 lifting transform on a line,
  with symmetric extension. It stores a line, then streams the low-pass half
  followed by the high-pass half, one coefficient per clock. The inverse takes
  that order back.
- **`quant`** is a dead-zone quantiser with step 2^shift. It outputs sign and
  magnitude, and saturates the magnitude at 10 bits. The inverse uses midpoint
  reconstruction.
- **`jp2k_codec`** wires these together:
  - it selects Y−128, Cb or Cr;
  - it transforms each 32-pixel line;
  - it quantises the coefficients;
  - it writes each group of 32 transformed lines as one code-block.

  `band` and `vcausal` tell the block coder which sub-band context rules and
  which mode to use.

All three front-end blocks also have their inverse direction, selected by an
`inverse` input. The top uses only the forward direction.

## What differs from a complete codec

- **Throughput.** A step takes one clock only when it models at most one bit.
  On sparse code-blocks the coder chain averages about 1.2 clocks per
  coefficient. At 160 MHz that is about 133 Msamples/s. This is enough for
  1080p30 4:2:2 (124 MS/s) but not for 1280×1024 at 60 fps 4:2:2 (157 MS/s),
  which would need a full sample per clock. Dense blocks with many modelled
  bits per column are slower.
- **Transform.** The top applies a single-level horizontal 5/3 transform on
  32-sample lines. Building a 2-D, multi-level transform over 128×128 tiles
  needs the line and wavelet buffers, which are not part of this RTL. The same
  holds for:
  - the video and CPU interfaces;
  - per-pass distortion calculation;
  - the rate control that sits outside the codec.
- **Decoding.** The block coder encodes only. Of the decoding direction only
  the MQ decoder (`mqd`) exists. It decodes one stored pass stream at one
  decision per clock, through a second five-byte read window of the bit-stream
  buffer, with the contexts supplied from the `dec_*` ports of the top. Not
  built:
  - the state-update unit and the decoding-direction bit-plane coder that
    would generate those contexts;
  - speculative decoding of bits that may belong to the SP pass.
- **Buffer sizes.**
  - The stripe buffer keeps four stripes rather than three, with a field per
    pass. It is built from flip-flops: 4.6 kbit per coder.
  - The bit-stream buffer gives every stream a fixed 256-byte area
    (240 kbit in total) instead of packing the streams.
  - A stream that exceeds its area is truncated, and its `ovf` flag is set.
- **Termination.** Every pass is terminated separately: a flush, with
  contexts reset at each block. A trailing 0xFF is not written.

## Files

| file | content |
|---|---|
| `rtl/jp2k_pkg.sv` | sizes, state and CX-D types, MQ probability table, context initial states |
| `rtl/jp2k_codec.sv` | top: colour conversion → transform → quantiser → block coder |
| `rtl/ebc.sv` | block coder: buffer, feeder, ten coders with FIFOs, bit-stream buffer |
| `rtl/cbb.sv`, `rtl/bsb.sv` | code-block buffer, bit-stream buffer |
| `rtl/bps_feeder.sv`, `rtl/bpc_fifo.sv` | sign-plane feeder, inter-plane FIFO |
| `rtl/bpc.sv`, `rtl/pp.sv`, `rtl/ssb.sv`, `rtl/cxd.sv`, `rtl/mqc.sv` | bit-plane coder and its parts |
| `rtl/ccnv.sv`, `rtl/dwt53.sv`, `rtl/quant.sv` | front end, both directions |
| `rtl/mqd.sv` | MQ decoder for one pass stream |
| `tb/ebcot_ref_pkg.sv` | sequential reference: MQ coder and three-pass block coder |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each testbench compares its module with an independent model and prints
`TB_RESULT checks=N failures=M`. It also has a watchdog.

- **Reference model.** The block-coder tests use `ebcot_ref_pkg`. It is a
  plain sequential coder: one plane after another, SP, then MR, then CU, with
  a byte-oriented MQ encoder.
- **`tb_pp`** checks the order of CX-D pairs per pass, and the states handed
  down, against the reference for every plane.
- **`tb_mqd`** decodes reference-encoded streams, from nearly constant to
  random decisions, and checks every decision.
- **`tb_bpc`** runs one coder with random FIFO back-pressure and compares its
  code words with the reference.
- **`tb_ebc`** codes blocks of many kinds through the whole chain and compares
  every stream byte. It covers:
  - sparse and dense blocks;
  - LL, HL and HH sub-bands;
  - regular and vertically causal mode.

  It also checks the coefficient rate on sparse blocks (at most 1.25 clocks per
  sample), and that stalls happened.
- **`tb_jp2k_codec`** runs the top at its default size. It sends RGB pixels at
  half rate and then at full rate, and checks:
  - every stream against a model of the whole datapath;
  - a change of quantiser step;
  - the sub-band and mode change;
  - stalls in both directions;
  - writes that wait for a bank;
  - an overrun;
  - decoding of stored pass streams back to the reference decisions.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert --top-module tb_ebc -y rtl -y tb +libext+.sv \
  rtl/jp2k_pkg.sv tb/ebcot_ref_pkg.sv tb/tb_ebc.sv
./obj_dir/Vtb_ebc
```

The packages go first on the command line; the modules are found by name.
`tb_jp2k_codec` takes about a
minute to build and a few seconds to run.
