# Fast-SSC polar decoder for length-1024 codes, with dedicated low-rate nodes

Successive-cancellation (SC) decoding of a polar code walks a binary tree.
There is one tree level per factor of two in the code length. Each leaf is one
bit, so a plain SC decoder for N = 1024 spends well over a thousand steps per
frame. Fast-SSC decoding prunes the tree. When a subtree's pattern of frozen
and information bits forms a code with a cheap maximum-likelihood decoder, the
whole subtree is decoded in one step. Such codes are rate-0, rate-1,
repetition, single-parity-check (SPC) and a few fixed concatenations of them.

Low-rate codes (rate 1/2 and below) keep producing a few short patterns that
plain Fast-SSC must still split. This design adds one-cycle decoders for
three of them:

| node     | frozen pattern (0 = frozen, 1 = information) | decoded as                          |
|----------|-----------------------------------------------|-------------------------------------|
| Rep1     | `0001 1111`                                   | repetition(4) then rate-1(4)        |
| 0RepSPC  | `0000 0000 0001 0111`                         | rate-0(8) then RepSPC(8)            |
| 001      | `0000 0011`                                   | rate-0(4) then `0011`               |

It also lets the repetition decoder handle up to 32 bits instead of 16.
Together with the usual nodes (rate-0, rate-1, Rep, SPC, RepSPC `0001 0111`,
0SPC `0000 0111`, 01 `0011`), a (1024, 512) code then takes about 150 cycles
per frame.

The decoder works like a small processor. The pruned tree of a code is
compiled into a program of node instructions, held in an instruction memory.
To decode a different length-1024 code, load a different program; no RTL
changes.

## Architecture

```
 in_llr (32 x 5 bit) --> channel_ram ---------+        +--> codeword_ram --> out_data (32 bit)
        (loader, 2 frames)                    |        |     (2 codewords)
                                              v        |
 prog_* --> controller --instr--> processor (fg_unit, leaf_unit) <--> alpha_ram
            (imem, sequencer)          |                    ^
                                       +---- leaf bits ---> beta_ram (Combine) --+
                                       <---- left-sibling bits for G ------------+
```

| module         | role |
|----------------|------|
| `polar_decoder`| top level, wires the blocks below |
| `controller`   | 1024-entry instruction memory; issues one instruction per cycle; repeats F/G over the chunks of long nodes; ends the frame when the root's bits are produced |
| `processor`    | processing unit: address generation, operand selection, `fg_unit`, `leaf_unit` |
| `fg_unit`      | 128 F/G elements, so 256 LLRs in and 128 out per cycle. F is min-sum; G is `b ± a`, saturated; G_0R forces the left bits to zero |
| `leaf_unit`    | all leaf decoders, selected by the instruction |
| `rep_node`, `spc_node`, `repspc_node`, `rep1_node` | the constituent-code decoders used by `leaf_unit` |
| `channel_ram`  | channel loader plus two frame buffers of 1024 × 5-bit LLRs |
| `alpha_ram`    | LLRs of the nodes on the current tree path: 14 words of 128 × 6 bits |
| `beta_ram`     | bit estimates of the pending left siblings, one per stage; the Combine logic; the G-side read port |
| `codeword_ram` | two buffers of 1024 decoded bits, read out 32 bits per beat |
| `polar_pkg`    | sizes, number formats, instruction format, F/G arithmetic |

### Arithmetic

LLRs use the 6.5.1 format: 6 bits internally, 5 bits from the channel, one
fractional bit. The fractional bit only scales the values; the hardware
treats them as integers.

- **F** on a pair `(a, b)` gives `sign(a)·sign(b)·min(|a|, |b|)`.
- **G** gives `b + a` when the left sibling's bit is 0 and `b − a` when it is 1.
  The result saturates symmetrically to ±31.
- A zero LLR counts as positive, so its hard decision is 0.
- **Repetition:** the bit is the sign of the full-width sum; a zero sum gives 0.
- **SPC:** take hard decisions. If their parity is odd, flip the bit with the
  smallest magnitude. On a tie, the lowest index wins.

Bit `i` of every bit vector is codeword position `i` of its node. Combine
builds the parent's vector from its children:
`β[i] = β_l[i] ^ β_r[i]` and `β[i + n/2] = β_r[i]`.
The root's vector is the estimated codeword `x̂`. For a systematic code, the
information bits are `x̂` at the information positions.

### Memory layout

An alpha word holds 128 LLRs.

- Stage 9 (nodes of 512 LLRs) has 4 words.
- Stage 8 (256 LLRs) has 2 words.
- Stages 7 to 0 have one word each; the node sits in the low lanes.

F or G on a node of 2^s LLRs works as follows:

- **s > 7:** in chunk c it reads words c and c + 2^(s−8), the node's two
  halves, and writes word c of stage s−1. The channel is stage 10 and is read
  from `channel_ram`.
- **s ≤ 7:** it reads one word and pairs lane i with lane i + 2^(s−1).

`beta_ram` keeps `bl[s]`, the last left-child vector of each stage s, and
`cur`, the last vector produced. `cur` holds a right child that is waiting for
a Combine.

## The program

This is the part to understand before using the decoder. Each instruction is
one `instr_t` (15 bits, see `polar_pkg.sv`):

| field         | meaning |
|---------------|---------|
| `op`          | `OP_F`, `OP_G`, `OP_LEAF`, `OP_COMB` |
| `stage`       | log2 of the node length the operation works on (for `OP_COMB`, the length of each child) |
| `leaf`        | leaf decoder (`OP_LEAF` only) |
| `left_zero`   | the left sibling is rate-0. This makes G a G_0R and Combine a Combine_0R |
| `right_child` | `OP_LEAF`: this node is a right child; combine it with its left sibling in the same cycle |
| `from_g`      | `OP_LEAF`: take the input straight from the parent's G / G_0R, in the same cycle. Only for parents of at most 256 LLRs |
| `res_left`    | the vector produced is a left child; keep it in `bl[]` for the parent's G and Combine |

A code is compiled depth-first from the root. `compile_code` in
`tb/polar_tb_pkg.sv` is a complete compiler. For a node of stage s:

1. **The node is a leaf pattern.** Emit one `OP_LEAF`.
   - As a left child, set `res_left`. A rate-0 left child emits nothing.
   - As a right child, set `right_child`, copy the sibling's `left_zero`, and
     set `res_left` if the parent is a left child.
   - As a right child under a parent of at most 256 LLRs, also set `from_g`.
     No G instruction is then needed. A rate-0 right child never needs a G.
2. **Otherwise, split the node.**
   - Emit `OP_F(s)` and compile the left child. Skip both when the left child
     is rate-0.
   - Emit `OP_G(s)`, with `left_zero` if the left child is rate-0. Skip it if
     step 1 fuses G into the right leaf.
   - Compile the right child.
   - If the right child was not itself a leaf, emit `OP_COMB(s−1)`, setting
     `res_left` if this node is a left child.

The instruction whose result has stage 10 (the root) ends the frame. In that
same cycle the codeword is written and the channel buffer is released.

Length limits on leaves: rate-1 and SPC up to 128 bits, repetition 2 to 32
bits, and the fixed lengths of the composite nodes. A rate-0 leaf can be any
length. The compiler splits longer nodes.

## Timing

| instruction                                 | cycles |
|---------------------------------------------|--------|
| F / G on 1024 LLRs                          | 4      |
| F / G on 512 LLRs                           | 2      |
| anything else: smaller F/G, leaf, fused G→leaf→Combine, Combine of any length | 1 |

The F/G rule is N_v / 256 cycles, with a minimum of one. The decoding latency
is the sum of the program's instruction cycles.

If the next frame is already loaded and a second codeword buffer is free
when a frame ends, the program restarts in the next cycle. Frames then decode
back to back, and the throughput is N bits per program length. Otherwise the
controller waits until both are present.

The (1024, 512) test code below needs 153 cycles, or 6.7 bits per cycle. The
same code after five bit swaps needs 137 cycles, or 7.5 bits per cycle.
Loading a frame takes 32 cycles and reading a codeword 32
beats, both shorter than decoding. Two buffers on each side let loading and
reading overlap decoding, so in steady state I/O does not slow the decoder.
Decoding a frame starts only when two things hold:

- a complete channel frame is loaded, and
- a codeword buffer is free.

## Interfaces

- **Program:** write `prog_we`/`prog_addr`/`prog_data` only while `busy` is
  low. An assertion checks this.
- **Channel input:** `in_valid`/`in_ready`, 32 LLRs per beat, `in_llr[j]` is
  position `32·beat + j`, 32 beats per frame. `in_ready` drops while both
  buffers are full.
- **Codeword output:** `out_valid`/`out_ready`, 32 bits per beat, bit `j` is
  position `32·beat + j`, with `out_last` on beat 31.
- **Reset:** `rst_n` is asynchronous and active low. It clears the buffer and
  sequencer state. The memories are not reset, because each location is
  written before it is read.

All memories read combinationally, so no read-during-write bypass is needed.
One consequence: the longest path goes through an alpha-memory read, G, a
leaf decoder, the mux and Combine, in a single cycle.

## How far it follows the published design, and where it departs

Taken from the published design:

- the node set and the frozen patterns
- the Rep1 structure: two speculative G blocks, Sign blocks, a mux on the
  Rep decision, and the low half inverted when that decision is 1
- 001 and 0RepSPC built as G_0R in front of the 01 and RepSPC logic
- P = 256 F/G inputs, the 6.5.1 quantization, 32 LLRs per load cycle
- repetition nodes up to 32 bits
- double-buffered input and output
- a programmable decoder that can take any length-1024 code

Choices of this design:

- The instruction format and the compiler rules.
- The memory word layout and the asynchronous reads.
- The saturation rule and the tie-breaking rules.
- One-cycle Combine, whatever its length.
- Rate-1 and SPC leaves up to 128 bits.
- The 32-bit output width and the valid/ready handshakes.
- The SPC decoder flips the least reliable of *all* bits, which is the ML
  rule, not only an information bit.

The code itself differs. The published latency of 165 cycles belongs to a
specific (1024, 512) code whose frozen set was altered by five bit swaps; that
frozen set is not reproduced here. The tests instead build a (1024, 512) code
from Bhattacharyya reliabilities at Eb/N0 = 2.5 dB. That code takes 153
cycles on this decoder.

`alter_code` in `tb/polar_tb_pkg.sv` then applies the same kind of alteration.
Each of five rounds freezes one of the 24 least reliable information bits and
unfreezes one of the 24 most reliable frozen bits. The pair chosen is the one
that cuts the cycle count most; ties go to the pair with the closest
reliabilities. The rate stays 1/2 and the latency falls to 137 cycles.

The counts are lower than the published ones. That follows from the code and
from the one-cycle Combine, so it is not a like-for-like comparison.

Area, clock frequency and the FPGA results are not modelled.

## Verification

Each module has a self-checking testbench in `tb/<module>_tb.sv`. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog. Expected values
come from `tb/polar_tb_pkg.sv`. That package holds an integer reference
decoder, written as a plain recursion over the tree with only rate-0, rate-1,
repetition and SPC leaves. The composite nodes are therefore checked against
their step-by-step definition, not against a copy of their logic.

`polar_decoder_tb` runs the whole decoder at its default size on two codes:

- the 2.5 dB (1024, 512) code;
- a pattern-built code that exercises every leaf type, Rep(32) and SPC(128).

The program is reloaded between the two codes. For every frame it checks:

- noiseless frames decode to the transmitted codeword;
- noisy frames (Eb/N0 from 1.5 to 3 dB) match the reference decoder bit for bit;
- the latency equals the program's cycle count.

It also counts each mechanism and fails if one never occurs:

- every leaf type;
- the fused G→leaf→Combine path;
- G_0R, Combine_0R and Combine instructions;
- multi-cycle F/G;
- loading during decoding;
- loader back-pressure;
- waiting for a codeword buffer.

`altered_code_tb` decodes the 2.5 dB code and its bit-swapped version on the
full-size decoder. It checks three things: the rate is unchanged, the swapped
code is faster, and every frame has the right latency and matches the
reference.

`error_rate_tb` measures error-correction performance over BPSK/AWGN. It
decodes 200 frames of each code at 1.5, 2.0, 2.5 and 3.0 dB. It checks that
every hardware codeword matches the integer reference and that errors fall
with rising Eb/N0. It prints the FER of the 6.5.1 hardware next to a
floating-point Fast-SSC model on the unquantized LLRs. In one run:

| Eb/N0 | original, 6.5.1 | original, float | altered, 6.5.1 | altered, float |
|-------|-----------------|-----------------|----------------|----------------|
| 1.5 dB | 0.325 | 0.350 | 0.380 | 0.380 |
| 2.0 dB | 0.155 | 0.150 | 0.110 | 0.115 |
| 2.5 dB | 0.030 | 0.035 | 0.020 | 0.020 |
| 3.0 dB | 0.005 | 0.005 | 0.005 | 0.005 |

At this sample size, 6.5.1 quantization costs nothing measurable against
floating point. The altered code shows no measurable loss either. Resolving
the small loss expected at FER 1e-4 needs far more frames.

Run a testbench with Verilator, for example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/polar_pkg.sv tb/polar_tb_pkg.sv tb/polar_decoder_tb.sv --top-module polar_decoder_tb
./obj_dir/Vpolar_decoder_tb
```

The end-to-end test takes a few seconds to build and well under a second to
run.
