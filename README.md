# F-ABRC: a multiplication-free adaptive binary range coder

An adaptive binary arithmetic coder (the entropy-coding back end of CABAC-style
image and video codecs) has to do two things for every binary symbol:

1. estimate the probability of the symbol from the statistics of its context, and
2. split the current coding interval in proportion to that probability.

Usual hardware coders (the M-coder of H.264/HEVC, the MQ-coder of JPEG 2000)
do both with lookup tables: a state machine for the probability and a table
of precomputed products for the split. This design needs neither. The
probability comes from an **imaginary sliding window** (ISW) counter, one
register per context. The interval split uses a product of range and
probability that is **approximated with one shift and two conditional
additions**. The encoder codes up to `NSYM` symbols per clock cycle in a
three-phase pipeline. A matching one-symbol-per-cycle decoder is included.

The method follows the published F-ABRC algorithm and its block diagrams
(S. T. Mrudula, K. E. Srinivasa Murthy, M. N. Giri Prasad, "Multiplication
free Fast-Adaptive Binary Range Coder using ISW", IJEER 11(1), 2023). That
publication leaves many details open: register widths, the window length,
renormalisation, carry handling, the byte packer, termination and the
decoder. These were designed here; the section
[What is taken from the method and what was chosen here](#what-is-taken-from-the-method-and-what-was-chosen-here)
lists them.

## The coding step

Two parameters define the arithmetic:

* `d`: the range register `X` holds `d-1` bits. After every symbol it is
  renormalised into `[2^(d-2), 2^(d-1))`.
* `bl`: the imaginary window holds `2^bl` symbols.

Each context keeps a state `{MPS, no}`. `MPS` is the currently more probable
symbol. `no` is the window's count of the *less* probable symbol (LPS), scaled
by `alpha * 2^(d-1)` with `alpha = 9/16`. The LPS probability is therefore
`p = no / (alpha * 2^(d-1) * 2^bl)`, and it is kept at or below 1/2.

### Interval split without a multiplier

The LPS part of the range should be `T = X * p`. Renormalisation keeps `X` in
one octave, so the method quantises `X` to four points,
`(9, 11, 13, 15)/16 * 2^(d-1)`. It then takes the product relative to the
first point:

```
delta = (X - 2^(d-2)) >> (d-4)            -- 0..3: which quarter of the octave X is in
T     = max(1, (no + delta*(no>>2)) >> bl)
```

`delta*(no>>2)` is `(no>>2)` and/or `(no>>2)<<1`, each added only when the
matching bit of `delta` is set. There is no multiplier and no table. With
`no <= alpha*2^(d-2)*2^bl`, `T` is always below `2^(d-2) <= X`, so both
sub-ranges are non-empty.

### Range, low and context update

```
X = X - T
if symbol == MPS:                       -- MPS takes the lower part
    no = no - ((no + 2^(bl-1)) >> bl)   -- counter decays by 1/2^bl
else:                                   -- LPS takes the upper part
    Y  = Y + X
    X  = T
    no = no + ((A - no + 2^(bl-1)) >> bl)        -- A = alpha*2^(d-1)*2^bl
    if no > A/2:                                  -- LPS became the more likely symbol
        MPS = !MPS
        no  = A - no
renormalise: shift X left until bit d-2 is set; shift Y by the same amount
```

The counter update is the ISW rule `no' = (1 - 1/2^bl) * no + s`, rounded and
scaled. The "imaginary" window drops the *average* symbol rather than the
oldest one, so no window contents need to be stored. When the LPS count passes
one half, the roles of the two symbols swap and the count is mirrored.

**Bypass** symbols (encode mode `EM_BYPASS`) use `T = X >> 1`. Symbol 1 takes
the upper half, and no context is read or written.

A new stream starts with `X = 2^(d-1) - 1`, `Y = 0`, and every context at
`p = 1/2` (`no = A/2`, `MPS = 0`).

## Getting bits out: low register, carries and bytes

This is the least obvious part of the design.

`Y` is the low end of the interval. It is `d-1` bits wide and is measured in
the frame that follows the bits already produced. Adding `X - T` to it can
overflow. The overflow is a **carry into bits that have already left**, so
every stage after the low operation carries one extra carry bit with its data:

* **LO (`lo_unit`)** forms `Y + add` (`d` bits) and shifts it left by the
  renormalisation shift `s`. The bits that leave form the chunk
  `(Y + add) >> (d-1-s)`: `s` code bits plus, at weight `2^s`, the carry.
  Appending a chunk to the produced stream `E` is the arithmetic
  `E' = E*2^s + chunk`.
* **Outcome combination (`outcome_comb`)** merges the chunks of the `NSYM`
  lanes of a cycle with the same rule: shift the running value left by the
  next lane's shift, then add that lane's chunk. The interval only shrinks,
  so at most one carry leaves a whole cycle. The result is
  `total_shift + 1` bits.
* **Input limit buffer (`input_bl`)** keeps unpacked bits in `Buffer`, with
  their count in `No_Buffer`. It appends each merged chunk below them. A carry
  out of the top goes on to the byte packer. When more than 8 bits are held,
  the 8 MSBs go to the byte packer; at most one byte leaves per cycle. Long
  LPS runs can produce more than 8 bits per cycle. Then the buffer
  (`NSYM*(d-1) + 8` bits) fills up and `in_ready` stalls the whole pipeline
  until it has drained.
* **Byte packing unit (`bpu`)** makes the carries final. It holds back the
  newest byte that a carry could still change (the *cache*) and counts the
  `0xFF` bytes after it. A carry turns `cache, FF, FF, ...` into
  `cache+1, 00, 00, ...`. The cache is released when a byte other than `0xFF`
  arrives, or when a carry arrives. Each output event is therefore
  `out_byte` followed by `n_stuff` copies of `stuff_byte` (`0xFF`, or `0x00`
  when a carry rippled through the run). An assertion checks that a carry
  never reaches a byte that has already been released. The interval bound
  rules this out.

**Flush** ends a stream. The whole of `Y` is shifted out as one chunk of
`d-1` bits, and the last byte is zero-padded. The cache and its run are
released, and `done` pulses. The range, the low register and all contexts
then start afresh for the next stream. Any bit string that begins with the
emitted bytes decodes correctly, including the zero bits a decoder reads
past the end.

## The multi-symbol pipeline

```
             phase 0                        | phase 1                     | phase 2
lane 0  ctx_mem -> CU&RO --X--> CU&RO ...   | LO --Y--> LO ...            |
                    |  ^ forwarding mux     |   \        \                |
                    v  |                    |   outcome combination  ---> | input_bl -> bpu -> bytes
           Add-to-low, R-Shift per lane  [reg]  Total bits, Total shift [reg]
```

* **Phase 0**: `NSYM` `cu_ro` units in a chain. Lane `i` starts from the range
  that lane `i-1` produced. Its context state comes from `ctx_mem`. If a
  lower lane in the same cycle uses the same context, the state comes instead
  from that lane's updated output (a forwarding multiplexer), so the result
  equals coding the symbols one after another. The range register and the
  contexts are written at the end of the cycle. Each lane's Add-to-low and
  R-Shift are registered.
* **Phase 1**: `NSYM` `lo_unit`s in a chain on the low register, then
  `outcome_comb`. The merged chunk is registered.
* **Phase 2**: `input_bl` and `bpu`.

The longest path is the phase-0 chain: per lane one 2-bit-selected add, a
subtract, a leading-one detector and a shifter. Raising `NSYM` raises the
symbols per cycle and lowers the reachable clock. With `NSYM = 1` the
forwarding logic disappears.

Latency: a symbol taken at edge *k* is in phase 1 at *k+1* and in the input
buffer at *k+2*. A byte that it completes appears on `out_byte` two or more
cycles later. It can appear much later, because a byte is held back until it
can no longer change.

## The decoder

`fabrc_decoder` decodes one symbol per cycle. It runs the same `cu_ro` logic
twice: once assuming the symbol is the MPS, once assuming it is the LPS. The
LPS instance's Add-to-low output is exactly `X - T`. The decoder keeps
`V = code - low`; `V >= X - T` means LPS, and then `V -= X - T`. The chosen
instance supplies the new range, the context update and the shift `s`. `V` is
shifted left by `s` and refilled from a bit buffer of `d-1+16` bits that takes
one byte per cycle. A symbol is decoded only when at least `d-1` bits are
buffered. The source must send zero bytes after the end of a stream. The
decoder must be given the same sequence of (mode, context) as the encoder.

## Interfaces

### `fabrc_encoder`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid` / `in_ready` | in / out | 1 | a group of symbols (or a flush) is offered / taken at this edge |
| `flush` | in | 1 | the group is a flush: ends the stream, lanes ignored |
| `lane_valid` | in | `NSYM` | lane carries a symbol (lanes are coded in order 0, 1, ...) |
| `lane_sym` | in | `NSYM` | the symbols |
| `lane_em` | in | `NSYM` x `em_t` | `EM_REGULAR` or `EM_BYPASS` |
| `lane_ctx` | in | `NSYM` x `log2(NCTX)` | context index |
| `out_valid` | out | 1 | an output event |
| `out_byte` | out | 8 | first byte of the event |
| `stuff_byte`, `n_stuff` | out | 8, 16 | then `n_stuff` copies of `stuff_byte` |
| `done` | out | 1 | the flushed stream is complete (comes with or after its last event) |

`in_ready` depends only on the pipeline state. It is low while the input
buffer is full or a flush is draining.

### `fabrc_decoder`

`start` (one cycle) begins a stream. Code bytes come on `in_valid`/`in_byte`
and are taken when `in_ready` is high. A symbol is requested with
`req_valid`, `req_em` and `req_ctx`, and the request is taken when
`req_ready` is high. `sym_out` is valid with `sym_valid` one cycle later.

### `fabrc_codec` (top level)

The encoder and the decoder side by side, with shared `clk`/`rst_n`.
Encoder ports are prefixed `enc_` and decoder ports `dec_`.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `D` | 16 | `d`: range register `d-1` = 15 bits; ISW counter `d+bl-1` = 20 bits |
| `BL` | 5 | `bl`: window of 32 symbols |
| `NSYM` | 2 | encoder lanes (symbols per cycle) |
| `NCTX` | 16 | contexts |

All four are this design's choices. The method leaves them open. `D >= 6`
and `BL >= 1` are required. Configurations with 1, 3 and 4 lanes, and with
`(D, BL)` = (12, 4) and (24, 7), are tested. At the defaults, a coarse yosys
synthesis gives the encoder about 310 word-level cells and 548 flip-flops
(336 of them for the contexts). The decoder has about 170 cells and 406
flip-flops.

## What is taken from the method and what was chosen here

Taken from the method:

* the ISW estimator
* the `alpha = 9/16` scaling
* the four-point quantisation with `delta` and the shift-and-add product
* the counter update and the MPS switch
* LPS coding in the upper part of the range
* the three-phase structure with chained CU&RO and LO units
* context forwarding multiplexers
* the shift-and-add outcome combination
* the limit buffer with `Buffer`/`No_Buffer` that passes 8 MSBs when it
  holds more than 8 bits
* a byte packer with byte, stuff and stuff-count outputs.

Two lines of the published algorithm are read as follows:

* The `delta` shift is `d-4`.
* The step after the MPS switch is `no = A - no`.

Chosen here:

* `d`, `bl`, `NSYM`, `NCTX`
* bit-wise renormalisation
* the carry bit carried through phases 1 and 2
* the byte packer's cache-and-count carry resolution, and the meaning of its
  three outputs
* the buffer size and the stall handshake
* bypass as an exact half split
* the initial state
* stream termination, and context reset per stream
* asynchronous reset
* the whole decoder.

How well it compresses: with the default window of 32 symbols, the learning cost measured on
stationary sources is 0.011 to 0.021 bit/symbol (for example 0.483 bit/symbol at p = 0.1,
where the entropy is 0.469). A longer window (`BL`) lowers this cost on stationary data but
adapts more slowly to changes.

Not reproduced: the FPGA clock rate (182.75 MHz), the power figures and the
resource comparisons reported for the published implementation. Those belong
to an FPGA build, not to RTL.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The reference models in
`tb/fabrc_ref_pkg.sv` are written independently of the RTL. They use integer
arithmetic with a real multiply, a bit queue into which carries ripple
directly, and a software decoder.

| testbench | what it shows |
|---|---|
| `tb_fabrc_codec` | top level at default parameters. 30 streams, about 120k symbols: the encoder's bytes equal the reference encoder's, and the reference decoder and the RTL decoder both recover every symbol. It requires a stall, forwarding, LPS, MPS switch, bypass, a carry, stuff runs, padding and decoder waits to each occur |
| `tb_fabrc_encoder` | encoder alone, same checks |
| `tb_fabrc_encoder_configs` | encoder with 1/3/4 lanes and other `d`, `bl`, `NCTX` (via `enc_harness`) |
| `tb_fabrc_efficiency` | compression on stationary sources (p = 0.01 ... 0.9, 40000 symbols each, default parameters): coded size is 0.011 to 0.021 bit/symbol above the entropy; checked bound 0.04 |
| `tb_fabrc_decoder` | decoder on reference-encoded streams, with random byte and request gaps |
| `tb_cu_ro` | 20k random and corner cases of the symbol step |
| `tb_lo_unit`, `tb_outcome_comb` | chunk arithmetic, including carries |
| `tb_input_bl` | bit-exact stream rebuild with carries, stalls and flush padding |
| `tb_bpu` | carry resolution, `0xFF` and `0x00` stuff runs, lone carries |
| `tb_ctx_mem` | reads, writes, write conflicts, init |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_fabrc_codec \
    rtl/fabrc_pkg.sv tb/fabrc_ref_pkg.sv -y rtl -y tb tb/tb_fabrc_codec.sv
./obj_dir/Vtb_fabrc_codec
```

Change `tb_fabrc_codec` to run any other testbench. Each takes well under a
second.

## Files

* `rtl/fabrc_pkg.sv`: encode-mode type and width helpers
* `rtl/cu_ro.sv`: context update and range operation for one symbol
* `rtl/ctx_mem.sv`: context store
* `rtl/lo_unit.sv`: low operation
* `rtl/outcome_comb.sv`: merges the lanes' chunks
* `rtl/input_bl.sv`: input limit buffer
* `rtl/bpu.sv`: byte packing unit
* `rtl/fabrc_encoder.sv`: the multi-symbol encoder
* `rtl/fabrc_decoder.sv`: the decoder
* `rtl/fabrc_codec.sv`: top level
* `tb/`: testbenches, the reference models (`fabrc_ref_pkg.sv`) and the
  encoder harness (`enc_harness.sv`)
