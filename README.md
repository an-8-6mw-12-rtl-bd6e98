# Unified vertex / video stream processor

One small programmable core does two jobs in a mobile device: 3-D vertex
shading and the integer-motion-estimation part of video encoding. Three ideas
keep it small and frugal:

* **Adaptive multi-threading (AMT) with data forwarding.** Eight hardware
  threads (one vertex each) share a 2-issue VLIW pipeline. A thread keeps
  the pipeline to itself while forwarding covers its back-to-back
  dependences. It yields only when it issues a long-latency texture load. So a
  few threads hide the latency, where conventional multi-threading switches
  on every instruction.
* **Configurable memory array (CMA).** There are no dedicated buffers. One
  8-bank memory pool, reached through a 4-channel cross-bar, is carved up by
  base/stride registers. For vertex work it holds a stream cache of vertex
  attributes and the constant registers. For motion estimation it holds the
  search window and the current block.
* **Early rejection after transformation (ERAT).** Each triangle is tested
  right after its vertices are transformed, before lighting and texturing.
  The test rejects triangles that are outside the view volume, have zero area
  or face away from the viewer. Their lighting work is skipped.

The target figures this RTL is sized against are 50 MHz, 12.5 Mvertices/s
(4 cycles per vertex transform), 400 MFLOPS in floating point and 800 MOPS in
16-bit fixed point.

## Block map

```
                 tri_idx ──► ┌───────────────── stream_proc ─────────────────┐
                             │ triangle sequencer                            │
  vin_* (vertex memory) ◄──► │   LOOKUP → LOAD → XFORM → ERAT → LIGHT → EMIT │ ──► tri_out_*
                             │      │        │      │       │      │        │
                             │   vcache      │   vliw_core ◄─┼──────┘        │ ◄─► tex_*
                             │ (index/valid/ │   ├ amt_sched │               │
                             │  hit/trans/   │   ├ 2 × simd_alu (fp32_add,   │
                             │  lighted tags)│   │   fp32_mul per channel)   │
                             │               ▼   │ 4 read channels           │
                             │            cma ◄──┘  (8 banks, cross-bar)     │
                             │               erat ◄── positions of 3 threads │
                             └───────────────────────────────────────────────┘
```

| File | What it is |
|---|---|
| `rtl/sp_pkg.sv` | sizes, instruction format (`slot_t`, `bundle_t`), opcodes, operand spaces, fp compare |
| `rtl/simd_alu.sv` | one slot's 4-channel execute unit (fp32 or 2×16-bit per channel) |
| `rtl/fp32_add.sv`, `rtl/fp32_mul.sv` | single-precision adder / multiplier, round-toward-zero |
| `rtl/amt_sched.sv` | thread selection, adaptive or conventional |
| `rtl/vliw_core.sv` | IM–DEC–EXE–WB pipeline, register files, forwarding, hazards, texture loads |
| `rtl/cma.sv` | 8-bank, 4-channel memory pool |
| `rtl/vcache.sv` | vertex cache tags, one entry per vertex thread |
| `rtl/erat.sv` | outside / zero-area / back-face test |
| `rtl/stream_proc.sv` | top: the above plus the triangle sequencer |

## Instruction format

A bundle holds two slots (`s0`, `s1`). Each slot is one SIMD instruction on
4-channel vectors of 32-bit words:

| field | bits | meaning |
|---|---|---|
| `op` | 4 | `NOP MOV FADD FMUL FMAX FMIN DP4 ADD16 SUB16 ABSD16 TXLD END` |
| `act` | 4 | Active Vector: one enable per channel; a cleared channel is gated and yields 0 |
| `modf` | 3 | Modify: [0] negate src0, [1] negate src1, [2] use forwarding |
| `src0`, `src1` | 8 each | [7:6] space (`GPR`, `IN` stream attribute, `CONST`, `ZERO`), [5:0] index |
| `dst` | 8 | [7:6] `GPR` or output register (encoding of `IN`), [5:0] index |
| `wmask` | 4 | per-channel write mask |
| `swz` | 8 | swizzle of src1: result channel *i* reads src1 channel `swz[2i+1:2i]` |

Channel 0 is x and channel 3 is w. Floating point is IEEE single format with
round-toward-zero. Denormals flush to zero, overflow saturates to the largest
finite value, and NaN/∞ get no special treatment. The 16-bit operations treat
each 32-bit channel as two independent halves. That gives 8 operations per
slot per cycle, which is where the 800 MOPS fixed-point figure comes from.
`DP4` multiplies the channels and adds the products as (x + y) + (z + w).
Each addition is rounded toward zero. The sum is written to every active
channel. A channel whose Active Vector bit is clear adds 0, so `act = 0111`
gives a 3-component dot product. `ABSD16` compares the halves as signed numbers. `TXLD` sends channel 0 bits
[15:0] of src0 to the texture memory and later writes the returned vector to
GPR `dst`. `END` retires the thread. The other slot of an `END` bundle still
executes.

Address spaces seen by thread *t*:

* `IN[i]`: CMA word `stream_base + t*stream_stride + i`
* `CONST[i]`: CMA word `const_base + t*const_stride + i`. `const_stride` is 0
  for shaders, where all threads share the constants.
* `GPR[i]`: 8 per thread. Output registers: 8 per thread; output 0 is taken
  as the clip-space position.

## The pipeline, hazards and threads (`vliw_core`)

This is the part that needs the most care when programming or modifying the core.

```
 IM                   DEC                               EXE              WB
 amt_sched picks t →  GPR read (+ bypass)           →   2 × simd_alu  →  GPR / output write
 imem[pc[t]]          CMA reads on 4 channels           TXLD request     (texture data: own port)
 pc[t]++              hazard / bank-conflict stall
```

* **Operand channels.** Slot *s*, source *k* always uses CMA channel 2s+k, so
  one bundle can read up to four stream or constant words in a cycle. If two
  channels hit the same bank at different words, the lower channel wins.
  Reads of the same word are broadcast. The bundle waits in DEC and keeps the
  data already served until all its channels have been served. This is the
  **bank-conflict stall**. Layouts that put a constant and an attribute used
  together in one bank cost one cycle per conflict.
* **Data hazards.** A GPR source that an older bundle of the same thread,
  still in EXE or WB, is going to write is a hazard. If the consuming slot has
  `modf[2]` set, the value is **forwarded**, channel by channel, from the EXE
  result (youngest) or the WB register. Otherwise the bundle **stalls** in DEC
  until the write is done: 2 cycles behind EXE, 1 behind WB. Within a bundle,
  slot 1 counts as the later writer.
* **Clock gating.** The EXE operand registers of a NOP slot, and of every
  channel whose Active Vector bit is clear, are not loaded. In silicon these
  would be gated clocks. Here they are register enables.
* **Threads.** `start`/`start_mask`/`start_pc` activate threads. The
  scheduler only picks *ready* threads: active, and not waiting for texture
  data. A bundle containing `TXLD` parks its thread when the bundle is fetched
  (not later), so no younger instruction of that thread is in flight when the
  data returns. `END` deactivates the thread at fetch.
  - `amt = 1` (adaptive): stay on the last thread while it is ready, otherwise
    take the next ready thread in round-robin order.
  - `amt = 0` (conventional): always take the next ready thread after the
    last one.
* **Timing.** With `amt = 1` and forwarding, a dependent chain issues one
  bundle per cycle. The 4-bundle transform `FMUL×2, FMUL×2, FADD×2, FADD` runs
  8 vertices in 35 cycles (4 per vertex plus 3 cycles of fill). With `amt = 0`
  and 8 threads the same program needs no forwarding, because consecutive
  bundles of a thread are 8 cycles apart. With `amt = 1` and no forwarding it
  stalls.

## Memory pool (`cma`)

Eight banks of 64 × 128-bit words (8 KB), word-interleaved (bank = address
mod 8). Reads are combinational: `gnt` and `rdata` come in the request cycle.
A granted write happens at the clock edge. An assertion checks that two
channels are never granted different words of one bank. In the top, channel 3
is shared. Vertex loads come first, then host writes (`host_we`, honoured
only while the processor is idle), then the core.

## Vertex cache and triangle flow (`vcache`, `stream_proc`)

Each of the eight vertex threads owns a stream-cache area and one tag entry:
index, valid, hit (locked by the triangle in flight), trans (transformed) and
lighted. For each triangle the sequencer:

1. **LOOKUP** looks up the three indices, one per cycle. A miss takes an
   invalid entry, or else the next unlocked one in round-robin order, and clears its trans and
   lighted tags.
2. **LOAD** fetches `nattr` attributes of each missed vertex over `vin_*`.
   The request stays high until `vin_valid`. The data go to
   `stream_base + entry*stream_stride + attr`.
3. **XFORM** starts the program at `xform_pc` on the triangle's threads whose
   trans tag is clear. It waits for the core to go idle, then sets their
   trans tags.
4. **ERAT** tests output register 0 of the three threads (one cycle).
5. **LIGHT** runs only if the triangle survives. It starts `light_pc` on the
   threads whose lighted tag is clear and then sets those tags.
   The example lighting program computes colour × light + ambient, an
   intensity with `DP4`, and a texture fetch.
6. **EMIT** holds `tri_out_valid` with the thread ids, `reject` and `reason`
   until `tri_out_ready`. The consumer reads output registers via `or_*`
   before accepting. Accepting releases the hit tags.

Shared vertices are therefore loaded, transformed and lit once. A vertex used
only by rejected triangles is never lit. `vc_invalidate` empties the cache
(use it after a non-vertex program has overwritten the output registers).
`run_start` runs any program on any threads outside this flow. That is how
motion estimation runs.

## Early rejection (`erat`)

The unit receives positions {x, y, z, w} in clip space. It rejects:

* **outside**: all three vertices beyond the same plane of
  |x|, |y|, |z| ≤ w;
* **zero area**: det = 0;
* **back face**: det < 0 (counter-clockwise is front).

Here det = x0(y1w2 − y2w1) − y0(x1w2 − x2w1) + w0(x1y2 − x2y1), the
homogeneous form of the signed screen area, valid for w > 0. The
datapath is 9 fp32 multipliers and 5 adders, with the verdict registered one
cycle later. `reason` = {back, zero, outside}, one-hot by that priority. `en`
switches each test.

## Motion estimation mapping

The search window lives in the constant region with row pitch
`const_stride`. The current block is the input stream (`stream_stride = 1`),
and thread *t* handles row *t*. Pixels are 16-bit, 8 per word. One candidate
is:

```
ABSD16 r0   = IN0, CONST0          ; 8 |differences| of row t
ADD16  r1   = r0, r0.yxwz          ; fold channels
ADD16  OUT0 = r1, r1.zwxy ; END    ; every channel holds the two half-sums
```

The host adds the two 16-bit halves of channel 0 over the 8 threads and moves
`const_base` to the next candidate. Horizontal steps are whole words
(8 pixels) in this mapping.

## How far to trust it, and where it departs

Built and tested against independent reference models: everything above.
Choices made here where the original description is silent: all field
widths and encodings, the opcode set, the fp rounding mode, the 16-bit split
of fixed-point mode, the single EXE stage, bank size and interleave,
arbitration, register counts (8 GPR, 8 outputs per thread), the replacement
policy, clip-space rejection tests, `const_stride`, and the whole sequencer
and its handshakes.

Departures from the published memory layout:

* The published stream-cache layout keeps the shaded output vertices in the
  memory pool next to the input vertices and constants. Here each thread's
  output registers are a small register file inside the core, read through
  `or_*`. The pool holds only input attributes and constants. Because of
  this, stream reads never compete with output writes for a bank.
* In the motion-estimation layout, the current block comes in on channel 0
  and the search range on channel 1. This follows the published picture:
  slot 0's first source is the stream and its second source is the
  constant region.

Known gaps:

* Only the operations listed above exist (DP4 is the only reduction). A full Vertex Shader 3.0
  instruction set (reciprocal, square root, multiply-add, loops, predication…) is not
  implemented, so lighting programs are limited to multiply/add forms.
* The temporary register file and an "IU" unit appear in the chip's block
  diagram without a described function and are not built.
* With this instruction set, full-search ME over H[−24, 24) × V[−16, 16] for
  CIF at 30 fps needs about 4.7·10⁹ absolute differences per second, against
  0.8·10⁹ built at 50 MHz. The window fits the 512-word pool, but the rate
  does not.
* Reusing the search window between neighbouring macroblocks (level-C
  reuse: only the new columns are fetched) is up to the host that writes
  the pool through `host_*`. No window-update engine is built.
* Power, area and clock gating cells are outside what RTL simulation shows.

## Simulating

Every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/sp_pkg.sv tb/tb_stream_proc.sv \
          --top-module tb_stream_proc -o sim && ./obj_dir/sim
```

Replace the testbench name for the unit tests: `tb_simd_alu`, `tb_cma`,
`tb_amt_sched`, `tb_vliw_core`, `tb_vcache`, `tb_erat`.
`tb_stream_proc` runs the top at its default size. It streams about 60
triangles (strip, degenerate and random, with predicted rejection verdicts,
positions, colours and texture data), does three motion-estimation searches
over 18 candidates, and measures the 8-vertex transform rate. It also checks
that cache hits and misses, all three rejections, forwarding, hazard and bank
stalls, thread switches, gated channels, both scheduling modes, and both
float and fixed-point operation each occurred.

To write programs, build slots with the `slot_t` fields above and load them
through `im_we/im_waddr/im_wdata`. The testbenches' `mk()` helper is a
compact template.
