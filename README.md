# H.264 transform and quantisation IP on an AMBA AHB platform

This design computes the integer transforms and the quantisation of H.264
baseline video coding, in both directions, and packages them as an AHB
bus IP. Its main idea is that it is small. Every transform of the standard
runs on a single adder, a single subtractor, four working registers and a
transpose buffer of only 14 words:

- forward and inverse 4x4 residual transform
- forward and inverse 4x4 luma DC Hadamard transform
- 2x2 chroma DC transform

A 4:2:0 macroblock still takes only 810 clocks, which is about 331
CIF frames per second at 106 MHz.

One multiplier-based circuit does both quantisation and dequantisation.
A wrapper makes the core a bus master and a bus slave:

- As a master, it fetches blocks from external memory and writes the results back.
- As a slave, a processor programs it through three 16-bit register segments.

Through those registers the user picks the image size, the number of frames,
QP and direction, the memory location of the data, and how long the IP may
keep the bus locked.

The repository holds the whole system:

- the core
- the wrapper
- a two-master, two-slave AHB fabric (arbiter, decoder, two multiplexers)
- a processor-to-AHB bridge
- the AHB side of a memory controller

The processor and the SDRAM chip are outside the RTL. Their sides are ports
of the top module `tq_platform`.

```
 processor port ─► m2ahb (master 0) ─────┐        ┌─► sdram_ctrl (slave 0, 0x1xxx_xxxx) ─► memory port
                                         ├─ AHB ──┤
 ahb2h264_wrapper master (master 1) ─────┘        └─► tq_cfg_regs in the wrapper (slave 1, 0x4xxx_xxxx)
        │
        └─ top_transform ── tq_transform (adder, subtractor, R0 R1 R2 Rm, tq_transpose_buf)
                         └─ tq_quant (dbuf0/dbuf1, |x|, multiplier, tq_qp_param)
 AHB = ahb_arbiter + ahb_mux_m2s + ahb_decoder + ahb_mux_s2m
```

## 1. The shared-butterfly transform (`tq_transform`)

Each 4-point 1D transform of H.264 splits into two 2-point butterflies that
use the same 2x2 pattern (sum and difference). For the forward residual
transform:

```
(Y0, Y2) = butterfly(X0+X3, X1+X2)
(Y1, Y3) = (2·(X0−X3) + (X1−X2),  (X0−X3) − 2·(X1−X2))
```

One adder and one subtractor evaluate a butterfly per clock, so four
samples take four clocks. The cycle of a group is its *phase*.

| phase | input on `din` | adder / subtractor do | results on `ye`/`yo` |
|---|---|---|---|
| 0 | X0 → Rm | second butterfly of the previous group | Y0 / Y2 of previous group |
| 1 | X1 → R0, Rm → R1 | second butterfly of the previous group (×2 taps) | Y1 / Y3 of previous group |
| 2 | X2 | X1 ± X2 → Rm, R2; X0 moves R1 → R0 | – |
| 3 | X3 | X0 ± X3 → R0, R2 (T0, T1 parked) | – |

The second butterflies of one group overlap the first butterflies of the
next, so the adder and subtractor are busy on every cycle of a block.

The same registers serve the other transforms. Only the operand order and
the ×2 or ÷2 taps change:

- **Inverse residual.** The first butterflies pair (w0, w2) and (w1, w3),
  with `w1 + (w3>>1)` and `(w1>>1) − w3`. The second butterflies produce
  (x0, x3), then (x1, x2).
- **Luma DC.** The Hadamard transform is the residual pattern without the
  ×2 taps.
- **Chroma DC.** The 2x2 transform is two butterfly levels on four
  samples: (c01, c10) then (c00, c11).

Final scaling is done on the output:

- Forward luma DC results are halved (arithmetic shift).
- Inverse residual results are rounded with `(x+32)>>6`.

**Block timing.** A 4x4 block takes 32 clocks:

- clocks 0–15: row pass, with samples on `din` in raster order
- clocks 16–31: column pass, fed from the transpose buffer

The next block can start on clock 32. A 2x2 block takes 4 clocks. The last
result pair leaves 2 clocks after the block's last clock.

A macroblock is 24 residual blocks, one luma DC block and two chroma DC
blocks: 24·32 + 32 + 2·4 + 2 = 810 clocks. The testbench measures exactly
this.

Results leave as pairs in column order. Each result carries its raster
index (`idx_e`, `idx_o`), so a consumer can store it without a reordering
memory.

## 2. A 14-register transpose buffer (`tq_transpose_buf`)

A 4x4 transpose normally needs 16 registers. Here two things allow 14:

1. The column pass starts reading while the last row is still being written.
2. The row pass delivers its results as pairs.

The Y_o half of each pair is parked in R13, then R12. This lets the
buffer's twelve main registers take exactly one word per clock, in raster
order.

The twelve registers form four *loops* of three. Loop c holds column c:

```
loop 0: R8  → R4 → R0 → dout        loop 2: R10 → R6 → R2 → (R9)
loop 1: R9  → R5 → R1 → (R8)        loop 3: R11 → R7 → R3 → (R10)
```

**Filling.** A word written to loop c enters at R(8+c), and loop c shifts
by one. After three rows, R_i holds Y_i.

**Read-out.** When row 3 arrives, loop 0 starts shifting towards `dout`.
Loop 1 joins one clock later, then loops 2 and 3. The tail of loop c feeds
the head of loop c−1. The registers then act as one serpentine shift
register, and it delivers Y0 Y4 Y8 Y12 Y1 Y5 … Y15 one per clock. Y12…Y15
enter the head of their loops just in time to follow their columns.

`tb_tq_transpose_buf` drives the buffer with the transform's real control
pattern and checks the sequence.

## 3. Quantiser (`tq_quant`, `tq_qp_param`)

**Forward:**

```
|Z| = (|W| · MF(QP%6, pos) + f) >> qbits,   sign(Z) = sign(W)
qbits = 15 + QP/6 (+1 for DC blocks)
f = 2^qbits / 3 for intra blocks, / 6 for inter blocks
```

**Inverse:**

| block | result |
|---|---|
| residual | `Z·V(QP%6, pos) << QP/6` |
| luma DC | `((Z·V << QP/6) + 2) >> 2` |
| chroma DC | `(Z·V << QP/6) >> 1` |

The MF and V tables are the standard ones for flat scaling matrices. They
are functions in `tq_pkg`. `pos` selects one of the three position classes
of a 4x4 block. DC blocks use class 0.

`tq_qp_param` derives four values from QP:

- `qp_per = (QP·43)>>8`, which is QP/6 for QP ≤ 51
- `qp_rem`
- `q_bits`
- `qp_const = 0x5555_5555 >> (32−q_bits)`, which is ⌊2^q_bits/3⌋, shifted
  once more for inter blocks

The transform delivers two coefficients per clock, at most on two
consecutive clocks out of four. Two registers, `dbuf0` and `dbuf1`, park
the second of each pair. The single datapath of `|x|`, multiplier,
add/shift and sign then produces one coefficient per clock. The output is
registered and saturated to 16 bits. Each coefficient carries its mode and
position through the pipeline.

## 4. The T/Q core (`top_transform`)

- **Forward.** Samples go to `tq_transform`, then `tq_quant`. One quantised
  coefficient leaves per clock on `out0` with its index.
- **Inverse.** Coefficients go to `tq_quant` for dequantisation, one per
  clock. The first dequantised value starts the transform one clock later.
  Reconstructed values leave as pairs on `out0`/`out1`.

`ready` says when a new block may start: on clock 32 after the previous
start in the forward direction, or clock 33 in the inverse direction.

## 5. AHB platform (`tq_platform`)

- 32-bit AHB with a single clock and an active-low asynchronous reset.
- **`ahb_arbiter`.** Fixed priority: master 0 (the processor bridge) is
  highest and is also the default master. The grant is registered.
  HMASTER and HMASTLOCK move only when HREADY is high. A master that holds
  HLOCK with HBUSREQ keeps the bus.
- **`ahb_decoder`.** HADDR[31:28] = 1 selects the memory controller.
  HADDR[31:28] = 4 selects the T/Q registers.
- **`ahb_mux_m2s` / `ahb_mux_s2m`.** The address and control signals follow
  HMASTER. Write data follows the master of the data phase. Read data,
  HREADY and HRESP follow the slave of the data phase. An address that
  selects no slave completes at once with OKAY.
- **`m2ahb`.** Turns a simple processor request/acknowledge port (`cpu_req`,
  `cpu_we`, `cpu_addr`, `cpu_wdata`, `cpu_size` → a `cpu_ack` pulse with
  `cpu_rdata`) into single NONSEQ transfers. It requests the bus and waits
  for the grant.
- **`sdram_ctrl`.** Each AHB transfer becomes one access on the memory port.
  `mem_req` stays high during the data phase, with word address, byte lanes
  and write data. HREADY stays low until `mem_ack`. SDRAM command
  sequencing is not part of it, so any memory with a request/acknowledge
  port fits.

## 6. The AHB2H.264 wrapper (`ahb2h264_wrapper`, `tq_cfg_regs`)

### Registers

There are three 16-bit segments plus status. Each sits in the low half of a
32-bit word at base 0x4000_0000.

| offset | name | bits |
|---|---|---|
| 0x0 | Data 1 | [15:10] QP (0–51) · [9:5] NoF, frames to process · [4:1] IS, image size · [0] FI (0 forward, 1 inverse) |
| 0x4 | Data 2 | [15:0] RLS, macroblocks per bus-lock period (0: never lock) |
| 0x8 | Data 3 | [15] SB, start · [14:0] AM, address bits [30:16] of the input data |
| 0xC | status | [0] busy · [1] done (read only) |

Writing Data 3 with SB = 1 while idle starts an operation. SB reads back as
1 until the operation finishes. The hardware then clears SB and sets done.

Image sizes by IS:

| IS | size | IS | size | IS | size | IS | size |
|---|---|---|---|---|---|---|---|
| 0 | 128x96 | 4 | 352x288 | 8 | 720x480 | 12 | 1280x1024 |
| 1 | 176x144 | 5 | 640x480 | 9 | 720x576 | 13 | 1408x1152 |
| 2 | 320x240 | 6 | 704x480 | 10 | 1024x768 | 14 | 1920x1088 |
| 3 | 352x240 | 7 | 704x576 | 11 | 1280x720 | 15 | 2048x1536 |

### Memory layout

- Input starts at `{AM, 16'h0000}`. For example, AM = 0x1400 gives
  0x1400_0000.
- Results go to the same layout `OUT_OFS` bytes higher. The parameter
  default is 0x20_0000, so output starts at 0x1420_0000.
- Frames follow each other, and each frame is its macroblocks in raster
  order.
- A macroblock is 27 blocks in this order: 16 luma residual, luma DC,
  4 Cb residual, 4 Cr residual, Cb DC, Cr DC.
- The order of the block within the macroblock decides its transform.
- Each block is stored as 16-bit samples in raster order, two per word,
  low half first. That is 8 words for a 4x4 block and 2 for a 2x2 block,
  816 bytes per macroblock.

Input and output must not overlap. With the default `OUT_OFS`, at most
2,570 macroblocks (frames × macroblocks per frame) can run in one operation.
A single 2048x1536 frame needs `OUT_OFS` ≥ 0xA0_0000.

### Per-block sequence

For each block the wrapper:

1. Reads the block as an INCR burst.
2. Feeds the samples to the core on consecutive clocks.
3. Collects the results by their indices.
4. Writes them back as an INCR burst.

A burst restarts with NONSEQ when the wrapper has lost the bus in between,
and at every 1 KB boundary.

Blocks are not overlapped. With a zero-wait memory and a locked bus, a
macroblock takes about 1,515 clocks through the wrapper, against 810 in
the core. Through the whole platform, where the memory controller adds one
wait state per transfer, it takes 1,921 clocks. That is 139 CIF frames per
second at 106 MHz; the core alone manages 331. Forward quantisation uses the intra rounding offset.

### Bus lock (RLS)

With RLS > 0, the wrapper holds HBUSREQ and HLOCK high while it processes
RLS macroblocks, so its transfers are never interrupted. It then:

1. Drops both signals and pulses `lock_release`.
2. Waits at least two clocks, and until the arbiter has actually moved the
   bus away.
3. Starts the next lock period.

The wait lets other masters, such as the processor, get the bus between
lock periods. With RLS = 0, the wrapper requests the bus only for its
bursts and never locks.

## 7. What comes from the source design and what is this design's own

**From the source design:**

- the transform architecture: one adder, one subtractor, R0/R1/R2/Rm,
  a 14-word transpose buffer with R12/R13 and four loops, 16-bit datapath
- the forward residual data-flow schedule
- the 32/4-clock block timing and the 810-clock macroblock
- the quantiser structure and the quantisation equations
- the platform blocks and their roles
- the register segments and their fields
- the meaning of RLS, AM, SB and NoF
- the range of image sizes: 128x96 to 2048x1536, 16 sizes
- the memory addresses 0x1400_0000 (input) and 0x1420_0000 (output)

**This design's own choices:**

- the control encoding of the transform and transpose buffer
- the inverse residual and chroma DC pairings
- where the final ÷2 and (x+32)>>6 scaling happens
- the dequantisation rounding details, taken from the H.264 standard
- the 14 image sizes between the two end points
- the bit positions of the register fields where the source leaves room
  for doubt:
  - QP is read as 6 bits, [15:10]
  - RLS is the whole 16-bit segment
  - SB is bit 15 and AM is [14:0]
- the register offsets and the status word
- the address map
- the fixed-priority arbitration
- the processor port protocol
- the memory layout
- the handling of RLS = 0
- the intra-only rounding offset: there is no inter/intra register field
- the non-overlapped block sequence of the wrapper
- the reduction of the SDRAM controller to a request/acknowledge memory
  port

**Not included:**

- the processor core
- the SDRAM device and its command sequencing
- anything physical (FPGA board, standard-cell chip)

**Figures this design does not reproduce:**

- The source reports 3,299 gates for the transform and 3,901 for the
  quantiser in a 0.25 µm library, and 106 MHz. These figures could not be
  reproduced here.
- Only the cycle counts are matched.

## 8. Simulating

Every block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. Shared testbench
code:

- `tq_ref_pkg`: a plain matrix-arithmetic reference model of the transforms
  and (de)quantisation. It has no butterflies and no shared hardware.
- `tb_ahb_mem`: a behavioural AHB memory with random wait states.

| testbench | what it checks |
|---|---|
| `tb_tq_transform` | all six transforms, random back-to-back blocks; latency; the 810-clock macroblock |
| `tb_tq_transpose_buf` | buffer contents and read-out order under the transform's control pattern |
| `tb_tq_qp_param` | all QP values, both block classes, intra and inter |
| `tb_tq_quant` | random pairs and singles, all modes, against the reference |
| `tb_top_transform` | forward and inverse series, random QP, modes mixed |
| `tb_tq_cfg_regs` | register read/write, fields, start pulse, SB clear, status |
| `tb_ahb_arbiter`, `tb_ahb_decoder`, `tb_ahb_mux_m2s`, `tb_ahb_mux_s2m` | bus fabric rules with random traffic |
| `tb_m2ahb`, `tb_sdram_ctrl` | bridge and memory slave with random grant and wait states |
| `tb_ahb2h264_wrapper` | wrapper alone: a forward frame with RLS = 3 and an inverse two-frame run with a random grant; every output word, the lock rules, burst restarts |
| `tb_tq_platform` | whole platform at default parameters (below) |
| `tb_tq_workloads` | one CIF frame and one 2048x1536 frame through the platform (output area moved 16 MB up); reports clocks per macroblock |

`tb_tq_platform` runs the whole platform at its default parameters. A
processor model programs the registers and polls status, and it keeps
reading memory meanwhile. It runs two complete operations on a 128x96
frame:

1. forward, QP 28, RLS 5
2. inverse, QP 12, RLS 0

It checks every output word. It counts these mechanisms and fails if any of
them never happens:

- lock periods and their release
- locked transfers
- bus handovers
- burst restarts after losing the bus
- 1 KB restarts
- memory wait states
- all six block types

Run any testbench with Verilator 5 from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/tq_pkg.sv rtl/ahb_pkg.sv tb/tq_ref_pkg.sv $(ls rtl/*.sv | grep -v _pkg) \
  tb/tb_ahb_mem.sv tb/tb_tq_platform.sv --top-module tb_tq_platform -Mdir obj_tb
./obj_tb/Vtb_tq_platform
```

To run another testbench, replace `tb_tq_platform` with its name. The
packages must come first. RTL and testbenches compile without warnings at
Verilator's default level. With `-Wall`, unused-signal warnings appear for
struct fields that a given block does not use.

**Changing the design:**

- `OUT_OFS` (platform and wrapper) moves the output area.
- `MEM_AW` sets the width of the memory-port address.
- `W` on the core modules is the datapath width. The tables and the
  16-bit memory format assume 16.
- The image-size table is in `tq_pkg` (`img_mb_w`, `img_mb_h`).
