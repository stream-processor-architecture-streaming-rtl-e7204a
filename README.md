# Streaming memory system for a stream processor

Media kernels such as colour conversion or image convolution touch every
pixel once or a few times, in order. A general-purpose CPU spends most of its
time on loads, stores and cache misses for them. A stream processor instead
moves whole blocks of data, called *streams*, through a three-level storage
hierarchy:

```
  external SDRAM  <->  streaming memory system  <->  stream register file (SRF)  <->  ALU clusters
```

Off-chip SDRAM cannot deliver a word to every ALU every cycle. The SRF is a
large on-chip buffer in the middle. The memory system fills it with whole
streams and drains result streams back to SDRAM. The clusters read and write
only the SRF, one word per cycle per stream. A host processor does not touch
the data. It sends short *stream instructions* ("load this block", "run this
kernel", "store that block") to a stream controller, which sequences them.

This repository holds synthesizable SystemVerilog for the memory side of such a
processor:

- the stream controller;
- the streaming memory system;
- the SRF with its per-port stream buffers;
- two dedicated compute clusters used as test cases: RGB-to-YUV conversion
  and a 3x3 2D convolution.

The programmable VLIW ALU clusters and the microcontroller that drives them
are not part of this design. An SRF stream port pair and a start signal are
brought out to where they would connect.

## Block structure

```
                host instructions
                       |
               stream_controller ----------------------------+
               |       |        \                            |
   mem cmd/done|  SRF port cmds  \ conv_start, coef writes   | ext_start
               |       |          \                          |
 SDRAM <-> mem_system <-> port 0   \                         |
                       srf  port 1 -> rgb2yuv_cluster -> port 2
                            port 3 -> conv2d_cluster  -> port 4
                            port 5 -> ext_in_*   (external cluster)
                            port 6 <- ext_out_*
```

| Module | Role |
|---|---|
| `stream_processor` | top level; wires everything above |
| `stream_controller` | instruction queue plus in-order sequencer |
| `mem_system` | SDRAM <-> SRF block transfers (stream load / store) |
| `srf` | banked SRAM array (4 words per access), 7 stream ports, round-robin arbiter |
| `stream_buffer` | multi-word FIFO used for SRF ports, the load buffer and the instruction queue |
| `rr_arbiter` | round-robin arbiter inside the SRF |
| `rgb2yuv_cluster` | BT.601 RGB -> YUV, one pixel per cycle |
| `conv2d_cluster` | 3x3 convolution with two line buffers, one pixel per cycle |
| `sp_pkg` | data width, instruction format, SRF port numbers |

All blocks share one clock and a synchronous, active-low reset `rst_n`. Every
stream interface is a valid/ready handshake: a word moves on a rising edge
where both are high.

## Stream instructions

The host writes `sp_pkg::stream_instr_t` (129 bits) through
`instr_valid`/`instr_ready`. They go into an 8-entry queue, so the host can
run ahead. The controller executes them strictly in order, one at a time.
`instr_done` pulses when each one retires, and `idle` is high when the queue
is empty and nothing is running.

| Field | Bits | Used by |
|---|---|---|
| `op` | 128:126 | NOP=0, LOAD=1, STORE=2, KERNEL=3, SETCOEF=4 |
| `kernel` | 125:124 | KERNEL: 0 RGB-to-YUV, 1 conv 3x3, 2 external cluster |
| `srf_a` | 123:108 | LOAD destination, STORE source, KERNEL input |
| `srf_b` | 107:92 | KERNEL output |
| `mem_addr` | 91:60 | LOAD/STORE SDRAM word address |
| `len` | 59:44 | words moved (LOAD/STORE) or read by the kernel |
| `out_len` | 43:28 | words the kernel writes |
| `width` | 27:12 | conv: image row width in pixels |
| `coef_idx`, `coef` | 11:8, 7:0 | SETCOEF: signed 8-bit coefficient, index 0..8 |

What each instruction does:

- **LOAD** starts SRF port 0 as a write port at `srf_a` and the memory system
  as a read from `mem_addr`. It retires when both have finished.
- **STORE** starts port 0 as a read port and the memory system as a write.
  It retires when both have finished.
- **KERNEL** starts the kernel's input port (read `len` words at `srf_a`) and
  its output port (write `out_len` words at `srf_b`), then pulses the
  kernel's start. It retires when both ports are done. For the convolution,
  `out_len` must be `(W-2)*(H-2)`. A wrong `out_len` leaves the instruction
  waiting forever: the output port never completes.
- **SETCOEF** retires at once.
- **NOP** and zero-length transfers retire at once.

Because execution is serial, a memory transfer never overlaps a kernel. That
is the simplest correct schedule, but it leaves bandwidth unused (see
*Performance*).

## The stream register file

The SRF is the most involved block.

**Array and bandwidth.** The array of `WORDS` words (default 8192 x 32 bit)
is split into `BW` banks (default 4). Word `a` lives in bank `a % BW`, row
`a / BW`. One access therefore moves up to `BW` consecutive words, starting
at any address. Bank `b` serves word `k = (b - a0) mod BW` of an access that
starts at `a0`, so unaligned streams need no special case. The whole SRF
makes one access per cycle, so `BW` is its bandwidth in words per cycle.

**Ports.** Seven stream ports share the array. Each port has:

- its own stream buffer (`SB_DEPTH` words, default 8, at least `BW`;
  one word per cycle needs `max(2*BW, BW+2)`: a read in flight plus the next);
- an address counter;
- two counters: words still to move through the array, and client
  handshakes still to do.

The stream buffer takes several words at once on the array side and one word
per cycle on the client side. That conversion is what lets a client stream
steadily while the array serves other ports.

A port is started with `srf_cmd_t {wr, base, len}` and then runs on its own:

- **Read port** (`wr=0`). The port asks for an access of
  `n = min(BW, words left)` words whenever its buffer has room for them, on
  top of any read still in flight. The banks are read on the grant edge. The
  words enter the buffer on the next edge, in stream order. The client takes
  them with `rd_valid`/`rd_data`/`rd_ready`. The first word is visible three
  cycles after the command. After that, a port that is alone delivers one
  word per cycle; the last of N words is taken N+2 edges after the command
  edge.
- **Write port** (`wr=1`). The client pushes words with
  `wr_valid`/`wr_data`/`wr_ready`. Once `n = min(BW, words left)` words are
  buffered, the port asks for an access and writes them all in one cycle.

A round-robin arbiter picks one asking port per cycle. A port that keeps
asking is served within 7 grants. `done[p]` pulses for one cycle:

- for a read port, when the client has taken the last word;
- for a write port, when the last word is in the array.

So a later read of the same locations always sees the new data.

## Streaming memory system

`mem_system` moves one contiguous block per command. The SDRAM interface is
simple:

- `mem_req` with `mem_we`/`mem_addr`/`mem_wdata` is held until `mem_gnt`;
- read data comes back in request order on `mem_rvalid`/`mem_rdata`, with
  any latency.

**Loads** issue reads back to back into a load buffer (`LD_DEPTH`, default
8). Read data cannot be refused, so a read is only issued while (words
already buffered + reads still outstanding) < `LD_DEPTH`. This keeps the
buffer from overflowing however slowly the SRF accepts the words. An
assertion (`a_no_overflow`) checks it.

The same rule limits throughput. A load runs at one word per cycle only if
`LD_DEPTH` is at least the SDRAM round-trip latency plus about two cycles.
With 5-cycle latency and `LD_DEPTH=8` the testbench measures full rate.

**Stores** forward each word from the SRF read port as one SDRAM write.

## Compute clusters

Both dedicated clusters register their result: one cycle of latency, one
pixel per cycle. `in_ready` is low only while a held result is not being
taken.

**`rgb2yuv_cluster`** takes `{8'h0, R, G, B}` and returns `{8'h0, Y, U, V}`
using the 8-bit ITU-R BT.601 integer form:

```
Y = ((  66R + 129G +  25B + 128) >>> 8) +  16
U = (( -38R -  74G + 112B + 128) >>> 8) + 128
V = (( 112R -  94G -  18B + 128) >>> 8) + 128
```

**`conv2d_cluster`** takes raster-order pixels (the low 8 bits of each word,
unsigned). Two line buffers of `MAX_W` pixels (default 256) hold rows y-1
and y-2. A 3x3 register window holds the last three columns. For every pixel
at column x>=2 of row y>=2 it emits

```
out(y,x) = sum over r,c in 0..2 of coef[3r+c] * pix(y-2+r, x-2+c)
```

as a signed 32-bit word:

- there is no padding, so a WxH image gives (W-2)x(H-2) outputs;
- the sum is taken without flipping the kernel, as CNN layers use it;
- coefficient 0 is the top-left tap.

`start` with `width` resets the row and column tracking. The image height is
never needed.

**External cluster port.** `ext_start` pulses with `ext_len` and
`ext_out_len`. The external logic must then read `ext_len` words from
`ext_in_*` and write `ext_out_len` words to `ext_out_*`.

## Parameters

Top-level (`stream_processor`):

| Parameter | Default | Meaning |
|---|---|---|
| `SRF_WORDS` | 8192 | SRF capacity in 32-bit words (a multiple of `SRF_BW`) |
| `SRF_BW` | 4 | SRF bandwidth: words per array access, number of banks |
| `SB_DEPTH` | 8 | stream buffer depth per SRF port (at least `SRF_BW`; `max(2*SRF_BW, SRF_BW+2)` for full rate) |
| `LD_DEPTH` | 8 | memory-system load buffer / reads in flight |
| `IQ_DEPTH` | 8 | instruction queue entries |
| `CONV_MAX_W` | 256 | longest image row for the convolution |

In `sp_pkg`:

| Constant | Default | Meaning |
|---|---|---|
| `DATA_W` | 32 | word width |
| `SRF_AW` | 16 | SRF address field width |
| `MEM_AW` | 32 | SDRAM address width |
| `LEN_W` | 16 | length field width |
| `COEF_W` | 8 | coefficient width |

`SRF_BW`, `SB_DEPTH`, `LD_DEPTH` and `IQ_DEPTH` must be powers of two.

None of these sizes is fixed by the architecture this design follows. Its
only numbers are the eight programmable clusters and their composition (three
adders, two multipliers, a divider, a scratch pad and a communication unit
per cluster). All defaults here are this design's own choices.

## Performance

- **SRF bandwidth.** The SRF moves `SRF_BW` words per cycle in total (4 by
  default).
  - A kernel that reads one stream and writes another needs 2 words per
    cycle. So it runs at one pixel per cycle when `SRF_BW >= 2`, with a
    little headroom for arbitration.
  - With `SRF_BW = 1` the same kernel runs at about one pixel every two
    cycles.
- **Serial execution.** Memory transfers and kernels never overlap, because
  the controller executes one instruction at a time. SDRAM is then the main
  limit: loads and stores move at most one word per cycle.
- **Measured kernel rate.** Timed from the output port's command to its
  last write, for a 4096-pixel RGB-to-YUV kernel and a 64x60 convolution
  (3840 words in, 3596 out):

  | `SRF_BW` | `SB_DEPTH` | RGB to YUV | convolution |
  |---|---|---|---|
  | 4 (default) | 8 | 4101 | 3845 |
  | 8 | 16 | 4101 | 3845 |
  | 2 | 4 | 4101 | 3845 |
  | 1 | 4 | 8193 | 7438 |
  | 1 | 2 | 8195 | 7561 |

  From `SRF_BW = 2` up, the kernel is the limit, at one pixel per cycle.
  With one word per access, every input and output word costs an SRF cycle.
  A 2-word buffer adds stalls on top, because it cannot hold a read in
  flight as well as the next one.
- **Measured.** The end-to-end test program runs in about 4,900 cycles. It
  moves 1,184 words from SDRAM into the SRF and 636 back out, using an SDRAM
  model that grants 60% of requests and has a 6-cycle read latency.

## Simulating

Each testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and has a cycle-count watchdog. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/sp_pkg.sv tb/tb_stream_processor.sv --top-module tb_stream_processor
./obj_dir/Vtb_stream_processor
```

Replace the testbench name to run the others:

| Testbench | What it checks |
|---|---|
| `tb_stream_buffer` | 4-in/4-out and 1-in/1-out buffers: random push/pop counts against a queue model, refused pushes, flags, clear |
| `tb_srf` | SRF at six (banks, buffer depth) configurations, (1,2) (1,4) (2,4) (4,8) (8,16) (4,16), using `srf_config_check`: unaligned streams of odd lengths, concurrent writers and readers with random gaps, arbitration conflicts, done pulses, exact N+2 streaming timing (slower for (1,2), as expected) |
| `tb_mem_system` | load under SRF back-pressure (buffer fills), store, random SDRAM grants, full-rate load |
| `tb_rgb2yuv_cluster` | 300 pixels against the formulas, back-pressure, one pixel per cycle |
| `tb_conv2d_cluster` | two images with random coefficients against a direct 3x3 sum, restart, one-cycle latency |
| `tb_stream_controller` | the commands each instruction issues, in-order retirement, queue full |
| `tb_stream_processor` | the whole design at default parameters, running a 28-instruction program (below) |
| `tb_workloads` | both test-case kernels at the largest sizes the default SRF holds, 4096-pixel RGB-to-YUV and a 64x60 convolution, run by `workload_run` on five (`SRF_BW`, `SB_DEPTH`) configurations; all results are checked, and the kernel cycles are checked against the rate each configuration allows |

`tb_stream_processor`:

- its program runs RGB-to-YUV on 64 pixels, a 3x3 convolution on a 12x8
  image, and a pair-sum kernel over a 1024-word block on the external port,
  which the testbench plays;
- it checks every stored result word in SDRAM, and that the words around
  each result region are untouched;
- it fails unless each of these happens at least once: every instruction
  kind, an SRF arbitration conflict, a full stream buffer, an SDRAM stall,
  and a host stall on a full queue.

At the top level the memory system's load buffer and the clusters' outputs
never back up: with serial execution no other SRF port competes during a
load. Their back-pressure is covered by the block testbenches instead.

`tb/sdram_model.sv` is a behavioural SDRAM used by the testbenches:

- a word array;
- a grant in a random percentage of cycles;
- a fixed read latency.

## Where this design departs from, or goes beyond, its source

The architecture this design follows defines the blocks and their roles:

- host, stream controller, streaming memory system, SRF, microcontroller and
  eight ALU clusters;
- the SRF as the large on-chip stream store between memory and clusters;
- stream buffers whose size, and the SRF's bandwidth, are configurable;
- RGB-to-YUV and 2D convolution clusters as test cases.

It gives no widths, sizes, protocols, instruction encoding or internal
organisation for these blocks. Everything of that kind here is an
engineering choice:

- the banked SRF making one multi-word access per cycle, with per-port FIFOs and round-robin arbitration;
- the word-per-request SDRAM protocol;
- the instruction set and its in-order execution;
- the BT.601 coefficients;
- the 3x3 valid-region convolution.

Not implemented:

- **The eight programmable VLIW ALU clusters and the microcontroller.** Each
  cluster would hold adders, multipliers, a divider, a scratch pad, a
  communication unit, local register files and a crosspoint switch. They
  are outside the scope of the memory system, and no instruction set is
  defined for them. Only one external stream port pair is provided for
  them, not eight.
- **Strided or indexed stream access.** Streams are contiguous word ranges.
- **Overlap** of memory transfers with kernel execution.

Workload sizes:

- A full video frame (for example 640x480 = 307,200 pixels) is larger than
  the 8192-word SRF and the 16-bit length field. A host program must process
  it in strips.
- The convolution also needs rows of at most 256 pixels.
- The largest single-call sizes that fit the default SRF are tested:
  4096 RGB pixels, with input and output filling all 8192 words, and a
  64x60 image for the convolution.
