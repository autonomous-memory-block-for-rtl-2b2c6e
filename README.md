# Autonomous Memory Block (AMB)

An FPGA block RAM is normally a passive array: every address it sees has to be
computed by counters and state machines built from the surrounding logic
cells, and every address bit has to be routed to the memory. DSP algorithms,
however, access memory in a few regular patterns: queues, sliding windows,
stacks, double buffers and strided blocks of an image. The Autonomous Memory
Block puts a configurable **address generation unit (AGU)** inside the memory
block, next to the RAM. Once configured, the surrounding logic only says
"store this word" or "give me the next word", and the AGU supplies the
addresses and the flow control. For irregular accesses a **random access
mode** bypasses the AGU, and the block then behaves like an ordinary
dual-port RAM.

This repository holds synthesizable SystemVerilog for the whole block:
- the AGU with its five access modes;
- the bypass;
- the dual-port RAM;
- self-checking testbenches for each part and for the complete block.

## Structure

```
                 cfg (static configuration), clear
                          |
   wr_req, wr_data  +-----v--------------------------+
   rd_req --------->|  amb_agu                       |
   <- wr_ready      |   write counter   read counter |  agu addresses
   <- rd_avail      |   datacount       output count |-----------+
   <- full/empty/   |   stripe seq (wr) stripe seq(rd)|          |
      count/flags   |   mode FSM (FIMO, swinging)    |    +------v--------+
                    +--------------------------------+    | amb_bypass_mux|--> amb_bram
   ext_waddr, ext_raddr (random mode only) -------------->|  (random mode)|    (256 x 9,
                                                           +---------------+     dual port)
                                                                                  |
                                                     rd_data, rd_valid, rd_last <-+
```

| Module | Role |
|---|---|
| `amb` | Top: AGU, bypass and RAM wired together; registers `rd_valid`/`rd_last` to line up with the RAM's read data |
| `amb_agu` | Mode FSM, counters and flow control for FIFO, FIMO, LIFO, swinging buffer and striped access |
| `amb_wrap_counter` | Offset counter that wraps at the buffer length. It counts up or down and can be loaded. It serves as the write, read and FIMO output-count counter |
| `amb_datacount` | Number of items held; gives full and empty |
| `amb_stripe_gen` | Striped address sequence (1-D and 2-D) |
| `amb_bypass_mux` | Selects external addresses and enables in random access mode |
| `amb_bram` | Dual-port RAM with synchronous read and read-before-write |
| `amb_pkg` | Mode enum and configuration structs |

Every mode except striped access is built from the same parts: a write counter, a read counter,
a datacount counter and a small FSM. The modes differ only in how the FSM
steps those counters. This is why one AGU can serve all of them at little extra cost.

## Configuration

The block is configured through one packed struct, `amb_pkg::amb_cfg_t`. In
an FPGA this struct would come from configuration memory. After changing it,
pulse `clear` for one cycle to restart every counter and FSM.

| Field | Meaning |
|---|---|
| `mode` | `MODE_FIFO`, `MODE_FIMO`, `MODE_LIFO`, `MODE_SWING`, `MODE_STRIPE`, `MODE_RANDOM` |
| `base` | First address of the buffer region |
| `length` | Buffer length L, from 1 to 2^ADDR_W. In swinging mode it is the size of *each* half |
| `taps` | FIMO only: K, the number of items read out per item written, from 1 to L |
| `wr_stripe`, `rd_stripe` | Striped mode: the write-port and read-port patterns (`start`, `n`, `rows`, `pitch`, `offset`, `stripes`) |

Fields are `CFG_W = 17` bits wide so one layout serves every address width up
to 16 bits; a block uses the low `ADDR_W+1` bits. Buffer addresses are
`base + offset`, modulo the RAM size, so a region may wrap past the top of the RAM.

## The access modes

### FIFO: circular buffer
The write counter and the read counter each wrap at L. The datacount counter
tracks the fill level:
- `wr_ready = !full`;
- `rd_avail = !empty`.

A write and a read can happen in the same cycle. The read and write rates may
differ arbitrarily. A write while the buffer is full is refused even when a read
happens in the same cycle. This keeps `wr_ready` independent of `rd_req`.

### FIMO: first-in, multiple-out
This mode suits 1-D convolution, correlation and FIR filtering. The buffer holds the L
most recent samples. Each accepted write does two things:
1. It overwrites the oldest sample.
2. It starts a burst in which the AGU supplies the K most recent samples, oldest first and
   newest last, one per accepted read.

During the burst `wr_ready` is low and `rd_avail` is high. The last read of the burst
comes back with `rd_last`, and then the block accepts the next write. No
burst is started until K samples have been written, so every window is
complete. An extra counter, the output-count counter, wraps at K and marks
the end of the burst. The read counter is loaded with the window start `newest - (K-1) mod L`.

Timing for K = 3: write x[n] in cycle t, and reads in cycles t+1 to t+3 return
x[n-2], x[n-1] and x[n] in cycles t+2 to t+4. The last of them comes with
`rd_last`. With `rd_req` held high, a new sample can be accepted every K+1 cycles.

### LIFO: stack
The write counter points at the next free slot and moves in both directions:
- up on a push;
- down on a pop.

The read address is the slot just below it, the top of the stack. A push and a pop in the same cycle
return the old top and overwrite it with the new item. This works because the RAM reads
before it writes. A stack of L entries wraps its counter to 0 when full, and the top is then
correctly L-1.

### Swinging (ping-pong) buffer
This mode suits block processing such as an FFT over blocks while new data keeps
arriving. The region holds two halves of L words, at `base` and
`base + L`. One half is filled in order while the other half is read in order.
When the write half is full *and* the read half has been read completely,
the FSM swaps the halves. Nothing is accepted in that cycle, and `swap` is high.
After reset the read half counts as already read, so the first swap happens as
soon as the first half is full. The last read of a half comes back with `rd_last`.

### Striped access, 1-D and 2-D
In this mode the addresses follow a stripe pattern. The address of item i of row r of stripe s is

    addr = start + s*offset + r*pitch + i        (i < n, r < rows, s < stripes)

The index i counts fastest. After the last stripe the pattern starts again.
- With `rows = 1` this is the 1-D pattern: n items from A1, then n items from
  A2 = A1 + offset, and so on. The stripes overlap when offset < n, which gives
  the overlapping windows of a sliding filter.
- With `rows > 1` and `pitch` set to the image width, each stripe is an
  n x rows window of an image stored in raster order. This is the access pattern of 2-D
  convolution, block matching and 2-D filtering.

The write port and the read port each have their own pattern, for example raster writes
with window reads, or block writes with raster reads. The sequencer
uses running sums instead of multipliers. Striped mode has no flow control.
Both ports are always ready, and the user must keep the reads behind the writes.
`rd_last` marks the last item of each read stripe.

### Random access (bypass)
The AGU is bypassed. `ext_waddr` and `ext_raddr` address the RAM directly, with
`wr_req` and `rd_req` as the enables, exactly like a conventional block RAM. The bypass
adds one 2:1 multiplexer level to the address path.

## Interface and timing

All ports are synchronous to `clk`. `rst_n` is an asynchronous, active-low reset.

| Port | Dir | Meaning |
|---|---|---|
| `cfg`, `clear` | in | Configuration; `clear` restarts the AGU and clears the sticky flags |
| `wr_req`, `wr_data` / `wr_ready` | in / out | A write is accepted in a cycle with `wr_req && wr_ready` |
| `rd_req` / `rd_avail` | in / out | A read is accepted in a cycle with `rd_req && rd_avail` |
| `rd_data`, `rd_valid`, `rd_last` | out | Data of a read accepted in cycle t, valid in cycle t+1 |
| `ext_waddr`, `ext_raddr` | in | Addresses, random mode only |
| `full`, `empty`, `count` | out | Fill state (FIFO, LIFO, FIMO: datacount; swinging: write half full / read half exhausted) |
| `overflow`, `underflow` | out | Sticky: a write was refused / a read was refused |
| `swap` | out | The swinging buffer swaps halves in this cycle |

`wr_ready` and `rd_avail` depend only on the registered state, not on the
requests, so the surrounding logic may use them to form its requests. A
refused request leaves memory and counters untouched. Only the sticky flag records it.
This is the flow control that prevents silent data loss. The
block sustains one write and one read per clock.

## Parameters and sizes

| Parameter | Default | Notes |
|---|---|---|
| `ADDR_W` | 8 | 256 words. 8 address bits is the AGU size used for the area and speed comparison. Supported up to 16 |
| `DATA_W` | 9 | Word width, after a 2K x 9 FIFO example. Any width works |

Larger block RAMs of current FPGAs need wider addresses. A 2K x 9 FIFO needs
`ADDR_W = 11`; blocks of 512 bits, 4 Kbit and 512 Kbit need 9, 12 and 16 address bits.
All of these need only the parameter changed.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. With plain Verilator:

```
verilator --binary --timing --assert -Irtl rtl/amb_pkg.sv tb/tb_amb.sv \
          --top-module tb_amb -Mdir obj_tb_amb
./obj_tb_amb/Vtb_amb
```

Replace `tb_amb` with any other testbench name. `rtl/amb_pkg.sv` must come first.

| Testbench | What it checks |
|---|---|
| `tb_amb` | The whole block at its default size. It runs every mode in turn: random access, 1-D and 2-D striped reads, striped writes, FIFO, FIMO, LIFO and swinging buffer. Requests are random. Reference models predict every ready, flag and data word. It counts overflow, underflow, wrap-around, full, FIMO bursts, LIFO replace, swaps, 2-D row jumps, pattern repeats, bypass accesses and mode switches, and fails any that never happened |
| `tb_amb_filters` | The block used as DSP code would use it, at its default size. A FIMO buffer feeds an 8-tap FIR filter. Striped window reads feed a 3x3 convolution over a 16 x 12 image. A swinging buffer carries 6 blocks of 32 samples. Every output is compared with a direct computation in the testbench |
| `tb_amb_agu` | The same scenario on the AGU alone, with a testbench memory. It also compares striped addresses with the closed-form formula |
| `tb_amb_stripe_gen` | Stripe sequences (1-D overlapping, 3x3 windows, blocks wrapping past the top of memory) against the formula |
| `tb_amb_wrap_counter`, `tb_amb_datacount` | Counters against modular and saturating models, including length 1 and the full length |
| `tb_amb_bram` | Random dual-port traffic, including same-address collisions (old data returned) |
| `tb_amb_bypass_mux` | Source selection |

Each testbench was also run against a copy of its module with one deliberate
bug, and each one caught it.

## Where the design makes its own choices

The description this design follows gives the modes, the counters of the
FIFO AGU and the behaviour of each mode. It leaves the following open, and
they are decided here:
- the request/ready handshakes and the sticky overflow and underflow flags;
- the one-cycle read latency, and read-before-write when a read and a write use the same address;
- the configuration layout, the `clear` restart, and the asynchronous reset;
- FIMO:
  - the window is the K most recent samples, oldest first;
  - writes wait during a burst;
  - no burst is started before K samples are held;
- LIFO:
  - push and pop together replace the top;
  - the top address is derived from the write counter instead of from a second register;
- swinging buffer: a swap costs one idle cycle, and the halves are read in plain ascending order;
- striped access:
  - the 2-D pattern is parameterised by rows and pitch;
  - the pattern repeats after `stripes` stripes;
  - the write and read ports have separate patterns;
  - there is no flow control;
- the bypass is a plain multiplexer, where a custom circuit might use a tristate driver;
- the RAM has a fixed word width. FPGA block RAMs can usually change their aspect ratio
  (for example 4K x 1 to 128 x 36). The AGU is sized for one address width, set by `ADDR_W`.

## Not included

- The surrounding FPGA logic and routing. The block's ports stand for that
  interface.
- A full-custom physical implementation of the AGU. Only its logic is given
  here, and area and speed depend on the process and on the layout.
- An AGU that adapts at run time to every possible word width of the RAM.
  Such an AGU can be larger than a small RAM itself. Here the address width is a
  synthesis-time parameter.
