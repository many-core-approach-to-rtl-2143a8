# Many-core 2D-DCT on a small network-on-chip

An 8x8 two-dimensional DCT is made of 64 coefficients X(u,v). Each one is a sum over
all 64 pixels:

    X(u,v) = sum over x,y of  f(x,y) * cos((2x+1)u*pi/2N) * cos((2y+1)v*pi/2N)

No coefficient depends on another. This design gives each coefficient, or part of
one, to a small dedicated **DCT core**. A core is told which frequency pair (u,v) to
compute and which rectangle of the block to cover. It then takes one pixel per
clock through a four-stage pipeline and sends back one accumulated number.

The cores hang off a four-port **router**. A controller on the router's first port
does three things:

- configures each core with a unicast packet;
- sends the pixels once, as a multicast packet to every core;
- collects the replies.

More cores means fewer rounds per block. With three cores, a block takes 22 rounds
instead of 64. Because a core can also cover only part of the block, one coefficient
can be split between cores, and the controller adds the partial results.

The usual normalisation factors α(u)α(v) are left out. Coefficients come out
unscaled, in fixed point with 8 fraction bits.

## System

```
            +-------------------- dct_system --------------------+
ctrl_m_* -->| fsl_fifo --> port 0 +------------+ port 1 <--> dct_core (ID 0)
ctrl_s_* <--| fsl_fifo <-- port 0 | noc_router | port 2 <--> dct_core (ID 1)
            |                     +------------+ port 3 <--> dct_core (ID 2)
            +-----------------------------------------------------+
```

Every connection is a pair of one-way FIFO links (`fsl_fifo`, 16 words by default),
one in each direction. A link has a simple interface:

- The writer sees `m_write`, `m_data` and `m_full`.
- The reader sees `s_read`, `s_data` and `s_exists`.
- `s_data` is the head word, available before it is read.
- Writing into a full link is not allowed. An assertion checks this.

The controller is not part of the RTL. In the reference system it is a soft
processor, together with its UART, memory, DDR controller, timer and clock
generator. `dct_system` brings its two links out as ports: `ctrl_m_*` carries words
into the router and `ctrl_s_*` carries words out. The testbench `tb_dct_system`
contains a behavioural controller that follows the protocol described below.

## Words and packets

All words are 32 bits wide. Bit 31 is the most significant.

The original link numbers its bits from the other end, so bit k there is bit 31-k
here.

### Router header

The first word of every packet is a header. The router reads it and does not
forward it.

| bits    | field    | meaning |
|---------|----------|---------|
| [31:16] | size     | number of payload words that follow |
| [15:12] | –        | unused |
| [11:8]  | dst_port | one bit per output: bit 11 = port 0, bit 10 = port 1, bit 9 = port 2, bit 8 = port 3 |
| [7:4]   | noc_y    | router row index: carried, but ignored by a single router |
| [3:0]   | noc_x    | router column index: carried, but ignored |

One bit set in `dst_port` sends the packet to one output (unicast). Several bits
set send it to all of them (multicast), and all four is a broadcast.

A packet that crosses several routers carries one header per router, outermost
first. Each router consumes its own header and forwards everything after it as
payload, so an outer header's size counts the inner headers too. For example, a
packet of n words going through two routers starts with `{size n+1, port to the
next router}`, followed by `{size n, final port}`. Copies are made only by the
router whose header names several ports, so a multicast reaches ports of one
router only. The system built here has a single router, and its packets carry
one header. The testbench `tb_noc_two_routers` checks two chained routers.

### Core payload

| bits | with a control bit set | with no control bit set |
|------|------------------------|-------------------------|
| [31] | load_x: x window = [A, B]   | 0 |
| [30] | load_y: y window = [A, B]   | 0 |
| [29] | load_freq: u = A, v = B     | 0 |
| [28] | clear: restart window, zero sum | 0 |
| [19:10] | B                   | – |
| [9:0]   | A                   | – |
| [7:0]   | –                   | pixel (unsigned) |

Several control bits may be set in one word. The clear bit acts on the values
already loaded, so **send clear after the load words** of the same coefficient.

### Core reply

When a core has finished, it sends two words to router port 0:

- the header `0x0001_0800`, meaning one word, for port 0;
- the word `{ID[7:0], coeff[23:0]}`.

The router removes the header, so the controller receives only the second word.
`coeff` is two's complement with 8 fraction bits.

## Controller protocol

The testbench uses the following sequence for one round:

1. For each core in use, send one unicast packet of four words:
   - `load_freq` with (u, v);
   - `load_x` with (x_start, x_end);
   - `load_y` with (y_start, y_end);
   - `clear`.
2. Send one multicast packet, addressed to every core in use, that holds the
   pixels of the block in row order: x advances fastest, then y. Each core uses the
   pixels of its window and ignores the rest.
3. Read one reply per core. Use the ID to find which (u,v) it belongs to, and add
   partial results that belong to the same coefficient.

A core counts pixels inside its own window. Once its window is covered it ignores
further pixels, so a block larger than the window is harmless. A core takes the
first pixel it receives to be the first pixel of its window, because it does not
see pixel positions. A multicast stream therefore suits cores whose windows start
at the same pixel. When windows start at different pixels, each core gets its own
stream, as in the split-coefficient test.

## Router

`noc_router` has one `noc_fsl_manager` on each input and one `noc_moderator` on each
output. Every manager connects to every moderator.

**FSL manager** (input side). It runs the following state machine:

```
IDLE -> WAIT_HEADER -> READ_FSL -> { WAIT_DATA -> WRITE_DATA -> READ_FSL } x size -> IDLE
```

- It pops the header and loads its size into a down counter.
- It raises one request bit for each output named in the header, and holds them
  until the last payload word has gone.
- A payload word moves only when the `reply` vector equals the `request` vector.
  This means every requested moderator has granted, and none of the requested
  output links is full. As a result, a multicast word is written into all its
  outputs in the same cycle, or into none.
- A word costs three cycles. On an idle router, the first payload word reaches the
  output link 3 cycles after the header is present. After that, one word follows
  every 3 cycles, so a 10-word packet takes 32 cycles.
- A header with an empty destination field consumes its payload and drops it.

**Moderator** (output side). It arbitrates with a sweep pointer and a lock:

- The pointer steps through the four managers, one per cycle, until it reaches one
  that is requesting.
- The moderator then locks onto that manager, grants it, and multiplexes its write
  strobe and data onto the output link.
- The lock lasts until the manager drops its request at the end of its packet.
  Packets therefore never interleave on an output.
- On release, the pointer moves on to the next manager. A manager that wants the
  same output again must wait until the others have been checked. This is the
  round-robin guarantee against starvation.

**Permission**: `reply[p][o] = grant[o][p] & ~full[o]`. Back-pressure on an output
therefore stops only the managers writing to that output.

A packet may be sent back out of the port it came in on.

Two multicast packets whose destination sets overlap can deadlock. Each could
hold one output that the other needs. In this system only the controller
multicasts, so this cannot happen, but do not build a system with two
multicasting sources on this router as it stands.

## DCT core

`dct_core` = `dct_core_io` (communication) + `dct_coefficient` (calculation).

`dct_core_io` reads every word as soon as it is offered; the core never stalls its
input. It registers the word and decodes it into one-cycle strobes. When the
coefficient is ready, it latches the value and writes the two-word reply, waiting
while the output link is full. A second coefficient that finishes while a reply is
still waiting is dropped. The controller in the testbench keeps one request per
core outstanding, so this never happens there.

`dct_coefficient` holds the configuration registers and a position counter:

- The counter visits the window with x fastest.
- Each accepted pixel enters the pipeline together with its (x, y) position.

The pipeline has four stages, one clock each:

| stage | module | operation | format |
|-------|--------|-----------|--------|
| angle | `dct_angle` (two, for x and y) | θ = ((2·pos+1)·freq) mod 4N, in units of π/2N | 5 bits for N = 8 |
| cosine | `dct_cosine` | \|cos θ\| from a table, with its sign | 1 sign + 9 bits, 256 = 1.0 |
| multiply | `dct_multiplier` | ((\|cx\|·\|cy\|) >> 8) · pixel, sign = sx ⊕ sy | 16-bit magnitude, 8 fraction bits |
| sum | `dct_sum` | add or subtract into the accumulator | 24-bit two's complement, 8 fraction bits |

**Angle.** Because N is a power of two, the angle needs no division. "2·pos+1" is
the position with a 1 appended at the bottom. The product is taken modulo
2^(log2 N + 2), which is 2π.

**Cosine table.** The top two bits of the angle are its 180° and 90° bits.

- The sign is their XOR, which is negative in the second and third quadrants.
- The remaining bits (log2 N + 1 bits, 16 entries for N = 8) index a table of
  |cos| over [0, π). Entry i is `round(|cos(i·π/16)| · 256)`.
- The table is computed when the design is elaborated, so no data file is needed.
- The x and y lookups share one table through two synchronous read ports.

**Range.** Window limits and frequencies are 10 bits wide. For an 8x8 block, the
largest sum is 64·255·256, which is less than 2^23, so the accumulator cannot
overflow. A much larger window wraps around silently.

**Ready.** `ready` pulses once, with `coeff` valid, when all of the following hold:

- the window is complete;
- the sum stage took its last product in the cycle before;
- the earlier stages are empty.

This happens 4 clock edges after the edge that accepted the last pixel.

**Clear.** `clear` reloads the counter with the window start and resets the
pipeline.

**Latency through a core.** The reply header is written 7 cycles after the last
pixel is read from the link. Measured over the whole system, from the first
configuration word to the coefficient, one core takes:

| window | cycles |
|--------|--------|
| 1 pixel | 36 |
| 8 pixels | 61 |
| 32 pixels | 133 |
| 64 pixels | 229 |

A full 8x8 DCT takes 14656, 8030 and 5939 cycles with 1, 2 and 3 cores. Most of
this time is the router's three cycles per word. These figures assume the
controller never waits; a real processor adds its own time per packet.

## Size

A generic synthesis (Yosys, no FPGA mapping) of the default configuration gives
these counts:

| unit | flip-flop bits | memory bits |
|------|----------------|-------------|
| `noc_router` | 112 | 0 |
| `dct_core` | 279 | 288, the cosine table |
| `fsl_fifo`, 16 words | 10 | 512 |
| `dct_system`: router, 3 cores, 8 links | 933 | 4624 |

For comparison, the reference implementation on a Spartan-6 reported 140
registers and 394 LUTs for the router. It reported 281 registers, 226 LUTs, one
block RAM and two DSP multipliers for each DCT core.

## How this differs from the reference design

- **Reset.** Reset is synchronous and active high everywhere. Clear is a
  synchronous reset of the pipeline, not an asynchronous one.
- **Pixel order.** Pixels inside a window are taken with x fastest, following the
  described workflow. An alternative ordering, with y fastest, also exists. The
  results are the same if the controller sends pixels in the matching order.
- **Control word layout.** Control bits sit at [31:28], and both window limits
  travel in one word. A processor-side layout with other bit positions and one
  parameter per word was also described; the hardware layout is used here.
- **Cosine table.** The table stores a 9-bit magnitude, so 1.0 = 256 is held
  directly. The values are the same as those of an 8-bit table with a special
  code for 1.0.
- **Moderator pointer.** The pointer advances when a manager releases, so the
  round-robin rule holds even when that manager requests again at once.
- **Link depth and single router.** The FIFO depth (16) is this design's choice.
  The top has one router. Routers can be chained by hand, as the two-router
  testbench does. Neither the row and column fields of the header nor broadcast
  across routers is used: routing is by stacked headers only.
- **Not included.** The soft processor, UART, block RAM, DDR memory controller,
  timer and clock generator are vendor parts. They are not included.

## Files

- `rtl/dct_noc_pkg.sv`: widths, header struct, control bit positions, and the
  header and cosine helper functions.
- `rtl/dct_system.sv`: the top (router, three cores, eight links).
  Parameters: `LOG2_N` (3), `FIFO_DEPTH` (16).
- `rtl/noc_router.sv`, `noc_fsl_manager.sv`, `noc_moderator.sv`, `fsl_fifo.sv`: the
  network.
- `rtl/dct_core.sv`, `dct_core_io.sv`, `dct_coefficient.sv`, `dct_angle.sv`,
  `dct_cosine.sv`, `dct_multiplier.sv`, `dct_sum.sv`: the core.
- `tb/tb_<module>.sv`: one self-checking testbench per module.
- `tb/tb_noc_two_routers.sv`: two routers joined by a pair of links. It checks
  stacked headers, multicast on the far router and back-pressure across the
  joining links.
- `tb/tb_dct_ref_pkg.sv`: the bit-exact fixed-point reference and a floating-point
  DCT term, used by the testbenches.

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops on its own. A
watchdog counts a failure if the test hangs.

## Simulating

The testbenches need Verilator 5 with timing support. To run the whole system:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/dct_noc_pkg.sv tb/tb_dct_ref_pkg.sv tb/tb_dct_system.sv \
    --top-module tb_dct_system
./obj_dir/Vtb_dct_system
```

For a single block, substitute its testbench, for example `tb/tb_noc_router.sv`
with `--top-module tb_noc_router`.

`tb_dct_system` runs the top at its default parameters. It runs four phases:

1. one core on windows of 1, 8, 32 and 64 pixels;
2. full 8x8 DCTs with 1, 2 and 3 cores;
3. one coefficient split across two cores;
4. a full DCT with a controller that reads its replies late, so the link to port 0
   fills up.

It checks every coefficient bit for bit against the fixed-point reference. It also
checks every full-block result against a floating-point DCT, within the error of
the 8-bit cosine table.

At the end it prints how often each mechanism occurred:

- unicast and multicast packets;
- core reuse;
- partial sums;
- pixels beyond a window;
- controller stalls on a full link;
- contention for port 0;
- replies held back by a full port-0 link.

A mechanism that never occurs counts as a failure.

To change the block size, set `LOG2_N` on `dct_system` or `dct_core`. The cosine
table and the angle width follow automatically.
