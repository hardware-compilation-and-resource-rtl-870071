# PIPE Engine circuits for the SONIC video board

SONIC is a PCI board for video processing. It is built from up to eight
identical processing slots called PIPEs. Each PIPE has:

- a reconfigurable FPGA, the **PIPE Engine (PE)**, that holds the user's circuit;
- a fixed FPGA, the **PIPE Router (PR)**, that moves image data in and out;
- 4 MB of **PIPE Memory (PM)**: one asynchronous SRAM, 1M words of 32 bits.

The PE can reach an image in two ways. It can drive the SRAM pins itself and
work on pixels in place (*direct access*). Or the router can scan the image
out of memory and stream it through the PE on a 16-bit bus (*PIPEFlow*),
one half-pixel per clock. The host starts and watches the PE through a small
register bus, the *PIPE bus*.

This repository is synthesizable SystemVerilog for the PE side of SONIC:

- the SRAM and PIPE bus interfaces;
- three direct-access programs: colour inversion, image merging, and an
  inner product;
- three streaming stages: a colour inverter and the two halves of an edge
  detector.

The inner product is the most unusual part. Its multipliers are
*shared*: fewer multipliers than products, with operand multiplexers that
choose, cycle by cycle, which pair each multiplier works on. Two schedules
are built, and they trade area against cycles differently.

Everything runs from the single 33 MHz board clock. All resets are
asynchronous and active low (`rst_n`).

## How the pieces fit

```
                    sonic_top
  PIPE bus ──► ┌──────────────── pe_direct ─────────────────┐
  (host)       │ pipe_bus_if ─► registers ─► dm_invert ──┐  │
               │                          ─► dm_merge  ──┼─►│ pm_mem_if ─► M_* pins
               │                          ─► ip_engine ──┘  │  (to the SRAM)
               │                               └ shared_mac │
               └────────────────────────────────────────────┘
  pf_inv_in  ─► pf_invert ─► pf_inv_out
  pf_edge_in ─► pf_gauss ─► pf_edge_mid ─► pf_laplace ─► pf_edge_out
                (PIPE 0)                   (PIPE 1)
```

On the real board each of these is a separate FPGA configuration, loaded
when it is needed. `sonic_top` places them side by side, each with its own
pins, so they can be built and simulated together. Three things sit outside
the design and are met only at the pins:

- the SRAM;
- the router;
- the host.

The testbenches provide a behavioural SRAM (`tb/pm_sram_model.sv`) and drive
the PIPE bus and PIPEFlow the way the router and host would.

## Talking to the asynchronous SRAM (`pm_mem_if`)

This interface sets the speed of every direct-access program, so it is
worth understanding first.

The SRAM has no clock. An FPGA that can only change outputs on a clock edge
must therefore stretch each access over whole cycles, long enough to cover
the SRAM's access time at 33 MHz. The interface uses **4 cycles per read**
and **3 cycles per write**. Every pin is decoded from the registered state,
so no pin can glitch.

| cycle | M_NS | M_NW | address | data pins | what happens |
|---|---|---|---|---|---|
| R1 | 0 | 1 | driven | released | select the SRAM for reading |
| R2 | 0 | 1 | driven | released | wait |
| R3 | 0 | 1 | driven | released | data becomes valid at the end of this cycle |
| R4 | 1 | 1 | driven | released | data captured and returned |
| W1 | 1 | 1 | driven | driven | address and data set up |
| W2 | 0 | 0 | driven | driven | the SRAM writes |
| W3 | 1 | 1 | released | released | release |

Between accesses all pins are released (every `*_oe` is low). The board is
expected to pull M_NS and M_NW high.

The data pins are never driven while M_NS is low and M_NW is high. An
assertion in the module checks this.

**Request handshake.** The request port is `req`/`we`/`addr`/`wdata`, and a
request is taken when `ready` is high. `ready` is high in two cases:

- when the interface is idle;
- in the last cycle of an access (R4 or W3).

So a program can chain accesses with no idle cycle between them. `done`
marks the last cycle of an access. Read data (`rdata`) is valid with `done`
and is held until the next read ends.

**Byte order.** The SRAM returns a pixel as G,R,α,B: each 16-bit half has
its two bytes swapped. With `SWAP_BYTES=1`, the interface swaps the two
bytes in each half on both reads and writes. Every engine therefore sees a
pixel as R,G,B,α, with R in bits 31:24 (see `pm_swizzle` in
`rtl/sonic_pkg.sv`). On the original board this was done by permuting the
pin assignment.

## Direct-access programs and the register map (`pe_direct`)

The host reaches the engine through `pipe_bus_if`. A transaction has two
cycles:

1. An address cycle: CS and AS high. AD holds the register number, and WRITE
   gives the direction.
2. A data cycle, immediately after: CS high and AS low.

Only single-transaction mode is built. Burst mode is not.

| addr | name | use |
|---|---|---|
| 0 | CTRL | Write bit 0 = 1 to start the program in bits 5:4 (0 invert, 1 merge, 2 inner product). A start is ignored while a program runs. |
| 1 | STATUS | Reads 0 after reset, 1 while running, 2 when finished. |
| 2 | COUNT | Number of pixels. The reset value is 307200, one 640×480 image. |
| 3 | BASE | First PM word of the image or the vectors. |
| 4, 5 | RES_LO, RES_HI | Inner product result. |

The host protocol is: write 1 to CTRL, then poll STATUS until it reads 2.
The register numbers, COUNT/BASE and the program field are this design's
own choices.

All three programs share the one `pm_mem_if`. A multiplexer hands the
memory port to the program that was started, and an assertion checks that
only one program is busy at a time.

- **`dm_invert`**: for each pixel, read it (4 cycles), invert R, G and B and
  keep α (1 cycle), then write it back (3 cycles). That is 8 cycles per
  pixel. The next read is issued in the last write cycle, so the rate holds
  exactly. One 640×480 image takes 2,457,600 cycles, or about 74 ms.
- **`dm_merge`**: blends two images, C = (1−a)·A + a·B, with the weight a
  fixed at one half. It works byte by byte, α included: C = (A>>1) + (B>>1).
  Image A starts at BASE and image B at BASE + 524288 (`B_OFFSET`, the upper
  half of the PM). C overwrites A. Each pixel takes 12 cycles: two reads, one
  merge cycle and one write. The reference workload is 131072 pixels.
- **`ip_engine`**: computes an inner product from vectors in memory.
  - X is at BASE .. BASE+N−1 and Y at BASE+N .. BASE+2N−1. The low W bits of
    each word are used.
  - It loads all 2N elements, then runs `shared_mac`.
  - It writes the result to BASE+2N (low word) and BASE+2N+1 (high word). It
    also leaves the result in RES_LO/RES_HI.
  - The memory layout is this design's own choice.

Parameters of `pe_direct`: `AW` (20), `DEF_COUNT` (307200), `B_OFFSET`
(524288), `IP_N` (8), `IP_W` (16), `NMULT` (3), `SHARING` (`SHARE_ADHOC`).

## Sharing multipliers (`shared_mac`)

Multipliers are the most expensive operators in an FPGA. `shared_mac`
computes X1·Y1 + … + XN·YN with `NMULT` multipliers, where `NMULT` ≤ `N`.
Each multiplier has a multiplexer on each of its two operands. A small
counter drives the selects. All products of a cycle are added into one
accumulator.

The two schedules differ in how the N products are dealt out:

| schedule | which multiplier does product i | cycles |
|---|---|---|
| `SHARE_ADHOC` | i mod NMULT, in cycle ⌊i/NMULT⌋ (round robin) | ⌈N/NMULT⌉ |
| `SHARE_NONEVEN` | multiplier 0 does products 0 … N−NMULT, one per cycle; the others each do one of the remaining products in the final cycle | N−NMULT+1 |

For N=8 and NMULT=3 these are:

| | ADHOC | NONEVEN |
|---|---|---|
| cycles | 3 | 6 |
| products per multiplier | 3, 3, 2 | 6, 1, 1 |
| inputs per operand multiplexer | up to 3 | 6, 1, 1 |

Non-even sharing needs wide multiplexers only in front of one multiplier.
The others are barely shared. Adhoc sharing spreads the multiplexers evenly
and finishes sooner.

The result is unsigned and 2W + ⌈log2 N⌉ bits wide. The configurations
tested are 8 elements of 16 bits and 16 elements of 12 bits. Each is tested
under both schedules and over a range of NMULT.

Running all of a cycle's multipliers in parallel, and so the cycle counts
above, is this design's reading of the two schemes. The source reports only
area and clock speed for them.

## Streaming over PIPEFlow

### The stream and how a frame is found (`pf_framer`, `pf_window`)

A PIPEFlow word is 16 data bits plus three flags, packed as `pf_word_t`
`{inst, ends, endl, data}`:

- INST marks header words.
- ENDS marks the end of a strip.
- ENDL marks the end of a line.

A frame is:

1. header words (format, width, height), with INST high;
2. then two words per pixel: an R,G word (R in bits 15:8), then a B,α word.

The router delivers one word per clock. The bus has **no valid bit**, so a
stage must work out for itself which words are pixel data. That is the most
delicate part of the streaming designs. `pf_framer` does it like this:

- An INST word opens a frame.
- After the header, the framer alternates between R,G and B,α.
- The B,α word of the pixel flagged ENDS closes the frame.
- Words outside a frame, such as an idle bus between frames, are passed
  through untouched and never treated as pixels.

This assumes one strip per frame, which is how every image in the design is
sent. If several ENDS-terminated strips followed one header, the framer
would need to count strips instead.

**The neighbour window.** The filters need each pixel's neighbours. The
filter input is its green component. `pf_window` keeps a short delay line of
words and supplies three green values: the previous pixel's (`g_prev`), the
current one's (`g_mid`) and the next one's (`g_next`). Rules at the edges:

- A missing neighbour at either end of a frame is taken as 0.
- Line ends are *not* treated specially. The filter runs straight along the
  scan, as in the original circuit. So the first pixel of a line sees the
  last pixel of the line before.

### The three stages

| module | output per pixel | latency |
|---|---|---|
| `pf_invert` | R,G,B inverted, α kept | 3 clocks |
| `pf_gauss` | f = (g_prev + 2·g_mid + g_next) / 4. The R,G word becomes {f,f}; the B,α word becomes {f,α}. | 4 clocks |
| `pf_laplace` | v = max(0, 2·g_mid − g_prev − g_next) · 2^GAIN_SHIFT, saturated at 255. Both words become {v,v}. | 4 clocks |

All three accept one word per clock. Header words and flags come out
unchanged, delayed by the stage's latency. A 640×480 image therefore passes
the inverter in 614,403 clocks (3 header words + 2×307,200 pixel words),
about four times fewer than direct access needs. The reason is that the
router, not the PE, does the memory traffic.

Clipping negative Laplacian values is what makes the edge image
one-signed. `GAIN_SHIFT` defaults to 4. Saturating at 255 after the shift is
this design's choice; it stops the result from wrapping.

### Edge detection split across two PIPEs

`pf_gauss` runs on PIPE 0 and `pf_laplace` on PIPE 1. The Gaussian output is
carried to PIPE 1 over the PIPEFlow link (`pf_edge_mid`), which is simply a
wire in `sonic_top`. While PIPE 1 filters frame k, PIPE 0 is already
smoothing frame k+1. The end-to-end test sends two 320×240 frames back to
back to check this overlap.

Each 2-D mask is separable into a row pass and a column pass. On the board,
each PIPE's router feeds its image through the engine twice: once in row
order and once in column order (height and width swapped). Only the second
pass goes on to the next PIPE. The engine stage is the same for both passes,
because a column-order stream looks to it like any other frame. The top,
however, links the two engines directly, so one trip through `sonic_top`
applies one 1-D Gaussian pass followed by one 1-D Laplacian pass. The
second passes depend on the router's rescanning, which is not part of this
design. The testbench `tb_edge_passes` takes the router's place and
runs all four passes on a 640×480 image.

Running both filters on one PIPE by reloading the FPGA between passes is not
modelled. Reconfiguring the FPGA is a board function.

## Where this departs from the original description

- All engines sit in one top. On the board each is its own configuration.
- **Write cycle.** One table of SRAM modes lists writing with M_NW high. The
  write-cycle description, by contrast, pulls both M_NS and M_NW low in the
  second cycle. The design follows the cycle description, because a write
  with M_NW high would be a read.
- **Registers.** The register map, COUNT/BASE, the program field and the
  ignore-start-while-busy rule are this design's own. Only the start value
  (1) and the finished status (2) come from the source.
- **Inner-product memory.** The inner product's memory layout and its
  two-word result are this design's choices.
- **Frame rules.** These are this design's choices:
  - a frame ends at the ENDS pixel;
  - zero neighbours at frame ends;
  - the latency of 4 clocks for the filters.
- **Not built, because no logic for it is given:**
  - the router's crossbar;
  - the PCI/SDI interfaces and the board controller;
  - the SRAM itself (only a simulation model);
  - the PLL;
  - the elliptic wave filter that also uses shared multipliers;
  - the gamma-correction and black-and-white plug-in functions.

## Simulating

Every testbench checks its outputs against values it computes itself. It
prints `TB_RESULT checks=<n> failures=<m>` at the end and has a watchdog.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/sonic_pkg.sv tb/pf_tb_pkg.sv tb/tb_sonic_top.sv --top-module tb_sonic_top
./obj_dir/Vtb_sonic_top
```

For another bench, replace `tb_sonic_top` with its name. `tb/pf_tb_pkg.sv`
(the stream helpers) is needed only by the PIPEFlow benches and the top.

| bench | what it covers |
|---|---|
| `tb_pm_mem_if` | Random reads and writes against the SRAM model. The select and write pins are checked in every cycle, along with the access lengths, back-to-back accesses and the byte swap. |
| `tb_pipe_bus_if` | Register writes and reads, and a stray data cycle with no address cycle before it. |
| `tb_dm_invert`, `tb_dm_merge` | Memory contents after the run, including untouched neighbours. Cycles per pixel are checked exactly: 8 and 12. |
| `tb_shared_mac` | Both schedules. The 8×16-bit and 16×12-bit cases, several NMULT values, and exact cycle counts. |
| `tb_ip_engine` | Result in memory and registers, and the exact run time. |
| `tb_pe_direct` | All three programs started over the PIPE bus, plus status polling. |
| `tb_pf_invert`, `tb_pf_gauss`, `tb_pf_laplace` | Frames of random pixels with idle words between them. Output and latency are checked word by word. |
| `tb_edge_passes` | 2-D edge detection of a 640×480 image on one PIPE: Gaussian along rows, then columns; then, after the engine is swapped, Laplacian along columns, then rows. The bench does the router's rescanning. Every pass is checked word by word, and so is its length. The final image is checked against a direct 2-D evaluation. |
| `tb_sonic_top` | The whole design at full size. It also counts that each mechanism happened at least once. |

`tb_sonic_top` uses every default parameter and runs these steps in order:

1. inversion of a 640×480 image in the 1M-word memory, with a start issued
   while busy;
2. a 131072-pixel merge;
3. an inner product;
4. a 640×480 frame through the streaming inverter;
5. two 320×240 frames through the Gaussian → Laplacian chain.

The mechanisms it counts are: chained read-after-write accesses, the ignored
start, multiplier reuse, header pass-through, and two frames in flight at
once.

Measured at full size:

- inversion took 2,457,730 clocks, which is 8 per pixel plus the register
  accesses;
- the merge took 1,573,050 clocks;
- the streaming inverter took 614,403 clocks.

The run takes under a minute.

To change a size, override the parameters listed above. Memory-heavy
benches shrink `AW` (`tb_dm_merge` and `tb_pe_direct` use AW=12) to stay
fast.
