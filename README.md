# MCADSW: a mini-census adaptive-support-weight stereo engine

Given a rectified stereo pair, this engine works out for every pixel of the left image how far (the disparity d) the same scene point has moved in the right image. It writes that disparity as a depth map. The matching is local. Each pixel is compared over a 31x31 support window whose pixels are weighted by how close their colour is to the window centre. These *adaptive support weights* keep depth edges sharp without any global optimisation.

The architecture comes from a 2008 thesis on real-time local stereo matching (MCADSW, National Chiao Tung University). It makes adaptive-support-weight matching cheap enough for hardware in four ways:

- **Cost**: a 6-bit *mini-census* code replaces absolute intensity differences, so the cost of a candidate match is a Hamming distance of 0..6.
- **Weights**: colour distance is the Manhattan distance in YUV. The exponential weight is quantised to a power of two (64, 32, ... 1, 0), so every multiplication becomes a shift.
- **Aggregation**: the 2-D window is split into a vertical 31x1 pass followed by a horizontal 1x31 pass.
- **Data reuse**: census codes and weights are computed once per column and kept in column-wide cyclic buffers. The aggregation kernel reuses them for every disparity.

The default configuration is the original target: CIF 352x288, 64 disparities, a 32-bit external bus, and 100 MHz in the original. The full-frame testbench runs a whole CIF frame at these defaults and checks every output byte.

## The algorithm as computed

**Mini-census.** For pixel p, six samples of the 5x5 window around p are compared with p itself. A sample brighter than p gives bit 0, otherwise 1. The sample offsets (dy,dx) are:

```
(-2,-2) (-2,+2) (0,-2) (0,+2) (+2,-2) (+2,+2)
```

Only the left and right luminance planes are census-transformed. The matching cost of pixel (x,y) at disparity d is

```
C(x,y,d) = popcount( census_L(x,y) XOR census_R(x-d,y) ),   0..6
```

**Weights.** The colour distance between the centre c and a neighbour n is `D = |Yc-Yn| + |Uc-Un| + |Vc-Vn|`. It maps to a weight like this:

| D | 0 | 1-4 | 5-9 | 10-14 | 15-19 | 20-24 | 25-29 | >=30 |
|---|---|-----|-----|-------|-------|-------|-------|------|
| weight | 64 | 32 | 16 | 8 | 4 | 2 | 1 | 0 |
| 3-bit code | 6 | 5 | 4 | 3 | 2 | 1 | 0 | 7 |

A weight is stored as its 3-bit code and applied as a left shift. Code 7 means weight 0. Weights come from the left image only.

**Two-pass aggregation.** The vertical pass is

```
V(x,y,d) = sum_{j=-15..15} w(x,y | x,y+j) * C(x,y+j,d)
```

Here `w(a|b)` is the weight of pixel b relative to centre a. The centre term always has weight 64. The horizontal pass is

```
H(x,y,d) = sum_{i=-15..15} w(x,y | x+i,y) * V(x+i,y,d)
```

There is no division by the sum of the weights. All disparities of a pixel share the same weights, so that sum would not change which disparity wins.

**Winner takes all.** The output is the d with the smallest H. A later disparity replaces the current best only if its cost is strictly smaller, so ties keep the smaller disparity. The byte written is `depth = 4*d`, which spreads 64 levels over 0..252.

**Borders.** Pixels outside the image read as 0 for the census. A neighbour outside the image has weight 0. A column left of the right image reads as census code 0.

## Data flow

```
 external memory (left Y,U,V; right Y; depth map)
        |  32-bit bus
   mem_ctrl <---- rr_arbiter <---- 6 requesters
        | read words (request-valid)        ^ depth writes (request-grant)
   +----+---------------------+             |
   |                          |             |
census_unit L   census_unit R   weight_gen (Y,U,V)
   |               |              |         |
 CENLBUF 64     CENRBUF 128     VWBUF 96  HWBUF 96    (col_buf: column cyclic buffers)
   +-------+-------+--------------+---------+
           |
        agg_wta: Hamming -> vert_pe -> pingpong_buf -> horz_pe -> wta
           |
        depth_fifo (18 bytes) ---> bus
```

The producers and buffers are:

- **census_unit** (two instances, for the left and right Y planes). Each fetches a 35-row, 4-column group of pixels, enough for 31 output rows plus the census radius. It produces one *census column*, the 31 codes of one image column around the current row (186 bits), per clock.
- **weight_gen** fetches 31 rows of Y, U and V and produces two words per column:
  - a *vertical weight word*: the 30 codes of `w(x,y | x,y+j)`, 90 bits;
  - a *horizontal weight word*: the 30 codes of `w(x,y | x+i,y)`, 90 bits.

  For the horizontal words it keeps the centre row's colours of the last 64 columns in a small buffer (BUFFYUV).
- **col_buf** holds one column per slot in a cyclic memory. The slot counts are 64 (left census), 128 (right census, which must reach 63 columns further left) and 96 (both weight buffers).

## How a row is computed: segments and the disparity sweep

This schedule is the hardest part of the design to follow.

The engine produces one output row at a time. The row is cut into segments of 18 pixels: 20 segments per CIF row, so the depth map is 360 bytes wide and its last 8 bytes per row are 0.

For a segment starting at x0, the horizontal pass needs vertical costs of columns x0-15 .. x0+32. That is 48 columns, which is exactly one bank of the ping-pong buffer. The kernel (`agg_wta`) then sweeps the disparities in **slots of 48 clocks**:

```
slot:      0        1        2      ...     63       64     out
V pass:  V(d=0)   V(d=1)   V(d=2)   ...   V(d=63)    -       -
         ->bank0  ->bank1  ->bank0        ->bank1
H pass:    -      H(d=0)   H(d=1)   ...   H(d=62)  H(d=63)   -
                  <-bank0  <-bank1                 <-bank1
WTA:              18 updates per slot                       18 pushes
```

- **Vertical pass.** In clock k of slot d, column xv = x0-15+k is processed. `vert_pe` takes the left census column xv, the right census column xv-d and the vertical weight word of xv. It forms the 31 Hamming costs, shifts and sums them, and writes V into entry k of bank d mod 2.
- **Horizontal pass.** In clocks 0..17 of slot d+1, `horz_pe` reads bank d mod 2, entries k..k+30, for pixel x0+k. It applies that pixel's horizontal weight word and passes H to the WTA.
- **Timing.** Both passes run at the same time on different banks. A segment takes 65 x 48 + 18 = 3138 clocks when nothing stalls. After the sweep, the 18 depth bytes go into the depth FIFO.

**Stalls.** A segment starts only when every buffer holds all the columns it needs. That means census and vertical weights up to x0+32, and horizontal weights up to x0+17. While they do not, the kernel waits and raises `stall_wait`. While the depth FIFO is full, the output phase waits and raises `stall_fifo`.

**Release.** While a segment is processed, the kernel keeps telling each buffer which columns it will never read again:

- left census and vertical weights: everything below x0-15;
- right census: everything below x0-15-63;
- horizontal weights: everything below x0.

When x0 moves on by 18, these bounds move with it and the producers may refill the freed slots.

## Column cyclic buffers and their update tables

Every buffer between a producer and the kernel is a column-indexed ring guarded by an update table (`col_update_ctrl`):

- **Update table**: one *active* bit per slot.
- **Set pointer**: the next column to be written. The producer may write only while the slot under the set pointer is inactive (`can_set`). Writing marks the slot active and advances the pointer.
- **Clear pointer**: frees slots one per clock, as long as it is below the kernel's `release_col` and below the set pointer.

Because of this, a producer can run ahead of the kernel by up to a full buffer, and it blocks rather than overwrites. `avail` (the set pointer) tells the kernel how many columns exist. The kernel addresses columns by absolute column number; the buffer takes it modulo its depth.

## Sharing the bus

There are six requesters:

- the depth FIFO;
- census L (left Y);
- census R (right Y);
- weight Y, weight U and weight V (left image).

**Arbitration** (`rr_arbiter`) is hybrid:

- The depth FIFO always wins, because stalling it stalls the kernel.
- The five image requesters share a round robin. The requester just granted drops to the lowest priority.
- The initial order is census L, census R, weight Y, weight U, weight V.
- A grant to the depth FIFO leaves the order unchanged.

The arbiter grants only while `mem_ctrl` is idle.

**Transfers** (`mem_ctrl`):

- An image requester's grant starts a read burst: base word, stride in words (one image row) and word count. The controller returns each word on `rd_data` with that requester's `rd_valid` bit set.
- A depth-FIFO grant pops one byte and writes it as one word with a one-hot byte enable.

**Bus protocol.**

- `bus_req` holds the command (`bus_we`, `bus_addr` as a word address, `bus_be`, `bus_wdata`) steady until the memory returns a one-clock `bus_ack`.
- Read data arrive on `bus_rdata` with the ack.
- Only one access is outstanding at a time.

**Memory map.**

- Each plane is stored row by row, W/4 words per row, 4 pixels per word (byte k holds column 4w+k). `base_ly`, `base_ry`, `base_lu` and `base_lv` are the plane base addresses, as word addresses.
- The depth map starts at byte `4*base_depth` and has 360 bytes per row for CIF.

## Top level and row sequencing

`mcadsw_top` wires the blocks above and runs a frame as follows:

1. `start` launches a frame.
2. For each row, the sequencer restarts both census units, the weight generator and the kernel, and empties the buffers.
3. The row ends when all of them are idle, the depth FIFO is empty and the memory controller is idle.
4. `done` pulses after the last row.

`stall_wait`, `stall_fifo` and `grant` are brought out for observation.

## Where this design departs from the original

- **One row at a time, without multi-row reuse.** The original reuses census codes and weights over several output rows (17 extra rows per pass). Here every row restarts the producers, so each input row is fetched about 31-35 times. Buffer sizes are the original's sizes without that reuse.
- **One processing element per pass.** The original does not state how many elements work in parallel; it appears to produce three horizontal costs per step. This engine does one vertical and one horizontal cost per clock. A CIF frame therefore takes about 18 M clocks of computation, about 5.5 frames/s at 100 MHz, against the original's 43 frames/s. With the test's bus model it takes 28.7 M clocks. This is the main limitation.
- **Ping-pong granularity.** The banks swap once per disparity slot. The original starts horizontal costs as soon as enough entries are ready.
- **No separate ready/request exchange.** The original lets the aggregation kernel collect fixed 384-cycle bursts from its producers. Here the kernel simply waits on the buffers' column counts.
- **Smaller input buffers in the weight generator.** It uses 31x8 pixels per component plus the 64-entry BUFFYUV, instead of 31x66 per component. The three components are fetched one after another.
- **Choices of this design.** The original does not give:
  - the census sample positions;
  - weight 0 for distances of 30 or more;
  - the border rules;
  - depth = 4d;
  - the bus protocol;
  - the memory layout.

Synthesised with yosys (generic cells), the top at default parameters has about 11.4 k cells, 13.3 k flip-flop bits and 55 k bits of memory arrays.

## Files

| file | role |
|------|------|
| `rtl/mcadsw_pkg.sv` | constants, requester IDs, bus command structs, weight and shift functions |
| `rtl/mini_census.sv`, `rtl/weight_lut.sv` | census code of one pixel; colour distance to weight code |
| `rtl/census_unit.sv`, `rtl/weight_gen.sv` | producers with their input buffers and fetch state machines |
| `rtl/col_update_ctrl.sv`, `rtl/col_buf.sv` | update table; column cyclic buffer |
| `rtl/vert_pe.sv`, `rtl/horz_pe.sv`, `rtl/pingpong_buf.sv`, `rtl/wta.sv` | aggregation datapath |
| `rtl/agg_wta.sv` | kernel sequencer (segments, disparity slots, stalls, release) |
| `rtl/depth_fifo.sv`, `rtl/rr_arbiter.sv`, `rtl/mem_ctrl.sv` | output FIFO and bus sharing |
| `rtl/mcadsw_top.sv` | top level and row sequencer |
| `tb/tb_<block>.sv` | self-checking unit testbenches |
| `tb/mcadsw_tb_env.sv` | memory model, synthetic stereo pair, reference model |
| `tb/tb_mcadsw_top.sv` | end-to-end test, 36x8 pixels, 8 disparities |
| `tb/tb_mcadsw_full.sv` | one full CIF frame at default parameters |
| `tb/tb_mcadsw_latency.sv` | a 52x8 frame at bus latencies 1 to 8 |

## Verification

Every testbench compares against an independent model written in plain behavioural SystemVerilog. Each prints `TB_RESULT checks=N failures=M` and has a cycle watchdog.

The unit testbenches use random stimulus and, where it matters, random back-pressure and random bus gaps:

- the arbiter testbench replays a priority-rotation example and then runs random patterns against a list model;
- the kernel testbench returns junk for columns that are not yet, or no longer, available.

The end-to-end testbenches (`mcadsw_tb_env`) model external memory with a fixed latency and periodic windows in which the bus refuses access. The stereo pair is synthetic: the right view is the left view shifted by known disparities in different regions. The environment computes every depth byte with its own reference implementation and compares the whole map. It also counts, and fails if any never happened:

- kernel waits on data;
- stalls on a full depth FIFO;
- contended round-robin grants;
- grants to each requester;
- the number of depth writes.

`tb_mcadsw_latency` runs one 52x8 frame with 16 disparities at bus latencies 1 to 8. Every run must give the correct depth map, and the cycle count must rise with the latency. It goes from 73.7 k to 192.3 k clocks; the bus is also paused for 1500 of every 2003 clocks.

The full CIF frame passes with 103,689 checks. It takes about 28.7 M simulated clocks and roughly a minute of simulation time once compiled.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/mcadsw_pkg.sv rtl/*.sv \
    tb/mcadsw_tb_env.sv tb/tb_mcadsw_top.sv --top-module tb_mcadsw_top -o sim
./obj_dir/sim
```

For the full frame, use `tb/tb_mcadsw_full.sv` and `--top-module tb_mcadsw_full`. For a unit test, give its `tb/tb_<block>.sv` instead of the two environment files.

## Changing the configuration

The top's parameters are `W`, `H` and `DISP`:

- W must be a multiple of 4.
- `DISP` up to 64 keeps the default buffer depths valid.
- The right census buffer must hold the 48 columns of a segment plus DISP-1 columns to their left (111 of its 128 slots at the default). More disparities need a deeper `u_cenrbuf` in `mcadsw_top`.
