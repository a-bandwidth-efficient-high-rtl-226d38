# Bandwidth-efficient 2D convolution unit

A 2D convolution slides a K x K kernel over an N x N image and produces
M x M outputs, with M = N-K+1:

    O(x,y) = sum over m,n in 0..K-1 of  I(x+m, y+n) * W(m,n)

Fetched naively, every output needs K*K image words, so the unit would read
M*M*K*K words from memory. Neighbouring windows overlap almost entirely,
though. Moving one step to the right shares K*(K-1) of the K*K words. This
unit reads each image word at most K times, once per band that contains it,
and keeps the shared words on chip in a small circular store called the
**Circle Buffer**. Only one kernel's worth of words plus one extra word is
buffered, so a single 24-bit multiply-accumulator computes the whole
convolution.

Memory traffic falls from M*M*K*K to M*N*K words. The bandwidth reduction is
therefore

    r = 1 - N / ((N-K+1) * K)

This gives 66.4 % for N = 256 and K = 3, and 90.5 % for K = 11.

The unit has four parts:

| block | module | role |
|---|---|---|
| Register File | `conv_regfile` | control registers and the kernel weights (Weight Registers) |
| Loader | `loader` (+ `loader_agu`) | DMA engine: requests the bus, walks the image in band/column order, pushes words into the buffer |
| Circle Buffer | `circle_buffer` (+ `dp_ram`, `ptr_sync`) | reuse store of KMAX*KMAX+1 words, managed by three pointers |
| MAC unit | `mac_unit` (+ `mac_datapath`) | one multiplier and accumulator; writes one result per window to the next stage |

The Loader and the MAC unit form a two-stage pipeline through the buffer.
They run at their own pace, and the buffer's full and empty conditions keep
them in step. They also run on separate clocks: `clk` drives the register
file, the Loader and the buffer's write side, while `mac_clk` drives the MAC
unit and the buffer's read side.

## Bands and columns: the order in which words move

The image is cut into M horizontal **bands** of K rows each. Band b covers
image rows b .. b+K-1, so consecutive bands overlap by K-1 rows. Band b holds
exactly the windows of output row b. The Loader reads the bands top to
bottom. Within a band it reads column by column from left to right, and each
column top to bottom (K words).

For N = 6 and K = 3 (16 outputs), band 0 is rows 0-2. The Loader sends
I(0,0) I(1,0) I(2,0), then I(0,1) I(1,1) I(2,1), and so on up to column 5:
18 words. Window (0,0) is columns 0-2 of that stream, window (0,1) is columns
1-3, and so on. Each window after the first needs only one new column of
K words. The whole image costs 4 bands x 18 = 72 reads instead of 144.

The address arithmetic is small. The address unit keeps `Paddr`, the top of
the current column, and `Addr`, the word being read. Each word adds C = N to
`Addr`, and each column adds 1 to `Paddr`. After the last column of band b,
`Paddr` has reached the start of image row b+1, which is the first word of
band b+1. Stepping from one band to the next therefore needs no extra logic.
The image must be stored row-major with word (r,c) at `IADDR + r*N + c`.

## The Circle Buffer

The buffer is a dual-port memory of CAP = KMAX*KMAX + 1 words (122 for
KMAX = 11). It is addressed by three pointers that all count modulo CAP:

* **WP** (write pointer) is the next free location. The Loader writes there
  and WP moves on by one.
* **RP** (read pointer) is the first word of the window being computed.
* **CP** (circle pointer) is the next word the MAC unit will read. It runs
  from RP through the K*K words of the window; that pass is one *read
  round*.

At the end of a round RP moves forward by K, which drops the window's oldest
column, and CP is reset to the new RP. The K*(K-1) words that remain are the
first K-1 columns of the next window. Its last column is the K words the
Loader writes next. Because the words arrive column-major, each window is
replayed column by column, and the MAC unit pairs the weights with it in
that order.

The rules that keep the two sides apart:

* **Full** when WP+1 = RP. One location is always left unused, so full and
  empty can be told apart. With K = KMAX the buffer holds exactly one window.
  The Loader then writes the next column only after RP has moved.
* **Empty**, for the reader, when CP = WP: the next word of the round has not
  been written yet, so the MAC unit waits.
* **Band end.** The last window of a band shares nothing with the first
  window of the next band. After the last round of a band, RP therefore
  advances by K*K rather than K. The buffer counts rounds, and its
  `cfg_cols` input gives the number of windows per band. This step is what
  makes the scheme work over a whole image; see "Departures" below.

Walking through N = 6, K = 3: band 0 fills locations 0-17. The four rounds
start at RP = 0, 3, 6 and 9. After the fourth round RP jumps by 9 to 18,
which is where band 1's first column was written. When K is smaller than
KMAX the buffer has room to spare. The Loader then runs ahead by up to
CAP-1 words, often into the next band, so the MAC unit does not wait at band
changes.

**Two clocks.** The buffer has separate write and read clocks and resets.
With `DUAL_CLOCK = 1`, the default, each side sees the other side's pointer
through `ptr_sync`, a toggle-handshake synchronizer. That pointer is a few
cycles old, which only makes the buffer look fuller or emptier than it is,
never corrupt. Gray coding alone would not be safe here, because RP moves by
K or K*K in one step.

With `DUAL_CLOCK = 0` the two clock inputs must carry the same clock. The
pointers are then compared directly, and a word written on one edge can be
read on the next. The memory reads asynchronously, as distributed RAM does.

## Clock domains

| domain | clock | signals |
|---|---|---|
| load side | `clk` | configuration and weight ports, `loader_*`, bus and memory port, `cb_full` |
| compute side | `mac_clk` | `mac_start`, `mac_busy`, `mac_done`, `conv_done`, `o_*`, `cb_empty` |

`rst_n` is asserted asynchronously. Each domain has its own synchronizer
(`reset_sync`), so the unit leaves reset two edges of each clock after
`rst_n` rises.

The MAC unit reads its configuration registers and the weights across the
domain boundary without synchronization. It samples the registers at
`mac_start` and reads the weights throughout a job. The host must therefore
leave the MAC registers unchanged for a few cycles around `mac_start`, and
the weights unchanged until `mac_done`. It may reprogram the Loader
registers at any time the Loader is idle.

## Loader

A `start` pulse latches IADDR, B (bands), C (columns) and R (rows per band)
and raises `hreq`. The Loader holds the bus from `hlda` until the last word.
The host must keep `hlda` high while `hreq` is high.

Memory reads are pipelined: `mem_rd` and `mem_addr` in one cycle,
`mem_rdata` in the next. The Loader therefore moves one word per cycle while
the buffer accepts. If the buffer reports full as a word arrives, that word
is parked in a register and written when there is room; then reading
resumes.

`done` rises one cycle after the last push. With an immediate grant, a load
takes B*C*R cycles plus about 3 cycles of overhead.

## MAC unit and number format

A `start` pulse latches K, the outputs per band, the number of bands and the
output start address. For each output the unit then:

1. takes K*K words from the buffer, one per cycle while data is there, and
   accumulates `word * weight`;
2. waits while `o_busy` (the next stage is busy) is high;
3. writes the result with a one-cycle `o_we` to `OADDR + output index`,
   together with a `conv_done` pulse.

Each output thus takes K*K+1 cycles. Outputs come in row-major order.
Because the configuration is latched, the host can reprogram the Loader
registers and restart the Loader for the next job while the MAC unit is
still finishing the current one.

Words are 24-bit signed fixed point with 12 fraction bits (Q12.12; change
`FRAC_BITS` in `conv2d_pkg`). The accumulator is 55 bits wide, so a sum of
up to 121 full-scale products cannot overflow. The result is the accumulator
shifted right arithmetically by `FRAC_BITS`, which rounds toward minus
infinity, and then saturated to 24 bits.

## Programming the unit

Write the registers through `cfg_we`/`cfg_addr`/`cfg_wdata`. They read back
on `cfg_rdata`.

| addr | register | value for an N x N image, K x K kernel |
|---|---|---|
| 0 | IADDR | image start address |
| 1 | B | bands = N-K+1 |
| 2 | C | columns = N |
| 3 | R | rows per band = K |
| 4 | OADDR | address of O(0,0) |
| 5 | K | K (1 .. KMAX) |
| 6 | OCOLS | outputs per band = N-K+1 |
| 7 | OROWS | bands = N-K+1 |

Write weight W(m,n) with `coeff_in`, `c_we_in` and `c_wa_in = m*K+n`
(row-major). Then pulse `loader_start` and `mac_start`, in either order.
`loader_done` and `mac_done` stay high from the end of a job until the next
start. `cb_full` and `cb_empty` show the state of the buffer.

B, C and R are kept separate from K and OCOLS so that the Loader can also
cover non-square images (rows x C). The two sets must describe the same
geometry: R = K and B = OROWS, with C - K + 1 = OCOLS.

A layer with several input channels or filters runs as one convolution per
(filter, channel) pair. Adding the channel results together is left to the
next stage.

## Measured behaviour

These results come from simulating the unit at its default parameters, with
both clock inputs on the same clock, an immediate bus grant and a next stage
that is never busy:

| workload | MACs | MAC-run cycles | reads per convolution (without reuse) | reduction |
|---|---|---|---|---|
| N=28, K=5, 20 filters | 288,000 | 299,760 | 3,360 (14,400) | 76.7 % |
| N=224, K=3, 16 filters x 3 channels | 21,290,688 | 23,656,896 | 149,184 (443,556) | 66.4 % |
| N=256, K=3 / 5 / 7 / 9 / 11 | | | | 66.4 / 79.7 / 85.4 / 88.5 / 90.5 % |
| N=255, K=11 | 7,263,025 | 7,326,478 | 687,225 (7,263,025) | 90.5 % |

A MAC run takes M*M*(K*K+1) cycles plus start-up. With K = KMAX each band
change costs about 14 more cycles. A full-size window leaves no room to fetch
the next band ahead, so the MAC unit waits for the Loader, and the pointer
synchronizers add latency to that wait. With `DUAL_CLOCK = 0` the wait drops
to about one cycle.

Synthesis of the default configuration gives about 300 word-level cells,
a 122 x 24-bit buffer memory, a 121 x 24-bit weight memory and about 680
flip-flops.

## Departures and own choices

The RTL follows the published microarchitecture: three blocks plus a
register file, band/column loading, the three-pointer buffer sized
KMAX*KMAX+1 with its full and empty rules, and the loop structure of the
Loader and the MAC. The following points are this implementation's own:

* **Band end in the buffer.** RP skips K*K words after the last window of a
  band. The published description says only that the first window of each
  band must be loaded in full.
* **Buffer control.** The buffer's Reset/Full/Empty/Write/Read states are
  expressed as pointer comparisons rather than a separate state register.
  Pointers are binary, and clock crossing uses a handshake synchronizer.
* **Clocks.** The register file shares the Loader's clock, and each domain
  has a reset synchronizer.
* **Loader.** The bus handshake (request held until the last word) and
  pipelined reads with a parking register are this design's own. So is the
  one-cycle memory latency.
* **MAC unit.** Its latched configuration, output address counter,
  Q12.12 format, rounding and saturation are this design's own. The
  published pseudo-code's loop bound `m < M*M - 1` would stop one output
  short; this unit writes all M*M outputs.
* **Cycle counts.** The published cycle counts for the 28x28/5x5 and
  224x224/3x3 workloads (76,203 and 2,469,351) are below the unit's own
  MAC counts at one MAC per cycle. This RTL does one MAC per cycle and does
  not reproduce those figures.
* **Not modelled.** The external memory and the host processor are outside
  the unit. The testbenches model them.

## Parameters

`conv2d_pkg`: `DATA_W` = 24, `FRAC_BITS` = 12, `ADDR_W` = 32, `DIM_W` = 16
(width of B, C, R, K and the counts) and `KMAX` = 11.

Modules take `KMAX_P` (default `KMAX`), which sets the buffer depth
KMAX_P^2+1 and the number of weights. `circle_buffer` also takes
`DUAL_CLOCK`, and so does `conv2d_unit` (default 1).

## Simulation

The testbenches are self-checking. Each ends with a line
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. Run any of them with
Verilator 5, for example:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/conv2d_pkg.sv tb/tb_conv2d_unit.sv --top-module tb_conv2d_unit
    ./obj_dir/Vtb_conv2d_unit

| testbench | what it checks |
|---|---|
| `tb_circle_buffer` | single-clock and dual-clock buffers against the window order, with random stalls on both sides; full reached; write count M*N*K |
| `tb_loader` | word order and addresses, full/park handling, slow bus grant, one word per cycle and exact latency |
| `tb_mac_unit` | results (including saturation both ways) and addresses against a reference, next-stage busy, exact cycle count M*M*(K*K+1) |
| `tb_conv_regfile` | register reset, write, read-back and weight store |
| `tb_conv2d_unit` | whole unit at default parameters, with unrelated 10 ns and 8 ns clocks: four jobs (K = 3, 11, 2, 4), Loader restarted while the MAC unit is still busy, every output and the read count; counts bus waits, full and empty buffer, busy next stage, band changes |
| `tb_conv2d_unit_1clk` | the same four jobs with `DUAL_CLOCK = 0` on a single clock, with a tighter cycle bound |
| `tb_workloads` | the workloads in the table above, every output checked (about 40 s) |

Only `conv2d_pkg.sv` must be named on the command line; `-y rtl -y tb`
finds the other files by module name.
