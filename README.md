# Subthreshold-friendly DSP: a parallel 2D wavelet transform and a hybrid FFT

Below the threshold voltage, logic uses very little energy but runs very slowly.
One way to meet a fixed throughput at such supplies is to make the design wider:
use many copies of a slow unit, each at a low supply, and feed them from fast
logic at a higher supply. This RTL applies that idea to two signal-processing
kernels. They are independent and sit side by side in one top level:

* **`dwt2d_parallel`**: a 2D (5,3) discrete wavelet transform, the reversible
  integer filter of JPEG2000 lossless coding.
  * A conventional line-based design keeps intermediate rows in an SRAM.
    This design has one small row/column processor pair per image column, so
    every intermediate value lives in a short register chain.
  * A serial pixel stream is spread over the columns by a split bus.
  * With 32 units, each unit needs to run at only 1/35 of the pixel clock.
* **`fft_hybrid`**: a memory-based radix-2 FFT (up to 1024 points).
  * Its single fast butterfly unit is replaced by a processing element of
    `N_BP` butterfly processors. Each processor takes `N_BP` clocks per
    butterfly, which stands for a processor running at a subthreshold supply.
  * Taking turns, the processors still accept one butterfly per clock.
  * Switching processors off (*active unit scaling*) cuts the throughput in
    steps of 1/`N_BP` without touching any supply.

Supply voltages, level shifters and power are not modelled. What the RTL gives
is the architecture: the data movement, the control and the arithmetic, all bit
exact. In silicon, the slow parts would run from a divided clock at a low supply.
Here they run in the single clock domain, either behind a clock enable (the DWT
units) or with a counted multi-cycle budget (the butterfly processors).

## Files

Each file begins with a comment that covers:
* its interface;
* its timing;
* which parts follow the source architecture and which are this implementation's choices.

| file | what it is |
|---|---|
| `rtl/subthreshold_dsp_top.sv` | top: both designs, ports prefixed `dwt_` and `fft_` |
| `rtl/dwt_pkg.sv` | row tag type shared by the DWT blocks |
| `rtl/dwt2d_parallel.sv` | the 2D DWT: stripe/row counters, flush, output |
| `rtl/dwt_split_bus.sv` | serial-to-parallel split bus |
| `rtl/dwt_row_stage.sv` | NU row processors, Register A, striping edge processor |
| `rtl/dwt_col_unit.sv` | one column: Registers B-E and the column processor |
| `rtl/dwt53_proc.sv` | one (5,3) lifting step (high or low pass), combinational |
| `rtl/fft_pkg.sv` | Q15 complex type |
| `rtl/fft_hybrid.sv` | the FFT: RAM, ROM, controller, operand buffer, PE |
| `rtl/fft_ctrl.sv` | in-place DIF address generator and stage sequencer |
| `rtl/fft_pe.sv` | N_BP butterfly processors, round-robin, active unit scaling |
| `rtl/fft_bp.sv` | radix-2 DIF butterfly |
| `rtl/booth_mul.sv` | radix-4 Booth 16x16 signed multiplier |
| `rtl/csel_adder.sv` | carry-select adder/subtractor |
| `rtl/fft_ram.sv` | 1024 x 32 data memory in two banks, 2 read + 2 write ports |
| `rtl/fft_rom.sv`, `rtl/fft_twiddle_rom.hex` | 256-entry quarter-wave twiddle table |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the end-to-end one |
| `tb/tb_dwt_ref_pkg.sv`, `tb/tb_fft_ref_pkg.sv` | reference models used by the testbenches |
| `tb/dwt_workload_run.sv`, `tb/fft_workload_run.sv` | one-image and one-transform runners used by the workload testbenches |

## The (5,3) transform

In one dimension, the (5,3) lifting transform of a sequence x works in two steps.

Odd samples become high-pass values:

    H(2k+1) = x(2k+1) - floor((x(2k) + x(2k+2)) / 2)

Then even samples become low-pass values, using the high-pass neighbours:

    L(2k)   = x(2k)   + floor((H(2k-1) + H(2k+1) + 2) / 4)

At the ends, the sequence is mirrored: x(-1) = x(1) and x(N) = x(N-2).
A 2D transform does this first along every row, then along every column of the
result. `dwt53_proc` does one such step in one clock. A `lp` input chooses
between the two equations, and the +2 rounding is an extra adder input. The
data are 16-bit signed values, which is enough for 8-bit pixels through one 2D
level.

## How the parallel DWT is organised

### One processor pair per column

`dwt_row_stage` gives every column of a stripe its own row processor.
* Odd columns compute H from their input register and the two neighbouring
  input registers, and store it in **Register A**.
* Even columns need the H of both neighbours. So their input first waits one
  row enable in an alignment register. On the next enable they compute L from
  it and the two neighbouring Register A values.

A consequence is that **odd columns run one row enable ahead of even columns**.
Every register carries a *tag* (valid, row, stripe, left/right image edge), and
the two halves have separate tags.

`dwt_col_unit` does the same job vertically for one column. Row results shift
up a chain of Registers A→B→C→D→E, one row per row enable, and one column
processor sits behind a multiplexer. The row index in Register B's tag decides
what it does:

* **B holds an odd row: high-pass cycle.**
  * It computes H of B from A (the row below) and C (the row above).
  * On the next shift, the result replaces B's value on its way into C.
* **B holds an even row: low-pass cycle.**
  * D now holds the even row two rows up, with C and E holding the H values
    on either side of it.
  * It computes L of D.

So each column alternates high-pass and low-pass cycles and delivers one 2D
coefficient per row enable, with a latency of a few row enables. Mirroring at
the top and bottom is a multiplexer choice:
* at row 0, C stands in for E;
* at the last row (A does not hold the next row), C stands in for A.

### Striping: images wider than the design

A 256-pixel-wide image is sent as 8 vertical **stripes** of 32 columns, one
after the other, each from row 0 to the last row. A row transform at a stripe
edge needs pixels of the neighbouring stripe:
* the odd right-edge column needs x(NU);
* the even left-edge column needs H(-1), which depends on x(-2), x(-1) and x(0).

So each stripe row on the bus is **NU + 3 words**: the NU pixels, then x(-2),
x(-1) and x(NU). One extra processor computes H(-1). When a stripe touches the
image border, the left_edge/right_edge tag bits make the edge columns mirror
instead, and the extra words are ignored.

Column transforms never cross stripes. A stripe's last two rows are finished
while the next stripe's first rows move through the chain. After the last
stripe, a `flush` pulse pushes three empty rows through instead.

### Split bus

The input registers must not have to run at the pixel rate, because they sit
at the slow units. `dwt_split_bus` therefore works as follows:
* A demultiplexer deals the serial stream over `SPLITS` sub-buses: bus
  position p goes to sub-bus p mod SPLITS.
* Each sub-bus has one fast register that holds its pixel for SPLITS clocks.
* Each input register listens to one sub-bus and latches when the delayed
  position counter equals its own position.
* `row_en` pulses one clock after the last position of a row has latched.
  Rows follow back to back without gaps.

### Using it

Drive `in_valid`/`in_pix` with one pixel per clock in the stripe order above.
Gaps are allowed.

After each row enable, `coef_stb` is high for one clock, and every column
c with `coef_valid[c]` set presents a coefficient. Its position in the image is:
* row: `odd_row` or `even_row`, chosen by the parity of c;
* column: `stripe*NU + c`, where stripe is `odd_stripe` or `even_stripe`.

The subband follows from the parities:
* horizontal band: column even → L, odd → H;
* vertical band: `*_lp` high → L, low → H.

Pulse `flush` only while no pixels are being sent. `flushing` is high for
about 3 clocks after it.

Throughput is one pixel per clock on the bus, which is NU/(NU+3) image pixels
per clock when striping. The default (NU = 32, 256x256) needs a 218.75 MHz bus
for 200 Mpixel/s. The units then see a 6.25 MHz row-enable rate.

## How the hybrid FFT is organised

### Arithmetic

Data are complex Q15 numbers packed as `{re[31:16], im[15:0]}`. `fft_bp`
computes the decimation-in-frequency butterfly:

    a' = (a + b) >>> 1
    b' = (((a - b) >>> 1) * W) >>> 15

* It uses four Booth multipliers and carry-select adders.
* Each output is halved, so a 1024-point transform cannot overflow. The
  result is the DFT divided by N.
* Products are truncated, so each stage can lose up to one LSB towards minus
  infinity. A DC input of A therefore comes out as A/N minus a few LSB.
* The testbenches use a reference model with exactly this rounding, so every
  comparison is bit exact.

### Memory, table and controller

* **`fft_ram`**
  * 1024 words in two 512-word banks, chosen by the top address bit.
  * Two synchronous read ports and two write ports, so one butterfly can be
    read and one written back per clock.
* **`fft_rom`**
  * Holds only a quarter of the unit circle: entry k is
    round(32767·cos(2πk/1024)) in the upper half-word and
    round(32767·sin(2πk/1024)) in the lower.
  * W^e for e < 256 is C(e) − jS(e). For 256 ≤ e < 512 it is −S(e−256) − jC(e−256).
  * The hex file holds exactly these 256 words.
* **`fft_ctrl`**
  * Runs log2n stages of N/2 butterflies, in place.
  * In stage s, with h = N >> (s+1), butterfly j with p = j mod h and
    g = j div h uses words a = 2gh + p and b = a + h.
  * It also uses twiddle exponent e = p·2^s·(1024/N).
  * `log2n` is sampled at start. The same hardware runs 256-point (8) and
    1024-point (10) transforms, or any size from 2 to 1024 points.

### Processing element and active unit scaling

`fft_pe` deals butterflies round-robin to processors 0, 1, …, n_active−1.
* Each processor keeps its operands for `N_BP` clocks and then hands its
  result to the output multiplexer.
* With all processors active, one butterfly enters and one leaves every clock.
  The latency is N_BP + 1 clocks.
* With n_active < N_BP, the next processor in turn is still busy when its turn
  comes again. `in_ready` then stays low until it finishes, so the element
  accepts n_active butterflies per N_BP clocks. For example, 4 of 32 gives
  1/8 of full rate.

Because of the long latency, the controller **drains** at the end of every
stage. It counts butterflies in flight and starts the next stage only when
all of them are written back. This costs about N_BP + 4 clocks per stage.

A two-entry operand buffer in `fft_hybrid` sits between the RAM/ROM outputs and
the element. It absorbs the one-clock read latency. A read is issued only
while `count + reads_in_flight − pops < 2`, so nothing is ever lost when the
element stalls.

### Using it

1. While `busy` is low, write N words through `host_we`/`host_waddr`/`host_wdata`.
2. Pulse `start`, with `log2n` and `n_active` set.
3. Wait for the one-clock `done` pulse.
4. Read the result through `host_re`/`host_raddr`. The data arrive one clock
   later on `host_rdata`.

Bin k of the spectrum is at the bit-reversed address of k.

Measured clock counts (32 processors unless stated):

| transform | clocks |
|---|---|
| 1024-point, all 32 processors active | 5,472 (10 × 512 butterflies plus 10 drains) |
| 256-point, 32 active | 1,306 |
| 256-point, 8 active | 4,186 |
| 1024-point, 4 of 32 active | 41,032 (1/8 rate) |
| 1024-point, N_BP = 16, all active | 5,312 |
| 1024-point, N_BP = 1 (non-parallel reference) | 5,162 |

`pe_stall` and `draining` show these two mechanisms from outside.

## Verification

Every module has a self-checking testbench. Each prints
`TB_RESULT checks=<n> failures=<n>`, has a watchdog and uses `$urandom`
stimulus. The expected values come from behavioural reference models:
* full-image 1D/2D (5,3) transforms with mirroring, in `tb_dwt_ref_pkg`;
* a fixed-point DIF FFT with the same scaling and truncation, in `tb_fft_ref_pkg`.

| testbench | what it checks |
|---|---|
| `tb_dwt53_proc` | 4,000 random lifting steps against the equations |
| `tb_dwt_row_stage` | rows with mirrored, striped and mixed edges; tags |
| `tb_dwt_col_unit` | column chains against the reference, incl. top/bottom mirroring |
| `tb_dwt_split_bus` | every input register value, row_en latency, gaps in the stream |
| `tb_dwt2d_parallel` | NU = 8, two 32x8 images (4 stripes) and a flush; every coefficient once |
| `tb_booth_mul`, `tb_csel_adder` | corner cases and random operands |
| `tb_fft_bp` | random butterflies, bit exact |
| `tb_fft_pe` | order, latency, rate at full/partial activity, stalls |
| `tb_fft_ram`, `tb_fft_rom` | both banks and ports; all 512 twiddles against cos/sin |
| `tb_fft_ctrl` | address/exponent sequence and stage draining |
| `tb_fft_hybrid` | 4 processors: 16-point impulse, 64- and 256-point random, 64-point with 1 active |
| `tb_dwt_widths` | width sweep: 4, 16 and 64 units on 256x256 images, 32 units on an unstriped 32-wide image; exact coefficients and bus-clock counts |
| `tb_fft_workloads` | 1024-point with 4 of 32 and 16 of 32 active (1/8 and 1/2 rate), and 16-processor and single-processor designs at full rate |
| `tb_subthreshold_dsp_top` | **default sizes, end to end** (below) |

`tb_subthreshold_dsp_top` runs the top with all parameters at their defaults.
* **DWT:** a random 256x256 image goes through the 32-unit DWT (8 stripes, then
  a flush). All 65,536 coefficients must match the reference, each exactly once.
* **FFT:** at the same time, the FFT runs three transforms. Each must match bit
  for bit and finish within its clock budget:
  * 1024 points with 32 processors;
  * 256 points with 8 processors;
  * 256 points with 32 processors.
* **Mechanisms:** it counts each one and fails if any never happened: stripes,
  mirroring at all four borders, row strobes, flush, processor stalls, stage
  drains, mode switches, and correct results from both memory banks.

It runs in a few seconds.

For each block there is a deliberately broken copy of the module, and its
testbench was confirmed to fail on it. Examples: a missing rounding constant,
a wrong Booth digit, a missing mirror, a wrong twiddle sign, and an
operand-buffer credit off by one.

### Simulating

Run from the repository root. The ROM is loaded from `rtl/fft_twiddle_rom.hex`
relative to the working directory.

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl -Itb \
        rtl/dwt_pkg.sv rtl/fft_pkg.sv tb/tb_dwt_ref_pkg.sv tb/tb_fft_ref_pkg.sv \
        tb/tb_subthreshold_dsp_top.sv --top-module tb_subthreshold_dsp_top -o sim
    ./obj_dir/sim +verilator+rand+reset+2

Replace the testbench name to run any other. The testbenches start with
`rst_n` high and drop it after 1 ns, because the resets are asynchronous and
need an edge. Verilator is two-state, and every register that is read has a reset.

## Where this design departs from, or adds to, the source architecture

The parts taken from the source architecture:
* **DWT:** the column processor pairs, the register chain A–E with its
  write-back, the stripe-edge extra processor with three extra bus words, the
  split bus with fast registers and position matching, and 32 units for
  256-wide images.
* **FFT:** the RAM/ROM/PE structure, N_BP round-robin processors, active unit
  scaling, the two RAM banks, the 256-entry ROM, Booth multipliers, carry-select
  adders, and 256/1024-point modes.

The following are choices made here:

* **Word widths**
  * DWT: 16-bit coefficients and 8-bit pixels.
  * FFT: Q15 with a halving in every butterfly and truncated products.
* **SPLITS = 4 sub-buses**, with sub-bus = position mod SPLITS. The source shows
  the split bus only on a small example.
* **Control of the DWT**
  * Tag-based control.
  * The flush input.
  * Outputs as NU parallel coefficients with row, stripe and band information,
    rather than a serial stream.
* **DWT throughput**: each column's processor pair does one row step and one
  column step per row enable, so the design takes NU pixels per row enable
  (n times the processor speed). One passage of the source counts this as two
  pixels per pair and cycle, while its throughput formula gives n times the
  processor speed. The formula is followed here.
* **Extra words per stripe row**: the DWT always uses three. The source's
  general formula for extra pixels per row does not give three at 256/32, but
  its text does.
* **Slow units in one clock domain**
  * DWT units run on a clock enable.
  * Butterfly processors take N_BP clocks each. Their logic is ordinary
    single-cycle logic whose result is simply sampled N_BP clocks later.
  * Inactive processors are not loaded, rather than being power gated.
* **FFT controller and host side**
  * The controller (not described in the source) drains between stages.
  * The bank mapping uses the top address bit.
  * The host load/read port shares RAM port 0 while idle.
  * The two-entry operand buffer.
* **RAM**: one 2-read/2-write array per bank, standing for a RAM macro running
  at twice the butterfly rate.

Not built:
* supply domains and level converters;
* the ring oscillator and test multipliers used to characterise delay and energy
  against supply voltage;
* any power, voltage or battery-life modelling.

Other limits:
* The DWT does one decomposition level. Further levels would feed the LL band
  back in.
* NU must be even, at least 4, and divide the image width. The image height
  must be even and at least 4.
* `rst_n` is also used as the disable condition of two concurrent assertions.
  Verilator notes this as a reset used both asynchronously and synchronously.
  It affects simulation checks only, not the hardware.

Synthesis of the full top with yosys gives about 10.7k cells, 7.3k flip-flop
bits and 32 kbit of memory.
