# Nutt-interpolated digital-to-time converter for 7-Series FPGAs

A digital-to-time converter (DTC) takes a number `d` and produces two edges `d` time
units apart. This one reaches a 52 ps step over a 56 ms range on a 28 nm Xilinx
7-Series FPGA. It does that by splitting the delay into two parts, the way Nutt
interpolation does:

* a **coarse** part, counted in periods of a fast clock, which gives the long range;
* a **fine** part, made by the I/O delay line (IDELAYE2) that every 7-Series I/O block
  has, which divides one clock period into 32 steps.

There are no calibration tables and no hand placement. The IDELAYE2 taps are held
constant across process, voltage and temperature by the FPGA's own IDELAYCTRL block.
That block splits its reference period into 64 taps. So if the reference clock is
half the counter's clock, one tap is exactly 1/32 of a counter period. The coarse
step and the fine step then line up with no trimming.

The parts that are not obvious at first sight are:

* how the counter gets a resolution of one 600 MHz period while its flip-flops run at
  only 300 MHz;
* what that does to the counter's threshold.

Most of what follows is about those two points.

## The numbers

| quantity | value | where it comes from |
|---|---|---|
| CLK_IN, f_in | 600 MHz | input clock, `clk_in` |
| clk0, clk180 | 300 MHz, 25 % duty, 1 T_in apart | `dual_clock_gen` |
| IDELAYCTRL reference | clk0 = 300 MHz | |
| IDELAYE2 tap | T_ref / 64 = 52.083 ps | = T_in / 32 |
| delay code | d = {coarse[24:0], fine[4:0]}, 30 bits | |
| LSB | T_in / 32 = 52.083 ps | |
| range | 2^30 LSB = 2^25 T_in = 55.9 ms | |
| delay produced | start_out rise to asynchronous_out rise = d x LSB | |

The coarse width `N` (25) and the reference frequency `REFCLK_MHZ` (300.0) are
parameters of `nutt_dtc_top`. The fine code is always 5 bits because IDELAYE2 has 32
taps. Other reference clocks of the IDELAYE2 also work, as long as CLK_IN is twice the
reference:

| reference | tap | CLK_IN |
|---|---|---|
| 200 MHz | 78.125 ps | 400 MHz |
| 300 MHz | 52.083 ps | 600 MHz |
| 400 MHz | 39.0625 ps | 800 MHz |

## Block diagram

```
            +-------------- dual_clock_gen ---------------+
 clk_in --->| ce_ring --ce0--> bufgce_model --> clk0      |
            |         --ce180> bufgce_model --> clk180    |
            +---------------------------------------------+
                  clk0                        clk0, clk180
                   |                               |
 load,coarse,fine  v          th (N)               v
 ------------> dtc_control ----------------> dual_clock_counter -- synchronous_out --+
                   | start -------------------------^                                 |
                   | cntvalue (5), ld                                                 v
                   +-------------------------------------------------------> idelaye2_model --> asynchronous_out
                   | start_out ---> (reference edge)                                  ^ C = clk0
 idelayctrl_model (REFCLK = clk0) -- RDY --> ready
```

## Two clocks from one, without a PLL

The FPGA's PLLs add hundreds of picoseconds of jitter, which is more than one tap. So
the 300 MHz clocks are not made with a PLL. They are made by gating the 600 MHz input
clock:

* `ce_ring` holds a single `1` in a 2-bit ring of flip-flops clocked by CLK_IN. Its two
  outputs toggle on every CLK_IN edge, in antiphase.
* The two outputs enable two clock buffers (`bufgce_model`, the BUFGCE primitive), and
  both buffers pass CLK_IN.
* Each buffer lets through every second CLK_IN pulse. So `clk0` and `clk180` are 300 MHz
  clocks with a 25 % duty cycle, and their rising edges fall one CLK_IN period apart.
* Taken together, the two clocks have a rising edge on **every** CLK_IN edge, and they
  alternate.

The enable is sampled while CLK_IN is low, so a gated pulse is never cut short. After
reset `clk0` has the first edge and `clk180` the next. While reset is held, the ring
stays at 1/0, so `clk0` runs at the full 600 MHz. Everything clocked by `clk0` is in
reset during that time.

## The dual-clock coarse counter, and why the threshold is encoded

`dual_clock_counter` is an n-bit counter split across the two clocks:

* `count_h`, the upper n-1 bits, increments on `clk0`;
* `count_l`, the lowest bit, is a toggle flip-flop on `clk180`.

Each half is compared with its half of the threshold `th` in its own clock domain, and
each comparison is registered in that domain. `synchronous_out` is the AND of the two
registered flags. Each flag is high for one 300 MHz period, and the two are offset by
one CLK_IN period. So their overlap is one CLK_IN period wide, and it can begin on any
CLK_IN edge. The 300 MHz flip-flops therefore give a 600 MHz resolution.

The catch is the order in which the pair `(count_h, count_l)` runs. It is **not** a
binary count of CLK_IN periods. Each clock moves its half once per 300 MHz period, and
the two clocks take turns. After a restart the pair runs like this:

| CLK_IN slot s | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | ... |
|---|---|---|---|---|---|---|---|---|---|---|
| count_h | 0 | 0 | 1 | 1 | 2 | 2 | 3 | 3 | 4 | ... |
| count_l | 0 | 1 | 1 | 0 | 0 | 1 | 1 | 0 | 0 | ... |

Inside slot `s`, `count_h = s >> 1` and `count_l = s[1] ^ s[0]`. So a delay of `c`
CLK_IN periods needs

```
th = { c[n-1:1], c[1] ^ c[0] }
```

`dtc_control` does this conversion. With it, `synchronous_out` rises `c` CLK_IN periods
after `start_out`, for every `c` from 0 to 2^n - 1. If you drive the counter with a plain
binary threshold instead, every odd `count_h` gets its two half-slots swapped.

The **restart** clears the counter so that slot 0 begins at a known edge:

* `start` comes from the clk0 domain and is at least one clk0 period wide.
* The `clk180` edge inside that pulse clears `count_l` and its flag.
* The next `clk0` edge clears `count_h` and its flag.
* Clearing the flags stops a threshold that has just changed from matching the old
  count.

The counter is not stopped after a match. The output pulse therefore repeats every 2^n
CLK_IN periods (55.9 ms at full size) until the next request. Before the first request
the counter is held cleared, so there is no output.

## A request, cycle by cycle

All requests are made in the `clk0` domain. `clk0` is a port of the top, so the logic
that drives `load`, `coarse` and `fine` can be clocked by it.

| clk0 edge | what happens |
|---|---|
| k | `load` and `ready` are high, so the request is taken (`accepted`). `th` and the fine code are registered, `ld` and `start` go high. |
| k + 1 | IDELAYE2 loads the fine code. This is the last clk0 edge that clears the counter, so slot 0 begins. |
| k + 2 | `start_out` rises and stays high for one clk0 period. This is the reference edge. |
| k + 2 plus c T_in | `synchronous_out` rises for one CLK_IN period. |
| plus fine x tap | `asynchronous_out` rises. |

`start_out` rises exactly when `synchronous_out` would for `c = 0`. So the interval from
`start_out` to `asynchronous_out` is `d x T_in/32`, with no offset.

A new request taken while one is still pending replaces it, and the old output never
appears. An old output whose `synchronous_out` pulse has already begun by the clk0 edge that
takes the new request still appears. Requests are refused while the IDELAYCTRL reports that it is not
ready.

## The fine interpolator

`idelaye2_model` and `idelayctrl_model` are simulation models of the vendor primitives.
They use the primitives' port names. On an FPGA, instantiate the real IDELAYE2 and
IDELAYCTRL in their place, with the same connections.

**`idelaye2_model`**
* Delays its input by `tap x 10^6/(64 x REFCLK_FREQUENCY)` ps as a transport delay, so
  pulses shorter than the delay pass through intact.
* Supports the `VAR_LOAD`, `VARIABLE` and `FIXED` modes, with 32-tap wraparound when it
  is stepped with CE/INC.
* The intrinsic insertion delay (`INTRINSIC_PS`) is 0 by default. A real IDELAYE2 adds a
  fixed offset that this model leaves out.

**`idelayctrl_model`**
* Models only the RST/RDY handshake: RDY comes 16 reference periods after reset.
* Does not model the calibration loop. The tap value is exact by construction.

## What the models do not show

* **Jitter, DNL and INL.** The simulation is ideal, so every code lands exactly on
  `d x LSB`. A real channel has tap mismatch and noise.
* **Clock-domain crossings.** `start` crosses from clk0 to clk180, and the flags are
  combined across domains. Both clocks are gated copies of one input clock, so these
  crossings are synchronous at one CLK_IN period. On silicon they must be timed as such:
  constrain the two buffers as related clocks.
* **A drifting reference clock.** The tap delay is a parameter, so a clock that changes
  during operation is not followed. Run at a different fixed clock instead, as
  `tb_nutt_dtc_refclk` does.
* **The gated-clock buffers.** `bufgce_model` is a behavioural stand-in for BUFGCE. The
  rest of the RTL is plain synchronous logic.

## Files

| file | contents |
|---|---|
| `rtl/dtc_pkg.sv` | shared constants: widths, clock frequencies, tap formula |
| `rtl/nutt_dtc_top.sv` | one converter channel |
| `rtl/dtc_control.sv` | request handling, threshold encoding, restart, start marker |
| `rtl/dual_clock_counter.sv` | split counter, per-domain compare, AND |
| `rtl/dual_clock_gen.sv` | 0/180 degree clock divider |
| `rtl/ce_ring.sv` | 2-bit circular buffer for the clock enables |
| `rtl/bufgce_model.sv` | model of the BUFGCE clock buffer |
| `rtl/idelaye2_model.sv` | model of the IDELAYE2 delay line |
| `rtl/idelayctrl_model.sv` | model of the IDELAYCTRL RDY handshake |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_nutt_dtc_full.sv` | full-size channel: 0..1023 LSB sweep and the 2^30 - 1 full-scale code |
| `tb/tb_nutt_dtc_refclk.sv` | five channels at 200 / 290 / 300 / 310 / 400 MHz reference clocks |

Every file starts with a comment that gives the block's interface and timing.

## Simulating

The designs use delays, so Verilator needs `--timing`. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
    rtl/dtc_pkg.sv tb/tb_nutt_dtc_top.sv --top-module tb_nutt_dtc_top
./obj_dir/Vtb_nutt_dtc_top
```

Swap in any other testbench name. Each testbench ends with a line
`TB_RESULT checks=<n> failures=<m>`.

What the testbenches check:

* **`tb_nutt_dtc_top`** (n = 8): the full request path, about 160 requests. It checks
  the total, coarse and fine delays and the latency from request to `start_out`. It
  forces and counts each mechanism: refusal before RDY, odd and even coarse codes,
  zero and full-scale codes, abort by a new request, and the counter wrap.
* **`tb_nutt_dtc_full`** (default size, about 30 s): sweeps d = 0..1023 one code at a
  time and checks every step is one LSB. It then produces the longest delay, 55.9 ms.
* **`tb_dual_clock_counter`**: checks all 2^6 thresholds at n = 6 against an
  edge-by-edge reference walk.
* **`tb_dtc_control`**: checks the request protocol clock by clock.
* **`tb_nutt_dtc_refclk`** (n = 8): runs channels at reference clocks of 200, 290, 300,
  310 and 400 MHz. It shows that the LSB follows the clock: 53.879 ps at 290 MHz and
  50.403 ps at 310 MHz, about +-1.8 ps around 52.083 ps.

Times are in ps with a precision of 1 fs, so each 52.083 ps tap is resolved.

## Changing it

* **`N`** sets the range: 2^N CLK_IN periods. The resource cost grows with N: two
  comparators and an (N-1)-bit incrementer.
* **`REFCLK_MHZ`** must equal half the CLK_IN frequency for the fine and coarse steps to
  match (see the table above). The design does not check this.
* **Porting.** To move to another FPGA family with a different delay primitive, replace
  `idelaye2_model`. The counter and the control logic do not depend on it.

## Departures and own choices

The overall structure follows the published architecture:

* clock gating by a 2-bit ring and two BUFGCEs;
* the counter split over the two clocks, with registered per-domain comparisons and an
  AND;
* the IDELAYE2 fine stage calibrated from clk0.

These parts are choices of this implementation:

* **Control logic.** The architecture only names it. The threshold encoding, the
  `load`/`ready`/`accepted` interface, the VAR_LOAD tap loading and the `start_out`
  timing are all defined here.
* **Counter restart.** The restart input, which also clears the two flags, and the idle
  hold are additions.
* **Resets.** One asynchronous active-high reset for everything. On an FPGA, the ring
  could use flip-flop INIT values instead.
* **Lock time.** The 16-cycle IDELAYCTRL lock time is a model value.

Size: this channel has 66 flip-flops in its logic (71 with the lock counter of the
IDELAYCTRL model). The published channel is reported at 550 flip-flops and 348 LUTs.
The difference is logic outside the converter core that the architecture does not
describe, presumably including the host interface.

Not included:

* the USB host link that carries `d` to the board;
* the comparison design built from a chain of IDELAYE2s;
* several channels in one device. The channel is small, so many can be instantiated
  side by side.
