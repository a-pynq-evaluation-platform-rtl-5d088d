# Hough Evaluation Platform: an on-chip test bench for line Hough transform hardware

The line Hough transform (LHT) finds straight lines in a binary edge image.
Each edge pixel at (x, y) votes, for every sampled orientation theta, for the
distance

    rho = x*cos(theta) + y*sin(theta)

and the votes pile up in a two-dimensional array, the Hough Parameter Space
A(rho, theta). A line in the image shows up as a peak in that array. FPGA
implementations of the LHT differ in their theta step, their rho step and the
size and word length of the HPS. This makes them hard to compare, and hard to
check without reading the HPS back out of the chip.

This RTL provides the programmable-logic side of an evaluation platform for
such architectures. This side is the **Hough Inspection Unit (HIU)**. An
input DMA streams an edge image into the LHT architecture under test, and an
output DMA collects the HPS that comes out. Between them, a **Hough
Performance Analyser (HPA)** watches both streams and measures two things:

* **the processing time** of a frame, in clock cycles. Timing starts on the
  rising edge of input `tvalid` and stops on the output `tlast` beat.
* **the Peak to Mean Vote Ratio (PMVR)** of the HPS:

      N_f = (sum of all votes) / (number of non-zero locations)
      R_f = max A(rho, theta) / N_f

  A large R_f means the peaks stand well clear of the noise from short,
  accidental runs of collinear pixels. This makes R_f a figure of merit for
  comparing architectures that use different discretisations.

A processor reads the results over AXI4-Lite. It takes the HPS from memory
for plotting.

A complete LHT architecture (`lht_core`) is included as the design under
test. It covers a 1280x720 image with a rho step of 1 pixel and a theta step
of 1 degree, and the HPS is not reduced in size. At 150 MHz one frame takes
1,186,386 cycles. That is 7.909 ms, or 126.4 frames per second. The
platform this design follows reported 7.91 ms and 126.45 frames per second
for its own LHT architecture of the same size.

## Block structure

```
                 +------------------------- hep_top (HIU) -------------------------+
 input DMA  ---> s_axis --+--> lht_core (design under test) --+--> m_axis ---> output DMA
 (image)                  |                                   |                (HPS)
                          v                                   v
                      +---------------- hpa -------------------------+
                      | hpa_proc_time (cycles, beats)  hpa_pmvr (R_f)|
                      +----------------------+-----------------------+
                                             v
 processor  <--- s_axil (AXI4-Lite) --- hep_axil_regs
```

| file | contents |
|---|---|
| `rtl/hep_pkg.sv` | default sizes, word widths, the register map, the `hpa_status_t` struct, and elaboration-time functions for the rho range, the cos/sin coefficients and Q16.16-to-float conversion |
| `rtl/hep_top.sv` | the HIU: wires the core, the analyser and the register block together |
| `rtl/lht_core.sv` | the LHT design under test: input control, `N_THETA` voters, HPS readout |
| `rtl/lht_voter.sv` | one theta column of the HPS: rho computation, vote memory, read-modify-write with bypass |
| `rtl/hpa.sv` | the analyser, holding the two units below |
| `rtl/hpa_proc_time.sv` | processing-time counters |
| `rtl/hpa_pmvr.sv` | peak, total and non-zero accumulation, plus a divider for R_f |
| `rtl/hep_axil_regs.sv` | AXI4-Lite slave holding the analyser results |

The DMA engines, the AXI interconnect and the processor system are vendor
parts. They sit outside `hep_top`, and their signals are its ports.

## The LHT core in detail

### Coordinates and the HPS shape

Pixels arrive in raster order, one per beat: row 0 first, and column 0 first
within each row. Any non-zero `tdata` byte is an edge pixel. The coordinates
are measured from the **image centre**:

    x = column - IMG_W/2,   y = row - IMG_H/2

With this origin, |rho| never exceeds `RHO_MAX = ceil(sqrt((W/2)^2 + (H/2)^2))`,
which is 735 at 1280x720. The HPS therefore has `N_RHO = 2*RHO_MAX + 1 = 1471`
rho bins per orientation. The orientations are `theta_k = k * 180/N_THETA`
degrees for `k = 0 .. N_THETA-1`, so the default of 180 gives a 1-degree step.
To change the theta step, change `N_THETA`. For example, 90 gives 2 degrees
and 360 gives 0.5 degrees.

The centre origin is a design choice. The 7.909 ms frame time above is what it
gives. A top-left origin would need about twice as many rho bins, and the
readout would take twice as long.

### Fixed-point rho

For each orientation, cos and sin are rounded to 16 fractional bits when the
design is elaborated. The formula is `floor(trig(pi*k/N_THETA) * 65536 + 0.5)`,
so no table file is needed. The products with the 12-bit signed coordinates
are exact. rho is rounded half-up to an integer by adding 2^15 and shifting
right 16 bits with sign. The memory address is `rho + RHO_MAX`. An assertion
checks that every address falls inside the memory.

### One pixel per clock: parallel voters

`lht_core` holds `N_THETA` instances of `lht_voter`. Each instance owns the
`N_RHO x 16-bit` memory of one orientation, and all of them vote for the same
pixel in the same cycle. The input `tready` therefore stays high during the
whole frame. Each voter is a three-stage pipeline:

| cycle | action |
|---|---|
| 0 | the core registers the pixel (`vote_q`, `x_q`, `y_q`) |
| 1 | the voter registers the products `x*C` and `y*S` |
| 2 | the voter rounds rho and issues the memory read |
| 3 | the voter writes back the read value plus 1 |

The memory reads first. A read issued in the same cycle as the write-back of
the previous vote to the same address would return the stale count. A
one-entry **bypass** register holds the last address and value written. When
the next vote hits that address, the count comes from the bypass instead of
the memory. Writes from two or more cycles earlier are already visible, so one
bypass entry is enough. Neighbouring pixels on a row often land in the same
rho bin, so the bypass is in constant use. `dut_bypass` on `hep_top` shows
when it fires.

### Readout and clearing

After `IMG_W*IMG_H` pixels, the core waits 4 cycles for the voters to drain.
It then streams the HPS theta-major: all 1471 rho values of theta_0, then
theta_1, and so on, one 16-bit count per beat. `tlast` is set on the final
location. The read uses the addressed voter's read port, and the same cycle
writes zero to that location through the write port. The HPS is therefore
empty again when the next frame starts, with no separate clear pass. After
reset only, the core clears every memory in `N_RHO` cycles, with `tready` low
during that time.

A 2-entry output buffer decouples the one-cycle memory latency from `tready`.
A read is issued only when the buffer has room for the word, counting reads
still in flight. The core therefore keeps one word per clock when `tready` is
high, and never drops a word when `tready` is low.

Frame time with the output always ready:

    IMG_W*IMG_H + N_THETA*N_RHO + 6  =  921,600 + 264,780 + 6  =  1,186,386 cycles

### Resource shape

The HPS is 180 memories of 1471 x 16 bits, 4.24 Mbit in total. Each memory fits
one 36-kbit block RAM, so the core needs 180 block RAMs. Each orientation uses
two multiplications by a constant. A synthesis tool may map these to DSP
slices or build them from adders. No attempt was made to share multipliers
between orientations.

## The performance analyser

### Processing time (`hpa_proc_time`)

The `cycles` counter starts on a rising edge of input `tvalid`, seen while the
counter is idle. It stops on the output beat with `tvalid && tready && tlast`.
Both end cycles are counted, so `cycles / f_clk` is the time from the first
pixel offered to the last HPS word taken. The unit also counts input and
output transfers over the same window. Software can use these counts to
confirm the frame size and the HPS size. A rising edge of `tvalid` during a
measurement is ignored. The results hold until the next rising edge or a
clear.

### PMVR (`hpa_pmvr`)

From the first beat after reset, a clear or the previous `tlast`, up to the
next `tlast`, the unit keeps three values: the maximum count, the sum of all
counts, and the number of non-zero counts. After the `tlast` beat it forms
`peak * nonzero * 2^16` and divides it by the total in a 64-step restoring
divider. This yields

    ratio_q16 = floor(peak * nonzero * 65536 / total)     (unsigned Q16.16)

This equals R_f, truncated to 16 fractional bits. Because every non-zero
location holds at least one vote, R_f <= peak, so the result always fits 32
bits. The same value is also given as an IEEE-754 single (`ratio_f32`), with
the mantissa truncated. The ratio is ready 66 cycles after `tlast`. The next
HPS must not start earlier than that. This is always the case behind an LHT
core, which must first take a whole image, and an assertion checks it. An HPS
with no votes gives 0.

Example: a peak of 395 over a mean of 35.92 votes per non-zero location gives
R_f = 11.00. `tb_hpa_pmvr` checks this case.

## Register map (AXI4-Lite, 32-bit registers)

| offset | name | contents |
|---|---|---|
| 0x00 | CTRL | read: bit 0 timing busy, bit 1 timing done, bit 2 PMVR done. Write 1 to bit 0: clear the analyser |
| 0x04 | CYCLES | processing time in clock cycles |
| 0x08 | IN_BEATS | input transfers in the timing window |
| 0x0C | OUT_BEATS | output transfers in the timing window |
| 0x10 | PEAK | max A(rho, theta) |
| 0x14 | TOTAL | sum of all votes |
| 0x18 | NONZERO | non-zero HPS locations |
| 0x1C | PMVR_Q16 | R_f, unsigned Q16.16 |
| 0x20 | PMVR_F32 | R_f, IEEE-754 single |
| 0x24 | CONFIG | `{N_RHO[15:0], N_THETA[15:0]}` |

A write is taken when `AWVALID` and `WVALID` are both high and no response is
pending. A read is taken when no read data is pending. Responses come one
cycle later and are always OKAY. Unmapped reads return 0.

## Interfaces and timing of `hep_top`

* `aclk`, `aresetn`: one clock, and a synchronous active-low reset.
* `s_axis_*`: the image, 8 bits per pixel. `tlast` must be on the last pixel
  of the frame, and an assertion checks this. `tready` is high only while
  the core is voting.
* `m_axis_*`: the HPS, 16 bits per location, theta-major, `tlast` on the last
  location. `tvalid`, `tdata` and `tlast` are held while `tready` is low, and
  an assertion checks this.
* `s_axil_*`: the registers above, with a 6-bit byte address.
* `dut_bypass`: an observability output, high in a cycle where a voter used
  its bypass.

Parameters (all with defaults): `IMG_W = 1280`, `IMG_H = 720`,
`N_THETA = 180`, `VOTE_W = 16`. `N_RHO` is derived from them.

## How this RTL relates to the platform it implements

These parts follow the platform's description:

* the block structure, with two DMA streams, the design under test between
  them, the analyser tapping both, and an AXI connection to the processor
* the start and stop conditions of the timer
* the definition of N_f and R_f
* the size of the demonstration LHT: 1280x720, a rho step of 1, a theta step
  of 1 degree, and an HPS that is not reduced

These are choices of this design:

* The inside of the LHT core. The platform treats the core as a replaceable
  design under test and does not describe its insides. This design uses the
  centre origin, a theta range of 0 to 180 degrees, one pixel per clock with
  parallel voters, 16-bit votes, theta-major readout and clear-on-read.
* The register map and the AXI4-Lite handshake.
* Hardware division for R_f, and the Q16.16 and float output formats.
* A single clock domain. The platform was reported at 250 MHz without an LHT
  and at 150 MHz with one. Both rates can be set on `aclk`, but two clock
  domains are not provided.
* Which counters exist besides the cycle count (the input and output beat
  counts).

Not included: the DMA engines, the AXI interconnect, the processor system and
the software that plots the HPS and shows the results. Timing closure at 150
or 250 MHz has not been checked. Resource use on the target FPGA has not been
compared either. In particular, this core's two constant multipliers per
orientation may use more DSP slices than a hand-optimised LHT would.

## Simulation

Every testbench in `tb/` checks its own results. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it runs |
|---|---|
| `tb_lht_voter` | one theta column: random votes with many back-to-back repeats, readout against a reference histogram, clear-on-read |
| `tb_lht_core` | 40x24 image, 180 orientations, three frames, with input gaps and output back-pressure; every HPS word checked; the frame-time bound checked |
| `tb_hpa_proc_time` | random stream scenarios; cycle and beat counts against the bench's own clock count |
| `tb_hpa_pmvr` | random HPS streams, an empty HPS, a single location, and the 395 / 35.92 case; results bit-exact against the bench |
| `tb_hpa` | the analyser as a whole, twice, plus clear |
| `tb_hep_axil_regs` | every register read through AXI4-Lite, plus clear writes |
| `tb_hep_top` | the whole HIU at 40x24: three frames, HPS and all registers checked; counts output stalls, bypass hits, HPS reuse, analyser clear and divides, and fails if any never happened |
| `tb_hep_top_full` | the whole HIU with every parameter at its default (1280x720, 180 x 1471 HPS), two frames, fully checked; the full-rate frame must take 7.91 ms at 150 MHz; about 15 s |
| `tb_pmvr_sweep` | the same 64x36 image at theta steps of 0.5, 1, 2, 4, 9 and 15 degrees (helper `tb_sweep_unit`); prints R_f for each step |

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb rtl/hep_pkg.sv tb/tb_hep_top.sv \
          --top-module tb_hep_top -o sim
./obj_dir/sim
```

Replace `tb_hep_top` with any testbench name from the table. For
`tb_pmvr_sweep`, keep `-y tb` so that Verilator finds `tb_sweep_unit`.
Verilator is a two-state simulator. All state that is read is reset, and the
HPS memories are cleared by the controller after reset.

To check the full-size frame time: with the output always ready,
`tb_hep_top_full` reports 1,186,386 cycles for its second frame.
