# SiFH: time-of-flight from two small histograms

A direct time-of-flight (dToF) sensor built from single-photon avalanche
diodes gives, for every laser pulse, a time code per pixel. Noise and photon
statistics make a single code unreliable, so the ToF is taken as the peak of
a histogram of many codes. For 15-bit codes a complete histogram has 32,768
bins; at 12 bits per bin that is 384 kbit of memory *per pixel*, which no
FPGA block RAM budget can afford for an image sensor.

The shifted inter-frame histogram (SiFH) method gets the same answer from
two passes over the same readings, using one 256-bin histogram memory
(256 x 12 bit = 3 kbit, 128 times less):

1. **Coarse pass.** Histogram the 8 most significant bits of each 15-bit
   reading (bin width 128 codes). Its peak `x` tells roughly where the ToF is.
2. **Fine pass.** Keep only readings inside a 256-code window around
   `128*x`, shift them down by `delta` so they index 0..255, and histogram
   them at full resolution in the same memory. The ToF is the fine peak plus
   `delta`.

The cost is a second acquisition (half the ToF rate of a single-pass
complete histogram), against the 128 acquisitions a time-gate scanning
scheme would need for the same range.

This repository holds synthesizable SystemVerilog for a single-pixel SiFH
estimator with 15-bit readings, 8-bit histogram addresses and 12-bit bins, as
it would sit on an FPGA between a pattern source and a logic analyzer.

## Worked example

Readings with a true ToF of 2089 on top of uniform noise:

| step | value |
|---|---|
| coarse peak `x` (2089 >> 7) | 16 |
| `TH+ = 128*x + 128` | 2176 |
| `TH- = 128*x - 128` | 1920 |
| `delta` | 1920 |
| readings kept | 1921 .. 2175 |
| fine peak (2089 - 1920) | 169 |
| ToF = 169 + 1920 | 2089 |

The full-size testbench runs exactly this case.

## The window and the shift

With `K = 2^(NP-NS) = 128` and `SB = 2^(NS-1) = 128`:

```
TH+   = K*x + SB
TH-   = K*x - SB
delta = (floor(TH+ / 2^NS) - 1) * 2^NS + (TH+ mod 2^NS)  =  TH+ - 256  =  TH-
```

A reading passes the digital filter when `TH- < PIXV < TH+`, with both bounds
excluded. That leaves 255 codes, which land on fine bins 1..255. Bin 0 of the
fine histogram is never used.

Note that the window is centred on the *start* of coarse bin `x`. It covers
all of bin `x` and the upper half of bin `x-1`, but nothing of bin `x+1`.

At the ends of the range the formula leaves the 15-bit code space, so fixed
windows of the same width are used instead. These values are this design's
choice:

| coarse peak | TH- | TH+ | delta |
|---|---|---|---|
| `x = 0` | 0 | 256 | 0 |
| `x = 255` | 32511 | 32767 | 32511 |

Codes 0 and 32767 can therefore never be reported.

## Data path

```
SD,WS -> s2p -> PIXV[14:0] -+-> PIXV[14:7] (AC) ------------> hist_selector --ADDR--> hist_builder --NoC--> peak_detector
                            |                                   ^   (HS)                 |  (BRAM)            |      |
                            +-> digital_filter --SA,pass--------+                        +--BIN (readout)     |PNoCc |PNoCf
                                   ^ TH-,TH+,delta                                                            v      v
                                   +------------------------------------------- algebraic_block <----------+   tof_adder -> ToF
                                                                                     delta ---------------------^
sifh_controller: HS, RST, clrMem, acquisition window, threshold load, wait0/1/2, rdHist
```

| module | role |
|---|---|
| `sifh_pkg` | sizes (`NP=15`, `NS=8`, `BIN_W=12`), types, the clearing-mode enum |
| `s2p` | serial-to-parallel converter. MSB first; `ws` comes with the last bit; `pix_valid` pulses one clock later |
| `digital_filter` | window test and subtraction of `delta` (combinational) |
| `hist_selector` | address multiplexer (coarse or fine). Its `req` output says whether the reading counts |
| `hist_builder` | read-increment-write of a bin, the clearing mechanism, readout |
| `hist_bram` | 256 x 12-bit single-port memory, read-before-write, no reset |
| `reset_memory` | 256 "bin already hit" flags (signaled clearing) |
| `clear_counter` | 8-bit address sweep (sequential clearing) |
| `peak_detector` | running maximum and its address, kept separately for the coarse and the fine pass |
| `algebraic_block` | `TH-`, `TH+` and `delta` from the coarse peak, latched when the coarse pass ends |
| `tof_adder` | ToF = fine peak + `delta` |
| `sifh_controller` | sequences the two passes and the readouts |
| `sifh_top` | ties it all together |

## Counting a hit: three clocks on one memory port

The histogram memory has a single port, so every reading that counts costs
three clocks:

| clock | action |
|---|---|
| 1 (read) | read the bin at `ADDR` |
| 2 (load) | load the adder input with the old value, or with 0 if the bin is stale |
| 3 (write) | write back the value plus 1 |

In the write clock, `upd_valid`, `upd_addr` and `upd_count` (the new value)
go to the peak detector. The peak detector compares this new value with the
largest count so far, so the peak is known as soon as the last reading has
been counted, with no search over the bins. Ties go to the bin that reached
the maximum first.

Readings arrive every 15-16 clocks, so the memory is idle most of the time.
Any spacing of 4 clocks or more works. An assertion in `hist_builder` flags a
request that arrives while the previous one is still being counted.

Bins do not saturate: a count wraps after 4095. The reference data peaks near
500 counts.

## Emptying the memory between passes

Block RAM has no reset, but the fine pass reuses the memory that still holds
the coarse histogram. Two mechanisms are built; the parameter `CLR_MODE`
picks one.

**Signaled clearing (`CLR_SIG`, default).** `reset_memory` keeps one flag per
bin. A single-clock `RST` clears all flags at the start of each pass, and
every write sets the flag of its bin. When a bin is read for an increment,
its flag (`SEL`) decides what happens:
- flag clear: the bin is stale, so the adder starts from 0 and the bin becomes 1;
- flag set: the stored value is incremented.

Readout also shows a bin whose flag is clear as 0. Clearing thus costs no
time, but it needs 256 flip-flops.

**Sequential clearing (`CLR_SEQ`).** Before each pass the controller holds
`clrMem` high. A counter sweeps addresses 0..255 and writes zeros, one bin per
clock, so each pass costs 256 extra clocks.

The 256 flags are flip-flops here, not SR latches. The sweep runs on the
rising clock edge rather than the falling one. Both choices keep the whole
design on one clock edge.

## One estimate, port by port

`sifh_top` ports (one clock, 50 MHz in the reference setup, synchronous
active-high `rst`):

| phase | what happens | length |
|---|---|---|
| `start` | one-clock pulse | 1 |
| (CLR_SEQ only) sweep | memory zeroed | 256 |
| `wait0` high | `RST` pulse in its first clock; source must wait | 4 (80 ns) |
| acquisition | source sends M readings on `sd`/`ws` once `wait0` falls; the controller counts them | M x 16 |
| drain | last bin update finishes; after the coarse pass the thresholds are latched | 3 |
| `wait1` high | pause | 4 |
| `rd_hist` high | drive `addr`; `bin` shows that bin one clock later | 256 (5.12 us) |
| repeat for the fine pass | `HS` high, the filter is active | |
| `wait2` high | pause | 4 |
| `tof_valid` high | `tof` holds the result until the next `start` | |

With the default `M = 32240` and 16 clocks per reading, one estimate takes
1,032,216 clocks, or 20.6 ms at 50 MHz.

Parameters of `sifh_top`:
- `M`: readings per pass, default 32240;
- `DEAD_CYC`: length of each wait pulse, default 4;
- `CLR_MODE`: clearing mechanism, default `CLR_SIG`.

`NP`, `NS` and `BIN_W` are set in `sifh_pkg`.

## How far to trust it

What follows the reference design:
- the two-pass method and equations (1)-(3);
- the 15/8/12-bit sizes and the structure of the block diagram;
- the three-clock update on a single-port read-before-write memory;
- both clearing mechanisms and the readout rule for stale bins;
- the phase order and timings of the measurement sequence;
- M = 32240 readings per pass.

This design's own choices:
- bit order on `sd` and the meaning of `ws`;
- the `pix_valid`, `req`, `busy`, `clr_done` and `tof_valid` handshakes;
- counting M readings to end a pass, and the drain state;
- holding `tof` until the next `start`;
- the fixed windows at the end bins;
- the tie rule in the peak detector;
- rising-edge sweeping, flip-flops for the flags, wrapping bins;
- a single clock input: the reference hardware also forwards clocks to the instruments, and that is not built.

Not built:
- the instruments (pattern generator, logic analyzer, host software);
- an array of pixels. The design is one pixel. Scaling means replicating the builder, peak detector and thresholds per pixel; the reference claims a 32 x 32 array fits in under 5 Mbit of block RAM.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl rtl/sifh_pkg.sv rtl/*.sv \
          tb/tb_sifh_top.sv --top-module tb_sifh_top
./obj_dir/Vtb_sifh_top
```

Two testbenches cover the whole estimator:

- `tb_sifh_top` acts as pattern source and logic analyzer. It runs a
  signaled-clearing and a sequential-clearing instance side by side with
  M = 1500. Each instance does six estimates, including ToFs 6 and 32764
  (end-bin windows) and one next to a coarse-bin boundary. Every coarse and
  fine bin read out is compared with a software model. The testbench counts
  filter rejections, first hits on stale bins, repeat hits, stale bins read
  as 0, end-bin windows and sweeps, and fails if an expected one never
  occurs.
- `tb_sifh_sweep` measures the static characteristic. The true ToF steps through
  every code from 1 to 32766, one estimate each, with M = 100 and readings back
  to back (15 clocks each). Every result must equal the peak of a complete
  32768-bin histogram of the same readings. It takes about a minute and a half.
- `tb_sifh_top_full` runs one estimate at the default parameters
  (M = 32240, the ToF-2089 example). It takes about a second.

The testbenches draw random data with `$urandom`. Add
`+verilator+rand+reset+2` to start the memory with random contents; this is
what shows that stale bins really are ignored.
