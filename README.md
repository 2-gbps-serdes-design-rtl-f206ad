# Strobe-grouped standard-cell SerDes, 2 Gb/s per lane

This is a chip-to-chip serial link that needs no PLL, no DLL frequency
multiplier and no clock-and-data-recovery circuit. Everything in it is
ordinary standard-cell logic plus programmable delay lines. It uses three ideas:

* **Serialize with clock phases, not a fast clock.** A 500 MHz system
  clock is cleaned to a 50 % duty cycle (CLK50), and a copy lagging by 90°
  (CLK90) is made. Together the two clocks split every 2 ns cycle into
  four 500 ps slots. A multiplexer tree whose select inputs are the clocks
  themselves sends four parallel bits in those slots, giving 2 Gb/s per lane.
* **Forward a strobe instead of recovering a clock.** Seven data lanes
  travel with an eighth lane, the strobe. The strobe is the same serializer
  fed with the constant bits D0..D3 = 1, 0, 1, 0, which makes a 1 GHz clock. The
  receiver captures data on both strobe edges.
* **Measure timing statistically and correct it once, at start-up.** A
  *random sampling unit* (RSU) samples signals at random instants and counts
  outcomes. The counts give the duty cycle of a clock and the overlap between
  two signals. These measurements set the duty-cycle corrector, the 90° delay
  and the transmit-side de-skew delays. After start-up the link runs open-loop.

A strobe group carries a 28-bit word per 500 MHz cycle (14 Gb/s) on 8
pins, so it needs 2/7 of the pins of the parallel bus.

```
            transmit chip                                    receive chip
 sys_clk ─► DCC + phase gen ─► CLK50/CLK90                 strobe ─┬──────────────┐
            ▲       │                                              │              │
       ctrl │     RSU (CLK50 vs CLK90)                             ▼              ▼
            │                                              lane ─► Rx-bit ─► ring buffer ─┐
 data[4i+3:4i] ─► mux(align) ─► Tx-bit ◄─ de-skew delay    (x7)    │                      ├─► rx_data
 (x7 lanes)                       │       (per lane)               └─► RSU (lane vs strobe)│   rx_valid
 pattern 1010 ─► mux(align) ─► Tx-bit ─► strobe                    read when all buffers ─┘
                                  │                                hold data (sys_clk)
                                  └──── LVDS driver ── board ── LVDS receiver ───┘
```

## Serializer (`tx_bit`)

The hardest part to see is how four bits leave in one clock cycle without a
faster clock. On the rising CLK50 edge the four bits are registered (`r_d`).
On the falling edge bits 2 and 3 are registered again (`rt_d`). The second
copy keeps them stable through the low half of the cycle, while `r_d` may
already take the next word. Three 2:1 multiplexers then select:

| CLK50 | CLK90 | slot (after rising CLK50) | output |
|-------|-------|---------------------------|--------|
| 1     | 0     | 0–500 ps                  | D0 (`r_d[0]`)  |
| 1     | 1     | 500–1000 ps               | D1 (`r_d[1]`)  |
| 0     | 1     | 1000–1500 ps              | D2 (`rt_d[0]`) |
| 0     | 0     | 1500–2000 ps              | D3 (`rt_d[1]`) |

So the width of each slot depends only on how accurate the CLK50 duty
cycle and the CLK90 lag are. That is the job of the duty-cycle corrector.

## Duty-cycle corrector and phase generator (`dcc_phase_gen`, `dcc_ctrl`)

A delay line makes a delayed copy B of the incoming clock A:

* `A | B` is the **stretched** clock. Its high phase grows by the delay, which corrects inputs below 50 %.
* `A & B` is the **chopped** clock. Its high phase shrinks by the delay, which corrects inputs above 50 %.

A 3:1 multiplexer picks the original, stretched or chopped clock as CLK50.
A second delay line fed from CLK50 makes CLK90. Inputs from 30 % to 70 %
duty cycle can be corrected.

The control unit runs on the random clock and drives one RSU that observes
CLK50 (signal 1) and CLK90 (signal 2). One calibration takes 1 + 2·log2(TAPS)
RSU measurements, which is 11 at the defaults:

1. It measures the input with the original clock selected. Within ±`tol`
   samples of n/2 it keeps the original clock. Below n/2 it stretches;
   above n/2 it chops.
2. It runs a successive approximation over the DCC taps, most significant
   bit first. A bit is kept while the measured duty cycle stays at or below
   50 % (stretching) or at or above 50 % (chopping).
3. It runs a successive approximation over the phase taps. A bit is kept
   while Counter 3 (CLK50 high and CLK90 low) is at most n/4, which is a
   quarter period.

Measurements can be made cheaper early on. If `n_coarse` (`dcc_n_coarse` on
the top) is non-zero, the first measurement and the upper half of each
search's bits (bits 4 and 3 at 32 taps) use `n_coarse` samples. The lower
bits, which decide the final tap, use the full `n`. The tolerance `tol` is
counted in samples of the first measurement. With `n_coarse` = 0 every
measurement uses `n`.

A binary search is safe for two reasons:

* Duty cycle grows monotonically with the stretch delay and falls with the chop delay.
* A trial tap that is too large (a delay longer than the high phase) produces a double pulse. That double pulse still reads as "too much", so the bit is rejected.

## Random sampling unit (`rsu`)

Each toggle of `sample` passes two flip-flops clocked by the random clock.
Their XOR is a one-cycle pulse that loads Counter 1 with n and clears
Counters 2 and 3. On each later random-clock edge, while Counter 1 ≠ 0:

* Counter 1 counts down.
* Counter 2 counts if the (double-synchronized) signal 1 is high.
* Counter 3 counts if signal 1 is high and signal 2 is low.

When Counter 1 reaches zero, `ready` rises. `cnt_high/n` estimates the duty
cycle, and `cnt_phase/n` estimates t_A/T, the fraction of a period in which
the leading signal is high and the lagging one low. A measurement takes
n + 2 random-clock edges after the toggle.

The counters are 16 bits wide. With n = 65535 the standard deviation of a
proportion is at most 0.2 %, so about 1 % accuracy holds at very high
confidence. `tb_rsu_accuracy` checks this. It clocks the 16-bit RSU from
the LFSR-driven random clock model at n = 65535 and measures 30, 50 and
70 % duty cycles and three phase overlaps. Each result must be within
1 percentage point; the errors seen are below 0.3 points.

The random clock (`rand_clk_gen`) is a ring oscillator whose half period is
set by an LFSR (`lfsr`). Its average speed only changes how long a
measurement takes, not how accurate it is.

## Deserializer and ring buffers (`rx_bit`, `ring_buffer`, `rx_byte`)

The strobe is split into `stb` and `stb_bar`. Bits D0 and D2 are captured on
rising `stb` (E02), and D1 and D3 on rising `stb_bar` (E13). Two more ranks
re-time them:

```
F0 <= E02 @stb      F1 <= E13 @stb_bar
G0 <= F0  @stb_bar  G1 =  F1      G2 <= E02 @stb_bar    G3 = E13
```

After the falling strobe edge that captures D3, G0..G3 hold the whole word
for one strobe period. `write` comes from a toggle flip-flop on `stb` and
two more `stb` flip-flops, so it is the strobe divided by two and delayed
by two strobe cycles. Its rising edge falls in the middle of that window,
and it clocks G into the lane's ring buffer.

Two framing rules follow from this:

* After reset, the **first rising strobe edge must carry D0**. The
  transmitter ensures this by sending the all-zero alignment pattern (strobe
  held low) while the receiver is reset.
* Each word is written on the first strobe edge of the **next** word, so
  the strobe must keep running for one word after the last useful one.

Each lane has its own ring buffer: 8 entries, Gray-coded pointers and
two-flip-flop synchronizers into the receiver's system clock. After reset
nothing is read until every buffer holds a nibble. From then on, a word is
read on each clock edge at which all seven buffers hold data. `rx_valid`
and `rx_data` follow one cycle later. The receiver clock must run at the
same 500 MHz word rate as the transmitter.

## Start-up and de-skew

Board wires give every lane a different delay. The transmitter compensates
by delaying each lane's CLK50/CLK90 pair (`tx_lane_tap[i]`, lane 7 = strobe),
which shifts that lane's launch time. An external host runs the sequence
below. It is written out in `tb/tb_serdes_link.sv`.

1. **Calibrate the clocks.** Pulse `dcc_start` and wait for `dcc_done`.
2. **De-skew.** Set `tx_align` and send the alignment pattern 0011 on every
   lane, strobe included. This gives a 500 MHz square wave, slower than the
   1 GHz strobe, so a skew larger than one strobe cycle cannot be locked to
   the wrong cycle. Each receive RSU measures its lane (signal 1) against the
   strobe (signal 2). The goal is that the strobe lags the data by half a bit
   (250 ps), so its edges sit in the middle of the data eye. With a 2 ns
   pattern that means Counter 3 = n/8.

   The count is symmetric in the sign of the skew: a lead and a lag of the
   same size give the same count. The host therefore sweeps a data lane's
   taps, finds the minimum count (zero skew), and picks, below that tap, the
   tap whose count is nearest n/8.
3. **Frame.** Send pattern 0000 (strobe quiet), pulse `rx_rst_n`, then
   clear `tx_align` together with the first data word.

## What is synthesizable and what is a model

* `tx_bit`, `rsu`, `lfsr`, `dcc_ctrl`, `ring_buffer` and `rx_bit` are
  ordinary synthesizable RTL. So is the gate-level part of `dcc_phase_gen`
  (OR, AND, multiplexer).
* `tx_bit` and `rx_bit` deliberately use clocks as data: the clocks drive
  multiplexer selects, and both edges of the strobe are used. That is the
  design, not an accident.
* **`delay_line` is a behavioural model.** In silicon it is a chain of buffer
  cells with a tap multiplexer. The model has a 30 ps insertion delay plus
  binary-weighted stages of 25, 50, 100, 200 and 400 ps (32 taps, 30–805 ps).
  Its delays are inertial, so a pulse shorter than an active stage is lost.
  No clock phase the design uses is shorter than 400 ps.
* **`rand_clk_gen` is a behavioural model** of the LFSR-driven ring
  oscillator (half period 1.5–5.3 ns).
* `dcc_phase_gen`, `tx_byte` and `serdes_link` instantiate these models.
  A synthesis tool drops the delays, so it reports the random clock nets as
  undriven.
* Not included: the LVDS output drivers and input receivers (vendor IO
  cells), the board, and the host. The top `serdes_link` therefore brings
  out `tx_ser_*` and `rx_ser_*` separately.

## Choices made here where the design description is silent

* **Strobe pattern.** {D3..D0} = 0101, so the strobe rises in slots D0 and D2.
* **Bit mapping.** Lane *i* carries word bits [4i+3:4i], LSB first.
* **Alignment pattern.** One 4-bit pattern is shared by all eight lanes.
* **Delay lines.** Sizes are 32 taps × 25 ps.
* **Random clock.** The LFSR polynomial and the random-clock delays are this design's own.
* **Control unit.** The search algorithm (successive approximation), the select encoding and the tolerance are this design's own.
* **Sample size.** There are two sample sizes: `n_coarse` for the first measurement and the upper search bits, and `n` for the rest. A schedule with more steps is left to the host.
* **Ring buffers.** Depth 8 with Gray pointers. A word is read whenever all buffers hold data; this is more general than a hold that applies only after reset.
* **Resets.** Asynchronous resets were added to the RSU and to the `write` divider.
* **Framing.** The framing rule and the host de-skew search are this design's own.

## Files

| module | role |
|---|---|
| `serdes_pkg` | lane counts, widths, strobe pattern, `dcc_sel_e` |
| `serdes_link` | top: one strobe group, transmit and receive halves |
| `tx_byte` | 8 Tx-bit units, alignment muxes, de-skew delays, DCC, RSU |
| `tx_bit` | 4:1 serializer |
| `dcc_phase_gen` | duty-cycle corrector and CLK90 generator |
| `dcc_ctrl` | calibration control unit |
| `rsu` | random sampling unit |
| `rand_clk_gen`, `lfsr` | random clock (model) and its LFSR |
| `delay_line` | programmable delay line (model) |
| `rx_byte` | 7 Rx-bit units, ring buffers, RSUs, read control |
| `rx_bit` | 1:4 deserializer and write generator |
| `ring_buffer` | dual-clock ring buffer |

Each module has a testbench, `tb/tb_<module>.sv`. `tb_rsu_accuracy` also
runs the RSU at its full sample size. Every testbench checks
against values it computes itself and prints
`TB_RESULT checks=N failures=M`.

`tb_serdes_link` runs the top at its default parameters through the
following steps:

* calibration at 40 % duty (stretch);
* de-skew of a board with 0–210 ps lane delays;
* 300 words;
* recalibration at 60 % duty (chop), with 256-sample coarse steps first;
* 300 more words.

It also counts that every mechanism occurred. It takes about 1.5 minutes
of CPU time. The other testbenches finish within about 20 s.

## Simulating

All files carry `` `timescale 1ps/1ps``. The testbenches need timing support:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_serdes_link \
    -y rtl -y tb +libext+.sv -Irtl rtl/serdes_pkg.sv tb/tb_serdes_link.sv
./obj_dir/Vtb_serdes_link
```

Replace `tb_serdes_link` with any other testbench name. Verilator warns
that the variable delays in `rand_clk_gen` might be zero (ZERODLY); they
never are.

## Limits

* Changing a tap while a clock runs can glitch that clock, as a real tap
  multiplexer would. Calibrate and de-skew before sending data.
* The parallel word is sampled by each lane's delayed CLK50 in the same
  cycle it is presented. The total CLK50 insertion delay must therefore stay
  under one clock period. With 32 × 25 ps taps it does.
* Jitter, LVDS signal quality and power are outside this RTL. The
  start-up time depends on the random clock rate: 43 measurements take about
  0.6 ms of simulated time at n = 2048.
