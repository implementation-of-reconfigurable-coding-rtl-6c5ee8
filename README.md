# Reconfigurable all-digital RF transmitter

A transmitter whose whole data path, from the data bit to the RF bit stream,
is digital logic. A serial data bit is BPSK mapped, pulse width modulated,
mixed with a carrier from a digital frequency synthesiser (DFS) and
serialised into a one-bit output stream. Three things can be changed at run
time, without new hardware:

- the carrier frequency of every path (the DFS tuning word),
- the pulse shaping: a plain ramp/comparator PWM or a random PWM whose
  switching period varies but averages the same,
- the PWM resolution, and which paths are sent.

The RTL is plain synthesizable SystemVerilog, one clock, synchronous
active-high reset. It targets an FPGA, but nothing in it is vendor specific.

## Signal chain

```
            +--> [0 deg]   -> PWM/RPWM -> X <- DFS0 --+
data  BPSK  |    re                                    +-> select+combine -> serializer -> tx_out[0]
----> map --+--> [0 deg]   -> PWM/RPWM -> X <- DFS1 --+        (32-bit word)   (5-bit counter)
            |    im
            +--> [180 deg] -> PWM/RPWM -> X <- DFS2 --+
            |    re                                    +-> select+combine -> serializer -> tx_out[1]
            +--> [180 deg] -> PWM/RPWM -> X <- DFS3 --+
                 im
```

| Stage | Module | What it does |
|---|---|---|
| BPSK mapping | `bpsk_mapper` | bit 0 -> (+2047, 0), bit 1 -> (-2047, 0), 12-bit real and imaginary parts |
| 0/180 degree box | `phase_shifter` | passes the sample (0 deg) or negates it (180 deg, -2048 saturates to +2047) |
| PWM | `pwm` | ramp counter compared with a duty value; outputs SDO and NSDO |
| Random PWM | `pwm_random` | PWM with randomly varied period, same average period |
| DFS | `dfs` = `phase_accumulator` + `sine_rom` | f_out = dP * f_clk / 2^32, 16-bit sine |
| Mixer (X) | `mixer` | pulse read as +1/-1: product = +carrier or -carrier |
| Select and combine | `select_combine` | packs two 16-bit products into one 32-bit word, per-path enable |
| Serializer | `serializer` | 32:1 multiplexer driven by a 5-bit counter, MSB first |
| Top | `rf_transmitter` | the four paths and two output groups above |

Shared widths, the `mod_sel_e` enum and the sample-to-duty conversion live
in `tx_pkg`.

Paths 0 and 1 form output group 0 and carry the real and imaginary parts
unshifted. Paths 2 and 3 form group 1 and carry the same parts shifted by
180 degrees, so `tx_out[1]` is the antipodal version of `tx_out[0]` (each
path still has its own carrier frequency). In BPSK the imaginary part is
always 0, so paths 1 and 3 run at exactly half duty.

## From symbol to duty cycle

The signed 12-bit sample is converted to offset binary and left-aligned in
the PWM's 32-bit `din` (`tx_pkg::sample_to_duty`):
`din = {~s[11], s[10:0], 20'b0}`. The word is therefore an unsigned
fraction of full scale: +2047 gives 4095/4096, 0 gives 1/2, -2047 gives
1/4096. The random PWM takes the top byte of the same word as `va`.

## The PWM and its `addr_gen` input

`pwm` has a 32-bit data input, a write enable and a 4-bit `addr_gen`
input. Here `addr_gen` selects the resolution: with k = `addr_gen` + 1 bits
the period is 2^k clocks (2 to 65536) and the duty is the top k bits of
`din`. Because `din` is a fraction, the same word gives the same duty
cycle at every resolution; only the period and the granularity change.

- `din` is written into a duty register when `wr` is high.
- The active duty and the resolution are reloaded only at a period
  boundary. A write in the last clock of a period already counts. This
  double buffering keeps a period from mixing two duty values. It also
  means a resolution change waits until the running period has ended.
- `sdo = ramp < duty`, so a duty of 0 gives a flat low output and the
  largest duty gives 2^k - 1 high clocks per period. `nsdo = ~sdo`.
- The first clock after reset is a one-clock boundary that loads the duty
  and resolution.

## The random PWM

`pwm_random` changes the length of every switching period but keeps the
average exactly `NOM_PERIOD` (256 clocks), so its mean switching frequency
is that of the plain PWM. Periods come in pairs:

```
d      = lfsr[5:0]              (0 .. SPREAD-1, SPREAD = 64)
pair   = NOM_PERIOD + d, NOM_PERIOD - d
on     = floor(va * P / 256)    clocks at the start of each period P
```

A 16-bit maximal LFSR (x^16 + x^14 + x^13 + x^11 + 1, per-path seed)
advances once per pair. `va` is sampled at the start of each period.
`pwm_a_off` is the complement of `pwm_a_on`. Periods range from 193 to
319 clocks. The module has a reset input so that the LFSR starts from its
seed.

## Digital frequency synthesiser

The phase accumulator holds a 32-bit frequency register, loaded from `dp`
every clock, and a 32-bit phase register that gains the frequency register
every clock modulo 2^32. The top 10 phase bits address a 1024 x 16 sine
table, `rtl/sine_rom.hex`. Entry i is round(32767 * sin(2 * pi * i / 1024))
in two's complement. The scale is symmetric, so every entry can be negated
without overflow.

- Output frequency: f_out = dp * f_clk / 2^32. The resolution is f_clk / 2^32.
- Latency: `dp` reaches the frequency register after 1 clock, the phase
  after 2 and the amplitude after 3.
- `wrap` pulses once per carrier period, when the accumulator overflows.

The table file fits only the default K = 10, M = 16. If you change them,
regenerate it with the formula above.

## Frame format and timing

Each serializer runs a free 5-bit counter. `tx_last[g]` is high while the
counter is 31. On that clock edge `select_combine` captures the two mixer
products of its group, and the counter wraps to 0. The next 32 clocks then
send the word MSB first:

```
bit 31 ............ 16 | 15 ............. 0
 product of path 2g    |  product of path 2g+1      (zeros if disabled by sel)
```

Counting clock edges n from the first edge after reset is released, the
frame captured at edge 32m holds `+/-sine(((32m - 4) * dp) mod 2^32 >> 22)`.
The sign is the PWM pulse level one clock before the capture. Latencies
through the chain:

| From | To | Clocks |
|---|---|---|
| `data_valid` | mapper output | 1 |
| mapper | phase shifter output / PWM `wr` | 1 more |
| PWM `wr` | new duty active | at the next PWM period boundary |
| pulse, carrier | mixer product | 1 |
| mixer product | word (on `tx_last`) | captured once per 32 clocks |

Because a word is captured once per 32 clocks, each output frame samples
the mixer outputs at one instant. The PWM shape therefore shows up over
many frames, not inside one. With `pwm_res` = 7 (a 256-clock period), eight
frames sample one PWM period. A data bit should last many PWM periods;
at the 1 to 10 kbit/s this transmitter is meant for, it lasts thousands of
clocks.

## Top-level ports (`rf_transmitter`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock, synchronous active-high reset |
| `data_in`, `data_valid` | in | 1 | serial data, taken when `data_valid` is high |
| `mod_sel` | in | `mod_sel_e` | `MOD_PWM` or `MOD_RPWM` for all paths |
| `pwm_res` | in | 4 | PWM period 2^(pwm_res+1) clocks |
| `dp` | in | 4 x 32 | DFS tuning word of each path |
| `sel` | in | 4 | `sel[2g+1]` enables path 2g, `sel[2g]` enables path 2g+1 |
| `tx_out` | out | 2 | serial RF bit streams of groups 0 and 1 |
| `tx_last` | out | 2 | high while a frame's last bit is sent |

The antenna and any analog RF stage after `tx_out` are outside this RTL.

## What is interpretation

The overall structure is taken from a published description: BPSK mapping,
0/180 degree paths, PWM and random PWM, DFS, mixer, select-and-combine,
and a serializer driven by a 5-bit counter. So are the port names of the
PWM (CLK, RST, ADDR_GEN, DIN, WR, SDO, NSDO) and of the random PWM (va[7:0],
clk, pwm_a_on, pwm_a_off), and the 12-bit symbol and 32-bit PWM input widths.

The following are this design's own choices. Change them freely if your
reading differs.

- How `addr_gen` is used (resolution select) and the double-buffered duty.
- How the random PWM randomises its period (LFSR, paired periods,
  `NOM_PERIOD` = 256, `SPREAD` = 64), and its reset input.
- The DFS widths (32-bit accumulator, 10 phase bits, 16-bit amplitude) and
  the full-period sine table.
- The +1/-1 reading of the pulse in the mixer.
- What select-and-combine does: concatenation into a 32-bit word, once per
  frame, with per-path enables.
- Which symbol component goes to which path. Real and imaginary parts are
  both carried, even though BPSK leaves the imaginary part at 0.
- Both modulators built in every path and chosen at run time by `mod_sel`.
- The BPSK amplitude (2047) and the valid strobes.

Known departures from reported figures:

- Reported FPGA results give 33 slice registers for the PWM on one device
  and 228 flip-flops on another. This `pwm` has 80 flip-flop bits: a 32-bit
  duty register, plus a 16-bit ramp, a 16-bit active duty and a 16-bit
  period limit.
- The reported maximum clock of about 296 MHz has not been checked. No FPGA
  implementation was run.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`). It
computes the expected values itself and prints
`TB_RESULT checks=N failures=M`. Every testbench has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_bpsk_mapper` | mapping, hold while not valid, one-clock latency |
| `tb_phase_shifter` | pass and negate, saturation of -2048 |
| `tb_pwm` | period 2^(k), pulse width, NSDO, duty 0, resolution changes |
| `tb_pwm_random` | period range, pairs summing to 2*NOM_PERIOD, variation, on-time |
| `tb_phase_accumulator` | phase = (t-1)*dP, overflow rate f_out = dP*f_clk/2^32 |
| `tb_sine_rom` | all 1024 entries against a computed sine (1 LSB) |
| `tb_dfs` | amplitude against a reference accumulator, retuning, overflow count |
| `tb_mixer`, `tb_select_combine`, `tb_serializer` | datapath and frame timing |
| `tb_rf_transmitter` | end to end, default parameters (see below) |

`tb_rf_transmitter` runs the top with no parameter overrides. It decodes
both serial outputs frame by frame and recomputes every path's carrier
from its tuning word. It checks that each 16-bit product is plus or minus
that carrier, and recovers the PWM level from the sign. Over each test
segment it then checks the fraction of high pulses:

- about 1 on path 0 and about 0 on path 2 for a 0 bit, the other way round
  for a 1 bit,
- about 1/2 on the imaginary paths.

It goes through both symbols, both modulators, a resolution change and
disabled paths. It counts each of these mechanisms, plus the 180 degree
inversion, carrier overflows and frames, and fails if any count is zero.
It runs about 17,000 clocks.

`tb_tx_message` is a message-level run at the default parameters. It sends
two random 24-bit messages, one bit every 4096 clocks. That is 10 kbit/s
with a 40.96 MHz clock. The first message uses the PWM and the second the
random PWM. A small receiver in the testbench recovers every bit from both
`tx_out[0]` and the 180 degree `tx_out[1]`, and the test requires zero bit
errors.

To simulate with Verilator 5, run from the repository root, because the
sine table is read as `rtl/sine_rom.hex`:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/tx_pkg.sv tb/tb_rf_transmitter.sv --top-module tb_rf_transmitter
./obj_dir/Vtb_rf_transmitter
```

Replace `tb_rf_transmitter` with any other testbench name to run that one.
The simulator is two-state, so every register that is read has a reset.
