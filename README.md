# 1.2 / 1.25 Gbit/s half-rate serializer with clock-multiplying PLL

This is RTL for a serializer chip meant for radiation-exposed optical links
in particle-physics detectors. It takes a 20-bit parallel bus at 60 MWord/s and
sends it as one serial stream at 1.2 Gbit/s, with its bit clock made by a
PLL that runs at 30 times a 40.08 MHz reference. Because the clock is locked to the
reference, every bus word goes out a fixed time after it was taken in, which
is what a trigger link needs. With a 41.67 MHz reference the same circuit
runs at 1.25 Gbit/s, the Gigabit-Ethernet line rate, so a standard
receiver chip set can take the stream. The words are expected to be 8B/10B
coded already: each 10-bit half of the bus is one code group. At 1.2 Gbit/s
that leaves 24 payload bits per 25 ns reference period.

The main idea is to avoid flip-flops clocked at the bit rate. In a
radiation-tolerant layout, static flip-flops are too slow for a 1.25 GHz
shift register, and dynamic flip-flops are sensitive to single-event upsets.
So each 10-bit word is split into its even and its odd bits. Two 5-bit shift
registers run at half the bit rate (600 MHz). One fast 2:1 multiplexer,
selected by the 600 MHz clock itself, interleaves the two streams. Only the
divide-by-two flip-flop of the clock generator must run at the full rate.
An optional output flip-flop, which can be bypassed, also runs at the full rate.

The numbers behind this, for the radiation-tolerant 0.25 µm process at
the worst-case corner: a static flip-flop has 749 ps clock-to-output delay
and 296 ps setup time, and a 2:1 multiplexer has 247 ps delay. A loadable
shift register therefore needs about 1.3 ns per bit, which is well short of
the 800 ps available at 1.25 Gbit/s. The same register run at half rate has
1.6 ns per bit and does fit. Static cells alone limit it to roughly 770 MHz.

## Block structure

```
 ref_clk ──► pll_model ──vco_clk──► clock_gen ──bit_clk, load, word_clk──┐
     ▲            ▲                    │                                │
     │            └──── fb_clk (÷30) ◄─┘──► out120, out40               │
     │                                                                  ▼
 d[19:0] ──► word_mux ──10-bit words @120 MHz──► hs_serializer ──► serial_data
              └──► out60                          ▲
 prog_clk/dat/load ──► cfg_reg ──retime_en────────┘
```

| module | what it is |
|---|---|
| `gbit_ser_top` | chip top; wires the blocks below |
| `hs_serializer` | register, even/odd shift registers, half-period latch, clock-selected mux, bypassable retiming flip-flop |
| `clock_gen` | VCO ÷2 (bit clock), 5-stage one-hot ring (load strobe), set/reset word clock, ÷3 feedback |
| `word_mux` | 20-bit bus at 60 MWord/s to 10-bit words at 120 MWord/s, and makes the 60 MHz clock |
| `cfg_reg` | serially programmed test configuration; one field, `retime_en` |
| `pll_model` | behavioural PLL (phase/frequency detector, charge pump and RC filter as P+I, VCO), with lock detect |
| `ser_pkg` | widths, ratios and the configuration struct `cfg_t` |

Everything except `pll_model` is synthesizable. The serial output goes to a
50-ohm PECL-level line driver, which is an analog cell and is not part of
this RTL. `serial_data` is its CMOS-level input.

## Clocks

All clocks come from the VCO clock. At 1.2 Gbit/s the frequencies are:

| signal | made by | frequency | duty |
|---|---|---|---|
| `vco_clk` | PLL | 1.2 GHz | model: 50 % |
| `bit_clk` | toggle flip-flop on `vco_clk` | 600 MHz | 50 % by construction |
| `load` | last stage of the 5-stage ring on `bit_clk` | 120 MHz strobe | 1 of 5 bit periods |
| `word_clk` (`out120`) | set/reset latch, set by ring stage n4, reset by n1 | 120 MHz | 2 of 5 bit periods |
| `out60` | toggle flip-flop on `word_clk` (in `word_mux`) | 60 MHz | 50 % |
| `fb_clk` (`out40`) | ÷3 counter on `word_clk` | 40.08 MHz | 1 of 3 word periods |

The bit clock is made by dividing the VCO clock by two rather than taken
from the VCO directly. This gives a duty cycle close to 50 %, which matters
because the bit clock selects the output multiplexer: each half of a
bit-clock period is one output bit. A distorted duty cycle would become jitter
in the serial stream.

The ring divider holds one `1` and four `0`s. Its first stage takes a
`1` only when stages n1 to n4 are all `0`, so a ring that powers up holding
any pattern cleans itself up within five bit clocks. For this reason the
clock generator has no reset.

## The serializer, cycle by cycle

Time is counted in VCO periods T (833 ps at 1.2 GHz). Phase 0 is the rising
`word_clk` edge. That edge coincides with a rising `bit_clk` edge.

| phase | event |
|---|---|
| 0 | `word_clk` rises: the 10-bit register takes the word from `word_mux` |
| 2 | ring reaches the load stage: `load` goes high |
| 4 | rising `bit_clk` with `load` high: SR-1 ← bits 0,2,4,6,8 and SR-2 ← bits 1,3,5,7,9; `word_clk` falls |
| 4 | `bit_clk` high: mux shows SR-1[0] = **bit 0** |
| 5 | `bit_clk` falls: the latch opens and passes SR-2[0] = bit 1; mux shows the latch = **bit 1** |
| 6 | `bit_clk` rises: both registers shift; the latch closes, still holding bit 1; mux shows SR-1[0] = **bit 2** |
| 7 | `bit_clk` falls: latch takes bit 3; mux shows **bit 3** |
| … | … up to **bit 9** in phase 13, then the next word's bit 0 in phase 14 |

So bit *i* of a word is on the multiplexer output during VCO period 4 + *i*
after the word was registered. Every bit lasts exactly one VCO period. The
latch delays the odd register by half a bit-clock period. Without it, the
odd bit would change at the same edge as the even bit it follows. With it,
each input of the multiplexer is stable for the whole half-period in which it
is selected, and for some margin on either side.

With `retime_en = 1`, which is the reset default, a flip-flop on the VCO clock
samples the multiplexer output at the end of each bit. This removes the effect
of duty-cycle error and of multiplexer asymmetry on the bit widths, at the cost
of one more period of latency: bit *i* appears in period 5 + *i*. This
flip-flop would be a dynamic, upset-sensitive cell in the real chip, so it can
be bypassed through the configuration register.

Mux polarity: SR-1 is selected while `bit_clk` is high and the latch while
it is low. The latch is open while `bit_clk` is low. With that latch, this is
the only polarity that gives the bits in order.

## Word multiplexer and bus timing

On the `word_clk` edge where `out60` rises, the bus is sampled.
`d[9:0]` is sent as the first 10-bit word and `d[19:10]`, held in a register,
as the second. The user's logic should change `d` on the falling edge of
`out60`. Total latency from that falling edge to the first serial bit
(`d[0]`) is fixed:

* bypass: 2 word periods (20 T) + 4 T = **24 VCO periods**
* retimed: **25 VCO periods**

The stream carries `d[0]`, `d[1]`, … `d[19]` in that order, then the next bus word.

## PLL model

The PLL is analog in the real chip. `pll_model` is a behavioural stand-in
that keeps the real loop structure and ports. A three-state detector measures
the time between a reference edge and the matching feedback edge. That is
the width of its UP or DN pulse, and it is the phase error *e*, positive when
the feedback is late. The charge pump and RC filter become a proportional
term and an accumulated term that set the VCO half period:

    half = NOM_HALF_PS − (KP·e + Σ KI·e) / (2·MULT)     (clamped to ±40 %)

MULT is 30 and is the total division of `clock_gen`. KP = 0.5 and KI = 0.1
give a loop that settles in a few tens of reference cycles. The accumulated
term tracks the reference frequency, so the same model locks at 40.08 MHz
(1.2 GHz) and at 41.67 MHz (1.25 GHz).

The VCO's own noise is the main source of jitter here, because the loop
corrects the phase only once every 30 VCO periods. The model adds a random
deviation of `JITTER_PS` = 2 ps RMS to every VCO period, which is the
cycle-to-cycle noise the real VCO was sized for. Over one reference period
this noise builds up to roughly 11 ps RMS of phase. Lock is therefore raised
after 16 comparisons in a row within 100 ps, and dropped on the first one
outside. Set `JITTER_PS` to 0 for an ideal clock.

Reference jitter, supply noise and the VCO's real tuning curve are not
modelled. The gains, the tuning range, the noise distribution and the lock
rule are this model's own, not values of the real circuit.

## Configuration

`cfg_reg` is loaded through three pins. `prog_dat` is shifted in on each
rising `prog_clk`. A rising `prog_clk` while `prog_load` is high copies the
shifted bits into the active configuration. The register holds one field,
`retime_en` (see `ser_pkg::cfg_t`). The real chip's test configuration
probably holds more, but no other setting is known. To add one, add a field
to `cfg_t`: `CFG_W` follows from it. The setting acts in the bit-clock
domains without synchronisation, so change it only while the stream is not
in use.

## Top-level ports

| port | dir | width | meaning |
|---|---|---|---|
| `ref_clk` | in | 1 | 40.08 MHz (or 41.67 MHz) reference |
| `rst_n` | in | 1 | active-low asynchronous reset of the data path and configuration |
| `d` | in | 20 | parallel data, 60 MWord/s, change on falling `out60` |
| `prog_clk`, `prog_dat`, `prog_load` | in | 1 | configuration programming |
| `serial_data` | out | 1 | serial stream to the output driver |
| `out120`, `out60`, `out40` | out | 1 | word clock, bus clock, feedback clock |
| `lock_detect` | out | 1 | PLL lock |

The prototype chip also has a `TestOut` pin, whose function is unknown, so it
is not provided.

## What is design choice rather than known circuit

These parts follow the known circuit: the block structure, the frequencies
and division ratios, the even/odd split, the half-period latch on the odd
register, the mux selected by the bit clock, the bypassable resampling
flip-flop, the 5-stage ring with n4/n1 set/reset word clock, and the ÷3
feedback. These are this design's own choices:

* which bus half goes first (`d[9:0]`) and the bus sampling edge;
* the exact injection function of the ring and the resulting 2-of-5 word-clock duty cycle;
* the shift direction and the mux polarity (both fixed by the bit order 0…9);
* resets: asynchronous, active low, on the data path and configuration only;
* the configuration protocol, its length and its reset value (retiming on);
* the whole inside of the PLL model, including lock detection.

The chip takes 20-bit words at two per three reference periods. Sending one
30-bit word per reference period would need a 30:10 multiplexer, which this
design does not have; external logic must regroup the data.

Two elements are latches on purpose: the word-clock set/reset element and
the odd-bit latch. Lint tools will report the bit clock being used as a data
signal (the mux select); this is also intended.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. For example, the whole chip, at default
parameters:

    verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
        rtl/ser_pkg.sv tb/tb_gbit_ser_top.sv --top-module tb_gbit_ser_top
    ./obj_dir/Vtb_gbit_ser_top

`tb_gbit_ser_top` plays the role of the test card. It goes through these steps:

* locks at 40.08 MHz;
* checks the clock-output periods (10, 20 and 30 VCO periods) and the VCO period;
* sends 60 random bus words with retiming on, then 60 more with it bypassed;
* switches the reference to 41.67 MHz, waits for relock, and sends 60 words at 1.25 Gbit/s.

The received stream is matched bit for bit at the latencies given above, 25
and 24 VCO periods. The testbench also counts each mechanism: lock, relock,
load strobes, both bus halves, both output modes and configuration loads.
The other testbenches are:

* `tb_clock_gen`: the ratios and phases, starting from a random state;
* `tb_word_mux`: the order and timing of the halves;
* `tb_hs_serializer`: uses its own clock model and checks each bit in its VCO period, with and without retiming;
* `tb_cfg_reg`: programming and reset;
* `tb_pll_model`: lock, frequency and phase at both rates, and the loss of lock when the reference changes;
* `tb_prbs_eye`: the eye-diagram workload. A 255-bit PRBS-8 pattern
  (x^8+x^6+x^5+x^4+1) is carried through the whole chip, in three runs:
  retimed and bypassed at 1.2 Gbit/s, and retimed at 1.25 Gbit/s. A
  self-synchronizing checker predicts each received bit from the previous 8
  and must find no errors. Every transition of the output must fall on a VCO
  edge.

The resets are asynchronous and act on a falling edge of `rst_n`. In a
two-state simulator, start `rst_n` high and then drive it low, as the
testbenches do. A reset that is low from time 0 produces no edge, and
`cfg_reg`, which is not clocked during reset, would keep its random start
value.

All files use `timescale 1ps/1fs`. Time values in the PLL model are in ps.
