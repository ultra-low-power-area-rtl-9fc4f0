# Low-power all-digital PLL frequency synthesizer

This design multiplies a reference clock by M (1 to 10), optionally after
dividing it by N, with an all-digital phase-locked loop (ADPLL). The loop needs
no adder and no loop filter. It finds the 11-bit word of a digitally
controlled oscillator (DCO) with a binary search that only ever *sets and
keeps or clears* one bit per step. Each step starts from the highest
frequency side, so no step ever has to add. Frequency and phase are locked in
a single mode. The DCO is stopped and restarted at every second reference edge,
so its phase is aligned by construction. Only the frequency has to be
searched, and one frequency comparison per step is also a phase comparison.
A 100 MHz reference locks to 700 MHz or 800 MHz in 22 reference periods.

The RTL covers all the digital logic. The oscillator and the two delay
elements are analog parts, and they are written as behavioural models (timed
SystemVerilog, not synthesizable) so that the whole loop can be simulated.

## Loop at a glance

```
ref_clk ─► ref_div (1/N) ─► Fin ─┬─► div2 ─► sys_clk ─┬─► dco_enable_gen ─► dco_en ─┐
                                 │                    │    ▲ delay_buffer (pulse)  │
                                 │                    ├─► control_unit ◄─ up/down ─┤
                                 │                    │        │ word_d, load, fail│
                                 │                    └─► dco_register ─► word ────┤
                                 │                                                 ▼
                                 └─► match_delay ─► ref_m ─► pfd ◄── dco_clk ◄── dco ─► clk_out
```

| file | block | kind |
|---|---|---|
| `rtl/freq_synth.sv` | top: 1/N divider + ADPLL | RTL |
| `rtl/adpll.sv` | the loop | RTL (instantiates the models below) |
| `rtl/pfd.sv` | multiplier phase-frequency detector | RTL |
| `rtl/control_unit.sv` | binary search, lock check, PFD enable | RTL |
| `rtl/dco_register.sv` | DCO word register | RTL |
| `rtl/dco_enable_gen.sv` | DCO start/realign pulse | RTL |
| `rtl/div2.sv` | system clock = Fin / 2 | RTL |
| `rtl/ref_div.sv` | 1/N reference divider | RTL |
| `rtl/adpll_pkg.sv` | widths, word type, control states | package |
| `rtl/dco.sv` | Type-1 transmission-gate ring DCO | behavioural model |
| `rtl/match_delay.sv` | reference-path delay | behavioural model |
| `rtl/delay_buffer.sv` | pulse-width delay of the enable generator | behavioural model |

## Timing of one search step

Everything is organised in pairs of Fin periods. The system clock `sys_clk`
is Fin divided by two. It is high during reset, so its rising edges are the
even Fin edges.

0. **Start.** At the first Fin edge after reset `sys_clk` falls. That edge sets
   the start flag in `dco_enable_gen`, `dco_en` goes high, and the DCO runs
   freely for one Fin period. The second Fin edge is the first rising
   `sys_clk` edge: its pulse aligns the DCO and clears the PFD chains, and the
   search begins there.

1. **Realign.** At a rising `sys_clk` edge the control unit and the DCO
   register move to the next word. At the same moment `dco_enable_gen` pulls
   `dco_en` low for the width of the delay buffer (100 ps). That pulse is an AND
   of `sys_clk` with an inverted, delayed copy of itself. When `dco_en` returns
   high, the DCO restarts and gives its first rising edge 20 ps later. So the
   DCO phase is reset on every step, and the pulse must stay shorter than half
   a DCO period.
2. **Window.** The PFD window runs from that first DCO edge for exactly one Fin
   period. The end of the window is the next rising edge of `ref_m`, the
   reference delayed by `match_delay`. That delay equals the pulse width plus
   the DCO start delay, so both ends of the window are measured from the same
   point.
3. **Decide.** At the end of the window the PFD registers `up` or `down`.
   `pfd_en` comes from a flip-flop on the falling Fin edge that copies
   `sys_clk`, so it is high only around the edge that ends a window.
4. **Update.** The next rising `sys_clk` edge uses that answer (step 1 again).

## How the PFD decides

With the DCO restarted at t0, its rising edges fall at t0 + kT and its falling
edges at t0 + (k + 1/2)T. Two chains of flip-flops shift in a constant 1: one
chain is clocked by the rising DCO edges and one by the falling edges. After k
edges, the first k stages of a chain are 1. Both chains are cleared while
`dco_en` is low. A multiplexer picks the taps for the selected M. At the end
of the window:

* fewer than M falling edges seen: fewer than M − ½ DCO periods fit in the
  window, so the DCO is well too slow → **UP** (coarse);
* more than M falling edges seen: more than M + ½ periods fit → **DOWN**
  (coarse);
* otherwise the multiple is locked (`mult_lock`). The M-th rising edge after
  t0 is compared with the reference edge. If the DCO edge came first, the DCO
  is fast → **DOWN**, otherwise **UP**.

For M = 7 that gives the 6.5 / 7.5 thresholds of the coarse detector. Overall,
UP means "M DCO periods are longer than one Fin period". The fine comparison
is an edge-order arbiter, in the original circuit a NAND latch. Here it is a
flip-flop that samples the M-th stage of the rising-edge chain at the
reference edge.

## The search (control unit)

* After reset or a failure the word is 0: all delay off, the highest
  frequency, which must be faster than the target. One START step runs the DCO
  at that word.
* A one-hot pointer then walks from bit 10 to bit 0. The word under test is
  the bits decided so far plus the pointer bit. On DOWN (still too fast) the bit
  is kept. On UP it is cleared. Each step changes one bit and never needs an
  addition.
* **Lock check.** The result is the largest word whose M periods still fit
  in one Fin period. If the last bit was decided with UP, the word one LSB
  higher has just been measured as slow, so lock is proven and `lock` rises
  22 Fin periods after the search started (the second Fin edge after
  reset). If the last bit was decided with
  DOWN, the next word up was never tried. The loop then runs one more window
  with a separate 4 ps test delay cell switched in (`test_en`). UP then gives
  lock after 24 Fin periods. DOWN means the target is slower than the slowest
  word: `fail` clears the DCO register and the search starts again.
* After lock the word is frozen. Realignment continues every two Fin periods.

`fail` is combinational and is only meaningful at rising `sys_clk` edges, when
the register takes it.

## DCO model

The modelled oscillator is the Type-1 low-power ring. Two control bits select
one of four series transmission-gate paths (coarse). Nine bits switch MOS
capacitors (fine, 2 ps per step). A quick-reset input stops the ring. The
model's period is

```
T(word) = 952.381 ps + word * 2 ps (+ 4 ps when test = 1)
```

that is 1050 MHz at word 0. The coarse step is 512 fine steps (1024 ps), so the
11-bit word is binary weighted and the period is monotonic in the word, which
the search relies on. With these numbers the model spans 1050 MHz down to
198 MHz. The real oscillator's stated range is 450–1050 MHz (word 635 here).
The model does not capture the real coarse path delays, which are
non-uniform RC ladders. Jitter, supply and process corners are not modelled
either. The output is low while disabled, and it rises 20 ps after enable.

## Results in simulation

| N | M | word | output | lock after |
|---|---|---|---|---|
| 1 | 7 | 238 | 700.09 MHz | 22 Fin periods |
| 1 | 8 | 148 | 801.04 MHz | 22 |
| 1 | 6 | 357 | 600.10 MHz | 24 |
| 2 | 10 | 523 | 500.41 MHz | 24 |
| 1 | 1 | – | no lock, repeated fail/restart | – |

The output is always the fastest DCO setting whose M periods fit in one Fin
period, so it lies within one 2 ps step above the ideal M/N × reference.

## Where this differs from the original circuit

* **NAND latch.** The edge-order arbiter is a sampling flip-flop, not an SR
  latch. The decision flip-flops use the rising reference edge that ends the
  window; the original description mentions the inverted reference.
* **PFD enable.** This is a single flip-flop on the falling reference edge.
  The original uses a flip-flop, a delay buffer and a NAND pulse generator.
* **Lock time.** Lock takes 22 Fin periods when the final word is even and 24
  when it is odd, because of the extra check window. The original quotes 22.
* **DCO.** The DCO is a formula, binary weighted, with a wider range than
  quoted; see above. Only Type-1 is modelled. The wide-range Type-2 variant is
  not used by the loop.
* **Divider and DFFs.** The 1/N divider (counter, floor(N/2) high time, bypass
  for N < 2) and all reset and handshake choices are this design's own. The
  TSPC flip-flops of the original are plain RTL flip-flops.
* **Start-up.** After reset the DCO runs freely for one Fin period before the
  first realignment, not two. The first realignment pulse also clears the
  PFD chains, which have no other clear.
* **Out-of-range targets.** A target faster than word 0 is not detected; the
  search then ends at word 0 and reports lock.
* **Delay values.** The pulse width (100 ps), the DCO start delay (20 ps) and
  the match delay (their sum) are chosen values, not measured ones.

## Simulating

All files use `timeunit 1ps; timeprecision 1fs;`. The package goes first.
Timing is needed for the models:

```
verilator --binary --timing --assert -Irtl -Itb rtl/adpll_pkg.sv \
    tb/tb_freq_synth.sv --top-module tb_freq_synth -o sim
./obj_dir/sim
```

Each block has a self-checking testbench `tb/tb_<block>.sv` that ends with a
`TB_RESULT checks=<n> failures=<n>` line. `tb_freq_synth` runs the top at its
default parameters through 700 MHz, 800 MHz, a check-window lock, a divided
reference and an out-of-range target. It counts every loop mechanism (coarse
UP and DOWN, fine UP and DOWN, both lock paths, fail/restart, realignment)
and fails if one never occurs. `tb_adpll` checks the loop for several M
against words computed from the period formula. `tb_pfd` checks random DCO
periods against the ½-period thresholds. `tb_control_unit` runs the search
against an ideal comparator for random target words, including the lock time.

To change the oscillator, edit the period formula parameters of `dco`
(passed through `adpll`). The control unit only needs the period to grow
monotonically with the word. Keep `PULSE_PS` below half the shortest DCO
period, and `PULSE_PS + DCO_START_PS` below half a reference period.
