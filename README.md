# Matched delay pattern generator

This generator turns parallel data into a serial bit stream. Edges are placed on a 100 ps grid, but
no clock in the chip runs faster than 156.25 MHz. The trick is the *matched delay* technique. A clock
pulse runs down one delay chain (delay Δ_C per stage) and the serial data runs down a second chain
(delay Δ_X per stage) next to it. Each stage can insert an edge into the data chain when the clock
pulse passes. Because Δ_X is a little longer than Δ_C, edges inserted at successive stages reach the
output Δ_X − Δ_C apart. That spacing is the *difference* of two matched delays, here 500 ps − 400 ps
= 100 ps, so it can be much finer than any single gate delay.

The RTL models the published 64-stage CMOS design, a 1.2 µm generator aimed at an 833 Mb/s on-chip
rate at 100 ps resolution. It has two parts:

* **Synthesizable logic**: the digital part of the chip, meaning the pattern memory, the skew
  flip-flops and the stage toggle flip-flops. The DLL control logic is here too.
* **Behavioural timing models**: the analog part, meaning the delay elements, the XOR, the phase
  detector's aperture, the charge pump, the loop filter, the bias controllers and the output
  drivers. They use real
  picosecond delays, so the whole chip can be simulated at the event level and its output edges
  measured.

## One clock pulse, 64 edges

Stage *j* (1..64) holds a rising-edge T flip-flop, a clock delay of Δ_C and a data delay of Δ_X,
which is an XOR followed by two delay elements. The data chain starts at a constant 0. When the clock
pulse reaches stage *j*, at time (j−1)·Δ_C, the flip-flop toggles if its T input is 1. That flips the
stage's XOR, and the new edge then travels the remaining data stages. It leaves the generator at

    t_out(j) = (j−1)·Δ_C + (65−j)·Δ_X = 64·Δ_X − (j−1)·(Δ_X − Δ_C)

So stage 64's edge comes out first, 25.7 ns after the pulse enters, and stage 1's edge comes out
last, after 32 ns. Stages 1..64 are clocked through 63 clock delays. The chain has one more delay
after stage 64, whose output (tap 64) feeds only the fine DLL. Neighbouring stages are exactly Δ_X − Δ_C = 100 ps apart. A T bit of 1 means
"put a transition in this slot". The data to send must therefore be transition-encoded before it is
loaded. A 1 is a level change, not a high level.

## Continuous output: four pulses in flight

One pulse fills 64 × 100 ps = 6.4 ns of output. The generator is clocked every T = 64·(Δ_X − Δ_C)
= 6.4 ns, so the first edge of one pulse falls exactly one slot after the last edge of the pulse
before it. Across the seam, stage 1 of pulse *p* and stage 64 of pulse *p*+1 are 100 ps apart.

The clock chain is 64 × 400 ps = 25.6 ns long, which is four periods. So four pulses are in the chain
at once, one in each 16-stage *section*. The pulse in section *k* (k = 0..3) was launched *k*
periods ago. All 64 bits of one memory word must be played by the *same* pulse, so section *k* must
receive the word *k* periods late. This is the job of `skew_aligner`, and it is the part of the
design that most needs care:

| section | stages | falling-edge flip-flop layers | extra rising-edge layer |
|---------|--------|-------------------------------|-------------------------|
| 0 | 1–16  | 0 | stages 9–16 |
| 1 | 17–32 | 1 | stages 25–32 |
| 2 | 33–48 | 2 | stages 41–48 |
| 3 | 49–64 | 3 | stages 57–64 |

The skew layers are clocked on the *falling* edge. A pulse reaches the first half of section *k* in
the first half-period after a rising edge, so bits that change on the falling edge are stable there.
By the falling edge the pulse is only halfway through the section, so the second half would lose its
bits when the skew layer updates. One more flip-flop on the rising edge holds the second half for the
rest of the period. The pattern memory itself also updates on the falling edge, as in the published
scheme, because section 0's first half takes memory bits directly.

Walking one word through, with memory update on falling edge *f₀*:

* The pulse launched on the next rising edge *r₁* = *f₀* + T/2 reads section 0, first half, during
  [*r₁*, *r₁* + 2.8 ns].
* It reads section 0's second half during [*r₁* + 3.2 ns, *r₁* + 6 ns], from the rising-edge layer
  loaded at *r₁*.
* It reaches section *k* at *r₁* + *k*·T, where the bits have arrived after *k* falling-edge
  layers.
* Its edges leave the generator between *r₁* + 25.7 ns and *r₁* + 32 ns.

## Pattern memory

`pattern_memory` is one 8-bit circular FIFO per stage, 64 × 8 bits. While `run` = 0 it presents
zeros, so no edges are made, and each `load_en` shifts one 64-bit row into all the FIFOs at once,
with bit *j*−1 going to stage *j*. The first of 8 rows loaded is played first. While `run` = 1 every
FIFO presents its head bit and rotates on each falling edge, so the 8 words repeat every 51.2 ns
(512 slots). Loads are ignored while running. After a stop the memory resumes from where it was.

Slot *s* (0..511) of a memory turn is therefore word ⌊s/64⌋, stage 64 − (s mod 64). Within one
word, time runs from stage 64 down to stage 1.

## Keeping the delays matched: three DLLs

Process, supply and temperature change the delays, and a 1 ps error per stage builds up to 64 ps
across a period. The bias voltage V_DP of the delay elements sets both delays: a higher V_DP gives a
longer delay. Three delay-locked loops adjust it. Each loop has the same parts:

* A phase detector: two cross-clocked flip-flops that report which tap rose first. Edges 100 ps
  apart or less read as "in phase".
* Control logic that discards the invalid "both first" state and issues *add* (the delay is too
  short) or *rmv* (too long).
* A charge pump whose rate is set by two off-chip bias voltages.
* An off-chip loop filter. Here it is modelled as an integrating capacitor.

The three loops:

* **Coarse clock DLL**: compares clock taps 0 and 16. It locks when 16·Δ_C = T, i.e.
  Δ_C = 400 ps.
* **Fine clock DLL**: compares taps 0 and 64, which should be 4 periods apart. Its error is spread
  over 64 stages, so Δ_C settles to within about ±1.6 ps. Tap 64 could also lock 3 or 5 periods
  away, so the coarse loop runs first. `dll_fine_sel` then switches the coarse loop off and the
  fine loop on. Both pump into one shared filter.
* **Data DLL**: the data chain carries unknown data, so it cannot be locked directly. Instead, the
  clock drives a dummy chain of 12 data delays, followed by a compensation delay set from off-chip
  (nominally four data delays, 2 ns, set by `comp_delay_ps`). That output is compared with clock
  tap 20, because 16·Δ_X = 20·Δ_C = 8 ns. This loop always runs.

Each delay element actually has two biases, V_DP on its PMOS load and V_DN on its NMOS side. The
delay shortens as V_DP falls and V_DN rises. An automatic bias controller per chain keeps V_DN in
step, so the loops need to drive only V_DP. It has a replica stack, a PMOS on V_DP over an NMOS on
V_DN, whose midpoint a comparator holds at V_DD/2 by moving V_DN. In `bias_controller` each device
is a conductance proportional to its gate overdrive, so the balance point is V_DN = V_DD − V_DP.
The delay model is written in V_DP alone, which this tracking justifies. V_DN is brought out as
`v_dn_clk` / `v_dn_data`, and the full-chip testbench checks V_DN + V_DP = 5 V after lock.

**Limit worth knowing:** the detector calls edges up to 100 ps apart "in phase". The data loop
divides that window by the 12 real delays of its dummy chain, since the compensation delay is
fixed. So Δ_X can settle anywhere within about ±8 ps of 500 ps. A bang-bang loop stops at the edge
of its window, and this one does. In the full-chip simulation the loops start from 1.5 V and settle
at Δ_C = 399.6 ps and Δ_X = 491.7 ps, giving 92 ps slots.

The slot error adds up within a period. 64 slots of 92.4 ps fill 5.91 ns of the 6.4 ns period, so
every word boundary in the output carries about 0.49 ns of extra gap. Edges stay exactly where the
stage timing formula puts them for the locked delays, and the testbenches check that. But a stream
of equal pulses is only continuous across word boundaries if the data loop locks more tightly than
the 100 ps window allows. `tb_workload_patterns` runs a second copy of the chip with
`PD_DEAD_ZONE_PS = 5`, with the pump biases moved towards their off levels (add 3.8 V, remove 1.2 V) after lock, so that one
correction is smaller than the window. That copy holds 99.8 ps slots and a 15 ps boundary error, and
its 833 Mb/s pattern is continuous to within 12 ps. Trimming `comp_delay_ps` moves the lock point
too. The fine clock loop does not have this problem, because its window is spread over 64 stages.

## Output drivers

The generator output goes to two driver sets, each with its own enable:

* **Package pins**: about 80 Mb/s into 200 pF.
* **Probe pads**: 833 Mb/s into about 10 pF. This matches the generator's fastest pattern, a
  transition every 12 slots (1.2 ns pulses).

Each model is an inertial filter. A pulse shorter than ¾ of the driver's minimum pulse width
(12.5 ns for the pin driver, 1.2 ns for the probe driver) is dropped. The output follows the input
after that same ¾ delay: 0.9 ns for the probe driver. A disabled driver holds its output at 0.

## Files

| file | kind | what |
|------|------|------|
| `rtl/pg_pkg.sv` | package | sizes (64 stages, 4 sections, 8-deep FIFOs), nominal timing, delay law |
| `rtl/pg_delay_pkg.sv` | package | transport-delay helper for the timing models |
| `rtl/pattern_memory.sv` | synthesizable | 64 × 8 circular FIFOs |
| `rtl/skew_aligner.sv` | synthesizable | per-section skew flip-flops |
| `rtl/t_flip_flop.sv` | synthesizable | stage toggle flip-flop |
| `rtl/dll_control_logic.sv` | synthesizable | add/rmv generation, 1-1 filtering, enable |
| `rtl/delay_element.sv` | timing model | bias-controlled delay element |
| `rtl/diff_xor.sv` | timing model | data chain XOR |
| `rtl/generator_stage.sv` | timing model | one stage (uses `t_flip_flop`) |
| `rtl/generator_core.sv` | timing model | 64 stages, clock and data taps |
| `rtl/dummy_delay_chain.sv` | timing model | 12 data delays for the data DLL |
| `rtl/compensation_delay.sv` | timing model | off-chip-set delay |
| `rtl/phase_detector.sv` | timing model | cross-clocked flip-flops with 100 ps aperture |
| `rtl/charge_pump.sv` | timing model | bias-controlled charge/discharge rate |
| `rtl/loop_filter.sv` | timing model | integrating capacitor |
| `rtl/dll.sv` | timing model | detector + control logic + pump |
| `rtl/output_driver.sv` | timing model | bandwidth-limited, disable-able driver |
| `rtl/bias_controller.sv` | timing model | derives a chain's NMOS bias V_DN from V_DP |
| `rtl/matched_delay_pattern_generator.sv` | top | the whole chip |

Pads and package are not modelled.
The transistor-level behaviour of the XOR and delay element (swing, bandwidth, data-dependent delay)
is not represented. Nor is flip-flop metastability. The XOR chain passes pulses of any width, so
the low-pass loss of very narrow pulses along the data chain is not reproduced; only the output
drivers reject narrow pulses.

## Choices this model makes

The published design does not fix these points; this model chooses them:

* The delay law. Each delay element gives 150 ps + 20 ps/V · V_DP over 0..5 V, and the XOR a fixed
  100 ps. Two elements then span 300–500 ps and XOR + two elements span 400–600 ps, centred on
  400/500 ps at 2.5 V, which matches the published adjustment ranges. The shape is linear.
* The charge pump. Its rate is linear in its bias: at most 5 V/µs, cut off at V_DD − V_th with
  V_th = 1 V. At 2.5 V biases it is 1.875 V/µs.
* Reset. The flip-flops have an asynchronous active-low reset.
* The load port. The memory loads one row per falling edge while idle.
* The coarse/fine select. It is a chip input.
* Shared filter. The two clock DLLs share one loop filter, whose initial voltage is a parameter
  (1.5 V).
* The clock has a 50 % duty cycle.
* The driver rejection threshold is ¾ of the minimum pulse width.
* The bias controller's device law (conductance linear in overdrive, V_th = 1 V) and its comparator
  slew (20 V/µs).
* The detector window is a top-level parameter, `PD_DEAD_ZONE_PS`. Its default is the published
  100 ps.

## Simulating

Every testbench in `tb/` checks itself and prints `TB_RESULT checks=N failures=M`. The timing models
need `--timing`, and the packages must be read first:

    verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl +libext+.sv \
        rtl/pg_pkg.sv rtl/pg_delay_pkg.sv tb/tb_matched_delay_pattern_generator.sv \
        --top-module tb_matched_delay_pattern_generator -o sim
    ./obj_dir/sim

The full-chip testbench runs at the default size in a few seconds. It:

* resets the chip and loads 8 rows;
* locks the coarse loop, switches to the fine loop, and checks each lock from the tap timing;
* plays 26 words, which is three memory turns plus two words;
* checks every on-chip output edge against t_out(j) + w·T, within 2 ps, using Δ_C and Δ_X measured
  from the taps;
* checks the probe output copy and the pin driver's rejection of narrow pulses;
* stops the generator, then plays again with the probe driver disabled.

The pattern begins with two 1.2 ns pulses and two 1.3 ns pulses, followed by random 12–40 slot
gaps. The testbench counts how often each of these mechanisms happens: lock acquisition, the mode
switch, FIFO wrap, stop, driver disable, pulse rejection and bias tracking. It fails if any count
is zero.

The unit testbenches cover each block on its own:

* `tb_generator_core`: single pulses with random T bits at two clock biases. At the lower bias the
  edge spacing changes from 100 ps to 120 ps, which confirms that the spacing is the difference of
  the two delays.
* `tb_dll`: a closed loop locking from both sides.
* `tb_phase_detector`: every row of the detector's truth table and its 100 ps window.

`tb_workload_patterns` runs the characterisation patterns on the full-size chip:

* The maximum-rate pattern: a transition every 12 slots, 1.2 ns pulses, 833 Mb/s. The memory turn is
  512 slots, not a multiple of 12, so each turn holds 42 edges and a 20-slot gap at the seam. The
  testbench checks that edges accumulate along the data chain: 0, 20, 42 and 84 at the taps after
  stages 1, 16, 32 and 64. It also checks that the probe pads pass every pulse and the pins none.
* An 80 Mb/s pattern, a transition every 125 slots. The pin drivers pass every edge of it.
* The sharp-detector copy described under the DLLs. It takes about 40 s.

## Changing sizes

`STAGES`, `DEPTH` and the section length (`SECTION_LEN` in `pg_pkg`) are parameters. For continuous
output the clock period must stay STAGES × (Δ_X − Δ_C). The DLL taps (16, 20 and STAGES) assume
Δ_X : Δ_C = 5 : 4, and `skew_aligner` assumes one pulse per section. So if Δ_C, Δ_X or T changes,
the section length and the tap choices must change with them.
