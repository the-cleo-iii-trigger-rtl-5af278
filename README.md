# CLEO-III Level 1 trigger decision and flow control/gating in SystemVerilog

Every 42 ns the CESR storage ring delivers a bunch crossing, and the CLEO-III detector must decide,
crossing by crossing, whether the event is worth reading out. The trigger primitives (track counts
and topology from the drift chamber, shower counts and topology from the crystal calorimeter) arrive
at different times, so the decision logic first lines them up. Then a set of identical,
user-programmed trigger boards look for any of many trigger conditions at once. The resulting
*L1Pass* is turned into an *L1Accept* only when the whole data acquisition system can take another
event. The accept then goes out to every readout crate with per-crate timing.

This RTL models that chain from the trigger primitives to the signals at each readout crate's
timing interface (TIM):

```
 AXPR ─► align_pipe ─┐
 TRCR ─► align_pipe ─┤                   ┌─► l1tr #0 ─┐ (L1Pass, wired OR)
 CCGL ───────────────┼─► 179-bit backplane ─┤   ...     ├─► lumi ─► dfc ─► gcal ×18 ─► 36 TIM ports
 external ─► lumi ───┘                   └─► l1tr #N ─┘          ▲       │   (L1Accept, Synch, CAL)
                                                                 └── Busy/Error (OR of all TIMs)
```

Everything is synchronous to one clock, `clk`, the 42 ns CESR tick. The whole design is
pipelined: a new crossing can enter every tick.

## The backplane and time alignment

The L1TR boards all see the same 179-bit backplane. This design assigns its bits as follows (the
split is a choice of this RTL, since only the total of 179 is fixed):

| bits      | source | width | contents |
|-----------|--------|------:|----------|
| 95:0      | CCGL   | 96 | calorimeter projections and tile counts |
| 111:96    | AXPR   | 16 | preliminary axial track count |
| 170:112   | TRCR   | 59 | refined low/high-momentum track counts and topology |
| 178:171   | LUMI   | 8  | external trigger/inhibit inputs |

Tracking information is ready about 2 µs after the crossing, calorimetry only after more than
2.5 µs. The AXPR and TRCR words therefore pass through `align_pipe`, a shift register with an output
multiplexer. Its delay (`axpr_depth`, `trcr_depth`) can be set from 0 to 32 ticks (1.34 µs). The
right setting is the calorimetry latency minus the tracking latency, in ticks. The calorimetry
word goes onto the backplane as it arrives.

## Programming an L1TR board

An L1TR board (`l1tr`) is the chain TLU → prescalers → scalers and OR/Bunch. It is the part of the
design with the most settings.

**Trigger Logic Unit (`tlu`).** It forms 48 trigger lines from the 179 bits in two layers of
programmable logic:

1. A pool of `N_TERMS` (default 48) product terms. Term *t* is the AND of the bits set in
   `term_mask[t]`. Each such bit is used complemented when the same bit of `term_pol[t]` is 1. A
   term with an empty mask is always true.
2. Line *l* is the OR of the terms selected by `line_terms[l]`. A line with no terms never fires.

Then any 24 of the 48 lines go on to the outputs. `route_sel[o]` holds the line number for output
*o*, and `route_en[o]` turns the output on. Changing the routing needs no change to the line logic.
The backplane is registered, and each line fires on the rising edge of its condition. As a
result, every output carries one-tick pulses. If one event satisfies several lines, their pulses
come out together.

Example: to trigger when calorimeter bit 3 and axial bit 0 are both set, set
`term_mask[0][3]` and `term_mask[0][96]`, set `line_terms[0] = 1`, then `route_sel[0] = 0` and
`route_en[0] = 1`.

**Prescalers (`prescaler`).** Each of the 24 lines passes every *N*th pulse, with *N* from 1 to 2²⁴.
The register `ps_nm1` holds *N*−1. After a reset or `clr`, the first pulse passed is the *N*th.
A prescaler adds no latency.

**Scalers (`trig_scalers`).** There are 24 counters of 40 bits, one per prescaled line. They wrap
at 2⁴⁰, which takes more than 12 hours even at one pulse per tick.

**OR/Bunch (`or_bunch`).** L1Pass is the registered OR of the 24 prescaled lines. The block also
keeps a map of trigger time against accelerator phase: one 16-bit saturating counter for each of
16 phases. With `veto_en` set, triggers in the phases marked in `phase_veto` are suppressed. This
removes triggers that are not tied to a beam crossing, such as cosmic rays. With `veto_en` clear,
the block is a plain OR, which is how the real boards were run.

## LUMI

`lumi` forms the wired OR of all boards' L1Pass and passes it to the DFC one tick later. It also
passes the accelerator phase to the boards. The phase comes from the CESR timing system by way of
the DFC, and the DFC and the LUMI each register it once. External trigger/inhibit inputs go through two
flip-flops and onto backplane bits 178:171.

It also measures luminosity from Bhabha scattering, which gives two back-to-back
high-energy clusters. Each endcap's cluster list arrives as a 16-sector bitmap with the strobe
`clus_valid`. On each strobe the block counts:

- an east single, if the east endcap has any cluster;
- a west single, likewise;
- a back-to-back event, if east sector *i* and west sector *i*+8 (mod 16) both have a cluster.

`snap` copies all three counts in the same tick, so they can be read while the counters keep
running.

## Data Flow Control (DFC)

`dfc` makes the global decision. An L1Pass in tick *k* becomes an L1Accept in tick *k*+1 only if
all of these hold in tick *k*:

- no TIM asserts Busy (the OR of all GCAL ports);
- no TIM asserts Error;
- the DFC's own **self-Busy** has run out. Self-Busy starts after each L1Accept and lasts
  `self_busy_len`+1 ticks; values 1 to 65535 give 84 ns to 2.75 ms. It caps the trigger rate, for
  example at 1 kHz with 23809.
- the **event-time buffer** has room.

The event-time buffer works as follows. On each L1Accept, CESR_TIME (ticks since `clr`) is stored
in register `evt_time[EVENT_NUM[2:0]]`, and EVENT_NUM then counts up. The control processor gets
`irq_accept`, reads the time and moves READ_PTR forward (`rp_we`, `rp_wdata`). When 7 entries are
unread, the buffer counts as a processor Busy. So a processor that falls behind stops the trigger
and no event time is lost.

**Synch** goes out with every 256th L1Accept: those whose event number, before counting, is a
multiple of 256. A readout crate that counts L1Accepts can check Synch against its own count.
Error sets `irq_error`, which stays set until `err_ack`.

Bookkeeping registers:

| register | width | counts |
|----------|-------|--------|
| CESR_TIME | 32 | ticks since `clr` |
| TOTAL_L1 | 32 | L1Pass |
| EVENT_NUM | 32 | L1Accept; TOTAL_L1 − EVENT_NUM = rejected passes |
| TOTAL_BUSY, TOTAL_ERROR | 31 + sticky overflow | ticks Busy / Error was high |
| CURRENT_BUSY, CURRENT_ERROR | 15 + sticky overflow | the same, since the last L1Accept |
| MAX_BUSY, MAX_ERROR | 15 | OR of every CURRENT value |

The MAX registers are a logarithmic bar graph. Bit *b* is set once CURRENT has reached 2^*b*, and
only `max_clr` clears it. The Busy counted is the combined Busy that blocks L1Accept. These three
kinds of counter come from `busy_monitor`, which the GCAL ports use as well.

## GCAL: per-crate timing

Each `gcal` board serves two TIM ports with identical `gcal_channel`s. In each channel:

- L1Accept and CAL are registered at the input.
- Each is delayed by `*_dly_m1`+1 ticks, from 1 to 32768 (42 ns to 1.376 ms). The delay line is a
  circular buffer. An age counter blanks the output until the buffer has filled, so it needs no
  reset.
- Each is stretched to `*_wid_m1`+1 ticks, from 1 to 256 (up to 10.75 µs), and resynchronised in
  the output flip-flop.

Synch has no settings of its own. It travels with the L1Accept delay and width, so it stays with
the L1Accept it belongs to.

**Latency:** a pulse at the channel input in tick *c* is high at the TIM in ticks *c*+D+2 to
*c*+D+1+W, where D and W are the programmed delay and width. The TIM's Busy and Error are
registered once, counted with `busy_monitor` for each port, and ORed back to the DFC.

`clk_select` is a behavioural model, not logic. It picks the clock sent to the TIMs: CESR clock,
crystal, backup TTL clock or another copy, true or complemented (a 21 ns shift).

## End-to-end timing (ticks of 42 ns)

| from | to | ticks |
|------|----|------:|
| AXPR/TRCR input | backplane | `*_depth` |
| backplane | TLU output pulse | 2 |
| TLU pulse | board L1Pass | 1 |
| board L1Pass | DFC input (LUMI) | 1 |
| DFC input L1Pass | L1Accept | 1 |
| L1Accept | TIM | D + 2 |
| external input | backplane | 2 |

## What is outside this RTL

The following are not modelled:

- the boards that produce the trigger primitives (CCGL, AXPR and TRCR processing, SURF and the
  rest of the calorimeter and tracking trigger);
- the TIMs;
- the crate processors;
- the VME protocol and register map of each board;
- the TTL/PECL/LVDS electrical signalling;
- the L1TR FPGA configuration PROMs;
- L2Data and L2Strobe, whose use is still undefined;
- the separate clock copies (TTL and two PECL copies with different delays) and each GCAL's own
  clock choice, which allows 21 ns steps between crates. One selector model stands in for all of
  them.

Every programming register and status register is a port of `cleo3_trigger_top`. A VME or other
bus interface would connect there.

## Own choices, and where to be careful

These parts of the design are choices of this RTL:

- the backplane bit split;
- the 32-tick alignment range;
- the sum-of-products TLU with 48 shared terms and rising-edge pulses;
- the OR/Bunch histogram and veto mask;
- the LUMI cluster format (16-sector maps) and the opposite-sector back-to-back rule;
- the encodings of self-Busy, delay and width as value−1;
- the 7-of-8 buffer-full rule;
- which L1Accept carries Synch;
- the Busy that the DFC counts;
- the interrupt handshake;
- Synch following the L1Accept delay in the GCAL;
- the one-tick register stages;
- asynchronous active-low reset everywhere.

All of these are stated in the header comment of the module concerned. The real TLU was two layers
of FPGAs reprogrammed for each trigger menu. The fixed product-term pool here may hold fewer or
more complex conditions than those FPGAs could.

## Files and simulation

`rtl/cleo3_pkg.sv` holds the shared widths and the `mon_t` bookkeeping struct. Every other file in
`rtl/` holds one module. `tick_delay` and `pulse_shaper` are helpers of `gcal_channel`.
`cleo3_trigger_top` is the top level, with defaults `N_L1TR = 2` and `N_GCAL = 18`.

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M`. To run one:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/cleo3_pkg.sv tb/tb_dfc.sv --top-module tb_dfc -o sim
./obj_dir/sim
```

`tb_cleo3_trigger_top` runs the whole design at its default sizes for about 42 000 ticks, and
every TIM output is checked on every tick. It drives these cases:

- aligned and misaligned coincidences;
- prescaler drops and phase vetoes;
- external triggers and luminosity events;
- Busy, Error, a stalled READ_PTR and self-Busy each blocking L1Passes;
- two Synch cycles;
- CAL pulses;
- a TIM port set to the maximum delay of 32768 ticks.

It takes about 15 s. Each case must occur at least once, or the test fails. A behavioural model of
the readout crate's Synch check (`tb/tim_model.sv`) sits on every TIM port. It counts L1Accepts and
flags a missing or extra Synch. None of these models may flag an error. One more model is fed a
stream with one L1Accept removed, and it must detect the loss.

`tb_top_eight_l1tr` fills the crate with eight L1TR boards, the most it holds. Each board gets its
own trigger, and the test follows every trigger to both TIM ports of one GCAL.

`tb_dfc_rate_limit` sets the self-Busy to 1 ms and offers an L1Pass on every tick. It checks that
accepts then come exactly 23 811 ticks apart, which caps the rate at 1 kHz.

What is not verified: counter overflow after 2³¹ or 2⁴⁰ ticks or pulses is beyond simulation reach.
Only the 15-bit CURRENT overflow and a narrow scaler's wrap are simulated.
