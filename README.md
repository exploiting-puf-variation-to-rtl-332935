# Ring-oscillator PUF as a fault-injection detector

Clock glitching and supply manipulation are cheap ways to make a chip compute a
wrong result, for example a faulty AES ciphertext that leaks key bits. This
design senses such attacks with hardware the device often already has: the
ring-oscillator physically unclonable function (RO PUF) it uses for key
generation.

An RO PUF compares the frequencies of pairs of nominally identical ring
oscillators. When it is used for keys, it counts over a long window so that the
answer is stable. The detector switches it to an *unreliable* mode instead: a
one-clock window and a fresh response every clock. A response taken over one
clock is sensitive to anything that changes the clock period or the oscillator
speed. While a security-sensitive operation runs, the detector saves responses.
When the operation ends, it reduces them to one by a bitwise majority vote and
compares the result with a reference response taken when there was no attack.
Any differing bit (Hamming distance > 0) raises `attack_det`. The system can then
drop, redo or randomise the result.

The default sizes are those of the evaluated system:

* 8 oscillators of 3 inverting stages;
* an 8-bit response from 8 oscillator pairs, with oscillators shared between pairs;
* 4 saved responses per operation;
* a 100-clock window in reliable mode and a 1-clock window in unreliable mode;
* a 32 MHz system clock.

## A detection run

```
processor     start ─┐                                     ┌─ read verdict, release or drop
detector        UNRELIABLE_MODE ─ WAIT_TASK ─ ASK/SAVE ... ─ PERFORM_XOR ─ ALARM_PROTECT | NO_ATTACK
operation                      task_start ───── running ───── task_end
PUF (1-clk windows)               r  r  r  r  r  r  r  r  r  r
```

1. Software writes CTRL bit 0 (`start_FI_detect`). The FSM leaves `IDLE` and
   passes through `UNRELIABLE_MODE`. There it enables the PUF in unreliable mode
   with the reference challenge. It then waits in `WAIT_TASK`.
2. `task_start` comes from the protected block (a top-level port) or from
   software (CTRL bit 2). The FSM now alternates between `ASK_RESPONSE`, which
   waits for a PUF response, and `SAVE_RESPONSE`, which stores it.
   * One round of this pair takes two clocks, so the detector stores every
     second response.
   * The store is a ring of M = 4 entries. A long operation therefore leaves
     its four most recent saved responses.
3. `task_end` (port or CTRL bit 3) leads to `PERFORM_XOR`. This state:
   * votes each bit over the saved responses (strictly more than half must be 1);
   * XORs the result with `r_ref`;
   * counts the ones.

   Zero ones means `NO_ATTACK` (`no_det`); anything else means `ALARM_PROTECT`
   (`attack_det`). Both verdicts hold until the next start. The PUF is switched
   off and back to reliable mode. The verdict appears at most three clocks after
   `task_end`.
4. A run in which not a single response was saved ends in the alarm. Two things
   cause this: an operation too short to be observed, or oscillators stopped by
   the supply.

Timing budget: after the detector enables the PUF, the first unreliable response
appears six clocks later. The PUF waits 3 clocks to settle, takes one priming
sample, and then there are the counter latency and the output register. After
that a response is produced every clock. Start the detector at least about six
clocks before `task_start`, or the first responses of the operation are lost.

## How the PUF measures (`ro_puf`, `puf_bit`, `ro_counter`)

Each response bit (`puf_bit`) has two multiplexers. Each picks one oscillator
according to the bit's challenge field:

```
challenge[i*2*SELW        +: SELW]  -> oscillator for the upper counter
challenge[i*2*SELW + SELW +: SELW]  -> oscillator for the lower counter
```

With four oscillators and one bit, `4'b0100` compares RO 0 (upper) with RO 1
(lower), and `4'b1000` compares RO 0 with RO 2. The bit is 1 when the upper
count is strictly greater, so a tie gives 0. The default configuration gives
each of the 8 bits its own pair, 48 challenge bits in all.

The counters are clocked by the oscillators. The awkward part is bringing their
values into the system clock domain every clock without stopping or clearing
them. `ro_counter` solves this as follows:

* the counter runs freely and is published as a Gray code;
* a two-flop synchronizer samples it in the system clock domain;
* the value is converted back to binary;
* at each window end the previous sample is subtracted from it.

The difference is the number of periods in the window. No oscillator period is
lost between windows, and the difference stays correct across counter wrap-around
(16-bit counters). Both counters of a pair pass through identical synchronizers,
so they compare the same interval, delayed by two clocks.

`ro_puf` owns the window timer. Its window is `RELIABLE_WINDOW` clocks (100) in
reliable mode and `UNRELIABLE_WINDOW` (1) in unreliable mode. After `en` rises or
the mode changes, it waits `WARMUP` (3) clocks and takes one priming sample that
is not reported. After that it reports one response per window, with a one-clock
`resp_valid`. Right after a mode change, the last response of the old mode may
still be reported.

Why unreliable mode detects attacks: at 32 MHz a 3-stage oscillator of the model
completes about 13 periods per clock. A clock glitch shortens some cycles to a few
nanoseconds. A supply drop slows or stops the oscillators. In either case the two
counts of a pair fall to one or two, and they tie or swap. A bit whose reference
is 1 then reads 0. A bit whose reference is 0 flips only if the pair actually
swaps order. So the detector sees an attack on bits that are 1 far more easily.
The voting rule makes this stronger: 2 disturbed responses out of 4 flip a bit
that is 1, but 3 out of 4 are needed for a bit that is 0.

## Reference calibration (`ref_calibrator`)

Ageing and temperature change the oscillators, and with them the fault-free
response. Software can re-take the reference whenever it knows no attack is
under way:

1. Software writes CTRL bit 1.
2. The calibrator takes the PUF and collects K = 8 responses to the reference
   challenge.
3. It picks the most frequent of them, comparing all pairs; on equal counts the
   earliest wins.
4. It writes the result into `R_REF`, unless CONFIG bit 1 (autoload) is cleared.

CONFIG bit 0 chooses the mode used for calibration. The default is reliable. The
unreliable mode is there because the detector compares unreliable-mode
responses: for pairs whose frequencies are close, the two modes can disagree.
Choose a challenge whose pairs differ clearly in frequency, or calibrate in
unreliable mode. Otherwise attack-free runs may raise false alarms.

## Register map (`fia_csr`)

The bus is minimal: a one-clock request (`req`, `we`, word address, `wdata`),
answered one clock later by `ack` and `rdata`. Wrap it in the SoC's bus protocol.

| addr | name     | access | contents |
|------|----------|--------|----------|
| 0    | CTRL     | W      | bit 0 start detection, bit 1 start calibration, bit 2 task_start, bit 3 task_end (one-clock pulses) |
| 1    | CONFIG   | RW     | bit 0 calibration mode (0 reliable, 1 unreliable), bit 1 autoload of the calibrated reference (reset 1) |
| 2    | STATUS   | R      | bit 0 attack_det, 1 no_det, 2 detector busy, 3 calibrating, 4 calibration done, 10:8 FSM state, 19:12 Hamming distance, 27:24 responses saved |
| 3    | R_REF    | RW     | reference response |
| 4, 5 | C_REF    | RW     | reference challenge, bits 31:0 and 63:32 |
| 6, 7 | SAVED    | R      | saved responses, entry j at bits j*N +: N |
| 8    | VOTED    | R      | result of the majority vote |

The register map holds N ≤ 32, CHW ≤ 64, M·N ≤ 64 and M ≤ 15.

## Top level (`fia_puf_top`)

The top contains the 8 oscillator instances, the PUF, the detector, the
calibrator and the register block. The PUF goes to one user at a time, in this
order of priority:

1. the detector, during a run;
2. the calibrator, while it calibrates;
3. the key-generation port `kg_*`, which always runs in reliable mode.

The key-generation port is meant for the error-correcting key generator, which
is not part of this RTL. `attack_det`/`no_det` are top-level outputs so they can
gate the protected block's output directly.

The surrounding system is not included:

* processor and caches;
* DMA and external memory controller;
* interconnect;
* the AES accelerator and the communication interfaces.

Their connections are ports: the register slave, `task_start`/`task_end` and the
verdict.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | system clock (32 MHz in the evaluated system), asynchronous active-low reset |
| `vdd_mv` | in | 12 | supply seen by the oscillator model, in mV (simulation only) |
| `bus_req`, `bus_we`, `bus_addr`, `bus_wdata` | in | 1, 1, 4, 32 | register request |
| `bus_rdata`, `bus_ack` | out | 32, 1 | register response, one clock after the request |
| `task_start`, `task_end` | in | 1 | one-clock pulses from the protected operation |
| `attack_det`, `no_det` | out | 1 | verdict, held until the next start |
| `kg_en` | in | 1 | request reliable-mode responses for key generation |
| `kg_response`, `kg_valid` | out | 8, 1 | reliable-mode response and its strobe |

## The oscillator model (`ring_osc`) — not synthesizable

A ring oscillator is a combinational loop, which a logic simulator cannot
evaluate. `ring_osc` is therefore a behavioural model. It toggles after a
computed half period:

```
t_gate = STAGE_DELAY_PS * (1 + d_i) * (VNOM_MV - vth_i) / (vdd_mv - vth_i)
half period = STAGES * t_gate
```

* `d_i` (±8 %) and `vth_i` (400 mV ± 30 mV) are fixed per instance by a hash of
  `(SEED, INDEX)`; this stands in for process variation;
* at or below `vth_i` the oscillator stops;
* `vdd_mv` is a model input, and the top brings it out so testbenches can apply
  underfeeding and supply glitches;
* a change of `vdd_mv` takes effect at the next toggle.

`RO_STAGES` on the top sets the stage count: 3 in the evaluated system, 5 in a
variant whose responses react differently to attacks. Longer rings run slower, so
they give fewer counts per clock. With 5 stages the model completes about 8
periods per 32 MHz clock. Oscillator pairs 10 % apart then differ by less than
one count, and unreliable-mode responses jitter. In the model this makes
attack-free runs raise false alarms, so the end-to-end test is valid for 3
stages only.

To build real hardware, replace `ring_osc` with a placed, hand-instantiated
loop of the same ports: `en`, `osc`, and no supply pin. Keep identical placement
for all oscillators. The rest of the design is synthesizable.

Treat the model's numbers as illustrative only. Its delay law, its variation and
its threshold are not measurements. What detection rate a given glitch reaches
depends on the silicon, and the model makes no prediction of that.

## What follows the source design and what is this design's own

Taken from the source design:

* the PUF structure (challenge-driven multiplexers, counters, comparator);
* reliable and unreliable mode as different window lengths (100 and 1 clocks);
* the detector's states and the signals `start_FI_detect`, `task_start`,
  `task_end`, `attack_det` and `no_det`;
* the bitwise majority over M = 4 responses, the XOR with `r_ref` and the HD test;
* recalibration by repeated challenges and the most frequent response;
* the default sizes listed at the top.

This design's own choices:

* counting (Gray code, synchronizer, difference of samples), the 16-bit counters,
  warm-up and priming;
* the `IDLE` state, the ring buffer, the alarm on zero saved responses, and
  holding the verdict until the next start;
* enabling the PUF when the detector is started rather than at `task_start`, so
  that it is warm when the operation begins;
* the tie rules: a tie in the comparator gives 0, an even split in the vote gives
  0, and the earliest value wins an even split in calibration;
* K = 8 calibration responses and the calibration-mode choice;
* the bus, the register map and the PUF sharing;
* the default challenge (bit i compares RO i with RO i+1) and all of the
  oscillator model.

In the evaluated system the final comparison was left to software, with the
saved responses in two 8-bit registers. Here the
comparison is in hardware, as in the detector's state machine. The saved
responses stay readable, so software can still make its own decision.

Size is the largest departure. The evaluated PUF and detector fit in 53 LUTs and
16 registers. This RTL spends about 1,550 flip-flop bits on the PUF alone, for two
reasons: 16-bit counters, and a clock-domain-safe crossing for each of the 16
counters (Gray copy, two synchronizer stages, previous sample). Most of that can
be cut if a smaller design is needed:

* narrower counters (`CW`): about 6 bits suffice in unreliable mode, 12 with
  100-clock windows;
* counters shared among pairs;
* the simpler but less robust scheme of clearing the counters at each window
  start.

Three refinements are only suggested as future work, and none is built here:

* comparing each individual response with the reference instead of voting;
* changing the inverter-chain length at run time;
* hardening the stored reference. If an attacker corrupts `R_REF`, the detector
  raises constant false alarms, which denies service.

## Simulating

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl \
          rtl/fia_pkg.sv tb/tb_fia_puf_top.sv --top tb_fia_puf_top -o sim
./obj_dir/sim
```

Replace `tb_fia_puf_top` with any other testbench. The testbenches are:

* `tb_ring_osc`: oscillator frequency against supply; stop below threshold.
* `tb_ro_counter`: counts per window; no lost periods across windows.
* `tb_puf_bit`: all 16 oscillator pairings of four test oscillators.
* `tb_ro_puf`: both modes; response rate (every clock, or every window); challenge decoding.
* `tb_maj_vote`: random and hand-picked votes.
* `tb_fia_detector`: every state; clean, corrupted, outvoted, empty and overwritten runs; verdict latency.
* `tb_ref_calibrator`: most-frequent selection, tie rule, response count.
* `tb_fia_csr`: every register and pulse.
* `tb_fia_puf_top`: the whole subsystem at default sizes and 32 MHz, described below.

`tb_fia_puf_top` does the following:

* chooses a challenge of well-separated oscillator pairs;
* calibrates in reliable mode and checks the reference against the frequency order;
* reads the key-generation port;
* runs three attack-free detections, one of them timed by software, and checks
  that none raises an alarm;
* applies a burst of 4 ns clock cycles, underfeeding below threshold, and ten
  consecutive 28 ns supply dropouts, and expects an alarm for each;
* reports the outcome of 650 mV underfeeding without judging it;
* recalibrates in unreliable mode.

It counts each of these mechanisms and fails if one never happened. It runs in
under a second.

`tb_fia_attack_sweep` applies every attack setting of the three evaluation tables
to five protected operations each, and prints how many raised the alarm:

* clock glitching: glitch width 1.95–4.5 % and offset −5 to +5 % of the period,
  XOR-ed into the clock, once in the middle of the operation and, separately, in
  every clock of it;
* underfeeding: 1.1 V down to 0.65 V;
* supply glitches: to 0 V, width 3.5 % or 45 % of a clock, repeated 1, 4 or 10
  times, at 1.0, 0.85 and 0.75 V.

It judges only what the model determines:

* one verdict per run;
* no alarm in attack-free runs at 1.0 V;
* an alarm when the supply is below every oscillator's threshold;
* at least one detected setting per sweep.

The printed rates show how the mechanism reacts in an ideal simulation. With no
randomness in the model, every setting gives 0 or 5 of 5. Clock glitches just
after the rising edge were caught; glitches before it at small widths were not.
Short supply dropouts that stop only the oscillators that happen to switch
during them were caught more often than long ones that stop every oscillator
alike. These are consequences of the model and of which responses are saved.
They are no forecast of silicon.

Three properties of the detector show up in these runs and matter when using it:

* **A single disturbed clock is never detected.** It changes at most one of the
  four saved responses, and the majority vote outvotes it. Only disturbances
  that last several clocks raise the alarm. The sweep shows this in its
  "single" column: 0 of 5 for every clock-glitch setting. Comparing each saved
  response with the reference, instead of voting first, would remove this
  blind spot, at the price of alarms on every noisy response.
* **Every second response is saved.** A disturbance that repeats every second
  clock can fall entirely on responses that are never stored.
* **Symmetric disturbances hide.** Short, single supply dropouts that stop both
  oscillators of a pair for the same time leave their order, and so the
  response, unchanged.

## Files

`rtl/fia_pkg.sv` (mode and state types, oscillator variation hash),
`ring_osc.sv`, `ro_counter.sv`, `puf_bit.sv`, `ro_puf.sv`, `maj_vote.sv`,
`fia_detector.sv`, `ref_calibrator.sv`, `fia_csr.sv`, `fia_puf_top.sv`. Each
file opens with a description of its interface and timing.
