# TRLA: correcting single-event transients by recomputation in a latch design

A particle strike in a digital circuit can cause a short current pulse, a
*single-event transient* (SET). The latch that receives the pulse may store a
wrong value, or the strike may flip the latch itself (a *single-event upset*,
SEU). The usual protection is triple modular redundancy (TMR), which triplicates
the logic and votes, at roughly three times the area and power.

This design uses time instead of space. It is a **temporal redundancy
latch-based architecture (TRLA)** and works in three steps.

1. The flip-flops of a synchronous design are replaced by a dual-phase latch
   design.
2. Every latch watches its own output node. A change of that node after the
   new data has settled means something went wrong.
3. The architecture repairs the error by recomputing. The logic feeding the
   flagged latches still has its inputs, so the flagged latches take the value
   again one cycle later. The neighbouring latches wait until it is there.

The logic itself stays single. Only the few bits of error and controller
state are triplicated.

Some errors cannot be repaired locally: an error at the very edge where a latch
closes, or two errors that conflict. These raise a *critical* flag for
system-level recovery.

The RTL is SystemVerilog. There are two kinds of code:

- a synthesizable control path;
- two small delay-based behavioural models: the transition detector and the
  pulse generator. Their function rests on gate delays.

The top module (`trla_top`) is a complete two-cluster ring. The combinational
logic of the design being protected stays outside it, connected through ports.

## Clocking and clusters

The protected design runs on two non-overlapping clock phases, `phi_n` and
`phi_p`:

- Latches of *negative polarity* are transparent while `phi_n` is high.
- Latches of *positive polarity* are transparent while `phi_p` is high.
- Logic from the positive latches feeds the negative ones, and the other way
  round.

The latches are grouped into **clusters**. A cluster is a set of latches of one
polarity that share error storage and a controller. Two clusters is the
minimum, and it is what `trla_top` builds: one negative cluster and one positive
cluster. Each is the other's only neighbour, both upstream and downstream.

Every cluster has two phases:

- Its **data phase** (`clk_b`) is the phase its latches are transparent in.
- Its **control phase** (`clk_a`) is the other phase. Its controller works
  during this phase.

A cluster's control phase is therefore its neighbour's data phase.

Default timing used throughout the testbenches:

| | |
|---|---|
| Clock period | 10 ns |
| `phi_n` | high from 0.5 ns to 4.5 ns |
| `phi_p` | high from 5.5 ns to 9.5 ns |
| Gap between the phases | 1 ns |

The gap between the phases has to hold the clear pulse of the error storage. It
starts `CLR_DELAY_PS` after the control phase ends and lasts `CLR_WIDTH_PS`.

## The error detection sequential (EDS)

Each protected latch is an EDS (`eds.sv`), made of these parts:

- **Input multiplexer.** It chooses between new data `d` and the latch's own
  output. `hold=1` keeps the value even while the clock is high. The controller
  uses this to stop a latch from taking a wrong or early value. In the RTL the
  feedback is written as a load condition of the latch, which is equivalent.
- **Reset gating.** `rn=0` forces 0 into the transparent latch.
- **Latch.** An ordinary level-sensitive latch, transparent while its data
  clock is high.
- **Transition detector** (`transition_detector.sv`). It gives a short pulse,
  `TD_WIDTH_PS` long and `TD_DELAY_PS` after the event, for every rising or
  falling edge of the latch output.
- **Detection gate.** It passes the pulse as `err` only inside the detection
  window `det_en`.

The window is shared by the whole group (`eds_group.sv`). One pulse generator
blanks detection for `BLANK_PS` after the data clock rises. During that time
the latch output changes legitimately to the new value. The window is open for
the rest of the cycle:

- A change of the output later in the transparent phase is a transient on the
  latch input.
- A change while the latch is closed is an upset of the latch itself.

The logic must settle within the phase (`t_pd <= T - t_cq`). Without errors,
therefore, the output never moves outside the blanking interval, and the
latch's closing edge never sees changing data. So this scheme adds no
metastability risk.

## Error storage and late errors

The `err` pulses of all EDSs of a cluster are merged by an OR tree
(`or_tree.sv`). They set one shared SR latch (`error_storage.sv`):

- The SR latch is triplicated and voted, and reset wins over set
  (`tmr_sr_latch.sv`, `tmr_vote.sv`).
- A second pulse generator clears it at the **falling edge of the control
  phase**. That is the last moment before the next data phase opens, so each
  data phase starts with clean error information.

A level-sensitive **error latch**, also triplicated, copies the SR latch:

- It is transparent on the data phase, like the data latches.
- Its output `err_out` is "an error happened in this cluster's last data
  phase". It is held through the control phase.
- It goes to the cluster's own controller and to every downstream cluster,
  whatever the controller is doing.

`late = SR latch XOR error latch`. It is high when an error pulse arrived after
the error latch had closed. That happens in two cases:

- a transient reached the latch so close to its closing edge that the detector
  pulse came after the edge;
- an upset flipped a closed latch.

In both cases the wrong value may already have been stored and passed
downstream unflagged, so the error cannot be corrected locally.

## The controller automaton

Each cluster has one Mealy automaton (`trla_fsm.sv`), clocked on its control
phase.

Inputs:

| Input | Meaning |
|---|---|
| i1 = `stall` | any neighbour asks for a stall |
| i2 = `upstream_err` | any upstream cluster flags an error |
| i3 = `local_err` | this cluster flags an error (`err_out`) |

`late` is a fourth input.

Outputs:

| Output | Meaning |
|---|---|
| o1 = `stall` | sent to all neighbours |
| o2 = `hold` | 1 keeps this cluster's latches |
| o3 = `crit` | critical |

Transitions, written as `i1 i2 i3 / o1 o2 o3`:

| State | Input / output | Next |
|---|---|---|
| S_i (idle) | 000 / 000 | S_i |
| | 001 / 000 | S_l |
| | 010, 100, 110 / 010 | S_s |
| | 011, 101, 111 / 000 | S_c |
| S_l (long suppress) | any / 100 | S_r |
| S_r (resume) | 000 / 010 | S_i |
| | 100 / 010 | S_s |
| | anything else / 010 | S_c |
| S_s (short suppress) | any / 110 | S_i |
| S_c (critical) | any / 011 | S_c (until reset) |

A late error sends every state to S_c.

How the states map to situations:

- **S_i, local error alone → S_l.** The cluster recomputes.
- **Upstream error or neighbour stall alone → S_s.** The cluster holds its
  latches.
- **A local error together with a neighbour stall or an upstream error →
  S_c.** This is a conflict. The upstream value the recomputation would need
  may itself be wrong, or the neighbour is not waiting.

Implementation choices in the automaton:

- The state register updates on the rising edge of the control phase, the
  moment the cluster's own latches have just closed and `err_out` is final.
- `late` is captured a second time at the falling edge of the control phase,
  just before the clear pulse. From then on the outputs show 011. The outputs
  never use the `late` wire directly, because it may glitch while the storage
  is being cleared.
- The state register and the captured `late` are triplicated and voted.
- Unused state codes behave as S_c.

## A corrected error, phase by phase

This is the part that takes the most thought. Take a transient on a negative
latch input in the middle of a `phi_n` phase. Below, N is the negative cluster
and P the positive one.

| Phase | N (data on `phi_n`) | P (data on `phi_p`) |
|---|---|---|
| 1 `phi_n` | transient; the detector flags it; `n_err` rises and the stored value may be wrong | P's automaton sees the upstream error (S_i, input 010): `hold=1` |
| 2 `phi_p` | N's automaton samples the local error: S_i → S_l, output 100 (stall, do not hold) | P holds: the possibly wrong N value is not taken |
| 3 `phi_n` | N takes the value again; P did not change, so the logic gives the correct value (**recompute**) | P's automaton: S_i → S_s (stall from N), output 110 |
| 4 `phi_p` | N: S_l → S_r, output 010: hold | P holds again (S_s) |
| 5 `phi_n` | N holds the corrected value (S_r) | P: S_s → S_i, output 000 |
| 6 `phi_p` | N: S_r → S_i | P samples the corrected N value |
| 7 `phi_n` | N samples normally | normal |

Each cluster loses exactly two commits:

- N loses the flagged phase and the hold in S_r.
- P loses two holds.

After that, the sequence of values is the same as in an error-free run, two
cycles late. The positive cluster behaves the same way with the roles swapped.
A transient that hits several latches of one cluster in the same phase (a
multiple-bit upset) is handled identically, because the errors are merged
before the automaton.

A transient that starts inside the window and lasts past the closing edge also
follows this path. The wrong value is stored, but it was flagged, so the
downstream cluster never takes it and the recomputation overwrites it.

## Critical escalation

`crit` rises, all latches hold (o2 = 1 in S_c), and the system must recover
(reset, or restore from outside) in these cases:

- **Late error.** A transient that reaches the latch at its closing edge, or an
  upset of a closed latch.
- **Conflict.** A local error while an upstream error or a neighbour stall is
  present. An example is an upset of a latch that is being held for its
  neighbour's recovery.

`crit` of `trla_top` is the OR of both clusters' critical outputs.

## Behaviour under irradiation

`tb/trla_irradiation_tb.sv` irradiates the two-cluster ring over 785-cycle
runs. It sweeps 1, 2, 5, 10, 20, 50 and 100 particles, with eight runs per
count. Particle types:

- three quarters are transients of 200–800 ps on one or two latch inputs;
- one quarter are upsets of a latch node.

With the default seed:

| Particles | Correct | Escalated | Silent |
|---|---|---|---|
| 1 | 3 | 5 | 0 |
| 2 | 5 | 3 | 0 |
| 5 | 3 | 5 | 0 |
| 10 | 2 | 6 | 0 |
| 20, 50, 100 | 0 | 8 | 0 |

No run ended with an unflagged wrong value.

Nearly every escalation comes from one of two sources:

- an upset of a latch that is not transparent, which is by definition a late
  error;
- a transient that arrives within a few hundred picoseconds of a closing edge.

Transients in the middle of a phase are corrected. With many particles in
one run, at least one of them is almost certain to be of the escalating kind.
How often escalation happens in a real design therefore depends on the latch
count and on how often strikes hit the storage node itself. This ring has only
32 latches, so the particles are concentrated.

## Limitations and departures

- **One error per recovery.** A second error in the same cluster during its
  recompute phase (S_l) is not seen: S_l → S_r does not look at the inputs.
  The recomputed value is then stored wrong. The error latch does flag it,
  but nobody reads the flag in time. The downstream cluster takes the wrong
  value and `crit` stays low. This was reproduced in simulation with a second
  transient 10 ns after the first. The automaton is built exactly as the
  architecture defines it, so this case stays open. The random test therefore
  spaces particles at least seven cycles apart. A stricter variant would send
  S_l to S_c on a local error.
- **Short glitches are filtered.** The transition detector's delays are
  inertial. A glitch of the latch output shorter than about `TD_DELAY_PS`
  (150 ps) gives no pulse. A glitch that short rarely gets through a latch
  anyway.
- **The blanking window is blind.** A transient that starts inside the
  blanking window and ends after it is hidden. Choose `BLANK_PS` just above the
  legitimate settling time.
- **Behavioural models.** The transition detector and the two pulse generators
  are delay models. A synthesis tool reduces them, and the EDS `err` outputs,
  to constants. A real build puts library cells (or custom delay chains) in
  their place. Everything else synthesizes to latches, gates and 12
  flip-flops per cluster: three copies of the 3-bit state and of the
  captured late flag. A synthesis flow must be told to keep the copies,
  because they are logically identical and would otherwise be merged.
- **Time borrowing is not built.** The architecture leaves room for widening
  the SR latch's pulse gating so that latches can borrow time. That option is
  not part of this configuration and is not built.
- **Choices not fixed by the architecture:**
  - all delays and pulse widths;
  - which multiplexer input `hold` selects;
  - the reset behaviour;
  - the state encoding;
  - the extra observation ports (`hold`, `late`, `state`) and `err_out` on
    each cluster;
  - the 16-bit width, which is the data word of a small stack CPU.
- **Wider rings.** `trla_cluster` has `N_NEIGH` and `N_UP` inputs for rings
  with more than two clusters. Only the two-cluster ring is wired and tested.
- **Tool warning.** Verilator reports a combinational loop (UNOPTFLAT) through
  the cluster's hold signal. The loop runs through a latch and the delayed
  detector, so it only costs simulation speed.

## Files

| File | Contents |
|---|---|
| `rtl/trla_pkg.sv` | state enum, automaton input and output structs |
| `rtl/trla_top.sv` | two-cluster ring |
| `rtl/trla_cluster.sv` | one cluster |
| `rtl/trla_fsm.sv` | controller automaton |
| `rtl/eds_group.sv`, `rtl/eds.sv` | protected latches |
| `rtl/error_storage.sv`, `rtl/tmr_sr_latch.sv`, `rtl/tmr_vote.sv` | error storage |
| `rtl/or_tree.sv` | OR reduction |
| `rtl/transition_detector.sv`, `rtl/pulse_generator.sv` | behavioural delay models |
| `tb/<module>_tb.sv` | self-checking testbench for each module |
| `tb/trla_irradiation_tb.sv` | particle-count sweep on the two-cluster ring |

## Parameters

| Parameter | Default | Where | Meaning |
|---|---|---|---|
| `WIDTH` | 16 | top, cluster, group | latches per cluster |
| `TD_DELAY_PS` | 150 | cluster, group, eds | transition detector delay |
| `TD_WIDTH_PS` | 200 | cluster, group, eds | detector pulse width |
| `BLANK_PS` | 500 | cluster, group | blanking after the data clock rises; must exceed `TD_DELAY_PS + TD_WIDTH_PS` |
| `CLR_DELAY_PS`, `CLR_WIDTH_PS` | 100, 200 | cluster | clear pulse after the control phase falls; must end before the next data phase |
| `N_NEIGH`, `N_UP` | 1, 1 | cluster | neighbours and upstream clusters |

## Simulating

All files use `timeunit 1ps`. Every testbench prints
`TB_RESULT checks=<n> failures=<m>` and stops. To build and run the end-to-end
test with Verilator 5:

```
verilator --binary --timing -Wno-fatal -Mdir build -Irtl -y rtl -y tb +libext+.sv \
    rtl/trla_pkg.sv tb/trla_top_tb.sv --top-module trla_top_tb
./build/Vtrla_top_tb
```

For another module, replace `trla_top_tb` with the module's testbench name.

`trla_top_tb` runs the design at its default width: 16 latches per cluster,
several microseconds of simulated time, in a few seconds. Its stimulus comes from:

- a pseudo-random ring of logic functions;
- transients XOR-ed onto `n_d`/`p_d`;
- upsets forced onto latch nodes.

It checks that every value a cluster commits equals the error-free sequence,
and that the clusters alternate. It then runs these scenarios:

- an error-free run;
- a mid-phase transient on each cluster, checking the two-commit cost;
- a three-bit transient;
- a transient across the closing edge;
- a transient at the closing edge (late, critical);
- an upset during a neighbour's recovery (conflict, critical);
- an upset of a closed latch (critical);
- 72 random particles, one to two bits each.

It counts each of these mechanisms and fails if one never happened:

- local error;
- wrong value stored and recomputed;
- hold on upstream error;
- stall;
- S_l, S_r and S_s entered;
- late error;
- critical;
- multiple-bit upset.

The irradiation sweep (`trla_irradiation_tb`) checks that no run whose
particles are at least seven cycles apart ends silently wrong. It also checks
that runs without escalation keep committing, and that an escalation stays
raised.

Add `+trace +tlo=<cycle> +thi=<cycle>` to `trla_top_tb` to print the phase-by-phase states of
both clusters.
