# Reconfigurable Logic Controller for Petri-net machine control

Some machine controllers are Petri nets that are too big for one small FPGA.
This design runs such a controller anyway. It cuts the net into *contexts*
and loads them one after another into a single partially reconfigurable
region of the FPGA. Each context fires once per turn. Its state is saved to
block RAM before the region is reloaded and restored on its next turn. One
round through all contexts is one *operation cycle*, the equivalent of a PLC
scan. Industrial machines need operation cycles of about 10 ms. A context
turn takes about 0.25 ms: 0.24 ms to reconfigure, plus 2 × 512 clocks at
100 MHz to restore and save the state. So up to about 40 contexts fit into
one cycle.

The RTL here builds the architecture from the paper "A Partial
Reconfigurable Architecture for Controllers based on Petri Nets". Its
example application is an elevator controller of 23 places and 27
transitions, split into two contexts. The bitstream loading itself cannot be
written as RTL. It is modelled as a choice among the compiled-in context
circuits (see *Modelling reconfiguration*).

## The controller model: a safe Temporal Petri Net

The controller's state E consists of the place marks M(P) plus a few
internal flags F. Each place holds 0 or 1 token and has one flip-flop. A
transition t is enabled when its guard G_t (a Boolean function of the inputs
X, the marks and the flags) is true and all its input places are marked. On
the firing clock edge, every enabled transition does three things at once:
it empties its input places, marks its output places and performs its action
on a flag or output (Set, Reset or complement). A *delayed* transition has a
delay D. It first takes the tokens away. It then counts D steps and only
afterwards marks its outputs and performs its action. Each output y is a
Boolean function S_y of the marks and flags, or it is a flag itself.

### The elevator net (four floors)

| places | meaning | transitions |
|---|---|---|
| p1..p4 / p6..p9 | no call / call pending at floor i (p6..p9 light IC0..IC3) | t(2i+1): `BIi or BEi` sets the call; t(2i+2): `SAi` clears it |
| p11 → p12 → p13 → p14 | start-up: reset flags, wait for START, close doors (APF), drive down (MON) | t11: Reset(FMD,FMS); t12: `START`; t13: all doors closed, Set(FMD); t14: `SA0`, Reset(FMD), marks p1..p5 and p15 |
| p5 / p10 | alarm watch: AL while a landing door is open without the cabin there, or on the alarm button | t9: `BA or (SPi' and SAi')`; t10: else |
| p15 → p16 → (t16, 2 min) → p17 → p18 | open the door (APA), hold it open, close it (APF) if there is a call at another floor | t15: `PA`; t16: delay; t17: call at another floor |
| p18 → p21 / p15 / p19 → p20 → p16 | door closed / door button reopens / obstacle: reopen with alarm and wait for it to clear | t18: `PF and BP' and EP'`; t19: `BP and EP'`; t20: `EP`; t21: `PA`; t22: `EP'` |
| p21 → p22 | choose the direction: down (t23: Set FMD, Reset FMS) or up (t24: the opposite) | t23 guard: see `elev_ctx1.sv` |
| p22 ⇄ p23 | travel (MON) until a called floor is reached (t25, back to p15); safety stop with alarm when any door switch opens (t26), resume when all are closed (t27) | |

Inputs are `x_t` in `rlc_pkg.sv`: BI/BE call buttons, SA cabin at floor,
SP landing door closed, PF/PA cabin door closed/open, START, EP obstacle, BP
door button, BA alarm button. The outputs (`y_t`) are IC0..IC3, APF, MON,
APA, AL, and the direction flags FMD/FMS. Only p11 is marked initially.

The net is split into two contexts:

* C0 = {p1..p4, p6..p9, p11..p14}: the call memories and start-up (12 state bits).
* C1 = {p5, p10, p15..p23}: door, travel and alarm control, plus the t16
  timer (11 places + 2 timer flags + a 16-bit counter = 29 bits).

A transition belongs to every context that owns one of its places. Such a
transition therefore appears in both contexts: t14 is one. Each context
writes only the marks of its own places.

## One operation cycle, clock by clock

`fsm_c` runs this sequence forever (FFS = 512, REC = reconfiguration time):

| step | clocks | what happens |
|---|---|---|
| start | 1 | `x_load`: sample the inputs X into the input image for the whole cycle |
| configure C_i | REC + 1 | `cfg_req`/`cfg_ctx` held until the configuration port pulses `cfg_done`; the region switches to C_i and its flip-flops are cleared |
| restore | FFS + 1 | shift 512 bits into the region's scan chain: first the 22 bits of the input image X, then C_i's saved state bits, read from the state RAM one per clock (the extra clock is the RAM's read latency) |
| execute | 1 | on the rising edge, every enabled transition of C_i fires |
| OAR | ½ | on the next falling edge, the Output Arguments Register takes C_i's new marks and the flag results |
| CLK_S | 1 | only after the last context: `clk_s` copies the OAR into the Sy register, and Y changes |
| save | FFS | shift the 512 bits out of the region into the state RAM (the 22 input bits come out first and are not written) |

With two contexts, one sweep takes 1 + 2·(REC+1+513+1) + 512 clocks. That
is 49,543 clocks, or 0.495 ms, at the configuration time of 24,000 clocks.
After the sweep the scheduler waits until `CYCLE_CLKS` clocks (10 ms) have
passed since the cycle started. If a sweep takes longer, the next one starts
at once and the sticky `overrun` output is set.

After reset, an initialisation sweep runs first. It configures each
context, loads its initial marking (`init_en` instead of restore/execute),
saves it, and ends with one `clk_s`. The state RAM is never reset, because
this sweep writes every word before anything reads it.

## How the contexts see each other (the subtle part)

In the unpartitioned net, all transitions fire on the same edge from the
same state. Here, C0 fires about 25,000 clocks before C1. Two measures
preserve the synchronous semantics:

1. **Reads come from a start-of-cycle snapshot.** C1 reads some places of C0
   in its guards (p6..p9) and as an input place (p14 of t14). It also reads
   the flags. All of these come from the Sy register, which is the OAR copy
   taken at the end of the previous cycle. C0 has already emptied p14 in the
   current cycle, so if C1 read the live OAR, it would never see t14 fire and
   never mark p15. With the snapshot, both halves of t14 see the same old
   marking: C0 removes p14 and marks p1..p4, and C1 marks p15 and p5. The
   same input image X is used throughout a cycle for the same reason.
2. **Actions write the live value.** Flag actions are applied to the
   running flag value in the OAR (`f_run`). C1's actions therefore land on
   top of C0's actions from the same cycle. A flag changed by two
   transitions in different contexts ends as if the transitions had run in
   context order. The action of a transition shared by two contexts (t14's
   Reset(FMD)) is performed only by the context that owns its input place.

The end-to-end testbench checks the result of these two rules. Over 1,500
random operation cycles, the marking, flags and outputs after every
`clk_s` equal one step of a flat reference model of the whole net.

## Modelling reconfiguration

On the device, the region's logic is replaced by a partial bitstream. The
region's flip-flops are physical and shared. `rla` models exactly this
split:

* one 512-bit register with a serial scan path (`scan_in` → `ff[0]` … `ff[511]` → `scan_out`);
* the context circuits `elev_ctx0` and `elev_ctx1`, which are purely
  combinational next-state functions of the low state bits and of the
  inputs X held in the top 22 flip-flops (`ff[511:490]`);
* a `ctx` register, written by `cfg_load`, that selects which circuit is
  "configured".

Configuring also clears all 512 flip-flops. A context's state therefore
survives only through save and restore, as on the real device. The inputs
travel the same way. Each restore first shifts in the 22-bit input image,
most significant bit first, so it ends up at the top of the chain. The
input image register in `rlc_top` rotates by one bit per shift, so after a
context's 22 input shifts it holds the whole image again for the next
context. The state RAM words that line up with the input bits are never
read or written. Priority per
clock: configure > scan shift > init > execute. The wires between `rla` and
the fixed-area modules in `rlc_top` stand in for the bus macros. The SelectMap
port and the configuration memory are outside the RTL. `rlc_top` brings
their handshake out as ports. `tb/selectmap_cfg_model.sv` is a timing model
of them (REC clocks per load).

## Modules

| file | role |
|---|---|
| `rtl/rlc_pkg.sv` | sizes (512 flip-flops, 40 contexts), structs `x_t`, `y_t`, `args_t` (23 marks + 2 flags), context place masks |
| `rtl/rlc_top.sv` | top: fixed logic area (scheduler, state RAM, input image, OAR, Sy) + reconfigurable area |
| `rtl/fsm_c.sv` | scheduler FSM_C: configure / restore / execute / CLK_S / save, initialisation, pacing |
| `rtl/rla.sv` | reconfigurable area: 512 scan flip-flops, loaded-context register, context circuits |
| `rtl/elev_ctx0.sv`, `rtl/elev_ctx1.sv` | the two context circuits of the elevator net |
| `rtl/oar.sv` | Output Arguments Register, falling edge, masked per context |
| `rtl/sy_out.sv` | Sy register (on `clk_s`) and the output functions |
| `rtl/ctx_state_ram.sv` | 20,480 × 1 bit state RAM (40 contexts × 512 bits), synchronous single port |

Clocking: `clk` is the context clock CLK_C. `oar` uses its falling edge,
and everything else uses the rising edge. The system clock CLK_S is the
enable `clk_s`. The resets are asynchronous and active-low.

### Parameters

| parameter | default | origin |
|---|---|---|
| `RLA_FFS` (pkg), `FFS` | 512 | flip-flops of the 4-column region (4 × 16 CLBs × 8) |
| `MAX_CTX` (pkg) | 40 | most contexts that fit a 10 ms cycle; sizes the state RAM |
| `N_CTX` (pkg), `NCTX` | 2 | contexts of the elevator |
| `X_W` (pkg), `XW` | 22 | input bits carried by the scan path (width of `x_t`) |
| `CYCLE_CLKS` | 1,000,000 | 10 ms at 100 MHz; 0 = back-to-back cycles (own choice) |
| `D_T16` | 12,000 | t16's 2 minutes in 10 ms cycles (own conversion) |
| `DLY_W` (pkg) | 16 | delay counter width (own choice) |
| REC (testbench model) | 24,000 | 0.24 ms context load at 100 MHz |

### Delayed transition timing

t16 follows the one-flip-flop-per-place translation. The execution that
starts the firing empties p16, sets `t16s` and loads the counter with D.
Each later execution counts down. At zero, `t16d` is set, and the execution
after that marks p17. p17 is therefore marked D+2 executions after the start
(one execution = one operation cycle).

## Readings and departures

These points were filled in or changed where the source leaves room:

* **Snapshot feedback.** The source feeds the OAR back to the region. This
  design feeds back the OAR copy held in the Sy register (see above), plus
  the live OAR flags for actions.
* **Input image.** X is sampled once per cycle and enters each context
  through the scan path, ahead of the state bits. That order, and the
  sampling register, are this design's choices. None of the elevator's
  output functions reads X, so `sy_out` has no X input.
* **Single clock.** CLK_S is an enable, not a second clock.
* **Cycle pacing and overrun** are additions. They give the delay a time
  meaning.
* **The net itself.** Arc directions, the outputs of t14 (p1..p5 and p15)
  and the guard of t23 were read from a drawing. Guards written `Else(t)`
  are the negation of G_t. Output functions are taken as the OR of the
  places labelled with each output.
* **Flag reset values** are 0. t11 clears both flags at start-up anyway.
* **Marks.** If a place were emptied and marked in the same step, the mark
  would win. This cannot happen in this net.
* **Sizes.** The state RAM is sized for 40 contexts (20,480 bits, two
  18-kbit block RAMs). Only two contexts are used.
* **Not built.** The temporal-partitioning algorithm, which is a software
  tool. The unpartitioned controller, which exists only as the testbench
  reference model `tb/elev_ref_pkg.sv`.
* **40 contexts.** With the exact clock counts, 40 contexts take
  1,001,080 clocks, about 0.1 % more than a 10 ms cycle, and would raise
  `overrun`. 39 contexts fit.

## Simulating

All testbenches are self-checking and print
`TB_RESULT checks=N failures=M`. Example with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/rlc_pkg.sv tb/elev_ref_pkg.sv tb/tb_rlc_top.sv --top-module tb_rlc_top
./obj_dir/Vtb_rlc_top
```

The other files are found through `-y rtl -y tb +libext+.sv` or can be
listed explicitly.

| testbench | what it shows |
|---|---|
| `tb_rlc_top` | 1,500 random cycles at reduced sizes (REC 16, cycle 2,300 clocks, D 4). State, flags and Y are compared with the flat reference model after every cycle. Sweep and cycle clock counts are checked exactly. At every execution the region's 22 input flip-flops must hold the image sampled at the start of that cycle. It also counts reconfiguration, restore, execute, save, OAR loads, CLK_S, pacing, the cross-context transition t14, C1 reading C0's marks, t16 completion and flag actions in both contexts; any of these that never happens is a failure |
| `tb_rlc_top_full` | all defaults (24,000-clock loads, 1,000,000-clock cycle, D 12,000): initialisation and six cycles of a start-up ride, with exact sweep (49,543 clocks) and cycle timing |
| `tb_elevator_ride` | the controller in closed loop with a lift model (cabin moving one step per cycle, door following APA/APF): power-on homing from floor 2 to floor 0, a landing call taking it up to floor 3, a cabin call taking it down to floor 1; no alarm, never moving with the door open, indicators cleared, state equal to the reference throughout |
| `tb_fsm_c` | clock-by-clock sequence for 3 contexts and an 8-bit chain with 3 input bits, input/RAM selection during restore, RAM addresses, OAR/CLK_S placement, pacing, overrun |
| `tb_rla` | scan round trip, clearing on configuration, M0 load, C0 execution against the reference (state and X scanned in), t16 timing, priority, unused context |
| `tb_elev_ctx0`, `tb_elev_ctx1` | 20,000 random states per context against the reference step |
| `tb_oar`, `tb_sy_out`, `tb_ctx_state_ram` | masking and falling-edge load; output functions and CLK_S load; full RAM fill and read-back |

Verilator is two-state. Every register that is read is reset or written
before use.

## Size

After generic synthesis, the whole controller has 653 flip-flops: 512 in
the region, 9 for the region's loaded context and flag results, 22 for the
input image (a rotating register), 25 in the OAR, 25 in Sy and 60 in the scheduler. It also has
the 20,480-bit state RAM and under 300 word-level cells. The
context circuits are small (36 and 90 cells), in line with the small area the
two contexts need compared with the fixed area.
