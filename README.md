# Making clock-domain-crossing failures visible in cycle-based simulation

A multi-clock design can pass every ordinary simulation and still fail in
silicon. A signal launched in one clock domain and sampled in another can
violate the setup or hold time of the sampling flip-flop. That flip-flop
may then latch the wrong value, or stay metastable and reach its own
fan-out late. Digital simulators, synthesis tools and formal tools model a
flip-flop as an ideal storage element, so none of them ever sees this
happen.

This RTL makes these events part of the logic itself. Every flip-flop of a
circuit is replaced by a **metastable flip-flop model** (`mff`) with three
extra ports:

- **V** (input): "my setup/hold time is violated this cycle".
- **M** (output): "I am metastable, so my output is late this cycle".
- **T** (output): "my output transitioned this cycle".

Next to each flip-flop sits a **path-sensitization detector**. It is a
second copy of the flip-flop's next-state logic, evaluated in three-valued
logic. Its inputs are the T, M or Q ports of the source flip-flops, and it
drives the flip-flop's V input. A violated model latches a random bit and
may become metastable itself, again at random.

The random bits are ordinary inputs. A formal tool can therefore search
for a sequence of them that breaks a functional property. A testbench can
drive them at random. Either way, crossing failures become reproducible
events with waveforms, and no rule about synchronizers or coding schemes is
needed.

The repository contains:

- the model (`mff`) and its three-valued logic (`tri_pkg`);
- the transformation written out for one destination flip-flop
  (`fig2_xform`);
- a four-phase handshake sender/receiver pair, as ordinary flip-flops and
  in transformed form, with a property monitor;
- eight small crossing circuits that each show a classic crossing issue,
  or a safe exception to a classic crossing rule.

## Three-valued violation signals

V, M and T carry three values. **Unknown** means "active". A **known 0 or
1** means "inactive", and on M and T that known value equals Q.

A Verilog gate-level simulator would write the unknown as `1'bx`.
Synthesizable logic and two-state simulators such as Verilator have no x.
`tri_pkg` therefore encodes each of these signals as a dual-rail pair,
`tri_t = {x, v}`:

- `x = 1` means unknown;
- otherwise `v` is the known value.

The gate functions `tri_and`, `tri_or`, `tri_not`, `tri_xor` and `tri_mux`
behave exactly as Verilog gates do with x (Kleene logic):

| gate | known result despite an unknown input when… |
|------|------------------------------------------------|
| AND  | another input is a known 0 |
| OR   | another input is a known 1 |
| XOR  | never |
| MUX  | the select is known and picks a known input, or both data inputs are known and equal |

This masking behaviour is the whole point. A hazardous source only violates
a destination when the logic between them actually lets its change through
in that cycle. Structural checkers cannot see this distinction.

`tri_active` and `tri_flag` convert between the encoding and plain bits;
they play the role of the model's converter blocks.

## The metastable flip-flop model (`mff`)

`mff` contains three registers:

- **FF1** (`q_ff`) holds the data.
- **FF2** (`meta_ff`) records "metastable during this domain cycle".
- `chg_ff` records "Q changed at the last base-clock edge".

On a tick of its domain:

| V | FF1 latches | FF2 latches |
|---|-------------|-------------|
| inactive | D | 0 |
| active | `r_val` (random) | `r_meta` (random) |

The outputs follow from these registers:

- **M** is unknown while FF2 is set.
- **T** is unknown while FF2 is set, or in the base cycle right after Q
  changed.
- Otherwise both M and T equal Q.

### Timing model

All clock domains run from one base clock `clk`. Each domain has a tick
enable (`ce`, `ce_s`/`ce_r` or `ce_a`/`ce_b`), and every flip-flop updates
only on its own domain's ticks.

An edge in one domain and a tick in another domain **collide** when they
fall in the same base cycle. That is when T is active. Holding a domain's
enable high makes every base cycle a tick, which is the worst case for
that domain. Driving the enables at random gives two unrelated clocks with
varying phase.

M stays active until the flip-flop's own domain ticks again. Its
same-domain fan-out samples at that tick and sees the late output.

### Reset

Reset is asynchronous and active low. It clears Q (or sets it to
`RESET_VAL`) and both flags.

## Wiring a destination: source classes

Each destination flip-flop's detector sees each of its sources through one
port, chosen by the source's class (`tri_pkg::src_class_e`):

| source | port | why |
|--------|------|-----|
| flip-flop in another clock domain | **T** | any of its transitions may hit the destination's window |
| same-domain flip-flop that directly samples another domain (first synchronizer stage, or any register fed by a crossing signal) | **M** | it may be late only if it went metastable |
| any other source, including primary inputs | **Q** | it is never late |

The M class stops after one level. The second synchronizer stage can
itself be violated (its V is the first stage's M), but the logic after it
sees it through Q. This design takes the usual position that metastability
does not travel past two flip-flops on the receiving side. `mff_sync2` is
that two-stage synchronizer, built from models.

### Functional logic and detector share one function

In every transformed module, each flip-flop's next-state function is
written **once**, as a `tri_t` function. It is evaluated twice:

- on `tri_known(Q)` values, which are always known, to get the functional
  D input;
- on the class-selected ports, to get V.

The data path and its detector therefore cannot drift apart.

### Example: `fig2_xform`

`fig2_xform` shows one destination, y = (a | b) & c, with one source of
each class:

- `a` is in another domain, so it is seen through T.
- `b` is a first synchronizer stage sampling `a`, so it is seen through M.
- `c` is a local register, so it is seen through Q.

With c = 0, nothing can reach y. With c = 1, a changing `a` or a
metastable `b` violates y, unless the other OR input is a known 1.

## Case study: four-phase handshake

### Source netlist

The source netlist consists of `hs_sender` and `hs_receiver`, with an
optional `sync2` on each side.

**Sender.** Pulse `send` for one tick with `data_in` while `busy` is low.
The sender evaluates:

```
start = send & ~busy
stb'  = start | stb & ~ack_s        (request to the receiver)
busy' = start | busy & (stb | ack_s)
data' = start ? data_in : data      (crossing data bus, held while busy)
```

**Receiver.** The receiver evaluates:

```
ack'      = req_s                   (req_s = stb, synchronized or not)
valid'    = req_s & ~ack            (one tick per item)
data_out' = valid' ? data : data_out
```

**Latency.** When both domains tick every cycle and both synchronizers are
present:

- `valid` is high 3 cycles after the edge that takes `send`;
- `busy` stays high for 12 cycles, the full round trip.

Without synchronizers the figures are 1 cycle and 4 cycles.
`tb_hs_pair` checks these numbers.

### Processed netlist

`hs_sender_x` and `hs_receiver_x` are the same circuit with every
flip-flop an `mff` and every detector wired by the class rule above.
`SYNC` selects whether the synchronizer is present on that side. Without
it, the registers that sample the other domain directly (stb and busy in
the sender; ack, valid and data_out in the receiver) become M-class
sources.

`data_out` always samples the data bus directly. Whether that is safe
depends on its load condition:

- while the load condition is a known 0, the mux masks the bus;
- while it is a known 1, the bus must be still.

### Properties

`hs_monitor` checks the interfaces only; it knows nothing about how the
crossing works:

- **correct_transfer**: whenever `valid` is high, `data_out` equals
  `data_in` at the last `send`.
- **no_blocked_transfer**: every `send` is followed by `valid` within
  `BOUND` base cycles.
- **sender_handshake**: `busy` is high on the sender tick after `send`.

The testbenches respect the environment rule "no send while busy".

### Results

`cdc_top` holds the source pair, the processed pair (each with a monitor),
`fig2_xform` and the crossing circuits below. `tb_cdc_top` runs it in all
four synchronizer configurations, for 200,000 base cycles each, with random
ticks, traffic and random bits. It got these results ("fail" means the
monitor flagged the property at least once):

| synchronizers | source netlist | processed: correct_transfer | processed: no_blocked | processed: sender_handshake |
|---------------|----------------|-----------------------------|-----------------------|-----------------------------|
| none          | all pass | fail | fail | fail |
| sender only   | all pass | fail | fail | pass |
| receiver only | all pass | fail | pass | fail |
| both          | all pass | pass | pass | pass |

- The source netlist can never fail: its flip-flops are ideal.
- The processed netlist passes only with both synchronizers. It shows data
  corruption whenever one is missing.
- Only the sender synchronizer is missing in the "receiver only" row, yet
  items still get corrupted, not just the sender's own handshake. The late
  acknowledge upsets the sender's `stb` and `busy` registers. From there
  the upset spreads through the handshake state: a bogus or lost request,
  or an item captured while `busy` is late.
- A blocked transfer shows up when the receiver has no synchronizer. A
  late request can make the receiver's `ack` rise while its `valid` is
  lost; the handshake then completes without delivering the item. While
  traffic keeps flowing, the next item's `valid` hides this. The
  testbench therefore stops sending for 600 cycles (longer than the
  400-cycle `BOUND` it uses) once every 5000 cycles.
- With only the receiver synchronizer present, random simulation found
  no blocked transfer. A formal search over all random-bit sequences may
  find one that random stimulus does not reach.

The testbench checks exactly this table. Four different seeds gave the
same verdicts.

## Crossing circuits

`xing_benches` gathers eight small processed circuits between one domain A
and one domain B. In `cdc_top`, A is `ce_s` and B is `ce_r`.

| circuit | issue | expected | shown by |
|---------|-------|----------|----------|
| four-phase handshake with both synchronizers | none | pass | `cdc_top`, both synchronizers |
| four-phase handshake without synchronizers | data corruption | fail | `cdc_top`, none |
| `gray_xfer_x`, GRAY=1 | counter crosses bit-wise in Gray code | pass | `tb_gray_xfer_x` |
| `gray_xfer_x`, GRAY=0 | same in binary: bits resolve independently | fail (values the counter never had) | `tb_gray_xfer_x` |
| `quasi_static_x` | configuration read without synchronizer, written only while its user is disabled | pass (no violation at all) | `tb_quasi_static_x` |
| `mux_xing_x` | multiplexer with local select before the synchronizers | pass | `tb_mux_xing_x` |
| `comb_xing_x`, GLITCH_FREE=0 | XOR of two inputs that switch together | fail (glitch captured) | `tb_comb_xing_x` |
| `comb_xing_x`, GLITCH_FREE=1 | AND of the same inputs | pass | `tb_comb_xing_x` |
| `reconv_x`, ONE_AT_A_TIME=0 | two synchronized bits switching together, reconverging | fail (B sees 00/11) | `tb_reconv_x` |
| `reconv_x`, ONE_AT_A_TIME=1 | same, one bit at a time | pass | `tb_reconv_x` |

Several of the passing circuits break a structural rule of thumb:

- logic in front of a synchronizer (the AND gate and the multiplexer);
- synchronizing a multi-bit value (the Gray counter);
- using an unsynchronized signal (the quasi-static configuration).

The detectors accept them for a concrete reason. Either only one crossing
path is sensitized at a time, or the masking input is known.

The Gray transfer is safe only if the counter moves at most once per
receiver period. `tb_cdc_top` paces its increments accordingly. When the
counter moves faster, the model duly reports values the counter never held.

## How far to trust it, and where it is this design's own

The following parts follow the method:

- the model's behaviour (FF1/FF2, random latch, random metastability for
  the next cycle, M/T equal to Q when inactive);
- three-valued path sensitization;
- the T/M/Q source classes;
- the two-flip-flop limit;
- the three handshake properties.

The following are choices made here:

- **Dual-rail encoding** instead of x, so that the models synthesize and
  run in two-state simulators.
- **One base clock with tick enables** to represent unrelated clocks. "Same
  base cycle" stands for "close enough to collide".
- **T stays active while M is active.** A late output is a late transition
  for a receiver in another domain.
- **Hand-written transformation.** The transformation is written out by
  hand for each circuit, not produced from a synthesized netlist by a tool.
  The class of each source is fixed per module, mostly through the `SYNC`
  parameters.
- **Invented circuit details.** The handshake equations, all data widths,
  the function f of `fig2_xform` and every crossing circuit's exact
  structure and stimulus are this design's own. They fill in circuits that
  are only named or described by their behaviour.
- **Two sender state registers.** Here the sender keeps `busy` in its own
  register next to `stb`, and the data register loads on `send & ~busy`.
  Without a sender synchronizer both `stb` and `busy` sample the
  acknowledge directly, and a late `busy` reaches the data register's
  detector. A sender with `stb` as its only state register, and a data
  load that depends on `send` alone, would have no path from the exposed
  register to the data. Its data corruption would then come only through
  a bogus handshake. The failure traces of this build can therefore
  differ from those of a single-register sender.
- **Random simulation instead of formal proof.** Random simulation stands
  in for the formal search, and liveness is bounded by `BOUND` cycles. A
  pass means that no failure was found in the simulated cycles; it is not
  a proof. The testbenches check that the expected mechanisms (violations,
  metastability, masking) really occurred, so a silent pass is not
  mistaken for safety.

## Files

All files in `rtl/` are synthesizable SystemVerilog (IEEE 1800-2017).

| file | content |
|------|---------|
| `tri_pkg.sv` | `tri_t` encoding, converters, three-valued gates, source classes |
| `mff.sv` | metastable flip-flop model |
| `mff_sync2.sv` | two-stage synchronizer of models |
| `fig2_xform.sv` | single-destination example |
| `sync2.sv`, `hs_sender.sv`, `hs_receiver.sv` | handshake, source netlist |
| `hs_sender_x.sv`, `hs_receiver_x.sv` | handshake, processed netlist |
| `hs_pkg.sv`, `hs_monitor.sv` | property verdict type and checker |
| `xing_pkg.sv` | Gray code conversion |
| `gray_xfer_x.sv`, `quasi_static_x.sv`, `mux_xing_x.sv`, `comb_xing_x.sv`, `reconv_x.sv` | crossing circuits |
| `xing_benches.sv` | collects the crossing circuits |
| `cdc_top.sv` | top level |

The main parameters of `cdc_top` (defaults in brackets):

- `DATA_W` [8]: handshake data width.
- `SENDER_SYNC`, `RECEIVER_SYNC` [1, 1]: synchronizer configuration.
- `BOUND` [256]: liveness bound in base cycles.
- `XB_N` [4]: counter width of the crossing circuits.
- `XB_NQ` [8]: configuration width.

Random-bit bus layouts are given in each module's header comment.

### Simulating

Every testbench in `tb/` is self-checking. Each ends by printing
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/tri_pkg.sv rtl/hs_pkg.sv rtl/xing_pkg.sv tb/tb_cdc_top.sv \
    --top-module tb_cdc_top -o sim
./obj_dir/sim
```

| testbench | what it runs |
|-----------|--------------|
| `tb_cdc_top` | four synchronizer configurations and all crossing circuits (about 1 s) |
| `tb_cdc_full` | one complete operation of `cdc_top` at its defaults |
| `tb_mff` | model against a reference model |
| `tb_fig2_xform` | single-destination example with a hand-evaluated three-valued reference |
| `tb_sync2` | synchronizer |
| `tb_hs_pair` | source netlist: latency and scoreboard |
| `tb_hs_x` | processed pair with synchronizers: scoreboard, and violations confined to the synchronizers |
| `tb_hs_monitor` | property checker |
| `tb_gray_xfer_x`, `tb_quasi_static_x`, `tb_mux_xing_x`, `tb_comb_xing_x`, `tb_reconv_x` | crossing circuits, each in both variants where it has two |

To look for a failure with a formal tool instead, keep the random-bit
ports free. Constrain `send` to be low while `busy` is high, and assert
that the `hs_monitor` error bits stay zero.
