# Optical burst switch on a dual shuffle-exchange network

An optical burst switch moves whole bursts of data between wavelength
channels on its input and output fibres. It does not buffer them: when a
burst arrives, it either gets a light path through the switch right away or
it is lost. This design builds the switch from a **dual shuffle-exchange
network (DSN)** of small 4x4 switching modules. The DSN uses **deflection
routing**: when two bursts in a module want the same output, one of them is
sent out of another idle output and corrects its course in later stages. No
burst ever waits, and contention costs only extra stages. Enough extra stages
make the loss rate very small.

The RTL models the control side of the switch: how paths are set up,
deflected, corrected, torn down and checked. For the optics it uses a simple
stand-in. A DATA_W-bit word stands for the light on each wavelength channel,
and a zero word means dark. The data path runs from `data_in` to `data_out`
through the switch settings that the control side has stored.

## Ports, channels and the network

- The switch has `D_FIBERS` fibres in and `D_FIBERS` fibres out, with
  `H_WAVES` data wavelengths per fibre. The defaults are 8 and 128.
- Every input wavelength channel is one input port of an `N x N` DSN, with
  `N = D*H = 2^n`. The defaults give N = 1024 and n = 10. Port numbers are
  `wavelength * D + fibre`.
- Each stage has N/2 modules. Module `x` (n-1 bits) has four inputs and four
  outputs. Outputs 0 and 1 belong to the **shuffle plane S**; outputs 2 and 3
  belong to the **unshuffle plane U**.
- The links of an output carry the label `{x, b}`, where `b` is 0 or 1:
  - An S link goes to input `rotl(label)` of the next stage's S plane, the
    perfect shuffle.
  - A U link goes to input `rotr(label)` of the U plane, the inverse shuffle.
- There are `L_STAGES` stages; the default is 24. Any stage can hand a burst
  to the output side through a 1x2 exit switch on each module output.
- Before stage 1, input `s` is wired to S input `rotl(s)` (an initial
  shuffle). This gives every plane the same address arithmetic from the
  start.

## Routing tags and deflection (the core of the design)

A path through an ordinary shuffle network needs n steps: each step fixes one
bit of the destination. In the DSN, a burst carries a **routing tag**: a stack
of `(plane, bit)` entries. The top entry names the output the burst wants in
the current module: plane S or U, output 0 or 1 of that plane.

- The input side builds the tag from the destination, one entry per address
  bit, all in the plane chosen for this burst (`dsn_pkg::make_tag`):
  - In S, the bits go most significant first.
  - In U, the order is bit 1, bit 2, ..., bit k-1, then bit 0. Rotating right
    puts the low bit at the top, so this order makes the final label equal the
    destination.
- **Success.** If the wanted output is free, the burst takes it and the top
  entry is popped.
- **Deflection.** If another burst already holds the wanted output, this
  burst takes the lowest-numbered idle output instead. That link moved it one
  step in the wrong direction. One step in the *other* plane undoes the move,
  so the module **pushes one correction entry** and does not pop:
  - A deflection onto an S output pushes `(U, module index MSB)`. The
    unshuffle step that follows restores the old label.
  - A deflection onto a U output pushes `(S, module index LSB)`.

  The correction is taken at the next stage (or deflected again, with a
  further push). After that, the original entry is back on top and is retried
  in its original plane. Each deflection therefore costs exactly two extra
  stages. A burst deflected j times leaves at stage `n + 2j`.
- **Exit.** When the tag is empty after a stage, the burst leaves through
  that stage's exit switch. Its output label is then the destination channel
  of its plane. `dsn_pkg::exit_port` gives the mapping for partial tags.
- **Loss.** A burst whose tag is not empty after stage `L_STAGES` is reported
  on `drop_o`/`drop_src_o`.
- The stack is `TAG_DEPTH = 64` entries deep. That covers `n + L_STAGES`,
  which is the most it can ever hold. An assertion in each stage checks this.
- A module holds up to four paths at once. Paths set up earlier keep their
  outputs. A new setup only competes with paths that already exist, because
  only one control word is in each stage per clock.
- Successive bursts of one input alternate between the S and U planes,
  starting with S. This spreads the load over both planes.

## Just-in-time reservation

There is one control word per burst event. It enters as `req_*` on the
control channel and travels through the network one stage per clock, ahead of
its burst.

- A **setup** (`MSG_SETUP`) makes each module decide and store its
  connection: input to output, and whether the exit switch is set. It then
  forwards the setup, with the updated tag, on the chosen link.
- A **release** (`MSG_RELEASE`) follows the stored connections, not a tag. It
  clears each connection as it passes, including the exit. The release tears
  the path down from the input side forward.
- The data for a channel is visible at `data_out` from the clock after its
  setup reaches the exit stage until its release clears that stage.

Timing at the top level: a setup sampled in clock t enters stage 1 at t+1.
An undeflected burst exits after stage n: `exit_o[n-1]` is valid after the
edge at the end of cycle t+n. Each deflection adds two stages.

## Output side: the three output schemes

Many network outputs can feed the same output fibre. How a burst's output
wavelength is chosen is the main difference between the output schemes.

- **Scheme 3 (`SCHEME = 3`, default): choose the wavelength at the input.**
  - The input controller (`input_ctrl`) keeps a busy bit per output channel.
    It picks the lowest free wavelength on the wanted fibre and routes the
    burst with a full n-bit tag to exactly that channel.
  - If the fibre has no free wavelength, the burst is blocked (`blocked_o`)
    and never enters the network.
  - Exits from all stages and both planes for one channel are ORed together.
    The stored setups guarantee that at most one drives it.
  - A released channel becomes free `L_STAGES` clocks after the release. By
    then the release has cleared the old exit, even on the longest path.
- **Scheme 1 (`SCHEME = 1`): route to the fibre only.**
  - The tag holds only the `log2 D` fibre bits. The burst may exit on any
    channel whose label carries those bits.
  - Each channel has an output multiplexer. The stage may take the exit only
    if that multiplexer is not already in use. It must also not be claimed in
    the same clock by a lower stage; ties go to the lower stage.
  - A refused burst is deflected like a burst that met a busy output. If the
    wanted link is the only idle one, the burst goes on through it, without
    exiting, and counts as deflected.
  - The tag-empty rule makes exits possible from stage `log2 D` on.
- **Scheme 2** adds tunable wavelength converters, shared at the outputs. It
  is not built here.

The demultiplexers and multiplexers that split fibres into wavelengths are
optical parts. So are the fixed wavelength converters that bring every
channel onto one common wavelength inside the network. None of these is
modelled. In the RTL they are simply the arrays `data_in` and `data_out`,
indexed `[fibre][wavelength]`.

## Modules

| Module | Role |
|---|---|
| `dsn_pkg` | Constants, message structs, the `rotl`/`rotr` link maps, tag building (`make_tag`) and the exit-label map (`exit_port`) |
| `dsn_node_ctrl` | Combinational decision of one 4x4 module: assign outputs, push corrections, set exits, follow or clear a release |
| `dsn_node_xbar` | Data path of one module: a 4x4 crossbar plus four 1x2 exit switches, driven by the stored setting |
| `dsn_stage` | One stage: N/2 stored module settings, the control word register, link rotation to the next stage, exit candidates, loss report at the last stage |
| `dsn_fabric` | `L_STAGES` stages chained in S and U, the initial shuffle, the scheme-1 exit arbitration, the output multiplexer |
| `output_mux` | Collects every stage's exits into the output channels; flags a clash if two drive one channel |
| `input_ctrl` | Per-input state (active, plane, assigned channel), wavelength assignment and blocking for scheme 3, tag building |
| `obs_dsn_switch` | Top: the input controller plus the fabric, with the channel arrays brought out as fibres x wavelengths |

The network handles one control word per clock for the whole switch. A
module sees at most one new setup or release per clock.

## Status outputs

- `accepted_o`, `blocked_o`, `assigned_o`: the input controller's answer
  for this clock's request.
- `exit_o[s]`: a setup or release that left at stage s+1, with its source,
  plane and output label.
- `deflect_o[s]`: stage s+1 deflected a setup.
- `drop_o`, `drop_src_o`: a setup was lost at the last stage.
- `error_o`: a protocol error, a module with no idle output (this should not
  happen), or two exits on one channel.

## Simulating

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=... failures=...` and has a watchdog. For example:

```
verilator --binary --timing --assert -Wno-fatal rtl/dsn_pkg.sv rtl/*.sv \
    tb/tb_obs_dsn_switch.sv --top-module tb_obs_dsn_switch
./obj_dir/Vtb_obs_dsn_switch
```

- `tb_obs_dsn_switch` runs the whole switch at D=4, H=8, L=9. It runs one
  instance with scheme 3 and one with scheme 1 under random setup and release
  traffic.
  - A reference model gives the destination, the exit stage (`n + 2j`), the
    latency and the data on every output channel.
  - The test counts deflections, corrected routes, losses, blocked bursts,
    releases and busy-multiplexer refusals. It fails if any of them never
    happens.
- The largest size simulated is this 32-port switch with 9 stages. The
  default size, 1024 ports and 24 stages, passes lint and elaboration. A
  verilator model of it takes more than ten minutes to build, so no
  simulation at that size is included. The RTL is written for any power of
  two, and nothing in it depends on the size beyond the parameters.
- The unit testbenches check single modules:
  - `tb_dsn_node_ctrl` checks the routing rule cases.
  - `tb_dsn_node_xbar` checks the crossbar against random settings.
  - `tb_output_mux` checks channel collection and clash detection.
  - `tb_input_ctrl` checks wavelength choice, blocking, plane alternation and
    the release delay.
  - `tb_dsn_stage` checks link rotation and the correction push.
  - `tb_dsn_fabric` checks routes through the full chain of stages against a
    model.

## Where this design makes its own choices

- The control channel is a single request per clock for the whole switch: it
  carries the source fibre and wavelength and the destination fibre. Real
  burst headers also carry offset time and length. Here, the burst length is
  simply the time between setup and release.
- Deflection picks the lowest-numbered idle output.
- Each 4x4 module is a non-blocking crossbar. A two-stage banyan of 2x2
  elements would be cheaper. It would also deflect somewhat more often,
  because two bursts can collide inside it. That version is not built.
- In scheme 1, every exit with the same output label feeds the same channel.
  A burst refused at a busy multiplexer is corrected back onto the same label
  and will likely find it busy again. Spreading each channel over different
  labels would avoid this, but the exact wiring for that is not given here,
  so it is not built.
- Stage delay is one clock per stage for the control word. The data path is
  combinational, with no optical delay modelled.
- A release for a source with no active burst (for example, one that was
  blocked) is ignored. A new setup on a source that is still active is a
  protocol error.
- In scheme 3, a channel is reused only after the release has had time to
  cross all stages.
- The vertical-expansion variant is not supported: `H_WAVES` must be a power
  of two. That variant leaves some network ports unused, trading them for
  more stages.
- Output scheme 2, with shared tunable converters, is not built.
