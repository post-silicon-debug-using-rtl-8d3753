# Programmable-logic debug access network

A chip that comes back from the fab with a bug is hard to look inside: the
interesting wires run between IP blocks, deep in the die, at full clock
speed, and the pins are few and slow. This RTL adds a small programmable
logic core (PLC, an embedded FPGA fabric) to a system-on-chip together with a
configurable **access network** that connects the PLC to thousands of
internal wires. After fabrication, software chooses:

* which (up to 23) of the 7200 candidate wires the PLC **observes**, and
* which (up to 23) wires the PLC may **override**, i.e. replace the value a
  sink block receives with one the PLC computes,

and loads a debug circuit into the PLC (a transition counter, a trigger,
a trace recorder, a work-around for a known bug). The PLC pre-processes at
speed what it sees, so only results have to leave the chip.

The architecture follows B. R. Quinton and S. J. E. Wilton, "Post-Silicon
Debug Using Programmable Logic Cores". Where that description stops
(the hyper-concentrator's insides, the PLC interface, the control side, the
configuration port) the choices here are this design's own; they are listed
in [Departures and own choices](#departures-and-own-choices).

```
  IP block A ──sig_i──┬──────────────[override mux]──sig_o──► IP block B
                      │                    ▲
                      ▼                    │
        ┌──────────── access_network ─────────────────────┐
        │ observe_network          control_network        │
        │  K x obs_group            K x ctrl_group        │
        │  (hyper-concentrator,     (Input Select, mirror │
        │   regs, Input Select)      hyper-concentrator,  │
        │        │ OR-tree                regs, mask)     │
        └────────┼──────────────────────────▲─────────────┘
           23-lane observe bus        23-lane control bus {value, enable}
        ┌────────▼──────────── interface_buffer ──┴───────┐
        │ serial-to-parallel         parallel-to-serial   │
        └────────┬──────────────────────────▲─────────────┘
            92 PLC inputs             184 PLC outputs, plc_ce_o
                 ▼                          │
                        PLC (not in this RTL)
```

## The hyper-concentrator

The network must be able to connect *any* set of up to M = 23 wires, out of
7200, to the 23 bus lanes. A full crossbar is far too large. Because all PLC
pins are equivalent, the order in which the chosen wires arrive on the bus
does not matter, and a much cheaper *concentrator* suffices. It is built in
two stages:

1. Per IP block (a *group* of X = 23 wires) a **hyper-concentrator**: an
   X-input, M-output network that can place any subset of its inputs onto any
   contiguous range of its outputs. Here the range is cyclic, so it may wrap
   from lane 22 to lane 0.
2. An **enabled OR-tree**: each group ANDs its registered outputs with its
   *Input Select* mask, and lane q of the bus is the OR of lane q of all groups.

Software hands each group with chosen wires its own slice of lanes, one slice
after the other. The slices add up to at most 23 lanes, so any selection of up
to 23 wires fits, however it is spread over the groups.

`rtl/hyperconcentrator.sv` is made only of 2:1 multiplexers. Each mux has its
own routing flip-flop. It has two parts:

**Compaction** (CS = log2(CW) stages over CW = 32 positions, X padded to a
power of two). A chosen input i has z<sub>i</sub> unchosen inputs below it.
It must move down by z<sub>i</sub>, to position i − z<sub>i</sub>. It moves
by the binary digits of z<sub>i</sub>, least significant first: in stage s it
moves down by 2<sup>s</sup> if bit s of z<sub>i</sub> is set. In stage s the
mux at position j outputs either its own input (bit 0) or the signal at
j + 2<sup>s</sup> (bit 1). Two chosen signals never compete for the same mux
in any stage. Afterwards the chosen signals occupy positions
0 … cnt−1, in input order.

**Rotation** (RS = ceil(log2 M) = 5 stages of M muxes). Stage s rotates by
2<sup>s</sup> mod M. Setting all muxes of stage s to bit s of an offset `off`
moves position d to (d + off) mod M.

Routing bits for one group with chosen set S and offset `off`:

* compaction bit at index `s*CW + p` is 1 when a chosen input passes from
  position p + 2<sup>s</sup> to p in stage s, i.e. for every chosen i with
  bit s of z<sub>i</sub> set, p = i − (z<sub>i</sub> mod 2<sup>s+1</sup>);
  all others 0;
* rotation bits `CS*CW + s*M + j` = bit s of `off`, for all j.

The control direction uses `rtl/hyperconcentrator_rev.sv`, the same network
run backwards. First come the rotation stages, each taking from
j + 2<sup>s</sup>. Then the expansion stages run s = CS−1 … 0, and the mux at
position j takes from j − 2<sup>s</sup>. Its compaction bit is set at
p = i − (z<sub>i</sub> mod 2<sup>s</sup>) for every chosen i with bit s of
z<sub>i</sub> set. The rotation bits are again the bits of `off`. The package
`tb/hc_route_pkg.sv` implements both formulas (`hc_fwd_cfg`, `hc_rev_cfg`)
and is what the testbenches use as routing software.

At the default size one group has 275 routing bits: 5 x 32 compaction bits
plus 5 x 23 rotation bits. Some compaction bits belong to muxes that cannot
exist (j + 2<sup>s</sup> ≥ 32). Those bits are simply unused.

## Observe path

`obs_group` holds one group's configuration flip-flops, its
hyper-concentrator and the 23 output registers. The registers let the network
run at the chip's clock. The group ANDs those registers with its Input Select
mask. `observe_network` instantiates K = ceil(7200/23) = 314 groups and ORs
them into the bus. An observed wire appears on the bus **one clock** after it
changes.

Rule for software: two groups must never enable the same lane, or their
signals are ORed together. An assertion in `observe_network` (and in
`control_network`) checks this every clock. When re-routing, first clear the
Input Select of every group that is being moved, then write the new slices.

## Control path

The PLC drives, per lane, an override *value* and an override *enable*. The
control bus is broadcast to every `ctrl_group`. Each group:

1. ANDs the bus with its Input Select mask (lanes it owns);
2. spreads its slice back onto its chosen wires through the mirrored
   hyper-concentrator (2 bits per signal);
3. registers the result;
4. clears the enable of every wire not in its *target mask*. Running a mux
   network backwards can leave copies of a lane on unchosen outputs, and the
   mask removes them;
5. drives `sig_o = enable ? value : sig_i` for each wire.

An override reaches the sink **one clock** after it is on the control bus.
Wires that are not overridden pass from `sig_i` to `sig_o` combinationally.
Observation taps `sig_i`: the PLC sees what the source block drove, before
any override.

Observe and control have separate routing bits. The observed set and the
controlled set are independent.

## PLC interface buffer and timing

The PLC fabric runs slower than the chip. `interface_buffer` gives every lane
R_MAX = 4 flip-flops with enable in each direction. A run-time ratio
r ∈ {1, 2, 3, 4} selects how many chip clocks make up one PLC clock; r = 1 is
the bypass. The PLC clock is represented by `plc_ce_o`: it is high in one
chip cycle out of r, and the PLC registers its inputs and outputs at the end
of that cycle. A truly asynchronous PLC clock would need a mixed-timing
synchroniser, which is not part of this design.

| direction | what the buffer does | timing |
|---|---|---|
| observe | in phase p of a frame, the bus sample is written into slot p of the lane | in a `plc_ce_o` cycle, slot s holds the bus value of r − s clocks earlier, so slot 0 is the oldest |
| control | at the end of each `plc_ce_o` cycle, the PLC's word of r {value, enable} pairs per lane is loaded, then shifted out one pair per clock | slot s is on the control bus s + 1 clocks after loading |

End to end: a wire that changes in cycle n is on the bus in cycle n+1. It
reaches the PLC in the first `plc_ce_o` cycle after the frame that holds
cycle n+1 has been filled. An override slot s loaded at the end of cycle L
acts on `sig_o` in cycle L + 2 + s.

Pin budget at the defaults: 23 × 4 = 92 PLC inputs and
23 × 4 × 2 = 184 PLC outputs. Both fit a core with 384 I/O split evenly
between inputs and outputs.

## Configuration

There is one write-only port: `cfg_we_i`, `cfg_addr_i`, `cfg_wdata_i`
(32 bits). It is meant to be driven by the on-chip processor over the existing
bus or network-on-chip. A write takes effect at the next clock edge.

`cfg_addr_i = {space[1:0], group[clog2(K)-1:0], word[3:0]}` (15 bits at the
defaults).

| space | target | word w holds |
|---|---|---|
| 0 | observe group `group` | configuration bits 32w … 32w+31 |
| 1 | control group `group` | configuration bits 32w … 32w+31 |
| 2 | global, group 0 word 0 | bits [2:0]: clock ratio r (reset 1) |

Bit layout of a group, with HB = CS·CW + RS·M = 275 routing bits:

* observe (298 bits, 10 words): `[HB-1:0]` routing, `[HB+M-1:HB]` Input Select
* control (321 bits, 11 words): `[HB-1:0]` routing, `[HB+M-1:HB]` Input Select,
  `[HB+M+X-1:HB+M]` target mask

Reset (synchronous, `rst_ni` low) clears all configuration. Nothing is then
observed (all PLC pins read 0) and nothing is overridden.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N_SIG` (pdbg_top) | 7200 | observable/controllable wires |
| `M` | 23 | bus lanes = wires observed (and controlled) at once |
| `X` | 23 | wires per group (per IP block); must be ≤ M |
| `R_MAX` | 4 | largest chip : PLC clock ratio |
| `K` | ceil(N_SIG/X) = 314 | groups, derived |

The last group is padded with constant inputs, and synthesis removes what
they feed. The wires of an IP block with fewer than X wires can be padded the
same way.

## Files

| file | contents |
|---|---|
| `rtl/pdbg_pkg.sv` | sizes, configuration layout, address spaces |
| `rtl/hyperconcentrator.sv`, `rtl/hyperconcentrator_rev.sv` | forward and mirrored switching networks |
| `rtl/obs_group.sv`, `rtl/observe_network.sv` | observe side |
| `rtl/ctrl_group.sv`, `rtl/control_network.sv` | control side |
| `rtl/access_network.sv` | both networks + configuration decode |
| `rtl/interface_buffer.sv` | PLC-side buffers, frame timing |
| `rtl/pdbg_top.sv` | top level |
| `tb/hc_route_pkg.sv` | routing software (computes routing bits) |
| `tb/plc_model.sv` | behavioural PLC running a transition counter and an override generator |
| `tb/pdbg_checker.sv` | end-to-end stimulus and checks |
| `tb/tb_*.sv` | self-checking testbenches, one per block, plus full-size |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=F` and ends. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  rtl/pdbg_pkg.sv tb/hc_route_pkg.sv tb/tb_pdbg_top.sv --top-module tb_pdbg_top
./obj_dir/Vtb_pdbg_top
```

The two packages are listed explicitly; Verilator finds the modules through
`-y`. Replace the testbench for the others:

* `tb_hyperconcentrator`, `tb_hyperconcentrator_rev`: random selections and
  offsets on 23×23 and 5×8 networks. The expected lane of each wire is
  computed directly as (off + rank) mod M.
* `tb_observe_network`, `tb_control_network`, `tb_access_network`: 6 groups of
  5 wires, 8 lanes, random routings including wrapping slices. Every lane and
  every wire is checked every clock.
* `tb_interface_buffer`: all ratios 1–4. It checks frame period, slot contents
  and control slot timing cycle by cycle.
* `tb_pdbg_top`: 230 wires. It checks: quiet after reset, routing A in bypass,
  then routing B at 4:1 with a transition-counting window on the PLC model,
  whose counts must equal the transitions driven. It also counts that every
  mechanism occurred: bypass and 4:1 frames, wrapping slices, overrides,
  pass-through, ratio switch, reconfiguration.
* `tb_pdbg_top_full`: the same run with `pdbg_top` at its defaults (7200
  wires, 314 groups). Verilator needs several minutes and about 4 GB to build
  it, and the run takes seconds.

## Departures and own choices

* **Hyper-concentrator construction.** The source uses a published recursive
  construction (Narasimha) without describing it. The compaction-plus-rotation
  network here is a replacement. It keeps the stated cost model: 2:1 muxes,
  one routing flip-flop with enable per mux. Its mux count is not that of the
  original.
* **Control side.** The source only says a mirror of the observe network is
  used. Added here:
  * the {value, enable} lane pair;
  * the override multiplexer;
  * the target mask;
  * separate routing bits for the control side.
* **Interface buffer.** Only its size is known: 4:1 storage per PLC pin,
  flip-flops with enable, optional. The frame/slot timing, the control-side
  parallel-to-serial buffer, the bypass and the `plc_ce_o` clock model are
  this design's. Mixed-timing (asynchronous) operation is not supported.
* **M = 23.** Taken as the number of lanes in each direction, for a PLC with
  192 inputs and 192 outputs. The pin arithmetic above is one consistent
  reading of that budget, not a documented one.
* **Group size X = 23** (the largest allowed, X ≤ M). This gives 314 groups
  for 7200 wires. Real IP blocks have varying pin counts; map them onto groups
  and pad.
* **Configuration port and address map, reset behaviour** are this design's.
  No readback is provided.
* **Not included:** the PLC itself (a commercial embedded FPGA; here only a
  behavioural stand-in for tests), the processor, the on-chip bus or
  network-on-chip, the optional JTAG access to the PLC, and the IP blocks
  being debugged. Area figures (the source reports the network and PLC area
  as a percentage of 5M–80M-gate chips) are not reproduced here.
