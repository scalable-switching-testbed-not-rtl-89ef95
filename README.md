# Time-driven crosspoint switch controller

A packet switch normally stops every bit stream: it buffers each packet, reads
its header and queues it for an output. This design switches IP traffic
without doing that. The switch fabric is built from off-the-shelf electronic
crosspoint chips (144 x 144 ports, a few Gb/s per port) that connect inputs to
outputs as plain serial wires. What turns them into a packet switch is
*time*: every switch in the network shares a common time reference taken from
the UTC second (GPS 1PPS and 10 MHz), the second is cut into short
time-frames, and at every time-frame boundary all crosspoints change their
input-to-output permutation according to a schedule fixed in advance.
Upstream equipment places packets into the right time-frames, so a packet
crosses the switch during the time-frame in which its path is connected and
is forwarded unchanged (pipeline forwarding).

The RTL here is the part of such a switch that is digital logic: the
**switch controller**. It keeps the time-frame grid locked to GPS and, in
every time-frame, loads the next time-frame's permutation into all crosspoint
chips and makes them apply it together at the boundary. The crosspoint chips,
the GPS receiver and the optics are bought parts; the testbenches contain
behavioural models of the chips and of the two-stage fabric they form.

## The time grid

| quantity | value |
|---|---|
| super cycle | 1 UTC second, starts at the 1PPS rising edge |
| time cycles per second | 80 |
| time-frames per time cycle | 1000 |
| time-frame length | 1 s / 80,000 = 12.5 us = 125 cycles of the 10 MHz reference |

The schedule is periodic in the time cycle: time-frame *t* of every time
cycle uses the same permutation, so the table holds 1000 permutations. With
1000 different permutations per cycle, a flow that cannot be routed in one
time-frame (the Banyan fabric can block) can usually be routed in another,
which is why a cheap blocking fabric suffices.

`ctr_timer` derives the grid. The GPS 10 MHz (squared) and 1PPS enter through
two-flip-flop synchronisers, so the controller clock `clk` is independent of
GPS. The first 1PPS edge starts time-frame 0 of time cycle 0 and counts as
reference tick 0; every 125 further reference edges start the next
time-frame. Since the 10 MHz reference is cycle-locked to 1PPS (exactly
10,000,000 cycles per second), the next 1PPS edge must coincide with the
reference edge that ends the second. The timer checks this:

* 1PPS on time: nothing special, `sc_start` marks the new second.
* 1PPS at any other reference edge: the grid is restarted at time-frame 0
  (`pps_slip` pulses). The time-frame in progress is cut short.
* no 1PPS at the end of a second: the grid continues from the 10 MHz
  reference alone (`pps_missing` pulses).
* before the first 1PPS: `locked` is low and the controller does nothing.

Time-frames and time cycles are numbered from 0 in the RTL.

## How a permutation reaches the chips

This is the core of the design and the part worth reading twice.

Each crosspoint chip has two ranks of configuration registers. Writes
(address = output number, data = input number) go into the first rank and do
not disturb the traffic. A falling edge of the shared **strobe** copies the
first rank into the second, and all outputs switch at once (the chips do this
in under 10 ns). The controller uses this to keep the fabric switching while
it prepares the next permutation:

```
time-frame          |<------------- t ------------->|<----------- t+1 ----
tf_start            _/‾\_____________________________/‾\___________________
table reads (t+1)      |out0 out1 ... out143|
xp_wr / xp_addr           |0  1 ... 143|
xp_strobe           ‾‾‾\_________________________/‾‾‾‾‾\__________________
                        ^ chips apply t          ^ all of t+1 written
                                                       ^ chips apply t+1
```

* At the start of time-frame *t* the writer (`xp_config_writer`) lets the
  strobe fall, which applies the permutation of *t* written during *t-1*.
* It then reads the 144 table rows of time-frame *t+1* (mod 1000), one per
  clock, and puts each on the bus: `xp_addr` is the output number, shared by
  all chips; `xp_data` has one byte lane per chip, so all 64 chips are written
  in the same 144 cycles; `xp_wr` qualifies each write.
* One cycle after the last write the strobe rises: the first ranks now hold
  the complete permutation of *t+1*, which the next falling edge applies.

From the clock edge that samples `tf_start` (edge 0): first write after edge
3, last write after edge 146, strobe high after edge 147. A time-frame must
therefore be at least 147 controller clocks long. At 100 MHz it is 1250.

**Late configuration.** If a time-frame starts before the strobe has risen
(a controller clock too slow, or a 1PPS resync that cut a time-frame short),
the strobe is simply not lowered: the chips keep the permutation they have
for one more time-frame, `cfg_late` pulses, and the writer starts over with
the following time-frame. A half-written first rank is never applied.

## The schedule table

`xp_config_table` holds, for each of the 1000 time-frames and each of the 144
chip outputs, the input number for every chip: 64 byte-wide memories (one per
chip) sharing one address, row = `tf * 144 + out`. One read gives exactly the
data-bus word for one output. Reads have one cycle of latency. At the default
size this is 144,000 rows x 64 bytes = 73.7 Mbit, which in a real build means
external SRAM or fewer chips per controller.

The host port (`cfg_we`, `cfg_tf`, `cfg_out`, `cfg_lane_en`, `cfg_data`)
writes one row, with a per-chip enable so that one chip's entry can be changed
alone. It may be used while switching: a row is read one time-frame before
the time-frame it describes, so rows of time-frames other than the next one
can be rewritten safely. The memory is not reset; load every row before the
first 1PPS.

## The fabric it drives

The default sizes are those of a 10 Tb/s module: a two-stage Banyan network
with 32 chips per stage (`NUM_XP = 64`). Each chip is used as 32 x 32 ports of
10 Gb/s, each port carried on 4 wires of 3.2 Gb/s, so 128 of its 144 lanes
are used; 1024 ports x 10 Gb/s = 10 Tb/s. Output port *o* of first-stage chip
*i* is wired (optically) to input port *i* of second-stage chip *o*. The
controller itself does not know this wiring: the table simply holds one input
number per chip output, and whoever computes the schedule accounts for the
topology and for the 4-wire bundling. The testbench model
(`tb/banyan_fabric_model.sv`) uses this wiring with chip numbers 0-31 as the
first stage and 32-63 as the second.

## Files

| file | contents |
|---|---|
| `rtl/tds_pkg.sv` | default sizes (10 MHz, 1000 x 80 grid, 144 ports, 64 chips), width helpers |
| `rtl/sync_edge.sv` | synchroniser and rising-edge detector for the GPS signals |
| `rtl/ctr_timer.sv` | time-frame / time-cycle counters locked to 1PPS + 10 MHz |
| `rtl/xp_config_table.sv` | the schedule memory |
| `rtl/xp_config_writer.sv` | table-to-bus sequencer and strobe |
| `rtl/tds_switch_controller.sv` | top: the three blocks wired together |
| `tb/xp_chip_model.sv` | behavioural crosspoint chip (two-rank configuration, token lanes) |
| `tb/banyan_fabric_model.sv` | two stages of chip models with the Banyan wiring |
| `tb/tb_*.sv` | self-checking testbenches, one per block, plus a full-size one |

Parameters of the top: `REF_HZ` (10,000,000), `TF_PER_TC` (1000), `TC_PER_SC`
(80), `NUM_XP` (64), `XP_PORTS` (144). The time-frame length is
`REF_HZ / (TF_PER_TC * TC_PER_SC)` reference cycles and must be at least 2.

## Simulating

Everything is plain SystemVerilog-2017; the testbenches use only `$urandom`
and need no other files. With Verilator 5, from the project root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/tds_pkg.sv tb/tb_tds_switch_controller.sv --top-module tb_tds_switch_controller
./obj_dir/Vtb_tds_switch_controller
```

Replace the testbench name to run another one. Each prints
`TB_RESULT checks=N failures=M`.

* `tb_ctr_timer`: reduced grid; an independent model predicts every
  time-frame start, its indices and flags, and its exact latency (three clock
  edges after the reference edge); covers lock, rollovers, missing and early
  1PPS.
* `tb_xp_config_table`: random writes with lane enables and random reads
  against a shadow copy.
* `tb_xp_config_writer`: bus writes in order with the right data, strobe
  timing to the cycle, the minimum time-frame length of `XP_PORTS + 3`
  cycles, late configurations and their effect on chip models.
* `tb_tds_switch_controller`: end to end on a reduced fabric (2 x 4 chips of
  10 lanes, 2 wires per port, 6 x 2 time-frames per second). A different
  permutation per time-frame is loaded; at every time-frame start all fabric
  outputs are checked against the permutation that should be active. It makes
  each mechanism happen and counts it: lock, applied configuration,
  time-cycle wrap, on-time 1PPS, missing 1PPS, early 1PPS, late
  configuration, host update while running.
* `tb_tds_switch_controller_full`: the top at its default parameters, 64
  chip models in the 10 Tb/s arrangement, 100 MHz controller clock. Loads all
  144,000 rows, locks on 1PPS and runs one full time cycle plus a few
  time-frames (about 1.3 million clocks, some 10 s of simulation),
  checking all 4096 fabric lanes in every time-frame, the 1250-clock
  time-frame length and a schedule change made while switching. A whole UTC
  second is 80 times longer and is not simulated at this size; second
  boundaries are covered by the reduced tests.
* `tb_pf_testbed` and `tb_pf_metro6`: whole networks, built by
  `tb/pf_chain_harness.sv` from several controllers sharing one GPS. A source
  sends two flows in alternate time-frames (with a guard interval at each
  end of the time-frame); links delay the streams by whole time-frames; each
  node's schedule is the source's shifted by its delay from the source.
  Two-chip nodes split the flows onto two channels and merge them again, the
  last node hands each flow to its own receiver. `tb_pf_testbed` is a
  two-switch setup with a 25 km fibre between them (taken as 10 time-frames,
  about 125 us); `tb_pf_metro6` is a six-node chain with four such fibres.
  Both check that every token reaches the right receiver, in order, and that
  none is lost, although no node ever stores a token.

## Design choices beyond the published description

The published system gives the blocks (GPS receiver, FPGA controller with a
configuration table, crosspoint chips), the time grid, the three signal types
between controller and chips (address, data, strobe) and the rule that the
writes must finish before the strobe's falling edge that starts the next
time-frame, which then applies the new configuration. The following are this
design's own:

* a controller clock separate from the 10 MHz reference (100 MHz intended),
  with synchronisers on both GPS inputs, and the assumption that a 1PPS edge
  coincides with a 10 MHz edge;
* the parallel bus shape: shared address, one data-bus byte lane per chip,
  and a write enable that the description does not list;
* the strobe rising after the last write, and the late-configuration rule;
* the slip and holdover handling of 1PPS;
* the table organisation, its one-cycle read and the host port;
* time-frames numbered from 0 (the original numbers them 1 to 1000).

The crosspoint chip model reproduces only the configuration behaviour
described for the real part (writes into a first rank, applied at the strobe's
falling edge) and carries tokens instead of serial bits; input equalisers,
clock recovery and the chip's actual register map are not modelled, so the
bus signals here will need adapting to a specific device's datasheet.

## Not included

* Input alignment buffers. The general architecture allows an input buffer of
  up to one time-frame (about 15 KB at 10 Gb/s) to align arriving time-frames,
  or to delay them for non-immediate forwarding; the prototype this design
  follows switches the serial streams without buffering, relying on packets
  arriving in their time-frames.
* The network interface that releases packets into scheduled time-frames, the
  pipeline-forwarding router, the GPS receiver and the optical links.
* Schedule computation (routing through the Banyan fabric): the table is
  filled from outside.
* The GPS receiver's time-of-day output: the controller needs only the
  second boundaries and the 10 MHz count, so it does not read the date and
  time.
* The 160 Tb/s variant with 2 x 128 chips works with `NUM_XP = 256` if its
  chips accept the same bus; that has not been simulated.
