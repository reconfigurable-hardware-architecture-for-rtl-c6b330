# Reconfigurable descriptor extraction for SURF

SURF feature matching describes the interest points of two images and then
compares the descriptors. Descriptor extraction dominates the run time, so a
hardware implementation gives each image its own extraction unit with
several descriptor accelerators. The two units only finish together when both
images have about the same number of interest points. When one image has
fewer, its unit finishes early and its accelerators sit idle while the other
unit is still working.

This RTL removes that idle time without adding accelerators. Each unit's
input memory (interest points) and output memory (descriptors) is split into
two halves, and each half has its own switch logic. A multiplexer in front of
every accelerator can couple it to any of the four halves. When one unit runs
out of interest points, a reconfiguration unit re-couples the accelerators:

* the busy unit's two accelerators share half 0 of the busy unit;
* the idle unit's two accelerators share half 1 of the busy unit.

From then to the end of the job all four accelerators work on the busy
image. A job with `N_A` and `N_B` interest points then takes about
`(N_A + N_B) / 4` point times. A fixed pair of units takes
`max(N_A, N_B) / 2`. The saving is `(N_A - N_B) / (2 N_A)` for `N_A >= N_B`,
which tends to 50 % as the smaller image gets smaller.

```
             unit A (image A)                       unit B (image B)
   +------------------------------+      +------------------------------+
   | IP half A0 | IP half A1      |      | IP half B0 | IP half B1      |
   | DS half A0 | DS half A1      |      | DS half B0 | DS half B1      |
   | switch A0  | switch A1       |      | switch B0  | switch B1      |
   +-----^------------^-----------+      +-----^------------^-----------+
         |            |   four-way crossbar    |            |
   +-----+------------+------------------------+------------+-----+
   |  acc_port A.0   acc_port A.1        acc_port B.0   acc_port B.1 |  <- sel_target
   +------|--------------|--------------------|--------------|-----+     from
      accel A.0      accel A.1            accel B.0      accel B.1       reconf_unit
```
IP = interest point memory, DS = descriptor memory. The accelerators are
outside `surf_desc_top`.

## Why splitting the memories in halves balances the load

Before reconfiguration, accelerator slot k of a unit works only on half k of
its own unit. Interest point `i` is stored in half `i mod 2`, so both halves
of a unit hold the same number of points (half 0 has one more if the count is
odd). Both halves also drain at the same rate. When the smaller unit has
handed out its last point, the larger unit's two halves therefore have equal
work left. Each half then gets two accelerators, which keeps all four busy
until both halves are empty at about the same time. That is where the
`(N_A + N_B) / 4` comes from.

The switch is triggered when a unit has *handed out* all its points. Its
accelerators may still be working on their last ones. A port takes a new
coupling only between interest points. Each accelerator therefore finishes
its current point, writes the descriptor to the half that point came from,
and only then starts fetching from its new half. The same rule applies to the
busy unit's slot 1, which moves from its half 1 to its half 0.

If both units run dry in the same cycle, there is no reconfiguration. The
mode is held until the next start. Only one switch is made per job.

## Blocks

| module | role |
|---|---|
| `surf_pkg` | shared sizes and types: `ip_t` (interest point record), `desc_word_t`, `half_id_t` (`{unit, half}`), `mode_e` |
| `surf_desc_top` | the fabric: two `desc_unit`s, four `acc_port`s, the `reconf_unit`, and the crossbar wiring between ports and halves |
| `reconf_unit` | starts and ends a job (`run`, `done`), chooses the mode and gives each accelerator its coupling target |
| `acc_port` | the multiplexer of one accelerator. It fetches a point from the coupled half, hands it to the accelerator, and steers the descriptor words back to that point's half |
| `desc_unit` | memory side of one extraction unit: two input halves, two output halves, one `half_switch` per half, and the host ports |
| `half_switch` | switch logic of one half. It hands out rows in order to requesting ports (round-robin) and arbitrates descriptor writes (round-robin). It reports `exhausted` and `complete` |
| `rr_arbiter` | round-robin arbiter used by `half_switch` |
| `ip_mem_half` | 4096 x 64-bit interest point RAM (32 kB), synchronous read |
| `desc_mem_half` | 4096 x 64 x 32-bit descriptor RAM (1 MB), synchronous read |

### The path of one interest point through a port

`acc_port` steps through these states:

1. `IDLE`: latch the coupling target. If the job runs and that half still has
   points, go to `REQ`.
2. `REQ`: request from the half until it grants. Fall back to `IDLE` if the
   half runs dry first or the target changes.
3. `WAIT`: one cycle for the synchronous RAM read. The record and its row
   arrive from the half.
4. `IP`: offer the record to the accelerator (`acc_ip_valid`/`acc_ip_ready`).
5. `DESC`: pass `DESC_WORDS` words (`acc_d_valid`/`acc_d_ready`) to the
   half's switch as writes to `{row, word}`. `acc_d_ready` is the switch's
   write grant, so the accelerator stalls while the switch serves another
   port.

Each accelerator has one point in flight. Outside the accelerator's own time,
a point costs about 6 cycles of overhead plus `DESC_WORDS` write cycles.

### Memory sizes

A unit has a 64 kB input memory and a 2 MB output memory. With an 8-byte
interest point record and a descriptor of 64 words of 32 bits (256 bytes),
both memories hold 8192 points. Each half therefore has 4096 rows (`ROWS`).
The record layout is `{x, y, scale, orientation}`, 16 bits each, and the
accelerators interpret it. The 16-bit position fields cover the 640 x 480
images the memories are sized for.

## Interfaces of `surf_desc_top`

Parameters: `ROWS` (default 4096) and `DESC_WORDS` (default 64). All ports
are plain packed arrays indexed by unit (`[1:0]`) or accelerator
(`[3:0]` = `{unit, slot}`).

* Host load: write point `i` of unit `u` with `ip_we[u]`,
  `ip_waddr[u] = i` (0..8191) and `ip_wdata[u]`. Then set `ip_count[u]`.
* Start: pulse `start` for one cycle while `busy` is low. Both units start
  together. The counts are sampled at the start.
* End: `busy` falls and `done` pulses once every descriptor word of both units
  has been written.
* Readback: word `w` of point `i` is at `d_raddr[u] = {i, w}`. `d_rdata[u]`
  follows one cycle later.
* Status: `mode` (`MODE_NORMAL`, `MODE_A_HELPS_B`, `MODE_B_HELPS_A`) and
  `coupling[a]`, the half each accelerator is working on.
* Accelerator `a`: `acc_ip_valid`, `acc_ip`, `acc_ip_ready` carry the point
  in. `acc_d_valid`, `acc_d_data`, `acc_d_ready` carry its `DESC_WORDS` words
  out, in order. The accelerator may take any number of cycles.

Do not change the memories during a job. Each `desc_unit` checks with an
assertion that its count fits its memories.

## What is not here

The SURF accelerators are not part of this RTL. A real one samples Haar
wavelet responses of the integral image around the point and sums them into
4 x 4 sub-regions. The architecture reuses existing accelerators, and
neither their internals nor their image access are defined here. The
testbenches use `tb/surf_acc_model.sv` instead. The model waits a fixed
latency and returns a hash of the record for each word, which is enough to
check that every descriptor lands in the right place.

The interest point detector that fills the input memories is also outside
this RTL, and so is the matcher that reads the descriptors.

## Performance

At full size (`surf_desc_full_tb`), image A has 4796 points, and image B has
from 4796 down to 241. The accelerator model takes 4000 cycles per point. The
reference time is a fixed pair of units, measured from the equal-count job.
The expected saving is `(N_A - N_B)/(2 N_A)`.

| N_B | ratio | cycles | saving vs fixed pair | expected |
|---|---|---|---|---|
| 4796 | 1:1.00 | 9,755,066 | 0.00 % | 0.00 % |
| 2420 | 1:0.50 | 7,376,097 | 24.39 % | 24.77 % |
| 1594 | 1:0.33 | 6,551,066 | 32.84 % | 33.36 % |
| 1204 | 1:0.25 | 6,158,577 | 36.87 % | 37.44 % |
| 958 | 1:0.20 | 5,914,271 | 39.37 % | 40.00 % |
| 503 | 1:0.10 | 5,393,382 | 44.71 % | 44.71 % |
| 241 | 1:0.05 | 5,129,096 | 47.42 % | 47.45 % |

The remaining shortfall comes from the shared write port of a half. After
reconfiguration, two accelerators share one half. With equal latencies they
tend to finish together and then take turns on the half's single write port,
which costs up to `DESC_WORDS` cycles per point. With a 400-cycle model this
costs about 3 to 5 points of saving. With a real accelerator, which needs
hundreds of thousands of cycles per point, the cost is negligible.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `ip_mem_half_tb`, `desc_mem_half_tb` | full write/readback, read latency, hold |
| `half_switch_tb` | random requests and writes against a reference model: round-robin order, row hand-out, write mux, `exhausted`/`complete` |
| `acc_port_tb` | random halves and accelerator: each descriptor word goes to the half its point came from; coupling never changes while a point is held |
| `reconf_unit_tb` | start/run/done, mode decisions, coupling in each mode |
| `desc_unit_tb` | even/odd split of points over the halves, counts, readback by point number |
| `surf_desc_top_tb` | end-to-end at `ROWS=32`, `DESC_WORDS=8`, eight jobs including empty units, all descriptors checked, job time against `(N_A+N_B)/4`. It also requires each mechanism at least once: A helps B, B helps A, no switch, cross-unit coupling, deferred coupling, write stall, empty unit |
| `surf_desc_full_tb` | default parameters, the seven image pairs above, all descriptors checked, savings within 2 points |

To run one with Verilator (packages first):

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/surf_pkg.sv tb/surf_tb_pkg.sv rtl/rr_arbiter.sv rtl/ip_mem_half.sv \
  rtl/desc_mem_half.sv rtl/half_switch.sv rtl/desc_unit.sv rtl/acc_port.sv \
  rtl/reconf_unit.sv rtl/surf_desc_top.sv tb/surf_acc_model.sv \
  tb/surf_desc_top_tb.sv --top-module surf_desc_top_tb
./obj_dir/Vsurf_desc_top_tb
```

The full-size test runs in under a minute. It keeps about 4 MB of descriptor
memory in the simulator.

## Design choices and departures

These follow the architecture:

* two units of two accelerators each;
* 64 kB / 2 MB memories per unit, split into equal halves;
* multiplexers per accelerator and switch logic per half;
* the idle unit's accelerators coupled to one half of the busy unit, the busy
  unit's accelerators to the other half.

These are this design's own:

* the 8-byte record and 32-bit descriptor words;
* the even/odd distribution of points over the halves;
* the trigger, which is all points handed out, with re-coupling deferred to
  the end of each point;
* round-robin arbitration with one read and one write per half per cycle;
* valid/ready handshakes;
* the host interface;
* asynchronous active-low reset of the control state (the memories are not
  reset).

Departures and limits:

* Only one reconfiguration per job. If the busy unit's half 0 runs dry
  before its half 1, its two accelerators wait rather than move again. With
  the even/odd split and accelerators of equal speed, the halves differ by
  about one point at the switch, so this costs about one point time.
* A half serves one read and one write per cycle. This is ample for real
  accelerator latencies, but it shows up with very fast accelerators (see
  Performance).
* The base (fixed) architecture is not built. Its time is computed from the
  equal-count job.
