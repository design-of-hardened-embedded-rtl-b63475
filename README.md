# Self-healing multi-FPGA platform: distributed reconfiguration controllers

SRAM-based FPGAs are cheap and flexible, but in radiation environments their
configuration memory gets upset, and over a mission the silicon itself wears
out. This design makes a board of several FPGAs repair itself. It handles
two kinds of fault:

* **Recoverable faults.** These are transient upsets. Reloading the same
  configuration clears them.
* **Non-recoverable faults.** These are permanent damage. The affected logic
  must move to spare fabric, so a different configuration is needed.

The application runs on every FPGA split into *independently recoverable
areas* (IRAs). Each IRA is triplicated and voted. It keeps working through a
single faulty replica and raises an error signal when one appears. There is no
central supervisor. Each FPGA also holds a **Reconfiguration Controller** that
watches the error signals of one neighbour FPGA. When one of them fires, the
controller decides whether the fault is recoverable. It then fetches the
matching pre-computed bitstream from a serial PROM and reprograms the
neighbour over JTAG. The controller is hardened too. Its own error signal is
watched by another controller, exactly like an IRA, so a faulty controller
gets repaired as well.

The RTL covers:

* the controller, all five of its parts plus their hardening;
* the IRA voters;
* the two-rail error checking;
* the four-FPGA top level that ties them into a ring.

The application circuit itself is outside this RTL. The default case has four
FPGAs and an edge-detection/JPEG pipeline. Its replicated outputs enter the top
as ports.

## The ring of watchers

```
   FPGA0 --configures--> FPGA1 --configures--> FPGA2 --configures--> FPGA3
     ^                                                                  |
     +------------------------------configures--------------------------+
```

`multi_fpga_system` instantiates `N_FPGA` FPGAs (default 4). The controller
on FPGA *k* watches and reprograms FPGA *(k+1) mod N_FPGA*, so each FPGA has
exactly one watcher. The watcher of FPGA *m* sees `N = N_IRA + 1` error
pairs:

* pairs `0 .. N_IRA-1` belong to the IRAs of FPGA *m*;
* pair `N_IRA` is FPGA *m*'s own controller, treated as one more area.

With the defaults, `N_IRA = 6`, so `N = 7`. That is the largest number of
areas whose recovery bitstreams fit the 256 MB store of the reference board
(see below). All FPGAs share one clock `clk` and one asynchronous active-low
reset `rst_n`.

For every controller the top brings out:

* its PROM port (`prom_cclk_o`, `prom_reset_o`, `prom_din_i`);
* its JTAG port towards the watched FPGA (`jtag_*`);
* the structural-test handshake for the spare region (`test_req_o`,
  `test_done_i`, `test_pass_i`);
* status: `fault_identified_o`, `fault_nonrec_o`, `faulty_area_o`,
  `config_o`, `busy_o`, `fail_o` and the error pairs.

## Error signals: two-rail pairs

Every error indication travels as a two-rail pair (`rc_pkg::trc_t`):

* rails different (`10` or `01`): no error;
* rails equal (`00` or `11`): error.

This is self-checking. A stuck wire or a broken checker also shows up as an
error instead of hiding one.

* **`tmr_voter`** takes the three replica outputs of an IRA. Each output bit
  is the bitwise majority. For every bit it also forms the pairs
  `(a, ~b)` and `(a, ~c)`. Those pairs stay valid only while all three
  replicas agree.
* **`trc_checker`** reduces any number of pairs to one pair. It uses the
  classic two-rail cell `z1 = a1·b1 + a0·b0`, `z0 = a1·b0 + a0·b1`.

## Deciding what kind of fault it is (`fault_classifier`)

Transient upsets hit areas at random. A permanent defect makes the same area
fail again and again, even after it has been reloaded. The classifier
remembers two things:

* `last_ira`: the area of the previous observation;
* a run counter: how many consecutive observations hit that area.

A fault is declared **non-recoverable when the same area has been the faulty
one in K consecutive observations**. Otherwise it is recoverable.

* `K` defaults to 3. The rule is the document's, but it gives no value for K.
* After a non-recoverable verdict the history is cleared, because the area
  is moving to fresh fabric.
* If several pairs are bad at once, the lowest area wins.

Each observation produces one `fault_identified_o` pulse. The pulse carries
`fault_type_o` and a one-hot `faulty_area_o`. It comes one clock after the
error pair turns invalid.

The classifier only observes while `enable_i` is high. After reporting it
disarms until enable has been low. The Manager holds enable low for the whole
recovery, so the error still present during repair is not counted again.

The classifier checks itself. Its state carries an even-parity bit. A
consistency check confirms that `last_ira` is zero or one-hot and that the
counter is below K. Both checks become two-rail pairs in `err_o`.

## Where the recovery bitstreams are: the configuration tree

This is the least obvious part of the design.

Relocation bitstreams are computed before deployment, not at run time. Every
*sequence* of permanent faults leads to a different floorplan, so each needs
its own configuration. With `N` areas and up to `F` tolerated permanent
faults, the configurations form a complete N-ary tree of depth F:

* configuration 0 is the initial implementation (the root);
* the children of configuration *c* are `c*N + 1 … c*N + N`;
* child `c*N + a + 1` is *c* with area *a* moved to spare fabric.

The store therefore holds `sum_{i=0..F} N^i` configurations
(`rc_pkg::num_bitstreams`). Example with N = 3, F = 2:

```
                 0
        /        |        \
       1         2         3          area 0 / 1 / 2 failed permanently
     / | \     / | \     / | \
    4  5  6   7  8  9  10 11 12       second permanent fault
```

`bitstream_address_calculator` keeps the current configuration (`config_o`)
and the number of permanent faults already handled. On a fault report:

* **Recoverable fault:** the target is the current configuration. The whole
  configuration is reloaded.
* **Non-recoverable fault in area a:** the target is child `c*N + a + 1`,
  which becomes current.
* **A non-recoverable fault after F have been handled:** no configuration
  exists. The block raises `bs_error_o` and the Manager stops in its failure
  state.

The PROM is serial, so it cannot be addressed at random. Configurations are
stored one after another, each behind a one-byte sync marker (`PATTERN`,
default `8'hAA`). To reach configuration *t*, the calculator first rewinds the
Bitstream Module (`bm_rst_o`). It then issues `next_sync_o` and counts the
`sync_i` answers until *t + 1* markers have passed. At that point the PROM
sits on the first byte of the target, and `bs_ready_o` rises.

Stored data must never contain the marker byte.

Seek time grows with the target's position. Each skipped byte costs 16
clocks.

`bitstream_module` reads the PROM:

* one bit per two clocks, sampled as `cclk_o` rises;
* MSB first;
* `reset_mem_o` rewinds the PROM.

Besides the marker search, it serves the Manager's one-byte `read_i`
requests. The answer is a `data_ready_o` pulse, and the byte stays on
`data_o` until the next fetch.

## One recovery, step by step (`manager`)

1. A `fault_identified` pulse arrives, and `enable_o` drops.
2. **Non-recoverable faults only:** `test_req_o` asks for a structural test of
   the spare region and stays high until `test_done_i`. A failed test
   (`test_pass_i` low) ends in the failure state.
3. The Manager waits for `bs_ready_i`. If `bs_error_i` comes instead, it
   enters the failure state.
4. It raises `prog_o`. The Reconfiguration Interface opens a JTAG session.
5. For each of `BS_BYTES` bytes:
   * `read_o` pulse;
   * wait for `data_ready_i`;
   * wait for `rdy_i` from the interface;
   * `load_o` pulse. The interface takes the byte straight from the
     Bitstream Module's data bus.

   The next read starts right after a load, so fetching overlaps shifting.
   One byte costs about 19 clocks in all.
6. After the last byte is accepted, `prog_o` drops. The Manager waits for
   `done_i` and then re-enables the classifier.

A `rec_error_i` during programming also ends in the failure state. The failure
state is sticky until reset and shows on `fail_o`. `busy_o` is high during a
recovery.

At the default bitstream size (3,838,960 bytes, a full xc4vlx100 image), one
reload takes about 73 million clocks.

## Programming the neighbour over JTAG (`reconfiguration_interface`)

A rising edge of `prog_i` starts the session:

1. Test-Logic-Reset, then Shift-IR, and load `CFG_IN`.
2. Shift-DR: every byte from `load_i` is shifted in, MSB first.
3. When `prog_i` falls: Update-DR, then Shift-IR, and load `JSTART`.
4. `START_CLKS` clocks in Run-Test/Idle, then `done_o`.

Points of detail:

* **No padding bit.** The last bit of each byte is held back until the
  interface knows whether another byte follows. This way the final bit of the
  stream is shifted with TMS = 1, and no padding bit enters the device.
* **Clocking.** TCK runs at half the system clock. TMS and TDI change while
  TCK is low, and TDO is sampled on TCK's rising edge.
* **Error check.** While an instruction is shifted, the first two TDO bits
  must be the IEEE 1149.1 capture value `1, 0`. Otherwise the session aborts
  through Test-Logic-Reset and `rec_error_o` rises.

The instruction length and codes default to Virtex-4 values:

| Parameter | Default |
|---|---|
| `IR_LEN` | 10 |
| `CFG_IN` | `0x3C5` |
| `JSTART` | `0x3CC` |

## Hardening the controller itself (`reconfiguration_controller`)

A faulty controller must never reprogram a healthy FPGA wrongly. It must
also report its own faults. Different parts get different protection:

| Part | Protection | Why |
|---|---|---|
| Fault Classifier | self-checking (parity + consistency) | cheapest check for small state |
| Manager, Bitstream Address Calculator, Bitstream Module | duplicated with comparison | detecting a fault is enough: recovery is then blocked |
| Reconfiguration Interface | triplicated and voted (`tmr_voter`) | the programming of the neighbour must stay correct |

In each duplicated pair, copy A drives the outputs and copy B is only
compared. Every compared output bit becomes a two-rail pair `(a, ~b)`. These
pairs, the classifier's check pairs and the voter pair are combined into
`err_o`. That pair is combinational and goes to the watching controller.

A controller that detects an internal error does not stop itself. It only
signals the error, and its watcher repairs it.

## Parameters

| Parameter | Default | Source |
|---|---|---|
| `N_FPGA` | 4 | four xc4vlx100 on the reference board |
| `N_IRA` | 6 | case study: up to 6 IRAs per FPGA; +1 controller = 7 areas |
| `N` (areas per watcher) | 7 | largest area count whose configurations fit 256 MB |
| `F` | 2 | tolerated permanent faults per FPGA in the case study |
| `K` | 3 | chosen; no value given |
| `BS_BYTES` | 3,838,960 | xc4vlx100 bitstream (30,711,680 bits) |
| `PATTERN` | `8'hAA` | chosen marker byte |
| `W` (IRA width) | 8 | chosen |

### Sizing

Each watcher stores `1 + 7 + 49 = 57` configurations. At 3.84 MB each, that is
219 MB, within the 256 MB budget. With 8 areas, `1 + 8 + 64 = 73`
configurations would need 280 MB, which does not fit.

The configuration number needs 6 bits at the defaults.

Other sizes are parameter changes. For example, 15 areas and 3 faults need
3616 configurations and a 12-bit number.

## What follows the source, what is chosen here

**From the reference design:**

* the split into Fault Classifier, Bitstream Address Calculator, Bitstream
  Module, Manager and Reconfiguration Interface, with their signal names;
* the two-rail coding of area errors;
* the K-consecutive-observations rule;
* the recovery sequence: disable, test, locate, `prog`, transfer, `done`;
* `bs_error` when the tolerated fault count is exceeded;
* the off-line configuration count `sum N^i`;
* the hardening split between TMR and duplication with comparison;
* the neighbour-watching organisation;
* the case-study sizes.

**Chosen here, because the source gives the function but not the insides:**

* the tree numbering of configurations and the marker-counting PROM layout;
* the PROM bit timing;
* the parity code of the classifier;
* the priority rule for simultaneous errors;
* `K = 3`;
* the JTAG sequence and its error check;
* the sticky failure state;
* the `test_pass` input;
* the direction of the ring.

**Departures to be aware of:**

* **Whole reloads.** A recoverable fault reloads the whole current
  configuration. The source speaks of reloading only the faulty area's
  portion, but its bitstream count assumes one bitstream per configuration.
  That count was followed.
* **Pacing.** The configuration speed is set by the system clock (TCK = clk/2).
  There is no pacing to a real device's limits.

**Not included:**

* the application circuit and its replicas;
* the structural test of the spare region (only its handshake);
* the PROM itself;
* the FPGA configuration logic.

The testbenches model the last two (`tb/prom_model.sv`,
`tb/jtag_target_model.sv`).

## Files

| File | Contents |
|---|---|
| `rtl/rc_pkg.sv` | shared types, defaults, two-rail helpers, `num_bitstreams` |
| `rtl/trc_checker.sv` | two-rail checker |
| `rtl/tmr_voter.sv` | TMR voter |
| `rtl/fault_classifier.sv` | Fault Classifier |
| `rtl/bitstream_address_calculator.sv` | Bitstream Address Calculator |
| `rtl/bitstream_module.sv` | Bitstream Module |
| `rtl/manager.sv` | Manager |
| `rtl/reconfiguration_interface.sv` | Reconfiguration Interface |
| `rtl/reconfiguration_controller.sv` | hardened controller |
| `rtl/multi_fpga_system.sv` | top level |
| `tb/tb_pkg.sv` | formula for the simulated PROM contents |
| `tb/prom_model.sv`, `tb/jtag_target_model.sv` | behavioural models |
| `tb/tb_<block>.sv` | self-checking testbench per block |
| `tb/tb_multi_fpga_system.sv` | end-to-end test at reduced sizes |
| `tb/tb_full_size.sv` | one full-size recovery at the default parameters |

### Simulated PROM contents

The simulated PROM computes its contents instead of storing them. Data byte
0 of configuration *s* is *s*. Byte *i* is `(37·s + 13·i + i/256) mod 256`,
with any marker value replaced by itself xor 1. This lets the JTAG target
model check every received byte.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself,
including through a watchdog. With Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_multi_fpga_system \
    -y rtl -y tb +libext+.sv rtl/rc_pkg.sv tb/tb_pkg.sv tb/tb_multi_fpga_system.sv
./obj_dir/Vtb_multi_fpga_system
```

Replace the top module and file to run another testbench.

### What the testbenches cover

**`tb_multi_fpga_system`** uses four FPGAs, 2 IRAs plus a controller each,
K = 2, F = 2 and 6-byte bitstreams. It counts the following mechanisms and
fails if any of them never happens:

* outvoted replicas;
* reloads after transient faults;
* relocations after permanent faults, with the structural test;
* two controllers recovering at the same time;
* a fault inside a controller, repaired by its neighbour (one copy of a
  duplicated Manager output is forced);
* a third permanent fault ending in `fail`;
* a failed structural test of the spare region ending in `fail`;
* a JTAG capture error while reprogramming ending in `fail`.

**`tb_full_size`** runs the top with no parameter changes and performs one
complete 3.84 MB reload. It takes about 1.5 minutes of simulation.

### How far to trust it

* Every block's testbench compares against independently computed values:
  * exhaustive two-rail checking;
  * a reference model of the classifier;
  * the PROM formula;
  * a full TAP state-machine model.
* For every block, a deliberately broken copy of the block was made to fail
  its testbench.
* Nothing here has been run on hardware.
* The JTAG sequence follows the IEEE 1149.1 state machine and published
  Virtex-4 instruction codes. It has not been tried against a real device.
