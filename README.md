# Common Merger Module (CMM) for the ATLAS Level-1 Calorimeter Trigger

The Level-1 calorimeter trigger finds electrons, taus, jets and energy sums
every 25 ns bunch crossing. Its processor crates each hold up to 16 modules:
Cluster Processor Modules (CPMs) in the cluster crates, Jet/Energy Modules
(JEMs) in the jet/energy crates. Each module reports a small result word
over the backplane on every clock. The Common Merger Module collects these
words and adds them up. It does this in two stages:

* A **crate CMM** adds the 14 or 16 module results of its own crate. It
  sends the crate sum over a cable to a system CMM.
* A **system CMM** adds the sums of all crates, including its own, and
  sends the final hit counts or energy flags to the Central Trigger
  Processor (CTP).

The same board and this same RTL carry out three summing functions:

* cluster hit counting;
* jet hit counting, with Jet-ET estimation;
* energy summing, with Sum-ET and Missing-ET flags.

Each of these runs at crate level or at system level. Every CMM also records
its inputs and results in scrolling memories, reads them out over a serial
link when a Level-1 Accept arrives, and meters hit rates. It is controlled
over a VME bus.

The design is written in synthesizable SystemVerilog (IEEE 1800-2017). It
runs on one 40 MHz clock and has one asynchronous active-low reset.

## Function selection

The function comes from the module's geographical address. Four pins are
used, GEOADD 6:4 and GEOADD 0:

| GEOADD 6:4 | GEOADD 0 | Function                          |
|------------|----------|-----------------------------------|
| 111, 110, 101 | x     | cluster crate CMM                 |
| 100        | x        | cluster system CMM                |
| 011        | 1 / 0    | jet / energy crate CMM            |
| 010        | 1 / 0    | jet / energy system CMM           |
| 001, 000   | x        | reserved (outputs idle)           |

At reset the pins are copied into the active address and into a bypass
field in the control register. Software can write a different address
into the bypass field and then pulse "reload". The module then behaves as
that function, which stands in for loading another FPGA configuration.
All three algorithm sets sit side by side in `cmm_top`, and the decoded
function chooses which one drives the cable and CTP outputs and the
readout format.

## Input channels

Every received word goes through the same four steps in `cmm_input_chan`:

1. **Playback mux.** The word comes from the link, or from the playback
   memory in playback mode.
2. **Disable mask.** A disabled channel is replaced by zero data with good
   (odd) parity.
3. **Recording.** The masked word and a parity-error flag go to the
   readout memories.
4. **Parity check.** A word with bad odd parity is passed to the algorithm
   as zero.

A channel is one of the following:
* a backplane slot: 24 data bits, odd parity in bit 24;
* a cable word: 24 data bits, parity in bit 24;
* the CMM's own crate sum, after the local pipeline delay;
* an energy component on the cables: 15 or 14 data bits plus an overflow
  bit, with one parity bit per component.

The cluster function also disables slots 0 and 15, because CPMs occupy
slots 1-14.

`parity_monitor` keeps the parity error state:
* one sticky bit per channel: 16 slots, 3 cables, the local crate sum;
* a 16-bit counter of clocks that had at least one error, stopping at
  0xFFFF;
* a status bit that is set while the counter is non-zero.

Clear Errors resets the sticky bits and the counter.

## Hit counting

**Cluster.** Each CPM sends eight 3-bit counts, one per threshold. The crate
CMM adds them per threshold over 14 slots. The system CMM adds three remote
crate sums and its own. All sums stop at 7 (`hit_sum`).

**Jet.** Central JEMs send eight 3-bit main-jet counts. The four forward
JEMs (slots 0, 7, 8 and 15) send eight 2-bit main counts in bits 15:0 and
four 2-bit forward counts in bits 23:16.

* Main sums over all 16 JEMs stop at 7.
* Forward counts are summed per side and stop at 3. Left is JEMs 0 + 8;
  right is JEMs 7 + 15.
* The crate CMM sends two cable words: main counts, and forward counts
  L0-L3 in bits 7:0 with R0-R3 in bits 15:8.

**Jet-ET** (system level, `jet_et_estimator`) turns the final jet counts
into a rough total jet energy:
* A 4096 × 8 table indexed by the four 3-bit counts of thresholds 1-4 gives
  one energy.
* A second table does the same for thresholds 5-8.
* A third table indexed by the four per-threshold forward totals (L + R, 3
  bits each) gives a third.
* The three energies are added into a 10-bit sum.
* The sum is compared against four programmable thresholds. Hit k is set
  when the sum is strictly greater than threshold k.

The resulting 4-bit map goes to the CTP with the main counts.

## Energy summing

This is the most involved function.

**Quad-linear inputs.** A JEM sends Ex, Ey and Et as 8-bit codes:
* a 2-bit scale selects a factor of 1, 4, 16 or 64;
* the 6-bit value is multiplied by that factor;
* the code 0xFF means "saturated".

`quadlin_decode` turns a code into a 12-bit linear value.

**Crate sum** (`energy_crate_sum`). The crate is split into two halves,
JEMs 0-7 and 8-15, which cover opposite quadrants in azimuth. Each half's
values are added without sign. Then:
* Ex = half(0-7) − half(8-15), a 15-bit two's-complement number;
* Ey is formed the same way;
* Et = half(0-7) + half(8-15), a 14-bit unsigned number.

Each component has an overflow bit. It is set when any contributing JEM
was saturated or the magnitude passes 16383. The sum is not clipped: the
overflow bit marks it as not to be trusted. Each component also has an odd
parity bit over its value and overflow bit.

The resulting 50 bits travel over two 25-bit cables:
* cable 0: {px, ox, Ex};
* cable 1: {pt, ot, Et, py, oy, Ey}.

**System sum** (`energy_system_sum`). The system CMM sits in crate 5 and
takes crate 4's sum over the cable. Its totals are:
* Ex = Ex(4) − Ex(5);
* Ey = Ey(4) + Ey(5);
* Et = Et(4) + Et(5).

The sign conventions match the two crates' opposite orientation. The totals
are 17 bits signed for Ex and Ey, and 15 bits for Et. From the totals:
* **Sum-ET.** Hit k is set when Et is above threshold k, or Et overflowed.
* **Missing-ET** (`missing_et_lut`):
  * Clip |Ex| and |Ey| to 11 bits.
  * Choose one of four ranges from the highest set bit of either magnitude.
    The ranges take bits 5:0, 7:2, 9:4 or 10:5 of both.
  * Join the two 6-bit windows into a 12-bit address into a 4096-entry
    table with 32-bit entries. The 8-bit field for the chosen range is the
    8-bit missing-ET hit map.
  * An Ex or Ey overflow forces all eight hits on.

  The table stores an arbitrary function of the two vector components. In
  use, it holds a threshold test on √(Ex² + Ey²).

The CTP word holds the missing-ET map in bits 7:0, the Sum-ET map in bits
11:8, and odd parity in bit 32.

## Timing

All module outputs are registered. Latencies are counted in 25 ns clocks,
from the clock edge that samples the input:

| Path                                            | Clocks |
|-------------------------------------------------|--------|
| backplane → crate cable (all functions)         | 2      |
| cable → CTP, cluster                            | 2      |
| cable → CTP, jet and energy (table lookups)     | 4      |
| own crate sum → CTP                             | 2 + d + (2 or 4) |

The delay d (0-15 clocks, register 0x1C) on the CMM's own crate sum makes
up for the cable delay of the remote crates. With d = 0 the sum goes
straight through without a register. The merger budget of about 5-6 bunch
crossings is met: crate plus system is 4 clocks for the cluster function
and 6 for jet and energy.

## Readout

Every clock, four groups of scrolling memories record one slice:
* the recorded backplane words {error, parity, data};
* the crate cable words;
* the recorded remote cable words;
* a 64-bit system result, whose layout depends on the function.

The memories are 256 deep (`scroll_dpr`). The write pointer advances every
clock. The read pointer stays at write pointer + offset, so the readout
word is the one written 256 − offset clocks earlier. Each memory group has
its own offset register. A TTC broadcast command whose two top bits are 01
sets the write pointer to 0 and the read pointer to the offset, which lines
up all CMMs in the system.

On a Level-1 Accept, `readout_ctrl` takes these steps:
1. It copies the programmed number of slices (1-7, normally at most 5) into
   a 256-slice FIFO, one per clock from the L1A clock on. It also stores
   the bunch-crossing number in a BCN FIFO.
2. It takes an event only if all of that event's slices fit in the FIFO.
   Otherwise the event is dropped and the FIFO-overflow flag FO is raised.
   FO is also raised when an L1A arrives during a copy. FO clears when the
   FIFO empties. A sticky copy, RFO, stays set until Clear Errors.
3. Once the G-Link is ready, `slice_format` turns each slice into 20 pin
   words of 35 bits.
4. The serialiser adds the BCN (bit k on pin k, for pins 0-11) and FO (pin
   14), all in bit 26.
5. It sends each pin LSB first, followed by an odd parity bit over the 36
   bits. That makes 36 clocks per slice.

DAV stays high for the whole event. After the event DAV drops for at least
8 clocks; this DAV gap marks the end of the event.

The default settings give a readout latency of 256 − offset + 2 clocks, as
measured in the top-level testbench.

Pin allocation per function (`slice_format`):
* **Cluster:** pins 0-13 carry slots 1-14. Pins 14-16 carry the remote
  cables, pin 17 the crate sum, and pin 18 the final sums.
* **Jet:** pins 0-15 carry slots 0-15. Pins 16-19 carry the remote and
  local main and forward sub-sums and the totals, with the Jet-ET map and
  the forward totals in the upper bits.
* **Energy:** pins 0-15 carry slots 0-15, with the system totals spread
  over bits 34:27 of pins 0-6. Pins 16-17 carry the remote components and
  the hit maps, and pins 18-19 the crate cable words.

There is a second readout path, the RoI path. It is active on jet and
energy system CMMs and sends one slice per L1A over its own link.

In playback mode the DAQ backplane memories stop recording. The host fills
them over VME, and they replay their 256 words into the input channels in
a loop. This drives the whole design from known data.

## Rate metering

`rate_meter` has 32 saturating 32-bit counters plus a normalisation counter
of bunch crossings, with inhibit and clear:
* counters 0-15 count crossings in which module j reported any unmasked
  hit;
* counters 16-19 count crossings with hits in the local and remote crate
  sums;
* counters 20-31 count system-level threshold hits.

Two mask registers choose which thresholds count.

## VME registers

The bus is reduced to one strobe per access. `vme_dtack` answers every
access one clock later. Byte addresses:

| Address        | Register |
|----------------|----------|
| 0x00 / 0x02    | module ID (2417) / serial and revision |
| 0x04           | control mode: playback (0), GEOADD bypass (4:1), TTC clock enable (5, only when the TTCrx is ready), TTC protect (6), laser disables (7, 8), rate inhibit (9) |
| 0x06           | control pulses: reset module (0), clear errors (9), reload (10, 11), reset rate counters (12) |
| 0x08 / 0x0A    | status (parity, FO, RFO, link and TTC ready) / FIFO empty and full |
| 0x0C / 0x0E    | backplane / cable parity-error latches |
| 0x10 / 0x12    | backplane / cable disable masks |
| 0x14           | parity error counter |
| 0x16-0x1A      | input sampling-phase selects (brought out as ports) |
| 0x1C / 0x1E    | pipeline delay / readout slices |
| 0x20-0x2E      | DAQ and RoI read offsets (four memory groups each) |
| 0x30-0x36      | FIFO pointers |
| 0x50-0x56      | firmware identification |
| 0x60-0x6E      | Sum-ET and Jet-ET thresholds |
| 0x70-0x103     | rate counters, low half first; normalisation last |
| 0x104 / 0x106  | module / crate rate masks |
| 0x1FC          | last TTC broadcast byte |
| 0x1000-0x4FFF  | playback memories, 0x400 bytes per slot (bits 15:0, then 25:16 at +0x200) |
| 0xE000-0xFFFF  | main Jet-ET tables (low byte: thresholds 1-4, high byte: 5-8) |
| 0x10000-0x11FFF| forward Jet-ET table |
| 0x12000-0x15FFF| missing-ET table (bank 0: ranges 0, 1; bank 1: ranges 2, 3) |

Reset Module returns all registers to their power-on values and restarts
the data path.

## Choices made in this design

The following points were not fixed by the module specification and were
settled here:

* **Cable and CTP word layouts.**
  * The parity bit is bit 24 of a cable word and bit 32 of a CTP word.
  * In the energy cable pair, the components are ordered Ex, Ey, Et from
    the least significant bit.
  * The jet forward sums go in the low 16 bits of their cable.
  * On the jet CTP word the Jet-ET map is in bits 27:24; on the energy CTP
    word the hit maps are in bits 11:0.
* **Left and right forward pairs.** JEMs 0 + 8 are taken as left and
  7 + 15 as right. One passage of the specification calls the forward
  JEMs 0, 6, 7 and 15. This design follows the summing description, which
  names 0, 7, 8 and 15.
* **Energy saturation and overflow.** The saturated quad-linear code is
  taken to be 0xFF. An Ex or Ey overflow sets all missing-ET hits.
* **Missing-ET ranges and address.** The four range boundaries and the
  order of the two 6-bit windows in the table address are this design's
  choice.
* **Jet-ET forward table.** Its address (four 3-bit L + R totals) and the
  "greater than" compare are assumptions.
* **Sum-ET.** A comparator against the four threshold registers is used in
  place of a lookup table. The result is the same.
* **Read pointer.** It is reloaded with the offset whenever the write
  pointer wraps, as well as on the sync command.
* **Refused events.** An event that would not fit in the FIFO is dropped
  whole, never partly stored.
* **Bus and clocks.** The bus handshake is simplified. The crate and
  system halves share one clock; the board uses two phase-adjustable ones.
* **Control pulse bits.** The bits for reload and rate-counter reset follow
  the register descriptions (10, 11 reload; 12 reset rate counters).
* **Rate counters.** Which hits feed which rate counter is a reasonable
  reading of the rate-metering description, not an exact copy of it.

## Not included

These parts of the board have no RTL here:
* the TTCrx receiver chip and its I2C access;
* the G-Link serialiser chips and optical transmitters;
* the 160 MHz sampling-phase selection of the input links. Its registers
  exist and drive output ports.
* the CAN monitoring microcontroller;
* the System ACE configuration device;
* the LVDS cable drivers and transition module;
* the front-panel LED stretchers. `crate_hit` and `sys_hit` give the
  unstretched indicators.

Their signals are ports of `cmm_top`: TTC inputs, the G-Link pins and DAV,
link-ready inputs, laser disables, and the TTC clock enable and protect
outputs.

## Files

`rtl/` holds one unit per file:

| File | Role |
|------|------|
| `cmm_pkg.sv` | widths, energy and slice word types, function decode, quad-linear decode |
| `cmm_input_chan.sv` | playback mux, mask, record, parity check |
| `parity_monitor.sv` | error latches and counter |
| `hit_sum.sv` | saturating adder of N counts |
| `cp_crate_sum.sv`, `cp_system_sum.sv` | cluster hit sums |
| `jet_crate_sum.sv`, `jet_system_sum.sv`, `jet_et_estimator.sv` | jet hit sums and Jet-ET |
| `quadlin_decode.sv`, `energy_crate_sum.sv`, `energy_system_sum.sv`, `missing_et_lut.sv` | energy sums |
| `pipe_delay.sv` | 0-15 clock delay of the local crate sum |
| `scroll_dpr.sv` | 256-deep scrolling record/playback memory |
| `readout_fifo.sv`, `readout_ctrl.sv`, `slice_format.sv` | L1A readout and G-Link serialiser |
| `rate_meter.sv` | hit rate counters |
| `ttc_decode.sv` | bunch counter, broadcast and sync decode |
| `vme_regs.sv` | register file, function selection, memory write decode |
| `cmm_top.sv` | the whole module |

`tb/` has one self-checking testbench per unit (`tb_<unit>.sv`). Each one
compares the unit against an independent model. Where a unit has a fixed
latency, the testbench checks it clock for clock. Each prints
`TB_RESULT checks=N failures=M`.

`tb_cmm_top.sv` runs the complete module at its real size. It walks
through all five operating modes, switched by VME reloads. It injects
parity errors, disables channels and replays host-loaded data. It changes
the pipeline delay, drives energy overflow, issues the TTC sync and L1As
(several slices, two read offsets), stalls the link and overflows the FIFO.
It also exercises the rate counters and the module reset. It checks the
cable and CTP outputs every clock and decodes the DAQ serial stream. It
fails if any of these mechanisms never happened.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl rtl/cmm_pkg.sv \
          tb/tb_cmm_top.sv --top-module tb_cmm_top -o sim
./obj_dir/sim
```

Replace `tb_cmm_top` with any other testbench name to run that unit's test.
The top-level test takes under a minute.
