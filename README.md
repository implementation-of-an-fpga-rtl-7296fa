# System Survey and Diagnostic Reader

An FPGA block that reads out diagnostic chips and sensors (temperature,
supply, status registers and the like) at a fixed rate. Each update cycle
it gathers one value of every quantity, packs the values into one package
for logging, and records which interfaces delivered. It also watches chosen
values on-chip and raises a failsafe output when a value crosses a critical
threshold. The reader was conceived for the beam-loss monitoring
electronics of an accelerator injector complex. It does not depend on the
kind of chips attached. A chip is reached through a *diagnostic
interface*, a protocol controller that is not part of this RTL.

The design is built from small, independent modules. All of them talk over
one handshake, the **CMI** (common modular interconnect). A module never
depends on the timing of its neighbours: it only honours the handshake.

## The CMI handshake

Every arrow between two modules is a CMI link with three signals:

| signal | driven by   | meaning |
|--------|-------------|---------|
| `data` | transmitter | the word |
| `vld`  | transmitter | `data` holds a valid word |
| `next` | receiver    | **the receiver cannot take the word in this cycle** |

A word moves on a rising clock edge where `vld=1` and `next=0`. Note the
polarity of `next`: it is a *wait* request, not a *ready* signal. A
transmitter that sees `next=1` keeps `vld` and `data` unchanged.
`cmi_interconnect` checks this rule with an assertion.

`cmi_interconnect` connects one transmitter to N receivers. The data bus is
shared. Each receiver has its own `rx_vld`/`rx_next` pair and takes each
word exactly once. The transmitter waits until the last receiver has taken
the word. The block has no data register and adds no latency.

`priority_mux` merges N links into one, with input 0 having the highest
priority. A stalled word stays selected until it is taken. In package mode
(`PACKET=1`) it also keeps packages whole, as described below.

## Words on the links

Widths are set in `ssdr_pkg`:

* **read request** (`addr_t`, 8 bits): the *label* of one diagnostic
  quantity.
* **readout** (`readout_t`, 40 bits): the label and a 32-bit value.
* **package word** (`pkg_word_t`, 17 bits): a header flag and 16 payload
  bits.

A package describes one readout. It is one header word followed by one or
more data words:

```
flag  payload[15:12]  payload[11:8]  payload[7:0]
 1    0000            interface no.  label          header
 0    value slice (most significant first)          data, repeated
```

Each label has its own number of data words (`SLICES`). With one slice
only the low 16 bits of the value are sent.

In package mode `priority_mux` stays on an input for as long as that input
offers data words. It chooses again when the input offers a header or
nothing at all. This works because every package source in the design
sends the words of one package in consecutive cycles. A new source must do
the same.

## One update cycle, step by step

The `timer` produces `upd`, a one-cycle pulse that opens each update
cycle. It comes either from a counter with a run-time period (`upd_period`)
or from the rising edge of an external timing event (`use_ext=1`,
`ext_evt`). Work on the data of one cycle is spread over three cycles.
This timing is the part of the design that most needs care.

**Cycle k – request and collect.** At the `upd` that opens cycle k, the
`seq_generator` of each interface starts sending its list of labels. The
labels go out one by one on the `rd_req` port, and each is held until the
diagnostic interface accepts it. While a list is running, further `upd`
pulses are ignored, so a list always finishes. The readouts come back on
the `readout` port, and a fork sends each one to two places:

* **storing_packaging.** Here one `filter` per label passes only its own
  label, and a `delayed_storage` keeps the **first** readout of that label.
  Later repeats are dropped until the value has been stored. Repeats are
  normal: the self-monitoring asks for some labels many times per cycle.
* **self_monitoring** (see below), which sees every readout, repeats
  included.

**Cycle k+1 – store and pack.** At the next `upd`, the delayed_storages
of an interface store their values together, but only if every one of
them has a value (`all_got`, the AND of their `got` outputs). If any label
is still missing, nothing is stored. The values already collected then
wait for a later `upd`. After a store, each `slice_and_tag` turns its
value into a package. A package-mode `priority_mux` lines up the packages
of the interface in label order. In `combining_tracking`, a second
package-mode mux lines up all interfaces, interface 0 first, into the
final package. This stream goes to the readout storage. It also goes to a
`scoreboard` that sets one bit for each interface whose header passes
during the cycle.

**Cycle k+2 – publish.** At the following `upd`, `readout_storage` swaps
its two RAM banks. The bank filled during k+1 becomes readable, and
`st_rd_count` gives its number of words. Right after the `upd`, the
scoreboard sends its bits for k+1, and they appear in `st_rd_score`.
`st_rd_score_vld` rises once they are there. **Data requested at the `upd`
that opens cycle k is therefore readable from the `upd` that opens cycle
k+2.** This is the reader's latency of two update cycles.

**Slow interfaces.** An interface whose list of requests takes longer than
one update cycle misses one `upd` (its sequence is still busy) and
restarts at the one after. Its readouts are complete only every other
cycle. Because values are kept until the whole interface can be stored,
the interface is stored and published every other cycle. Its scoreboard
bit is 1 only in those cycles, which tells the logging side which blocks
of the package are fresh. A published value of a slow interface may be
two or three update cycles old.

**Start-up.** Before the first `upd` the fast list may already have read
a monitored label. The first stored package can therefore carry that
earlier value.

## Self-monitoring

`self_monitoring` has `N_MON` channels. Channel m watches label
`MON_ADDR[m]` of interface `MON_INTF[m]`: a `filter` picks those readouts
out of the interface's stream, and a `failsafe_monitor` compares each one
with two thresholds, `WARN_TH` and `CRIT_TH`. By default a value at or
above a threshold violates it (`ABOVE=1`).

* `level` and `warn` follow the latest readout, one cycle after it.
* `failsafe` is set by the first critical readout and **stays set** until
  `mon_clear` is pulsed. `any_failsafe` is the OR of all channels.

To see a value more often than once per update cycle, each monitored
interface's `sequence_generator` runs a second, short list (`FAST_SEQ`).
A local timer (`loc_timer`, a `timer` with period `LOC_PERIOD`) starts it.
A `priority_mux` merges it with the main list, and the fast list goes
first. The extra readouts reach the monitor. The storage path drops them
under the first-occurrence rule.

The monitor and the storage path never refuse a readout, so `readout_next`
is always low. The reader never pushes back on a diagnostic interface.

## Reading the storage

`readout_storage` is a RAM of `2 x DEPTH` package words (DEPTH a power of
two) with a synchronous read port. Apply `st_rd_addr`; `st_rd_data` holds
word `st_rd_addr` of the published bank one cycle later. The published bank
does not change until the next `upd`, so another process (a bus interface
to a logging database, for example) has a full update cycle to read it. If
a cycle produces more than `DEPTH` words, the extra words are dropped and
`st_rd_overflow` is set for that bank. `st_published` pulses after each
bank swap.

## Modules

| module | role |
|--------|------|
| `ssdr_pkg` | widths, word types, severity enum, header helpers |
| `cmi_interconnect` | CMI fork, one transmitter to N receivers |
| `priority_mux` | fixed-priority merge, word or package mode |
| `timer` | `upd` from a counter or an external event; also `loc_timer` |
| `seq_generator` | sends a list of labels from a look-up table on each start |
| `sequence_generator` | main list on `upd` + fast list on `loc_timer`, merged |
| `filter` | passes one label, drops the rest without stalling |
| `delayed_storage` | first readout per cycle, stored at `upd` with its siblings |
| `slice_and_tag` | readout to package: header, then data slices |
| `storing_packaging` | fork, filters, storages, slicers and mux of one interface |
| `scoreboard` | which interfaces delivered during the cycle |
| `combining_tracking` | merge of all interfaces, fork to storage and scoreboard |
| `readout_storage` | double-banked package RAM with read port |
| `failsafe_monitor` | two thresholds, warning and latched failsafe |
| `self_monitoring` | filter + failsafe_monitor per monitored label |
| `ssdr_top` | the complete reader |

## Configuration

All parameters of `ssdr_top` have defaults, and these defaults form an
example configuration. The design's structure does not depend on them.

| parameter | default | meaning |
|-----------|---------|---------|
| `N_INTF` | 2 | diagnostic interfaces |
| `N_REQ` | 4 | labels read from each interface per cycle |
| `REQ_ADDR[i]` | {0,1,2,3}, {0x10,0x11,0x12,0x13} | label list of interface i |
| `SLICES[i]` | {2,2,1,1}, {1,1,1,2} | data words per label of interface i |
| `N_FAST`, `FAST_SEQ` | 1, {1} | fast list of monitored interfaces |
| `LOC_PERIOD` | 100 | fast-list period in clock cycles |
| `N_MON`, `MON_INTF`, `MON_ADDR` | 1, {0}, {1} | monitor channels |
| `WARN_TH`, `CRIT_TH` | {1000}, {2000} | thresholds per channel |
| `DEPTH` | 256 | package words per storage bank |

The update period is the run-time input `upd_period`, in clock cycles.
Each interface has its own row in `REQ_ADDR` and `SLICES`, since each
interface serves a different kind of chip. All interfaces read the same
number of labels, `N_REQ`. All monitored interfaces share one fast list,
`FAST_SEQ`. For anything less regular, instantiate `sequence_generator`
and `storing_packaging` per interface; they are independent of each
other. The header has 4 bits for
the interface number, so up to 16 interfaces fit. To change word widths,
edit `ssdr_pkg`.

## Departures and gaps

* **Diagnostic interfaces are not included.** Each is a protocol controller
  for a specific chip (SPI, I2C, one-wire, …), and no particular chip is
  targeted here. The ports of `ssdr_top` are the CMI ports such a
  controller needs: `rd_req` (label out) and `readout` (label and value
  in). A controller must handle one request at a time. The write-request
  port that some chips need (for local registers or EEPROM) has no source
  in this design and is not provided.
* The scoreboard keeps one bit per interface, not per label. Package
  boundaries use the header flag; there is no end-of-package marker.
* Not part of the original description, but chosen here: the word formats
  and widths, the priority orders, double banking of the storage, the
  two-level severity with a latched failsafe, and asynchronous active-low
  reset.
* Kept readouts survive an incomplete `upd`, as described under *Slow
  interfaces*. The alternative, starting every cycle empty, would never
  store an interface whose readouts span two cycles.

## Simulation

Each module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and stops through a watchdog if it hangs.
`tb/diag_if_model.sv` is a behavioural model of a diagnostic interface:
one request at a time, a set latency, and the value
`interface << 24 | epoch << 8 | label`.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/ssdr_pkg.sv tb/tb_ssdr_top.sv --top-module tb_ssdr_top -o sim
./obj_dir/sim
```

Replace `tb_ssdr_top` with the testbench you want, for example
`tb_priority_mux`.

`tb_ssdr_top` runs the complete reader with its default parameters,
against two models: a fast interface and a slow one whose four requests
take longer than the 300-cycle update period. It reads back every
published bank and checks:

* the package framing and order;
* the two-cycle latency of the fast interface;
* the every-other-cycle publication of the slow interface;
* the scoreboard;
* the monitor going OK, then warning, then critical, with the failsafe
  latching, clearing and latching again;
* the switch to external timing events.

It also counts each mechanism: request stalls, ignored `upd` pulses,
missing packages, dropped repeats, fast requests, packages competing in
the merge, warnings and failsafe actions. A mechanism that never happens
counts as a failure. The whole run takes about 7,000 clock cycles and
under a second.

`tb_ssdr_top_multi` runs a larger configuration. It has three interfaces
and two monitor channels, one of them on interface 2. Its fast list has
two labels. It checks every bank, the latency, both monitors, and that
only the monitored interfaces get fast requests.

Each block testbench was also run against a copy of its module with one
deliberate fault, for example a mux with reversed priority or a storage
that keeps the last readout instead of the first. Every such fault was
detected.
