# Hardware DoS attack analysis for a host-side intrusion prevention system

A denial-of-service (DoS) attack floods a host with traffic in a short
time. A host-based intrusion prevention system written in software has to
spend the host's CPU to see it. This design moves the check into logic next
to the network interface, for example in the FPGA of a network card or an
access point. It works on **time windows**. In each window it adds up the
bytes of every packet that reaches the host. It raises `detect` if the sum
goes past a set value before the window ends. It also reports which sender
contributed the most bytes. If the window ends below the set value, the
counters restart and traffic continues normally.

The RTL has two parts. They sit side by side in the top module
`hhips_idl`:

* `dos_analysis_unit` is the DoS analysis unit. It consists of a
  **stored unit**, which buffers packet descriptors and keeps a byte sum per
  sender, and a **detecting unit**, which keeps the window sum and timer,
  makes the decision and tracks the largest sender.
* `port_monitor` is a port filter. Packets pass only if their TCP/UDP port
  is on a list the user has opened.

The parts around this logic are not in the RTL. Their signals are ports
of `hhips_idl`:

* the radio and wired front ends;
* the Ethernet controllers, with their CRC and WEP logic;
* the processor that extracts `{sender IP, length}` from each packet;
* the protection logic that acts on `detect`.

## Packet descriptors and the 48-bit word

The DoS unit does not see packets, only descriptors. Each descriptor is
a 32-bit sender IPv4 address and a 16-bit data length in bytes. Both RAMs
store them as one 48-bit word, with the address in the upper bits:

```
 47            16 15          0
+----------------+-------------+
|   IP address   | data length |     10.0.0.2 / 200 bytes = 48'h0A000002_00C8
+----------------+-------------+
```

`hhips_pkg` defines this word as `entry_t`. It also defines `sat_add`,
the saturating 16-bit add used for every sum: sums stick at `16'hFFFF`
instead of wrapping.

## Stored unit: buffer and per-sender table

This is the part that is hardest to follow. The unit takes **one descriptor
per clock** (`we`), but folding a descriptor into the table takes several
clocks. The two are decoupled by a buffer:

* **RAM1**: a 16-word first-in first-out buffer. Every cycle with `we`
  high writes one descriptor. If RAM1 is full, the descriptor is dropped
  and `ram1_drop` pulses.
* **RAM2**: a 16-entry table of `{IP, summed length}` words. Entries
  `0 .. n_entries-1` are in use, in the order the senders first appeared.

A controller with three states moves descriptors from RAM1 into RAM2.
Both RAMs have registered reads, so they map to FPGA block RAM:

| state  | action |
|--------|--------|
| IDLE   | If RAM1 is not empty, read its oldest word into `RAM1_OUT`. |
| LOOKUP | If the table is empty, write the descriptor as entry 0. Otherwise read the newest entry, `n_entries-1`. |
| SEARCH | If the entry read holds the same IP, write `{ip, old + len}` back to that address. If not, step to the next older entry (`n_p` pulses). After entry 0, append the sender at `n_entries`. If the table is full, drop it and pulse `ram2_drop`. |

The search starts from the newest entry because a flooding sender has
usually just been seen. Cost per descriptor: **2 + (entries compared)
clocks**. For example:

* into an empty table: 2 clocks;
* a sender that is the newest entry: 3 clocks;
* a new sender with 16 entries to compare: 18 clocks.

Every RAM2 write appears on `w_e_2 / w_a_2 / w_d_2`. The detecting unit
receives `w_d_2` as the 48-bit `R_RAM2` word.

**Clearing.** `clear` marks the end of a window. It empties the table in
one cycle by zeroing `n_entries`; the RAM contents are not erased. No RAM2
write happens in that cycle. A descriptor that is in LOOKUP or SEARCH goes
back to LOOKUP, so it becomes the first entry of the new, empty table.
Descriptors still waiting in RAM1 also land in the new window.

## Detecting unit: window, decision, report

The timer runs off a two-stage prescaler:

* `div_5` pulses every `DIV_A` = 5 clocks;
* `div_10` pulses every `DIV_B` = 10 `div_5` pulses;
* the timer counts `div_10` pulses, so `thr_time` is in units of 50 clocks.

Each cycle the unit decides in this order, with strict comparisons:

1. `data_sum > thr_data`: `detect` goes high and **stays high until
   reset**. The timer and `data_sum` stop. This is the unit's "attack
   found, hand over to prevention" end state.
2. Otherwise, `timer > thr_time` (`t_time`): `clear` pulses for one cycle.
   The timer, prescaler, `data_sum`, the report and the stored unit's table
   all restart. A packet arriving in that same cycle is counted in the new
   window. `clear` is also the signal that the window was clean. The
   surrounding logic, which holds the packets themselves, can use it to
   release that window's traffic to the host.
3. Otherwise, keep counting.

Resulting timing:

* The first window after reset lasts `50*(thr_time+1)` clocks. Later
  windows last `50*(thr_time+1)+1` clocks, counting the clear cycle. At
  50 MHz, `thr_time = 0` gives a window of about 1 µs.
* A descriptor sampled at clock edge *k* is in `data_sum` after edge *k*.
  If that puts the sum over the set value, `detect` rises at edge *k+1*.
* `data_sum` counts **every** descriptor presented on `we`, including
  those RAM1 has to drop. A flood is therefore measured in full even when
  the table falls behind. Only the per-sender sums miss dropped
  descriptors.

**The report (`max_ip`, `max_dl`).** Every RAM2 write carries a sender's
new sum. The unit keeps the sender whose sum is strictly the largest so
far, so when two senders tie, the first one stays. Table writes trail the
byte count by a few clocks, so the report keeps updating after `detect`
rises. Read it once the stored unit is no longer `busy`. In the three-packet
example (10.0.0.1, 10.0.0.2 and 10.0.0.1, 200 bytes each):

* `data_sum` goes 200, 400, 600;
* with a set value of 500, `detect` rises and the report settles on
  10.0.0.1 with 400 bytes;
* with 700, the window ends with `clear` and no attack.

## Port monitor

`port_monitor` keeps `N_PORTS` = 8 slots. Each slot holds a 16-bit port
number and an enable bit, written through `cfg_we / cfg_idx / cfg_port /
cfg_en`. A packet presented with `pkt_valid / pkt_port` is compared
against all slots in parallel. The next clock gives `out_valid`, with
`out_pass` = 1 if the port is open and `out_port` echoing the port. After
reset every slot is disabled, so everything is blocked until ports are
opened. The caller decides which header port to present.

## Interface of `hhips_idl`

| group | signals | meaning |
|---|---|---|
| clock, reset | `clk`, `reset_n` | one clock; reset is active low and synchronous |
| descriptors in | `dos_we`, `dos_ip_addr[31:0]`, `dos_data_len[15:0]` | one descriptor per clock at most |
| set values | `dos_thr_data[15:0]`, `dos_thr_time[15:0]` | bytes per window; window length in 50-clock units |
| to protection | `dos_detect`, `dos_max_ip[31:0]`, `dos_max_dl[15:0]`, `dos_data_sum[15:0]` | decision and report |
| status | `dos_clear`, `dos_t_time`, `dos_table_we`, `dos_n_p`, `dos_n_entries`, `dos_ram1_full`, `dos_ram1_drop`, `dos_ram2_drop`, `dos_busy` | window end and table activity |
| port monitor | `pm_cfg_*`, `pm_pkt_valid`, `pm_pkt_port`, `pm_out_valid`, `pm_out_pass`, `pm_out_port` | see above |

Parameters, with their defaults:

* `RAM1_DEPTH` = 16
* `RAM2_DEPTH` = 16 (a power of two)
* `DIV_A` = 5
* `DIV_B` = 10
* `TIME_W` = 16
* `N_PORTS` = 8

## What follows the original design and what is chosen here

**Taken from the original design:**

* the split into a stored unit and a detecting unit;
* the 48-bit word with a 32-bit address and a 16-bit length;
* the 16-bit byte sum, and the outputs detect, largest IP, largest length
  and sum;
* the two RAMs and their signal names (`R_A_1`, `RAM1_OUT`, `R_A_2`,
  `RAM2_OUT`, `W_A_2`, `W_D_2`, `W_E_2`, `N_P`);
* summing per sender, and the newest-first search order;
* the decision order of the flow chart: byte sum first, then timer, both
  with strict "set value < value";
* the prescaler stage names `Div_5` / `Div_10`;
* the reference behaviour: the three-packet example above, with set
  values of 700 and 500 bytes.

**Chosen here, because the original leaves these open:**

* RAM depths (16 each), the number of port slots (8) and the timer width;
* reset polarity and style;
* the meaning of `N_P` (here: "step to the next older entry");
* the divide ratios, read from the stage names;
* dropping descriptors when RAM1 or the table is full;
* saturating sums;
* emptying the table and zeroing the report at each window end;
* `detect` staying high until reset;
* counting dropped descriptors in the window sum;
* the whole port monitor beyond its pass/block function.

**Departures from the original:**

* **Byte sum, not packet count.** One description judges an attack by the
  *number of packets* per unit time, but the flow chart and the reference
  results sum *bytes*. The RTL sums bytes.
* **Bus width.** The structure diagram draws the length bus between the
  two units as 32 bits, against 16 bits everywhere else. Here the address
  and length travel as the two fields of the 48-bit table word, and the
  length is 16 bits.
* **Throughput.** The original reports 56.8 MHz for a Cyclone FPGA and
  states 2.6 Gbit/s from the 48-bit word; 56.8 MHz × 48 bits is about
  2.7 Gbit/s. This RTL takes one 48-bit word per clock only in bursts of up
  to 16 words. Sustained, it takes one descriptor per 2 + (entries
  compared) clocks. Its clock rate on that FPGA has not been measured.
* **Cycle timing.** The cycle-by-cycle timing of the reference waveforms
  is not reproduced. The latencies given above are this RTL's own.

## Verification

Each testbench is self-checking. It prints `TB_RESULT checks=N
failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_stored_unit` | A reference model of the table predicts the address and word of every RAM2 write. Covers the three-packet example, the `2 + compares` latency, RAM1 overflow in a back-to-back burst, a full table, saturation, and clearing when idle and mid-search. |
| `tb_detecting_unit` | The 700-byte and 500-byte examples, the window period `50*(thr_time+1)+1`, the one-clock detect latency, tie handling of the report, zeroing at `clear`, a packet on the clear cycle, and saturation. |
| `tb_dos_analysis_unit` | Both examples end to end, then six windows of random traffic against a model of the byte sum and largest sender. The last window is an attack. |
| `tb_port_monitor` | Pass/block against a model list over a random port stream, reconfiguration, and one-cycle latency. |
| `tb_hhips_idl` | The top at its default parameters. One full window (table fill, table overflow, RAM1 overflow in a burst, sum and report against a model, clear), then a flood that must be detected and attributed, with a port stream in parallel. Each mechanism must occur at least once. |

To simulate, for example the top:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/hhips_pkg.sv tb/tb_hhips_idl.sv --top-module tb_hhips_idl
./obj_dir/Vtb_hhips_idl
```

The testbenches use no `x` or `z` values and need nothing beyond
`verilator --binary --timing`. Every run finishes in well under a
second.
