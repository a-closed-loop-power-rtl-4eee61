# Closed-loop transmit power control for a wireless network-on-chip

In a wireless network-on-chip (WiNoC), clusters of cores talk to each other
through on-chip radio hubs. Each hub's transmitter, in particular its power
amplifier, takes most of the radio energy. The usual approach sends every
packet at the one power level that is enough for the worst-placed receiver. A
receiver close to the transmitter therefore gets far more signal than it needs.

This RTL lets each transmitter use a separate power level for each
receiver, and finds those levels while the chip runs, without characterising
the antennas beforehand. It uses a feedback loop:

1. Every transmitter starts each link at its maximum power step.
2. Every receiver counts the bit errors in the packets it gets from each
   transmitter.
3. From time to time the network pauses. A central **power manager** then
   collects the error counts and compares each one with a reference. It
   tells the transmitter of that link to move one power step up (too many
   errors) or one step down (few enough errors).
4. Repeating these steps drives every link to the lowest power step that still
   meets the reference error rate, with a small oscillation around it.

The RTL contains the digital control for this loop. It has the per-hub power
tables, the per-hub error statistics, the central power manager and their
wiring. The RF parts are outside the RTL: oscillator, power amplifier,
antennas and OOK receiver. The per-packet bit-error detector is outside it too.

## The two phases: reconfiguration period and reconfiguration state

The system alternates between two phases:

| phase | manager state | network | what happens |
|---|---|---|---|
| reconfiguration period (RP) | `S_IDLE` | runs | Each packet is sent at its table entry's power step. Receivers gather error counts. The manager counts down `RP_counter`. |
| reconfiguration state (RS) | `S_RECONF` | stalled (`stall` = 1, `tx_ready` = 0) | The manager takes one error report per cycle and sends one power command per cycle. |

Two counters together decide when a reconfiguration happens. Their
interaction is the least obvious part of the design:

* **Per-link packet counters, in the receivers.** For each transmitter T,
  receiver R counts down from `rp_packets` on every packet that R gets from
  T. R also adds that packet's error bits to a running total. The packet
  that brings the counter to zero closes T's window. R then marks a report
  `(addr_rx = R, addr_tx = T, estimated_ber = total)` as pending and starts
  the next window. Each link is therefore judged on exactly `rp_packets` of
  its own packets, however busy the link is.
* **The manager's period timer.** In `S_IDLE` the manager counts
  `rp_cycles` clock cycles. When that count runs out, it checks whether any
  hub has a report pending:
  * If at least one report is pending, the manager enters `S_RECONF`.
  * Otherwise it starts another period.

  The network is therefore never stalled more often than once per
  `rp_cycles` cycles, and never stalled for nothing.

`S_RECONF` lasts exactly `rs_cycles` cycles. In each of these cycles the
manager does the following:

1. It picks one hub with a pending report. It serves hubs round-robin.
2. It acknowledges that report (`rep_ack`).
3. It sends a command on the CONTROL_IN link of the report's transmitter
   (`ci_valid`, `ci_cmd`, `ci_dst`). The command is:
   * `CMD_INC` if `estimated_ber > reference_ber`;
   * `CMD_DEC` otherwise. A clean window means the link has more power than
     it needs.
4. The transmitter updates its table at the end of the same cycle.

Reports that are still pending when RS ends wait for the next RS. A hub with
several pending reports offers them round-robin over the transmitters. Without
this, a link with a low address that reports often would keep links with higher
addresses waiting for ever. If a link closes a new window before its report
was taken, the newer count replaces the older one.

One command per RS cycle puts a limit on the design. An RS of `rs_cycles`
cycles can adjust at most `rs_cycles` links, so a 16-cycle RS fits one
manager per 16 hubs.

## Radio hub (`radio_hub`)

Each hub has two parts:

* **`vga_ctrl`, on the transmit side.** It holds one 3-bit power step per
  destination hub. All steps reset to 7, the maximum.
  * While a packet goes out (`tx_valid` and not `stall`), the destination
    `tx_dst` selects a table entry. That entry appears on `pa_step`, with
    `pa_on` high, in the same cycle.
  * A CONTROL_IN command sets UPDATE. It points the controller's single
    DST_ADDR input at `ci_dst` instead of `tx_dst`. UPDOWN selects whether
    the entry moves up or down by one step at the clock edge. Steps
    saturate at 0 and 7.
  * A no-change command (`CMD_NOP`) leaves the table unchanged.
* **`error_control`, on the receive side.** It holds the per-transmitter
  packet counters, error totals and pending reports described above.
  `rx_err_bits` is the number of wrong bits the external error detector
  found in the packet.
  * Packets from out-of-range sources are ignored.
  * Packets that claim the hub's own address as source are ignored.
  * Error totals saturate at `2**BER_W - 1`.

## Control links and encodings

| link | fields | widths |
|---|---|---|
| CONTROL_OUT, hub to manager | `rep_valid`, `rep_addr_rx`, `rep_addr_tx`, `rep_ber`; `rep_ack` back | 1, AW, AW, BER_W; 1 |
| CONTROL_IN, manager to hub | `ci_valid`, `ci_cmd`, `ci_dst` | 1, 3, AW |

`AW = $clog2(N_HUBS)`. The command `cmd_e` in `winoc_pm_pkg` takes these
values:

* `3'b000`: no change
* `3'b001`: increase
* `3'b010`: decrease

`estimated_ber` and `reference_ber` use the same unit: bit errors per window
of `rp_packets` packets. To turn a target bit error rate into
`reference_ber`, multiply it by `rp_packets` and by the packet length in bits.

## Top level (`winoc_pm_top`)

The top holds `N_HUBS` radio hubs and one power manager, wired as a star. Each
hub has one point-to-point link to the manager and one back.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `reference_ber` | in | BER_W | allowed error bits per window |
| `rp_packets` | in | RP_W | window length in packets (reference setting 2000) |
| `rp_cycles` | in | RP_W | manager period in cycles (reference setting 2000) |
| `rs_cycles` | in | RS_W | reconfiguration state length (reference setting 10) |
| `tx_valid`, `tx_dst` | in | N_HUBS × (1, AW) | packet to send, per hub |
| `tx_ready` | out | N_HUBS | low while stalled |
| `pa_on`, `pa_step` | out | N_HUBS × (1, 3) | to each power amplifier |
| `rx_valid`, `rx_src`, `rx_err_bits` | in | N_HUBS × (1, AW, ERR_W) | received packet, its source and its bit-error count |
| `stall` | out | 1 | network must hold traffic (RS) |

Keep the configuration inputs stable while the system runs. A new value takes
effect the next time a counter reloads. A value of 0 for `rp_packets`, `rp_cycles` or
`rs_cycles` counts as 1.

The parameters and their defaults:

* `N_HUBS = 8`
* `RP_W = 12`: periods up to 4095 packets or cycles
* `RS_W = 6`: RS up to 63 cycles
* `ERR_W = 8`
* `BER_W = 20`: 4000 packets with 255 errors each cannot overflow

The 3-bit power step is fixed in `winoc_pm_pkg` (`PSTEP_W`). Eight codes map
onto eight output power levels, evenly spaced in dB between about -21 dBm
and -1 dBm. That mapping belongs to the analog amplifier, which is not part of
this RTL.

## Settings it was designed for

The scheme was evaluated on the following systems:

* 4-hub systems (16 cores), with periods of 1000 to 4000 packets;
* 8-hub systems (64 cores), with periods of 1000 to 4000 packets;
* the 8-hub system with a 2000-packet period and a reconfiguration state of
  1 to 32 cycles. The reference setting is 10 cycles.

The defaults hold all of these. A 4-hub system can use `N_HUBS = 4`, or leave
four of the eight hubs idle.

## Where this RTL interprets or departs from the published description

The method comes from Rusli et al., "A Closed Loop Power Manager for
Transmission Power Control in Wireless Network-on-Chip Architectures". Some
details were not fixed there, or were stated in more than one way. This RTL
settles them as follows:

* **When RS starts.** The description says a receiver's counter ends the
  period. It also shows a period counter in the manager's idle state. This
  RTL uses both, as described above. RS starts at the end of the manager's
  period, and only when some receiver has a report.
* **When the network stalls.** One sentence says the network stalls during
  the period. Everything else says it stalls during the reconfiguration
  state. This RTL stalls during RS.
* **Number of power steps.** The description says the 3-bit code has
  "7 steps" in one place and "8 power steps" in another. This RTL uses all
  8 codes as levels.
* **Extra field in CONTROL_IN.** The original CONTROL_IN has only the
  transmitter address and the command. This RTL adds `ci_dst`, because the
  transmitter needs to know which destination's table entry to change.
* **Equal error counts.** A count equal to the reference gives a decrease,
  following the decision rule's else branch. "No change" is the idle
  command.
* **Our own choices.** The description does not specify these:
  * the numeric command codes;
  * the error-count unit and its widths;
  * round-robin service in the hubs and in the manager;
  * overwriting a report that was not taken;
  * saturation at the ends of the power range;
  * the meaning of the controller's EN input (it gates updates and `pa_on`);
  * the reset behaviour;
  * making the period and RS lengths run-time inputs.
* **Number of hubs.** The hub count of the larger systems is given as 8 in
  the text and as 16 in one figure caption. This RTL follows 8. A 16-hub
  system needs `N_HUBS = 16`, which works without other changes.
* **Not built.** The following are outside this RTL:
  * the RF front end;
  * the bit-error detector, whose method is not described;
  * the wired routers of the host architecture;
  * the packet retransmission that the host network uses.

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=N failures=M`.

| testbench | what it covers |
|---|---|
| `tb_vga_ctrl` | Reset to the maximum step; saturation at both ends; the EN gate; 3000 random read and update cycles against a reference table. |
| `tb_error_control` | Random packets and acknowledgements against an integer model: windows, error totals, saturation, round-robin report order, the hub's own address being ignored. |
| `tb_power_manager` | Random reports: RS length, RS entered only at period boundaries with a report pending, one command per cycle, round-robin service, the increase/decrease rule, reports carried over to a later RS. |
| `tb_radio_hub` | Transmit and receive sides together; DST_ADDR sharing between sending and updating; `pa_on` suppressed while stalled or updating. |
| `tb_winoc_pm_top` | End to end with 4 hubs, 8-packet windows, a 40-cycle period and a 4-cycle RS. |
| `tb_winoc_pm_full` | End to end with the top at its defaults (8 hubs) and the reference setting (2000 / 2000 / 10), for 600,000 cycles. |
| `tb_winoc_pm_sweep` | A 4-hub system and an 8-hub system, side by side, at periods of 1000 to 4000 and RS lengths of 1 to 32 cycles. Each run checks that the stalled fraction is at most `rs/(rp+rs)`, that every stall lasts `rs` cycles, and that energy falls below the fixed-maximum figure. |

In the end-to-end testbenches (`winoc_pm_checker`) a behavioural channel
stands in for the RF link. Each hub pair has a required power step. Packets
sent below that step arrive with errors, and packets at or above it arrive
almost clean. The checker works out every command independently and checks
what it sees:

* every command follows from the report it answers;
* nothing is sent during a stall;
* every stall has the right length;
* each link settles within one step of its required step;
* each mechanism occurs at least once: stall, increase, decrease, decrease
  at the floor, an empty period, and a report carried to a later RS.

The channel model and traffic are artificial, so the energy figures these
testbenches print only show that the loop works. They do not predict savings
on real traffic. Typical figures:

| run | transmit energy, relative to always sending at maximum power | cycles stalled |
|---|---|---|
| full-size run | about 25% | |
| sweep, 8 hubs, 2000-packet period, 10-cycle RS | about 42% | 0.3% |
| sweep, 4 hubs, 2000-packet period, 10-cycle RS | about 37% | 0.3% |

In the sweep, a longer period saves less energy because the loop reacts more slowly, and it stalls the network less often.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_winoc_pm_full \
  -y rtl -y tb +libext+.sv rtl/winoc_pm_pkg.sv tb/tb_winoc_pm_full.sv
./obj_dir/Vtb_winoc_pm_full
```

To run another testbench, replace the top module and file names. The package
file must come first. Every testbench finishes within a few seconds.

## Files

* `rtl/winoc_pm_pkg.sv`: shared constants (`PSTEP_W`, `MAX_STEP`) and the
  command type.
* `rtl/vga_ctrl.sv`: per-destination power table.
* `rtl/error_control.sv`: per-source error statistics and reports.
* `rtl/power_manager.sv`: the central state machine.
* `rtl/radio_hub.sv`: one hub (`vga_ctrl` and `error_control`).
* `rtl/winoc_pm_top.sv`: the whole system.
* `tb/`: the testbenches above, and `winoc_pm_checker.sv`, the shared
  end-to-end stimulus, channel model and checker.
