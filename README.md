# Trojan-resistant SoC bus

A shared on-chip bus is a single point of failure. Whoever owns it can keep
everyone else off it, and whoever answers on it can stall the master that is
waiting. A hardware Trojan hidden in one third-party IP block can use that to
freeze the whole chip while it stays powered. It can also use its bus access to
read or write addresses it should never touch.

This RTL hardens the three classic parts of a shared bus so that such behaviour
is detected, stopped and reported while the chip runs:

| attack | where it is caught | immediate reaction | reported as |
|---|---|---|---|
| a master holds LOCK for too long | arbiter: lock-cycle counter | lock broken, master masked | interrupt 0x1, *malicious bus lock* |
| a master accesses a restricted address range | address decoder: range comparator | access sent to the default slave, master masked | interrupt 0x0, *unauthorized access* |
| a slave holds WAIT for too long | bus matrix: wait-cycle counter | wait nullified, slave masked | interrupt 0x2, *malicious wait* |

A *masked* master is never granted the bus again. A masked slave is never
selected again: its address range is answered by the default slave. Both last
until software clears the mask. The CPU is interrupted and reads what was
caught. It then decides what to do with the culprit: reset it, stop its clock,
or switch off its power. Isolation clamps keep the rest of the chip safe from
the outputs of a block that has no power. The protection itself costs one extra
gate level in each path. The decoder's slave select becomes a three-input AND.
The arbiter's request and the matrix's wait each pass through one two-input AND.

## The bus

The bus works in the manner of AMBA AHB, but is simpler: single layer, no
pipelining.

* Masters raise `m_req[m]`, and also `m_lock[m]` when they need the bus for
  several transfers in a row. The arbiter answers with `m_grant[m]` one clock
  edge later. The grant is a register output.
* The granted master drives `m_trans`, `m_addr`, `m_write` and `m_wdata` all in
  the same cycle. The bus matrix passes the owner's signals to the shared slave
  bus (`s_trans`, `s_addr`, `s_write`, `s_wdata`). The decoder raises exactly
  one of `s_sel[s]`, or selects the internal default slave.
* The selected slave may hold `s_wait[s]` to stretch the transfer. The transfer
  ends on the first cycle without wait. In that cycle `m_ready[m]` is high and
  the master takes `m_rdata` and `m_err`. A write lands in the slave at the
  clock edge that closes that cycle.
* The decoder reads the 4 most significant address bits. Region *r* < NS
  (0x0…, 0x1…, 0x2… by default) belongs to slave *r*. All other regions are
  empty. An access to an empty region gets a one-cycle error response from the
  default slave, with read data 0.
* Arbitration is round robin. The owner keeps the bus while a slave stretches
  its transfer, and while it holds LOCK (the arbiter then drives
  `m_master_lock`, the MASTER LOCK signal). Otherwise the arbiter can move the
  grant on any cycle. A master that asks again and finds others waiting loses
  the bus after each transfer.

## How each attack is stopped

### Lock watchdog (secure_arbiter)

A counter runs while the current owner holds LOCK. It restarts when LOCK drops
or the owner changes. Suppose LOCK is still high after `lock_thresh` counted
cycles (register `LOCK_THRESH`, 64 after reset). Then, in that same cycle:

* `mal_lock` pulses;
* the owner's bit is set in the master mask register;
* because the mask gates both REQ and LOCK, the lock is released at once and
  the grant moves at the next edge.

A master that locks forever therefore keeps the bus for exactly
`lock_thresh + 1` cycles. A legitimate locked burst shorter than the threshold
goes through untouched. Choose the threshold above the longest locked sequence
the system needs. Software can change it at any time.

### Restricted range (secure_addr_decoder)

Software programs `RESTR_START` and `RESTR_END` (inclusive bounds). Any transfer
whose address falls in that range raises `unauth` in the same cycle. All real
slave selects are removed, so the default slave answers with an error and the
protected slave never sees the access. The address and the master's ID are
captured for the interrupt handler. The arbiter puts that master in its mask and
takes the bus away from it at the next edge. After reset the start is above the
end, so nothing is restricted. The rule applies to every master, the CPU
included: a handler must not touch the range itself.

### Wait watchdog (secure_bus_matrix)

A counter counts consecutive wait cycles of the current transfer. Suppose the
selected slave still waits after `wait_thresh` counted cycles (register
`WAIT_THRESH`, 16 after reset). Then, in that cycle:

* `mal_wait` pulses;
* the wait seen by the master is forced low, so the transfer ends with
  `m_err = 1`;
* the decoder sets the slave's bit in the slave mask register, using `mal_wait`
  as its latch enable.

From then on, every access to that slave's region goes to the default slave.
For example, a memory clocked at a quarter of the bus clock waits 4 cycles and
is well below the threshold. A transfer with `w` wait cycles, where
`w ≤ wait_thresh`, takes `w + 1` cycles. A stuck slave is cut off on cycle
`wait_thresh + 1`.

## After detection: interrupts and software

`trojan_irq_ctrl` collects the three detection pulses (sources 0–2) and `NEXT`
ordinary interrupts (sources 3…). Each source sets a sticky pending bit. `irq`
is high while any enabled bit is pending. `irq_id` names the lowest-numbered
one, so Trojan events win. `irq_vector` = 0x40 + 4 × `irq_id` is the handler
address.

The CPU reaches all controls through `sec_csr`. This is a private
single-cycle register port (`csr_en`, `csr_we`, `csr_addr` as a word index,
`csr_wdata`, `csr_rdata`), not a slave on the shared bus, so a Trojan master
cannot reprogram its own watchdogs. Writes take effect at the clock edge. Reads
are combinational.

| addr | name | access | content |
|---|---|---|---|
| 0 | RESTR_START | RW | first restricted address (reset all ones) |
| 1 | RESTR_END | RW | last restricted address (reset 0) |
| 2 | LOCK_THRESH | RW | lock cycles allowed (reset 64) |
| 3 | WAIT_THRESH | RW | wait cycles allowed (reset 16) |
| 4 | MASTER_MASK | R / W1C | masked masters |
| 5 | SLAVE_MASK | R / W1C | masked slaves |
| 6 | VIOL_ADDR | R | address of the last unauthorized access |
| 7 | VIOL_INFO | R | [31:24] master caught locking, [23:16] slave caught waiting, [15:8] master of the last unauthorized access |
| 8 | IRQ_ENABLE | RW | interrupt enables (reset all ones) |
| 9 | IRQ_PENDING | R / W1C | pending interrupts |
| 10 | IRQ_VECTOR | R | [31] irq, [7:0] source |
| 11 | IP_RESET | RW | hold IP *i* in reset |
| 12 | IP_CLKGATE | RW | stop the clock of IP *i* |
| 13 | IP_PWRGATE | RW | power IP *i* down |
| 14 | IP_STATUS | R | IP *i* is powered down |

IP numbering: masters 0…NM−1 come first, then slaves NM…NM+NS−1. A typical
handler reads IRQ_VECTOR and VIOL_INFO (and VIOL_ADDR for source 0). It then
writes the source's bit to IRQ_PENDING, quarantines the culprit, and clears its
mask bit only once the culprit has been reset or powered off.

## Quarantine of a block

Each IP block has its own `power_gating_ctrl`, `clock_gate_cell` and a set of
`isolation_cell`s on its bus outputs. The top brings out each block's reset
(`ip_rst_n`), gated clock (`ip_clk`) and power-switch enable (`ip_pwr_en`). It
takes in an acknowledge from the power switches (`ip_pwr_ack`, high when the
supply is up). Reset and clock gating act two cycles after the register write.
Power gating runs this sequence:

```
ON --req--> ISOLATE --> SWITCH_OFF --ack low--> OFF --req cleared--> SWITCH_ON --ack high--> RESTORE --> ON
            clamps on,   pwr_en low                                   pwr_en high             clock on,
            clock off,                                                                         reset held
            reset                                                                              one cycle
```

Isolation stays on from ISOLATE until the block is back in ON. While it is on,
every bus output of the block is tied low. A powered-down master therefore never
requests. A powered-down slave never waits and reads as zero. The clock gate is
the usual latch-plus-AND cell: the latch is transparent while the clock is low,
and it is the only latch in the design.

## Files

| file | content |
|---|---|
| `rtl/trojan_bus_pkg.sv` | default sizes, interrupt numbers, register map, reset thresholds, power-gating states |
| `rtl/trojan_resistant_bus.sv` | top level |
| `rtl/secure_arbiter.sv` | round-robin arbiter, lock watchdog, master mask |
| `rtl/secure_addr_decoder.sv` | MSB decoder, restricted-range comparator, slave mask, capture registers |
| `rtl/secure_bus_matrix.sv` | master and slave multiplexers, default slave, wait watchdog |
| `rtl/trojan_irq_ctrl.sv` | interrupt controller |
| `rtl/sec_csr.sv` | security registers |
| `rtl/power_gating_ctrl.sv` | per-IP reset, clock enable and power-gating sequencer |
| `rtl/isolation_cell.sv` | output clamp |
| `rtl/clock_gate_cell.sv` | latch-based clock gate |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

Top parameters: `NM` masters (3), `NS` slaves (3, at most 16 with the 4-bit
region decode), `AW` and `DW` address and data width (32), `NEXT` ordinary
interrupts (4). The counter width and reset thresholds are set in the package.
Synthesized at the default size, the top is about 400 word-level cells and 237
flip-flop bits. The arbiter, decoder and matrix on their own are 77, 42 and 37
cells.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog if it hangs. For example:

```
verilator --binary --timing --assert -Irtl rtl/trojan_bus_pkg.sv \
    tb/tb_trojan_resistant_bus.sv -y rtl --top-module tb_trojan_resistant_bus
./obj_dir/Vtb_trojan_resistant_bus
```

`tb_trojan_resistant_bus` runs the whole design at its default parameters, with
models of the parts around it:

* a CPU that configures the registers, makes normal transfers and services the
  interrupts;
* a DMA engine that makes a legitimate locked burst and later locks forever;
* an I/O master that reads a restricted address;
* a 4-wait-state memory, a zero-wait register block, and a peripheral whose
  Trojan holds wait forever;
* power switches that answer after 3 cycles.

It checks the data against a scoreboard and the cycle counts given above. It
also counts each mechanism: wait states, contention, legitimate lock, the three
detections, refused masters, diverted slaves, interrupts, reset, clock gating,
power gating with clamped outputs, and clearing a mask. It fails if any of them
never happened. The block testbenches compare each module against its own
reference model over thousands of random cycles, plus directed cases.
Concurrent assertions in the RTL check that the grant is one-hot, that at most
one slave is selected, that a masked slave is never selected, and that a
stretched transfer keeps its address.

## Limits and own choices

Taken from the published architecture:

* the three detectors and their counters;
* the restricted-range registers and comparator;
* the master and slave mask registers, and the gating they do;
* diverting accesses to a default slave;
* routing the detections to the interrupt controller;
* reset, clock gating and power gating with isolation of a Trojan block.

Choices made for this RTL:

* **Bus protocol.** A simplified non-pipelined AHB-like protocol, not full AHB:
  no split or retry, and no burst signalling apart from LOCK. Slaves cannot
  signal errors of their own.
* **Arbitration.** Round robin, with registered grants and no default master.
* **Counters.** Their exact restart and trigger rules.
* **Register values.** The reset thresholds (64 and 16) and the register map.
* **Range and CSR port.** One restricted range, and the private CSR port.
* **Interrupts.** Sticky, fixed-priority interrupts and the vector formula.
* **Power gating.** The sequence order and the handshake with the power
  switches.
* **Domains.** One power/clock/reset domain per master and per slave.

Not included:

* The memory data-integrity checker. It belongs to the same family of
  protections, but its function is not specified.
* The power switches themselves. They are physical and are driven through
  `ip_pwr_en` and `ip_pwr_ack`.
* The masters and slaves.

The design only reacts to timing and address behaviour. A Trojan that corrupts
data inside legal, short transfers is not detected.
