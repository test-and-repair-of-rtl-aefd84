# Built-in test and repair for a UART-accessed IEEE 1687 scan network

An IEEE 1687 (IJTAG) network reaches the instruments embedded in a chip
through a chain of scan registers. Each register sits behind a *segment
insertion bit* (SIB), a one-bit switch that splices that register into the scan
path or leaves it out. A single broken scan register is enough to corrupt every
bit that passes through it. In a flat network, every bit passes through it.

This design puts the test and the repair on the chip. The host sends two
16-bit commands:

* **iTest**: the chip finds every broken scan register on its own.
* **iRepair**: the chip copies the list of broken registers into the access
  controller. From then on it never opens a broken register's SIB, so the
  rest of the network stays usable.

The host's cost is 32 bits, whatever the network size and however many faults
there are. Without on-chip test, the host must shift the whole test pattern
itself. For 50 SIBs that is 18 500 bits, and the count grows with the square of
the network size.

Everything is written in synthesizable SystemVerilog. The default size is 150
SIBs with 8-bit scan registers, and the UART runs at 115200 baud from a 100 MHz
clock.

## System

```
 host ──UART──► uart_rx ─► network_controller ─────────────┐
      ◄─UART── uart_tx ◄─┘   (command decoder, 1687 FSM,  │ scan control
                             SIB control register,         ▼
                             repair_component)   ┌──► mux ──► flat_rsn ──► TDO
                                  │ iTest        │            (N_SIB segments)
                                  ▼              │               │
                              test_block ────────┘               │
            (sequence_generator, su_controller, sequence_detector) ◄┘
```

`rsn_test_repair_top` connects the parts:

* **UART.** `uart_rx` and `uart_tx` carry 8 data bits and 1 stop bit, with
  optional parity.
* **`network_controller`.** It serves the normal instrument accesses, starts
  the test, and holds the `repair_component`.
* **`test_block`.** It runs the built-in test.
* **`flat_rsn`.** The network itself.

While the test block is busy it owns the network's scan control lines, and
otherwise the network controller owns them. The test block also resets the
network between its steps, so each step starts with every SIB closed.

The instruments are not part of the design. Their parallel interfaces are
ports of the top:

* `instr_out`: the values captured into the scan registers.
* `instr_in`: the values the registers' update stages drive out.

A `fault_mask` input turns chosen scan registers into defects for simulation.
Tie it low in real use.

## The scan network

A segment is one SIB (`sib`) followed by one LEN-bit scan register
(`scan_register`). Segments are chained from TDI (segment 0) to TDO (segment
N_SIB-1). A SIB works as follows:

* It has a shift flip-flop S and an update flip-flop U.
* When U is 0, the SIB passes TDI straight to S.
* When U is 1, the segment's register is spliced in between TDI and S, and the
  register's select line (`to_sel`) is high.

The scan register behaves as follows:

* It shifts right: new bits enter at bit LEN-1 and leave at bit 0, so a byte
  goes in LSB first.
* It captures from its instrument on `capture_en` and drives it from an update
  stage on `update_en`.
* It does any of these only while its SIB selects it.
* Reset closes every SIB.

**Fault model.** A broken register is an inverter with no storage: its scan
output is the inverse of its scan input. A stuck-at fault would behave much the
same way here. A register whose output is merely inverted would not: two such
registers cancel each other along the full path, and the full-path test would
miss them.

## The built-in test

The test has two phases. Both use the pattern 1,0,1,0,… in shift order.

**FULLTEST** opens every SIB, shifts the pattern through the whole path, then
shifts zeros to push it out. The path holds N_SIB·(LEN+1) bits, because each
SIB's S flip-flop is in the path too. If the bits that come out equal the bits
that went in, the network is fault-free and the test ends.

**ONEBYONE** runs only after FULLTEST fails. It repeats the same check N_SIB
times, each time with exactly one SIB open (one-hot, starting with segment 0).
The path is then N_SIB + LEN bits. Each failing step sets one bit of the
*repair register*. At the end, that register becomes `scr_test` and `repair`
rises.

Three blocks cooperate on each step:

* **`sequence_generator`** is the main state machine: idle, clear, full test,
  localisation, repair record, next, finish. It supplies three things as
  parallel vectors, each built from constants:
  * the control vector (all ones, or one-hot);
  * the pattern to shift in;
  * the pattern to expect.
* **`su_controller`** runs each step:
  1. It shifts the N_SIB control bits in, SIB N_SIB-1's bit first, so that
     bit k lands in SIB k.
  2. It pulses update for one cycle to open the selected SIBs.
  3. It shifts in the test bits.
  4. It shifts in the same number of zeros (the dummy bits).
* **`sequence_detector_top`** holds two parts:
  * The `delayer` waits N_SIB+1 cycles for the control bits and the update
    cycle, then the length of the pattern. It then plays back the expected
    bits while the dummy bits push the real ones out of TDO.
  * The `fault_detector` compares bit by bit. It reports (`test_out`,
    `generator_en`) at the first mismatch or at the end, and holds the result
    until the generator drops `detector_en`.

Between two steps the generator passes through a *clear* state: every enable
goes low and the network is reset.

**Cost per step, in shift cycles on TDI** (L = LEN, N = N_SIB):

| step | control | test | dummy | total |
|---|---|---|---|---|
| FULLTEST | N | N·(L+1) | N·(L+1) | N·(2L+3) |
| ONEBYONE (each) | N | N+L | N+L | 3N+2L |

A complete test of a network with at least one fault therefore takes about
N·(2L+3) + N·(3N+2L+4) clock cycles, including the handshake cycles. At 150
SIBs that is about 73 000 cycles, or 0.73 ms at 100 MHz.

## Repair

On iRepair, `repair_component` walks the fault vector in two cycles per bit.
For each set bit k it writes the 8-bit address k into entry k and marks the
entry valid. The valid bits are needed because an empty entry would otherwise
read as address 0. Loading takes 2·N_SIB+2 cycles, and the controller accepts
no further command until it is finished.

Each setup command's address is compared with every valid entry at once. On a
match, the access is *bypassed*:

* the SIB is not opened;
* the data byte the host sends for it is consumed and dropped;
* no byte is returned;
* `bypass_count` counts it.

## Host protocol

Words are 16 bits, sent high byte first.

| word | meaning |
|---|---|
| `0 0 xxxxxx aaaaaaaa` | iRead of register `a` (queued) |
| `0 1 xxxxxx aaaaaaaa` | iWrite of register `a` (queued) |
| `1 nnnnnnnnnnnnnnn` | iApply, followed by `n` data bytes |
| `0x7F 0x00` | iTest |
| `0x7E 0x00` | iRepair |

An iApply carries one data byte per queued register, highest address first.
The byte is the write value, or any filler byte for a read. For every queued
read the chip returns one byte, in the same order.

Inside, an iApply makes two passes over the current path:

1. **Configure.** New SIB bits are shifted in, padded with filler for the
   registers that are open now, and update is pulsed. If the apply holds a
   read, capture is pulsed next.
2. **Data.** The SIB bits are shifted again so the configuration is kept, along
   with one byte per open register. The bytes that leave TDO at the same time
   are the registers' previous contents. They are returned for reads and
   discarded otherwise.

An update ends the data pass only if the apply contains a write, so a pure read
leaves the instruments unchanged. Extra bytes beyond the count are drained.

## Where this departs from, or adds to, the original design

These are this design's own choices:

* **Network controller.** The original takes its UART and network controller
  from earlier work and describes the controller only by its parts: a 1687
  state machine, a SIB control register, an instrument length memory and a
  discard unit. The controller here is this design's own.
  * All instruments are LEN bits long, so the instrument length memory is just
    the parameter `LEN`. Instruments of different lengths are not supported.
  * The order of data bytes, the returned read bytes and the drain rule are
    this design's choices.
  * In an apply that mixes reads and writes, the read registers' instruments
    also receive the update, which carries the filler byte. Keep reads and
    writes in separate applies.
* **Test path counts SIB bits.** The original's worked 3-SIB example counts
  only scan-register bits in the test and dummy sequences. Its 50-SIB bit count
  also includes one bit per SIB shift flip-flop. This design follows the
  latter, because those flip-flops are physically in the path.
* **Clear state.** The clear state between test steps is an addition.
* **Counter limits.** The original's state charts are drawn for three SIBs
  with short patterns. Their counter limits are generalised to N_SIB.
* **Clock.** The 100 MHz clock (`CLKS_PER_BIT = 868`) is an assumption; only
  the baud rate is given.
* **Receive buffer.** It holds one byte. Bytes must not arrive faster than one
  per scan pass; this always holds at 115200 baud.

## Files

The RTL, in `rtl/`:

* `rsn_pkg.sv`: shared constants, the scan-control struct and the pattern
  function.
* `sib.sv`, `scan_register.sv`, `flat_rsn.sv`: the network.
* `sequence_generator.sv`, `su_controller.sv`, `delayer.sv`,
  `fault_detector.sv`, `sequence_detector_top.sv`, `test_block.sv`: the test.
* `repair_component.sv`, `network_controller.sv`: access and repair.
* `uart_rx.sv`, `uart_tx.sv`: the serial link.
* `rsn_test_repair_top.sv`: the top.

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each testbench
prints `TB_RESULT checks=… failures=…` and has a watchdog. The system-level
ones are:

* **`tb_rsn_test_repair_top`** runs the whole flow with 6 SIBs and a fast
  UART:
  1. a fault-free test;
  2. fault injection and reads before repair;
  3. a test that must find the exact faults;
  4. repair;
  5. writes and reads that must bypass the broken registers and return exact
     data for the others.

  It counts each mechanism and fails if one never happened: FULLTEST,
  ONEBYONE, mismatch, capture, write update, discarded bits, repair load and
  bypass.
* **`tb_rsn_full_size`** runs the same flow at the top's default parameters:
  150 SIBs and 868 clocks per UART bit.
* **`tb_experiments`** (helper `tb_exp_runner`) builds networks of 50, 100 and
  150 SIBs. It runs a test and a repair with a fault in the first register. At
  150 SIBs it also runs with 1, 2, 3, 4, 5, 25, 50, 100 and 150 faults. It
  checks four things:
  * the fault list is exact;
  * the host sends 16 bits per command;
  * the chip sends nothing back;
  * the shift counts match the table above.

To simulate with Verilator, pass the package first. For example:

```
verilator --binary --timing -Irtl -Itb rtl/rsn_pkg.sv tb/tb_rsn_test_repair_top.sv \
          --top-module tb_rsn_test_repair_top -o sim && ./obj_dir/sim
```

Any other testbench runs the same way. The full-size run takes a few tens of
seconds. Add `--assert` to enforce three rules during simulation:

* the network never sees two scan operations in one cycle;
* the access controller stays off the network while a test runs;
* a byte goes to the UART transmitter only while it is free.

## Parameters

| parameter | default | where |
|---|---|---|
| `N_SIB` | 150 | number of segments (top, network, test, repair, controller) |
| `LEN` | 8 | scan register length |
| `ADDR_W` | 8 | register address width; N_SIB must not exceed 2^ADDR_W |
| `CLKS_PER_BIT` | 868 | UART bit time in clocks |
| `PARITY` | 0 | 0 none, 1 odd, 2 even |

The test block stores its patterns as vectors of N_SIB·(LEN+1) bits. Its size
grows linearly with N_SIB, and the repair component's address comparators
grow the same way.
