# I3C primary controller with an APB programming port

This is a MIPI I3C (SDR) primary controller that a CPU drives over AMBA APB. It
moves bytes between a small data RAM and targets on the two-wire I3C bus.
It can:

- do private reads and writes to I3C targets;
- send broadcast common command codes (CCCs);
- give targets dynamic addresses (ENTDAA);
- talk to legacy I2C targets;
- answer in-band interrupts (IBIs) raised by targets.

The design follows the block structure and state diagrams of the controller in
the thesis "Novel Method of ASIC interface IP development using HLS". That
controller was written in C++ for a high-level synthesis tool. This version is
hand-written SystemVerilog. The thesis gives the blocks, their duties and the
protocol flows, but no register map, encodings or sizes. Those parts are this
design's own, and are listed under "Choices made here".

The main idea is a three-level split of the work:

1. The **central controller** knows the protocol flows. A private read, an
   address assignment or an interrupt is a sequence of *bus actions*.
2. The **bus action controller** runs one action at a time: start, repeated
   start, stop, write a byte, read a byte, send an ACK. It reports when the
   action is done. Every flow reuses the same few actions, so the
   byte-level logic exists only once.
3. The **bus driver** turns each bit of an action into SCL and SDA edges. The
   SCL high and low times and the SDA switching delay are programmable.

## Block diagram

```
             +-----------+ control  +-----------+ action  +-----------+ SCL/SDA  +--------+
 APB <-----> | APB       |--------->| central   |-------->| bus action|--------->| bus    |--> SDA/SCL
             | register  |<---------| controller|<--------| controller|<---------| driver |<-- pads
             | block     |  status  +-----------+  done   +-----------+ status   +--------+
             +-----------+               | RAM port B
               |     | RAM port A        v
               |     +--------------> RAM controller ---> RAM (256 x 8)
               v  events
          event detector ---> irq
```

| file | block |
|---|---|
| `rtl/i3c_pkg.sv` | shared types: actions, command word, table entry, register map, events |
| `rtl/i3c_controller_top.sv` | top level, wiring only |
| `rtl/i3c_apb_regs.sv` | APB slave and register array |
| `rtl/i3c_central_ctrl.sv` | process selection and the protocol flows |
| `rtl/i3c_bus_action.sv` | bus actions |
| `rtl/i3c_bus_driver.sv` | SCL controller and SDA controller, pad signals |
| `rtl/i3c_ram_ctrl.sv` | RAM arbiter, APB side first |
| `rtl/i3c_ram.sv` | data RAM, written as a register array |
| `rtl/i3c_event_det.sv` | sticky event bits and the interrupt line |

Bit `CTRL[0]` enables the central controller, the bus action controller and
the bus driver. While it is low, both pad buffers are off.

## From command to bus edges

### Bus driver: one bit

The SCL controller takes three commands:

- `SCL_HIGH` drives SCL high and holds it for `T_HIGH` clocks.
- `SCL_LOW` drives SCL low.
- `SCL_CLOCK` is one bit. SCL stays low until it has been low for `T_LOW`
  clocks, then goes high for `T_HIGH` clocks, then falls again.

The low time is counted from the falling edge, not from when the command
arrived. Bits sent back to back therefore have an exact period of
`T_LOW + T_HIGH` clocks. SDA is sampled at the end of the high phase,
through a two-flop synchroniser.

The SDA controller takes a value and whether to drive it at all. While SCL is
low, the change waits until SCL has been low for `SDA_OFS` clocks. While SCL is
high, the change is applied at once, which is how start and stop conditions
are made.

```
SCL  ____/‾‾‾‾‾‾‾‾‾\____________/‾‾‾‾‾‾‾‾‾\____
SDA  ======X===================X================
              |<- SDA_OFS ->|
         |<-T_LOW->|<-T_HIGH->|
```

An SDA change cannot come before the command that carries it. In the full
controller the next bit's command reaches the driver shortly after the
falling edge. Offsets of 3 and more are therefore exact, while smaller ones
act as 3. `SDA_OFS` must be
smaller than `T_LOW`; an assertion checks this. `T_HIGH` should be at least 3
so that the synchronised sample sees the settled line.

The pads follow a tri-state buffer with a pull-up. `*_state` is the value,
`*_tribuf_en` turns the buffer on, and `*_read` is the pin. In open-drain mode
SDA's buffer is on only to pull low. SCL is always driven push-pull, and clock
stretching is not supported.

### Bus actions

| action | bus sequence |
|---|---|
| `ACT_START` | SDA low while SCL high, hold `T_HIGH`, SCL low |
| `ACT_RSTART` | release SDA, SCL high, then as START |
| `ACT_STOP` | SDA low, SCL high, release SDA, hold `T_HIGH` (bus free) |
| `ACT_TX_ACK` | 8 bits out, 9th bit released and read as ACK (address, I2C data) |
| `ACT_TX_T` | 8 bits out, 9th bit = odd parity T bit (I3C write data, CCC) |
| `ACT_RX` | 8 bits in (IBI address, PID bytes, I2C data) |
| `ACT_RX_T` | 8 bits in, 9th bit read as T, where 0 = last byte (I3C read data) |
| `ACT_ACK` | one bit: ACK (drive low) or NACK (release) |

Address bytes and ACK bits are open-drain. I3C data with T bits is
push-pull. The controller takes a request when `act_ready` is high, and pulses
`act_done` with `rx_data`, `rx_ack` and `rx_t` when the action is over.

When the controller is idle and SCL is high, SDA held low by someone else
raises `target_start`: a target is starting an in-band interrupt.

### Central controller: the flows

One state machine holds the process selection step and all flows. When idle,
it starts an IBI if a target has pulled SDA low on a free bus. Otherwise it
starts the waiting command, if there is one.

- **Private write / read (I3C).** START, `7E/W` (ACK), Sr, `addr/W` or `addr/R`
  (ACK). Writes send `length` bytes from RAM, each with its T bit. Reads
  store bytes in RAM until the target sends T = 0 or `length` bytes have
  arrived. A NACK to either address ends with STOP and the NACK event.
- **Legacy I2C write / read.** START, `addr/R/W` (ACK). Written bytes
  are each followed by an ACK from the target; a data NACK ends the transfer
  and raises the NACK event. On reads the controller ACKs each byte and NACKs
  the last one.
- **Broadcast CCC.** START, `7E/W`, the code from the `CCC` register with its T
  bit, then `length` data bytes from RAM.
- **Dynamic address assignment.** START, `7E/W`, ENTDAA (0x07). Then for each
  target:
  1. Sr, then `7E/R`.
  2. Read the 8 bytes PID[47:0], BCR and DCR. They are stored in RAM at
     `ram_base + 8*n`.
  3. Write the next free dynamic address from the device address table,
     followed by its parity bit.
  4. On ACK, write the target's BCR and DCR into that table entry and mark it
     assigned.

  The flow stops with STOP when no target ACKs `7E/R`, or when the table has
  no free entry left. When several targets answer at once, open-drain
  arbitration on the PID decides which one goes first. The lower PID wins.
- **In-band interrupt.** The controller finishes the start the target began
  and reads the address byte. It accepts the IBI only if all of these hold:
  - `CTRL[1]` is set;
  - the address is an assigned table entry with `ibi_en` set;
  - the R/W bit is 1;
  - the entry's BCR[2] is set (the target sends a data byte with its IBI).

  If accepted, the controller ACKs, reads one byte with its T bit, stores
  `{address, byte}` in the `IBI` register and raises the IBI event. If not,
  it NACKs and raises the IBI-rejected event. If `CTRL[2]` is set, it then
  sends DISEC with "disable interrupts":
  - broadcast DISEC (0x01) when `CTRL[3]` is set;
  - direct DISEC (0x81) to the offending target otherwise.

**Keeping the bus.** A command with `hold_bus` set ends without STOP, and
the next command opens with a repeated start. After an IBI, the controller
keeps the bus the same way if a command is already waiting. Otherwise it
sends STOP.

## Programming model

All registers are 32 bits wide at byte addresses.

| address | name | contents |
|---|---|---|
| 0x000 | CTRL | [0] enable, [1] accept IBIs, [2] DISEC after a rejected IBI, [3] DISEC to all targets |
| 0x004 | SCL_TIME | [15:0] `T_LOW`, [31:16] `T_HIGH`, in clocks (reset 8 / 8) |
| 0x008 | SDA_OFS | [7:0] SDA delay after SCL falls (reset 2) |
| 0x00C | CMD | command word; writing it launches the command |
| 0x010 | STATUS | [0] busy, [15:8] bytes moved by the last command, [23:16] addresses given by the last DAA |
| 0x014 | INT_EN | interrupt enable per event |
| 0x018 | INT_STAT | pending events; write 1 to clear |
| 0x01C | IBI | [7:0] data, [14:8] address, [15] valid |
| 0x020 | CCC | [7:0] code for broadcast CCC commands |
| 0x040 + 4i | DAT[i] | device address table entry i |
| 0x400 + 4j | RAM[j] | data RAM byte j in bits [7:0] |

The **command word** has these fields:

| bits | field | meaning |
|---|---|---|
| [3:0] | type | 1 = private write, 2 = private read, 3 = broadcast CCC, 4 = DAA, 5 = I2C write, 6 = I2C read |
| [10:4] | address | target address |
| [12] | `hold_bus` | end without STOP |
| [23:16] | length | number of data bytes |
| [31:24] | `ram_base` | first RAM byte the command uses |

One command can wait while another runs. A further command written in that
time is dropped, so poll `STATUS[0]` or wait for the done event.

A **table entry** has these fields:

| bits | field |
|---|---|
| [6:0] | dynamic address |
| [8] | `valid` (may be handed out by DAA) |
| [9] | `ibi_en` |
| [10] | `assigned` |
| [23:16] | BCR |
| [31:24] | DCR |

The CPU fills in the address, `valid` and `ibi_en`. DAA sets `assigned`, BCR
and DCR.

The **events** are bits 0 to 5 of `INT_STAT`: command done, NACK, IBI received,
IBI rejected, RAM overflow (a byte address past the RAM end; the byte is
dropped), and DAA done. `irq` is high while any pending event is also enabled.

**APB timing.** Register accesses complete without wait states. RAM accesses
go through the RAM controller, where APB always has priority over the central
controller. A RAM write takes no wait state and a read takes one. An address
outside the map answers with `pslverr`.

Usage example:

1. Write `SCL_TIME` and `SDA_OFS`, then set `CTRL = 0x7`.
2. Fill `DAT[0..]` with `0x100 | addr`, or `0x300 | addr` to allow IBIs.
3. Write `CMD = 4` to run DAA and wait for the DAA-done event.
4. Put bytes in RAM and write a private write command, for example
   `CMD = (len<<16) | (0x30<<4) | 1`.

## Choices made here

These points follow the I3C specification or are this design's own, not the
source description:

- **Unspecified in the source.** The register map, command word, table layout,
  event list, reset values, RAM size (256 x 8) and table size (8) are this
  design's choices.
- **Taken from the I3C specification.** The 0x7E header before private
  transfers, the T-bit rules and the CCC codes ENTDAA 0x07 and DISEC
  0x01/0x81 with data 0x01.
- **DAA diagram.** The state diagram shows a NACK leaving the ENTDAA step.
  A CCC byte carries a T bit and cannot be NACKed, so that edge is not built.
- **"Next command" in the flows.** The flows end with "next cmd → RSTART".
  Here this is the `hold_bus` bit, plus the waiting-command rule after IBIs.
- **Merged state machines.** The process state machines are one state machine
  in one module. The original kept them as separate blocks joined by FIFOs;
  those FIFOs belonged to its HLS tool flow.
- **Not implemented**, as in the original: HDR modes, hot-join and controller
  role hand-over. Also missing: clock stretching, early termination of an I3C
  read by the controller, controller-side arbitration loss, and a command
  queue deeper than one.
- **Parameters.** The top has `N_DAT` (default 8) and `RAM_DEPTH` (default
  256; the command word's 8-bit fields address up to 256 bytes).

## Simulation

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The behavioural target model
`tb/i3c_target_model.sv` is an I3C target or a legacy I2C target. It covers
the 7E header, CCCs, ENTDAA with PID arbitration, private transfers, DISEC and
IBI generation. In its two-state bus model a released line reads 1.

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/i3c_pkg.sv tb/tb_i3c_controller_top.sv --top-module tb_i3c_controller_top
./obj_dir/Vtb_i3c_controller_top
```

The same command works for `tb_i3c_bus_driver`, `tb_i3c_bus_action`,
`tb_i3c_central_ctrl`, `tb_i3c_apb_regs`, `tb_i3c_ram_ctrl`, `tb_i3c_ram` and
`tb_i3c_event_det`.

`tb_i3c_controller_top` runs the full controller with default parameters.
The bus holds two I3C targets and one I2C target. The sequence is:

1. DAA of both I3C targets, where the target with the lower PID wins
   arbitration.
2. I3C private write.
3. I3C private read, ended by the target's T bit.
4. I2C write, then I2C read.
5. Broadcast CCC.
6. A write to an absent address, which is NACKed.
7. An accepted IBI.
8. A rejected IBI, followed by direct DISEC.
9. Two commands chained with a repeated start.
10. An IBI while a command is waiting. The bus is kept, and the command
    follows with a repeated start.
11. A read that runs past the end of the RAM.
12. An IBI refused because IBIs are switched off, followed by broadcast DISEC.

It also checks that every data bit has exactly `T_LOW` low and `T_HIGH` high
clocks. It checks that every SDA change inside a byte comes exactly `SDA_OFS`
clocks after SCL falls. It checks that the controller never drives SDA high while a target
pulls it low, and it counts that each mechanism above happened at least once.
It runs in well under a second.

The testbenches check behaviour against the protocol flows described above.
The design has not been checked against real I3C devices or a compliance
suite.
