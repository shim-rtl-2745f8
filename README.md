# Shared-variable peripherals: a bus timer and an I2C controller

Most embedded systems split a job between a processor and custom logic, and
the awkward part is the seam between them: address decoding, bus
handshakes, registers that both sides touch, and a driver that has to agree
with all of it. The SHIM approach removes most of that seam. A *shared
variable* lives in a hardware register. Hardware processes update it once
per clock, like any RTL signal. Software reads and writes it as a plain
memory-mapped word. The bus interface around the registers is mechanical, so
it can be generated.

This repository gives that generated hardware as hand-written SystemVerilog
for the two example systems SHIM was demonstrated on:

* **`shim_timer`** is a free-running 32-bit cycle counter. Software can
  restart it (`reset_timer`) and read it (`get_time`).
* **`i2chw_core`** is an I2C bus master in which hardware sequences whole
  bytes: start condition, send, receive, stop. Software issues one command
  at a time and synchronises with the controller through a four-phase
  handshake. Because the pin controls are shared variables too, the same
  peripheral also supports a purely software, bit-banged driver.

Both are slaves on IBM CoreConnect's On-chip Peripheral Bus (OPB), as used
with a MicroBlaze soft processor. `shim_system` places them side by side.

## Shared variables and who wins a write

Every shared variable is one `shim_shared_var` register. It has two write
ports:

* `hw_we`/`hw_d` come from the single hardware process that owns the
  variable. A variable has at most one such writer.
* `bus_we`/`bus_d` come from a software write through the bus.

If both write in the same cycle, **software wins**. In the SHIM model the
bus read is appended to the end of the owning process, so its assignment
comes last. This rule matters because many processes write their variable
on every cycle. The timer, for example, writes `counter + 1` every clock.
Without software priority, `reset_timer` could never take effect. If you
want one-directional traffic, use two variables: one written only by
hardware, one written only by software.

A variable that no hardware process writes, such as `command`, ties `hw_we`
low. A variable that hardware refreshes on every cycle, such as `SDA_data`,
ties `hw_we` high. In that case a software write lasts one cycle.

## The bus interface (`shim_opb_slave`)

The slave decodes `OPB_ABus` against `[C_BASEADDR, C_HIGHADDR]` (default
`0xFEFF0200`–`0xFEFF02FF`) to form its chip select. Variable *i* sits at byte
offset `4*i`. Every access uses the whole 32-bit word, and a variable takes
its low bits. Byte enables and `OPB_seqaddr` are ignored.

A transfer lasts three cycles of `OPB_select`:

| cycle | read                                      | write                         |
|-------|-------------------------------------------|-------------------------------|
| 0     | addressed variable captured (`read_data`) | —                             |
| 1     | `read_data` moved to the output register  | write strobe, variable updates at the end of the cycle |
| 2     | `Sln_xferAck` = 1, `Sln_DBus` valid       | `Sln_xferAck` = 1             |

The two read registers follow the generated code SHIM emits. The slave
drives `Sln_DBus` to zero whenever it is not acknowledging a read, which is
what the OPB's OR-combined data bus needs. An assertion checks this.

* If `OPB_select` stays high after the acknowledge, a new transfer starts.
* An address inside the window but past the last variable is acknowledged.
  It reads as zero and ignores writes.
* An address outside the window is never answered. The bus master's timeout
  handles it.
* `Sln_errAck`, `Sln_retry` and `Sln_toutSup` are held at 0.

`OPB_Rst` is the only reset. It is synchronous and active high.

Bit order: the OPB specification numbers bit 0 as the MSB. This RTL uses
`[31:0]` with bit 31 as the MSB. Word values are the same either way.

## The I2C controller

### Register map (`i2chw_core`, word offsets from the base)

| offset | variable               | written by                         | meaning |
|--------|------------------------|------------------------------------|---------|
| 0x00   | `SCL`                  | controller, software               | clock wire value |
| 0x04   | `SDA`                  | controller, software               | data wire value when driven |
| 0x08   | `SDA_oe`               | controller, software               | 1 = data wire released (tri-state) |
| 0x0C   | `SDA_data`             | pin, every cycle                   | level on the data wire |
| 0x10   | `sreg`                 | controller, software               | byte to send / byte received |
| 0x14   | `state`                | controller, software               | controller state (5 bits) |
| 0x18   | `ready`                | controller, software               | 1 while idle and accepting a command |
| 0x1C   | `command`              | software                           | 0 IDLE, 1 START, 2 SEND, 3 RECEIVE, 4 STOP, 5 RECEIVE_LAST |
| 0x20   | `acknowledge_received` | controller, software               | SDA level in the acknowledge clock of the last SEND: **0 = acknowledged** |
| 0x24   | `SCL_oe`               | software                           | 1 = clock wire released (reset 0: this master drives SCL) |

### Handshake

The controller and the driver run at speeds that have nothing to do with each
other. A four-phase handshake keeps them in step:

1. The controller waits in `IDLE` with `ready = 1`.
2. Software writes a command, then polls until `ready` reads 0.
3. The controller runs the operation and parks in `IDLE0`, where `ready` is 0.
4. Software writes `IDLE` to `command` and polls until `ready` reads 1.

A `send(byte)` driver therefore writes `sreg`, writes `SEND`, waits for
`ready` to fall, writes `IDLE`, waits for `ready` to rise, and then reads
`acknowledge_received`. `receive` works the same way and reads `sreg`
afterwards. Use `RECEIVE_LAST` for the final byte of a read, so that the
master answers it with NACK.

### Sequences and timing

The state machine advances only on `i2c_clock`, a one-cycle pulse from
`i2c_tick` every `I2C_DIV` bus cycles (default 125).

| command | states | what happens on the wires | ticks |
|---------|--------|---------------------------|-------|
| START   | START1–4 | drive SDA high; SCL high; SDA low (start); SCL low | 4 |
| SEND    | SEND1–8 | per bit: SDA = `sreg[7]`; SCL high and shift; SCL low. After 8 bits: release SDA, SCL high, sample SDA, SCL low | 1 + 8×3 + 4 = 29 |
| RECEIVE / RECEIVE_LAST | RECV1–8 | release SDA; per bit: SCL high; shift SDA into `sreg`; SCL low. Then drive ACK (0) or NACK (1), clock it, release SDA | 29 |
| STOP    | STOP1–3 | drive SDA low; SCL high; SDA high (stop) | 3 |

The handshake adds three ticks: `IDLE` takes the command, `IDLE0` sees
`IDLE`, and `IDLE` raises `ready`. From the command write to `ready` rising
again, START takes 7 ticks, SEND and RECEIVE take 32, and STOP takes 6. The
SCL period while bits are shifting is 3 ticks, or 375 bus cycles at the
default setting. That is 133 kHz on a 50 MHz bus clock. I2C has no minimum
clock rate, so any `I2C_DIV` that keeps SCL under the slave's maximum works.

SDA changes only while SCL is low, except in the start and stop conditions.
An assertion in `i2c_controller` checks this whenever software issues
commands in a legal I2C order. A bit is sampled one tick after SCL rises.

The state numbers `IDLE` = 0, `SEND1` = 5, `SEND2` = 6 and `IDLE0` = 24 are
fixed, as are the command codes `IDLE` = 0 and `SEND` = 2. The other codes
fill the gaps in order (`shim_pkg`). Software can read `state`, and because
it is a shared variable, software can also write it. Writing `IDLE0` while
`command` holds `IDLE`, for instance, sends the controller through one
handshake round. A state value above 24 returns to `IDLE` at the next tick.

### Software-only use

Leave the controller in `IDLE`. Software can then toggle `SCL`, `SDA` and
`SDA_oe` directly and read the data wire through `SDA_data`. This runs the
bus protocol completely in software. The testbenches do this with complete
register writes.

### Pads

`SDA`, `SDA_oe`, `SDA_in`, `SCL` and `SCL_oe` are meant for two
bidirectional FPGA pads (pad input = `SDA`/`SCL`, tri-state control =
`*_oe`, pad output = `SDA_in`). The pads are vendor primitives and are not
part of this RTL. They sit outside `shim_system`. In simulation, the wires
are modelled as open drain with pull-ups:
`sda = (SDA_oe ? 1 : SDA) & !slave_pulls_low`.

## The timer

`shim_timer` is one shared variable, `counter`, at offset 0. Its process
adds one every bus cycle. A software write sets the counter to the written
value and overrides that cycle's increment. A read returns the counter's
value from the first cycle of the read transfer. With the transfer timing
above, a write whose first cycle is cycle *w* and a read whose first cycle
is cycle *r* return `value + (r − w − 2)`. The counter wraps at 2^32.

## Hierarchy

```
shim_system
├── shim_timer
│   ├── shim_opb_slave (NVARS = 1)
│   └── shim_shared_var (counter)
└── i2chw_core  (instance opb_i2ccontroller_0_i)
    ├── shim_opb_slave (NVARS = 10)
    ├── i2c_tick
    ├── i2c_controller
    │   └── shim_shared_var × 7 (SCL, SDA, SDA_oe, sreg, state, ready, acknowledge_received)
    └── shim_shared_var × 3 (command, SCL_oe, SDA_data)
shim_pkg: bus widths, default window, register map, command and state enums
```

## Parameters

| module | parameter | default | notes |
|--------|-----------|---------|-------|
| `shim_opb_slave`, `shim_timer` | `C_BASEADDR` / `C_HIGHADDR` | `FEFF0200` / `FEFF02FF` | address window |
| `i2chw_core` | `c_baseaddr` / `c_highaddr` | same | same, with the generic names of the original wrapper |
| all bus blocks | `C_OPB_AWIDTH`, `C_OPB_DWIDTH` | 32, 32 | |
| `shim_timer` | `COUNT_WIDTH` | 32 | |
| `i2chw_core`, `shim_system` | `I2C_DIV` | 125 | bus cycles per controller tick (this design's choice) |
| `shim_opb_slave` | `NVARS` | 1 | number of shared variables |

## Simulating

Each testbench in `tb/` checks its own results. It prints
`TB_RESULT checks=N failures=M` and stops itself if it hangs. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/shim_pkg.sv \
          tb/tb_shim_system.sv --top-module tb_shim_system -Mdir obj
obj/Vtb_shim_system
```

Substitute any `tb_<block>` for the other blocks. The testbenches use only
two-state logic and `$urandom`.

| testbench | what it establishes |
|-----------|---------------------|
| `tb_shim_shared_var` | random hardware/bus writes against a reference model; bus priority; reset value |
| `tb_i2c_tick` | pulse period for `DIV` = 5 and 125, pulse count |
| `tb_shim_opb_slave` | acknowledge in cycle 3, read data per offset, one write strobe per write, zero data bus when idle, no answer outside the window |
| `tb_shim_timer` | exact count after restarts at random delays, software-over-hardware priority, wrap-around |
| `tb_i2c_controller` | START/SEND/RECEIVE/STOP against an I2C slave model, tick counts of each command, ACK and NACK, absent device, software writes to `state` and `SCL` winning |
| `tb_i2chw_core` | the same over the OPB with the driver handshake, read-back of the variables, a bit-banged software transfer, `SCL_oe` |
| `tb_shim_system` | whole design at default parameters: 84 configuration registers written and checked, repeated-start read-back, absent device, bit-banging, forced state, timer checks, SCL period; counts each mechanism and fails if any never occurs (about 1.2 M cycles, under a second) |

`tb/i2c_slave_model.sv` is a behavioural I2C slave. It has a 7-bit address,
a sub-address byte and auto-incrementing registers, like a video decoder's
configuration port. It counts start and stop conditions and acknowledges.

## Where this RTL departs from, or goes beyond, the original description

* **Bus timing.** The three-cycle transfer and the acknowledge in cycle 2 are
  choices made here. The original gives only the two read registers. It also
  writes the variable on every selected write cycle, while this RTL writes
  it once per transfer, which matters only for variables that hardware also
  writes.
* **Receive, start and stop sequences, and the ACK/NACK split.** Only the
  send sequence and the handshake are given in detail. The other sequences
  are written in the same style. `RECEIVE_LAST` (command 5) exists because
  the master needs some way to NACK the last byte of a read.
* **Command and state codes** other than the ones listed above are this
  design's.
* **Acknowledge polarity.** The send sequence stores the sampled SDA level.
  I2C acknowledges by pulling SDA low, so 0 means the slave acknowledged.
  The original software fragment reads the value the other way round. The
  stored value follows the hardware sequence, and the driver must treat 0 as
  acknowledged.
* **`i2c_clock`** is used but not specified in the original. `i2c_tick` and
  its divider are this design's.
* **`SCL_oe`** appears only as a port in the original wrapper. Here it is a
  software-written variable that resets to "drive".
* **Register order and offsets** are this design's: one word per variable,
  in declaration order.
* The timer and the I2C controller use the same default address window, so
  they are separate systems rather than two slaves on one bus.
* **Not included:** the processor, the OPB itself, the I/O pads and the
  video decoder. The testbenches stand in for the processor with bus tasks
  and for the decoder with the slave model.
