# PMBus voltage scaling and power monitoring from the programmable logic of a Zynq board

Xilinx 7-series boards such as the ZC702 power the FPGA core (VCCINT), the
processor core (VCCPINT) and other rails from a TI UCD92xx digital power
controller. That controller is programmable over PMBus, which is I2C with a
command layer on top. If the device can reach the PMBus itself, it can lower
its own core voltage at run time, and read back the voltage, current and power
of each rail. The PL core has been shown to run correctly well below its
nominal 1 V.

This RTL is the logic-side unit that does this, called the DVS (dynamic
voltage scaling) unit below. The application processor (Cortex-A9 in the PS)
puts a request in a small shared memory and later collects the answer. The
unit does all of the slow I2C work, so the PS spends no cycles on it and its
own power draw is not disturbed while it is being measured. The same approach
fits any board whose regulators are on a PMBus.

The unit keeps output voltages inside **650 mV to 1000 mV**. A request outside
that window is refused rather than sent to the regulator, because a wrong
value could damage the board or cut its supply. The refusal is made in
hardware, on the PS write path, before the request reaches the mailbox.

## Structure

```
             PS AXI4-Lite                                 local AXI4-Lite bus
 Cortex-A9 ──► axil_vout_guard ──► port A ┌─────────┐ port B ◄──┐
                  (vout_reject)           │dvs_dpram│           │ axil_xbar ◄── mb_req/mb_rsp ── soft processor
                                          └─────────┘           │                                (not included)
                                                 i2c_master ◄───┘
                                                     │
                                         IIC_SCL/SDA_MAIN ── level shifter ── PCA9548 1-to-8 switch
                                                                             └ channel 7: PMBus ── UCD92xx
```

| module | role |
|---|---|
| `dvs_ip_core` | top level. Wires the three parts together and brings out the PS port, the soft-processor port and the I2C lines. |
| `axil_vout_guard` | filter on PS writes. An out-of-window SET_VOUT request is not stored; the guard writes a REJECTED status in its place and pulses `vout_reject`. |
| `dvs_dpram` | dual-port RAM (256 x 32 bit by default) that acts as the register file and mailbox. Port A is on the PS bus and port B on the local bus. |
| `axil_xbar` | local bus. One manager (the soft processor) and two subordinates (the RAM and the I2C controller). Unmapped addresses get DECERR. |
| `i2c_master` | I2C controller with AXI4-Lite registers. It sits on top of `i2c_byte_engine`. |
| `i2c_byte_engine` | bit-level I2C master: START or repeated START, one byte out or in with its acknowledge, and STOP. |
| `axil_reg_port` | helper that turns an AXI4-Lite subordinate port into a simple one-cycle register port. |
| `dvs_pkg` | AXI4-Lite structs, the address map, the register and mailbox layouts, PMBus codes and the voltage window. |

Each AXI4-Lite port is a pair of packed structs: `axil_req_t` carries the
manager-to-subordinate signals and `axil_rsp_t` the other direction.

## The voltage window guard

Every PS write is held in `axil_vout_guard` until both its address and its
data have arrived. Writes to any other word pass through unchanged. A write to
the CMD word that sets GO is checked against two rules:

- it must be a full-word write;
- if it is SET_VOUT, its millivolt field must be within 650..1000 mV.

A write that breaks a rule is not stored. Instead the guard writes STATUS =
DONE | REJECTED, so the PS sees its request answered within a few cycles. The
firmware never sees the request.

The CMD word is matched on the same address bits the RAM uses, so aliases of
CMD above the RAM depth are caught as well. The guard adds two cycles to each
PS write; reads pass through untouched.

## Who does what: the soft processor contract

Turning requests into PMBus traffic takes a sequence of I2C transfers per
request, and the PMBus details differ slightly from board to board. The
original system therefore runs it in firmware on a MicroBlaze soft processor
rather than in a hand-written state machine. This RTL keeps that split. **The
processor and its firmware are not part of this RTL.** Their data port is the
`mb_req`/`mb_rsp` port of `dvs_ip_core`. Any AXI4-Lite manager that follows
the contract below will work: a MicroBlaze, another soft core, or a small
state machine. `tb/mb_firmware_model.sv` is a behavioural model of that
firmware and is the reference for it.

The firmware must:

1. At start-up, write `0x80` to the PCA9548 switch (I2C address `0x74`). This
   connects channel 7, the PMBus. Until then the power controller (address
   `0x34`) cannot be seen on the bus.
2. Poll mailbox word 0 (CMD) in the RAM at `0xC000_0000`.
3. When it sees GO set:
   1. clear CMD;
   2. check a SET_VOUT value against 650..1000 mV (a second line of defence
      behind the guard);
   3. if it passes, write PMBus `PAGE` to select the rail, then `VOUT_COMMAND`
      or one of the `READ_*` commands;
   4. write RESULT and then STATUS.

### Mailbox (words of `dvs_dpram`, written by the PS at byte offsets 0, 4, 8)

| word | bits | meaning |
|---|---|---|
| 0 CMD | [31] GO, [27:12] millivolts, [11:8] PMBus page (rail), [7:0] opcode | written by the PS; cleared by the firmware when it takes the request |
| 1 STATUS | [31] DONE, [1:0] 0 ok, 1 refused (outside window), 2 I2C error (NACK), 3 unknown opcode | written by the firmware last |
| 2 RESULT | [15:0] raw PMBus reading | VOUT in LINEAR16 (exponent −12, so mV = N·1000/4096); IOUT and POUT in LINEAR11 |

Opcodes are 1 SET_VOUT, 2 READ_VOUT, 3 READ_IOUT and 4 READ_POUT.

To make a request, the PS clears STATUS, writes CMD with GO set, polls STATUS
until DONE is set, then reads RESULT. The RAM is not cleared by reset. The PS
must therefore zero CMD before it lets the firmware start polling.

Both ports can write the same word in the same cycle. If they do, port B (the
firmware) wins.

## The I2C controller

The controller is written from scratch and kept small. Firmware drives it one
byte at a time through three registers. Offsets are relative to `0x4080_0000`.

| offset | register | bits |
|---|---|---|
| 0x00 | CMD (write) | [0] START, [1] STOP, [2] READ, [3] WRITE, [4] NACK after a read, [15:8] byte to send |
| 0x04 | STATUS (read) | [0] BUSY, [1] RXNACK, [2] ARBLOST, [3] CMDERR, [15:8] last byte received |
| 0x08 | PRESCALE (read/write) | [15:0] clock cycles per quarter SCL period. Reset value 250, which gives 100 kHz from 100 MHz. |

A single CMD write can combine START, one byte and STOP, in that order. The
firmware writes CMD and then polls BUSY. A CMD written while the controller is
busy is dropped, and CMDERR is set. The two PMBus transfers used here are:

- **Word write:** `START+WRITE(addr<<1)`, `WRITE(code)`, `WRITE(lo)`,
  `WRITE(hi)+STOP`.
- **Word read:** `START+WRITE(addr<<1)`, `WRITE(code)`,
  `START+WRITE(addr<<1|1)`, `READ`, `READ+NACK+STOP`. The second START is a
  repeated START.

**Bit timing.** Every bit is split into four quarters of PRESCALE cycles:

1. SCL low, SDA changes;
2. SCL released;
3. SCL high; the bit is sampled at the end of this quarter;
4. SCL pulled low.

START and STOP use the same four-quarter frame, so SDA only ever moves at a
quarter boundary. One byte with its acknowledge takes 36·PRESCALE cycles. Each
SCL rise adds about 2 cycles for the 2-flop input synchronisers.

**Clock stretching.** After the engine releases SCL, it does not start
counting until the synchronised SCL line actually reads high. A target can
therefore stretch the clock for as long as it likes.

**Arbitration.** This bus is shared: the PS I2C controller sits on the same
lines through a second level shifter, and other peripherals hang off the
switch. If SDA reads low while the engine is sending a 1, the engine releases
both lines, sets ARBLOST and ends the command.

**Holding the bus.** Between commands without a STOP, the engine holds SCL
low. A STOP-only command is meant for this held state. Do not issue one on an
idle bus.

The lines are open drain: `scl_oe`/`sda_oe` = 1 pulls the line low. On an
FPGA pad, use a tristate buffer whose data input is 0 and whose output
enable is `*_oe` (for a Xilinx IOBUF, `T = ~*_oe`).

## Timing and size

These results come from the end-to-end testbench, with a 100 MHz clock,
100 kHz SCL and the firmware model:

| operation | measured | time measured on the original board |
|---|---|---|
| one reading (PAGE write + word read) | 77,242 cycles = 0.77 ms | 3.9 ms |
| set a voltage (PAGE write + VOUT_COMMAND) | 67,210 cycles = 0.67 ms | 50.3 ms |

The testbench fails if either limit from the original board is exceeded.

Almost all of the time is I2C bit time. Real firmware adds its own instruction
time, and real firmware also sends a longer command sequence to change a
voltage. The last column is therefore an upper bound, not a target.

Local-bus accesses are quick by comparison. Read data and write responses
come back on the second rising edge after the handshake, plus one cycle
through `axil_xbar`.

Size after generic synthesis, without technology mapping:

| part | flip-flop bits |
|---|---|
| whole unit | about 420, plus the 8 Kbit RAM |
| I2C controller | 124 |
| voltage window guard | 142 |

The vendor I2C core that the original system used is larger (about 340 FF and
470 LUT).

## Where this RTL departs from the described system, and what is missing

- **Soft processor and firmware:** not included. The port they connect to is
  brought out, and the testbench models them.
- **Voltage window:** the 650..1000 mV limits come from the original design
  and are in `dvs_pkg` (`VOUT_MIN_MV`, `VOUT_MAX_MV`). The original leaves
  enforcement to the unit as a whole; here the PS-side guard enforces them in
  hardware, and the firmware is expected to check again. Nothing in hardware
  stops the firmware itself from sending an out-of-range `VOUT_COMMAND`
  through the I2C controller.
- **Choices of this design:** the I2C controller, its register map, the guard,
  the mailbox layout, the address map, the RAM depth and the 100 kHz default SCL
  rate. The original used a vendor I2C IP, and its register interface is not
  reproduced.
- **Not designed here:** the PS-side software method (the Cortex-A9 driving
  the PS hard I2C controller) and the LiquidMotion motion-estimation processor
  used as a test load. The PCA9548 switch, the PCA9517 level shifters and the
  UCD92xx exist only as the behavioural board model in `tb/`.
- **Board addresses:** the I2C addresses `0x74` (switch) and `0x34` (power
  controller) are those of the ZC702. The PMBus page numbers of VCCINT and
  VCCPINT are left to the firmware.

## Simulating

All files are SystemVerilog 2017. The package must come first:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dvs_ip_core \
    -y rtl -y tb +libext+.sv -Irtl rtl/dvs_pkg.sv tb/tb_dvs_ip_core.sv
./obj_dir/Vtb_dvs_ip_core
```

Replace `tb_dvs_ip_core` with any other testbench. Every testbench ends with a
line `TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `tb_dvs_ip_core` | The whole unit at its default parameters. It sweeps rail 0 from 1.00 V to 0.75 V in 50 mV steps and reads voltage, current and power at each step. It also checks that out-of-window requests are refused by the guard within 100 cycles without reaching the firmware, and that 650/1000 mV are accepted. It covers a second rail, an unknown opcode and a missing target (I2C error) with recovery. It checks latency against the limits above and requires every mechanism (switch selection, set, read, guard refusal, bad opcode, I2C error, clock stretching) to occur. |
| `tb_i2c_master` | Checks the following: <ul><li>register reset values;</li><li>switch write and read-back;</li><li>address NACK;</li><li>PMBus word write and read with repeated START;</li><li>CMDERR;</li><li>arbitration loss against a line held low;</li><li>SCL period at two prescale values;</li><li>waiting on a stretching target.</li></ul> |
| `tb_dvs_dpram` | Checks the following: <ul><li>port-to-port transfer;</li><li>byte strobes;</li><li>every word;</li><li>address wrap;</li><li>same-cycle write collision;</li><li>simultaneous reads;</li><li>access latency.</li></ul> |
| `tb_axil_vout_guard` | Guard in front of the RAM. Window edges 649/650/1000/1001 mV, requests without GO, other opcodes, partial writes that set GO, a CMD alias above the depth, and 300 random writes checked against a reference model of the rule, including one `reject` pulse per refusal. |
| `tb_axil_xbar` | Routing to both windows, SLVERR pass-through, DECERR with no side effects, and 300 random accesses against randomly stalling subordinates. |

Testbench helpers:

| file | purpose |
|---|---|
| `axil_master_bfm` | AXI4-Lite manager tasks |
| `axil_mem_model` | stalling subordinate |
| `zc702_pmbus_model` | switch plus power controller, with optional clock stretching and a simple load for the current and power readings |
| `mb_firmware_model` | the firmware contract above |

The testbenches rely on two-state simulation with random start values. Every
register that is read is reset or written first.
