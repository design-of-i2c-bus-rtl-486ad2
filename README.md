# I2C bus controller: master, register-pointer slave and open-drain bus

I2C connects chips with two wires, a clock line (SCL) and a data line (SDA),
both open-drain with pull-up resistors. This design is an I2C **master
controller** that turns a host request (read or write, register address, data)
into bus transfers, and an I2C **slave controller** with a 256-byte register
file that answers at the 7-bit address `1101000`. Both run from one system
clock; the slave samples the bus lines instead of using SCL as a clock, so the
whole design is a single synchronous clock domain.

The master is a finite-state machine whose states follow the transfer step by
step: idle, START, device address + write, ACK, register address, ACK, data,
ACK, STOP; for reads, repeated START, device address + read, ACK, data, master
ACK/NACK, STOP.

## The bus

SCL and SDA are never driven high. A device either pulls a line low or
releases it, and a pull-up resistor brings a released line high. The level of
a line is the wired AND of all drivers. `i2c_bus` computes that, so every
drive signal in the design means "1 = release, 0 = pull low".

Three bus events matter:

| event        | SCL  | SDA                  |
|--------------|------|----------------------|
| START        | high | falls                |
| STOP         | high | rises                |
| data bit     | high | steady, read by the receiver |

SDA may change only while SCL is low, except in a START or STOP. A byte is
eight bits, MSB first, followed by a ninth clock in which the receiver pulls
SDA low (ACK) or leaves it high (NACK). Idle means both lines high.

## Transfers

The address byte is `1101000` followed by the direction bit: `11010000`
(0xD0) to write, `11010001` (0xD1) to read. `S` is START, `Sr` a repeated
START, `P` STOP, `A`/`N` ACK/NACK and the subscript says who sends it.

| host request                   | bus sequence                                                     | length in SCL bit times |
|--------------------------------|------------------------------------------------------------------|-------------------------|
| write, N bytes                 | `S D0 A_s reg A_s d0 A_s ... d(N-1) A_s P`                        | 2 + 9·(2+N) |
| read, N bytes                  | `S D0 A_s reg A_s Sr D1 A_s d0 A_m ... d(N-1) N_m P`              | 3 + 9·(3+N) |
| read with `readback`, N bytes  | `S D0 A_s reg A_s w A_s Sr D1 A_s d0 A_m ... d(N-1) N_m P`        | 3 + 9·(4+N) |
| read with `skip_reg`, N bytes  | `S D1 A_s d0 A_m ... d(N-1) N_m P`                                | 2 + 9·(1+N) |

One bit time is `4·QDIV` system clocks. The length is counted from the cycle
after `chipselect` to the `done` pulse. At the defaults (50 MHz clock, 100 kHz
SCL, `QDIV = 125`) a one-byte write takes 29 bit times (290 µs), a one-byte
read 39 bit times, a one-byte read-back 48.

The `readback` read writes one byte (`datain`) and then reads, so the host
gets back the byte it has just stored. The plain read only moves the slave's
register pointer before reading. The `skip_reg` read does not touch the
pointer at all.

If the slave answers any byte the master sends with NACK, the master ends the
transfer with STOP at once and sets `ack_err`. A device address that nobody
answers therefore costs 11 bit times (START, the address byte with its ACK
slot, STOP). When the master reads, it sends ACK after every byte except the
last. It answers the last byte with NACK, so the slave lets go of SDA and the
STOP can follow.

## Bit timing inside the master

`i2c_tick_gen` divides the clock into quarter bit times of `QDIV` clocks.
Each bit of the master's FSM is four quarters:

| quarter | SCL  | SDA                                        |
|---------|------|--------------------------------------------|
| 0       | low  | keeps its previous level                   |
| 1       | low  | takes the new bit (or is released)         |
| 2       | high | steady; sampled by the master at the end   |
| 3       | high | steady                                     |

Because SDA keeps its level in quarter 0, SDA and SCL never change in the same
clock. The START, repeated START and STOP "bits" use the same four quarters:

- START from idle: SDA falls at quarter 2, with SCL high.
- Repeated START: SDA is released in quarter 1, SCL rises in quarter 2, and
  SDA falls in quarter 3.
- STOP: SDA is pulled low in quarter 1, SCL rises in quarter 2, and SDA rises
  in quarter 3.

The SCL/SDA outputs are registered, one clock after the state that asks for
them. An assertion in `i2c_master` checks that SDA never moves while SCL is
high outside a START or STOP.

## Inside the slave

The slave puts SCL and SDA through two-flop synchronisers. From the
synchronised levels and their previous values it derives four events: START,
STOP, SCL rising and SCL falling. It shifts a bit in on each rising edge. It
changes its own SDA drive only after a falling edge, three clocks after the
edge on the wire. For the master's sample to see the slave's bit, `QDIV` must
be a few clocks. The tests use 8, 10 and 125; keep `QDIV` at least 4.

Its FSM has five states: idle, receive byte, drive ACK, send byte, and read
the master's ACK. After a START the first byte is the address byte. If the
address does not match, the slave ignores the bus until the next START. STOP
or START aborts any transfer from any state. A byte cut short by STOP is not
written.

The register pointer holds **the last register accessed**:

- After address + write, the first byte loads the pointer.
- The first data byte goes to that register. Each further data byte goes to
  the next register up, and the pointer follows.
- A read starts with the register the pointer holds. Each ACK from the master
  moves the pointer up by one, and the slave sends that register next.
- The pointer wraps from 255 to 0.

This rule has two consequences. A read right after a write returns the byte
just written, which is what the `readback` sequence relies on. A read without
a pointer write (`skip_reg`) starts at the last register the previous
transfer touched.

## Blocks and files

| file                     | contents |
|--------------------------|----------|
| `rtl/i2c_pkg.sv`         | device address 1101000, R/W bit values, default clock and SCL rates, `I2C_QDIV` |
| `rtl/i2c_tick_gen.sv`    | quarter-bit tick divider |
| `rtl/i2c_master.sv`      | master FSM, host interface, SCL generation, ACK checking |
| `rtl/i2c_slave.sv`       | slave FSM: synchronisers, START/STOP detection, address match, pointer, ACK |
| `rtl/i2c_slave_regs.sv`  | 2^AW × 8 register file, one write port, two combinational read ports |
| `rtl/i2c_bus.sv`         | wired-AND resolution of N open-drain drivers |
| `rtl/i2c_top.sv`         | master + slave + register file on one bus |

Parameters (all `int unsigned` or `logic [6:0]`):

| parameter     | default   | where                       | meaning |
|---------------|-----------|-----------------------------|---------|
| `QDIV`        | 125       | tick_gen, master, top       | clocks per quarter bit (50 MHz / (4 · 100 kHz)) |
| `DEV_ADDR`    | 7'b1101000| master, slave               | device address called / answered |
| `TARGET_ADDR`, `SLAVE_ADDR` | 7'b1101000 | top         | the same two, kept apart so that a mismatch can be tested |
| `AW`          | 8         | slave, regs, top            | register address width (256 registers) |
| `LEN_W`       | 8         | master, top                 | width of the byte count |
| `N`           | 2         | bus                         | devices on the bus |

### Host interface of `i2c_top` / `i2c_master`

- `chipselect` (`start`): a one-cycle pulse while `busy` is low. It latches
  `readwrite` (0 = write, 1 = read), `readback`, `skip_reg`, `addr_in` (the
  register address) and `nbytes`. `skip_reg` takes priority over `readback`,
  and an `nbytes` of 0 counts as 1.
- `datain`: must hold the first byte when the transfer starts. `data_taken`
  pulses when the master has loaded a byte. The next byte must be on
  `datain` before the next byte begins, which leaves at least 9 bit times.
- `dataout` with `data_valid`: one pulse per byte read.
- `busy`: high from the cycle after `chipselect` until STOP.
- `done`: one pulse at the end of a transfer.
- `ack_err`: stays set until the next transfer starts.
- `scl`, `sda`: the resolved lines.
- `slave_addressed`: high while the slave takes part in a transfer.
- `uaddr`/`udata`: a side read port into the slave's registers.

`reset` is synchronous and active high. It releases both lines and clears the
slave's pointer. It does not clear the register file.

## What comes from the specification and what does not

These parts follow the specification:

- two open-drain lines
- the START, STOP and repeated START conditions
- the address `1101000` with the R/W bit
- MSB-first bytes with a ninth ACK clock
- the master's FSM steps
- the register-address byte that sets the slave's pointer
- the write-then-read sequence for reads (`readback`)
- the pointer-only read
- the rule that a read without a pointer write starts from the pointer's
  last value
- the master ending a transfer with STOP when the slave does not ACK

These are this design's own choices:

- the 50 MHz / 100 kHz clocking and the four-quarter bit timing
- the host handshake signals (`data_taken`, `data_valid`, `busy`, `done`,
  `ack_err`)
- multi-byte transfers sized by `nbytes`
- the master's NACK on the last byte it reads
- the `skip_reg` option
- how the pointer moves through a burst
- the slave's oversampling structure
- a 256-byte register file with no reset and a second read port

The specification describes a STOP where SDA is "driven low while SCL is
high", and elsewhere a STOP where SDA goes from low to high. The design
follows the second, which is the standard STOP condition. One step of the
specification's state list has the slave send the STOP. In this design the
master sends every STOP, as the rest of the specification says.

Not included:

- clock stretching
- several masters and arbitration between them
- more than one slave on the bus (`i2c_bus` takes any `N`, but the top wires
  one slave)
- the 4-bit `address` signal seen in the specification's simulation
  waveforms, whose role is not explained there

## Simulation

Every testbench is self-checking and ends with a `TB_RESULT checks=… failures=…`
line. Build and run one with Verilator, for example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl \
        rtl/i2c_pkg.sv tb/tb_i2c_top.sv --top-module tb_i2c_top -o sim
    ./obj_dir/sim

| testbench                | what it does |
|--------------------------|--------------|
| `tb_i2c_top_full`        | default parameters. Writes `00001111` to register `00101101` and reads it back with a pointer-only read. Then writes and reads back `11110000` in one `readback` transfer. Checks data, register contents and exact transfer lengths. |
| `tb_i2c_top`             | end to end: single and burst writes with wrap-around, all three read kinds, and 24 random transfers checked against a reference register model. A second instance calls an unanswered address to produce a NACK. Counts each mechanism (burst, repeated START, master ACK/NACK, slave NACK, pointer wrap, current-address read, read-back) and fails if one never happens. |
| `tb_i2c_master`          | master against a bus-level slave model. Checks the exact sequence of bus events and bytes for every transfer kind, the handshakes, NACK on the address and on a data byte, and transfer lengths. |
| `tb_i2c_slave`           | slave driven by a bit-banged master. Checks address match, pointer rules, bursts, wrap-around, read-back, a foreign address, a byte aborted by STOP, and the 3-clock ACK delay. |
| `tb_i2c_slave_regs`, `tb_i2c_bus`, `tb_i2c_tick_gen` | unit tests of the register file, the wired AND and the divider |

All of them pass. At the default 100 kHz a transfer takes about 15,000 to
25,000 clocks, so even the full-size test runs in well under a second.
