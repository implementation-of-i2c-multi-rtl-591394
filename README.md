# Single-master I2C controller for a DS1307 real-time clock

This is a small I2C bus master in synthesizable SystemVerilog. Give it a
register address, a data byte and a direction, and it runs a complete I2C
transaction on its own to write that byte into one register of a slave, or to
read one byte back. The default slave is the Maxim DS1307 real-time clock at
7-bit address `1101000`. Only two FPGA pins are needed: SCL, and an
open-drain SDA.

Two transactions are supported:

```
write (rw = 0):  S | 1101000 W | A | register | A | data | A | P
read  (rw = 1):  S | 1101000 W | A | register | A | Sr | 1101000 R | A | data | NACK | P
```

`S` is START, `Sr` is a repeated START and `P` is STOP. `A` is an acknowledge
from the slave, shown by SDA held low on the ninth SCL pulse. A read first
writes the register address, which sets the DS1307's internal register
pointer. It then turns the bus around with a repeated START, with no STOP in
between. The master closes the one-byte read with a not-acknowledge, which the
DS1307 needs to end a read.

## Structure

```
                    +----------------------------------------------+
 req, rw, data_in,  |  i2c_master_ctrl (transaction sequencer FSM)  |
 addr_in ---------->|  IDLE-START-SLA_W-REG-{WDATA | RSTART-SLA_R-  |--> data_out, busy,
                    |  RDATA}-STOP-DONE                             |    done, ack_err
                    +------+--------------+--------------+---------+
                      go/done        go/done/nack    go/done/byte
                    +------v-----+ +------v------+ +-----v-------+
 i2c_tick_gen ----->|i2c_start_  | |i2c_master_tx| |i2c_master_rx|
 (quarter-bit tick) |stop        | |byte + ACK in| |byte + ACK out|
                    +------+-----+ +------+------+ +-----+-------+
                           +--------------+--------------+
                                   bus-owner register ----> scl_o, sda_o
                   sda_i --> 2-flop synchronizer --> tx/rx
```

| file | role |
|---|---|
| `rtl/i2c_pkg.sv` | line struct `i2c_line_t`, condition enum, state enum, DS1307 address |
| `rtl/i2c_tick_gen.sv` | divides the system clock into quarter-bit ticks |
| `rtl/i2c_start_stop.sv` | START, repeated START and STOP generator |
| `rtl/i2c_master_tx.sv` | sends one byte MSB first and samples the ACK |
| `rtl/i2c_master_rx.sv` | receives one byte MSB first and answers ACK or NACK |
| `rtl/i2c_master_ctrl.sv` | sequences the three units for a write or a read |
| `rtl/i2c_master_top.sv` | top level: wiring, bus-owner register, SDA synchronizer, protocol assertions |

The three bit-level units share one contract. A one-cycle `go` starts the
unit. `busy` stays high while it runs, and during that time its `line` output
(SCL and SDA levels) is valid. `done` then pulses for one cycle. The sequencer
starts only one unit at a time, and the top asserts this
(`a_one_owner`).

## Bit timing: the quarter-phase scheme

This is the part that matters most for timing. `i2c_tick_gen` gives a
one-clock `tick` every `CLK_DIV` clocks. Every unit moves forward one *quarter
phase* per tick, so one SCL period is `4*CLK_DIV` clocks:

```
quarter phase   0      1      2      3
SCL            low    low    high   high
SDA            set here (SCL low)   sampled at the end of phase 2
```

- **Data and acknowledge bits** (tx and rx): nine bits of four phases each,
  36 ticks per byte. The master changes SDA only at the start of phase 0. The
  slave is expected to change SDA after a falling SCL edge. SDA is sampled
  when phase 2 ends, in the middle of the high time.
- **Conditions** walk six phases, each level held for two of them:

  | phase | 0 | 1 | 2 | 3 | 4 | 5 |
  |---|---|---|---|---|---|---|
  | START / Sr: SCL | 0 | 0 | 1 | 1 | 1 | 1 |
  | START / Sr: SDA | 1 | 1 | 1 | 1 | 0 | 0 |
  | STOP: SCL | 0 | 0 | 1 | 1 | 1 | 1 |
  | STOP: SDA | 0 | 0 | 0 | 0 | 1 | 1 |

  A START from an idle bus skips phases 0 and 1, since both lines are
  already high. A repeated START needs them to release SDA after the
  preceding acknowledge bit. These are the only places where SDA moves while
  SCL is high. The top asserts this (`a_sda_stable`).

**Why there are no glitches between steps.** The units' `line` outputs are
valid only while they are busy. The top registers the running unit's levels
into `bus_q` and *holds* the last value while no unit runs. So at a hand-over
the bus keeps the last level, for example SCL high and SDA low after a START,
until the next unit drives its first phase. If the bus went back to idle
levels between units, it would create false STOP/START edges.

**Hand-over latency.** A unit's `done` comes one clock after its last tick.
The sequencer answers with a registered `go` one clock later. The next unit
starts its phase 0 on the clock after that. That phase therefore lasts
`CLK_DIV - 2` clocks, so `CLK_DIV` must be at least 4.

**Rates at the defaults** (`CLK_DIV = 125`, for a 50 MHz clock):

| quantity | clocks | at 50 MHz |
|---|---|---|
| SCL period | 500 | 10 us (100 kHz, I2C standard mode) |
| SCL high, minimum | 250 | 5.0 us (spec: 4.0 us) |
| SCL low, minimum | 248 | 4.96 us (spec: 4.7 us) |
| write transaction | 117 to 118 × `CLK_DIV` | about 1.18 ms |
| read transaction | 159 to 160 × `CLK_DIV` | about 1.6 ms |

The write is 4 + 3×36 + 6 = 118 ticks, and the read is
4 + 2×36 + 6 + 2×36 + 6 = 160 ticks. The range of one tick comes from where
`req` falls relative to the free-running timebase.

## Interface of `i2c_master_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | system clock |
| `reset` | in | 1 | synchronous, active high; leaves the bus idle (both lines high) |
| `req` | in | 1 | sampled while idle: starts a transaction |
| `rw` | in | 1 | 1 = read, 0 = write (sampled with `req`) |
| `data_in` | in | 8 | byte to write (sampled with `req`) |
| `addr_in` | in | 8 | slave register address (sampled with `req`) |
| `data_out` | out | 8 | byte read; valid from `done` until the next request |
| `busy` | out | 1 | high from the clock after `req` until `done` |
| `done` | out | 1 | one-cycle pulse at the end of a transaction |
| `ack_err` | out | 1 | the slave refused a byte in the last transaction |
| `scl_o` | out | 1 | SCL, driven push-pull |
| `sda_o` | out | 1 | SDA open-drain control: 0 pulls low, 1 releases |
| `sda_i` | in | 1 | SDA pin level |

On an FPGA, SDA becomes an open-drain pad: `assign SDA = sda_o ? 1'bz : 1'b0;`
and `assign sda_i = SDA;`. It needs an external pull-up, 5.6 kΩ in the
reference setup. SCL is push-pull, which is fine with a single master and a
slave that never stretches the clock (the DS1307 does not). If you hold `req`
high, transactions run back to back.

Parameters: `CLK_DIV` (default 125) and `SLAVE_ADDR` (default `7'b1101000`).
To talk to a different slave, or to several slaves of the same register-access
kind, set `SLAVE_ADDR` per instance. The address is fixed at elaboration.

## Error handling

After each byte the master sends (address, register, data), the transmitter
samples the ninth bit. If the slave leaves SDA high (NACK), the sequencer
drops the rest of the transaction, sends STOP at once, and sets `ack_err`.
This happens, for example, when no device answers the address. `ack_err`
clears when the next request is accepted. There is no arbitration loss and no
bus-busy detection, because the design assumes it is the only master.

## Design choices and limits

These points go beyond the description the design was built from, or settle
points where that description was unclear or silent:

- **Handshake.** `req`, `busy`, `done`, `ack_err` and `data_out` are
  additions. The original interface has only clk, reset, R/w, data_in,
  addr_in, SCL and SDA.
- **One data byte per transaction.** Both the write and the read move one
  data byte. Burst writes and reads are not implemented, although the DS1307
  supports them with an auto-incrementing pointer.
- **NACK at the end of a read.** The received byte is always answered with a
  not-acknowledge. The receiver itself can also send an ACK (`ack_in`).
- **The master generates STOP** for both writes and reads.
- **Timing.** The SCL rate, the quarter-phase scheme, the synchronizer and
  the bus-owner register are all this design's own.
- **Size.** The top synthesizes to about 100 flip-flops, in the same range as
  the roughly 80 slice flip-flops reported for the original FPGA
  implementation.
- **No clock stretching, no multi-master arbitration, no 10-bit addressing.**

## Verification

Every block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_i2c_start_stop` | line levels phase by phase against the table above; 4 or 6 ticks per condition; START and STOP edge direction |
| `tb_i2c_master_tx` | random bytes are seen MSB first by a receiver model; 36 ticks; nine SCL pulses; SDA stable while SCL is high; ACK and NACK reported |
| `tb_i2c_master_rx` | random bytes from a transmitter model; SDA released during data; ACK or NACK level on the ninth pulse; 36 ticks |
| `tb_i2c_master_ctrl` | step lists for writes and reads, with NACKs injected at each byte position; one unit at a time; handshake; `data_out` |
| `tb_i2c_master_top` | end to end at the default parameters, against a DS1307 model and a second, unaddressed slave |

`tb_i2c_master_top` writes random registers and reads them back, checking
them against a reference register map. It also reads registers it never
wrote, and makes the RTC refuse its address to check `ack_err`. It checks
the SCL period and its high and low times, the transaction lengths, and the
exact numbers of START, repeated START and STOP conditions. It also confirms
that the second slave was never selected. It counts each mechanism (START,
Sr, STOP, slave ACK, slave NACK, master NACK, register write, register read)
and fails if any count is zero. It runs in well under a second.

`tb/ds1307_model.sv` is a behavioural, non-synthesizable model of the DS1307's
I2C side. It has 64 registers (00h to 3Fh), a pointer that persists between
transactions and wraps from 3Fh to 00h, and an auto-increment on reads and
writes. It does not model timekeeping.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/i2c_pkg.sv tb/tb_i2c_master_top.sv --top-module tb_i2c_master_top
./obj_dir/Vtb_i2c_master_top
```

To run another testbench, replace `tb_i2c_master_top` with its name. The
block-level testbenches make their own tick, every 4 to 6 clocks, so they
finish in milliseconds. To simulate a different SCL rate, change `DIV` in
`tb_i2c_master_top` together with the `CLK_DIV` of the top.
