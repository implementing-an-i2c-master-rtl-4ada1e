# I2C master bus controller for an FPGA

This design is an I2C master that lets FPGA logic talk to slow peripheral chips
over two wires. The peripherals are parts such as a real-time clock, an EEPROM,
an ADC or a microcontroller. The FPGA side asks for a transfer with a slave
address, a read/write flag and data bytes. The controller then makes the whole
bus conversation:

- START
- the slave address with its direction bit
- the data bytes, each followed by an acknowledge bit
- STOP

It drives the clock line SCL itself. It is a single-master controller: it
starts every transfer, and there is no arbitration against other masters.

Both bus lines are open-drain and wired-AND. A device can only pull a line low.
A pull-up resistor brings the line high when nobody pulls it. The master drives
its lines through "pull low" enables and reads the real line levels back. This
lets a slave that is not ready hold SCL low (clock stretching). The master waits
for it.

## Hierarchy

```
i2c_system               top: master + bus with N_EXT external slaves
├── i2c_master           the controller as an FPGA block
│   ├── i2c_sync  x2     two-flop synchronisers on the SCL and SDA read-back
│   ├── i2c_clk_gen      quarter-period tick divider, holds while SCL is stretched
│   └── i2c_master_ctrl  START / address / data / acknowledge / STOP sequencer
└── i2c_bus              wired-AND resolution of all devices' pull-downs
rtl/i2c_pkg.sv           shared types: slot states, address struct, divider function
```

Use `i2c_master` when you put the controller into an FPGA. Tie each pad as
`pad = oe ? 1'b0 : 1'bz` and feed the pad's input back to `scl_i` / `sda_i`.
The board needs the pull-up resistors. `i2c_system` is for simulation and for
on-chip buses. It puts the master and the off-chip slaves on one resolved bus.
Each slave's pull-downs come in as ports: `ext_scl_pull[i]` and
`ext_sda_pull[i]`. The line levels go out as `scl` and `sda`.

## How the bus is paced: quarters and slots

All bus timing comes from one tick. `i2c_clk_gen` divides the system clock by
`DIV = ceil(CLK_FREQ_HZ / (4 * SCL_FREQ_HZ))` and pulses `tick` once per
quarter of an SCL period. The sequencer moves on by one quarter per tick. It
works in **slots** of four quarters.

| slot            | q0                      | q1                     | q2                 | q3                          |
|-----------------|-------------------------|------------------------|--------------------|-----------------------------|
| START           | SCL high, SDA high      | SCL high, SDA high     | SCL high, SDA low  | SCL high, SDA low           |
| bit (data/addr) | SCL low, SDA held       | SCL low, SDA = bit     | SCL high           | SCL high, sample SDA at end |
| acknowledge     | SCL low, SDA held       | SCL low, SDA = ACK/rel | SCL high           | SCL high, sample SDA at end |
| repeated START  | SCL low, SDA held       | SCL low, SDA released  | SCL high           | SCL high, then START slot   |
| STOP            | SCL low, SDA held       | SCL low, SDA low       | SCL high, SDA low  | SCL high, SDA rises at end  |
| bus free        | both high               | both high              | both high          | both high                   |

Several bus rules follow from this table:

- SDA changes only in the middle of the SCL-low half.
- Only the START and STOP edges change SDA while SCL is high.
- A byte with its acknowledge bit takes 36 quarters.

At the default 50 MHz clock and 100 kHz SCL, one quarter is 2.5 µs. This gives
the following standard-mode times:

- START hold time: 5 µs.
- Repeated-START set-up time: 10 µs.
- STOP set-up time: 5 µs.
- Bus-free time after STOP: 10 µs.
- SCL low and SCL high: 5 µs each.

The design registers the pull-down enables, so SCL and SDA do not glitch.

**Clock stretching.** When the master releases SCL at the start of q2, the line
may still read low because a slave is holding it. The sequencer then raises
`stretch`, and the tick generator holds on its last count. As a result, q2 (the
high half) does not end until SCL has really been high for a whole quarter. A
stretch shorter than about two quarters costs nothing. It ends inside the
SCL-low time the master would have spent anyway.

**Transfer length without stretching.** A transfer lasts
`DIV * (4 + 36 * bytes_incl_address + 8)` system clocks from the request to the
end of the bus-free gap. Add `DIV * 8` for each repeated START, plus its
address byte. The testbenches check this count exactly.

## Host handshake

Inputs: `enable`, `addr_in[7:0]`, `rw` (1 = read), `data_in[7:0]`, and for
10-bit addressing `ten_bit` and `addr_hi[1:0]`.

Outputs: `busy`, `data_req`, `data_out[7:0]`, `rd_valid`, `ack_error`.

- **Start.** Raise `enable` with the address and `rw` set. `busy` rises on the
  next clock.
- **`data_req`.** This one-clock pulse marks the start of each data byte. For a
  write, `data_in` is captured at this pulse. From the pulse on, the host may:
  - put up the next byte on `data_in`;
  - set `enable`, the address and `rw` to say what comes after the current
    byte.

  These are sampled when the byte's eighth bit ends, which is at least eight
  bit-times later.
- **What follows a byte.** It depends on the values sampled at the end of the
  byte:

  | `enable` | address and direction | what follows               |
  |----------|-----------------------|----------------------------|
  | low      | any                   | STOP                       |
  | high     | unchanged             | another data byte          |
  | high     | changed               | repeated START, new address |

  The master acknowledges a read byte only when another read byte follows. The
  last read byte gets a not-acknowledge, as I2C requires.
- **`rd_valid`.** This pulse marks each byte read. `data_out` holds the byte.
- **`ack_error`.** It is set when a slave does not acknowledge its address or a
  written byte. The controller then sends STOP. `ack_error` stays set until the
  next transfer starts. Drop `enable` when you see it. Otherwise the controller
  starts again with the same request.
- **End.** `busy` falls after the bus-free gap. A new request can follow
  immediately.

Examples, with an RTC at 7-bit address 0x68:

- **Set registers 0..2.** Set `addr_in = 8'hD0`, `rw = 0`, `data_in = 8'h00`
  (the register pointer) and `enable = 1`. At the first `data_req`, present the
  seconds byte. At the second, the minutes. At the third, the hours. At the
  fourth, drop `enable`.
- **Read registers 0..2.** Start with the pointer byte as a write. At its
  `data_req`, set `rw = 1`. The controller then makes a repeated START and
  reads. Drop `enable` at the third read byte's `data_req`. Collect the three
  bytes at `rd_valid`.
- **10-bit address 0x3C9.** Set `ten_bit = 1`, `addr_hi = 2'b11` and
  `addr_in = 8'hC9`.
  - A write sends `11110_11_0`, then `C9`, then the data.
  - A read sends `11110_11_0` and `C9`, then a repeated START and `11110_11_1`,
    then reads.

  The controller makes the extra restart of a 10-bit read by itself.

In 7-bit mode, `addr_in` is the address byte in the usual datasheet form
(`8'hD0` for 0x68). Its bit 0 is ignored because `rw` supplies the direction.

## Parameters

| parameter     | default    | where             | meaning                                   |
|---------------|------------|-------------------|-------------------------------------------|
| `CLK_FREQ_HZ` | 50 000 000 | master, system    | system clock                              |
| `SCL_FREQ_HZ` | 100 000    | master, system    | SCL rate; rounded so it never runs faster |
| `N_EXT`       | 2          | `i2c_system`      | external slaves on the bus                |
| `N_DEV`       | 3          | `i2c_bus`         | devices on the bus                        |

`DIV` never drops below 4, so that the input synchroniser settles inside one
quarter. For fast-mode devices, use `SCL_FREQ_HZ = 380_000`: SCL then runs at
378.8 kHz with a 1.32 µs low time. SCL has a 50 % duty cycle, so a full
400 kHz would give a 1.25 µs low half. That is shorter than the 1.3 µs
fast-mode minimum.

Size after coarse synthesis, for the master: 63 flip-flops and about 280
word-level cells.

## Verification

Each testbench checks itself and prints `TB_RESULT checks=N failures=M`. Each
has a watchdog. The slaves are `tb/i2c_slave_model.sv`, a behavioural
register-file slave that works like an RTC or EEPROM:

- In a write, the first data byte sets the register pointer. Later bytes are
  stored there, and the pointer increments.
- Reads return the registers from the pointer on, with the same
  auto-increment.
- It can stretch SCL after every acknowledge.
- It can answer a 10-bit address.

| testbench            | what it checks |
|----------------------|----------------|
| `tb_i2c_bus`         | all 64 pull-down combinations of three devices |
| `tb_i2c_clk_gen`     | tick spacing = DIV, nothing while stopped or held, tick right after the hold drops |
| `tb_i2c_master_ctrl` | an independent bus decoder records START, STOP and every 9-bit group. This record is compared bit-exactly with the expected 7-bit and 10-bit writes, reads with ACK/NACK, and an address NACK. Also checks minimum SCL high and low times. |
| `tb_i2c_master`      | data through synchronisers and divider; exact transfer lengths; SCL period = 4·DIV; stretching lengthens a transfer; `ack_error` for an absent slave, and that it clears |
| `tb_i2c_system`      | end to end at the default parameters (50 MHz, 100 kHz): an RTC that stretches the clock, a second 7-bit slave and a 10-bit slave. It counts each mechanism and fails if any never happened: START, repeated START, STOP, slave ACK, master ACK, master NACK, missing ACK, clock stretching, 10-bit header. It also checks that no SDA change coincides with an SCL edge. |
| `tb_i2c_fast_mode`   | the master at 50 MHz / `SCL_FREQ_HZ = 380_000`: a write and a read-back, every SCL low time at least 1.3 µs and every high time at least 0.6 µs, and an SCL period of 4·33 clocks |

The controller also holds two assertions:

- With SCL released, SDA moves only for START or STOP.
- The host strobes come only while `busy` is high, and never together.

To run one with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/i2c_pkg.sv tb/tb_i2c_system.sv --top-module tb_i2c_system -Mdir obj
./obj/Vtb_i2c_system
```

The full-size system test takes well under a second.

## What was chosen here, and what is not built

The following are fixed by the intended design:

- a master that starts transfers and generates the clock;
- host inputs for the clock, reset, an 8-bit address, 8-bit data and a
  read/write flag;
- START, the address with its direction bit, and an acknowledge after every
  byte;
- 7- and 10-bit slave addresses;
- wired-AND SDA and SCL with pull-ups;
- one master with several slaves, among them a real-time clock and a
  microcontroller.

This implementation chose the following:

- the quarter-based timing and the slot lengths;
- the `enable` / `data_req` handshake, repeated START and the automatic restart
  of a 10-bit read;
- STOP after a missing acknowledge;
- clock-stretching support and the input synchronisers;
- synchronous active-high reset, 50 MHz and 100 kHz defaults;
- the extra outputs `busy`, `data_req`, `data_out`, `rd_valid` and
  `ack_error`.

Not built:

- **Multi-master arbitration.** The design is deliberately single master. A
  second master on the same bus would corrupt transfers.
- **A slave mode for the FPGA.** The FPGA acts only as master. Nothing here
  responds to an address.
- **The real-time clock itself.** The reference board setup pairs the
  controller with a DS1302. That part actually uses a three-wire serial
  interface, not I2C. The testbenches therefore use a generic I2C register-file RTC model at 0x68, such as a
  DS1307-style part.
- **Fast-mode plus and high-speed modes,** and the general-call and
  START-byte conventions.
