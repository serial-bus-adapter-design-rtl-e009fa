# I2C adapter for a processor with one-directional I2C pins

Some SoC-FPGA processor subsystems route their I2C controller to the FPGA
fabric as four one-directional signals: clock and data coming out of the
processor (`hps_scli`, `hps_sdi`), and clock and data going back into it
(`hps_sclo`, `hps_sdo`). A real I2C bus has two bidirectional open-drain lines
instead (`scl`, `sda`), and the direction of SDA changes several times within
one transfer. This adapter sits between the two. It follows the transfer bit
by bit and decides, for every bit, whether SDA is driven from the processor
side or left to the device on the bus.

The RTL is written in SystemVerilog (IEEE 1800-2017). It recreates an adapter
originally built in VHDL for a Cyclone V SoC board (DE1-SoC), together with
the small test systems used to show it working: a signal generator stands in
for the processor, an I2C slave receives the byte, and the LEDs show it.

## The adapter controller

`rtl/i2c_adapter.sv` samples the processor lines with the system clock
(50 MHz). Each output is a register, so an output follows its input one clock
later. Two conditions are decoded from one stored sample of the processor
lines:

* START: `hps_sdi` falls while `hps_scli` is high. The controller goes to
  `getaddress` from any state and reloads the bit counter to 8.
* STOP: `hps_sdi` rises while `hps_scli` is high. The controller goes to
  `idle` from any state.

Bits are counted on **falling** edges of `hps_scli`. The first falling edge
after START ends the START condition itself. That is why the counter starts at
8 for the address byte and at 7 for data bytes. In both cases the counting
state covers bits 1 to 7 of the byte. The eighth bit and the ninth (ACK) clock
each get a state of their own:

| byte        | bits 1-7     | bit 8   | ACK clock | SDA on the bus during bits 1-8 | ACK comes from |
|-------------|--------------|---------|-----------|--------------------------------|----------------|
| address     | `getaddress` | `rw`    | `ack`     | copied from `hps_sdi`          | device (bus)   |
| write data  | `wr`         | `rw_wr` | `ack_wr`  | copied from `hps_sdi`          | device (bus)   |
| read data   | `rd`         | `rw_rd` | `ack_rd`  | released, device drives        | processor (`hps_sdi`, copied to the bus) |

**The eighth bit of every byte sets the direction of the next byte.** It is
stored in `rw_r`. After an ACK of 0 the controller goes to `rd` if `rw_r` is 1
and to `wr` if it is 0. For the address byte this is the normal I2C R/W bit.
For data bytes it is this adapter's own rule, not part of I2C: a processor
writing a byte that ends in 1 turns the next byte into a read. The test
patterns follow the rule, so the written byte is `10101010` and the read byte
is `10101011`. An ACK of 1 (NACK) in any ACK state sends the controller back
to `getaddress`.

The ACK bit is sampled on the rising `hps_scli` edge of the ninth clock. The
controller acts on it at the falling edge that ends that clock.

SCL on the bus is always a copy of `hps_scli`. `hps_sclo` and `hps_sdo` always
return the resolved bus levels. Through them the processor sees the device's
ACKs and the read data, as if it were on the bus itself.

Reset is asynchronous. It clears every register and drives all outputs to 0.
The port keeps its original name `rst_n`, but reset is **asserted while it is
1**. That is how the original reset logic behaves, and the test systems drive
it with a pulse that is 1 for the first SCL period only.

## Test systems

Both systems run from one 50 MHz clock with a 200 Hz SCL. One SCL period
("phase") is therefore 250 000 clocks, or 5 ms. Inside a phase SCL is low for
the first half and high for the second. Data changes a quarter into the phase.
START and STOP edges come three quarters into it, while SCL is high. The
generators have no reset input: their counters start from power-up values, as
FPGA registers do. Their `rst` output resets the other blocks during phase 0.

| phase | write system (`signal_generator_to_write`) | read system, processor side (`sda_ex`) | read system, device side (`sda`) |
|-------|---------------------------|------------------------|----------------|
| 0     | `rst` = 1                 | `rst` = 1              | released       |
| 2     | START                     | START                  | released       |
| 3-10  | address `00000000` (write)| address `00000001` (read) | released    |
| 11    | 0 (ACK slot)              | released               | 0: ACK         |
| 12-19 | data `10101010`           | released               | data `10101011`|
| 20    | 0 (ACK slot)              | 0: ACK                 | released       |
| 21    | STOP                      | STOP                   | released       |

* `write_data_top`: the generator drives `hps_scli`/`hps_sdi`. The adapter's
  bus connects to `i2c_slave` (address 0), and the slave's `data_in` drives
  `leds`. The LEDs show `10101010` from phase 20, about 100 ms after power-up.
* `read_data_top`: `scl_ex`/`sda_ex` drive `hps_scli`/`hps_sdi`, and `scl`/`sda`
  play the device on the bus. The adapter's `hps_sclo`/`hps_sdo` feed an
  `i2c_slave` that stands in for the processor's receive pins. That slave
  works receive-only (`TX_ENABLE = 0`). It sees the address byte `00000001`
  coming back and captures the data byte the device sends. The LEDs show
  `10101011` from phase 20.
* `i2c_adapter_system` (top): both systems side by side, with outputs
  `leds_write` and `leds_read`.

### Bus model

Nothing here uses tri-states. Every party on a line has a drive value
(`*_o`: 0 pulls the line low, 1 releases it), and the line is the AND of all
drive values. The AND stands in for the pull-up resistor. On an FPGA pin,
`scl_o`/`sda_o` map to an open-drain output buffer (drive 0 or high-Z) and
`scl_i`/`sda_i` to the pin's input.

## I2C slave

`rtl/i2c_slave.sv` has the port list of the open-source slave core used in the
original test setup, but its insides are new. It registers SCL and SDA and
detects START/STOP from two samples. It shifts bits in on rising SCL edges and
changes its own SDA on falling edges. It acknowledges its 7-bit address
(`SLAVE_ADDR`) and shows the R/W bit on `read_mode`.

* In a write, it acknowledges each byte and presents it on `data_in` with a
  one-clock `data_in_valid` pulse. The pulse comes at the falling edge that
  opens the ACK slot.
* In a read with `TX_ENABLE = 1`, it sends `data_out` and pulses
  `data_out_requested` for each byte. It stops sending after the master NACKs.
* In a read with `TX_ENABLE = 0` (the default, and the way the test systems
  use it), it does not transmit. It receives whatever another device puts on
  the line.

## Departures from the original design

* The inout `scl`/`sda` ports are split into open-drain `_i`/`_o` pairs (see
  Bus model).
* The original releases SDA during the address R/W bit. Here the R/W bit is
  copied to the bus, because a device must see it.
* The processor's ACK in `ack_rd` is copied to the bus. The original releases
  the line there.
* `hps_sdo`/`hps_sclo` mirror the bus in every state. The original updates
  `hps_sdo` only in `rd`, and copies `hps_scli` to `hps_sclo`.
* The bit counter reloads on every START and STOP. The original sets it only
  at reset.
* The original samples the ACK at an internal count meant as "the middle of
  the ninth clock". Here the ACK is sampled at the rising SCL edge of the
  ninth clock.
* In the original read setup the processor-side slave reports the address as
  `00000000`. Here it sees `00000001`, the byte actually on the line. The
  delivered data byte is the same.
* The processor inputs are used without a synchronizer, as in the original.
  That is fine here because the generator shares the clock. Add a two-flop
  synchronizer in front of `hps_scli`/`hps_sdi` for a real processor clock
  domain.
* Not built: 10-bit addressing (named only as future work), and the processor
  subsystem itself. Clock stretching by a slave is not supported: the adapter
  copies SCL one way only.

## Simulation

Every testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`. Each one also has a watchdog. With plain
Verilator, run from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_i2c_adapter_system \
  -y rtl -y tb +libext+.sv rtl/i2c_pkg.sv tb/tb_i2c_adapter_system.sv -o sim
./obj_dir/sim
```

| testbench | what it covers |
|-----------|----------------|
| `tb_i2c_adapter` | State sequence; write bits on the bus; read bits on `hps_sdo`; bus released while reading; processor ACK forwarded; switching direction by the eighth bit; NACK back to `getaddress`; STOP; asynchronous reset; one-clock latency. |
| `tb_i2c_slave` | Two slaves on one bus: address match and mismatch, write with ACKs, transmit with `data_out_requested` and NACK, receive-only read. |
| `tb_signal_generator_to_write`, `tb_signal_generator_to_read` | A bus decoder checks reset length, SCL period, START/STOP phases and every bit. |
| `tb_write_data_top`, `tb_read_data_top` | Each system at 100 clocks per SCL period, checked on the bus and at the LEDs. |
| `tb_i2c_adapter_system` | Full size (50 MHz, 200 Hz, about 6 M clocks, a few seconds). Counts START, STOP, address ACK, forwarded write byte, bus turnaround with forwarded read byte, processor ACK, and LED updates. Checks the 5 ms SCL period and that both bytes arrive in SCL period 20. |

The NACK path cannot occur in the top, because both generators always
acknowledge. `tb_i2c_adapter` covers it.

To change the transfer, override `ADDR_BYTE`/`DATA_BYTE` on the generators. To
shorten simulations, override `CLK_HZ`/`SCL_HZ` (the generators use
`CLK_HZ / SCL_HZ` clocks per SCL period, so at least 4). The slave's address
is `SLAVE_ADDR`.

## Files

* `rtl/i2c_pkg.sv`: state enums of the adapter and the slave.
* `rtl/i2c_adapter.sv`: the adapter.
* `rtl/i2c_slave.sv`: the slave.
* `rtl/signal_generator_to_write.sv`, `rtl/signal_generator_to_read.sv`: the
  pattern sources.
* `rtl/write_data_top.sv`, `rtl/read_data_top.sv`, `rtl/i2c_adapter_system.sv`:
  the test systems and the top.
* `tb/`: one testbench per module, named `tb_<module>.sv`.
