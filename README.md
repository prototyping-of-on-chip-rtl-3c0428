# I2C master for a 24C02 serial EEPROM

This is a small, synthesizable I2C bus master for an FPGA (written with a
Spartan-3A class part in mind) that stores bytes in, and reads them back
from, an ST24C02 2 Kbit (256 x 8) serial EEPROM. The FPGA is the only master
on the bus and the EEPROM is the slave. A host inside the FPGA loads a
command and the bytes to be written, then pulses `start`. The master then
produces the whole two-wire exchange on SCL and SDA by itself: START,
device select, ACK checks, byte address, data, and STOP.

The reference transfer is a single-byte write. It uses device address
`1010001` (the EEPROM's code `1010` followed by chip enables E2 E1 E0 = `001`),
byte address `0x01` and data `11111001` (`0xF9`). This is also the command
the register holds after reset.

## What goes over the wire

Every byte takes nine SCL clocks. The first eight carry the byte, most
significant bit first. On the ninth the receiver pulls SDA low to
acknowledge (ACK), or leaves it high (NACK).

| transfer | sequence on the bus |
|---|---|
| byte write (`nbytes` = 1) | START, `1010 E2 E1 E0 0`, ACK, byte address, ACK, data, ACK, STOP |
| multibyte / page write (`nbytes` = 2..8) | same, with `nbytes` data bytes, each ACKed by the EEPROM |
| address only (`nbytes` = 0) | START, device select + W, ACK, byte address, ACK, STOP |
| read (`cmd_rw` = 1) | START, device select + W, ACK, byte address, ACK, repeated START, `1010 E2 E1 E0 1`, ACK, `nbytes` data bytes from the EEPROM. The master ACKs each byte except the last, which it NACKs. Then STOP |

The EEPROM itself decides how many bytes it accepts in one write:

- MODE pin high: multibyte write, up to 4 bytes.
- MODE pin low: page write, up to 8 bytes.

The master just sends the number of bytes it was told to send. The data
buffer holds 8 bytes, which is the largest page.

After a STOP that ends a write, the EEPROM runs an internal program cycle.
While that cycle runs it ignores the bus and answers nothing, so a transfer
started too soon ends with `nack_err`. The master does no ACK polling of its
own. The host retries when it chooses to.

If an expected ACK is missing at any point, the master at once makes a STOP.
This frees the bus. It then reports `done` with `nack_err` set. The
condition can be a device that is not there, a wrong chip enable, an
EEPROM that is busy, or a data byte refused.

## Blocks

```
            +-------------------------------- i2c_master ---------------------------------+
 data_in -->|  i2c_data_buffer  <----->  i2c_ctrl (control module)  <---> i2c_shifter    |--> sda_oe
 data_out<--|  (8 x 8 FIFO)              sequencing, ACK checks,          (address block)|<-- sda_in
            |                            START / STOP                     byte + ACK     |
 cmd_*  --->|  i2c_cmd_reg (register) --^        | clk_en       ^ tick_low/tick_high     |
 start  --->|  command + status                  v              |                        |
 status <---|                              i2c_clk_gen (clock generator) --------------->|--> scl
            +-----------------------------------------------------------------------------+
```

| module | role |
|---|---|
| `i2c_master` | Top level. Wires the blocks together and decides who uses the shared data buffer. Asserts that the master changes SDA while SCL is high only to make a START or a STOP. |
| `i2c_cmd_reg` | The register. It holds device address, R/W, byte address and byte count, clamping the count to the buffer depth. It turns `start` into a one-clock `go` and keeps `busy`, `done` and `nack_err`. Commands and starts are ignored while busy. |
| `i2c_data_buffer` | The data buffer: a show-ahead FIFO, `DEPTH` x `WIDTH`. The host fills it for a write and the control module drains it; for a read it is the other way round. |
| `i2c_clk_gen` | The clock generator. It makes SCL from the system clock while enabled, rests with SCL high when disabled, and gives two strobes per SCL period. |
| `i2c_shifter` | The address block. It shifts one byte out or in, MSB first, handles the ninth (acknowledge) clock and reports `done`. It is used for the device select, the byte address and the data. |
| `i2c_ctrl` | The control module: the state machine that runs one transfer. |
| `i2c_pkg` | The command struct `i2c_cmd_t`, the state enum `ctrl_state_t` and the reset command constants. |

## SCL timing and how START and STOP are made

This is the part that needs the most care, because SDA may change only
while SCL is low. The only exceptions are START (SDA falls while SCL is
high) and STOP (SDA rises while SCL is high).

The clock generator splits each SCL period into four quarters of
`QUARTER` system clocks each. A 2-bit phase cycles 2, 3, 0, 1, 2, ...:

```
phase      2 (rest) | 3    | 0    | 1    | 2    | 3    | 0    | ...
SCL        ‾‾‾‾‾‾‾‾‾|______|______|‾‾‾‾‾‾|‾‾‾‾‾‾|______|______|
strobes              tick_low^      tick_high^    tick_low^
                     (SDA may change) (SDA sampled)
```

- `tick_low` is a one-clock pulse at the start of phase 0, halfway through
  SCL low. Only there do the address block and the control module change
  SDA, except for START and STOP.
- `tick_high` is a one-clock pulse at the start of phase 2, halfway through
  SCL high. The ACK bit and read data are sampled there.
- The EEPROM samples on the rising edge of SCL. SDA has then been stable
  for one quarter.

**START.** First the control module waits until SDA has been high for a
full quarter (bus free). Then it pulls SDA low while the generator is
still disabled (SCL high) and enables the generator in the same clock. The
generator keeps SCL high for one more quarter (START hold time) before the
first falling edge. On the first `tick_low` the address block takes over
SDA and the control module lets go.

**Repeated START** (reads only). After the ACK of the byte address, the
control module releases SDA at `tick_low`. SCL then rises, and at
`tick_high` it pulls SDA low again while SCL is high. It loads the address
block with the read select in the same clock.

**STOP.** At `tick_low` the control module pulls SDA low. SCL rises, and
at `tick_high` it releases SDA, which makes the STOP. In the same clock it
disables the generator, which is then in phase 2 and so holds SCL high.
The bus is then left idle for one more quarter before `done`.

**Loading bytes.** The address block raises `done` at the `tick_high` of
the ninth clock. The control module loads the next byte in the next clock,
half an SCL period before the next `tick_low`. A load never moves SDA by
itself. Otherwise an ACK the master is holding low would be released while
SCL is high, which would be a false STOP.

With the defaults (`QUARTER` = 125, 50 MHz clock) SCL runs at 100 kHz.
From the clock after `start` to `done`, a byte write takes 114 x `QUARTER` clocks plus a few clocks of handshake (14 254 clocks at the defaults, 285 µs at 50 MHz):

- one quarter of bus-free check,
- 27 SCL periods for the three bytes with their ACKs,
- one period for the STOP,
- one quarter of bus-free time.

## Control flow

The states of `i2c_ctrl` (`ctrl_state_t`):

```
IDLE -> WAIT_FREE -> DEV -> BADDR -+-> WDATA (loop per byte) -> STOP -> BUSFREE -> IDLE
                      ^            |
                      |            +-> RSTART -> DEV (read select) -> RDATA (loop) -> STOP
   any missing ACK in DEV, BADDR or WDATA -> STOP (nack)
```

A write continues for `nbytes` bytes, or until the data buffer runs empty,
whichever comes first. A read pushes every received byte into the data
buffer.

## Using it

Top-level ports of `i2c_master`:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock, synchronous active-high reset |
| `cmd_we` | in | 1 | store `cmd_dev_addr`, `cmd_rw`, `cmd_byte_addr`, `cmd_nbytes` (ignored while busy) |
| `cmd_dev_addr` | in | 7 | device address; `1010 E2 E1 E0` for an ST24C02 |
| `cmd_rw` | in | 1 | 0 write, 1 read |
| `cmd_byte_addr` | in | 8 | EEPROM byte address |
| `cmd_nbytes` | in | 4 | data bytes, 0..`DEPTH` (larger values are clamped) |
| `start` | in | 1 | launch the stored command (ignored while busy or in the same clock as `cmd_we`) |
| `busy`, `done`, `nack_err` | out | 1 | running; finished; finished on a missing ACK (both held until the next start) |
| `data_push`, `data_in` | in | 1, 8 | put a byte to be written into the buffer |
| `data_pop`, `data_out` | in, out | 1, 8 | take a read byte from the buffer (`data_out` shows the head) |
| `buf_empty`, `buf_full`, `buf_count` | out | 1, 1, 4 | buffer state |
| `scl` | out | 1 | SCL, driven |
| `sda_in`, `sda_oe` | in, out | 1 | SDA level; `sda_oe` = 1 pulls SDA low (open drain) |

Sequence for a write: push the bytes, pulse `cmd_we` with the command, then
pulse `start` one clock later, and wait for `done`. For a read: send the
command, wait for `done`, then pop `nbytes` bytes. Leave the buffer alone
while `busy`.

On an FPGA, connect SDA through a tristate pad whose output is tied to 0
and whose enable is `sda_oe`, and add a pull-up. SCL is driven push-pull,
which is fine with a single master and a slave that does not stretch the
clock.

Parameters of the top: `QUARTER` (system clocks per quarter SCL period,
default 125) and `DEPTH` (data buffer bytes, default 8).

## Where this design makes its own choices

The split into data buffer, register, control module, clock generator and
address block is taken from the original description of the master. So
are the ACK check after every byte, the release of the bus on a missing
ACK, and the check that SDA is free before START. The following are this
design's own:

- **Read order.** The original read flow names the byte address after a
  device select with R/W = 1. A 24C02 cannot take an address after a read
  select, so reads here use the usual random-read form: select + W, byte
  address, repeated START, select + R. This is a deliberate departure.
- **Read acknowledge.** The master ACKs each read byte and NACKs the last.
- **No retries.** A missing ACK ends the transfer with a STOP. There is no
  retry, no ACK polling and no arbitration with other masters.
- **Timing choices.** The SCL divider, the four-quarter timing, the
  one-quarter bus-free check and the one-quarter bus-free time after STOP
  are chosen here. No clock rate is specified in the original.
- **Interfaces.** The register fields, the host handshake, the FIFO
  organisation of the data buffer, and the split of SDA into `sda_in`
  and `sda_oe` are chosen here.

## Simulation

Every testbench checks its own results and ends by printing
`TB_RESULT checks=N failures=M`. Each also has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_i2c_master` | End to end, at the top's default parameters, with the EEPROM model on the bus. It covers: the reference byte write, checked bit by bit by an independent bus monitor and for its cycle count and SCL period; an 8-byte page write; a write rejected during the program cycle; a 4-byte multibyte write; a fifth multibyte byte refused (data NACK); an 8-byte sequential read with repeated START and final NACK; single and 4-byte reads; a wrong chip enable (device NACK); and a start while another device holds SDA low (bus-busy wait). At the end it compares all 256 EEPROM bytes with a reference copy, and fails if any of these mechanisms never happened. |
| `tb_i2c_ctrl` | The control module with the clock generator, the shifter and the EEPROM model at `QUARTER` = 4. It compares the state sequence of write, read, device-NACK, data-NACK, address-only and buffer-runs-empty transfers, counts START and STOP conditions on the bus, and checks the data moved. |
| `tb_i2c_clk_gen` | SCL and both strobes, every clock, against the closed-form phase formula; idle and disable behaviour. |
| `tb_i2c_shifter` | MSB-first transmit, ACK/NACK sampling, receive, the master's acknowledge, one `done` per byte, and that a load does not move SDA. |
| `tb_i2c_data_buffer` | 3000 random clocks against a queue model, including push when full, pop when empty, and push and pop together. |
| `tb_i2c_cmd_reg` | Reset command, storing and clamping, the `go` pulse, ignoring commands while busy, and status. |

`tb/st24c02_model.sv` is a behavioural (non-synthesizable) model of the
EEPROM:

- device code `1010` plus the E pins;
- byte, multibyte (MODE = 1, at most 4 bytes) and page (MODE = 0, at most 8
  bytes, address wrapping inside the 8-byte page) writes, committed at STOP;
- a program cycle of `TWR_NS` (shortened to 200 µs in the top testbench,
  3 µs in the control testbench) during which it answers nothing;
- random and sequential reads.

The page wrap, and the NACK of a byte beyond the mode's limit, follow usual
24C02 behaviour.

To run the end-to-end test with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
    rtl/i2c_pkg.sv tb/tb_i2c_master.sv --top-module tb_i2c_master
./obj_dir/Vtb_i2c_master
```

The other testbenches run the same way with their own names. It finishes
in well under a second of host time (about 7 ms of simulated time).
