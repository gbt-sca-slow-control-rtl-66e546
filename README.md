# GBT-SCA: a slow-control adapter in SystemVerilog

The Slow Control Adapter (SCA) sits on a detector front-end board and turns a
single serial link from a GBTX transceiver into the many small buses a
front-end needs for configuration and monitoring: 16 I2C masters, one SPI
master with eight slave selects, one JTAG master, 32 GPIO lines, a 32-input
12-bit ADC and four 8-bit DACs. The control room sends command packets over
an 80 Mb/s HDLC link; each packet names a channel and a command, the channel
performs it on its bus, and an acknowledge packet comes back with a status
code and any data read. All channels work at the same time, so replies can
come back in a different order from the commands.

This repository is a register-transfer model of the chip's digital core,
written in synthesizable SystemVerilog, plus behavioural models of the analog
parts (ADC front end, DACs, e-fuses) so that the whole chip can be simulated
end to end. The command codes, register maps and link-layer encodings are
this design's own: the chip's architecture, features and sizes are followed,
but a real SCA will not understand these packets bit for bit.

## Structure

```
              primary e-link   secondary e-link        auxiliary I2C (Test Enable)
                   |                 |                          |
               +---v-----------------v---+                +-----v------+
               |  eport: 2 x hdlc_rx,    |                | aux_i2c_   |
               |  1 x hdlc_tx, FIFOs     |                | port       |
               +-----------+-------------+                +-----+------+
                           |   command / reply packets          |
                     +-----v------------------------------------v-----+
                     | network_controller: dispatch, error replies,   |
                     | control channel (enable mask, SEU count, id),  |
                     | round-robin sca_arbiter over finished replies  |
                     +--+------+------+------+------+------+------+---+
                        |      |      |      |      |      |      |
                      SPI    GPIO  16 x I2C JTAG   ADC    DAC   (ch 0: control)
```

`sca_top` is the chip: `sca_core` (all digital logic) plus `adc_analog_model`,
four `dac_model`s and five `efuse_bank`s. `clk_rst_ctrl` synchronises the
reset pad and derives one reset per channel; `efuse_reader` loads the chip id
and ADC calibration words after reset; `seu_counter` counts upsets seen by the
triplicated enable register (`tmr_reg`). Shared types, channel numbers,
command codes and the CRC function are in `sca_pkg`.

Everything runs on one 40 MHz clock.

## The link: HDLC over an e-link

An e-link carries 80 Mb/s. Here it is a 2-bit port sampled on every 40 MHz
clock, bit 0 first. The SLVS pads and the double-data-rate serialisation
are not modelled.

Frames are standard HDLC:

- Each frame opens and closes with the flag `01111110`.
- Bytes are sent LSB first.
- A 0 is inserted after every five consecutive 1s.
- The frame ends with a 16-bit FCS: CRC-16 with polynomial x^16+x^12+x^5+1, preset to 0xFFFF and sent complemented, low byte first. The receiver checks for the residue 0xF0B8.
- Seven or more 1s in a row abort a frame. This is also the idle condition.

`hdlc_rx` handles both bits of a clock in one combinational pass. It holds the
last two bytes back, so the FCS never reaches the packet layer.
`hdlc_tx` keeps a small bit queue and fills it one byte at a time, so it can
always supply two bits per clock. Between frames it sends flags.

Frame = address (0x00), control, then the SCA packet. Control codes:

| frame | control byte | answer |
|---|---|---|
| CONNECT | 0x2F | UA (0x63); the link it came on becomes active, numbers restart |
| RESET | 0x8F | UA; network controller and all channels reset, numbers restart |
| TEST | 0xE3 + payload | TEST with the same payload (loopback) |
| I-frame | {N(R), P/F, N(S), 0} | the packet goes to the network controller |
| REJ (sent) | {N(R), 0, 1001} | sent for an I-frame whose N(S) is not the expected one |

Commands are acknowledged by the N(R) in the reply I-frames. There are two
e-ports for redundancy:

- Only the port that last received a CONNECT is active.
- Frames other than CONNECT that arrive on the other port are dropped.
- The idle transmitter is held at 1.
- Before the first CONNECT, no port is active.

## SCA packets and the network controller

Command: `TR#, CH#, CMD, LEN, DATA[LEN]`. Reply: `TR#, CH#, ERR, LEN, DATA[LEN]`.
`LEN` counts data bytes, at most 4 (`MAX_DATA`); the first data byte is bits
7:0 of the 32-bit channel word.

Channel numbers: 0 control, 1 SPI, 2 GPIO, 3..18 I2C 0..15, 0x13 JTAG,
0x14 ADC, 0x15 DAC.

The network controller pops one packet per clock from the active port. With
Test Enable high, it takes packets from the auxiliary I2C port instead.
Before passing a packet on, it checks it:

| ERR | meaning |
|---|---|
| 0x00 | success |
| 0x01 | the channel's operation failed (e.g. I2C no acknowledge) |
| 0x02 | channel number does not exist |
| 0x04 | command unknown to the channel |
| 0x10 | LEN larger than 4 |
| 0x20 | channel not enabled |
| 0x40 | channel still busy with an earlier command |

Errors found by the controller itself go out through an error slot, which
takes part in arbitration like a channel.

Channel interface (`chan_req_t` / `chan_rsp_t` in `sca_pkg`):

- A request is valid for exactly one clock.
- A reply is held until `rsp_ack`.
- A channel answers a register command on the next clock. It answers a transfer (GO, I2C read/write, ADC conversion) only when the transfer is over. This is the "end of communication" acknowledge.

The controller remembers the TR# of each channel's outstanding command and
puts it on the reply. An unsolicited reply, a GPIO interrupt, goes out with
TR# = 0xFF. When several channels finish at once, `sca_arbiter` serves them
round robin.

Control channel (0):

| CMD | action |
|---|---|
| 0x02 | write the channel enable mask (bit n = channel n) |
| 0x03 | read it |
| 0x04 | read the SEU counter |
| 0x05 | clear it |
| 0x06 | read the chip id |

A disabled channel is held in reset. This stands in for its power-down
mode, so enabling a channel starts it from reset. The analog ADC and DAC
parts are powered down along with their channels. After reset only the
control channel is enabled.

### Radiation tolerance

The channel enable mask is stored three times (`tmr_reg`):

- The output is the bitwise majority of the three copies.
- Every clock, all copies are rewritten with the voted value (scrubbing), so a single upset lasts one clock.
- A disagreement raises `seu` for that clock, which `seu_counter` counts.
- The `seu_inject` port flips one bit of one copy, so the path can be tested.

Other registers are not triplicated.

## Channels

### SPI (channel 1)

| CMD | register |
|---|---|
| 0x00/02/04/06 | write TX word 0..3 |
| 0x01/03/05/07 | read RX word 0..3 |
| 0x10 / 0x11 | CTRL = {INV[12], LSB[11], CPOL[10], CPHA[9], LEN[6:0]} |
| 0x12 / 0x13 | FREQ = DIV[6:0] |
| 0x14 / 0x15 | SS[7:0] |
| 0x20 | GO |

- One 128-bit register holds the outgoing bits. Each received bit replaces the bit sent in the same slot, so after a transfer the register holds the reply.
- A transfer moves LEN bits. LEN = 0 means 128.
- Bits go MSB of the LEN-bit word first, or LSB first when CTRL.LSB is set.
- SCLK runs at 40 MHz / (2 (DIV+1)): 20 MHz down to 156.25 kHz in 128 steps.
- All four CPOL/CPHA modes are supported.
- INV sets the level MOSI rests at between transfers.
- The selected slave-select lines are low for the whole transfer.

### JTAG (channel 0x13)

It has the same register slots as SPI, plus TMS words 0..3 (0x08..0x0F).
CTRL = {INV[12], RXE[10], TXE[9], LEN[6:0]}.

- TDO and TMS shift out LSB first. TDI replaces the TDO bits slot by slot.
- TXE picks the TCK edge that launches TDO/TMS. RXE picks the edge that samples TDI.
- INV gives the idle level of TCK, TDO and TMS.
- TAP state sequencing is left to software, which writes it in the TMS register.
- The SS slot (0x14) holds RSTLEN. Command 0x22 drives `jtag_arst` high for RSTLEN+1 clocks and is answered at the end of the pulse.

### I2C (channels 3..18)

Sixteen independent masters. Each has:

| CMD | register or transfer |
|---|---|
| 0x30 / 0x31 | CTRL = {TEN[7] 10-bit mode, NBYTE[6:2] (0 = 16), SPEED[1:0]} |
| 0x11 | STATUS |
| 0x70 / 0x71 | MASK |
| 0x40..0x47 | 16-byte buffer as four words |
| 0x82 | single-byte write: addr in data[9:0], byte in data[23:16] |
| 0x86 | single-byte read |
| 0xDA / 0xDE | multi-byte write / read of NBYTE bytes from / into the buffer |
| 0xF0 / 0xF4 / 0xF8 | read-modify-write with AND / OR / XOR mask |

SPEED 0..3 selects 100 k, 200 k, 400 k or 1 Mb/s.

The bit engine splits each SCL period into four quarters of 100, 50, 25 or 10
clocks:

- SDA changes at the start of quarter 1.
- SCL is released for quarters 2 and 3.
- SDA is sampled as quarter 3 begins.

Whenever the master has released SCL, it waits for the line to actually go
high. A slave can therefore stretch the clock, and the START and STOP
conditions wait for it too.

In 10-bit mode the address is sent as `11110 a9 a8 W`, then `a7..a0`. A read
continues with a repeated START and `11110 a9 a8 R`.

A read-modify-write is two transfers: a single-byte read, then a write of
(byte op MASK).

Transfer replies carry data = {STATUS, last byte}. STATUS is:

- 0x04: success.
- 0x40: no acknowledge. The transfer ends with STOP and ERR = 0x01.
- 0x08: SDA found low before START. No transfer is started and ERR = 0x01.

There is one bus master per bus and no arbitration.

### GPIO (channel 2)

| CMD | register |
|---|---|
| 0x10 / 0x11 | DOUT |
| 0x01 | DIN |
| 0x20 / 0x21 | DIR (1 = output; inputs are three-stated) |
| 0x30 / 0x31 | INTEN |
| 0x32 / 0x33 | INTSEL (0 = rising, 1 = falling edge) |
| 0x34 / 0x35 | INTS, sticky; write 1 to clear |
| 0x40 / 0x41 | CLKSEL |

- Inputs pass a two-flop synchroniser.
- CLKSEL[0] = 0 samples on every system clock. CLKSEL[0] = 1 samples on the edge of the external GPIO clock that CLKSEL[1] picks (0 rising, 1 falling). That edge is detected after synchronisation.
- An enabled input edge sets its INTS bit.
- Each new event sends one unsolicited reply carrying INTS.
- `gpio_irq` is the OR of INTS.

### DAC (channel 0x15)

Four 8-bit codes, at write 0x10 + 2k and read 0x11 + 2k for DAC k.
`dac_model` outputs code/255 V after a settling delay, and 0 V when the
channel is disabled.

### ADC (channel 0x14)

| CMD | action |
|---|---|
| 0x50 / 0x51 | MUX (0..31; 31 = temperature sensor) |
| 0x60 / 0x61 | CURR, a 10 uA current-source enable per input |
| 0x02 | GO: convert, reply with the calibrated 12-bit result |
| 0x21 | read the raw count |
| 0x23 / 0x25 | read the offset / gain constants |

The converter is single slope:

1. For `AZ_CLKS` clocks (400 = 10 us) the analog part cancels its offset.
2. The ramp is released. A 12-bit counter steps every `RAMP_DIV` clocks (6 = 150 ns).
3. Counting stops when the comparator fires, or at 4095.

Conversion time therefore grows with the input. A full-scale input takes
400 + 4096 x 6 clocks = 624 us.

The result is clamp((raw - OFS) x GAIN / 32768, 0, 4095). OFS and GAIN come
from e-fuse words 1 and 2, so production calibration removes the analog
offset and gain error.

`adc_analog_model` has an offset error of -2 mV and a gain error of 0.98.
`sca_top`'s default fuse values (OFS = 8, GAIN = 32113) correct exactly
these errors. The model's temperature sensor gives 0.6 V - 2 mV/degC. An
input with its current source enabled sees 10 uA x R_ext.

### Auxiliary I2C port

`aux_i2c_port` is an I2C slave at address 0x00 that reaches the network
controller directly. It is used while the Test Enable pin is high, or as an
expansion port.

- **Write transfer:** the command packet bytes. At the STOP, a packet of at least 4 bytes is handed to the controller.
- **Read transfer:** a status byte (1 = a reply is waiting), then TR#, CH#, ERR, LEN, the data bytes, then 0xFF.
- A reply that has been read is released at the STOP.

## Where this model departs from, or goes beyond, the chip description

- **Encodings are invented.** This applies to the HDLC control codes, SCA command codes, register layouts, error codes, I2C status bits and channel numbers. The description gives functions, not encodings.
- **The frame delimiter is the 8-bit flag `01111110`.** The description counts it as "six ones", and the 8-bit flag has six ones between its zeros.
- **SPI has no reset output.** The SPI feature list mentions a configurable reset pulse, but the SPI block scheme and its pins show none. The reset pulse is on the JTAG channel, as its feature list also says.
- **ADC timing.** The description gives both "about 3.5 kHz maximum rate" and "about 600 us maximum conversion time". These only agree if conversion time depends on the input, as it does for a single-slope converter. Here full scale takes 624 us and small inputs convert much faster.
- **ADC inputs.** The chip has 31 analog input pins and a 32-input multiplexer. Input 31 is the temperature sensor.
- **Power-down is modelled as reset.** A disabled channel is held in reset, with no clock gating. The ADC and DAC models are also powered down.
- **Only the enable mask is triplicated.** The SEU counter counts upsets in that register only.
- **Packet data is limited to 4 bytes,** and the e-port FIFOs hold 4 packets each direction.
- **Not modelled:** SLVS pads, DDR serialisation, the package, and e-fuse programming. The analog ADC, DAC and fuse cells are behavioural models with `real` ports, so `sca_top` simulates but does not synthesize. `sca_core` is the synthesizable part.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it
hangs. Helper models in `tb/`:

- `hdlc_host`: the GBTX side of an e-link, with its own HDLC encoder and decoder.
- `i2c_slave_model`: a 7- or 10-bit I2C memory device.

Example, the whole chip at its default parameters:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/sca_pkg.sv $(ls rtl/*.sv | grep -v sca_pkg) \
  tb/hdlc_host.sv tb/i2c_slave_model.sv tb/tb_sca_top.sv \
  --top-module tb_sca_top -Mdir obj_top -o sim && obj_top/sim
```

`tb_sca_top` drives two GBTX link models, two I2C slaves on buses 0 and 5, an
I2C master on the auxiliary port, and analog stimulus. In one run it covers:

- CONNECT, TEST loopback and REJ.
- Every error reply.
- Commands to all channels.
- Concurrent I2C transfers, 10-bit addressing, read-modify-write and NACK.
- A 128-bit SPI transfer and a JTAG reset pulse.
- A GPIO interrupt.
- ADC conversions with calibration, the temperature sensor and the current source.
- SEU injection and counting.
- RESET, switching to the secondary e-port, and traffic on the inactive port being dropped.
- The auxiliary port.

It counts each of these mechanisms and fails if one never happened.

For a single block, compile `rtl/sca_pkg.sv`, the block and the modules it
instantiates, with its testbench. Examples:

- `tb_sca_i2c`: `rtl/sca_i2c.sv tb/i2c_slave_model.sv`
- `tb_eport`: `rtl/sync_fifo.sv rtl/hdlc_rx.sv rtl/hdlc_tx.sv rtl/hdlc_frame_asm.sv rtl/eport.sv tb/hdlc_host.sv`

`tb_sca_adc` uses shorter offset-cancellation and ramp parameters to run
faster. All other testbenches use the defaults.

The simulator these testbenches were written for is two-state, so every
register that is read has a reset value. Only `$urandom` is used for
stimulus.
