# Support FPGA for a PowerPC 603e on-board computer

This is the glue logic of a small satellite on-board computer built around the
PowerPC 603e. The 603e has a 64-bit 60x bus and nothing else: no memory
controller, no serial ports, no interrupt controller. One FPGA provides all of that.

- It answers every bus transfer of the processor.
- It runs the SRAM, the Flash ROM and a Z85C30 serial controller (SCC).
- It protects the 2 MB program SRAM with a single-error-correcting,
  double-error-detecting (SEC-DED) code, to cope with radiation upsets.
- It adds two UARTs, an I2C master, an LVDS link interface, a power-management
  register, a debug/expansion port and an interrupt controller.

Four service modes let a board be brought up without software:

- normal operation;
- loading a Motorola S-record file into SRAM over a UART;
- a write/read-back test of the SRAM;
- a dump of the SRAM to a UART.

The top module is `obc_fpga` (in `rtl/obc_fpga.sv`). Everything runs on one
clock: the processor bus clock (66 MHz by default).

## Bit numbering

The 603e numbers bits big-endian: bit 0 is the most significant. The RTL uses
ordinary `[N-1:0]` vectors, so PowerPC bit *k* of an *N*-bit field is vector
bit *N-1-k*. For example:

- A(0-3) is `a[31:28]`.
- Byte lane 0, D(0-7), is `d[63:56]`. It holds the byte at the lowest address.
- BWE(k) is `bwe_n[7-k]`.

Register bits below are given in the big-endian numbering. Bit 0 of an 8-bit
register is the value 0x80.

## Memory map

A(0-3) selects one of sixteen 256 MB regions. Register offsets within a region
step by 0x10 (address bits A(24-27)).

| A(0-3) | Region | Access sizes | Wait (`CTIME`, clocks) |
|---|---|---|---|
| 0 | SRAM, 2 MB + check bits | 1, 2, 4, 8 bytes; 32-byte bursts | 1 |
| 1 / 2 | UART 1 / UART 2 | 1 | 1 |
| 3 | LVDS (TXR/RXR, CTRL 0x10, STATUS 0x20) | 1, 2 | 1 |
| 4 / 5 | SCC channel A / B (D/C select = A(27)) | 1 | 8 |
| 6 | I2C master | 1 | 1 |
| 7 | System management register | 1, 2 | 1 |
| 8 | Debug port: PORT, DIR 0x10, LED 0x20, SW 0x30 | 1, 2 | 1 |
| C | Interrupt controller: INT_REG, INT_MSK 0x10 | 2, 4 | 1 |
| F | Flash ROM, 4 MB | 1, 2, 4, 8 bytes | 6 |
| 9-B, D-E | unmapped | - | - |

Two kinds of transfer end with TEA (transfer error acknowledge):

- a transfer to an unmapped region;
- a transfer with a size the region does not take. This includes a burst to
  anything but SRAM.

Register data travels MSB-aligned on D(0-31), so an 8-bit register is on
D(0-7).

## Memory controller (`mem_ctrl`)

The controller has four parts, plus the EDAC unit.

- **`mc_start`** latches the transfer on TS. It holds the address, TT, TSIZ
  and TBST until the controller gives AACK. TT3 set means the transfer has a
  data phase; TT1 set as well means a read. A transfer without a data phase
  is acknowledged with AACK alone. The 603e runs one transfer at a time here:
  there is no address pipelining.
- **`mc_bytedec`** turns TSIZ and A(29-31) into the eight byte-write enables.
  A burst enables all lanes.
- **`mc_chipsel`** decodes the region and gives four things:
  - the chip selects and output enables;
  - the wait `CTIME`;
  - an error flag;
  - which of four *flows* the cycler runs: SRAM single beat, SRAM burst,
    I/O or Flash, or error.
- **`mc_cycler`** is the state machine. It sequences AACK, TA, TEA, DRTRY and
  the memory strobes.
- **`edac_secded`** encodes write data and checks read data.

### Bus timing

Counted from the clock in which TS is sampled:

- The first TA comes `CTIME` + 2 clocks later.
- Burst beats follow one per clock.
- AACK is given in the last clock of the transfer.

With the defaults:

- an SRAM single read or write takes 3 clocks to TA;
- a 4-beat burst write completes in 6 clocks;
- Flash gives TA after 8 clocks and the SCC after 10.

### Error correction on the fly, with DRTRY

The hard part of the design is adding EDAC without slowing every SRAM read.
The SRAM has no time to spare for a checker between the memory and the
processor, so the controller does not wait for the check.

1. A read beat goes to the processor at once, with TA. The same word and its
   check bits are registered.
2. In the next clock the EDAC unit checks the registered word. A burst carries
   on in parallel.
3. If the word had a single-bit error, that clock asserts **DRTRY** (data
   retry) instead of TA. The 603e then discards the data it took, and the
   corrected word goes on the bus. At the same time the corrected word is
   written back to the SRAM with fresh check bits (*scrubbing*).
4. In the clock after that, the corrected word is given again with TA. A burst
   continues with its next beat.
5. A double-bit error cannot be corrected. The transfer completes, and the
   interrupt controller pulses MCP (machine check) low.

Because of this scheme, the last beat of a read is only acknowledged (AACK)
after its check. Each corrected beat costs one clock.

A write of fewer than eight bytes to SRAM would leave the check bits wrong, so
it becomes a read-modify-write, costing one extra clock:

1. The whole word is read and corrected.
2. The processor's bytes are merged in.
3. The word is written with new check bits.

Full 64-bit writes and bursts are written directly.

The parameter `EDAC_EN = 0` removes the check. Reads then end with their last
TA, and partial writes use the byte enables.

### The code

The code is a (72,64) Hsiao-style SEC-DED code with eight check bits. The
check-bit SRAM is 16 bits wide; the upper eight bits are written as zero.

- Data bit *i* (LSB numbering) has an H-matrix column:
  - for *i* < 56, the *i*-th 8-bit value with three ones, in ascending order;
  - for *i* ≥ 56, the (*i*-56)-th value with five ones.
- The columns of bits 7 and 24 are exchanged.
- The check bits are stored inverted by 0x30. A word of all zeros therefore
  has check bits 0x30, which are not all zeros.

Interpreting the syndrome:

- a syndrome that equals a data column flips that bit;
- a single one in the syndrome is a check-bit error;
- any other non-zero syndrome is uncorrectable.

The matrix was chosen to reproduce two reference codewords:

| Data | Check bits |
|---|---|
| 0 | 0x30 |
| 0x0000_0080_8080_8080 | 0xF7 |

The whole code is built by a constant function in `obc_pkg`. There is no table
file.

## Interrupts (`int_ctrl`)

The 603e has three interrupt inputs:

- **INT**, the external interrupt. It is asserted while INT_MSK bit 0 (GIE,
  the global enable) is set and any enabled source is pending.
- **SMI**, the system management interrupt. It follows the temperature
  sensor's alarm.
- **MCP**, the machine check. It is a two-clock low pulse per uncorrectable
  EDAC error.

INT_REG (read-only) and INT_MSK share one layout. Each source has one bit:

| Bits | Source |
|---|---|
| 2-17 | expansion port pins 0-15 |
| 18 | temperature sensor |
| 19 | LVDS word received |
| 20 | RTC |
| 21 | SCC |
| 22-24 | UART 1 TXC / RXC / UDRE |
| 25-27 | UART 2 TXC / RXC / UDRE |
| 28 | I2C |
| 29-31 | pushbuttons |

All sources are level sensitive and synchronised. A handler clears an
interrupt at its source, for example by reading UDR.

## Peripherals

- **UARTs (`uart`, with `uart_tx` and `uart_rx`).** They follow the AVR
  AT90S8515 UART.
  - Registers: UBRR 0x90, UCR 0xA0, USR 0xB0, UDR 0xC0.
  - Baud rate = f / (16·(UBRR+1)).
  - 8- or 9-bit characters.
  - Three samples in the middle of each bit, with a majority vote.
  - Framing-error and overrun flags.
  - Interrupts on RXC, TXC and UDRE.
- **I2C master (`i2c_master`, with `i2c_bit_ctrl`).** It uses the common
  OpenCores register set.
  - Registers: PRERlo/hi, CTR, TXR/RXR, CR/SR.
  - The SCL period is five phases of the prescaled clock:
    f_SCL = f / (5·(PRER+1)).
  - Single master only, with no arbitration.
  - SCL and SDA are open drain: an input plus a pull-low enable.
- **LVDS (`lvds_ctrl`).** The link carries 10-bit words in the low bits of a
  16-bit register.
  - CTRL enables the serialiser and deserialiser and requests a sync pattern.
  - STATUS shows the deserialiser's lock.
  - Received words are taken on the recovered clock. A new word raises the
    LVDS interrupt until it is read.
- **System management (`sys_mgmt`).** One 16-bit register, reset 0x0058.
  - Bits 9-15 are the low-power controls of the RS-232 drivers, the LVDS
    parts, the temperature sensor and the current sensor.
- **Debug/expansion port (`debug_port`, with `debounce`).**
  - 16 I/O pins. Each direction is set in DIRREG (1 = input; reset all
    inputs).
  - A write strobe `exp_we_n` pulses for one clock on each port write.
  - Four status LEDs (LEDREG, 0 = on, reset all off).
  - Three pushbuttons, debounced for 5 ms at 66 MHz (SWREG, 1 = released).
  - Each input pin and each switch is also an interrupt source.

## Reset and service modes

`reset_ctrl` takes the board reset line `fpga_rst_n`, which comes from the
supply monitor:

- It holds the FPGA logic in reset for `INT_CYCLES` clocks after release.
- It holds the processor's HRESET for `HRESET_CYCLES` more clocks.
- A one-clock `cpu_rst_req` gives the processor a new reset pulse of the same
  width without resetting the FPGA.

The `mode` input selects what the FPGA does. In modes 1-3 the processor is
held in reset and a service engine drives the SRAM. Each engine restarts when
its mode is selected.

| `mode` | Engine | What it does |
|---|---|---|
| 0 | - | Normal operation. |
| 1 | `srec_prog` | Receives an S-record file on UART 1. It accepts S1, S2 and S3 data records and stops at S7, S8 or S9. Each byte is written by reading its 64-bit word, merging the byte in and writing it back with new check bits, so the EDAC stays consistent. A wrong record checksum raises `prog_err`. |
| 2 | `sram_test` | Writes a fixed 64-bit pattern to every word, one per clock, then reads it all back and compares data and check bits. It then does the same with the inverted pattern. `test_done` and `test_errors` report the result. |
| 3 | `sram_dump` | Sends every SRAM word to UART 1 as eight raw bytes, byte lane 0 first. |

The service engines use UART 1 at the divisor `SVC_UBRR`. The default 0x30 is
38.4 kbit/s at 30 MHz.

## Parameters of `obc_fpga`

| Parameter | Default | Meaning |
|---|---|---|
| `EDAC_EN` | 1 | check and correct SRAM reads |
| `SRAM_CTIME`, `FLASH_CTIME`, `SCC_CTIME`, `REG_CTIME` | 1, 6, 8, 1 | wait clocks before the first TA |
| `DEBOUNCE` | 330000 | pushbutton debounce, in clocks |
| `INT_CYCLES`, `HRESET_CYCLES` | 16, 1024 | reset lengths |
| `SRAM_WORDS` | 262144 | SRAM size in 64-bit words (2 MB), used by the test and dump engines |
| `SVC_UBRR` | 0x30 | UART divisor of the service engines |

## Where this departs from the source design, or fills gaps

The original board described the architecture and register maps. It left many
details open, which this RTL settles as follows:

- **Access times.** The wait-state counts are estimates for 15 ns SRAM and
  90 ns Flash at 66 MHz.
- **Timing of each strobe.** The exact clock of each strobe is this design's.
- **EDAC details.** The matrix, the write-back of corrected data and the
  read-modify-write of partial writes are this design's.
- **EDAC data path.** The FPGA sits in the data path between the processor and
  the memories, so that the EDAC unit can correct data.
- **EDAC in the controller.** The original board's EDAC unit was written and
  simulated on its own, but was never built into its memory controller. Here
  it is part of the controller. The check is given one clock, which needs a
  fast FPGA: on the original device the check path measured 153 ns, about ten
  clocks at 66 MHz. On such a device, `mc_cycler` would need extra wait clocks
  before the check result is used.
- **Access sizes.**
  - SRAM and Flash also accept 8-byte single beats, because the 603e fetches
    instructions 64 bits at a time.
  - The interrupt controller also accepts 4-byte accesses, because its
    registers are 32 bits wide.
- **SMI source.** SMI is driven by the temperature alarm. The source also
  calls SMI reserved; the temperature use was followed.
- **LVDS CTRL.** CTRL is readable.
- **LEDs.** The fourth LED is LEDREG bit 15.
- **UCR value.** A UCR value of 0xC0 enables the receive and transmit
  *interrupts* (bits 0 and 1), not the receiver and transmitter (bits 3 and 4,
  0x18). The register table is followed.
- **Processor reset.** The processor reset is driven by the FPGA. On the
  board it shares the HRESET line with the supply monitor.
- **Service-mode selection.** How the service modes are selected is this
  design's: a 2-bit `mode` input.

Some parts are not in this RTL. They are external chips, analog parts or the
processor itself:

- the 603e;
- the SRAM and Flash devices;
- the SCC;
- the LVDS serialiser and deserialiser;
- the clock generator and RTC;
- the temperature and current sensors;
- the ADC;
- the supply monitor;
- the power supplies and the PLL filter.

The testbenches model the SRAM (`tb/sram_model.sv`) and an I2C slave
(`tb/i2c_slave_model.sv`).

## Verification

Every block has a self-checking testbench `tb/tb_<block>.sv`. Each one ends by
printing `TB_RESULT checks=N failures=M`, and each has a watchdog. Results at
the time of writing:

- **Exhaustive or random checks against reference models written in the
  testbench.** The EDAC testbench covers all single and double errors over
  random words, plus the two reference codewords. There are also exhaustive
  byte-lane decoding checks and chip-select checks for every region and size.
- **Bus-level tests of `mem_ctrl`.** They drive 60x transfers with TA, DRTRY,
  TEA and AACK counting. They check the timing above, burst ordering,
  read-modify-write, scrubbing of injected single errors and MCP on double
  errors.
- **Peripheral tests.** They use serial or I2C models and check baud timing,
  voting, interrupts and reset values.
- **`tb_obc_fpga`.** It runs the whole FPGA at small sizes. It counts every
  mechanism at least once, and a mechanism that never happened is a failure:
  single, burst and partial transfers, wait states, DRTRY with scrubbing, MCP,
  TEA, address-only transfers, Flash, SCC, both UART directions, INT, SMI,
  I2C, LVDS, system management, LEDs, switches, processor reset, and all four
  modes.
- **`tb_obc_fpga_full`.** It runs the same sequence with every parameter at its
  default: 2 MB SRAM, 5 ms debounce and UART divisor 0x30. It simulates about
  22 ms in a few seconds.

To run a testbench with plain Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps --top-module tb_obc_fpga \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/obc_pkg.sv tb/tb_obc_fpga.sv
./obj_dir/Vtb_obc_fpga
```

Replace `tb_obc_fpga` with any other testbench name. Lint with
`verilator --lint-only -Wall -y rtl -Irtl rtl/obc_pkg.sv rtl/obc_fpga.sv`.
Lint warns only about signals left unused on purpose; each module's opening
comment names them.

## Sizing checks

| Case | Arithmetic | Result |
|---|---|---|
| UART at 38.4 kbit/s from 30 MHz | 30e6 / (16·38400) − 1 = 47.8, so UBRR = 0x30 gives 38 265 bit/s (−0.35 %) | fits |
| I2C at 100 kHz from 30 MHz | 30e6 / (5·100e3) − 1 = 59; a prescale of 0x3C gives 98.4 kHz | fits |
| SRAM | 262 144 × 64-bit words = 2 MB, using 18 word-address bits | fits |
| Flash | 512K × 64-bit words = 4 MB, using 19 word-address bits | fits |
| SRAM test | Both passes over 2 MB take 4 × 262 144 clocks, about 15.9 ms at 66 MHz. That is far above the 89 Mb/s the original test reached. | fits |
| Full SRAM dump at 38.4 kbit/s | 2 MB × 10 bits ≈ 9 minutes | fits |
