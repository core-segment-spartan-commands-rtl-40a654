# Core/segment slow-control command processor

This is the slow-control logic of a "core" or "segment" module in a data-acquisition crate. A user PC sends
byte-oriented command frames over Ethernet. An XPort serial-to-Ethernet bridge passes them to a small FPGA on
the slow-control (SC) card. The FPGA uses those commands to:

- load and read back the 2 MB SRAM on the card;
- copy Virtex-II Pro bitstreams between SRAM and two flash chips;
- configure the FPGAs on the ADC cards, from their serial PROMs or byte-parallel from flash;
- switch and select the 100 MHz ADC clock, and shut down power;
- read ten temperature sensors and report module status.

The RTL here is the command processor itself. The SRAM, flash chips, sensors, XPort and ADC cards are outside
it and are reached through ports.

Each core or segment module has its own build of the same RTL. The parameter `IS_CORE` chooses between them.
The core build is the default, because it has the larger command set.

## Command frames

All traffic is framed the same way, in both directions:

| byte | contents |
|------|----------|
| 0    | `{segment, type[1:0], 00000}`: type NW = `00` (write, no reply), LW = `01` (long write), SR = `10` (short read). Segment frames therefore start with `80`/`A0`/`C0`, core frames with `00`/`20`/`40` |
| 1-3  | length of the rest of the frame (from byte 4 on), most significant byte first |
| 4    | byte 0 OR'ed with the module id: `0x10` for a segment (`90`/`B0`/`D0`), `0x0C` for the core (`0C`/`2C`/`4C`) |
| 5    | command code |
| 6... | parameters or payload |

A short command is therefore `40,00,00,04,4C,0E,00,00`: an SR frame to the core, 4 more bytes, command 14 and
two unused bytes.

**The SRAM doubles as the receive buffer.** Every byte from byte 4 on is written into SRAM from address 0
upward as it arrives. This is the main idea behind command 9 ("store stream"):

- The host sends header, command `09`, six padding bytes and then the bitstream.
- The bitstream therefore lands from address 8. That is exactly where the flash copy commands expect it
  (range `0x000008`-`0x161B33`).
- A later short frame (at most 8 bytes from byte 4) only overwrites addresses 0-7, which hold the header and
  padding.

Nothing else has to move the payload. Body bytes beyond the end of the SRAM are received but not stored.

**Synchronisation.** The receiver skips any byte that cannot start a frame for this module. A header whose
byte 4 does not match abandons the frame. A frame that stalls for `WDT_CYCLES` clocks (0.1 s by default)
between two bytes is dropped by the I/O watchdog, and the timeout is counted for status register 4.

The header alphabet is small, and `00` is a valid core NW header. So on a stream that also carries frames for
other modules, trailing `00` bytes can start a bogus frame. Only the watchdog ends it. The host should leave a
watchdog period of silence after any frame that is not for this module. Bytes that arrive while a command is
executing are dropped; the host is expected to wait for the reply or for the operation to finish.

## Commands

| code | type | effect | reply payload |
|------|------|--------|---------------|
| 9  (`09`) | LW | body stored in SRAM from address 0 (payload from address 8) | none |
| 10 (`0A`) | SR | sends SRAM[start..stop]; each byte read is also copied to address `a - start`, so the range ends up from address 0 | the bytes (length 2 + n) |
| 11 (`0B`) | NW | programs flash IC X (parameter bit 0) with SRAM `0x000008`-`0x161B33` | none |
| 12 (`0C`) | LW | parameters `ff ee dd cc bb aa` = stop pointer (MSB first), start pointer (MSB first) | none |
| 13 (`0D`) | SR | reads the pointers back | `ff ee dd cc bb aa` |
| 14 (`0E`) | SR | reads status; clears the watchdog counter | reg0..reg5 |
| 15 (`0F`) | SR | SRAM memory test | 3-byte last good address, `1F FF FF` = pass |
| 16 (`10`) | NW | loads SRAM `0x000008`-`0x161B33` from flash IC X | none |
| 17 (`11`) | NW | ADC 100 MHz clock enable = X bit 0 (core only) | none |
| 18 (`12`) | NW | ADC-card FPGA configuration, bytes `aa`, `bb` (see below) | none |
| 19 (`13`) | SR | reads all temperature sensors | 20 bytes: sensor i as MSB, LSB |
| 20 (`14`) | NW | X bits 0-2 stored (read back in reg3); X bit 3 asserts `pwr_shutdown` until reset (core only) | none |
| 40 (`28`) | NW | ADC clock source: X bit 0 = 1 internal, 0 external (core only) | none |

Every reply is an SR frame: `C0/40`, 3 length bytes, `D0/4C`, command code, then the payload. Unknown command
codes are ignored. A segment build ignores commands 17, 20 and 40.

**Status bytes (command 14)**

| byte | contents |
|------|----------|
| reg0 | bit 0: ADC clock enabled<br>bit 1: internal clock selected<br>bit 2: core PSU monitor (0 in a segment build)<br>bit 3: segment PSU monitor |
| reg1, reg2, reg4 | watchdog timeouts since reset, saturating at 255 |
| reg3 | bits 4-6: the last command 20 bits 0-2 |
| reg5 | `{IS_CORE, VERSION[6:0]}` |

**Temperature words (command 19)** are passed through unchanged, in the sensor's own format:

- d15 is the sign;
- d14..d3 are the 12-bit reading, 0.0625 °C per bit;
- d2..d0 are unused.

The payload slots are sensor 0 → PL0/PL1, sensor 1 → PL2/PL3, and so on. Which sensor is wired to which
chip select is set by the board.

**Command 18** runs in two phases:

1. Every card whose bit is set in `aa` is put in serial mode and pulsed on PROG_B, all at once. The loader
   waits until all of them raise DONE.
2. The cards whose bits are set in `bb[3:0]` are then loaded one after another in SelectMAP mode. Each gets a
   PROG_B pulse. After INIT_B rises, every flash byte `0x000008`-`0x161B33` goes out on `cfg_d` with one
   `cfg_cclk` pulse. CCLK keeps running until DONE. Bit `bb[4+i]` selects flash IC 1 for card i.

A card that times out is flagged in `cfg_fail`.

## Structure

```
 uart_rx ─► frame_rx ──frame, frame_done──► cmd_ctrl ──► uart_tx
              │ SRAM writes (body)           │ start/done
              ▼                              ├─► sram_check   (cmd 15)
           SRAM port ◄── OR of all units ────┼─► flash_copy   (cmd 11, 16) ─┐
                                             ├─► temp_reader  (cmd 19)      ├─► flash port
                                             └─► v2pro_loader (cmd 18) ─────┘
```

| file | role |
|------|------|
| `rtl/sc_pkg.sv` | command codes, frame type enum, header formulas `hdr0`/`hdr4`, memory-test pattern, `frame_t`, `sram_req_t`, `flash_req_t` |
| `rtl/uart_rx.sv`, `rtl/uart_tx.sv` | 8N1 serial link to the XPort; `CLKS_PER_BIT` clocks per bit |
| `rtl/frame_rx.sv` | frame parser, SRAM body writer, I/O watchdog |
| `rtl/cmd_ctrl.sv` | dispatcher, pointer, control and status registers, reply sender, command 10 dump |
| `rtl/sram_check.sv` | memory test (command 15) |
| `rtl/flash_copy.sv` | flash ↔ SRAM bitstream copy (commands 11, 16) |
| `rtl/temp_reader.sv` | SPI readout of the sensors (command 19) |
| `rtl/v2pro_loader.sv` | ADC-card FPGA configuration (command 18) |
| `rtl/sc_top.sv` | top level; ties the units together and brings out every external interface |

Only one command runs at a time. `cmd_ctrl.busy` is high from the end of a frame until the command and its
reply are finished.

- **SRAM port.** Every idle unit drives an all-zero SRAM request, so the SRAM requests are OR'ed. An assertion
  in `sc_top` checks that at most one unit drives the SRAM port at a time.
- **Flash port.** It goes to `flash_copy` while that unit holds its request bit, otherwise to `v2pro_loader`.
  The engines keep address and select bits between requests, so they cannot simply be OR'ed. A second
  assertion checks that the two flash requests never overlap.

## Interfaces and timing

- **Serial link.** 8 data bits, no parity, 1 stop bit, LSB first. The default `CLKS_PER_BIT = 347` gives
  115200 baud from a 40 MHz clock. The transmitter sends bytes back to back without gaps.
- **SRAM.** The port is `sram_en`, `sram_we`, `sram_addr[SRAM_AW-1:0]`, `sram_wdata`, `sram_rdata`. Requests
  leave the units through a register. The SRAM samples a request on a clock edge and presents read data after
  that edge. A unit therefore sees read data two cycles after the cycle in which it decided to read. An
  asynchronous SRAM chip needs a small pin-level adapter in front of this port.
- **Flash.** The port is `fl_req`, `fl_we`, `fl_sel`, `fl_addr[23:0]`, `fl_wdata`, `fl_ack`, `fl_rdata`. A
  request is held until the flash side answers with a one-cycle `fl_ack`; read data comes with the
  acknowledge. Erase and program sequences of a real flash part belong on the flash side of this handshake.
- **Temperature sensors.** Shared `ts_sck`, one `ts_cs_n` and one `ts_so` per sensor. Each sensor is read as
  16 bits, MSB first, sampled as SCK rises, with `SCK_DIV` clocks per half period.
- **ADC cards.** One `cfg_prog_b`, `cfg_smap` (mode: 0 = serial PROM, 1 = SelectMAP), `cfg_cs_b`,
  `cfg_init_b` and `cfg_done` per card. `cfg_cclk` and `cfg_d[7:0]` are shared by all cards.
- **Control outputs.** `vclk_en` and `clk_int_sel` reset to 0: clock disabled, external source. `pwr_shutdown`
  is sticky.

### Cycle counts at the defaults

| operation | cycles |
|-----------|--------|
| command 15 memory test | 2·2²¹ + a few; 105 ms at 40 MHz |
| command 16 / 11 copy | (flash access + 2) per byte over 1,448,748 bytes |
| command 10 | one serial byte time per byte (the SRAM side takes 4 cycles) |
| command 19 | about 10 × 34 × `SCK_DIV` |

## Parameters (`sc_top`)

| parameter | default | meaning |
|-----------|---------|---------|
| `IS_CORE` | 1 | core build (1) or segment build (0) |
| `VERSION` | 17 | code version reported in reg5 bits 0-6 |
| `CLKS_PER_BIT` | 347 | clocks per serial bit |
| `SRAM_AW` | 21 | SRAM address bits (2 MB) |
| `WDT_CYCLES` | 4,000,000 | I/O watchdog period |
| `N_SENS`, `SCK_DIV` | 10, 20 | sensors; SPI half period |
| `N_CARDS` | 4 | ADC cards handled by command 18 |
| `BS_FIRST`, `BS_LAST` | `0x000008`, `0x161B33` | bitstream range in flash and SRAM |
| `PROG_CYCLES`, `CFG_TIMEOUT` | 40, 48,000,000 | PROG_B pulse length; wait limit for INIT_B and DONE |

The bitstream range holds 1,448,748 bytes, the size of an XC2VP30 bitstream. It fits the 2 MB SRAM with
room to spare.

## What is fixed and what is chosen

Taken from the command set:

- the frame layout and header bytes;
- the command codes and parameters;
- the reply layouts and status bits;
- the bitstream range and SRAM size;
- the order of the command 18 phases.

Chosen here, because the command set does not say:

- **Clock and link.** The 40 MHz clock and the UART format and rate.
- **Ports to external parts.** The SRAM, flash, SPI and card-pin protocols.
- **Frame handling.**
  - The watchdog condition.
  - Dropping bytes while busy.
  - NW and LW commands send no reply.
  - Unknown codes are ignored.
- **Command details.**
  - The framing of the command 10 reply.
  - The memory-test pattern, which is the XOR of the three address bytes, and its two-pass order.
  - Reading the sensors only when command 19 arrives.
  - Using the command 16 range for command 11.
  - The version number 17.

Points where the command set's wording was ambiguous, and how they were read:

- **Length byte order.** The text calls the length `xxyyzz` but writes the header `A0,zz,yy,xx`. All the
  examples put the least significant byte last, so the length is taken MSB first.
- **Command 12 key.** It lists `reg_dd` as "most significant byte of stop pointer". It is taken as the least
  significant byte, because `reg_ff` is already the MSB.
- **Copy to address 0.** The note that a readout copies the pointer range to address 0 upward is attached to
  command 12. It only makes sense for command 10, where it is implemented.
- **Core command 10 example.** It has length byte `00`, which this receiver rejects as too short. Use
  `40,00,00,04,4C,0A,00,00`.
- **Commands 17 and 20 in a segment build.** Frames for them are printed for the segment too, but the
  command table lists them as core-only. The table is followed.
- **Memory-test failure at address 0.** It reports `1F FF FF`, the same as a pass. The test reports the
  address before the first bad one, and before address 0 that wraps round to the top of memory.
- **Temperature warnings.** reg1 and reg2 only mirror the watchdog count. No temperature-threshold logic is
  built.

Commands 11 and 18 are built from their stated function, although the command list gives them as not
completed and not started. Their pin-level behaviour (a generic flash handshake, the usual Virtex-II Pro
PROG_B/INIT_B/CCLK/DONE sequence) is this design's assumption.

## Simulation

Each block has a self-checking testbench in `tb/` that prints `TB_RESULT checks=N failures=M`. The external
parts have behavioural models in `tb/`: `sram_model` (with one injectable bad cell), `flash_model`,
`temp_sensor_model` and `v2pro_card_model`.

To run one testbench:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_sc_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/sc_pkg.sv tb/tb_sc_top.sv
obj_dir/Vtb_sc_top
```

Replace the module name to run another testbench. The testbenches are:

| testbench | what it does |
|-----------|--------------|
| `tb_sc_top` | End to end over the serial line at reduced sizes: 8 clocks per bit, 4 KB SRAM, a 64-byte bitstream. It runs every command and also sends frames for the other module type, a wrong address byte, a stalled frame and a frame during a busy command. It counts each mechanism and fails if one never happened. |
| `tb_sc_top_seg` | The segment build (`IS_CORE = 0`): core frames ignored, commands 17/20/40 without effect, segment reply headers and status bits, and a serial load of all four cards. |
| `tb_sc_top_full` | `sc_top` at its defaults: status read, the 2 MB memory test, and a full-range flash-to-SRAM load (command 16), SRAM-to-flash program (command 11), pointer set/read and dump of the last 52 bitstream bytes (commands 12, 13, 10), the ten temperature sensors (command 19), serial PROM load of cards 1 to 3 and SelectMAP load of card 0 (command 18), with cycle-count checks. About 20 s on a workstation. |
| `tb_uart_rx`, `tb_uart_tx`, `tb_frame_rx`, `tb_cmd_ctrl`, `tb_sram_check`, `tb_flash_copy`, `tb_temp_reader`, `tb_v2pro_loader` | One per block. They check results against values computed in the testbench, plus cycle counts where they are defined (UART bit timing, memory-test length, sensor readout time). |

At the defaults, the memory test keeps the controller busy for about 4.22 M cycles, including the reply.
A full-range copy takes about 8.7 M cycles from flash (flash access latency 2 in the model) and about 13.0 M
cycles into flash. The temperature readout, the serial-PROM path of command 18 and the cmd 10 dump have been
simulated only at the reduced sizes.
