# DDU VME interface FPGA

This is the VME-facing controller of a CMS CSC DDU board. It makes the board
an A24/D16 VME slave. Through that one slave, a crate controller can do three
things:

* **VME-JTAG**: drive any of the board's eight JTAG chains (PROMs, FPGAs and
  FIFOs), for configuration, boundary scan and in-system programming.
* **VME-Serial**: read and program a serial flash memory that holds the
  board's settings. It also pushes those settings, over serial lines, into
  the input FIFOs, the GbE output FIFO and the DDU_Ctrl FPGA, and reads the
  input FIFOs back. After reset the same settings load automatically from
  flash.
* **VME-Parallel**: read fast status registers: the FMM (fast monitoring)
  state of the DDU and of its 15 DMBs, the mode switch and a status word. It
  also reads and writes a 48-bit staging register shared with the serial
  path.

The idea behind it is that the address carries the operation. A single VME
cycle names the board's slot, the access path, the target device and a
command. The data word carries only data, and DTACK* comes only when the
operation is finished. A JTAG shift or a flash access is therefore one VME
cycle, which is simply held longer.

## Addressing a board

The 24-bit address is split into fields. Bits 1:0 are unused.

| field | bits  | meaning |
|-------|-------|---------|
| slot  | 23:19 | the board's slot (its geographic address), or 28 to reach all DDUs at once |
| type  | 18:16 | `000` VME-JTAG, `100` VME-Serial, `011` VME-Parallel |
| dev   | 15:12 | device within the path |
| rest  | 11:2  | path-specific: see below |

How the bits below the device field are read depends on the path:

* **JTAG:** bits 11:8 hold the bit count (bits to shift minus one, 1 to 16).
  Bits 5:2 hold the JTAG command.
* **Serial:** bits 5:2 hold the command. Only the flash (device 4) uses it.
* **Parallel:** bits 9:2 hold an 8-bit command. Devices 8 and up need it, and
  a command of 128 or more is a write.

A cycle is accepted only if all of the following hold:

* the address modifier is one of the four A24 program/data codes (39h, 3Ah,
  3Dh, 3Eh);
* LWORD* is high, i.e. a 16-bit transfer;
* IACK* and BERR* are high;
* the geographic address pins have good (odd) parity;
* the slot field is the board's own slot or 28.

Other cycles are ignored, with no DTACK*.

## The slave front end (`vme_command`)

Everything runs on one 40 MHz clock. AS*, DS0* and DS1* pass through two-flop
synchronisers. Address, AM, LWORD* and WRITE* are sampled when the
synchronised AS* is first seen low. When the board is selected and both data
strobes are low, `strobe` rises three clocks after the strobes fell. One of
`jtag_strobe`, `ser_strobe` or `par_strobe` rises with it. For a write cycle,
the write data is latched at that point.

The three engines each answer with a DTACK level that stays high until the
master releases the data strobes. The top level ORs these together into
DTACK*. Read data goes the same way: each engine gives a data word and an
enable, and the enabled words are ORed together.

## VME-JTAG (`vme_jtag`, `jtag_port_mux`)

This is the most intricate part. There is one engine per device code, and
the device field enables one of them:

| code | chain |
|------|-------|
| 1 | output FIFO |
| 2 | VME_Ctrl PROM |
| 3 | DDU_Ctrl PROMs 1 and 0 |
| 4 | InCtrl PROMs 1 and 0 |
| 5 | DDU_Ctrl FPGA |
| 6 | InCtrl FPGA 0 |
| 7 | InCtrl FPGA 1 |
| 8 | input FIFOs 0 to 3 |

A JTAG engine starts the TAP (test access port) in Run-Test/Idle and builds
every operation from three segments:

| segment | TMS sequence | purpose |
|---------|--------------|---------|
| header  | `1 0 0` (data) or `1 1 0 0` (instruction) | Idle to Shift-DR / Shift-IR |
| data    | 0 on every bit, except 1 on the last bit when a tailer follows | shifts 1 to 16 TDI bits, LSB first, from the write data |
| tailer  | `1 0` | Exit1, then Update, then back to Idle |

The command (ADR[5:2]) chooses the segments:

| cmd | operation |
|-----|-----------|
| 0 | shift data, no header, no tailer |
| 1 | shift data with header only |
| 2 | shift data with tailer only |
| 3 | shift data with header and tailer |
| 5 | read the TDO register |
| 6 | reset the TAP |
| 7, F | shift instruction with header and tailer |
| C, D, E | shift instruction: none / header only / tailer only |
| 4, 8 to B | no operation (acknowledged) |

Because a segment can be left out, a register longer than 16 bits is shifted
in pieces. The first piece has a header and no tailer. The middle pieces have
neither, so the TAP waits in the shift state between VME cycles. The last
piece has a tailer.

While data bits shift, each TDO bit enters a 16-bit register from the top
(right shift). After *n* bits the first captured bit is therefore in bit
16−*n*. After a full 16-bit piece the register holds the bits in order.
Command 5 returns this register.

The reset drives TMS from a six-flop ring loaded with `1 1 1 1 1 0` for
twelve TCK cycles: `111110111110`. This passes Test-Logic-Reset twice and
ends in Run-Test/Idle, whatever state the TAP was in.

TCK runs at 1.25 MHz, the rate the PROMs need for in-system programming. A bit
takes two ticks of a 2.5 MHz enable. TMS and TDI change on the tick that
lowers TCK. TDO is sampled on the tick that raises it.

The engine also gives three status pulses. `load` marks the start of a shift,
`done_data` the end of a data segment and `done_tail` the end of a tailer.
They come out of the top as `devload`, `devdonedata` and `devdonetail`.

**The shared DDU_Ctrl chain.** The DDU_Ctrl PROMs (code 3) and the DDU_Ctrl
FPGA (code 5) are on one physical chain, with one TMS pin and one TCK pin.
`jtag_port_mux` routes TMS and TCK from whichever of the two engines is
active. It holds the PROM-side TDI pin high unless the PROM engine is active.
While the FPGA is addressed, the PROMs therefore shift in all ones, i.e.
BYPASS. At the top level:

* the shared TMS, TCK and PROM TDI are `jtag_*[3]`;
* the FPGA's own TDI is `jtag_tdi[5]`;
* both engines read TDO from `jtag_tdo[3]`;
* `jtag_tms[5]` and `jtag_tck[5]` stay low.

On the other chains, TDI idles high and TMS and TCK idle low.

## VME-Serial and auto-load (`vme_serial`, `auto_load`)

The serial engine moves bits between three places: a 48-bit staging register
`IN_VMEDAT`, the serial flash, and the serially loaded devices. Each device
has an enable `s_sen[code]` and they share `s_clk`/`s_do`. Input FIFOs 0 to 3
also return data on `s_di`. The serial clock is 10 MHz (MIDCLK). Data out
changes while the clock is low; data in is sampled as it rises.

| access | device / cmd | what happens |
|--------|--------------|--------------|
| read  | dev 0 to 3 | 32 bits from input FIFO *n* into IN_VMEDAT |
| read  | dev 4, cmd 0 | flash status: opcode D7h, 8 bits back |
| write | dev 4, cmd 9 / C / D / F | program flash page 1 / 4 / 5 / 7 with the low 16 / 32 / 34 / 16 bits of IN_VMEDAT, after a 32-bit opcode (82h and a 24-bit address) |
| write | dev 8 to B | load DDR input FIFO 0 to 3 (32 bits) |
| write | dev C | load the GbE output FIFO (34 bits) |
| write | dev D / E | load the DDU_Ctrl kill-channel / board-ID word (16 bits) |
| write | dev F | load all four DDR input FIFOs at once (32 bits) |

Anything else is acknowledged without action. That includes the flash
page-read commands, which only the auto-load uses.

The flash pages hold:

* page 1: the kill-channel mask;
* page 4: the DDR FIFO offsets;
* page 5: the GbE FIFO offsets;
* page 7: the board ID.

A page's address has its page number in bits 11:9.

**IN_VMEDAT.** This register is the bridge between 16-bit VME words and the
longer serial words:

* A VME-Parallel write of input register 0 (device 8, command 80h) shifts the
  register up by 16 bits and puts the new word in bits 15:0. Two writes build
  a 32-bit word and three build a 48-bit one.
* A serial transmit sends the low *W* bits, MSb first.
* A serial receive shifts bits in at bit 0.
* A VME-Serial read returns bits 15:0 when shifting is done. The rest is read
  as parallel device 8, commands 0 to 2 (bits 47:32, 31:16, 15:0).

**Auto-load.** The auto-load reads a flash page with a 64-bit opcode: D2h, the
24-bit address, then 32 don't-care bits. It then streams the page's bits from
the flash output straight into the destination device's serial input. They
are copied into IN_VMEDAT too. The sequence is:

* after reset: page 4 to all DDR FIFOs (device F), then page 5 to the GbE
  FIFO (device C);
* then `vme_rdy` goes high;
* when the DDU_Ctrl FPGA asserts LD_RDY (the `ld_rdy_n` pin): page 1 to
  device D, then page 7 to device E.

Mode switch bit 6 disables auto-load. VME-Serial cycles that arrive during an
auto-load wait for it to finish.

## VME-Parallel registers (`vme_parallel`, `fmm_decode`)

| dev | cmd | register |
|-----|-----|----------|
| 0 / 1 / 2 / 3 | – | FMM register for busy / warning / lost sync / error: bit 15 = this DDU, bits 14:0 = DMB 14 to 0 |
| 8 | 00 / 01 / 02 | IN_VMEDAT bits 47:32 / 31:16 / 15:0 |
| 8 | 80 (write) | push a word into IN_VMEDAT |
| 14 | – | bits 7:0 = mode switch |
| 15 | – | bit 15 = VME ready, bits 11:8 = DDU FMM code, bits 4:0 = slot |

Other addresses read 0.

Bit 15 of the FMM registers comes from `fmm_decode`, which maps the DDU's
4-bit FMM code to STAT bits:

| code | state |
|------|-------|
| 0001 | warning |
| 0010 | lost sync |
| 0100 | busy |
| 1000 | ready |
| 1100 | error |

The DMB bits are inputs of the block.

Timing follows the board. PEN1 is the strobe registered. DTACK is
(strobe and PEN1) registered once more, so it comes two clocks after the
strobe. A write gives a single one-clock write pulse.

## Reset, clocks and the mode switch

* `reset_ctrl`: RESET is SYNCRST, or SOFTRST, or power-on, or VME SYSRESET.
  It is applied at once and released two clocks after the last source goes
  away. DDU_SRDY (`ddu_srdy`) is LD_RDY and VME-ready delayed by four clocks.
* `clk_div`: makes MIDCLK (10 MHz), SLOWCLK (2.5 MHz) and SLOWCLK2
  (1.25 MHz) as waveforms and as one-clock enables, from a counter on the
  40 MHz clock. `MID_DIV` (default 4) sets the clock-to-MIDCLK ratio.
* The 8-bit mode switch:
  * bits 5:4 pick a debug view: `00` standard debug, `01` VME-Serial,
    `10` flash, `11` VME-Parallel;
  * bit 6 disables the auto-load and also goes out on the VME1 pin
    (`auto_sld_en_n`);
  * bit 7 asks for all outputs high with the firmware version on the LEDs.
* `led_par_decode`: this is the VME-Parallel view. When mode bits 5:4 are
  `11`, bit 7 is 0 and bit 3 is 0, mode bits 2:0 light one of eight
  LED-select outputs. The signals shown in the other views are not specified
  and are not built.

## Latencies at the default clock (40 MHz)

| operation | time from the data strobes |
|-----------|----------------------------|
| select | 3 clocks to `strobe` |
| VME-Parallel | DTACK 2 clocks after `strobe` |
| JTAG | 32 clocks per TCK bit; a 16-bit shift with header and tailer (21 bits) is about 670 clocks |
| serial | 4 clocks per bit; a flash status read (16 bits) is 64 clocks; a page program is 4 × (32 + *W*) clocks |

## How far this follows the original design, and where it departs

The address format, the device and command codes, and the access-modifier and
geographic-address checks follow the original board's documentation and
schematics. So do the slot and broadcast selection and the one-hot device
decode. The following also come from there:

* the parallel DTACK pipeline;
* the FMM codes;
* the flash page list, widths and status opcode;
* the auto-load device/page pairs;
* the JTAG command set, the reset and tailer TMS rings and the shared-chain
  gating;
* the reset combination;
* the LED decode.

These are this design's own choices:

* **One clock domain.** The board uses several derived clocks and latches the
  address on the AS* edge. Here everything is synchronous to the 40 MHz clock,
  with clock enables and input synchronisers.
* **Flash opcodes and page addressing.** Only the status opcode (D7h) and the
  opcode lengths (32 bits to program, 64 bits to read) are given. 82h/D2h and
  the page-number-in-bits-11:9 address are the usual DataFlash conventions.
  Check them against the part you use.
* **IN_VMEDAT push rule.** Also that serial reads return its low word, and
  that program/load data comes from it.
* **Auto-load order and trigger.** Pages 4 and 5 after reset, pages 1 and 7 on
  LD_RDY.
* **Device 15 bit layout.** The source lists only its contents.
* **FMM busy bit.** Set only for the busy code, not for every "not ready"
  code. `fmm_decode` also has an `invalid` output.
* **Broadcast.** A cycle is a broadcast when the slot field is 28. The
  schematic's gate compares the geographic address instead, but the text
  defines 28 as the broadcast address. Broadcast reads are answered too.
* **Tri-state buses become OR buses.** The engines' DTACK and data are ORed
  together.
* **Read width of the input FIFOs.** It is 32 bits, as the device table says.
  A revision note mentions 34-bit read shifts.

Not built:

* the emergency PROM-programming path (JTAG device code F);
* mode switch bit 7 ("all I/O high, firmware version on LEDs"), which has no
  further description;
* I/O buffers and pads;
* the external chips (flash, PROMs, FPGAs, FIFOs), which are only modelled
  in the testbenches.

## Files

* `rtl/vme_pkg.sv` – address types, codes, opcodes, page widths.
* `rtl/vme_ctrl_top.sv` – top level, which instantiates all of the following:
  * `vme_command` – VME slave front end;
  * `vme_jtag` ×8 and `jtag_port_mux` – JTAG;
  * `vme_serial` and `auto_load` – serial and flash;
  * `vme_parallel` and `fmm_decode` – parallel registers;
  * `reset_ctrl`, `clk_div` and `led_par_decode`.
* `tb/tb_<module>.sv` – one self-checking testbench per module.
* `tb/tb_vme_ctrl_top.sv` – the end-to-end test at default parameters.
* `tb/flash_model.sv`, `tb/jtag_tap_model.sv`, `tb/serial_dev_model.sv` –
  behavioural models of the external devices (not synthesizable).

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  --top-module tb_vme_ctrl_top -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/vme_pkg.sv tb/tb_vme_ctrl_top.sv -o sim
./obj_dir/sim
```

Replace the top module and file for another block, e.g. `tb_vme_jtag` with
`tb/tb_vme_jtag.sv`. The end-to-end test runs the whole board at its default
parameters in a few seconds:

* auto-load after reset and on request;
* parallel reads and writes, broadcast, and a cycle for another slot;
* flash status, program, FIFO read and FIFO load;
* JTAG reset, shift and TDO read;
* a 10-bit IDCODE instruction on the shared chain.

It counts each of these mechanisms and fails if any of them never happened.
Each block's testbench was also run against a deliberately broken copy of its
module, and each one caught the fault.
