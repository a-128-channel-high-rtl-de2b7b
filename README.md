# 128-channel TDC readout module: FPGA and CPLD logic

This is the digital logic of a 6U PXI board that timestamps 128 detector
signals (drift-chamber wires read through time-over-threshold front ends)
with about 100 ps resolution and ships the data to a PC at tens of MB/s.
The time measurement itself is done by four CERN HPTDC chips in
high-resolution mode (32 channels each, about 98 ps per bin, 256 bins per
25 ns clock period). Around them sit:

* an **FPGA** (Cyclone II EP2C20 class) that configures the HPTDCs over one
  shared JTAG chain, triggers them and reads them out over their shared
  parallel bus, removes the TDCs' integral non-linearity with a 256-entry
  look-up table, and buffers the data through a FIFO, an external SDRAM
  and a second FIFO;
* a **CPLD** on the PXI (PCI) bus that moves the buffered data to the PC by
  DMA, forwards the PC's commands to the FPGA, and reloads the FPGA's
  configuration from a serial flash, which it can also rewrite from the PC.

Three clocks are involved: 40 MHz for the TDCs and the FPGA front part,
100 MHz for the SDRAM, and the 33 MHz PCI clock for the CPLD and the far
side of the output FIFO.

```
 trig_front ─┐                                     FPGA                                             CPLD (33 MHz)
 trig_pxi  ──┼─► hptdc_readout ─► inl_corrector ─► FI ═► sdram_ctrl ═► FO ═══════════════════► pxi_dma ──► PCI core (mst_*)
 sw trigger ─┘    ▲  │ trigger    (256-entry LUT)   40→100   │  ▲      100→33 MHz                         ▲
                  │  ▼                                       ▼  │                                       tgt_* (PC registers)
        4 x HPTDC parallel bus / token ring              external SDRAM                                  │
                                                                                        ┌────────────────┼───────────────┐
 HPTDC JTAG chain ◄── hptdc_jtag_cfg ◄── host_cmd_if ◄═══ command link (toggle handshake) ◄─ cpld_logic ─► sflash_ctrl ─► serial flash
                                           (LUT, control)                                               ps_timing_gen ─► FPGA PS port
```

`tdc128_module` is the top: `fpga_logic` plus `cpld_logic`. Everything that
is a chip rather than logic (HPTDCs, SDRAM, flash, the PCI core, the FPGA's
configuration port, LVDS buffers, the bus transceiver, the clock fan-out) is
outside the RTL and reaches the top through ports.

## Data word

All data are 32-bit HPTDC words (`tdc_pkg.sv`):

| bits    | field                                                                   |
|---------|-------------------------------------------------------------------------|
| 31:28   | type: 0 group header, 1 group trailer, 2/3 TDC header/trailer, 4 leading edge, 5 trailing edge, 6 error, 7 debug |
| 27:24   | TDC id                                                                  |
| 23:19   | channel (0-31)                                                          |
| 18:0    | time in high-resolution bins (about 98 ps); bits 7:0 are the bin within the 25 ns period |

This layout is the HPTDC's own format as used here; the board's
documentation does not spell it out. Leading edges give the arrival time,
trailing edges the pulse end, and the difference is the time over threshold,
that is, the charge.

## HPTDC readout and the token ring (`hptdc_readout`)

The four HPTDCs share one 32-bit data bus and one DataReady line. The chips
drive DataReady only while they own the token and leave it floating otherwise,
so a pull-down keeps it low. After a trigger the master chip sends a group
header, each chip in turn sends its data and passes the token on, and the
master closes the event with a group trailer. (On the board, three chips go
through a bus transceiver and the fourth is wired directly; the FPGA sees
one bus.)

The FPGA's part is small but timing-critical. **`get_data` is combinational
from DataReady**: it goes high in the same 40 MHz cycle, and the word is
registered on that edge. The chips check get_data to confirm that the FPGA
took the word. A registered get_data would be one cycle late and would halve
the bus rate. `enable` (CTRL bit 0) gates it.

Triggers come from three sources: the front-panel input, a PXI trigger line
(both asynchronous, each synchronised with two flip-flops and
edge-detected), and a software trigger command from the PC. Any of them makes
a one-cycle pulse on the common trigger line of all four chips. The block
also tracks event boundaries (`in_event`) and counts triggers, events, words
and HPTDC error words; these counts appear in the status word.

## INL correction (`inl_corrector`)

The HPTDC's non-linearity repeats every clock period, that is, every 256
bins. A 256-entry table of signed INL values, in whole bins, is indexed by
time bits 7:0. For leading and trailing edge words the corrected time is
`time - INL[time[7:0]]`, modulo 2^19. All other words pass unchanged. The
PC fills the table through the LUT command with values from a code-density
test (a histogram of many random hits). The correction can be switched off
with CTRL bit 1. The latency is two 40 MHz cycles, with one word per cycle.
`N_TABLES` (default 1) allows separate tables chosen by the upper bits of
{TDC id, channel}, for boards that calibrate per channel group.

Because the table holds whole bins, the correction cannot remove errors
smaller than about half a bin. `tb_inl_code_density` plays through the
whole calibration against a model TDC with a periodic non-linearity of
±1.5 bins:

1. a code-density histogram of a million random hits;
2. the INL computed from it and loaded into the LUT;
3. random hits, for which the remaining time error is measured;
4. an 8 ns two-channel delay measurement, whose spread divided by √2 gives
   the single-channel resolution.

With this model the resolution improves from about 104 ps to about 40 ps.

## Buffering: FI → SDRAM → FO (`async_fifo`, `sdram_ctrl`)

This is the part that takes most care. The PC reads in DMA bursts with
gaps between them, while the TDCs produce data whenever triggers come. A
16 MB SDRAM (MT48LC4M32B2: 4 banks x 4096 rows x 256 columns x 32 bits, at
100 MHz) absorbs the difference, so no data is lost while the PCI side
stalls.

**FIFOs.** FI (40→100 MHz) and FO (100→33 MHz) are both 4096 x 32
dual-clock FIFOs with Gray-coded pointers and two-flop synchronisers. Each
side has its own used-word count (`rdusedw`, `wrusedw`, AW+1 bits so that
"full" reads 4096). Reads are registered: data appear the cycle after
`rd_en`. Together the two FIFOs use 256 kbit of RAM. That is slightly more
than the roughly 240 kbit of block RAM in an EP2C20, so a real build would
need somewhat shallower FIFOs. The RTL keeps the specified 4096 depth.

**Moving rules**, checked in the idle state between blocks:

1. If FI holds at least 256 words and the SDRAM is not full, the controller
   moves one 256-word block from FI into the SDRAM. This has priority.
2. Otherwise, if the SDRAM holds at least one block and FO's write-side count
   is below 3700, it moves one block from the SDRAM into FO.
3. A refresh that is due (every 1560 cycles, 4096 rows per 64 ms) is issued
   before either rule.

The limit of 3700 leaves room for a whole 256-word block
(3700 + 256 < 4096), so FO can never overflow during a block. Because only
whole blocks move, "the SDRAM holds more than 256 words" is implemented as
"holds at least one complete block". With a strict "more than", the last
block stored could never leave. For the same reason, words in FI that do not
yet make up a full block stay in FI until more data arrive. There is no
flush.

**SDRAM layout and commands.** One block is one SDRAM row. Pages
`{row, bank}` are used as a ring of 16384 pages. `wr_page` and `rd_page`
count the pages, and their difference is the fill level (`stored_pages`).
Consecutive pages alternate banks. A block transfer is:

```
ACTIVATE (row, bank) ─ tRCD ─ 256 x WRITE or READ, one per cycle (burst length 1) ─ tWR / CL drain ─ PRECHARGE ─ tRP
```

At 100 MHz this is about 265 cycles per block, roughly 390 MB/s in each
direction: far more than the HPTDC bus (160 MB/s at most) or the PCI
side (133 MB/s) can supply or take. Read data are sampled CL+1 edges after
the READ command is registered, with CAS latency 2. After reset the
controller waits 200 µs (`INIT_WAIT` = 20000 cycles), then precharges all
banks, does two auto refreshes and loads the mode register (burst length 1,
sequential, CL 2). All SDRAM outputs are registered. The DQ bus is split
into `sd_dq_out`, `sd_dq_oe` and `sd_dq_in`; the tristate buffer belongs in
the pad ring.

Timing parameters (`T_RCD`, `T_RP`, `T_RFC`, `T_WR`, `T_MRD`, `CL`,
`REF_INTERVAL`, `INIT_WAIT`) are in cycles at 100 MHz and come from the
SDRAM's data sheet, not from the board description.

If FI still fills up (the SDRAM full and the PC not reading), the FPGA drops
words rather than corrupting the FIFO. It raises `ev_fi_drop` and sets the
sticky "data lost" status bit.

## PC → FPGA commands (`host_cmd_if`)

The CPLD (33 MHz) forwards register writes to the FPGA (40 MHz) over a
toggle handshake. It latches address and data into holding registers and
flips a request toggle. The FPGA synchronises the toggle, executes the
command, snapshots its status word, and flips an acknowledge toggle back.
The holding registers stay stable while `cmd_busy` is high, so no multi-bit
value crosses clock domains unsynchronised. A command takes about 3 cycles
of each clock.

| cmd addr | name     | meaning                                                            |
|----------|----------|--------------------------------------------------------------------|
| 0        | CTRL     | bit0 readout enable, bit1 INL correction enable                    |
| 1        | ACTION   | bit0 software trigger, bit1 start HPTDC JTAG configuration (pulses) |
| 2        | CFG_ADDR | word address in the JTAG configuration buffer                      |
| 3        | CFG_DATA | write one 32-bit buffer word, then CFG_ADDR increments              |
| 4        | LUT      | [31:16] LUT address {table, bin}, [7:0] signed INL value           |
| 5        | NOP      | only refresh the status snapshot                                  |

Status word: [31] JTAG busy, [30] JTAG done, [29] inside an event,
[28] data lost, [27] SDRAM initialised, [23:16] HPTDC error words,
[15:0] events.

## HPTDC configuration over JTAG (`hptdc_jtag_cfg`)

The four HPTDCs form one JTAG chain: TDI goes into chip 0, and each chip's
TDO feeds the next chip's TDI. TMS, TCK and nTRST are common to all chips.
The PC writes the setup bits of all four chips into an 81-word buffer
(4 x 647 bits, bit 0 of word 0 goes out first; the last chip in the chain
comes first). A start command then runs a standard IEEE 1149.1 sequence at
TCK = clk/2 (20 MHz):

1. five TMS-high clocks to reset the TAP;
2. Run-Test/Idle;
3. Shift-IR with the SETUP instruction (5 bits, code 18h) in every chip;
4. Update-IR;
5. Shift-DR through 4 x 647 bits;
6. Update-DR.

The whole run takes 2·(5+1+2+2+4·5+2+2+2588+2)+2 = 5254 clock cycles, about 131 µs at 40 MHz.
The last 32 bits read back on TDO are kept in `tdo_last`. The
instruction length, the instruction code and the 647-bit register length
come from the HPTDC's documentation and are parameters.

## DMA to the PC (`pxi_dma`)

The PCI core (Altera pci_mt32 on the board) is not part of this RTL. Its
master side is replaced by a generic interface. `mst_req` with `mst_addr`
and `mst_len` (in words) is held until `mst_ack`. After that, a valid/ready
stream of 32-bit words follows. A 4-entry prefetch buffer hides FO's read
latency, so the engine hands over one word per 33 MHz cycle (133 MB/s) while
FO has data. An empty FO only pauses the stream. `irq` pulses when the last
word is taken.

| tgt addr | register | meaning                                                |
|----------|----------|--------------------------------------------------------|
| 0x00     | DMA_ADDR | PC bus address                                         |
| 0x01     | DMA_LEN  | bytes, multiple of 4, up to 256 kB − 4                |
| 0x02     | CTRL     | write bit0 = 1: start                                  |
| 0x03     | STATUS   | bit0 busy, bit1 done (write 1 to bit1 to clear)        |
| 0x04     | FO level | FO read-side word count                                |

The average rate depends on the burst length, because the PC has to service
each interrupt and start the next transfer. `tb_dma_burst_rate` measures
this. The engine alone reaches 111 MB/s at 256 B and 130 MB/s at 4 kB and
above. With an assumed 10 µs of PC time per transfer, the average is 98 MB/s
at 4 kB and still climbing. On the real board, disk writes limit the
sustained rate to about 40-50 MB/s.

## FPGA reconfiguration from flash (`sflash_ctrl`, `ps_timing_gen`)

The FPGA loads its configuration in passive-serial mode from a serial (SPI)
flash. The CPLD does this once after power-up and again whenever the PC asks.
To change the FPGA logic in the field, the PC rewrites the flash through the
CPLD:

* **`sflash_ctrl`** erases or programs the flash. Each operation sends
  write-enable (06h). Then it sends either bulk erase (C7h) or page program
  (02h, a 24-bit address and the 256 bytes that the PC first wrote into the
  CPLD's page buffer). Finally it polls read-status (05h) until the
  write-in-progress bit clears. SPI mode 0, MSB first, SCLK = clk/2.
* **`ps_timing_gen`** reloads the FPGA:
  1. pulls nCONFIG low for 80 cycles;
  2. waits for nSTATUS to rise, then another 80 cycles;
  3. opens one continuous flash READ (03h) at address 0;
  4. sends each byte LSB first on DATA0 with a DCLK edge per bit, until
     CONF_DONE rises;
  5. gives 299 more DCLKs for the FPGA's initialisation.

  A low nSTATUS during loading, or no CONF_DONE within `MAX_BYTES`, is
  reported as a configuration error.

The two blocks share the flash pins. The timing generator owns them while it
runs.

CPLD target map (beyond the DMA registers): 0x10 write = page-buffer byte
([15:8] index, [7:0] data); 0x11 = program the page at address [23:0];
0x12 = bulk erase; 0x13 = reconfigure FPGA; 0x10 read = {last flash op done,
FPGA configured, configuration error, configuration busy, flash busy};
0x20-0x2F write = FPGA command (low 4 bits = cmd addr); 0x20 read = FPGA
status snapshot; 0x21 read bit0 = command busy.

## Clocks and resets

| clock   | domain                                                        |
|---------|---------------------------------------------------------------|
| `clk40` | trigger, readout, INL, JTAG, FI write side, command execution |
| `clk100`| FI read side, SDRAM controller, FO write side                 |
| `clk33` | FO read side, all CPLD logic, command issue                   |

One asynchronous `rst_n` is synchronised separately into each domain
(`rst_sync`: asserted asynchronously, released after two flops). Signals
cross domains only through the FIFOs (Gray pointers), the command
toggle handshake, and two-flop synchronisers on single-bit levels.

## Where this RTL goes beyond or departs from the board description

* The description fixes the architecture, the FIFO sizes and thresholds, the
  256-entry INL table, the 40/100/33 MHz clocks, the JTAG chain and the
  trigger sources. The following are this design's own choices: the HPTDC
  word format and JTAG codes (taken from the HPTDC's documentation), every
  register map and handshake, the SDRAM layout and command sequence, the
  flash command set and the passive-serial timings.
* Status words and a software trigger exist so that the PC can run the
  board. The PXI trigger is modelled as one asynchronous input line.
* The FIFOs are 4096 deep as specified, although the named FPGA has a little
  less block RAM than the two need.
* In real hardware the FPGA logic only exists after the CPLD has configured
  it. In this RTL both run from reset, and the configuration sequence is
  exercised against a model of the FPGA's configuration port.
* No size has been scaled down: the full-size end-to-end test runs the top
  with every parameter at its default.

## Files

`rtl/` holds one module or package per file:

* `tdc_pkg` (types)
* `tdc128_module` (top), which contains:
  * `fpga_logic`: `host_cmd_if`, `hptdc_jtag_cfg`, `hptdc_readout`, `inl_corrector`, `async_fifo` x2, `sdram_ctrl`
  * `cpld_logic`: `pxi_dma`, `sflash_ctrl`, `ps_timing_gen`, `spi_byte`
* `rst_sync`

`tb/` holds one self-checking testbench per block, named `tb_<module>`. It
also holds three workload tests: `tb_dma_burst_rate`, `tb_inl_code_density`, and `tb_sustained_rate`. The last runs the whole module for 3 ms at about 44 MB/s of TDC data, with 4 kB DMA transfers and PC gaps between them, and checks that the PC keeps up at more than 40 MB/s with no word lost. The folder also holds behavioural models of the parts outside
the logic:

* `hptdc_jtag_model`: the TAP of a chain of HPTDCs;
* `hptdc_bus_model`: four chips on the token-ring bus, which also checks the
  get_data protocol;
* `sdram_model`: with command-timing and refresh checks;
* `spi_flash_model`;
* `fpga_ps_model`.

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
`tb_tdc128_module` runs the unmodified top end to end:

* JTAG configuration;
* an INL table;
* 450 triggers from all three sources;
* data through FI, SDRAM and FO;
* DMA transfers checked word by word;
* a flash erase and program;
* FPGA reconfigurations.

It counts each of these mechanisms and fails if one never happens. Its
counts include SDRAM blocks in and out, FO back-pressure holds, refreshes,
DMA interrupts and passive-serial loads.

## Simulating

With Verilator 5 (the testbenches use timing controls, so `--timing`):

```
verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/tdc_pkg.sv \
          tb/tb_tdc128_module.sv --top-module tb_tdc128_module -o sim
./obj_dir/sim
```

For another block, replace the testbench name, for example
`tb/tb_sdram_ctrl.sv --top-module tb_sdram_ctrl`. `-y` lets Verilator
find the other modules and models by file name. The full-size top test
builds in about 10 s and runs in under a second. Simulation is two-state:
every register that is read is reset, so random initial values do not
matter. To change a size, override the parameters of `tdc128_module`
(for example `FAW` for the FIFO depth, `INIT_WAIT` to shorten SDRAM
start-up).
