# FPGA digital driver/detector for a production IC tester

This RTL is a stand-alone digital test module for an IC tester. It replaces the
digital driver/detector instrument of an older tester, whose small vector
memory limited how long a functional test could be. A host PC loads a time set
and a list of test vectors over RS-232. The module stores up to 32 MB of
vectors in an external SDR SDRAM and plays them onto a device under test (DUT)
through a MAX19005 four-channel driver/comparator. It compares the DUT's pins
at a strobe time in every vector period, and reports the first and second
failing vector and the number of failing vectors.

The design follows the FPGA architecture published by Muttaqin, Abidin,
Setyawan and Az Zahra ("Development of advanced automated test equipment for
digital system by using FPGA", 2019). That publication gives the blocks, their
ports, the states of the sequencer and several measured timings. It does not
give the bit-level encodings, the host protocol or the inner workings of most
controllers. Those were filled in here, and the section
[Where this RTL departs from or adds to the source](#where-this-rtl-departs-from-or-adds-to-the-source)
lists them.

## Board and FPGA blocks

```
            RS-232                        +--------------------+      MAX19005      +-----+
  PC  <---------------> uart_system <---> |                    | <--> pe_controller <--> | DUT |
                                          |  main_controller   |   (4 channels)     +-----+
  SDR SDRAM <--------> sdram_controller <->|  (state controller|        ^   ^
  H57V2562GTR  (32 MB)                    |   + init/receive/  |        |   | levels
                                          |   prepare/test     | --> ad5676_controller --> 4 x AD5676 (daisy chain)
                                          |   FSMs)            | --> ad5308_controller --> AD5308
                                          +--------------------+
```

| module | role |
|---|---|
| `ate_top` | Wires the six blocks together. The top's ports are the FPGA pins. |
| `main_controller` | Sequencer. It runs the host protocol, SDRAM traffic, test run and result report. |
| `uart_system` | 19200 baud 8N1 UART with 16-byte receive and transmit FIFOs (`uart_baud_gen`, `uart_rx`, `uart_tx`, `sync_fifo`). |
| `sdram_controller` | Single-word SDR SDRAM controller: power-up, refresh, 8-cycle read, 9-cycle write. |
| `pe_controller` | Controls the MAX19005. It sends channel settings serially, times each vector period, shapes drive waveforms and strobes the comparators. |
| `ad5676_controller` | Sets drive-high, drive-low, compare-high and compare-low levels in four daisy-chained 16-bit DACs. |
| `ad5308_controller` | Sets the active-load voltages in an 8-bit DAC. |
| `spi_shift_tx` | Serial frame generator shared by the three serial-port controllers. |
| `ate_pkg` | Vector symbol codes, waveform formats, command bytes and SDRAM command codes. |

The MAX19005, the DACs, the SDRAM chip, the RS-232 level shifter, the crystal
and the FPGA's PLL are outside the RTL.

## Host protocol

All traffic is bytes on the UART. While idle, the module waits for one of three
command bytes. Any other byte is dropped.

| byte | command | what follows |
|---|---|---|
| `A1` | time set | a fixed-length record, below |
| `A2` | write pattern | vectors as byte pairs, then a stop byte |
| `A3` | run test | nothing; the module answers with 9 bytes |

**Time-set record** (`A1`): 52 bytes, in this order. 16-bit values are sent
high byte first.

| bytes | content | goes to |
|---|---|---|
| 4 | channel setting, bits 2:0, channel 0 first. Bit 0: channel on. Bit 1: active load on. Bit 2: spare. | MAX19005 serial port |
| 4 | waveform format per channel, bits 2:0 | held in the main controller |
| 8 | period, T1, T2, strobe: four 16-bit counts of clock cycles | PE controller |
| 4 | load voltage per channel (8-bit code) | AD5308 channels 0-3 |
| 32 | sixteen 16-bit level codes, ordered channel by channel; within a channel: DHV, DLV, CHV, CLV | AD5676 chip 0-3, DAC channel 0-3 |

After the record, the module sends everything to the chips over their serial
ports (PREPARE state), then returns to idle. Wait about 150 us before sending
the next command.

**Vectors** (`A2`): each vector is a 16-bit word `{4'b0, ch3, ch2, ch1, ch0}`
of 3-bit symbols, sent high byte first. The vectors are stored at SDRAM word
addresses 0, 1, 2, and so on. A high byte with bit 7 set ends the list. The
count of vectors is kept for the next run.

| symbol | meaning |
|---|---|
| 0 / 1 | drive 0 / 1, shaped by the channel's waveform format |
| 2 (L) | receive; fail if the pin is above the low threshold (`cmpl` = 1) |
| 3 (H) | receive; fail if the pin is not above the high threshold (`cmph` = 0) |
| 4 (X) | receive, no compare |
| 5 (Z) | receive; fail unless the pin lies between the thresholds |

**Result** (`A3`): three 24-bit numbers, high byte first. They are the index of
the first failing vector, the index of the second failing vector, and the
number of failing vectors. `FFFFFF` means "none". A vector fails when any
channel that is switched on fails.

## One vector period

The PE controller counts clock cycles `t = 0 … period-1` in each vector
period. Take one channel in one vector:

* **Drive symbols** hold `max19005_rcv_x` low. `max19005_data_x` follows the
  format:
  * NRZ (0): the data bit for the whole period.
  * RZ (1): the data inside the window `T1 ≤ t < T2`, 0 outside it.
  * RO (2): the data inside the window, 1 outside it.
  * SBC (3): the data inside the window, its complement outside it.
* **Receive symbols** hold `rcv` high, which turns the driver off so the
  active load acts.
* At `t = strobe`, the controller samples `max19005_cmph_x` and `max19005_cmpl_x`
  into `data_1_x` and `data_2_x`. It computes `fail_x` and pulses
  `strobe_pulse`.

The pin outputs are registered, so they show the value for cycle `t` one clock
later. The strobe must satisfy `strobe < period`, or a run never ends.

**Periods, the vector buffer and stalls.** A new period starts only when a
vector is ready. `period_pulse` marks the cycle a vector is taken from the
16-word vector buffer. Meanwhile the main controller refills the buffer from
SDRAM, one word every 10 cycles: an 8-cycle read plus a 2-cycle handshake.
Refresh takes a further 7 cycles every 7.8 us.

The run starts once the buffer is full or holds every vector. If the period is
shorter than about 10 cycles, the buffer drains. The tester then **stalls** at
a period boundary until the next word arrives. The stalled vector keeps its
timing, but the gap between periods grows. For continuous timing, use a
period of at least 11 cycles (110 ns at 100 MHz).

The run ends when as many strobes as stored vectors have been seen. The main
controller then drops `start_test_sig` and sends the result.

## SDRAM controller

The SDRAM controller has two state machines. The initialization FSM starts when
the main controller raises `sys_delay`, after a 100 us wait from reset. It
issues PRECHARGE ALL, two AUTO REFRESH commands and LOAD MODE (CAS latency 2,
burst 1), then raises `sys_init_done`.

The command FSM gives an AUTO REFRESH request (`sys_ref_req`, acknowledged by
`sys_ref_ack`) priority over an access. An access is requested by holding
`sys_ads_en`, address and write data until `sys_cyc_end`. The address is
`{bank[1:0], row[12:0], column[8:0]}`. Each access is ACTIVE, then READ or
WRITE with auto-precharge, then recovery:

| access | cycles (ACTIVE to `sys_cyc_end` inclusive) | at 100 MHz | data |
|---|---|---|---|
| write | 9 | 90 ns | driven with the WRITE command |
| read | 8 | 80 ns | `sys_rdata` valid with `sys_data_valid` in cycle 6 |

These are the read and write times reported for the original hardware. The
timing parameters (tRCD = tRP = tMRD = 2, tRC = 7 cycles) are in the module
header.

`sdr_clk` is the inverted system clock. The data pins are split into
`sdr_dq_o`, `sdr_dq_oe` and `sdr_dq_i`. Put the tri-state buffer in the FPGA
pad ring.

## Serial links to the pin electronics and DACs

All three serial links use `spi_shift_tx`. The frame line is low for the whole
frame, SCLK idles high, and the slave samples data on the falling SCLK edge in
the middle of each bit.

| link | word | bit time | frame time (100 MHz) |
|---|---|---|---|
| MAX19005 | `{channel[1:0], setting[2:0], 11'b0}` | 25 cycles | 4.00 us per channel (measured on the original: 4.005 us) |
| AD5308 | `{0, channel[2:0], code[7:0], 4'b0}`; start-up sends `8000h` (GAIN/BUF) and `A000h` (LDAC continuous) | 32 cycles | 5.12 us per word (same as the original) |
| AD5676 ×4 | 96-bit packet: four 24-bit commands `{0011, channel, code}`, chip 3's first | 32 cycles | 30.72 us per packet (original: 30.60 us) |

The AD5676 chips pass data on only after their daisy-chain enable bit (DCEN) is
set. Start-up therefore sends the DCEN command in frames of 24, 48, 72 and 96
bits, enabling one more chip each time. The DAC codes go out unchanged. The voltage each code gives depends on the
board's references and buffers, which are outside the RTL. The board targets
these ranges:
* drive high: 0 to 5 V
* drive low: −1 to 4 V
* load: 0 to 5 V

`ad5676_ldac` is held low, so a written
channel updates at once. `max19005_swen`, `_force` and `_sense` are held at 1,
0 and 0.

## Sequencer states

`main_controller` has one state register:

* INIT: wait 100 us, start the SDRAM, AD5308 and AD5676 set-up, then wait until all three report done.
* IDLE
* TIMESET: forwards each byte as it arrives.
* PREPARE: waits for the three controllers to finish sending.
* PATTERN: one SDRAM write per byte pair.
* TEST
* REPORT

From the end of INIT, a refresh request is made every 780 cycles (7.8 us) in
every state. An assertion in the module checks that the vector buffer never
overflows.

## Clock and reset

Everything runs on one clock, `clk`, at 100 MHz by default (`CLK_HZ`). The
original board multiplies a 50 MHz crystal in the FPGA and uses several
internal clocks, reported variously as 20, 50, 100, 150 and 200 MHz. Here the
slower serial links get their rates from bit-time parameters instead. Reset
`rst` is synchronous and active high.

## Where this RTL departs from or adds to the source

Taken from the source:
* the block structure and port names of every controller
* 4 channels and 32 MB of vector memory
* 19200 baud 8N1, with FIFO buffers on both directions
* the init / time set / prepare / write pattern / run test sequence, with a 100 us start-up wait
* 8-bit host bytes packed into 16-bit vector words
* the vector buffer between the memory reader and the pin electronics
* first fail, second fail and fail count as the result
* the 16-bit AD5308 word and the 96-bit AD5676 daisy-chain packet
* 80/90 ns SDRAM read/write cycles and 5.12 us AD5308 words

Chosen here:
* all byte codes and the order of the time-set record
* the symbol and waveform-format codes, and the four-word time set (period, T1, T2, strobe)
* the MAX19005 serial word and the meaning of the setting bits. This serial word is a placeholder. Check it against the MAX19005 data sheet before using it with real hardware.
* the comparator sense (`cmph` = above the high threshold, `cmpl` = above the low threshold)
* FIFO and buffer depths
* SDRAM timing values
* the DAC control words, taken from the AD5308/AD5676 data sheets
* the chip-by-chip DCEN start-up
* the single 100 MHz clock

Differences in behaviour:
* **Refresh continues during pattern writing and test runs.** The source stops
  refreshing in those states. That would lose data in any test longer than
  the SDRAM's 64 ms retention.
* **The tester stalls when no vector is ready.** A period starts only with a
  vector available, as described above.
* **Serial frame times differ slightly.** The AD5676 packet takes 30.72 us
  instead of 30.60 us, and a MAX19005 word takes 4.00 us instead of 4.005 us.
  A whole number of 10 ns cycles per bit cannot give the published figures.
* **The bidirectional buses are split.** The internal SDRAM data bus and the
  `sdr_data` pin each become separate in and out signals.
* **The vector count is 24 bits.** At most 16,777,215 vectors can be stored,
  one word less than the 32 MB memory holds.
* **The UART has one fixed rate.** It runs at the configured baud rate only.
  The original's baud generator offers 32 preset rates, but their values and
  how one is selected were not published, so no rate table is built. Set
  `BAUD` or `UART_DIVISOR` to change the rate.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench | what it shows |
|---|---|
| `tb_ate_top` | The whole module at **default parameters**: a host at 19200 baud, an SDRAM model and a small DUT (channel 2 = in0 AND in1, channel 3 = NOT in0). It runs two time sets, 64 vectors and two runs, with stalls in the 6-cycle-period run and none at 40 cycles. It checks all serial words, SDRAM contents and the reported results, and counts every mechanism (about 16 M cycles, 10 s). |
| `tb_main_controller` | The sequencer with the real controllers and byte-level host queues, and random `sys_tx_full`. |
| `tb_sdram_controller` | Power-up order, random read/write in all banks, 8/9-cycle accesses, refresh priority, and five words held for 1 ms. The SDRAM model checks protocol. |
| `tb_pe_controller` | Setting words and their 400-cycle frames, every drive level in every cycle for all four formats, compare results for all symbols, and a forced stall. |
| `tb_ad5308_controller`, `tb_ad5676_controller` | Start-up frames, word contents, frame times, and the daisy-chain result. |
| `tb_ad5308_sawtooth`, `tb_ad5676_sawtooth` | Codes 0-255 on every channel, decoded by DAC models. |
| `tb_uart_chars` | Characters 0-255 five times at full 19200 baud, looped back (1280/1280, about 45 s). |
| `tb_uart_system`, `tb_uart_rx`, `tb_uart_tx`, `tb_uart_baud_gen`, `tb_sync_fifo` | UART pieces, including ±2 % baud error and framing errors. |

`tb/sdram_model.sv` is a behavioural SDR SDRAM used by three testbenches.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/ate_pkg.sv tb/tb_ate_top.sv --top-module tb_ate_top
./obj_dir/Vtb_ate_top
```

Not verified:
* timing on real SDRAM, DAC or MAX19005 parts
* the MAX19005 register format (see above)
* any clock-domain crossing, because there is none

## Changing the design

* **Clock rate:** set `CLK_HZ` on `ate_top`. The UART divisor and the start-up
  wait follow from it. Adjust `REF_INTERVAL`, the SDRAM `T_*` and `*_CYCLES`
  values, and the serial `BIT_CYCLES` to keep the chip timings.
* **Number of AD5676 chips or channels written:** set `NUM_DAC_IC` and
  `DAC_CH_USED`. The time-set record then has `2 × NUM_DAC_IC × DAC_CH_USED`
  level bytes.
* **Vector buffer depth:** set `VBUF_AW` in `main_controller`.
* **Channel count:** `NUM_CH` is set in `ate_pkg`. The vector word has room for
  five 3-bit channels. The MAX19005 serial word carries a 2-bit channel number.
