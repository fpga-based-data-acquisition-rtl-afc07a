# ADC0804 data acquisition over RS-232

An FPGA sits between an ADC0804 8-bit analog-to-digital converter and a PC.
It keeps the converter busy, one conversion after another, over the ADC's
parallel bus. It stores the results, and hands them to the PC over a serial
(RS-232) line when the PC asks for them. The PC program polls the FPGA. It
first asks how much data is waiting, then asks for the samples one at a time,
and it can start and stop the acquisition.

```
            WR, RD                                             txd
 ADC0804 <--------- adc0804_ctrl ---> sample_fifo ---> host_cmd_ctrl ---> uart_tx ---> RS-232 ---> PC
         ---------> (sequencer)        (1024 x 8)        (commands)  <--- uart_rx <--- transceiver <--
           INTR, DB[7:0]     |                                              rxd
                             +--> led[7:0] (last sample)
```

The design targets a Spartan-3E board with a 24 MHz clock. Everything is
synthesizable SystemVerilog with no vendor primitives. The sample store is
written as a plain memory array, so synthesis can map it to one block RAM.

## Talking to the ADC0804

The ADC0804 has a simple bus:

- a low pulse on **WR** starts a conversion;
- the chip pulls **INTR** low when the result is ready;
- a low level on **RD** puts the result on **DB[7:0]** and releases INTR.

`adc0804_ctrl` runs that bus in a loop: start, wait for INTR, read, start
again. Its states are `ADC_WR`, `ADC_WAIT_INTR`, `ADC_RD` and `ADC_RECOVER`,
plus `ADC_IDLE` while acquisition is stopped. Timing at 24 MHz:

| step | length | why |
|---|---|---|
| WR low | `WR_CYCLES` = 3 cycles, 125 ns | ADC0804 minimum WR pulse width is 100 ns |
| wait for INTR | one conversion, about 100 us with the ADC's RC clock | INTR goes through a 2-flop synchroniser |
| RD low | `RD_CYCLES` = 4 cycles, 167 ns | ADC0804 access time is at most 135 ns; DB is latched on the last RD cycle |
| bus idle | `GAP_CYCLES` = 3 cycles | RD settles, and the synchroniser sees INTR go high again |

A sample appears on `sample`, with a one-cycle `sample_valid`, 2 + `RD_CYCLES`
(or one more) clock cycles after INTR falls. An assertion checks that WR and
RD are never low together.

CS is not driven: the board is assumed to tie it low. The converter's own
clock (an RC network on CLK IN/CLK R) is outside the FPGA, so the FPGA clock
rate does not set the conversion time.

When `enable` falls, the conversion already in flight still finishes and is
read. Only then does the sequencer go idle. No sample is ever left half-read.

## Storing samples

`sample_fifo` is a circular buffer of `DEPTH` = 1024 bytes. It has one write
port and one registered read port: the popped word is on `rd_data` the cycle
after `rd_en`. It also has an occupancy `count`. If a sample arrives while the
FIFO is full, that sample is dropped and `overflow` pulses. The oldest 1024
samples are kept.

The depth matters because the two sides run at very different rates. The
ADC0804 delivers about 10,000 samples per second. At 9600 baud, one request
plus its one-byte reply takes 20 bit times, 2.08 ms. So polling byte by byte
drains about 480 samples per second. With acquisition running, the FIFO fills
in about a tenth of a second. It captures a burst of 1024 consecutive samples,
which the PC then reads at leisure. Stop the acquisition ('H') to freeze the
burst. Alternatively, raise `BAUD`, or slow the ADC clock, to bring the two
rates closer together.

## The command protocol

The link uses 8N1 framing (one start bit, 8 data bits LSB first, one stop
bit), at `BAUD` = 9600 by default. Every command is one byte from the PC.
Every reply is one byte back.

| PC sends | FPGA replies | effect |
|---|---|---|
| `'S'` 0x53 | number of stored samples, capped at 255 | none |
| `'R'` 0x52 | oldest stored sample | removes it from the FIFO |
| `'R'` 0x52 with the FIFO empty | latest sample read from the ADC | none |
| `'G'` 0x47 | `'G'` | acquisition on |
| `'H'` 0x48 | `'H'` | acquisition off, after the conversion in flight |
| anything else | nothing | `bad_cmd` pulses |

Acquisition is **on** after reset. The byte codes are ASCII letters, so the
link can be driven from a serial terminal.

The command decoder, `host_cmd_ctrl`, answers one command at a time. A
command that arrives while a reply is still waiting for the transmitter goes
into a one-byte holding register. A further command is then dropped, and
`cmd_drop` pulses. A PC that waits for each reply never sees this. The reply
is offered to the transmitter 2 cycles after the command byte is received,
or 4 cycles for `'R'`, which needs the FIFO read.

`uart_rx` synchronises `rxd` with two flops and re-checks the start bit half
a bit later, so that glitches are rejected. It then samples each bit once, in
the middle. A frame whose stop bit is low is discarded, and `rx_frame_err`
pulses. `uart_tx` has a valid/ready input: `in_ready` is high only while the
line is idle. Both divide the clock by `round(CLK_HZ / BAUD)`, which is 2500
at the defaults, an exact 9600 baud.

## Top-level ports (`daq_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | 24 MHz clock; asynchronous active-low reset |
| `adc_wr_n`, `adc_rd_n` | out | 1 | ADC0804 WR and RD |
| `adc_intr_n` | in | 1 | ADC0804 INTR (asynchronous) |
| `adc_db` | in | 8 | ADC0804 DB[7:0] |
| `txd`, `rxd` | out/in | 1 | logic-level serial lines, to the RS-232 transceiver |
| `led` | out | 8 | last sample read |
| `acq_enable` | out | 1 | acquisition running |
| `conversions` | out | 16 | completed conversions, wrapping |
| `fifo_full`, `fifo_overflow` | out | 1 | FIFO full; pulse per dropped sample |
| `rx_frame_err`, `cmd_drop`, `bad_cmd` | out | 1 | one-cycle error pulses |

Parameters: `CLK_HZ` (24000000), `BAUD` (9600), `FIFO_DEPTH` (1024),
`WR_CYCLES` (3), `RD_CYCLES` (4), `GAP_CYCLES` (3). The clock rate is the
board's. The other values are choices of this design: change them freely.
The shared types, the sequencer and UART state encodings, and the command
codes are in `daq_pkg`.

## What is not in the RTL

- **The ADC0804 and the RS-232 level shifter.** These are external parts.
  `tb/adc0804_model.sv` models the converter's bus for simulation: WR, INTR,
  RD, DB, a configurable conversion time and a 135 ns access time. It counts
  bus timing violations. While RD is high it drives the inverted result on
  DB, so a read outside the RD window is caught.
- **The PC program.** It plots the samples and computes statistics (mean,
  standard deviation, minimum and maximum). This is software. The
  end-to-end testbench plays its polling layer.
- **Multi-channel capture.** There is one ADC0804 and therefore one channel.
  More channels would need more bus sequencers and a channel field in the
  protocol.
- **Debug signals of the original board design.** These include a buzzer
  output and a 25-bit counter. Their purpose is undocumented, so they are
  not reproduced.
- **Timing constraints and pin assignments.** These are left to the user.

## Simulation

Each block has a self-checking testbench in `tb/`. Each one ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5, the package is named
first and every other module is found by name in `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb --top-module tb_daq_top \
    rtl/daq_pkg.sv tb/tb_daq_top.sv -o sim
./obj_dir/sim
```

Swap in `tb_adc0804_ctrl`, `tb_sample_fifo`, `tb_uart_rx`, `tb_uart_tx` or
`tb_host_cmd_ctrl` for the unit tests. The unit tests shorten things where
that saves time: 115200 baud, and a 2 us ADC conversion.

`tb_daq_top` runs the whole system at its default parameters, 24 MHz and
9600 baud, with a 100 us ADC. It simulates about 0.25 s of operation in a few
seconds of wall time. The run goes through these steps:

1. Stop acquisition right after reset, and query the count.
2. Read every stored sample, and compare each one against the codes the ADC
   model converted, in order. The first code is 11111010.
3. Read with the FIFO empty, and check the LEDs.
4. Restart, and run until the FIFO overflows.
5. Query the count, which is now capped at 255.
6. Stop, and check that the oldest samples come out first.
7. Send an unknown command, then a frame with a bad stop bit.
8. Send 80 commands back to back from a PC whose clock is 3 % fast, until
   one is dropped; then confirm that the link still works.

At the end, the testbench prints how often each of these mechanisms
occurred. Any mechanism that never occurred counts as a failure.

All testbenches assume a two-state simulator and initialise or reset
everything they read.
