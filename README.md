# 4 x 4 register file with push-button loading and LED / LCD readout

A register file is the small, fast storage at the centre of a processor. It
is usually written once per clock and read through two ports at once, so that
an instruction can fetch both of its operands together. This design is the
smallest useful example: four registers of four bits, one write port and two
independent read ports (port A and port B).

It is also packaged the way it would be put on an FPGA teaching board, with
push-buttons instead of a processor driving it:

* one button writes: each press stores the next of four prepared data words
  into the next register (00, 01, 10, 11, then around again);
* two more buttons step the read register numbers of port A and port B;
* each port drives a 7-segment LED digit, and a character LCD shows either
  port as one hexadecimal character.

Everything is synthesizable SystemVerilog on a single clock. The register
file itself is plain logic that any user can wire to a processor. The board
wrapper shows how the register file is loaded and observed by hand.

## Block diagram

```
                 data_in[0..3]
                      |
 btn_write -> debounce -> scounter --wr_num--> multiplexor4 --wr_data--+
                  |                                                    |
                  +--------------- press (we) -------------------------+
                                                                       v
                                          +---------------------------------+
 btn_read_a -> debounce -> scounter ----> | registerfile                    |
                                rd_num1   |  decoder -> AND -> 16 x dff      | --port_a--> connector --> seg_a
 btn_read_b -> debounce -> scounter ----> |  2 x multiplexor4 (read ports)  | --port_b--> connector --> seg_b
                                rd_num2   +---------------------------------+
                                                port_a, port_b --> multiplexor2 (lcd_sel) --> lcd_connector
                                                                          <-> lcd_e, lcd_rw, lcd_rs, lcd_data[7:0]
```

| Module | File | Role |
|---|---|---|
| `regfile_lab_top` | `rtl/regfile_lab_top.sv` | board-level top |
| `registerfile` | `rtl/registerfile.sv` | 4 x DATA_W register file, 1 write + 2 read ports |
| `decoder` | `rtl/decoder.sv` | 2:4 one-hot decoder of the write register number |
| `dff` | `rtl/dff.sv` | one storage bit, rising edge, with clock enable |
| `multiplexor4` | `rtl/multiplexor4.sv` | 4:1 word multiplexor (read ports, write data) |
| `multiplexor2` | `rtl/multiplexor2.sv` | 2:1 word multiplexor (LCD port select) |
| `debounce` | `rtl/debounce.sv` | push-button filter, clean level + press pulse |
| `scounter` | `rtl/scounter.sv` | modulo-4 press counter (the address bus) |
| `button_counter` | `rtl/button_counter.sv` | debounce followed by scounter |
| `input_prep` | `rtl/input_prep.sv` | write side: button chain + data multiplexor |
| `connector` | `rtl/connector.sv` | binary to 7-segment code |
| `lcd_connector` | `rtl/lcd_connector.sv` | character-LCD controller |
| `regfile_pkg` | `rtl/regfile_pkg.sv` | widths and types (`data_t`, `addr_t`, `seg7_t`) |

## The register file

`registerfile` is built the classic gate-level way, and the hierarchy shows
it:

* **Write.** The 2-bit write register number goes through a 2:4 decoder. Each
  decoder line is ANDed with the write strobe `we`. The result enables the
  four `dff` cells of one register. All sixteen cells see the same data word
  `din`, but only the enabled register takes it, on the rising edge of `clk`.
* **Read.** Every register output goes to both 4:1 multiplexors. `rd_num1`
  steers one onto `dout_a` and `rd_num2` the other onto `dout_b`. Both read
  ports are combinational, so a new read number shows at once, with no clock.
  A write shows on a port just after its clock edge. In a cycle that reads and
  writes the same register, the port shows the old value until the edge.

In the textbook version of this circuit, the AND of the write clock and the
decoder line is itself the clock of the register's flip-flops. Here the same
AND gate drives a clock enable, and all cells share one clock. The circuit
writes the same register on the same edge, but it has no gated clock. It
cannot glitch when the register number changes while the write clock is
high, and it maps directly onto FPGA flip-flops with enables. To get the
textbook behaviour (one write per rising edge of a write clock), tie `we`
to 1 and use the write clock as `clk`.

The registers have no reset, like the textbook circuit. They read as unknown
until they are written. (A two-state simulator shows random values there.)
`DATA_W` sets the register width. The number of registers is fixed at four,
because the 4:1 read multiplexors fix it.

## Pressing buttons: what happens when

The board wrapper runs on one system clock (`CLK_HZ`, 48 MHz by default).
A button never clocks anything directly.

**Debounce.** A contact bounces for a millisecond or so when it closes and
when it opens. `debounce` first passes the contact through two flip-flops.
It then accepts a new level only after the level has been stable for
`DEBOUNCE_US` (10 ms by default), and any bounce restarts the count.
Its outputs are:

* `btn_clean`, the filtered level;
* `press`, a one-clock pulse for each accepted closing.

A press is recognised `2 + CLK_HZ * DEBOUNCE_US / 1e6` clocks after the
contact settles. The release makes no pulse.

**Counting presses.** `scounter` adds one to a 2-bit count on each `press`
pulse. The count is the register number for that button. Reset clears it
to 00, and it wraps from 11 to 00.

**Writing.** In `input_prep` the `press` pulse of the write button is the
register file's write strobe. Its count is the write register number, and
the same count steers a 4:1 multiplexor over `data_in[0..3]`. While the
pulse is high, the count still holds its value from before the press. At the
clock edge that ends the pulse, the register file stores the word and the
count advances together. So:

| press | register written | word |
|---|---|---|
| 1 | 00 | `data_in[0]` |
| 2 | 01 | `data_in[1]` |
| 3 | 10 | `data_in[2]` |
| 4 | 11 | `data_in[3]` |
| 5 | 00 | `data_in[0]` (whatever it is by then) |

The `wr_num` output shows the register that the next press will write.

**Reading.** Each read button has its own debouncer and counter, which drive
`rd_num1` (port A) and `rd_num2` (port B). Both counters start at 00, so
after reset each port shows register 00. The first press on a read button
shows register 01, then 10, 11, and 00 again. The two ports are fully
independent.

## Displays

**7-segment.** `connector` maps a 4-bit value to
`{a,b,c,d,e,f,g}` (bit 6 is segment a). The code is active low: 0 lights a
segment.

| value | code | value | code | value | code | value | code |
|---|---|---|---|---|---|---|---|
| 0 | 0000001 | 4 | 1001100 | 8 | 0000000 | C | 0110001 |
| 1 | 1001111 | 5 | 0100100 | 9 | 0001100 | d | 1000010 |
| 2 | 0010010 | 6 | 0100000 | A | 0001000 | E | 0110000 |
| 3 | 0000110 | 7 | 0001111 | b | 1100000 | F | 0111000 |

On the display, B and D come out lower case (b, d), and 9 is drawn without
its bottom segment.

**LCD.** There is only one LCD, so `multiplexor2` picks the port to show:
port A when `lcd_sel` is 0, port B when it is 1. `lcd_connector` drives an
HD44780-style character module over its 8-bit bus.

1. After reset it waits `T_POWERUP_US` (20 ms). The display cannot report
   busy yet.
2. It sends function set `0x38` (8-bit bus, two lines, 5x8 font), display on
   `0x0C`, clear `0x01` and entry mode `0x06`.
3. It sends set address `0x80`, then the ASCII character of the value
   (`'0'`..`'9'`, `'A'`..`'F'`) with RS = 1.
4. It goes idle and raises `ready`. Whenever the value differs from the
   character on the display, it repeats step 3. A value that changes while
   a write is in progress is caught when the write finishes.

Each byte is one bus write cycle. The controller sets RS, R/W = 0 and the
data, raises E, lowers E, then holds RS and the data.

After each byte, the controller waits for the display to finish by polling
its busy flag. It makes read cycles (RS = 0, R/W = 1, data bus released)
one E cycle apart, and samples DB7 on the clock edge that lowers E. It moves
on at the first read that finds the display not busy. The usual execution
time (`T_EXEC_US`, or `T_CLEAR_US` after the clear) caps the wait. If the
display still reports busy by then, or its bus cannot be read, the controller
moves on anyway. With `BUSY_POLL = 0` (`LCD_BUSY_POLL` on the top), there are
no reads: R/W stays 0 and each wait runs its full length.

The data pins are split into `lcd_data` (out), `lcd_data_oe` and
`lcd_data_in`. The FPGA pad joins them into a tri-state bus.

All bus timings are minimums from the display's data sheet, except tDDR,
which is the latest time read data can become valid. They are converted to
clocks, rounding up:

| quantity | limit | parameter | clocks at 48 MHz |
|---|---|---|---|
| address set-up, RS and R/W before E rises (tAS) | 40 ns | `T_AS_NS` | 2 |
| E high pulse width (PWEH) | 230 ns | `T_PWEH_NS` | 12 |
| read data valid after E rises (tDDR), sampled when E falls | 160 ns max | `T_DDR_NS` | E is held at least 8 |
| data set-up before E falls (tDSW) | 80 ns | met by the two above | 14 |
| address and data hold after E falls (tAH, tH) | 10 ns | `T_H_NS` | 1 |
| E cycle time (tcycE) | 500 ns | `T_CYCE_NS` | at least 24 |
| cap on the wait after an instruction | 50 us | `T_EXEC_US` | 2400 |
| cap on the wait after clear | 2 ms | `T_CLEAR_US` | 96000 |

The instruction codes and the three waits are the usual values for this
family of displays. Lengthen them for a slow module.

## Top-level interface (`regfile_lab_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | system clock; asynchronous reset, active low (clears the counters and the LCD controller, not the registers) |
| `btn_write`, `btn_read_a`, `btn_read_b` | in | 1 | raw push-button contacts, 1 = pressed |
| `data_in` | in | 4 x 4 | words stored by write presses 1..4 |
| `lcd_sel` | in | 1 | 0: LCD shows port A, 1: port B |
| `port_a`, `port_b` | out | 4 | the two read ports |
| `rd_num_a`, `rd_num_b`, `wr_num` | out | 2 | current read register numbers; register the next write press loads |
| `seg_a`, `seg_b` | out | 7 | 7-segment codes of the ports, active low |
| `lcd_e`, `lcd_rw`, `lcd_rs`, `lcd_data` | out | 1,1,1,8 | LCD control lines and the data the design drives |
| `lcd_data_oe` | out | 1 | 1: drive the LCD data pins, 0: release them for a read |
| `lcd_data_in` | in | 8 | LCD data pins as read (DB7 is the busy flag) |
| `lcd_ready` | out | 1 | LCD idle with the selected port shown |

Parameters: `CLK_HZ` (48 000 000), `DEBOUNCE_US` (10 000), `T_EXEC_US` (50),
`T_CLEAR_US` (2 000), `T_POWERUP_US` (20 000), `LCD_BUSY_POLL` (1). Change `CLK_HZ` to match the
board oscillator. All cycle counts follow from it.

The design is small: about 160 flip-flops. Sixteen of them are the register
file. Most of the rest are the three debounce timers and the LCD wait timer.

## Where this departs from the classic lab circuit

* **Write clock.** The write clock becomes a clock enable on a common clock,
  and the button signals become one-clock pulses rather than clocks (see
  above).
* **Data per press.** Press *k* stores `data_in[k-1]` into register *k-1*,
  using the count from before the press. A circuit that used the count after
  the press would store each word one register further on.
* **Segment codes.** The code for C is 0110001 (segments a, d, e, f). The
  segment table of the original exercise lists C with the same code as E.
* **Your own choices, not specified by the lab.** The debounce method and its
  10 ms window, the 48 MHz clock, the reset of the counters, the LCD
  instruction set, busy-flag polling, what the LCD shows, and all LCD waits
  except the bus timing.
* **Not built.** The push-buttons, LED digits and LCD module themselves. They
  are outside the FPGA, and their signals are ports.

## Simulation

Every testbench in `tb/` checks its own results. Each one prints
`TB_RESULT checks=N failures=M` and stops, and each has a watchdog.

| testbench | what it shows |
|---|---|
| `tb_registerfile` | writes 1010, 0011, 1100, 1111 into registers 11, 10, 01, 00 and reads them back on both ports, then 2000 random cycles against a reference model, checked before and after each edge |
| `tb_decoder`, `tb_dff`, `tb_multiplexor4`, `tb_multiplexor2`, `tb_scounter` | exhaustive or random checks of the small parts |
| `tb_connector` | all 16 codes, built from the lit segments of each character |
| `tb_debounce` | bounce bursts are rejected; a settled press gives one pulse exactly 2 + filter clocks after the contact settles; releases give none |
| `tb_input_prep` | six bouncing presses: register numbers 00, 01, 10, 11, 00, 01 with the matching data words, one strobe per press |
| `tb_lcd_connector` | acts as the display. It stays busy after each write and answers busy-flag reads, with garbage on the bus outside the valid-data window. It checks every bus cycle against the timing table, the bus direction, the power-up wait, that nothing is written while the display is busy, and the exact byte stream. This includes a value that changes mid-write and a display stuck busy, where the controller must fall back on the execution time. |
| `tb_regfile_lab_top` | end to end at the default parameters (48 MHz, 10 ms debounce, real LCD waits; about 0.46 s of simulated time, a few seconds to run). Four writes of 0001..0100, four reads on each port checked on the ports, segments and LCD, LCD port switching, and a second round of writes. The bench's display answers busy-flag reads. The bench counts rejected bounces, writes, counter wraps, reads, LCD initialisation, updates, port switches, and busy and not-busy flag reads, and fails if any of them never happened. |

To run one with Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/regfile_pkg.sv tb/tb_registerfile.sv --top-module tb_registerfile
./obj_dir/Vtb_registerfile
```

Replace `tb_registerfile` with any other bench. The package has to come
first on the command line, and the other modules are found through `-y`. The
benches use only two-state values and `$urandom`, so they run the same on
any simulator.

To use the register file alone, instantiate `registerfile` (with
`regfile_pkg.sv`, `decoder.sv`, `dff.sv`, `multiplexor4.sv`). Drive `we` for
one clock per write, and take the read ports combinationally.
