# Real time clock and thermal monitor for a Cortex-M0 microcontroller

Two APB peripherals that turn a stock Cortex-M0 system into a microcontroller that
keeps calendar time and watches its own temperature:

* **RTC**: a real time clock with 1 ms resolution. It keeps hours, minutes, seconds,
  date, month and year, handles month lengths and a leap year every fourth year, and
  raises an interrupt at a programmed alarm time.
* **TDSP** (temperature digital signal processing): a thermal monitor. It samples the
  code of an on-chip temperature sensor's ADC, compares it with a threshold set by
  software, and flags an over-temperature interrupt.

Around them sits the address decoding of the system memory map (AHB and APB). The
processor, memories, AHB-to-APB bridge, GPIO, timers, UARTs and system watchdog are
standard parts of the surrounding system and are not included; they connect through
the ports of the top module, `rtc_tdsp_soc`.

## System and memory map

```
 Cortex-M0 ──AHB──┬── ROM      0x0000_0000 - 0x0000_FFFF
                  ├── RAM      0x2000_0000 - 0x2000_FFFF
                  ├── GPIO0    0x4001_0000 - 0x4001_0FFF
                  ├── GPIO1    0x4001_1000 - 0x4001_1FFF
                  └── Bridge   0x4000_0000 - 0x4000_FFFF ──APB──┬── Timer0     0x4000_0xxx
                                                                ├── Timer1     0x4000_1xxx
                                                                ├── Dualtimer  0x4000_2xxx
                                                                ├── UART0..2   0x4000_4xxx..6xxx
                                                                ├── RTC        0x4000_7xxx
                                                                ├── Watchdog   0x4000_8xxx
                                                                └── TDSP       0x4000_9xxx
```

`ahb_decoder` turns `HADDR` into one-hot `hsel_s` (index order ROM, RAM, APB bridge,
GPIO0, GPIO1, see `soc_pkg`). The select is registered while `HREADY` is high so that the
data-phase response (`HRDATA`, `HREADY_OUT`, `HRESP`) comes from the slave addressed in
the previous address phase. An active transfer to an address outside every range gets
the standard two-cycle AHB ERROR response from a built-in default slave.

`apb_decoder` takes the bridge's single APB port and selects a slave by
`PADDR[15:12]`. Slot 0x3 and slots 0xA-0xF are unused: they read zero and complete
at once. In `rtc_tdsp_soc` the seven standard APB peripherals appear as `ext_psel`,
`ext_prdata`, `ext_pready`, array index 0..6 = Timer0, Timer1, Dualtimer, UART0,
UART1, UART2, Watchdog.

## RTC

### Two clocks and the millisecond tick

The RTC has two clocks: the bus clock (`PCLK_APB` on `rtc_apb`, fed from the system `PCLK`)
and a reference clock `PCLK_RTC`. This is
the part that needs the most care. All registers, including the time itself, live in
the `PCLK` domain, so software reads and writes never cross clocks. Only one signal
crosses: the millisecond tick.

`rtc_freq_divider` counts `DIV` reference cycles and then flips a toggle flag. The flag
passes through a two-flop synchroniser into `PCLK`, and each change of it becomes a
one-cycle `ms_tick`. A toggle crosses safely at any clock ratio, provided `PCLK` is
faster than twice the millisecond rate, which any practical bus clock is. When
software writes the time, a `clear` toggle goes the other way and restarts the
division, so the first second after setting the time is a full second (to within
a few reference cycles).

The reference frequency is a parameter. The default `DIV = 1000` assumes a 1 MHz
`PCLK_RTC`. For a 32.768 kHz crystal, no integer divider gives exact milliseconds;
choose `DIV` and `MS_PER_SEC` together (for example `DIV = 32`, `MS_PER_SEC = 1024`
counts 1024 ticks of 0.977 ms per second, exact seconds).

### Time/date word

Time register (`TIME`, offset 0x000) and alarm register (`ALARM`, 0x004) share one packing
(`rtc_time_t` in `soc_pkg`):

| bits  | 31:30 | 29:25 | 24:19   | 18:13   | 12:8 | 7:4   | 3:0  |
|-------|-------|-------|---------|---------|------|-------|------|
| field | -     | hours | minutes | seconds | date | month | year |

Bits 31:30 of `TIME` are not stored: writing `0x5096_9670` sets 08:18:52, date 22,
month 7, year 0, and reads back as `0x1096_9670`.

### Calendar

`rtc_calendar` counts milliseconds 0 .. `MS_PER_SEC`-1. On the wrap it advances the
time by one second, cascading: second 59 → minute, minute 59 → hour, hour 23 → date,
the month's last date → date 1 of the next month, month 12 → month 1 of the next year.
February has 29 days when `year % 4 == 0`, else 28. April, June, September and November
have 30 days. The year is a 4-bit count that wraps from 15 to 0; software keeps the
offset to the calendar year. Year 0 is a leap year, so the offset should be a multiple
of four.

Every field resets to zero. Date 0 and month 0 are not valid calendar values but are
simply counted on from (month 0 counts 31 days and then becomes month 1), so an RTC that
is never set still runs. Writing `TIME` replaces the whole word and restarts the
millisecond at 0; a write wins over a tick in the same cycle.

### Alarm

`rtc_alarm` compares all thirty time/date bits with the alarm register. On the first
cycle of equality, and only if the alarm is enabled (`ALARM` bit 30), it sets the
alarm flag, which drives `IRQ_RTC` and reads as `STATUS` bit 0. Because it triggers on the
start of the match, clearing the flag during the matching second does not set it again.

### RTC registers (offsets in the 4 KB window)

| offset | name   | access | contents |
|--------|--------|--------|----------|
| 0x000  | TIME   | RW     | time/date word above; a write restarts the millisecond |
| 0x004  | ALARM  | RW     | time/date word; bit 30 = alarm enable |
| 0x008  | STATUS | R/W1C  | bit 0 = alarm flag (= `IRQ_RTC`); write 1 to clear |
| 0x00C  | MSEC   | RO     | bits 9:0 = milliseconds into the current second |

All other offsets read 0 and ignore writes.

## TDSP thermal monitor

The ADC code (`INPUTADC`, 2 bits by default) passes through four stages:

1. **Interface register**: a two-flop synchroniser into `PCLK`. The ADC is asynchronous
   to the bus.
2. **Programmable watchdog unit** (`tdsp_watchdog`): the threshold register and a
   registered comparator. A sample is over-temperature when it is *strictly greater*
   than the threshold. The threshold resets to all ones, so nothing is flagged before
   software programs it.
3. **Interrupt generator** (`tdsp_irq_gen`): a sticky flag, set while any sample is over
   the threshold. A clear while the chip is still hot is overridden at once. `IRQ_TDSP`
   is the flag gated by the line enable.
4. **Function controller**: APB decode, control register, `PREADY`.

From an ADC change to the flag takes four `PCLK` cycles.

| offset | name   | access | contents |
|--------|--------|--------|----------|
| 0x000  | CTRL   | RW     | bit 0 monitor enable, bit 1 `IRQ_TDSP` enable (reset 0) |
| 0x004  | THRESH | RW     | threshold, `ADC_W` bits (reset all ones) |
| 0x008  | STATUS | R/W1C  | bit 1 = over-temperature flag; reads `2'b10` when raised; write 1 to bit 1 to clear |
| 0x00C  | ADC    | RO     | the synchronised ADC code |

With threshold 2 and the monitor enabled, ADC code `2'b11` makes `STATUS` read `2'b10`.

## Bus timing (both peripherals)

Zero wait states: `PREADY = PSEL & PENABLE`. `PRDATA` is a register that loads the value
addressed by `PADDR` on every clock, so during the access phase it holds the value
selected in the setup phase. It also follows `PADDR` when the slave is not selected;
`apb_decoder` only forwards it when selected. Writes take effect at the clock edge that
ends the access phase. Each peripheral carries an assertion that its access phase follows
its setup phase. `PENABLE` is shared by all slaves, so it may be high while a slave is not
selected.

## How far to trust it, and where it departs from the original

Taken from the original design: the peripheral set and memory map; the RTC's internal
structure (divider, binary counter, time/date register, alarm register and comparator,
function controller, registered read data built by concatenating fields), its two
clocks, field widths, reset to zero, leap year rule and 1 ms resolution; the
time-word packing and the `0x5096_9670` → `0x1096_9670` example; the TDSP's four blocks,
2-bit ADC, "interrupt when ADC is higher than the threshold", and status `2'b10` on an
over-temperature event.

This design's own choices: every register offset except `TIME` at 0; the alarm
enable bit; write-one-to-clear status; all enables; the TDSP's separate `IRQ_TDSP` line
(the original reports the interrupt through the status register only); the
clock-domain crossing; the reset threshold; the unused-slot and AHB default-slave
behaviour; the default reference clock (1 MHz).

Known differences from the original description:

* The original sets "21 June 2017" and notes that the register shows date 22, month 7
  because its software adds one to each field. This RTC stores exactly what is written.
  The year is a 4-bit count, not a calendar year.
* The original TDSP waveform also shows other status and write values whose meaning is
  not described. They are not reproduced: `STATUS` bit 0 is always 0.
* The original mentions, in passing, that a thermal monitor can cut off the power supply.
  Its block diagrams show no such output, and none is built: software acts on the
  interrupt.
* The original calls the TDSP comparator a "programmable watchdog unit" without saying
  what else it does. Here it is a programmable threshold and a comparator, nothing more.

## Files

`rtl/`: `soc_pkg` (map, offsets, `rtc_time_t`, month-length function), `rtc_freq_divider`,
`rtc_calendar`, `rtc_alarm`, `rtc_apb`, `tdsp_watchdog`, `tdsp_irq_gen`, `tdsp_apb`,
`apb_decoder`, `ahb_decoder`, `rtc_tdsp_soc` (top).

`tb/`: one self-checking testbench per module (`tb_<module>`, `tb_rtc_apb`, `tb_tdsp_apb`),
the APB master model `apb_bfm`, the end-to-end `tb_rtc_tdsp_soc` and the full-size
`tb_rtc_tdsp_soc_full`. Each prints `TB_RESULT checks=N failures=M`.

* `tb_rtc_tdsp_soc` runs the top with `RTC_DIV = 4`, `RTC_MS_PER_SEC = 5` (a second is
  600 ns) and makes every mechanism happen at least once, counting each: AHB selection and
  default-slave error; each APB peripheral; an APB wait state; the unused slot; setting
  the time; second, minute, hour, day, month and year roll-over; the leap day; the RTC
  alarm and its clear; the TDSP interrupt and its clear.
* `tb_rtc_tdsp_soc_full` uses the default parameters with a 1 MHz `PCLK_RTC` and a 4 MHz
  `PCLK`. It sets 08:18:52, arms the alarm for 08:18:53, and checks that the interrupt
  arrives one simulated second later. It takes a few seconds of wall time.

All testbenches pass.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wall -Wno-fatal --top-module tb_rtc_tdsp_soc \
    -y rtl -y tb +libext+.sv -Irtl rtl/soc_pkg.sv tb/tb_rtc_tdsp_soc.sv
./obj_dir/Vtb_rtc_tdsp_soc
```

Replace the top module and file name for any other testbench. `soc_pkg.sv` must be
read first; the other files are found by module name. Lint a module alone with
`verilator --lint-only -Wall -y rtl rtl/soc_pkg.sv rtl/<module>.sv`.

Parameters: `RTC_DIV`/`DIV` (reference cycles per millisecond), `RTC_MS_PER_SEC`/
`MS_PER_SEC` (counts per second, at most 1024), `ADC_W` (ADC code width).
