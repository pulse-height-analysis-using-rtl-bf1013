# Pulse height analyser interfaces for a PDP-15

This is the SystemVerilog model of one pulse height analysis station built
around a PDP-15 minicomputer. The station has:

- a 12-bit analogue-to-digital converter (A.D.C.) that measures the height of
  each detector pulse;
- an oscilloscope (C.R.O.) that shows the growing spectrum.

Two interfaces connect them to the computer. Each is given one or two status
words by the program and then runs on its own through the processor's data
channel, its direct memory access path:

- **A.D.C. interface.** Each converted pulse adds one to the memory word of
  its channel. The program takes no part, so the conversion rate is limited
  only by the converter and not by the program.
- **Display interface.** It reads channel contents from memory and draws them
  point by point: a histogram, vertical marker lines, or single points placed
  by the program. The picture does not depend on the program or on the
  counting rate.

The top module is `pha_system` (rtl/pha_system.sv). It has the PDP-15 I/O bus
on one side and the converter and the oscilloscope deflection and
intensification lines on the other.

## Bit numbering

The PDP-15 word is 18 bits, numbered 0 (most significant) to 17 (least
significant). All field descriptions below use that numbering. In the RTL the
vectors are `[17:0]`, so PDP bit *n* is vector bit 17−*n*. Memory addresses are
13 bits (PDP bits 5..17), which covers the computer's 8192-word memory.

## Programmed I/O (IOT instructions)

The program talks to the interfaces with IOT instructions. The middle three
octal digits of an IOT number select the device, and the last digit gives the
pulses it issues: IOP1 (1), IOP2 (2) and IOP4 (4).

| IOT  | device code | action |
|------|-------------|--------|
| 2001 | 200 | skip if the A.D.C. overflow flag is set |
| 2002 | 200 | clear the A.D.C. overflow flag |
| 2004 | 200 | load the A.D.C. status word (also resets the converter) |
| 2101 | 210 | skip if the display flag is set |
| 2102 / 2104 / 2106 | 210 | clear / OR-load / clear-then-load display status word 1 |
| 2121 | 212 | enable the display flag's interrupt |
| 2122 / 2124 / 2126 | 212 | clear / OR-load / clear-then-load display status word 2 |

`iot_device_selector` decodes these. The top receives the device field as
`dev_sel` and the three pulses as one-cycle strobes `iop1`, `iop2` and `iop4`.
The accumulator is on `iob`.

## A.D.C. interface: status word and address forming

| PDP bits | meaning |
|----------|---------|
| 0 | 1 = A.D.C. enabled (events are stored), 0 = disabled |
| 1 | 1 = a channel overflow raises a program interrupt |
| 5..11 | base address of the data region (address bits 5..11) |
| 12..17 | range mask |

The region size is set by the mask, whose ones fill from bit 12 rightwards:

| mask (bits 12..17) | channels | base bits that must be zero |
|--------------------|----------|-----------------------------|
| 000000 | 4096 | 6..11 |
| 100000 | 2048 | 7..11 |
| 110000 | 1024 | 8..11 |
| 111000 | 512 | 9..11 |
| 111100 | 256 | 10..11 |
| 111110 | 128 | 11 |
| 111111 | 64 | none |

Mask bit 12 pairs with the converter's most significant data bit, and mask
bit 17 with its sixth bit. `adc_address_gen` forms the memory address in two
parts:

- The upper six channel bits are ANDed with the complement of the mask and
  ORed with the base.
- The lower six channel bits pass straight through.

The base bits under a region's channel field are zero, so the OR gives
*base + channel*. The region may sit anywhere in memory on a multiple of its
own size. Any channel bit that meets a mask one means the pulse lies outside
the region.

### Event handling (`adc_interface`)

1. The converter raises READY with the channel number on `adc_data`.
2. If it also reports ALT (a conversion error), or the channel is out of range,
   the interface sends a one-cycle ABORT. It then resets the converter with the
   1 µs CLR ADC pulse, and no memory cycle is made.
3. Otherwise the event's address is latched and the ADC flag is set. If
   status bit 0 is set, a data channel request follows two clock cycles after
   READY.
4. The granted cycle is an *increment* cycle (`inc_mb` high): the processor
   adds one to the addressed word itself.
5. At the end of the cycle the interface clears its request and fires CLR ADC,
   and the converter is free for the next pulse.
6. If the increment wraps the word (it already held 262 143), the processor
   reports `io_oflo` and the overflow flag is set. IOT 2001 skips on this flag
   and IOT 2002 clears it. When status bit 1 is set, the flag also drives
   `int_rq`. A program can use this to stop counting when a channel is full.

Loading the status word resets the converter. A pulse that arrives while the
interface is disabled is held and not stored, and the next status load throws
it away. ADC INHIBIT is set while the converter reports BUSY and cleared by
CLR ADC.

The interface adds a short dead time per stored pulse: about 2.5 µs with a
10 MHz clock and a 1 µs memory cycle. The converter itself takes up to 82 µs
for a full 4096-channel conversion.

## Display interface: status words and modes

Two status words set up a picture.

**Status word 1**

| PDP bits | meaning |
|----------|---------|
| 0..3 | Y shift: the data word is shifted left this many places before display |
| 5..17 | memory address: start of the region (display mode), address of the Y value (set mode), zero (mark mode) |

**Status word 2**

| PDP bits | meaning |
|----------|---------|
| 0 | display mode (histogram) |
| 1 | mark mode (vertical line) |
| 3 | set mode (one point) |
| 4 | C.R.O. select: 0 intensifies Z1, 1 intensifies Z2 |
| 6..17 | range code (display mode) or X position (mark and set modes) |

The Y DAC has 10 bits and is fed from the top ten bits of the shifted
18-bit word. Shift 0 therefore gives full scale 2^18 counts, and each extra
shift halves the full scale, down to 2^3 at shift 15. Bits shifted past the
top are lost.

Range codes for display mode:

| code (bits 6..17, octal) | channels | X step |
|------|------|------|
| 7777 | 4096 | 1 |
| 7776 | 2048 | 2 |
| 7774 | 1024 | 4 |
| 7770 | 512 | 8 |
| 7760 | 256 | 16 |
| 7740 | 128 | 32 |
| 7700 | 64 | 64 |
| 7600 | 32 | 128 |

The X step is the weight of the lowest set bit of the code. Every range
therefore spans the full 12-bit X DAC.

### The three modes

- **Display.** X starts at 0 and the address at the region start. Each point
  does the following:
  1. reads one memory word through the data channel;
  2. shifts it by the Y shift;
  3. brightens the point;
  4. adds the X step to X and one to the address.

  When X carries out of 12 bits (DISPLAY OFLO), the sweep is finished: the
  display bit clears and the flag is set.
- **Mark.** X is copied from the range/X field and stays fixed. No memory is
  read. The low six address bits drive the top six Y DAC bits, so the
  address, counting up from zero, draws a vertical line of 64 dots. A carry
  into address bit 11 (MARK OFLO) ends the line: the mark bit clears and the
  flag is set.
- **Set.** A single point is drawn: X from status word 2, Y read from the
  address in status word 1 and shifted. The address then advances by one. In
  this design the set bit also clears and the flag is set when the point is
  done, so the program knows when to load the next X.

The usual refresh loop is a histogram, then two markers, then the histogram
again. The program reloads the status words each time the flag is raised.
IOT 2101 skips on the flag. After IOT 2121 the flag also raises `int_rq`.
Loading or clearing status word 2 clears the flag.

## The point sequencer and its timing

This is the part of the design that holds the most behaviour. It lives in
`disp_control`, and the datapath is split into four registers:

- `disp_x_register`: the range/X upper register, and the lower X register that
  drives the DAC;
- `disp_address_register`: the address register, the Y shift register and the
  shift counter;
- `disp_y_data_register`;
- `disp_z_control`: the intensification one-shots and the C.R.O. select
  flip-flop.

Each point runs through these states:

```
IDLE ──(a mode bit set)──► REQ ──(read done)──► SHIFT ──(counter 0)──► INTENS
                                                                         │
        WAIT ◄── ADVANCE ◄──────────────────────── (not a sixteenth) ◄───┤
         │          ▲                                                    │
         │          └─ SIXTEENS (1 µs delay, 80 µs hold) ◄─ (sixteenth) ◄┘
         └──(20 µs since the point started)──► IDLE
```

- **REQ.** The sequencer requests a data channel read at the current address.
  The memory word arrives on the I/O bus with the end-of-cycle strobe and is
  loaded into the Y data register. At the same time the Y shift is copied into
  the shift counter. Mark mode skips REQ and SHIFT.
- **SHIFT.** The Y data moves one place left per clock until the counter
  reaches zero, which takes up to 15 clocks.
- **INTENS.** The Z one-shot pair fires: a short delay for the DACs to
  settle, then the intensification pulse. The pulse goes to Z1 or Z2 as the
  C.R.O. select flip-flop says. At the defaults this is 0.2 µs then 1 µs.
- **SIXTEENS.** When the next address step would be the sixteenth (low four
  address bits all ones), a 1 µs delay runs, and then the point is held for
  80 µs and re-brightened every 10 µs. Every sixteenth channel therefore shows brighter, which divides the
  histogram into sixteen-channel groups. This applies in display mode only.
- **ADVANCE.** X and the address step. The overflow checks described above end
  the sweep.
- **WAIT.** A new point starts no sooner than 20 µs after the previous one
  started. A sixteenth point is longer because of its hold.

Points are therefore paced at 20 µs whatever the memory traffic, and the
A.D.C. always gets the data channel first. A histogram sweep of *N* channels
takes about *N* × 20 µs, plus *N*/16 holds of up to 80 µs. The usual picture
is 1024 channels plus two 64-point markers (1152 points), and it takes
27.2 ms in simulation. That is a refresh of about 37 frames per second. The
20 µs point period alone would give 23 ms, or about 40 frames per second.

## Data channel handshake and priority

`dch_port` holds the request logic that each interface uses.

1. The device raises DCH RQ.
2. The processor answers with a one-cycle grant, DCH GR.
3. The first requesting device in the enable chain (DCH EN IN → DCH EN OUT)
   takes the grant and holds ENA. While ENA is high it drives its address
   on `dch_addr`.
4. The processor ends the cycle with the one-cycle `dch_done` strobe. Read
   data is on `iob` with that strobe, and an increment overflow is on
   `io_oflo`.
5. The port gives CLR RQ and drops ENA.

The chain runs processor → A.D.C. → display, and the display's enable output
is the top's `dch_en_out`. The two interfaces' request, address, skip and
interrupt outputs are ORed, as they would be on a wired-OR bus. An assertion
in the top checks that the two interfaces never hold ENA together.

## Converters

`dac_model` is a behavioural digital-to-analogue converter. It has a
real-valued output with a settling delay, and defaults to 10 V full scale and
1 µs settling. The top uses a 12-bit one for X and a 10-bit one for Y. The
digital codes are also brought out as `x_code` and `y_code`, for synthesis
and for anyone who wants to attach their own converters.

## Parameters and clock

Everything runs from one clock. Its frequency is the top's only parameter,
`CLK_HZ`, with a default of 10 MHz. The original times are converted to clock
cycles from it:

| time | default cycles | source |
|------|----------------|--------|
| 20 µs between points | 200 | original design |
| 1 µs delay before the sixteens hold | 10 | original design |
| 80 µs sixteens hold | 800 | original design |
| 10 µs re-brightening during the hold | 100 | this design's choice |
| 1 µs CLR ADC pulse | 10 | original design |
| 0.2 µs Z delay, 1 µs Z pulse | 2, 10 | this design's choice |

## What follows the original, and what is this design's own

The following come from the original design:

- the status word layouts;
- the IOT codes;
- the address forming with base and mask;
- the abort path for ALT and out-of-range pulses;
- the overflow flags;
- the three display modes with their X step, Y shift and marker line;
- the sixteens brightening;
- the two-C.R.O. select;
- the 20 µs point rate.

The following are this design's own choices:

- **Clock and bus model.** A single synchronous clock and one-cycle strobes
  replace the IOP pulses and monostables. The data channel handshake timing
  is also this design's, because the original takes it from the processor's
  interface manual.
- **Processor model.** The test processor model uses a 1 µs memory cycle.
- **Set-mode ending.** A set-mode point ends by clearing its mode bit and
  setting the flag.
- **Mode priority.** When more than one mode bit is set, display goes first,
  then mark, then set. A marker that follows a histogram in this way counts on
  from the address where the histogram stopped, so it is a full 64 dots only
  when that address is a multiple of 64.
- **Flag clearing.** The display flag is cleared by loading or clearing
  status word 2. IOT 2121 enables the display interrupt, and only a power
  clear disables it.
- **Re-brightening.** During a sixteens hold the point is re-brightened
  every 10 µs. The Z delay and pulse widths are also this design's.
- **X field.** The X position is taken from bits 6..17 of status word 2,
  the width of the 12-bit X register. One description of mark mode speaks
  of bits 5..17.
- **Address field.** The status word 1 address is bits 5..17, the memory's
  13 bits. One description of display mode speaks of bits 4..17, and the
  original address register has a flip-flop for bit 4 as well, which only
  a memory larger than 8192 words would need. This design leaves bit 4 out.
- **C.R.O. select bit.** The select is bit 4 of status word 2, as in the
  circuit diagram, where the flip-flop is clocked by the status word 2 load.
  One description places it in status word 1.
- **Range code 0.** A range code of 0, which is not a listed range, gives
  one point per sweep.
- **Disabled A.D.C.** A pulse converted while the A.D.C. interface is
  disabled waits, without being stored, until the next status load.

The interfaces are built. The converter, the computer, the oscilloscopes and
the teletype are outside equipment, so they are not built. The testbenches
model the first two (`tb/pdp15_model.sv`, `tb/nd2200_adc_model.sv`).

## Files

`rtl/` holds one module or package per file:

| file | contents |
|------|----------|
| pha_pkg.sv | types, field helpers, device codes, time-to-cycles function |
| pha_system.sv | the station (top) |
| adc_interface.sv | A.D.C. interface |
| adc_address_gen.sv | base/mask address forming and range check |
| display_interface.sv | display interface |
| disp_control.sv | mode register, flag, point sequencer |
| disp_x_register.sv | range/X registers and X counter |
| disp_address_register.sv | address, Y shift and shift counter |
| disp_y_data_register.sv | Y data shift register and Y DAC select |
| disp_z_control.sv | intensification one-shots, C.R.O. select |
| dch_port.sv | data channel request and priority chain |
| iot_device_selector.sv | IOT decode |
| one_shot.sv | retriggerable monostable in clock cycles |
| dac_model.sv | behavioural D/A converter |

`tb/` holds one testbench per block (`tb_<block>.sv`), plus the following:

- `pdp15_model.sv`: processor model with an 8192-word memory, IOT task and
  data channel service.
- `nd2200_adc_model.sv`: converter model with 20 ns per channel of
  conversion and READY held until CLR.
- `tb_pha_system.sv`: the whole station at its default parameters. Random
  pulses go in, including errors and out-of-range channels, while the
  display refreshes a 1024-channel histogram and two markers. Memory is
  checked against the expected counts, and each frame's points are checked
  against memory. The testbench also covers a channel overflow with its
  interrupt, set mode on the second C.R.O., and the frame time.
- `tb_pha_ranges.sv`: every A.D.C. region size (4096 down to 64 channels)
  and every display range (4096 down to 32 channels) at the defaults.

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and has a
watchdog.

## Running

The designs are checked with Verilator 5. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/pha_pkg.sv tb/tb_pha_system.sv --top-module tb_pha_system
./obj_dir/Vtb_pha_system
```

The other testbenches run the same way. `tb_pha_system` simulates about
110 ms of station time in about a second. `tb_pha_ranges` draws a full
4096-channel sweep, which takes 98 ms.

All modules except `pha_system` and `dac_model` synthesise with Yosys. Those
two have real-valued ports. For synthesis, use `display_interface` and
`adc_interface` directly, or drop the two converter models and keep the
codes.
