# Optical mouse scanner

An ordinary optical mouse has a tiny camera in it. Its sensor, the ADNS-2051,
takes 16x16-pixel grey-scale pictures of the surface under the mouse and works
out from them how far the mouse has moved. This design reads both out of the
sensor: the movement (dx, dy) and, on request, the picture itself. Sweep the
mouse over a printed page and each picture is pasted into a 128x128 image at
the position the movement adds up to. The image is built up piece by piece,
like a jigsaw, and is shown on a VGA monitor. A live inset beside it shows the
sensor's current picture.

The RTL covers the FPGA part of the scanner:

- the sensor's serial port and the state machine that polls it;
- a four-entry buffer of pictures;
- the button modes;
- the 128x128 image memory with its copy and clear logic;
- the VGA raster.

The software that tracks the absolute position and decides what to paste
where runs on a soft processor. That processor is not part of this RTL. The
top level brings out the two register ports the software uses, and the
end-to-end testbench plays the software's part.

## Data flow

```
 ADNS-2051 ──SCLK/SDIO/PD──► gpio_ctrl ──────────────────────────► vga_ctrl ──► VGA DAC
 buttons L/R ──────────────►  ├ adns_serial   (serial port)          ├ map_memory   (copy walk)
                              ├ mouse_poll_fsm(what to read)         ├ dual_port_ram 128x128x6
                              ├ click_mode_fsm(idle/scan/reset)      ├ vga_timing   (640x480)
                              └ sample_buffer (4 x 16x16x6)  ◄─rd_sel/rd_addr─┘
                                  ▲                                      ▲
                    gpio register port (read)           vga register port (read/write)
                                  └──────────── processor software ──────┘
```

1. While the left button is held (SCAN mode), the polling state machine asks
   the sensor over and over whether it has moved.
2. When it has, the machine reads dx and dy. It then switches the sensor to
   pixel-dump mode and reads all 256 pixels into the next free buffer entry,
   together with the button levels.
3. Last, it writes a 4-bit sequence number for the entry. This number
   completes the sample.
4. The software sees the new number in the 16-bit *select number*, which holds
   the four entries' sequence numbers. It points the VGA controller's
   *read select* at that entry and reads dx and dy. It updates its absolute
   position and writes the corner address where the picture should go. Then
   it sets *aggregation enable* for at least one copy pass.
5. The VGA controller copies the 256 pixels into the 128x128 image. It shows
   the image at twice its size, with a coloured box around the last paste and
   the selected picture as an inset.

## Pixel addressing

This part is easy to get backwards.

- **Sensor order.** The sensor hands out its pixels starting at the
  bottom-right of its array. It goes up each column, then one column to the
  left. So pixel address `s` is column `s[7:4]` counted from the right and
  row `s[3:0]` counted from the bottom.
- **Aggregate layout.** The aggregate image is stored the same way: address
  = `column_from_right * 128 + row_from_bottom`, 14 bits.
- **Copy address.** A sample pasted with its bottom-right corner at `start`
  puts pixel `s` at `start + s[7:4]*128 + s[3:0]`. The sum wraps modulo 16384
  (`map_memory`).
- **Software's corner.** The software's corner address is
  `y + x*128`, where x is the column and y the row.
- **Screen mapping.** When drawing, screen pixel (cx, cy) inside the 256x256
  window reads aggregate address `{~cx[7:1], ~cy[7:1]}`. The bit inversion
  turns "from the right/bottom" into screen order. Dropping bit 0 doubles
  every pixel. The 32x32 inset uses `{~ix[4:1], ~iy[4:1]}` in the same way.

## Sensor interface (`adns_serial`, `mouse_poll_fsm`)

The sensor has a half-duplex serial port with a clock line (SCLK) and a data
line (SDIO).

- **Transaction.** Each transaction starts with a header byte `{R/W, A6..A0}`,
  most significant bit first. SCLK idles high. The host changes SDIO while
  SCLK is low, and the sensor samples it on the rising edge.
- **Write.** A write sends 8 more bits.
- **Read.** On a read, the host releases SDIO and waits `T_WAIT` clocks, the
  sensor's address-to-data delay. It then clocks 8 bits, which the sensor
  drives after each falling edge.
- **Timing.** SCLK is made by counting: every half period is `SCLK_HALF`
  system clocks. Every transaction, read or write, takes
  `32*SCLK_HALF + T_WAIT` clocks. At the defaults that is 9248 clocks, 185 µs
  at 50 MHz.

| register | address | use |
|---|---|---|
| Motion | 0x02 | bit 7 (MOT): moved since the last read |
| Delta_X / Delta_Y | 0x03 / 0x04 | two's-complement counts since the last read; reading clears |
| Configuration_bits | 0x0A | 0x01 awake; 0x09 awake + pixel dump |
| Data_Out_Lower | 0x0C | next pixel in bits 5:0; bit 7 set = not ready yet |

**Power-up.** After reset, PD is held low for `T_PWR` clocks. It is pulsed
high for `T_WAIT` clocks and then held low for `T_PWR` clocks more before the
first access.

**Polling loop.** The loop then runs as follows:

1. Write Configuration_bits with 0x01.
2. Read Motion. If MOT is clear, go back to idle.
3. Read Delta_X and Delta_Y.
4. If either is non-zero, write Configuration_bits with 0x09. This starts the
   dump.
5. Read Data_Out_Lower until 256 valid pixels have arrived. A byte with bit 7
   set is read again at the same address.
6. Store the two button levels.
7. Store the sequence number. The next pass of step 1 writes 0x01 again,
   which ends the dump.

**Sample rate.** One sample takes about 265 transactions, roughly 49 ms. The
scanner therefore collects about 20 pictures a second, and the mouse must be
moved slowly.

## Modes (`click_mode_fsm`)

| buttons (right, left) | mode | effect |
|---|---|---|
| 1x | RESET | the aggregate image is cleared; no polling |
| 01 | SCAN | the sensor is polled and samples are collected |
| 00 | IDLE | no polling; the display keeps showing the image |

The right button wins over the left. A sample already being read when the left
button is released is still finished.

## Sample buffer (`sample_buffer`)

The buffer has four entries. Each entry holds a 256x6 RAM plus dx, dy and the
two button levels.

- **Filling.** The entry being filled rotates 0, 1, 2, 3, 0, … Each time a
  sequence number is written, it goes into the entry's nibble of the select
  number (entry i is in bits 4i+3:4i).
- **Reading.** The software compares the select number with the last one it
  saw, to find the entry that changed.
- **Overruns.** The buffer exists because the software may fall behind. If it
  falls more than four samples behind, the oldest entries are overwritten.
  The sequence numbers show that they were.

## Display (`vga_ctrl`, `vga_timing`, `map_memory`)

**Clocking.** Everything runs on one 50 MHz clock.

- A phase flip-flop makes the 25 MHz pixel clock (`VGA_CLK`), so each pixel
  lasts two system clocks.
- The sample buffer's single read port is shared between those two clocks.
  The first reads the inset pixel; the second reads the next pixel for the
  copy. Copying and display therefore never wait for each other.
- The aggregate RAM has one write port, used by the copy or the clear, and
  one read port, used by the display.

**Copy.** A copy pass writes one pixel per pixel clock: 256 pixels in 512
clocks. Passes repeat while aggregation enable is set. A pass that has started
always completes. The corner address is sampled at the start of each pass.

**Clear.** A clear is started by the clear register or by RESET mode. It
sweeps all 16384 addresses, one per clock, and always completes the sweep.
It takes priority over copying. The image window shows black while it runs.

**Screen layout** (640x480 at 60 Hz):

- the aggregate, pixel-doubled, at x 100–355, y 100–355;
- the inset at x 498–529, y 220–251;
- white elsewhere.

**Grey to colour.** Grey values are widened to the DAC's 10 bits by repeating
the four low bits, `{g, g[3:0]}`, and the same value goes to R, G and B.

**Highlight box.** The box is the outline of the 16x16 square at the corner
address. Its colour is yellow, green or red, from the box register: the
software uses green while pasting, yellow when not, and red at the edge.

**Latency.** The picture and the sync pins are registered together. Both lag
the counters by one pixel clock.

## Register ports

**gpio port.** Read only. Read data is valid one clock after `cs & read`.

| addr | read |
|---|---|
| 0 | left button level of the selected sample (0 = pressed) |
| 1 | right button level of the selected sample |
| 2 | dx of the selected sample |
| 3 | dy of the selected sample |
| 4 | select number (four 4-bit sequence numbers) |
| 5 | status: bits 1:0 mode (0 idle, 1 scan, 2 reset), bit 2 sensor ready, bit 3 dump running |

**vga port.**

| addr | read | write |
|---|---|---|
| 0 | bit 0: in horizontal or vertical sync | – |
| 1 | corner address | – |
| 2 | read select | – |
| 3 | bit 0 clear running, bit 1 copy running | corner address (13:0) |
| 4 | – | read select (one-hot, 4 bits) |
| 5 | – | aggregation enable (bit 0) |
| 6 | – | box colour (0 yellow, 1 green, other red) |
| 7 | – | clear (bit 0) |

The "selected sample" of the gpio port is the one named by the vga port's
read select.

**Board outputs.** LEDG and LEDR show the selected dx and dy. HEX1:0 and
HEX5:4 show the same values in hex.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `SCLK_HALF` | 33 | system clocks per SCLK half period (≈758 kHz at 50 MHz); at least 3 |
| `T_WAIT` | 8192 | read address-to-data wait and write hold-off (164 µs) |
| `T_PWR` | 262144 | power-up wait around the PD pulse (5.2 ms) |
| `POR_CYCLES` | 65535 | power-on reset length at the top level |

Sizes (4 entries, 6-bit pixels, 16x16 samples, 128x128 image, screen
positions) are constants in `scan_pkg`.

## Where this departs from the original design, or fills gaps

- **Buffer depth.** The original sizing discussion plans for five buffered
  samples. Its implementation, and this one, have four, matching a 16-bit
  select number of 4-bit fields.
- **PD pin.** PD is described as permanently inactive, but the power-up
  sequence pulses it. This design pulses it once at power-up.
- **SCLK rate.** The rate is quoted variously as 4.5 MHz, "below 4 MHz" and
  under 100 kHz. The clock divider used in the original hardware gives 33
  clocks per half period, which is the default here.
- **Polling in idle.** The original hardware polled all the time, although
  the description says idle mode does not poll. This design polls only in
  SCAN mode.
- **Dump rate.** The original took a pixel dump only on every second motion.
  This one dumps on every motion with a non-zero dx or dy.
- **SCLK during power-up.** The original held SCLK and SDIO low during the
  first power-up wait. Here they idle high from reset, so the sensor sees
  no clock edge while PD is being sequenced.
- **Sequence numbers** start at 1, so that the first sample changes the
  cleared select number.
- **Added here.** These are this design's own: the status registers
  (gpio 5, vga 3), the two-flop synchronisers on the buttons and SDIO, the
  completing clear sweep, and the shared read-port schedule.
- **Vendor parts.** The processor, bus fabric, SRAM controller, JTAG link and
  PLL of the original board system are vendor parts and are not included. The
  pixel clock is made by dividing the system clock by two, as the original
  board did in the end.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. Build one
with Verilator 5 from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/scan_pkg.sv \
    tb/tb_mouse_scanner_top.sv --top-module tb_mouse_scanner_top -Mdir obj_top
./obj_top/Vtb_mouse_scanner_top
```

| testbench | what it checks |
|---|---|
| `tb_mouse_scanner_top` | whole design at default parameters, about 25 M clocks (15 s). The testbench acts as the software for seven samples. It checks four whole frames pixel by pixel against a reference image, and counts that each mechanism occurred: PD pulse, no polling in idle, empty motion polls, dumps, not-ready re-reads, buffer wrap, copy passes, clear by register and by button, polling stopping on release, all box colours, inset, seven-segment displays |
| `tb_gpio_ctrl` | mouse side through its register port, with short timing |
| `tb_vga_ctrl` | display against a reference screen: pastes, box colours, clears, sync width, copy pass length |
| `tb_adns_serial`, `tb_mouse_poll_fsm` | serial waveform, cycle counts, poll sequence, re-reads |
| `tb_sample_buffer`, `tb_map_memory`, `tb_vga_timing`, `tb_click_mode_fsm`, `tb_dual_port_ram`, `tb_seven_seg` | the smaller blocks |

`tb/adns2051_model.sv` is a behavioural model of the sensor's serial port.
It produces a deterministic picture per dump, `(a*5 + frame*11 + a/16) mod
64`, and answers every 37th pixel read with "not ready", so that the re-read
path is exercised.
