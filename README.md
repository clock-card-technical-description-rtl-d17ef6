# Clock card logic for a multichannel readout subrack

A readout subrack holds an address card, bias cards, four readout cards (RC0–RC3), a power card and one **clock card**. The clock card is the only card the real-time computers talk to. It makes the 25 MHz reference clock every other card runs on. It turns the computers' commands into traffic on the bus backplane, collects the readout cards' data into frames, and returns those frames only when asked. It also reprograms the subrack's FPGAs over JTAG and co-ordinates resets with the power card.

This repository is synthesizable SystemVerilog for the clock card's digital functions, with a self-checking testbench for each block and one for the whole card. The card-level description these functions come from fixes the rates, sizes, pin meanings and sequences. It leaves the packet protocols and most encodings to other specifications. Where it is silent, this design makes its own choice, and each such choice is stated below and in the file's header comment.

```
                 +---------------------------------- clock_card -----------------------------------+
 clk_osc ------->| ref_clk_div --> clk_ref (25 MHz, all logic; also driven out to BB and transceivers)|
                 |                                                                                 |
 rts_dv_n ------>| dv_receiver --dv_pulse--> cmd_line_tx --------------------------------------> bb_cmd
                 | frame_timer --line/frame start--^   ^ bytes                                      |
                 |            \--frame start--------------------------------------------------> bb_sync
 host_cmd_* ---->| command routing --+--> config_loader --JTAG--------------------------------> jtag_*
 fo_rx_* ------->|                   |        | RAM port                                         |
                 |                   |        +--- mode mux ---> ram_* (2 MiB on-board RAM)        |
 frag_* -------->|                   +--> frame_buffer --+                                         |
                 |                   |        \---------------------------------------------> fo_tx_*
 reg_btn_n ----->|                   +--> reset_controller --bytes--> cmd_line_tx                 |
                 |                              \--words--> ps_link <---------------------------> ps*
 sid_pin,arry -->| position_id --> slot, card type, band, quadrant                                |
 card_id, box_id <-> onewire_id_reader x2 --> card_serial, box_serial (read once after reset)     |
 card_id <------->| temp_monitor --> temperature, temp_alarm (every second, after the ID read)      |
                 +---------------------------------------------------------------------------------+
```

## Clock and scan timing

`ref_clk_div` divides the crystal oscillator 2:1, as the card does in an external flip-flop, giving a 25 MHz clock with a 50% duty cycle. Everything else runs on that clock (`clk_ref`), and it also leaves the card for the backplane and the fibre transceivers. The card's text names a 100 MHz oscillator, which a 2:1 division cannot turn into 25 MHz. The part number it quotes is a 50 MHz device, so the divider keeps 2:1. For a 100 MHz oscillator, set `CLK_DIV = 4`.

The readout scans address lines at 800 kHz and whole frames at 20 kHz. 25 MHz / 800 kHz is 31.25 cycles, which is not a whole number. `frame_timer` therefore uses a phase accumulator: it adds 4 every cycle and wraps at 125. Lines are 31 or 32 cycles long, line *k* starts exactly ⌈k·31.25⌉ cycles after line 0, and every 40-line frame is exactly 1250 cycles. The frame start drives the backplane Sync line as a one-cycle pulse.

## DV pulses and the Cmd line

The real-time sequencer marks valid data with DV pulses, sent over a 5 MBd fibre whose receiver output is low while light is on. `dv_receiver` passes the input through two synchronising flip-flops and inverts it. It accepts a new level only after 4 stable cycles, so glitches up to 3 cycles (120 ns) are ignored. It emits one `dv_pulse` per DV.

The DV information reaches the readout cards over the **Cmd line**, the serial line every card listens to. The line also carries commands. `cmd_line_tx` sends bytes at one bit per clock (25 Mbit/s, the backplane rate). Each byte is framed as: idle high, start bit 0, eight data bits LSB first, stop bit 1. A DV pulse is held until the next scan boundary. Whether that should be the next line or the next frame was left open, so `DV_ALIGN_FRAME` selects either; the default is the line. At the boundary, a DV marker byte (`0xD5`) becomes due. It goes out as soon as no byte is in flight, ahead of waiting command bytes, and never splits a byte. On an idle line the marker's start bit leaves two clock edges after the boundary. Behind a byte in flight it waits at most ten more cycles.

## Configuration images: fibre → RAM → JTAG

The card can reprogram every Altera device in the subrack. With compressed byte-code files this needs a processor running a byte-code player. With **pure binary images** a state machine is enough, and `config_loader` is that state machine. It works in two steps:

1. **Load** (`OP_LOAD_IMAGE`, argument = length). The next *length* bytes from the fibre deserializer are written to RAM addresses 0…length−1, at one byte per cycle offered. A length of 0 is refused and sets `loader_error`. So is any length above 1,587,200 bytes, the 1550 kB image of an EP1S40, the largest FPGA the card may carry.
2. **Program** (`OP_PROGRAM_JTAG`). The image is played into the chain as one data-register scan. TCK runs at clk/2 = 12.5 MHz. TMS and TDI change while TCK is low, and the devices sample them on the rising edge. Starting from Run-Test/Idle, the sequence is:

   | TCK edges | TMS | TDI | TAP state reached |
   |---|---|---|---|
   | 1–3 | 1, 0, 0 | 0 | Select-DR, Capture-DR, Shift-DR |
   | 8·len | 0 … 0, 1 on the last | image bits, LSB of each byte first | Shift-DR, then Exit1-DR |
   | 2 | 1, 0 | 0 | Update-DR, Run-Test/Idle |

   The next byte is read from RAM while the current one is shifting, so the scan never pauses. `loader_busy` stays high for exactly 2·(5 + 8·len) cycles. For a full EP1S40 image that is 25.4 M cycles, about 1.02 s.

The loader does **not** issue instruction-register scans. Selecting the target device and instruction is left to the image, or to whatever prepares the chain. The loader does not read TDO. The FPGAs check the integrity of the data they receive themselves.

## Frames: fragments → RAM slots → fibre on request

The card compiles data frames as the readout cards' fragments arrive. It keeps the frames in the same on-board RAM, which is never used for an image at the same time. It sends frames only when the computers ask. `frame_buffer` works as follows.

- **Slots.** The 2 MiB RAM is cut into `N_SLOTS` = ⌊2,097,152 / 5120⌋ = **409** slots of one 5120-byte scientific frame, used as a circular buffer.
- **Fragments.** Each fragment byte arrives on `frag_valid/frag_rc/frag_data`, with `frag_last` on the fragment's final byte. RC *r* owns bytes *r*·1280 … *r*·1280+1279 of the slot, so fragments may arrive in any order. A frame counts as stored (`frames_stored`) once all four fragments have ended. Bytes beyond 1280 in one fragment are not written, and an assertion flags them in simulation.
- **Overflow.** If a new frame starts while all 409 slots hold frames not yet sent, the whole frame is discarded and `frames_dropped` counts it. Stored frames are never overwritten.
- **Requests.** `OP_READ_FRAMES` with *N* sends the *N* oldest frames back to back on `fo_tx_*`, with `fo_tx_last` on each frame's last byte. If fewer than *N* are stored, it waits for the rest. `fo_tx_ready` may apply back-pressure at any time.
- **RAM sharing.** A write to the RAM always wins the cycle. Reads fill a 4-entry output FIFO in the free cycles and reach one byte per cycle. The first byte appears three cycles after the request.

The fragment layout and the "oldest N frames" request are this design's reading. The fragment and command formats belong to the backplane and fibre protocols, which are not part of this design.

## Resets and the power card

There are three kinds of reset.

- **Power reset.** The power card switches the subrack's supplies off in sequence.
- **Configuration reset.** The power card raises the backplane reset so that every FPGA reloads its configuration.
- **Register reset.** Chosen registers in every FPGA return to preset values.

The power card may only be told to shut down once the subrack's FPGAs are prepared. For a power or configuration reset, `reset_controller` therefore first broadcasts `PREPARE` (`0xC1`) on the Cmd line. It then waits `PREPARE_CYCLES` (2500 cycles, 100 µs) and sends `0xA1` (power down) or `0xA2` (configuration reset) to the power card. A register reset comes from a command or from the faceplate pinhole button, which is synchronised and must hold for 16 cycles. It sends `REGISTER_RESET` (`0xC2`) on the Cmd line and pulses `local_reg_reset` for the clock card's own registers. Requests made while a sequence runs are ignored.

`ps_link` is the two-way SPI/MICROWIRE link to the power card, on the backplane's two independent pin sets. The clock card is master on PSCLKO/PSCSO/PSDO: 8-bit words, MSB first, chip select active low, clock at 25 MHz / 8, and data stable across the rising clock edge. One word occupies the link for 72 cycles. The power card is master on PSCLKI/PSCSI/PSDI. Those pins are synchronised, PSDI is sampled on each PSCLKI rising edge, and each complete word appears on `pc_rx_valid/pc_rx_data`. A word cut short by chip select rising is dropped. Each phase of the incoming clock must last at least two `clk_ref` cycles, so PSCLKI must stay below about 6 MHz.

## Where the card sits

`position_id` decodes two sets of pins.

- **SID0–SID3.** Each pin is open or grounded on the backplane and pulled up on the card. A grounded pin reads low and means 1, so the slot number is the inverted pin word, with SID0 as the LSB. The slots are 0 AC, 1–3 BC0–BC2, 4–7 RC0–RC3, 8 CC and 9 PC. Codes 10–15 give `slot_valid = 0`.
- **ArryID2..0.** These pins select the sub-array. Codes 000–011 are quadrants 1–4 of the 450 µm array, and 100–111 are quadrants 1–4 of the 850 µm array. `quadrant` is encoded 0–3. The pin levels are taken as the code directly, with ArryID2 as the left digit.

## Serial numbers and temperature over 1-Wire

Two 1-Wire silicon ID devices identify the hardware: a DS18S20 on the card gives the card's serial number, and a DS2401 on the backplane, on the BoxID pin, gives the subrack's. `clock_card` has one `onewire_id_reader` for each and starts both on the first cycle after reset. Each device sits on an open-drain line with an external pull-up. The reader pulls it low through `*_id_drive_low` and reads the level on `*_id_in`.

A read is the standard 1-Wire Read ROM sequence, timed by a microsecond tick of `CLK_PER_US` (25) cycles:

1. **Reset.** The reader holds the line low for 480 µs and releases it. At 70 µs after release it samples for the device's presence pulse. The slot ends at 960 µs. With no device, the read stops here with `present` low.
2. **Command 0x33.** Eight 70 µs write slots, LSB first. A 0 holds the line low for 60 µs and a 1 for 6 µs.
3. **ROM.** 64 read slots. Each holds the line low for 6 µs, then releases it and samples it 12 µs into the slot. A device sending 0 keeps the line low past that point. Bits arrive LSB first: the family code (10h for the DS18S20, 01h for the DS2401), 48 serial-number bits, and a CRC byte.

Every ROM bit goes through the Dallas CRC-8 (x⁸+x⁵+x⁴+1, a shift register XORed with 0x8C when the outgoing bit differs from the input). Over all 64 bits the register ends at zero exactly when the CRC byte matches. A full read takes 960 + 72 × 70 = 6000 µs (150 000 cycles). `card_id_ok` and `box_id_ok` mean the device answered and its CRC matched. `ids_read` goes high once both reads have finished. The 1-Wire timing is the protocol's own; the card's description names only the devices.

The DS18S20 is also the card's temperature sensor. Once its serial number is in, `temp_monitor` takes over its line (the two drivers are ORed and never active together). It reads the temperature at once and then every `PERIOD_US` (1 s) in two transactions with the same slot timing:

1. Reset, Skip ROM (`0xCC`), Convert T (`0x44`). Then read slots until the sensor answers 1, which it does once the conversion is done (up to 750 ms). After `MAX_POLL` (16384) slots without an answer, the read fails.
2. Reset, Skip ROM, Read Scratchpad (`0xBE`). Then 72 read slots: nine bytes, the last a CRC-8 over the first eight.

Bytes 0–1 are the temperature, signed, in 0.5 °C steps. A reading with a good CRC is held on `temperature` with `temp_valid`. `temp_alarm` is set when that reading is above `TEMP_HIGH` (60 °C) or below `TEMP_LOW` (0 °C). The range is this design's choice. `temp_error` marks a failed last read (no presence, conversion timeout or bad CRC), and the previous good reading stays. `temp_update` pulses at the end of each read. Reporting the temperature to the computers belongs to the housekeeping replies of the fibre protocol, which is not here.

The card also reports a firmware version fixed at build time: it is the `FW_VERSION` parameter, driven to `fw_version`.

## Top-level interface

`clock_card` takes commands already unpacked from the fibre protocol. Each command is `host_cmd_op` (`cc_pkg::host_op_e`) with a 32-bit `host_cmd_arg`, and it is taken when `host_cmd_valid && host_cmd_ready`.

| op | argument | ready when | effect |
|---|---|---|---|
| `OP_SET_MODE` | bit 0: 0 image, 1 frames | loader idle, no frame request open | gives the RAM to the loader or to the frame buffer; fragments are ignored in image mode |
| `OP_LOAD_IMAGE` | length in bytes | image mode, loader idle | store the next *length* `fo_rx` bytes |
| `OP_PROGRAM_JTAG` | – | image mode, loader idle | shift the stored image into the chain |
| `OP_READ_FRAMES` | number of frames (16 bits) | frame mode, no request open | stream frames on `fo_tx_*` |
| `OP_CARD_CMD` | byte in bits 7:0 | Cmd line free | send one byte on the Cmd line |
| `OP_POWER_RESET`, `OP_CONFIG_RESET`, `OP_REGISTER_RESET` | – | no reset sequence running | start the sequence |

Bytes from the reset controller go out on the Cmd line ahead of `OP_CARD_CMD` bytes. `rst_n` (from the supply supervisor) is asynchronous. Its release is synchronised to `clk_ref` with two flip-flops. The RAM port (`ram_en/we/addr/wdata`, `ram_rdata`) expects a byte-wide synchronous RAM: it samples a request at a clock edge and returns read data after that edge. Status outputs give the decoded position, frame counts, loader state and image length, the DV level and marker strobe, and the current scan line. The ID outputs are `card_serial`, `box_serial`, `card_id_ok`, `box_id_ok`, `id_busy` (any 1-Wire activity) and `ids_read`. `on_extender` reports the nEXTND backplane pin (`extnd_n`, low on an extender card) through a two-flop synchroniser. The temperature outputs are `temp_valid`, `temperature`, `temp_alarm`, `temp_error` and `temp_update`.

Parameters of `clock_card` (defaults are the card's values unless marked):

| parameter | default | meaning |
|---|---|---|
| `CLK_DIV` | 2 | oscillator division |
| `FRAME_BYTES` | 5120 | frame size |
| `N_FRAG` | 4 | fragments (readout cards) per frame |
| `DV_ALIGN_FRAME` | 0 (own choice) | DV marker at line (0) or frame (1) start |
| `PREPARE_CYCLES` | 2500 (own choice) | wait before the power-card command |
| `FW_VERSION` | 32'h0001_0000 (own choice) | value on `fw_version` |

Shared constants and encodings are in `rtl/cc_pkg.sv`.

## What is not here, and departures

- The fibre packet protocol is not here: unpacking, checking and packaging, the echo command for bit-error measurement, and reply modes. Nor is the backplane command/acknowledge protocol, including card discovery and error queries. Both are defined elsewhere. The top's command port and fragment port stand in for them.
- Parts off the FPGA appear only as ports: HOTLink serializer and deserializer, fibre transmitters and receivers, LVDS buffers and repeaters, the RAM chip, configuration devices, regulators and supervisors, and the ID and temperature chips themselves (DS18S20, DS2401, MAX1618). The serial numbers and the DS18S20 temperature are read. The MAX1618 FPGA die-temperature link is not built, because its read-out and use are not specified. The JTAG buffers that hand the chain to a faceplate Byte-Blaster are also off the FPGA. `tb/sram_model.sv` models the RAM for simulation.
- The byte-code player on a soft processor is replaced by the binary-image loader. The card's description offers that loader as the alternative.
- The Sync line carries a frame-start pulse. The description also speaks of short co-ordination/DV commands on it, but gives no format. DV markers go on the Cmd line, which the description also names for them.
- Switching the card itself from its factory to its application configuration (an INIT_CONFIG instruction to the application configuration device) is not built. The instruction code and the chain layout are not given, and `config_loader` only performs data-register scans. The board-level reset buttons (local configuration reset, nDEVCLR) are outside the logic.
- The optional second RAM for alternating buffering is not built. Nor are the faceplate LEDs or the spare lines, whose use is not defined.
- All byte codes, opcodes and framing are this design's own. They will need to match the backplane instruction set before use with real cards.

## Simulating

Every block has `tb/tb_<block>.sv`. Each prints `TB_RESULT checks=N failures=M` and stops itself via a watchdog. The testbenches are built with Verilator 5, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
  rtl/cc_pkg.sv $(ls rtl/*.sv | grep -v cc_pkg) tb/sram_model.sv tb/onewire_slave_model.sv \
  tb/ds18s20_model.sv tb/tb_clock_card.sv --top-module tb_clock_card
./obj_dir/Vtb_clock_card +verilator+rand+reset+2
```

A block testbench needs only `rtl/cc_pkg.sv`, its module, plus `tb/sram_model.sv` for the loader and the frame buffer, `tb/onewire_slave_model.sv` (a 1-Wire device answering Read ROM) for the ID reader, and `tb/ds18s20_model.sv` (the sensor, with conversion and scratchpad) for the temperature monitor. The block testbenches use small sizes where the defaults would be slow: a 300-byte maximum image, and 64-byte frames in 4 slots. `tb_clock_card` runs the whole card at its default sizes, in about a minute of simulation. It stores and shifts a full 1550 kB image bit for bit into a TAP model, fills all 409 frame slots and checks that the 410th frame is dropped, and stalls a frame request until the frame is complete. It also checks the DV marker and Sync period, and runs every reset, both directions of the power-card link, and the mode interlock. It reads both serial numbers and the card temperature from 1-Wire device models. It counts each of these mechanisms and fails if one never happened.
