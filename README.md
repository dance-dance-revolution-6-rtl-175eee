# A Dance Dance Revolution game machine on one FPGA

This is the hardware of a dance game console built around a small RISC
processor. A player steps on a ten-button dance mat while the machine shows
arrows on a VGA monitor and plays music through an AC97 audio codec. The
game itself is software. It runs on a 32-bit **Beta** CPU (the MIT 6.004
instruction set), and the CPU reaches everything else through one shared
memory bus. The other hardware units are peripherals around that bus and
its RAM:

| unit | what it does | how it meets the rest |
|---|---|---|
| Beta computer (`betaputer`) | runs kernel and game; 100 Hz timer interrupt | owns the shared bus by default |
| pad controller | samples the 10 mat buttons into a RAM word | bus device 3; granted the bus by software |
| video unit | shows a 320x240, 15-bit colour frame buffer as 640x480 VGA | reads RAM through a second, read-only port |
| audio unit | AC97 link: pass-through, record to flash, play from flash | play line from a CPU output register |
| flash controller | erases, programs and reads an Intel 28F128J3A flash | requests from the audio unit |

Everything is synchronous SystemVerilog-2017 with a synchronous, active-high
reset. The system clock is 27 MHz; only the AC97 frame logic runs on the
codec's 12.288 MHz bit clock. The top module is `ddr_system`.

## The shared bus and cooperative arbitration

This is the unusual part of the design, and the part everything else depends
on.

There is one bus to the RAM: 2 strobe bits (read, write), a 22-bit byte
address and 32 data bits, 56 bits in all. In RTL it is a packed struct,
`ddr_pkg::bus_req_t`, and every master presents one. `shared_bus` passes on
the request of the master that holds the grant, using an AND-OR mux
selected by a one-hot `dev_en` vector, so there are no internal tri-states.
The RAM controller answers every master on a common response struct
(`bus_rsp_t`: a one-cycle `done` strobe and the read data).

Arbitration is **cooperative and software-driven**. No hardware decides who
goes next:

1. After reset the CPU (device 0) owns the bus.
2. Software hands the bus to device *k* by storing *k* to the **bus access
   vector** (BAXv), the address `0x7FFFFFFF`. The CPU's bus client
   intercepts that store. It never reaches the bus. Instead it sends *k* to
   `bus_arbiter` with a one-cycle `baxv_chg` pulse.
3. The arbiter moves the one-hot grant to device *k*. The CPU's store is
   held: the bus client waits until its own grant has gone away and come
   back. So the instruction after the BAXv store runs only when the device
   has finished. Any CPU memory access made while another device owns the
   bus simply waits, including instruction fetches. That is the CPU stall.
4. The device uses the bus as long as it likes and then raises its
   `dev_yield` line. The grant returns to the CPU.

A second intercepted address, `0x7FFFFFF0`, loads a 4-bit **direct output**
register instead of memory. Bit 2 of it is the audio unit's *play* line.

The kernel's 100 Hz timer handler is what drives this. On each tick it
stores 3 to BAXv. The pad controller, seeing the rising edge of its grant,
writes the synchronized buttons to the word at `PAD_ADDR`, waits seven
cycles for the RAM controller, yields for two cycles and stalls for two.
The CPU then carries on. `pad_controller` asserts that it never drives the
bus after it has yielded.

## The Beta CPU

`beta_cpu` is a multicycle, unpipelined implementation of the 6.004 Beta.
It has 32 registers (R31 reads as zero), OP and OPC ALU instructions (add,
sub, mul, div, compares, logic, shifts), LD, ST, LDR, JMP, BEQ and BNE.
Memory is unified, byte-addressed and little-endian.

`beta_ctrl` steps through four stages per instruction:

- IFETCH: fetch into the instruction register.
- REGACCESS: read the registers and compute in the ALU.
- MEMOP: loads and stores only.
- WRITEBACK: write the register file and load the next PC.

`beta_bus_client` turns fetches and memory operations into bus transactions.
It issues a one-cycle strobe and waits for `done`, so any memory latency
works. With the 3-cycle RAM controller, an ALU instruction takes 8 cycles
and a load or store 14.

**Supervisor mode and interrupts.** PC bit 31 is the supervisor bit:

- Reset starts at `0x80000000` in supervisor mode.
- A JMP keeps bit 31 only if both the current PC and the target have it
  set. So user code cannot enter the kernel, and `JMP(XP)` leaves it.
  Branches keep the current mode.

Interrupts follow these rules:

- An interrupt request is latched and held until it is served. The
  highest-numbered line wins.
- It is served only in user mode, after the WRITEBACK of an instruction
  that is not a branch or jump.
- Serving it saves the address of the next instruction in XP (R30) and
  jumps to `0x80000000 + 4*id` in supervisor mode.

`clock_irq` pulses every `CLK_HZ/IRQ_HZ` = 270,000 cycles. It drives lines 0
and 7, so the timer has the top priority and its vector is `0x8000001C`.
Lines 6..1 are external inputs of the top.

**Cache.** `beta_dmcache` is a 512-line, direct-mapped, write-through cache.
Each line holds a 21-bit tag and a 32-bit word:

- A read hit is ready two cycles after the request.
- A write invalidates the line and goes through to the bus.
- A BAXv store clears the whole cache, because another master may then write
  RAM behind the CPU's back.

It is built and tested but **off by default** (`beta_cpu #(.USE_CACHE(0))`).
With the RAM on chip, a cache built from the same block RAM buys nothing.

## RAM controller and memory map

`sysram_busintf` puts a 56,320 x 32-bit dual-port block RAM (`sysmem_dp`,
225,280 bytes) on the bus:

- Reads and writes both answer with `done` three cycles after the strobe.
- A read at an unaligned address reads two neighbouring words and returns
  the four bytes starting at that address, little-endian.
- Writes are word writes; the two low address bits are ignored. Software
  must not store unaligned.
- Port B of the RAM is a read-only port for the video unit, so the display
  never competes for the shared bus.

| address | use |
|---|---|
| `0x00000` | reset and interrupt vectors (`0x80000000 + 4*id`; bit 31 is ignored by memory) |
| `0x06000` | pad word (`PAD_ADDR`, ten button bits) |
| `0x117F0` | frame buffer (`FB_BASE`, word `0x45FC`), 320x240 pixels, 38,400 words |
| `0x37000` | end of RAM |
| `0x7FFFFFF0` | direct output register (intercepted store) |
| `0x7FFFFFFF` | bus access vector (intercepted store) |

## Video

`video_module` has two timing FSMs and a pipeline:

- `vga_vsync` (major) steps through front porch, sync, back porch and the
  active lines. It starts each active line.
- `vga_hsync` (minor) steps through the active region and then front porch,
  sync and back porch, on a 640 + 16 + 96 + 48 clock line. Frames are 480 +
  10 + 2 + 33 lines, 800x525 clocks, about 51 Hz at 27 MHz.

Each 32-bit word holds two pixels: bits 31:17 and 15:1, 5 bits per colour.
Each pixel is shown for two clocks and on two lines, so a 320x240 buffer
fills 640x480. One word covers four clocks:

- The word address `fb_base + (line/2)*160 + column/4` goes out and is held
  for the group.
- The word is taken at the group's last clock. That tolerates a RAM read
  latency of up to two cycles.
- Word *g* is shown during group *g+1*. Blank, colour and syncs travel down
  the same delay line, so they stay aligned with it.

The syncs get two more clocks of delay than colour and blank, to match the
DAC's pipeline.

## Audio (AC97)

`audio_module` holds three bit-clock units and the crossings to the system
clock.

**`ac97_controller`** counts the 256 bits of each frame, from 0 to 255. It
raises `sync` for counts 0..15 and picks a mode once per received frame:

| mode | selected by | per frame |
|---|---|---|
| pass-through | neither | received samples are sent straight back |
| play | CPU direct output bit 2 | latest flash sample goes to both channels; next one is requested; each rising edge of *play* restarts from the first sample |
| record (wins) | `record_sw` | upper 16 bits of the left sample go to the flash; output is silent |

**`ac97_frame_rx`** samples the codec's serial data on the falling edge. It
takes the valid tags, the slot-request bits (active high) and the two 20-bit
PCM slots at fixed counts. It presents a frame's contents at the next
frame's sync.

**`ac97_frame_tx`** drives serial data on the rising edge:

- the slot 0 tags;
- the command address and data (slots 1 and 2);
- PCM left and right (slots 3 and 4), marked valid only when the codec asked
  for them.

The first nine frames after reset carry the codec set-up writes:

| frame | register | value | effect |
|---|---|---|---|
| 0 | 0x02 | 0x0000 | unmute line out |
| 1 | 0x04 | 0x0000 | unmute headphones |
| 2 | 0x0C | 0xFFFF | mute line in to mix 2 |
| 3 | 0x0E | 0xFFFF | mute the mic |
| 4 | 0x10 | 0xFFFF | mute line in to mix 1 |
| 5 | 0x1A | 0x0404 | record select = line in |
| 6 | 0x1C | 0x0000 | record gain 0 dB |
| 7 | 0x18 | 0x0808 | DAC output level |
| 8 | 0x20 | 0x8000 | bypass 3D |

After that, every frame reads the vendor-ID register (0x7C), which changes
nothing.

**Clock crossings.**

- *play*, *record* and the reset pass into the bit-clock domain through two
  flip-flops each.
- Flash requests are single pulses. They cross in both directions through
  `pulse_sync`, a toggle flip-flop plus three destination flip-flops.
- The data that goes with a request is held in a register that is stable
  for a whole frame, long before and after its pulse arrives.

## Flash ROM controller

The flash controller has two layers.

**`flash_minor_fsm`** drives the chip's pins for one operation at a time:

| operation | chip cycles |
|---|---|
| erase block | write 0x20, write 0xD0, wait for STS low then high |
| program word | write 0x40, write the data, wait for STS |
| read-array mode | write 0xFF |
| read word | CE# and OE# low for 16 clocks, then take the data |

A chip write cycle is 8 clocks:

- CE# goes low for one clock.
- WE# goes low for five clocks, with the data driven for the last four.
- Two clocks of recovery follow.

**`flash_rom_controller`** sequences the minor FSM:

- It erases all 128 blocks in turn, selected by the top 7 bits of the word
  address.
- It programs and reads words in order through a pointer that *start* resets.
- It issues the read-array command before a read whenever the previous
  operation was not a read. After an erase or a program the chip returns its
  status register, not data.
- Requests that arrive while it is busy are dropped. A word program takes
  about 200 µs on the real chip, so recording keeps roughly 4-5k samples per
  second. Playback, at one read of about 1 µs per frame, keeps up with the
  48 kHz frame rate.

## Where this design departs from the original project

The original 6.111 project documents these units. This RTL makes the
following choices of its own:

- **No tri-states.** The bus is a struct and a one-hot mux.
- **RAM latency.** The CPU's memory latency is 6 cycles from fetch request
  to ready, against 7 quoted for the original.
- **Pad write strobe.** The pad controller uses the bus *write* strobe to
  store its sample. The original description speaks of pulsing the read line.
- **Interrupt lines.** The timer drives lines 0 and 7 (top priority).
  Priority by highest line number is a choice.
- **VGA porches.** The porch and sync lengths are the standard 640x480 ones.
  Row = line/2 gives the pixel doubling the original describes.
- **Audio clocking.** The audio frame logic is entirely in the bit-clock
  domain, with explicit synchronizers. The original loaded transmit data on
  the system clock.
- **Recorded channel.** Recording keeps the left channel's upper 16 bits.
- **Chosen values.** `PAD_ADDR` (0x6000) and the play bit (2) are choices.
  The frame-buffer address is the original software's.
- **Cache.** It is off by default. The invalidate-on-BAXv rule is new.
- **Video memory path.** The video unit reads the frame buffer through the
  RAM's second port. The original only planned to grant the video unit the
  shared bus from the timer handler, at about 40 Hz.
- **Recording rate.** The original flash controller managed only two or
  three recorded samples per second. This one is limited by the chip's
  program time, so it keeps up with a 4 kHz recording rate.
- **Read-array mode.** The original needed a separate signal to put the chip
  in read-array mode. Here the controller issues that command itself before
  a read whenever it is needed.

Not built as logic: the codec, the video DAC, the flash chip and the dance
mat are external parts, and the game software is software. The testbenches
model the codec and the flash chip behaviourally.

## Files

`rtl/` holds one module or package per file:

| file | role |
|---|---|
| `ddr_pkg.sv` | bus structs, opcodes, ALU codes, special addresses |
| `ddr_system.sv` | top |
| `betaputer.sv` | CPU + arbiter + bus + RAM controller + timer |
| `beta_cpu.sv` | datapath |
| `beta_ctrl.sv` | control FSM |
| `beta_alu.sv` | ALU |
| `beta_regfile.sv` | register file |
| `beta_bus_client.sv` | bus client |
| `beta_dmcache.sv` | cache |
| `bus_arbiter.sv` | arbiter |
| `shared_bus.sv` | bus |
| `sysram_busintf.sv` | RAM controller |
| `sysmem_dp.sv` | RAM |
| `clock_irq.sv` | timer |
| `pad_sync.sv`, `pad_controller.sv` | pad |
| `video_module.sv`, `vga_vsync.sv`, `vga_hsync.sv` | video |
| `audio_module.sv`, `ac97_controller.sv`, `ac97_frame_rx.sv`, `ac97_frame_tx.sv`, `pulse_sync.sv` | audio |
| `flash_rom_controller.sv`, `flash_minor_fsm.sv` | flash |

`tb/` holds one self-checking testbench per module (`<module>_tb.sv`),
plus these helpers:

| file | role |
|---|---|
| `beta_asm_pkg.sv` | Beta instruction encoders for hand-written test programs |
| `ddr_kernel.svh` | small test kernel: timer handler, frame-buffer fill, play control |
| `ac97_codec_model.sv` | behavioural AC97 codec |
| `flash_chip_model.sv` | behavioural 28F128J3A, with STS timing and protocol checks |

Each testbench prints `TB_RESULT checks=N failures=M`, has a watchdog, and
checks the cycle counts that matter:

- 8-cycle ALU instruction;
- 3-cycle RAM answer;
- 2-cycle cache hit;
- 16-clock flash read;
- 270,000-cycle timer period;
- VGA line and frame lengths.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module ddr_system_tb rtl/ddr_pkg.sv tb/beta_asm_pkg.sv tb/ddr_system_tb.sv
./obj_dir/Vddr_system_tb
```

Any other testbench runs the same way, with its name in place of
`ddr_system_tb`.

**`ddr_system_tb`** runs the whole machine at reduced size: a 50-µs timer,
a 64x16 raster and two flash blocks. The test kernel runs, and the
testbench drives the erase and record switches. It counts each mechanism
and fails any that never happens:

- timer interrupts;
- pad grants, yields and stored samples;
- no instruction retired while the pad owns the bus;
- the unaligned read;
- video frames showing only the painted lines;
- flash erase and programs;
- pass-through audio;
- playback that matches the recording.

**`ddr_system_full_tb`** runs the same scenario with the top at its real
parameters: 27 MHz, 100 Hz, 640x480, the 56,320-word RAM and all 128 flash
blocks. It covers about 0.6 million cycles, which includes two timer ticks,
one whole video frame and a whole-flash erase. It takes a few seconds.
