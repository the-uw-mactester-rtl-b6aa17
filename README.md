# A low-cost functional tester with on-line and off-line modes

This is synthesizable SystemVerilog for the digital part of a 128-pin
functional tester: a small box that sits between a personal computer's bus and
a chip or board under test (the DUT), and lets a test program on the computer
drive any pin, flip any pin's direction, and read all pins back. The tester
does not measure precise timing. It checks that the DUT produces the right
sequence of output values. A test program treats the DUT almost like a
subroutine: it sets input values, takes one step, and reads the outputs.

The tester works in two modes:

* **On-line.** Every vector goes from the host to the pins and back. The test
  program can compute each vector from the previous response. A vector costs
  a few dozen host bus transfers, so the rate is set by the host, which suits
  static circuits.
* **Off-line.** The host first stores a block of vectors in the tester's own
  test vector memory (up to 5461 vectors). The tester then runs the block
  unattended at 13 bus clocks per vector (about 770,000 vectors per second at
  the Mac's 10 MHz bus clock) and stores each response in the memory beside
  its vector. This keeps dynamic circuits alive: they lose state if they are
  not clocked often enough.

A simple form of speed test comes with both modes. After a vector reaches the
pins, the pins are sampled after a delay that the program sets: a coarse part
in whole bus clocks plus a fine part of 12 ns steps.

## The pin data path: three register levels

Each of the 128 pins has a value bit and a direction bit (1 = the tester
drives the pin). These bits pass through three levels of registers:

| level | what it holds | written by | when |
|---|---|---|---|
| 1 | value and direction, 4 x 64 bits | host (32 bits at a time) or sequencer (64 bits) | any time |
| 2 | value and driver enable, 2 x 128 bits | level 1, all bits at once | `xfer` pulse (the "step") |
| 3 | the level on each pin, 128 bits | the pins | delayed latch strobe |

Level 1 exists so that a vector can be built up over several narrow writes
and then reach all 128 pins in the same clock edge. This matters for
bidirectional buses. A pin can change from driven to released in the same
step in which the DUT starts to drive it.

The internal bus is 64 bits wide. Pin `p` and pin `p+64` both hang on bus
bit `p % 64`. The level-1 registers are therefore pin values 0..63, values
64..127, directions 0..63 and directions 64..127. The data path is cut into
six `pin_slice` instances, of 11, 11, 11, 11, 11 and 9 bus bits (22 or 18
pins each). That is the split the original spread over six small FPGAs, each
handling 22 pins and 11 bus bits.

Reset clears every level, so after reset every pin is high impedance.

## Timing of one step and the delayed latch

```
bus clk      _|‾|_|‾|_|‾|_|‾|_|‾|_
xfer         ‾‾‾|___                 (sampled at edge E0)
pins              X new vector       (level 2 loads at E0)
trig              (count=0) or count clocks after E0, one cycle wide
latch_clk         trig + (tap+1) x 12 ns    -> level 3 captures pin_in
l3_valid          one clock after trig
```

`coarse_delay` counts `count` bus clocks from E0, then raises `trig` for one
cycle. With `count = 0`, `trig` rises at E0 itself. `fine_delay` passes
`trig` through a chain of eight 12 ns buffers, and a multiplexer picks the tap
output that clocks level 3. The longest tap (96 ns) is shorter than a 100 ns
bus clock. The logic relies on this: level 3 counts as valid one bus clock
after `trig`. If you port the design to a faster clock, shorten the chain.

`fine_delay` is a behavioural model (continuous assignments with `#` delays).
In hardware it is a chain of real gates. Its delay cannot be synthesised from
RTL, so a real build must replace it with placed delay cells or a
vendor delay primitive. All other modules are ordinary synchronous logic on
the bus clock, except that the level-3 flip-flops are clocked by
`latch_clk`.

## Off-line sequencing and the vector memory layout

The vector memory is eight 32K x 8 SRAMs side by side, 64 bits wide. A vector
takes six consecutive words:

| word | contents |
|---|---|
| 6k+0 | pin values 0..63 |
| 6k+1 | pin values 64..127 |
| 6k+2 | pin directions 0..63 |
| 6k+3 | pin directions 64..127 |
| 6k+4 | response, pins 0..63 (written by the tester) |
| 6k+5 | response, pins 64..127 (written by the tester) |

32768 / 6 gives 5461 vectors. `offline_sequencer` spends two bus clocks on
each memory access: an address cycle, then a cycle in which the data is used
or written. One vector takes 13 states:

```
RA0 RD0 RA1 RD1 RA2 RD2 RA3 RD3   read 4 words into level 1
XFER                              level 1 -> level 2, start the latch delay
WA0 WD0 WA1 WD1                   write the 2 level-3 words back
```

The address counter steps after every access, and the length counter steps
down once per vector. At zero the done bit is set. With a coarse delay of
`d` clocks, `WD0` waits for `l3_valid`, so a vector takes `13 + d` clocks. In
loop mode the counters reload at the end and the block repeats until a stop
command. This is meant for watching a sequence on an oscilloscope. A stop
ends the run after the current vector.

While the sequencer runs, it owns the internal bus and the memory. The host
can still read status but cannot touch the data path.

## Host interface and register map

The host port is a 16-bit word address, 32-bit write and read data, and
one-cycle `host_wr` / `host_rd` strobes, all on the host's bus clock. The
tester has no clock of its own. Read data appears in the cycle after
`host_rd`. Only `host_addr[7:0]` is decoded. The map (`mactester_pkg`):

| addr | access | meaning |
|---|---|---|
| 0x00-0x07 | W | level 1: `addr[2:1]` = values lo / values hi / dirs lo / dirs hi, `addr[0]` = upper 32 bits |
| 0x08-0x0B | R | level 3: `addr[1]` = pins 64..127, `addr[0]` = upper 32 bits |
| 0x10 | W | command: bit 0 step, bit 1 start off-line run, bit 2 stop |
| 0x11 | R | status: 0 step busy, 1 running, 2 done, 3 level 3 valid, 31:16 vectors left |
| 0x12 | RW | delay: 7:0 coarse (bus clocks), 10:8 fine tap |
| 0x13 | RW | off-line start word address |
| 0x14 | RW | off-line vector count |
| 0x15 | RW | bit 0 loop |
| 0x16 | RW | vector memory pointer |
| 0x17 | RW | memory bits 31:0 at the pointer |
| 0x18 | RW | memory bits 63:32 at the pointer; the pointer then advances |
| 0x19 | RW | power: 0 direct FET, 1 indirect FET, 2 ready LED |
| 0x1A | R | sequencer's current word address |
| 0x1B | RW | burst option only: write 0 burst mode, 1 go; read 0 burst mode, 1 burst busy |
| 0x20-0x2F | R | burst option only: captured responses, `addr[3:2]` = vector, `addr[1:0]` = pins 32n..32n+31 |

One on-line step from the host: write the eight level-1 words, write the
step command, poll status bit 3, then read the four level-3 words.

Set `ISA_HOST = 1` on `mactester_top` for the PC version. There the host
reaches the tester only through 16-bit I/O ports (`isa_bridge`). Port 0 holds
the register address. Port 1 takes the low data half. A write to port 2
sends the full 32-bit write. A read of port 1 does the 32-bit read and
returns the low half, and a following read of port 2 returns the high half.
In this mode, `host_addr[1:0]` is the port and the data uses bits 15:0 of
`host_wdata` / `host_rdata`.

## DUT power

Power to the DUT is switched in software. `dut_power_ctrl` drives the gates
of two power FETs: direct power, and indirect power through an
ammeter-friendly path. It also drives a "ready" LED and a "DUT powered" LED.
The FET outputs are flip-flops cleared by reset, so a tester in reset never
powers the DUT. Asking for both FETs at once turns both off. Small DUTs can
instead be powered from ordinary pins by driving a pin high for VCC and one
low for GND. The counter workload bench does this.

## Optional high-speed bursts

`burst_pipeline` is the extension that deepens levels 2 and 3. The host
pushes `DEPTH` vectors (default 4) into a level-2 pipeline, one per `load`.
A `go` pulse hands the burst to a separate burst
clock `fclk` (up to 40 MHz). On successive `fclk` edges the stages reach the
pins, first pushed first. The level-3 pipeline captures the pins on the edge
that presents the next vector, so each vector gets exactly one burst period.
After the last capture, `busy` falls in the bus clock domain, and the host
reads the captures at its own pace through `rd_idx` / `resp`. The request
and done signals cross between the two clocks as toggles through two-flop
synchronisers. The stages and captures do not change while they are read
in the other domain. The last vector stays on the pins after a burst.

`mactester_top` includes the block when `BURST_DEPTH` is above 0 (at most
4 with this register map). The default is 0, the tester as built, and then
the `fclk` input is unused. Writing 1 to register 0x1B turns burst mode on.
From then on every level-2 transfer also pushes the new level-2 vector into
the burst stages, whether it comes from an on-line step or from an off-line
run. Meanwhile the pins show the burst stages, not level 2, so loading
does not disturb the device. Writing 3 starts the burst. Poll bit 1 of 0x1B
until it clears, then read the captures at 0x20-0x2F. Writing 0 to 0x1B
gives the pins back to level 2.

## Scaling

A deeper vector memory (larger RAM chips) is one constant: `MEM_AW` in
`mactester_pkg`. It sets the depth of each SRAM model and the width of every
word address: host pointer, off-line start address and sequencer counter.
The 16-bit vector count allows up to 65535 vectors per run, enough for
`MEM_AW` up to 18. Only the default of 15 is simulated. More pins, in steps
of 64 pins per 32 bits of internal bus, would need a wider bus, more data
path slices and more memory chips, and a new level-1/level-3 register map.
This design does not parameterise that.

## Files

| module | role |
|---|---|
| `mactester_pkg` | sizes, register map, `bus_ctrl_t` (one cycle of bus control) |
| `mactester_top` | wiring: host port, control, bus multiplexer, memory, data path, power |
| `host_regs` | host register decode; produces `bus_ctrl_t` in on-line mode |
| `offline_sequencer` | 13-state off-line machine; produces `bus_ctrl_t` while running |
| `coarse_delay` | latch delay in bus clocks |
| `fine_delay` | behavioural 8-tap buffer chain |
| `pin_datapath`, `pin_slice` | the three register levels for 128 pins |
| `test_vector_memory`, `sram_32kx8` | 32K x 64 vector memory of eight byte-wide chips |
| `dut_power_ctrl` | FET gates and LEDs |
| `isa_bridge` | 16-bit port to 32-bit access composition (PC host) |
| `burst_pipeline` | optional deeper level-2/level-3 pipeline for 4-vector bursts at up to 40 MHz |

The top muxes `bus_ctrl_t` from `host_regs` or `offline_sequencer`, and
drives the 64-bit bus from the host data, the memory or level 3. Two
assertions in the top check that the memory is never read and written in
one cycle and that at most one level-1 register is written per cycle.

Pins leave the top as three vectors: `pin_out` (value), `pin_oe` (driver
enable) and `pin_in` (the level on the pin). The tri-state pads themselves
are outside the RTL.

## Simulation

Every testbench in `tb/` checks itself and ends with
`TB_RESULT checks=N failures=M`. Build and run one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv -Irtl --top-module tb_mactester_top \
  rtl/mactester_pkg.sv tb/tb_mactester_top.sv -o sim
obj_dir/sim
```

| testbench | what it runs |
|---|---|
| `tb_<module>` | one per module, against an independent model |
| `tb_mactester_top` | the full-size tester end to end (defaults): on-line multiplier, coarse and fine latch delay against 250 ns and 40 ns device outputs, a bidirectional pin handed to the device, a dynamic pipelined multiplier that fails on-line and passes off-line, off-line rate (13 clocks/vector), the 13 + d stall, loop and stop, power switching, the last of the 5461 vectors; it counts each mechanism and fails if one never happened |
| `tb_mactester_top_isa` | the PC configuration through 16-bit ports |
| `tb_workload_multiplier` | all 65536 products of an 8x8 multiplier on-line; then a two-phase-clocked dynamic pipelined multiplier, off-line, in 256 blocks of 1032 vectors (generate pass, run, verify pass) |
| `tb_workload_counter` | a 4-bit synchronous counter chip powered from tester pins, synchronised by clear, loaded with hex A and driven with random controls against a software counter; then the same chip made dynamic (its count leaks away 10 us after a clock), which fails a plain on-line step after a pause and passes when every step replays all vectors since the reset off-line and reads only the last response |
| `tb_mactester_top_burst` | the tester with `BURST_DEPTH = 4`: bursts loaded by on-line steps and by off-line runs, read back through the host port, with fast and slow devices |
| `tb_workload_selftest` | the start-up memory self-test over all 32768 words: an address-derived pattern and its inverse, through the host port |
| `tb_workload_session` | a session with a hand-wired board: pins released at reset, ready LED, power and ground self-test (a miswired board must fail it), power before the first driven pin, pins released before power off |
| `tb_burst_pipeline` | 4-vector bursts at 40 MHz: order and 25 ns spacing on the pins, responses from a 10 ns device (captured) and a 30 ns device (one vector late) |

Each runs in seconds. The simulator is two-state, so benches initialise what
they read.

## What follows the original and what does not

Taken from the original design: 128 bidirectional pins with a direction bit
per pin per vector; the three register levels; the 64-bit internal bus with
32-bit host transfers on one half; eight 32K x 8 SRAMs and six words per
vector (about 5400 vectors); 13 states per off-line vector (770K vectors/s at
10 MHz); the address and length counters, done bit and loop mode; the
coarse delay in bus clocks and the fine delay in 10-15 ns steps, both
settable per vector on-line and once per block off-line; six 11-bit data
path slices; two power FETs that cannot conduct when the controller is not
running; the ready and DUT-power LEDs; the PC card composing two 16-bit port
accesses into one 32-bit access.

The high-speed burst (deeper levels 2 and 3, 4 vectors, up to 40 MHz) is
described in the original as a possible extension. It is built here as an
option of the top that is off by default.

Choices made here, where the original gives no detail: the register map and
every encoding; the host port handshake; the bit-to-pin assignment; the order
of the six words of a vector; the split of the 13 states; the 8 x 12 ns fine
delay chain; an 8-bit coarse counter; reset values; stalling the sequencer
for coarse delays longer than zero; stop after the current vector; turning
both FETs off when both are requested; the ISA port numbering; how burst
vectors are loaded, clocked and read back.

Not included:

* The NuBus and ISA bus protocols on the host cards.
* The cable, the ZIF socket with its package mappings (host software tables),
  the pads, FETs and power supply.
* The host-side C library (`Set`, `Get`, `Next`, the generate/verify passes),
  which the testbenches imitate.
* Reporting high-impedance DUT pins to a schematic simulator. The original
  mentions this, but the hardware only samples pin levels, and how such pins
  would be detected is not described.
* More pins than 128. See "Scaling".
* Internal data bus tri-states. A multiplexer replaces them.
