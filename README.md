# A 128-pin functional tester for interactive testing

This is the RTL of a low-cost functional tester: a board that sits between a
host computer and a device under test (a chip or a small board) and lets a
test program drive and sample up to 128 device pins one test vector at a
time. It checks the *values and sequence* of the device's signals, not their
timing, which makes it a debugging tool for teaching labs rather than a
production tester.

The central idea is the **test step**. A program sets any number of pins,
then issues a step: all new values reach the pins in the same clock, and a
programmable time later every pin is sampled. The program reads the sample
and decides what to do next, so testing can be fully interactive. Every pin
is bidirectional, and its direction is set per step just like its value, so
tri-state buses can be exercised and any project can be wired to any pin.

Interactive testing fails for circuits with dynamic state, which forget
their state if the clock pauses while the host thinks. For these the tester
also has an **offline mode**: vectors are downloaded into an on-board RAM
and played back without the host at about 830 thousand vectors per second,
with each response stored next to its vector for later upload.

## The three register levels

Each pin has three register levels (`pin_slice`):

| level | holds | written when |
|---|---|---|
| 1 | next value and next direction | by the host, or by the sequencer from RAM, at any time |
| 2 | value and direction on the pin | all pins at once, on the *drive clock* (`xfer`) |
| 3 | what the pin showed | all pins at once, on the *latch clock* (`latch`) |

Level 1 is a staging buffer. It lets the host set pins one 32-bit word at a
time without the device ever seeing a half-updated vector, and in offline
mode it lets the next vector be fetched from RAM while the current one is
still on the pins. The direction bit is 1 when the tester drives the pin (a
device input) and 0 when the pin is left to the device. Level 3 samples the
pin as it appears on the board, whatever the direction. So a pin the tester
drives reads back its own value.

The 128 pins are spread over six identical slices of 22, 22, 21, 21, 21 and
21 pins. This mirrors a build with one programmable-logic chip per slice.
`datapath` joins the slices and adds a word multiplexer. Through it, one
64-bit bus, shared by the RAM and the host, reaches the registers a word at
a time.

## Drive-to-latch delay

The interval from the drive clock to the latch clock is programmable from
20 ns to 1 µs in 5 ns steps (`drive_latch_delay`). It gives the device time
to settle. It also gives a crude speed test: shorten it until the device's
outputs are no longer ready. With the 5 ns system clock the setting is
simply a clock count, 4 to 200. Values outside that range are clamped.
Level 2 loads at the end of the drive cycle and level 3 at the end of the
cycle D clocks later, so the device sees stable inputs for exactly D × 5 ns.
A tester built from discrete parts could get the same effect by picking a
tap from a chain of gates with a multiplexer. Here it is a counter, which
keeps the design fully synchronous.

## Vector RAM and the six-way multiplexing

The vector RAM (`vector_memory`) is 32K words of 64 bits, meaning eight
byte-wide static RAM chips side by side. A vector takes 384 bits: 128 values,
128 directions and the 128-bit response. That is six RAM words, stored as a
record:

| word | contents |
|---|---|
| 0, 1 | pin values 63:0, 127:64 |
| 2, 3 | directions 63:0, 127:64 |
| 4, 5 | response 63:0, 127:64 (written by the tester) |

Vector *v* starts at word 6·*v*, so the RAM holds 5461 vectors. Because one
RAM serves all six words, each vector costs six RAM cycles. The alternative,
six times as many RAM chips in parallel, would cost one cycle per vector.
This trades speed for parts: with a 200 ns RAM cycle the tester could play
vectors at 5 MHz with 48 chips, and plays them at just under 1 MHz with 8.

The RAM model has a request/acknowledge port. The requester holds `req` and
the request (`mem_req_t`: write enable, address, data) steady until `ack`.
`ack` comes `ACCESS` − 1 clocks after the request was first seen. The next
request is taken the clock after `ack`. So back-to-back accesses take
`ACCESS` = 40 clocks (200 ns) each. An assertion checks that the request
stays steady.

## Offline sequencing

`vector_sequencer` runs a test from vector `START` to vector `END`:

1. **Preload:** read words 0–3 of the first vector into level 1.
2. **Drive:** pulse the drive clock. The vector is on the pins and the
   delay starts.
3. **Run:** while the delay runs, read words 0–3 of the *next* vector into
   level 1. Level 2 keeps the pins steady. Then wait for the latch clock.
4. **Write back:** store level 3 into words 4–5 of the current vector.
5. Go to step 2 with the next vector, or finish after `END`.

The period is therefore 6 × 40 + 2 = 242 clocks = 1.21 µs (826 kHz) for
any delay up to 161 clocks (805 ns). Longer delays stretch it. After `END`
the `done` bit is set. With `MODE.loop` set, playback restarts at `START`
after `END` and runs until a `STOP` command, which ends it after the current
vector and also sets `done`. A loop is handy for watching a sequence on an
oscilloscope.

An online step is the same sequence with the host in place of the RAM. The
host writes level 1 through the registers and issues `NEXT`. The sequencer
pulses the drive clock, and the latch clock follows D clocks later. The
host polls the step-busy bit and then reads level 3.

## Host register map

The host sees 32-bit registers on a simple synchronous port: `host_we`,
a 6-bit word address `host_addr`, `host_wdata`, and a combinational
`host_rdata`. The host must not be asked to wait, so every access completes
in one clock. Slow operations are started by a write and then polled.

| addr | name | access | meaning |
|---|---|---|---|
| 0x00 | CTRL | W | strobes: bit 0 NEXT (online step), 1 START (offline run), 2 STOP, 3 MEM_READ, 4 CLEAR_DONE |
| 0x00 | STATUS | R | bit 0 step busy, 1 offline running, 2 done, 3 RAM access pending |
| 0x01 | MODE | RW | bit 0: loop the offline sequence |
| 0x02 | DELAY | RW | drive-to-latch delay in 5 ns clocks (reset 4) |
| 0x03 | START | RW | first vector of the offline sequence |
| 0x04 | END | RW | last vector (START ≤ END < 5461 is the host's job) |
| 0x05 | MEM_ADDR | RW | RAM word address, +1 after every host RAM access |
| 0x06 | MEM_LO | RW | W: data 31:0 to write; R: data 31:0 last read |
| 0x07 | MEM_HI | RW | W: data 63:32, and starts the RAM write; R: data 63:32 last read |
| 0x08 | CUR_VEC | R | vector now (or last) on the pins |
| 0x09 | STEPS | R | latch clocks since reset |
| 0x10–0x13 | L1_DATA | RW | level 1 values, pins 31:0 first |
| 0x14–0x17 | L1_DIR | RW | level 1 directions (1 = tester drives) |
| 0x18–0x1B | L3_RESP | R | level 3 response |

Commands arriving while the sequencer is busy are ignored. While an offline
run is in progress, host writes to level 1 are dropped, and the RAM address
and data registers are frozen while a RAM access is pending. The host is
expected to poll STATUS before each of these.

Typical use:

* *Online step:* write the changed L1_DATA/L1_DIR words, write CTRL=NEXT,
  poll until STATUS bit 0 clears, then read L3_RESP.
* *Offline run:* for each vector, write MEM_ADDR = 6·v and then MEM_LO/MEM_HI
  four times, polling STATUS bit 3 after each HI. Write START, END and MODE,
  write CTRL=START, and poll for done. Upload words 6·v+4 and 6·v+5 with
  MEM_READ.

## Top level and ports

`mactester` connects `control_unit` (host registers, sequencer and delay),
`datapath` and `vector_memory`. Its ports are:

* `clk` (5 ns) and `rst_n` (asynchronous, active low). Every register
  resets to 0, so no pin is driven after reset.
* The host port described above.
* `pin_o[127:0]`, `pin_oe[127:0]` and `pin_i[127:0]`. The board's tri-state
  buffers join these: `pin_oe` enables the buffer driving `pin_o` onto the
  pin, and `pin_i` is the pin's level.
* `running` and `done`, copies of the status bits.

What is not in the RTL: the pin buffers, the jumpers that route power and
ground to the device, the interface card in the host, and the host software.
The test-program layer (set signal, next, get signal, dynamic blocks) lives
in the host. The testbenches contain a small model of it.

## Where this design fills in detail

The overall structure follows the tester as published. That covers the 128
bidirectional pins and three register levels, the six datapath slices and
the separate control logic, and the 20 ns – 1 µs delay in 5 ns steps. It
also covers the RAM multiplexed six ways over eight chips, the start/end
addresses, the done bit, loop playback, and a rate just under 1 MHz. The
following are this design's own choices:

* the 5 ns system clock, and the 200 ns RAM cycle (40 clocks) derived from
  the 5 MHz unmultiplexed rate;
* the 64-bit RAM word, the 32K depth, and the record layout. The tester as
  published holds "about 5300" vectors; this one holds 5461;
* a clock counter instead of a tapped gate chain for the delay;
* fetching the next vector during the current vector's delay;
* the host port protocol, its 32-bit width and the register map;
* stop-to-end-loop, dropping commands while busy, and the reset values.

## Simulating

All RTL is in `rtl/` (package `tester_pkg` first). Every testbench in `tb/`
is self-checking and prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_mactester \
  -y rtl -y tb +libext+.sv rtl/tester_pkg.sv tb/tb_mactester.sv
./obj_dir/Vtb_mactester
```

| testbench | what it covers | run time |
|---|---|---|
| `tb_pin_slice`, `tb_datapath` | register levels, lanes, pin wiring, against a model | < 1 s |
| `tb_drive_latch_delay` | exact latch clock for settings 0–255, clamping | < 1 s |
| `tb_vector_memory` | data and access time at full depth | < 1 s |
| `tb_host_regs` | every register, strobes, RAM access protocol | < 1 s |
| `tb_vector_sequencer`, `tb_control_unit` | offline runs, 6-cycle period, loop and stop, online steps, arbitration | < 1 s |
| `tb_mactester` | whole tester at default sizes (see below) | ~1 s |
| `tb_workload_mult` | the multiplier test programs at full size | ~45 s |

`tb_mactester` and `tb_workload_mult` put behavioural devices on the pins.
The devices include a combinational 8×8 multiplier with a 37 ns delay, a
one-stage pipelined multiplier clocked by a two-phase non-overlapping clock
made of tester pins, and a register on a tri-state bus. They drive the tester
through the host registers the way test software would. The tests check
every product online. They show that a 20 ns delay latches the multiplier's
old output and a 40 ns delay its new one. They write and read back the bus
register by turning the bus around. They run the pipelined multiplier both
online and as offline "dynamic blocks" of 1290 vectors, which are generated,
downloaded, played, uploaded and then verified. A fourth device,
`tb_dyn_mult`, is the same multiplier with storage that leaks after 10 µs.
When each online step is as slow as host software (20 µs), its results go
wrong; the same program run as an offline block passes. They loop a short sequence
and stop it. The offline run time is checked to the clock. The workload
bench runs all 65536 products online and 64 of the 256 offline blocks; the
other blocks differ only in their data. It ends with one block of 5460
vectors, which fills the vector RAM.

To change sizes, edit `tester_pkg`. `PINS` must stay a multiple of 64, and
the RAM word must stay two host words.
