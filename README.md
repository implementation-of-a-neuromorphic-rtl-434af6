# DANNA neuromorphic development platform — FPGA design

This is a SystemVerilog implementation of the FPGA side of a development
platform for DANNA (Dynamic Adaptive Neural Network Array). A host computer
sends commands over USB 3.0. A Cypress FX3 controller passes them on through
its 32-bit synchronous slave FIFO interface. On the FPGA, the commands program
and drive a grid of identical elements, and status packets go back to the host
the same way.

```
host ──USB──► FX3 ◄──slave FIFO, 32 bit, 100 MHz──► slave_fifo_fsm
                                                      │         ▲
                                              command FIFO   response FIFO
                                                      ▼         │
                                                   fifo_logic (words ⇄ commands/packets)
                                                      ▼         │
                                                   prog_interface
                                                      ▼         │
                                   clock_gen ─► danna_array (ROWS x COLS danna_element) ◄─ prng
```

Everything runs on one 100 MHz clock (`clk`, active-low `rst_n`). The four
array clocks are produced as clock enables, and as square waves for
observation only. They are:
- GNC: global network clock, one network cycle;
- AFC: acquire-fire clock, one input sample;
- AEC: accumulator enable clock, the AFC shifted by 90°;
- AC: accumulator clock.

## Files

| file | contents |
|---|---|
| `rtl/danna_pkg.sv` | sizes, opcodes, command/packet/config types |
| `rtl/danna_top.sv` | top level: FX3 pins, FIFOs, FIFO logic, programming interface, array |
| `rtl/slave_fifo_fsm.sv` | FX3 slave FIFO state machine |
| `rtl/sync_fifo.sv` | first-word-fall-through FIFO with programmable flags, used for both FIFOs |
| `rtl/fifo_logic.sv` | 9 words → one 36-byte command; one 64-byte packet → 16 words |
| `rtl/prog_interface.sv` | command decoder, run/halt/step control, time stamp, packet builder |
| `rtl/clock_gen.sv` | AC/AFC/AEC/GNC timing |
| `rtl/prng.sv` | 63-bit LFSR choosing the first input port of each network cycle |
| `rtl/danna_array.sv` | the element grid, its 16-neighbour wiring, external I/O, monitor chains |
| `rtl/danna_element.sv` | one element: neuron or synapse |
| `tb/fx3_model.sv` | behavioural FX3 slave FIFO (testbench only) |
| `tb/tb_*.sv` | one self-checking bench per module, plus `tb_danna_top_full` |

Default size: a 47 × 47 array (2,209 elements). This was the largest that
fit a Virtex-7 690T. Change `ROWS` and `COLS` on `danna_top` for other sizes.
The limits are 255 rows (8-bit row address) and 120 columns. A 75 × 75 array
needs a parameter change, and it is far too large for a 690T.

## The element

Each element is either a neuron or a synapse, chosen at load time. It has 16
input ports:
- 0–7: the 8 neighbours N, NE, E, SE, S, SW, W, NW;
- 8–15: the elements two steps away in the same eight directions.

It has one broadcast output, made of a fire bit and an 8-bit value.

A network cycle has 16 AFC slots. In slot *k* every element samples port
`(start + k) mod 16`, if that port is enabled. `start` comes from the LFSR and
is the same for all elements. Outputs only change at the end of a cycle, so
the sampling order cannot change the result. It only spreads the work the way
the original hardware did.

**Neuron.**
- Charge accumulates in a saturating signed 16-bit register.
- The neuron fires at the end of the cycle if the charge went above the
  threshold, unless it fired in the previous cycle.
- After firing it is refractory for one cycle. It can still accumulate
  during that cycle.
- Firing resets the charge to 0 and sends the threshold as the output value.
- A threshold of −1 makes a neuron that fires every other cycle. The
  testbenches use it as a spike source.

**Synapse.**
- An incoming fire enters a 16-bit shift register that moves once per cycle.
  If the fire is sampled in cycle *j*, the synapse fires with its weight in
  cycle *j + distance* (distance 0 behaves as 1).
- The synapse watches the neuron on its *output select* port.
  - If that neuron fires in the cycle right after the synapse fired, the
    weight goes up by 1 (potentiation).
  - If that neuron fires at any other time, the weight goes down by 1
    (depression).
- After a weight change, the weight is frozen for the programmed refractory
  count.

**Monitoring.** Each element has a 32-bit monitor register:
- the charge (16 bits; for a synapse, its weight);
- the fires since the last capture (8 bits);
- the fires waiting in the delay line (8 bits).

A Capture command loads every monitor register at once. Each Shift command
moves every column's chain up by one bit. The bit leaving the top of column
*c* goes into the status packet. Reading the whole array takes
1 + 32 × ROWS commands.

External inputs and outputs:
- External input *r* (0–31) drives the west port (port 6) of element (*r*, 0).
- External output *r* is element (*r*, COLS−1).

## Commands and packets

A command is 36 bytes. Byte 0 is the one-hot opcode. On the wire, byte 0 is
bits 31:24 of the first 32-bit word.

| opcode | command | operands |
|---|---|---|
| 01 | Load | b1 row, b2 column, b3 LTP/LTD refractory, b4 bit 4 = synapse and bits 3:0 = output select, b5 threshold or weight (signed), b6 distance, b7–b8 input enable (little-endian) |
| 02 | Halt | — |
| 04 | Run | — |
| 08 | Step | b1–b4 cycle count, little-endian |
| 10 | Fire | b1–b32 charge for inputs 0–31, where 0 means no fire |
| 20 | Reset | clears the array, the LFSR and the time stamp |
| 40 | Capture | — |
| 80 | Shift | — |

Any other opcode is a no-op. A no-op still takes a network cycle while
running, so the host can place fires at exact cycles.

A status packet is 64 bytes, sent as 16 words:

| bytes | contents |
|---|---|
| 0–7 | time stamp (executed network cycles since reset), little-endian |
| 8–39 | value of each external output that fired this cycle, 0 otherwise |
| 44–59 | shift bits: column *c* is byte 44 + *c*/8, bit *c* mod 8 |
| 61 | bit 0 = shift packet, bit 1 = halted (end-of-file) |
| 62–63 | configuration ID, 0x43 0x21 |

A packet is sent:
- when an external output fires;
- when a Halt executes or a Step finishes;
- for every Shift.

One packet can carry several of these.

## The hard parts

### Cycle-accurate command flow (prog_interface)

The programming interface decides at the first clock of every network cycle.
It has three modes.
- **Halted:** it executes at most one waiting command per cycle. The network
  does not advance.
- **Running:** every cycle consumes exactly one command, and the network
  advances with it. If the command FIFO is empty, the network *stalls* for
  that cycle instead of running ahead. A network cycle and a command stay
  paired even when USB delivery is uneven. The time stamp only counts cycles
  that actually ran.
- **Stepping:** the network advances N cycles without reading commands, then
  halts and reports.

A packet that the FIFO logic has not yet taken pauses the interface. While it
waits, nothing advances and no command is read. Responses are never dropped.
The cost is that a host that stops reading will stop the network. This
backpressure is the reason for the deadlock fix described below.

### FX3 slave FIFO state machine (slave_fifo_fsm)

The nine states are IDLE, READ_FLAG, WAIT_WM, READ, READ_RDOE_DLY,
READ_OE_DLY, WAIT, WRITE_FLAG and WRITE, numbered 0–8. The `fsm_state` output
shows the current state.

The host-to-FPGA direction uses two GPIF sockets:
- socket 3: flags C/D, address 11;
- socket 1: flags E/F, address 01.

The FX3 fills the two sockets' 512-byte DMA buffers alternately. The FSM must
read them in the same order, or commands arrive scrambled. After reading a
buffer from one socket, it accepts only the other socket. If nothing arrives
for `TIMEOUT` clocks (default 100,000, which is 1 ms), it goes back to a
neutral choice and takes whichever socket is ready.

This time-out is meant for the gap between runs. If the host leaves a buffer
waiting in *both* sockets across a time-out, the order is ambiguous. Socket 3
is then taken first.

Reads have priority over writes. A buffer is only started when the command
FIFO has room for all 128 words of it (`WAIT_WM`), so a read burst never has
to stop halfway.

The deadlock fix: the command FIFO only drains while the network can run, and
the network can only run while status packets can leave. So while parked in
`WAIT_WM`, the FSM leaves to send a waiting packet on socket 0 (address 00,
flags A/B), then returns to the same socket. A packet is 16 words, with
PKTEND# on the last word.

The FX3 read latency (SLRD# to data) is a parameter, `RD_LAT`, default 2.
The OE delay states line up SLOE# and data capture with it. The DQ bus is
split into `dq_in`, `dq_out` and `dq_oe`. The bidirectional pad buffer
belongs in the board wrapper.

`fifo_rst` (driven by an FX3 GPIO) empties both FIFOs, drops a half-received
command in the FIFO logic, and returns the FSM to IDLE with a neutral socket
choice. It does not touch the array. Use the Reset command for that.

### Clocking

`CLK_PER_AC = 6` gives these rates from 100 MHz:

| clock | rate | period in clocks |
|---|---|---|
| AC | 16.7 MHz | 6 |
| AFC | 8.3 MHz | 12 |
| GNC | 0.52 MHz | 192 (1.92 µs per network cycle) |

These are close to the original design's 16 / 8 / 0.5 MHz. The AFC slot has
a sample enable, and the accumulate enable falls in the AEC window a quarter
period later.

## Choices this design makes

The reference description leaves these open; each one is a parameter or sits
in one place:
- the LFSR polynomial (x^63 + x^62 + 1) and its seed;
- neuron bias 0;
- potentiation/depression step of ±1;
- a 4-bit synapse distance;
- the monitor field split;
- the byte positions inside the Load and Step commands;
- FIFO depths: 1024 command words, 512 response words;
- the socket time-out;
- the network stalling while a packet waits or no command is queued.

Not implemented:
- the FX3 firmware and the host software;
- the clocking wizard and the JTAG configuration;
- the per-row clock and LFSR structure used for the 75 × 75 prototype.

## Simulating

Every bench prints `TB_RESULT checks=N failures=M` and calls `$finish`. It
has its own watchdog. Plain Verilator 5 is enough:

```
verilator --binary --timing -Wno-fatal --top-module tb_danna_element \
    rtl/danna_pkg.sv rtl/danna_element.sv tb/tb_danna_element.sv
./obj_dir/Vtb_danna_element
```

Compile the package first, then the modules the bench needs. Passing all of
`rtl/*.sv` after `rtl/danna_pkg.sv` also works. The top-level benches also
need `tb/fx3_model.sv`:

```
verilator --binary --timing -Wno-fatal --top-module tb_danna_top \
    rtl/danna_pkg.sv rtl/clock_gen.sv rtl/prng.sv rtl/danna_element.sv \
    rtl/danna_array.sv rtl/sync_fifo.sv rtl/fifo_logic.sv \
    rtl/prog_interface.sv rtl/slave_fifo_fsm.sv rtl/danna_top.sv \
    tb/fx3_model.sv tb/tb_danna_top.sv
./obj_dir/Vtb_danna_top
```

`tb_danna_top` uses a 4 × 5 array. It goes through every command, LTP and
LTD, stepping, both stall conditions, watermark waits, the socket time-out
and `fifo_rst`. At the end it prints how often each mechanism was exercised.

`tb_danna_top_full` builds the default 47 × 47 design unchanged. Verilator
needs about four minutes to compile it. It runs one load / run / fire / halt
/ capture / shift sequence through the FX3 model.
