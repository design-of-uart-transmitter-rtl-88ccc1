# UART transmitter with a four-state controller

This is a synthesizable SystemVerilog UART transmitter. It takes a byte in parallel and
sends it on one wire as an asynchronous serial frame. The frame is a low start bit, eight
data bits (least significant first) and a high stop bit. No clock travels with the data,
so sender and receiver must agree on the bit period. Here the bit period comes from a
clock divider, the baud rate generator. A finite state machine with the states IDLE,
START, DATA and STOP walks through the frame. A shift register serialises the byte, and
a bit counter decides when the last data bit has gone.

The design follows a published description of an FSM-based UART transmitter. That
description names the blocks, the states and the frame format. It gives most blocks only
by their function, so the cycle-level behaviour below (handshake, latency, `done`,
reset) is this implementation's own. The section "Choices made here" lists those
decisions.

## The serial frame

```
 tx  ‾‾‾‾‾‾\_____/ d0 X d1 X d2 X d3 X d4 X d5 X d6 X d7 /‾‾‾‾‾‾‾‾‾‾‾‾‾‾\____ ...
            start                                        stop           next start
           |<-- 1 bit -->|<---------- 8 bits ---------->|<- STOP_BITS ->|
```

* The line is high (mark) when idle.
* The start bit is low.
* Data bits follow LSB first. Byte 0xAA (1010_1010) goes out as 0,1,0,1,0,1,0,1.
* `STOP_BITS` stop bits are high; the default is 1.
* Every bit lasts `CLKS_PER_BIT = round(CLK_FREQ_HZ / BAUD_RATE)` clock cycles. At the
  defaults (50 MHz, 9600 baud) that is 5208 cycles. The rate is then 9600.6 baud,
  +0.006 %, far within the roughly ±2 % a UART link tolerates.
* A frame lasts `(1 + DATA_BITS + STOP_BITS) * CLKS_PER_BIT` cycles: 52080 at the
  defaults. At 115200 baud from 50 MHz it is 10 × 434 = 4340 cycles.

## Structure

```
 start, data_in ──► transmit hold register ──► transmit shift register ──┐ bit 0
        ready ◄──── (full)         ▲ rd            ▲ load / shift        │
                                   │               │                     ▼
                               ┌───┴───────────────┴───┐   start bit ─► line ─► [flop] ─► tx
 baud rate generator ─ tick ─► │  controller (FSM)     │   generator    mux
        ▲ clear                │  IDLE START DATA STOP │   stop bit  ─►     ─► [flop] ─► done
        └──────────────────────┤                       │   generator
                               └───────────────────────┘
                                   ▲ all_sent
                               bit counter
```

| Module | File | Role |
|---|---|---|
| `uart_tx` | `rtl/uart_tx.sv` | Top: wires the blocks together, holds the line multiplexer and the two output flops |
| `uart_tx_fsm` | `rtl/uart_tx_fsm.sv` | Four-state controller |
| `baud_gen` | `rtl/baud_gen.sv` | Divides the clock into one `tick` per bit period |
| `tx_hold_reg` | `rtl/tx_hold_reg.sv` | One-byte buffer written by the user |
| `tx_shift_reg` | `rtl/tx_shift_reg.sv` | Parallel-to-serial shift register, LSB first |
| `bit_counter` | `rtl/bit_counter.sv` | Counts data bits and flags the last one |
| `start_bit_gen` | `rtl/start_bit_gen.sv` | Drives the low start bit and reports when it ends |
| `stop_bit_gen` | `rtl/stop_bit_gen.sv` | Holds the line high for `STOP_BITS` bit periods and reports when they end |
| `uart_tx_pkg` | `rtl/uart_tx_pkg.sv` | State type, line levels and the `clks_per_bit` rounding function |

Everything runs on one clock. The baud rate generator makes a one-cycle enable (`tick`)
in the last clock cycle of each bit period, not a divided clock. The shift register, bit
counter and stop-bit counter advance only on cycles where `tick` is high.

## How a frame is sequenced

The controller does not time anything itself. Each part of the frame belongs to one
block, and that block reports the tick on which its part ends:

| State | Line shows | Ends when | Next state |
|---|---|---|---|
| IDLE | high | a byte waits in the hold register | START, pulsing `load` |
| START | start bit generator: low | `start_done` = START and tick | DATA |
| DATA | shift register bit 0 | bit counter's `all_sent` (tick during the 8th bit) | STOP |
| STOP | stop bit generator: high | stop generator's `bit_done` (tick ending the last stop bit) | START (byte waiting) or IDLE |

Two details keep every bit exactly `CLKS_PER_BIT` cycles long:

* **Divider restart.** While the controller is in IDLE it holds the baud divider at zero
  (`clear`). The start bit of a frame sent from idle therefore always lasts a full bit
  period, however long the line was idle.
* **Back-to-back frames.** When another byte is already in the hold register at the end
  of a stop bit, the controller goes from STOP straight to START. The divider is not
  cleared on this step, so it keeps its rhythm and no idle time appears on the line.

### The two registers and the `ready` handshake

The transmit hold register is separate from the shift register, so the user can hand over
the next byte while the current one is still being shifted out.

* `start` with `data_in` is taken at any rising edge where `ready` is high. `ready` is
  simply "hold register empty". A `start` while `ready` is low is ignored, and the byte
  is lost. A writer must wait for `ready` before it asserts `start`.
* In the cycle after a byte is taken, `ready` is low. If the transmitter is idle, the
  controller moves the byte into the shift register at the next edge (`load`), and
  `ready` is high again right after that edge, one cycle after the byte was taken. If a frame is running, the byte waits until that
  frame's last stop-bit cycle.
* From idle, `tx` falls at the **second** rising edge after the accepting edge. The first
  edge loads the shift register and enters START. The second registers the start bit
  into the `tx` flop.
* `done` is high for one cycle: the last clock cycle of each frame's stop bit on `tx`.
  It pulses for every frame, including frames sent back to back.

`tx` and `done` come straight from flip-flops, so the line has no glitches. Every bit on
`tx` is delayed by the same one cycle, so bit lengths are unchanged.

## Parameters (`uart_tx`)

| Parameter | Default | Meaning |
|---|---|---|
| `CLK_FREQ_HZ` | 50_000_000 | System clock frequency. The 50 MHz default is an assumption, not a number from the original description. |
| `BAUD_RATE` | 9600 | Bits per second. 9600 and 115200 are the rates usually quoted for this design. |
| `DATA_BITS` | 8 | Data bits per frame. |
| `STOP_BITS` | 1 | Stop bits per frame. 2 is supported. |

`baud_gen` stops elaboration with `$fatal` if the clock is less than twice the baud rate.

## Choices made here

The original description fixes the frame format (start bit, 8 data bits LSB first, stop
bit), the four states and the set of blocks. The following are this implementation's own:

* **Shift timing.** The description says in one place that data bits shift "on each clock
  cycle", and elsewhere that the baud rate sets how fast bits are sent. The shift register
  here shifts once per bit period, on the baud tick. Shifting on every clock would send
  eight bits in eight cycles, which no receiver could sample.
* **Transmit hold register.** This block comes from the transmitter's block diagram and
  its "is the transmit buffer empty?" step. The one-byte depth, the ignore-when-full rule
  and the `ready` output are choices made here.
* **Clock-enable divider.** The baud generator makes a tick, not a divided clock, so the
  design stays in a single clock domain.
* **Reset.** Reset is synchronous and active high, on the port named `reset`. It sets the
  line high, empties the hold register, fills the shift register with ones and puts the
  controller in IDLE.
* **`done` timing and the 2-cycle start latency** are as described above.
* **Optional 2 stop bits.** Two stop bits are offered as an option. The frame the design
  is built around has one.
* **State encoding.** IDLE=00, START=01, DATA=10, STOP=11, in two flip-flops.
* **Left out.** There is no parity bit. The description treats parity only as a possible
  extension. There is no receiver either: the transmitter is the whole design, and a
  receiver appears only as future work.

## Verification

Each block has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `baud_gen_tb` | Tick positions against a cycle-count model at 11 cycles/bit (1050 Hz / 100 baud, which rounds from 10.5) and at the default 5208 cycles/bit, with `clear` toggled at random |
| `tx_hold_reg_tb` | Random writes and reads against a one-byte buffer model; checks that writes while full are dropped |
| `tx_shift_reg_tb` | 300 random bytes come out LSB first with random gaps between shifts; checks the ones fill and that load wins over shift |
| `bit_counter_tb` | `count` and `all_sent` against a tick-count model over random enable windows |
| `start_bit_gen_tb` | All input combinations |
| `stop_bit_gen_tb` | 1 and 2 stop bits, random ticks and enable windows |
| `uart_tx_fsm_tb` | Every output in every cycle against a transition-table model; fails if any transition (including STOP→START and STOP→IDLE) is never exercised |
| `uart_tx_tb` | The whole transmitter at its default parameters (50 MHz, 9600 baud): see below |
| `uart_tx_115200_tb` | The same checks at 115200 baud (434 cycles/bit) |
| `uart_tx_stop2_tb` | The same checks with 2 stop bits at 10 cycles/bit |

The three end-to-end tests share `tb/uart_tx_checker.sv`. It drives the transmitter and
compares `tx` and `done` in every clock cycle with a line model built only from the frame
format. It also checks that `ready` falls after each accepted byte. The stimulus covers:

* byte 0xAA sent from idle;
* a burst of bytes, each written as soon as `ready` rises, so frames go back to back;
* requests made while the hold register is full, which must be ignored;
* a reset in the middle of a frame while a second byte waits: the line must be idle
  right after the reset edge, both bytes must be discarded, and the next byte must go
  out normally;
* random traffic.

The checker counts frames started from idle, back-to-back frames, ignored requests and
mid-frame resets, and fails if any count is zero. `uart_tx_tb` starts 13 frames (about
680,000 cycles) and runs in a few seconds.

Run a testbench with plain Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/uart_tx_pkg.sv tb/uart_tx_tb.sv --top-module uart_tx_tb -o sim
./obj_dir/sim
```

For any other testbench, replace `uart_tx_tb` with its name. The package must come first
on the command line. `-y rtl -y tb` lets Verilator find the other modules by file name.

## Assertions

The RTL carries a few concurrent assertions; run with `--assert` to enable them.

* The hold register is only read when it is full.
* Each of `start_done`, `data_done` and `stop_done` arrives only in the state that owns it.
* When the last data bit ends, the bit counter is at `DATA_BITS-1`.

## Changing the design

* **Other rates or clocks.** Set `CLK_FREQ_HZ` and `BAUD_RATE`. The divider width follows
  automatically.
* **Other frame lengths.** Set `DATA_BITS` or `STOP_BITS`. The bit counter and stop
  counter resize themselves. The end-to-end checker takes the same values as parameters.
* **Adding parity.** Add a fifth state between DATA and STOP, and a generator that drives
  the XOR of the byte for one bit period. The line multiplexer in `uart_tx.sv` and the
  transition in `uart_tx_fsm.sv` are the only places that need to know about it.
