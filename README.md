# Logic-programmable audio switching matrix

This is the control logic of a ship's audio switching console. The
console replaces a matrix of hand-operated rotary switches. It has 40
identical boards in 4 rows of 10. Each board has ten audio switches.
Each switch connects one communication endpoint to one of several
positions: off, five receivers, or an extension line. A PC drives the
whole console through a single parallel port. Each board holds a small
programmable logic device. The device listens to the shared port,
recognises commands meant for its board, and sets its analog
multiplexers.

The RTL here covers everything digital on a board and the way the 40
boards share one port. The analog multiplexers, the DIP switches, the
line buffers and the PC are outside the RTL. The section
[What is not in the RTL](#what-is-not-in-the-rtl) lists them.

## The port protocol

The host drives three strobes and a data byte. Each board answers on
three active-low reply lines.

| Signal   | Direction    | Meaning |
|----------|--------------|---------|
| `SB`     | host → board | select board: DATA holds a board code |
| `SSP`    | host → board | select switch and position: DATA holds a switch number and a position |
| `YACK`   | host → board | the host has seen the acknowledge; ends it |
| `DATA`   | host → board | 8-bit byte, bit 7 = even parity |
| `ACK_B`  | board → host | active low: this board accepted the code |
| `ACK_SP` | board → host | active low: the switch has taken the new position |
| `ERROR`  | board → host | active low: the last byte failed its parity check |

A command is two handshakes:

1. The host sets DATA to the board code and pulses `SB`. Every board
   latches the byte. Only the board whose DIP-switch code matches pulls
   `ACK_B` low. It holds `ACK_B` low until the host pulses `YACK`.
2. The host sets DATA to the switch/position byte and pulses `SSP`. The
   selected board latches the byte and updates that switch's control
   lines. It then pulls `ACK_SP` low until the next `YACK`, and goes back
   to stand-by.

A byte with an odd number of ones is corrupt. The board answers it with
a low pulse on `ERROR` and goes back to stand-by. The host must then
start over with `SB`. A corrupt first byte is reported by every board,
whatever its code, because no board can trust the code. A corrupt second
byte is reported only by the board that was selected.

### Byte formats

```
first byte  (SB):   [7] parity | [6:0] board identification code
second byte (SSP):  [7] parity | [6:3] switch number | [2:0] position
```

Parity is even over all eight bits. For example, `00001111` selects board
`0001111`. `10001101` selects switch 1, position 5. `10001111` is corrupt.

### Timing

All logic runs on one board clock. The strobes come from the PC with no
relation to that clock. They pass through a two-flip-flop synchronizer,
and the state machine acts on their rising edges. Measured from the clock
edge at which a strobe is first high at the board:

| Event | Clocks |
|---|---|
| `SB` or `SSP` → `ACK_B` / `ACK_SP` / `ERROR` low | `SYNC_STAGES + 2` = 4 |
| `YACK` → acknowledge released | `SYNC_STAGES + 1` = 3 |
| `ERROR` low pulse | `ERR_PULSE` = 8 |
| switch control changes | 1 clock before `ACK_SP` goes low |

Because the strobes are edge-triggered, a strobe may be held high as long
as the host likes; one pulse gives one reply. DATA must stay steady from
the strobe until the reply appears: the byte is sampled
`SYNC_STAGES + 1` clocks after the strobe edge.

### The controller's states

```
IDLE ──SB edge──▶ CHECK_B ──code matches──▶ ACK_B ──YACK edge──▶ WAIT_SSP
  ▲                 │ parity error ─▶ ERROR      │                  │
  │                 └ other code ──▶ IDLE        │    SB edge ─▶ CHECK_B
  │                                                   SSP edge ─▶ CHECK_SP
  │                                                                 │
  └── YACK edge ── ACK_SP ◀── DECODE enable, clean byte ────────────┘
                              parity error ─▶ ERROR ─(ERR_PULSE clocks)─▶ IDLE
```

A board waiting for `SSP` still listens to `SB`. If the host selects a
different board instead, this board checks the new code, finds no match
and drops back to stand-by. So only the most recently selected board acts
on the next `SSP`. In `ACK_B`, `ACK_SP` and `ERROR` the board ignores
every strobe except the `YACK` that ends an acknowledge.

## Switch control codes

Each switch has four control lines, so a board drives 40 lines in all.
The 3-bit position maps to the 4-bit control code as follows:

```
code = { p[2], ~p[2], ~p[1], ~p[0] }
```

| position | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| code | 0111 | 0110 | 0101 | 0100 | 1011 | 1010 | 1001 | 1000 |

After reset every switch holds `0000`, which no position produces. This
rule comes from reference simulation results of the original design,
which show position 3 → `0100`, position 6 → `1001` and position 0 →
`0111`. The rule reproduces all three, but no description of the
encoding was available, and the rule was inferred from those three
points alone. The rule reads as "bits 3..2 pick one of two 4-channel
analog multiplexers, bits 1..0 select the channel". Which bit drives
which multiplexer pin, and which position is "off", depend on board
wiring that was not available. If your wiring differs, change `pos_code`
in `asm_pkg.sv`. It is the only place the rule lives.

A switch number of 10 to 15 is acknowledged normally but changes nothing.

## Inside a board

`board_logic` is the programmable device. Its parts:

- `sync` ×3 – two-flip-flop synchronizers for `SB`, `SSP`, `YACK`.
- `latch` – a clock-enabled register for DATA[6:0]. It shows the stored
  bits as the board code (6..0), the switch number (6..3) and the
  position (2..0).
- `parity` – combinational even-parity check on the raw port byte. The
  controller samples it on the same clock edge that loads `latch`.
- `comparator` – the latched code against the DIP-switch code.
- `decode` – ten 4-bit control registers. On the one-clock DECODE enable,
  the addressed register loads `pos_code(position)`.
- `controller` – the state machine above. It drives the LATCH and DECODE
  enables and the three registered, active-low replies.

`switch_board` adds the board's reply merge (`output_or`) to the device.

## Sharing one port: the board chain

The host lines (`SB`, `SSP`, `YACK`, DATA, reset) are buffered from board
to board along a chain, so every board sees the same command. The reply
lines run back along the same chain. At each board, `output_or` combines
the board's own replies with those from the boards further down. The
lines are active low, so the merge is an OR of the asserted conditions:
a merged line is low when any board pulls it low. In gates, that is an
AND of the line levels. The host therefore hears a single `ACK_B`,
`ACK_SP` or `ERROR` from the console as a whole. At most one board is
ever selected, so at most one board acknowledges. When every board
reports a corrupt first byte at once, their `ERROR` pulses line up
exactly and merge into one pulse.

`audio_switch_matrix` is the console. It holds `NUM_BOARDS` boards with
their DIP codes as an input array, and brings out all switch controls as
`sw_ctrl[board][switch]`. Board 0 is nearest the port. The order along
the chain has no effect on behaviour.

Every board's code must be unique. The 7-bit code allows 128 boards; the
console uses 40.

## Parameters

| Parameter | Default | Where | Meaning |
|---|---|---|---|
| `NUM_BOARDS` | 40 | `audio_switch_matrix` | boards in the console (4 × 10) |
| `NUM_SWITCHES` | 10 | console, board, `decode` | switches per board (at most 16) |
| `SYNC_STAGES` | 2 | console, board, `sync` | synchronizer depth |
| `ERR_PULSE` | 8 | console, board, `controller` | `ERROR` pulse length in clocks |

Widths and byte fields are constants in `asm_pkg`. The board count, the
switch count, the code width and the byte formats come from the original
design. The synchronizer depth and the error pulse length are choices of
this implementation. No clock frequency was specified. Any clock works
that is fast enough for each host strobe to span at least two rising
clock edges.
The testbenches use a 100 MHz clock.

## Where this implementation makes its own choices

These points were not specified. Each has been settled as described
below.

- **Acknowledge release.** `ACK_B` is held until the `YACK` that follows
  it. One reference waveform instead shows `ACK_B` staying low through
  the whole `SSP` phase. The protocol description says `YACK` ends each
  acknowledge, so this implementation follows that.
- **Error pulse.** `ERROR` is a fixed pulse, not held until `YACK`, and
  the board returns to stand-by after it. A corrupt byte is never
  acknowledged. One reference waveform also shows `ACK_B` going low after
  a corrupt `SB`. The written description only mentions `ERROR`, so this
  implementation follows the description.
- **Clock.** All boards share one clock port. On a board, the logic
  device has a clock input whose source was not specified. Each board synchronizes the host
  strobes itself, and the reply merge has no flip-flops, so separate
  clocks would not change the logic.
- **Reselection.** An `SB` during `WAIT_SSP` starts identification again.
- **Out-of-range switch numbers** (10 to 15) change nothing but are
  still acknowledged.
- **Reset.** Reset is asynchronous and active high. It clears every
  switch to `0000` and every reply line to idle.
- **LATCH** is an edge-triggered, clock-enabled register, not a
  transparent latch.
- **DIP code width.** The code is 7 bits wide throughout. One listing of
  the device's signals calls the DIP bus 6-bit, but it also gives the bus
  as [6..0], and every other mention gives 7 bits.
- **Switch control encoding.** See [Switch control codes](#switch-control-codes).

## What is not in the RTL

- **Analog switch matrix.** Analog 4-channel multiplexers (4052 type)
  route five receivers to ten endpoints under the 40 control lines. Their
  wiring is not known.
- **DIP switch.** Appears as the `dip_switch` inputs.
- **Line buffers** between boards. These are electrical only; in the RTL
  the command lines are simply shared.
- **PC and its software.** The testbenches model the host side of the
  protocol (`tb/host_port_if.sv`).
- **Bench tester.** A microcontroller unit that puts ten test tone
  bursts on the audio inputs. It exercises only the analog path.

## Files

| File | Contents |
|---|---|
| `rtl/asm_pkg.sv` | widths, port bundles `host_cmd_t` / `board_resp_t`, `pos_code`, parity function |
| `rtl/sync.sv`, `latch.sv`, `parity.sv`, `comparator.sv`, `decode.sv`, `controller.sv` | the device's blocks |
| `rtl/board_logic.sv` | one board's programmable logic |
| `rtl/output_or.sv`, `rtl/switch_board.sv` | reply merge; board = logic + merge |
| `rtl/audio_switch_matrix.sv` | the 40-board console (top) |
| `tb/host_port_if.sv` | host model: strobe / YACK tasks, reply latencies, reference code table |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
A watchdog counts a failure if the test hangs. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_audio_switch_matrix rtl/asm_pkg.sv tb/tb_audio_switch_matrix.sv
./obj_dir/Vtb_audio_switch_matrix
```

Replace the top module name to run any other testbench.

- `tb_audio_switch_matrix` runs the full 40-board console at its default
  parameters. It performs 400 random commands and compares all 400 switch
  controls after each one. It counts every protocol mechanism listed
  below and fails if any of them never happened:
  - selection
  - switch update
  - code of no board
  - corrupt first byte
  - corrupt second byte
  - reselection
  - out-of-range switch number

  It also checks every reply latency, every `ERROR` width, and that
  replies never overlap.
- `tb_board_logic` replays three reference sequences from the original
  design at the port pins:
  - a foreign code, a parity error, and three switch changes on board
    `0000000`
  - the `00001111` / `10001101` transaction
  - the corrupt `10001111` byte

  It then runs 300 random commands.
- `tb_controller` checks the state machine clock by clock, including the
  exact `ERROR` pulse length.
- The testbenches of the small blocks are exhaustive (`parity`,
  `comparator`, `output_or`) or random against a reference model.

The assertions in `controller.sv` check that at most one reply line is
low and that DECODE never fires on a corrupt byte. Verilator checks them
when run with `--assert`.
