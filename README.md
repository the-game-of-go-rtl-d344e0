# Go on two FPGA boards

Two players play Go on a 9x9 board, each at an FPGA board with their own monitor,
buttons and seven-segment display. The two boards run the same logic and keep
the same game state. They stay in step by sending each other one byte per move
over a 9600-baud serial link; in the original setup each end of that link is a
Bluetooth serial module. On your turn you move a cursor with the buttons and
place a stone. The hardware places it, removes any stones it captures, and
rejects the move if it breaks the ko rule or is a suicide. It then shows the
new board and sends the move to the other board. Two passes in a row end the
game, and the digits show each side's area score and who won.

The hard part is deciding, in hardware, which stones are captured. A capture
means finding every group of any shape that has lost its last liberty. This
design does not keep lists of groups. It floods "liberty" outward from every
empty point at once, over a mesh of registers, one step per clock. Most of this
README explains that mesh, because the rest of the design is built on it.

## The pruner: liberties spread through a register mesh

Picture a wire between every pair of neighbouring intersections: 72 horizontal
and 72 vertical wires on a 9x9 board. Each wire is either **hot**, meaning a
liberty can flow through it, or **cold**:

| ends of the wire              | state                                          |
|-------------------------------|------------------------------------------------|
| at least one end empty        | hot                                            |
| stones of opposite colours    | cold                                           |
| stones of the same colour     | OR of the six other wires touching either end |

A stone has a liberty if any of its own wires is hot. The third rule carries
the liberty from stone to stone through a group. If you build it purely
combinationally, it forms a loop. A group that once had a liberty then holds
itself hot after its last liberty is filled, so it never dies.

The fix is a register on every wire (`pruner.sv`). The combinational rule
(`wire_calc.sv`) reads only the *registered* states of the neighbouring wires:

1. **PULSE**: the board is captured and every wire register is cleared to cold.
2. **PROPAGATING**: on each clock every register loads its `wire_calc` result.
   After the first clock, wires that touch an empty point are hot. After clock
   *k*, every stone whose shortest path to an empty point runs through *k*
   stones has a hot wire. A group with no liberty never gets one: nothing hot
   can reach it, and it cannot heat itself, because it started cold.
3. **PRUNED**: after `PRUNE_CYCLES` clocks, every stone of the *selected
   colour* whose wires are all cold is removed. `done` then pulses.

This is a breadth-first search that starts from every empty point at once.
Each search step costs one clock, whatever the number or shape of the groups.
The run length is fixed at `PRUNE_CYCLES = N*N` = 81 clocks. A path through one
group holds at most 80 stones, so 81 clocks reach every stone even in the worst
case. A run takes `PRUNE_CYCLES + 3` = 84 clocks from `start` to `done`.
Missing neighbours at the board edge are tied cold.

One pruner removes only one colour per run, so the caller chooses whose dead
stones go.

## Checking a move: `board_updater`

`board_updater.sv` owns one pruner and uses it twice per move:

```
WAITING -> LOAD BOARD --pass--------------------------------> VALID BOARD
              |
              v
          LOAD MOVE (place stone) -> PULSE PRUNE 1 -> PRUNE 1 (prune opponent)
              -> PRUNE COLORSWAP: result == ko board ? ---------> INVALID BOARD (ko)
              -> PULSE PRUNE 2 -> PRUNE 2 (prune own colour)
                  own stones lost ? -> INVALID BOARD (suicide) : VALID BOARD
```

The ko board is the board as it was before the previous move. A move whose
result (after captures) equals it would repeat the earlier position.
`valid` or `invalid` pulses for one clock, and with `valid`, `next_board`
holds the new board. A stone move takes `2*(PRUNE_CYCLES+3)+6` = 180 clocks and
a pass takes 2. The target point must be empty. The cursor logic never offers
an occupied point, and a byte received over the link is trusted.

## Area counting with the same pruner: `territory_counter`

Take black's count as the example. Swap white stones and empty points, then
prune white. Each empty region is now a "white group":

- A region that touches a white stone survives. That stone became an empty
  point, which gives the region a liberty.
- A region bordered only by black stones and the edge has no liberty, so it is
  removed.

The points where the pruned and unpruned swapped boards differ are black's
territory. Black's count is that number plus black's stones. A second pruner
counts white in parallel. `ready` pulses `PRUNE_CYCLES + 6` clocks after
`start`. The counter restarts after every accepted move and after the final
pass.

One consequence: an empty board scores 81 for both sides, because its single
empty region touches neither colour. There is no komi.

## Game sequencing: `game_fsm`

`game_fsm.sv` holds the board bus, the ko board, whose turn it is, and the pass
and game-over state:

- `WAITING` takes a move and waits for the updater's verdict. An invalid move
  changes nothing.
- A valid stone goes through `UPDATE BUS`. The new board goes on the bus and
  the old one becomes the ko board.
- It then goes through `SENDING MOVE`. The move is sent only if it was made on
  this board, and the turn flips.
- A valid pass goes to `PASS` (sent if made here, turn flips) and then to
  `PASSED WAITING`.
- From `PASSED WAITING`, a stone move returns to `UPDATE BUS`. A second pass
  goes to `GAME OVER SEND`, which sends the pass if it was made here, and then
  to `GAME OVER`, where the board is frozen.

### Link protocol

Each move is one byte, sent as 8N1 with the least significant bit first:

- A stone is `{row[3:0], col[3:0]}`, with row 0 at the top.
- A pass is `8'hFF`.

Nothing else is ever sent. The receiving board runs the same check on the
move. Both boards therefore stay identical, and the second pass ends the game
on both. The top module routes the move source by whose turn it is: the local
buttons on your turn, the serial receiver otherwise. A byte that arrives out of
turn is ignored.

`uart_tx.sv` shifts out a 10-bit frame. `uart_rx.sv` samples at 16 times the
baud rate and takes each bit at its middle sample. After reset, a false start
or a bad stop bit it waits for the line to stay high for a quarter bit before
it accepts a start bit. This filters out a stray low level. The original also
waits after every received byte; here a good stop bit counts as that wait and
the receiver goes straight back to idle. Otherwise a byte that follows with
no gap, from a sender whose clock is 3% fast, would start inside the wait and
be lost.

## Player interface

- **Cursor (`user_io.sv`)**:
  - A direction press probes one point further per clock in that direction. The
    cursor jumps to the first empty point it finds and skips over stones.
  - If the probe leaves the board, the cursor stays where it was, so a press
    never moves it onto a stone or off the board. (It does sit on the stone it
    has just played until the next press.)
  - The centre button plays the point under the cursor. With switch 13 on
    (`sw_pass`) it plays a pass instead. It is ignored while the cursor sits on
    a stone.
  - After a move, input stays locked until it is this player's turn again.
  - Buttons are synchronised and debounced (`btn_pulse.sv`) and turned into
    pulses.
- **Monitor (`display.sv`, `vga_timing.sv`)**: the picture is 1024x768 at
  60 Hz from a 65 MHz pixel clock. Each pixel's colour comes straight from its
  coordinates, with no sprites:
  - yellow background
  - black grid lines, 80 px apart and centred
  - 70-px black or white tiles on occupied points
  - a green tile at the cursor, drawn over stones

  During the first frame after reset the renderer records the coordinates of
  every grid crossing it passes. Tiles are drawn once that table is complete.
  `pixel_out` is 4:4:4 RGB and one clock late; `go_top` delays the syncs to
  match.
- **Digits (`seven_seg.sv`)**: the left four digits show one of these messages:
  - `PASS`: the pass switch is on
  - `PASd`: the last move was a pass
  - `uin ` / `LOSE` / `tIE `: the game is over, compared from this player's side

  The right four digits show black's and white's counts in decimal. Segments
  and anodes are active low, and the digits are multiplexed.

## Top level: `go_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst` | in | 1 | 65 MHz clock, synchronous active-high reset |
| `btn_r/l/c/u/d` | in | 1 | raw push buttons |
| `sw_pass` | in | 1 | centre button passes (switch 13) |
| `player_white` | in | 1 | 0: this board plays black, 1: white |
| `rx` / `tx` | in/out | 1 | serial link to the other board (idle high) |
| `pixel_out` | out | 12 | VGA colour, 4 bits each of R, G, B |
| `hsync`, `vsync` | out | 1 | VGA syncs, active low |
| `seg` / `an` | out | 7 / 8 | seven-segment segments a..g and digit enables, active low |

| parameter | default | meaning |
|-----------|---------|---------|
| `CLK_HZ` | 65 000 000 | clock frequency, sets the baud divider |
| `BAUD` | 9600 | serial rate |
| `DEBOUNCE_CYCLES` | 650 000 | 10 ms button debounce |
| `PRUNE_CYCLES` | 81 (`N*N`) | propagation clocks per prune |
| `REFRESH_BITS` | 16 | digit scan: one digit every 2^13 clocks |

The board size `N = 9`, the cell code (0 empty, 1 black, 2 white), the board
type and the pass byte live in `go_pkg.sv`. After reset, black moves first.

## What comes from the original design and what does not

The following follow the original design:

- the block structure
- the wire rule and the four-state pruner
- the updater's state sequence with the ko and suicide checks
- the swap-prune-XOR area count
- the game FSM's states and conditions
- 9600 baud with 16x receive sampling
- the skipping cursor
- the sprite-free renderer with first-frame capture
- the messages the digits show

This implementation chose the following:

- the cell code and the move-byte packing (only the pass byte `8'hFF` is given)
- the 81-clock propagation delay
- the 65 MHz clock and the VGA timing
- the grid and tile sizes and the exact colours
- the debounce time
- the receiver's idle wait and stop-bit check
- the words on the digits and the scan rate
- where the cursor starts (the centre point)
- when the territory counter runs

Six points depart from a literal reading:

- **Transmit path.** A block diagram of the original feeds the transmitter
  straight from the buttons. Here the game FSM sends a move only after it has
  been validated, which is what the original prose describes. Passes are sent
  too, so the second pass ends the game on both boards.
- **Swapped board for area counting.** The original describes it two ways. This
  design swaps the *opposite* colour with the empty points, which is the
  reading that produces enclosed territory.
- **Intersection table in the renderer.** The table is stored as one x per
  column and one y per row, because the crossings form a regular grid. The
  original describes a full 9x9 array walked by row and column counters.
- **Move source at the top.** The original block diagram joins the two
  move strobes (buttons and serial receiver) with an OR. Here both the move
  and its strobe are chosen by whose turn it is, so an out-of-turn byte
  cannot pass for a local move.
- **Input lock.** The original state diagram of the input handler only
  enters LOCKED after a move. Here it is also entered from WAITING whenever it
  is not this player's turn, which the original prose asks for ("locks input
  when it is not the current user's turn").
- **Receiver wait.** The original waits for an idle line after every
  received byte. Here a good stop bit counts as that wait (see above).

The Bluetooth modules, the PC-side bot that can play over the same serial link,
and an analog transistor circuit that inspired the pruner are outside this
RTL.

## Trust and limits

- The board size is a package constant. 13x13 fits the 4-bit row/column fields
  and the 8-bit counts, but the display spacing would have to shrink (e.g.
  `SPACING = 56`). 19x19 would overflow the 8-bit counts.
- A received byte is not checked for an occupied or off-board point; the other
  board is trusted.
- Nothing has been run on an FPGA. The timing closure of the 144-wire mesh (one
  6-input OR per wire per clock) and of the 81-way tile lookup at 65 MHz has
  not been checked.

## Simulation

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and includes a watchdog. `tb/go_ref_pkg.sv` is a
plain flood-fill model of the rules that the board-level testbenches compare
against:

| testbench | what it checks |
|-----------|----------------|
| `tb_wire_calc` | the wire rule, exhaustively |
| `tb_pruner` | 150 random boards plus hand cases and a worst-case snake group, against flood fill; 84-clock latency |
| `tb_board_updater` | random games, a ko, a suicide, captures, a pass; verdicts, boards and latency |
| `tb_game_fsm` | FSM plus updater through a short game: sends, refusals, pass, double pass; then a random 120-move game against a reference model of capture, ko and suicide |
| `tb_territory_counter` | 100 random boards against a flood-fill area count; latency |
| `tb_uart_tx`, `tb_uart_rx` | framing, bit order, busy time, back-to-back bytes, glitch and bad-stop rejection, senders 3% fast and slow with random gaps |
| `tb_user_io` | skipping and edge behaviour against a reference search, moves, pass, locking |
| `tb_vga_timing`, `tb_display` | frame timing, then every clock of a frame against the sync and porch positions, and reset in mid-frame; every pixel of a frame against a geometric model |
| `tb_seven_seg` | every digit of every message |
| `tb_go_top` | two boards with crossed serial lines play a scripted game with a capture, a ko, a suicide, locked presses, passes and game over; checks both boards, scores, message and a drawn stone (shortened serial and debounce timing) |
| `tb_go_serial_peer` | one board against a serial-only peer, as when playing a program on a PC: moves each way, a byte out of turn ignored, an illegal peer move refused, a capture, passes and the score |
| `tb_go_top_full` | the same two-board setup at full default timing: two moves and two passes (under 20 s of wall-clock time) |

To run one with Verilator, name the two packages and the testbench; `-y`
lets Verilator find every module it uses by file name:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/go_pkg.sv tb/go_ref_pkg.sv tb/tb_go_top.sv \
  --top-module tb_go_top -o sim && ./obj_dir/sim
```

Replace `tb_go_top` with any other testbench's name. `-Wno-fatal` keeps the
lint warnings about unused package helpers from stopping the build. The
shortened timing of `tb_go_top` comes from parameters on `go_top`
(`CLK_HZ = 614400` gives 64 clocks per bit, `DEBOUNCE_CYCLES = 4`), so a whole
game simulates in a few seconds.
