# Two-floor elevator controller as a RAM look-up table

This controller for a two-floor elevator has no state machine and no
processor. Every input the controller reads is one address line of a
1024 x 7 RAM: the six push-button switches and the four door and floor
sensors. The seven data lines of that RAM are the commands: traction machine
up or down, door motor close or open, busy, and two "clear the switch
flip-flops" strobes. Deciding what to do is one asynchronous RAM read, so a
new input combination is answered within one period of the 200 MHz board
clock. The program is 20 stored words. It can be rewritten in place, so a
change of behaviour needs no change of logic.

The RTL is plain SystemVerilog with no vendor primitives. It keeps the
structure of the reference schematic: 256 x 1 RAM cells, a 4-to-1 multiplexer
per data line, and seven data lines side by side. Once synthesised, it holds
exactly 7168 bits of LUT RAM and no flip-flop. This matches the resource
count the reference FPGA build reports: 112 LUTs used as RAM and 0 slice
registers.

## Signals

| Line | Direction | Meaning |
|---|---|---|
| X0 | in  | hall call switch, ground floor |
| X1 | in  | hall call switch, first floor |
| X2 | in  | car switch: go to ground floor |
| X3 | in  | car switch: go to first floor |
| X4 | in  | car switch: close door |
| X5 | in  | car switch: open door |
| X6 | in  | sensor: door is shut |
| X7 | in  | sensor: door is fully open |
| X8 | in  | sensor: car at ground floor |
| X9 | in  | sensor: car at first floor |
| Y0 | out | traction machine up |
| Y1 | out | traction machine down |
| Y2 | out | door motor closing |
| Y3 | out | door motor opening |
| Y4 | out | clear the flip-flops of all switches |
| Y5 | out | busy |
| Y6 | out | clear the flip-flops of the door switches X4, X5 |

Xi is address bit i and Yj is data bit j. `elevator_pkg` gives each line a
name (`X_AT_GND`, …). It also gives a packed struct `cmd_t` that names the
fields of a command word.

## The program

Each trip is a chain of sensor changes. Every command moves the door or
the car, and the new sensor pattern is the address of the next step. The 20
stored words make up two symmetric trips. The table below lists the inputs
that are on in each step. Every other address holds 0, which means
everything stopped and not busy.

| # | Inputs on | Command | Situation |
|---|---|---|---|
| 1 | X0, X7, X9 | close, busy | ground-floor call; car upstairs, door open |
| 2 | X0, X6, X9 | down, busy | door now shut |
| 3 | X0, X6, X8 | open, busy | arrived at ground floor |
| 4 | X0, X7, X8 | busy | door open, waiting for the passenger |
| 5 | X0, X3, X4, X7, X8 | close, busy | passenger picks first floor and presses close |
| 6 | X0, X3, X6, X8 | up, busy, clear X4/X5 | door shut |
| 7 | X0, X3, X6, X9 | busy | arrived upstairs, door still shut |
| 8 | X0, X3, X5, X6, X9 | open, busy | passenger presses open |
| 9 | X0, X3, X5, X7, X9 | busy, clear all | door open, trip over |
| 10 | X7, X9 | — | idle upstairs |
| 11 | X1, X7, X8 | close, busy | first-floor call; car downstairs |
| 12 | X1, X6, X8 | up, busy | |
| 13 | X1, X6, X9 | open, busy | |
| 14 | X1, X7, X9 | busy | |
| 15 | X1, X2, X4, X7, X9 | close, busy | passenger picks ground floor and presses close |
| 16 | X1, X2, X6, X9 | down, busy, clear X4/X5 | |
| 17 | X1, X2, X6, X8 | busy | |
| 18 | X1, X2, X5, X6, X8 | open, busy | |
| 19 | X1, X2, X5, X7, X8 | busy, clear all | |
| 20 | X7, X8 | — | idle downstairs |

`elevator_pkg::STEP_X` and `STEP_Y` hold these steps in the printed digit
order, with X0 and Y0 as the leftmost digit. `lut_image()` turns them into
the 7168-bit power-up image. Bit `j*1024 + a` of the image is Yj at address
a.

### What the table assumes about the outside world

A read only answers the current input pattern, so the program relies on two
things outside the controller. Both matter when this RTL is connected to
real hardware.

* **Motor drives hold their command.** While the door or the car is between
  end positions, all the sensors of that motion are off. The address then
  falls outside the program and the command word is 0. A motor drive has to
  latch a start command and run until its limit sensor trips, the way a
  contactor with a limit switch does. The busy line also drops during these
  transits.
* **Switches are held by flip-flops.** A call has to stay asserted until the
  trip ends, and Y4 clears it. Y6 clears the door switches once the car
  moves. The program also assumes that the close button X4 is released by
  the time the door is shut (step 5 to step 6), before any Y6 is issued.
  These flip-flops are not part of this RTL. Y4 and Y6 are outputs for them.

The testbench models both of these. See "Verification" below.

## RAM structure

```
elevator_controller
└── ram_1kx7          7 data lines, shared 10-bit address
    └── ram_1kx1 ×7   one data line
        ├── ram_256x1 ×4   address X0..X7, one per quarter of the address space
        └── m4_1e          picks the quarter with X9:X8 (enable tied high)
```

* `ram_256x1`: 256 x 1 single-port RAM. It writes on the rising clock edge
  when `we` is high and reads combinationally. Its power-up contents come
  from `INIT`.
* `m4_1e`: 4-to-1 multiplexer with an active-high enable; `o = e ? d[s] : 0`.
* `ram_1kx1`: four `ram_256x1` and one `m4_1e`. A small decoder steers the
  write enable to the one cell that holds the addressed bit.
* `ram_1kx7`: seven `ram_1kx1`. Its `INIT` parameter defaults to the elevator
  program.
* `elevator_controller`: the top. `x` is the address and `y` the read data.
  `prog_we`/`prog_d` write a new command word at the address on `x`.

### Timing

The command path from `x` to `y` is purely combinational and has no clock
latency. The reference build quotes about 20 ns from switch to LED, which
is four periods at 200 MHz and includes the board I/O. The clock is only
used for writes: `prog_d` is stored at address `x` on the rising edge of
`clk` when `prog_we` is high. The new word shows on `y` right after that
edge.

### Interlocks

Concurrent assertions in `elevator_controller` check any program, including
a rewritten one, in simulation:

* up and down are never on together;
* open and close are never on together;
* the car and the door never move together;
* every motor command comes with busy;
* the car moves only with the door shut;
* the car never goes up at the first floor or down at the ground floor;
* the door is never driven toward the end it already reports.

## Where this design makes its own choices

* **Cell size.** The reference describes its RAM cell as "8 x 1". Here it is
  read as 8 address lines by 1 bit (256 x 1). This is the only reading that
  fits ten address lines built from four cells and a 4-way multiplexer. It
  also fits 112 LUTs of 64 bits for 1024 x 7 bits.
* **Address wiring.** Xi is address bit i. The two multiplexer select lines
  are X8 (low bit) and X9 (high bit).
* **Multiplexer.** The reference calls M4_1E a demultiplexer, but it
  combines the four cell outputs into one data line. It is built as a
  multiplexer.
* **Write port.** The reference loads the 20 words once and only says that
  the RAM can be reprogrammed. The write port uses the input lines as the
  address, so the RAM stays single-port, and a separate strobe `prog_we`.
* **Unprogrammed addresses** read 0.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs.

| Testbench | What it checks |
|---|---|
| `tb_m4_1e` | all 128 input combinations |
| `tb_ram_256x1` | power-up pattern; 2000 random writes, with and without `we`, against a reference array |
| `tb_ram_1kx1` | a different pattern in each quarter; random writes; a check that a write does not leak into the neighbouring quarter |
| `tb_ram_1kx7` | all 1024 default words against its own copy of the program; random 7-bit writes |
| `tb_elevator_controller` | the whole controller driving `elevator_plant` |

`tb_elevator_controller` runs both trips at the default sizes. It runs in
about 2 µs of simulated time.

* `elevator_plant` is a behavioural car, door and sensor model. It is for
  testbenches only. Its motor drives latch a command until the limit
  sensor trips, as described above.
* The testbench models the switch flip-flops and presses the buttons the
  way the program expects.
* Every half clock period it compares `y` with the expected word for the
  current `x`. This also shows that the answer arrives within half a 5 ns
  period.
* It checks that the car settles on exactly the 20 program steps, in order.
* It sweeps all 1024 input combinations and compares each answer with the
  program.
* It exercises reprogramming. It writes an unused address and a programmed
  step, checks that the neighbouring word is unchanged, and restores the
  original word.
* It counts door close and open, up, down, busy, clear-all, clear-door-buttons,
  idle and writes. Each of them must occur at least once.

The tests were run only under Verilator. The plant model is a test aid, not a
model of any particular elevator.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert --timescale 1ns/1ps --top-module tb_elevator_controller \
    -y rtl -y tb +libext+.sv rtl/elevator_pkg.sv tb/tb_elevator_controller.sv
./obj_dir/Vtb_elevator_controller
```

Replace the top module name to run another testbench. The testbench delays
are in nanoseconds, so give `--timescale 1ns/1ps`. To lint the design:

```
verilator --lint-only -Wall -Wno-fatal -y rtl +libext+.sv rtl/elevator_pkg.sv rtl/elevator_controller.sv
```

Lint reports unused package constants and the unused bits Y4 and Y6 of the
internal command struct. Both are harmless.

## Changing the behaviour

* **Different program.** Edit `STEP_X`/`STEP_Y` (and `N_STEPS`) in
  `elevator_pkg`, or pass a 7168-bit `INIT` image to `ram_1kx7`. To change
  the program at run time, use `prog_we`.
* **More inputs or outputs.** `N_IN` sets the depth (2^N_IN words). `N_OUT`
  sets the word width. `ram_1kx1` assumes that exactly four 256-bit cells
  make up the depth (`N_SUB` = 4 with the default sizes). Change its mux if
  `N_IN` changes.
