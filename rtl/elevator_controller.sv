// elevator_controller -- two-floor elevator controller built as a look-up
// table held in a 1024 x 7 RAM.
//
// The ten switch and sensor lines X0..X9 drive the RAM address directly and
// the seven RAM data lines are the commands Y0..Y6 (see elevator_pkg for the
// meaning of each line).  There is no state machine and no register in the
// command path: each combination of inputs selects one stored command word,
// and the answer appears combinationally, within one period of the 200 MHz
// clock (the design quotes about 20 ns, four periods, for the whole path
// including I/O).  The sequencing of a trip comes from the outside world:
// door and floor sensors change as the motors act, which moves the address
// to the next programmed step.
//
// The RAM powers up holding the 20-step program of elevator_pkg; every
// other input combination reads 0 (all motors stopped, not busy).  The
// program can be changed in place: with prog_we high, prog_d is written on
// the rising edge of clk at the address presented on x.  Using the input
// lines as the write address (one single-port RAM) is this design's own
// choice for the reprogramming path.
//
// Concurrent assertions state the interlocks any stored program has to
// keep (motor directions exclusive, car moves only with the door shut, busy
// with every motor command); they are checked in simulation.
//
// Y4 and Y6 are clear commands for switch-holding flip-flops outside this
// block; they are only driven out.
module elevator_controller (
  input  logic                           clk,      // 200 MHz board clock (writes only)
  input  logic [elevator_pkg::N_IN-1:0]  x,        // X0..X9: switches and sensors
  input  logic                           prog_we,  // write prog_d at address x
  input  logic [elevator_pkg::N_OUT-1:0] prog_d,   // new command word
  output logic [elevator_pkg::N_OUT-1:0] y         // Y0..Y6: commands
);
  import elevator_pkg::*;

  cmd_t cmd;

  ram_1kx7 u_lut (
    .clk(clk),
    .we (prog_we),
    .a  (x),
    .d  (prog_d),
    .o  (y)
  );

  assign cmd = cmd_t'(y);

  // Interlocks the stored program must respect: the traction machine is
  // never told to go both ways, the door never told to open and close, the
  // car never moves while the door motor runs, and any motor command comes
  // with the busy indication.
  a_car_dir:  assert property (@(posedge clk) !(cmd.car_up && cmd.car_down));
  a_door_dir: assert property (@(posedge clk) !(cmd.door_open && cmd.door_close));
  a_no_move_door: assert property (@(posedge clk)
                    !((cmd.car_up || cmd.car_down) && (cmd.door_open || cmd.door_close)));
  a_busy: assert property (@(posedge clk)
            (cmd.car_up || cmd.car_down || cmd.door_open || cmd.door_close) |-> cmd.busy);

  // Commands must agree with the sensors: the car moves only with the door
  // shut and never past an end floor, and the door motor is never driven
  // towards the end it already reports.
  a_move_shut:   assert property (@(posedge clk) (cmd.car_up || cmd.car_down) |-> x[X_DOOR_SHUT]);
  a_no_up_top:   assert property (@(posedge clk) x[X_AT_FIRST] |-> !cmd.car_up);
  a_no_down_gnd: assert property (@(posedge clk) x[X_AT_GND] |-> !cmd.car_down);
  a_close_once:  assert property (@(posedge clk) x[X_DOOR_SHUT] |-> !cmd.door_close);
  a_open_once:   assert property (@(posedge clk) x[X_DOOR_OPEN] |-> !cmd.door_open);

endmodule
