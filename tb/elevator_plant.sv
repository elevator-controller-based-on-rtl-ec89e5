// elevator_plant -- behavioural model of the two-floor car, traction machine,
// slide-door motor and the four position sensors (testbench only, not
// synthesizable design content).
//
// The door position runs from 0 (fully open) to DOOR_CYCLES (shut) and the
// car position from 0 (ground floor) to TRAVEL_CYCLES (first floor), one
// step per clock.  A motor command starts a movement and the motor drive
// keeps it running until the matching end sensor is reached, as a contactor
// with a limit switch would: between end positions the sensors are all off,
// so the controller's own output drops to 0 there.  The car only starts when
// the door is shut.  fault flags a car movement with the door not shut or
// two opposing commands at once.
module elevator_plant #(
  parameter int unsigned DOOR_CYCLES   = 8,
  parameter int unsigned TRAVEL_CYCLES = 20
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start_first,  // reset puts the car at the first floor
  input  logic [6:0] y,            // controller commands Y0..Y6
  output logic       door_shut,    // X6
  output logic       door_opened,  // X7
  output logic       at_gnd,       // X8
  output logic       at_first,     // X9
  output logic       fault
);
  typedef enum logic [1:0] {STILL, DIR_A, DIR_B} motion_e;  // A: close / up, B: open / down

  int unsigned door_pos, car_pos;
  motion_e     door_m, car_m;

  assign door_shut   = (door_pos == DOOR_CYCLES);
  assign door_opened = (door_pos == 0);
  assign at_gnd      = (car_pos == 0);
  assign at_first    = (car_pos == TRAVEL_CYCLES);

  always_ff @(posedge clk) begin
    if (rst) begin
      door_pos <= 0;
      car_pos  <= start_first ? TRAVEL_CYCLES : 0;
      door_m   <= STILL;
      car_m    <= STILL;
      fault    <= 1'b0;
    end else begin
      if ((y[0] && y[1]) || (y[2] && y[3])) fault <= 1'b1;
      // door motor
      case (door_m)
        STILL: begin
          if (y[2] && !door_shut && car_m == STILL)        door_m <= DIR_A;
          else if (y[3] && !door_opened && car_m == STILL) door_m <= DIR_B;
        end
        DIR_A: if (door_pos + 1 == DOOR_CYCLES) door_m <= STILL;
        default: if (door_pos == 1) door_m <= STILL;
      endcase
      if (door_m == DIR_A) door_pos <= door_pos + 1;
      if (door_m == DIR_B) door_pos <= door_pos - 1;
      // traction machine
      case (car_m)
        STILL: begin
          if (y[0] && !at_first && door_shut)    car_m <= DIR_A;
          else if (y[1] && !at_gnd && door_shut) car_m <= DIR_B;
        end
        DIR_A: if (car_pos + 1 == TRAVEL_CYCLES) car_m <= STILL;
        default: if (car_pos == 1) car_m <= STILL;
      endcase
      if (car_m == DIR_A) car_pos <= car_pos + 1;
      if (car_m == DIR_B) car_pos <= car_pos - 1;
      if (car_m != STILL && !door_shut) fault <= 1'b1;
    end
  end
endmodule
