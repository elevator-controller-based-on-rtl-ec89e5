// elevator_pkg -- shared constants, signal indices and the controller program
// of the two-floor look-up-table elevator controller.
//
// The controller is a 1024 x 7 single-port RAM whose 10 address lines are the
// switch and sensor inputs X0..X9 and whose 7 data lines are the motor and
// clear commands Y0..Y6.  Address bit i is X<i> and data bit j is Y<j>.
//
// The program is the 20-step table of the design: each step pairs one input
// pattern with one command word; every other location holds 0 (no motion,
// not busy).  The steps below are written in the printed order of the
// table, X0 (or Y0) as the LEFTMOST digit, so a literal 10'b1000000101 means
// X0=1, X7=1, X9=1.  reverse_in()/reverse_out() turn that reading order into
// vector order.  The RAM image is computed from the steps by lut_image(),
// laid out as image[j*1024 + address] = Y<j> at that address.
package elevator_pkg;

  localparam int unsigned N_IN      = 10;          // address lines X0..X9
  localparam int unsigned N_OUT     = 7;           // data lines Y0..Y6
  localparam int unsigned DEPTH     = 1 << N_IN;   // 1024 words
  localparam int unsigned SUB_AW    = 8;           // address lines of one RAM primitive
  localparam int unsigned SUB_DEPTH = 1 << SUB_AW; // 256 bits per RAM primitive
  localparam int unsigned N_SUB     = DEPTH / SUB_DEPTH; // 4 primitives per data bit
  localparam int unsigned N_STEPS   = 20;

  // Input (address) bit positions
  localparam int unsigned X_HALL_GND   = 0; // call switch outside the car, ground floor
  localparam int unsigned X_HALL_FIRST = 1; // call switch outside the car, first floor
  localparam int unsigned X_CAR_GND    = 2; // floor-select switch in the car, ground floor
  localparam int unsigned X_CAR_FIRST  = 3; // floor-select switch in the car, first floor
  localparam int unsigned X_BTN_CLOSE  = 4; // door-close switch in the car
  localparam int unsigned X_BTN_OPEN   = 5; // door-open switch in the car
  localparam int unsigned X_DOOR_SHUT  = 6; // sensor: door is closed
  localparam int unsigned X_DOOR_OPEN  = 7; // sensor: door is open
  localparam int unsigned X_AT_GND     = 8; // sensor: car at ground floor
  localparam int unsigned X_AT_FIRST   = 9; // sensor: car at first floor

  // Output (data) word.  Packed struct: the first field is the MSB (Y6), the
  // last the LSB (Y0), so a y_t cast of the 7-bit data word names each line.
  typedef struct packed {
    logic clr_door_btns; // Y6: clear the X4/X5 switch flip-flops
    logic busy;          // Y5: busy indication
    logic clr_all;       // Y4: clear the flip-flops of all switches
    logic door_open;     // Y3: door motor, opening
    logic door_close;    // Y2: door motor, closing
    logic car_down;      // Y1: traction machine, downward
    logic car_up;        // Y0: traction machine, upward
  } cmd_t;

  // The 20 program steps, printed order (X0..X9 / Y0..Y6, left to right).
  localparam logic [N_IN-1:0] STEP_X [N_STEPS] = '{
    10'b1000000101, 10'b1000001001, 10'b1000001010, 10'b1000000110,
    10'b1001100110, 10'b1001001010, 10'b1001001001, 10'b1001011001,
    10'b1001010101, 10'b0000000101,
    10'b0100000110, 10'b0100001010, 10'b0100001001, 10'b0100000101,
    10'b0110100101, 10'b0110001001, 10'b0110001010, 10'b0110011010,
    10'b0110010110, 10'b0000000110
  };
  localparam logic [N_OUT-1:0] STEP_Y [N_STEPS] = '{
    7'b0010010, 7'b0100010, 7'b0001010, 7'b0000010,
    7'b0010010, 7'b1000011, 7'b0000010, 7'b0001010,
    7'b0000110, 7'b0000000,
    7'b0010010, 7'b1000010, 7'b0001010, 7'b0000010,
    7'b0010010, 7'b0100011, 7'b0000010, 7'b0001010,
    7'b0000110, 7'b0000000
  };

  function automatic logic [N_IN-1:0] reverse_in(input logic [N_IN-1:0] v);
    logic [N_IN-1:0] r;
    for (int i = 0; i < int'(N_IN); i++) r[i] = v[N_IN-1-i];
    return r;
  endfunction

  function automatic logic [N_OUT-1:0] reverse_out(input logic [N_OUT-1:0] v);
    logic [N_OUT-1:0] r;
    for (int i = 0; i < int'(N_OUT); i++) r[i] = v[N_OUT-1-i];
    return r;
  endfunction

  // Command word stored at one address (0 where the program has no step).
  function automatic logic [N_OUT-1:0] lut_word(input logic [N_IN-1:0] addr);
    logic [N_OUT-1:0] w;
    w = '0;
    for (int s = 0; s < int'(N_STEPS); s++)
      if (reverse_in(STEP_X[s]) == addr) w = reverse_out(STEP_Y[s]);
    return w;
  endfunction

  // Whole RAM image: bit (j*DEPTH + a) is data line Y<j> at address a.
  function automatic logic [N_OUT*DEPTH-1:0] lut_image();
    logic [N_OUT*DEPTH-1:0] img;
    logic [N_OUT-1:0]       w;
    int unsigned            a;
    img = '0;
    for (int s = 0; s < int'(N_STEPS); s++) begin
      a = int'(reverse_in(STEP_X[s]));
      w = reverse_out(STEP_Y[s]);
      for (int j = 0; j < int'(N_OUT); j++) img[j*DEPTH + a] = w[j];
    end
    return img;
  endfunction

endpackage
