// tb_elevator_controller -- end-to-end test of the controller driving a
// behavioural two-floor elevator (elevator_plant) with its default program.
//
// Two trips are run, the two halves of the program:
//   1. car at the first floor, door open; someone calls at the ground floor
//      (X0).  The car closes, goes down, opens; the passenger selects the
//      first floor (X3) and presses door-close (X4); the car closes, goes
//      up, waits; the passenger presses door-open (X5); the door opens, all
//      switch flip-flops are cleared (Y4) and the controller goes idle.
//   2. the mirror trip: call at the first floor (X1) with the car at the
//      ground floor, select ground floor (X2).
// The switch flip-flops are modelled here: X0..X3 and X5 hold a press until
// Y4 clears them (Y6 clears X4/X5); X4 is released by the passenger as soon
// as the door starts to move.
// Every half clock the command word is compared with an independent copy of
// the program (0 for inputs outside it), which also checks that a new input
// is answered within half a 200 MHz period, well inside the 20 ns figure.
// The input patterns the car settles in are recorded and must be exactly the
// 20 program steps in order.  All 1024 input combinations are then swept
// and compared with the program.  Finally the RAM is reprogrammed at two
// addresses and read back.  Each mechanism (door close/open, up, down,
// busy, clear-all, clear-door-buttons, idle, reprogramming) is counted and
// must occur at least once.
module tb_elevator_controller;
  localparam logic [9:0] PX [20] = '{
    10'b1000000101, 10'b1000001001, 10'b1000001010, 10'b1000000110,
    10'b1001100110, 10'b1001001010, 10'b1001001001, 10'b1001011001,
    10'b1001010101, 10'b0000000101, 10'b0100000110, 10'b0100001010,
    10'b0100001001, 10'b0100000101, 10'b0110100101, 10'b0110001001,
    10'b0110001010, 10'b0110011010, 10'b0110010110, 10'b0000000110};
  localparam logic [6:0] PY [20] = '{
    7'b0010010, 7'b0100010, 7'b0001010, 7'b0000010, 7'b0010010,
    7'b1000011, 7'b0000010, 7'b0001010, 7'b0000110, 7'b0000000,
    7'b0010010, 7'b1000010, 7'b0001010, 7'b0000010, 7'b0010010,
    7'b0100011, 7'b0000010, 7'b0001010, 7'b0000110, 7'b0000000};

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       start_first = 1'b1;
  logic [9:0] x;
  logic       prog_we = 1'b0;
  logic [6:0] prog_d = '0;
  logic [6:0] y;
  logic       door_shut, door_opened, at_gnd, at_first, plant_fault;

  logic [5:0] sw_q = '0;           // switch flip-flops X0..X5
  logic [5:0] press = '0;          // one-cycle press pulses from the passenger
  logic       prog_mode = 1'b0;    // testbench drives x directly when set
  logic [9:0] prog_addr = '0;

  // expected program in vector order
  logic [9:0] step_x [20];
  logic [6:0] step_y [20];

  int checks = 0, failures = 0;
  int n_close = 0, n_open = 0, n_up = 0, n_down = 0, n_busy = 0;
  int n_clr_all = 0, n_clr_btn = 0, n_idle = 0, n_write = 0;
  int visited [$];
  logic [6:0] y_prev = '0;

  elevator_controller dut (
    .clk(clk), .x(x), .prog_we(prog_we), .prog_d(prog_d), .y(y)
  );

  elevator_plant #(.DOOR_CYCLES(8), .TRAVEL_CYCLES(20)) plant (
    .clk(clk), .rst(rst), .start_first(start_first), .y(y),
    .door_shut(door_shut), .door_opened(door_opened),
    .at_gnd(at_gnd), .at_first(at_first), .fault(plant_fault)
  );

  always #2.5 clk = ~clk;   // 200 MHz

  assign x = prog_mode ? prog_addr : {at_first, at_gnd, door_opened, door_shut, sw_q};

  // switch flip-flops
  always_ff @(posedge clk) begin
    if (rst) sw_q <= '0;
    else begin
      for (int i = 0; i < 6; i++) begin
        if (press[i]) sw_q[i] <= 1'b1;
      end
      if (y[4]) sw_q <= '0;
      else if (y[6]) sw_q[5:4] <= 2'b00;
      if (!door_opened && !press[4]) sw_q[4] <= 1'b0;  // passenger lets go of door-close
    end
  end

  function automatic logic [6:0] expected_y(input logic [9:0] a);
    logic [6:0] r = '0;
    for (int s = 0; s < 20; s++) if (step_x[s] == a) r = step_y[s];
    return r;
  endfunction

  function automatic int step_of(input logic [9:0] a);
    for (int s = 0; s < 20; s++) if (step_x[s] == a) return s;
    return -1;
  endfunction

  // command check half a period after every clock edge, and step trace
  always @(negedge clk) begin
    if (!rst && !prog_mode) begin
      int s;
      checks++;
      if (y !== expected_y(x)) begin
        failures++;
        $display("FAIL x=%b y=%b expected %b", x, y, expected_y(x));
      end
      s = step_of(x);
      if (s >= 0 && (visited.size() == 0 || visited[$] != s)) visited.push_back(s);
      if (y[2] && !y_prev[2]) n_close++;
      if (y[3] && !y_prev[3]) n_open++;
      if (y[0] && !y_prev[0]) n_up++;
      if (y[1] && !y_prev[1]) n_down++;
      if (y[5] && !y_prev[5]) n_busy++;
      if (y[4] && !y_prev[4]) n_clr_all++;
      if (y[6] && !y_prev[6]) n_clr_btn++;
      if (s >= 0 && y == '0 && y_prev != '0) n_idle++;
      y_prev = y;
      if (plant_fault) begin
        failures++;
        $display("FAIL plant reports an unsafe command");
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic push(input logic [5:0] which);
    @(negedge clk) press = which;
    @(negedge clk) press = '0;
  endtask

  // wait until the inputs settle on a given program step
  task automatic wait_step(input int s);
    int n = 0;
    while (x !== step_x[s] && n < 2000) begin
      @(negedge clk);
      n++;
    end
    repeat (3) @(negedge clk);
    checks++;
    if (x !== step_x[s]) begin
      failures++;
      $display("FAIL did not reach step %0d (x=%b)", s + 1, x);
    end
  endtask

  task automatic write_and_check(input logic [9:0] a, input logic [6:0] w);
    @(negedge clk);
    prog_mode = 1'b1;
    prog_addr = a;
    prog_d    = w;
    prog_we   = 1'b1;
    @(negedge clk);
    prog_we   = 1'b0;
    n_write++;
    #1;
    checks++;
    if (y !== w) begin
      failures++;
      $display("FAIL reprogram a=%b y=%b expected %b", a, y, w);
    end
  endtask

  initial begin
    for (int s = 0; s < 20; s++) begin
      for (int k = 0; k < 10; k++) step_x[s][k] = PX[s][9-k];
      for (int k = 0; k < 7; k++)  step_y[s][k] = PY[s][6-k];
    end
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    // trip 1: call from the ground floor, ride to the first floor
    wait_step(9);                    // idle at the first floor, door open
    push(6'b000001);                 // X0: hall call, ground floor
    wait_step(3);                    // arrived, door open, busy
    push(6'b011000);                 // X3 + X4: select first floor, close door
    wait_step(6);                    // arrived, door shut, busy
    push(6'b100000);                 // X5: open door
    wait_step(9);                    // idle again

    // trip 2: call from the first floor, ride to the ground floor
    // (the plant is restarted with the car at the ground floor)
    rst = 1'b1;
    start_first = 1'b0;
    @(negedge clk);
    rst = 1'b0;
    y_prev = '0;
    wait_step(19);                   // idle at the ground floor, door open
    push(6'b000010);                 // X1: hall call, first floor
    wait_step(13);                   // arrived, door open, busy
    push(6'b010100);                 // X2 + X4
    wait_step(16);                   // arrived at ground floor, door shut
    push(6'b100000);                 // X5
    wait_step(19);

    // step trace: every program step reached in order
    begin
      automatic int expect_trace [$] = '{9, 0, 1, 2, 3, 4, 5, 6, 7, 8, 9,
                               19, 10, 11, 12, 13, 14, 15, 16, 17, 18, 19};
      checks++;
      if (visited != expect_trace) begin
        failures++;
        $display("FAIL step trace differs");
        foreach (visited[i]) $display("  visited step %0d", visited[i] + 1);
      end
    end

    // switch-panel sweep: all 1024 input combinations, as with ten toggle
    // switches on the inputs and seven indicators on the outputs
    @(negedge clk);
    prog_mode = 1'b1;
    for (int i = 0; i < 1024; i++) begin
      prog_addr = 10'(i);
      #1;
      checks++;
      if (y !== expected_y(prog_addr)) begin
        failures++;
        $display("FAIL sweep x=%b y=%b expected %b", prog_addr, y, expected_y(prog_addr));
      end
    end

    // reprogramming: a location outside the program, then one inside it
    write_and_check(10'b0000000000, 7'b1110000);   // busy + both clears
    write_and_check(10'b0000000000, 7'b0000000);
    write_and_check(step_x[6], 7'b0101000);   // open + busy: auto-open on arrival
    prog_addr = step_x[5];
    #1;
    checks++;
    if (y !== step_y[5]) begin
      failures++;
      $display("FAIL neighbouring word changed by a write");
    end
    write_and_check(step_x[6], step_y[6]);     // restore

    // every mechanism must have happened
    checks++;
    if (n_close == 0 || n_open == 0 || n_up == 0 || n_down == 0 || n_busy == 0 ||
        n_clr_all == 0 || n_clr_btn == 0 || n_idle == 0 || n_write == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("door close %0d, door open %0d, up %0d, down %0d, busy %0d, clear-all %0d, clear-door-buttons %0d, idle %0d, writes %0d",
             n_close, n_open, n_up, n_down, n_busy, n_clr_all, n_clr_btn, n_idle, n_write);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
