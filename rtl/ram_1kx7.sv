// ram_1kx7 -- 1024 x 7 single-port RAM holding the controller program.
//
// Seven 1024 x 1 data lines (ram_1kx1) side by side, sharing the ten address
// lines, the clock and the write enable; data line j is bit j of d and o.
// Read is combinational, write is on the rising clock edge when we is high.
// INIT is laid out as INIT[j*1024 + address] = bit j at that address; its
// default is the elevator program of elevator_pkg (20 steps, 0 elsewhere).
module ram_1kx7 #(
  parameter logic [elevator_pkg::N_OUT*elevator_pkg::DEPTH-1:0] INIT = elevator_pkg::lut_image()
) (
  input  logic                           clk,
  input  logic                           we,
  input  logic [elevator_pkg::N_IN-1:0]  a,
  input  logic [elevator_pkg::N_OUT-1:0] d,
  output logic [elevator_pkg::N_OUT-1:0] o
);
  import elevator_pkg::*;

  for (genvar j = 0; j < N_OUT; j++) begin : g_bit
    ram_1kx1 #(
      .INIT(INIT[j*DEPTH +: DEPTH])
    ) u_line (
      .clk(clk),
      .we (we),
      .a  (a),
      .d  (d[j]),
      .o  (o[j])
    );
  end

endmodule
