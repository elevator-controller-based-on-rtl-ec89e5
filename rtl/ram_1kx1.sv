// ram_1kx1 -- 1024 x 1 single-port RAM: one data line of the controller.
//
// Built as in the design's schematic: four 256 x 1 RAM primitives share the
// lower eight address lines a[7:0]; a 4-to-1 multiplexer with enable (m4_1e)
// picks the primitive named by the upper two lines a[9:8].  The read path is
// combinational (no register anywhere).  For writes, this design decodes
// a[9:8] into the write enable of the one primitive that holds the addressed
// bit; the write decode is not part of the published schematic.
// INIT holds the power-up contents, bit i at address i.
module ram_1kx1 #(
  parameter logic [elevator_pkg::DEPTH-1:0] INIT = '0
) (
  input  logic                         clk,
  input  logic                         we,
  input  logic [elevator_pkg::N_IN-1:0] a,
  input  logic                         d,
  output logic                         o
);
  import elevator_pkg::*;

  logic [N_SUB-1:0] sub_o;
  logic [N_SUB-1:0] sub_we;

  always_comb begin
    for (int q = 0; q < int'(N_SUB); q++)
      sub_we[q] = we && (a[N_IN-1:SUB_AW] == q[N_IN-SUB_AW-1:0]);
  end

  for (genvar q = 0; q < N_SUB; q++) begin : g_quarter
    ram_256x1 #(
      .AW  (SUB_AW),
      .INIT(INIT[q*SUB_DEPTH +: SUB_DEPTH])
    ) u_ram (
      .clk(clk),
      .we (sub_we[q]),
      .a  (a[SUB_AW-1:0]),
      .d  (d),
      .o  (sub_o[q])
    );
  end

  m4_1e u_mux (
    .d(sub_o),
    .s(a[N_IN-1:SUB_AW]),
    .e(1'b1),
    .o(o)
  );

endmodule
