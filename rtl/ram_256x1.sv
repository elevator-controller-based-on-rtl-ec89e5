// ram_256x1 -- 256 x 1 single-port distributed RAM, the storage primitive of
// the controller (8 address lines, 1 data line).
//
// Four of these, one per quarter of the address space, make one 1024 x 1 data
// line of the controller RAM.  Behaviour follows a single-port LUT RAM:
//   * write: on the rising edge of clk, when we is high, d is stored at a;
//   * read : o shows the bit at a combinationally (asynchronous read, no
//            output register), so a new address is answered within the same
//            clock period.
// INIT gives the power-up contents, bit i at address i.  The size (256 x 1)
// matches the resource count of the reference implementation (1024 x 7 bits
// in 112 six-input LUTs, i.e. 4 LUTs per 256 bits); the write port timing is
// this design's own choice.
module ram_256x1 #(
  parameter int unsigned              AW   = 8,
  parameter logic [(1 << AW)-1:0]     INIT = '0
) (
  input  logic          clk,
  input  logic          we,   // write enable
  input  logic [AW-1:0] a,    // address
  input  logic          d,    // write data
  output logic          o     // read data (asynchronous)
);

  logic mem [1 << AW];

  initial begin
    for (int i = 0; i < (1 << AW); i++) mem[i] = INIT[i];
  end

  always_ff @(posedge clk) begin
    if (we) mem[a] <= d;
  end

  assign o = mem[a];

endmodule
