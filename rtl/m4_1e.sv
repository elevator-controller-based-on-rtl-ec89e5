// m4_1e -- 4-to-1 multiplexer with enable.
//
// Selects one of the four 256 x 1 RAM outputs of a 1024 x 1 data line with
// the two upper address lines.  o = e ? d[s] : 0.  Purely combinational.
// The design names this element after the schematic-library cell it used;
// the gate-level function (select, forced low when disabled) is that cell's
// usual definition.
module m4_1e (
  input  logic [3:0] d,  // data inputs D0..D3
  input  logic [1:0] s,  // select S1:S0
  input  logic       e,  // enable, active high
  output logic       o
);

  always_comb begin
    o = e ? d[s] : 1'b0;
  end

endmodule
