// csla_mux2 -- one-bit 2:1 multiplexer used twice in every cell of the
// proposed carry-select adder.
//
// Output o follows i0 while the select s is 0 and i1 while s is 1. It is
// written in the AND-OR-inverter form that the gate-count model of the design
// assumes (one inverter, two AND gates, one OR gate: area 4, delay 3 units).
// The structure follows the design's 2:1 multiplexer drawing; the port names
// S, I0, I1 and O are the drawing's own.
//
// Interface: s, i0, i1 -> o, all one bit. Purely combinational, no clock.
module csla_mux2 (
  input  logic s,
  input  logic i0,
  input  logic i1,
  output logic o
);

  logic s_n;

  always_comb begin
    s_n = ~s;
    o   = (s_n & i0) | (s & i1);
  end

endmodule
