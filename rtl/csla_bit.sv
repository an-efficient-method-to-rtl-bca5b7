// csla_bit -- one-bit cell of the proposed carry-select adder.
//
// Instead of two ripple-carry adders (one for carry-in 0, one for carry-in 1)
// the cell forms both candidate results directly from the operand bits:
//   carry-in 0: sum = a ^ b,      carry = a & b
//   carry-in 1: sum = ~(a ^ b),   carry = a | b
// Two 2:1 multiplexers, both selected by the incoming carry, pick the pair
// that applies. The sum inverter reuses the XOR output, so a cell costs one
// XOR, one NOT, one AND, one OR and two multiplexers.
//
// This structure and the selection rule (XOR/AND when the carry-in is 0,
// NOT/OR when it is 1) are the design's own. Building the multiplexers from
// the separate csla_mux2 cell is a choice of this implementation.
//
// Interface: a, b, cin -> sum, cout, all one bit. Purely combinational; the
// path from cin to cout is a single multiplexer.
module csla_bit (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic p;      // a ^ b, sum candidate for carry-in 0
  logic p_n;    // its inverse, sum candidate for carry-in 1
  logic g;      // a & b, carry candidate for carry-in 0
  logic t;      // a | b, carry candidate for carry-in 1

  always_comb begin
    p   = a ^ b;
    p_n = ~p;
    g   = a & b;
    t   = a | b;
  end

  csla_mux2 u_sum_mux (
    .s  (cin),
    .i0 (p),
    .i1 (p_n),
    .o  (sum)
  );

  csla_mux2 u_carry_mux (
    .s  (cin),
    .i0 (g),
    .i1 (t),
    .o  (cout)
  );

endmodule
