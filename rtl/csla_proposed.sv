// csla_proposed -- WIDTH-bit adder made of proposed carry-select cells.
//
// Each bit position holds one csla_bit. The external carry-in drives the two
// multiplexer selects of bit 0; the carry chosen by bit i drives the two
// selects of bit i+1, and the carry chosen by the top bit is cout. The
// operand-only logic of every bit (XOR, NOT, AND, OR) settles in parallel, so
// once the operands are stable the carry travels through one multiplexer per
// bit. With the default WIDTH of 8 the adder holds 8 XOR, 8 NOT, 8 AND, 8 OR
// and 16 multiplexers.
//
// The 8-bit arrangement and the carry chain through the multiplexer selects
// are the design's own; WIDTH as a parameter follows its statement that the
// same cell is cascaded into 8, 16 and 32-bit adders.
//
// Interface: a, b (WIDTH bits) and cin in; sum (WIDTH bits) and cout out,
// with {cout, sum} = a + b + cin. Purely combinational, no clock or reset.
module csla_proposed #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  // carry[i] is the select of bit i; carry[WIDTH] leaves the adder.
  logic [WIDTH:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    csla_bit u_bit (
      .a    (a[i]),
      .b    (b[i]),
      .cin  (carry[i]),
      .sum  (sum[i]),
      .cout (carry[i+1])
    );
  end

  assign cout = carry[WIDTH];

endmodule
