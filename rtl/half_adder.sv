// half_adder: one-bit half adder.
//
// Adds the two input bits x and y: the sum bit is x xor y and the carry bit is
// x and y, as in the half adder truth table (0+0=00, 0+1=01, 1+0=01, 1+1=10).
// In the prefix adders it is the per-bit pre-processing cell: its sum output
// is the bit's propagate p and its carry output the bit's generate g.
// Purely combinational; the equations are the standard half adder ones.
module half_adder (
  input  logic x,
  input  logic y,
  output logic s,
  output logic cout
);

  assign s    = x ^ y;
  assign cout = x & y;

endmodule
