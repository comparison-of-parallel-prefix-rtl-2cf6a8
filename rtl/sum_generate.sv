// sum_generate: post-processing (sum) stage of a parallel prefix adder.
//
// After the prefix network, gc[i] is the group generate of bits [i:0] with the
// carry-in already folded in, i.e. the carry out of bit i. The carry into bit
// i is therefore cin for i = 0 and gc[i-1] otherwise, and each sum bit is the
// bit's half-sum p[i] xor that carry. The carry out of the adder is
// gc[WIDTH-1].
// Interface: p (half-sum bits), gc (carries out of each bit), cin;
// outputs s (WIDTH bits) and cout. Purely combinational, one XOR level.
module sum_generate #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] p,
  input  logic [WIDTH-1:0] gc,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);

  logic [WIDTH-1:0] c;

  if (WIDTH > 1) begin : g_carry
    assign c = {gc[WIDTH-2:0], cin};
  end else begin : g_carry1
    assign c = cin;
  end

  assign s    = p ^ c;
  assign cout = gc[WIDTH-1];

endmodule
