// pg_generate: pre-processing stage of a parallel prefix adder.
//
// One half adder per bit position i turns the operand bits x[i], y[i] into the
// bit's generate g = x&y and propagate p = x^y. The carry-in is folded into
// bit 0: its pair becomes (g0 | p0&cin, p0), so that the prefix network's group
// generate over bits [i:0] is directly the carry into bit i+1 and no extra
// carry-in row is needed. The raw half-sum bits x^y are also passed on, as the
// sum stage needs them unchanged.
// Interface: x, y (WIDTH bits), cin; outputs pg[WIDTH] and p (WIDTH bits).
// Purely combinational, one gate level plus the carry-in merge on bit 0.
module pg_generate
  import ppa_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             cin,
  output pg_t  [WIDTH-1:0] pg,
  output logic [WIDTH-1:0] p
);

  logic [WIDTH-1:0] g;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    half_adder u_ha (
      .x   (x[i]),
      .y   (y[i]),
      .s   (p[i]),
      .cout(g[i])
    );
  end

  always_comb begin
    for (int unsigned i = 0; i < WIDTH; i++) begin
      pg[i].g = g[i];
      pg[i].p = p[i];
    end
    pg[0].g = g[0] | (p[0] & cin);
  end

endmodule
