// kogge_stone_adder: WIDTH-bit Kogge-Stone parallel prefix adder.
//
// Computes {cout, s} = x + y + cin in three stages:
//   1. pg_generate: per-bit generate/propagate from one half adder per bit,
//      carry-in folded into bit 0.
//   2. Prefix network: log2(WIDTH) levels. At level l (span d = 2**l) every
//      bit i >= d combines its pair with the pair of bit i-d through one
//      carry operator; bits below d pass their pair on unchanged. After the
//      last level bit i holds the group generate of bits [i:0], which is the
//      carry out of bit i. Every level has a fan-out of two and the wiring
//      reaches across distance d, which is what makes the network the fastest
//      (fewest levels) but also the largest of the prefix adders.
//   3. sum_generate: s[i] = p[i] ^ carry into bit i, cout = carry out of the
//      top bit.
// The network is the standard Kogge-Stone structure; the carry-in handling and
// the default width of 32 (the largest width the comparison uses, next to 8 and
// 16) are this design's choices. Purely combinational: no clock, the result is
// valid one propagation delay after the inputs settle. CELLS and LEVELS give
// the number of carry operators and their logic depth, for area and delay
// comparison with the Brent-Kung adder.
module kogge_stone_adder
  import ppa_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);

  localparam int unsigned LEVELS = $clog2(WIDTH);

  // Number of carry operators the generate loops below instantiate.
  function automatic int unsigned count_cells();
    int unsigned n = 0;
    for (int unsigned l = 0; l < LEVELS; l++)
      for (int unsigned i = 0; i < WIDTH; i++)
        if (i >= (1 << l)) n++;
    return n;
  endfunction

  localparam int unsigned CELLS = count_cells();

  pg_t [WIDTH-1:0]  pg0;
  logic [WIDTH-1:0] p;
  logic [WIDTH-1:0] gc;

  pg_generate #(.WIDTH(WIDTH)) u_pg (
    .x  (x),
    .y  (y),
    .cin(cin),
    .pg (pg0),
    .p  (p)
  );

  // Level l reads the pairs of level l-1 (the pg_generate output for l = 0)
  // and drives its own vector nxt.
  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned D = 1 << l;
    pg_t [WIDTH-1:0] prv;
    pg_t [WIDTH-1:0] nxt;
    if (l == 0) begin : g_first
      assign prv = pg0;
    end else begin : g_next
      assign prv = g_level[l-1].nxt;
    end
    for (genvar i = 0; i < WIDTH; i++) begin : g_bit
      if (i >= D) begin : g_op
        carry_operator u_op (
          .hi (prv[i]),
          .lo (prv[i-D]),
          .out(nxt[i])
        );
      end else begin : g_pass
        assign nxt[i] = prv[i];
      end
    end
  end

  for (genvar i = 0; i < WIDTH; i++) begin : g_out
    if (LEVELS == 0) begin : g_none
      assign gc[i] = pg0[i].g;
    end else begin : g_last
      assign gc[i] = g_level[LEVELS-1].nxt[i].g;
    end
  end

  sum_generate #(.WIDTH(WIDTH)) u_sum (
    .p   (p),
    .gc  (gc),
    .cin (cin),
    .s   (s),
    .cout(cout)
  );

endmodule
