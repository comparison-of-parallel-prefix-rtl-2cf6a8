// brent_kung_adder: WIDTH-bit Brent-Kung parallel prefix adder.
//
// Computes {cout, s} = x + y + cin in three stages:
//   1. pg_generate: per-bit generate/propagate from one half adder per bit,
//      carry-in folded into bit 0.
//   2. Prefix network as a binary tree followed by an inverse tree.
//      Up-sweep, levels l = 0 .. log2(WIDTH)-1 (span d = 2**l): every bit i
//      with (i+1) a multiple of 2d combines with bit i-d. Afterwards bit
//      2**k - 1 holds the full prefix of bits [2**k-1:0] for every k.
//      Down-sweep, spans d = WIDTH/4 .. 1: every bit i with (i+1) an odd
//      multiple of d, i+1 >= 3d, combines with bit i-d, which by then holds a
//      full prefix, so bit i does too. After the last level every bit i holds
//      the carry out of bit i. Every operator has a fan-out of at most two and
//      short, regular wiring; the price is 2*log2(WIDTH)-1 levels instead of
//      log2(WIDTH), against roughly 2*WIDTH instead of WIDTH*log2(WIDTH)
//      operators.
//   3. sum_generate: s[i] = p[i] ^ carry into bit i, cout = carry out of the
//      top bit.
// The network is the standard Brent-Kung structure (it also works for widths
// that are not a power of two); the carry-in handling and the default width of
// 32 (the largest width the comparison uses, next to 8 and 16) are this
// design's choices. Purely combinational: no clock. CELLS and LEVELS give the
// number of carry operators and the number of operator levels.
module brent_kung_adder
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

  localparam int unsigned UP     = $clog2(WIDTH);
  localparam int unsigned DOWN   = (UP > 0) ? UP - 1 : 0;
  localparam int unsigned LEVELS = UP + DOWN;

  // Up-sweep node: (i+1) is a multiple of 2d.
  function automatic bit up_node(int unsigned i, int unsigned d);
    return ((i + 1) % (2 * d)) == 0;
  endfunction

  // Down-sweep node: (i+1) is an odd multiple of d, at least 3d.
  function automatic bit down_node(int unsigned i, int unsigned d);
    return (((i + 1) % (2 * d)) == d) && (i + 1 >= 3 * d);
  endfunction

  // Number of carry operators the generate loops below instantiate.
  function automatic int unsigned count_cells();
    int unsigned n = 0;
    for (int unsigned l = 0; l < UP; l++)
      for (int unsigned i = 0; i < WIDTH; i++)
        if (up_node(i, 1 << l)) n++;
    for (int unsigned k = 0; k < DOWN; k++)
      for (int unsigned i = 0; i < WIDTH; i++)
        if (down_node(i, 1 << (DOWN - 1 - k))) n++;
    return n;
  endfunction

  localparam int unsigned CELLS = count_cells();

  pg_t [WIDTH-1:0]  pg0;
  pg_t [WIDTH-1:0]  up_out;
  logic [WIDTH-1:0] p;
  logic [WIDTH-1:0] gc;

  pg_generate #(.WIDTH(WIDTH)) u_pg (
    .x  (x),
    .y  (y),
    .cin(cin),
    .pg (pg0),
    .p  (p)
  );

  // Up-sweep (reduction tree). Level l reads the pairs of level l-1 (the
  // pg_generate output for l = 0) and drives its own vector nxt.
  for (genvar l = 0; l < UP; l++) begin : g_up
    localparam int unsigned D = 1 << l;
    pg_t [WIDTH-1:0] prv;
    pg_t [WIDTH-1:0] nxt;
    if (l == 0) begin : g_first
      assign prv = pg0;
    end else begin : g_next
      assign prv = g_up[l-1].nxt;
    end
    for (genvar i = 0; i < WIDTH; i++) begin : g_bit
      if (up_node(i, D)) begin : g_op
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

  if (UP == 0) begin : g_up_none
    assign up_out = pg0;
  end else begin : g_up_last
    assign up_out = g_up[UP-1].nxt;
  end

  // Down-sweep (inverse tree), spans halving from WIDTH/4 to 1.
  for (genvar k = 0; k < DOWN; k++) begin : g_down
    localparam int unsigned D = 1 << (DOWN - 1 - k);
    pg_t [WIDTH-1:0] prv;
    pg_t [WIDTH-1:0] nxt;
    if (k == 0) begin : g_first
      assign prv = up_out;
    end else begin : g_next
      assign prv = g_down[k-1].nxt;
    end
    for (genvar i = 0; i < WIDTH; i++) begin : g_bit
      if (down_node(i, D)) begin : g_op
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
    if (DOWN == 0) begin : g_none
      assign gc[i] = up_out[i].g;
    end else begin : g_last
      assign gc[i] = g_down[DOWN-1].nxt[i].g;
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
