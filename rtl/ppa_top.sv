// ppa_top: the two parallel prefix adders under comparison, side by side.
//
// A Kogge-Stone adder and a Brent-Kung adder of the same width receive the same
// operands x, y and carry-in cin, and each brings out its own sum and carry
// out, so that their results, area and delay can be compared on identical
// inputs. Both compute {cout, s} = x + y + cin; they differ only in the prefix
// network that produces the carries (Kogge-Stone: log2(WIDTH) levels, about
// WIDTH*log2(WIDTH) operators; Brent-Kung: 2*log2(WIDTH)-1 levels, about
// 2*WIDTH operators). The comparison covers widths of 8, 16 and 32 bits; the
// default here is 32, and 8 and 16 are obtained through WIDTH.
// Purely combinational: no clock and no reset.
module ppa_top #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             cin,
  output logic [WIDTH-1:0] sum_ksa,
  output logic             cout_ksa,
  output logic [WIDTH-1:0] sum_bka,
  output logic             cout_bka
);

  kogge_stone_adder #(.WIDTH(WIDTH)) u_ksa (
    .x   (x),
    .y   (y),
    .cin (cin),
    .s   (sum_ksa),
    .cout(cout_ksa)
  );

  brent_kung_adder #(.WIDTH(WIDTH)) u_bka (
    .x   (x),
    .y   (y),
    .cin (cin),
    .s   (sum_bka),
    .cout(cout_bka)
  );

endmodule
