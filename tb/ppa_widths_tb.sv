// ppa_widths_tb: the comparison at all three widths, 8, 16 and 32 bits.
// One comparison top per width receives the low bits of the same operands.
// For each width the Kogge-Stone and Brent-Kung results are compared with
// x + y + cin and with each other; the 8-bit pair is checked exhaustively.
// At the end the structure of both prefix networks is printed per width
// (carry operators and operator levels), the two figures that stand for area
// and delay in the comparison, and checked against the closed forms.
module ppa_widths_tb
  import ppa_pkg::*;
;

  logic [31:0] x, y;
  logic        cin;
  logic [7:0]  k8, b8;
  logic [15:0] k16, b16;
  logic [31:0] k32, b32;
  logic        kc8, bc8, kc16, bc16, kc32, bc32;
  int checks = 0, failures = 0;

  ppa_top #(.WIDTH(8)) u8 (
    .x(x[7:0]), .y(y[7:0]), .cin(cin),
    .sum_ksa(k8), .cout_ksa(kc8), .sum_bka(b8), .cout_bka(bc8)
  );
  ppa_top #(.WIDTH(16)) u16 (
    .x(x[15:0]), .y(y[15:0]), .cin(cin),
    .sum_ksa(k16), .cout_ksa(kc16), .sum_bka(b16), .cout_bka(bc16)
  );
  ppa_top #(.WIDTH(32)) u32 (
    .x(x), .y(y), .cin(cin),
    .sum_ksa(k32), .cout_ksa(kc32), .sum_bka(b32), .cout_bka(bc32)
  );

  task automatic cmp(string name, int w, longint unsigned got);
    longint unsigned mask = (64'd1 << w) - 1;
    longint unsigned exp = (longint'(x) & mask) + (longint'(y) & mask) + longint'(cin);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s x=%h y=%h cin=%b: got %h expected %h", name, x, y, cin, got, exp);
    end
  endtask

  task automatic check_all(bit skip8);
    #1;
    if (!skip8) begin
      cmp("ksa8", 8, 64'({kc8, k8}));
      cmp("bka8", 8, 64'({bc8, b8}));
    end
    cmp("ksa16", 16, 64'({kc16, k16}));
    cmp("bka16", 16, 64'({bc16, b16}));
    cmp("ksa32", 32, 64'({kc32, k32}));
    cmp("bka32", 32, 64'({bc32, b32}));
  endtask

  task automatic check_count(string what, int unsigned got, int unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++)
      for (int a = 0; a < 256; a++)
        for (int b = 0; b < 256; b++) begin
          x = {24'($urandom), 8'(a)}; y = {24'($urandom), 8'(b)}; cin = 1'(c);
          check_all(0);
        end
    for (int n = 0; n < 20000; n++) begin
      x = $urandom; y = $urandom; cin = 1'($urandom);
      check_all(0);
    end

    $display("width  KSA operators  KSA levels  BKA operators  BKA levels");
    $display("%5d  %13d  %10d  %13d  %10d", 8,
             u8.u_ksa.CELLS, u8.u_ksa.LEVELS, u8.u_bka.CELLS, u8.u_bka.LEVELS);
    $display("%5d  %13d  %10d  %13d  %10d", 16,
             u16.u_ksa.CELLS, u16.u_ksa.LEVELS, u16.u_bka.CELLS, u16.u_bka.LEVELS);
    $display("%5d  %13d  %10d  %13d  %10d", 32,
             u32.u_ksa.CELLS, u32.u_ksa.LEVELS, u32.u_bka.CELLS, u32.u_bka.LEVELS);
    check_count("ksa8 cells",  u8.u_ksa.CELLS,  ksa_cells(8));
    check_count("ksa16 cells", u16.u_ksa.CELLS, ksa_cells(16));
    check_count("ksa32 cells", u32.u_ksa.CELLS, ksa_cells(32));
    check_count("bka8 cells",  u8.u_bka.CELLS,  bka_cells(8));
    check_count("bka16 cells", u16.u_bka.CELLS, bka_cells(16));
    check_count("bka32 cells", u32.u_bka.CELLS, bka_cells(32));
    check_count("bka8 levels",  u8.u_bka.LEVELS,  bka_levels(8));
    check_count("bka16 levels", u16.u_bka.LEVELS, bka_levels(16));
    check_count("bka32 levels", u32.u_bka.LEVELS, bka_levels(32));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
