// kogge_stone_adder_tb: checks the Kogge-Stone adder at 8, 16 and 32 bits
// (the 32-bit instance at the module's default width) and at 12 bits, a width
// that is not a power of two.
// All four instances see the low bits of the same operands. Every result is
// compared with x + y + cin computed in 64-bit integer arithmetic. The 8-bit
// adder is checked exhaustively (all x, y and cin); the wider ones with corner
// cases (full-length carry chains, all ones, alternating bits, single bits)
// and random operands. The operator count and the level count are compared
// with the closed forms N*log2(N)-N+1 and log2(N).
module kogge_stone_adder_tb
  import ppa_pkg::*;
;

  logic [31:0] x, y;
  logic        cin;
  logic [7:0]  s8;
  logic [11:0] s12;
  logic [15:0] s16;
  logic [31:0] s32;
  logic        c8, c12, c16, c32;
  int checks = 0, failures = 0;

  kogge_stone_adder #(.WIDTH(8))  u8  (.x(x[7:0]),  .y(y[7:0]),  .cin(cin), .s(s8),  .cout(c8));
  kogge_stone_adder #(.WIDTH(12)) u12 (.x(x[11:0]), .y(y[11:0]), .cin(cin), .s(s12), .cout(c12));
  kogge_stone_adder #(.WIDTH(16)) u16 (.x(x[15:0]), .y(y[15:0]), .cin(cin), .s(s16), .cout(c16));
  kogge_stone_adder               u32 (.x(x),       .y(y),       .cin(cin), .s(s32), .cout(c32));

  function automatic longint unsigned ref_add(longint unsigned a, longint unsigned b,
                                              logic c, int w);
    longint unsigned mask = (64'd1 << w) - 1;
    return (a & mask) + (b & mask) + longint'(c);
  endfunction

  task automatic cmp(string name, int w, longint unsigned got);
    longint unsigned exp = ref_add(64'(x), 64'(y), cin, w);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s x=%h y=%h cin=%b: got %h expected %h", name, x, y, cin, got, exp);
    end
  endtask

  task automatic apply(logic [31:0] a, logic [31:0] b, logic c, bit wide_only);
    x = a; y = b; cin = c;
    #1;
    if (!wide_only) cmp("ksa8", 8, 64'({c8, s8}));
    cmp("ksa12", 12, 64'({c12, s12}));
    cmp("ksa16", 16, 64'({c16, s16}));
    cmp("ksa32", 32, 64'({c32, s32}));
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
    check_count("ksa8 cells",   u8.CELLS,   ksa_cells(8));
    check_count("ksa16 cells",  u16.CELLS,  ksa_cells(16));
    check_count("ksa32 cells",  u32.CELLS,  ksa_cells(32));
    check_count("ksa8 levels",  u8.LEVELS,  ksa_levels(8));
    check_count("ksa16 levels", u16.LEVELS, ksa_levels(16));
    check_count("ksa32 levels", u32.LEVELS, ksa_levels(32));

    // exhaustive 8-bit
    for (int c = 0; c < 2; c++)
      for (int a = 0; a < 256; a++)
        for (int b = 0; b < 256; b++) begin
          x = {24'($urandom), 8'(a)}; y = {24'($urandom), 8'(b)}; cin = 1'(c);
          #1;
          cmp("ksa8", 8, 64'({c8, s8}));
        end

    // corners for the wider adders
    for (int c = 0; c < 2; c++) begin
      apply('1, '0, 1'(c), 0);
      apply('0, '1, 1'(c), 0);
      apply('1, '1, 1'(c), 0);
      apply('0, '0, 1'(c), 0);
      apply(32'h5555_5555, 32'hAAAA_AAAA, 1'(c), 0);
      apply(32'hAAAA_AAAA, 32'hAAAA_AAAA, 1'(c), 0);
      apply(32'h8000_0000, 32'h8000_0000, 1'(c), 0);
      for (int k = 0; k < 32; k++) begin
        apply(32'(1) << k, ~(32'(1) << k), 1'(c), 0);  // one-bit gap in a carry chain
        apply('1 >> k, 32'(1), 1'(c), 0);              // carry chain of length 32-k
      end
    end

    // random
    for (int n = 0; n < 20000; n++)
      apply($urandom, $urandom, 1'($urandom), 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
