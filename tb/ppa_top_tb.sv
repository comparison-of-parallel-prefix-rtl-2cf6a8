// ppa_top_tb: end-to-end test of the comparison top at its default width
// (32 bits, no parameter override).
// Both adders get the same operands; each result is compared with x + y + cin
// computed in 64-bit integer arithmetic, and the two adders are compared with
// each other. The test counts how often each carry mechanism of a prefix adder
// was exercised and fails if one never was:
//   cin_used     - a carry-in that changes the sum (folded into bit 0's pair)
//   cout_set     - a carry out of the top bit
//   full_chain   - a carry generated in bit 0 (or the carry-in) that
//                  propagates through every bit to the carry out
//   generate_mid - a carry generated in an inner bit and killed before the top
module ppa_top_tb;

  localparam int unsigned W = 32;

  logic [W-1:0] x, y, sum_ksa, sum_bka;
  logic         cin, cout_ksa, cout_bka;
  int checks = 0, failures = 0;
  int n_cin_used = 0, n_cout_set = 0, n_full_chain = 0, n_generate_mid = 0;

  ppa_top dut (
    .x(x), .y(y), .cin(cin),
    .sum_ksa(sum_ksa), .cout_ksa(cout_ksa),
    .sum_bka(sum_bka), .cout_bka(cout_bka)
  );

  task automatic apply(logic [W-1:0] a, logic [W-1:0] b, logic c);
    longint unsigned exp;
    logic [W-1:0] carries;
    x = a; y = b; cin = c;
    #1;
    exp = longint'(a) + longint'(b) + longint'(c);
    // carry into each bit, from the sum bits: c_i = s_i ^ a_i ^ b_i
    carries = W'(exp) ^ a ^ b;
    checks++;
    if ({cout_ksa, sum_ksa} !== (W+1)'(exp)) begin
      failures++;
      $display("FAIL ksa x=%h y=%h cin=%b: %b_%h expected %h", a, b, c, cout_ksa, sum_ksa, exp);
    end
    checks++;
    if ({cout_bka, sum_bka} !== (W+1)'(exp)) begin
      failures++;
      $display("FAIL bka x=%h y=%h cin=%b: %b_%h expected %h", a, b, c, cout_bka, sum_bka, exp);
    end
    checks++;
    if ({cout_ksa, sum_ksa} !== {cout_bka, sum_bka}) begin
      failures++;
      $display("FAIL ksa/bka disagree x=%h y=%h cin=%b", a, b, c);
    end
    if (c && (W'(exp) != W'(longint'(a) + longint'(b)))) n_cin_used++;
    if (exp[W]) n_cout_set++;
    if (exp[W] && (&carries[W-1:1]) && ((a[0] & b[0]) | ((a[0] ^ b[0]) & c)) &&
        (&(a[W-1:1] ^ b[W-1:1]))) n_full_chain++;
    if (!exp[W] && (|(a[W-2:1] & b[W-2:1])) && !(a[W-1] | b[W-1])) n_generate_mid++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // directed: full-length carry chains from a generate in bit 0 and from cin
    apply('1, 32'h1, 1'b0);
    apply('1, '0, 1'b1);
    apply(32'h7fff_ffff, 32'h8000_0001, 1'b0);
    // generate in the middle, killed at the top
    apply(32'h0000_ff00, 32'h0000_0100, 1'b0);
    apply(32'h0f0f_0f0f, 32'h00f0_f0f1, 1'b1);
    // random
    for (int n = 0; n < 20000; n++) begin
      apply($urandom, $urandom, 1'($urandom));
      // a random operand plus a small one, which makes long carry chains likely
      apply($urandom | ~('1 << ($urandom % W)), 32'(1) << ($urandom % 4), 1'($urandom));
    end

    $display("mechanisms: cin_used=%0d cout_set=%0d full_chain=%0d generate_mid=%0d",
             n_cin_used, n_cout_set, n_full_chain, n_generate_mid);
    checks++; if (n_cin_used == 0)     begin failures++; $display("FAIL cin never used"); end
    checks++; if (n_cout_set == 0)     begin failures++; $display("FAIL cout never set"); end
    checks++; if (n_full_chain == 0)   begin failures++; $display("FAIL no full-length carry chain"); end
    checks++; if (n_generate_mid == 0) begin failures++; $display("FAIL no inner generate"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
