// sum_generate_tb: checks the sum stage at its default width (32).
// Random half-sum and carry vectors are applied; each sum bit is compared with
// the half-sum xor the carry into that bit (cin for bit 0, the carry out of
// the bit below otherwise) and cout with the carry out of the top bit.
module sum_generate_tb;

  localparam int unsigned W = 32;

  logic [W-1:0] p, gc, s;
  logic         cin, cout;
  int checks = 0, failures = 0;

  sum_generate dut (.p(p), .gc(gc), .cin(cin), .s(s), .cout(cout));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic carry_in;
    for (int n = 0; n < 300; n++) begin
      p = $urandom; gc = $urandom; cin = 1'($urandom);
      if (n == 0) begin p = '1; gc = '0; cin = 1'b1; end
      #1;
      for (int i = 0; i < W; i++) begin
        carry_in = (i == 0) ? cin : gc[i-1];
        checks++;
        if (s[i] !== (p[i] ^ carry_in)) begin
          failures++;
          $display("FAIL bit %0d p=%h gc=%h cin=%b s=%h", i, p, gc, cin, s);
        end
      end
      checks++;
      if (cout !== gc[W-1]) begin
        failures++;
        $display("FAIL cout p=%h gc=%h cout=%b", p, gc, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
