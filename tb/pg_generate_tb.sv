// pg_generate_tb: checks the pre-processing stage at its default width (32).
// Random operands and carry-ins plus the all-zero and all-one corners are
// applied; every bit's generate and propagate are compared with values
// computed bit by bit from the operands, including the carry-in merge into
// bit 0.
module pg_generate_tb
  import ppa_pkg::*;
;

  localparam int unsigned W = 32;

  logic [W-1:0] x, y, p;
  logic         cin;
  pg_t  [W-1:0] pg;
  int checks = 0, failures = 0;

  pg_generate dut (.x(x), .y(y), .cin(cin), .pg(pg), .p(p));

  task automatic check();
    logic eg, ep;
    #1;
    for (int i = 0; i < W; i++) begin
      ep = (x[i] != y[i]);
      eg = (x[i] && y[i]) || (i == 0 && ep && cin);
      checks++;
      if (pg[i].g !== eg || pg[i].p !== ep || p[i] !== ep) begin
        failures++;
        $display("FAIL bit %0d x=%h y=%h cin=%b: g=%b p=%b praw=%b", i, x, y, cin,
                 pg[i].g, pg[i].p, p[i]);
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++) begin
      cin = 1'(c);
      x = '0; y = '0; check();
      x = '1; y = '0; check();
      x = '0; y = '1; check();
      x = '1; y = '1; check();
    end
    for (int n = 0; n < 200; n++) begin
      x = $urandom; y = $urandom; cin = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
