// carry_operator_tb: exhaustive check of the fundamental carry operator.
// All 16 combinations of the two (g,p) pairs are applied. The expected output
// is derived from what the operator means rather than from its formula: the
// merged group generates a carry if, with a carry-in of 0, the carry out of the
// two-group chain is 1, and propagates if a carry-in of 1 with no generation
// anywhere reaches the output.
module carry_operator_tb
  import ppa_pkg::*;
;

  pg_t hi, lo, out;
  int checks = 0, failures = 0;

  carry_operator dut (.hi(hi), .lo(lo), .out(out));

  // Carry out of a group (g,p) given its carry-in.
  function automatic logic group_carry(pg_t grp, logic c);
    return grp.g ? 1'b1 : (grp.p ? c : 1'b0);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic eg, ep;
    for (int i = 0; i < 16; i++) begin
      {hi, lo} = 4'(i);
      #1;
      eg = group_carry(hi, group_carry(lo, 1'b0));
      ep = group_carry(pg_t'{g: 1'b0, p: hi.p}, group_carry(pg_t'{g: 1'b0, p: lo.p}, 1'b1));
      checks++;
      if (out.g !== eg || out.p !== ep) begin
        failures++;
        $display("FAIL hi=%b lo=%b: out=%b expected g=%b p=%b", hi, lo, out, eg, ep);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
