// half_adder_tb: exhaustive check of the half adder against its truth table.
// All four input combinations are applied and s/cout compared with the
// expected table rows 0+0=00, 0+1=01, 1+0=01, 1+1=10.
module half_adder_tb;

  logic x, y, s, cout;
  int checks = 0, failures = 0;

  // expected {cout, s} for input index {x, y}
  localparam logic [1:0] TABLE [4] = '{2'b00, 2'b01, 2'b01, 2'b10};

  half_adder dut (.x(x), .y(y), .s(s), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {x, y} = 2'(i);
      #1;
      checks++;
      if ({cout, s} !== TABLE[i]) begin
        failures++;
        $display("FAIL x=%b y=%b: cout,s=%b%b expected %b", x, y, cout, s, TABLE[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
