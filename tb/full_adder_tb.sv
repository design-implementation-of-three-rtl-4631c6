// full_adder_tb: exhaustive test of one full-adder cell.
// All eight input combinations; the expected {cy, s} is the integer count of ones in {a, b, c}.
module full_adder_tb;
  logic a, b, c, s, cy;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .c(c), .s(s), .cy(cy));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int ones;
      {a, b, c} = 3'(v);
      ones = int'(a) + int'(b) + int'(c);
      #1;
      checks++;
      if ({cy, s} != 2'(ones)) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b: got cy=%0b s=%0b", a, b, c, cy, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
