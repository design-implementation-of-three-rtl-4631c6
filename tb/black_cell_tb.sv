// black_cell_tb: exhaustive test of the full prefix operator.
// Expected values come from the carry meaning of the groups: the merged group generates if the
// upper group generates or propagates a carry the lower group generates; it propagates only if
// both groups propagate.
module black_cell_tb;
  logic gk, pk, gj, pj, g, p;
  int checks = 0, failures = 0;

  black_cell dut (.gk(gk), .pk(pk), .gj(gj), .pj(pj), .g(g), .p(p));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic exp_g, exp_p;
      {gk, pk, gj, pj} = 4'(v);
      exp_g = gk ? 1'b1 : (pk ? gj : 1'b0);
      exp_p = (pk && pj) ? 1'b1 : 1'b0;
      #1;
      checks++;
      if (g !== exp_g || p !== exp_p) begin
        failures++;
        $display("FAIL gk=%0b pk=%0b gj=%0b pj=%0b: g=%0b p=%0b expected %0b %0b",
                 gk, pk, gj, pj, g, p, exp_g, exp_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
