// gray_cell_tb: exhaustive test of the reduced prefix operator.
// The expected group generate is worked out from its meaning: the merged group generates a carry
// if the upper group generates one, or if the upper group propagates and the lower one generates.
module gray_cell_tb;
  logic gk, pk, gj, g;
  int checks = 0, failures = 0;

  gray_cell dut (.gk(gk), .pk(pk), .gj(gj), .g(g));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic exp_g;
      {gk, pk, gj} = 3'(v);
      if (gk) exp_g = 1'b1;
      else if (pk && gj) exp_g = 1'b1;
      else exp_g = 1'b0;
      #1;
      checks++;
      if (g !== exp_g) begin
        failures++;
        $display("FAIL gk=%0b pk=%0b gj=%0b: g=%0b expected %0b", gk, pk, gj, g, exp_g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
