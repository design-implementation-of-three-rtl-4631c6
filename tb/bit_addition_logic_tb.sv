// bit_addition_logic_tb: checks the full-adder row at the default 16 bits.
// For every vector the row must preserve the arithmetic value, s_p + 2*cy == a + b + c, and its sum
// bits must be the bitwise parity of the operands. Corner vectors plus random ones.
module bit_addition_logic_tb;
  localparam int unsigned N = 16;
  logic [N-1:0] a, b, c, s_p, cy;
  int checks = 0, failures = 0;

  bit_addition_logic dut (.a(a), .b(b), .c(c), .s_p(s_p), .cy(cy));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    longint exp_sum, got_sum;
    #1;
    exp_sum = longint'(a) + longint'(b) + longint'(c);
    got_sum = longint'(s_p) + 2 * longint'(cy);
    checks++;
    if (got_sum != exp_sum || s_p != (a ^ b ^ c)) begin
      failures++;
      $display("FAIL a=%h b=%h c=%h: s_p=%h cy=%h", a, b, c, s_p, cy);
    end
  endtask

  initial begin
    a = '0; b = '0; c = '0; check();
    a = '1; b = '1; c = '1; check();
    a = '1; b = '0; c = '0; check();
    a = 16'h5555; b = 16'hAAAA; c = 16'h00FF; check();
    for (int k = 0; k < N; k++) begin
      a = N'(1) << k; b = a; c = '0; check();
      c = a; check();
    end
    repeat (2000) begin
      a = N'($urandom); b = N'($urandom); c = N'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
