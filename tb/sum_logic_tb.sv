// sum_logic_tb: checks the sum row at the default 16 bits.
// The expected result is built bit by bit in a loop from the defining rule (S_0 = P_0,
// S_i = P_i xor G_(i-1):0, Cout = G_16:0), over corner and random inputs.
module sum_logic_tb;
  localparam int unsigned N = 16;
  logic [N:0]   p, gpre;
  logic [N+1:0] s;
  int checks = 0, failures = 0;

  sum_logic dut (.p(p), .gpre(gpre), .s(s));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [N+1:0] exp_s;
    #1;
    for (int i = 0; i <= N; i++) exp_s[i] = (i == 0) ? p[0] : (p[i] != gpre[i-1]);
    exp_s[N+1] = gpre[N];
    checks++;
    if (s !== exp_s) begin
      failures++;
      $display("FAIL p=%h gpre=%h: s=%h expected %h", p, gpre, s, exp_s);
    end
  endtask

  initial begin
    p = '0; gpre = '0; check();
    p = '1; gpre = '0; check();
    p = '0; gpre = '1; check();
    p = '1; gpre = '1; check();
    repeat (2000) begin
      p = (N+1)'($urandom); gpre = (N+1)'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
