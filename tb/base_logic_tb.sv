// base_logic_tb: checks the saltire-cell row at the default 16 bits.
// Each position i must act as a half adder of S'_i and the carry bit from position i-1 (carry-in at
// position 0, S'_16 = 0 at the top): p + 2*g == {0, s_p} + {cy, cin} and g & p == 0, plus a
// per-bit check of position 0 (carry-in) and position 16 (top cell).
module base_logic_tb;
  localparam int unsigned N = 16;
  logic [N-1:0] s_p, cy;
  logic         cin;
  logic [N:0]   g, p;
  int checks = 0, failures = 0;

  base_logic dut (.s_p(s_p), .cy(cy), .cin(cin), .g(g), .p(p));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    longint lhs, rhs;
    #1;
    lhs = longint'(p) + 2 * longint'(g);
    rhs = longint'(s_p) + 2 * longint'(cy) + longint'(cin);
    checks++;
    if (lhs != rhs || (g & p) != '0) begin
      failures++;
      $display("FAIL s_p=%h cy=%h cin=%0b: g=%h p=%h", s_p, cy, cin, g, p);
    end
    checks++;
    if (g[0] != (s_p[0] & cin) || p[0] != (s_p[0] ^ cin) || g[N] != 1'b0 || p[N] != cy[N-1]) begin
      failures++;
      $display("FAIL end cells s_p=%h cy=%h cin=%0b: g=%h p=%h", s_p, cy, cin, g, p);
    end
  endtask

  initial begin
    s_p = '0; cy = '0; cin = 1'b0; check();
    s_p = '1; cy = '1; cin = 1'b1; check();
    s_p = 16'h0001; cy = '0; cin = 1'b1; check();
    s_p = '0; cy = 16'h8000; cin = 1'b0; check();
    repeat (2000) begin
      s_p = N'($urandom); cy = N'($urandom); cin = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
