// three_operand_adder_tb: checks the four-stage core against integer addition.
// s must equal a + b + c + cin exactly. The 4-bit instance is tested exhaustively (all 2**13
// input combinations); the default 16-bit, a 32-bit and a 64-bit instance with corner and random
// vectors.
module three_operand_adder_tb;
  localparam int unsigned N4  = 4;
  localparam int unsigned N16 = 16;
  localparam int unsigned N32 = 32;
  localparam int unsigned N64 = 64;

  logic [N4-1:0]  a4, b4, c4;
  logic [N4+1:0]  s4;
  logic [N16-1:0] a16, b16, c16;
  logic [N16+1:0] s16;
  logic [N32-1:0] a32, b32, c32;
  logic [N32+1:0] s32;
  logic [N64-1:0] a64, b64, c64;
  logic [N64+1:0] s64;
  logic           cin;
  int checks = 0, failures = 0;
  int cout_seen = 0;

  three_operand_adder #(.N(N4))  dut4  (.a(a4),  .b(b4),  .c(c4),  .cin(cin), .s(s4));
  three_operand_adder            dut16 (.a(a16), .b(b16), .c(c16), .cin(cin), .s(s16));
  three_operand_adder #(.N(N32)) dut32 (.a(a32), .b(b32), .c(c32), .cin(cin), .s(s32));
  three_operand_adder #(.N(N64)) dut64 (.a(a64), .b(b64), .c(c64), .cin(cin), .s(s64));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_wide();
    longint e16, e32;
    logic [N64+1:0] e64;
    #1;
    e16 = longint'(a16) + longint'(b16) + longint'(c16) + longint'(cin);
    e32 = longint'(a32) + longint'(b32) + longint'(c32) + longint'(cin);
    checks++;
    if (longint'(s16) != e16) begin
      failures++;
      $display("FAIL N=16 %0d+%0d+%0d+%0d: got %0d expected %0d", a16, b16, c16, cin, s16, e16);
    end
    checks++;
    if (longint'(s32) != e32) begin
      failures++;
      $display("FAIL N=32 %0d+%0d+%0d+%0d: got %0d expected %0d", a32, b32, c32, cin, s32, e32);
    end
    e64 = (N64+2)'(a64) + (N64+2)'(b64) + (N64+2)'(c64) + (N64+2)'(cin);
    checks++;
    if (s64 != e64) begin
      failures++;
      $display("FAIL N=64 %h+%h+%h+%0d: got %h expected %h", a64, b64, c64, cin, s64, e64);
    end
    if (s16[N16+1]) cout_seen++;
  endtask

  initial begin
    a16 = '0; b16 = '0; c16 = '0; a32 = '0; b32 = '0; c32 = '0;
    a64 = '0; b64 = '0; c64 = '0;
    // Exhaustive 4-bit.
    for (int v = 0; v < (1 << (3 * N4 + 1)); v++) begin
      int e;
      {cin, a4, b4, c4} = (3 * N4 + 1)'(v);
      #1;
      e = int'(a4) + int'(b4) + int'(c4) + int'(cin);
      checks++;
      if (int'(s4) != e) begin
        failures++;
        $display("FAIL N=4 %0d+%0d+%0d+%0d: got %0d", a4, b4, c4, cin, s4);
      end
    end
    // Corners: all ones with and without carry-in, single long propagate chains.
    for (int ci = 0; ci < 2; ci++) begin
      cin = 1'(ci);
      a16 = '1; b16 = '1; c16 = '1; a32 = '1; b32 = '1; c32 = '1;
      a64 = '1; b64 = '1; c64 = '1; check_wide();
      a16 = '1; b16 = '0; c16 = '0; a32 = '1; b32 = '0; c32 = '0;
      a64 = '1; b64 = '0; c64 = '0; check_wide();
      a16 = '1; b16 = 1;  c16 = '0; a32 = '1; b32 = 1;  c32 = '0;
      a64 = '1; b64 = 1;  c64 = '0; check_wide();
      a16 = '1; b16 = '1; c16 = 1;  a32 = '1; b32 = '1; c32 = 1; 
      a64 = '1; b64 = '1; c64 = 1;  check_wide();
    end
    repeat (20000) begin
      cin = 1'($urandom);
      a16 = N16'($urandom); b16 = N16'($urandom); c16 = N16'($urandom);
      a32 = $urandom; b32 = $urandom; c32 = $urandom;
      a64 = {$urandom, $urandom}; b64 = {$urandom, $urandom}; c64 = {$urandom, $urandom};
      check_wide();
    end
    checks++;
    if (cout_seen == 0) begin
      failures++;
      $display("FAIL carry-out of the 16-bit instance never set");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
