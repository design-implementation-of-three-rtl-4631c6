// adder_tb: end-to-end test of the top level at its default size (16-bit operands, 18-bit sum).
//
// 1. The five operand sets of the reference waveform, with their sums as printed there
//    (10+13+14=37, 20+23+24=67, 11+123+113=247, 203+159+167=529, 156+163+113=432).
// 2. Corner vectors and 200000 random vectors against integer addition.
// For every vector the testbench also works out, from the operands alone, which mechanisms of the
// adder the vector exercises, and counts a failure for any mechanism that never occurred:
//   stage1_carry  a full adder of stage 1 produced a carry (cy_i = 1)
//   generate      a saltire cell generated a carry (G_i = 1)
//   long_chain    a carry crossed at least N-2 consecutive propagating positions of the prefix tree
//   top_sum_bit   the sum bit above the operand width, S[N], was set
//   carry_out     the carry-out S[N+1] was set
module adder_tb;
  localparam int unsigned N = 16;

  logic [N-1:0] a, b, c;
  logic [N+1:0] S;
  int checks = 0, failures = 0;
  int n_stage1_carry = 0, n_generate = 0, n_long_chain = 0, n_top_sum_bit = 0, n_carry_out = 0;

  adder dut (.a(a), .b(b), .c(c), .S(S));

  initial begin : watchdog
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Length of the longest run of a carry through propagating positions, found by rippling the
  // two-operand sum S' + 2*cy bit by bit.
  function automatic int longest_chain(logic [N-1:0] x, logic [N-1:0] y, logic [N-1:0] z);
    logic [N:0] sp, cyw;
    int run, best;
    logic carry;
    sp    = {1'b0, x ^ y ^ z};
    cyw   = {(x & y) | (y & z) | (z & x), 1'b0};
    carry = 1'b0;
    run   = 0;
    best  = 0;
    for (int i = 0; i <= int'(N); i++) begin
      if (sp[i] & cyw[i]) begin
        carry = 1'b1;
        run   = 0;
      end else if ((sp[i] ^ cyw[i]) && carry) begin
        run++;
      end else if (!(sp[i] ^ cyw[i])) begin
        carry = 1'b0;
        run   = 0;
      end
      if (carry && run > best) best = run;
    end
    return best;
  endfunction

  task automatic check(longint expected);
    logic [N-1:0] maj, parity;
    #1;
    checks++;
    if (longint'(S) != expected) begin
      failures++;
      $display("FAIL %0d+%0d+%0d: S=%0d expected %0d", a, b, c, S, expected);
    end
    maj    = (a & b) | (b & c) | (c & a);
    parity = a ^ b ^ c;
    if (maj != '0) n_stage1_carry++;
    if ((parity[N-1:1] & maj[N-2:0]) != '0) n_generate++;
    if (longest_chain(a, b, c) >= int'(N) - 2) n_long_chain++;
    if (expected[N]) n_top_sum_bit++;
    if (expected[N+1]) n_carry_out++;
  endtask

  task automatic check_sum();
    check(longint'(a) + longint'(b) + longint'(c));
  endtask

  initial begin
    // Reference waveform: operands and printed sums.
    a = 10;  b = 13;  c = 14;  check(37);
    a = 20;  b = 23;  c = 24;  check(67);
    a = 11;  b = 123; c = 113; check(247);
    a = 203; b = 159; c = 167; check(529);
    a = 156; b = 163; c = 113; check(432);
    // Corners.
    a = '0; b = '0; c = '0; check_sum();
    a = '1; b = '1; c = '1; check_sum();
    a = '1; b = 1;  c = '0; check_sum();
    a = '1; b = '1; c = 2;  check_sum();
    a = 16'h8000; b = 16'h8000; c = 16'h8000; check_sum();
    a = 16'h5555; b = 16'h5555; c = 16'h5555; check_sum();
    for (int k = 0; k < int'(N); k++) begin
      a = '1; b = N'(1) << k; c = '0; check_sum();
    end
    repeat (200000) begin
      a = N'($urandom); b = N'($urandom); c = N'($urandom);
      check_sum();
    end

    $display("mechanisms: stage1_carry=%0d generate=%0d long_chain=%0d top_sum_bit=%0d carry_out=%0d",
             n_stage1_carry, n_generate, n_long_chain, n_top_sum_bit, n_carry_out);
    checks++; if (n_stage1_carry == 0) begin failures++; $display("FAIL no stage-1 carry"); end
    checks++; if (n_generate == 0)     begin failures++; $display("FAIL no generate"); end
    checks++; if (n_long_chain == 0)   begin failures++; $display("FAIL no long carry chain"); end
    checks++; if (n_top_sum_bit == 0)  begin failures++; $display("FAIL S[N] never set"); end
    checks++; if (n_carry_out == 0)    begin failures++; $display("FAIL carry-out never set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
