// pg_logic_tb: checks the Han-Carlson prefix network against a ripple-carry reference.
// The reference computes G_i:0 serially, G_i:0 = G_i | P_i & G_(i-1):0. Two instances are tested:
// the default 16-bit one (17 positions) and a 33-bit one, whose top position is odd and which
// needs one more prefix row. Corner patterns (full propagate chains) and random inputs.
module pg_logic_tb;
  localparam int unsigned NA = 16;
  localparam int unsigned NB = 33;

  logic [NA:0] ga, pa, gpre_a;
  logic [NB:0] gb, pb, gpre_b;
  int checks = 0, failures = 0;

  pg_logic           dut_a (.g(ga), .p(pa), .gpre(gpre_a));
  pg_logic #(.N(NB)) dut_b (.g(gb), .p(pb), .gpre(gpre_b));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] ripple(logic [63:0] g, logic [63:0] p, int unsigned top);
    logic [63:0] r;
    logic        carry;
    r     = '0;
    carry = 1'b0;
    for (int unsigned i = 0; i <= top; i++) begin
      carry = g[i] | (p[i] & carry);
      r[i]  = carry;
    end
    return r;
  endfunction

  task automatic check();
    logic [63:0] ea, eb;
    #1;
    ea = ripple(64'(ga), 64'(pa), NA);
    eb = ripple(64'(gb), 64'(pb), NB);
    checks++;
    if (64'(gpre_a) != ea) begin
      failures++;
      $display("FAIL N=16 g=%h p=%h: gpre=%h expected %h", ga, pa, gpre_a, ea[NA:0]);
    end
    checks++;
    if (64'(gpre_b) != eb) begin
      failures++;
      $display("FAIL N=33 g=%h p=%h: gpre=%h expected %h", gb, pb, gpre_b, eb[NB:0]);
    end
  endtask

  initial begin
    ga = '0; pa = '0; gb = '0; pb = '0; check();
    // A carry generated at position k must ripple through an all-propagate chain above it.
    for (int k = 0; k <= int'(NB); k++) begin
      ga = '0; pa = '1; gb = '0; pb = '1;
      if (k <= int'(NA)) ga[k] = 1'b1;
      gb[k] = 1'b1;
      check();
    end
    repeat (4000) begin
      ga = (NA+1)'($urandom); pa = (NA+1)'($urandom);
      gb = (NB+1)'({$urandom, $urandom}); pb = (NB+1)'({$urandom, $urandom});
      // Bias towards long propagate runs, where the network's long paths matter.
      if ($urandom_range(1, 0) == 1) begin
        pa = pa | ~ga;
        pb = pb | ~gb;
      end
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
