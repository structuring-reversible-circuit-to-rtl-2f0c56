// mtsg_gate_tb: exhaustive self-checking test of mtsg_gate.
//
// Applies all sixteen input patterns. With D = 0 it checks that R and S are
// the sum and carry of A + B + C (counted arithmetically); with D = 1 that S is
// that carry inverted. P and Q are checked against A and A != B, and the
// sixteen outputs must all differ (reversibility). Watchdog as usual.
module mtsg_gate_tb;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;
  bit seen [16];

  mtsg_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sum;
    logic ep, eq, er, es;
    foreach (seen[k]) seen[k] = 1'b0;
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      sum = int'(a) + int'(b) + int'(c);
      ep = a;
      eq = (a != b);
      er = sum[0];
      es = sum[1] ^ d;
      checks++;
      if ({p, q, r, s} !== {ep, eq, er, es}) begin
        failures++;
        $display("mismatch in=%04b out=%b%b%b%b exp=%b%b%b%b", v[3:0], p, q, r, s, ep, eq, er, es);
      end
      checks++;
      if (seen[{p, q, r, s}]) begin
        failures++;
        $display("output %b%b%b%b repeats: not reversible", p, q, r, s);
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
