// fredkin_gate_tb: exhaustive self-checking test of fredkin_gate.
//
// Applies all eight input patterns, compares (P, Q, R) with the gate's
// equations computed here (P=A, controlled swap of B and C), and checks that the eight output patterns
// are all different, i.e. that the gate is reversible. A watchdog ends the
// run with a failure if it does not finish in time.
module fredkin_gate_tb;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  bit seen [8];

  fredkin_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ep, eq, er;
    foreach (seen[k]) seen[k] = 1'b0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      ep = a; if (a) begin eq = c; er = b; end else begin eq = b; er = c; end
      checks++;
      if ({p, q, r} !== {ep, eq, er}) begin
        failures++;
        $display("mismatch in=%03b out=%b%b%b exp=%b%b%b", v[2:0], p, q, r, ep, eq, er);
      end
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("output %b%b%b repeats: not reversible", p, q, r);
      end
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
