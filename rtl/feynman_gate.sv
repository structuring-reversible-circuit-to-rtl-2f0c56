// feynman_gate: 2x2 reversible Feynman (CNOT) gate, (P, Q) = (A, A ^ B).
//
// With B tied to 0 it makes a copy of A (P = Q = A). The multiplier uses it
// wherever one line has to feed two gates, because a reversible circuit may
// not fan out. Quantum cost 1. This helper is this design's own addition; the
// document names only the fan-out rule. Combinational.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  always_comb begin
    p = a;
    q = a ^ b;
  end
endmodule
