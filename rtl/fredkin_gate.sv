// fredkin_gate: 3x3 reversible Fredkin (controlled-swap) gate.
//
// P = A; when A = 0, Q = B and R = C; when A = 1, B and C are swapped
// (Q = C, R = B). The gate is its own inverse and conserves the number of
// ones. With C tied to 0, Q = ~A & B: the C cell uses this as the Booth
// "subtract" control D = X_i & ~X_(i-1). Quantum cost 5, as in the document;
// the equations are the standard ones. Purely combinational.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = (~a & b) | (a & c);
    r = (a & b) | (~a & c);
  end
endmodule
