// peres_gate: 3x3 reversible Peres gate.
//
// (P, Q, R) = (A, A ^ B, A&B ^ C): a Toffoli followed by a CNOT, quantum
// cost 4 as the document states. In the B cell it is driven with A = H,
// B = b ^ c, C = a, so R is the cell output Z = H(b ^ c) ^ a and Q is the
// garbage line G'. The equations are the standard Peres gate. Combinational.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = a ^ b;
    r = (a & b) ^ c;
  end
endmodule
