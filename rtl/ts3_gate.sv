// ts3_gate: 3x3 reversible TS-3 gate.
//
// Mapping (P, Q, R) = (A, B, A ^ B ^ C). The first two inputs pass straight
// through and the third output is the parity of all three inputs, so the gate
// is its own inverse and costs two CNOTs (quantum cost 2). With C tied to 0
// the third output is A ^ B: the C cell takes the Booth "operate" control H
// from it, and the B cell uses it to form a ^ D.
// The name, the 3x3 size and the quantum cost of 2 follow the document; the
// exact equations are this design's reading, chosen to give those results.
// Purely combinational, no clock.
module ts3_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = b;
    r = a ^ b ^ c;
  end
endmodule
