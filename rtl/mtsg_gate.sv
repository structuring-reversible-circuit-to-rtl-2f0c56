// mtsg_gate: 4x4 reversible modified TSG (MTSG) gate.
//
// (P, Q, R, S) = (A, A ^ B, A ^ B ^ C, (A ^ B)&C ^ A&B ^ D).
// With D = 0, R is the full-adder sum of A, B, C and S its carry, which is
// the property the document gives for this gate ("a full adder when the
// control bit is zero"); the equations themselves are the usual ones for the
// MTSG and are this design's reading. In the B cell it is driven with
// A = b, B = c, C = a ^ D, D = 0 so that S becomes the carry/borrow
// (a ^ D)(b ^ c) ^ bc. Quantum cost 6. Purely combinational.
module mtsg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  logic ab;
  always_comb begin
    ab = a ^ b;
    p  = a;
    q  = ab;
    r  = ab ^ c;
    s  = (ab & c) ^ (a & b) ^ d;
  end
endmodule
