// b_cell: reversible add / subtract / skip cell of the Booth array.
//
// One bit position of one row. With the row controls H and D from the C cell:
//   H = 0          skip:      Z = a
//   H = 1, D = 0   add:       Z = a ^ b ^ c, Cout = carry of a + b + c
//   H = 1, D = 1   subtract:  Z = a ^ b ^ c, Cout = borrow of a - b - c
// which the document writes as Z = H(b ^ c) ^ a and Cout = (a ^ D)(b ^ c) ^ bc.
// In a skip row Cout is not zero, but it only reaches the next cell's Z through
// H, which is 0 for the whole row, so it does no harm.
//
// Gates, as in the document's cell diagram: TS-3, MTSG, Peres (quantum cost
// 2 + 6 + 4 = 12). The wiring is this design's reading of that diagram:
//   TS-3 (D, a, 0)       -> D (passed on), a, a ^ D
//   MTSG (b, c, a^D, 0)  -> b (passed on), b ^ c, G*, Cout
//   Peres(H, b^c, a)     -> H (passed on), G', Z
// Seven lines in (a, b, c, H, D and two constant 0s) and seven out; b, H and
// D are regenerated for the next cells so no line fans out. Combinational.
module b_cell (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic h,
  input  logic d,
  output logic z,
  output logic cout,
  output logic b_out,
  output logic h_out,
  output logic d_out,
  output logic g_star,
  output logic g_prime
);
  logic a_pass, a_xor_d, b_xor_c;

  ts3_gate u_ts3 (
    .a(d), .b(a), .c(1'b0),
    .p(d_out), .q(a_pass), .r(a_xor_d)
  );

  mtsg_gate u_mtsg (
    .a(b), .b(c), .c(a_xor_d), .d(1'b0),
    .p(b_out), .q(b_xor_c), .r(g_star), .s(cout)
  );

  peres_gate u_peres (
    .a(h), .b(b_xor_c), .c(a_pass),
    .p(h_out), .q(g_prime), .r(z)
  );
endmodule
