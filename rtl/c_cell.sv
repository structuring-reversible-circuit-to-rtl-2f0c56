// c_cell: Booth recoding control cell of the reversible array multiplier.
//
// Looks at two adjacent multiplier bits X_i and X_(i-1) and produces the two
// row controls of the radix-2 Booth rule:
//   H = X_i ^ X_(i-1)     1: the row adds or subtracts, 0: the row skips
//   D = X_i & ~X_(i-1)    1: the row subtracts (bit pair 10)
// As in the document, it is a TS-3 gate followed by a Fredkin gate, each with
// its third input tied to 0; total quantum cost 7. TS-3(X_i, X_(i-1), 0)
// gives H and passes both bits on; Fredkin(X_(i-1), X_i, 0) gives D on its
// Q output, X_(i-1) on P and the garbage X_i & X_(i-1) on R. Four lines in
// (X_i, X_(i-1), two constant 0s), four lines out. The order of the Fredkin
// inputs is this design's choice. Purely combinational.
module c_cell (
  input  logic x_i,
  input  logic x_im1,
  output logic h,
  output logic d,
  output logic x_im1_out,
  output logic g
);
  logic t_xi, t_xim1;

  ts3_gate u_ts3 (
    .a(x_i), .b(x_im1), .c(1'b0),
    .p(t_xi), .q(t_xim1), .r(h)
  );

  fredkin_gate u_fredkin (
    .a(t_xim1), .b(t_xi), .c(1'b0),
    .p(x_im1_out), .q(d), .r(g)
  );
endmodule
