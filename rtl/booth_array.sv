// booth_array: combinational reversible radix-2 Booth array multiplier.
//
// Multiplies two (N+1)-bit two's-complement numbers, X = X_N..X_0
// (multiplier) and Y = Y_N..Y_0 (multiplicand), into a 2(N+1)-bit
// two's-complement product, using only reversible gates and no feedback.
//
// Control column (the document's C cells, on the right of the array): C cell
// i looks at the bit pair X_i, X_(i-1), with an implicit 0 below X_0, and
// drives row i with H (operate) and D (subtract). The Fredkin gate in each C
// cell hands X_(i-1) back out, so it feeds C cell i-1 as its X_i: the
// multiplier enters the column from the top and every bit is used twice
// without a fan-out.
//
// Rows: with W = N+1, row i has W+1 B cells covering product weights i..i+W.
// Cell j of row i takes the multiplicand bit Y_j (Y_(W-1) again for j = W,
// the sign extension) and partial-sum bit i+j of row i-1 (row 0 starts from
// zero), and the row adds, subtracts or skips Y*2^i according to H and D.
// The carry (or borrow) ripples from cell 0, whose carry-in is 0, to cell W,
// whose carry-out is dropped. H and D run along the row through the cells and
// each cell passes b down to the same cell of the next row. After row i its
// lowest bit, weight i, is final; the last row gives the top W+1 bits.
// Because a partial sum after row i is Y times an (i+1)-bit two's-complement
// number, W+1 bits per row are always enough.
//
// The two places that need one line twice (Y_(W-1) for cells W-1 and W of
// row 0, and the partial-sum sign for cells W-1 and W of the next row) copy
// it with a Feynman gate. Every output the product does not use leaves on the
// garbage port. The row layout, the zero carry-in and the Feynman copies are
// this design's choices; the document gives the cells, the C column and the
// implicit zero.
//
// Timing: purely combinational; the critical path runs down the C column and
// then along the carry chains of all rows.
module booth_array #(
  parameter  int unsigned N  = 4,
  localparam int unsigned W  = N + 1,
  // 2 per B cell, cout/H/D at each row end, b at the bottom, C-cell garbage
  // and the regenerated implicit zero
  localparam int unsigned GW = 2*W*(W+1) + 3*W + (W+1) + W + 1
) (
  input  logic [W-1:0]    x,
  input  logic [W-1:0]    y,
  output logic [2*W-1:0]  p,
  output logic [GW-1:0]   garbage
);
  // control column
  logic [W-1:0] h, d, c_g;
  logic [W:0]   xdown;          // xdown[i]: X_i as handed to C cell i

  assign xdown[W-1] = x[W-1];

  for (genvar i = W - 1; i >= 0; i--) begin : g_ctl
    logic xim1;
    if (i == 0) begin : g_zero
      assign xim1 = 1'b0;       // implicit zero below X_0
    end else begin : g_bit
      assign xim1 = x[i-1];
    end
    c_cell u_c (
      .x_i      (xdown[i]),
      .x_im1    (xim1),
      .h        (h[i]),
      .d        (d[i]),
      .x_im1_out(xdown[(i == 0) ? W : i - 1]),
      .g        (c_g[i])
    );
  end

  // B-cell array signals, [row][cell]
  logic [W:0] a_in  [W];
  logic [W:0] b_in  [W];
  logic [W:0] c_in  [W];
  logic [W:0] h_in  [W];
  logic [W:0] d_in  [W];
  logic [W:0] z     [W];
  logic [W:0] co    [W];
  logic [W:0] bo    [W];
  logic [W:0] ho    [W];
  logic [W:0] dout  [W];
  logic [W:0] gs    [W];
  logic [W:0] gp    [W];

  // copy of Y's sign bit for the top cell of row 0
  logic ysign_a, ysign_b;
  feynman_gate u_ysign (.a(y[W-1]), .b(1'b0), .p(ysign_a), .q(ysign_b));

  for (genvar i = 0; i < W; i++) begin : g_row
    // partial-sum inputs
    if (i == 0) begin : g_first
      assign a_in[0] = '0;
      assign b_in[0] = {ysign_b, ysign_a, y[W-2:0]};
    end else begin : g_next
      logic sgn_a, sgn_b;
      feynman_gate u_sign (.a(z[i-1][W]), .b(1'b0), .p(sgn_a), .q(sgn_b));
      assign a_in[i] = {sgn_b, sgn_a, z[i-1][W-1:1]};
      assign b_in[i] = bo[i-1];
    end

    for (genvar j = 0; j <= W; j++) begin : g_cell
      if (j == 0) begin : g_lsb
        assign c_in[i][0] = 1'b0;
        assign h_in[i][0] = h[i];
        assign d_in[i][0] = d[i];
      end else begin : g_chain
        assign c_in[i][j] = co[i][j-1];
        assign h_in[i][j] = ho[i][j-1];
        assign d_in[i][j] = dout[i][j-1];
      end
      b_cell u_b (
        .a      (a_in[i][j]),
        .b      (b_in[i][j]),
        .c      (c_in[i][j]),
        .h      (h_in[i][j]),
        .d      (d_in[i][j]),
        .z      (z[i][j]),
        .cout   (co[i][j]),
        .b_out  (bo[i][j]),
        .h_out  (ho[i][j]),
        .d_out  (dout[i][j]),
        .g_star (gs[i][j]),
        .g_prime(gp[i][j])
      );
    end

    // bit i of the product is final after row i
    if (i < W - 1) begin : g_low
      assign p[i] = z[i][0];
    end
  end

  assign p[2*W-1:W-1] = z[W-1];

  // garbage lines
  for (genvar i = 0; i < W; i++) begin : g_garb
    assign garbage[2*(W+1)*i +: W+1]        = gs[i];
    assign garbage[2*(W+1)*i + W + 1 +: W+1] = gp[i];
    assign garbage[2*W*(W+1) + 3*i]          = co[i][W];
    assign garbage[2*W*(W+1) + 3*i + 1]      = ho[i][W];
    assign garbage[2*W*(W+1) + 3*i + 2]      = dout[i][W];
  end
  assign garbage[2*W*(W+1) + 3*W +: W+1]     = bo[W-1];
  assign garbage[2*W*(W+1) + 4*W + 1 +: W]   = c_g;
  assign garbage[GW-1]                       = xdown[W];
endmodule
