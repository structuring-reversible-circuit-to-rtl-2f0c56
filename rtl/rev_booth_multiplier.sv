// rev_booth_multiplier: N x N reversible Booth multiplier for signed and
// unsigned operands (top level).
//
// The Booth array multiplies two's-complement numbers. To take unsigned
// operands as well, each N-bit operand is widened by one bit, the X_N / Y_N
// of the array: a copy of the operand's top bit when is_signed = 1, a 0 when
// is_signed = 0. An unsigned N-bit value is then a non-negative (N+1)-bit
// two's-complement value, and the array needs no mode of its own. The 2N low
// bits of the 2(N+1)-bit array product are the product in either mode (signed
// results lie in -2^(2N-2) .. 2^(2N-2), unsigned ones below 2^(2N)).
//
// The widening is itself reversible: a Feynman gate copies is_signed for the
// two operands; per operand a Peres gate (is_signed, msb, 0) gives
// is_signed & msb on R, and a Feynman gate restores msb from the Peres Q line
// (is_signed ^ msb). Everything left over, including the two top product
// bits, leaves on the garbage port.
//
// The document states that the multiplier handles signed and unsigned
// numbers; the is_signed input and the way the operands are widened are this
// design's own. Purely combinational: p is valid one propagation delay after
// x, y and is_signed settle.
module rev_booth_multiplier #(
  parameter  int unsigned N   = 4,
  localparam int unsigned W   = N + 1,
  localparam int unsigned AGW = 2*W*(W+1) + 3*W + (W+1) + W + 1,
  localparam int unsigned GW  = AGW + 4
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  input  logic           is_signed,
  output logic [2*N-1:0] p,
  output logic [GW-1:0]  garbage
);
  logic s_x, s_y;
  feynman_gate u_scopy (.a(is_signed), .b(1'b0), .p(s_x), .q(s_y));

  // operand X widening
  logic sx1, sx2, x_par, x_msb, x_ext;
  peres_gate   u_xext (.a(s_x), .b(x[N-1]), .c(1'b0), .p(sx1), .q(x_par), .r(x_ext));
  feynman_gate u_xres (.a(sx1), .b(x_par), .p(sx2), .q(x_msb));

  // operand Y widening
  logic sy1, sy2, y_par, y_msb, y_ext;
  peres_gate   u_yext (.a(s_y), .b(y[N-1]), .c(1'b0), .p(sy1), .q(y_par), .r(y_ext));
  feynman_gate u_yres (.a(sy1), .b(y_par), .p(sy2), .q(y_msb));

  logic [W-1:0]   xw, yw;
  logic [2*W-1:0] p_full;
  logic [AGW-1:0] a_garbage;

  if (N > 1) begin : g_wide
    assign xw = {x_ext, x_msb, x[N-2:0]};
    assign yw = {y_ext, y_msb, y[N-2:0]};
  end else begin : g_one
    assign xw = {x_ext, x_msb};
    assign yw = {y_ext, y_msb};
  end

  booth_array #(.N(N)) u_array (
    .x      (xw),
    .y      (yw),
    .p      (p_full),
    .garbage(a_garbage)
  );

  assign p       = p_full[2*N-1:0];
  assign garbage = {p_full[2*W-1:2*N], sy2, sx2, a_garbage};
endmodule
