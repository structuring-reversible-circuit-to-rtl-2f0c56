// b_cell_tb: exhaustive self-checking test of the add/subtract/skip cell.
//
// Applies all 32 combinations of a, b, c, H, D and checks the result
// arithmetically, not with the cell's equations:
//   H = 0          Z = a
//   H = 1, D = 0   a + b + c      = 2*Cout + Z
//   H = 1, D = 1   a - b - c      = Z - 2*Cout   (Cout is the borrow)
// It checks that b, H and D come back out unchanged and that the seven
// outputs (Z, Cout, b, H, D, G*, G') differ for all 32 inputs, i.e. that the
// cell is one-to-one as a reversible circuit must be. It counts how many
// add, subtract and skip cases it ran.
module b_cell_tb;
  logic a, b, c, h, d;
  logic z, cout, b_out, h_out, d_out, g_star, g_prime;
  int checks = 0, failures = 0;
  int n_add = 0, n_sub = 0, n_skip = 0;
  bit seen [128];

  b_cell dut (
    .a(a), .b(b), .c(c), .h(h), .d(d),
    .z(z), .cout(cout), .b_out(b_out), .h_out(h_out), .d_out(d_out),
    .g_star(g_star), .g_prime(g_prime)
  );

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int res;
    bit ok;
    foreach (seen[k]) seen[k] = 1'b0;
    for (int v = 0; v < 32; v++) begin
      {a, b, c, h, d} = 5'(v);
      #1;
      if (!h) begin
        n_skip++;
        ok = (z == a);
      end else if (!d) begin
        n_add++;
        res = int'(a) + int'(b) + int'(c);
        ok = (res == 2 * int'(cout) + int'(z));
      end else begin
        n_sub++;
        res = int'(a) - int'(b) - int'(c);
        ok = (res == int'(z) - 2 * int'(cout));
      end
      checks++;
      if (!ok) begin
        failures++;
        $display("a=%b b=%b c=%b H=%b D=%b: Z=%b Cout=%b wrong", a, b, c, h, d, z, cout);
      end
      checks++;
      if (b_out !== b || h_out !== h || d_out !== d) begin
        failures++;
        $display("a=%b b=%b c=%b H=%b D=%b: control pass-through wrong", a, b, c, h, d);
      end
      checks++;
      if (seen[{z, cout, b_out, h_out, d_out, g_star, g_prime}]) begin
        failures++;
        $display("input %05b: output pattern repeats", v[4:0]);
      end
      seen[{z, cout, b_out, h_out, d_out, g_star, g_prime}] = 1'b1;
    end
    checks++;
    if (n_add == 0 || n_sub == 0 || n_skip == 0) failures++;
    $display("add=%0d subtract=%0d skip=%0d", n_add, n_sub, n_skip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
