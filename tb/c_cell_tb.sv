// c_cell_tb: exhaustive self-checking test of the Booth control cell.
//
// For each of the four bit pairs (X_i, X_(i-1)) it checks the radix-2 Booth
// rule written independently as a table: 00 and 11 skip (H = 0), 01 adds
// (H = 1, D = 0), 10 subtracts (H = 1, D = 1). It also checks that X_(i-1)
// is handed back out and that the garbage line is X_i & X_(i-1).
module c_cell_tb;
  logic x_i, x_im1, h, d, x_im1_out, g;
  int checks = 0, failures = 0;

  c_cell dut (.x_i(x_i), .x_im1(x_im1), .h(h), .d(d), .x_im1_out(x_im1_out), .g(g));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Booth action per pair {X_i, X_(i-1)}: 0 skip, 1 add, 2 subtract
    int action [4] = '{0, 1, 2, 0};
    for (int v = 0; v < 4; v++) begin
      {x_i, x_im1} = 2'(v);
      #1;
      checks++;
      if (h !== (action[v] != 0) || d !== (action[v] == 2)) begin
        failures++;
        $display("pair %02b: H=%b D=%b, expected action %0d", v[1:0], h, d, action[v]);
      end
      checks++;
      if (x_im1_out !== x_im1 || g !== (x_i & x_im1)) begin
        failures++;
        $display("pair %02b: pass-through %b garbage %b wrong", v[1:0], x_im1_out, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
