// booth_array_tb: exhaustive self-checking test of the Booth array.
//
// For the default N = 4 the array multiplies 5-bit two's-complement numbers;
// all 32 x 32 operand pairs are applied and the 10-bit product is compared with
// the signed product computed here. It also checks that the multiplicand
// regenerated by the last row, which leaves on the garbage port, equals Y. The testbench counts the rows that
// added, subtracted and skipped (from the Booth pairs of X) and fails if one
// of the three never happened.
module booth_array_tb;
  localparam int unsigned N  = 4;
  localparam int unsigned W  = N + 1;
  localparam int unsigned GW = 2*W*(W+1) + 3*W + (W+1) + W + 1;

  logic [W-1:0]   x, y;
  logic [2*W-1:0] p;
  logic [GW-1:0]  garbage;
  int checks = 0, failures = 0;
  int n_add = 0, n_sub = 0, n_skip = 0;

  booth_array dut (.x(x), .y(y), .p(p), .garbage(garbage));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint xs, ys, expected, got;
    logic [W:0] xz;
    for (int i = 0; i < (1 << W); i++) begin
      for (int j = 0; j < (1 << W); j++) begin
        x = W'(i);
        y = W'(j);
        #1;
        xs = longint'($signed(x));
        ys = longint'($signed(y));
        expected = xs * ys;
        got = longint'($signed(p));
        checks++;
        if (got != expected) begin
          failures++;
          if (failures < 10) $display("%0d * %0d = %0d, got %0d", xs, ys, expected, got);
        end
        checks++;
        if (garbage[2*W*(W+1) + 3*W +: W+1] !== {y[W-1], y}) begin
          failures++;
          if (failures < 10) $display("regenerated multiplicand wrong for y=%0d", ys);
        end
        xz = {x, 1'b0};
        for (int r = 0; r < W; r++) begin
          case (xz[r +: 2])
            2'b01:   n_add++;
            2'b10:   n_sub++;
            default: n_skip++;
          endcase
        end
      end
    end
    checks++;
    if (n_add == 0 || n_sub == 0 || n_skip == 0) failures++;
    $display("rows: add=%0d subtract=%0d skip=%0d", n_add, n_sub, n_skip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
