// rev_booth_multiplier_tb: end-to-end test of the N x N reversible Booth
// multiplier at its default size (N = 4, no parameter override).
//
// Runs every operand pair twice: once with is_signed = 1, comparing the 2N-bit
// product with the two's-complement product computed here, and once with
// is_signed = 0, comparing with the unsigned product. The design is
// combinational, so each result is sampled one time step after the inputs
// change. It also checks that the is_signed copies on the garbage port come
// back unchanged. The mechanisms of the design are counted and each must occur
// at least once: signed mode, unsigned mode, rows that add, subtract and skip
// (from the Booth pairs of the widened multiplier), and negative products.
module rev_booth_multiplier_tb;
  localparam int unsigned N   = 4;
  localparam int unsigned W   = N + 1;
  localparam int unsigned AGW = 2*W*(W+1) + 3*W + (W+1) + W + 1;
  localparam int unsigned GW  = AGW + 4;

  logic [N-1:0]   x, y;
  logic           is_signed;
  logic [2*N-1:0] p;
  logic [GW-1:0]  garbage;
  int checks = 0, failures = 0;
  int n_signed = 0, n_unsigned = 0, n_add = 0, n_sub = 0, n_skip = 0, n_neg = 0;

  rev_booth_multiplier dut (.x(x), .y(y), .is_signed(is_signed), .p(p), .garbage(garbage));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic count_rows(input logic [W-1:0] xw);
    logic [W:0] xz = {xw, 1'b0};
    for (int r = 0; r < W; r++) begin
      case (xz[r +: 2])
        2'b01:   n_add++;
        2'b10:   n_sub++;
        default: n_skip++;
      endcase
    end
  endtask

  initial begin
    longint xv, yv, expected, got;
    for (int mode = 0; mode < 2; mode++) begin
      for (int i = 0; i < (1 << N); i++) begin
        for (int j = 0; j < (1 << N); j++) begin
          is_signed = mode[0];
          x = N'(i);
          y = N'(j);
          #1;
          if (is_signed) begin
            n_signed++;
            xv = longint'($signed(x));
            yv = longint'($signed(y));
            got = longint'($signed(p));
            count_rows({x[N-1], x});
          end else begin
            n_unsigned++;
            xv = longint'(x);
            yv = longint'(y);
            got = longint'(p);
            count_rows({1'b0, x});
          end
          expected = xv * yv;
          if (expected < 0) n_neg++;
          checks++;
          if (got != expected) begin
            failures++;
            if (failures < 10)
              $display("%s %0d * %0d = %0d, got %0d", is_signed ? "signed" : "unsigned",
                       xv, yv, expected, got);
          end
          checks++;
          if (garbage[AGW +: 2] !== {2{is_signed}}) begin
            failures++;
            if (failures < 10) $display("is_signed copies not restored");
          end
        end
      end
    end
    $display("signed=%0d unsigned=%0d rows add=%0d subtract=%0d skip=%0d negative=%0d",
             n_signed, n_unsigned, n_add, n_sub, n_skip, n_neg);
    checks++;
    if (n_signed == 0)   begin failures++; $display("signed mode never ran"); end
    checks++;
    if (n_unsigned == 0) begin failures++; $display("unsigned mode never ran"); end
    checks++;
    if (n_add == 0)      begin failures++; $display("no add row"); end
    checks++;
    if (n_sub == 0)      begin failures++; $display("no subtract row"); end
    checks++;
    if (n_skip == 0)     begin failures++; $display("no skip row"); end
    checks++;
    if (n_neg == 0)      begin failures++; $display("no negative product"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
