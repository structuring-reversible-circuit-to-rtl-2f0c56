// rev_booth_multiplier_sizes_tb: checks that the multiplier generalises to
// other widths, as the n x n array is meant to.
//
// Instantiates the top at N = 8 and N = 16 side by side. The 8 x 8 instance
// gets every operand pair in both signed and unsigned mode (2 x 65536); the
// 16 x 16 instance gets 20000 random pairs per mode plus the corner values
// (0, 1, all ones, the most negative number). Every product is compared with
// the product computed here. A watchdog ends the run with a failure.
module rev_booth_multiplier_sizes_tb;
  localparam int unsigned NA = 8;
  localparam int unsigned NB = 16;

  logic [NA-1:0]   xa, ya;
  logic [NB-1:0]   xb, yb;
  logic            sa, sb;
  logic [2*NA-1:0] pa;
  logic [2*NB-1:0] pb;
  int checks = 0, failures = 0;

  rev_booth_multiplier #(.N(NA)) dut8  (.x(xa), .y(ya), .is_signed(sa), .p(pa), .garbage());
  rev_booth_multiplier #(.N(NB)) dut16 (.x(xb), .y(yb), .is_signed(sb), .p(pb), .garbage());

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint expect_prod(input logic [NB-1:0] x, input logic [NB-1:0] y,
                                         input int unsigned n, input logic s);
    longint xv = 0, yv = 0;
    for (int k = 0; k < n; k++) begin
      xv += longint'(x[k]) << k;
      yv += longint'(y[k]) << k;
    end
    if (s && x[n-1]) xv -= longint'(1) << n;
    if (s && y[n-1]) yv -= longint'(1) << n;
    return xv * yv;
  endfunction

  task automatic check16(input logic [NB-1:0] x, input logic [NB-1:0] y, input logic s);
    longint got;
    xb = x; yb = y; sb = s;
    #1;
    got = s ? longint'($signed(pb)) : longint'(pb);
    checks++;
    if (got != expect_prod(x, y, NB, s)) begin
      failures++;
      if (failures < 10) $display("16x16 s=%b %h * %h: got %h", s, x, y, pb);
    end
  endtask

  initial begin
    longint got;
    logic [NB-1:0] corner [4] = '{16'h0000, 16'h0001, 16'hffff, 16'h8000};
    sb = 0; xb = '0; yb = '0;
    for (int m = 0; m < 2; m++) begin
      for (int i = 0; i < (1 << NA); i++) begin
        for (int j = 0; j < (1 << NA); j++) begin
          sa = m[0]; xa = NA'(i); ya = NA'(j);
          #1;
          got = sa ? longint'($signed(pa)) : longint'(pa);
          checks++;
          if (got != expect_prod(NB'(xa), NB'(ya), NA, sa)) begin
            failures++;
            if (failures < 10) $display("8x8 s=%b %h * %h: got %h", sa, xa, ya, pa);
          end
        end
      end
    end
    for (int m = 0; m < 2; m++) begin
      foreach (corner[i]) foreach (corner[j]) check16(corner[i], corner[j], m[0]);
      for (int k = 0; k < 20000; k++) check16(NB'($urandom), NB'($urandom), m[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
