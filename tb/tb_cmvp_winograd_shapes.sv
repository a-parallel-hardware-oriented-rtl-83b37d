// tb_cmvp_winograd_shapes -- end-to-end test of cmvp_winograd in shapes other
// than the default 8 x 8: non-square matrices (3 x 6, 8 x 2, 5 x 10), the
// smallest legal N = 2, and data narrower or wider than the coefficients.
// Each shape runs in a cmvp_shape_runner with its own matrix and random
// vectors, checked against the direct product and the two-cycle latency.
// A watchdog ends the run after a fixed number of cycles.
module tb_cmvp_winograd_shapes;
  logic clk, rst_n;
  int   c0, c1, c2, f0, f1, f2;
  logic d0, d1, d2;
  int   checks, failures;

  cmvp_shape_runner #(.M(3), .N(6),  .DATA_W(12), .COEF_W(10)) r0
    (.clk(clk), .rst_n(rst_n), .checks(c0), .failures(f0), .done(d0));
  cmvp_shape_runner #(.M(8), .N(2),  .DATA_W(8),  .COEF_W(16)) r1
    (.clk(clk), .rst_n(rst_n), .checks(c1), .failures(f1), .done(d1));
  cmvp_shape_runner #(.M(5), .N(10), .DATA_W(16), .COEF_W(6))  r2
    (.clk(clk), .rst_n(rst_n), .checks(c2), .failures(f2), .done(d2));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (d0 && d1 && d2);
    @(posedge clk);
    checks   = c0 + c1 + c2;
    failures = f0 + f1 + f2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end
endmodule
