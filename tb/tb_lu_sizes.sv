// tb_lu_sizes: the band LU engine at sizes other than its default, run side by
// side: a longer matrix on the default 4 x 4 array (the array is independent of
// N), unequal bandwidths (lower 3, upper 5 and lower 5, upper 2), and the
// smallest array (2 x 2, a tridiagonal matrix). Each instance checks every
// factor element bit-exactly against the reference elimination and the run
// length against 3N + P + Q - 3 + max(P,Q) cycles.
module tb_lu_sizes;
  logic clk = 1'b0, rst_n = 1'b0;
  logic f0, f1, f2, f3;
  int c0, c1, c2, c3, e0, e1, e2, e3;

  always #5 clk = ~clk;

  lu_run_harness #(.N(24), .P(4), .Q(4), .RUNS(2)) u_long  (.clk, .rst_n, .finished(f0), .checks(c0), .failures(e0));
  lu_run_harness #(.N(11), .P(3), .Q(5), .RUNS(2)) u_upper (.clk, .rst_n, .finished(f1), .checks(c1), .failures(e1));
  lu_run_harness #(.N(9),  .P(5), .Q(2), .RUNS(2)) u_lower (.clk, .rst_n, .finished(f2), .checks(c2), .failures(e2));
  lu_run_harness #(.N(7),  .P(2), .Q(2), .RUNS(2)) u_tri   (.clk, .rst_n, .finished(f3), .checks(c3), .failures(e3));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (f0 && f1 && f2 && f3);
    $display("N=24 4x4: %0d checks, N=11 3x5: %0d, N=9 5x2: %0d, N=7 2x2: %0d", c0, c1, c2, c3);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3, e0 + e1 + e2 + e3);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3, e0 + e1 + e2 + e3 + 1);
    $finish;
  end
endmodule
