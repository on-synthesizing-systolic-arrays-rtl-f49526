// tb_lu_array: test of the 4 x 4 systolic array on its own, on a 9 x 9 band matrix.
//
// The testbench schedules the matrix itself: element a(i,j) first visits the array
// at step k0 = max(i-P+1, j-Q+1), on processor [i-k0, j-k0], at time
// t = i+j+k0, entering through the bottom row if i-k0 = P-1 and otherwise through
// the right column. Every cycle it checks the result streams: u(k,j) must leave
// row 0 (port j-k) one cycle after t = 2k+j and l(i,k) must leave column 0
// (port i-k) one cycle after t = i+2k, with the values of the reference
// elimination, and nothing else may appear there. Two matrices are run back to
// back with a gap.
module tb_lu_array;
  import lu_pkg::*;
  import tb_lu_ref_pkg::*;

  localparam int P = 4, Q = 4, N = 9;
  localparam int T0 = 4 - ((P > Q) ? P : Q);
  localparam int T1 = 3 * N + P + Q;

  logic clk = 1'b0, rst_n = 1'b0;
  tok_t a_bot [Q];
  tok_t a_rgt [P-1];
  tok_t l_res [P];
  tok_t u_res [Q];
  int checks = 0, failures = 0;
  int n_u = 0, n_l = 0;

  always #5 clk = ~clk;

  lu_array dut (.clk, .rst_n, .a_bot, .a_rgt, .l_res, .u_res);

  band_lu_model m;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic clear_inputs();
    foreach (a_bot[y]) a_bot[y] = TOK_NONE;
    foreach (a_rgt[x]) a_rgt[x] = TOK_NONE;
  endtask

  task automatic run_matrix();
    int got_u, got_l;
    got_u = 0; got_l = 0;
    for (int t = T0; t <= T1; t++) begin
      // inputs for time t
      @(negedge clk);
      clear_inputs();
      for (int i = 1; i <= N; i++)
        for (int j = 1; j <= N; j++) if (m.in_band(i, j)) begin
          int k0, x, y;
          k0 = (i - P + 1 > j - Q + 1) ? i - P + 1 : j - Q + 1;
          x = i - k0; y = j - k0;
          if (i + j + k0 == t) begin
            if (x == P - 1) a_bot[y] = '{v: 1'b1, d: fx_t'(m.a0[i][j])};
            else a_rgt[x] = '{v: 1'b1, d: fx_t'(m.a0[i][j])};
          end
        end
      // outputs of time t-1
      for (int y = 0; y < Q; y++) begin
        int k, tt;
        bit due;
        tt = t - 1;
        k = (tt - y) / 3;
        due = ((tt - y) % 3 == 0) && k >= 1 && k + y <= N;
        check(u_res[y].v == due, $sformatf("u port %0d valid=%0d at t=%0d", y, u_res[y].v, tt));
        if (due && u_res[y].v) begin
          got_u++;
          check(longint'(u_res[y].d) == m.u[k][k+y], $sformatf("u(%0d,%0d)", k, k + y));
        end
      end
      for (int x = 1; x < P; x++) begin
        int k, tt;
        bit due;
        tt = t - 1;
        k = (tt - x) / 3;
        due = ((tt - x) % 3 == 0) && k >= 1 && k + x <= N;
        check(l_res[x].v == due, $sformatf("l port %0d valid=%0d at t=%0d", x, l_res[x].v, tt));
        if (due && l_res[x].v) begin
          got_l++;
          check(longint'(l_res[x].d) == m.l[k+x][k], $sformatf("l(%0d,%0d)", k + x, k));
        end
      end
      if (((t - 1) % 3) == 0 && t - 1 >= 3 && (t - 1) / 3 <= N)
        check(l_res[0].v && l_res[0].d == FX_ONE, "l(k,k) = 1 at the corner");
    end
    n_u += got_u; n_l += got_l;
    check(got_u == N * Q - Q * (Q - 1) / 2, $sformatf("%0d u results", got_u));
    check(got_l == (N - 1) * (P - 1) - (P - 1) * (P - 2) / 2, $sformatf("%0d l results", got_l));
  endtask

  initial begin
    clear_inputs();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 3; r++) begin
      m = new(N, P, Q);
      m.random_fill();
      m.factor();
      run_matrix();
      repeat (r) @(negedge clk);
    end
    $display("u results=%0d l results=%0d", n_u, n_l);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
