// tb_lu_top: end-to-end test of the band LU-decomposition engine at its default
// size (N = 6, 4 x 4 array).
//
// For several random diagonally dominant band matrices it writes A through the
// write port, pulses start, and then
//   - checks that done arrives exactly T_END - T_START + 1 cycles after start;
//   - watches the array's result streams and checks that each u(k,j) leaves row 0
//     one cycle after schedule time t = 2k + j and each l(i,k) leaves column 0 one
//     cycle after t = i + 2k (the schedule t = i+j+k), with the reference value;
//   - reads back every element of L and U and compares it with the reference
//     elimination, and checks that L*U reproduces A to within a few LSB.
// It counts the mechanisms of the array and fails if one never occurred: matrix
// elements entering through the bottom edge and through the right edge, elements
// passing a processor unchanged on their way in, multiply-subtract updates, and
// divisions in column 0. The last run starts again the cycle after done.
module tb_lu_top;
  import lu_pkg::*;
  import tb_lu_ref_pkg::*;

  localparam int N = 6, P = 4, Q = 4;
  localparam int T_START = 4 - ((P > Q) ? P : Q);
  localparam int T_END = 3 * N + P + Q;
  localparam int RUNS = 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic wr_en = 1'b0;
  logic [2:0] wr_i = '0, wr_j = '0, rd_i = '0, rd_j = '0;
  fx_t wr_data = '0;
  logic start = 1'b0;
  logic busy, done;
  fx_t rd_l, rd_u;

  int checks = 0, failures = 0;
  int n_bot = 0, n_rgt = 0, n_pass = 0, n_update = 0, n_div = 0;

  always #5 clk = ~clk;

  lu_top dut (
    .clk, .rst_n, .wr_en, .wr_i, .wr_j, .wr_data, .start, .busy, .done,
    .rd_i, .rd_j, .rd_l, .rd_u
  );

  band_lu_model m;
  bit seen_u [N+1][N+1];
  bit seen_l [N+1][N+1];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // mechanism counters, from the array's internal links
  for (genvar x = 0; x < P; x++) begin : g_mx
    for (genvar y = 1; y < Q; y++) begin : g_my
      always @(posedge clk) if (dut.busy) begin
        if (dut.u_array.g_row[x].g_col[y].g_ms.u_pe.a_in.v) begin
          if (dut.u_array.g_row[x].g_col[y].g_ms.u_pe.l_in.v) n_update++;
          else n_pass++;
        end
      end
    end
  end
  always @(posedge clk) if (dut.busy) begin
    for (int y = 0; y < Q; y++) if (dut.a_bot[y].v) n_bot++;
    for (int x = 0; x < P - 1; x++) if (dut.a_rgt[x].v) n_rgt++;
    for (int x = 1; x < P; x++) if (dut.l_res[x].v) n_div++;
  end

  // result streams against the schedule and the reference
  always @(posedge clk) if (dut.busy && m != null) begin
    int tt;
    tt = int'(dut.t) - 1;  // time the point was evaluated
    for (int y = 0; y < Q; y++) if (dut.u_res[y].v) begin
      automatic int k = (tt - y) / 3;
      check((tt - y) % 3 == 0 && k >= 1 && k + y <= N, $sformatf("u result on port %0d at t=%0d off schedule", y, tt));
      if (k >= 1 && k + y <= N) begin
        check(!seen_u[k][k+y], $sformatf("u(%0d,%0d) twice", k, k + y));
        seen_u[k][k+y] = 1'b1;
        check(longint'(dut.u_res[y].d) == m.u[k][k+y], $sformatf("u(%0d,%0d) stream value", k, k + y));
      end
    end
    for (int x = 1; x < P; x++) if (dut.l_res[x].v) begin
      automatic int k = (tt - x) / 3;
      check((tt - x) % 3 == 0 && k >= 1 && k + x <= N, $sformatf("l result on port %0d at t=%0d off schedule", x, tt));
      if (k >= 1 && k + x <= N) begin
        check(!seen_l[k+x][k], $sformatf("l(%0d,%0d) twice", k + x, k));
        seen_l[k+x][k] = 1'b1;
        check(longint'(dut.l_res[x].d) == m.l[k+x][k], $sformatf("l(%0d,%0d) stream value", k + x, k));
      end
    end
  end

  task automatic load_matrix();
    for (int i = 1; i <= N; i++)
      for (int j = 1; j <= N; j++) begin
        @(negedge clk);
        wr_en = 1'b1; wr_i = 3'(i); wr_j = 3'(j); wr_data = fx_t'(m.a0[i][j]);
      end
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  task automatic run_and_check(bit back_to_back);
    int cyc;
    foreach (seen_u[i, j]) begin seen_u[i][j] = 1'b0; seen_l[i][j] = 1'b0; end
    if (!back_to_back) @(negedge clk);
    start = 1'b1;
    @(posedge clk);
    cyc = 0;
    @(negedge clk);
    start = 1'b0;
    check(busy, "busy after start");
    while (!done) begin
      @(posedge clk); cyc++;
      #1;
    end
    check(cyc == T_END - T_START + 1, $sformatf("run took %0d cycles, expected %0d", cyc, T_END - T_START + 1));
    for (int i = 1; i <= N; i++)
      for (int j = 1; j <= N; j++) begin
        rd_i = 3'(i); rd_j = 3'(j);
        #1;
        check(longint'(rd_l) == m.l[i][j], $sformatf("L(%0d,%0d)=%0d expected %0d", i, j, rd_l, m.l[i][j]));
        check(longint'(rd_u) == m.u[i][j], $sformatf("U(%0d,%0d)=%0d expected %0d", i, j, rd_u, m.u[i][j]));
        if (i - j < P && j - i < Q) begin
          if (i > j) check(seen_l[i][j], $sformatf("l(%0d,%0d) never streamed", i, j));
          else check(seen_u[i][j], $sformatf("u(%0d,%0d) never streamed", i, j));
        end
      end
    check(m.max_residual() <= 64, $sformatf("L*U differs from A by %0d LSB", m.max_residual()));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < RUNS; r++) begin
      m = new(N, P, Q);
      m.random_fill();
      m.factor();
      load_matrix();
      run_and_check(1'b0);
    end
    // a second run directly after done, on the matrix already loaded
    run_and_check(1'b1);
    // out-of-band writes are ignored
    @(negedge clk);
    wr_en = 1'b1; wr_i = 3'd6; wr_j = 3'd1; wr_data = 32'h7fff_0000;
    @(negedge clk);
    wr_en = 1'b0;
    run_and_check(1'b0);

    $display("mechanisms: bottom-edge entries=%0d right-edge entries=%0d pass-through=%0d updates=%0d divisions=%0d",
             n_bot, n_rgt, n_pass, n_update, n_div);
    check(n_bot > 0, "no element entered through the bottom edge");
    check(n_rgt > 0, "no element entered through the right edge");
    check(n_pass > 0, "no element passed a processor unchanged");
    check(n_update > 0, "no multiply-subtract update");
    check(n_div > 0, "no division in column 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
