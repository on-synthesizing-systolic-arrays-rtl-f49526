// lu_run_harness: drives one lu_top of a given size through RUNS random band
// matrices and compares every element of L and U with the reference model, the
// product L*U with A, and the run length with 3N + P + Q - 3 + max(P,Q) cycles.
// It reports its counts on its ports when finished; tb_lu_sizes collects them.
module lu_run_harness #(
  parameter int N = 6,
  parameter int P = 4,
  parameter int Q = 4,
  parameter int RUNS = 2
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);
  import lu_pkg::*;
  import tb_lu_ref_pkg::*;

  localparam int IDX_W = $clog2(N + 1);
  localparam int CYCLES = 3 * N + P + Q - 3 + ((P > Q) ? P : Q);

  logic wr_en = 1'b0, start = 1'b0, busy, done;
  logic [IDX_W-1:0] wr_i = '0, wr_j = '0, rd_i = '0, rd_j = '0;
  fx_t wr_data = '0, rd_l, rd_u;
  band_lu_model m;

  lu_top #(.N(N), .P(P), .Q(Q)) dut (
    .clk, .rst_n, .wr_en, .wr_i, .wr_j, .wr_data, .start, .busy, .done,
    .rd_i, .rd_j, .rd_l, .rd_u
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL [N=%0d P=%0d Q=%0d]: %s", N, P, Q, what); end
  endtask

  initial begin
    finished = 1'b0;
    checks = 0;
    failures = 0;
    @(posedge rst_n);
    for (int r = 0; r < RUNS; r++) begin
      int cyc;
      m = new(N, P, Q);
      m.random_fill();
      m.factor();
      for (int i = 1; i <= N; i++)
        for (int j = 1; j <= N; j++) begin
          @(negedge clk);
          wr_en = 1'b1; wr_i = IDX_W'(i); wr_j = IDX_W'(j); wr_data = fx_t'(m.a0[i][j]);
        end
      @(negedge clk);
      wr_en = 1'b0;
      start = 1'b1;
      @(posedge clk);
      cyc = 0;
      @(negedge clk);
      start = 1'b0;
      while (!done) begin
        @(posedge clk); cyc++;
        #1;
      end
      check(cyc == CYCLES, $sformatf("run took %0d cycles, expected %0d", cyc, CYCLES));
      for (int i = 1; i <= N; i++)
        for (int j = 1; j <= N; j++) begin
          rd_i = IDX_W'(i); rd_j = IDX_W'(j);
          #1;
          check(longint'(rd_l) == m.l[i][j], $sformatf("L(%0d,%0d)=%0d expected %0d", i, j, rd_l, m.l[i][j]));
          check(longint'(rd_u) == m.u[i][j], $sformatf("U(%0d,%0d)=%0d expected %0d", i, j, rd_u, m.u[i][j]));
        end
      check(m.max_residual() <= 256, $sformatf("L*U differs from A by %0d LSB", m.max_residual()));
    end
    finished = 1'b1;
  end
endmodule
