// tb_lu_feeder: unit test of the band input buffer and skewed injector
// (N = 6, P = Q = 4).
//
// Writes a band matrix whose elements encode their own indices (plus some writes
// outside the band that must be ignored), then sweeps t over the whole schedule
// with busy high and checks every edge port in every cycle against a table built
// from the forward schedule: a(i,j) enters at step k0 = max(i-P+1, j-Q+1), time
// i+j+k0, on the bottom port j-k0 if i-k0 = P-1, else on the right port i-k0.
// Also checks that nothing is injected while busy is low and that writes during
// busy are ignored.
module tb_lu_feeder;
  import lu_pkg::*;

  localparam int N = 6, P = 4, Q = 4;
  localparam int T_W = $clog2(3 * N + P + Q + 8) + 2;
  localparam int T0 = -4, T1 = 3 * N + P + Q;

  logic clk = 1'b0, busy = 1'b0, wr_en = 1'b0;
  logic signed [T_W-1:0] t = '0;
  logic [2:0] wr_i = '0, wr_j = '0;
  fx_t wr_data = '0;
  tok_t a_bot [Q];
  tok_t a_rgt [P-1];
  int checks = 0, failures = 0, hits = 0;

  always #5 clk = ~clk;

  lu_feeder dut (.clk, .busy, .t, .wr_en, .wr_i, .wr_j, .wr_data, .a_bot, .a_rgt);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic fx_t code(int i, int j);
    return fx_t'(i * 100 + j - 350);
  endfunction

  task automatic wr(int i, int j, fx_t d);
    @(negedge clk);
    wr_en = 1'b1; wr_i = 3'(i); wr_j = 3'(j); wr_data = d;
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  // expected token per port (0..Q-1 bottom, Q..Q+P-2 right) and time
  function automatic tok_t expect_tok(int port, int tt);
    tok_t r = TOK_NONE;
    for (int i = 1; i <= N; i++)
      for (int j = 1; j <= N; j++) if (i - j < P && j - i < Q) begin
        int k0, p;
        k0 = (i - P + 1 > j - Q + 1) ? i - P + 1 : j - Q + 1;
        p = (i - k0 == P - 1) ? j - k0 : Q + (i - k0);
        if (p == port && i + j + k0 == tt) begin r.v = 1'b1; r.d = code(i, j); end
      end
    return r;
  endfunction

  initial begin
    for (int i = 1; i <= N; i++)
      for (int j = 1; j <= N; j++)
        if (i - j < P && j - i < Q) wr(i, j, code(i, j));
        else wr(i, j, 32'h1234_5678);
    // no injection while idle
    for (int tt = T0; tt <= T1; tt++) begin
      @(negedge clk);
      t = T_W'(tt);
      #1;
      foreach (a_bot[y]) check(!a_bot[y].v, "bottom port idle");
      foreach (a_rgt[x]) check(!a_rgt[x].v, "right port idle");
    end
    busy = 1'b1;
    for (int tt = T0; tt <= T1; tt++) begin
      @(negedge clk);
      t = T_W'(tt);
      // a write attempted during the run must be ignored
      wr_en = 1'b1; wr_i = 3'd1; wr_j = 3'd1; wr_data = 32'h0bad_0bad;
      #1;
      foreach (a_bot[y]) begin
        automatic tok_t e = expect_tok(y, tt);
        check(a_bot[y] == e, $sformatf("bottom %0d at t=%0d: %0d/%0d expected %0d/%0d", y, tt, a_bot[y].v, a_bot[y].d, e.v, e.d));
        if (e.v) hits++;
      end
      foreach (a_rgt[x]) begin
        automatic tok_t e = expect_tok(Q + x, tt);
        check(a_rgt[x] == e, $sformatf("right %0d at t=%0d: %0d/%0d expected %0d/%0d", x, tt, a_rgt[x].v, a_rgt[x].d, e.v, e.d));
        if (e.v) hits++;
      end
    end
    wr_en = 1'b0;
    check(hits == N * N - (N - P) * (N - P + 1) / 2 - (N - Q) * (N - Q + 1) / 2, $sformatf("%0d elements injected", hits));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
