// tb_lu_collector: unit test of the L and U result buffers (N = 6, P = Q = 4).
//
// Plays the array's result streams with made-up values that encode their indices:
// u(k, y+k) on port y one cycle after t = y + 3k, l(x+k, k) on port x one cycle
// after t = x + 3k, including the results past the matrix end that must be
// dropped. Then reads every (i,j) and checks L (unit diagonal, zero above and
// outside the band) and U (zero below and outside the band).
module tb_lu_collector;
  import lu_pkg::*;

  localparam int N = 6, P = 4, Q = 4;
  localparam int T_W = $clog2(3 * N + P + Q + 8) + 2;

  logic clk = 1'b0, rst_n = 1'b1, busy = 1'b0;
  logic signed [T_W-1:0] t = '0;
  tok_t l_res [P];
  tok_t u_res [Q];
  logic [2:0] rd_i = '0, rd_j = '0;
  fx_t rd_l, rd_u;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lu_collector dut (.clk, .rst_n, .busy, .t, .l_res, .u_res, .rd_i, .rd_j, .rd_l, .rd_u);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic fx_t lcode(int i, int k); return fx_t'(1000 * i + k); endfunction
  function automatic fx_t ucode(int k, int j); return fx_t'(-1000 * k - j); endfunction

  initial begin
    foreach (l_res[x]) l_res[x] = TOK_NONE;
    foreach (u_res[y]) u_res[y] = TOK_NONE;
    busy = 1'b1;
    for (int tt = 0; tt <= 3 * N + P + Q; tt++) begin
      @(negedge clk);
      t = T_W'(tt);
      foreach (l_res[x]) l_res[x] = TOK_NONE;
      foreach (u_res[y]) u_res[y] = TOK_NONE;
      for (int y = 0; y < Q; y++)
        if ((tt - 1 - y) % 3 == 0 && (tt - 1 - y) / 3 >= 1) begin
          automatic int k = (tt - 1 - y) / 3;
          u_res[y] = '{v: 1'b1, d: ucode(k, k + y)};  // past the end when k+y > N
        end
      for (int x = 0; x < P; x++)
        if ((tt - 1 - x) % 3 == 0 && (tt - 1 - x) / 3 >= 1) begin
          automatic int k = (tt - 1 - x) / 3;
          l_res[x] = '{v: 1'b1, d: (x == 0) ? FX_ONE : lcode(k + x, k)};
        end
    end
    @(negedge clk);
    busy = 1'b0;
    foreach (l_res[x]) l_res[x] = '{v: 1'b1, d: 32'h7777};  // ignored while idle
    foreach (u_res[y]) u_res[y] = '{v: 1'b1, d: 32'h7777};
    @(negedge clk);
    for (int i = 1; i <= N; i++)
      for (int j = 1; j <= N; j++) begin
        fx_t el, eu;
        el = (i == j) ? FX_ONE : (i > j && i - j < P) ? lcode(i, j) : '0;
        eu = (j >= i && j - i < Q) ? ucode(i, j) : '0;
        rd_i = 3'(i); rd_j = 3'(j);
        #1;
        check(rd_l == el, $sformatf("L(%0d,%0d)=%0d expected %0d", i, j, rd_l, el));
        check(rd_u == eu, $sformatf("U(%0d,%0d)=%0d expected %0d", i, j, rd_u, eu));
      end
    rd_i = 3'd0; rd_j = 3'd1;
    #1;
    check(rd_l == '0 && rd_u == '0, "index 0 reads zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
