// tb_lu_ctrl: unit test of the schedule counter (N = 6, P = Q = 4).
//
// Checks that a start pulse loads t = 4 - max(P,Q), that t then rises by one per
// cycle up to 3N + P + Q with busy high, that done pulses for exactly one cycle
// as busy falls, that start is ignored while busy, and that reset returns to idle.
module tb_lu_ctrl;
  localparam int N = 6, P = 4, Q = 4;
  localparam int T_W = $clog2(3 * N + P + Q + 8) + 2;
  localparam int T_START = 0, T_END = 26;  // 4 - max(4,4) and 3*6 + 4 + 4

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done;
  logic signed [T_W-1:0] t;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lu_ctrl dut (.clk, .rst_n, .start, .busy, .done, .t);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic one_run(bit poke_start);
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = poke_start;
    for (int e = T_START; e <= T_END; e++) begin
      check(busy && !done, $sformatf("busy during t=%0d", e));
      check(int'(t) == e, $sformatf("t=%0d expected %0d", t, e));
      @(negedge clk);
    end
    start = 1'b0;
    check(!busy && done, "done pulse as busy falls");
    @(negedge clk);
    check(!busy && !done, "done lasts one cycle");
  endtask

  initial begin
    @(negedge clk);
    start = 1'b1;
    repeat (2) @(negedge clk);
    check(!busy && !done, "idle in reset");
    start = 1'b0;
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    check(!busy, "idle without start");
    one_run(1'b0);
    one_run(1'b1);  // start held high during the run must not restart it
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    repeat (5) @(negedge clk);
    rst_n = 1'b0;
    @(negedge clk);
    check(!busy, "reset aborts a run");
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
