// tb_lu_div_pe: unit test of the column-0 divider processor.
//
// Drives random elements and pivots (positive and negative, including the
// pivot equal to the element, which must give exactly 1.0, and a zero pivot,
// which gives 0) and checks one cycle later that l = a/u with the reference
// fixed-point quotient and that the pivot is forwarded downward.
module tb_lu_div_pe;
  import lu_pkg::*;
  import tb_lu_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  tok_t a_in, u_in, l_out, u_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lu_div_pe dut (.clk, .rst_n, .a_in, .u_in, .l_out, .u_out);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    a_in = TOK_NONE; u_in = TOK_NONE;
    repeat (2) @(negedge clk);
    check(!l_out.v && !u_out.v, "outputs cleared in reset");
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      int mode;
      tok_t el;
      mode = $urandom_range(0, 5);  // 0 idle, 1 lone pivot, 2 a == u, 3 zero pivot, else random
      a_in.v = mode >= 2;
      a_in.d = a_in.v ? fx_t'($urandom_range(0, 1 << 23) - (1 << 22)) : '0;
      u_in.v = mode >= 1;
      u_in.d = (mode == 0 || mode == 3) ? '0 : (mode == 2) ? a_in.d
             : fx_t'($urandom_range(1 << 14, 1 << 21)) * (($urandom_range(0, 1) == 1) ? fx_t'(-1) : fx_t'(1));
      if (mode == 2 && a_in.d == '0) a_in.d = FX_ONE;
      if (mode == 2) u_in.d = a_in.d;
      el.v = a_in.v;
      el.d = a_in.v ? fx_t'(rdiv(longint'(a_in.d), longint'(u_in.d))) : '0;
      @(negedge clk);
      check(l_out == el, $sformatf("l %0d/%0d expected %0d/%0d (a=%0d u=%0d)", l_out.v, l_out.d, el.v, el.d, a_in.d, u_in.d));
      if (mode == 2) check(l_out.d == FX_ONE, "a/a is exactly one");
      check(u_out == u_in, "pivot forwarded");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
