// tb_lu_pe: unit test of the multiply-subtract processor.
//
// Drives random tokens obeying the array's rule (an element meets both l and u
// or neither), including negative values and the all-invalid idle case, and
// checks one cycle later that a_out = a_in - l*u (reference fixed-point product),
// that l and u are forwarded unchanged, and that reset clears the outputs.
module tb_lu_pe;
  import lu_pkg::*;
  import tb_lu_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  tok_t a_in, l_in, u_in, a_out, l_out, u_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lu_pe dut (.clk, .rst_n, .a_in, .l_in, .u_in, .a_out, .l_out, .u_out);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic tok_t rtok(bit v, int span);
    tok_t r;
    r.v = v;
    r.d = v ? fx_t'($urandom_range(0, 2 * span) - span) : '0;
    return r;
  endfunction

  initial begin
    a_in = TOK_NONE; l_in = TOK_NONE; u_in = TOK_NONE;
    @(negedge clk);
    a_in = rtok(1, 1 << 20);
    @(negedge clk);
    check(!a_out.v && !l_out.v && !u_out.v, "outputs cleared in reset");
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      int mode;
      tok_t ea, el, eu;
      mode = $urandom_range(0, 3);  // 0 idle, 1 pass-through, 2/3 update
      a_in = rtok(mode != 0, 1 << 22);
      l_in = rtok(mode >= 2, 1 << 18);
      u_in = rtok(mode >= 2, 1 << 22);
      if (mode == 0 && $urandom_range(0, 1) == 1) l_in = rtok(1, 1 << 16);  // lone l at the matrix end
      ea.v = a_in.v;
      ea.d = a_in.v ? fx_t'(wrap32(longint'(a_in.d) - rmul(longint'(l_in.d), longint'(u_in.d)))) : '0;
      el = l_in;
      eu = u_in;
      @(negedge clk);
      check(a_out == ea, $sformatf("a_out %0d/%0d expected %0d/%0d", a_out.v, a_out.d, ea.v, ea.d));
      check(l_out == el, "l forwarded");
      check(u_out == eu, "u forwarded");
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
