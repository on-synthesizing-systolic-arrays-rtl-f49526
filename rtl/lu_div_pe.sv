// lu_div_pe: boundary processor of column y = 0 of the band LU-decomposition array.
//
// In column 0 the recurrence point is (i,k,k), the step at which column k of L is
// formed: l(i,k) = a(i,k,k-1) / u(k,k). The processor takes a(i,k,k-1) on its
// diagonal input and the pivot u(k,k) from the processor above it, divides, and
// sends l(i,k) to the right along its row (where the inner processors use it)
// and out of the array as a result. The pivot is forwarded downward. In row 0
// the pivot is the processor's own diagonal input (wired so by the array), which
// yields l(k,k) = 1 for the row-0 processors to the right.
//
// Timing: one division per active cycle, outputs registered one clock after the
// inputs. An invalid diagonal input produces an invalid l token.
module lu_div_pe
  import lu_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  tok_t a_in,
  input  tok_t u_in,
  output tok_t l_out,
  output tok_t u_out
);

  tok_t l_nxt;

  always_comb begin
    l_nxt.v = a_in.v;
    l_nxt.d = a_in.v ? fx_div(a_in.d, u_in.d) : '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      l_out <= TOK_NONE;
      u_out <= TOK_NONE;
    end else begin
      l_out <= l_nxt;
      u_out <= u_in;
    end
  end

  // A matrix element reaching column 0 always meets its pivot.
  property p_pivot_present;
    @(posedge clk) disable iff (!rst_n) a_in.v |-> u_in.v;
  endproperty
  a_pivot_present: assert property (p_pivot_present);

endmodule
