// lu_pe: inner processor of the band LU-decomposition systolic array.
//
// Processor [x,y] evaluates the recurrence point (i,j,k) = (x+k, y+k, k) at time
// t = i+j+k, that is once every three cycles. In that cycle it takes
//   a_in : a(i,j,k-1), arriving diagonally from processor [x+1,y+1],
//   l_in : l(i,k),     arriving from its left neighbour [x,y-1],
//   u_in : u(k,j),     arriving from its upper neighbour [x-1,y],
// and produces a(i,j,k) = a(i,j,k-1) - l(i,k)*u(k,j), sent diagonally to
// [x-1,y-1]. The l and u values are forwarded unchanged to the right and downward.
// All three outputs are registered, so every link has a delay of one cycle, as
// the derivation of the array requires. In the other two cycles of three the
// processor sees invalid tokens and passes them on.
//
// When l and u are both invalid (a point before the first elimination step) the
// product is zero and a_in is forwarded unchanged; this is how matrix elements
// travel from the array's edge to the processor of their first update.
//
// Timing: outputs follow inputs by exactly one clock. Synchronous reset clears all outputs
// to invalid tokens.
module lu_pe
  import lu_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  tok_t a_in,
  input  tok_t l_in,
  input  tok_t u_in,
  output tok_t a_out,
  output tok_t l_out,
  output tok_t u_out
);

  tok_t a_nxt;

  always_comb begin
    a_nxt.v = a_in.v;
    a_nxt.d = a_in.v ? (a_in.d - fx_mul(l_in.d, u_in.d)) : '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_out <= TOK_NONE;
      l_out <= TOK_NONE;
      u_out <= TOK_NONE;
    end else begin
      a_out <= a_nxt;
      l_out <= l_in;
      u_out <= u_in;
    end
  end

  // A matrix element meets either both factors of one elimination step or
  // neither (on its way in). Without an element, a lone l or u may pass: near
  // the end of the matrix a row of L or U has no partner left.
  property p_lu_paired;
    @(posedge clk) disable iff (!rst_n) a_in.v |-> (l_in.v == u_in.v);
  endproperty
  a_lu_paired: assert property (p_lu_paired);

endmodule
