// lu_array: P x Q systolic array for LU decomposition of a band matrix.
//
// The array is the space-time image of the recurrence
//   a(i,j,k) = a(i,j,k-1) - l(i,k) * u(k,j),   l(i,k) = a(i,k,k-1) / u(k,k),
//   u(k,j)   = a(k,j,k-1),
// under the schedule t(i,j,k) = i+j+k and the placement [x,y] = [i-k, j-k].
// P is the lower bandwidth (l(i,k) = 0 for i-k >= P) and Q the upper bandwidth
// (u(k,j) = 0 for j-k >= Q). Three kinds of unit-delay links result:
//   diagonal  [x+1,y+1] -> [x,y]   partially updated matrix elements a,
//   right     [x,y-1]   -> [x,y]   multipliers l of L,
//   down      [x-1,y]   -> [x,y]   pivot rows u of U.
// Column 0 holds dividers (lu_div_pe), all other positions multiply-subtract
// processors (lu_pe). In row 0 the u input of each processor is tied to its own
// diagonal input, because there u(k,j) = a(k,j,k-1) is exactly the element that
// arrives; row 0 therefore injects the rows of U into the columns.
//
// Interface:
//   a_bot[y]  diagonal input of bottom-row processor [P-1,y]
//   a_rgt[x]  diagonal input of right-column processor [x,Q-1], x < P-1
//   l_res[x]  l output of column-0 processor [x,0]: l(x+k,k) one cycle after the
//             processor evaluates point (x+k,k,k) (l_res[0] is always 1)
//   u_res[y]  u output of row-0 processor [0,y]: u(k,y+k) one cycle after the
//             processor evaluates point (k,y+k,k)
// A matrix element a(i,j) must be presented, on the input of the edge processor
// [i-k0, j-k0] with k0 = max(i-P+1, j-Q+1), in the cycle t = i+j+k0. Each
// processor is busy one cycle in three.
// The processor functions, link directions, unit delays, schedule and placement
// follow from the derivation; tying row 0's u input to its diagonal input, the
// edge ports and the result taps are this design's reading of the boundary.
module lu_array
  import lu_pkg::*;
#(
  parameter int unsigned P = 4,  // rows: lower bandwidth
  parameter int unsigned Q = 4   // columns: upper bandwidth
) (
  input  logic clk,
  input  logic rst_n,
  input  tok_t a_bot [Q],
  input  tok_t a_rgt [P-1],
  output tok_t l_res [P],
  output tok_t u_res [Q]
);

  tok_t a_o [P][Q];
  tok_t l_o [P][Q];
  tok_t u_o [P][Q];
  tok_t a_i [P][Q];
  tok_t u_i [P][Q];

  for (genvar x = 0; x < P; x++) begin : g_row
    for (genvar y = 0; y < Q; y++) begin : g_col
      // diagonal input: from the edge feeds or from [x+1,y+1]
      if (x == P-1) begin : g_a_bot
        assign a_i[x][y] = a_bot[y];
      end else if (y == Q-1) begin : g_a_rgt
        assign a_i[x][y] = a_rgt[x];
      end else begin : g_a_int
        assign a_i[x][y] = a_o[x+1][y+1];
      end

      // pivot-row input: row 0 takes its own diagonal input
      if (x == 0) begin : g_u_top
        assign u_i[x][y] = a_i[x][y];
      end else begin : g_u_int
        assign u_i[x][y] = u_o[x-1][y];
      end

      if (y == 0) begin : g_div
        lu_div_pe u_pe (
          .clk  (clk),
          .rst_n(rst_n),
          .a_in (a_i[x][y]),
          .u_in (u_i[x][y]),
          .l_out(l_o[x][y]),
          .u_out(u_o[x][y])
        );
        // the result of a column-0 point is l itself
        assign a_o[x][y] = l_o[x][y];
      end else begin : g_ms
        lu_pe u_pe (
          .clk  (clk),
          .rst_n(rst_n),
          .a_in (a_i[x][y]),
          .l_in (l_o[x][y-1]),
          .u_in (u_i[x][y]),
          .a_out(a_o[x][y]),
          .l_out(l_o[x][y]),
          .u_out(u_o[x][y])
        );
      end
    end
  end

  for (genvar x = 0; x < P; x++) begin : g_lres
    assign l_res[x] = l_o[x][0];
  end
  for (genvar y = 0; y < Q; y++) begin : g_ures
    assign u_res[y] = u_o[0][y];
  end

endmodule
