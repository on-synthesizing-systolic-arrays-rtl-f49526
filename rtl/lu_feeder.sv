// lu_feeder: band-matrix input buffer and skewed injector for the LU array.
//
// The buffer holds the band of an N x N matrix, P-1 sub-diagonals, the main
// diagonal and Q-1 super-diagonals, row by row: element a(i,j) (1-based) sits
// in row i-1, slot j-i+P-1. Writes outside the band are ignored, and so are
// writes while busy, since the buffer is read during the whole run.
//
// While busy, the feeder presents to each edge processor of the array the element
// whose first visit to the array falls there at the current time t. For an edge
// processor [x,y] (x = P-1 or y = Q-1) and a time with t - x - y = 3k, that element
// is a(x+k, y+k), provided both indices lie in 1..N; otherwise the input is an
// invalid token. This inverts the schedule t = i+j+k and placement [i-k, j-k]:
// the skewed, diagonal-by-diagonal entry of the matrix into the array.
//
// Timing: the edge tokens are combinational in t and the buffer contents; the
// array registers them. The injection times follow from the array's schedule;
// the band-packed buffer and its write port are this design's own.
module lu_feeder
  import lu_pkg::*;
#(
  parameter int unsigned N = 6,
  parameter int unsigned P = 4,
  parameter int unsigned Q = 4,
  parameter int unsigned T_W = $clog2(3*N + P + Q + 8) + 2,
  parameter int unsigned IDX_W = $clog2(N + 1)
) (
  input  logic                  clk,
  input  logic                  busy,
  input  logic signed [T_W-1:0] t,
  input  logic                  wr_en,
  input  logic [IDX_W-1:0]      wr_i,
  input  logic [IDX_W-1:0]      wr_j,
  input  fx_t                   wr_data,
  output tok_t                  a_bot [Q],
  output tok_t                  a_rgt [P-1]
);

  localparam int unsigned W = P + Q - 1;  // stored diagonals

  fx_t mem [N][W];

  // write port
  always_ff @(posedge clk) begin
    if (wr_en && !busy) begin
      if (wr_i >= 1 && wr_i <= IDX_W'(N) && wr_j >= 1 && wr_j <= IDX_W'(N)
          && int'(wr_j) - int'(wr_i) + int'(P) - 1 >= 0
          && int'(wr_j) - int'(wr_i) + int'(P) - 1 < int'(W)) begin
        mem[int'(wr_i) - 1][int'(wr_j) - int'(wr_i) + int'(P) - 1] <= wr_data;
      end
    end
  end

  // element entering edge processor [x,y] at time t, if any
  function automatic tok_t pick(int x, int y);
    int   d, k, i, j;
    tok_t r;
    r = TOK_NONE;
    d = int'(t) - x - y;
    if (busy && (d % 3) == 0) begin
      k = d / 3;
      i = x + k;
      j = y + k;
      if (i >= 1 && i <= int'(N) && j >= 1 && j <= int'(N)) begin
        r.v = 1'b1;
        r.d = mem[i-1][j-i+int'(P)-1];
      end
    end
    return r;
  endfunction

  always_comb begin
    for (int y = 0; y < int'(Q); y++) a_bot[y] = pick(int'(P) - 1, y);
    for (int x = 0; x < int'(P) - 1; x++) a_rgt[x] = pick(x, int'(Q) - 1);
  end

endmodule
