// lu_collector: result buffers for the L and U factors leaving the LU array.
//
// Row 0 of the array emits u(k, y+k) on output u_res[y] one cycle after time
// t = y + 3k, and column 0 emits l(x+k, k) on l_res[x] one cycle after
// t = x + 3k. Because the schedule fixes these times, the collector recovers the
// indices of each result from the current time alone and stores it in band form:
//   U: row k-1, slot j-k      (the main diagonal and Q-1 super-diagonals)
//   L: row i-1, slot i-k-1    (P-1 sub-diagonals; the unit diagonal is implied)
// The read port returns, for any (rd_i, rd_j) in 1..N, the element of L and of
// U at that position: zero outside the band, one on the diagonal of L.
//
// Timing: results are written on the clock edge of the cycle they appear in;
// reads are combinational. The buffers are not reset; every band position is
// written by a complete run. rst_n only qualifies the schedule assertions.
// The buffers are this design's own; where and when results appear is fixed by
// the array's schedule.
module lu_collector
  import lu_pkg::*;
#(
  parameter int unsigned N = 6,
  parameter int unsigned P = 4,
  parameter int unsigned Q = 4,
  parameter int unsigned T_W = $clog2(3*N + P + Q + 8) + 2,
  parameter int unsigned IDX_W = $clog2(N + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  busy,
  input  logic signed [T_W-1:0] t,
  input  tok_t                  l_res [P],
  input  tok_t                  u_res [Q],
  input  logic [IDX_W-1:0]      rd_i,
  input  logic [IDX_W-1:0]      rd_j,
  output fx_t                   rd_l,
  output fx_t                   rd_u
);

  fx_t lmem [N][P-1];
  fx_t umem [N][Q];

  always_ff @(posedge clk) begin
    if (busy) begin
      for (int y = 0; y < int'(Q); y++) begin
        if (u_res[y].v) begin
          int k;
          k = (int'(t) - 1 - y) / 3;
          if (k >= 1 && k + y <= int'(N)) umem[k-1][y] <= u_res[y].d;
        end
      end
      for (int x = 1; x < int'(P); x++) begin
        if (l_res[x].v) begin
          int k;
          k = (int'(t) - 1 - x) / 3;
          if (k >= 1 && k + x <= int'(N)) lmem[k+x-1][x-1] <= l_res[x].d;
        end
      end
    end
  end

  always_comb begin
    int di, dj;
    di = int'(rd_i) - int'(rd_j);  // distance below the diagonal
    dj = int'(rd_j) - int'(rd_i);  // distance above the diagonal
    rd_l = '0;
    rd_u = '0;
    if (rd_i >= 1 && rd_i <= IDX_W'(N) && rd_j >= 1 && rd_j <= IDX_W'(N)) begin
      if (di == 0) rd_l = FX_ONE;
      else if (di > 0 && di < int'(P)) rd_l = lmem[int'(rd_i)-1][di-1];
      if (dj >= 0 && dj < int'(Q)) rd_u = umem[int'(rd_i)-1][dj];
    end
  end

  // results arrive only in the cycles the schedule allots to them
  property p_u_on_schedule(int y);
    @(posedge clk) disable iff (!rst_n) busy && u_res[y].v |-> ((int'(t) - 1 - y) % 3) == 0;
  endproperty
  property p_l_on_schedule(int x);
    @(posedge clk) disable iff (!rst_n) busy && l_res[x].v |-> ((int'(t) - 1 - x) % 3) == 0;
  endproperty
  for (genvar y = 0; y < Q; y++) begin : g_au
    a_u_on_schedule: assert property (p_u_on_schedule(y));
  end
  for (genvar x = 0; x < P; x++) begin : g_al
    a_l_on_schedule: assert property (p_l_on_schedule(x));
  end

endmodule
