// lu_top: band LU-decomposition engine built around a P x Q systolic array.
//
// Factors an N x N band matrix A, with lower bandwidth P and upper bandwidth Q,
// into a unit lower-triangular L and an upper-triangular U (A = L*U, no pivoting).
// The matrix is written into the input buffer element by element, a start pulse
// runs one decomposition, and after done the factors are read element by element.
//
//   lu_feeder    band input buffer; injects a(i,j) skewed into the array edges
//   lu_ctrl      schedule counter t, the common time base of feeder and collector
//   lu_array     the systolic array (column 0 divides, the rest multiply-subtract)
//   lu_collector band buffers for L and U, indexed from the arrival time
//
// Interface: wr_* writes a(wr_i, wr_j) (1-based, fixed point per lu_pkg) when idle;
// start begins a run; busy is high during it; done pulses at its end; rd_l and
// rd_u return L(rd_i, rd_j) and U(rd_i, rd_j) combinationally.
// Timing: a run takes 3N + P + Q - 3 + max(P,Q) cycles from start to done; the
// array itself produces the last factor element at schedule time 3N.
module lu_top
  import lu_pkg::*;
#(
  parameter int unsigned N = 6,
  parameter int unsigned P = 4,
  parameter int unsigned Q = 4,
  localparam int unsigned T_W = $clog2(3*N + P + Q + 8) + 2,
  localparam int unsigned IDX_W = $clog2(N + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [IDX_W-1:0] wr_i,
  input  logic [IDX_W-1:0] wr_j,
  input  fx_t              wr_data,
  input  logic             start,
  output logic             busy,
  output logic             done,
  input  logic [IDX_W-1:0] rd_i,
  input  logic [IDX_W-1:0] rd_j,
  output fx_t              rd_l,
  output fx_t              rd_u
);

  logic signed [T_W-1:0] t;
  tok_t a_bot [Q];
  tok_t a_rgt [P-1];
  tok_t l_res [P];
  tok_t u_res [Q];

  lu_ctrl #(.N(N), .P(P), .Q(Q), .T_W(T_W)) u_ctrl (
    .clk  (clk),
    .rst_n(rst_n),
    .start(start),
    .busy (busy),
    .done (done),
    .t    (t)
  );

  lu_feeder #(.N(N), .P(P), .Q(Q), .T_W(T_W), .IDX_W(IDX_W)) u_feeder (
    .clk    (clk),
    .busy   (busy),
    .t      (t),
    .wr_en  (wr_en),
    .wr_i   (wr_i),
    .wr_j   (wr_j),
    .wr_data(wr_data),
    .a_bot  (a_bot),
    .a_rgt  (a_rgt)
  );

  lu_array #(.P(P), .Q(Q)) u_array (
    .clk  (clk),
    .rst_n(rst_n),
    .a_bot(a_bot),
    .a_rgt(a_rgt),
    .l_res(l_res),
    .u_res(u_res)
  );

  lu_collector #(.N(N), .P(P), .Q(Q), .T_W(T_W), .IDX_W(IDX_W)) u_collector (
    .clk  (clk),
    .rst_n(rst_n),
    .busy (busy),
    .t    (t),
    .l_res(l_res),
    .u_res(u_res),
    .rd_i (rd_i),
    .rd_j (rd_j),
    .rd_l (rd_l),
    .rd_u (rd_u)
  );

endmodule
