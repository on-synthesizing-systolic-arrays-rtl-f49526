// lu_ctrl: schedule counter of the band LU-decomposition engine.
//
// The array is driven entirely by the schedule t(i,j,k) = i+j+k: every matrix
// element enters, and every result leaves, at a cycle fixed by its indices. This
// block supplies that time. A start pulse loads t with T_START, the injection
// time of a(1,1) (its first visit is the point k = 2 - max(P,Q), t = 4 - max(P,Q),
// which is zero or negative for the bandwidths of interest). t then counts up
// once per clock while busy is high. The last result, u(N,N), is computed at
// t = 3N; the count runs P+Q cycles further so that every token in flight has
// left the array before busy falls and a new decomposition may start. done
// pulses for one cycle as busy falls.
//
// Interface: start is sampled when idle and ignored while busy. t is signed.
// Synchronous active-low reset returns to idle. The schedule itself comes from the
// derivation of the array; the counter, its drain period and the start/done
// handshake are this design's own.
module lu_ctrl #(
  parameter int unsigned N = 6,   // matrix order
  parameter int unsigned P = 4,   // lower bandwidth (array rows)
  parameter int unsigned Q = 4,   // upper bandwidth (array columns)
  parameter int unsigned T_W = $clog2(3*N + P + Q + 8) + 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  output logic                  busy,
  output logic                  done,
  output logic signed [T_W-1:0] t
);

  localparam int MAXPQ   = (P > Q) ? int'(P) : int'(Q);
  localparam int T_START = 4 - MAXPQ;
  localparam int T_END   = 3*int'(N) + int'(P) + int'(Q);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      t    <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          t    <= T_W'(T_START);
        end
      end else if (t == T_W'(T_END)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        t <= t + 1'b1;
      end
    end
  end

endmodule
