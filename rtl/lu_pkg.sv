// lu_pkg: shared types and arithmetic for the band LU-decomposition systolic array.
//
// Every value that moves through the array is a token: a valid bit and a signed
// fixed-point number. An invalid token always carries the value zero, so a
// processor that receives no l or u value subtracts nothing and simply passes its
// diagonal input on. The number format (32 bits, 16 of them fraction) is this
// design's choice; the algorithm itself is format-agnostic.
//
// fx_mul truncates toward minus infinity (arithmetic shift of the full product).
// fx_div truncates toward zero (integer division of the pre-shifted dividend) and
// returns zero for a zero divisor, which only occurs for a singular leading minor:
// the array performs no pivoting.
package lu_pkg;

  parameter int unsigned DATA_W = 32;  // width of a matrix value
  parameter int unsigned FRAC_W = 16;  // fraction bits of a matrix value

  typedef logic signed [DATA_W-1:0] fx_t;

  typedef struct packed {
    logic v;  // token carries a meaningful value
    fx_t  d;  // the value (zero when v is low)
  } tok_t;

  localparam fx_t FX_ONE = fx_t'(1) <<< FRAC_W;
  localparam tok_t TOK_NONE = '{v: 1'b0, d: '0};

  function automatic fx_t fx_mul(fx_t a, fx_t b);
    logic signed [2*DATA_W-1:0] p;
    p = (2*DATA_W)'(a) * (2*DATA_W)'(b);
    return fx_t'(p >>> FRAC_W);
  endfunction

  function automatic fx_t fx_div(fx_t a, fx_t b);
    logic signed [2*DATA_W-1:0] n;
    logic signed [2*DATA_W-1:0] q;
    if (b == '0) return '0;
    n = (2*DATA_W)'(a) <<< FRAC_W;
    q = n / (2*DATA_W)'(b);
    return fx_t'(q);
  endfunction

endpackage
