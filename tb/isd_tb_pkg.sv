// isd_tb_pkg: reference checks for the ISD unit testbenches.
//
// A single-precision result is checked exactly, without floating-point
// arithmetic: for a normal result V = M 2^(Er-23) (M the 24-bit significand) and the
// exact value t, round-to-nearest means (M - 1/2) 2^(Er-23) < t < (M + 1/2) 2^(Er-23)
// (none of the three operations can hit a tie exactly).  Each operation turns this
// into integer comparisons  f(2M +- 1) 2^s  <>  X :
//   DIV    f(m) = m * H          s = Er - 24 - Ex + Eh      X = Xm
//   SQRT   f(m) = m^2            s = 2 Er - Ex - 25         X = Xm
//   ISQRT  f(m) = m^2 * H        s = 2 Er + Eh - 71         X = 1
// with Xm, H the integer significands and Ex, Eh, Er unbiased exponents; f(2M) 2^s
// = X means the result is exact.
package isd_tb_pkg;

  typedef logic [511:0] big_t;

  // sign of a * 2^s - x
  function automatic int cmp_scaled(big_t a, int s, big_t x);
    big_t l, r;
    if (s >= 0) begin l = a << s; r = x;        end
    else        begin l = a;      r = x << (-s); end
    if (l < r) return -1;
    if (l > r) return 1;
    return 0;
  endfunction

  // op: 0 DIV, 1 SQRT, 2 ISQRT.  Returns 1 if res is the correctly rounded result
  // of a normal, in-range operation on x (DIV, SQRT) and h (DIV, ISQRT); exact_o
  // tells whether the operation was exact.
  function automatic bit check_rounded(int op, logic [31:0] x, logic [31:0] h,
                                       logic [31:0] res, output bit exact_o);
    big_t xm, hm, m, lo, hi, mid, xv;
    int   ex, eh, er, s;
    exact_o = 0;
    if (res[30:23] == 8'd0 || res[30:23] == 8'hFF) return 0;
    xm = big_t'({1'b1, x[22:0]});
    hm = big_t'({1'b1, h[22:0]});
    m  = big_t'({1'b1, res[22:0]});
    ex = int'(x[30:23]) - 127;
    eh = int'(h[30:23]) - 127;
    er = int'(res[30:23]) - 127;
    case (op)
      0: begin
        lo = (2*m - 1) * hm; mid = 2*m * hm; hi = (2*m + 1) * hm;
        s  = er - 24 - ex + eh; xv = xm;
        if (res[31] != (x[31] ^ h[31])) return 0;
      end
      1: begin
        lo = (2*m - 1) * (2*m - 1); mid = 4*m*m; hi = (2*m + 1) * (2*m + 1);
        s  = 2*er - ex - 25; xv = xm;
        if (res[31]) return 0;
      end
      default: begin
        lo = (2*m - 1) * (2*m - 1) * hm; mid = 4*m*m*hm; hi = (2*m + 1) * (2*m + 1) * hm;
        s  = 2*er + eh - 71; xv = 1;
        if (res[31]) return 0;
      end
    endcase
    exact_o = (cmp_scaled(mid, s, xv) == 0);
    return cmp_scaled(lo, s, xv) < 0 && cmp_scaled(hi, s, xv) > 0;
  endfunction

endpackage
