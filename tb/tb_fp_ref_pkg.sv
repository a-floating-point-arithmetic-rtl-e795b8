// tb_fp_ref_pkg: reference arithmetic for the testbenches, written without
// reference to the RTL.
//
// Double precision round-to-nearest-even results come from the simulator's
// own `real` arithmetic (IEEE binary64). The three directed rounding
// directions are derived from the nearest result and the sign of its exact
// error: TwoSum for sums, Dekker's TwoProduct (Veltkamp splitting) for
// products, and the exactly representable residual a - q*b for quotients.
// Single precision results are the double result rounded once more to
// single; for +, -, x and / this double rounding is harmless because 53 >=
// 2*24 + 2. Random operand generators mix ordinary values with zeros,
// infinities, NaNs and subnormals.
package tb_fp_ref_pkg;

  function automatic logic is_nan_d(input logic [63:0] x);
    return (x[62:52] == 11'h7FF) && (x[51:0] != 0);
  endfunction

  function automatic logic is_nan_s(input logic [31:0] x);
    return (x[30:23] == 8'hFF) && (x[22:0] != 0);
  endfunction

  function automatic real r(input logic [63:0] x);
    return $bitstoreal(x);
  endfunction

  function automatic logic [63:0] b(input real x);
    return $realtobits(x);
  endfunction

  // next representable double towards +inf (-inf when down=1), finite x
  function automatic logic [63:0] step(input logic [63:0] x, input logic down);
    if (x[62:0] == 0) return down ? 64'h8000_0000_0000_0001 : 64'h0000_0000_0000_0001;
    if (x[63] ^ down) return x - 1;
    return x + 1;
  endfunction

  // apply rounding direction rm (0 rne,1 rtz,2 up,3 down) given the nearest
  // result q and the sign of the exact error (err_sgn: -1, 0, +1)
  function automatic logic [63:0] directed(input logic [63:0] q, input int err_sgn,
                                           input logic [1:0] rm);
    if (err_sgn == 0 || rm == 2'd0) return q;
    case (rm)
      2'd1: if ((err_sgn < 0) != q[63]) return step(q, !q[63]); else return q;
      2'd2: if (err_sgn > 0) return step(q, 1'b0); else return q;
      default: if (err_sgn < 0) return step(q, 1'b1); else return q;
    endcase
  endfunction

  function automatic int sgn(input real x);
    return (x > 0.0) ? 1 : (x < 0.0) ? -1 : 0;
  endfunction

  // Veltkamp split and Dekker product error: returns a*b - fl(a*b)
  function automatic real two_prod_err(input real x, input real y, input real p);
    real c, xh, xl, yh, yl;
    c  = 134217729.0 * x;  xh = c - (c - x);  xl = x - xh;
    c  = 134217729.0 * y;  yh = c - (c - y);  yl = y - yh;
    return ((xh * yh - p) + xh * yl + xl * yh) + xl * yl;
  endfunction

  function automatic logic [63:0] ref_add_d(input logic [63:0] x, input logic [63:0] y,
                                            input logic [1:0] rm);
    real s, bb, err;
    s   = r(x) + r(y);
    bb  = s - r(x);
    err = (r(x) - (s - bb)) + (r(y) - bb);
    if (s == 0.0 && err == 0.0) begin
      if (x[63] == y[63]) return {x[63], 63'h0};
      return (rm == 2'd3) ? 64'h8000_0000_0000_0000 : 64'h0;
    end
    return directed(b(s), sgn(err), rm);
  endfunction

  function automatic logic [63:0] ref_mul_d(input logic [63:0] x, input logic [63:0] y,
                                            input logic [1:0] rm);
    real p;
    p = r(x) * r(y);
    return directed(b(p), sgn(two_prod_err(r(x), r(y), p)), rm);
  endfunction

  function automatic logic [63:0] ref_div_d(input logic [63:0] x, input logic [63:0] y,
                                            input logic [1:0] rm);
    real q, p, e, rem;
    q   = r(x) / r(y);
    p   = q * r(y);
    e   = two_prod_err(q, r(y), p);
    rem = (r(x) - p) - e;              // a - q*b, exact
    // error of q has the sign of rem/b
    return directed(b(q), sgn(rem) * sgn(r(y)), rm);
  endfunction

  // single -> double, exact
  function automatic logic [63:0] s2d(input logic [31:0] x);
    logic [22:0] f;
    int          e;
    f = x[22:0];
    if (x[30:23] == 8'hFF) return (f != 0) ? 64'h7FF8_0000_0000_0000 : {x[31], 11'h7FF, 52'h0};
    if (x[30:23] == 0) begin
      if (f == 0) return {x[31], 63'h0};
      e = -126;
      while (!f[22]) begin f = f << 1; e--; end
      f = f << 1;   // drop the leading one
      return {x[31], 11'(e - 1 + 1023), f, 29'h0};
    end
    return {x[31], 11'(int'(x[30:23]) - 127 + 1023), f, 29'h0};
  endfunction

  // double -> single, round to nearest even
  function automatic logic [31:0] d2s(input logic [63:0] x);
    logic [52:0] m;
    logic [63:0] keep, rem, half;
    int          e, sh;
    if (x[62:52] == 11'h7FF) return (x[51:0] != 0) ? 32'h7FC0_0000 : {x[63], 8'hFF, 23'h0};
    if (x[62:52] == 0) return {x[63], 31'h0};       // far below single range
    m = {1'b1, x[51:0]};
    e = int'(x[62:52]) - 1023;
    if (e > 127) return {x[63], 8'hFF, 23'h0};
    sh = (e >= -126) ? 29 : 29 + (-126 - e);
    if (sh > 60) return {x[63], 31'h0};
    keep = 64'(m) >> sh;
    rem  = 64'(m) & ((64'd1 << sh) - 1);
    half = 64'd1 << (sh - 1);
    if (rem > half || (rem == half && keep[0])) keep = keep + 1;
    if (e >= -126) begin
      if (keep == 64'd1 << 24) begin keep = keep >> 1; e++; end
      if (e > 127) return {x[63], 8'hFF, 23'h0};
      return {x[63], 8'(e + 127), keep[22:0]};
    end
    return {x[63], 8'(keep >> 23), keep[22:0]};
  endfunction

  // random double: mostly ordinary values, some specials and subnormals
  function automatic logic [63:0] rand_d(input int base_exp, input int spread);
    int k;
    logic [63:0] v;
    k = $urandom_range(0, 99);
    v = {$urandom(), $urandom()};
    if (k < 3)       v = {v[63], 63'h0};                       // zero
    else if (k < 5)  v = {v[63], 11'h7FF, 52'h0};              // infinity
    else if (k < 7)  v = {v[63], 11'h7FF, 1'b1, v[50:0]};      // quiet NaN
    else if (k < 8)  v = {v[63], 11'h7FF, 1'b0, v[50:1], 1'b1};// signalling NaN
    else if (k < 12) v = {v[63], 11'h000, v[51:0]};            // subnormal
    else v[62:52] = 11'(base_exp + $urandom_range(0, 2 * spread) - spread);
    return v;
  endfunction

  // random double with an ordinary (normal) value
  function automatic logic [63:0] rand_norm_d(input int base_exp, input int spread);
    logic [63:0] v;
    v = {$urandom(), $urandom()};
    v[62:52] = 11'(base_exp + $urandom_range(0, 2 * spread) - spread);
    return v;
  endfunction

  function automatic logic [31:0] rand_s();
    int k;
    logic [31:0] v;
    k = $urandom_range(0, 99);
    v = $urandom();
    if (k < 3)       v = {v[31], 31'h0};
    else if (k < 5)  v = {v[31], 8'hFF, 23'h0};
    else if (k < 7)  v = {v[31], 8'hFF, 1'b1, v[21:0]};
    else if (k < 10) v = {v[31], 8'h00, v[22:0]};
    else             v[30:23] = 8'(127 + $urandom_range(0, 60) - 30);
    return v;
  endfunction

endpackage
