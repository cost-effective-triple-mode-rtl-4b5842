// Constant multiplier for the radix-16 internal twiddles W16^m (and W8^m = W16^(2m)).
//
// Of the 38 distinct twiddle values needed by the two constant-multiplier
// positions only two magnitudes are essential: W16^1 = A - jB and
// W16^2 = C - jC (A = cos(pi/8), B = sin(pi/8), C = cos(pi/4)); every other
// value follows by conjugate symmetry. With m = 4q + r:
//   r = 0: x                      r = 1: x * (A - jB)
//   r = 2: x * (C - jC)           r = 3: x * (B - jA)
// followed by a trivial rotation by (-j)^q. The r = 1 and r = 3 cases share one
// datapath: the input parts are swapped (S1) and the imaginary result is
// negated (S2); r = 2 selects the constant pair (C, C) instead of (A, B) (S0).
// The constants are the shift-and-add expansions of the design:
//   A = 1 - 2^-4 - 2^-7 - 2^-8 - 2^-9                (0.923828)
//   B = 2^-2 + 2^-3 + 2^-7 - 2^-13 + 2^-12           (0.382935)
//   C = 2^-1 + 2^-3 + 2^-4 + 2^-6 + 2^-8 + 2^-12     (0.707275)
// implemented with shifts and adders only. The adder sharing inside the
// shift-add trees is this design's own; the results are rounded to 13 bits
// and saturated.
//
// With `inverse` set the conjugate twiddle W16^-m is applied (IFFT mode).
// One register stage: dout is valid one enabled cycle after din.
module const_mult
  import r42sdf_pkg::*;
(
  input  logic       clk,
  input  logic       en,
  input  logic [3:0] m,
  input  logic       inverse,
  input  cplx_t      din,
  output cplx_t      dout
);

  typedef logic signed [31:0] acc_t;

  function automatic acc_t mul_a(input acc_t x);
    return (x <<< 13) - (x <<< 9) - (x <<< 6) - (x <<< 5) - (x <<< 4);
  endfunction

  function automatic acc_t mul_b(input acc_t x);
    return (x <<< 11) + (x <<< 10) + (x <<< 6) - x + (x <<< 1);
  endfunction

  function automatic acc_t mul_c(input acc_t x);
    return (x <<< 12) + (x <<< 10) + (x <<< 9) + (x <<< 7) + (x <<< 5) + (x <<< 1);
  endfunction

  logic [3:0] me;
  logic [1:0] q, r;
  logic       s0, s1, s2;
  acc_t       u, v, p, qv;
  cplx_w_t    prod;
  cplx_t      y;

  always_comb begin
    me = inverse ? 4'(-m) : m;
    q  = me[3:2];
    r  = me[1:0];
    s0 = (r == 2'd2);          // constant pair (C, C)
    s1 = (r == 2'd3);          // swap real/imaginary input
    s2 = (r == 2'd3);          // negate imaginary result
    u  = s1 ? acc_t'(din.im) : acc_t'(din.re);
    v  = s1 ? acc_t'(din.re) : acc_t'(din.im);
    if (s0) begin
      p  = mul_c(u) + mul_c(v);
      qv = mul_c(v) - mul_c(u);
    end else begin
      p  = mul_a(u) + mul_b(v);
      qv = mul_a(v) - mul_b(u);
    end
    if (s2) qv = -qv;
    if (r == 2'd0) begin
      prod = widen(din);
    end else begin
      prod.re = wide_t'(rshr(p, 13));
      prod.im = wide_t'(rshr(qv, 13));
    end
    y = cscale(rot_mj(prod, q), 0);
  end

  always_ff @(posedge clk) begin
    if (en) dout <= y;
  end

endmodule
