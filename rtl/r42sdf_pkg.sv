// Shared types and arithmetic helpers of the triple-mode radix-4^2 single-delay-
// feedback (R4^2SDF) FFT/IFFT/2-D DCT pipeline.
//
// Every datapath word is a complex number of two 13-bit two's-complement parts
// (the 13-bit internal wordlength chosen by the design's finite-wordlength
// study). Twiddle coefficients are 13-bit signed with 11 fractional bits, so
// 1.0 is 2048. The helpers below implement the "trivial" multiplications of
// the butterflies (by +-1 and +-j), rounding right shifts and saturation.
// Nothing here holds state.
package r42sdf_pkg;

  localparam int unsigned WL  = 13;   // internal data wordlength (both parts)
  localparam int unsigned TWF = 11;   // twiddle fractional bits (1.0 = 2048)

  typedef logic signed [WL-1:0] word_t;

  typedef struct packed {
    word_t re;
    word_t im;
  } cplx_t;

  // Operating modes of the processor.
  typedef enum logic [1:0] {
    MODE_FFT  = 2'd0,   // 256-point forward FFT
    MODE_IFFT = 2'd1,   // 256-point inverse FFT
    MODE_DCT  = 2'd2    // two concurrent 8x8 2-D DCTs
  } mode_e;

  // Wide intermediate for sums of up to four words.
  typedef logic signed [WL+2:0] wide_t;

  typedef struct packed {
    wide_t re;
    wide_t im;
  } cplx_w_t;

  // Saturate a wide value to the data wordlength.
  function automatic word_t sat_w(input logic signed [31:0] v);
    localparam logic signed [31:0] MAXV = (32'sd1 <<< (WL - 1)) - 32'sd1;
    localparam logic signed [31:0] MINV = -(32'sd1 <<< (WL - 1));
    if (v > MAXV)      return word_t'(MAXV);
    else if (v < MINV) return word_t'(MINV);
    else               return word_t'(v);
  endfunction

  // Arithmetic right shift by s with round-half-to-even (convergent
  // rounding), then saturation. Round-half-up would add a small positive
  // bias at every one of the many rounding points of the pipeline; ties to
  // even average it out, which keeps the DCT mean error near zero.
  function automatic word_t rshr(input logic signed [31:0] v, input int unsigned s);
    logic signed [31:0] q, rem, half;
    if (s == 0) return sat_w(v);
    q    = v >>> s;                       // floor
    rem  = v - (q <<< s);                 // 0 .. 2^s - 1
    half = 32'sd1 <<< (s - 1);
    if (rem > half || (rem == half && q[0])) q = q + 32'sd1;
    return sat_w(q);
  endfunction

  function automatic cplx_w_t widen(input cplx_t a);
    cplx_w_t r;
    r.re = wide_t'(a.re);
    r.im = wide_t'(a.im);
    return r;
  endfunction

  // Multiply by (-j)^q (q taken modulo 4): real-imaginary swap and sign inversion.
  function automatic cplx_w_t rot_mj(input cplx_w_t a, input logic [1:0] q);
    cplx_w_t r;
    unique case (q)
      2'd0: begin r.re =  a.re; r.im =  a.im; end
      2'd1: begin r.re =  a.im; r.im = -a.re; end
      2'd2: begin r.re = -a.re; r.im = -a.im; end
      default: begin r.re = -a.im; r.im =  a.re; end
    endcase
    return r;
  endfunction

  function automatic cplx_w_t cadd(input cplx_w_t a, input cplx_w_t b);
    cplx_w_t r;
    r.re = a.re + b.re;
    r.im = a.im + b.im;
    return r;
  endfunction

  function automatic cplx_w_t csub(input cplx_w_t a, input cplx_w_t b);
    cplx_w_t r;
    r.re = a.re - b.re;
    r.im = a.im - b.im;
    return r;
  endfunction

  // Scale a wide complex value down by 2^s with rounding and saturate.
  function automatic cplx_t cscale(input cplx_w_t a, input int unsigned s);
    cplx_t r;
    r.re = rshr(32'(a.re), s);
    r.im = rshr(32'(a.im), s);
    return r;
  endfunction

endpackage
