// The single complex multiplier of the pipeline, fed by the eight-folded ROM.
//
// Multiplies the data word by W256^H (forward FFT twiddles W256^(n3*(k1+4k2))
// and the 2-D DCT time-domain shift W8^((k1+k2)/4) = W256^(8*(k1+k2))) or, with
// `inverse` set, by the conjugate W256^-H (IFFT). The product uses three real
// multiplications and five real additions:
//   t  = wr*(xr + xi)
//   re = t - xi*(wr + wi)
//   im = t + xr*(wi - wr)
// Products carry 11 fractional bits and are rounded back to 13 bits and
// saturated. One register stage: dout is valid one enabled cycle after din.
module complex_mult
  import r42sdf_pkg::*;
(
  input  logic       clk,
  input  logic       en,
  input  logic [7:0] h,
  input  logic       inverse,
  input  cplx_t      din,
  output cplx_t      dout
);

  typedef logic signed [31:0] acc_t;

  cplx_t w;
  logic [7:0] he;
  acc_t t, pre, pim;
  cplx_t y;

  assign he = inverse ? 8'(-h) : h;

  twiddle_rom u_rom (
    .h (he),
    .w (w)
  );

  always_comb begin
    t   = acc_t'(w.re) * (acc_t'(din.re) + acc_t'(din.im));
    pre = t - acc_t'(din.im) * (acc_t'(w.re) + acc_t'(w.im));
    pim = t + acc_t'(din.re) * (acc_t'(w.im) - acc_t'(w.re));
    y.re = rshr(pre, TWF);
    y.im = rshr(pim, TWF);
  end

  always_ff @(posedge clk) begin
    if (en) dout <= y;
  end

endmodule
